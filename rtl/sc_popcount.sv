// sc_popcount: adds up the stream bits of all lanes that share one controller.
// When LANES multiplications I_1 x W ... I_LANES x W share the weight W, the
// MUX outputs of all lanes are summed each cycle so that one shift counter
// accumulates I_1 x W + ... + I_LANES x W.  With LANES = 1 this is a single
// multiplier and the count is the MUX output itself.  Combinational.
// Sharing one weight controller among 16 lanes follows the published
// 16-multiplication configuration; adding the lanes with a popcount into
// one counter is this design's choice.
module sc_popcount #(
  parameter int unsigned LANES = 16,
  localparam int unsigned PC_W = $clog2(LANES + 1)
) (
  input  logic [LANES-1:0] bits_i,  // one selected bit per lane
  output logic [PC_W-1:0]  count_o  // number of ones among them
);
  always_comb begin
    count_o = '0;
    for (int unsigned l = 0; l < LANES; l++) begin
      count_o = count_o + PC_W'(bits_i[l]);
    end
  end
endmodule
