// sc_lead_one: leading-one detector for the upper weight half W_H.
// Step 1 scans W_H from its most significant 1-bit downwards (a Horner scan),
// so leading zeros of a small W_H cost no cycles.  Returns the position of
// the highest set bit (0 when no bit is set).  Combinational.
// The detector is named in the published design; the priority encoder is
// this design's implementation of it.
module sc_lead_one #(
  parameter int unsigned W = 4,
  localparam int unsigned PW = (W > 1) ? $clog2(W) : 1
) (
  input  logic [W-1:0]  v,
  output logic [PW-1:0] pos    // index of the highest 1 (0 when v == 0)
);
  always_comb begin
    pos = '0;
    for (int unsigned b = 0; b < W; b++) begin
      if (v[b]) pos = b[PW-1:0];
    end
  end
endmodule
