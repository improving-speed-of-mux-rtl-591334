// sc_input_mux: the N-to-1 input multiplexer of a MUX-FSM stochastic-computing
// lane.  Each cycle the controller drives an input-bit index and the MUX puts
// that bit of the lane's activation operand I on the stream that is counted.
// Purely combinational; one instance per lane, all lanes share `sel`.
//
// An inverter sits on the MUX input of the most significant bit, as in the
// published MUX-FSM multipliers, for signed (two's complement) activations:
// with `inv_msb` high, I[N-1] is inverted, which turns I into offset binary
// I + 2^(N-1), so that the stream carries the bipolar value of I.  Making the
// inverter switchable at run time is this design's choice.
module sc_input_mux #(
  parameter int unsigned N = 8   // operand width in bits
) (
  input  logic [N-1:0]         i_bits,  // activation operand I
  input  logic [$clog2(N)-1:0] sel,     // index of the bit to pass on
  input  logic                 inv_msb, // invert I[N-1] (signed activations)
  output logic                 bit_o    // I[sel], inverted for sel = N-1 when inv_msb
);
  always_comb begin
    bit_o = 1'b0;
    for (int unsigned b = 0; b < N; b++) begin
      if (sel == b[$clog2(N)-1:0]) bit_o = (b == N - 1) ? (i_bits[b] ^ inv_msb) : i_bits[b];
    end
  end
endmodule
