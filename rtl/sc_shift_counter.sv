// sc_shift_counter: the 1-bit counter block with a one-bit left shifter.
//
// It accumulates the product.  Besides counting (acc += inc) it can double
// the accumulator in one cycle, which replaces repeated counting of the
// common bit streams of W_H.  An internal register `cs` holds the count
// of the common bit stream while it is being formed, so that the doubling
// steps inside one common stream (count I[n-1], shift and count I[n-2], ...)
// do not disturb the running total; the finished common-stream count is
// folded into the accumulator on the stream's last bit.
//
// `inc` is the number of ones selected this cycle (1 bit for one lane, a
// lane popcount when several multiplications share the weight).
// All operations take effect at the rising clock edge; `acc` is a register.
// A synchronous active-low reset clears both
// registers.
//
// The counter with a one-bit (not barrel) shifter and an internal register
// follows the published architecture; using that register to hold the
// common-stream count, and making the accumulator wide enough that a shift
// never drops a bit, is this design's reading of it.
module sc_shift_counter
  import sc_pkg::*;
#(
  parameter int unsigned N     = 8,    // operand width
  parameter int unsigned LANES = 16,   // lanes summed into this counter
  localparam int unsigned PC_W  = $clog2(LANES + 1),
  localparam int unsigned ACC_W = N + PC_W,       // holds LANES * (2^N - 1)
  localparam int unsigned CS_W  = N / 2 + PC_W    // holds LANES * (2^(N/2) - 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  cnt_op_e          op,
  input  logic [PC_W-1:0]  inc,
  output logic [ACC_W-1:0] acc
);
  logic [CS_W-1:0] cs;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc <= '0;
      cs  <= '0;
    end else begin
      unique case (op)
        OP_CLEAR: begin
          acc <= '0;
          cs  <= '0;
        end
        OP_ADD:      acc <= acc + ACC_W'(inc);
        OP_SHL:      acc <= acc << 1;
        OP_CS_FIRST: cs  <= CS_W'(inc);
        OP_CS_SHIFT: cs  <= (cs << 1) + CS_W'(inc);
        OP_CS_LAST:  acc <= acc + (ACC_W'(cs) << 1) + ACC_W'(inc);
        default: ;
      endcase
    end
  end
endmodule
