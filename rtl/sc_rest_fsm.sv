// sc_rest_fsm: slave FSM of step 3, counting the last W_L bits of the stream.
//
// The last, partial group holds positions m = 1 .. W_L after the full groups;
// their input-bit index is N-1-tz(m), the rule of the conventional MUX-FSM
// index generator (a counter followed by a trailing-zero encoder).  One cycle
// per bit: W_L cycles, each issuing OP_ADD to the counter shared with step 2.
//
// Interface: `load` latches W_L and restarts m at 1; while `active` is high
// one count is issued per cycle; `last` marks the cycle that counts bit W_L.
// W_L must be nonzero.
// The index rule reproduces the published sequence 5 4 5 3 5 4 5 ... for
// n = 6; the counter-plus-encoder form of the generator is this design's.
module sc_rest_fsm
  import sc_pkg::*;
#(
  parameter int unsigned N = 8,
  localparam int unsigned H  = N / 2,
  localparam int unsigned IW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [H-1:0]  w_l,
  input  logic          active,
  output cnt_op_e       op,
  output logic [IW-1:0] sel,
  output logic          last
);
  logic [H-1:0] wl_q;
  logic [H-1:0] m_q;   // stream position inside the last group, 1 .. W_L

  // Trailing-zero encoder: m_q is never zero while active.
  always_comb begin
    sel = IW'(N - 1);
    for (int b = int'(H) - 1; b >= 0; b--) begin
      if (m_q[b]) sel = IW'(N - 1 - b);
    end
  end

  assign op   = active ? OP_ADD : OP_NONE;
  assign last = active && (m_q == wl_q);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wl_q <= '0;
      m_q  <= H'(1);
    end else if (load) begin
      wl_q <= w_l;
      m_q  <= H'(1);
    end else if (active && !last) begin
      m_q <= m_q + H'(1);
    end
  end

  a_wl_nonzero: assert property (@(posedge clk) disable iff (!rst_n) active |-> wl_q != '0);
endmodule
