// sc_tail_fsm: slave FSM of step 2, counting the tail bits of W_H.
//
// Full group g (g = 1 .. W_H) of the index sequence ends in one tail position
// whose input-bit index depends only on g; the index comes from the tail LUT
// (sc_tail_lut).  One cycle per tail bit: W_H cycles, each issuing OP_ADD.
//
// Interface: `load` latches W_H and restarts the group counter at 1; while
// `active` is high the FSM issues one count per cycle; `last` marks the
// cycle that counts the tail of group W_H.  W_H must be nonzero.
module sc_tail_fsm
  import sc_pkg::*;
#(
  parameter int unsigned N = 8,
  localparam int unsigned H  = N / 2,
  localparam int unsigned IW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [H-1:0]  w_h,
  input  logic          active,
  output cnt_op_e       op,
  output logic [IW-1:0] sel,
  output logic          last
);
  logic [H-1:0] wh_q;
  logic [H-1:0] g_q;   // current group, 1 .. W_H

  sc_tail_lut #(.N(N)) u_lut (.g(g_q), .idx(sel));

  assign op   = active ? OP_ADD : OP_NONE;
  assign last = active && (g_q == wh_q);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wh_q <= '0;
      g_q  <= H'(1);
    end else if (load) begin
      wh_q <= w_h;
      g_q  <= H'(1);
    end else if (active && !last) begin
      g_q <= g_q + H'(1);
    end
  end

  a_wh_nonzero: assert property (@(posedge clk) disable iff (!rst_n) active |-> wh_q != '0);
endmodule
