// sc_common_fsm: slave FSM of step 1, counting the common bit streams of W_H.
//
// With H = N/2, every full group of 2^H stream positions starts with the same
// 2^H-1 positions (5 4 5 3 5 4 5 for N = 6), whose count is
// C = sum_t 2^(H-1-t) * I[N-1-t].  The W_H full groups together contribute
// W_H * C, which this FSM forms by a Horner scan of W_H from its leading 1:
//   - for a 1-bit of W_H: H cycles forming C by shift-and-count
//     (select I[N-1]; then shift and select I[N-2]; ... I[N-H]); the last
//     of them adds C to the accumulator;
//   - between two bits of W_H: one cycle doubling the accumulator.
// Cycles: popcount(W_H) * H + (position of leading 1 of W_H).
// This matches the published worked example (W_H = 3, n = 6: 3 + 1 + 3 = 7
// cycles) and its average cycle counts for n = 6.  The schedule is produced
// by scanning W_H from a leading-one detector rather than read from a
// table of shift-control signals, and the common stream is selected through
// the lane MUX itself (its select only reaches the upper half of I); both
// are this design's choices.
//
// Interface: `load` (from the master, when a multiplication starts) latches
// W_H; while `active` is high one operation per cycle is issued on `op` with
// the input-bit index `sel`; `last` marks the final cycle of the step.
// W_H must be nonzero when the step is entered (the master skips it otherwise).
module sc_common_fsm
  import sc_pkg::*;
#(
  parameter int unsigned N = 8,
  localparam int unsigned H  = N / 2,
  localparam int unsigned IW = $clog2(N),
  localparam int unsigned PW = (H > 1) ? $clog2(H) : 1
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
  typedef enum logic {M_COUNT, M_SHIFT} mode_e;

  logic [H-1:0]  wh_q;
  logic [PW-1:0] j_q;      // bit of W_H being processed
  logic [PW-1:0] ph_q;     // position inside the common stream (0 .. H-1)
  mode_e         mode_q;
  logic [PW-1:0] lead;

  sc_lead_one #(.W(H)) u_lead (.v(w_h), .pos(lead));

  logic ph_end;
  assign ph_end = (ph_q == PW'(H - 1));

  always_comb begin
    op   = OP_NONE;
    sel  = IW'(N - 1) - IW'(ph_q);
    last = 1'b0;
    if (active) begin
      if (mode_q == M_COUNT) begin
        if (H == 1)          op = OP_ADD;
        else if (ph_q == '0) op = OP_CS_FIRST;
        else if (ph_end)     op = OP_CS_LAST;
        else                 op = OP_CS_SHIFT;
        last = ph_end && (j_q == '0);
      end else begin
        op   = OP_SHL;
        last = (j_q == PW'(1)) && !wh_q[0];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wh_q   <= '0;
      j_q    <= '0;
      ph_q   <= '0;
      mode_q <= M_COUNT;
    end else if (load) begin
      wh_q   <= w_h;
      j_q    <= lead;
      ph_q   <= '0;
      mode_q <= M_COUNT;   // the leading bit is a 1
    end else if (active) begin
      if (mode_q == M_COUNT) begin
        if (ph_end) begin
          ph_q   <= '0;
          mode_q <= M_SHIFT;
        end else begin
          ph_q <= ph_q + PW'(1);
        end
      end else begin
        j_q    <= j_q - PW'(1);
        mode_q <= wh_q[j_q - PW'(1)] ? M_COUNT : M_SHIFT;
      end
    end
  end

  // The master skips step 1 when W_H is zero, so the scan always starts on a 1.
  a_wh_nonzero: assert property (@(posedge clk) disable iff (!rst_n) active |-> wh_q != '0);
endmodule
