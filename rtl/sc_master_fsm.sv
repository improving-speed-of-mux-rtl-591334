// sc_master_fsm: master FSM of the split-shift multiplier.
//
// It runs the three counting steps one after the other, skipping steps 1 and
// 2 when W_H = 0 and step 3 when W_L = 0:
//   IDLE --start--> STEP1 --> STEP2 --> STEP3 --> DONE --> IDLE
// A step ends on the cycle its slave FSM raises `last`; the next step starts
// on the following cycle, so no cycle is lost between steps.  On the cycle
// `start` is accepted it clears the counter and tells the slaves to load W;
// it keeps its own copy of (W_L != 0) for the step 2 -> step 3 decision.
//
// Timing: with start accepted at clock edge 0, the counting steps occupy
// the next Ncyc cycles (Ncyc = step1 + W_H + W_L) and `done` is high for one
// cycle right after them.  `ready` is high only in IDLE.
// The step order and skip rules follow the published design; the state
// encoding and the zero-bubble hand-over are this design's choices.
module sc_master_fsm
  import sc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,      // request; accepted when ready
  input  logic  wh_nz,      // W_H != 0, sampled with start
  input  logic  wl_nz,      // W_L != 0, sampled with start
  input  logic  last1,      // slave FSM of step 1 finishes this cycle
  input  logic  last2,
  input  logic  last3,
  output step_e state,
  output logic  ready,
  output logic  accept,     // start accepted this cycle: clear and load
  output logic  done
);
  step_e state_d;
  logic  wl_nz_q;   // W_L != 0 for the operation in progress

  assign ready  = (state == ST_IDLE);
  assign accept = ready && start;
  assign done   = (state == ST_DONE);

  always_comb begin
    state_d = state;
    unique case (state)
      ST_IDLE:  if (start) state_d = wh_nz ? ST_STEP1 : (wl_nz ? ST_STEP3 : ST_DONE);
      ST_STEP1: if (last1) state_d = ST_STEP2;
      ST_STEP2: if (last2) state_d = wl_nz_q ? ST_STEP3 : ST_DONE;
      ST_STEP3: if (last3) state_d = ST_DONE;
      ST_DONE:  state_d = ST_IDLE;
      default:  state_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= ST_IDLE;
      wl_nz_q <= 1'b0;
    end else begin
      state <= state_d;
      if (accept) wl_nz_q <= wl_nz;
    end
  end
endmodule
