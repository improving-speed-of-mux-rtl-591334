// ss_sc_mac: split-shift MUX-FSM stochastic-computing multiplier / MAC.
//
// Computes  sum_l I_l x W / 2^N  (approximately; exactly the count of ones
// in the MUX-FSM bit streams) for LANES activations I_l that share one
// N-bit weight W.  With LANES = 1 it is a single multiplier.
//
// A conventional MUX-FSM multiplier counts W stream bits, one per cycle.
// Here W is split into halves W_H || W_L (H = N/2 bits each) and the stream
// into groups of 2^H positions, and three steps count it:
//   step 1  W_H identical "common" sub-streams, by shift-and-count:
//           popcount(W_H)*H + (leading-1 position of W_H) cycles
//   step 2  the W_H tail bits of those groups (indices from a LUT): W_H cycles
//   step 3  the W_L bits of the last group: W_L cycles
// One master FSM sequences three slave FSMs; they share the lane MUXes and
// one shift counter.  The lane bits selected each cycle are added by a
// popcount, so one counter accumulates the whole sum.
//
// Interface: pulse `start` while `ready` with `w` and `i_vec` valid; both are
// registered then.  `busy` is high for exactly the counting cycles; `done`
// is high for one cycle after them, and `result` holds the sum from then
// until the next start.  W is an unsigned magnitude.  I is unsigned, or
// two's complement when `signed_i` is high: the sign bit of I is then
// inverted at the MUX, the count P becomes that of I + 2^(N-1), and
// 2P - W estimates W * I / 2^(N-1) (bipolar stochastic number); forming
// that value and applying the sign of the weight are left to the consumer.
//
// Follows the published scheme: the split of W, the three steps, their
// skipping rules and cycle counts, the master/slave FSM split, the tail LUT
// and the shared counter with a one-bit shifter.  This design's own choices:
// the start/ready/busy/done handshake, registering the operands, the
// run-time switch of the sign-bit inverter, summing the lanes through a
// popcount into one counter, and the synchronous reset.
// One IDLE and one DONE cycle per operation come on top of the counting
// cycles.
module ss_sc_mac
  import sc_pkg::*;
#(
  parameter int unsigned N     = 8,    // operand width (even)
  parameter int unsigned LANES = 16,   // multiplications sharing W
  localparam int unsigned H     = N / 2,
  localparam int unsigned IW    = $clog2(N),
  localparam int unsigned PC_W  = $clog2(LANES + 1),
  localparam int unsigned ACC_W = N + PC_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [N-1:0]              w,       // weight, unsigned
  input  logic [LANES-1:0][N-1:0]   i_vec,   // activations
  input  logic                      signed_i, // activations are two's complement
  output logic                      ready,
  output logic                      busy,
  output logic                      done,
  output logic [ACC_W-1:0]          result   // sum of the LANES stream counts
);
  initial begin
    if (N % 2 != 0 || N < 2) $fatal(1, "ss_sc_mac: N must be even and at least 2");
  end

  step_e             state;
  logic              accept;
  logic [LANES-1:0][N-1:0] i_q;
  logic              sgn_q;
  logic [H-1:0]      w_h, w_l;
  logic              last1, last2, last3;
  cnt_op_e           op1, op2, op3, op;
  logic [IW-1:0]     sel1, sel2, sel3, sel;
  logic [LANES-1:0]  lane_bits;
  logic [PC_W-1:0]   inc;

  assign w_h = w[N-1:H];
  assign w_l = w[H-1:0];

  // Activation operand register.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      i_q   <= '0;
      sgn_q <= 1'b0;
    end else if (accept) begin
      i_q   <= i_vec;
      sgn_q <= signed_i;
    end
  end

  sc_master_fsm u_master (
    .clk, .rst_n, .start,
    .wh_nz (|w_h), .wl_nz (|w_l),
    .last1, .last2, .last3,
    .state, .ready, .accept, .done
  );

  sc_common_fsm #(.N(N)) u_step1 (
    .clk, .rst_n, .load(accept), .w_h,
    .active(state == ST_STEP1), .op(op1), .sel(sel1), .last(last1)
  );

  sc_tail_fsm #(.N(N)) u_step2 (
    .clk, .rst_n, .load(accept), .w_h,
    .active(state == ST_STEP2), .op(op2), .sel(sel2), .last(last2)
  );

  sc_rest_fsm #(.N(N)) u_step3 (
    .clk, .rst_n, .load(accept), .w_l,
    .active(state == ST_STEP3), .op(op3), .sel(sel3), .last(last3)
  );

  // Route the active slave's operation and MUX select.
  always_comb begin
    op  = OP_NONE;
    sel = sel3;
    unique case (state)
      ST_IDLE:  op = accept ? OP_CLEAR : OP_NONE;
      ST_STEP1: begin op = op1; sel = sel1; end
      ST_STEP2: begin op = op2; sel = sel2; end
      ST_STEP3: begin op = op3; sel = sel3; end
      default:  op = OP_NONE;
    endcase
  end

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    sc_input_mux #(.N(N)) u_mux (.i_bits(i_q[l]), .sel, .inv_msb(sgn_q), .bit_o(lane_bits[l]));
  end

  sc_popcount #(.LANES(LANES)) u_pop (.bits_i(lane_bits), .count_o(inc));

  sc_shift_counter #(.N(N), .LANES(LANES)) u_cnt (
    .clk, .rst_n, .op, .inc, .acc(result)
  );

  assign busy = (state == ST_STEP1) || (state == ST_STEP2) || (state == ST_STEP3);

  a_start_only_when_ready: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !accept);
endmodule
