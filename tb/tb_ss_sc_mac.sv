// tb_ss_sc_mac: end-to-end test of the split-shift SC multiply-accumulate
// unit at its default size (N = 8, 16 lanes sharing W).
//
// For every weight W = 0 .. 2^N-1, plus extra random weights, it loads random
// activations (with all-ones, all-zeros and one-hot vectors mixed in), runs
// one operation and checks:
//   - the result against the sum over lanes of a bit-by-bit walk of the full
//     conventional index stream, and against the closed form of Eq. (1);
//   - the number of busy cycles against the cycle formula of the scheme;
//   - that done follows the last busy cycle directly and ready returns.
// It also counts how often each mechanism occurs (step 1 skipped, step 3
// skipped, a shift cycle between W_H bits, a zero weight, an all-ones
// activation, signed activations) and fails if one never happened.  For
// signed activations (sign-bit inverter on) it also checks that the bipolar
// reading 2*result - 16*W is within 16*N of sum W*I/2^(N-1).
module tb_ss_sc_mac;
  import tb_ref_pkg::*;

  localparam int unsigned N     = 8;
  localparam int unsigned LANES = 16;
  localparam int unsigned H     = N / 2;
  localparam int unsigned ACC_W = N + $clog2(LANES + 1);

  logic                    clk;
  logic                    rst_n = 1'b0;
  logic                    start = 1'b0;
  logic [N-1:0]            w = '0;
  logic [LANES-1:0][N-1:0] i_vec = '0;
  logic                    signed_i = 1'b0;
  logic                    ready, busy, done;
  logic [ACC_W-1:0]        result;

  int checks = 0, failures = 0;
  int n_skip1 = 0, n_skip3 = 0, n_shift = 0, n_zero = 0, n_ones = 0, n_all3 = 0, n_signed = 0;
  longint total_cycles = 0, total_serial = 0;
  int n_ops = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  ss_sc_mac dut (.clk, .rst_n, .start, .w, .i_vec, .signed_i, .ready, .busy, .done, .result);

  task automatic run_one(input logic [N-1:0] wv, input logic [LANES-1:0][N-1:0] iv, input bit sgn);
    int exp_s, exp_e, exp_c, cyc;
    real exact;
    exp_s = 0;
    exp_e = 0;
    exact = 0.0;
    for (int l = 0; l < LANES; l++) begin
      // Signed activations: the stream carries I + 2^(N-1) (sign bit inverted).
      logic [N-1:0] ib;
      ib = sgn ? (iv[l] ^ (N'(1) << (N - 1))) : iv[l];
      exp_s += stream_count(32'(ib), 32'(wv), N);
      exp_e += eq1_count(32'(ib), 32'(wv), N);
      exact += real'(wv) * real'($signed(iv[l])) / real'(1 << (N - 1));
    end
    exp_c = split_cycles(32'(wv), N);
    while (!ready) @(posedge clk);
    w     <= wv;
    i_vec <= iv;
    signed_i <= sgn;
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    w     <= '0;      // operands are registered at start
    i_vec <= '0;
    signed_i <= ~sgn;
    cyc = 0;
    @(posedge clk);
    while (busy) begin
      cyc++;
      @(posedge clk);
    end
    checks++;
    if (!done) begin
      failures++;
      $display("FAIL W=%0d: done not asserted after busy", wv);
    end
    checks++;
    if (int'(result) != exp_s) begin
      failures++;
      $display("FAIL W=%0d: result %0d, stream walk gives %0d", wv, result, exp_s);
    end
    checks++;
    if (exp_s != exp_e) begin
      failures++;
      $display("FAIL W=%0d: reference models disagree (%0d vs %0d)", wv, exp_s, exp_e);
    end
    if (sgn) begin
      // Bipolar reading: 2P - LANES*W estimates sum W*I/2^(N-1); each
      // rounded term of the count is off by at most 1/2, N terms per lane.
      real est, err;
      est = 2.0 * real'(result) - real'(LANES) * real'(wv);
      err = est - exact;
      if (err < 0.0) err = -err;
      checks++;
      if (err > real'(LANES * N)) begin
        failures++;
        $display("FAIL W=%0d signed: estimate %0.1f, exact %0.1f", wv, est, exact);
      end
      n_signed++;
    end
    checks++;
    if (cyc != exp_c) begin
      failures++;
      $display("FAIL W=%0d: %0d busy cycles, formula gives %0d", wv, cyc, exp_c);
    end
    // Shift cycles of step 1 occur when W_H has a lower bit below its leading 1;
    // the busy-cycle check above confirms they were spent.
    if ((wv >> H) > 1 && cyc == exp_c) n_shift++;
    if ((wv >> H) == 0) n_skip1++;
    if ((wv % (1 << H)) == 0) n_skip3++;
    if ((wv >> H) != 0 && (wv % (1 << H)) != 0) n_all3++;
    if (wv == 0) n_zero++;
    total_cycles += longint'(cyc);
    total_serial += longint'(wv);
    n_ops++;
    @(posedge clk);
    checks++;
    if (!ready || done) begin
      failures++;
      $display("FAIL W=%0d: unit not back to ready", wv);
    end
  endtask

  function automatic logic [LANES-1:0][N-1:0] rand_vec(input int kind);
    logic [LANES-1:0][N-1:0] v;
    for (int l = 0; l < LANES; l++) begin
      unique case (kind)
        0:       v[l] = '1;
        1:       v[l] = '0;
        2:       v[l] = N'(1) << (l % N);
        default: v[l] = N'($urandom);
      endcase
    end
    return v;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int rep = 0; rep < 4; rep++) begin
      for (int unsigned wv = 0; wv < 2**N; wv++) begin
        int kind;
        kind = (rep == 0) ? int'(wv % 4) : 3;
        if (kind == 0) n_ones++;
        run_one(N'(wv), rand_vec(kind), rep >= 2);
      end
    end
    for (int k = 0; k < 200; k++) run_one(N'($urandom), rand_vec(3), k[0]);
    $display("mechanisms: step1/2 skipped=%0d step3 skipped=%0d all three steps=%0d operations with shift cycles=%0d zero weight=%0d all-ones activation=%0d signed activations=%0d",
             n_skip1, n_skip3, n_all3, n_shift, n_zero, n_ones, n_signed);
    $display("average cycles over %0d operations: split-shift %0.2f, conventional serial %0.2f",
             n_ops, real'(total_cycles) / n_ops, real'(total_serial) / n_ops);
    checks++; if (n_skip1 == 0) begin failures++; $display("FAIL: step 1 never skipped"); end
    checks++; if (n_skip3 == 0) begin failures++; $display("FAIL: step 3 never skipped"); end
    checks++; if (n_all3  == 0) begin failures++; $display("FAIL: never ran all three steps"); end
    checks++; if (n_shift == 0) begin failures++; $display("FAIL: no shift cycle"); end
    checks++; if (n_zero  == 0) begin failures++; $display("FAIL: zero weight never run"); end
    checks++; if (n_ones  == 0) begin failures++; $display("FAIL: all-ones activation never run"); end
    checks++; if (n_signed == 0) begin failures++; $display("FAIL: signed activations never run"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
