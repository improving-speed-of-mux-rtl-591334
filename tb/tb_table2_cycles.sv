// tb_table2_cycles: single-multiplier workload (one lane) at N = 6 and N = 8.
// Every signed weight of the N-bit range is applied as its magnitude
// (0 .. 2^(N-1)), each with a random activation, as in a network whose
// weights are signed and whose counting runs on |W|.  Each product is
// checked against a walk of the conventional index stream, and the busy
// cycles against the cycle formula.  The average cycle count is printed next
// to that of the one-bit-per-cycle conventional scheme (|W| cycles); for
// N = 6 the average must be 8.64 (46 % fewer than 16.0).
module tb_table2_cycles;
  import tb_ref_pkg::*;

  logic clk;
  logic rst_n;
  logic start6, start8;
  logic [5:0] w6;
  logic [7:0] w8;
  logic [0:0][5:0] i6;
  logic [0:0][7:0] i8;
  logic ready6, busy6, done6, ready8, busy8, done8;
  logic [6:0] res6;
  logic [8:0] res8;
  int checks = 0, failures = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  ss_sc_mac #(.N(6), .LANES(1)) dut6 (.clk, .rst_n, .start(start6), .w(w6), .i_vec(i6), .signed_i(1'b0),
    .ready(ready6), .busy(busy6), .done(done6), .result(res6));
  ss_sc_mac #(.N(8), .LANES(1)) dut8 (.clk, .rst_n, .start(start8), .w(w8), .i_vec(i8), .signed_i(1'b0),
    .ready(ready8), .busy(busy8), .done(done8), .result(res8));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One multiplication on the N-bit instance; returns the busy cycles.
  task automatic mul(input int n, input int w, input int i_val, output int cyc);
    int r;
    check(((n == 6) ? ready6 : ready8) == 1'b1, "not ready for a new operation");
    if (n == 6) begin
      w6 <= 6'(w); i6[0] <= 6'(i_val); start6 <= 1'b1;
    end else begin
      w8 <= 8'(w); i8[0] <= 8'(i_val); start8 <= 1'b1;
    end
    @(posedge clk);
    start6 <= 1'b0;
    start8 <= 1'b0;
    cyc = 0;
    @(posedge clk);
    while ((n == 6) ? busy6 : busy8) begin
      cyc++;
      @(posedge clk);
    end
    r = (n == 6) ? int'(res6) : int'(res8);
    check(((n == 6) ? done6 : done8) == 1'b1, "done missing");
    check(r == stream_count(32'(i_val), 32'(w), 32'(n)),
          $sformatf("N=%0d W=%0d I=%0d: %0d, expected %0d", n, w, i_val, r, stream_count(32'(i_val), 32'(w), 32'(n))));
    check(cyc == split_cycles(32'(w), 32'(n)),
          $sformatf("N=%0d W=%0d: %0d cycles, expected %0d", n, w, cyc, split_cycles(32'(w), 32'(n))));
    @(posedge clk);
  endtask

  initial begin
    rst_n = 1'b0; start6 = 1'b0; start8 = 1'b0; w6 = '0; w8 = '0; i6 = '0; i8 = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 6; n <= 8; n += 2) begin
      int total, serial, cnt, cyc, formula;
      real avg;
      total = 0; serial = 0; cnt = 0; formula = 0;
      for (int ws = -(1 << (n - 1)); ws < (1 << (n - 1)); ws++) begin
        int mag;
        mag = (ws < 0) ? -ws : ws;
        mul(n, mag, int'($urandom_range(0, (1 << n) - 1)), cyc);
        total  += cyc;
        serial += mag;
        formula += split_cycles(32'(mag), 32'(n));
        cnt++;
      end
      avg = real'(total) / cnt;
      $display("N=%0d: average cycles split-shift %0.3f, conventional %0.3f, reduction %0.1f %%",
               n, avg, real'(serial) / cnt, 100.0 * (1.0 - real'(total) / serial));
      check(total == formula, "average cycles differ from the formula");
      if (n == 6) check(avg > 8.635 && avg < 8.645, "N=6 average is not 8.64 cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
