// tb_sc_master_fsm: drives the master FSM with stand-in slave FSMs that end
// their steps after chosen cycle counts.  For every combination of W_H and
// W_L being zero or not it checks the visited steps (steps 1 and 2 skipped
// when W_H = 0, step 3 skipped when W_L = 0), that each step lasts exactly
// as long as its slave, that done follows the last step for one cycle, and
// that start is ignored while busy.
module tb_sc_master_fsm;
  import sc_pkg::*;
  int checks = 0, failures = 0;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  logic  rst_n, start, wh_nz, wl_nz, last1, last2, last3;
  step_e state;
  logic  ready, accept, done;
  int    len1, len2, len3, cnt;

  sc_master_fsm dut (.clk, .rst_n, .start, .wh_nz, .wl_nz, .last1, .last2, .last3,
                     .state, .ready, .accept, .done);

  // Stand-in slaves: 'last' on the final cycle of each step.
  assign last1 = (state == ST_STEP1) && (cnt == len1 - 1);
  assign last2 = (state == ST_STEP2) && (cnt == len2 - 1);
  assign last3 = (state == ST_STEP3) && (cnt == len3 - 1);

  // Cycles spent so far in the current step.
  always @(posedge clk) begin
    if (state == ST_IDLE || last1 || last2 || last3) cnt <= 0;
    else                                             cnt <= cnt + 1;
  end

  task automatic run(input bit h, input bit l, input int a, input int b, input int c);
    int c1, c2, c3, order_ok;
    step_e last_seen;
    len1 = a; len2 = b; len3 = c;
    wh_nz <= h;
    wl_nz <= l;
    start <= 1'b1;
    @(negedge clk);
    check(accept, "start not accepted in idle");
    @(posedge clk);
    start <= 1'b1;         // held high: must be ignored while busy
    wh_nz <= 1'b0;         // must be taken from the start cycle only
    wl_nz <= ~l;
    c1 = 0; c2 = 0; c3 = 0; order_ok = 1; last_seen = ST_IDLE;
    while (1) begin
      @(negedge clk);
      if (state == ST_DONE) break;
      check(!accept, "start accepted while busy");
      if (state < last_seen) order_ok = 0;
      last_seen = state;
      unique case (state)
        ST_STEP1: c1++;
        ST_STEP2: c2++;
        ST_STEP3: c3++;
        default:  order_ok = 0;
      endcase
      if (c1 + c2 + c3 > 100) break;
    end
    start <= 1'b0;
    check(done, "done not asserted after the steps");
    check(order_ok == 1, "steps out of order");
    check(c1 == (h ? a : 0), $sformatf("step 1 took %0d cycles (W_H nz=%b, len %0d)", c1, h, a));
    check(c2 == (h ? b : 0), $sformatf("step 2 took %0d cycles (W_H nz=%b, len %0d)", c2, h, b));
    check(c3 == (l ? c : 0), $sformatf("step 3 took %0d cycles (W_L nz=%b, len %0d)", c3, l, c));
    @(negedge clk);
    check(state == ST_IDLE && ready && !done, "not back in idle after done");
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; wh_nz = 1'b0; wl_nz = 1'b0;
    len1 = 1; len2 = 1; len3 = 1;
    @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < 40; k++) begin
      run(k[0], k[1], $urandom_range(1, 9), $urandom_range(1, 9), $urandom_range(1, 9));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
