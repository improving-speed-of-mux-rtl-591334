// tb_sc_tail_fsm: runs step 2 (tail bits) at N = 8 for every nonzero
// W_h and checks, cycle by cycle, that each issued operation is a
// count and that its select is, for group g = 1 .. W_H, the index of stream position g * 16
// (found by halving the position until it is odd).  The step must take
// exactly W_h cycles with a single 'last' on the final one.
module tb_sc_tail_fsm;
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

  logic       rst_n, load, active;
  logic [3:0] w_h;
  cnt_op_e    op;
  logic [2:0] sel;
  logic       last;

  sc_tail_fsm #(.N(8)) dut (.clk, .rst_n, .load, .w_h, .active, .op, .sel, .last);

  function automatic int pos_index(input int k);
    int t;
    t = 0;
    while (k % 2 == 0) begin
      k = k / 2;
      t++;
    end
    return 7 - t;
  endfunction

  task automatic run(input int v);
    int g;
    w_h <= 4'(v);
    load <= 1'b1;
    @(posedge clk);
    load   <= 1'b0;
    active <= 1'b1;
    g = 0;
    forever begin
      @(negedge clk);
      g++;
      check(op == OP_ADD, "operation is not a count");
      check(int'(sel) == pos_index(g * 16), $sformatf("v=%0d step %0d: select %0d, expected %0d", v, g, sel, pos_index(g * 16)));
      check(last == (g == v), $sformatf("v=%0d step %0d: last=%b", v, g, last));
      @(posedge clk);
      if (last || g > 20) break;
    end
    active <= 1'b0;
    check(g == v, $sformatf("v=%0d took %0d cycles", v, g));
    @(negedge clk);
    check(op == OP_NONE, "operation issued while inactive");
  endtask

  initial begin
    rst_n = 1'b0; load = 1'b0; active = 1'b0; w_h = '0;
    @(posedge clk);
    rst_n <= 1'b1;
    for (int v = 1; v < 16; v++) run(v);
    for (int v = 15; v > 0; v--) run(v);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
