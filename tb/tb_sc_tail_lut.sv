// tb_sc_tail_lut: checks the tail-index table for N = 6 and N = 8.  The
// expected index of group g is the index of stream position g * 2^(N/2),
// found by halving that position until it is odd.  For N = 6 the first three
// entries must be 2, 1, 2 (the tails of the example with W = 26).
module tb_sc_tail_lut;
  int checks = 0, failures = 0;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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

  logic [2:0] g6;
  logic [2:0] i6;
  logic [3:0] g8;
  logic [2:0] i8;

  sc_tail_lut #(.N(6)) dut6 (.g(g6), .idx(i6));
  sc_tail_lut #(.N(8)) dut8 (.g(g8), .idx(i8));

  function automatic int pos_index(input int k, input int n);
    int t;
    t = 0;
    while (k % 2 == 0) begin
      k = k / 2;
      t++;
    end
    return n - 1 - t;
  endfunction

  initial begin
    for (int g = 1; g < 16; g++) begin
      g8 = 4'(g);
      g6 = 3'(g);
      @(posedge clk);
      check(int'(i8) == pos_index(g * 16, 8), $sformatf("N=8 g=%0d gave %0d", g, i8));
      if (g < 8) check(int'(i6) == pos_index(g * 8, 6), $sformatf("N=6 g=%0d gave %0d", g, i6));
    end
    g6 = 3'd1; @(posedge clk); check(i6 == 3'd2, "N=6 first tail is not I2");
    g6 = 3'd2; @(posedge clk); check(i6 == 3'd1, "N=6 second tail is not I1");
    g6 = 3'd3; @(posedge clk); check(i6 == 3'd2, "N=6 third tail is not I2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
