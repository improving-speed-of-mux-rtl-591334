// tb_sc_lead_one: checks the leading-one detector exhaustively for 4- and
// 6-bit inputs against floor(log2 v).
module tb_sc_lead_one;
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

  logic [3:0] v4;
  logic [1:0] p4;
  logic [5:0] v6;
  logic [2:0] p6;

  sc_lead_one #(.W(4)) dut4 (.v(v4), .pos(p4));
  sc_lead_one #(.W(6)) dut6 (.v(v6), .pos(p6));

  function automatic int flog2(input int v);
    int r;
    r = 0;
    while ((v >> (r + 1)) != 0) r++;
    return r;
  endfunction

  initial begin
    for (int v = 1; v < 64; v++) begin
      v4 = 4'(v);
      v6 = 6'(v);
      @(posedge clk);
      if (v < 16) check(int'(p4) == flog2(v), $sformatf("W=4 v=%0d gave %0d", v, p4));
      check(int'(p6) == flog2(v), $sformatf("W=6 v=%0d gave %0d", v, p6));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
