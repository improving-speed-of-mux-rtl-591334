// tb_sc_popcount: checks the 16-lane popcount on all-zero, all-one, one-hot
// and random vectors against $countones.
module tb_sc_popcount;
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

  localparam int unsigned LANES = 16;
  logic [LANES-1:0] bits_i;
  logic [4:0]       count_o;

  sc_popcount #(.LANES(LANES)) dut (.bits_i, .count_o);

  initial begin
    for (int k = 0; k < 2000; k++) begin
      if (k == 0)       bits_i = '0;
      else if (k == 1)  bits_i = '1;
      else if (k < 18)  bits_i = LANES'(1) << (k - 2);
      else              bits_i = LANES'($urandom);
      @(posedge clk);
      check(int'(count_o) == $countones(bits_i), $sformatf("%b gave %0d", bits_i, count_o));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
