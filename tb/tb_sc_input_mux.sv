// tb_sc_input_mux: checks the lane MUX (N = 8) on random operands for every
// select value, with the sign-bit inverter off and on, against the operand
// bit (inverted for the top bit when the inverter is on).
module tb_sc_input_mux;
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

  localparam int unsigned N = 8;
  logic [N-1:0]         i_bits;
  logic [$clog2(N)-1:0] sel;
  logic                 bit_o;
  logic                 inv_msb;

  sc_input_mux #(.N(N)) dut (.i_bits, .sel, .inv_msb, .bit_o);

  initial begin
    for (int k = 0; k < 300; k++) begin
      i_bits  = (k == 0) ? 8'hA5 : N'($urandom);
      inv_msb = k[0];
      for (int s = 0; s < int'(N); s++) begin
        sel = 3'(s);
        @(posedge clk);
        check(bit_o == (i_bits[s] ^ (inv_msb && s == int'(N) - 1)),
              $sformatf("I=%h sel=%0d inv=%b gave %b", i_bits, s, inv_msb, bit_o));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
