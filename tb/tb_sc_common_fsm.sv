// tb_sc_common_fsm: runs step 1 (N = 8 and N = 6) for every nonzero W_H with
// random activations.  A model of the counter executes the issued operations
// on the bits the select lines pick; the result must equal W_H * C, where the
// common-stream count C is the upper half of I read as a number, and the
// step must last popcount(W_H) * N/2 + floor(log2 W_H) cycles with a single
// 'last' on its final cycle.
module tb_sc_common_fsm;
  import sc_pkg::*;
  int checks = 0, failures = 0;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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
  logic [3:0] w_h8;
  logic [2:0] w_h6;
  cnt_op_e    op8, op6;
  logic [2:0] sel8, sel6;
  logic       last8, last6;
  logic       act8, act6;

  sc_common_fsm #(.N(8)) dut8 (.clk, .rst_n, .load, .w_h(w_h8), .active(act8), .op(op8), .sel(sel8), .last(last8));
  sc_common_fsm #(.N(6)) dut6 (.clk, .rst_n, .load, .w_h(w_h6), .active(act6), .op(op6), .sel(sel6), .last(last6));

  int cur_n;
  assign act8 = active && (cur_n == 8);
  assign act6 = active && (cur_n == 6);

  function automatic int expected_cycles(input int wh, input int h);
    int pc, lg;
    pc = $countones(wh);
    lg = 0;
    while ((wh >> (lg + 1)) != 0) lg++;
    return pc * h + lg;
  endfunction

  // Runs step 1 on one instance; returns the model accumulator and cycles.
  task automatic run(input int n, input int wh, input int i_val);
    int acc, cs, cyc, lasts, inc;
    cnt_op_e o;
    logic [2:0] s;
    logic l;
    acc = 0; cs = 0; cyc = 0; lasts = 0;
    cur_n = n;
    w_h8 <= 4'(wh);
    w_h6 <= 3'(wh);
    load <= 1'b1;
    @(posedge clk);
    load   <= 1'b0;
    active <= 1'b1;
    forever begin
      @(negedge clk);
      o = (n == 8) ? op8 : op6;
      s = (n == 8) ? sel8 : sel6;
      l = (n == 8) ? last8 : last6;
      inc = (i_val >> s) & 1;
      unique case (o)
        OP_ADD:      acc = acc + inc;
        OP_SHL:      acc = acc * 2;
        OP_CS_FIRST: cs = inc;
        OP_CS_SHIFT: cs = cs * 2 + inc;
        OP_CS_LAST:  acc = acc + 2 * cs + inc;
        default:     ;
      endcase
      cyc++;
      if (l) lasts++;
      @(posedge clk);
      if (l || cyc > 100) break;
    end
    active <= 1'b0;
    check(acc == wh * (i_val >> (n / 2)), $sformatf("N=%0d W_H=%0d I=%0d: count %0d, expected %0d", n, wh, i_val, acc, wh * (i_val >> (n / 2))));
    check(cyc == expected_cycles(wh, n / 2), $sformatf("N=%0d W_H=%0d: %0d cycles, expected %0d", n, wh, cyc, expected_cycles(wh, n / 2)));
    check(lasts == 1, "last raised more than once");
  endtask

  initial begin
    rst_n = 1'b0; load = 1'b0; active = 1'b0; cur_n = 0; w_h8 = '0; w_h6 = '0;
    @(posedge clk);
    rst_n <= 1'b1;
    for (int rep = 0; rep < 10; rep++) begin
      for (int wh = 1; wh < 16; wh++) run(8, wh, (rep == 0) ? 255 : int'($urandom_range(0, 255)));
      for (int wh = 1; wh < 8; wh++)  run(6, wh, (rep == 0) ? 63 : int'($urandom_range(0, 63)));
    end
    // The example of the text: n = 6, W_H = 3 takes 7 cycles.
    check(expected_cycles(3, 3) == 7, "reference formula disagrees with the worked example");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
