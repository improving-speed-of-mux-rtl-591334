// tb_sc_shift_counter: drives random operation sequences into the shift
// counter (N = 8, 16 lanes) and compares the accumulator with a model of the
// operations as defined for cnt_op_e.  It also checks one common-stream
// sequence by value: FIRST a, SHIFT b, LAST c adds 4a + 2b + c.
module tb_sc_shift_counter;
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

  localparam int unsigned N = 8, LANES = 16;
  logic        rst_n;
  cnt_op_e     op;
  logic [4:0]  inc;
  logic [12:0] acc;
  int unsigned m_acc, m_cs;

  sc_shift_counter #(.N(N), .LANES(LANES)) dut (.clk, .rst_n, .op, .inc, .acc);

  task automatic apply(input cnt_op_e o, input int unsigned v);
    op  <= o;
    inc <= 5'(v);
    @(posedge clk);
    unique case (o)
      OP_CLEAR:    begin m_acc = 0; m_cs = 0; end
      OP_ADD:      m_acc = m_acc + v;
      OP_SHL:      m_acc = m_acc * 2;
      OP_CS_FIRST: m_cs = v;
      OP_CS_SHIFT: m_cs = m_cs * 2 + v;
      OP_CS_LAST:  m_acc = m_acc + 2 * m_cs + v;
      default: ;
    endcase
    m_acc = m_acc % (1 << 13);
    m_cs  = m_cs % (1 << 9);
    #1;
    check(int'(acc) == int'(m_acc), $sformatf("op %s inc %0d: acc %0d, expected %0d", o.name(), v, acc, m_acc));
  endtask

  initial begin
    rst_n = 1'b0;
    op    = OP_NONE;
    inc   = '0;
    @(posedge clk);
    rst_n <= 1'b1;
    m_acc = 0;
    m_cs  = 0;
    #1 check(acc == '0, "acc not cleared by reset");
    // Common stream 4a + 2b + c with a = 16, b = 3, c = 7 on top of 20.
    apply(OP_ADD, 16);
    apply(OP_ADD, 4);
    apply(OP_CS_FIRST, 16);
    apply(OP_CS_SHIFT, 3);
    apply(OP_CS_LAST, 7);
    check(acc == 13'(20 + 64 + 6 + 7), "common-stream fold-in value");
    apply(OP_SHL, 0);
    check(acc == 13'(2 * 97), "one-bit shift value");
    apply(OP_NONE, 9);
    check(acc == 13'(194), "hold");
    apply(OP_CLEAR, 0);
    for (int k = 0; k < 3000; k++) begin
      cnt_op_e o;
      o = cnt_op_e'($urandom_range(0, 6));
      if (o == OP_SHL && m_acc > 2000) o = OP_CLEAR;
      apply(o, $urandom_range(0, 16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
