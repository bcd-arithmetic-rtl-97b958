// Random test of the C and AC flags against a reference model: 2000 clocks
// of random carry operations, adder carries and AC latch enables, checked
// after every rising edge, plus the reset values.
module tb_wimp51_flags;
  import wimp51_pkg::*;
  logic  clk = 1'b0, rst_n;
  c_op_e c_op;
  logic  cout, ac_we, ac_d, c, ac;
  logic  m_c, m_ac;
  int checks = 0, failures = 0;

  wimp51_flags dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    c_op = C_SET; cout = 1'b1; ac_we = 1'b1; ac_d = 1'b1;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    checks++;
    if (c !== 1'b0 || ac !== 1'b0) failures++;
    @(negedge clk) begin
      rst_n = 1'b1; c_op = C_HOLD; ac_we = 1'b0;
    end
    m_c = 1'b0; m_ac = 1'b0;
    repeat (2000) begin
      @(negedge clk);
      c_op  = c_op_e'($urandom_range(0, 4));
      cout  = 1'($urandom);
      ac_we = 1'($urandom);
      ac_d  = 1'($urandom);
      case (c_op)
        C_CLR: m_c = 1'b0;
        C_SET: m_c = 1'b1;
        C_ADD: m_c = cout;
        C_DA:  m_c = m_c | cout;
        default: ;
      endcase
      if (ac_we) m_ac = ac_d;
      @(posedge clk); #1;
      checks++;
      if (c !== m_c || ac !== m_ac) begin
        failures++;
        if (failures < 10) $display("FAIL: op=%0d c=%0b exp %0b ac=%0b exp %0b", c_op, c, m_c, ac, m_ac);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
