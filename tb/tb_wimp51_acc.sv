// Random test of the accumulator: it must load on the normal load select or
// on DA alone, hold otherwise, and flag zero. 2000 random clocks against a
// reference register, with A forced to 00H now and then to exercise zero.
module tb_wimp51_acc;
  logic       clk = 1'b0, rst_n, load, da, zero;
  logic [7:0] d, q, m;
  int checks = 0, failures = 0, n_da_only = 0;

  wimp51_acc dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 1'b1; da = 1'b0; d = 8'hFF;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    checks++;
    if (q !== 8'h00 || !zero) failures++;
    @(negedge clk) rst_n = 1'b1;
    m = 8'h00;
    repeat (2000) begin
      @(negedge clk);
      load = ($urandom_range(0, 3) == 0);
      da   = ($urandom_range(0, 3) == 0);
      d    = ($urandom_range(0, 7) == 0) ? 8'h00 : 8'($urandom);
      if (da && !load) n_da_only++;
      if (load || da) m = d;
      @(posedge clk); #1;
      checks++;
      if (q !== m || zero !== (m == 8'h00)) begin
        failures++;
        if (failures < 10) $display("FAIL: q=%02h exp %02h", q, m);
      end
    end
    checks++;
    if (n_da_only == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
