// Random test of the program counter: reset to 00H, then 2000 clocks of
// random increment / relative-branch / hold, compared with a reference
// computed as (pc + 1 + signed offset) mod 256.
module tb_wimp51_pc;
  logic       clk = 1'b0, rst_n, inc, branch;
  logic [7:0] rel, pc, m;
  int checks = 0, failures = 0;

  wimp51_pc dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    inc = 1'b1; branch = 1'b0; rel = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    checks++;
    if (pc !== 8'h00) failures++;
    @(negedge clk) begin
      rst_n = 1'b1; inc = 1'b0;
    end
    m = 8'h00;
    repeat (2000) begin
      @(negedge clk);
      inc    = 1'($urandom);
      branch = ($urandom_range(0, 3) == 0);
      rel    = 8'($urandom);
      if (branch) m = 8'((int'(m) + 1 + int'($signed(rel))) % 256);
      else if (inc) m = m + 8'd1;
      @(posedge clk); #1;
      checks++;
      if (pc !== m) begin
        failures++;
        if (failures < 10) $display("FAIL: pc=%02h exp %02h", pc, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
