// Random test of R0-R7 against a reference array: reset clears all eight,
// then 2000 clocks of random writes and reads of random registers.
module tb_wimp51_regfile;
  logic       clk = 1'b0, rst_n, we;
  logic [2:0] addr;
  logic [7:0] wdata, rdata;
  logic [7:0] m [8];
  int checks = 0, failures = 0;

  wimp51_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; addr = '0; wdata = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 8; i++) begin
      m[i] = 8'h00;
      addr = 3'(i);
      #1;
      checks++;
      if (rdata !== 8'h00) failures++;
    end
    repeat (2000) begin
      @(negedge clk);
      we    = 1'($urandom);
      addr  = 3'($urandom);
      wdata = 8'($urandom);
      #1;
      checks++;
      if (rdata !== m[addr]) begin
        failures++;
        if (failures < 10) $display("FAIL: R%0d=%02h exp %02h", addr, rdata, m[addr]);
      end
      if (we) m[addr] = wdata;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
