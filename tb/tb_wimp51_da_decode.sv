// Exhaustive test of the DA decoder: s0 must be 1 for D4H and for no other
// of the 256 opcodes.
module tb_wimp51_da_decode;
  logic [7:0] ir;
  logic       s0;
  int checks = 0, failures = 0;

  wimp51_da_decode dut (.ir(ir), .s0(s0));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      ir = 8'(i);
      #1;
      checks++;
      if (s0 !== (i == 212)) begin
        failures++;
        $display("FAIL: ir=%02h s0=%0b", ir, s0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
