// Exhaustive test of the BCD MUX over A, C, AC and S_0 with random normal
// operands. With S_0 = 1 the expected constant is derived from the 8051's
// two-step decimal adjust (add 06H if the low digit needs it, then 60H if
// the high digit of that intermediate result, or the carry, needs it).
module tb_wimp51_bcd_mux;
  logic [7:0] operand, acc, b;
  logic       c, ac, s0, s1_hi, s1_lo;
  int checks = 0, failures = 0;

  wimp51_bcd_mux dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int f = 0; f < 8; f++) begin
        int t;
        logic lo, hi;
        logic [7:0] exp_b;
        acc = 8'(i); c = f[0]; ac = f[1]; s0 = f[2];
        operand = 8'($urandom);
        #1;
        lo = (i % 16 > 9) || ac;
        t  = i + (lo ? 6 : 0);
        hi = ((t / 16) % 16 > 9) || c || (t > 255);
        exp_b = s0 ? ((hi ? 8'h60 : 8'h00) | (lo ? 8'h06 : 8'h00)) : operand;
        checks++;
        if (b != exp_b || s1_lo != lo || s1_hi != hi) begin
          failures++;
          if (failures < 10)
            $display("FAIL: A=%02h C=%0b AC=%0b S0=%0b b=%02h exp %02h", acc, c, ac, s0, b, exp_b);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
