// Exhaustive test of the ripple adder: every a, b and carry-in, compared
// with integer addition for the sum, the carry out of bit 7 and the
// carry out of bit 3 (auxiliary carry).
module tb_wimp51_adder;
  logic [7:0] a, b, sum;
  logic       cin, cout, ac;
  int checks = 0, failures = 0;

  wimp51_adder #(.WIDTH(8)) dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        for (int k = 0; k < 2; k++) begin
          int full, low;
          a = 8'(i); b = 8'(j); cin = k[0];
          #1;
          full = i + j + k;
          low  = (i % 16) + (j % 16) + k;
          checks++;
          if (sum != 8'(full) || cout != (full > 255) || ac != (low > 15)) begin
            failures++;
            if (failures < 10)
              $display("FAIL: %02h+%02h+%0d -> %02h c=%0b ac=%0b", a, b, cin, sum, cout, ac);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
