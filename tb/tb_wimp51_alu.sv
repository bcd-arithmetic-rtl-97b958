// Test of the ALU. DA is checked exhaustively over A, C and AC against the
// 8051 definition (result and carry); the other operations over every A
// with random operands and flags, against their Boolean definitions. For
// ADD the carry-in must be C, and must be ignored during DA.
module tb_wimp51_alu;
  import wimp51_pkg::*;
  logic [7:0] a, operand, y;
  logic       c, ac, da, cout, ac_out;
  alu_op_e    op;
  int checks = 0, failures = 0;

  wimp51_alu dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // 8051 DA A: returns {carry, result}
  function automatic logic [8:0] da8051(logic [7:0] x, logic cy, logic acy);
    int t;
    t = int'(x);
    if (t % 16 > 9 || acy) t = t + 6;
    if (t > 255) cy = 1'b1;
    t = t % 256;
    if (t / 16 > 9 || cy) begin
      t = t + 96;
      if (t > 255) cy = 1'b1;
    end
    return {cy, 8'(t)};
  endfunction

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // DA, exhaustive
    for (int i = 0; i < 1024; i++) begin
      logic [8:0] e;
      a = 8'(i); c = i[8]; ac = i[9]; da = 1'b1; op = ALU_ADD;
      operand = 8'($urandom);
      #1;
      e = da8051(a, c, ac);
      check(y == e[7:0] && (c | cout) == e[8],
            $sformatf("DA A=%02h C=%0b AC=%0b -> %02h C'=%0b, exp %02h %0b", a, c, ac, y, c | cout, e[7:0], e[8]));
    end
    // other operations
    da = 1'b0;
    for (int i = 0; i < 256; i++)
      for (int k = 0; k < 6; k++) begin
        logic [7:0] e;
        int s;
        a = 8'(i); operand = 8'($urandom); c = 1'($urandom); ac = 1'($urandom);
        op = alu_op_e'(k);
        #1;
        s = int'(a) + int'(operand) + int'(c);
        case (op)
          ALU_ADD:  e = 8'(s);
          ALU_AND:  e = a & operand;
          ALU_OR:   e = a | operand;
          ALU_XOR:  e = a ^ operand;
          ALU_PASS: e = operand;
          default:  e = {a[3:0], a[7:4]};
        endcase
        check(y == e, $sformatf("op=%0d a=%02h b=%02h y=%02h exp %02h", k, a, operand, y, e));
        if (op == ALU_ADD)
          check(cout == (s > 255) && ac_out == ((a % 16) + (operand % 16) + c > 15),
                $sformatf("ADDC flags a=%02h b=%02h c=%0b", a, operand, c));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
