// WIMP51 arithmetic logic unit.
//
// Operations: ADDC (A + operand + C), AND, OR, XOR, pass operand, SWAP A.
// The adder's second input comes through the BCD MUX, so DA A is executed as
// an addition of 00H/06H/60H/66H to A. During DA the carry flag is blocked
// from the adder's carry-in; otherwise a set C would make the adder add 07H
// instead of 06H. cout and ac_out are the adder's carries, meaningful for
// ALU_ADD only. Combinational.
module wimp51_alu
  import wimp51_pkg::*;
(
  input  logic [7:0] a,
  input  logic [7:0] operand,
  input  logic       c,
  input  logic       ac,
  input  alu_op_e    op,
  input  logic       da,
  output logic [7:0] y,
  output logic       cout,
  output logic       ac_out
);
  logic [7:0] add_b, sum;
  logic       cin;

  wimp51_bcd_mux u_bcd_mux (
    .operand(operand), .acc(a), .c(c), .ac(ac), .s0(da),
    .b(add_b), .s1_hi(), .s1_lo()
  );

  // carry-in block during DA
  always_comb cin = c & ~da;

  wimp51_adder #(.WIDTH(8)) u_adder (
    .a(a), .b(add_b), .cin(cin), .sum(sum), .cout(cout), .ac(ac_out)
  );

  always_comb begin
    unique case (op)
      ALU_ADD:  y = sum;
      ALU_AND:  y = a & operand;
      ALU_OR:   y = a | operand;
      ALU_XOR:  y = a ^ operand;
      ALU_PASS: y = operand;
      ALU_SWAP: y = {a[3:0], a[7:4]};
      default:  y = a;
    endcase
  end
endmodule
