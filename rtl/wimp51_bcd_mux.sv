// BCD MUX: the second operand of the adder.
//
// With S_0 = 0 (any instruction but DA A) the normal operand passes through.
// With S_0 = 1 each nibble becomes 0110 or 0000, chosen by its own S_1, so
// the adder sees one of 00H, 06H, 60H, 66H: five outputs in all.
//   low  nibble S_1: AC = 1, or A[3:0] > 9
//   high nibble S_1: C  = 1, or A[7:4] > 9, or A[7:4] = 9 with A[3:0] > 9
// The last high-nibble term is this design's addition: it makes the single
// addition equal to the 8051's two-step DA (the +06H correction carries into
// a high digit of 9). Combinational.
module wimp51_bcd_mux (
  input  logic [7:0] operand,
  input  logic [7:0] acc,
  input  logic       c,
  input  logic       ac,
  input  logic       s0,
  output logic [7:0] b,
  output logic       s1_hi,
  output logic       s1_lo
);
  localparam logic [3:0] SIX = 4'b0110;

  logic lo_gt9, hi_gt9, hi_eq9;

  always_comb begin
    lo_gt9 = acc[3:0] > 4'd9;
    hi_gt9 = acc[7:4] > 4'd9;
    hi_eq9 = acc[7:4] == 4'd9;
    s1_lo  = ac | lo_gt9;
    s1_hi  = c | hi_gt9 | (hi_eq9 & lo_gt9);
    if (s0) b = {s1_hi ? SIX : 4'b0000, s1_lo ? SIX : 4'b0000};
    else    b = operand;
  end
endmodule
