// Carry and auxiliary-carry flags.
//
// C is cleared by CLR C, set by SETB C, loaded with the adder's carry out by
// ADDC, and by DA A set when the decimal correction carries out (DA never
// clears C, as on the 8051). AC is a flip-flop that latches the adder's
// carry from bit 3 whenever an ADDC executes and holds it otherwise, so that
// a following DA A can see it. Both update on the rising clock edge and are
// cleared by the asynchronous active-low reset.
module wimp51_flags
  import wimp51_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  c_op_e c_op,
  input  logic  cout,
  input  logic  ac_we,
  input  logic  ac_d,
  output logic  c,
  output logic  ac
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c  <= 1'b0;
      ac <= 1'b0;
    end else begin
      unique case (c_op)
        C_HOLD:  c <= c;
        C_CLR:   c <= 1'b0;
        C_SET:   c <= 1'b1;
        C_ADD:   c <= cout;
        C_DA:    c <= c | cout;
        default: c <= c;
      endcase
      if (ac_we) ac <= ac_d;
    end
  end
endmodule
