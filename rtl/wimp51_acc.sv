// Accumulator A.
//
// An 8-bit register loaded from the ALU result. Its load select is the OR of
// the normal load decode and the DA decode (S_0): DA A had to be added as a
// condition for writing the accumulator. zero flags A = 00H for JZ. Rising
// edge clocked, cleared by the asynchronous active-low reset.
module wimp51_acc (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic       da,
  input  logic [7:0] d,
  output logic [7:0] q,
  output logic       zero
);
  logic la_sel;

  always_comb la_sel = load | da;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= 8'h00;
    else if (la_sel) q <= d;
  end

  always_comb zero = (q == 8'h00);
endmodule
