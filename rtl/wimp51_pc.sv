// Program counter.
//
// 8-bit byte address. inc advances it by one; branch (taken JZ or SJMP,
// asserted while PC points at the offset byte) loads PC + 1 + rel, i.e. the
// address after the two-byte jump plus the signed offset, as on the 8051.
// branch has priority over inc. Rising edge clocked, reset to 00H by the
// asynchronous active-low reset.
module wimp51_pc (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       inc,
  input  logic       branch,
  input  logic [7:0] rel,
  output logic [7:0] pc
);
  logic [7:0] pc_plus1;

  always_comb pc_plus1 = pc + 8'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      pc <= 8'h00;
    else if (branch) pc <= pc_plus1 + rel;
    else if (inc)    pc <= pc_plus1;
  end
endmodule
