// Register file R0-R7.
//
// Eight 8-bit registers addressed by the low three opcode bits. Read is
// combinational; a write (MOV Rn,A) takes effect on the rising clock edge.
// All registers are cleared by the asynchronous active-low reset.
module wimp51_regfile (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] addr,
  input  logic       we,
  input  logic [7:0] wdata,
  output logic [7:0] rdata
);
  logic [7:0] regs [8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) regs[i] <= 8'h00;
    end else if (we) begin
      regs[addr] <= wdata;
    end
  end

  always_comb rdata = regs[addr];
endmodule
