// WIMP51 processor with decimal adjust (DA A), and its program ROM.
//
// WIMP51 is a teaching subset of the 8051 with the accumulator A, R0-R7 and
// the carry C. This version adds the 8051 DA A instruction (opcode D4H) with
// an auxiliary carry flag AC, a BCD MUX in front of the adder, a DA decoder,
// a carry-in block and a DA term in the accumulator load select; the rest of
// the instruction set is unaffected.
//
// Datapath: PC -> ROM -> IR (controller). The ALU operand is either the ROM
// byte at PC (immediate) or Rn; the ALU result goes to A; Rn is written from
// A. Every instruction takes two clocks (fetch, execute); instr_start marks
// the fetch clock, when pc holds the instruction's address and acc, c_flag
// and ac_flag hold the state left by the previous instruction.
// The two-clock sequencing and the register/ROM sizes are this design's
// choice; the DA mechanism follows the original modification.
module wimp51
  import wimp51_pkg::*;
#(
  parameter string INIT_FILE = "rtl/wimp51_da_test.hex"
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic [7:0] pc,
  output logic [7:0] ir,
  output logic [7:0] acc,
  output logic       c_flag,
  output logic       ac_flag,
  output logic       instr_start
);
  ctl_t       ctl;
  logic [7:0] rom_data, rn, operand, alu_y;
  logic       acc_zero, cout, ac_out;

  wimp51_rom #(.ADDR_W(8), .INIT_FILE(INIT_FILE)) u_rom (
    .addr(pc), .data(rom_data)
  );

  wimp51_pc u_pc (
    .clk(clk), .rst_n(rst_n), .inc(ctl.pc_inc), .branch(ctl.pc_branch),
    .rel(rom_data), .pc(pc)
  );

  wimp51_control u_control (
    .clk(clk), .rst_n(rst_n), .rom_data(rom_data), .acc_zero(acc_zero),
    .ctl(ctl), .ir(ir), .instr_start(instr_start)
  );

  wimp51_regfile u_regfile (
    .clk(clk), .rst_n(rst_n), .addr(ir[2:0]), .we(ctl.reg_we),
    .wdata(acc), .rdata(rn)
  );

  always_comb operand = ctl.imm_sel ? rom_data : rn;

  wimp51_alu u_alu (
    .a(acc), .operand(operand), .c(c_flag), .ac(ac_flag), .op(ctl.alu_op),
    .da(ctl.da), .y(alu_y), .cout(cout), .ac_out(ac_out)
  );

  wimp51_acc u_acc (
    .clk(clk), .rst_n(rst_n), .load(ctl.load_a), .da(ctl.da), .d(alu_y),
    .q(acc), .zero(acc_zero)
  );

  wimp51_flags u_flags (
    .clk(clk), .rst_n(rst_n), .c_op(ctl.c_op), .cout(cout),
    .ac_we(ctl.ac_we), .ac_d(ac_out), .c(c_flag), .ac(ac_flag)
  );
endmodule
