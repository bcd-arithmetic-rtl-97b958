// WIMP51 controller: instruction register, sequencer and decoder.
//
// Every instruction takes two clocks. In the fetch clock (instr_start = 1)
// the opcode at PC is loaded into IR and PC advances. In the execute clock
// the opcode in IR is decoded into the control word ctl; for two-byte
// instructions (MOV A,#d, ADDC A,#d, JZ rel, SJMP rel) the second byte is
// read from the ROM at PC in the same clock and PC advances past it (or
// jumps). The DA decode (wimp51_da_decode) works on IR and drives ctl.da,
// which the datapath uses as BCD MUX select, carry-in block and accumulator
// load condition; DA also updates C. Opcodes outside the WIMP51 set execute
// as no-operations (one byte). rom_data is not used by the decoder itself,
// only loaded into IR. Reset (asynchronous, active low) enters fetch with
// IR = 00H.
module wimp51_control
  import wimp51_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] rom_data,
  input  logic       acc_zero,
  output ctl_t       ctl,
  output logic [7:0] ir,
  output logic       instr_start
);
  state_e state;
  logic   da;

  wimp51_da_decode u_da_decode (.ir(ir), .s0(da));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_FETCH;
      ir    <= OP_NOP;
    end else if (state == ST_FETCH) begin
      ir    <= rom_data;
      state <= ST_EXEC;
    end else begin
      state <= ST_FETCH;
    end
  end

  always_comb instr_start = (state == ST_FETCH);

  always_comb begin
    ctl = '{
      pc_inc: 1'b0, pc_branch: 1'b0, imm_sel: 1'b0, alu_op: ALU_PASS,
      da: 1'b0, load_a: 1'b0, reg_we: 1'b0, c_op: C_HOLD, ac_we: 1'b0
    };
    if (state == ST_FETCH) begin
      ctl.pc_inc = 1'b1;
    end else begin
      ctl.da = da;
      if (da) begin
        ctl.alu_op = ALU_ADD;
        ctl.c_op   = C_DA;
      end else begin
        unique casez (ir)
          OP_CLR_C:  ctl.c_op = C_CLR;
          OP_SETB_C: ctl.c_op = C_SET;
          OP_SWAP: begin
            ctl.alu_op = ALU_SWAP;
            ctl.load_a = 1'b1;
          end
          OP_MOV_IMM: begin
            ctl.pc_inc  = 1'b1;
            ctl.imm_sel = 1'b1;
            ctl.alu_op  = ALU_PASS;
            ctl.load_a  = 1'b1;
          end
          OP_ADDC_IMM: begin
            ctl.pc_inc  = 1'b1;
            ctl.imm_sel = 1'b1;
            ctl.alu_op  = ALU_ADD;
            ctl.load_a  = 1'b1;
            ctl.c_op    = C_ADD;
            ctl.ac_we   = 1'b1;
          end
          {OP_ADDC_RN[7:3], 3'b???}: begin  // ADDC A,Rn
            ctl.alu_op = ALU_ADD;
            ctl.load_a = 1'b1;
            ctl.c_op   = C_ADD;
            ctl.ac_we  = 1'b1;
          end
          {OP_ORL_RN[7:3], 3'b???}: begin  // ORL A,Rn
            ctl.alu_op = ALU_OR;
            ctl.load_a = 1'b1;
          end
          {OP_ANL_RN[7:3], 3'b???}: begin  // ANL A,Rn
            ctl.alu_op = ALU_AND;
            ctl.load_a = 1'b1;
          end
          {OP_XRL_RN[7:3], 3'b???}: begin  // XRL A,Rn
            ctl.alu_op = ALU_XOR;
            ctl.load_a = 1'b1;
          end
          {OP_MOV_A_RN[7:3], 3'b???}: begin  // MOV A,Rn
            ctl.alu_op = ALU_PASS;
            ctl.load_a = 1'b1;
          end
          {OP_MOV_RN_A[7:3], 3'b???}: ctl.reg_we = 1'b1;  // MOV Rn,A
          OP_JZ: begin
            ctl.pc_inc    = 1'b1;
            ctl.pc_branch = acc_zero;
          end
          OP_SJMP: begin
            ctl.pc_inc    = 1'b1;
            ctl.pc_branch = 1'b1;
          end
          default: ;
        endcase
      end
    end
  end
endmodule
