// Shared types and constants of the WIMP51 processor with the DA A extension.
//
// WIMP51 is a small subset of the 8051: one accumulator A, registers R0-R7,
// a carry flag C and (added for DA) an auxiliary carry AC. The opcodes below
// are the standard 8051 encodings of the instructions the machine executes;
// n in "Rn" is taken from opcode bits [2:0]. The control word (ctl_t) is
// the bundle the controller hands to the datapath every clock.
package wimp51_pkg;

  // 8051 opcodes used by WIMP51 (register forms are the base with n = 0)
  localparam logic [7:0] OP_NOP      = 8'h00;
  localparam logic [7:0] OP_ADDC_IMM = 8'h34;  // ADDC A,#data
  localparam logic [7:0] OP_ADDC_RN  = 8'h38;  // ADDC A,Rn
  localparam logic [7:0] OP_ORL_RN   = 8'h48;  // ORL  A,Rn
  localparam logic [7:0] OP_ANL_RN   = 8'h58;  // ANL  A,Rn
  localparam logic [7:0] OP_JZ       = 8'h60;  // JZ   rel
  localparam logic [7:0] OP_XRL_RN   = 8'h68;  // XRL  A,Rn
  localparam logic [7:0] OP_MOV_IMM  = 8'h74;  // MOV  A,#data
  localparam logic [7:0] OP_SJMP     = 8'h80;  // SJMP rel
  localparam logic [7:0] OP_CLR_C    = 8'hC3;  // CLR  C
  localparam logic [7:0] OP_SWAP     = 8'hC4;  // SWAP A
  localparam logic [7:0] OP_SETB_C   = 8'hD3;  // SETB C
  localparam logic [7:0] OP_DA       = 8'hD4;  // DA   A
  localparam logic [7:0] OP_MOV_A_RN = 8'hE8;  // MOV  A,Rn
  localparam logic [7:0] OP_MOV_RN_A = 8'hF8;  // MOV  Rn,A

  // ALU operations
  typedef enum logic [2:0] {
    ALU_ADD  = 3'd0,  // A + operand + carry-in (ADDC, and DA with the BCD MUX)
    ALU_AND  = 3'd1,
    ALU_OR   = 3'd2,
    ALU_XOR  = 3'd3,
    ALU_PASS = 3'd4,  // operand (MOV A,Rn / MOV A,#data)
    ALU_SWAP = 3'd5   // exchange the nibbles of A
  } alu_op_e;

  // carry flag updates
  typedef enum logic [2:0] {
    C_HOLD = 3'd0,
    C_CLR  = 3'd1,
    C_SET  = 3'd2,
    C_ADD  = 3'd3,  // C <= adder carry out (ADDC)
    C_DA   = 3'd4   // C <= C | adder carry out (DA never clears C)
  } c_op_e;

  // controller states: every instruction is one fetch plus one execute clock
  typedef enum logic {
    ST_FETCH = 1'b0,
    ST_EXEC  = 1'b1
  } state_e;

  // control word from the controller to the datapath
  typedef struct packed {
    logic    pc_inc;    // PC <= PC + 1
    logic    pc_branch; // PC <= PC + 1 + rel (rel = ROM byte at PC)
    logic    imm_sel;   // ALU operand: 1 = ROM byte at PC, 0 = Rn
    alu_op_e alu_op;
    logic    da;        // DA A in execution (BCD MUX S_0)
    logic    load_a;    // accumulator write for non-DA instructions
    logic    reg_we;    // Rn <= A
    c_op_e   c_op;
    logic    ac_we;     // latch the adder's auxiliary carry
  } ctl_t;

endpackage
