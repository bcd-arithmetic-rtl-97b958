// Test of the controller: every one of the 256 opcodes, with A zero and
// non-zero, is fed through a fetch and an execute clock. In the fetch clock
// only the PC increment may be active and the opcode must land in IR; in the
// execute clock the control word must match the instruction table below,
// written from the 8051 opcode map. Undefined opcodes must do nothing.
module tb_wimp51_control;
  import wimp51_pkg::*;
  logic       clk = 1'b0, rst_n, acc_zero, instr_start;
  logic [7:0] rom_data, ir;
  ctl_t       ctl;
  int checks = 0, failures = 0;

  wimp51_control dut (.*);

  always #5 clk = ~clk;

  function automatic ctl_t expected(logic [7:0] op, logic z);
    ctl_t e;
    e = '{pc_inc: 0, pc_branch: 0, imm_sel: 0, alu_op: ALU_PASS, da: 0,
          load_a: 0, reg_we: 0, c_op: C_HOLD, ac_we: 0};
    if (op == 8'hC3) e.c_op = C_CLR;
    else if (op == 8'hD3) e.c_op = C_SET;
    else if (op == 8'hD4) begin e.da = 1; e.alu_op = ALU_ADD; e.c_op = C_DA; end
    else if (op == 8'hC4) begin e.alu_op = ALU_SWAP; e.load_a = 1; end
    else if (op == 8'h74) begin e.pc_inc = 1; e.imm_sel = 1; e.load_a = 1; end
    else if (op == 8'h34) begin
      e.pc_inc = 1; e.imm_sel = 1; e.load_a = 1; e.alu_op = ALU_ADD; e.c_op = C_ADD; e.ac_we = 1;
    end
    else if (op >= 8'h38 && op <= 8'h3F) begin e.load_a = 1; e.alu_op = ALU_ADD; e.c_op = C_ADD; e.ac_we = 1; end
    else if (op >= 8'h48 && op <= 8'h4F) begin e.load_a = 1; e.alu_op = ALU_OR; end
    else if (op >= 8'h58 && op <= 8'h5F) begin e.load_a = 1; e.alu_op = ALU_AND; end
    else if (op >= 8'h68 && op <= 8'h6F) begin e.load_a = 1; e.alu_op = ALU_XOR; end
    else if (op >= 8'hE8 && op <= 8'hEF) e.load_a = 1;
    else if (op >= 8'hF8) e.reg_we = 1;
    else if (op == 8'h60) begin e.pc_inc = 1; e.pc_branch = z; end
    else if (op == 8'h80) begin e.pc_inc = 1; e.pc_branch = 1; end
    return e;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctl_t f;
    f = '{pc_inc: 1, pc_branch: 0, imm_sel: 0, alu_op: ALU_PASS, da: 0,
          load_a: 0, reg_we: 0, c_op: C_HOLD, ac_we: 0};
    rom_data = 8'h00; acc_zero = 1'b0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 512; i++) begin
      rom_data = 8'(i);
      acc_zero = i[8];
      #1;
      check(instr_start && ctl == f, $sformatf("fetch of %02h: start=%0b ctl=%p", rom_data, instr_start, ctl));
      @(negedge clk);
      rom_data = 8'($urandom);   // operand byte: must not affect decoding
      #1;
      check(!instr_start && ir == 8'(i), $sformatf("IR=%02h exp %02h", ir, 8'(i)));
      check(ctl == expected(8'(i), i[8]),
            $sformatf("exec of %02h z=%0b: ctl=%p exp %p", 8'(i), i[8], ctl, expected(8'(i), i[8])));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
