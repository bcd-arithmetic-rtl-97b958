// Random-program test of the whole WIMP51 against an instruction-set model.
//
// Each round writes a random program of WIMP51 instructions into the ROM
// (DA A, ADDC, MOV, logic operations, SWAP, carry operations, and JZ/SJMP
// with short forward offsets), ending in "SJMP $", resets the processor and
// runs it. At the start of every instruction PC, A and C are compared with
// the model, which executes the same bytes by the 8051 definitions (DA A in
// the 8051's two steps). Both operands of ADDC are often BCD so that DA sees
// realistic inputs, including the A = 9xH cases.
module tb_wimp51_random;
  import wimp51_pkg::*;

  localparam int ROUNDS = 30;
  localparam int LEN    = 150;  // bytes of random code per round

  logic       clk = 1'b0;
  logic       rst_n;
  logic [7:0] pc, ir, acc;
  logic       c_flag, ac_flag, instr_start;

  int checks = 0, failures = 0, n_da = 0;

  wimp51 dut (.*);

  always #5 clk = ~clk;

  logic [7:0] prog [256];

  // model state
  logic [7:0] m_pc, m_a;
  logic       m_c, m_ac;
  logic [7:0] m_r [8];

  function automatic logic [7:0] bcd_byte();
    return {4'($urandom_range(0, 9)), 4'($urandom_range(0, 9))};
  endfunction

  task automatic gen_program();
    int p = 0;
    while (p < LEN) begin
      int k = $urandom_range(0, 15);
      case (k)
        0, 1:  begin prog[p] = OP_ADDC_IMM; prog[p+1] = ($urandom_range(0, 3) != 0) ? bcd_byte() : 8'($urandom); p += 2; end
        2:     begin prog[p] = OP_MOV_IMM;  prog[p+1] = ($urandom_range(0, 1) != 0) ? bcd_byte() : 8'($urandom); p += 2; end
        3, 4:  begin prog[p] = OP_DA; p += 1; end
        5:     begin prog[p] = OP_ADDC_RN  | 8'($urandom_range(0, 7)); p += 1; end
        6:     begin prog[p] = OP_MOV_RN_A | 8'($urandom_range(0, 7)); p += 1; end
        7:     begin prog[p] = OP_MOV_A_RN | 8'($urandom_range(0, 7)); p += 1; end
        8:     begin prog[p] = OP_ANL_RN   | 8'($urandom_range(0, 7)); p += 1; end
        9:     begin prog[p] = OP_ORL_RN   | 8'($urandom_range(0, 7)); p += 1; end
        10:    begin prog[p] = OP_XRL_RN   | 8'($urandom_range(0, 7)); p += 1; end
        11:    begin prog[p] = OP_SWAP; p += 1; end
        12:    begin prog[p] = OP_CLR_C; p += 1; end
        13:    begin prog[p] = OP_SETB_C; p += 1; end
        14:    begin prog[p] = OP_JZ;   prog[p+1] = 8'($urandom_range(0, 2)); p += 2; end
        default: begin prog[p] = OP_SJMP; prog[p+1] = 8'($urandom_range(0, 2)); p += 2; end
      endcase
    end
    // skipped-over bytes are filled with NOPs up to the end loop
    for (int i = p; i < p + 4; i++) prog[i] = OP_NOP;
    prog[p+4] = OP_SJMP; prog[p+5] = 8'hFE;
    for (int i = p + 6; i < 256; i++) prog[i] = OP_NOP;
  endtask

  // execute one instruction of the model
  task automatic model_step();
    logic [7:0] op, nxt, b;
    int s, t;
    logic cy;
    op = prog[m_pc];
    nxt = prog[8'(m_pc + 1)];
    m_pc = m_pc + 1;
    if (op == OP_CLR_C) m_c = 0;
    else if (op == OP_SETB_C) m_c = 1;
    else if (op == OP_SWAP) m_a = {m_a[3:0], m_a[7:4]};
    else if (op == OP_MOV_IMM) begin m_a = nxt; m_pc++; end
    else if (op == OP_ADDC_IMM || op[7:3] == OP_ADDC_RN[7:3]) begin
      if (op == OP_ADDC_IMM) begin b = nxt; m_pc++; end else b = m_r[op[2:0]];
      s = int'(m_a) + int'(b) + int'(m_c);
      m_ac = (m_a % 16 + b % 16 + m_c) > 15;
      m_c = s > 255;
      m_a = 8'(s);
    end
    else if (op == OP_DA) begin
      t = int'(m_a); cy = m_c;
      if (t % 16 > 9 || m_ac) t += 6;
      if (t > 255) cy = 1;
      t = t % 256;
      if (t / 16 > 9 || cy) begin t += 96; if (t > 255) cy = 1; end
      m_a = 8'(t); m_c = cy;
    end
    else if (op[7:3] == OP_MOV_RN_A[7:3]) m_r[op[2:0]] = m_a;
    else if (op[7:3] == OP_MOV_A_RN[7:3]) m_a = m_r[op[2:0]];
    else if (op[7:3] == OP_ANL_RN[7:3]) m_a &= m_r[op[2:0]];
    else if (op[7:3] == OP_ORL_RN[7:3]) m_a |= m_r[op[2:0]];
    else if (op[7:3] == OP_XRL_RN[7:3]) m_a ^= m_r[op[2:0]];
    else if (op == OP_JZ) begin m_pc++; if (m_a == 0) m_pc += nxt; end
    else if (op == OP_SJMP) begin m_pc++; m_pc += nxt; end
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (ROUNDS * (2 * LEN + 50) + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < ROUNDS; r++) begin
      rst_n = 1'b0;
      gen_program();
      @(negedge clk);
      for (int i = 0; i < 256; i++) dut.u_rom.mem[i] = prog[i];
      m_pc = 0; m_a = 0; m_c = 0; m_ac = 0;
      for (int i = 0; i < 8; i++) m_r[i] = 0;
      @(negedge clk) rst_n = 1'b1;
      // run until the model reaches the final SJMP $
      while (!(prog[m_pc] == OP_SJMP && prog[8'(m_pc + 1)] == 8'hFE)) begin
        if (instr_start) begin
          check(pc == m_pc && acc == m_a && c_flag == m_c,
                $sformatf("round %0d: pc=%02h A=%02h C=%0b, model pc=%02h A=%02h C=%0b",
                          r, pc, acc, c_flag, m_pc, m_a, m_c));
          if (prog[m_pc] == OP_DA) n_da++;
          model_step();
        end
        @(negedge clk);
      end
      // final state
      while (!instr_start) @(negedge clk);
      check(pc == m_pc && acc == m_a && c_flag == m_c, $sformatf("round %0d end state", r));
    end
    check(n_da > 100, "too few DA instructions executed");
    $display("DA instructions executed: %0d", n_da);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
