// End-to-end test of the WIMP51 with DA A, at its default parameters.
//
// Runs the built-in program (DA demonstration followed by a pass over the
// whole instruction set and a count-down loop) from reset. At the start of
// every instruction it compares the address and the accumulator with the
// expected trace of the program, and the carry flag at the points where the
// DA cases leave a known carry. It also counts how often each DA case
// (low, high, both or no correction; carry or auxiliary carry as cause;
// carry-in blocked), each jump outcome and each register instruction
// occurred, and fails any that never did. Each instruction must take
// exactly two clocks.
module tb_wimp51;
  import wimp51_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [7:0] pc, ir, acc;
  logic       c_flag, ac_flag, instr_start;

  int checks = 0, failures = 0;

  wimp51 dut (.*);

  always #5 clk = ~clk;

  // expected trace: {address, A on arrival}
  logic [15:0] trace [] = '{
    16'h00_00, 16'h01_00, 16'h03_00, 16'h05_0A, 16'h06_10, 16'h08_00,
    16'h09_60, 16'h0A_60, 16'h0C_C0, 16'h0D_20, 16'h0E_20, 16'h0F_02,
    16'h11_11, 16'h12_17, 16'h13_17, 16'h15_12, 16'h16_78, 16'h17_78,
    16'h19_BC, 16'h1A_22, 16'h1B_22, 16'h1C_22, 16'h1E_05, 16'h20_0C,
    16'h21_0C, 16'h22_18, 16'h23_81, 16'h24_0C, 16'h25_00, 16'h26_0C,
    16'h27_C0, 16'h28_CC, 16'h29_0C, 16'h2A_0C, 16'h2B_0C,
    16'h2D_04, 16'h2E_04, 16'h30_03, 16'h32_03,
    16'h2D_03, 16'h2E_03, 16'h30_02, 16'h32_02,
    16'h2D_02, 16'h2E_02, 16'h30_01, 16'h32_01,
    16'h2D_01, 16'h2E_01, 16'h30_00,
    16'h34_00, 16'h35_00, 16'h37_03, 16'h37_03, 16'h37_03
  };

  // carry flag on arrival at the instruction after each DA / ADDC of interest
  function automatic int exp_carry(logic [7:0] addr);
    case (addr)
      8'h06: return 0;  // DA, LSN > 9
      8'h09: return 1;  // DA with C = 1 keeps C
      8'h0D: return 1;  // DA, MSN > 9 sets C
      8'h12: return 0;  // DA, AC = 1
      8'h16: return 1;  // DA, C = AC = 1
      8'h1A: return 1;  // DA, both nibbles > 9
      8'h1C: return 0;  // DA, no correction
      8'h34: return 1;  // ADDC 01H + FFH
      8'h35: return 1;  // SETB C
      8'h37: return 0;  // ADDC 00H + 02H + 1
      default: return -1;
    endcase
  endfunction

  // mechanism counters
  int n_da_lo, n_da_hi, n_da_both, n_da_none, n_da_by_c, n_da_by_ac,
      n_cin_block, n_jz_taken, n_jz_not, n_sjmp, n_mov_rn, n_logic, n_swap;
  int cycles_since_start;

  // observe the execute clock of each instruction
  always @(posedge clk) begin
    if (rst_n && !instr_start) begin
      if (ir == OP_DA) begin
        logic lo, hi;
        lo = (acc[3:0] > 9) || ac_flag;
        hi = (acc[7:4] > 9) || c_flag;
        if (lo && hi) n_da_both++;
        else if (lo) n_da_lo++;
        else if (hi) n_da_hi++;
        else n_da_none++;
        if (c_flag) n_da_by_c++;
        if (ac_flag) n_da_by_ac++;
        if (c_flag && dut.u_alu.cin == 1'b0) n_cin_block++;
      end
      if (ir == OP_JZ) begin
        if (acc == 0) n_jz_taken++; else n_jz_not++;
      end
      if (ir == OP_SJMP) n_sjmp++;
      if (ir[7:3] == OP_MOV_RN_A[7:3]) n_mov_rn++;
      if (ir[7:3] inside {OP_ANL_RN[7:3], OP_ORL_RN[7:3], OP_XRL_RN[7:3]}) n_logic++;
      if (ir == OP_SWAP) n_swap++;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx, cyc, last_start;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    idx = 0; cyc = 0; last_start = -2;
    while (idx < trace.size()) begin
      @(negedge clk);
      cyc++;
      if (instr_start) begin
        if (idx > 0)
          check(cyc - last_start == 2, $sformatf("instruction at %02h took %0d clocks", pc, cyc - last_start));
        last_start = cyc;
        check(pc == trace[idx][15:8],
              $sformatf("step %0d: pc=%02h expected %02h", idx, pc, trace[idx][15:8]));
        check(acc == trace[idx][7:0],
              $sformatf("step %0d at %02h: A=%02h expected %02h", idx, pc, acc, trace[idx][7:0]));
        if (exp_carry(pc) >= 0 && idx < trace.size() - 2)
          check(c_flag == exp_carry(pc)[0],
                $sformatf("at %02h: C=%0b expected %0d", pc, c_flag, exp_carry(pc)));
        idx++;
      end
    end
    check(n_da_lo    > 0, "DA low-nibble correction never happened");
    check(n_da_hi    > 0, "DA high-nibble correction never happened");
    check(n_da_both  > 0, "DA double correction never happened");
    check(n_da_none  > 0, "DA without correction never happened");
    check(n_da_by_c  > 0, "DA with C = 1 never happened");
    check(n_da_by_ac > 0, "DA with AC = 1 never happened");
    check(n_cin_block > 0, "carry-in block never happened");
    check(n_jz_taken > 0, "taken JZ never happened");
    check(n_jz_not   > 0, "untaken JZ never happened");
    check(n_sjmp     > 0, "SJMP never happened");
    check(n_mov_rn   > 0, "MOV Rn,A never happened");
    check(n_logic    > 0, "ANL/ORL/XRL never happened");
    check(n_swap     > 0, "SWAP never happened");
    $display("DA: lo=%0d hi=%0d both=%0d none=%0d byC=%0d byAC=%0d cin_block=%0d; JZ taken=%0d not=%0d SJMP=%0d",
             n_da_lo, n_da_hi, n_da_both, n_da_none, n_da_by_c, n_da_by_ac, n_cin_block,
             n_jz_taken, n_jz_not, n_sjmp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
