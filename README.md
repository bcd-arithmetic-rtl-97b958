# WIMP51 with decimal adjust (DA A)

WIMP51 is a small teaching processor that executes a subset of the 8051
instruction set: an 8-bit accumulator A, eight registers R0-R7, a carry flag
C, immediate and register ALU operations, and two relative jumps. This design
adds the 8051 **DA A** instruction (opcode D4H), which turns the binary sum of
two packed BCD bytes back into packed BCD. With it, a program can do decimal
arithmetic with ordinary binary `ADDC`:

```
MOV  A,#38H     ; 38 (BCD)
ADDC A,#45H     ; binary sum 7DH
DA   A          ; 83H, i.e. decimal 83
```

The rest of the instruction set behaves as before. Nearly all of the change is
in the ALU: an operand multiplexer that can feed a correction constant into the
existing adder, a flag for the carry between the two nibbles, and three small
control changes.

## How DA is done with one addition

A packed BCD byte holds two decimal digits, one per nibble. After a binary
addition a nibble can be wrong in two ways: it holds 10-15, or it overflowed
past 15 and lost 16 to the next nibble. The 8051 definition repairs this in
two steps: first add 06H if the low nibble is above 9 or the auxiliary carry
AC is set. Then add 60H if the high nibble is above 9 or C is set, and set C
if either step carries out of bit 7.

This design does both steps in **one pass through the ALU's adder**. The adder's
second operand is replaced by one of 00H, 06H, 60H or 66H:

| correction | low nibble gets 6 (`s1_lo`) | high nibble gets 6 (`s1_hi`) |
|---|---|---|
| condition | AC = 1, or A[3:0] > 9 | C = 1, or A[7:4] > 9, or A[7:4] = 9 and A[3:0] > 9 |

The last high-nibble term covers A = 9AH-9FH. There, adding 06H carries into a
high nibble of 9 and makes it 10. The 8051's second step would then add 60H, so
the single-pass version has to decide that up front. Without this term, 9AH
would become A0H instead of 00H with C = 1. Leaving it out would match a
simpler reading of the original circuit. It is a one-line change in
`wimp51_bcd_mux`.

C after DA is `C | carry_out`: DA may set the carry but never clears it,
as on the 8051. AC is not changed by DA.

## Datapath

```
          +-------+  rom_data   +------------+  ctl (ctl_t)
  PC ---->|  ROM  |------------>| controller |------------------+
   ^      +-------+   |         | IR, decode |                  |
   |  rel (2nd byte)  |         +------------+                  |
   +------------------+  imm_sel                                v
                      +--------+--> operand --+        +----------------+
  R0-R7 (addr IR[2:0])-+        |              +------->|  ALU           |
     ^ rdata                                   |  A --->|  BCD MUX       |
     | wdata = A                               |        |  ripple adder  |--> y --> A
                                                        |  logic / SWAP  |--> cout, ac_out --> C, AC
                                                        +----------------+
```

* **Controller** (`wimp51_control`). It holds the instruction register and
  runs a two-state sequencer. In the fetch clock it loads IR from the ROM and
  increments PC. In the execute clock it decodes IR into a `ctl_t` control word.
  A two-byte instruction reads its second byte from the ROM in that same clock
  and moves PC past it.
* **DA decoder** (`wimp51_da_decode`). An eight-input AND of IR with bits 5,
  3, 1 and 0 inverted, so it fires for D4H only. Its output `s0` selects the
  correction constant in the BCD MUX and blocks the carry-in. It also adds a
  term to the accumulator load.
* **BCD MUX** (`wimp51_bcd_mux`). This is the adder's B input. When `s0` = 0
  it passes the normal operand (Rn or the immediate byte). When `s0` = 1 it
  sets each nibble to 0110 or 0000, as chosen by `s1_lo` and `s1_hi` above.
  That gives five possible outputs: the operand, 00H, 06H, 60H and 66H.
* **Ripple adder** (`wimp51_adder`). A chain of eight full adders. It brings
  out the carry from bit 3 into bit 4 as well as the carry out of bit 7.
* **Carry-in block** (in `wimp51_alu`). The adder's carry-in is `C & ~s0`.
  ADDC needs C as its carry-in, but during DA a set C would make the adder add
  07H instead of 06H.
* **Flags** (`wimp51_flags`). C is written by CLR C, SETB C, ADDC (carry out)
  and DA (OR-ed in). AC is a flip-flop that latches the nibble carry on both
  ADDC forms and holds it until the next ADDC, so a following DA A sees it.
* **Accumulator** (`wimp51_acc`). Its load select is `load_a | s0`, so DA
  writes A even though it is not one of the original load decodes. It also
  gives the A = 0 signal that JZ uses.
* **Register file** (`wimp51_regfile`), **program counter** (`wimp51_pc`) and
  **program ROM** (`wimp51_rom`, 256 bytes, asynchronous read).

`wimp51_pkg` holds the opcodes, the ALU and carry operation enums, and the
control-word struct.

## Instruction set and timing

| instruction | opcode | effect |
|---|---|---|
| `MOV A,#d` | 74H d | A = d |
| `ADDC A,#d` | 34H d | A = A + d + C; C and AC from the adder |
| `ADDC A,Rn` | 38H+n | A = A + Rn + C; C and AC from the adder |
| `ANL/ORL/XRL A,Rn` | 58H/48H/68H + n | bitwise AND / OR / XOR |
| `MOV A,Rn` | E8H+n | A = Rn |
| `MOV Rn,A` | F8H+n | Rn = A |
| `SWAP A` | C4H | swap the nibbles of A |
| `CLR C`, `SETB C` | C3H, D3H | C = 0, C = 1 |
| `DA A` | D4H | decimal adjust, as above |
| `JZ rel` | 60H rel | if A = 0, PC = next + rel |
| `SJMP rel` | 80H rel | PC = next + rel |

`rel` is a signed byte and `next` is the address after the two-byte jump, as
on the 8051. Any other opcode is a one-byte no-operation.

Every instruction takes exactly **two clocks**, fetch then execute. The top
level's `instr_start` output is high in the fetch clock. At that point `pc` is
the address of the instruction, and `acc`, `c_flag` and `ac_flag` hold the
result of the instruction before it. All state (PC, IR, A, C, AC, R0-R7) is
cleared by the asynchronous active-low reset `rst_n`. Execution starts at
address 00H.

## The built-in program

`rtl/wimp51_da_test.hex` is loaded into the ROM by default (parameter
`INIT_FILE` of `wimp51`). It holds 57 bytes in two parts:

* **00H-1BH: the DA cases.** Each ADDC is followed by DA A: low digit above 9
  (0AH becomes 10H), C = 1 (00H becomes 60H), high digit above 9 (C0H becomes
  20H, C = 1), AC = 1 (11H becomes 17H), C = AC = 1 (12H becomes 78H), both
  digits above 9 (BCH becomes 22H, C = 1), and no correction (22H stays 22H).
* **1CH-38H: the rest of the instruction set.** The program uses R7 with every
  register instruction. A loop then counts A down from 4 with `ADDC A,#FFH`,
  `JZ` and `SJMP`. Finally it computes 00H + 02H + C = 03H and stops in
  `SJMP $` at 37H.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M`. All testbenches are
self-checking. Run them from the directory that holds `rtl/` and `tb/`, because
the ROM image is read as `rtl/wimp51_da_test.hex`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/wimp51_pkg.sv tb/tb_wimp51.sv --top-module tb_wimp51
./obj_dir/Vtb_wimp51
```

| testbench | what it checks |
|---|---|
| `tb_wimp51` | The built-in program at default parameters. It checks PC and A at the start of the 52 instructions up to the final `SJMP $` and of 3 passes through it, C at the DA results, and that each instruction takes 2 clocks. It fails if any DA case, the carry-in block, a taken or untaken JZ, SJMP, SWAP, MOV Rn,A or the logic operations never occurred. |
| `tb_wimp51_random` | 30 random programs rich in DA and BCD operands (over 400 DA executions). They are compared instruction by instruction with an 8051 instruction-set model that uses the two-step DA definition. |
| `tb_wimp51_alu` | DA exhaustively over A, C and AC against the 8051 definition, plus all other operations |
| `tb_wimp51_bcd_mux`, `tb_wimp51_adder`, `tb_wimp51_da_decode` | Exhaustive checks |
| `tb_wimp51_control` | All 256 opcodes, with A zero and not zero: the fetch and execute control words |
| `tb_wimp51_flags`, `tb_wimp51_acc`, `tb_wimp51_regfile`, `tb_wimp51_pc` | Random stimulus against reference models |
| `tb_wimp51_rom` | The ROM contents, byte by byte |

To run a different program, pass another `$readmemh` image through
`INIT_FILE`. Locations the image does not cover read as 00H (NOP).

## What follows the original modification and what is this design's own

These parts follow the original: the opcode D4H, the BCD MUX with one
correction select per nibble, the AND-gate decoder, the auxiliary carry tapped
from the ripple adder and latched by ADDC, the carry-in block during DA, and
DA as an extra accumulator-load condition. The same holds for the instruction
set and the test program.

These are choices of this design:

* The two-clock fetch/execute sequencing, the control-word encoding and the
  asynchronous read of the ROM.
* The 256-byte ROM and the reset of all state to zero.
* Undefined opcodes act as NOPs.
* DA's high-nibble term for A = 9AH-9FH (see above). It makes DA A match the
  8051 for every input. A circuit that tests only "high nibble > 9 or C" would
  give a different result for those six values of A.
* The update rule for C after DA (`C | carry_out`) and the fact that DA leaves
  AC alone. Both follow the 8051 definition of the instruction.

The design is checked only in simulation. Synthesis to a particular
technology, timing closure and a bus interface to other logic are outside its
scope.
