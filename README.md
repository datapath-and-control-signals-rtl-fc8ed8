# Single-cycle LC4 processor

LC4 is a small 16-bit teaching instruction set: eight 16-bit registers
R0..R7, 16-bit instructions, a three-bit condition code NZP and a privilege
bit that separates user code from operating-system code. This RTL implements
it as a single-cycle machine. Every instruction is fetched, decoded, executed
and retired in one clock cycle. All the combinational work of an instruction
happens between two rising edges, and every piece of state is updated together
on the edge that ends the cycle.

The design revolves around **eleven control signals**. A decoder derives them
from each instruction, and they steer a fixed datapath. Once the meaning of
each signal is clear, the rest is wiring. Most of this document is therefore
about them.

## Datapath

```
            +--------+   I[15:0]   +---------+  ctl (11 signals)
  PC ------>|program |------------>| decoder |-----------------> every mux / WE
  |         | memory |             +---------+
  |         +--------+
  |   I[8:6],7,I[11:9] -rsMux-> rs.addr  +----------+ RS --+--> ALU A
  |   I[2:0],I[11:9]   -rtMux-> rt.addr  | register | RT --|--> ALUInputMux 0 --> ALU B
  |   I[11:9],7        -rdMux-> rd.addr  |   file   |      |    I[15:0] ------> ALUInputMux 1
  |                          Write Input +----------+      |
  |                              ^                         |    ALU C --> Data Address
  |                              |                         |    RT -----> Data Input
  |   regInputMux: 0 ALU C, 1 Data Output, 2 PC+1 ---------+--> NZP tester --> NZP (PSR[2:0])
  |                                                        |
  +<-- PCMux: 0 branch, 1 PC+1, 2 PC+1+SEXT(IMM11), 3 RS, 4 0x8000|UIMM8,
              5 (PC & 0x8000)|(IMM11<<4)
                                            Privilege.CTL --> PSR[15]
```

| Module | Role |
|---|---|
| `lc4_single_cycle` | top level; wires the blocks below |
| `lc4_prog_mem` | 2^16 x 16 program memory, combinational read at PC, plus a load port |
| `lc4_decoder` | instruction to control-signal struct `lc4_ctl_t` |
| `lc4_regfile` | R0..R7 with the rsMux / rtMux / rdMux address muxes |
| `lc4_alu` | ALUInputMux and the 21 ALU operations |
| `lc4_data_mem` | 2^16 x 16 data memory, combinational read, clocked write |
| `lc4_reg_input_mux` | write-back select |
| `lc4_branch_unit` | PC register, PC+1, NZP tester/register, TEST, PCMux |
| `lc4_privilege` | PSR[15] |
| `lc4_pkg` | shared types: enums for every control field, `lc4_ctl_t`, opcodes |

## The control signals

| Signal | Bits | Values |
|---|---|---|
| rsMux.CTL | 2 | 0: I[8:6], 1: R7, 2: I[11:9] |
| rtMux.CTL | 1 | 0: I[2:0], 1: I[11:9] |
| rdMux.CTL | 1 | 0: I[11:9], 1: R7 |
| regFile.WE | 1 | 1 exactly when R0..R7 is written |
| ALUInputMux.CTL | 1 | 0: B = RT, 1: B = whole instruction word |
| ALU.CTL | 6 | operation code, table below |
| DATA.WE | 1 | 1 only for a store |
| regInputMux.CTL | 2 | 0: ALU result, 1: data memory output, 2: PC+1 |
| NZP.WE | 1 | 1 when a register is written, or for a compare |
| Privilege.CTL | 2 | 0: clear PSR[15], 1: set, 2: keep |
| PCMux.CTL | 3 | see "Next PC" |

Two ideas make the ALU table compact.

- **The immediate lives in the instruction word.** When ALUInputMux is 1, the
  ALU's B input is the whole 16-bit instruction. Each immediate operation
  extracts and extends its own field: B[4:0], B[5:0], B[6:0], B[8:0] or B[7:0].
  No separate immediate generator is needed.
- **Compares produce a number.** A compare returns -1, 0 or +1 (0xFFFF, 0,
  1) through the normal write-back path. That value reaches the NZP tester like
  any other result, but regFile.WE stays 0, so only the condition codes change.

| ALU.CTL | Result | Used by |
|---|---|---|
| 0 / 1 / 2 | A+B, A*B, A-B | ADD, MUL, SUB |
| 3 / 4 | A/B, A%B (unsigned; 0 if B = 0) | DIV, MOD |
| 5 / 6 | A+SEXT(B[4:0]), A+SEXT(B[5:0]) | ADD imm, LDR/STR address |
| 8..11 | AND, NOT A, OR, XOR | logic |
| 12 | A AND SEXT(B[4:0]) | AND imm |
| 16 / 17 | signed / unsigned sign of A-B | CMP, CMPU |
| 18 / 19 | signed / unsigned sign of A-SEXT(B[6:0]) | CMPI, CMPIU |
| 24 / 25 / 26 | A<<B[3:0], A>>>B[3:0], A>>B[3:0] | SLL, SRA, SRL |
| 32 | SEXT(B[8:0]) | CONST |
| 33 | (A & 0xFF) \| (B[7:0] << 8) | HICONST |

Codes not listed return 0.

### Control words of some instructions

| | rs | rt | rd | regFile.WE | ALUIn | ALU.CTL | DATA.WE | regIn | NZP.WE | Priv | PCMux |
|---|---|---|---|---|---|---|---|---|---|---|---|
| SUB | 0 | 0 | 0 | 1 | 0 | 2 | 0 | 0 | 1 | 2 | 1 |
| LDR | 0 | – | 0 | 1 | 1 | 6 | 0 | 1 | 1 | 2 | 1 |
| STR | 0 | 1 | – | 0 | 1 | 6 | 1 | – | 0 | 2 | 1 |
| TRAP | – | – | 1 | 1 | – | – | 0 | 2 | 1 | 1 | 4 |
| RTI | 1 | – | – | 0 | – | – | 0 | – | 0 | 0 | 3 |
| CONST | – | – | 0 | 1 | 1 | 32 | 0 | 0 | 1 | 2 | 1 |
| HICONST | 2 | – | 0 | 1 | 1 | 33 | 0 | 0 | 1 | 2 | 1 |
| CMP | 2 | 0 | – | 0 | 0 | 16 | 0 | 0 | 1 | 2 | 1 |
| BR | – | – | – | 0 | – | – | 0 | – | 0 | 2 | 0 |

"–" is a don't-care. The decoder drives 0 for every don't-care.

The decoder applies one rule for regFile.WE and NZP.WE across all opcodes:
regFile.WE is 1 exactly when a register is written, and NZP.WE follows it, plus
the compares. Some published control-word tables for this datapath show
regFile.WE = 0 for LDR, NZP.WE = 0 for CONST, or ALU.CTL 33 for CONST. This
design does not follow those values:

- LDR must write Rd, so regFile.WE is 1.
- CONST writes a register, so NZP.WE is 1.
- CONST uses operation 32, SEXT(IMM9); operation 33 is HICONST.

## Next PC and the condition codes

The branch unit contains the PC register, the PC+1 incrementer, the NZP tester
and the 3-bit NZP register (PSR[2:0]). It also contains the PCMux:

| PCMux | Next PC | Instructions |
|---|---|---|
| 0 | TEST ? PC+1+SEXT(I[8:0]) : PC+1 | BR (NOP when I[11:9] = 000) |
| 1 | PC+1 | everything else |
| 2 | PC+1+SEXT(I[10:0]) | JMP |
| 3 | RS | JMPR, JSRR, RTI (rsMux selects R7) |
| 4 | 0x8000 \| I[7:0] | TRAP |
| 5 | (PC & 0x8000) \| (I[10:0] << 4) | JSR |

The NZP tester looks at the value on the register write path, which is the
output of regInputMux. It yields N (100) for a negative value, Z (010) for zero
and P (001) for a positive value. The NZP register loads this code at the end
of the cycle when NZP.WE is 1. TEST is `|(I[11:9] & NZP)`: it reads the
condition codes left by earlier instructions, never those of the current one.
TRAP, JSR and JSRR write PC+1 into R7, so they also set NZP from that value.

## Privilege

PSR[15] is 1 in supervisor mode. TRAP sets it and jumps into the operating
system's vector area at 0x8000 and above. RTI clears it and returns through R7.
Every other instruction leaves it alone. The bit is available as an output;
this design checks no memory accesses against it.

## Timing and interface of the top level

- One instruction per rising edge of `clk`, so CPI = 1. There are no stalls and
  no multi-cycle operations. Multiply, divide and modulus are combinational, so
  they set the critical path.
- `rst` is synchronous and active high. Reset sets PC to `RESET_PC` (0x8200),
  clears R0..R7, sets NZP to Z and puts the machine in supervisor mode. While
  `rst` is high, no register, memory or NZP write takes place.
- The program memory is filled through `prog_we`/`prog_addr`/`prog_data`, one
  word per clock, normally while `rst` is held.
- The data memory has no reset and no load port. A word that was never stored
  holds whatever the memory powered up with.
- The remaining outputs trace the current instruction: `pc`, `insn`, the
  register write (`regfile_we`, `rd_addr`, `wb_data`), the store (`data_we`,
  `data_addr`, `data_wdata`), `nzp`, `psr15`, `next_pc`, `branch_taken` and
  `illegal`.

Parameters of `lc4_single_cycle`: `IMEM_ADDR_W = 16`, `DMEM_ADDR_W = 16`
(2^16 words each, following the 16-bit PC and address path), and
`RESET_PC = 16'h8200`.

## Choices made in this implementation

These points are not fixed by the datapath description and were decided here:

- **Memories.** Program and data memory are separate arrays, as drawn, rather
  than LC4's usual single shared address space. Both read combinationally.
- **Program loading.** The load port on the program memory is an addition.
- **Reset.** All reset values are choices of this design: PC 0x8200, NZP = Z,
  PSR[15] = 1 and registers 0.
- **Opcodes.** Instruction encodings follow the standard LC4 instruction set.
  Opcodes 0011, 1011 and 1110 execute as no-ops and raise `illegal`.
- **Divide and modulus.** Both are unsigned. Division by zero returns 0.
- **CMPIU (ALU.CTL 19).** The immediate is sign-extended and then compared
  unsigned, exactly as the operation table states. Standard LC4 treats this
  immediate as unsigned, so the two differ for immediates 64..127.
- **Unused codes.** Unused ALU.CTL codes return 0. Unused regInputMux,
  PCMux and Privilege.CTL codes select the ALU result, PC+1 and "keep",
  respectively.

## Verification

Every module has a self-checking bench in `tb/`. Each bench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_lc4_alu`: corner and random operands for every ALU.CTL code, on both
  ALUInputMux inputs, against integer arithmetic.
- `tb_lc4_regfile`: random reads and writes against a shadow register set, and
  reset.
- `tb_lc4_data_mem` and `tb_lc4_prog_mem`: the full 2^16 words, against a
  shadow memory or a formula, (addr * 40503) ^ 0x5A5A.
- `tb_lc4_reg_input_mux` and `tb_lc4_privilege`: all selects and control
  values.
- `tb_lc4_branch_unit`: all PCMux paths, taken and not-taken branches, and NZP
  loading, against a model.
- `tb_lc4_decoder`: the control words in the table above, then all 65536
  instruction words against the write-enable, privilege, PCMux and ALU.CTL
  rules.
- `tb_lc4_single_cycle`: the full-size core against an instruction-level
  reference model written in the bench. The bench fills the whole program
  memory with weighted random instructions and the whole data memory with
  random words. It then runs 400 episodes of 2000 cycles. Each episode reloads
  fresh code at the reset address and resets the core. Every cycle the bench
  compares PC, instruction, register write, store and next PC; after each edge
  it compares NZP and PSR[15]. It checks CPI = 1. It fails if any of these
  never occurred:
  - every PCMux path, including taken and not-taken branches;
  - every regInputMux source;
  - a store, and a load of a stored word;
  - privilege set and privilege clear;
  - N, Z and P condition codes;
  - an unassigned opcode;
  - a divide by zero;
  - every ALU operation.

  The run takes a few seconds.
- `tb_lc4_exercise_program`: a 13-instruction program on the full-size core.
  It uses SUB, STR, LDR, CONST, two BRzp (one taken, one not), TRAP and RTI.
  The bench checks the PC sequence, NZP and PSR[15] after every instruction,
  the store, and the final values of all eight registers. All expected values
  were worked out by hand.

To run a bench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/lc4_pkg.sv \
    tb/tb_lc4_single_cycle.sv --top-module tb_lc4_single_cycle -o sim
./obj_dir/sim
```

Replace the bench name to run another. The core uses no vendor primitives. On
an FPGA or in ASIC synthesis, the two 2^16-word memories with combinational
read become distributed RAM or register arrays, so they would normally be
reduced (`IMEM_ADDR_W`, `DMEM_ADDR_W`) or replaced by synchronous RAMs. That
replacement changes the single-cycle timing.
