# A 16-bit multi-cycle RISC core with conditional execution

This is a small 16-bit processor. It trades a wide datapath for reuse. It has
one memory for both program and data, one ALU, a one-place shifter and a
comparator. Each instruction passes through them in three clock cycles. Every
instruction takes exactly those three cycles, whatever it does, so the
throughput is simply the clock rate divided by three. At 500 MHz that is
166.7 million instructions per second.

Short branches are a problem in pipelined designs. This core avoids them with
conditional execution instead of branch prediction. A `CMP` sets three flags
(equal, greater, less). The conditional instructions that follow either take
effect or do nothing, according to those flags. An if/else becomes a compare
and two conditional moves, and the instruction stream never changes direction.

The RTL is SystemVerilog (IEEE 1800-2017). It is synthesizable, apart from
the assertions, which simulators check.

## Instruction word and instruction set

Each instruction is one 16-bit word. `LDI` is the only exception: it is
followed by a second word that holds a 16-bit constant.

```
 15      11 10   8 7    5 4    2 1  0
+----------+------+------+------+----+
|  opcode  | DST  | SRC1 | SRC2 | -- |
+----------+------+------+------+----+
```

There are eight general registers, r0 to r7, all 16 bits wide. Arithmetic is
modulo 2^16, and the comparator compares unsigned values.

| opcode | mnemonic | effect |
|---|---|---|
| 00000 | NOP | nothing |
| 00001 | LD | DST <- mem[SRC1] |
| 00010 | ST | mem[SRC1] <- SRC2 |
| 00011 | LDI | DST <- next word; the PC skips it |
| 00100 | JMP | PC <- SRC1 |
| 00101 | CMP | flags <- (SRC1 == SRC2, SRC1 > SRC2, SRC1 < SRC2) |
| 00110 | CLR | DST <- 0 |
| 00111 | INC | DST <- SRC1 + 1 |
| 01000 | DEC | DST <- SRC1 - 1 |
| 01001 | AND | DST <- SRC1 & SRC2 |
| 01010 | OR | DST <- SRC1 \| SRC2 |
| 01011 | XOR | DST <- SRC1 ^ SRC2 |
| 01100 | NOT | DST <- ~SRC1 |
| 01101 | ADD | DST <- SRC1 + SRC2 |
| 01110 | SUB | DST <- SRC1 - SRC2 |
| 01111 | HLT | stop |
| 10000 | MOVEQ | if eq: DST <- SRC1 |
| 10001 | MOVNE | if !eq: DST <- SRC1 |
| 10010 | MOVGT | if gt: DST <- SRC1 |
| 10011 | MOVLT | if lt: DST <- SRC1 |
| 10100 | JEQ | if eq: PC <- SRC1 |
| 10101 | JNE | if !eq: PC <- SRC1 |
| 10110 | ADDEQ | if eq: DST <- SRC1 + SRC2 |
| 11000 | MOV | DST <- SRC1 |
| 11010 | SHL | DST <- SRC1 << 1 |
| 11011 | SHR | DST <- SRC1 >> 1 (zero fill) |
| 11100 | ROL | DST <- SRC1 rotated left by 1 |
| 11101 | ROR | DST <- SRC1 rotated right by 1 |

Codes 10111, 11001, 11110 and 11111 are unused and behave as NOP.

Where each part of the instruction set comes from:

- **From the published design:** the 16-bit word and data width, the count of
  28 instructions, and the 5-bit opcodes of the thirteen arithmetic, logic,
  shift and move instructions (INC to SUB, MOV, SHL to ROR).
- **This implementation's choices:** the other fifteen instructions, the field
  layout, the register count, the one-place shift distance and the condition
  set. The one-place shift distance is taken from the published worked
  examples.

## Three cycles per instruction

The published design describes four steps: fetch, decode, execute, and store
or write back. This core runs them in three clocks by doing the write-back of
one instruction in the same cycle as the fetch of the next. The two steps use
different resources, so they never collide. Fetch uses the memory port and
the instruction register. Write-back uses the register-file write port.

| cycle | what happens |
|---|---|
| FETCH | IR <- mem[PC]; PC <- PC + 1; the previous instruction's result (output ALU register) is written to reg[DST] |
| DECODE | reg[SRC1] and reg[SRC2] go into the input ALU register; reg[SRC1] also goes into the address register, and reg[SRC2] into the tri-state register |
| EXECUTE | the ALU, the shifter, `mem[AR]` (LD) or `mem[PC]` (LDI, which also does PC+1) produces a value that goes into the output ALU register. Other instructions do their work here instead: ST writes the tri-state register to `mem[AR]`, a taken jump loads AR into the PC, and CMP updates the flags |

Three consequences of this schedule:

- **No data hazards.** An instruction reads its registers in DECODE. This is
  one cycle after the previous instruction's write-back, which happened in
  FETCH. No forwarding is needed.
- **One memory port is enough.** Fetch uses the memory in FETCH; LD, ST and
  LDI use it in EXECUTE.
- **Every instruction takes the same time.** Jumps, loads and the two-word LDI
  also take three clocks. LDI reads its constant in its own EXECUTE cycle and
  steps the PC past it.

`HLT` moves the sequencer to a HALT state, where it stays until reset.

## Block enables

The ALU, the shifter and the comparator each have an enable from the control
unit. An enable is high only in the EXECUTE cycle of an instruction that uses
that block. When the ALU or the shifter is disabled, its operands are gated to
zero and its output reads 0, so the block does not toggle. When the
comparator is disabled, it keeps its flags.

A conditional instruction whose condition fails raises no enable and writes
nothing back. It spends its three cycles as a NOP.

## Datapath blocks

| module | role |
|---|---|
| `control_unit` | FETCH/DECODE/EXECUTE/HALT sequencer, opcode decoder, condition test, write-back bookkeeping |
| `alu` | ADD, SUB, INC, DEC, AND, OR, XOR, NOT, pass-through, clear |
| `shifter` | SHL, SHR, ROL, ROR by one place |
| `comparator` | unsigned compare, holds the eq/gt/lt flags |
| `program_counter` | PC with increment and jump load (load wins) |
| `instruction_register` | holds the fetched word, exposes its fields |
| `register_file` | 8 x 16 bits, two read ports (read without a clock), one write port |
| `alu_in_reg` | the two operands for EXECUTE |
| `alu_out_reg` | the EXECUTE result waiting for write-back |
| `address_register` | memory address for LD/ST, target for jumps |
| `tristate_reg` | store data; drives the memory data bus only during ST |
| `ram` | shared program/data memory, read without a clock, writes on the clock edge |
| `risc16_top` | wires the above together |
| `risc16_pkg` | opcodes, instruction struct, control bundle `ctl_t`, `make_instr()` helper |

The tri-state register keeps its name, but this RTL has no high-impedance
state. While the register is not driving, its bus output reads 0, and a
separate drive flag says whether it is driving.

## Top-level interface

`risc16_top` has two parameters:

- `MEM_DEPTH`, default 65536 words: the whole 16-bit address space.
- `NREGS`, default 8. The instruction fields are 3 bits wide, so only 8 makes
  sense.

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; all flip-flops trigger on the rising edge |
| `rst_n` | in | 1 | asynchronous reset, active low. It clears the PC, registers, flags and sequencer. Memory contents are kept |
| `load_en` | in | 1 | holds the core and gives the memory port to `ext_*` |
| `ext_we`, `ext_addr`, `ext_wdata` | in | 1/16/16 | writes to memory while `load_en` is high |
| `ext_rdata` | out | 16 | `mem[ext_addr]` while `load_en` is high |
| `halted` | out | 1 | HLT has executed |
| `retire` | out | 1 | one pulse per instruction, in its EXECUTE cycle |
| `cond_true`, `cond_false` | out | 1 | a conditional instruction took effect, or was skipped |
| `pc` | out | 16 | program counter |

To run a program:

1. Hold `load_en` high and write the program from address 0.
2. Pulse `rst_n` low.
3. Drop `load_en`.
4. Wait for `halted`.
5. Raise `load_en` again to read results through `ext_rdata`.

The load port belongs to this implementation; the published design does not
say how programs are loaded.

## Where this RTL departs from the published design, and what it adds

**Points where the published description is open, or where this RTL reads it a particular way:**

- **Wiring and instruction format.** The published design names its blocks
  and describes the steps of an instruction. The wiring between the blocks
  and the bit layout of the instruction word shown above are this
  implementation's own.
- **Width of the opcode field.** The published opcodes for ADD, INC, DEC, XOR,
  AND, SUB, NOT and OR are written with 3 or 4 digits (INC as `111`, ADD as
  `1101`), and the others with 5. This RTL reads all of them as 5-bit codes
  with the leading zeros left out.
- **Worked examples.** The table test uses
  `0110000000000100 - 0110000000000000 = 100` for SUB. It treats SHR as a
  one-place logical shift, like the other three shifts:
  `1100000000000000 -> 0110000000000000`.
- **Cycles per instruction at other clock rates.** The published
  frequency/CPI table gives CPI 2 for slow clocks and CPI 4 above 500 MHz.
  Those figures come from the timing of the original FPGA build. This RTL
  takes 3 clocks per instruction at any clock rate, which matches the
  published 333 MHz and 500 MHz rows.
- **"Pipelined".** The published design calls itself pipelined but describes
  a multi-cycle machine with one shared ALU and one memory. This RTL follows
  the multi-cycle description. The only overlap between instructions is the
  write-back of one instruction during the fetch of the next. There is no
  branch delay slot and no branch prediction.

**Additions and choices the published design leaves open:** eight registers,
unsigned compare, zero-fill SHR, the condition set, asynchronous reset, a RAM
that reads without a clock edge, the load port, and the fifteen instructions
that are not in the published opcode table.

**Memory size.** The published FPGA build used no block RAM, so its memory was
small, but the size is not given. The default here is the full 64K-word
address space. That default (1 Mbit) would not fit the Virtex-II Pro 2V40
used for the published results. The logic of this core would fit it.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with a
line `TB_RESULT checks=N failures=M`.

- `tb_alu`, `tb_shifter`: worked examples of the published table, plus
  thousands of random vectors checked against a bit-level reference model.
  They also check the output of a disabled block.
- `tb_control_unit`: runs all 32 opcodes under several flag settings. It
  checks the whole control bundle in each of the three cycles, the write-back
  in the next fetch, the fixed three-clock spacing, HLT, and the hold while
  `load_en` is high.
- Register, counter, comparator, register-file and RAM testbenches: random
  stimulus against reference arrays. The RAM test uses the full 64K-word size.
- `tb_risc16_top`: end-to-end, at the default parameters. It builds a program
  of 461 words:
  - a counted loop (ADD, DEC, CMP, JNE) with ST and LD;
  - a JMP, and a taken JEQ, over poisoned words;
  - 400 random ALU, shift, compare and conditional instructions;
  - a dump of the registers to memory.

  It runs the program to HLT and compares memory with an instruction-level
  reference model in the testbench. It checks that 458 instructions take
  exactly 1374 clocks. It counts every mechanism: write-back during fetch,
  conditional taken or skipped, jump taken or not, LD, ST, LDI, idle ALU,
  and halt. A count of zero is a failure.
- `tb_table1_workload`: the thirteen instructions of the published
  verification table, with its operands, at a 2 ns clock. It checks each
  result and measures 6.0 ns per instruction, i.e. 166.7 MIPS at 500 MHz.

The RTL also carries assertions:

- memory is written only in EXECUTE;
- a pending write-back happens only in FETCH or HALT;
- after a compare, exactly one flag is set.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_risc16_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/risc16_pkg.sv tb/tb_risc16_top.sv
./obj_dir/Vtb_risc16_top
```

Put any other testbench's name in place of `tb_risc16_top` to run it. The
end-to-end test takes well under a second.

`make_instr(op, dst, src1, src2)` in `risc16_pkg` assembles an instruction
word. The testbenches use it to build their programs.
