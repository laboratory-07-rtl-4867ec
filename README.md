# MIPS16: a 16-bit single-cycle MIPS processor

A reduced MIPS processor in which every instruction is fetched, decoded,
executed, given its memory access and written back within one clock cycle.
Words, registers, instructions and memory words are all 16 bits wide. The
structure is the classic single-cycle MIPS data path: a program counter, an
instruction memory, a register file, an ALU, a data memory and a handful of
multiplexers steered by a combinational control unit. The data path is
shrunk to 16 bits and the instruction set to 15 instructions.

The processor is split into five units, each in its own module:

| unit | module | contents |
|------|--------|----------|
| IF  | `instr_fetch`  | PC register, `instr_mem` (ROM), PC+1 adder, branch and jump selection |
| ID  | `instr_decode` | field split, `reg_file` (8 x 16), RegDst multiplexer, `ext_unit` |
| control | `main_control` | opcode -> eight 1-bit control signals and ALUOp |
| EX  | `exec_unit`    | `alu`, `alu_control`, ALUSrc multiplexer, branch-target adder |
| MEM | `mem_unit`     | data RAM (asynchronous read, synchronous write) |
| WB  | `write_back`   | MemtoReg multiplexer, PCSrc = Branch AND Zero, jump address |

`mips16_cpu` wires them together. `test_env` is the board-level top. It
steps the processor with a push-button pulse and multiplexes its internal
signals onto a 4-digit seven-segment display and eight LEDs, so that a
program can be traced one instruction at a time.

## Instruction formats

All three formats start with a 3-bit opcode:

```
R-type  | opcode 15:13 | rs 12:10 | rt 9:7 | rd 6:4 | sa 3 | func 2:0 |
I-type  | opcode 15:13 | rs 12:10 | rt 9:7 |     immediate 6:0        |
J-type  | opcode 15:13 |              target 12:0                    |
```

Three-bit register fields give eight registers. `sa` is a single bit, so a
shift moves its operand by 0 or 1 place. The 7-bit immediate reaches
-64..63 when sign-extended and 0..127 when zero-extended.

## Instruction set

The field layout is fixed above, but the choice of the 15 instructions and
their encodings belongs to this design (`rtl/mips16_pkg.sv`):

| opcode | func | instruction | operation |
|--------|------|-------------|-----------|
| 000 | 000 | `add rd,rs,rt`  | rd = rs + rt |
| 000 | 001 | `sub rd,rs,rt`  | rd = rs - rt |
| 000 | 010 | `sll rd,rt,sa`  | rd = rt << sa |
| 000 | 011 | `srl rd,rt,sa`  | rd = rt >> sa (logical) |
| 000 | 100 | `and rd,rs,rt`  | rd = rs & rt |
| 000 | 101 | `or rd,rs,rt`   | rd = rs \| rt |
| 000 | 110 | `xor rd,rs,rt`  | rd = rs ^ rt |
| 000 | 111 | `sra rd,rt,sa`  | rd = rt >>> sa (arithmetic) |
| 001 | - | `addi rt,rs,imm`  | rt = rs + sext(imm) |
| 010 | - | `lw rt,imm(rs)`   | rt = M[rs + sext(imm)] |
| 011 | - | `sw rt,imm(rs)`   | M[rs + sext(imm)] = rt |
| 100 | - | `beq rs,rt,imm`   | if rs == rt: PC = PC+1 + sext(imm) |
| 101 | - | `andi rt,rs,imm`  | rt = rs & zext(imm) |
| 110 | - | `ori rt,rs,imm`   | rt = rs \| zext(imm) |
| 111 | - | `j target`        | PC = {PC+1[15:13], target} |

Register `$0` always reads as zero, and writes to it are ignored.

## Control

`main_control` decodes only the opcode. It produces eight 1-bit signals
and a 3-bit ALUOp (the `ctrl_t` struct):

| instr | RegDst | ExtOp | ALUSrc | Branch | Jump | MemWrite | MemtoReg | RegWrite | ALUOp |
|-------|---|---|---|---|---|---|---|---|-------|
| R     | 1 | 0 | 0 | 0 | 0 | 0 | 0 | 1 | RTYPE (func) |
| addi  | 0 | 1 | 1 | 0 | 0 | 0 | 0 | 1 | ADD |
| lw    | 0 | 1 | 1 | 0 | 0 | 0 | 1 | 1 | ADD |
| sw    | 0 | 1 | 1 | 0 | 0 | 1 | 0 | 0 | ADD |
| beq   | 0 | 1 | 0 | 1 | 0 | 0 | 0 | 0 | SUB |
| andi  | 0 | 0 | 1 | 0 | 0 | 0 | 0 | 1 | AND |
| ori   | 0 | 0 | 1 | 0 | 0 | 0 | 0 | 1 | OR |
| j     | 0 | 0 | 0 | 0 | 1 | 0 | 0 | 0 | ADD |

`alu_control` turns ALUOp into the 3-bit ALUCtrl. For I-type instructions
ALUOp alone decides it. For R-type instructions ALUCtrl is the function
field, because the function codes were chosen equal to the ALUCtrl codes.

## One cycle, from PC to PC

Everything between the PC register and the next clock edge is
combinational. Within one cycle:

1. The ROM returns the instruction at the PC (asynchronous read), and the
   adder forms PC+1.
2. The register file reads `rs` and `rt`. The immediate is extended: sign
   extension when ExtOp = 1, zero extension when ExtOp = 0.
3. The ALU combines RD1 with either RD2 (ALUSrc = 0) or the extended
   immediate (ALUSrc = 1). Zero is 1 exactly when the result is 0. In
   parallel, the branch adder forms PC+1 + Ext_Imm.
4. The data RAM reads the word at ALURes[7:0] (asynchronous read).
5. The write-back multiplexer picks MemData (MemtoReg = 1) or ALURes as WD.
   The write address is `rd` for R-type (RegDst = 1), `rt` otherwise.
6. The next PC is chosen in two steps, as in the MIPS data path. PCSrc
   = Branch AND Zero picks the branch target over PC+1. Jump then picks the
   jump address over that result.

On the rising edge, three things happen together: the PC loads the next
PC, the register file stores WD if RegWrite, and the RAM stores RD2 if
MemWrite. WD can depend on a RAM read that depends on ALURes, which
depends on a register read. That chain is the longest combinational path:
ROM, register file, ALU, RAM, write-back multiplexer, register file input.

Addressing is by word throughout. The PC counts instructions, so the
sequential successor is PC+1 (the 32-bit MIPS uses PC+4 in bytes). For the
same reason, the branch offset is added without the 32-bit version's shift
by two, and the jump address is simply the top three bits of PC+1 followed
by the 13-bit target. A jump therefore stays inside the current 8K-word
region.

## Stepping and the board view (`test_env`)

On the board, the processor advances only when `step` is high. `step` is
meant to be the one-clock pulse of a debounced push button. It gates the PC
update, RegWrite and MemWrite alike, so one press executes exactly one
instruction. With `step` tied high the processor runs at one instruction
per clock. Between presses, every internal value stays stable and can be
inspected:

| sw[7:5] | `ssd_value` shows |
|---------|-------------------|
| 000 | instruction |
| 001 | PC+1 |
| 010 | RD1 |
| 011 | RD2 |
| 100 | Ext_Imm |
| 101 | ALURes |
| 110 | MemData |
| 111 | WD |

`sw[0] = 0` puts the control signals on the LEDs:
`led[7:0] = {RegDst, ExtOp, ALUSrc, Branch, Jump, MemWrite, MemtoReg,
RegWrite}`. `sw[0] = 1` puts ALUOp on `led[2:0]` and zeros above it.
`sw[4:1]` are unused.

Two board parts are not included: the button debouncer that makes `step`,
and the seven-segment driver that would multiplex `ssd_value` onto the
digits. Their signals are the top's ports. `rst` is a synchronous reset. It
clears the PC and the registers but not the data memory.

## Memories and the built-in program

- Instruction memory `instr_mem`: 2^`IMEM_ADDR_W` = 256 words of ROM,
  addressed by PC[7:0]. It holds the program in
  `rtl/mips16_prog_pkg.sv`, with NOP (`0000`, `add $0,$0,$0`) in every
  other word. To run another program, set the `INIT_FILE` parameter of
  `instr_mem` to a `$readmemh` file.
- Data memory `mem_unit`: 2^`DMEM_ADDR_W` = 256 words of RAM, addressed by
  ALURes[7:0], initially zero. Higher address bits are ignored, so
  addresses wrap.

The built-in program executes every instruction at least once. It covers
all eight ALU operations, both extensions, loads and stores with positive
and negative offsets, a taken and a not-taken branch, a loop closed by a
backward branch, a forward jump and a write to `$0`. It then halts in a
`j 31` loop at word 31, having executed 33 instructions from reset. The
final state is `$1=3 $2=3 $3=007D $4=0040 $5=5 $6=3 $7=3`, with
`M[00]=3 M[3F]=FFFD M[43]=5`.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `test_env`, `mips16_cpu` | `IMEM_ADDR_W` | 8 | log2 of instruction memory words |
| `test_env`, `mips16_cpu` | `DMEM_ADDR_W` | 8 | log2 of data memory words |
| `instr_mem` | `INIT_FILE` | "" | optional `$readmemh` image |

The data width (16) and register count (8) are fixed by the instruction
format and live in `mips16_pkg`.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`.

- `alu`, `alu_control`, `ext_unit`, `main_control`, `write_back`,
  `exec_unit`: exhaustive or random stimulus, checked against values
  computed in the testbench.
- `reg_file`, `mem_unit`, `instr_decode`, `instr_fetch`: random stimulus
  over many cycles, checked against model arrays and a PC model. The
  checks include read-before-write timing, `$0`, reset, the enable and the
  jump-over-branch priority.
- `instr_mem`: every word is compared with a hand-encoded copy of the
  program.
- `tb_mips16_cpu`: runs the program with the enable dropped on random
  cycles. Every cycle it compares all data-path signals with an
  instruction-level reference model (`tb/mips16_ref_pkg.sv`). At the end
  it checks the final registers, memory and instruction count. It requires
  every mechanism (taken and not-taken branch, jump, lw, sw, each ALU
  operation, held cycles, write to `$0`) to occur.
- `tb_test_env`: uses the default sizes and drives the top the way the
  board does. Between step pulses it walks all 16 switch combinations and
  checks the display and the LEDs against the model. It runs the program
  to the halt loop twice, with a reset in between.

To run a testbench with Verilator 5 from the repository root:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
  rtl/mips16_pkg.sv rtl/mips16_prog_pkg.sv tb/mips16_ref_pkg.sv \
  tb/tb_test_env.sv --top-module tb_test_env -Mdir obj_dir -o sim
./obj_dir/sim
```

Replace `tb_test_env` with any other `tb_*` module. The `-I` paths let
Verilator find the other modules by file name. The testbenches use
`$urandom` only and need no x/z states.

## Departures and choices

Taken from the reference single-cycle data path and its 16-bit definition:

- the unit partitioning;
- the instruction formats;
- the control signal names;
- the multiplexer polarities (RegDst, ALUSrc, MemtoReg, PCSrc, Jump);
- Zero = 1 on a zero result;
- PCSrc = Branch AND Zero;
- a RAM with asynchronous read and synchronous write;
- the branch target as a plain addition to PC+1;
- the 1-bit shift amount used only by shifts;
- the switch assignments of the display.

This design's own choices:

- the 15 instructions and every opcode, function, ALUOp and ALUCtrl
  encoding;
- which instructions sign- or zero-extend;
- shifts acting on `rt`;
- `$0` hard-wired to zero;
- synchronous reset of PC and registers;
- asynchronous instruction-memory read;
- memory depths of 256 words;
- zero-initialised data memory;
- the jump-address form `{PC+1[15:13], target}`;
- gating the PC (and not only RegWrite/MemWrite) with the step pulse;
- the LED order;
- the built-in program.

Not provided: overflow or carry detection, byte or half-word access,
exceptions, and the board's debouncer and seven-segment driver.
