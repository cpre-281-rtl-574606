# i281: a single-cycle 8-bit teaching CPU in SystemVerilog

The i281 is a small 8-bit processor built for teaching. It is small enough to
trace by hand, and complete enough to run real loops, array code and
self-modifying programs. Each clock cycle it fetches one 16-bit instruction,
decodes it and executes it. There is no pipeline, no multi-cycle state machine
and no stall. The register file, flags, data memory, code memory and program
counter are all updated on the same rising clock edge.

| Resource | Size |
|---|---|
| Registers | four 8-bit registers A, B, C, D, numbered 00, 01, 10, 11 |
| Code memory | 64 words of 16 bits (6-bit PC) |
| Data memory | 16 bytes in this implementation (`DMEM_DEPTH`) |
| Flags | ZF (zero), NF (negative), OF (signed overflow), CF (carry) |
| Input | 16 board switches SW15..SW0, as the `sw` port |
| Instructions | 23 machine operations, all one cycle |

The RTL is written at the level of the original block diagram. Decoders,
muxes, adders, register file, ALU and memories are each a separate module,
wired together in `i281_cpu`. You can follow a signal from the instruction
word to a register write in the source as you would on a schematic.

## Instruction word

```
 15  12 11 10  9  8  7                 0
+------+-----+-----+--------------------+
|opcode|  X  |  Y  |  immediate/address |
+------+-----+-----+--------------------+
```

- C15..C12 is the primary opcode.
- X (C11..C10) is normally the destination register.
- Y (C9..C8) is a second register. For the INPUT, shift and branch groups it
  instead picks one operation within the group.
- C7..C0 is an 8-bit constant, a data or code address, or a PC offset in
  two's complement.

| C15..C12 | C9..C8 | Mnemonic | Effect |
|---|---|---|---|
| 0000 | – | NOOP | nothing |
| 0001 | 00 | INPUTC [a] | code[a] ← SW15..SW0 |
| 0001 | 01 | INPUTCF [a+X] | code[a+X] ← SW15..SW0 |
| 0001 | 10 | INPUTD [a] | data[a] ← SW7..SW0 |
| 0001 | 11 | INPUTDF [a+X] | data[a+X] ← SW7..SW0 |
| 0010 | Y | MOVE X, Y | X ← Y + 0 (flags unchanged) |
| 0011 | – | LOADI/LOADP X, k | X ← k (LOADP is the same opcode, with an address as constant) |
| 0100 | Y | ADD X, Y | X ← X + Y, flags |
| 0101 | – | ADDI X, k | X ← X + k, flags |
| 0110 | Y | SUB X, Y | X ← X − Y, flags |
| 0111 | – | SUBI X, k | X ← X − k, flags |
| 1000 | – | LOAD X, [a] | X ← data[a] |
| 1001 | Y | LOADF X, [a+Y] | X ← data[a+Y] |
| 1010 | – | STORE [a], X | data[a] ← X |
| 1011 | Y | STOREF [a+Y], X | data[a+Y] ← X |
| 1100 | x0 | SHIFTL X | X ← X << 1, CF ← old bit 7, flags |
| 1100 | x1 | SHIFTR X | X ← X >> 1, CF ← old bit 0, flags |
| 1101 | Y | CMP X, Y | flags of X − Y, nothing stored |
| 1110 | – | JUMP off | PC ← PC + 1 + off |
| 1111 | 00 | BRE/BRZ off | branch if ZF |
| 1111 | 01 | BRNE/BRNZ off | branch if not ZF |
| 1111 | 10 | BRG off | branch if not ZF and NF = OF |
| 1111 | 11 | BRGE off | branch if NF = OF |

A "–" field is ignored by the hardware. INPUTCF and INPUTDF take their offset
register in the X field. LOADF and STOREF take it in the Y field.

## Datapath

```
            +-------------+  instr[15:8]  +----------------+   op[22:0], X, Y   +--------------+
 PC ------->| code memory |-------------->| opcode decoder |------------------->| control unit |--> ctrl
   ^        | 64 x 16     |               +----------------+        flags ----->|              |
   |        +-------------+                                                    +--------------+
   |              | instr[7:0] = imm
   |              v
   |   port0 -----------------------> ALU a
   |   port1 --+--> [ALU source mux] -> ALU b        ALU result --+
   |           |         imm ----^                                 v
   |           |                                imm --> [ALU result mux] = R
   |           |                                                   |
   |           +--> [data-memory input mux] <-- SW7..SW0           +--> data memory address
   |                         |                                     +--> code memory write address (INPUTC*)
   |                         v                                     |
   |                   data memory write data                      |
   |           data memory read data --> [write-back mux] <--------+
   |                                           |
   |                                           v
   |                                  register write data
   |
 pc_logic: PC+1, PC+1+instr[5:0], PC_MUX selects one of the two
```

One net carries most of the datapath. It is the output of the **ALU result
mux**, R in the diagram: the immediate for LOADI, LOAD, STORE and INPUTC/D,
otherwise the ALU result. R is used three ways:

- It is the data memory address for every load, store and INPUTD*. For the F
  forms the ALU computes "constant + register" as an address.
- Its low six bits are the code memory write address for INPUTC*.
- It is the value written back to a register, unless the **write-back mux**
  picks data memory read data (LOAD, LOADF).

This is why MOVE goes through the ALU as Y + 0: the copy has to pass through R
to reach the register file. The assembler puts zeros in C7..C0 for this. MOVE
does not write the flags.

## The control word

`control_unit` turns the one-hot opcode lines into 18 control signals. Each
signal is an OR over the opcode lines that set it. The register selects copy X
or Y from the instruction. The table below shows the signals.

- **P0/P1** are the register read selects.
- **WS** is the written register. It is always X when the write enable is set.
- **SRC** is the ALU source mux: 1 means the immediate.
- **ALU** uses the encoding SHL 00, SHR 01, ADD 10, SUB 11.
- **RES** is the ALU result mux: 1 means the immediate.
- **DIN** is the data memory input mux: 1 means the switches.
- **WB** is the write-back mux: 1 means data memory.
- **PC_WE** is 1 for every instruction, so it is not a column.

| Instr | CM_WE | PC_MUX | P0 | P1 | WS | REG_WE | SRC | ALU | FLAGS_WE | RES | DIN | DM_WE | WB |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| NOOP | | | | | | | | | | | | | |
| INPUTC | 1 | | | | | | | | | 1 | | | |
| INPUTCF | 1 | | X | | | | 1 | ADD | | | | | |
| INPUTD | | | | | | | | | | 1 | 1 | 1 | |
| INPUTDF | | | X | | | | 1 | ADD | | | 1 | 1 | |
| MOVE | | | Y | | X | 1 | 1 | ADD | | | | | |
| LOADI | | | | | X | 1 | | | | 1 | | | |
| ADD | | | X | Y | X | 1 | | ADD | 1 | | | | |
| ADDI | | | X | | X | 1 | 1 | ADD | 1 | | | | |
| SUB | | | X | Y | X | 1 | | SUB | 1 | | | | |
| SUBI | | | X | | X | 1 | 1 | SUB | 1 | | | | |
| LOAD | | | | | X | 1 | | | | 1 | | | 1 |
| LOADF | | | Y | | X | 1 | 1 | ADD | | | | | 1 |
| STORE | | | | X | | | | | | 1 | | 1 | |
| STOREF | | | Y | X | | | 1 | ADD | | | | 1 | |
| SHIFTL | | | X | | X | 1 | | SHL | 1 | | | | |
| SHIFTR | | | X | | X | 1 | | SHR | 1 | | | | |
| CMP | | | X | Y | | | | SUB | 1 | | | | |
| JUMP | | 1 | | | | | | | | | | | |
| BRE | | ZF | | | | | | | | | | | |
| BRNE | | ~ZF | | | | | | | | | | | |
| BRG | | ~ZF & (NF xnor OF) | | | | | | | | | | | |
| BRGE | | NF xnor OF | | | | | | | | | | | |

Blank cells are 0. A blank register select is driven to 00, which nothing
then uses. For stores, X is read through port 1 because port 1 feeds the data
memory input mux.

## Opcode decoding

`opcode_decoder` follows the classic decoder-tree construction:

- **Primary decoder.** An always-enabled `dec4to16` decodes C15..C12. It is
  built as a root `dec2to4` on the upper two bits, which enables one of four
  leaf `dec2to4`s on the lower two bits.
- **Group decoders.** Three primary outputs are groups. Each enables a small
  second-level decoder:
  - 0001 enables a `dec2to4` on C9..C8 for the four INPUT forms.
  - 1100 enables a `dec1to2` on C8 for SHIFTL and SHIFTR.
  - 1111 enables a `dec2to4` on C9..C8 for the four branches.
- **Pass-through fields.** X and Y leave the decoder unchanged. They are not
  one-hot.

The result is 23 one-hot lines. An assertion in `i281_cpu` checks that exactly
one line is active every cycle.

## Program counter and the "+1" in every branch

This is the part most often misread. `pc_logic` has two 6-bit adders in
series:

1. The first adds 1 to the PC.
2. The second adds the low six bits of the instruction (C5..C0) to that
   result.

A mux steered by PC_MUX loads either PC+1 or PC+1+offset into the PC. Both
carries are dropped, so everything wraps modulo 64.

Two consequences follow:

- **The offset is relative to the next instruction, not to the branch.** A
  6-bit two's-complement offset spans −32..+31. Measured from the branch
  itself, the reachable targets are −31..+32. For example, `JUMP` at address
  39 with offset 111011 (−5) lands at 39 + 1 − 5 = 35. A branch to itself
  needs offset −1 (0xFF).
- **Only six of the eight offset bits matter.** The assembler writes an 8-bit
  sign-extended value, and the hardware ignores C7..C6. An offset such as
  0x3F is taken as −1, not +63.

A conditional branch whose condition is false still writes the PC, with PC+1.
PC_WE is 1 for every instruction.

## Flags and the branch conditions

Flags are written by ADD, ADDI, SUB, SUBI, CMP, SHIFTL and SHIFTR only.

- **ZF** is 1 when the 8-bit result is zero.
- **NF** is result bit 7.
- **OF** is signed overflow for add and subtract, and 0 for shifts.
- **CF** has two meanings:
  - For shifts, it is the bit shifted out. A zero is shifted in.
  - For ADD/SUB, it is the carry out of the 8-bit adder. A subtraction is
    done as a + ~b + 1, so for subtraction CF = 1 means "no borrow".

No branch tests CF. The signed comparisons use NF xnor OF, so
`CMP A, B ; BRG L` branches when A > B as signed numbers.

## Self-modifying code and the switches

- INPUTC and INPUTCF write the 16 switch bits into the code memory at the
  address on R.
- INPUTD and INPUTDF write the low 8 switch bits into the data memory.

A program can therefore read a new instruction from the switches into code
memory and then run it. Code memory is read combinationally at the PC, so a
word written in one cycle is executed the next time the PC reaches it.

## Choices this implementation makes

The instruction set, the control table, the decoder tree and the PC logic are
those of the i281. The following points are not fixed by the original
description, and were chosen here:

- **Data memory size.** The data memory is 16 bytes (`DMEM_DEPTH`). Only the
  low four bits of an address are used, so higher addresses wrap. The
  instruction format would allow 256 bytes, and `DMEM_DEPTH` can be raised
  up to 256.
- **Reset.** Reset is synchronous and active high. It sets PC to `START_PC`
  and clears the registers and flags. Memories keep their contents.
  - `START_PC` defaults to 0.
  - The reference simulator can start at 32. `START_PC = 32` models that, and
    `tb_i281_programs` uses it.
- **Memory timing.** Code and data memory read asynchronously and write on the
  clock edge. This is what lets every instruction finish in one cycle.
- **Loader and debug port.** A loader port (`load_en`, `load_cmem`,
  `load_addr`, `load_data`) writes either memory while the CPU is held. With
  `load_en` high, no register, flag or PC changes. A debug read port
  (`dbg_addr`/`dbg_data`) shows data memory. The original machine is loaded
  by its simulator. These ports replace that.
- **Flag details.** The CF convention for subtraction and OF = 0 for shifts
  were chosen here (see above).
- **Branch group decoder.** The second-level decoder for the branch group is
  built like the INPUT-group decoder. Only the branch encodings in C9..C8 are
  specified for it.
- **Switches.** The switches themselves are not modelled. They are the `sw`
  input.

## Modules

| Module | Role | Parameters (default) |
|---|---|---|
| `i281_pkg` | shared types: `ctrl_t` control word, `flags_t`, `alu_op_e`, `op_idx_e` opcode-line indices | `DATA_W` 8, `NUM_OPS` 23 |
| `i281_cpu` | top level, wires everything; loader and debug ports | `START_PC` 0, `DMEM_DEPTH` 16 |
| `dec1to2`, `dec2to4`, `dec4to16` | decoders with enable; `dec4to16` is a tree of five `dec2to4` | – |
| `opcode_decoder` | C15..C8 → 23 one-hot lines, X, Y | – |
| `control_unit` | one-hot lines, X, Y, flags → 18-signal control word | – |
| `pc_logic` | PC register, +1 adder, offset adder, mux | `PC_W` 6, `START_PC` 0 |
| `code_memory` | 64 × 16 bits, async read, clocked write | `DEPTH` 64 |
| `data_memory` | bytes, async read, clocked write, debug read port | `DEPTH` 16 |
| `register_file` | A..D, two read ports, one write port | – |
| `alu` | SHL, SHR, ADD, SUB with ZF/NF/OF/CF | – |
| `flags_register` | four flag bits with write enable | – |

Synthesis produces about 200 coarse cells, 42 flip-flop bits and 1152 memory
bits (64 × 16 code, 16 × 8 data).

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog.

- **Decoders, ALU, control unit.** These are checked exhaustively.
  - The ALU runs all 2^18 operand and operation combinations against an
    independently written model.
  - The control unit is checked against the full control table for every
    opcode, register field and flag value.
- **PC, memories, register file, flags register.** These are driven with
  random stimulus against simple models. The PC check includes the worked
  branch examples above.
- **`tb_i281_cpu` (whole CPU, default parameters).** This test runs the CPU in
  lock step with an instruction-level reference model in the testbench. It
  compares PC, instruction, registers, flags and data memory every cycle. It
  runs the three example programs and a self-modifying INPUTC/INPUTD program,
  then 40 random programs of 300 cycles each. It counts how often each of the
  following happened and fails if any never did:
  - each of the 23 opcodes
  - each branch taken and not taken
  - signed overflow
  - shift carry
  - execution of a self-written code word
  - PC wrap-around
- **`tb_i281_programs`.** This test places the example programs at code address
  32 with `START_PC = 32` and checks results and exact cycle counts:

| Program | Code words | Data bytes | Cycles to the end | Result |
|---|---|---|---|---|
| Sum 1..5, for loop | 9 | 3 | 31 | sum = 15 |
| Sum 1..5, do loop | 8 | 2 | 24 | sum = 15 |
| Bubble sort of {7,3,2,1,6,4,5,8} | 20 | 10 | 377 | 1..8 |

The bubble-sort count can be derived by hand:

- 1 setup instruction
- 7 outer passes of 10 instructions each
- 4 instructions for the final outer test
- 28 inner iterations of 10 instructions each
- 2 extra instructions for each of the 11 swaps (the number of inversions in
  the input)

Together: 1 + 70 + 4 + 280 + 22 = 377.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -y rtl +libext+.sv \
    rtl/i281_pkg.sv tb/tb_i281_cpu.sv --top-module tb_i281_cpu
./obj_dir/Vtb_i281_cpu
```

Replace `tb_i281_cpu` with any other testbench name. To run your own program:

1. Hold `load_en` high.
2. Write the code words with `load_cmem = 1` and the data bytes with
   `load_cmem = 0`, one per clock.
3. Pulse `rst`.
4. Let it run, and watch `pc`, `regs`, `flags` and `dbg_data`.
