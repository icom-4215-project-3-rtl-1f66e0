# RISC AR3: an 8-bit accumulator processor on a single internal bus

The AR3 is a small teaching processor. It has an 8-bit accumulator, eight
8-bit general purpose registers, a 256-byte memory and 16-bit instructions.
Every transfer inside the processor goes over **one 8-bit bus**. That bus
shapes the whole design: fetching a 16-bit instruction takes two bus
transfers plus two address transfers, and only one value can move per clock
cycle. The interesting part of the design is the **multi-cycle controller**
that orders these transfers.

This repository holds synthesizable SystemVerilog for the complete processor:

- the datapath: memory, register file, accumulator, status register,
  instruction register, program counter, ALU, multiplier and the bus;
- the controller;
- a self-checking testbench for every block and one for the whole processor.

## Programmer's model

| Resource | Size | Notes |
|---|---|---|
| Memory | 256 x 8 bit | Holds both program and data. Instructions are stored big-endian: opcode byte first. |
| R0..R7 | 8 x 8 bit | General purpose. R7 also holds the target address of every branch. |
| A | 8 bit | Accumulator: the implicit operand and destination of every operation. |
| SR | 4 bit | Flags `Z C N O`: zero, carry, negative, overflow. `Z` is bit 3 and `O` is bit 0. |
| PC | 8 bit | Byte address. Reset sets it to 0. |
| IR | 16 bit | The current instruction. |

The fields of an instruction word:

```
 15      11 10    8 7              0
+----------+-------+----------------+
|  opcode  |  f    | immediate/addr |
+----------+-------+----------------+
```

`f` selects one of R0..R7. Bits 7:0 hold the immediate value of `LDI` or the
address of `LDA addr` / `STA addr`. Fields that an instruction does not use
are ignored.

### Instruction set

| Opcode | Mnemonic | Operation | Flags written |
|---|---|---|---|
| 00000 | AND rf  | A <- A & Rf | Z N |
| 00001 | OR rf   | A <- A \| Rf | Z N |
| 00010 | XOR rf  | A <- A ^ Rf | Z N |
| 00011 | ADDC rf | A <- A + Rf + C | Z C N O |
| 00100 | SUB rf  | A <- A - Rf | Z C N O (C = borrow) |
| 00101 | MUL rf  | A <- A[3:0] * Rf[3:0], unsigned | Z N |
| 00110 | NEG     | A <- -A (two's complement) | Z C N O (C = borrow, so C = (A != 0)) |
| 00111 | NOT     | A <- ~A | Z N |
| 01000 | RLC     | A <- {A[6:0], C}, C <- A[7] | Z C N |
| 01001 | RRC     | A <- {C, A[7:1]}, C <- A[0] | Z C N |
| 01010 | LDA rf  | A <- Rf | none |
| 01011 | STA rf  | Rf <- A | none |
| 01100 | LDA addr | A <- mem[addr] | none |
| 01101 | STA addr | mem[addr] <- A | none |
| 01110 | LDI imm | A <- imm | none |
| 10000 | BRZ | if Z: PC <- R7 | none |
| 10001 | BRC | if C: PC <- R7 | none |
| 10010 | BRN | if N: PC <- R7 | none |
| 10011 | BRO | if O: PC <- R7 | none |
| 11000 | NOP | nothing | none |
| 11111 | STOP | halt until reset | none |

`O` is two's complement overflow. Opcodes not in the table execute as NOP.
A branch jumps to the address held in R7. So a program loads the target into
A (`LDI`), copies it to R7 (`STA r7`), then branches.

## How an instruction moves over the bus

The controller (`ar3_control`) is a state machine. Each state issues one
control word, the struct `ctrl_t` from `ar3_pkg`. The control word names the
bus driver (`bus_src`) and the destinations that load in that cycle. The
memory is addressed through a memory address register (MAR), which is also
loaded from the bus.

| State | Bus carries | Actions at the end of the cycle |
|---|---|---|
| F0 | PC | MAR <- bus; PC <- PC + 1 |
| F1 | mem[MAR] | IR[15:8] <- bus |
| F2 | PC | MAR <- bus; PC <- PC + 1 |
| F3 | mem[MAR] | IR[7:0] <- bus |
| EX | depends on the instruction | see below |
| EX2 | only for LDA/STA addr | see below |

| Instruction | EX | EX2 |
|---|---|---|
| AND OR XOR ADDC SUB MUL | bus <- Rf; A <- ALU(A, bus); SR updated | — |
| NEG NOT RLC RRC | bus idle; A <- ALU(A); SR updated | — |
| LDA rf | bus <- Rf; A <- bus | — |
| STA rf | bus <- A; Rf <- bus | — |
| LDI | bus <- IR[7:0]; A <- bus | — |
| LDA addr | bus <- IR[7:0]; MAR <- bus | bus <- mem[MAR]; A <- bus |
| STA addr | bus <- IR[7:0]; MAR <- bus | bus <- A; mem[MAR] <- bus |
| BRx | bus <- R7; PC <- bus if the flag is set | — |
| NOP | nothing | — |
| STOP | go to HALT | — |

Most instructions therefore take **5 clock cycles**. `LDA addr` and
`STA addr` take **6**. A program of n ordinary instructions runs in 5n
cycles. For branches the register select is forced to 7 (`rsel_r7`), so the
register file drives R7 onto the bus whatever `f` holds.

The ALU takes the accumulator as its first operand and the bus as its
second. Its output is the accumulator's only input. Loads (`LDA`, `LDI`)
use a pass operation, and `MUL` passes the multiplier's product through the
ALU. As a result, every value that enters A takes one path, and the flags
of `MUL` are formed like those of the other operations. The ALU also
produces a per-flag write enable, so the status register changes only the
flags the instruction affects.

The controller asserts a rule of the one-bus structure: in any cycle, at
most one of IR-high, IR-low, PC load, register write, memory write and
accumulator load is active.

## Files

| File | Contents |
|---|---|
| `rtl/ar3_pkg.sv` | Sizes, the opcode enum, the `sr_t` flag struct, ALU operations, bus sources, the control word `ctrl_t` |
| `rtl/ar3_top.sv` | The processor: all blocks wired around the bus |
| `rtl/ar3_control.sv` | The controller state machine |
| `rtl/ar3_bus.sv` | The bus, modelled as a multiplexer |
| `rtl/ar3_memory.sv` | 256-byte memory with MAR, a program-load port and an observation port |
| `rtl/ar3_regfile.sv` | R0..R7 |
| `rtl/ar3_acc.sv`, `rtl/ar3_sr.sv`, `rtl/ar3_ir.sv`, `rtl/ar3_pc.sv` | A, SR, IR, PC |
| `rtl/ar3_alu.sv` | ALU and flag logic |
| `rtl/ar3_mult.sv` | 4 x 4 array multiplier |
| `tb/tb_<module>.sv` | One self-checking testbench per module |

## Using the processor

Ports of `ar3_top`:

- `clk`, `rst_n`: clock, and asynchronous reset (active low).
- `prog_we`, `prog_addr`, `prog_data`: byte writes into memory. Hold
  `rst_n` low while loading a program. This port has priority over writes
  from the processor.
- `halted`: goes high once `STOP` has executed. Only reset leaves the halt
  state.
- `insn_done`: high in the last cycle of every instruction.
- `pc`, `acc`, `sr`, `ir`: architectural state.
- `dbg_mem_addr` / `dbg_mem_data` and `dbg_reg_sel` / `dbg_reg_data`:
  combinational read ports into memory and the registers.

After reset the processor starts fetching at address 0. Memory has no reset,
so load every byte the program will read. An instruction is two bytes: the
high byte is `{opcode, f}` and the low byte is the immediate or address. For
example, `LDI 0x7F` is `0x70 0x7F` and `STA r1` is `0x59 0x00`.

Running a testbench with plain Verilator:

```
verilator --binary --timing --assert -y rtl rtl/ar3_pkg.sv tb/tb_ar3_top.sv \
          --top-module tb_ar3_top -o sim
./obj_dir/sim
```

Replace `tb_ar3_top` with any other testbench. Each one ends by printing
`TB_RESULT checks=N failures=M`. Each one also has a watchdog that ends the
run with a failure if the simulation hangs.

## Verification

- **Block testbenches.** These use directed corner cases plus random
  stimulus. The results are compared with models written in the
  testbenches. The multiplier is checked exhaustively. The ALU is checked on
  all operation and corner-value pairs, with both carry values, plus 3000
  random cases. The controller testbench checks the control word of every
  cycle for every opcode, and for each branch with its flag set and clear.
- **Whole processor (`tb_ar3_top`).** The testbench contains an
  instruction-level model of the AR3 and runs it in lock-step with the RTL.
  After every instruction it compares A, SR, PC, IR, the halt state, the
  register the instruction named, and any byte stored to memory. It also
  checks the instruction's length in cycles (5 or 6).
  - A directed program uses all 21 instructions. It takes and skips
    branches, and produces carry, borrow, overflow and zero. It ends with
    `STOP`, and then all of memory and every register is compared.
  - A counted loop multiplies 13 by 11 through repeated addition. The
    testbench checks the product (143) and the run time: 169 instructions
    take exactly 845 cycles.
  - Eight random programs then run for up to 400 instructions each.
  - The testbench fails if any instruction, a taken or untaken branch, a
    halt, a direct memory access, or a carry, overflow or zero flag never
    occurred.
  - The processor has no parameters, so this is also the full-size test.

Both kinds of testbench were also run against deliberately broken copies of
each module. Every testbench caught its fault.

The flag and carry conventions of the reference models follow the
instruction table above. That table is this design's reading of the
specification (next section). The tests show that the RTL matches the table;
they cannot show that the table matches every reader's reading of the
original specification.

## Where the design goes beyond, or reads, its specification

The processor was specified as a table of features, registers, instruction
formats and instructions. Several points were left open or were
inconsistent; this is how the RTL settles them:

- **NEG and NOT.** The specification gives both the same operation,
  `A <- not(A)`, but describes NEG as "two's complement" and NOT as
  "negate". The RTL follows the mnemonics: NEG is the two's complement and
  NOT the bitwise complement.
- **Undefined opcodes.** The 21 instructions leave 11 of the 32 opcodes
  unused. Their behaviour is not specified; here they execute as NOP.
- **Register indirect addressing.** The specification describes this mode
  (register f points to memory), but no defined instruction uses it.
  `LDA rf` and `STA rf` are register-to-accumulator transfers, as their
  descriptions say. The mode is therefore not implemented.
- **Flags.** Which instruction affects which flag is not specified. The
  choice made here is in the instruction table above. It includes C as a
  borrow after SUB and NEG, and loads, stores and branches leaving the flags
  unchanged.
- **MUL.** Operands are the low four bits of A and Rf, taken as unsigned.
  The product (at most 225) always fits in 8 bits.
- **Controller timing.** The cycle sequence, the MAR, the 5 and 6 cycle
  instruction lengths, and the halt state are this design's own. So are the
  bus source set and the control word encoding.
- **Reset and program loading.** Reset clears all registers and the flags
  and starts at address 0. The program-load port and the observation ports
  are additions, so that a program can be loaded and results inspected.
- **I/O pins.** The processor is said to have two external I/O pins. No
  instruction uses them, and their behaviour is not given, so they are not
  modelled.
- **Bus.** The single bus is a multiplexer rather than tri-state drivers.
  An undriven bus reads 0.

## Lint notes

Verilator reports three kinds of warning, all expected:

- Unused package constants, when a module is linted on its own.
- The unused upper operand bits of the multiplier.
- `rst_n` used both as an asynchronous reset and in the assertion's
  `disable iff` clause.
