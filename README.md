# RISC AR2 — an 8-bit accumulator processor with a two-bus datapath

The RISC AR2 is a small teaching processor: an 8-bit accumulator machine with
16-bit instructions, a 256-byte memory shared by program and data, eight
general purpose registers, a 4-bit status register and a 4 × 4-bit hardware
multiplier. Its instruction set has 20 instructions: 5 arithmetic, 3 logical,
5 data transfer, 6 control flow (branches and NOP) and 1 machine control
(STOP). The interesting part, and most of the logic, is the **control unit**:
a small state machine that turns each instruction into a sequence of
register-transfer steps on the datapath.

This repository gives synthesizable SystemVerilog for the whole processor,
a self-checking testbench for every block and an end-to-end testbench that
runs the processor in lock-step with an instruction-set model.

## Programmer's model

| State | Width | Notes |
|---|---|---|
| A (accumulator) | 8 | implicit operand and destination of every ALU instruction |
| R0 … R7 | 8 each | general purpose; R7 also holds branch targets |
| PC | 8 | byte address of the next instruction |
| IR | 16 | current instruction |
| SR | 4 | flags **Z C N O** (zero, carry, negative, overflow), Z is the MSB |
| memory | 256 × 8 | program and data |

Instructions are two bytes, stored **big endian**: the byte at the lower
address is IR[15:8]. Fields:

```
 15      11 10   8 7             0
+----------+------+---------------+
|  opcode  | Regf | imm / address |
+----------+------+---------------+
```

Regf selects the register f of the register instructions; bits 7..0 are the
immediate of LDI or the direct address of LDA/STA addr. Unused fields are
don't-care.

## Instruction set

| Opcode | Mnemonic | Operation | Flags written |
|---|---|---|---|
| 00000 | AND rf  | A ← A and rf | Z N |
| 00001 | OR rf   | A ← A or rf | Z N |
| 00010 | XOR rf  | A ← A xor rf | Z N |
| 00011 | ADDC rf | A ← A + rf + C | Z C N O |
| 00100 | MUL rf  | A ← A[3:0] × rf[3:0] (unsigned, 8-bit product) | Z C N O (C = O = 0) |
| 00101 | DIV rf  | A ← {0000, A[3:0] ÷ rf[3:0]} | Z C N O (C = 0, O = divide by zero) |
| 00110 | NEG     | A ← 0 − A (two's complement) | Z C N O |
| 00111 | RLC     | A ← A[6:0] & C, C ← A[7] | Z C N |
| 01000 | RRC     | A ← C & A[7:1], C ← A[0] | Z C N |
| 01001 | DEC     | A ← A − 1 | Z C N O |
| 01010 | LDA rf  | A ← rf | Z N |
| 01011 | STA rf  | rf ← A | — |
| 01100 | LDA addr | A ← mem[addr] | Z N |
| 01101 | STA addr | mem[addr] ← A | — |
| 01110 | LDI imm | A ← imm | Z N |
| 10000 | BRZ | if Z: PC ← R7 | — |
| 10001 | BRC | if C: PC ← R7 | — |
| 10010 | BRN | if N: PC ← R7 | — |
| 10011 | BRO | if O: PC ← R7 | — |
| 11000 | NOP | — | — |
| 11111 | STOP | halt until reset | — |

The opcodes and the operations come from the processor's specification.
The specification does not say which flags an instruction changes, how
carry and overflow are defined for NEG and DEC, or what DIV does with a
zero divisor; the choices in the table are this design's:

* Z = (result = 0), N = result bit 7, for every instruction that writes A.
* ADDC: C is the carry out, O the two's-complement overflow.
* DEC: C is the borrow (A was 0); O is set when A was 0x80.
* NEG: C is set when A was non-zero (borrow of 0 − A); O is set when A was 0x80.
* DIV: a zero divisor gives quotient 1111 (what a restoring divider yields) and sets O.
* Opcodes not in the table (01111, 10100–10111, 11001–11110) behave as NOP.

The specification's table describes NEG both as "not(A)" and as "two's
complement"; this design implements two's complement, as the mnemonic
suggests. It also defines a register-indirect addressing mode, but no
instruction of the table uses it, so it is not implemented; "LDA rf" and
"STA rf" move data between A and the register itself.

## Datapath: two buses

```
            +--------- source bus (bus 1) ---------+
 R[f] / R7 -+                                      +--> ALU operand b --+
 mem data  -+   (src_sel)                          +--> multiplier b    |
 IR[7:0]   -+                                      +--> PC load (R7)    |
                                                                        v
 A ------------------------------------------> ALU operand a / mult a
                                                                        |
            +--------- result bus (bus 2) ---------+ <-- ALU y / mult p-+
            |   (res_sel)
            v
            A  --> R[f] write data, memory write data

 memory address = PC (fetch) | IR[7:0] (LDA/STA addr)
 Z, N from the result bus; C, O from the ALU (0 for MUL)
```

The source bus selects the second operand: a register (R7 for the
branches), the memory data or the immediate byte. The ALU combines it with A;
loads use an ALU pass-through operation, so every write to A goes through
the result bus. Stores take their data from A.

## Control unit and timing

Every instruction takes three clock cycles:

| Cycle | State | Transfers |
|---|---|---|
| 1 | FETCH_HI | IR[15:8] ← mem[PC], PC ← PC + 1 |
| 2 | FETCH_LO | IR[7:0] ← mem[PC], PC ← PC + 1 |
| 3 | EXEC | the instruction's own transfers (table above); `retire` = 1 |

STOP moves the controller to HALT, where no control line is active, until
reset. All registers, including the controller state, change on the rising
clock edge; reset is synchronous and active high and clears PC, IR, A, SR
and R0–R7. Memory reads are combinational, so an LDA addr reads and loads A
within its EXEC cycle.

During EXEC, PC already points past the instruction, so a branch not taken
simply continues; a taken branch overwrites PC with R7. Branch targets are
byte addresses; an odd target is allowed and fetches the instruction
starting at that byte.

Timing of one `LDA addr` (`0x6050`, read address 0x50) followed by the next fetch:

```
clk        _/‾\_/‾\_/‾\_/‾\_
state       HI  LO  EX  HI
mem addr    PC  PC+1 50 PC+2
ir_ld_hi    1   0   0   1
ir_ld_lo    0   1   0   0
pc_inc      1   1   0   1
acc_ld      0   0   1   0
retire      0   0   1   0
```

The control word is the `ctrl_t` struct of `risc_ar2_pkg`; it lists every
control line of the datapath.

## Top-level interface (`risc_ar2`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| clk | in | 1 | clock |
| rst | in | 1 | synchronous reset; while high, the load port owns the memory |
| load_we, load_addr, load_data | in | 1, 8, 8 | write a byte into memory while `rst` is high |
| load_rdata | out | 8 | memory contents at `load_addr` (combinational) while `rst` is high |
| halted | out | 1 | STOP was executed |
| retire | out | 1 | last (EXEC) cycle of an instruction |
| state | out | 2 | controller state |
| pc, ir, acc, flags | out | 8, 16, 8, 4 | processor state, for observation |

To run a program: hold `rst` high, write the program bytes through the load
port, then release `rst`. Execution starts at address 0 with the clock edge
that follows. The processor also has two external I/O pins in its feature
list, but nothing defines how software reaches them, so they are not part of
this RTL.

## Blocks

| Module | Contents |
|---|---|
| `risc_ar2_pkg` | opcodes, flag struct, ALU operations, bus selects, controller states, control word |
| `ar2_control` | three-cycle fetch/execute state machine and instruction decoder |
| `ar2_alu` | AND/OR/XOR, add with carry, 4-bit restoring divider, negate, rotates, decrement, pass |
| `ar2_mult` | 4 × 4 shift-and-add multiplier |
| `ar2_regfile` | R0–R7, one combinational read port, one write port |
| `ar2_memory` | 256 × 8, combinational read, synchronous write |
| `ar2_pc`, `ar2_ir`, `ar2_acc`, `ar2_sr` | PC (increment/load), IR (byte-wise load), A, SR (per-flag write enable) |
| `risc_ar2` | top level: the two buses and all of the above |

All widths are parameters with the specification's values as defaults
(8-bit data, 8-bit addresses, 16-bit IR, 8 registers, 4-bit multiplier).
The instruction encoding itself is fixed at these sizes.

## Verification

Each block has a self-checking testbench in `tb/` (`<module>_tb.sv`) that
compares it with values computed independently in the testbench: all 256
multiplier operand pairs, random and corner-case operands for every ALU
operation, shadow models for the register file and memory, and, for the
control unit, the control word of every opcode under every flag combination.

`risc_ar2_tb` runs the full processor at its default size. A hand-written
program of 58 instructions uses all 20 instructions, branches taken and not
taken on each flag, carries, overflows and a division by zero, and its final
state is checked against hand-computed values; then 200 random programs
(random opcodes including unused ones, random branch targets, stores that
overwrite the program, PC wrap-around) run for up to 400 instructions each.
After every instruction PC, IR, A, the flags, all registers and the halt
state are compared with an instruction-set model in the testbench, the
memory is compared at the end of each program, and every instruction must
take exactly three cycles. The test also counts each mechanism (every
opcode, taken and not-taken branch, carry, overflow, divide by zero, store,
halt, wrap-around) and fails if one never happened.

Simulate with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -y rtl -Irtl rtl/risc_ar2_pkg.sv \
          tb/risc_ar2_tb.sv --top-module risc_ar2_tb
./obj_dir/Vrisc_ar2_tb
```

Replace `risc_ar2_tb` by any other testbench name to test one block. Each
testbench prints `TB_RESULT checks=N failures=M` and finishes.

## Limits

* The flag behaviour, DIV result placement, divide-by-zero result and the
  three-cycle timing are this design's choices (see above); software written
  for another implementation of the same instruction set may rely on
  different ones.
* The register-indirect addressing mode and the two I/O pins are not
  implemented, as no instruction uses them.
* The memory has a combinational read port; for an FPGA block RAM or an SRAM
  macro with registered output, the controller needs an extra cycle per
  memory access.
