# Multiplexer-based ALU with 2-bit look-up-table arithmetic

A conventional ALU routes its operands into a datapath for the one operation
the instruction asks for. This ALU turns that around. Every operation it
supports is worked out at the same time on the same operand pair. The results
sit side by side in an array of intermediate results, one entry per
operation code. A result multiplexer then hands out the entry the operation
code names. Changing the operation changes only a multiplexer select. The
arithmetic is built from small look-up tables (LUTs) on 2-bit digits, joined
by 2:1 multiplexers, rather than from gate-level adders and multipliers.

The design is the ALU of the execute stage of a RISC-V style pipeline. Only
the ALU and its operand multiplexers are given here. The instruction decoder,
register file and the rest of the pipeline are not part of this RTL.

Everything is combinational. There is no clock, no reset and no state. Each
output settles in the same cycle as its inputs, so the latency is zero
cycles.

## The two ALUs

`mux_alu_top` holds two independent units, each with its own ports.

### The 16-operation execution unit

```
 operands[0..NUM_SRC-1] ──┬──► MUX A (sel_a) ──► a ─┐
                          └──► MUX B (sel_b) ──► b ─┤
                                                    ▼
                         ┌──────── mux_alu ─────────────────────┐
                         │ results[0]  = a + b   (LUT chain)    │
                         │ results[1]  = a - b   (LUT chain)    │
                         │ results[2]  = a * b   (2x2 LUTs)     │
                         │   ...                                │
                         │ results[15] = (a == b)               │
                         │ MUX OUT: y = results[alu_op]         │──► result, zero, carry
                         └──────────────────────────────────────┘
```

MUX A and MUX B each pick one of `NUM_SRC` eligible operand words. Both may
pick the same word. `alu_op` selects the result:

| code | result        | code | result              |
|------|---------------|------|---------------------|
| 0000 | A + B         | 1000 | A AND B             |
| 0001 | A − B         | 1001 | A OR B              |
| 0010 | A × B (low half) | 1010 | A XOR B          |
| 0011 | A / B (unsigned) | 1011 | A NOR B          |
| 0100 | A << B        | 1100 | A NAND B            |
| 0101 | A >> B (logical) | 1101 | A XNOR B         |
| 0110 | A rotated left by 1 | 1110 | A > B (unsigned), 1 or 0 |
| 0111 | A rotated right by 1 | 1111 | A = B, 1 or 0     |

The codes are `alu_pkg::alu_op_e`. The table of operations and their codes
comes from the original design. How the following cases behave is this
design's own choice, since the original does not say:

- Shifts use the low log2(WIDTH) bits of B as the shift amount, as RISC-V
  `SLL`/`SRL` do.
- Division by zero returns all ones, as RISC-V `DIVU` does.
- Multiplication returns the low WIDTH bits of the product.
- Comparisons are unsigned.

There are two flags. `zero` is 1 when the selected result is 0. `carry` is
the carry out of A + B when `alu_op` is 0000, and the borrow of A − B
(A < B) when `alu_op` is 0001. In every other case it is 0. The original
design only says that the ALU has condition flags, so this choice of flags
is also this design's own.

The selects `sel_a`, `sel_b` and `alu_op` are ports. In a processor they
would come from the execute stage's control logic, which decodes the current
instruction. That control logic is left out because its instruction-to-
operation mapping is not defined. Several of the operations above, such as
rotate-by-one and NAND, have no RISC-V base-ISA encoding.

### The four-operation ALU

`mux4_lut_alu` is the smallest form of the same idea. Operands `op1` and
`op2` go to four units in parallel, which produce `andsig`, `orsig`, `sumsig`
and `xorsig`. These feed inputs i0..i3 of a 4:1 multiplexer, so `operation`
0 gives AND, 1 gives OR, 2 gives SUM and 3 gives XOR. For example, with
op1 = 0x0010 and op2 = 0x0008, the four entries are 0x0000, 0x0018, 0x0018
and 0x0018. The sum discards its carry out.

## How the LUT arithmetic works

This is the least obvious part of the design.

**The 2-bit cell (`lut2_cell`).** Each cell reads three small tables,
indexed by the 4-bit address {a, b} of two 2-bit digits:

- **Sum table.** Each entry is 3 bits: {carry, (a + b + cin) mod 4}. There
  is one table for cin = 0 and one for cin = 1. A 2:1 multiplexer driven by
  cin picks between them. The carry input therefore only steers a mux and
  never enters an adder.
- **Difference table.** It has the same layout: {borrow, (a − b − bin) mod
  4}, with one table per value of bin and a 2:1 multiplexer on bin.
- **Product table.** Each entry is the 4-bit product a × b. For example,
  3 × 3 = 1001.

Constant functions fill the tables at elaboration. The formulas are the three
expressions above, so no data file is needed.

**Words (`lut_addsub`).** A WIDTH-bit add or subtract is a ripple of WIDTH/2
cells. The carry (or borrow) out of digit i is the carry/borrow select of
digit i+1. The input `sub` chooses whether the chain uses the sum tables or
the difference tables. Subtraction reads the difference tables directly. It
does not form A + ~B + 1. The carry into digit 0 is 0. `carry` is the carry
(or borrow) out of the top digit.

**Products (`lut_multiplier`).** Every pair of digits (a digit i, b digit j)
gets its own cell. The cell's product-table output has weight 4^(i+j). The
(WIDTH/2)² partial products are shifted into place and added. The sum is
written as a plain `+`, which synthesis turns into an adder tree. The way the
partial products are combined is this design's own choice.

The remaining operations are written as plain expressions: the logic
operations, shifts, rotates, compares and divide. On an FPGA, synthesis maps
these into LUTs anyway. The divider in particular is a behavioural `/`.

## Files

| file | contents |
|------|----------|
| `rtl/alu_pkg.sv` | operation-code enums `alu_op_e` (4 bits) and `mux4_op_e` (2 bits) |
| `rtl/lut2_cell.sv` | 2-bit sum/difference/product LUT cell with carry and borrow muxes |
| `rtl/lut_addsub.sv` | WIDTH-bit adder/subtractor from a chain of cells |
| `rtl/lut_multiplier.sv` | WIDTH×WIDTH → 2·WIDTH multiplier from 2×2 LUT products |
| `rtl/word_mux.sv` | N:1 word multiplexer; used for MUX A, MUX B and the result muxes |
| `rtl/mux_alu.sv` | 16-operation ALU: intermediate-result array + 16:1 MUX OUT, flags |
| `rtl/mux4_lut_alu.sv` | four-operation ALU (AND, OR, SUM, XOR into a 4:1 mux) |
| `rtl/mux_alu_top.sv` | top: operand muxes + `mux_alu`, with `mux4_lut_alu` beside it |
| `tb/alu_ref_pkg.sv` | integer reference model of the 16 operations, widths up to 32 |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_mux_alu_rv32` |

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `WIDTH` | 16 | all arithmetic modules and the top | operand width. Must be even, because operands are cut into 2-bit digits. 16 is the width of the original design's simulation. A RISC-V RV32I datapath would set it to 32, which `tb_mux_alu_rv32` exercises. |
| `NUM_SRC` | 4 | `mux_alu_top` | number of eligible operands offered to MUX A and MUX B (this design's choice) |
| `N` | 4 | `word_mux` | number of inputs. A select value of N or more outputs zero. |

## Simulating

Each testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<m>`. For example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_mux_alu_top rtl/alu_pkg.sv tb/alu_ref_pkg.sv tb/tb_mux_alu_top.sv
./obj_dir/Vtb_mux_alu_top
```

To run another testbench, replace `tb_mux_alu_top` with its name.

| testbench | what it checks |
|-----------|----------------|
| `tb_lut2_cell` | all 64 input combinations of the cell, plus some known table entries |
| `tb_lut_addsub` | corner and 2000 random operand pairs, in both modes |
| `tb_lut_multiplier` | corner and 2000 random pairs against a 64-bit product |
| `tb_word_mux` | N = 5, so that the out-of-range selects 5..7 are also tried |
| `tb_mux_alu` | every operation on corner operand pairs and on 300 random pairs each |
| `tb_mux4_lut_alu` | the 0x0010 / 0x0008 example above, plus 500 random pairs per operation |
| `tb_mux_alu_top` | 20,000 random steps through both ALUs at the default parameters (see below) |
| `tb_mux_alu_rv32` | the top at WIDTH = 32 |

`tb_mux_alu_top` runs the top at its default parameters. It counts each
mechanism and fails if any of them never happens:

- every operation code of both ALUs
- every operand source on MUX A and on MUX B
- both muxes selecting the same operand
- a carry out of A + B
- a borrow out of A − B
- a zero result
- a divide by zero

Each testbench finishes in well under a second.

## Departures and limits

- **Storage of intermediate results.** In the original description the
  intermediate results are held in "registers". Its synthesis report shows
  no flip-flops, so here the result array is combinational. Making it
  clocked would add a cycle of latency that the original does not show.
- **Operand width.** The original names RISC-V, whose RV32I base ISA is
  32-bit, but its own simulation uses 16-bit operands. The default follows
  the simulation.
- **Eight-entry variant.** The original's simulation also shows an ALU whose
  lookup array has 8 entries and a 3-bit selector. Only its first four
  entries can be identified: AND, OR, SUM and XOR, which is `mux4_lut_alu`.
  The other four are shown only as values for one operand pair. That does
  not fix their operations, and they do not match the 16-operation table,
  so this variant is not built.
- **Signed arithmetic.** Only unsigned operations are provided. There are
  no signed compare, arithmetic shift right or signed divide.
- **Power and area.** The original reports FPGA LUT counts (49 for its ALU
  against 111 for a conventional one) and a power saving of about 8 %.
  These results are not reproduced here, and this RTL makes no claim about
  them.
