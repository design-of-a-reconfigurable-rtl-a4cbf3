# Reconfigurable floating-point unit

An IEEE 754 single-precision unit that is built mostly from the
adders and multipliers of a reconfigurable integer array. A plain FPU sits
idle while a program does integer work. Here the significand comparison,
the 27-bit significand add, the 24 × 24-bit significand multiply and the
rounding increment all run on an array of sixteen small multiply-add cells.
The same array, configured differently, does SIMD integer work on 256-bit
operands:

| operation                     | lanes | cells per lane | latency (cycles) |
|-------------------------------|-------|----------------|------------------|
| 8-bit add / sub               | 32    | ½              | 1                |
| 16-bit add / sub              | 16    | 1              | 1                |
| 32-bit add / sub              | 8     | 2              | 2                |
| 64-bit add / sub              | 4     | 4              | 4                |
| 8-bit mul / MAC (u/s)         | 16    | 1              | 2                |
| 16-bit mul (u/s)              | 4     | 4              | 5                |
| 24-bit mul (u/s)              | 1     | 9              | 8                |
| 32-bit mul (u/s)              | 1     | 16             | 10               |
| FP single add / sub           | 1     | 6              | 10               |
| FP single mul                 | 1     | 11             | 12               |

Every configuration is fully pipelined and takes a new operation every
clock cycle.

## Instruction word

`inst[5:0]` selects the operation:

| bits | meaning |
|------|---------|
| 5:4  | `00` integer, `01` FP add, `10` FP subtract, `11` FP multiply |
| 3    | integer: `0` adder, `1` multiplier |
| 2    | adder: `0` add, `1` subtract; multiplier: `0` unsigned, `1` signed |
| 1:0  | adder: `00` 8, `01` 16, `10` 32, `11` 64 bit; multiplier: `00` 8 (MUL/MAC), `01` 16, `10` 24, `11` 32 bit |

Operand and result packing on the 256-bit `a`, `b` and `o`:

* Adders: lane *n* of width *w* is `a[w*n +: w]`, `b[w*n +: w]` and `o[w*n +: w]`.
* 8-bit MUL/MAC: lane *r* (0..15) computes
  `o[16r+:16] = a[8r+:8] * b[8r+:8] + {b[128+8r+:8], a[128+8r+:8]}`, modulo 2^16.
  The upper halves of `a` and `b` carry the 16-bit accumulator. Zeroing them
  gives a plain multiply, because MUL and MAC share one encoding. For a running
  MAC, feed the previous `o` lane back into those bytes.
* 16-bit multiply: lane *g* (0..3) has `a[16g+:16] * b[16g+:16]` in `o[32g+:32]`.
* 24-bit multiply: `a[23:0] * b[23:0]` is in `o[47:0]`.
* 32-bit multiply: `a[31:0] * b[31:0]` is in `o[63:0]`.
* FP: the operands are `a[31:0]` and `b[31:0]`. The result is in `o[31:0]`
  and the rest of `o` is zero.

## The rAMM cell

Each cell (`ramm_cell`) is built around an 8-bit *additive multiply module*
(`amm8`). That module computes `A*B + C + W`, with A, B and C 8 bits and W 16
bits. AND gates form the eight partial products. A chain of 3:2 carry-save
adders reduces them, together with C and W, to a sum word and a carry word.
Because `255*255 + 255 + 255 = 65535`, two 8-bit addends always fit, and this
is what lets cells be tiled into larger multipliers without losing carries.

The cell's 16-bit fast adder (`rfa16`) plays two roles:

* **Multiply-add, 2 cycles.** Stage 1 reduces the operands to carry-save form
  and registers the result. Stage 2 uses the fast adder to convert it to
  binary.
* **Adder, 1 cycle.** The fast adder adds A and B directly, either as one
  16-bit adder or as two independent 8-bit adders. For subtraction B is
  inverted and the carry-in is 1. In a chain, the carry-in comes from the
  registered carry-out of the cell below.

In front of the cell sits an operand delay line of 0 to 6 cycles. The cell's
function decoder (`fun_decoder`) chooses the depth from the configuration, so
each cell starts exactly when its inputs from other cells are ready. This is
how one set of cells gives each function a different pipeline depth.

## Multipliers without horizontal carries

This is the least obvious part of the design. A k-digit multiply (k = 2, 3, 4
bytes) uses a k × k grid of cells. Cell (i, j) multiplies multiplicand byte
*i* by multiplier byte *j*. In a textbook array of such modules, the high byte
of each cell feeds its left neighbour in the same row. That ripples through
the row and cannot be pipelined cell by cell. Here no signal runs sideways
inside a row:

```
cell(i, j) = a_i * b_j + C + W
    C = low  byte of cell(i+1, j-1)      (0 when i+1 = k or j = 0)
    W = high byte of cell(i,   j-1)      (0 when j = 0)
```

After row j, the low byte of cell (0, j) is final: it is product byte *j*. The
other bytes of the row hold the running partial product shifted down by
8 bits, in carry-save form. Each row takes 2 cycles. Row j's operands are
therefore delayed 2j cycles and its inputs come only from row j-1. After the
last row, the upper half of the product is still split into two words:

```
S  = sum over i >= 1 of lo(i, k-1) << 8(i-1)
Cw = sum over i      of hi(i, k-1) << 8i
```

The *additive module* (`additive_module`) adds S and Cw. For a signed
multiply it also subtracts B when A < 0 and A when B < 0, which turns the
unsigned upper half into the signed one (the lower half is the same either
way). The final add takes 1 cycle for a 16-bit upper half and 2 cycles for a
24- or 32-bit one, one 16-bit half per cycle. This gives the latencies
2k + 1 = 5 and 2k + 2 = 8 and 10.

The product's low bytes are ready at cycles 2, 4, 6, ... and the upper half
comes last. The *output switch* (`output_switch`) gives every cell's result a
delay line and taps it so that all parts reach `o` together. Chained adders
use the same mechanism: the low 16-bit slice of a 64-bit add is delayed
3 cycles, the next one 2, and so on.

Cell groups: 16-bit multiplies use cells 4g..4g+3 for lane g. The 24-bit
multiply uses cells 0..8. The 32-bit multiply uses all 16 cells. Additive
module g serves lane g, and module 0 also serves the 24- and 32-bit
multiplies.

## Floating-point pipelines

The FP blocks (`fp_*`) are mostly combinational. The top level (`rfpu`)
places them between pipeline registers and sends the wide arithmetic to the
array. Edges are counted from the edge that takes the operation (edge 1).

**Add / subtract, 10 cycles.**

| edges | work |
|-------|------|
| 1 | `fp_unpack` splits the operands and inverts B's sign for subtract. |
| 2 | `fp_exponent` computes the exponent difference. |
| 3–4 | Cells 10/11 compute `ma - mb`. Its carry decides which operand is larger when the exponents are equal. |
| 5 | `fp_pre_module` swaps the operands if needed and aligns the smaller one into 27 bits: significand, guard, round and sticky. |
| 6–7 | Cells 12/13 add or subtract. The larger operand comes first, so the result is never negative. |
| 8 | `fp_addmul` puts the result into a common 48-bit format. `fp_post_shift` (leading-zero count and barrel shift) normalizes it. |
| 9–10 | Cells 14/15 add the round-to-nearest-even increment. `fp_round_shift` renormalizes if the addition carried out. `fp_exp_adj` and `fp_pack` then form the result combinationally. |

**Multiply, 12 cycles.**

| edges | work |
|-------|------|
| 1 | Unpack. |
| 2–9 | Cells 0..8 form the 48-bit significand product. The exponent sum and the sign are computed alongside. |
| 10 | Normalize. |
| 11–12 | Round on cells 14/15, then adjust the exponent and pack. |

Special values follow IEEE 754 under round-to-nearest-even, with two
simplifications:

* Denormal operands count as zero, and results below the normal range become
  a signed zero (flush to zero).
* Every NaN result is the quiet NaN `7FC00000`.

Invalid operations (∞ − ∞, ∞ × 0) give that NaN. Overflow gives ±∞. An exact
cancellation gives +0, and (−0) + (−0) gives −0.

## Issue rules

`rfpu` uses a valid/ready handshake. An operation is taken on a rising edge
where `in_valid` and `in_ready` are both high. Its result appears with
`out_valid` after the latency in the table above.

Cells are wired differently in each configuration, so the array holds only
one configuration at a time. FP add and FP subtract share one configuration.
An operation of the current configuration is taken at once. An operation of
another configuration waits, with `in_ready` low, until every earlier result
has left the unit: at most 12 cycles. An assertion in `rfpu` checks this rule.
A program that alternates FP and integer work therefore pays for the drain on
every switch. Grouping operations of one kind avoids this.

## How far it follows the source design

The following come from the published design:

* The block list: unpack, sign, addSub_exponent, pre_module, addMul,
  post_shift, round_shift, exp_adj, pack, and the rAMM array.
* The instruction-word fields.
* The 256-bit ports.
* The operation set, lane counts and every latency in the table.
* The use of array adders and multipliers inside the FP datapath.
* Round-to-nearest-even.
* The cell structure: multiple forming, carry-save tree, fast adder that
  splits into 16 or 2 × 8 bits, and a function decoder per cell.
* Additive modules that remove horizontal carry propagation.

The following are this design's own, because the source does not specify
them:

* The cell numbering and the row-to-row wiring of the multiplier grid.
* The way signed multiplies are corrected: correction rows in the 8-bit
  module, subtraction in the additive module.
* Where the 8-bit MAC addend comes from.
* Which cells serve the FP datapath.
* The split of the 10- and 12-cycle FP pipelines into stages.
* The handshake, the drain-before-reconfigure rule and the reset (asynchronous,
  active low, all registers to zero).
* Flush-to-zero and the single default NaN.

The source also describes a 4-cell 16-bit multiply as a "multiply-adder". Only
the 8-bit cells take an external addend here, so the 16-bit multiply has none.
The published timing and area figures (309 MHz in a 0.18 µm process, and an
FPGA mapping) describe the original netlist. This RTL has not been mapped to
either target.

## Files and simulation

`rtl/` holds one module or package per file:

| file | role |
|------|------|
| `rfpu_pkg.sv` | instruction word, configuration enum, latencies, shared records |
| `rfpu.sv` | top level: issue control and FP pipeline registers |
| `fp_unpack.sv`, `fp_sign.sv`, `fp_exponent.sv`, `fp_pre_module.sv`, `fp_addmul.sv`, `fp_post_shift.sv`, `fp_round_shift.sv`, `fp_exp_adj.sv`, `fp_pack.sv` | FP blocks |
| `ramm_array.sv` | the 16-cell array |
| `data_input.sv`, `ramm_network.sv`, `additive_module.sv`, `output_switch.sv` | array plumbing |
| `ramm_cell.sv`, `fun_decoder.sv`, `amm8.sv`, `rfa16.sv` | one cell |

`tb/` holds one self-checking testbench per module, named `tb_<module>.sv`.
Each testbench prints `TB_RESULT checks=N failures=M`. Run one with:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rfpu_pkg.sv tb/tb_rfpu.sv --top-module tb_rfpu
./obj_dir/Vtb_rfpu
```

`tb_rfpu` drives the full-size unit end to end:

* every integer configuration, signed and unsigned;
* more than 1,200 FP operations, with cancellations, rounding carries,
  overflow, underflow, zeros, denormals, infinities and NaNs;
* forced configuration switches.

It checks every result bit for bit, and checks that it arrives in the stated
cycle. Integer results are compared with plain SystemVerilog arithmetic. FP
results are compared with double-precision arithmetic rounded to single
precision. That is exact for single-precision +, − and ×, since double has
more than 2 × 24 + 2 significand bits. `tb_ramm_array` does the same for the
array alone.

`tb_rfpu_mac` runs a small multiply-accumulate workload. Sixteen 8-bit lanes
each build a 24-term dot product, unsigned and then signed. Each step's
accumulator is the unit's previous output, fed back through the upper halves
of `a` and `b`.
