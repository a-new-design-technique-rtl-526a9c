# 8x8 column-compression multipliers with even stage loading

A column-compression multiplier reduces the partial-product matrix of an
n x n multiplication to two rows with full and half adders, then adds those
two rows with a fast carry-propagate adder. The classic Dadda arrangement
uses the minimum number of adder cells. But it loads the stages unevenly
(for n = 8, 12, 10, 14 and 6 cells from the bottom stage up). It also needs
wires that skip stages. Laid out as a grid of equal cells, it fills only
42/56 = 75% of the grid, and its wires are long and irregular.

The designs here keep the minimum cell count and the minimum stage count.
They move cells between stages to balance the rows, within the limits that
keep every column's arithmetic correct:

* **Approach I** keeps the final adder at its full length, 2n-2 = 14 bits. It
  moves cells between stages to balance the rows and to keep wires short.
* **Approach II** also lets every compression stage finish one low-order
  product bit. This shortens the final adder by up to K bits (K = number of
  stages) in exchange for K extra cells.

Both approaches are applied to unsigned and to two's complement operands.
The library contains the five resulting 8x8 arrays as gate-level netlists of
full-adder and half-adder cells, plus a top that runs them side by side.

## Column arithmetic in brief

For n = 8, column j of the matrix holds `p(j) = j+1` bits for j <= 7 and
`15-j` bits above that. An adder placed in column j takes bits of weight 2^j.
It returns a sum of weight 2^j and a carry of weight 2^(j+1). A full adder
lowers its column by two bits and a half adder by one; both add one bit to
the next column up.

Counting, column by column, how many cells bring each column down to the two
bits the final adder accepts gives `q(j) = j-1` cells in column j for
2 <= j <= 7, and `q(15-j) = j-1` for the matching columns at the top. That is
(n-1)(n-2) = 42 cells in all, n-1 = 7 of them half adders. A column may hold
at most 2, 3, 4, 6, 9, ... bits at the input of successive stages. An 8-high
column therefore needs K = 4 stages.

Stages are numbered from the bottom. Stage 1 feeds the fast adder; stage 4
sees only partial products. A cell in stage k may only consume bits that
stages above it have produced, or partial products. How many cells a column
can take in stage k is limited by the slots the stages below leave open. That
limit is what sets how evenly the 42 cells can be spread.

## The five arrays

| module | operands | cells per stage (1..4) | grid use | final adder | cross-stage wires |
|---|---|---|---|---|---|
| `ccm8_area` | unsigned | 11, 11, 11, 9 | 42/44 = 95.5% | 14 bit, cols 1..14 | 3 |
| `ccm8_short_wire` | unsigned | 12, 11, 10, 9 | 42/48 = 87.5% | 14 bit, cols 1..14 | 0 |
| `ccm8_approach2` | unsigned | 10, 12, 12, 12 | 46/48 = 95.8% | 10 bit, cols 5..14 | 0 |
| `ccm8_tc_approach1` | two's complement | 12, 11, 10, 10 | 43/48 = 89.6% | 15 bit, cols 1..15 | 0 |
| `ccm8_tc_approach2` | two's complement | 11, 11, 12, 12 | 46/48 = 95.8% | 12 bit, cols 4..15 | 0 |

"Grid use" is the cell count divided by (stages x widest stage). It measures
how much of a rectangular cell array is filled. A cross-stage wire carries a
bit past at least one stage without entering a cell there.

* **`ccm8_area`** packs 11 cells into each of the three lower stages. That is
  the densest arrangement possible for n = 8. In return, three bits skip a
  stage: two stage-3 sums go straight to stage 1, and the stage-2 weight-2
  sum goes straight to the fast adder.
* **`ccm8_short_wire`** gives up some density for locality. Every cell's
  inputs come from partial products or from the stage directly above it.
* **`ccm8_approach2`** lets each stage complete one low product bit. The
  weight-1 half adder of stage 4 gives P1, and stages 3, 2 and 1 give P2, P3
  and P4. The final adder is therefore 10 bits long instead of 14, and the
  array grows by four cells.
* **`ccm8_tc_approach1`** and **`ccm8_tc_approach2`** are the two's
  complement versions of the short-wire array and of the Approach II idea.
  `ccm8_tc_approach2` has stages finish P1, P2 and P3, so it needs a 12-bit
  adder instead of 15.

P0 is always `a0 b0`. In the unsigned arrays the carry-out of the fast adder
is P15.

### Two's complement without sign extension

Take a two's complement operand a = -a7·2^7 + Σ a_i 2^i, and the same for b.
The negative products -a7·b_j can be rewritten as a7·~b_j - a7. The
two's complement arrays therefore use:

* `a7 & ~b_j` and `~a_i & b7` for the sign row and sign column (i, j < 7);
* two extra bits, a7 and b7, in column 7;
* `a7 | b7` in column 14 and again in column 15, in place of `a7 b7`.
  Modulo 2^16, `a7·b7 - a7 - b7` at weight 2^14 equals `-(a7|b7)·2^14`, and
  that equals `(a7|b7)·(2^15 + 2^14)`.

Column 7 is now one bit taller, so the array needs exactly one more cell,
placed in column 7. In the short-wire layout the stage-2 weight-8 half adder
also becomes a full adder. Column 15 then holds two bits, and nothing carries
out of the 16-bit result. So the top cell of the final adder only needs its
XOR sum. The fast adder's carry-out is left unused in these two modules.

## How the netlists are written

Each multiplier module lists its cells stage by stage, from stage 4 (top) to
stage 1. Cell `u<k>_<w>[a|b|c]` is the cell of weight w in stage k; its
outputs are `s<k>_<w>…` and `c<k>_<w>…`. Partial products are `pp[i][j]`, for
`a_i b_j`.

The published arrays fix, for every cell:

* its stage,
* its weight,
* whether it is a full or a half adder,
* which partial products (and sign bits) enter it directly.

All of this is reproduced exactly. Which sum or carry from the stage above
goes to which input of a cell in the same column is chosen here. Bits of one
column all carry the same weight, so this choice does not change the
arithmetic. Each cell takes bits from the nearest stage above first. The
result is that the two Approach I unsigned layouts have the same number of
cross-stage wires as the published drawings.

The RTL captures connectivity, not placement. Wire lengths and grid use are
properties of a layout that follows the stage/column table above.

## Building blocks

| module | role |
|---|---|
| `ccm_pkg` | n = 8, `operand_t` (8 bits), `product_t` (16 bits) |
| `ccm_full_adder` | F cell: 3 bits of weight 2^j give a sum of weight 2^j and a carry of weight 2^(j+1) |
| `ccm_half_adder` | H cell: 2 bits give a sum and a carry |
| `ccm_pp_gen #(N, TWOS)` | partial-product matrix. With `TWOS = 1` the sign row and sign column are complemented as described above |
| `ccm_fast_adder #(WIDTH)` | final adder `{cout, sum} = x + y + cin`: a Kogge-Stone parallel-prefix adder, ceil(log2(WIDTH+1)) levels |
| `ccm8_top` | the five arrays on one operand pair; the unsigned outputs read a and b as unsigned, the signed outputs read them as two's complement |

Everything is combinational; there are no clocks, registers or reset. An
array's delay is four adder cells followed by its fast adder.

## Where this RTL departs from the published arrays

* **Within-column wiring** is chosen here, as described above.
* **Final adder structure.** Only "a fast adder" is specified. The
  Kogge-Stone network is this library's choice. Its carry-in is tied to 0 in
  every array, because none of them places a third bit in its lowest column.
* **Two's complement correction bits.** In the published drawings these are
  marked `a7 U b7`. They are implemented as `a7 | b7`, which is what the
  derivation above requires. Exhaustive simulation confirms it.
* **`ccm8_tc_approach2`, stage 3, weight 5.** The published drawing marks
  this cell as a full adder, but it has only two possible inputs: a4 b1 and
  the weight-5 sum of stage 4. There is no weight-4 cell in stage 4. It is
  built as a half adder. With that change, column 5 delivers exactly two bits
  to the fast adder, and the cell count (46) is unchanged.
* **One input label.** In the short-wire drawing and the two's complement
  Approach I drawing, the stage-2 weight-5 cell is labelled with a5 b2. That
  partial product has weight 7 and is already used in stage 4. The only
  unused weight-5 partial product, a3 b2, is connected instead.
* Only n = 8 is provided. The allocation rules cover any n, but cell-level
  arrays exist only for the 8x8 case.

## Verification

Every testbench checks its results itself and prints
`TB_RESULT checks=<n> failures=<m>`.

| testbench | what it checks |
|---|---|
| `tb_ccm_full_adder`, `tb_ccm_half_adder` | all input combinations |
| `tb_ccm_fast_adder` | 14- and 10-bit instances: corner cases (full-length carry ripple, all ones, alternating bits, single ones) plus 20,000 random vectors against integer addition; fails if no carry-out or full ripple occurs |
| `tb_ccm_pp_gen` | all 65,536 operand pairs. Every matrix entry is checked, plus two sums: the weighted sum equals a·b unsigned, and with the correction terms it equals a·b signed mod 2^16 |
| `tb_ccm8_<layout>` | all 65,536 operand pairs against the integer product. Also counts products that set P15 |
| `tb_ccm8_top` | all 65,536 pairs on all five outputs. It counts how often each mechanism occurs and fails if one never does: unsigned carry-out into P15, active sign correction, negative products, two negative operands, -128 x -128, and low product bits finished inside the Approach II arrays |

Every check passes. Each testbench was also run against a deliberately broken
copy of its module, and it reports failures. Examples of breaks: a carry term
dropped, one prefix level skipped, a sign row left uncomplemented, one
partial product of wrong weight, the sign-correction OR replaced by an AND.
Each testbench also has a cycle-count watchdog.

## Simulating

With Verilator 5, for example the end-to-end test:

```
verilator --binary --timing -Irtl rtl/ccm_pkg.sv tb/tb_ccm8_top.sv \
          --top-module tb_ccm8_top -y rtl
./obj_dir/Vtb_ccm8_top
```

Replace `tb_ccm8_top` with any other testbench name. Each run takes well
under a second.

## Changing the design

* **A different final adder.** Replace the body of `ccm_fast_adder`, keeping
  its ports; all five arrays use it.
* **A different 8x8 allocation.** Write a new cell list in the style of the
  existing modules. For every column, check three things:
  * each partial product is used exactly once;
  * no cell in stage k consumes a bit produced in stage k or below;
  * at most two bits per column reach the fast adder, and exactly one bit
    per column below it.

  The exhaustive testbench template `tb_ccm8_area.sv` then checks the result.
* **Pipelining.** Registers can go between stages. Every stage boundary is a
  clean cut, since all wires flow downward. The exceptions are the three
  stage-skipping bits of `ccm8_area`, which then need delay registers.
