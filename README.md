# 8x8 approximate multiplier with mixed Ha / Yang2 inexact 4-2 compressors

This is an unsigned 8-bit × 8-bit multiplier. It gives up a little accuracy to save area and power,
and it is meant for error-tolerant work such as image processing. Like most compressor-based
approximate multipliers, it reduces the partial-product matrix with *inexact* 4-2 compressors. These
are cells that add four bits into a 2-bit {carry, sum} and get a few input patterns wrong. The idea
here is to use **two kinds of compressor whose errors have opposite sign** and to place them so that
the errors cancel on average:

| compressor | wrong when | error | mean error for partial-product inputs |
|---|---|---|---|
| Ha    | x4 = x3 = 1 (inputs 11xx) | −1 | −16/256 |
| Yang2 | x4x3x2x1 = 1100 / 1111     | +1 / −1 | +8/256 |

Neither compressor can be wrong unless x4 = x3 = 1. Where each partial product goes, and which two of
a compressor's inputs become x4 and x3, therefore matters a great deal. The design picks these
inputs with two rules (below). Over all 65536 operand pairs the result is:

| ER | NMED | MRED | MRERR | PRED (>2 %) | PRED15 (>15 %) |
|---|---|---|---|---|---|
| 35.70 % | 0.00328 | 0.902 % | +0.020 % | 14.38 % | 0.0031 % (2 pairs) |

About a third of the products are inexact. The errors are small, though, and almost unbiased: the
mean relative error is +0.02 %. This table comes from the end-to-end testbench, and it matches the
published figures for this design.

The whole multiplier is combinational. It has no clock, no reset and no handshake.

## Structure

```
approx_mult8            a[7:0], b[7:0] -> p[15:0]
├── pp_generator        64 partial products pp[i][j] = a[i] & b[j]  (weight 2^(i+j))
├── reduction_step1     columns down to ≤ 4 bits: 3 Ha, 4 Yang2, 4 half adders, 1 full adder
├── reduction_step2     columns down to 2 rows:   6 Ha, 4 Yang2, 2 half adders
└── cpa                 16-bit ripple carry-propagate adder (full_adder cells)
```

The modules share types from `approx_mult_pkg`:

- `cs_t` is the {carry, sum} pair of every adder and compressor.
- `pp_t` is the 8×8 partial-product matrix.
- `mat4_t` is the matrix between the two steps. It holds 15 columns of 4 bits, and each column is
  ordered {x4,x3,x2,x1} the way the step-2 element of that column takes it.
- `rows2_t` holds the two rows left for the final adder.

## The two compressors

Both compressors count x1 + x2 + (x3 OR x4) exactly. They differ only when x4 = x3 = 1:

- **Ha** (`ha_compressor`): `sum = x1^x2^(x3|x4)`, `carry = x1x2 | (x1^x2)(x3|x4)`. The carry is one
  AO22 cell. When x4 = x3 = 1 the result is one too small.
- **Yang2** (`yang2_compressor`): the same as Ha, but x3&x4 is ORed into both outputs. The carry is one
  AO222 cell. When x4 = x3 = 1 the output is always 3. That is +1 for x2x1 = 00, exact for 01 and 10,
  and −1 for 11.

Neither has a carry in or carry out, so a column's compressor sends exactly one bit to the next
column.

## Where the compressors go, and why

Two rules set the topology:

1. **Least likely inputs on x4, x3.** Give x4 and x3 the two inputs that are least likely to be 1,
   because errors need both of them to be 1.
2. **Tie-break on error size.** When the inputs are equally likely to be 1, pick the pair for x4, x3
   whose error, if it happens, lands on the product with the largest expected value. This keeps the
   *relative* error small.

Ha compressors go toward the low columns and Yang2 toward the high ones, so that their opposite
biases balance out.

**Step 1.** All partial products are equally likely to be 1 (1/4 each), so only rule 2 applies. In
the table, "i,j" means a_i·b_j and the inputs are listed x4, x3, x2, x1.

| column | element | inputs |
|---|---|---|
| 4  | half adder | a4b0, a3b1 |
| 5  | Ha    | a5b0, a2b3, a4b1, a3b2 |
| 6  | Ha    | a6b0, a3b3, a4b2, a5b1 |
| 6  | half adder | a2b4, a1b5 |
| 7  | Ha    | a7b0, a4b3, a5b2, a6b1 |
| 7  | Yang2 | a0b7, a3b4, a1b6, a2b5 |
| 8  | Yang2 | a7b1, a4b4, a5b3, a6b2 |
| 8  | full adder | a1b7, a2b6, a3b5 |
| 9  | Yang2 | a7b2, a4b5, a5b4, a6b3 |
| 9  | half adder | a2b7, a3b6 |
| 10 | Yang2 | a7b3, a4b6, a6b4, a5b5 |
| 11 | half adder | a6b5, a7b4 |

**Step 2.** The inputs now have different probabilities of being 1:

| output | probability of 1 |
|---|---|
| half-adder sum | 0.375 |
| half-adder carry | 0.0625 |
| full-adder sum | 0.4375 |
| full-adder carry | 0.156 |
| Ha sum | 0.484 |
| Ha carry | 0.191 |
| Yang2 sum | 0.508 |
| Yang2 carry | 0.227 |
| raw partial product | 0.25 |

So rule 1 comes first, and the carries mostly end up on x4 and x3. In the table, S/C = sum/carry of
h (half adder), f (full adder), H (Ha) or Y (Yang2), and a carry comes from the column below.

| col | element | x4 | x3 | x2 | x1 |
|---|---|---|---|---|---|
| 2  | half adder | a2b0 | a1b1 | | (a0b2 passes) |
| 3  | Ha    | a3b0 | a0b3 | a1b2 | a2b1 |
| 4  | Ha    | a2b2 | a0b4 | S/h | a1b3 |
| 5  | Ha    | C/h | a0b5 | S/H | a1b4 |
| 6  | Ha    | C/H | a0b6 | S/h | S/H |
| 7  | Ha    | C/h | C/H | S/H | S/Y |
| 8  | Yang2 | C/H | C/Y | S/f | S/Y |
| 9  | Yang2 | C/f | C/Y | S/Y | S/h |
| 10 | Ha    | C/h | C/Y | a3b7 | S/Y |
| 11 | Yang2 | C/Y | a4b7 | a5b6 | S/h |
| 12 | Yang2 | C/h | a5b7 | a6b6 | a7b5 |
| 13 | half adder | a6b7 | a7b6 | | |

Columns 0, 1 and 14 pass straight through. `reduction_step1` produces exactly the {x4,x3,x2,x1}
order in the step-2 table. `reduction_step2` only picks the compressor type per column, using the
`YANG2_COLS` mask.

**Step 3.** The sum row and the carry row are added by a 16-bit ripple adder. The top bit produces
only a sum, because the largest approximate product is 57257 and nothing carries out of bit 15.

Placement matters. If x4x3 and x2x1 are exchanged throughout, the same compressors give ER 69.3 %
and MRED 3.1 %.

## Points where this RTL makes its own choices

- **Output width is 16 bits.** The top two operands give 255² = 65025, which needs 16 bits. Some
  descriptions of this scheme speak of a 15-bit adder output; the 16-bit width is used here.
- **Carry at column 9.** The x3 input of the Yang2 compressor at step-2 column 9 is the carry of the
  *Yang2* compressor at step-1 column 8. One account of this scheme calls it the carry of a Ha
  compressor. The wiring used here reproduces the published accuracy exactly, and the other reading
  does not fit the step-1 placement.
- **Pass-through bits.** Which partial products feed the exact adders of step 1 is inferred from
  the bits that appear unreduced in step 2. This choice does not change any result, because those
  adders are exact.
- **Column-2 half adder.** It takes a2b0 and a1b1, and a0b2 passes through. This is also
  value-neutral.
- **Final adder.** It is a plain ripple chain of full adders. Any 16-bit adder can replace it.
- **Operand width.** The wiring is written out for 8-bit operands. `WIDTH` in the package documents
  the width but cannot be changed.
- **Not included.** The comparison designs are not part of this RTL: an exact multiplier, the
  Momeni and Akbari2 compressors, and single-type or unadjusted-topology variants.

## How far it can be trusted

- The testbench of each compressor applies all 16 inputs against the truth table. It also checks the
  mean error for partial-product inputs: −16/256 for Ha and +8/256 for Yang2.
- The step testbenches check the weighted bit sum of each stage against the exact value plus the
  errors expected from an independently written placement list. `tb_reduction_step1` runs all 65536
  operand pairs; `tb_reduction_step2` runs 200000 random matrices.
- `tb_approx_mult8` runs all 65536 operand pairs and checks the six error metrics to the published
  precision. It also checks that products with a one-hot or zero operand are exact, and that no
  relative error exceeds 16 %. It counts products that come out exact, too large and too small, and
  products that are exact even though some compressor erred (errors cancelling inside the product).
  Each of these must occur.
- `tb_image_blend` multiplies two generated 64×64 grey images pixel by pixel and keeps the high
  byte. Against exact blending it gets a PSNR of 46.8 dB, and the test requires at least 45 dB.
- Every testbench was also run against a deliberately broken copy of its module, and it failed.

Not verified: timing, area and power. The design has not been synthesised to a cell library here.

## Simulating

All files are SystemVerilog-2017. Put the package first:

```
verilator --binary --timing --assert -Irtl --top-module tb_approx_mult8 \
    rtl/approx_mult_pkg.sv rtl/*.sv tb/tb_approx_mult8.sv
./obj_dir/Vtb_approx_mult8
```

Replace `tb_approx_mult8` with any other testbench in `tb/`. Each one prints the line
`TB_RESULT checks=N failures=M` and stops; the longest one runs in well under a second. To lint:
`verilator --lint-only -Wall -Irtl rtl/approx_mult_pkg.sv rtl/approx_mult8.sv`.

To try another placement, edit the tables in `reduction_step1.sv` or the `YANG2_COLS` mask in
`reduction_step2.sv`. Then run `tb_approx_mult8` and read the printed metrics. The metric checks
will fail by design, because they hold the published values.
