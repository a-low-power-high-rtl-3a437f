# Accuracy-controllable approximate 16 x 16 multiplier

Many workloads (image processing, recognition, signal processing) tolerate small
arithmetic errors, and how much error they tolerate changes from one program phase
to the next. This multiplier lets the error be chosen at run time, one operation at
a time. The lever is the carry chain of the adders: every adder cell has an
active-low mask input, and a masked cell stops adding, outputs the OR of its two
operand bits and hands the incoming carry on unchanged. Masking the low bits of the
product turns those columns into plain OR gates and shortens every carry path;
leaving every mask bit at one gives the exact product.

The RTL is plain combinational SystemVerilog: no clock, no registers, unsigned
operands.

```
a[15:0], b[15:0], mask_x[31:0]  -->  wallacetreecsma16  -->  product[31:0]
```

## How masking changes a sum

The carry-maskable adder (`cma`) is a ripple-carry adder. Bit 0 is a
carry-maskable half adder (`cmha`) and bits 1..K-1 are carry-maskable full adders
(`cmfa`). For the cell at bit i:

| mask_x[i] | sum bit          | carry out                     |
|-----------|------------------|-------------------------------|
| 1         | x ^ y ^ cin      | majority(x, y, cin)           |
| 0         | x \| y           | cin (0 for the bit-0 half adder) |

The usual setting masks a contiguous group of low bits, m of them. Then the
masked half adder at bit 0 starts the chain with a 0 carry, and that 0 passes
through all masked cells. The result is:

* the low m sum bits are `(a | b)`;
* the upper bits are an exact sum of the upper operand bits;
* the error is exactly `a & b` restricted to the low m bits. It is never negative,
  so the approximate sum is never larger than the true one, and it is below 2^m.

Any other mask pattern is legal too. A carry that reaches a masked cell from an
exact cell below it skips that cell and lands in the next exact cell.

## The incomplete adder cell

A half adder gives a + b = 2c + s. The same sum can be rewritten as
(c + s) + c, and since c + s = a | b, that is **p + q with p = a | b and
q = a & b**, both at the weight of the inputs. This split is the incomplete adder
cell (`icac`). It is not an approximation. Applied bit by bit to two words, it
gives P = A | B and Q = A & B with A + B = P + Q exactly. P is a cheap estimate
of the sum and Q is the vector that recovers the exact sum. Example:
A = 01011111, B = 00110110 gives P = 01111111 and Q = 00010110, and
P + Q = 10010101 = A + B.

A carry-maskable adder with every bit masked outputs exactly P. With no bit
masked it outputs P + Q.

## The 8 x 8 building block (`wallacetree8cma`)

```
a,b --pp_gen--> 8 AND rows r0..r7 (row j = (a & b[j]) << j, 16 bits)
   (r0,r1) (r2,r3) (r4,r5) (r6,r7) --icac_row x4--> P0..P3, Q0..Q3
   P0..P3 --compressor42_row--> sp, cp
   Q0..Q3 --compressor42_row--> sq, cq
   sp,cp,sq,cq --compressor42_row--> s_vec, c_vec      (s_vec + c_vec = a*b mod 2^16)
   s_vec, c_vec, mask_x[15:0] --cma (16 bit)--> product[15:0]
```

* `compressor42` is a 4:2 compressor made of two full adders. The first adds x1,
  x2 and x3; its carry leaves as `cout` to the next column's `cin`. The second
  adds the first one's sum, x4 and `cin` and gives `sum` and `carry`. Because
  `cout` does not depend on `cin`, a row of compressors never ripples.
* `compressor42_row` puts one compressor per column and returns the carry
  vector already shifted. Bits of weight 2^16 are dropped, which is harmless
  because an 8 x 8 product fits in 16 bits.
* The reduction tree is exact. With `mask_x` all ones the product is exact (the
  testbench checks all 65536 operand pairs). With the low m bits masked, the
  product lies in `[a*b - (2^m - 1), a*b]`. An immediate assertion inside the
  block flags any inexact product while every mask bit is set.

## The 16 x 16 multiplier (`wallacetreecsma16`)

The operands are split into bytes, a = {ah, al} and b = {bh, bl}. Four 8 x 8
blocks and three 16-bit carry-maskable adders merge the products:

| instance   | computes                                  | weight |
|------------|-------------------------------------------|--------|
| u1         | p = al * bl                               | 2^0    |
| u2         | q = ah * bl                               | 2^8    |
| u3         | r = al * bh                               | 2^8    |
| u4         | s = ah * bh                               | 2^16   |
| add21cma   | x = q + r, carry c1                        | 2^8    |
| add22cma   | y = x + p[15:8], carry c2                  | 2^8    |
| add23cma   | z = s + y[15:8] + 256 * (c1 + c2), carry c3 | 2^16   |

product = {z, y[7:0], p[7:0]}. Carries c1 and c2 both have weight 2^24. They
enter `add23cma` as the two-bit number c1 + c2 in bits 9:8 of its second
operand. In exact mode c3 is always 0, and an immediate assertion checks this.

Worked example (every value is checked by the end-to-end testbench):
27173 x 19083, i.e. a = 0x6a25 and b = 0x4a8b, gives p = 0x1417, q = 0x398e,
r = 0x0ab2, s = 0x1ea4, x = 0x4440, y = 0x4454 and z = 0x1ee8. The product is
0x1ee85417 = 518542359.

### The mask vector

`mask_x[i]` masks every adder cell that produces product weight 2^i:

* u1 uses bits 15:0;
* u2, u3, add21cma and add22cma use bits 23:8;
* u4 and add23cma use bits 31:16.

To trade accuracy for delay and power, clear the low m bits. Every error term is
then non-negative, so the product is never larger than the exact one. The error
is below 7 * 2^m: seven adders each lose less than 2^m. The end-to-end testbench
measured these mean errors over 2000 random operand pairs:

| masked low bits m | mean error (absolute) |
|-------------------|-----------------------|
| 0                 | 0                     |
| 8                 | 6                     |
| 16                | about 3.4e4           |
| 24                | about 5.6e6           |
| 32 (all OR)       | about 1.0e8           |

For comparison, the mean product of two random 16-bit numbers is about 1.07e9.

### An image-processing example

`tb/tb_image_filter.sv` blurs a synthetic 64 x 64 8-bit image with a 3 x 3
Gaussian kernel in Q12 fixed point, and sends every pixel x coefficient product
through the multiplier. The same filter is run at several mask lengths and
compared with the exact image:

| masked low bits m | PSNR against the exact filter |
|-------------------|-------------------------------|
| 0                 | exact                         |
| 4                 | 56.6 dB                       |
| 8                 | 52.2 dB                       |
| 10                | 47.8 dB                       |
| 12                | 37.0 dB                       |
| 16                | 17.0 dB                       |

The image size, the kernel and the fixed-point format are this example's own
choices.

## Where this RTL rests on its own choices

The following parts are taken from the published description of this
multiplier:

* the cell behaviour of the carry-maskable half and full adders;
* the incomplete adder cell;
* the 4:2 compressor built from two full adders;
* the 8 x 8 blocks, the instance names and the internal signal names of the
  16-bit top;
* the worked example above.

The following points were left open and were decided here:

* **The 8 x 8 reduction tree.** The source describes an "approximate tree
  compressor" built from incomplete adder cells but does not give its wiring.
  Here the rows go through one layer of iCAC rows, then three 4:2 compressor
  rows. The tree is kept exact, so masking is the only approximation. This
  matches the exact sub-products of the worked example. A tree that drops or ORs
  the Q vectors would be a different, undocumented approximation.
* **The masked full adder's sum.** It is taken as x | y, the same as for the
  half adder. The cell-level gate netlist is not reproduced; the cells are
  written as equations.
* **The mask interface.** The mask is one 32-bit vector indexed by product
  weight and is a top-level input. The source does not say how mask bits are
  grouped or where they come from. One synthesized build of the source kept
  only the 64 operand and product pins, which suggests a fixed mask there.
* **The carries c1 and c2.** How they reach the top adder is this design's own
  choice.
* **Operands.** Unsigned operands and purely combinational timing are assumed.
* **The truth table of the 4:2 compressor.** The published table has two rows
  (cin = 1 with x4..x1 = 0101 and 0110) that do not add up. The two-full-adder
  structure is followed instead.
* **Power-aware reduction.** The source also speaks of a term for the power and
  accuracy requirements that simplifies the partial-product reduction as
  needed, but does not define it. It is not built; accuracy is controlled only
  through the adder masks.
* **Higher-order compressors.** The source also mentions 3:2, 5:3 and 7:3
  compressors without describing them. Only the 4:2 compressor is used.

The conventional 16-bit array/Wallace multiplier that the source uses as a
baseline is not included. Its power, delay and area figures come from a
45-nm standard-cell flow and an FPGA flow; they are not reproduced here.

## Files

| file | content |
|------|---------|
| `rtl/approx_mult_pkg.sv` | widths shared by all modules (16, 8, 16) |
| `rtl/wallacetreecsma16.sv` | 16 x 16 top |
| `rtl/wallacetree8cma.sv` | 8 x 8 block |
| `rtl/cma.sv`, `rtl/cmha.sv`, `rtl/cmfa.sv` | carry-maskable adder and its cells |
| `rtl/icac.sv`, `rtl/icac_row.sv` | incomplete adder cell and row |
| `rtl/compressor42.sv`, `rtl/compressor42_row.sv`, `rtl/full_adder.sv` | 4:2 compressor, one compressor layer, full adder |
| `rtl/pp_gen.sv` | AND partial-product rows |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_image_filter.sv` | image-filter workload at several mask lengths |
| `tb/approx_ref_pkg.sv` | loop-level model of the carry-maskable adder used by the testbenches |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. It has a
time-out that counts as a failure. For example, to build and run the end-to-end
test:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/approx_mult_pkg.sv tb/approx_ref_pkg.sv tb/tb_wallacetreecsma16.sv \
    --top-module tb_wallacetreecsma16 -Mdir obj_top -o sim
./obj_top/sim
```

Use the same command with another `tb_<module>` to test a single block.

The end-to-end test runs the top at its default size. It checks:

* the worked example;
* exact products for random and corner-case operands;
* the merging adders against the reference model under random masks;
* the error bound under low-bit masking.

It also counts how often each behaviour occurs: exact operations, masked
operations, switches between them, carries c1 and c2, visible approximation
error, and a carry passing through a masked cell. If any of these never occurs,
the test fails. The testbenches read internal signals (`dut.p`, `dut.s_vec`,
and so on) by hierarchical name. Keep those names if you restructure the blocks.

To change the trade-off, drive `mask_x` differently; no RTL change is needed.
The 8 x 8 tree and the byte decomposition are written for the default widths.
Elaboration stops with an error if `N` is changed.
