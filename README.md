# Single precision floating point multiplier with classical recoding (CRSOPP)

A combinational IEEE 754 binary32 multiplier. Most of its logic goes into the
24 x 24 significand product, and that product is built without Booth
recoding. Radix-4 Booth halves the number of partial products, but it treats
the multiplier as a signed number. It needs overlapping 3-bit groups, negative
multiples (two's complement), sign extension and an extra correction row when
the operand is unsigned. A floating point significand is always unsigned,
since the sign travels in a separate bit. So this design uses *classical
recoding* instead. The multiplier is cut into plain 2-bit digits, with no bit
shared between neighbours, and each digit picks one of four non-negative
multiples of the multiplicand: 0, A, 2A or 3A. That still halves the number of
partial products, and nothing is ever negative.

The lack of overlap has a second benefit: the operands can be split freely.
Both 24-bit significands are cut into three 8-bit blocks. The nine 8 x 8
block products are computed in parallel, each with its own 4 partial
products. They are then combined in three adder stages. The scheme is called
CRSOPP: Classical Recoding, Split Operands, Parallel Processing.

The design follows the paper "An Efficient Single Precision Floating Point
Multiplier Architecture based on Classical Recoding Algorithm". The paper's
FPGA figures are 140 MHz, 1571 logic elements and no registers on a Cyclone II.
They are not reproduced here.

## Data flow

```
 a ──► fp_prenorm ─┐                     ┌──────────────────────────┐
                   ├─ sign, exp, sig ──► │ fp_calc_unit             │
 b ──► fp_prenorm ─┘                     │  fp_sign_unit   sa ^ sb  │
           │ class                       │  fp_exp_adder   ea+eb-127│
           │                             │  crsopp_mult24  siga*sigb│──► s, e, p[47:0]
           ▼                             └──────────────────────────┘        │
     fp_postnorm ◄───────────────────────────────────────────────────────────┘
       leading zero detector, exponent adjust, denormal alignment,
       round to nearest even, exceptions, packing ──► result, flags
```

There are no registers. `result` and `flags` settle one combinational delay
after `a` and `b`.

| port     | dir | width | meaning |
|----------|-----|-------|---------|
| `a`, `b` | in  | 32 (`fp32_t`) | binary32 operands |
| `result` | out | 32 (`fp32_t`) | a x b, rounded to nearest, ties to even |
| `flags`  | out | 4 (`fp_flags_t`) | `{invalid, overflow, underflow, inexact}` |

## The significand multiplier, step by step

**Splitting.** `a = {A2, A1, A0}` and `b = {B2, B1, B0}`, where each block is
8 bits. Block product AiBj has weight 2^(8(i+j)).

**Recoding (`cr_encoder`).** Each multiplier block Bj gives four 2-bit digits.
Each digit is decoded into a one-hot select `cr_sel_t {x3, x2, x1}`:

| digit | partial product |
|-------|-----------------|
| 00 | zero |
| 01 | A: the block with a 0 added above it (`{0, A}`) |
| 10 | 2A: the block with a 0 added below it (`{A, 0}`) |
| 11 | 3A = A + 2A |

**Partial products (`cr_pp_gen`).** 3A is formed once per block multiplier by
a small carry select adder. Each partial product is 10 bits wide, which is
what 3A of an 8-bit value needs.

**Stage 1: block product (`cr_block_mult8`).** The four partial products are
placed 2 bits apart, at weights 1, 4, 16 and 64. One 4:2 carry save adder
reduces them to a sum and a carry vector. A carry select adder then resolves
those into the 16-bit block product. All nine block multipliers work in
parallel.

The 4:2 carry save adder (`csa42`) is a row of `cmp42_cell` compressors. Each
cell takes four operand bits `w x y z` and `cin`, and gives `sum`, `carry`
and `cout`. Inside, a cell is two full adders (`csa32` at width 1). The first
adds `w x y`, and its carry is `cout`, which feeds the next cell's `cin`. The
second adds the first sum, `z` and `cin`. So `cout` depends only on the
cell's own inputs, never on `cin`, and nothing ripples along the row. A
column can hold five ones: four inputs plus the incoming carry. Its sum is
then 1 and its carry is binary 10. That carry leaves as two separate ones,
`carry` and `cout`, one from each full adder.

**Stage 2: diagonals (`cr_stage2`).** Products of equal weight are added with
carry select adders:

```
                    c4=A2B2   c3=A2B1+A1B2   c2=A2B0+A1B1+A0B2   c1=A1B0+A0B1   c0=A0B0
bits of weight 2^:  32..47    24..40         16..33              8..24          0..15
```

The sums keep their carry bits: 17, 18 and 17 bits wide.

**Stage 3: overlapping bit separation (`cr_overlap_adder`).** This is the part
that needs the most care. Diagonal k only *owns* byte k of the product. Its
upper bits overlap the next diagonal. The stage works upward from c0:

```
t0 = c0                 byte 0 = t0[7:0]   (Low_mul)
t1 = c1 + t0[15:8]      byte 1 = t1[7:0]   (Next_mul)
t2 = c2 + t1[16:8]      byte 2 = t2[7:0]   (Next_mul)
t3 = c3 + t2[17:8]      byte 3 = t3[7:0]   (Next_mul)
t4 = c4 + t3[16:8]      bytes 4-5 = t4      (Upper_mul, 16 bits)
p  = {t4, t3[7:0], t2[7:0], t1[7:0], t0[7:0]}
```

The overlapping bits handed upward come from each running total *after* it
has absorbed the bits from below. So a carry out of byte 1 does reach byte 2.
The widths are the smallest that can never overflow: t1 stays below 2^17, t2
below 2^18 and t3 below 2^17. Assertions in the RTL check these bounds.

Every carry propagate adder in the design is the same `csel_adder`. It is a
carry select adder with 4-bit blocks: a ripple adder in the lowest block, and
above that, each block is computed for both carry values and one result is
selected.

## Exponent, normalization and rounding

* `fp_prenorm` sorts each operand into zero, denormal, normal, infinity,
  quiet NaN or signalling NaN. It inserts the hidden bit (1 for normal
  numbers, 0 for denormals) and outputs an *effective* exponent, which is 1
  for denormals.
* `fp_exp_adder` computes `e = ea + eb - 127` in 10-bit two's complement, so
  that exponents far out of range stay representable.
* `fp_postnorm`:
  1. The leading zero detector (`lzd`) counts the zeros above the leading one
     of the 48-bit product.
  2. The product is shifted left by that count, so its leading one sits at
     bit 47, and the exponent becomes `e + 1 - count`. With two normal
     operands the count is 0 (exponent + 1) or 1. Larger counts appear only
     when a denormal operand took part.
  3. If that exponent is below 1, the significand is shifted further right.
     Shifted-out bits are folded into the sticky bit, and the exponent field
     becomes 0. This produces a denormal result or zero.
  4. Rounding is to nearest, ties to even. It uses the guard bit (bit 23 of
     the aligned product), a sticky bit (the OR of everything below) and the
     LSB. The increment is added to the packed `{exponent, fraction}` field,
     so a carry out of the fraction raises the exponent. A carry into
     exponent 255 lands on infinity.
  5. Exceptions:
     * A NaN operand, or 0 x infinity, gives the quiet NaN `0x7FC00000`.
     * `invalid` is raised for 0 x infinity and for a signalling NaN (a NaN
       whose fraction MSB is 0).
     * Infinity or zero operands give a signed infinity or zero.
     * An exponent of 255 or more gives infinity, with `overflow` and
       `inexact`.
     * `underflow` means the result was tiny before rounding and is inexact.

## Where this RTL goes beyond or departs from the paper

* **Partial product width.** The paper's recoding table sizes partial
  products at n+1 bits. 3A needs n+2 bits, so all of them are 10 bits wide.
* **Diagonal sums.** The paper gives the stage 2 sums as 16 bits wide. A sum of two or three 16-bit products needs 17 or 18 bits, and those widths
  are kept.
* **Overlap order.** The paper's architecture drawing separates some diagonals'
  overlapping bits before adding in the bits from below. Taken literally,
  that could drop a carry. Here the separation happens after that addition
  (see stage 3).
* **Half adders.** The paper mixes a few half adders in with its 3:2 CSAs.
  None are used separately here; the 4:2 CSA covers all columns.
* **Carry select adder.** The paper names a carry select adder as the final
  adder but gives no insides. The 4-bit block structure is this design's
  choice.
* **IEEE details.** The paper describes exception handling, denormals and
  the leading zero detector only as conventional steps, without detail. The exact IEEE 754 behaviour here is this design's: gradual
  underflow, the NaN value produced, the four flags, and the choice to
  normalize denormals after the multiplication rather than before it.
* **Fixed split.** The split is fixed at 3 x 8 bits (`BLK = 8`, `NBLK = 3`).
  The stage 2 and stage 3 wiring is written for that split, and an assertion
  rejects other values.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* **Exhaustive:** `cmp42_cell` (all 32 input combinations), `cr_encoder`
  (all 256 blocks), `cr_block_mult8` (all 65,536 operand pairs),
  `fp_exp_adder` (all exponent pairs).
* **Random plus corner cases:** the carry save adders, `csel_adder`,
  `cr_stage2`, `cr_overlap_adder` and `crsopp_mult24` (20,000 products),
  checked against integer multiplication.
* **`tb_fp_mult32`:** runs the whole multiplier on 16 directed cases and
  300,000 random operand pairs from every number type. It compares `result`
  and `flags` with `fp_ref_pkg`, a reference that works a different way: it
  multiplies exactly in double precision, then rounds by integer comparison.
  It also counts how often each mechanism occurred: exponent increment, long
  leading zero shift, denormal result, round up, tie, rounding carry into the
  exponent, overflow, underflow, NaN, infinity, zero, invalid, a 3A partial
  product, and a compressor column holding five ones. If any of them never
  occurred, the test fails.

Bit-exact agreement with that reference was observed on every run. Timing and
area on an FPGA were not evaluated.

## Simulating

Each testbench is standalone. For example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/fpm_pkg.sv tb/fp_ref_pkg.sv rtl/*.sv tb/tb_fp_mult32.sv \
  --top-module tb_fp_mult32
./obj_dir/Vtb_fp_mult32
```

Replace `tb_fp_mult32` with any other `tb_<module>`. The end-to-end test runs
the design at its only configuration and finishes in about a second.

## Files

| file | content |
|------|---------|
| `rtl/fpm_pkg.sv` | binary32 struct, number classes, digit select, flags, constants |
| `rtl/fp_mult32.sv` | top level |
| `rtl/fp_prenorm.sv`, `rtl/fp_postnorm.sv`, `rtl/lzd.sv` | pre- and post-normalization |
| `rtl/fp_calc_unit.sv`, `rtl/fp_sign_unit.sv`, `rtl/fp_exp_adder.sv` | calculation unit |
| `rtl/crsopp_mult24.sv` | 24 x 24 significand multiplier |
| `rtl/cr_encoder.sv`, `rtl/cr_pp_gen.sv`, `rtl/cr_block_mult8.sv` | recoding and 8 x 8 block products |
| `rtl/cr_stage2.sv`, `rtl/cr_overlap_adder.sv` | diagonal adders and overlap adder |
| `rtl/csa32.sv`, `rtl/cmp42_cell.sv`, `rtl/csa42.sv`, `rtl/csel_adder.sv` | adder cells |
| `tb/fp_ref_pkg.sv` | reference model |
| `tb/tb_*.sv` | one testbench per module |
