# Selective coefficient DCT (SCDCT) and a transposition-free 8x8 2-D DCT

A conventional 1-D DCT engine takes eight samples and returns all eight
coefficients at once. That suits neither the serial data of a video coder nor
the row-column 2-D DCT, which then needs a transposition memory between the
row and column passes. The **selective coefficient DCT (SCDCT)** works the
other way. Each cycle it is given an eight-sample frame and an index `u`, and it returns
only the coefficient `C(u)`. Any coefficient of any frame can be asked for in
any cycle. The datapath has no multiplier: the cosine factors are constants,
so each product is a fixed pattern of shifts and additions.

Because the SCDCT computes coefficients in any order, a 2-D DCT can run the
row pass column by column. First it computes coefficient `j` of rows 0..7,
then coefficient `j+1`, and so on. Each column of row-pass results leaves the
first SCDCT as eight consecutive samples. It goes straight into a second
SCDCT, so no transposition buffer is needed and the transpose adds no delay.
The whole 2-D DCT takes one pixel per cycle and gives one coefficient per
cycle.

This repository holds:

- the SCDCT datapath;
- the serial-in/parallel-out (SIPO) and parallel-in/parallel-out (PIPO)
  buffer engines;
- the two sequencers;
- the 2-D DCT top level, `dct2d_top`, which also has a 4x4 partial-DCT mode
  for truncation coding.

## 1. How one coefficient is computed

The orthonormal 8-point DCT is

    C(u) = a(u) * sum_{n=0..7} f(n) cos(pi u (2n+1) / 16),   a(0) = 1/sqrt(8), a(u>0) = 1/2

All 64 basis values `a(u) cos(...)` are, up to sign, one of seven
constants:

| factor | value                | used for |
|--------|----------------------|----------|
| A1     | cos(pi/4)/2  = 0.3536 | u = 0, 4 |
| B1, B2 | cos(pi/8)/2, cos(3pi/8)/2 | u = 2, 6 |
| C1..C4 | cos((2j-1)pi/16)/2   | u odd    |

They form a 3x4 matrix `F`:

- row A is `A1 A1 A1 A1`;
- row B is `B1 B1 B2 B2`;
- row C is `C1 C2 C3 C4`.

A coefficient is then a four-term dot product, built in three steps:

1. **Butterfly with sign flips** (`scdct_dvec`). Form
   `D_k = s_k(u) * (f(k) + (-1)^u f(7-k))` for k = 0..3.
   - Even `u` takes sums and odd `u` takes differences.
   - The signs are `s_0 = +1`, `s_1 = (-1)^floor((u+2)/5)`,
     `s_2 = (-1)^floor((u+1)/3)` and `s_3 = (-1)^floor(u/2)`.
   - These flips make every later product positive, so one set of unsigned
     factors serves all eight coefficients.
2. **Arrangement** (`scdct_arrange`). Permute `D` so that element `m` meets
   the factor in column `m` of `F`. The permutation P_u is given as the
   source index for each column:

   | u | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
   |---|---|---|---|---|---|---|---|---|
   | D' | 0123 | 0123 | 0312 | 2031 | 0123 | 1302 | 1203 | 3210 |

3. **Selected factor row and sum**. The selection S_u picks row A of `F` for
   u = 0 and 4, row B for u = 2 and 6, and row C for odd u. Four multipliers
   form `D'_m * F[row][m]`, and an adder tree sums them.

For example, `C(3) = C1*D2 + C2*D0 + C3*D3 + C4*D1` with
`D = (f0-f7, -(f1-f6), -(f2-f5), -(f3-f4))`.

## 2. The multiplier-free factor units (FSCM-1..4)

Each of the four multipliers is a *finite selection coefficient multiplier*
(FSCM), implemented by `scdct_fscm` with `COL` set to 0..3. It holds the three
factors of its column of `F`, each written as a signed-digit string with
twelve fractional digits. For every digit position `b` of the selected
factor, the shifted input `x * 2^b` is added for a +1 digit, subtracted for a
-1 digit, and skipped for a 0 digit. The digits are (`-` marks a -1 digit):

| factor | digits (x 2^-1 .. 2^-12) | integer /4096 | true value x 4096 |
|--------|--------------------------|---------------|-------------------|
| A1 (FSCM-1, -2) | `1 0 - 0 - 0 1 0 1 0 0 0` | 1448 | 1448.15 |
| A1 (FSCM-3, -4) | `0 1 0 1 1 0 1 0 1 0 0 0` | 1448 | 1448.15 |
| B1 | `1 0 0 0 - 0 - 0 0 1 0 0` | 1892 | 1892.10 |
| B2 | `0 1 0 - 0 0 0 1 0 0 0 0` | 784  | 783.74  |
| C1 | `1 0 0 0 0 0 - 0 - 0 0 0` | 2008 | 2008.62 |
| C2 | `1 0 - 0 1 0 1 0 1 0 0 -` | 1703 | 1702.85 |
| C3 | `0 1 0 0 1 0 0 - 0 0 1 0` | 1138 | 1137.85 |
| C4 | `0 0 0 1 1 0 0 1 0 0 0 0` | 400  | 399.55  |

The constants live in `scdct_pkg::FACTOR` as masks of +1 and -1 digits. The
shifts go left, so every product is exact: `p = x * K`, where `K` is the
integer in the table. The single rounding happens after the final sum.

Each FSCM has two pipeline stages:

1. The upper six and the lower six digit positions are summed separately into
   registers.
2. The two partial sums are added.

Synthesis removes the digit positions that are zero in all three factors of a
column.

## 3. The SCDCT pipeline (`scdct`)

The module has five register stages:

| stage | work |
|-------|------|
| 1 | butterfly and sign flips |
| 2 | permutation; the factor row is chosen here |
| 3, 4 | FSCMs |
| 5 | four-input sum, rounded half up by `SHIFT` bits |

`in_valid`, `in_f[8]`, `in_u` and an opaque `in_tag` enter together. The
result `out_c`, with `out_u` and `out_tag`, comes out exactly
`SCDCT_LAT = 5` cycles later. A new frame and `u` may be given every cycle.
There is no stall. Only the valid bits are reset (asynchronous, active low).

Widths:

- the butterfly is `IN_W+2` bits;
- the products are `IN_W+14` bits;
- the sum is two bits wider than the products;
- `out_c = round(C(u) * 2^(12-SHIFT))`, truncated to `OUT_W` bits.

## 4. Transposition-free 2-D DCT (`dct2d_top`)

```
 in_pix --> [SIPO -> 2 x 8 row banks] --F_i--> [SCDCT #1] --t(i,j), i fastest-->
             scdct_rowbuf        ^ row i, coef j      u = j
                                 |
                           dct2d_row_seq

 --> [SIPO] -> [PIPO] --T_j--> [SCDCT #2] --> out_coef Y(u, v=j), u fastest
     scdct_sipo scdct_pipo  ^ u
                            |
                      dct2d_col_seq
```

### Row buffer engine

Pixels arrive in row-major order, at most one per cycle, and gaps are
allowed. A SIPO turns every eight pixels into a row vector, which is written
into one of two banks of eight rows (ping-pong). When row 7 has been written,
`block_ready` pulses, and from the next cycle that bank is read. The first
SCDCT needs any row of the block in any cycle, so the whole block must be
present before the row pass starts. The second bank lets the next block
stream in meanwhile. A bank is read for at most 64 cycles, and refilling the
other bank takes at least 64 cycles, so the two never collide.

### Row pass

`dct2d_row_seq` issues `(row i, coefficient j)` for j = 0..7, with i = 0..7
inside each j. The first SCDCT therefore produces the column vectors
`T_j = t(0..7, j)` one after another, each as eight consecutive samples.
Row-pass results keep `T_FRAC = 2` fractional bits.

### Column pass

A second SIPO collects `T_j`. In the cycle it is complete, the vector is
copied into a PIPO and `dct2d_col_seq` starts issuing u = 0..7. The SIPO is
already gathering `T_{j+1}`, which is complete exactly when the eighth `u`
has been issued. The second SCDCT rounds to integers.

### Output and timing

The output order is `v` outer, `u` inner. `out_u` and `out_v` label each
coefficient, and `out_last` flags the final coefficient of a block.

- **Throughput:** one pixel in and one coefficient out per cycle. With
  gapless input, the output has no gaps across block boundaries.
- **Latency:** 22 cycles, from the cycle the last pixel of a block is
  presented to the cycle its first coefficient is valid:

  | step | cycles |
  |------|--------|
  | row buffer | 2 |
  | row sequencer | 1 |
  | rest of the first column | 7 |
  | SCDCT | 5 |
  | SIPO | 1 |
  | column sequencer | 1 |
  | SCDCT | 5 |

- **Ordering rules:** there is no back-pressure. The design relies on at most
  one pixel per cycle. The sequencers assert that a new block or column
  never arrives while the previous one is still being issued.

## 5. More SCDCT pairs: `LANES`

Adding SCDCT modules trades area for throughput. `dct2d_top` has a parameter
`LANES`:

- The default, `LANES = 1`, is the two-SCDCT design described above.
- `LANES = 2` uses four SCDCTs and doubles the throughput. Two pixels enter
  per beat, with `in_pix[0]` the earlier one. The row sequencer steps the
  column by two. Both first-pass SCDCTs read the same row and compute
  columns `j` and `j+1`. Each lane has its own SIPO, PIPO, column sequencer
  and second SCDCT, so two coefficients leave per cycle. Lane `l` delivers
  the columns `v = l, l+2, ...`.

Latency stays 22 cycles, and a block occupies the first pass for 32 cycles.
`LANES` must divide 4, so that the partial mode's four columns split evenly.
The ports `in_pix` and `out_*` are arrays with `LANES` entries; at the
default they have one entry each.

## 6. Partial 4x4 DCT

Truncation coding keeps only a low-frequency sub-block. If `trunc_en` is high
with the **first pixel** of a block, only the 4x4 sub-block
`u = sub_u0..sub_u0+3`, `v = sub_v0..sub_v0+3` is computed:

- the row pass walks only four columns (32 cycles);
- the column pass issues only four `u` per column;
- the block yields 16 coefficients.

Origins above 4 are clamped to 4. The mode and origins travel with the data
as side-band tags, so the mode may change from one block to the next, even
between back-to-back blocks. On the pins, `trunc_en`, `sub_u0` and `sub_v0`
matter only in the cycle of a block's first pixel.

## 7. Number formats and accuracy

| signal | format |
|--------|--------|
| `in_pix` | signed 9 bits, for level-shifted 8-bit pixels or residuals |
| row-pass result `t` | signed 13 bits, 2 fractional bits |
| `out_coef` | signed 13 bits, integer; `\|Y\| <= 2048` for 9-bit input |

Rounding is half up in both passes. Compared with the ideal real-valued 2-D
DCT, every tested coefficient was within 1.5 (including the extreme blocks:
all -256, all 255, checkerboards, half/half). Each 1-D coefficient is within
1.5 LSB of its 2-fractional-bit value. Most of the error comes from the
factor approximations, which are off by up to 0.62/4096 (about 1.5e-4)
(C1 is 2008/4096 against 2008.62/4096).

## 8. Design decisions and departures

- **P_6.** The permutation for `u = 6` is `D' = (D1, D2, D0, D3)`, the
  ordering that makes the dot product equal the DCT. The other seven
  permutations, the sign rules and the factor-row selection are the SCDCT
  formulation as published.
- **C2 digits.** C2 uses the digits `1 0 - 0 1 0 1 0 1 0 0 -`
  (1703/4096 = 0.415771, the value cos(3pi/16)/2 requires).
- **FSCM structure.** Each FSCM is one generic digit-controlled shift-add
  unit per column, so its adder count is not an exact copy of a hand-drawn
  netlist. An 8-point SCDCT uses no multiplier.
- **This design's own choices:**
  - word widths, the rounding rule and the pipeline cut points;
  - the valid/tag side bands, the two-bank row buffer and the per-block mode
    tags;
  - the one-cycle delay of the read-bank switch;
  - the clamping of sub-block origins;
  - the absence of back-pressure.
- **Lane arrangement.** With `LANES = 2`, the two lanes share one row read
  and compute adjacent columns, and two pixels enter per cycle. This is one
  way to realise the four-SCDCT arrangement; the detailed wiring is this
  design's own.

## 9. Files

`rtl/` holds one unit per file:

| file | content |
|------|---------|
| `scdct_pkg.sv` | constants, factor digits, permutation table, tag structs |
| `scdct_dvec.sv` | butterfly and sign flips (combinational) |
| `scdct_arrange.sv` | permutation P_u (combinational) |
| `scdct_fscm.sv` | FSCM, two-stage shift-add constant multiplier |
| `scdct.sv` | the SCDCT, 5-stage pipeline |
| `scdct_sipo.sv`, `scdct_pipo.sv` | buffer-engine registers |
| `scdct_rowbuf.sv` | input SIPO with two 8x8 row banks |
| `dct2d_row_seq.sv`, `dct2d_col_seq.sv` | sequencers of the two SCDCTs |
| `dct2d_top.sv` | 2-D DCT top level |

`tb/` holds one self-checking testbench per unit, `tb_<module>.sv`, plus
`tb_ref_pkg.sv`. That package is the reference model. It evaluates the DCT
basis in real arithmetic, substitutes the nearest fixed-point factor, and
forms the exact integer result the hardware must match bit for bit. Every
testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

`tb_dct2d_top` runs the top level at its default parameters with 40 blocks:

- gapless full blocks, including extreme patterns;
- gapless partial blocks with changing origins, including a clamped one;
- blocks with random input gaps.

It checks every coefficient and its labels, the 22-cycle latency, and a
gap-free output run longer than eight blocks. It also counts each mechanism:
full blocks, partial blocks, back-to-back blocks, input gaps, mode switches,
bank alternation and the full-rate run. `tb_dct2d_top_dual` runs the same
sequence with `LANES = 2` and checks both lanes, including two coefficients
per cycle during gapless input.

## 10. Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/scdct_pkg.sv tb/tb_ref_pkg.sv tb/tb_dct2d_top.sv --top-module tb_dct2d_top
./obj_dir/Vtb_dct2d_top
```

To test another unit, replace `tb_dct2d_top` with that unit's testbench.
Each testbench runs in well under a second. Every testbench passes. Each one
was also run against a copy of its unit with a deliberate bug (a dropped sign
flip, a wrong permutation, missing rounding, an early bank switch, and so
on), and each such bug was caught.

To change the arithmetic, set `PIX_W`, `T_W`, `T_FRAC` and `OUT_W` on
`dct2d_top`. The `SHIFT` values of the two SCDCTs follow from `T_FRAC`. For
inputs wider than 9 bits, widen `T_W` and `OUT_W` by the same amount. To use
the SCDCT alone, instantiate `scdct` and feed it `(frame, u)` pairs in any
order.
