# Approximate multiplier with exact-sum / exact-carry 4:2 compressors

An n x n unsigned multiplier, for error-tolerant signal and image processing, that saves
area and delay by compressing the **lower half** of its partial-product columns with cheap
*inexact* 4:2 compressors. The **upper half** is compressed exactly. The n low columns carry
weights below 2^n, so the errors they make stay bounded and small next to the product. Two
inexact compressors are used. One gets the sum bit always right (**ES**, exact sum). The
other gets the carry bit always right (**EC**, exact carry). In each place the design uses the
one whose correct output matters more for the product.

The multiplier comes in three variants that differ only in the last reduction stage:

| variant   | last stage, low n columns                                   | final adder                 |
|-----------|-------------------------------------------------------------|-----------------------------|
| `P_BASIC` | normal: carries are passed to the next column               | 2n-bit ripple-carry adder   |
| `P_AE`    | each column cut to one bit and its carries dropped; only column n-1 passes its carry on | n-bit adder, upper half only |
| `P_AEER`  | as `P_AE`, plus the error-recovery bit E_R (below)          | n-bit adder, upper half only |

Two systems built on the multiplier are included: a 3x3 image-smoothing kernel and a 27-tap
FIR filter, the filter being meant for ECG denoising.

## The compressor cells

All 4:2 cells take four bits A1..A4 of one column. They return `s` (same weight) and `c` (next
weight). None of them has the carry-in / carry-out chain of a classic 4:2 compressor. In the
tables below the inputs are written A4A3A2A1.

| cell | equations | where it is wrong |
|------|-----------|-------------------|
| `c42_es` (exact sum) | f = A1^A2^A3; s = f^A4; c = ~f \| A4 | c only: 0000 gives 2, 0111 gives 1, 1000 gives 3, 1111 gives 2 |
| `c42_ec` (exact carry) | m = maj(A1,A2,A3), o = A1\|A2\|A3; s = ~(m^A4); c = m&~A4 \| o&A4 | s only: 0000 gives 1, 0111 gives 2, 1000 gives 0, 1111 gives 3 |
| `c42_modexact` | s = xor4 \| E; c = "two or more ones"; E = A1&A2&A3&A4 | never: s + 2c + E is the count of ones |
| `afa` | co = maj(a,b,ci), s = a\|b\|ci | exactly two ones gives 3 |
| `aha` | co = a&b, s = ~co | 0 + 0 gives 1 |
| `fa`, `ha` | exact | never |

`c42_modexact` is the cell of the exact half. Without E it would count 1111 as 3. E is the
compensation bit. It is formed straight from the inputs, in parallel with s and c, and goes into
the same column of the next stage. The carry of `c42_ec` is exact, so `c42_ec` serves where the
carry matters. In `P_BASIC` it is the only 4:2 cell of the low half. In `P_AE` and `P_AEER` it
serves the first stage and column n-1, whose carry enters the exact half. `c42_es` serves the
other low columns of the later stages, where the sum bit dominates.

Note what this means for small operands. For inputs 0000, `c42_es` outputs a carry and `c42_ec`
outputs a sum bit, and `aha` outputs a 1. So the multiplier has a **positive bias**, and 0 x 0
does not give 0. This bias is a property of the cells as specified, not a bug. It dominates the
error for small operands (see *Accuracy*).

## How the partial products are reduced

This is the least obvious part of the RTL. `amul` does not hard-code a wiring diagram. The
package function `amul_pkg::make_plan(n, variant)` computes a reduction schedule while the
design is elaborated. `amul` then builds it with generate loops.

* Stage 0 holds the partial products a[i]&b[k] in 2n columns. Column j has min(j+1, 2n-1-j) bits.
* Each stage has a target height. The targets start at the largest power of two below n and halve
  down to 2. Within a stage the columns are handled from the least significant upward. A column
  first keeps the carries arriving from the column below, which are produced in the same stage.
  It then adds the fewest cells needed to bring its height down to the target. In the low n
  columns a 4:2 cell removes 3 bits, an `afa` removes 2 and an `aha` removes 1. In the upper
  columns `c42_modexact` removes only 2, because E stays in the column. There `fa` and `ha` are
  preferred whenever a 4:2 cell would leave the target out of reach.
* Stages are added until every column holds at most two bits. For n = 8 this takes four stages,
  for n = 12 five, and for n = 16 six.
* Cell kinds are assigned as follows. Low columns: `c42_ec` everywhere in `P_BASIC`; in
  `P_AE` and `P_AEER`, `c42_ec` in stage 1 and in column n-1 and `c42_es` in the other columns
  of later stages; `afa` and `aha` for 3- and 2-bit groups. Upper
  columns: `c42_modexact`, `fa`, `ha`.
* In the generate tree, `g_st[s].g_col[j].v` holds the bits that column j has after stage s.
  `g_st[s].g_col[j].c` holds the carries that column j produces in stage s. In each column the
  outputs are ordered as: incoming carries, 4:2 sums, E bits, full-adder sums, half-adder sums,
  then the bits passed through unchanged.

The schedule is a table of cell counts, packed into one constant so that elaboration stays fast.
It supports n up to 16 and up to 8 stages (`MAXCOL`, `MAXST` in `amul_pkg`).

### Final stage and error recovery

* `P_BASIC`: the two remaining rows are added by `rca`, a 2n-bit ripple-carry adder. It uses `afa`
  cells in its low n positions and exact `fa` cells above them.
* `P_AE`: the last stage reduces each low column to a single bit, using one cell, and drops that
  cell's carry. Only column n-1 sends its carry into column n. Product bits 0..n-1 are these
  single bits. An n-bit exact `rca` adds the two rows of the upper half.
* `P_AEER`: the last-stage carries of the n/4 columns below column n-1 are formed too. The carry
  entering column n is replaced by
  `E_R = C(n-1) | (C(n-2) & ... & C(n-1-n/4))`. For n = 8 this is `E_R = C7 | (C6 & C5)`. E_R
  puts back part of the value that the dropped carries lose.

All three variants are combinational: the product follows the operands in the same cycle. The
carry out of the top column is dropped.

## Accuracy (n = 8, all 65536 operand pairs)

| variant | mean error distance | largest error | products that differ from `P_BASIC` |
|---------|--------------------:|--------------:|---------------------------------|
| `P_BASIC` | 199.9 | 696 | – |
| `P_AE`    | 169.4 | 708 | 65302 |
| `P_AEER`  | 170.5 | 708 | E_R changes 1012 products relative to `P_AE` |

All errors come from the low half. When every partial product of the low half is 0 (a and b both
multiples of 2^(n/2)), the error is a constant bias. The testbench checks this, which shows that
the upper half adds exactly. The published figures for this design are a mean error distance of
about 121 to 130 and a maximum error of 2^(n+1) = 512. This schedule gives somewhat more: a
largest error just under 2^(n+2), and a higher mean. The cause is the positive bias of the
inexact cells on all-zero inputs, together with the greedy placement, which differs from the
hand-drawn original. For n = 12 and n = 16 the largest errors found in 200000 random trials were
about 2^(n+2), again somewhat above the bound.

## The two systems

**`smooth3x3`**: G = sum of alpha[i] x w[i] over a 3x3 pixel window, computed by nine `amul`
instances. The weights are unsigned with `FRAC` fractional bits; an averaging mask sums to
2^FRAC. The output pixel is G >> FRAC, saturated to 2^N-1. The caller supplies one window per
cycle together with `in_valid`. The result appears with `out_valid` **two cycles** later
(products are registered, then the sum).

**`smooth_stream`**: moves that window over a frame. Pixels arrive in raster order, at most one
per cycle, with `pix_valid`. Gaps between pixels are allowed. Two line buffers of `IMG_W` pixels
(default 512) hold the two previous rows. Each incoming pixel shifts the column above it into a
3x3 window register. Once the window lies wholly inside the frame (row ≥ 2, column ≥ 2), it goes
to `smooth3x3`. Only the (IMG_W-2) x (IMG_H-2) interior pixels produce an output; border pixels
produce none. Outputs come in raster order, three cycles after the pixel that completes their
window. The weights must stay stable during a frame. After the last pixel the counters wrap, so
frames can follow back to back.

**`fir27`**: a direct-form FIR, y[k] = sum of h[t] x x[k-t] over t = 0..26. It has a 27-entry
delay line and one `amul` per tap. Samples and coefficients are signed 8-bit. Each tap multiplies
the magnitudes and then restores the sign. The coefficients are an input port, and the caller
keeps them stable. The filter takes one sample per cycle; `y_out` and `out_valid` follow **one
cycle** after `in_valid`. Output width: 2N + ceil(log2 TAPS) = 21 bits, which is full precision.

With the default multiplier (`P_BASIC`), the end-to-end test measured:

* Smoothing: a PSNR of 37.3 dB against exact smoothing, on a full 512 x 512 noisy gradient
  frame with an averaging mask.
* FIR: an RMS deviation of about 7.5 % of the exact output's peak, on a synthetic ECG-like signal with
  a windowed-sinc low-pass. The published results are about 40 dB and below 3 %. The
  multiplier's bias on small operands explains most of the gap.

## Top level

`dsp_top` puts three things side by side:

* the three multiplier variants on shared operands (`mult_a`, `mult_b` → `mult_p_basic`,
  `mult_p_ae`, `mult_p_aeer`);
* the smoothing system (`sm_*`): a pixel stream in, smoothed pixels out;
* the FIR filter (`fir_*`).

`FILT_VARIANT` selects which multiplier variant the two systems use. It defaults to `P_BASIC`.
There is one clock, `clk`, and one synchronous active-low reset, `rst_n`. In the original work,
images and signals were streamed between a host and the board by a vendor co-simulation flow.
That link is not part of this RTL: the filter ports are brought out instead.

Parameters and their defaults: `N = 8` (operand width), `TAPS = 27`, `FRAC = 8`,
`IMG_W = IMG_H = 512`.

## Where this RTL departs from the source description or fills gaps

* **Reduction schedule.** The column-by-column placement is this design's own greedy schedule
  (see above). It follows the stated placement rules and the four-stage depth for n = 8, but not
  a specific drawing.
* **Compressor placement.** The source describes two placements: exact-carry cells in the whole
  low half, and, for the area-efficient design, exact-sum cells in the later stages. `P_BASIC`
  uses the first, `P_AE` and `P_AEER` the second.
* **Modified exact compressor.** It is written as s = xor4 | E, c = "at least two ones". Only
  1111 is then one short, and E makes up for it.
* **Approximate full adder.** Two different sets of equations exist for it. The one used is
  carry = majority, sum = OR, which is the form used inside the exact-carry compressor. The
  approximate half adder uses sum = ~(a&b).
* **`P_BASIC` final adder.** It uses approximate full adders in its low n positions.
* **`P_AE`.** "Carries not generated in the last stage" is read as one cell per low column, with
  its carry unused.
* **`P_AEER`.** E_R replaces the carry C(n-1) entering column n. For n other than 8, E_R is
  generalised to an AND over n/4 columns.
* **Widths, formats and pipelines.** Everything in the two systems beyond the equation and the
  tap count is chosen here: unsigned operands, the pipeline registers, the weight format, the
  sign handling in the FIR, and reset. The source only says that the window moves pixel by
  pixel over the image. The line-buffer window generator, the interior-only output and the
  512 x 512 frame size are this design's choices.
* **FIR coefficients.** The FIR coefficients were designed offline and are not part of the
  hardware, so they are an input port.

## Files

`rtl/`: `amul_pkg` (variant type, schedule), `c42_es`, `c42_ec`, `c42_modexact`, `afa`, `aha`,
`fa`, `ha`, `rca`, `amul`, `smooth3x3`, `smooth_stream`, `fir27`, `dsp_top`.
`tb/`: one self-checking testbench per module, `tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`. `tb_dsp_top` runs the whole design at its default sizes: the
exhaustive multiplier sweep, one 512 x 512 frame and 800 FIR samples. It counts the E
compensation, the P-AE carry drop and the E_R recovery, and fails if any of them never happens.

Simulating, for example the full design:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/amul_pkg.sv tb/tb_dsp_top.sv \
          --top-module tb_dsp_top -o sim && ./obj_dir/sim
```

Use any other `tb_<module>` in the same way. The testbenches generate their own data and read no
files. To try a different width, override `N` on `amul` or `dsp_top`; the schedule supports
N ≤ 16.
