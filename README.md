# Pipelined 8-point DCT and IDCT on the modified Loeffler flow graph

Video coders such as MPEG-1/2/4 and H.261/H.263 transform 8x8 pixel blocks
with the discrete cosine transform, usually as eight 1-D transforms along the
rows followed by eight along the columns. This RTL provides the 1-D building
blocks: an 8-point forward DCT and an 8-point inverse DCT. Both use the
modified Loeffler factorisation, which needs only **11 multiplications and
29 additions** per 8-point vector. The design is organised so that each of the
11 multiplications is one instance of a plain signed multiplier. On an FPGA
with embedded DSP blocks (the Altera Stratix family was the original target),
each instance becomes one hard multiplier, and only the adders use logic
cells.

Each transform is a four-stage pipeline that accepts a whole 8-value vector
every clock cycle and returns the result exactly 4 cycles later.

```
                 +------------------+
 dct_x[8] x 9b ->|  loeffler_dct8   |-> dct_X[8] x 12b   (sqrt(8)-scaled DCT)
                 +------------------+
                 +------------------+
 idct_X[8]x12b ->|  loeffler_idct8  |-> idct_y[8] x 15b  (sqrt(8)-scaled IDCT)
                 +------------------+
```

`loeffler_top` places the two pipelines side by side on a shared clock and
reset. Each has its own ports. The DCT output widths match the IDCT input
widths, so the DCT output can drive the IDCT input directly. The round trip
then returns 8 times the original samples.

## The flow graph

The forward transform works on eight "rows" that pass through four stages.
`b(p,q)` is a butterfly (p+q on row p, p−q on row q). `R(n)` is the rotator
described below, and `/√2` is a multiplication by 1/√2.

| stage | even half (rows 0-3) | odd half (rows 4-7) |
|---|---|---|
| 1 | `b(i, 7-i)` for i = 0..3: sums go to rows 0-3, differences to rows 7-i | |
| 2 | `b(0,3)`, `b(1,2)` | `R(3)` on rows (4,7), `R(1)` on rows (5,6) |
| 3 | `b(0,1)` gives X0, X4; `R(6)` on rows (2,3) gives X2, X6 | `b(4,6)`, `b(7,5)`: row 6 is X5, row 5 is X3 |
| 4 | — | rows 4 and 7 `/√2`, then `b(7,4)`: X1 on row 7, X7 on row 4 |

The output rows come out in the order 0, 4, 2, 6, 7, 3, 5, 1. The RTL reorders
them so that the output port `X[k]` is coefficient k.

Operation count: 3 rotators × 3 multiplications + 2 × (1/√2) = 11
multiplications. Additions: 8 + 4 + 6 + 5 + 4 + 2 = 29. This count includes
the three pre- and post-adders of each rotator and leaves out the
constant-add rounding steps.

### The rotator with three multipliers

A rotator maps a pair `[I0, I1]` to

```
O0 =  a·I0 + b·I1        a = k·cos(nπ/16)
O1 = −b·I0 + a·I1        b = k·sin(nπ/16),  k = √2 for every rotator here
```

Written directly, that takes four multiplications. The rotator shares one
product between the two outputs:

```
O0 = (b − a)·I1 + a·(I0 + I1)
O1 = −(b + a)·I0 + a·(I0 + I1)
```

That is one pre-adder, three multipliers with constants `a`, `b−a` and
`−(b+a)`, and two post-adders (`rtl/rotator.sv`). The constants for each angle
are in `rtl/loeffler_pkg.sv`, with the formula they come from. The gain
√2·(|cos|+|sin|) is below 2 for n = 1, 3 and 6, so the outputs need only one
bit more than the inputs.

### Why the outputs are scaled by √8

The graph does not compute the orthonormal DCT

```
X[k] = c(k)/2 · Σ x[n]·cos((2n+1)kπ/16),   c(0) = 1/√2, c(k>0) = 1,
```

but **√8 times it**. For example, `dct_X[0]` is simply the sum of the eight
samples. The scale is left in place on purpose. Removing it would need a
multiplier on every output, which breaks the 11-multiplication budget. In a
row-column 2-D transform the two passes together give a factor of exactly 8,
which is a shift by 3. The IDCT carries the same √8 factor, so
`idct(dct(x)) = 8·x`.

Bounds (for DW-bit inputs):

- **DCT:** |X[0]| reaches 8·2^(DW−1) only when every input is the most
  negative value, and every other coefficient stays below that. So DW+3
  output bits are enough: 9-bit samples give 12-bit coefficients.
- **IDCT:** each output is at most √8·(1/√8 + ½·Σ|cos|)·2^(DW−1) ≈
  7.47·2^(DW−1). That also fits in DW+3 bits.

An assertion in each transform checks the output range on every valid
result.

## The inverse transform

`loeffler_idct8` is the forward graph run backwards, i.e. its transpose. The
stages run in the order 4, 3, 2, 1:

- Butterflies are their own transpose.
- The two 1/√2 multipliers stay where they are.
- Each rotator R(n) becomes R(−n). In the package, negating the angle swaps
  the `b−a` and `−(b+a)` constants and keeps `a`.

The inverse therefore also needs 11 multiplications and 29 additions, and
reuses the same `rotator`, `butterfly` and `isqrt2_scale` modules.

## Fixed-point arithmetic

- Inputs are sign-extended to an internal width `W = DW + GUARD + 5` and given
  `GUARD = 3` fractional bits. The internal width of the DCT is 17 bits, so
  every DCT multiplier is at most 18 × 16 bits and fits one 18×18 DSP
  multiplier. The IDCT, with 12-bit inputs, runs at 20 bits, but it narrows
  each multiplier input to the range that input can reach. The `X1 ± X7`
  inputs to the 1/√2 multipliers need 16 bits, X2/X6 need 15, and the
  stage-C rotator inputs need 17 (bounds in the source). So its multipliers
  fit 18 × 16 as well.
- Constants have 13 fractional bits in 16-bit signed words. The largest is
  16069.
- Each multiplier result is rounded back to the data grid, as is each final
  output. Rounding is to nearest, with ties toward +∞ (add half, then shift
  right arithmetically).
- Measured accuracy against a floating-point DCT/IDCT with the same √8
  scale, over thousands of random and worst-case vectors:
  - DCT error: at most 0.82 LSB.
  - IDCT error: at most 1.24 LSB. Near the largest outputs (≈2^14), the
    13-bit constants cost about one LSB.
  - Round trip: |y − 8x| ≤ 3, i.e. well under one sample step after the
    division by 8.

## Pipeline and interface timing

| signal | meaning |
|---|---|
| `clk` | rising-edge clock |
| `rst_n` | asynchronous, active low; clears only the valid pipeline |
| `in_valid`, `x[8]` / `X[8]` | one input vector, sampled on a rising edge |
| `out_valid`, `X[8]` / `y[8]` | the result, registered, 4 cycles after its input |

There is no back-pressure. A vector can be presented every cycle, and idle
cycles between vectors are fine. Each stage's combinational logic is a
multiplier between two adders at most, followed by a register. On an FPGA,
the DSP block can absorb that register as its output register. The data
registers are not reset, so only the valid flags need initialising. A reset
pulse discards every vector in flight.

## Files

| file | contents |
|---|---|
| `rtl/loeffler_pkg.sv` | coefficient width and fraction, rotator constant table `rot_coef(n)`, `ISQRT2` |
| `rtl/dsp_mult.sv` | signed multiplier, one per hard DSP multiplier |
| `rtl/butterfly.sv` | sum/difference pair |
| `rtl/rotator.sv` | 3-multiplier rotator, angle set by parameter `N` (negative for the IDCT) |
| `rtl/isqrt2_scale.sv` | ×1/√2 with rounding |
| `rtl/loeffler_dct8.sv` | 4-stage DCT pipeline, parameters `DW` (9), `GUARD` (3) |
| `rtl/loeffler_idct8.sv` | 4-stage IDCT pipeline, parameters `DW` (12), `GUARD` (3) |
| `rtl/loeffler_top.sv` | both transforms, parameters `DCT_DW`, `IDCT_DW`, `GUARD` |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself,
with a watchdog in case it hangs. For example, the end-to-end test at the
default sizes:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/loeffler_pkg.sv rtl/dsp_mult.sv rtl/butterfly.sv rtl/rotator.sv \
    rtl/isqrt2_scale.sv rtl/loeffler_dct8.sv rtl/loeffler_idct8.sv \
    rtl/loeffler_top.sv tb/tb_loeffler_top.sv --top-module tb_loeffler_top
./obj_dir/Vtb_loeffler_top
```

What each testbench checks:

- `tb_loeffler_top` (the end-to-end test, about 2000 vectors):
  - streams sample vectors into the DCT in full-rate bursts and with idle
    gaps, using random values and worst-case sign patterns;
  - checks every DCT result against a floating-point cosine sum;
  - feeds each DCT result into the IDCT, checks that result, and checks
    that the round trip returns 8·x;
  - fills the remaining IDCT input slots with random coefficient vectors;
  - checks that the latency is exactly 4 cycles;
  - pulses reset with vectors in flight;
  - counts each of these events and fails if one never occurred.
- `tb_loeffler_dct8` and `tb_loeffler_idct8` test each transform alone.
- `tb_rotator` checks every angle bit-exactly against constants it derives
  from `$cos`/`$sin`.
- `tb_isqrt2_scale` and `tb_butterfly` check every possible input.
- `tb_dsp_mult` checks corner and random operands.

All run in well under a second.

## Choices made here, and limits

- **Scale:** outputs carry the √8 factor described above. No final
  normalising multiplier.
- **Sign convention of the rotator:** O0 = a·I0 + b·I1 and O1 = −b·I0 + a·I1.
  With this convention the graph reproduces the DCT exactly, which was
  checked numerically. Which inputs pair in the odd-half butterflies of
  stage 3 was chosen the same way.
- **IDCT structure:** the transposed forward graph, derived here. The inverse
  was only specified as using the same 11-multiplication/29-addition
  algorithm.
- **Widths:** sample, coefficient and guard widths, the 13-bit constants and
  the rounding mode are all this design's choices. None of them were
  specified.
- **Pipelining:** one register per stage, a valid flag and the reset scheme
  are likewise this design's own.
- **No 2-D transform:** there is no transpose memory or 8x8 block
  controller, only the 1-D transforms.
- **Internal widths:** the adders use one uniform internal width W per
  transform, with about two bits of headroom. Only the multiplier inputs are
  trimmed to their exact ranges. Synthesis removes the unused upper adder
  bits, and the lint reports them as unused signal bits.
- **Not verified:** timing closure (the original implementation reported
  83.33 MHz) and the IEEE 1180 IDCT accuracy test.
