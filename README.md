# An 8-point DCT with five multipliers

The discrete cosine transform (DCT) is at the core of JPEG, MPEG and H.26x.
Computed directly, an 8-point DCT costs 64 multiply-accumulates. Folding the
cosine table by symmetry brings a butterfly version down to about 21
multipliers. This design goes further. It computes the 8-point 1-D DCT with
one butterfly network that holds only **five constant multipliers**, plus
adders and subtractors. Each output comes out multiplied by a known
per-coefficient factor. That factor is left for the stage that follows,
usually a quantiser, which can absorb it at no cost.

The network follows the Arai-Agui-Nakajima (AAN) factorisation, in the
six-step form used for pipelined JPEG encoders.

## What it computes

For signed integer samples `x(0..7)`, let

    X(k) = sum_{n=0..7} x(n) * cos((2n+1) k pi / 16)

The unit returns

    y(0) = X(0)
    y(k) = 2 cos(k pi / 16) * X(k)        k = 1..7

So the scale factors are 1, 1.962, 1.848, 1.663, 1.414, 1.111, 0.765 and
0.390. To get an orthonormal DCT, multiply `y(k)` by `c(k) / (2 * s(k))`.
Here `s(k)` is the factor above, and `c(0) = 1/sqrt(2)`, `c(k) = 1` otherwise.
In a JPEG encoder, fold this into the quantisation table.

## The butterfly

It has six steps. Steps 1 to 3 are additions and subtractions, step 4 is the
five multipliers, and steps 5 and 6 are additions and subtractions again:

| step | operations |
|------|------------|
| 1 | b0=x0+x7, b1=x1+x6, b2=x3-x4, b3=x1-x6, b4=x2+x5, b5=x3+x4, b6=x2-x5, b7=x0-x7 |
| 2 | c0=b0+b5, c1=b1-b4, c2=b2+b6, c3=b1+b4, c4=b0-b5, c5=b3+b7, c6=b3+b6 |
| 3 | d0=c0+c3, d1=c0-c3, d3=c1+c4, d4=c2-c5 |
| 4 | e2=m3·c2, e3=m1·c6, e4=m4·c5, e6=m1·d3, e7=m2·d4 |
| 5 | f2=c4+e6, f3=c4-e6, f4=b7+e3, f5=b7-e3, f6=e2+e7, f7=e4+e7 |
| 6 | y0=d0, y4=d1, y2=f2, y6=f3, y1=f4+f7, y7=f4-f7, y5=f5+f6, y3=f5-f6 |

The constants are:

| name | value | fixed point (12 fraction bits) |
|------|-------|------|
| m1 | cos(4π/16) = 0.70711 | 2896 |
| m2 | cos(6π/16) = 0.38268 | 1567 |
| m3 | cos(2π/16) − cos(6π/16) = 0.54120 | 2217 |
| m4 | cos(2π/16) + cos(6π/16) = 1.30656 | 5352 |

Outputs 0 and 4 are only sums of sums and use no multiplier. Outputs 2 and 6
share one multiplier (m1 on d3). The four odd outputs share the other four.
Here m2 is the term common to the rotation that m3 and m4 would otherwise
each perform in full. This sharing gets the count down to five.

## Number format and accuracy

- Samples are signed, `IN_W` bits wide. The default is 8 bits, which suits
  level-shifted pixels.
- Every internal node and output is `IN_W+4` bits wide. The largest output
  magnitude is |y(1)| < 10.1·2^(IN_W−1), so nothing can overflow.
- Each constant is an unsigned integer `round(m·2^FRAC)`. The default is
  `FRAC = 12`.
- Every product is rounded to the nearest integer: add 2^(FRAC−1), then
  shift right arithmetically. Ties go toward +∞. Everything else is exact
  integer arithmetic.
- The worst-case error against the exact scaled DCT is 1.5 from rounding
  (y3 and y1 each collect three rounded products), plus under 0.4 from the
  quantised constants. The test benches allow 2.0. Across about 3000 random
  and directed vectors, the largest error seen is 1.41.

## Timing and interface of the top level

`dct8_top` registers the input vector when `in_valid` is high. The register
feeds the combinational butterfly, and the eight results are registered at
the output.

- **Rate:** one vector per clock. Idle cycles (`in_valid` low) pass through
  as `out_valid` low.
- **Latency:** 2 clocks. A vector presented in cycle t appears on `y` with
  `out_valid` in cycle t+2.
- **Critical path:** add → add → add → multiply → add → add. This runs from
  input register to output register.
- **Reset:** `rst_n` is active low and asynchronous. It clears only the two
  valid bits, so vectors in flight are dropped. The data registers load only
  under their valid bit and are not reset.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `in_valid` | in | 1 | `x` holds a vector this cycle |
| `x[0:7]` | in | 8 × `IN_W` | samples, signed |
| `out_valid` | out | 1 | `y` holds a result |
| `y[0:7]` | out | 8 × (`IN_W`+4) | scaled coefficients, signed |

Parameters are `IN_W` (default 8) and `FRAC` (default 12).

## Files

| file | contents |
|------|----------|
| `rtl/dct_pkg.sv` | number of points, default widths, the constant enum `M1..M4` and `coef_int()` |
| `rtl/const_mult.sv` | multiply by one constant and round |
| `rtl/dct8_5mult.sv` | the combinational six-step butterfly |
| `rtl/dct8_top.sv` | registered top level with valid handshake |
| `tb/tb_dct_ref_pkg.sv` | floating-point reference: the scaled DCT sum, computed with `$cos` |
| `tb/tb_const_mult.sv` | all four constants, checked for every input whose product fits 12 bits |
| `tb/tb_dct8_5mult.sv` | butterfly against the reference: zero, extremes, impulses, worst-case sign patterns, 3000 random vectors |
| `tb/tb_dct8_top.sv` | top level at default parameters: a random stream with back-to-back vectors and bubbles, an exact 2-cycle latency check, and a reset while vectors are in flight |

Each test bench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog if the simulation hangs.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/dct_pkg.sv tb/tb_dct_ref_pkg.sv \
        rtl/const_mult.sv rtl/dct8_5mult.sv rtl/dct8_top.sv \
        tb/tb_dct8_top.sv --top-module tb_dct8_top
    ./obj_dir/Vtb_dct8_top

To run the other benches, swap `tb_dct8_top` for `tb_dct8_5mult` or
`tb_const_mult`. Each one finishes in well under a second.

## Changing it

- **Wider samples:** set `IN_W`. The internal and output widths follow it.
- **More accurate constants:** raise `FRAC`. The constant values are in
  `dct_pkg` as real numbers, so nothing else changes.
- **Higher clock rate:** the butterfly is one combinational block. To
  pipeline it, cut it at the step boundaries and delay the valid bit to
  match. Step 4 is the natural place for the first cut.
- **Unscaled outputs:** add the per-output factors after `dct8_5mult` (see
  "What it computes"). This costs eight more multipliers, which the design
  deliberately avoids.

## Departures and limits

- Only the five-multiplier structure is implemented. The 21-multiplier and
  10-multiplier butterflies, which it is usually compared with, are not
  included.
- The step equations and constant values are those of the AAN algorithm.
  They reproduce the block diagram of this network: which inputs pair up,
  the add/sub units, which outputs pair up, and the multiplier labels M1
  (twice) to M4. They were checked numerically against the DCT sum.
- Left open by the architecture and chosen here: the fixed-point format, the
  rounding, the widths, and the registers, handshake and reset around the
  network.
- This is a 1-D transform. There is no 2-D DCT (row/column passes with a
  transpose memory) and no quantiser.
- No gate-level area, power or delay figures are given here. The network
  holds 31 adders/subtractors and 5 constant multipliers, each with its own
  rounding adder. The top level adds 162 flip-flop bits.
