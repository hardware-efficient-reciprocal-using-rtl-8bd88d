# Pipelined reciprocal by second order harmonized parabolic synthesis

This RTL computes `z = 1/v` for a mantissa-like operand `1 <= v < 2`. It takes
one operand per clock and returns the result seven clocks later. It needs no
division and no iteration. The unit uses two small lookup tables, two squarers
and two multipliers. One multiplier scales a square and the other combines
two partial results. The mean error over all 32768 operands is 1.55e-5, and
the largest is 3.75e-5, which is about 2.5 LSB of the 16-bit result.

The method follows the published *Hardware Efficient Reciprocal Using Second
Order Harmonized Parabolic Synthesis and Squaring Shrunk Method*. Its final
architecture combines three ideas:

1. A **second order first sub-function**. It carries most of the curve, and
   what it leaves for the table-driven part is symmetric about the middle of
   the input range.
2. **Non-linear interpolation** of that remainder: one parabola per interval.
3. The **squaring shrunk** form `p(x+m)^2 + k` for every parabola. It replaces
   the two multipliers of `a2 x^2 + a1 x + a0` with one squarer.

The default configuration has 16 intervals, a 15-bit normalised input and a
16-bit normalised output.

## The mathematics

### Normalisation

The core works on the unit square. It does not use `1/v` directly:

    x = v - 1                 0 <= x < 1      (pre-processing)
    y = 2/(1+x) - 1           0 <  y <= 1     (the function approximated)
    z = (y + 1) / 2           1/2 < z <= 1    (after-processing)

With the formats below, the pre-processing is only the removal of the integer
bit of `v`. The after-processing is an addition of 1/2 and a move of the
binary point.

### Two sub-functions

Harmonized parabolic synthesis writes `y = s1(x) * s2(x)`. Here `s1` is a
fixed second order polynomial:

    s1(x) = 1 - x(3 - x)/2  =  0.5 (x - 1.5)^2 - 0.125

`s1(0) = 1` and `s1(1) = 0`, like `y` itself. The second sub-function has to
follow the *help function*:

    f1(x) = y(x) / s1(x) = 2 / ((1 + x)(2 - x))

`f1` is a shallow bowl between 8/9 and 1, and it is exactly symmetric:
`f1(x) = f1(1 - x)`. By contrast, the first order choice `s1 = 1 - x` leaves a
help function that falls steeply from 1 to 1/2 and has no symmetry.

### Second sub-function: piecewise parabolas

The interval index `i` is the top `n` bits of `x`, which gives `I = 2^n`
intervals. The remaining `15 - n` bits form `x_w`, the position inside the
interval, read as a fraction in `[0,1)`. Per interval, `f1` is replaced by the
parabola through its values at the start, middle and end of the interval:

    l = f1(x_start)
    d = f1(x_end) - f1(x_start)
    c = 4 (f1(x_mid) - l - d/2)
    j = d + c
    s2 = l + j x_w - c x_w^2

Completing the square gives the form the hardware evaluates:

    s2 = p (x_w + m)^2 + k,   p = -c,   m = -j / (2c),   k = l + j^2 / (4c)

The symmetry of `f1` makes interval `I-1-i` the mirror image of interval `i`.
The two intervals share `p` and `k`, and `m_{I-1-i} = -(1 + m_i)`. So `p` and
`k` are stored for the lower half of the intervals only, and `m` for all of
them. For an index in the upper half, the `p`/`k` address is the one's
complement of the lower index bits.

The tables are not typed in. `hps_pkg` holds functions that evaluate the
formulas above in real arithmetic at elaboration time. They round each value
to nearest in the table format. Changing `N` therefore regenerates all three
tables. For the default `N = 4` the stored integers are:

| i | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| P (p·2^18) | 713 | 621 | 551 | 498 | 459 | 432 | 414 | 406 |
| K (k·2^17) | 119351 | 118161 | 117380 | 116908 | 116657 | 116547 | 116513 | 116508 |
| M (m·2^11), i = 0..7 | -11747 | -11138 | -10247 | -9071 | -7621 | -5931 | -4050 | -2047 |
| M (m·2^11), i = 8..15 | -1 | 2002 | 3883 | 5573 | 7023 | 8199 | 9090 | 9699 |

`m` ranges over roughly ±5.7, and the offset `x_w + m` stays inside ±8. This
is why `m` carries integer bits while `x_w` is a pure fraction.

## Number formats

All signals are unsigned unless marked otherwise. The notation `a.b` means
`a` integer bits and `b` fractional bits.

| Signal | Bits | Format | Notes |
|---|---|---|---|
| `v` | 16 | 1.15 | operand |
| `x` | 15 | 0.15 | `v` without its integer bit |
| `3/2 - x` | 17 | 2.15 | magnitude of `x - 3/2` |
| `(x - 3/2)^2 / 2` | 16 | 1.15 | squarer output, truncated |
| `s1` | 15 | 0.15 | `s1(0) = 1` saturates to `1 - 2^-15` |
| `x_w` | 15-N | 0.(15-N) | 11 bits for N = 4 |
| `m` | 15 | signed, N-1 integer, 15-N fractional | |
| `p` | 10 | value `P·2^-(2N+10)` | |
| `k` | 17 | 0.17 | |
| `t = x_w + m` | 15 | same as `m` | |
| `t^2` | 18 | 2(N-1) integer bits | truncated |
| `p·t^2` | 16 | 0.19 | truncated |
| `s2` | 17 | 1.16 | truncated |
| `y` | 16 | 1.15 | truncated product |
| `z` | 16 | 0.16 | `z = 1` (only at `v = 1`) saturates to `1 - 2^-16` |

The bit widths match the published architecture for `n = 4`. The binary point
positions are this design's own. They were chosen so that no intermediate
value can overflow for N = 4, 5 and 6. For all three, the `p·t^2` product
always has its point at 2^-30 before alignment, so one fixed shift serves
every N.

## Pipeline and timing

    clock:        1           2           3          4             5           6        7
    s1 path:  3/2 - x     u^2/2      -1/8, sat   delay        delay
    s2 path:  ROM read    x_w + m    t^2         p * t^2      + k
    core:                                                                  s1*s2 -> y
    post:                                                                           y + 1/2 -> z

- The pipeline accepts a new operand on every clock. It has no stall and no
  back-pressure.
- `in_valid` travels with the data as a shift register. `out_valid` marks each
  result 7 clocks after its operand. The core alone has 6 clocks of latency.
- The coefficient ROM is read synchronously, like an FPGA block memory.
- Reset (`rst_n`) is synchronous and active low. It clears only the valid
  bits. Data registers are not reset; their outputs count only when
  `out_valid` is high.
- `range_err` marks, with the same latency, an operand whose integer bit is 0
  (`v < 1`). Its `z` has no meaning.
- `z_saturated` marks the single case `v = 1`, whose exact result 1.0 is
  clipped.

## Top-level interface (`hps_reciprocal`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous active-low reset of the valid pipeline |
| `in_valid` | in | 1 | `v` is presented this clock |
| `v` | in | 16 | operand, 1.15 |
| `out_valid` | out | 1 | `z` is valid |
| `z` | out | 16 | `1/v`, 0.16 |
| `range_err` | out | 1 | the operand had `v < 1` |
| `z_saturated` | out | 1 | `z = 1` was clipped |

Parameter: `N` (default 4) is the number of interval index bits, giving
`2^N` intervals. The formats are checked for N = 4, 5 and 6.

## Modules

| File | Role |
|---|---|
| `rtl/hps_pkg.sv` | widths, and the real-valued functions that generate the coefficients |
| `rtl/hps_reciprocal.sv` | top: pre-processing, core, after-processing, range flag |
| `rtl/hps_core.sv` | `y = s1 * s2`: both sub-functions, alignment delay, final multiplier |
| `rtl/hps_s1.sv` | first sub-function, 3 stages, no table |
| `rtl/hps_s2.sv` | second sub-function, 5 stages |
| `rtl/hps_coef_rom.sv` | `p`, `m`, `k` tables with mirrored addressing |
| `rtl/hps_squarer.sv` | squaring macro, used in both sub-functions |
| `rtl/hps_post.sv` | `z = (y + 1)/2` with saturation |

For N = 4, synthesis gives 456 ROM bits (8×10 for `p`, 16×15 for `m`, 8×17 for
`k`), two squarers, two multipliers and about 270 flip-flops.

## Accuracy

Measured in simulation over every operand, against the exact `1/v`:

| Intervals | mean \|z error\| | max \|z error\| | mean over 100 evenly spaced points |
|---|---|---|---|
| 16 (N = 4, default) | 1.55e-5 | 3.75e-5 | 1.60e-5 |
| 32 (N = 5) | 1.62e-5 | 4.59e-5 | 1.60e-5 |
| 64 (N = 6) | 1.68e-5 | 5.38e-5 | 1.73e-5 |

With 16 intervals the interpolation error of the parabolas is already far
below one output LSB. The error that remains comes from truncation in the
fixed-point datapath and from the 16-bit result, so more intervals do not
help at these widths. With more intervals they hurt slightly, because `t^2`
keeps fewer fractional bits. The original work reports a mean error of about
1.2e-5 for its 16-interval hardware. It gives no detail of its internal
rounding, so the two figures cannot be compared bit for bit.

## Where this RTL departs from, or adds to, the published method

- **Slope sign.** The published text defines the interval slope as
  `f1(x_start) - f1(x_end)`. With that sign, the parabola does not pass through
  the end point of the interval. This RTL uses `f1(x_end) - f1(x_start)`, which
  makes `s2` meet `f1` at the start, middle and end of every interval.
- **Width of m.** The architecture gives the `m` table as 15 bits. Elsewhere the
  published text speaks of an 11-bit `m`. Here `m` is 15 bits, 11 of them
  fractional, which agrees with both readings.
- **Memory size.** The published implementation reports 216 memory bits for
  this method, without the widths behind that number. This RTL stores
  I/2 + I + I/2 = 2I coefficients in 456 bits at the widths of the published
  block diagram.
- **Resource count.** The published complexity table counts one multiplier,
  two squarers and three adders for this method. Its block diagram, which this
  RTL follows, shows two multipliers and four adders. The reported FPGA result
  of two DSP blocks matches the block diagram.
- **This design's own choices:** the binary points, the rounding of the
  coefficients, the truncation in the datapath, the saturation of `s1` and `z`,
  the 7-stage pipeline, the valid/reset scheme and the `range_err` flag.
  Pipelining is given only as "fully pipelined, one result per clock".
- **Not included:** the designs the method was compared against. These are
  look-up-table Newton-Raphson, first order harmonized parabolic synthesis, and
  the second order variant without the squaring shrunk form.

## Simulating

Each testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog. All of
them need the package files first:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/hps_pkg.sv tb/hps_ref_pkg.sv tb/tb_hps_reciprocal.sv \
        --top-module tb_hps_reciprocal -o sim
    ./obj_dir/sim

| Testbench | What it covers |
|---|---|
| `tb_hps_reciprocal` | whole unit at default parameters. Covers all 32768 operands, random idle clocks, operands out of range, bit-exact results, error bounds, latency 7, and coverage counts (every interval, mirrored reads, both saturations, range errors, back-to-back results). |
| `tb_hps_intervals` | 16, 32 and 64 intervals side by side, bit-exact, with error statistics |
| `tb_hps_core` | normalised core, latency 6, reset, throughput |
| `tb_hps_s1`, `tb_hps_s2` | each sub-function over all inputs, bit-exact and against the exact function |
| `tb_hps_coef_rom` | every table entry for N = 4 and 5, mirror relations, read latency |
| `tb_hps_squarer`, `tb_hps_post` | the squaring macro; the after-processing and its saturation |

`tb/hps_ref_pkg.sv` is a bit-accurate reference model, written separately from
the RTL. It computes the help function as `y/s1` rather than in closed form,
and derives the coefficients itself. Any change to a format or rounding in the
RTL must be mirrored there.

## Changing the design

- **More or fewer intervals:** set `N` on `hps_reciprocal`. The tables follow
  automatically. For N above 6, check that `m` still fits its N-1 integer bits
  (`|m|` grows roughly as `2^(N-1)/3`).
- **Other widths:** they live in `hps_pkg`. The shifts in `hps_s2`
  (`T2_SHIFT`, the alignment by 11 and by 3) and in `hps_core` (`PROD_SHIFT`)
  assume the scalings in the table above.
- **Pipeline depth:** the stage registers are written out explicitly in
  `hps_s1`, `hps_s2` and `hps_core`. If you move them, update `LATENCY` in
  `hps_core` and `hps_reciprocal`, and the delay on `s1`.
