# Inverse square root and inverse by Harmonized Parabolic Synthesis

This RTL computes `z = 1/sqrt(v)` and `zz = 1/v` for a fixed-point `v` in
[1, 4). It uses no iteration and no divider. The main operation is one table
lookup, a few short multiplications and a handful of additions. The accuracy
target is 15 fractional bits: `|z - 1/sqrt(v)| < 2^-15` for every input, and
`z = 1` exactly at `v = 1`.

The range [1, 4) is what a floating-point unit needs. Write the exponent in
base four, `x = v * 4^d` with `v` in [1, 4). Then `1/sqrt(x) = 1/sqrt(v) * 2^-d`,
so the exponent step is trivial and the only hard part is the significand
step built here.

## The idea: a product of two simple factors

Harmonized Parabolic Synthesis (HPS) approximates a function as the product of
two sub-functions, `y = s1(x) * s2(x)`. The work is done on a normalised
variable `x` in [0, 1). Three steps wrap around it:

    v  --pre-->  x = (v - 1)/3                          x in [0,1)
    x  --HPS-->  y = s1(x)*s2(x)  ~  2/sqrt(3x+1) - 1   y in (0,1]
    y  --post--> z = (y + 1)/2    =  1/sqrt(v)
    z  --sq--->  zz = z^2         =  1/v

The normalised target `f_org(x) = 2/sqrt(3x+1) - 1` falls from 1 to 0 over
[0, 1).

* **First factor.** The first factor is in general `s1 = x + c1*(x - x^2)`. This
  design uses `c1 = 0` and rewrites the factor so that it carries the zero of
  `f_org` at `x = 1`: `s1 = 1 - x`. That is a subtraction from a constant, with
  no multiplier.
* **Second factor.** The second factor must then be the "help function"
  `f_help = f_org / s1`. That function is smooth, so a short piecewise
  parabola fits it well. Its closed form needs no division by the vanishing
  `1 - x`:

      f_help(x) = 3 / ( s*(2 + s) ),   s = sqrt(3x + 1),   f_help(1) = 3/8

  [0, 1) is cut into `I` equal intervals, with `I` a power of two. The top
  `log2(I)` bits of `x` are the interval index `xi`. The remaining bits are
  the position `xw` in [0, 1) within that interval. Each interval has its own
  parabola:

      s2 = l2 + j2*xw + (-c2)*xw^2

The payoff of the factoring is the error. The parabola only has to follow a
gently curved `f_help`, not the steep `f_org`. With 32 intervals a
second-order fit already reaches 15 bits.

## Coefficients

For interval `i`, write `a = i/I`, `m = (i + 1/2)/I` and `b = (i + 1)/I`. The
parabola matches `f_help` at the start, the middle and the end of the interval:

    l2 = f_help(a)
    k2 = f_help(b) - f_help(a)
    c2 = 4*f_help(m) - 4*l2 - 2*k2
    j2 = k2 + c2

`f_help` is convex and falling, so `k2 < 0` and `c2 > 0`. The hardware adds
instead of subtracting: the table stores `-c2` as a positive number and `j2`
as a negative one. With 32 intervals `j2` always has its MSB set. That bit is
not stored and is re-attached at the table output.

The table is computed at elaboration (`hps_pkg`: integer square root and
rounded division in 128-bit constant functions), so there is no data file.
`TUNED` selects between two versions of it:

* **`TUNED = 0`**: the constants above, rounded to the stored widths. Every
  data path truncates, and the truncations add up to a mean error of about
  +4.5e-6. That is small, but it is a bias.
* **`TUNED = 1`** (default): each interval's `l2`, `j2` and `-c2` get a
  correction of up to 127 LSBs, listed in `hps_tune_pkg`. Most corrections
  are a few LSBs. The large ones are on the last intervals, where `s1` is
  small and a step of `l2` hardly moves `z`. The corrections were
  chosen by simulating the bit-exact datapath over every input in the
  interval. The rule for choosing them:
  * Keep the maximum error below `2^-15` and keep `z(1) = 1`.
  * Then minimise the interval's absolute mean error.
  * Among sets with `|mean| < 5e-8`, take the one with the smallest absolute
    skewness.

  The rule is the published one. The numbers are this design's own, so they
  will not match any other implementation's table bit for bit.

Interval 0 has `l2 = 1` exactly and `x = 0`, so `y = 1` and `z = 1` at
`v = 1` in both tables.

## Number formats and data-path widths

All values are unsigned unless marked. `Qm.f` means m integral and f
fractional bits.

| signal | meaning | 32 intervals | 512 intervals |
|---|---|---|---|
| `v` | input, Q2.13 | 15 | 15 |
| `x_proto` | `v - 1`, Q2.13 | 15 | 15 |
| `onethird` | 1/3 truncated, LSB 2^-15 (value 10922) | 14 | 14 |
| `x` | Q0.16 | 16 | 16 |
| `xw` | low bits of `x` | 11 | 7 |
| `s1` | `1 - x`, Q1.16 | 17 | 17 |
| `xxw` | top bits of `xw^2` | 12 | 5 |
| `l2` | width / fraction bits | 18 / 17 | 17 / 16 |
| `j2` | signed, width / fraction | 14 (13 stored) / 17 | 10 / 17 |
| `-c2` | width / fraction | 9 / 16 | 9 / 24 |
| `jxw` | `j2*xw`, signed | 14 / 17 | 9 / 16 |
| `cxxw` | `(-c2)*xxw` | 11 / 18 | 6 / 21 |
| `s2p` | `l2 + jxw` | 18 / 17 | 17 / 16 |
| `s2` | `s2p + cxxw` | 18 / 17 | 18 / 17 |
| `y` | `s1*s2`, Q1.15 | 16 | 16 |
| `z` | Q1.16 | 17 | 17 |
| `zz` | Q1.17 | 18 | 18 |

The widths are the published ones. Where only a width is known, the binary
point and which bits are kept are this design's reading. The rule used
throughout is to drop trailing zeros and leading bits that are always zero.
Every narrowing is a truncation: the low bits are dropped.

## Datapath, block by block

**`hps_preproc`** (`x = (v - 1)/3`). `v >= 1`, and the subtrahend is an
integer, so `v - 1` leaves the fraction alone and rewrites only the two
integral bits: `out[1] = v[14] & v[13]`, `out[0] = ~v[13]`. The code 00 cannot
occur. The result is multiplied by the 14-bit constant 0.0101…01₂ and truncated
to 16 bits. The truncated constant makes `x` fall short by up to about 2^-14.
The tuned table absorbs part of that.

**`hps_core`** (`y = s1*s2`).
* `s1` is a negation of `x` with one extra integral bit.
* `xi` and `xw` are bit fields of `x`; no hardware is needed.
* `xw^2` comes from `squarer` and is truncated to `xxw`.
* `j2*xw` uses `mult_su` with a signed second operand.
* `(-c2)*xxw` and `s1*s2` use `mult_su` with unsigned operands.

The two additions are aligned on a common binary point and truncated to
`s2p` and `s2`.

**`hps_lut`**. A constant ROM indexed by `xi`, read combinationally.

**`hps_postproc`** (`z = (y + 1)/2`). `y` is in (0, 1], so adding 1 changes
only the integral bits. Integral bit `y[15]` 0 becomes binary 01 and 1 becomes
binary 10. So `z = {y[15], ~y[15], y[14:0]}`: one inverter. The halving is only
a move of the binary point (Q2.15 read as Q1.16). Synthesis shows most of this
block as wires; that is correct.

**`squarer`** (`zz = z^2`, also `xw^2` inside the core). A folded
partial-product array. Each diagonal bit `a[i]` has weight `2^(2i)` and each
cross product `a[i]&a[j]`, i < j, appears once at weight `2^(i+j+1)`. That is
about half the rows of a general multiplier. The top 18 bits of the 34-bit
square are `zz`.

**`mult_su`**, the semi-generic multiplier. An array multiplier for an unsigned
`x` and a `y` that is either unsigned or two's complement. For a signed `y`,
the row of the sign bit has weight `-2^(WY-1)`. That row is built from `~x`
(sign-extended with ones), and the `+1` of the negation enters as a carry-in
equal to `y[WY-1]`. It is an unsigned array multiplier plus one inverted row,
cheaper than a full signed-by-signed multiplier.

## Interface and timing

`hps_invsqrt` (top):

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous reset, active low; clears `z` and `zz` |
| `v` | in | 15 | Q2.13 input, 1 <= v < 4 (v < 1 is not a valid input) |
| `z` | out | 17 | Q1.16, 1/sqrt(v) |
| `zz` | out | 18 | Q1.17, 1/v |

| parameter | default | meaning |
|---|---|---|
| `INTERVALS` | 32 | number of `s2` intervals: 32 or 512 (others are rejected at elaboration) |
| `TUNED` | 1 | tuned (1) or plain interpolation (0) coefficients |

The whole chain is one combinational stage with registers only on `z` and
`zz`. The result appears one clock edge after `v` is applied, and a new `v`
can be given every cycle. `v` is expected to come from a register in the
surrounding logic. The output-only registers are the published arrangement.
The reset is this design's addition.

## Accuracy

The numbers below are measured by the testbenches over all 24 576 valid
inputs. The error is the output minus the exact value, and "bits" is
`-log2(max |err z|)`. For comparison, the published results for the same configurations
are: 32 intervals, max 2.90e-5, mean 1.3e-8, RMS 6.98e-6, skew -0.019;
512 intervals, max 3.05e-5, mean 1.6e-8, RMS 1.29e-5.

| configuration | max \|err z\| | bits | mean | RMS | skew | max \|err zz\| |
|---|---|---|---|---|---|---|
| 32 intervals, tuned (default) | 2.48e-5 | 15.30 | 3.5e-9 | 6.01e-6 | 0.005 | 4.88e-5 |
| 512 intervals, tuned | 2.65e-5 | 15.21 | 1.8e-8 | 6.05e-6 | 0.019 | 5.08e-5 |
| 32 intervals, untuned | 2.78e-5 | 15.13 | 4.45e-6 | 7.10e-6 | -0.197 | 5.21e-5 |

The 15-bit target holds in every configuration. The tuned tables reach the
published mean error: 28 bits (32 intervals) and 25.7 bits (512 intervals),
against about 26. The 512-interval RMS error is half the published one.
The widths are the same, so the difference most likely comes from where
the binary points sit and where bits are cut, which this design had to
choose. `zz` is `z` squared and truncated.
It has no accuracy target of its own, and its error is about twice that of
`z`.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_mult_su` | all pairs of a 3x3 signed instance, and random plus extreme operands at the widths used in the datapath, against integer products |
| `tb_squarer` | all inputs at 11 bits, and random plus extreme inputs at 17 bits, against `a*a` |
| `tb_hps_preproc` | every `v`: bit-exact against the integer formula, and within 2^-14 + 2^-16 of (v-1)/3 |
| `tb_hps_postproc` | every `y` in [0,1]: `z = (y + 1)/2` exactly |
| `tb_hps_lut` | both tables, both sizes: entries against a real-valued evaluation of the coefficient formulas (±1 LSB untuned; tuned within the search range) |
| `tb_hps_core` | untuned: every `x` against `f_org`; tuned: `x` from every `v` against 2/sqrt(v) - 1, bound 2^-14 |
| `tb_hps_invsqrt` | end-to-end, default parameters (see below) |
| `tb_hps_invsqrt_512` | the same checks with `INTERVALS = 512` |
| `tb_hps_invsqrt_untuned` | the same checks with `TUNED = 0` |

The end-to-end testbenches sweep every valid `v` and check:
* the one-cycle latency;
* `|z - 1/sqrt(v)| < 2^-15`;
* `|zz - 1/v| < 2^-14`;
* `z = zz = 1` at `v = 1`;
* a set of golden vectors from a bit-exact reference model;
* that reset clears the outputs;
* with the tuned table, `|mean error| < 5e-8`.

They also count the cases the design has to handle and fail if one never
occurs: every interval index, each of the three integral codes of `v`, and
both values of the integral bit of `y` (`y = 1` occurs only at `v = 1`). At
the end they print the max, mean, median, standard deviation, RMS and
skewness of the error.

To run one with plain Verilator (5.x):

    verilator --binary --timing -Mdir obj -y rtl --top-module tb_hps_invsqrt \
        rtl/hps_pkg.sv rtl/hps_tune_pkg.sv tb/tb_hps_invsqrt.sv
    ./obj/Vtb_hps_invsqrt

For another testbench, change the module name and the file. The full sweep
takes well under a second.

## Files

    rtl/hps_pkg.sv        formats, widths per interval count, coefficient functions
    rtl/hps_tune_pkg.sv   per-interval corrections of the tuned table
    rtl/hps_invsqrt.sv    top: pre -> core -> post -> squarer, output registers
    rtl/hps_preproc.sv    x = (v-1)/3
    rtl/hps_core.sv       s1, s2 and y = s1*s2
    rtl/hps_lut.sv        coefficient ROM
    rtl/hps_postproc.sv   z = (y+1)/2
    rtl/mult_su.sv        unsigned x signed/unsigned array multiplier
    rtl/squarer.sv        folded squarer

To change a width, edit the `hps_fmt` function in `hps_pkg`. Another interval
count needs its own entry there, with widths re-derived by simulation. If the
tuned table is used, it also needs its own corrections in `hps_tune_pkg`.
Without corrections, use `TUNED = 0`.

## Limits and departures

* Only the significand step is built. The floating-point wrapper (unpacking,
  the base-four exponent, repacking) is not part of this RTL.
* Only 32 and 512 intervals have widths. 64, 128 and 256 intervals are not
  supported.
* The tuned corrections are this design's. The selection rule is the
  published one, so the statistics match the published ones closely but not
  exactly.
* The squarer is a plain folded array, not a specialised squaring algorithm.
* Where only widths were known, the binary-point positions and truncation
  points are this design's reading. Their result is the accuracy above.
* The asynchronous reset is an addition.
* There is no pipelining beyond the output register. The combinational path
  runs through five arithmetic units in series: the 1/3 multiplier, the `xw`
  squarer, the `-c2` multiplier, the `s1*s2` multiplier and the output
  squarer.
