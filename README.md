# Twiddle factor multipliers from trigonometric identities (W8, W16, W32)

A pipelined FFT spends much of its area on the rotators between butterfly
stages, which multiply each sample by a twiddle factor
W_N^k = exp(-j 2 pi k / N). Many of those rotators only ever need a small
resolution N (8, 16 or 32 points around the unit circle). For them, a general
multiplier is wasteful. A few fixed shift-and-add constant multipliers and
some multiplexers do the job.

This RTL implements three such rotators:

* **W8**: one constant multiplier, sin(pi/4).
* **W16**: two constant multipliers, cos(pi/8) and sin(pi/8). The third
  factor comes from `sin(pi/4) = 2 sin(pi/8) cos(pi/8)`.
* **W32**: three constant multipliers, cos(pi/8), cos(pi/16) and sin(pi/16).
  The other five factors come from identities:

  ```
  sin(pi/8)   = 2 cos(pi/16) sin(pi/16)
  sin(pi/4)   = 4 cos(pi/8) cos(pi/16) sin(pi/16)
  sin(3pi/16) = sin(pi/16) (2 cos(pi/8) + 1)
  cos(3pi/16) = cos(pi/16) (2 cos(pi/8) - 1)
  ```

Factors of two are wired shifts, so they cost nothing. The W32 multiplier
therefore needs three constant multipliers, one adder, one subtractor and nine
multiplexers, where an obvious design would need seven constant multipliers.

The idea behind all three is octave symmetry. Any angle on the circle can be
folded into the range 0..pi/4, using these steps:

1. exchange cos and sin;
2. negate cos, sin or both;
3. take the angle alpha_m = 2 pi m / N, with 0 <= m <= N/8.

So a W32 rotator needs only cos and sin of 0, pi/16, pi/8, 3pi/16 and pi/4.

## Structure

```
twiddle_mult_top            W8, W16 and W32 rotators side by side
 └─ twiddle_rotator  (N)    complete complex multiplier x * W_N^k, 1-cycle latency
     ├─ twiddle_ctrl (N)    k -> m, multiplier selects, negations, swap
     ├─ w8_ccm / w16_ccm / w32_ccm   x2: one for Re(x), one for Im(x)
     │   └─ const_mult      shift-and-add constant multiplier with rounding
twiddle_pkg                 default coefficients, select/control structs, CSD helper
```

In a 256-point radix-2^5 single-path delay feedback FFT, these three rotators
follow butterfly stages 2, 3 and 4. That FFT also needs a general W256 rotator
and trivial W4 rotations. Neither the FFT pipeline nor the W256 rotator is
part of this RTL.

## The W32 constant multiplier (`w32_ccm`)

This block is the heart of the design, and its wiring is the least obvious
part.

Signal names follow the select bits s0..s4. The input `x` is a WD-bit signed
value.

```
c8     = C8 * x                           (const_mult, rounded)
m2     = s2 ? 2*c8 : c8
add_p  = m2 + x          add_m = m2 - x
c16_in = s1 ? add_m : (s2 ? m2 : x)
c16    = C16 * c16_in                     (const_mult, rounded)
s16_in = s0 ? 2*c16 : (s1 ? add_p : x)
s16    = S16 * s16_in                     (const_mult, rounded)
o1     = s3 ? s16 : x
o2     = s4 ? (s0 ? (s3 ? m2 : 0) : c16) : o1
```

The only valid select words are these five:

| m | angle | s0 s1 s2 s3 s4 | o1 | o2 |
|---|-------|----------------|----|----|
| 0 | 0      | 1 0 0 0 1 | x | 0 |
| 1 | pi/16  | 0 0 0 1 1 | sin(pi/16) x | cos(pi/16) x |
| 2 | pi/8   | 1 0 0 1 1 | sin(pi/8) x = S16·2·C16·x | cos(pi/8) x = C8·x |
| 3 | 3pi/16 | 0 1 1 1 1 | sin(3pi/16) x = S16·(2·C8·x + x) | cos(3pi/16) x = C16·(2·C8·x − x) |
| 4 | pi/4   | 1 0 1 1 0 | sin(pi/4) x = S16·2·C16·2·C8·x | same as o1 |

Things to know:

* **Lane order changes with m.** For m = 0 the factor 1 is on `o1` and the
  zero is on `o2`. For m = 1..3 the sine is on `o1` and the cosine on `o2`.
  The rotator's swap network undoes this: `twiddle_ctrl` folds the exchange
  into its `swap` bit. The source paper's select table lists the two outputs
  in the opposite order to its own schematic. This RTL follows the schematic,
  and the exact-value testbench confirms the result against the identities.
* **Intermediate growth.** `2·C8·x + x` reaches 2.85|x|, and `2·C16·2·C8·x`
  reaches 3.62|x|. Internal nets are therefore WD+2 bits wide. The outputs
  are WD bits, because every final factor is below 1.
* **Other select words are not valid.** They can overflow the WD-bit outputs.
  In this design only `twiddle_ctrl` drives the selects.

## The W16 and W8 constant multipliers

`w16_ccm` forms `c = C8·x`, then feeds either `x` or `2c` to the sin(pi/8)
multiplier. Two output multiplexers give the factor 1. Its select settings
are:

| m | s1 s0 | o1 | o2 |
|---|-------|----|----|
| 0 | 1 0 | x | 0 |
| 1 | 0 0 | cos(pi/8) x | sin(pi/8) x |
| 2 | 0 1 | sin(pi/4) x | sin(pi/4) x |

The order of the two multipliers in the sin(pi/4) path matters. Here cos(pi/8)
is applied first and sin(pi/8) second. The rounding noise of the first
product is then amplified by 2 sin(pi/8) = 0.77. In the opposite order, an
earlier form of this multiplier, it is amplified by 2 cos(pi/8) = 1.85. The
noise variance at this output is therefore 1.59 instead of 4.41 times that of
one rounding, which is worth about one bit of data word length.

`w8_ccm` selects between `x` and `S4·x` for the cosine lane. Its sine lane is
0 for m = 0 and `S4·x` for m = 1.

## From constant multiplier to complex rotator

`twiddle_rotator` computes

```
o = x * W_N^k = (a cos θ + b sin θ) + j (b cos θ − a sin θ),   x = a + jb,  θ = 2πk/N
```

It uses two identical constant multipliers, one on `a` and one on `b`. Each
multiplier output passes through a negate-or-pass multiplexer, and each pair
then passes through a swap network. The resulting lanes are combined as

```
Re(o) = a_lane1 + b_lane2      Im(o) = b_lane1 − a_lane2
```

Lane 1 carries the cosine and lane 2 the sine.

`twiddle_ctrl` derives all of the control from k:

```
q = k / (N/4)            r = k mod (N/4)
oct  = r > N/8           m = oct ? N/4 − r : r
neg_cos = q ∈ {1,2}      neg_sin = q ∈ {2,3}
swap = oct XOR q[0] XOR (N == 32 AND m != 0)
neg1 = swap ? neg_sin : neg_cos      neg2 = swap ? neg_cos : neg_sin
```

The real and imaginary multipliers share the selects, negations and swap.

Timing: the inputs `x_re`, `x_im`, `k` and `in_valid` are sampled on a rising
`clk` edge, and `o_re`, `o_im` and `out_valid` are valid after that same edge.
This gives a latency of one cycle and a throughput of one sample per cycle.
Everything before the output register is combinational. `rst_n` is
asynchronous and active low. The outputs hold their value while `in_valid` is
low.

## Number format, rounding and coefficients

* Data is two's complement. The inputs are WD = 16 bits. The rotator outputs
  are WD+1 bits: |x·W| can reach sqrt(2)·max|x|, and negating −2^(WD−1) needs
  one more bit.
* Each constant is `NUM / 2^FRAC`. `const_mult` recodes NUM into canonic
  signed digits at elaboration time and builds one shifted add or subtract
  per non-zero digit. It then rounds the exact product back to the input's
  scale, half up: `(x·NUM + 2^(FRAC−1)) >>> FRAC`.
* Every constant multiplication is rounded separately. This is where the
  noise model below places its noise sources.
* The default coefficients are held in `twiddle_pkg`. They are optimised
  sets for a precision requirement of about 12 fractional bits:

| multiplier | coefficients | precision |
|------------|--------------|-----------|
| W8  | sin(pi/4) = 2896/4096 | 12.69 bits |
| W16 | cos(pi/8) = 7568/8192, sin(pi/8) = 3135/8192 | 13.25 bits |
| W32 | cos(pi/8) = 60547/65536, sin(pi/16) = 12783/65536, cos(pi/16) = 16069/16384 | 11.73 bits |

Precision here is `-log2(max |factor error|) - 1`, taken over every factor
the multiplier produces. The error is that of the composite factor, such as
`4·C8·C16·S16` for sin(pi/4), not of each constant on its own.

The sets were chosen as whole sets. A rounding error in one constant can
cancel or add to an error in another, so some constants carry more fractional
bits than the requirement. With the W32 set above, the composite factors fall
0.27 bit short of a 12-bit requirement, although every constant on its own
meets it.

`tb_coef_precision` measures these numbers on the RTL. It runs the
multipliers with a 40-bit data path, so that data rounding does not hide the
coefficient error.

The rotator testbenches accept errors of 3 LSB plus a relative 2^-10.

To use another precision, override the `*_NUM` and `*_FRAC` parameters of
the constant multipliers, or change the defaults in `twiddle_pkg`.
`const_mult` sizes its product from `FRAC`, so any fraction length fits.

## Round-off noise

Model each rounding as white noise of 1/12 LSB². That noise is scaled by the
gain of the stages that follow it. The table gives, for each output, the
total gain (the noise variance in units of one rounding, 1/12 LSB²) and the
variance in LSB² measured on the RTL against the model:

| output | gain | measured/model |
|--------|------|----------------|
| W16 sin(pi/4) | 1 + (2 sin(pi/8))² = 1.59 | 0.133 / 0.132 |
| W32 sin(pi/8), sin(3pi/16) | 1 + (2 sin(pi/16))² = 1.15 | 0.096 / 0.096 |
| W32 cos(3pi/16) | 1 + (2 cos(pi/16))² = 4.85 | 0.402 / 0.404 |
| W32 sin(pi/4) | 1 + (2 sin(pi/16))² + (4 cos(pi/16) sin(pi/16))² = 1.74 | 0.144 / 0.145 |
| single multiplications | 1 | 0.083 / 0.083 |

`tb_roundoff_noise` measures these variances on the RTL and requires each one
to be within 10 % of the model.

## What departs from the source design

* **CSD instead of minimum-adder multipliers.** The constant multipliers are
  CSD shift-and-add networks. The source recommends minimum-adder graphs,
  which use fewer adders, but it does not list those graphs. The arithmetic
  result is identical; only the adder count differs. With the default
  coefficients, not counting the rounding constant, the counts are:

  | multiplier | this RTL (CSD) | published (minimum adder) | multiplexers |
  |------------|----------------|---------------------------|--------------|
  | W8  | 4 | 3 | 1 (+1 for the zero) |
  | W16 | 6 | 6 | 4 |
  | W32 | 13 + adder + subtractor = 15 | 11 | 9 |

  The rounding constant adds one more addition per constant multiplier;
  synthesis can merge it into the first adder of the network.
* **Own choices.** The source does not specify any of the following:
  * the 16-bit data width;
  * rounding half up;
  * the output register with its valid flag and asynchronous reset;
  * the WD+1 output width;
  * the zero on the W8 sine lane, which makes its interface match the other
    two multipliers;
  * the equations that decode k.
* **Sign in the noise diagram.** One of the source's noise-model diagrams
  appears to show a subtraction in the sin(3pi/16) path. The RTL adds,
  because sin(3α) = sin α (2 cos 2α + 1).
* **Not included.** The FFT pipeline around the rotators, the W256 general
  rotator, and the reduced-Booth and multiple-constant-multiplication
  baselines that the source compares against.

## Simulation

Each testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/twiddle_pkg.sv \
          tb/tb_twiddle_mult_top.sv --top-module tb_twiddle_mult_top -o sim
./obj_dir/sim
```

Swap in another testbench and top-module name for the others:

| testbench | what it checks |
|-----------|----------------|
| `tb_const_mult` | exact rounded products, three constants and widths |
| `tb_w8_ccm` | exact outputs for both selects, plus an accuracy bound |
| `tb_w16_ccm` | exact outputs for all three selects, plus an accuracy bound |
| `tb_w32_ccm` | exact outputs for all five select words, built from the identities, plus an accuracy bound |
| `tb_twiddle_ctrl` | for every k and N: after negation and swap, the decoded lanes give cos θ and sin θ; the select words |
| `tb_twiddle_rotator` | W32 rotator against x·W: latency, valid gaps, exact results for k = 0 and k = 8 |
| `tb_twiddle_mult_top` | all three rotators at default parameters; counts each m, swap, negation and idle cycle, and fails if any never occurs |
| `tb_roundoff_noise` | output noise variances against the noise model |
| `tb_coef_precision` | precision of the composite factors of each multiplier |

Lint with `verilator --lint-only -Wall -Irtl rtl/twiddle_pkg.sv rtl/twiddle_mult_top.sv`.
The remaining warnings are unused upper bits of the wide rounding and
multiplexer nets, which are intentional.
