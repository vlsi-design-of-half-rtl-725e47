# Half-band IIR interpolation and decimation filters

An oversampling (delta-sigma) DAC has to raise its input sample rate by a
large factor, here 64, before the modulator. Doing that in one filter is
expensive, so the rate is raised in stages:

```
 x @ fs ─► half-band IIR ×2 ─► half-band IIR ×2 ─► sinc³ ×2 ─► sinc² ×8 ─► y @ 64 fs
             (2 fs)              (4 fs)              (8 fs)      (64 fs)
```

The first two stages do the hard filtering, cutting the spectral images near
the original band edge. They are half-band IIR filters made of two all-pass
branches in parallel. This kind of filter needs very few multipliers: one per
second-order section, two for the whole filter here. In its polyphase form both
multipliers run at the lower of the two sample rates. The sinc stages that
follow only have to remove images far from the signal band, so they can be
simple multiplier-free integrator-comb filters.

The multiplier inside each all-pass section is the costly part, so it comes in
two structures: a carry-save **array multiplier** and a **Wallace tree
multiplier**. The Wallace tree is the default because it is the faster and
smaller of the two. The same all-pass branches also give a single-rate
half-band filter and a decimator by two, which are included.

All RTL is SystemVerilog (IEEE 1800-2017) in `rtl/`, with one self-checking
testbench per block in `tb/`.

## The all-pass section (`allpass2`)

Everything else is built from this cell:

```
A(z) = (a + z^-D) / (1 + a·z^-D)         y[n] = a·(x[n] − y[n−D]) + x[n−D]
```

It needs one multiplier and two adders. The first adder subtracts the delayed
output from the input. The multiplier scales the difference by `a`. The second
adder adds the delayed input. `D = 2` is the cell as it sits in a half-band
filter running at the high rate. `D = 1` is the same cell once the polyphase
rearrangement has moved it to the low rate. Its magnitude response is 1 at
every frequency. All the filtering comes from how the phases of the two
branches combine.

Fixed-point rules (choices of this implementation):

| quantity | format |
|---|---|
| samples `x`, `y` | 16-bit two's complement |
| coefficient `a` | 16-bit Q1.15, value = integer / 32768, range [−1, 1) |
| difference `x − y[n−D]` | saturated to 16 bits, then multiplied |
| product | 32 bits, shifted right by 15 (truncation, toward −∞) |
| output | saturated to 16 bits |

The worst-case gain of an all-pass section, summed over its impulse response,
is up to 1 + 2|a|. A full-scale input can therefore push the section past full
scale, which is why the difference and the output saturate rather than wrap.
Saturation keeps the recursion from jumping across the number range.

The output `y` is combinational: it belongs to the sample now on `x`, and the
multiplier lies inside that single-cycle path. The delay registers advance on
a clock edge with `en` high. There is no pipelining inside the recursion: the
loop from `y[n−D]` back to `y[n]` has to close in one sample period.

## Half-band filter from two branches

The filter is

```
H(z) = A0(z²) + z^-1 · A1(z²),   Ai = product of Ki second-order all-pass sections
```

By default each branch holds one section (`K0 = K1 = 1`). The filter is then
fifth order and has only two coefficients, `a0` and `a1`. The
coefficients are inputs on every block, so one circuit serves any design of
this form. Two properties hold for any pair of coefficients, and the
testbenches use them as checks that do not depend on the model:

* H(1) = 2, so a constant input comes out doubled;
* H(−1) = 0, so a tone at half the sample rate is removed.

The two branches can be arranged in three ways:

**`hb_iir_filter`: single rate.** Both branches use `D = 2` cells. Branch 1
has one extra sample delay, and an adder sums the two branches. One sample
enters per `en` and the output is registered, so the latency is one cycle.
The output keeps the full 17-bit sum, with DC gain 2.

**`hb_interp`: interpolator by two, polyphase.** Filtering after zero-stuffing
is rewritten so that each input sample goes to both branches (`D = 1`, low
rate). A commutator then outputs the branch-0 result followed by the branch-1
result. Each input gives two outputs, and neither multiplier ever works on a
stuffed zero. The DC gain is 1. Timing:

* `ce` marks output-rate cycles. A phase bit toggles on each `ce`.
* On a `ce` with phase 0, `x_take` is high: `x` is taken, both branches
  advance, and `y` becomes the branch-0 result.
* On the next `ce`, `y` becomes the branch-1 result, which was held since the
  previous `ce`.
* `y_valid` follows each `ce` by one cycle. `x` must be steady while `x_take`
  is high.

**`hb_decim`: decimator by two, polyphase.** This is the dual of the
interpolator. Even-numbered input samples go to branch 0 and odd-numbered ones
to branch 1. The output is `y[m] = A0{x[2m]} + A1{x[2m−1]}`: the branch-1
result of an odd sample is held until the next even sample arrives. Timing:

* One sample enters per `x_valid`; the first sample after reset is even.
* `y` and `y_valid` update one cycle after each even sample.
* The output is 17 bits with DC gain 2. Take the upper 16 bits for unity gain.

## Multipliers

Both multipliers take `AW`×`BW` bits (16×16 by default) and produce `AW+BW`
bits. Both are purely combinational and start from the same partial-product
matrix (`mult_pp_gen`). In that matrix, row *i* is the multiplicand ANDed with
multiplier bit *i* and shifted left by *i*.

For signed operands (`SIGNED = 1`, used by the filters) the matrix follows
Baugh-Wooley. A bit is inverted when exactly one of its two operand bits is a
sign bit, and an extra row carries the constant
2^(AW−1) + 2^(BW−1) + 2^(AW+BW−1). Summed modulo 2^(AW+BW), the rows give the
two's complement product, so no sign-extension logic is needed. With
`SIGNED = 0` the matrix is the plain unsigned AND array and the constant row
is zero.

* **`array_mult`** adds the rows one after another. Each row is a layer of
  full adders in carry-save form, which passes its sum and carry vectors to
  the next layer. A ripple-carry adder merges the last two vectors. The delay
  grows linearly with the number of rows.
* **`wallace_mult`** takes the rows in groups of three and reduces each group
  to a sum row and a carry row with one layer of full adders. Leftover rows
  pass through. Layers repeat until two rows remain: 17 rows need 6 layers.
  A Kogge-Stone prefix adder (`prefix_adder`) adds the final two rows. The
  delay grows with the logarithm of the row count. The reduction is written
  row-wise, so a full adder in a column where one input is structurally zero
  is a half adder after synthesis.

`MULT` (of type `hbiir_pkg::mult_kind_e`) chooses the multiplier in every
filter block: `MULT_WALLACE` (default) or `MULT_ARRAY`.

## The interpolation chain (`hbiir_top`)

`hbiir_top` connects the four stages above from a single clock at 64 fs.
A modulo-64 counter makes the clock enables:

| stage | module | output rate | enable |
|---|---|---|---|
| half-band 1 | `hb_interp` | 2 fs | every 32 clocks |
| half-band 2 | `hb_interp` | 4 fs | every 16 clocks |
| sinc³, ×2 | `sinc_interp` (ORDER 3, RATIO 2) | 8 fs | every 8 clocks |
| sinc², ×8 | `sinc_interp` (ORDER 2, RATIO 8) | 64 fs | every clock |

Each stage reads the registered output of the stage before it when its own
`x_take` is high. Because all counters leave reset together, every
intermediate sample is consumed exactly once.

`sinc_interp` realises ((1 − z^−R)/(1 − z^−1))^N in integrator-comb form:

* N difference stages run at the input rate;
* zeros are stuffed in between input samples;
* N accumulators run at the output rate.

Its DC gain is R^(N−1), and its registers are just wide enough for the output:
IN_W + (N−1)·log2 R bits. Intermediate values may wrap around; two's
complement arithmetic cancels the wrap by the output. The chain output is
therefore 21 bits with a DC gain of 4 · 8 = 32. The latency from taking a
sample to its first effect on `y` is fixed; it measures 56 clocks at the
defaults.

Chain ports:

* `x` (16 bits) must hold its sample while `x_take` is high, which happens one
  clock in 64.
* `y` (21 bits) carries one sample per clock.
* `hb1_coef` and `hb2_coef` are `hbiir_pkg::hb_coef_t` structs `{a0, a1}`, one
  per half-band stage.

Beside the chain, with their own ports, are:

* one `hb_iir_filter`: `flt_coef`, `flt_en`, `flt_x`, `flt_y`;
* one `hb_decim`: `dec_coef`, `dec_x_valid`, `dec_x`, `dec_y`, `dec_y_valid`.

Reset, `rst_n`, is synchronous and active low throughout.

## What comes from the original design and what does not

The following follow the published half-band IIR design:

* the half-band structure H(z) = A0(z²) + z⁻¹A1(z²) built from second-order
  all-pass sections;
* the one-multiplier, two-adder all-pass cell, in its high-rate (z⁻²) and
  low-rate (z⁻¹) forms;
* the polyphase interpolator with its output switch;
* the four-stage fs → 64 fs chain with its stage types, orders and rates;
* the two multiplier structures and the preference for the Wallace tree;
* the 16-bit sample and coefficient buses and 32-bit products.

This implementation's own choices:

* Q1.15 coefficients;
* truncation of the product and saturation of the difference and output;
* one section per branch by default;
* no 1/2 scaling in the single-rate filter and the decimator;
* Baugh-Wooley signed partial products;
* Kogge-Stone as the fast final adder;
* integrator-comb form and widths for the sinc stages;
* the clock-enable scheme that moves samples between stages;
* reset polarity;
* the decimator's structure, which is the standard transpose of the
  interpolator: the original names decimation but does not draw it;
* requantising every section's output to 16 bits. The published simulations
  show 32-bit intermediate buses and a 33-bit filter output. Here the
  recursion feeds back a 16-bit value and the filter output is 17 bits, so
  output values cannot be compared with the published waveforms bit for bit.

Coefficient values are not built in. The testbenches use the pairs
(0x1EFF, 0x3F6A) and (0x1AC8, 0x3383) from the published simulations, plus
random pairs. An earlier multiplier-free half-band structure, against which
the original design was compared, is not part of this RTL.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
A watchdog ends a run that hangs. The reference models in
`tb/hbiir_ref_pkg.sv` are sample-level integer models:

* the all-pass model uses the `*` operator with the same fixed-point rules as
  the hardware;
* the sinc model is a direct FIR whose taps are the N-fold convolution of R
  ones.

None of this shares structure with the RTL.

| testbench | what it checks |
|---|---|
| `tb_array_mult`, `tb_wallace_mult` | exhaustive 4×4 unsigned; 16×16 signed and unsigned corner values and 3000 random pairs against `*` |
| `tb_allpass2` | impulse response against the closed form; random and full-scale streams (saturation) for D = 2 with the Wallace multiplier and D = 1 with the array multiplier |
| `tb_hb_iir_filter` | bit-exact against the model with random enables, also with 2 and 3 sections per branch; DC gain 2; the half-rate tone removed |
| `tb_hb_interp` | bit-exact output order, also with two sections per branch; one input per two `ce`; unity DC gain |
| `tb_hb_decim` | bit-exact; one output per two inputs; DC gain 2; the half-rate tone removed |
| `tb_sinc_interp` | both chain configurations bit-exact against the FIR model; DC gain with wrap-around at full scale |
| `tb_hbiir_top` | whole design at default parameters. The 64 fs output stream equals the chain model at one and only one latency; `x_take` comes every 64 clocks; DC gain 32; the filter and decimator are bit-exact; every mechanism (input taking, commutation, saturation, filter, decimation) is counted and must occur |
| `tb_workload_published` | the two published simulation set-ups (array multiplier with x = 0x5555; Wallace with x = 0x557F; each with its coefficient pair); settled output = 2·x; the Wallace products of the first sample equal the published 32-bit values |

To run one testbench with plain Verilator (here the top):

```
verilator --binary --timing --assert -y rtl -Irtl \
  rtl/hbiir_pkg.sv tb/hbiir_ref_pkg.sv tb/tb_hbiir_top.sv \
  --top-module tb_hbiir_top -o sim
./obj_dir/sim
```

For another testbench, swap in its file and top module. Every testbench here
finishes in seconds.

## Changing the design

* **Multiplier:** set `MULT` on `hbiir_top`, or on any filter block.
* **Sinc stages:** `SINC3_ORDER/RATIO` and `SINC2_ORDER/RATIO` on `hbiir_top`.
  The ratios should be powers of two. The counter and the output width follow
  from them.
* **Word lengths:** `DATA_W`, `COEF_W` and `COEF_FRAC` in `hbiir_pkg`. The
  saturation helper `sat_data` and the testbench models assume two guard bits
  and 16-bit samples, so check both when you change them.
* **More sections per branch:** set `K0` and `K1` on `hb_iir_filter`,
  `hb_interp` or `hb_decim`. Each branch becomes a cascade of that many
  all-pass sections (`allpass_branch`), and the coefficient ports widen to
  `[K-1:0][15:0]` arrays, section 0 first. The sections of a branch share one
  combinational path, so the clock period grows with K.
  `hbiir_top` uses one section per branch.
