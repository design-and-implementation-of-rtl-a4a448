# Root-raised-cosine FIR interpolator with 2-bit BCSE multipliers

This design is a pulse-shaping filter for a digital transmitter. Each input
sample (a symbol) comes out as four output samples shaped by a square-root
raised-cosine (RRC) pulse with roll-off 0.22. It saves area in two ways:

1. **Short window.** The full RRC prototype spans ±6 symbols, which is
   2·6·4+1 = 49 taps. Only its centre 7 taps are kept, through a rectangular
   window. The taps are symmetric, so they need just 4 distinct coefficients.
2. **No multipliers.** Each coefficient multiplication is a fixed shift-and-add
   network built with *2-bit binary common subexpression elimination* (BCSE).
   The coefficient is read two bits at a time. The only 2-bit pattern that
   needs an adder is `11` (= 3x), so 3x is computed once and shared.

At the default size (16-bit data, 16-bit coefficients) the filter has 183
flip-flops and no hard multipliers.

## Data flow

```
 rrc_in ─► data_generator ─► coef_interp_unit ───────────────────────────► accum_unit ─► rrc_out
  (16b)    sample every      zero-stuffed 7-tap delay line u[0..6]          string of     rrc_acc
           4th enabled cycle  pre-adders u[i]+u[6-i], centre u[3]           adders, round rrc_sat
                              4 × bcse_const_mult (h0..h3)                  and saturate
                                  └─ 8 × bcse_basic_unit each
```

| module              | role |
|---------------------|------|
| `rrc_pkg`           | interpolation factor, window length, 25-entry prototype table, coefficient rounding function |
| `data_generator`    | phase counter modulo 4; registers `rrc_in` in phase 0 |
| `coef_interp_unit`  | zero stuffing, tap delay line, symmetric pre-adders, constant multipliers |
| `bcse_const_mult`   | one coefficient: shared 3x, 2-bit groups, 4-level adder tree |
| `bcse_basic_unit`   | partial product of one 2-bit group: 0 / x / 2x / 3x |
| `accum_unit`        | sums the 4 products, rounds and saturates, registers the output |
| `rrc_interp_filter` | top level |

### Interpolation by zero stuffing

The whole filter runs on one clock at the **output** rate. `clk_en` qualifies
every cycle: while it is low, every register holds. A phase counter in
`data_generator` divides the enabled cycles into groups of four:

* In phase 0, `in_ready` is high and `rrc_in` is registered at the rising edge.
* At the next enabled edge, that sample enters the tap delay line.
* At the three enabled edges after that, zeros enter instead.

So the delay line always holds the upsampled sequence `x0 0 0 0 x1 0 0 0 …`.
The upsampling happens *before* the coefficients are applied. In that sequence,
only taps 0 and 4, 1 and 5, 2 and 6, or 3 alone hold non-zero values at a
time, depending on the phase. The hardware does not use this (there is no
polyphase decomposition). The delay line is 7 words deep and is the direct
form of the zero-stuffed convolution.

### Symmetry

The window is symmetric: `h[i] = h[6-i]`. The unit therefore adds `u[i] + u[6-i]`
(17 bits) before multiplying. This needs 3 pre-adders and only four constant
multipliers (`h0 = h6`, `h1 = h5`, `h2 = h4`, `h3` at the centre).

## The 2-bit BCSE constant multiplier

This is the heart of the design. For a constant `C ≥ 0` with bits
`c15 … c0`, split `C` into eight 2-bit groups `g_k = {c(2k+1), c(2k)}`:

```
C·x = Σ_k g_k · x · 4^k ,   g_k ∈ {0, 1, 2, 3}
```

The group values `0`, `x` and `2x` are free: `2x` is a wired shift. `3x`
needs one adder, `x + 2x`. That adder is the common subexpression, built
once per multiplier and shared by all eight groups. Each `bcse_basic_unit`
selects one of `0 / x / 2x / 3x` from its group bits. `bcse_const_mult`
shifts the k-th partial product left by `2k` bits (wiring) and adds the eight
of them in a balanced tree. The logic depth is therefore **1 adder (3x) + 3
tree levels = 4 adders**. The group bits are parameters, so synthesis
removes the selectors and every zero group.

Example: the coefficient `h2 = 14506` = `00 11 10 00 10 10 10 10` (groups 7 to 0).

```
14506·x = 3x·4^6 + 2x·4^4 + 2x·4^3 + 2x·4^2 + 2x·4^1 + 2x·4^0
        = 12288x + 2048x + 128x + 32x + 8x + 2x
```

That is one adder for 3x and five adders for the six non-zero terms.
A negative coefficient would be handled by multiplying by its magnitude and
negating the result. No coefficient in the 7-tap window is negative, but
longer windows (parameter `NTAPS`) have some.

## Coefficients

The prototype is the RRC impulse response, sampled at `t = k/4` symbol periods
(β = 0.22):

```
h(0) = 1 − β + 4β/π
h(t) = [ sin(πt(1−β)) + 4βt·cos(πt(1+β)) ] / [ πt(1 − (4βt)²) ]
```

(`t = ±1/(4β)` never falls on a multiple of 1/4 here.) `rrc_pkg::PROTO`
holds `h(k/4)/h(0)` for `k = 0 … 24`, rounded to signed Q2.30. The centre tap
is exactly 1.0. `rrc_pkg::coef_q(W, NTAPS, j)` rounds entry `|j − (NTAPS−1)/2|`
to a `W`-bit Q2.(W−2) word. For the default window:

| tap          | t (symbols) | h(t)/h(0) | 16-bit value |
|--------------|-------------|-----------|--------------|
| h3 (centre)  | 0           | 1.000000  | 16384        |
| h2 = h4      | ±0.25       | 0.885391  | 14506        |
| h1 = h5      | ±0.50       | 0.589675  | 9661         |
| h0 = h6      | ±0.75       | 0.232625  | 3811         |

The four output phases have DC gains of about 1.12, 1.18, 1.12 and 1.00.
A full-scale input held for several samples therefore saturates `rrc_out`,
which is why `rrc_sat` exists. Scale the input to about 0.85 of full scale
if clipping must never occur.

## Interface and timing (`rrc_interp_filter`)

| port       | dir | width | meaning |
|------------|-----|-------|---------|
| `clk`      | in  | 1 | clock at the output sample rate |
| `reset_n`  | in  | 1 | asynchronous reset, active low; clears every register |
| `clk_en`   | in  | 1 | clock enable; low holds the whole filter |
| `rrc_in`   | in  | `DATA_W` | signed input sample |
| `in_ready` | out | 1 | `rrc_in` is sampled at the next rising edge if `clk_en` is high |
| `rrc_out`  | out | `DATA_W` | output sample: `rrc_acc` rounded to nearest by `COEF_W−2` bits, saturated |
| `rrc_sat`  | out | 1 | `rrc_out` was clipped |
| `rrc_acc`  | out | `DATA_W+COEF_W+1+clog2((NTAPS+1)/2)` (35 at default) | exact sum, `COEF_W−2` fractional bits |

Parameters: `DATA_W = 16`, `COEF_W = 16` (8 to 32), `NTAPS = 7` (odd, up to
49), `INTERP_L = 4`.

* Rate: one output sample per enabled cycle and one input sample every
  `INTERP_L` enabled cycles. Right after reset, the first enabled cycle is
  phase 0. The source must hold `rrc_in` until it sees `in_ready && clk_en`
  at a rising edge.
* Latency: suppose a sample is taken at enabled edge E. It appears in
  `rrc_out`/`rrc_acc` after enabled edge E+2, multiplied by `h0`. The next six
  enabled edges bring `h1 … h6` times it. In general, after enabled edge
  E+2+m the output is `Σ_j h[j]·s(E+m−j)`, where `s` is the zero-stuffed input
  stream.
* The critical path is not pipelined: delay-line register → pre-adder → 4
  BCSE adder levels → 3-adder accumulation chain → output register.

## Where this implementation makes its own choices

The following are not fixed by the design this RTL follows, and are choices
of this implementation:

* The single output-rate clock with `clk_en`, and the `in_ready` sampling
  handshake.
* The asynchronous reset. The reset is active low, as specified.
* The output format: an exact sum, plus a rounded and saturated `DATA_W`-bit
  sample.
* The coefficient normalisation, with the centre tap at 1.0 in Q2.(W−2).
* The ±6-symbol prototype span. This is read from the 49-tap length (2·6·4+1).
* The bit-parallel multiplier with wired shifts. A bit-serial form, with
  shifts made by unit delays, would also fit the shift-and-add description.
  The parallel form was chosen because it gives the stated logic depth of 4
  adders.
* The balanced adder tree inside the multiplier, and the ripple chain in the
  accumulation unit.
* The symmetric pre-adders.

Points to be aware of:

* The window keeps taps ±3 (23% of the peak) and drops taps ±4 (5%). It also
  drops taps ±5 and ±6, although those are still 19% and 17% of the peak.
  The 7-tap window is kept as specified. It is a coarse approximation of the
  RRC pulse: the stop-band rejection is modest, and the zero-ISI property of
  the RRC/RC pair holds only approximately.
* The design is specified at word lengths of 8, 12, 16 and 32 bits. Here
  each of them uses the same width for data and coefficients, and all four
  build from the same prototype table.
* The original FPGA implementation is quoted at about 24.6 k gates and
  73.5 MHz at 16 bits on a Spartan-3E. Simulation cannot check these figures,
  and they were not reproduced.
* The processing steps can be read as a loop over the coefficients (shift,
  add, store, repeat until all coefficients are done). This RTL instead
  evaluates all taps in parallel in one clock cycle per output sample.

## Verification

Each testbench in `tb/` checks itself and prints
`TB_RESULT checks=N failures=M`.

| testbench              | what it checks |
|------------------------|----------------|
| `tb_bcse_basic_unit`   | all four group values over random and extreme operands |
| `tb_bcse_const_mult`   | eight coefficients (the window's four, a negative one, and patterns made only of `01`, `10` or `11` groups) against `*` |
| `tb_data_generator`    | the phase-4 sampling, `x_new`, holding while `clk_en` is low, and a mid-run reset |
| `tb_coef_interp_unit`  | zero stuffing, the pre-adders and the four products; coefficients recomputed from the formula in floating point |
| `tb_accum_unit`        | the exact sum, rounding, and positive and negative saturation |
| `tb_rrc_interp_filter` | end to end at the default parameters, using `rrc_checker` |
| `tb_word_lengths`      | end to end at 8, 12, 16 and 32 bits side by side |

`rrc_checker` is the end-to-end reference model, written independently of the
RTL:

* It recomputes the coefficients from the formula in floating point and
  compares them with the RTL table.
* It zero-stuffs the input with its own phase counter and convolves with
  128-bit integers.
* It checks `in_ready`, `rrc_acc`, `rrc_out` and `rrc_sat` after every
  clock.

The stimulus contains random full-range samples, random `clk_en` stalls,
full-scale positive and negative bursts (to force saturation), an impulse,
and an asynchronous reset in the middle of the run. The top-level test fails
in three cases:

* if no stall, no saturation or no mid-run reset occurred;
* if the input rate is not one sample per four enabled cycles;
* if any output differs from the reference.

To run a test with Verilator (5.x), from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_rrc_interp_filter \
    -y rtl -y tb rtl/rrc_pkg.sv tb/tb_rrc_interp_filter.sv
./obj_dir/Vtb_rrc_interp_filter
```

Substitute any other testbench name. `rrc_pkg.sv` must come first on the
command line, because the package is not found through `-y`.

## Changing the design

* **Another word length:** set `DATA_W` and `COEF_W` on `rrc_interp_filter`.
  The coefficients are re-rounded from the Q2.30 table automatically.
* **A longer window:** set `NTAPS` to any odd number up to 49. The multiplier
  count becomes `(NTAPS+1)/2`, and the `rrc_acc` width grows with it.
* **Another roll-off or span:** regenerate `rrc_pkg::PROTO` from the formula
  above. Keep the centre tap at 2^30. Also change `BETA` in `tb/rrc_checker.sv`
  and `tb/tb_coef_interp_unit.sv`.
* **A higher clock rate:** add a register stage after the pre-adders or
  inside the BCSE tree. The testbenches' reference models then need the
  extra latency.
