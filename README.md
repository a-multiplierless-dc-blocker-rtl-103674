# Multiplierless DC blocker for single-bit sigma-delta bitstreams

A sigma-delta bitstream (one bit per sample, +1 or -1) often carries an
unwanted DC offset. The usual multi-bit DC-blocking filter needs a
multiplier, and it turns the bitstream into a multi-bit signal. This block
removes the offset while keeping the signal single-bit. It uses no multiplier:
its only arithmetic is a few adders and two constant-gain multiplexers.

The idea is a **delta modulator with a sigma-delta modulator in its feedback
path**. The output bits are integrated to estimate the offset. That estimate
is re-encoded as a single-bit stream `s`. Each input bit `x` then has `s`
subtracted from it before the difference is quantised back to one bit. The
structure, the registers in the loop, the second-order variant and the
optimum gain pairs come from Sadik, Hussain and O'Shea, "A Multiplierless
DC-Blocker for Single-Bit Sigma-Delta Modulated Signals", EURASIP Journal on
Advances in Signal Processing, 2007. This RTL is an independent
implementation of that structure. Its word width, overflow handling, reset and
sample strobe are this design's own choices (see "Where this RTL departs
from the article").

## The loop

```
            +------------------------------------------------------+
            |                                                      |
 x(n) --(+)-+- u(n) --[P1: sgn, register]--+-- y(n) (output)        |
         -^                                |                        |
          |                                v                        |
          |                          [alpha: +/-alpha mux]          |
          |                                |                        |
          |                        [ + ]<--+  w: accumulator with   |
          |                          |     |  z^-1 (alpha_integrator)
          |                          +-----+                        |
          |                                | w(n)                   |
          |                                v                        |
          +------- s(n) ---- [sigma-delta modulator, gain beta] ----+
                             (sdm1: first order, sdm2: second order)
```

The loop computes, once per sample:

| quantity | recurrence | module |
|---|---|---|
| difference | `u(n) = x(n) - s(n)`, one of -2, 0, +2 | `p1_quantiser` |
| output | `y(n+1) = +1 if u(n) >= 0 else -1` | `p1_quantiser` |
| offset estimate | `w(n+1) = w(n) + alpha*y(n)` | `alpha_integrator` |
| feedback, order 1 | `s(n) = sgn v(n-1)`, `v(n) = v(n-1) + w(n) - beta*s(n)` | `sdm1` |
| feedback, order 2 | `s(n) = sgn v2(n)`, `v1(n) = v1(n-1) + w(n) - beta*s(n)`, `v2(n+1) = v2(n) + v1(n) - beta*s(n)` | `sdm2` |

If `y` has a positive mean, `w` rises. The density of `s` then rises
(over many samples it tracks `w/beta`), and more is subtracted from `x`. In
steady state this pushes the mean of `y` towards zero. `beta` is the feedback
level of the sigma-delta stage: its input `w` must stay within about `±beta`
(first order) or `±beta/2` (second order) for `s` to follow it.

A linear model of the loop treats each 1-bit quantiser as unity gain plus
noise. In that model the signal transfer function is a second-order high-pass
with zeros at `z = 1` (DC) and `z = 1 - beta`. Its poles are set
by `alpha` and `beta` together: `alpha = 0` puts the poles on the zeros, so
`alpha` sets how far they are pulled apart and hence the bandwidth. For the
first-order stage the linear model is stable for `alpha < beta < 2`.

### Registers and latency

There are three registers in the outer loop:

- the P1 register: `y(n) = sgn u(n-1)`;
- the accumulator register: `w`;
- the sigma-delta integrator register: `s(n) = sgn v(n-1)` for order 1, and
  `sgn v2(n)` for order 2.

From input to output the latency is exactly one sample: `x(n)` shows up in
`y(n+1)`. No path is combinational from `x` to `y`. `s` is decoded
combinationally from an integrator register (its inverted sign bit), and `u`
is combinational from `x` and `s`.

## Gains without multipliers

`alpha*y` and `beta*s` are products of a constant and a signal that is only
ever +1 or -1. The product is therefore either `a` or `-a`, and both are fixed
numbers. `sign_mult` is K two-input multiplexers. Bit `i` of the result is
`a[i]` when the select bit stands for +1 and `(-a)[i]` when it stands for -1.
The negation happens at elaboration time. Synthesis reduces each bit to a
wire, a constant or an inverter of the select. The integrators are then
plain adders, with no multiplier anywhere.

## Number format and gain pairs

Every multi-bit word (`w`, `v`, `v1`, `v2` and the gain constants) is signed
two's complement with an LSB of `2^-FRAC_W`. `FRAC_W = 10` is the 10-bit
resolution of the published optimum search, which stepped the gains by
`2^-10`. Gains are given as real numbers and rounded to that grid at
elaboration:

| `SDM_ORDER` | alpha | beta | on the 2^-10 grid |
|---|---|---|---|
| 1 (default) | 0.0205 | 0.2705 | 21, 277 |
| 2 | 0.0127 | 0.0508 | 13, 52 |

These are the published optimum pairs for each order; the defaults of
`ALPHA` and `BETA` follow `SDM_ORDER`. `DATA_W = 16` leaves 5 integer bits
of headroom. All integrators **saturate** at the ends of the 16-bit range
instead of wrapping, and the `sat` output flags any sample in which one
clipped.

## How the structure behaves: the tie at u = 0

Both `x` and `s` are ±1, so `u = x - s` is -2, 0 or +2. The quantiser rule
maps `u >= 0` to +1, so the tie `u = 0` (whenever `x = s`) always gives
`y = +1`. The consequences are easy to miss:

- `y = -1` is only possible in samples where `x = -1` and `s = +1`.
- A **negative** offset can be removed. The loop makes `s = +1` often enough
  during `x = -1` samples to balance `y`.
- A **positive** offset cannot be removed. `y` is +1 in every sample where
  `x = +1`, so the mean of `y` cannot fall below the mean of `x`. The loop
  then drives `w` into its upper limit, `s` sticks at +1, `u = x - 1`, and
  `y` equals `x`.

Measured on the RTL and the bit-exact reference model. The input is an
offset ±0.5 plus a tone of amplitude 0.25 at 1/500 of the sample rate and
noise 20 dB below the tone, encoded by an ideal second-order sigma-delta
encoder. Values are taken over the second half of 50 000 samples:

| configuration | input offset | mean of y | tone amplitude in → out |
|---|---|---|---|
| order 1 (default) | -0.5 | -0.0001 | 0.250 → 0.038 |
| order 1 (default) | +0.5 | +0.4999 | 0.250 → 0.250 (y = x) |
| order 2 | -0.5 | -0.0045 | 0.250 → 0.304 |
| order 2 | +0.5 | +0.4999 | 0.250 → 0.250 (y = x) |

With a -0.5 offset, sawtooth and AM-FM inputs are handled as well. The mean
of `y` stays within ±0.004 in both orders. The sawtooth fundamental goes from
0.159 to 0.022 (order 1) and to 0.218 (order 2).

So the second-order configuration does what the structure promises for a
negative offset: the offset is gone and the tone survives. The first-order one
removes the offset but also most of the tone. Neither removes a positive
offset. The article reports offset removal for a +0.5 offset from a
floating-point simulation and does not say how the tie was resolved there.
This RTL keeps the stated rule (`u >= 0` → +1) and does not invent a tie-break.
To experiment, change the one line in `p1_quantiser` that registers `y`.
Inverting the input and output bits mirrors the behaviour, so a design whose
offsets are known to be positive can use the block as it stands.

## Where this RTL departs from the article, or fills gaps

- **Delays.** The block diagram labels the quantiser outputs
  `y(n) = sgn[u(n-1)]` and `s(n) = sgn[v(n-1)]`, and draws a `z^-1` in the
  accumulator. That gives three registers around the outer loop. The
  article's transfer-function denominator corresponds to two. The RTL follows
  the block diagram.
- **Second-order stage gains.** The second-order modulator diagram shows its
  two feedback taps without a gain. Here both are scaled by `beta`, the
  feedback gain of the stage it replaces.
- **Input adder.** `s` is subtracted from `x` unscaled; `beta` only scales
  the feedback inside the sigma-delta stage. This matches both the diagram and
  the linear-model denominator, which has `alpha` and not `alpha*beta`.
- **Own choices:** `DATA_W = 16`; saturating integrators; an asynchronous
  active-low reset that clears all integrators and sets `y = +1`; a sample
  strobe `en`; and bit 1 standing for +1. The default configuration is the
  first-order stage, which is the structure the article presents first. The
  second-order stage is a parameter away.
- **Test signal.** The published test offset is 0.5 with a tone "half as
  large" (amplitude 0.25). The tone frequency of 4096 Hz is placed at 1/500
  of an assumed 2.048 MHz bit rate, inside the band of an oversampling ratio
  of 32. No sample rate is published. The FM test uses a modulation index of 5
  and a modulating frequency of 1/25 000 of the sample rate; both are assumed.
  The sawtooth (period 500 samples) and AM-FM (50 % AM at 1/10 000) tests
  are named in the article without parameters; theirs here are assumed.
- **Not reproduced:** the SNR figures of merit, the gain sweeps that
  produced the optimum pairs, and the spectra. The testbenches measure mean
  and tone amplitude only.

## Modules

| file | what it is |
|---|---|
| `rtl/dcb_pkg.sv` | package: default widths, the two published gain pairs, gain rounding |
| `rtl/sign_mult.sv` | ±constant multiplier built from K multiplexers |
| `rtl/p1_quantiser.sv` | `u = x - s` and the registered sign quantiser P1 |
| `rtl/alpha_integrator.sv` | `alpha*y` accumulator, saturating |
| `rtl/sdm1.sv` | first-order sigma-delta feedback stage |
| `rtl/sdm2.sv` | second-order sigma-delta feedback stage |
| `rtl/dc_blocker.sv` | top: the loop, `SDM_ORDER` selects `sdm1` or `sdm2` |

`dc_blocker` ports: `clk`, `rst_n` (async, active low), `en` (sample strobe),
`x` (input bit), `y` (output bit), and, for observation, `s` (feedback bit),
`u` (x - s), `dc_est` (`w`), `sdm_v` (the integrator whose sign is `s`) and
`sat`. One sample is taken on each rising edge of `clk` with `en = 1`.

Synthesised (coarse, 16-bit, order 1), the whole blocker is 33 flip-flops
plus a handful of adders, comparators and multiplexers.

## Testbenches

Each testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. Each also has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_sign_mult` | four constants (incl. negative, 10-bit), both selects |
| `tb_p1_quantiser` | `u`, the sign rule, one-sample latency, strobe hold, reset, all (x, s) pairs |
| `tb_alpha_integrator` | accumulator and clip flag against an integer model, both limits |
| `tb_sdm1`, `tb_sdm2` | integrators bit-exact; bit density tracks constant inputs; clipping past range |
| `tb_dc_blocker` | both orders side by side, random strobe, three offsets; every output bit-exact against a reference model; counts strobe stalls, ties, clipping, feedback activity, offset removal |
| `tb_dc_blocker_full` | default parameters; tone, FM, sawtooth and AM-FM inputs with ±0.5 offsets; bit-exact, measured means/tone, negative offsets must be removed |
| `tb_dc_blocker_sdm2_workload` | the same signals with `SDM_ORDER = 2`; also requires offset removal and tone retention |

`tb/dcb_tb_pkg.sv` holds the cycle-accurate integer reference model
(`dcb_ref`), which is written from the recurrences above and shares no code
with the RTL. It also holds the ideal sigma-delta encoder that makes the input
bitstreams, and a Gaussian noise source.

To run one with plain Verilator (from the directory holding `rtl/` and
`tb/`):

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/dcb_pkg.sv tb/dcb_tb_pkg.sv tb/tb_dc_blocker_full.sv \
  --top-module tb_dc_blocker_full -o sim
./obj_dir/sim
```

The packages are listed first; Verilator finds the modules through `-I`.
Replace the testbench name to run any other one.

Each testbench runs in well under a second.

## Changing it

- `SDM_ORDER` (1 or 2) picks the feedback stage and, unless overridden, its
  gain pair.
- `ALPHA` and `BETA` are reals, rounded to the `2^-FRAC_W` grid. Both must be
  positive. For the first-order stage the linear model needs
  `alpha < beta < 2`.
- `FRAC_W` sets the resolution and `DATA_W` the headroom. Keep `DATA_W` wide
  enough that `w` and the integrators do not clip in normal operation; `sat`
  shows when they do.
- The reference model in `tb/dcb_tb_pkg.sv` takes the order, width and the two
  quantised gains, so the bit-exact checks follow any such change.
