# Sigma-delta FIR-DAC for multi-bit sigma-delta modulators

A multi-bit sigma-delta ADC is stable, tolerates clock jitter well, and needs
only modest amplifiers. Its weak point is the outer feedback DAC. That DAC is
built from 2^N − 1 unit elements, and any mismatch between them adds an error
that is a nonlinear function of the output code. The loop does not shape that
error, so it shows up directly in the output as distortion.

The sigma-delta FIR-DAC replaces that outer DAC. It has three parts:

1. **Up-sampling.** The N-bit code y(n) is repeated q times on a clock q
   times faster than the modulator clock, q·fs.
2. **Digital sigma-delta modulator.** A small error-feedback modulator
   re-quantizes the repeated code to three levels, y_d ∈ {−1, 0, +1}. Its
   re-quantization error is shaped away from the signal band.
3. **FIR-DAC.** The three-level stream drives 2q − 1 weighted three-level
   current cells, fed from a short delay line, which together form a sinc²
   FIR filter.

A differential three-level cell is linear whatever its size. A cell
mismatch therefore only bends the FIR response: it cannot distort the
signal. The FIR smooths the fast stream, so the charge error from clock
jitter stays close to that of the multi-bit DAC (4 to 5 dB above it in the
simulations here). The modulator output
becomes the three-level stream y_d at q·fs.

A second variant, the **reduced-rate** FIR-DAC, moves the down-sampling by q
in front of the cell weights. The cells then switch only once per modulator
period, so the DAC runs at fs and can also feed a discrete-time loop.

This repository holds two kinds of code:

- **Digital core:** synthesizable SystemVerilog.
- **Analog parts:** real-valued behavioural models of the loop filter, the
  quantizer and the weighted cells. With them the whole modulator can be
  simulated closed-loop in plain Verilator.

## Signal chain

```
 x_in ─► ct_loop_filter ─x3─► flash_adc ─y_code─►┌──────────── sd_fir_dac (digital, q·fs clock) ────────────┐
 (real)   3 integrators        N-bit               │ sdfd_upsampler ─y_up─► sdfd_dsdm ─y_d─► sdfd_delay_line │
            ▲   ▲   ▲                             │  hold q cycles           2nd-order       2q-2 stages     │
            │   │   └── K3·y  (multi-bit, y_up)    │                          error feedback   taps v_0..v_2q-2│
            │   └────── K2·y  (or K2·y_d)          │                                    sdfd_rr_sampler      │
            │                                      └──────────────────────────── taps / taps_rr ────────────┘
            └────────── K1·dac1 ◄── fir_dac_cells ◄── taps (RR_MODE=0) or taps_rr (RR_MODE=1)
```

| Module | Kind | Role |
|---|---|---|
| `sdfd_pkg` | package | three-level type `tri_t`, `tri_value`, `fir_weight` |
| `sdfd_upsampler` | RTL | phase counter, captures the code once per period, holds it for q cycles |
| `sdfd_dsdm` | RTL | error-feedback digital modulator, three-level output |
| `sdfd_delay_line` | RTL | 2q − 2 stages giving taps v_0..v_{2q−2} |
| `sdfd_rr_sampler` | RTL | reduced-rate tap sampler |
| `sd_fir_dac` | RTL | the four blocks above: the whole digital part |
| `fir_dac_cells` | behavioural | weighted three-level cells, optional mismatch |
| `flash_adc` | behavioural | N-bit quantizer |
| `ct_loop_filter` | behavioural | third-order continuous-time loop filter with inner DACs |
| `eld_fast_dac` | behavioural | optional: one period of loop delay and the fast DAC that compensates it |
| `sd_fir_dac_modulator` | top | the closed-loop modulator |

The digital part is tiny: a phase counter, one held code word, two adders,
two error registers, 2q − 2 two-bit delay stages and, for the reduced-rate
variant, 2q − 1 two-bit hold registers. At the defaults (N = 3, q = 2) this
synthesizes to 37 flip-flop bits in all.

## Number formats and full scale

The analog input, the three-level DAC and the N-bit quantizer share one full
scale of ±1.

- **Quantizer code.** Code c (0 … 2^N − 1, the count of the flash
  comparators' thermometer code) stands for the mid-rise level
  (2c − (2^N − 1)) / 2^N. For N = 3 the levels are ±1/8 … ±7/8.
- **Quantizer thresholds.** The thresholds sit at multiples of 2^−(N−1),
  so the quantizer has unity gain.
- **Digital word.** The held word `y_up` carries the odd integer
  2c − (2^N − 1). It is an M-bit two's-complement number with F = N
  fractional bits, so the three-level output ±1 is ±2^N in the same units.
- **Exact arithmetic.** The input is N bits and F = N, so the digital
  modulator never rounds. Its only error is the deliberate three-level
  re-quantization.

## The digital sigma-delta modulator (`sdfd_dsdm`)

This is the part that needs the most care.

**Structure.** The modulator is an error-feedback loop:

```
v   = u + S(z)·e          S(z) = 2z^-1 - z^-2   (LD = 2, default)  or  z^-1 (LD = 1)
y_d = Q3(v)               round to -1, 0, +1 (thresholds at ±1/2), clip at ±1
e   = v - y_d             the part the quantizer threw away, stored for the next cycles
```

**Transfer.** Substituting gives Y_d = U − (1 − z⁻¹)² E. Two properties
follow:

- The signal transfer is exactly one, with no delay: y_d responds in the
  same cycle that u changes.
- The re-quantization error is shaped by a second-order high-pass.

**Hardware.** The loop costs two adders and two registers. Rounding with
thresholds at ±1/2 equals adding half an output step and then keeping only
the sign and integer bits.

**How the tests check the shaping.** Summing (u − y_d) twice gives back e,
cycle for cycle. The `sdfd_dsdm` testbench checks exactly this identity.

**Stability.** With a second-order FIR error feedback and a three-level
output, the modulator cannot go unstable in the IIR sense, but it can
overload. When the input sits near full scale and the stored errors line up,
|v| exceeds 1.5 and e grows past ±1/2. In the tests, random inputs within
full scale push e to about ±8.5 output steps at worst, far inside the
word. v saturates at the M-bit range instead of wrapping, and `sat` flags
that. No test with inputs within full scale raises `sat`.

**Word length.** M defaults to N + 7: the width needed when the second loop
DAC is driven by y. When y_d drives the second DAC (`DAC2_YD = 1`), N + 3 is
enough. `tb_modulator_dac2_yd` runs that case with M = 6.

**Choosing q.** q must grow with N, roughly as 2^(N/(LD+0.5)). It is 2 for
N = 3 and 3 for N = 4. A smaller q leaves more of the three-level
re-quantization noise in the modulator's own band and costs SNDR.

## The FIR-DAC and its weights

**Taps.** Tap i is the three-level stream delayed by i fast cycles:

- v_0 = y_d itself;
- v_1 … v_{2q−2} come from the delay line.

**Weights.** Each tap drives one differential three-level cell of weight

```
f_i = (i + 1) / q^2        for 0 <= i <= q-1
f_i = (2q - 1 - i) / q^2   for q <= i <= 2q-2
```

This is the impulse response of F(z) = ((1 − z^−q) / (q(1 − z^−1)))², a sinc²
of q taps per sinc with unity gain at DC. For q = 2 the weights are 1/4,
1/2 and 1/4.

**Purpose.** The FIR is a low-pass with its −3 dB point near fs/2. It reduces
the step between consecutive DAC outputs, which is what the jitter error is
proportional to. Its group delay is (q − 1)·Ts/q, less than one modulator
period.

**In silicon.** The cells and their summation are analog current cells
injected into the first integrator's virtual ground. `fir_dac_cells` models
them in `real` arithmetic. `MISMATCH` gives each weight a Gaussian relative
error of that rms value, drawn once from `SEED`.

**Mismatch.** Mismatch changes the filter coefficients only. In the
continuous-time loop the inherent anti-alias filtering of the loop removes
what a distorted F(z) lets through. At 0.2 % rms the simulated SNDR drops by
about 1 dB (86.6 → 85.7 dB). The reduced-rate variant is far more sensitive.
There, mismatch costs 5 to 10 dB on average (see the results below).

**Reduced-rate variant (`sdfd_rr_sampler`, `RR_MODE = 1`).**

- **Sampling.** The taps of sub-period 0, v_i(nq), pass straight through
  during that sub-period. They are captured at its end and held for the
  rest of the period.
- **Rate and delay.** The cells see one tap vector per Ts, and no delay is
  added beyond F(z)'s own.
- **Anti-aliasing.** The sinc² now also serves as the decimation filter of
  y_d. Its out-of-band noise folds back into the band, which costs a few dB
  (79.8 dB against 86.6 dB at the same input).

## Clocking and timing

There is one clock, `clk`, at q·fs. The modulator period Ts is q cycles.

- **Period starts.** `sdfd_upsampler`'s counter `phase` runs 0 … q−1.
  `frame_start` is high during sub-period 0.
- **Code capture.** The quantizer code present at the edge that ends
  sub-period q−1 is captured. During sub-period k of that period,
  y_up(nq + k) = y(n).
- **No added latency.** y_d and tap v_0 are combinational from registers.
  They change in the same cycle the new code is captured, so the only loop
  delay the FIR-DAC adds is its own group delay.
- **Glitch-free cell drive.** A gate-level build should register the cell
  drive or retime it, so the cells do not see glitches. That changes the
  outer-loop delay by one fast cycle.
- **Loop model timing.** `ct_loop_filter` holds the integrator state at
  each edge. It exposes `x3_next`, the last integrator value at the coming
  edge, computed from the inputs held during the current cycle. `flash_adc`
  converts `x3_next`, so the code sampled at a period start is the
  integrator value at that instant. That is an ideal quantizer with no
  excess loop delay. With `ELD` = 1, `flash_adc` converts `vq` instead:
  `x3_next` minus the fast DAC's output. Its code then passes through
  `eld_fast_dac`'s register, which the same edge loads, so it reaches the
  up-sampler one period later.
- **Reset.** `rst_n` is active-low and asynchronous. It clears the phase,
  the held word, the error registers, the delay line and the integrators.
  The first code is captured q edges after reset.

## The loop filter model

`ct_loop_filter` is a third-order feedback continuous-time filter:

```
dx1/dt = fs (B1·x_in - K1·dac1)     K1 = 0.3 through the FIR-DAC
dx2/dt = fs (x1 - K2·d2)            K2 = 0.8, d2 = y (or y_d if DAC2_YD)
dx3/dt = fs (x2 - K3·y)             K3 = 1.0
```

This gives NTF(s) = s³ / (s³ + K3·fs·s² + K2·fs²·s + K1·fs³).

- **Input gain.** B1 = K1 sets the signal gain to one at DC.
- **Integration.** Every input is constant between edges, so the model
  integrates the chain exactly over each Ts/q, using the closed-form
  polynomial in the file header. It does not step numerically.
- **Ideal parts.** The DACs are NRZ. By default there is no excess loop
  delay (`ELD` adds one period with its compensation) and the amplifiers are
  ideal.
- **Amplifier bandwidth (`GBW1`..`GBW3`).** Zero means an ideal amplifier.
  Otherwise the value is the amplifier's unity-gain frequency over 2π·fs.
  A single-pole amplifier ωt/s turns the integrator into
  (ωu/s)·G/(1 + sτ), with G = ωt/(ωt + ωu) and τ = 1/(ωt + ωu): a lower gain
  and an extra pole. When any stage has a finite bandwidth, the chain is
  integrated with 16 Runge-Kutta steps per fast period instead of in closed
  form. All inputs of an integrator see the same feedback factor.
- **Clock jitter (`JITTER`).** Each clock edge is moved by a Gaussian beta
  with rms `JITTER`·Ts. The outer DAC then holds its old value beta longer,
  which adds the charge −K1·beta·(dac1_prev − dac1) to the first integrator at
  the start of the interval. The pulse is carried exactly through the chain.
  The DACs driven by y change only once per period, and the integrators in
  front of them shape their errors, so they are left ideal. With `DAC2_YD`
  the second DAC switches at q·fs on y_d. It then gets the same edge error,
  −K2·beta·(d2_prev − d2), into the second integrator.

## Parameters of the top (`sd_fir_dac_modulator`)

| Parameter | Default | Meaning |
|---|---|---|
| `N` | 3 | quantizer bits |
| `Q` | 2 | up-sampling ratio q of the digital modulator; 2q − 1 cells |
| `M` | N + 7 | digital modulator word length (N + 3 suffices with `DAC2_YD`) |
| `LD` | 2 | digital modulator order (S(z) = 2z⁻¹ − z⁻², or z⁻¹) |
| `RR_MODE` | 0 | 0: cells switch at q·fs; 1: reduced-rate cells |
| `DAC2_YD` | 0 | second loop DAC driven by y_d instead of y |
| `MISMATCH` | 0.0 | rms relative error of each cell weight |
| `SEED` | 1 | seed of the mismatch and jitter draws |
| `JITTER` | 0.0 | rms clock-edge displacement, in units of Ts |
| `ELD` | 0 | 1: one period of excess loop delay, compensated by a fast DAC |
| `GBW1`..`GBW3` | 0.0 | amplifier unity-gain frequency over 2π·fs for each integrator; 0 is ideal |
| `KSTAR` | 1.45 | gain of that fast DAC |

Ports:

- **Inputs:** `clk`, `rst_n`, and `x_in` (`real`, held between edges).
- **Modulator output:** `yd` (`tri_t`, the output stream).
- **Main quantizer:** `y_up` (held level), `y_code` (the code being offered
  to the up-sampler), `frame_start` and `phase`.
- **Observation:** `dac1`, the FIR-DAC output; `x1`…`x3`, the integrator
  states; `v`, the digital quantizer input; `sat`; and `vq`, the main
  quantizer input.

## Results of the testbenches

At N = 3, q = 2, oversampling ratio 32, the input is a sine at 0.5 of full
scale. The output y_d is taken as 32768 samples at q·fs, Hann-windowed, and
the SNDR is summed over the signal band:

| Configuration | Testbench | SNDR |
|---|---|---|
| sigma-delta FIR-DAC (defaults) | `tb_sd_fir_dac_modulator` | 86.6 dB |
| reduced-rate FIR-DAC | `tb_modulator_reduced_rate` | 79.8 dB |
| 0.2 % rms cell mismatch | `tb_modulator_mismatch` | 85.7 dB |
| y_d drives the second DAC, M = N + 3 | `tb_modulator_dac2_yd` | 87.6 dB |
| N = 4, q = 3 | `tb_modulator_n4_q3` | 91.9 dB |
| one period of loop delay, fast DAC, input 0.68 | `tb_modulator_eld` | 84.9 dB |

**Amplitude sweep (`tb_modulator_amplitude_sweep`).** Defaults, one run per
amplitude:

| Input | −40 dBFS | −30 dBFS | −20 dBFS | −10 dBFS | −6 dBFS | −3.7 dBFS |
|---|---|---|---|---|---|---|
| SNDR | 53.7 dB | 63.9 dB | 73.5 dB | 82.2 dB | 86.6 dB | 88.1 dB |

The noise floor does not move with the signal: the SNDR rises by 1 dB per dB
within ±3 dB, and the signal gain is one at every level.

**Amplifier bandwidth (`tb_modulator_gbw`).** GBW1 = GBW2 is swept and the
third amplifier is fixed at 5π·fs. Input 0.5:

| GBW / (2π·fs) | 0.25 | 0.5 | 1 | 2 | 4 | ideal |
|---|---|---|---|---|---|---|
| FIR-DAC | 77.7 dB | 82.3 dB | 84.5 dB | 85.3 dB | 84.8 dB | 86.6 dB |
| reduced-rate | 76.1 dB | 78.2 dB | 79.5 dB | 79.5 dB | 79.5 dB | 79.8 dB |

An amplifier bandwidth of about 2π·fs is enough, even though the FIR-DAC
switches at q·fs: the loop filter does not follow the fast steps.

**Mismatch sweep (`tb_modulator_mismatch_sweep`).** 25 seeds per case,
against 86.6 dB (FIR-DAC) and 79.8 dB (reduced-rate) without mismatch:

| Cells | rms mismatch | mean SNDR | spread (rms) |
|---|---|---|---|
| FIR-DAC | 0.1 % | 86.3 dB | 0.6 dB |
| FIR-DAC | 0.2 % | 86.4 dB | 0.7 dB |
| reduced-rate | 0.1 % | 74.5 dB | 4.7 dB |
| reduced-rate | 0.2 % | 69.7 dB | 7.0 dB |

The FIR-DAC must stay within 3 dB of its ideal result, and it must lose less
than the reduced-rate version at the same mismatch.

**Clock jitter (`tb_modulator_jitter`).** `JITTER` = 0.002 (rms, in Ts):

| Configuration | no jitter | jitter | predicted |
|---|---|---|---|
| N = 3, q = 2, FIR-DAC | 86.6 dB | 68.6 dB | 68.9 dB |
| N = 3, q = 2, reduced-rate | 79.8 dB | 68.5 dB | 68.6 dB |
| N = 4, q = 3, FIR-DAC | 91.9 dB | 75.1 dB | 74.7 dB |
| N = 4, q = 3, reduced-rate | 84.1 dB | 75.6 dB | 75.1 dB |

The prediction takes the white edge noise, (JITTER)²·q·E[step²], from the
DAC steps measured in the same run. The run checks four things:

- the measured SNDR is within 1.5 dB of the prediction;
- jitter costs at least 6 dB;
- the two variants' jitter noise is within 3 dB of each other;
- the FIR-DAC's jitter noise is within 6 dB of a multi-bit NRZ DAC's driven
  by y. The measured gap is 4 to 5 dB.

**Jitter in the second loop (`tb_modulator_jitter_dac2`).** `DAC2_YD` = 1
with the same jitter, at 0.4 of full scale. The second DAC's jitter noise is
about 0.4 times the outer loop's, so the first integrator shapes it enough at
an oversampling ratio of 32. At 0.5 of full scale this configuration is at the
edge of stability once jitter is added: a variant run there diverged, so the
test uses 0.4.

What the closed-loop testbenches also check:

- **DAC output.** Every cycle, the FIR-DAC output equals the sinc²-weighted
  sum of the taps. The weights are recomputed from their closed form.
- **Held level.** The held level changes only at period starts, and then
  equals the sampled code's level.
- **Loop.** The loop stays bounded, and the in-band signal gain is within
  0.5 dB of one.
- **Mechanisms.** Each must occur at least once: period starts, all three
  y_d levels, intermediate FIR-DAC output levels, and (reduced-rate only)
  held DAC outputs while y_d moves on.

The block testbenches compare each digital block cycle by cycle with a
reference written from the defining equations:

- `tb_sdfd_upsampler`
- `tb_sdfd_dsdm`
- `tb_sdfd_delay_line`
- `tb_sdfd_rr_sampler`
- `tb_sd_fir_dac`

The models get their own tests:

- `tb_flash_adc`: against threshold counting.
- `tb_ct_loop_filter`: against a 2000-step Euler integration of the same
  equations.
- `tb_fir_dac_cells`: against the closed-form weights.
- `tb_eld_fast_dac`: against a reference delay register and the
  fast-DAC sum.

## How far to trust it, and where it departs from the original proposal

**Digital core.** The digital core is exact. The tests compare it
bit-for-bit with independent models, and each testbench fails when its block
is deliberately broken in a way that matters.

**Analog parts.** The analog parts are idealised models, good for checking
the loop's behaviour but not its analog limits:

- **Clock jitter.** Only the first-order NRZ edge error of the outer DAC
  is modelled, with white Gaussian edges. The original analysis expects the
  reduced-rate FIR-DAC to have about q times less jitter noise than the fast
  one. That is not seen here: in the simulations the two are within 0.5 dB.
  The lower step rate is offset by larger steps. The jitter noise also sits 4
  to 5 dB above a multi-bit DAC's, where "about the same" was expected.
- **Amplifiers.** Finite gain-bandwidth is modelled with a single pole.
  Finite DC gain, slew, output swing and the virtual-ground ripple are not
  modelled.
- **Excess loop delay.** By default the loop has no delay other than the
  FIR-DAC's own, and uses the ideal coefficients 0.3 / 0.8 / 1. With
  `ELD` = 1 every feedback DAC acts one full period late. The fast DAC then
  subtracts 1.45 times the code being fed back from the quantizer input, and
  the inner gains become 1.25 and 2. The whole delay sits on the code, so the
  amplifiers remain ideal. The split of the delay between quantizer, DACs and
  amplifier bandwidth is not modelled.
- **Input amplitude.** With either coefficient set and the FIR-DAC's own
  delay, the behavioural loop stays stable up to about 0.68 of full scale.
  It diverges at 0.707 (−3 dBFS), so most tests use 0.5. The highest SNDR
  reached is 88.1 dB at 0.65 of full scale. The original design reports a
  peak of 89 dB, at −3 dBFS, which this model cannot take.

**Departures in the RTL itself:**

- **Delay-line storage.** The delay line uses flip-flops; a latch-based
  line is an equivalent alternative.
- **Choices of this design.** The input is the binary count of the
  quantizer's thermometer code. The level mapping, the reset values, the
  saturation at the word range and the sampling phase of the reduced-rate
  sampler are all this design's own choices.
- **Loop-model input gain.** B1 = K1 is a choice of this design.

**Not included:**

- the decimation filter that would follow y_d;
- the conventional multi-bit DAC and dynamic element matching, which exist
  only as points of comparison.

## Simulating

Each testbench is a top-level module in `tb/` that prints
`TB_RESULT checks=N failures=M`. Build and run one with plain Verilator from
the repository root:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    --top-module tb_sd_fir_dac_modulator -y rtl -y tb +libext+.sv \
    rtl/sdfd_pkg.sv tb/tb_sd_fir_dac_modulator.sv
./obj_dir/Vtb_sd_fir_dac_modulator
```

The closed-loop runs take a few seconds each; the sweeps run several
modulators side by side and take up to about a minute. To try other settings,
change the parameter list in the `tb_modulator_*` files. The sweeps use the
helper `modulator_sndr_probe`, which takes the modulator's parameters plus the
sine amplitude `AMP` and bin `FB`. Useful knobs:

- `MISMATCH` with different `SEED`s;
- `RR_MODE`, `N`/`Q` and `DAC2_YD`;
- `JITTER`;
- `ELD`;
- `GBW1`..`GBW3`.

Keep the amplitude below about 0.65 of full scale: beyond that the loop
diverges.
