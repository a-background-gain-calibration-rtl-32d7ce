# Background gain calibration for a low-voltage pipelined ADC

At very low supply voltages the opamps of a pipelined ADC run out of headroom
and lose gain, so the residue amplifier between the first and second stage no
longer amplifies by exactly 4. Combining the stage codes with the nominal
weight of 1/4 then leaves a code error at every transition of the first stage,
tens of LSB for a 13-bit converter. This RTL is the digital back end of a
13-bit, six-stage pipelined ADC. It measures the real first-stage gain G while
the converter runs, and corrects for it:

    Dout = D1 + beta * D_BK,      beta -> 1/G

Here D1 is the first-stage code and D_BK the combined code of stages 2 to 6.

The measurement needs no reference ADC, no test signal and no second
converter. The first stage gets a second way of converting, **mode 2**: one
extra comparator and a small extra capacitor shift its residue curve by half a
step. Now and then one sample is converted in mode 2. That gives a second,
"virtual" ADC with its own transitions. Both modes see the same G, so with the
right beta both give the same answer for the same input, and with a wrong
beta they differ. The mode-1 answer at the mode-2 instant is not available,
so it is estimated from the neighbouring mode-1 samples by an interpolation
filter. An LMS loop then drives the difference to zero.

## Structure

```
comp1 ──► stage1_encoder ─┬──► stage1_dac_decoder ─► s1_dac_x/z (to stage-1 MDAC)
                          │
comp_mid ► stage_encoder ─┼─► code_align ─► backend_combiner ─► gain_corrector ─► dout
comp6 ──► stage_encoder ──┘                  (D1, D_BK)           │  ▲ beta
                                                                   ▼  │
mode_controller ──► sel (to stage-1 MDAC)           nl_interpolator ─► lms_engine
```

| module | role |
|---|---|
| `adc_cal_pkg` | shared number formats, `sample_t`, `mode_e` |
| `mode_controller` | `sel`: N_MODE1 samples in mode 1, then one in mode 2, repeating |
| `stage1_encoder` | dual-mode stage-1 code: 7 levels (mode 1) or 8 levels (mode 2) |
| `stage1_dac_decoder` | switch controls of the stage-1 MDAC's DAC capacitors for that level |
| `stage_encoder` | 2.8-bit stage code (6 comparators) or 3-bit flash code (7) |
| `code_align` | delays stage j by 6-j clocks so one sample's codes meet |
| `backend_combiner` | D_BK: stages 2..6 summed with a gain of 4 per stage |
| `gain_corrector` | `D1 + beta*D_BK`, full precision and as a 13-bit code |
| `nl_interpolator` | estimates the mode-1 output at each mode-2 sample; outputs the error |
| `lms_engine` | `beta += mu * e * D_BK` |
| `calibration_top` | wires the above together |

## The two conversion modes

The input span is -Vref/2 .. +Vref/2. The stage-1 code `d1` is kept in units
of Vref/16.

* **Mode 1.** Six comparators sit at ±1/16, ±3/16 and ±5/16 Vref. They give
  7 levels, `d1` = -6, -4, ... +6. This is a normal 2.8-bit stage.
* **Mode 2.** Seven comparators sit at 0, ±2/16, ±4/16 and ±6/16 Vref. They
  give 8 levels, `d1` = -7, -5, ... +7. In the analog MDAC, mode 2 adds
  Vref·C5/C4 = Vref/4 to the output. Referred to the input this is Vref/16, so
  the odd levels are exactly the mode-2 levels.

Both residues are G·(Vin − level). Both therefore stay within about ±Vref/4,
and the same backend digitises either one.

The MDAC output is

    Vout = Vin·(C1+C2+C3+C4)/C4 + Vref·Σ(Z_i − X_i)·C_i/C4 + Vref·(C5/C4)·SEL

with C1:C2:C3:C4:C5 = 3:2:1:2:1/2. The three DAC capacitors weigh 1.5, 1 and
0.5 Vref. `stage1_dac_decoder` picks X_i (subtract) or Z_i (add) for each of
them. A capacitor with neither sits at Vcm. The capacitors must together
supply −(d1 + SEL)/4 Vref, which is one of −2 .. +1.5 Vref in steps of
Vref/2:

| needed | +1.5 | +1 | +0.5 | 0 | −0.5 | −1 | −1.5 | −2 |
|---|---|---|---|---|---|---|---|---|
| switches | Z1 | Z2 | Z3 | all Vcm | X3 | X2 | X1 | X1, X3 |

The decoder is combinational from the held stage-1 decisions. It drives the
MDAC (`s1_dac_x`, `s1_dac_z`, bit i−1 for capacitor C_i) during the clock
after the sample was taken. The `sel` output drives the MDAC's
SEL switch and the comparators' reference select. `stage1_encoder` must be
told which mode a set of decisions came from. The top does this by delaying
`sel` one clock (`sel_q`).

## Why the mode-1/mode-2 difference measures the gain

Take a mode-2 sample. Its residue r2 is the mode-1 residue r1 moved by Vref/16
toward zero, and r2 has the same sign as the shift r2 − r1. A beta error δ
shows up in the mode-2 output as δ·G·r2, and in the interpolated mode-1
output as δ·G·r1. The error

    e = (interpolated mode-1 output) − (mode-2 output) ≈ −δ·G·(r2 − r1)

therefore has the sign of −δ·D_BK. The update `beta += mu·e·D_BK` always
moves beta toward 1/G. Both modes share one beta. That is one update law,
with D_BK of the mode-2 sample as the gradient.

## The interpolator

With n = TAPS_HALF = 20 (40 taps), the estimate is

    x(0) ≈ Σ_{k=1..n} C(k)·(x(−k) + x(+k)),   C(k) = n!·n! / ((n+k)!·(n−k)!) · (−1)^(k+1)

The taps sum to 1. C(1) = 0.952 and C(20) ≈ 7e-12, so the taps are computed at
elaboration as the running product C(k) = C(k−1)·(n−k+1)/(n+k) in 64-bit
integers, then rounded to 24 fraction bits.

The filter needs n mode-1 samples on each side of a mode-2 sample, so
N_MODE1 ≥ TAPS_HALF. The top asserts this. With the default N_MODE1 = 20 the
pattern repeats every 21 samples. A window is used only when its centre is a
mode-2 sample and all 40 neighbours are mode-1 samples. The taps are
symmetric, so the block captures the 20 pair sums and runs one
multiply-accumulate per clock. Each error appears 2n+1 = 41 clocks after its
mode-2 sample entered. Clean windows are at least n+1 clocks apart, so a sum
always finishes before the next window arrives.

**Bandwidth limit.** Worked out from the formula, these 40 taps estimate
a missing sample to 13-bit accuracy only up to about 55 % of the Nyquist
frequency. The relative error is 7.6e-6 at 50 %, 1.7e-3 at 60 %, 8e-2 at 70 %
and 1.07 at 80 %. The taps are kept as the formula defines them. In
simulation the calibration still converges for inputs up to 70 % of Nyquist,
because the LMS loop averages over many windows. It fails for inputs up to
80 % of Nyquist: beta ends 2 % off and SNDR is 52 dB. Keep the input, for
example with an anti-alias filter, inside roughly 0.7 of Nyquist. Quoting
80 % for this filter would be optimistic.

## Number formats (`adc_cal_pkg`)

| quantity | type | unit |
|---|---|---|
| stage-1 code `d1` | 5-bit signed | Vref/16 |
| backend stage code | 4-bit signed | half step of that stage |
| `D_BK` | 13-bit signed | Vref/2^12 at the stage-2 input |
| calibrated value `dcal` | 20-bit signed | Vref/2^18 (4 bits below the 14-bit grid) |
| `beta` | 26-bit signed | 2^-24 (reset value 1/4) |
| `dout` | 13-bit two's complement | Vref/2^13, rounded and saturated |

With these units, `D_BK = 2^8·h2 + 2^6·h3 + 2^4·h4 + 2^2·h5 + h6`, where h is
a stage code in half steps. The corrected value is
`dcal = d1·2^14 + beta·D_BK·2^6`.

The LMS accumulator keeps 32 fraction bits, 8 more than the beta that is used,
so that small steps are not lost. The step is `(e·D_BK) >> MU_SHIFT`, rounded
to nearest, and beta is clamped to [0, 2). When `cal_en` is low, beta is held
and only mode 1 is used.

## Timing

* `sel` is a register. The stage-1 decisions for the sample converted with
  that `sel` arrive on `comp1` one clock later. Stage j's decisions arrive j
  clocks after `sel`: each stage handles the sample one clock after the stage
  before it.
* `dout` appears 7 clocks after stage 1 sampled the input: 5 clocks of
  alignment, the combiner and the corrector.
* `lms_update` pulses once per mode-2 sample, one clock after the
  interpolator's error.
* Reset is asynchronous and active low. It selects mode 1 and sets
  beta = 1/4.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_MODE1` | 20 | mode-1 samples between mode-2 samples (≥ TAPS_HALF) |
| `TAPS_HALF` | 20 | taps per side of the interpolator (40 taps in total) |
| `MU_SHIFT` | 8 | LMS step 2^-MU_SHIFT; each step of 1 roughly halves or doubles the settling time |

At the defaults beta settles within 2^23 samples. A smaller `MU_SHIFT` settles
faster but leaves more jitter on beta: `MU_SHIFT = 2` settles within about
100k samples to about 2e-4.

## What was verified

Each module has a self-checking testbench in `tb/`. Three testbenches run the
whole back end against `adc_analog_model`, a behavioural model of the analog
pipeline (not synthesizable). Its stage-1 MDAC (`tb/stage1_mdac_model.sv`)
follows the equation above and is switched by the RTL's own `s1_dac_x/z`. It
divides by 1 + 1/(A·f), with a 41 dB opamp (A = 112.2) and feedback factor
f = C4/(C1+…+C5). That makes the real gain 3.854 instead of 4. Stages 2..6
are ideal.

* `tb_calibration_top`: calibration off, then on with `MU_SHIFT = 2`, then
  frozen, then an over-range input. Without calibration the code error
  reaches 20 LSB. After calibration both mode-1 and mode-2 outputs are within
  1 LSB of the exact input.
* `tb_calibration_full` (all defaults): a 2^23-sample calibration, which takes
  about 8 s in Verilator. Beta ends 2e-5 (relative) from 1/G. Every 2^20
  samples the loop is frozen briefly and a sinusoid is measured:

  | samples (×2^20) | 0 | 1 | 2 | 3 | 4 | 5 | 6..8 | end |
  |---|---|---|---|---|---|---|---|---|
  | SNDR (dB) | 46.0 | 54.1 | 62.2 | 69.2 | 74.0 | 75.6 | 75.9 | 76.0 |
  | SFDR (dB) | 53.1 | 61.1 | 69.7 | 77.5 | 84.2 | 94.2 | 91..93 | 101.7 |

  The SFDR at the checkpoints comes from 16384 samples, and the final value
  from 65536. 76 dB SNDR is the quantization limit of this pipeline. The
  backend resolves steps of 1.04 LSB, because the stage-1 gain is below 4.
  The result is then rounded to 13 bits again. Together these cost about
  3 dB against an ideal 13-bit quantizer. SFDR is the sinusoid against the
  largest of harmonics 2..10 of the output error.
* `tb_bandwidth_sweep`: calibrates on inputs limited to 0.1 .. 0.8 of Nyquist
  and measures SNDR at each point. It reaches 75.4 .. 76.1 dB up to 0.7 of
  Nyquist and 52 dB at 0.8 (see the interpolator section).

To run one with plain Verilator from the project root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/adc_cal_pkg.sv \
    tb/tb_calibration_full.sv --top-module tb_calibration_full
./obj_dir/Vtb_calibration_full
```

Each testbench prints `TB_RESULT checks=<n> failures=<m>`.

## Limits and departures

* **Only the first interstage gain is calibrated.** The scheme can in
  principle be applied to later stages with their own gradient. But a mode-2
  shift in stage 1 moves the stage-2 input by exactly two stage-2 steps, which
  leaves the later residues unchanged. The mode-1/mode-2 difference therefore
  carries no information on the later gains, and stages 2..6 use the nominal
  gain of 4.
* **Mode-2 period.** The mode-2 sample recurs every N_MODE1+1 samples, as in
  the N / one / N pattern. A period of 2N+2 samples for the adaptation is also
  sometimes quoted for this scheme. That does not match the pattern, and the
  pattern was followed: one LMS update per mode-2 sample.
* **Chosen by this design:** N_MODE1, the step size, all number formats and
  rounding, the encoder's comparator numbering, the alignment registers and
  the interface timing.
* **Analog parts are not RTL.** The dual-mode MDAC, its two-stage opamp, the
  comparators, the analog stages 2..6 and the anti-alias filter are outside
  this design. Their signals are the top's ports. `tb/adc_analog_model.sv`
  and `tb/stage1_mdac_model.sv` model them for simulation. Only the finite
  opamp gain is modelled. Opamp nonlinearity, settling, output swing,
  comparator offsets, parasitics and capacitor mismatch are not.
* **Clock rate.** The intended rate is 20 MS/s. Nothing in the RTL depends on
  it. The critical paths are a 26×13 multiplier in `gain_corrector` and one
  21×25 multiply-accumulate in `nl_interpolator`.
