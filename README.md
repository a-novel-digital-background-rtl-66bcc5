# Split pipelined ADC with digital background calibration of stage references

A 1.5 bit/stage pipelined ADC loses linearity when its stage amplifiers have
finite DC gain and its capacitors do not match. The main effect is on the
reference each stage subtracts: the stage takes away `g * Cs/Cf * k * Vref`
instead of `k * Vref`, so the digital correction adds back the wrong value.
The result is gaps and overlaps in the transfer curve at every decision
threshold. Once the digital word used for each stage's reference equals what
the stage really subtracts, the transfer curve is a straight line again. Only
an overall gain error is left, and most applications can accept it.

This design measures those digital references **in the background**, while
the converter keeps running. Three ideas make that possible:

* **Split ADC.** Two half-size channels, A and B, convert the same input. The
  output is their mean. Their difference contains no signal, only the errors
  of the two channels.
* **A known step instead of an accurate signal.** The stage being measured is
  switched into a modified MDAC that has an extra capacitor, C_E. During
  sampling, its feedback capacitor C_F holds a voltage V1, and C_S and C_E
  sample the input. During amplification, C_S is driven with V2 and C_E with
  the normal sub-DAC voltage. The residue then carries `g*(V1 - Cs/Cf*V2)` on
  top of its normal value.
* **Eight steps that cancel V1 and V2.** V1 and V2 step through eighths of
  Vref from one resistor string:

  | step i | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
  |---|---|---|---|---|---|---|---|---|
  | V1 / (Vref/8) | 7 | 7 | 5 | 5 | 3 | 3 | 1 | 1 |
  | V2 / (Vref/8) | 8 | 6 | 6 | 4 | 4 | 2 | 2 | 0 |

  The alternating sum over the eight steps, `sum (-1)^i * g_ri`, equals
  `g * Cs/Cf * Vref`. This is exactly the reference the stage subtracts. Each
  V1 tap appears once with each sign, so the V1 taps cancel. The V2 taps
  leave only `tap8 - tap0 = Vref - 0`. So the ladder's inner taps can be as
  inaccurate as they like.

`g_ri` is measured as the difference between the channel under calibration
and the other channel. The input appears in both channels, so it drops out of
the difference. Its residual effect is uncorrelated with the step pattern and
averages away. The eight steps are repeated 100 times and the mean is taken.

Before the measurements, a sign-sign LMS learns the gain mismatch between
the two channels: `ch_mis <- ch_mis - 2^-16 * sign(D_B' - D_A) * sign(D_A)`.
Here `D_B' = (1 + ch_mis) * D_B`. The channels must match well, because the
input-dependent part of the difference is what limits how accurate each
measurement is.

## Structure

```
                     +-- channel A: stage1 -> stage2 -> 10-bit backend --+
 vin (real) ---------+                                                   +--> split_adc_cal_core --> dout[11:0]
                     +-- channel B: stage1 -> stage2 -> 10-bit backend --+        |
                     ref_ladder_model (V1, V2) <---- v1_code, v2_code, cal_en ----+
```

| file | kind | what it is |
|---|---|---|
| `split_pipelined_adc` | top, simulation model | both channels, the ladder and the core |
| `split_adc_cal_core` | synthesizable | the calibration engine, with the five blocks below |
| `channel_reconstruct` | synthesizable | `D = be*2^6 + sum_s k_s * coef[s]`, with k = d0 + d1 - 1 from the stage's two comparators |
| `ch_mismatch_lms` | synthesizable | sign-sign LMS for `ch_mis` |
| `rcf_estimator` | synthesizable | alternating-sign accumulator plus restoring divider by N_REP |
| `cal_sequencer` | synthesizable | the schedule (below) and the V1/V2 tap codes |
| `split_output` | synthesizable | mean of the channels, or one channel while the other is being measured; rounding, 12-bit saturation |
| `mdac_stage_model` | behavioural | comparators at +/-Vref/4, flip-around MDAC with finite gain, and calibration mode with C_E, V1 and V2 |
| `ref_ladder_model` | behavioural | 9-tap resistor string with errors on the inner taps |
| `backend_adc_model` | behavioural | ideal 10-bit floor quantizer |
| `cal_pkg` | package | sample tag, channel and output-select enums, V1/V2 tap functions, decision decode |

The behavioural models use `real` ports and arithmetic. Verilator and other
simulators accept them, but they do not synthesize. In silicon the core would
sit behind the real stages.

## Number format

A channel code D counts backend LSBs at the residue of the last calibrated
stage, with 6 fractional bits, in a 20-bit signed word. Vref at that node is
512 LSB. The ideal references are therefore:

* stage 2: 512·2^6 = 32768;
* stage 1: 1024·2^6 = 65536, because it is seen through stage 2's gain of two.

The references reset to these values.

Each reference is stored as the value that stage's reference really has at
the output, including the real gain of the stages after it. This is exactly
what the alternating sum measures, so the result goes into the register with
no scaling. It is also why the measurements must run from the **last**
calibrated stage to the first. When stage 1 is being measured, the steps
shift stage 2's decisions, so stage 2 must already be correct.

`ch_mis` is a signed 20-bit fraction with 16 fractional bits, so one LSB is
the LMS step of 2^-16.

## Schedule and timing

One sample is converted per clock. `cal_sequencer` loops through these phases:

1. **LMS**: 16384 samples with no calibration signal. `ch_mis` is updated on
   every sample. The output is the mean of the two channels.
2. **Measurements**, in this order: stage 2 of A, stage 2 of B, stage 1 of A,
   stage 1 of B. Each one applies the eight steps, one sample per step, 100
   times (800 samples). During a measurement the output is the other
   channel's code alone.
3. **Wait**: after each measurement, about 33 clocks of normal conversion
   while `rcf_estimator` divides. The new reference then replaces the old one.

After the fourth result `cal_done` is set and the loop starts again at the
LMS phase. The first pass after reset ends 19,732 clocks after reset is released
(16,384 LMS samples, 3,200 measurement samples, four waits and the pipeline). If `cal_enable` is low, the
sequencer idles and the references keep their values.

When A is measured, the difference fed to the estimator is
`m = D_A - (1+ch_mis)*D_B`. When B is measured it is
`m = D_B - (1-ch_mis)*D_A`. Both are formed with one multiplier, and each
channel's reference stays in the scale of that channel's own raw code.

The analog controls (`cal_en_a/b`, `v1_code`, `v2_code`) apply to the sample
taken at the next rising edge. The core tags that sample with the controls,
and the tag travels with it. The output follows 3 clocks after the sampling
edge (capture, reconstruction, mismatch correction, output register). The
estimator's `done` comes 32 clocks after its last sample. An assertion in the
core checks that no measurement sample arrives while the estimator is still
dividing.

## Where this follows the source technique and where it is this design's own

Taken from the technique:

* the split structure and averaged output;
* the stage equation `Vres = g((1+Cs/Cf)Vin - (Cs/Cf) k Vref)`;
* the modified MDAC;
* the V1/V2 values of the eight steps and the alternating sum;
* the sign-sign LMS and its 2^-16 step;
* the 16384 LMS samples and 100 repetitions;
* the stage-2-first order;
* 12 bits made of two calibrated stages and a 10-bit ideal backend;
* 60 dB gain and 0.1 % capacitor mismatch as error sizes.

Chosen here:

* **Steps 3-6.** The explicit V1/V2 values were available only for steps 1,
  2, 7 and 8. Steps 3-6 follow from the coefficients of the g_ri expression.
* **Use of `ch_mis`.** How the mismatch factor enters the measurement is this
  design's choice: channel B is scaled by `(1+ch_mis)`, with the first-order
  inverse used when B itself is measured.
* **Output during a measurement.** The other channel's code is output alone.
* **Continuous loop** of LMS followed by measurements.
* **Per-step details.** One sample per step. Measurements of A before B
  within a stage.
* **Arithmetic details.** The fixed-point widths, rounding and saturation.
* **Error values.** The individual capacitor-ratio errors, the comparator
  offsets and the 0.2 % ladder tap errors.
* **Same g in both modes.** The model uses the same `g` in calibration mode
  as in normal mode, as the step equation does. A real C_E also lowers the
  feedback factor slightly.
* **No stage-to-stage latency.** The model resolves all stages of a sample
  in one clock, so the core has no delay-alignment registers for decisions
  from different stages.

Not modelled: the transistor-level switched-capacitor circuits, noise,
amplifier offset and settling.

Not built: the simpler first form of the measurement, which adds one fixed
Vref/8 to the sub-DAC input of the stage. Its result depends on the accuracy
of that voltage. The eight-step method above removes that dependence and
replaces it.

## How well it works

With the default parameters (`tb_split_pipelined_adc`), and a 0.8 Vref sine
at 733/8192 of the sample rate:

* SNDR goes from **65.2 dB without calibration to 69.2 dB with it**.
* The four measured references land within 0.35 LSB of the values computed
  from the model's capacitor ratios and gains.
* The ceiling of this 12-bit output is about 70 dB. Each channel quantizes
  with a 1-LSB backend, and the mean is rounded to an integer code.

`tb_sndr_sweep` calibrates once and then freezes the calibration. It then
sweeps the input from near DC to near Nyquist and reads **65.3 -> 69.8 dB
SNDR** and **70.6 -> 75.8 dB SFDR** at every frequency. SFDR here is the
worst of harmonics 2-9. The result does not change with frequency because
the stage models have no memory.

The source reports 71 dB SNDR and 82 dB SFDR after calibration. It gives 58 dB before
calibration in one place and about 55 dB in its SNDR-versus-frequency plot.
Its exact capacitor errors are not known, so the before-calibration number
here is not comparable. With errors six times larger and a sine input
(`tb_split_adc_cal_core`), the two channels differ by up to 10 LSB before
calibration and agree within 1.4 LSB after two passes.

The references do not depend on how accurate the resistor string is
(`tb_ladder_tolerance`). With inner taps off by 1 % or 3 % of Vref, the four
references come out within 20/64 LSB of those measured with an exact string.
A single 3 % tap error in one step alone would move a first-stage reference by
about 2000/64 LSB.

Three limits show up in simulation:

* The accuracy of a measurement depends on how well the channels are
  matched. Any leftover channel gain error adds input-dependent noise to
  `m`, and only the 100-fold averaging suppresses it.
* Before its first pass, the LMS works on channels that are not yet linear.
  With large errors, the first pass is therefore only approximate, and the
  second pass (about 20k samples later) settles.
* The 800 samples of one measurement average away input-dependent terms well
  for a sine whose frequency is away from multiples of fs/8. A white random
  input leaves about 1 LSB of scatter in each reference when the errors are a
  few tenths of a percent. With such inputs a larger `N_REP` is needed.

## Simulating

Every testbench is self-checking and prints one `TB_RESULT checks=N
failures=M` line. The package must be given first:

```
verilator --binary --timing --assert -Irtl rtl/cal_pkg.sv tb/tb_split_pipelined_adc.sv \
          --top-module tb_split_pipelined_adc
./obj_dir/Vtb_split_pipelined_adc
```

| testbench | what it shows |
|---|---|
| `tb_split_pipelined_adc` | full design at default size: latency, the four references against the model, SNDR with and without calibration, and that every mechanism ran (LMS updates, each stage/channel measured, single-channel output, estimator wait, loop restart) |
| `tb_split_adc_cal_core` | core against a channel model written in the testbench, with 0.6 % errors |
| `tb_sndr_sweep` | SNDR and worst harmonic versus input frequency after one calibration pass, then calibration frozen |
| `tb_ladder_tolerance` | three full designs with exact, 1 % and 3 % ladder taps measure the same references |
| `tb_cal_sequencer` | the schedule sample by sample, including the V1/V2 table |
| `tb_rcf_estimator` | alternating sum, rounding, divider latency, and that `sum (-1)^i g_ri` returns `r*Vref` |
| `tb_ch_mismatch_lms` | the update rule step by step, convergence to a 0.2 % gain mismatch, saturation |
| `tb_channel_reconstruct`, `tb_split_output` | random comparisons with a model |
| `tb_mdac_stage_model`, `tb_ref_ladder_model`, `tb_backend_adc_model` | the analog models against their equations, including the cancellation of ladder errors |

## Changing it

* **Number of stages and backend size.** `NCAL` and `BE_BITS` are
  parameters. The top's per-stage `real` arrays must have `NCAL` entries.
* **Schedule length.** `N_LMS` and `N_REP` set the lengths of the schedule.
  The accumulator width follows from `N_REP`.
* **LMS step.** `MU_LSB` scales the LMS step.
* **Precision.** `FRAC` sets the fractional precision of the references.
* **Error values.** The analog error values are `real` parameters of
  `split_pipelined_adc`: `CS_CF_*`, `CE_CF_*`, `OFS_*`, `A_GAIN` and
  `TAP_ERR`.
