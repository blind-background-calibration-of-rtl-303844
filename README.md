# Blind harmonic-distortion calibration for a VCO-based delta-sigma ADC

An ADC built around a voltage-controlled ring oscillator is cheap and scales
well with CMOS technology, but its voltage-to-frequency curve is bent. The
bend shows up as 2nd and 3rd harmonics that limit the converter's SNDR. This
RTL removes those harmonics digitally:

    d_cal = d - alpha2 * d^2 - alpha3 * d^3

It finds `alpha2` and `alpha3` *blindly*. No test signal is injected: the
estimate comes from the converter's own output. Two facts make that possible:

* **Downsampling moves tones.** Keeping only every k-th sample of a stream,
  `d[k*n]`, turns a tone at `f` into a tone at `k*f`. The downsampled output
  therefore has a copy of the fundamental exactly where the k-th harmonic
  sits.
* **Sinusoids of different frequency are orthogonal.** Over many samples,
  `sum(e[n] * d[k*n])` averages to zero unless `e` and `d[k*n]` share a
  frequency. If `e` holds only distortion, a non-zero sum means that a k-th
  harmonic is left over.

An LMS loop then moves each coefficient until its sum is zero:
`alpha_k += mu_k * err_k`.

The scheme follows the paper "Blind Background Calibration of Harmonic
Distortion Based on Selective Sampling" (Gande, Lee, Venkatram, Guerber,
Moon). In that work the digital engine ran in software. Here it is
synthesisable hardware that handles one sample per clock. The analog parts
are behavioural models.

## Getting rid of the signal: two converters

In `e` the harmonics must not sit on top of the full input signal. The
converter is therefore built twice:

```
            +--------------- ADC ---- d_out ---> corrector --+--> d_cal (output)
  vin ------+                                                |  (+)
            +-- x0.5 ------- ADC ---- d_by2 ---> corrector --x2--(-)--> d_nosig
```

Both ADCs have the same curve. Halving the input halves the linear part, but
it divides a k-th-order term by 2^k. So `d_nosig = dcal_full - 2*dcal_half`
cancels the signal and keeps `1/2` of the residual square term and `3/4` of
the residual cube term. If the attenuator is not exactly 0.5, a small linear
leftover remains. It is orthogonal to the harmonics, so the loop tolerates
it.

Both correctors use the same coefficients. When the coefficients are right,
both residuals vanish and `d_nosig` carries nothing.

This is **background** mode (`bg_mode = 1`): any input signal works.
**Foreground** mode (`bg_mode = 0`) uses `d_cal` itself as `e`. That is only
valid with a clean sine at the input, whose own tone is orthogonal to the
downsampled streams.

## The correlator: selective sampling in a stream

`harmonic_correlator` computes, for one value of k (instances with K = 2 and
K = 3):

    err_k = sum_{n=0}^{DEPTH-1} e[n] * d_out[K*n],   DEPTH = (N-1)/K + 1

The product index `K*n` runs ahead of `n`. The sum is therefore taken over
blocks of N samples, and the *error stream* is buffered, not the raw one:

* `e[m]` is written to a buffer while `m < DEPTH`.
* On every K-th sample (`m = K*n`) the live `d_out[m]` is multiplied with the
  stored `e[n]`. Because `n <= m`, that value is already in the buffer.
* At `m = 0` the read address equals the write address, so the incoming
  sample is bypassed.
* Counters keep `m mod K` and `m / K`, so no divider is needed.

At the default N = 12288, the buffers hold 6144 and 4096 words of 15 bits.
N is a multiple of 6, so each sum uses exactly N/K products. The length is
a trade: the quantization noise of the converter enters every sum, and a
longer block averages it down. On a single record of 3072 samples the SNDR
after calibration varied from 32 to 42 dB with the starting state of the
VCO. At 12288 it varied from 42 to 49 dB.

### The phase problem, and the record mode

The value of `err_k` depends on the signal phase at `n = 0`. For a sine
starting at phase `phi`:

* the 3rd-order sum scales with `cos(2*phi)`;
* the 2nd-order sum scales with `sin(phi)`, plus a term from the DC content
  of the stream.

Two things follow:

1. **Live blocks (`rec_mode = 0`) work only for inputs that repeat every
   block.** Every block must see the same phase. Otherwise the per-block
   estimates average towards zero. An example that fails is 1 MHz at
   450 MS/s with N = 12288.
2. **Record mode (`rec_mode = 1`) works for any input.** A `capture` pulse
   stores the next N samples of both converters in `record_buffer`. While
   `cal_en` is high, that record is replayed through the engine pass after
   pass. Each pass is one block, and the phase is the same every time. When
   the coefficients have settled, return to `rec_mode = 0, cal_en = 0`. The
   converter then runs with the stored coefficients.

The sign of the correlation, and so the sign `mu_k` must have, depends on
that phase. For this reason `mu2` and `mu3` are **signed** run-time inputs.
Pick the sign for your record: with a wrong sign the coefficient runs away,
and the output harmonic grows instead of shrinking. The testbenches start
their records at a positive peak of the input, where `mu2 > 0` and `mu3 > 0`
are right.

## Data path and timing

One sample enters per clock. The clock is the sampling clock, 450 MHz in the
original chip. No timing closure was done.

| stage | what happens | latency |
|---|---|---|
| `ring_vco` | phase advances by steps-per-sample(vin) on each clock | model |
| `phase_quantizer` | taps registered, decoded to phase 0..29 | 1 clock |
| `differentiator` | `(phase - previous phase) mod 30` registered | 1 clock |
| `vco_dsm_adc` | `d_out = (count - 15) << 10` (Q1.14 word) | comb. |
| `harmonic_corrector` x2 | `d - a2 d^2 - a3 d^3`, registered | 1 clock |
| `signal_remover` | `d_nosig = dcal_full - 2 dcal_half` | comb. |
| `harmonic_correlator` x2 | multiply-accumulate, `err` one clock after the block's last sample | 1 clock |
| `alpha_update` x2 | `alpha += (err * mu) >>> 14`, one clock after `err` | 1 clock |

From reset, `d_out` is valid on the third clock, and `d_cal` follows `d_out`
by one clock. `cal_en` and `bg_mode` are pipelined with the data, so they act
on the sample that enters together with them. A block's update lands two
clocks after its last sample reaches the correlators. The few samples already
in the correctors by then still use the old coefficients.

Dropping `cal_en` abandons the block in progress. The coefficients stay in
their registers, and the output keeps being corrected with them: this is
normal operation. `coef_sat` flags an update that hit the coefficient range.

## Number formats

* Every sample and coefficient is a signed 15-bit Q1.14 word, a fraction of
  full scale in [-1, 1). 15 bits is the engine precision of the original
  work.
* Products are truncated (arithmetic shift, so rounding is toward minus
  infinity).
* The corrector output and `d_nosig` saturate.
* The correlator accumulators are full width: `2*15 + log2(DEPTH+1) + 1`
  bits, 44 bits for both sums at N = 12288.
* Each coefficient register has 12 extra fraction bits (27 bits in all), so
  steps below one word LSB are not lost. The correctors see the top 15 bits.
* The step is `err * mu / 2^MU_SHIFT`, with `mu` a signed 8-bit input and
  `MU_SHIFT = 14`. The sums grow with N, so scale `MU_SHIFT` with it. With
  `mu2 = 24, mu3 = 64` and full-scale signals the loop settles in about 10
  to 20 blocks.

## The front end

`ring_vco` models the supply-controlled ring of 15 inverters. It is a
behavioural model with `real` ports and cannot be synthesised. A transition
passes every cell twice per period, so one period is 30 phase steps. On each
clock the model advances the phase by:

    F0 + KV * (v + K2 v^2 + K3 v^3)   steps

It then shows the ring state for that phase on its taps.

* The quantizer recovers the phase from the taps: it XORs them with the reset
  pattern and counts the flipped cells. Tap 0 tells which half-period the
  ring is in.
* The differentiator's first difference is the number of steps per sample.
  Because phase integrates frequency, the quantization error is
  first-order shaped: a 30-level first-order delta-sigma output.
* `input_attenuator` is the 0.5 analog gain. Its `GAIN` parameter can be set
  off 0.5 to model mismatch.

The top defaults are F0 = 15, KV = 10, K2 = 0.04 and K3 = -0.08. They are
invented to give distortion of the right kind: about -40 dBc HD2 and -42 dBc
HD3 at 0.8 of full scale. The measured chip was more distorted, with 26 dB
SNDR before calibration.

## Files

| file | contents |
|---|---|
| `rtl/cal_pkg.sv` | word type, saturation and product helpers |
| `rtl/ring_vco.sv`, `rtl/input_attenuator.sv` | behavioural analog models |
| `rtl/phase_quantizer.sv`, `rtl/differentiator.sv`, `rtl/vco_dsm_adc.sv` | VCO delta-sigma ADC |
| `rtl/harmonic_corrector.sv`, `rtl/signal_remover.sv`, `rtl/harmonic_correlator.sv`, `rtl/alpha_update.sv`, `rtl/cal_controller.sv` | calibration blocks |
| `rtl/cal_engine.sv` | digital backend |
| `rtl/record_buffer.sv` | capture and replay of one block |
| `rtl/blind_cal_adc_top.sv` | complete converter |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_workload_square_then_sine.sv` | estimation on a rounded square wave, then a 1 MHz sine at three amplitudes |

## Verification

Every testbench compares against values it computes itself. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

* `tb_cal_engine` drives synthetic distorted streams. It checks every output
  word and every coefficient update bit-exactly against a reference model.
  Over one block, the harmonics drop as follows:

  | mode | HD2 | HD3 |
  |---|---|---|
  | background | 18 dB | 30 dB |
  | foreground | 77 dB | 57 dB |

* `tb_blind_cal_adc_top` runs at the default parameters, with about 8 million
  checks:
  * every ADC word, against a ring phase tracked in the testbench;
  * every calibrated word and every update;
  * harmonic reduction in live background and foreground modes, and in
    record mode with a non-coherent 1 MHz tone (HD3 -21 dB, HD2 -12 dB);
    in foreground mode HD3 falls by 41 dB;
  * that the following each happen: block abandon, frozen coefficients,
    buffer bypass, mode switch, capture and replay.
* `tb_workload_square_then_sine` estimates on a rounded square wave, freezes
  the coefficients, and converts a 1 MHz sine. SNDR is measured up to
  fs/128, the OSR-64 band:

  | amplitude | SNDR before | SNDR after |
  |---|---|---|
  | 0.001 FS (-60 dBFS) | 0.6 dB | 0.6 dB |
  | 0.01 FS (-40 dBFS) | 38.5 dB | 33.2 dB |
  | 0.05 FS (-26 dBFS) | 47.9 dB | 47.6 dB |
  | 0.2 FS | 47.4 dB | 50.8 dB |
  | 0.5 FS | 38.9 dB | 43.8 dB |
  | 0.8 FS | 33.4 dB | 42.6 dB |

  The 3rd harmonic falls by 29 dB at 0.5 FS and by 17 dB at 0.8 FS. What
  is left at 0.8 FS is mostly the 2nd harmonic (see the bias below). The
  loss at -40 dBFS is explained below. At -60 dBFS the tone is below the
  noise of a 9000-sample analysis.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/cal_pkg.sv tb/tb_blind_cal_adc_top.sv --top-module tb_blind_cal_adc_top
./obj_dir/Vtb_blind_cal_adc_top
```

Each testbench runs in seconds.

## Limits and departures

* **The background equilibrium is biased.** In background mode the loop
  stops where the error sums vanish. With a 2nd/3rd-order correction of a
  curve that also leaves 4th/5th-order residue, that point is not where the
  output harmonics are smallest. The signal-free stream weights the higher
  orders differently: a k-th order term scales by `1 - 2^(1-k)`. The effect
  on HD2 is clear: 11 to 18 dB of suppression in background mode.
  Foreground mode on the same signal removes the 3rd harmonic by 41 dB.
  With strong distortion (K3 = -0.2) the 3rd-order coefficient ran into
  its rail in background mode.
* **Small inputs lose a little.** The correction squares and cubes the raw
  delta-sigma codes, and so their quantization noise. The power of that
  noise depends on the input level: it is zero where the VCO makes a whole
  number of steps per sample. The squared noise therefore adds in-band
  error that follows the signal. Near -40 dBFS this costs about 5 dB of
  SNDR. Above about -25 dBFS the effect is lost below the gain from
  calibration.
* **The live block estimate needs a periodic input.** Use record mode
  otherwise (see above).
* **The sign of `mu` depends on the signal phase.** Nothing in the hardware
  detects a wrong sign.
* **What is this design's own:** the block-wise sum and its length, the
  record buffer, the mode inputs, the step-size format, the extra coefficient
  bits, the saturation and the reset values (coefficients reset to 0).
* **Not built:** no decimation filter or output data path beyond `d_cal`.
  The VCO, attenuator and sampling are behavioural models, and the model's
  tuning curve is not the chip's.
