# Phase-synchronization seizure detector

During an epileptic seizure, neural activity recorded at two sites in a
given frequency band (here 30–40 Hz) changes how it is phase-locked. The
amplitude in that band also rises. This processor takes two 10-bit sample
streams, usually two channels picked from a multi-channel neural recording
front end. For each sample pair it computes:

* **MAG(V0), MAG(V1)**: the instantaneous in-band amplitude of each signal;
* **PLV**: the phase locking value, i.e. how constant the phase difference
  between the two signals has been over the last 32 samples (1 = perfectly
  locked, 0 = no consistent relation);
* **seizure**: a flag that goes high when the averaged PLV falls below a
  threshold, optionally also requiring a raised magnitude, after median
  filtering.

The RTL follows the architecture of the paper *VLSI Multivariate Phase
Synchronization Epileptic Seizure Detector*: an FIR Hilbert/all-pass pair
builds the analytic signal, three CORDIC cores compute the phases,
magnitudes, sine/cosine and PLV, moving-average filters do the 1/N sum, and
a threshold-and-median stage decides. Where the paper gives no detail
(number formats, filter coefficients, window lengths, handshakes), this
design makes its own choices. They are listed in
[Departures and own choices](#departures-and-own-choices).

## Signal path

```
 v0 ─ bandpass_iir ─┬─ allpass_delay (16) ── Re(V0) ─┐
                    └─ hilbert_fir   (33 taps) Im(V0)┤      ┌─ MAG(V0) ────────────────────────┐
 v1 ─ bandpass_iir ─┬─ allpass_delay (16) ── Re(V1) ─┼─ phase_mag_unit ─ phi0,phi1 ─ sincos_unit ─ sin/cos(dphi)
                    └─ hilbert_fir   (33 taps) Im(V1)┘  (CORDIC core 1) └─ MAG(V1) ─┐   (core 2)       │
                                                                                  │   moving_average x2 (N=32)
                                                                                  │        │
                                                                                  │   plv_unit (core 3) ─ PLV
                                                                                  │        │
                                                                     threshold_median (avg 256, median 255) ─ seizure
```

1. **Band-pass** (`bandpass_iir`): one second-order IIR section, centred at
   35 Hz with a 10 Hz bandwidth at 1 kS/s. It has unity gain at 35 Hz and
   0.68/0.73 at 30/40 Hz.
2. **Analytic signal**: `allpass_delay` delays the filtered signal by 16
   samples (Re). `hilbert_fir` is a 33-tap antisymmetric FIR with its centre
   at the same 16-sample point (Im, a −90° shift). Its taps are the ideal
   Hilbert response 2/(πk) for odd k, Hamming windowed, normalised to unit
   gain at 35 Hz and quantised to 2⁻¹²: {2892, 897, 464, 263, 146, 75, 35, 17}.
   The gain is 0.92 at 30 Hz and 1.05 at 40 Hz. Because of this mismatch
   the magnitude ripples at twice the signal frequency towards the band
   edges.
3. **CORDIC core 1** (`phase_mag_unit`): vectoring mode. It turns (Re, Im)
   into magnitude and phase, first for channel 0 and then for channel 1 on
   the same core.
4. **Phase difference and CORDIC core 2** (`sincos_unit`): Δφ = φ0 − φ1.
   The core rotates the unit vector by Δφ to get cos Δφ and sin Δφ.
5. **Moving averages** (`moving_average`, N = 32): a running sum over a
   circular buffer, divided by 32 with a shift.
6. **CORDIC core 3** (`plv_unit`): vectoring mode on the averaged pair. The
   result is √(⟨sin⟩² + ⟨cos⟩²), which is exactly
   PLV = (1/N)·√((Σ sin Δφ)² + (Σ cos Δφ)²).
7. **Threshold and median** (`threshold_median`): averages PLV, MAG(V0) and
   MAG(V1) over 256 samples. It raises `raw_det` when avg PLV < `plv_th`
   (and, if `use_mag` is set, when avg MAG(V0) or avg MAG(V1) > `mag_th`).
   `median_filter` then takes the majority of the last 255 decisions. The
   median of a binary stream is simply a majority vote, so a running count
   of ones replaces any sorting.

## Number formats

All inter-block words are 10 bits (`psync_pkg`):

| type      | meaning                         | scale                               |
|-----------|---------------------------------|-------------------------------------|
| `sample_t`| ADC sample, Re, Im              | signed, ADC steps                   |
| `angle_t` | phase, phase difference         | unsigned binary angle, 1024 = 360°  |
| `trig_t`  | sin Δφ, cos Δφ, their averages  | signed, 256 = 1.0                   |
| `mag_t`   | MAG(V), PLV                     | unsigned; MAG in ADC steps, PLV 256 = 1.0 |

Phases are binary angles, so Δφ = φ0 − φ1 is a plain 10-bit subtraction
that wraps around the circle correctly. A PLV threshold of 0.3 is therefore
`plv_th = 77`. MAG(V) can reach 724 (√2·512), which still fits 10
unsigned bits.

## CORDIC cores

`cordic_core` is one shift-and-add stage used for `ITER` = 14 clock cycles.
Samples arrive at only about 1 kS/s, so an iterative core is far cheaper
than an unrolled one. Inside, x/y are 16 bits and angles 16-bit binary
angles. Each user scales its 10-bit operands up by 2⁴ and rounds the results
back, which keeps CORDIC rounding well below one output LSB.

* Quadrant handling: vectoring mode first negates a vector with x < 0 and
  adds 180° to z. Rotation mode folds angles in (90°, 270°) the same way.
* Gain: the CORDIC gain K ≈ 1.6468 is removed at the end by multiplying
  x and y by round(2¹⁶/K) = 39797. Both modes therefore return unscaled
  results.
* Arctangent table: round(atan(2⁻ⁱ)·65536/2π), i = 0…15.
* Timing: `done` comes ITER+2 clocks after `start`.

The three cores are the three instances in `phase_mag_unit`, `sincos_unit`
and `plv_unit`.

## Timing and handshake

`sample_valid` is a one-clock pulse carrying `v0`/`v1`. It may only be
raised while `ready` is high (an assertion checks this). `ready` falls with
the sample and rises when the seizure decision for that pair is out. The
stages run one after another: 1 (band-pass) + 1 (FIRs) + 2·(ITER+2)+3
(core 1) + ITER+4 (core 2) + 1 (average) + ITER+4 (core 3) + 2 (detector).
With ITER = 14 that is about 75 clocks per sample pair. The processor
therefore needs a clock of at least 75 × the sample rate, e.g. 75 kHz for
1 kS/s. Running several channel pairs within one detection window takes
proportionally more. Every output holds between `out_valid` pulses.

Latency in samples: the Hilbert/all-pass pair delays MAG by 16 samples.
The 32-sample averages need another 32 samples to fill before the PLV
fully reflects a change, so 48 in total. The
band-pass adds its own group delay on top, about 32 samples at 35 Hz. The
detector's 256-sample average and 255-sample median add roughly another
250 samples before the `seizure` flag follows a change.

## Modes and configuration

* `plv_th`: PLV threshold (77 = 0.3, the value used in the paper's animal
  results).
* `use_mag = 0`: PLV-only detection, as in those results.
* `use_mag = 1`: also require avg MAG(V0) or avg MAG(V1) above `mag_th`.
  This is the combined rule the paper describes in words.
* Parameters of `seizure_detector`: `ITER` (CORDIC iterations), `MA_LEN`
  (32, the PLV window), `AVG_LEN` (256) and `MED_LEN` (255, odd).

## What is not here

The analog side of the system is not RTL. That is the 256-channel (16 × 16)
low-noise amplifier array, the analog multiplexer that picks two of the
256 channels, the two ADCs, and the gold-bump electrodes grown on the
amplifier inputs. The processor's `v0`, `v1` and `sample_valid` ports are
where the ADC outputs connect. How the channel pair is chosen, and how
results from several pairs would be combined in a multivariate window, is
not specified, so no pair scheduler is included.

## Departures and own choices

Taken from the paper: the signal path and its order, the use of an all-pass
delay plus Hilbert FIR with 16 samples of delay, three CORDIC cores with
their roles, Δφ = φ0 − φ1, moving averages of 32 samples, the PLV
definition, the 10-bit word length, the 1 kS/s sample rate, and a
threshold + median-filter decision with a PLV threshold of 0.3.

Chosen here:

* the band-pass structure and coefficients (one biquad, Q = 3.5);
* the Hilbert taps (windowed ideal response, normalised at 35 Hz);
* the number formats;
* the iterative CORDIC with 14 iterations, and sharing core 1 between the
  two channels;
* the valid/ready handshake and the asynchronous active-low reset;
* the detector's 256-sample averages and 255-sample median, and combining
  the two magnitudes with OR;
* the `use_mag` switch.

The paper calls the moving average's delay 32 samples. Here it is a
32-sample window, which matches the PLV formula's N. The PLV therefore
takes the full 32 samples to settle after a change, and its group delay is
16 samples.

The paper's two-tone demonstration shows a PLV near 0.1 for a 6 Hz
frequency difference. Over a 32-sample window at 1 kS/s, such a pair
stays close to 0.9. The window is too short to separate frequencies that
close, so that figure cannot come from these parameters. The RTL keeps
N = 32, and the testbench uses a 30 Hz frequency difference to make the
PLV fall.

## Verification

Each block has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
one compares against real-number maths or a small independent model and
prints `TB_RESULT checks=N failures=M`:

* `tb_bandpass_iir`: tone gains at 5, 30, 35, 40 and 150 Hz.
* `tb_hilbert_fir`: impulse-response structure, and a 35 Hz cosine that
  must become a sine delayed by 16 samples within 6 steps.
* `tb_allpass_delay`: exact 16-sample delay.
* `tb_cordic_core`: vectoring and rotation in all quadrants against
  sqrt/atan2/sin/cos, and the ITER+2 latency.
* `tb_phase_mag_unit`, `tb_sincos_unit`, `tb_plv_unit`: ±1 LSB against
  real maths, latency, and phase-difference wrap.
* `tb_moving_average`: exact against a sliding-window sum.
* `tb_median_filter`: majority of 7 and of 255 against a model.
* `tb_threshold_median`: averages, thresholds, `use_mag` veto and the
  median against a model.
* `tb_seizure_detector`: the whole processor at its default parameters,
  about 7200 sample pairs. It runs synchronised and desynchronised tone
  pairs, a short synchronised burst inside a seizure, the magnitude veto,
  and a 35 Hz tone with a ramped envelope. It checks PLV levels, the
  seizure flag, magnitude accuracy (within 20 steps of the envelope), and
  that the PLV stays high for 40 samples after synchronisation is lost
  (filter delay plus window). It also counts seizure onset and end, median smoothing,
  magnitude veto, busy back-pressure and phase wrap, and fails if any of
  them never happens.

`tb_fig6_workload` replays a two-signal sweep at default parameters. V0 is
a 29→41 Hz chirp and V1 is a 35 Hz tone with a triangular envelope, over
1.5 s. It checks that MAG(V1) follows the envelope (worst error about 2 %)
and that the PLV peaks where the frequencies meet (1.0 at 0.775 s).

`tb_recording_workload` runs 120 s of a synthetic two-channel recording.
The background is phase-locked, and six 8 s events raise the amplitude
about threefold and break the locking. With PLV-only detection at 0.3, the
bench requires every event to be flagged, no false detection in the
background, and at least a two-fold magnitude rise.

To run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/psync_pkg.sv \
    tb/tb_seizure_detector.sv --top-module tb_seizure_detector -o sim
./obj_dir/sim
```

Only synthetic signals are used. No recorded neural data was replayed, so
detection rates on real recordings are not verified.
