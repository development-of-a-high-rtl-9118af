# Centroid timing for a 4 GS/s RFSoC digitiser

This RTL turns the raw ADC stream of a fast detector, such as a plastic
scintillator in a radioactive-ion-beam time-of-flight line, into one event per
pulse. Each event holds the pulse's charge and the numerator of its
*centroid*, G = Σ i·v_i / Σ v_i. The centroid fixes the pulse time to a small
fraction of the 244 ps sample spacing, and it works for any pulse shape. The
same sum that forms its denominator is the charge, so one calculation gives
both time and energy. The target is an RFSoC: its ADC samples at 4.096 GS/s
and its fabric runs at 512 MHz. Every fabric clock therefore brings a 128-bit
word of **eight samples**, and every stage here handles all eight in one clock.

The method has two parts:

* **Smoothing.** The signal is smoothed by a moving sum of *l* samples. This
  matters because each noise term in the numerator is weighted by its sample
  number *i*.
* **A limited range.** The sums cover only a window around the pulse. It
  starts A samples before the pulse minimum, and the whole window is A+B
  samples long. The minimum is found as the zero crossing of the first
  difference of the smoothed waveform. Limiting the range keeps
  low-frequency baseline noise out of the sums.

## Processing chain of one channel

```
 ADC word ─► adc_unpack ─► smoothing_x8 ─┬─► peak_search_x8 ── peak p ──┐
 128 bit      8 x 12 bit   moving sum, l │                             ▼
                                         └─► wave_delay_x8 ─────► centroid_calc_x8 ─► event
                                              ≈ A samples           q, g over p-A .. p+B-1
```

The peak is only recognised once the waveform has passed it. The integrator
therefore works on a **delayed copy** of the smoothed waveform. The delay is
long enough that sample p−A is still ahead of the integrator when the peak is
reported.

| module | does |
|---|---|
| `wfp_pkg` | widths, the configuration struct `wfp_cfg_t` and the event struct `wfp_event_t` |
| `adc_unpack` | splits the 128-bit word into eight signed 12-bit samples and tags each word with a running sample index |
| `smoothing_x8` | moving sum of the last *l* samples (1 ≤ l ≤ 63) for all eight lanes |
| `peak_search_x8` | minimum of a negative pulse, found from the sign change of the first difference |
| `wave_delay_x8` | circular-buffer delay of the smoothed words, programmable in words |
| `centroid_calc_x8` | range selection and the q/g recurrence, eight samples per clock |
| `wfp_channel` | one channel: the five blocks above, wired as drawn |
| `wfp_top` | `N_CH` channels (default 2) that share one configuration |

## Doing eight samples per clock

**Smoothing.** Output i is the sum s_i = v_i + v_{i−1} + … + v_{i−l+1}, a
window that ends at the sample itself. For lane k of a word, the window
reaches back into earlier words: with l = 17 it touches the current word and
the two before it. The smoother keeps the last ⌈62/8⌉ = 8 words of samples.
For each lane it adds a fixed 63-tap window in which tap d is masked off
unless d < l. This means *l* can change at run time with no transient: the
history is always complete. The sum is not divided by *l*, because the factor
cancels in G = g/q. Smoothed samples are 18 bits wide (12 + 6).

**Peak search.** For a negative pulse, the peak is the sample m with
s_m − s_{m−1} < 0 and s_{m+1} − s_m ≥ 0. It must also satisfy s_m < −thr,
which keeps baseline noise from firing. A word tests eight candidates,
m = idx−1 … idx+6. The last two samples of the previous word are kept, so a
minimum that sits on a word boundary is still found. If several candidates in
one word qualify, the earliest is reported.

**Integration by recurrence.** Forming Σ i·v_i directly would need a
multiplier per sample. Instead the integrator uses two running sums, starting
from zero with i = 1 at sample p−A:

```
q_i = q_{i-1} + v_i          (charge)
g_i = g_{i-1} + q_i          (numerator)
```

After n steps, g_n = n·v_1 + (n−1)·v_2 + … + v_n. This is the weighted sum
with the weights reversed, so:

```
Σ i·v_i = (n+1)·q_n − g_n         G = (n+1) − g_n / q_n        (n = A+B)
```

Each clock applies the recurrence up to eight times in a chain, once per lane
that lies inside the range. That makes a chain of sixteen adders in one
clock. At 512 MHz on a real device this chain would need pipelining or a
closed form, but the RTL here keeps it as a single stage.

**Finding the range by index.** Every word travels with the index of its
first sample. When a peak at sample p is reported, the integrator stores
t_start = p − A and the offset of the last sample, n − 1. A lane is in range
when (index − t_start) mod 2³² ≤ n − 1. The result is written when the lane
with offset n − 1 has been processed. The test is done modulo 2³², so the
wrapping 32-bit index causes no trouble. Because lanes are chosen by index,
the delay line only has to be long *enough*; it does not have to be exact.
The channel sets it to ⌈(A+9)/8⌉ words. The extra 9 samples cover the
peak-search register and the fact that p can lie one sample before the word
that revealed it.

## Interface

All ports are synchronous to `clk` (512 MHz). `rst_n` is an active-low
synchronous reset.

| port (wfp_top) | width | meaning |
|---|---|---|
| `adc_tdata[c]` | 128 | eight 16-bit lanes. Lane k is bits [16k+15:16k], and lane 0 is the oldest sample. The 12-bit sample sits in bits [15:4]; bits [3:0] are ignored |
| `adc_tvalid[c]` | 1 | word valid. Gaps are allowed, and every stage advances only on valid words |
| `cfg.sm_point` | 6 | smoothing points *l*, 1…63 (0 behaves as 1) |
| `cfg.pre_a`, `cfg.post_b` | 8 + 8 | A and B in samples. The range is p−A … p+B−1 |
| `cfg.thr` | 16 | a peak must lie below −thr (in smoothed units, i.e. ×l) |
| `ev_valid[c]` | 1 | one-clock strobe |
| `ev[c]` | 128 | `q`, `g` (signed 32 bit), `t_start` and `t_peak` (sample indices) |
| `ev_lost[c]` | 1 | strobe: a peak arrived while the channel was still integrating and was dropped |
| `busy[c]` | 1 | integration in progress |

The absolute time of a pulse, in samples, is `t_start − 1 + G`, with G from
the formula above. The sample index counts from 0 at reset. A timing
measurement takes the difference of two channels fed the same pulse, so the
common offset cancels.

**Latency and dead time.** The stages add these delays:

* `adc_unpack`, `smoothing_x8`, the delay output register and
  `centroid_calc_x8` each add one clock.
* The delay line adds ⌈(A+9)/8⌉ words.

An event therefore appears between ⌈(A+9)/8⌉ and ⌈(A+9)/8⌉ + 4 words after the word that holds
sample p+B−1. A channel is busy from the clock after the peak until that
moment. With A = B = 255 this is about 100 clocks, or 0.2 µs. That is far
below the 10 µs between events at a 100 kHz trigger rate. Pulses closer
together than that are handled as follows:

* The later peak is dropped and flagged on `ev_lost`.
* There is no event queue.

The delay line only moves when new words arrive. The ADC stream is
continuous, but in simulation the last event comes out only once enough
further words have been driven.

## Numbers and limits

* **Widths.** These come from the target: 8 lanes, 12-bit data in a 16-bit
  lane, a 6-bit smoothing setting, and 32-bit `q` and `g`. These are this
  design's own choices: the 32-bit sample index, the 8-bit A and B, the
  16-bit threshold, and the delay depth of 34 words, which covers A = 255.
* **Overflow.** The accumulators wrap. |g| grows roughly as n²/2 times the
  smoothed amplitude. For a 1000-count pulse with l = 9 and a range of about
  100 samples, g is a few times 10⁷. With l = 63, a full-scale pulse and a
  range of 510 samples, g would reach about 10¹⁰ and wrap. Widen `ACC_W` in
  `wfp_pkg` if such settings are needed.
* **Polarity.** Only negative pulses are handled.
* **Changing settings.** Change `cfg.pre_a` only while the channel is idle,
  because it sets the delay length. `sm_point`, `post_b` and `thr` may change
  at any time; they take effect for the next word or the next peak.

## What is this design's own choice

The processing chain follows the published method of an RFSoC waveform
processor for RI-beam experiments. That includes smoothing, peak search by
differentiation, a delayed waveform, the q/g recurrence, eight samples per
clock, the 12-in-16-bit sample format and the A/B range. The method
description leaves several things open, and these were decided here:

* the trailing smoothing window and undivided sum
* the amplitude threshold of the peak search
* which sample the range A+B starts and ends on (peak counted in B)
* the index-tagged range selection and the delay length
* dropping peaks while busy
* lane order within the ADC word
* the use of the upper 12 bits of each lane
* one shared configuration for all channels

The final division g/q and the two-channel time difference are left to
software. In the reference simulation of the method, q and g are the
outputs.

Not included:

* the RF-ADC itself
* the clock generation
* the processor and the read-out path to it
* the external analog parts of a measurement (balun, fan-out, discriminator)

No use of an external trigger input is described, so there is none.

## Simulating

Every file in `rtl/` and `tb/` is plain SystemVerilog. Compile the package
first, then the test-bench reference package. For example, the whole design:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_wfp_top \
    rtl/wfp_pkg.sv tb/wfp_ref_pkg.sv rtl/adc_unpack.sv rtl/smoothing_x8.sv \
    rtl/peak_search_x8.sv rtl/wave_delay_x8.sv rtl/centroid_calc_x8.sv \
    rtl/wfp_channel.sv rtl/wfp_top.sv tb/tb_wfp_top.sv
./obj_dir/Vtb_wfp_top
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends a test that hangs and counts it as a failure.

| testbench | what it checks |
|---|---|
| `tb_adc_unpack` | lane extraction and word index, with random valid gaps |
| `tb_smoothing_x8` | every output against a direct sum, for l = 9, 17, 0, 1, 63, 8 and 33 |
| `tb_peak_search_x8` | minima at every lane and across word boundaries, flat bottoms, sub-threshold pulses |
| `tb_wave_delay_x8` | delay 0, 1, 5, 17 and full depth; output held until filled |
| `tb_centroid_calc_x8` | q, g and indices against a direct Σ(n+1−i)v_i for random A and B; the exact result clock; dropped peaks |
| `tb_wfp_channel` | one channel end to end against the sample-by-sample model `wfp_ref_pkg` |
| `tb_wfp_top` | both channels at the default size, three settings, a pile-up pair whose second peak must be dropped, stream gaps, and the latency in words |
| `tb_timing_2ch` | the two-channel timing workload: one pulse shape (about 40 ns wide, amplitudes 600–1800 counts, 2-count noise) sent to both channels with channel 1 delayed by 2.37 samples; the mean of t1 − t0 must match within 0.02 samples and its spread must stay below 25 ps (typically about 12 ps) |

The reference model in `tb/wfp_ref_pkg.sv` works one sample at a time, with
no eight-lane packing, so it checks the parallel hardware independently.
Together the testbenches run in a few seconds.
