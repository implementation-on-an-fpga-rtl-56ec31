# EMG movement classifier: FIR filter, segmentation and perceptron on an FPGA

This RTL classifies forearm muscle activity into two movements, **arm
contraction** and **wrist rotation**, from one surface-EMG channel. A
microcontroller digitises the conditioned electrode signal at 1100 samples/s
with 10 bits and shifts every sample into the FPGA. There the signal is
bandpass filtered and watched for the onset of a movement. Each movement is
cut into a 50-sample segment and reduced to two numbers, the mean absolute
value (AMV) and the waveform length (WL). A single perceptron with stored
weights decides the class. The class is shown on two LEDs and sent back to the
microcontroller.

The whole chain is a small streaming pipeline driven by one-cycle valid
strobes. It needs fewer than 70 clock cycles per sample, so almost any FPGA
clock keeps up with 1100 samples/s. The hard parts are the number formats and
the exact timing between the segment controller and the feature units. Most
of this document is about those.

## Signal chain

```
 MCU ADC ──serial──► serial_rx ──10b code──► fir_bandpass ──Q11.10──► integer part, sat. to 11b
                                                                          │  x (11-bit signed)
                                              ┌───────────────────────────┤
                                              ▼                           ▼
                                          segmenter ──count/start/end──► amv   wl
                                                                          │     │
                                                                          ▼     ▼
 MCU buffer ◄──serial── serial_tx ◄──frame── emg_classifier_top ◄─── perceptron (param_rom ×2)
                                                                          │
                                                                  mov1_o / mov2_o (LEDs)
```

| Quantity | Value |
|---|---|
| Sample rate (set by the microcontroller) | 1100 samples/s |
| ADC word | 10 bits, unsigned, offset 1.5 V ≈ code 465 |
| Arithmetic word | 22 bits, Q11.10: sign, 11 integer bits, 10 fractional bits |
| Filter | FIR bandpass, 61 taps, Hamming window, 50–500 Hz |
| Feature-path sample | 11 bits, signed integer part of the filter output |
| Segment | 50 samples, started by a rise of more than `THRESHOLD` (16) |
| Features | AMV (17-bit unit, 11 bits used), WL (11 bits, saturating) |
| Classifier | y~ = AMV·w1 + WL·w2 + θ, class 1 if y~ > 0 |
| Label | `01` arm contraction, `10` wrist rotation, `00` none yet |

## Number formats

Every value of the filter, and the perceptron weights and bias, use one
22-bit two's-complement format with 10 fractional bits (`emg_pkg::q11_10_t`).
A value *v* is stored as round(*v*·1024) modulo 2^22.

* **ADC code to filter input.** The 10-bit code is used as an unsigned
  integer. It fills the integer field and the fraction is zero, so code 465
  is 465.0. No volt scaling is applied.
* **Filter output to feature sample.** The filter output keeps its 10
  fractional bits. The feature path takes only its integer part, saturated
  to −1024…1023 (`emg_pkg::q_to_sample`). Since the filter removes the
  1.5 V offset, the samples swing around zero.
* **AMV.** 50 magnitudes of at most 1024 sum to at most 51 200. That fits
  the 17-bit accumulator. The quotient (at most 1024) always fits the
  11-bit perceptron input.
* **WL.** 50 differences of up to 2047 do not fit 11 bits. The WL
  accumulator therefore saturates at 2047 instead of wrapping. Any strong
  burst reaches that ceiling, so WL mainly separates weak or slow segments
  from the rest.
* **Perceptron.** The products and their sum are kept at full width, 35
  bits with 10 fractional bits. The comparison with zero is exact.

## Bandpass filter (`fir_bandpass`)

The taps are in `emg_pkg::FIR_COEF`. They are a window design:

    h[n] = (lp(500 Hz)[n] − lp(50 Hz)[n]) · (0.54 − 0.46·cos(2πn/60)),   n = 0…60
    lp(F)[n] = (2F/fs) · sinc((2F/fs)·(n − 30)),   fs = 1100 Hz

The taps are scaled to unity gain at 275 Hz and rounded to multiples of
2^-10. Because the band is centred on fs/4, every second tap is zero, and
rounding to 10 fractional bits zeroes a few more of the small outer taps.
The filter still passes 100–450 Hz within 1 %, is at
−6 dB at 50 and 500 Hz, and removes DC (the taps sum to −1/1024). To change
the filter, recompute the taps with this formula and update `FIR_TAPS` and
`FIR_COEF`, or override the `TAPS`/`COEF` parameters.

The filter has one multiply-accumulate unit. When a code arrives
(`in_valid_i`), the delay line shifts. Then 61 cycles each add
`COEF[k]·x[n−k]` to a 50-bit accumulator. The sum is rounded half up,
saturated to 22 bits and presented with `out_valid_o` **TAPS+1 = 62 cycles**
after the accepting clock edge. `busy_o` is high meanwhile. A code that
arrives while the filter is busy would be lost, and an assertion reports it.
At 1100 samples/s this cannot happen with any clock above about 100 kHz.

## Movement detection and segmentation (`segmenter`)

The controller has two states.

* **Waiting.** For each new sample it compares `x[n]` with `x[n−1]`. An
  equal sample, a fall, or a rise of at most `THRESHOLD` keeps it waiting.
  A rise of more than `THRESHOLD` (`x[n] − x[n−1] > THRESHOLD`, signed)
  starts a segment, and that sample is its first.
* **Capturing.** It counts samples until 50 have been taken, then returns to
  waiting. The next sample can start a new segment at once. This is why a
  long burst yields several segments.

The controller steers the feature units with three signals:

| Signal | When |
|---|---|
| `count_o` | high in the **same cycle** as `valid_i` for every sample of a segment (combinational) |
| `start_o` | high together with `count_o` for the first sample |
| `end_o` | one-cycle pulse in the cycle **after** the 50th counted sample |

`count_o` and `start_o` are combinational, so AMV and WL accumulate in the
cycle the sample arrives. They restart on `start_o` rather than on a separate
clear. `end_o` falls between two samples. The AMV and WL outputs are valid
only while `end_o` is high (their output multiplexers show zero otherwise).
The perceptron registers its decision on that pulse.

`THRESHOLD` is in units of the 11-bit sample (one ADC code). The default, 16,
is a starting point to tune per electrode set-up and gain.

## Features (`amv`, `wl`)

* `amv`: AMV = (1/50)·Σ|x_i| over the segment. It is an accumulator, a
  divider by the constant 50, and an output multiplexer gated by `end_i`.
* `wl`: WL = Σ|x_i − x_(i−1)|, saturating at 2047. Its previous-sample
  register loads **every** sample of the stream (`sample_valid_i`), not only
  segment samples. The first difference of a segment is therefore taken
  against the sample just before it, which is the rise that triggered the
  segment.

## Perceptron, label and weights (`perceptron`, `param_rom`)

`perceptron` reads w1 and w2 through the two read ports of a two-word
`param_rom`, and θ from a one-word `param_rom`. It forms
y~ = AMV·w1 + WL·w2 + θ and applies the step y^ = (y~ > 0). One cycle after
`valid_i` it updates `y_tilde_o`, `y_hat_o` and `label_o`, and pulses
`valid_o`. The label holds until the next segment and is `00` after reset:

* y^ = 1 gives `01`, **arm contraction** (`mov1_o`);
* y^ = 0 gives `10`, **wrist rotation** (`mov2_o`).

**The shipped weights are an example, not a trained model.** They are
w1 = 0.0625, w2 = 1.0 and θ = −1024, that is, contraction when
WL + AMV/16 > 1024. They are stored in `emg_pkg::PCP_WEIGHTS`/`PCP_BIAS` and,
as identical words, in `rtl/perceptron_weights.hex` (w1 then w2) and
`rtl/perceptron_bias.hex`. Weights are trained offline on AMV/WL pairs
recorded in training mode (see below) with the classical perceptron rule:
w_i += y·x_i and θ += y for each misclassified vector. To install a trained
model, write each value as six hex digits of round(v·1024) mod 2^22 into the
two files and rebuild. For example, −3.75 is `3ff100`. The ROM is first
filled from its `INIT` parameter and then overwritten by the file, so update
`PCP_WEIGHTS`/`PCP_BIAS` too if a tool ignores `$readmemh`. Simulation must
run from the directory that contains `rtl/`, because the file paths are
relative.

## Serial links and operating modes

**Sample link in (`serial_rx`).** The microcontroller drives `adc_cs_n_i`
low, then 10 bits MSB first, each taken on a rising edge of `adc_sclk_i`,
and raises `adc_cs_n_i` again. The word is delivered 3 clock cycles after
the select rises. A frame with any other bit count is dropped and flagged on
`rx_err_o`. The three lines pass through two-flop synchronisers, so `clk`
must be at least 4× the serial clock.

**Result link out (`serial_tx`).** The FPGA drives `tx_cs_n_o` low and
shifts a 24-bit frame MSB first. Data is stable at each rising edge of its
own `tx_sclk_o`, and each clock phase lasts `TX_HALF_PERIOD` cycles (25:
1 MHz at a 50 MHz clock). The frame layout is `emg_pkg::tx_frame_t`:
`{tag[1:0], a[10:0], b[10:0]}`.

| `train_mode_i` | When a frame is sent | `tag` | `a` | `b` |
|---|---|---|---|---|
| 0, classification | one cycle after each segment's decision | label `01`/`10` | AMV | WL |
| 1, training | for every segment sample | `00` | filtered sample | position in segment, 0–49 |

Training mode serves data collection. A host receives the filtered,
segmented signal, computes the features, and trains the weights. The LEDs
keep classifying in both modes. A frame that finds the transmitter busy is
dropped and pulses `tx_drop_o`. In training mode this cannot happen at the
real sample rate as long as a frame (24 bits) is shorter than one sample
period, so the serial clock must be above about 27 kHz.

The filtered sample stream and the segment strobes are also brought out as
ports: `filt_valid_o`, `filt_sample_o`, `seg_count_o`, `seg_open_o` and
`seg_end_o`.

## Top-level parameters

| Parameter | Default | Meaning |
|---|---|---|
| `THRESHOLD` | 16 | onset threshold, in ADC codes of the filtered signal |
| `TX_HALF_PERIOD` | 25 | result-link clock phase, in `clk` cycles |
| `WEIGHT_FILE` | `rtl/perceptron_weights.hex` | w1, w2 |
| `BIAS_FILE` | `rtl/perceptron_bias.hex` | θ |

Segment length, word formats and filter taps are in `emg_pkg`.

## What is outside this RTL

The EMG front end is analog and sits before the microcontroller's ADC:

* an INA128 instrumentation amplifier;
* a 60 Hz band-reject filter (68 nF, 3.9 kΩ, Q = 5);
* a ×1.5 differential stage that adds the 1.5 V offset.

The ADC itself and the microcontroller firmware (sampling, the receive
buffer, forwarding to a PC) are also outside. None of these have RTL here.
The testbenches drive the serial link directly.

## How far this follows the reference design, and where it departs

These parts follow the reference design:

* the stage order;
* 1100 samples/s, 10-bit samples and the Q11.10 format;
* a Hamming-window FIR bandpass for 50–500 Hz;
* the two-comparison onset rule and 50-sample segments;
* the AMV and WL definitions, including the 17-bit AMV and 11-bit WL datapath widths;
* the perceptron with step activation;
* weights and bias in ROMs loaded from hex files;
* the 01/10 label on two LEDs;
* shift registers to and from the microcontroller.

These are choices made here, where the reference says nothing:

* the filter order (60) and its single-multiplier structure;
* all serial framing;
* the onset threshold;
* the result and training frame layouts, and how the mode is selected;
* reset behaviour (asynchronous, active low, everything cleared);
* the example weights.

These points depart from the reference's block diagrams:

* **Magnitude before accumulation.** The AMV and WL diagrams show no
  absolute-value stage, but their defining equations do. The equations are
  followed.
* **WL saturation.** The WL diagram is 11 bits throughout. Saturation was
  added so that a long segment does not wrap.
* **Perceptron width and comparator.** The perceptron diagram labels its
  product and sum nets 11 bits and its comparator "<1". Here the arithmetic
  is full width and the decision is y~ > 0, per the defining equation.
* **Clocking.** In the feature diagrams, the segment strobe clocks the
  accumulators. Here everything is in one clock domain and the strobe is a
  clock enable.

The reference reports 1,147 logic elements on a Cyclone 10 LP 10CL016.
This design has not been mapped to that device. A generic synthesis gives
about 850 flip-flop bits, about 2 kbit of memory (the sample delay line and
the coefficient table), and one 22 × 22 multiplier.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. Run from
the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl -y rtl \
    rtl/emg_pkg.sv tb/tb_emg_classifier_top.sv --top-module tb_emg_classifier_top
./obj_dir/Vtb_emg_classifier_top
```

Replace the testbench name for the others: `tb_fir_bandpass`,
`tb_segmenter`, `tb_amv`, `tb_wl`, `tb_param_rom`, `tb_perceptron`,
`tb_serial_rx` and `tb_serial_tx`.

* **`tb_emg_classifier_top`** runs the full design at its default
  parameters. It plays the microcontroller with a synthetic EMG stream: an
  offset baseline, strong fast bursts, weak slow bursts and sub-threshold
  bursts. It runs in three phases: classification, paced training, and
  training at full speed. A bit-exact model of the whole chain, written
  independently in the testbench, is checked against:
  * every filtered sample and the receiver-plus-filter latency;
  * every segment end;
  * the LED label one cycle after each segment end;
  * every classification and training frame.

  It also requires each mechanism to occur at least once: a dropped serial
  frame, segment capture, a rejected sub-threshold rise, both labels, WL
  saturation, a mode switch, and a transmitter drop. It runs in about a
  second.
* **`tb_fir_bandpass`** checks the filter bit-exactly against a 64-bit
  integer model, including its latency. It also measures the gain of sine
  inputs against the specification: within ±5 % at 100, 275 and 450 Hz,
  below 3 % at 20 and 540 Hz, and no DC offset.
* The other testbenches check their unit against independent models. They
  cover edge values such as y~ = 0 exactly, full-scale samples, and frames
  of the wrong length.
