# Multiplexed neural recording pixel with LMS electrode-offset cancellation

Sixteen recording electrodes share one amplifier, one 10-bit ADC and one
10-bit DAC by time-division multiplexing. Each electrode has its own slowly
drifting dc offset of up to about ±50 mV. Once the channels are multiplexed,
these offsets turn into a 320 kHz staircase at the amplifier input. That
staircase passes through ac-coupling and would saturate a high-gain amplifier.
This pixel removes it digitally. For every channel it estimates the offset
plus the low-frequency (LFP) content, and a capacitive DAC subtracts that
estimate at the amplifier input during the channel's own time slot. What
reaches the ADC is the neural signal with the offset removed.

The loop gain (amplifier × ADC × DAC) varies with process and is not known in
advance. A single-tap LMS adaptive filter, shared by all 16 channels, sets it.
Its weight starts at the largest gain and adapts down until the loop locks.

This repository holds synthesizable SystemVerilog for the digital part, and
behavioural models of the analog parts so that the whole loop can be
simulated.

## Hierarchy

```
hdnp_top                      whole pixel (simulation model: real-valued analog nets)
├── analog_mux                16:1 electrode multiplexer            behavioural
├── neural_amp                ac-coupled open-loop amplifier          behavioural
├── sar_adc                   10-bit SAR ADC                          behavioural
│   └── sar_logic             successive-approximation register       RTL
├── dsp_module                digital back end                        RTL
│   ├── digital_controller    slot timing, channel select, M1 gating
│   ├── lpf_bank              16 per-channel low-pass filters (DEMUX/MUX)
│   ├── lms_filter            single-tap LMS canceller + alignment delays
│   └── delta_sigma_mod       15→10-bit second-order noise shaper
├── dac_decoder               binary/thermometer CDAC controls        RTL
└── cdac                      10-bit cancellation CDAC                behavioural
```

`hdnp_pkg` holds the shared sizes and types. The synthesizable core is
`dsp_module` + `dac_decoder` + `sar_logic`.

## The slot schedule

Everything runs from one 10.24 MHz clock. A **slot** is 32 clocks, and
one electrode is selected per slot. The ADC therefore samples at 320 kHz, and
each channel is visited every 16 slots (20 kHz, for 10 kHz of signal
bandwidth). The 32 clocks per slot are also the delta-sigma modulator's
oversampling ratio.

Timing is the hardest part of the design. The cancellation word for channel
`c` has to reach the amplifier exactly when `c` is selected again, and the
feedback into the LMS filter must be the word that was actually applied when
the sample was taken.

| when | what happens |
|---|---|
| slot *s*, phase 0 | MUX selects channel *c*; `dac_word` ← last stage of the delay line (the word for *c*); `fb` ← previous `dac_word` |
| slot *s*, phases 1–31 | the modulator plays `dac_word` as 32 ten-bit codes; the amplifier settles |
| slot *s*, phase 31 | `adc_sample`: the ADC holds the amplifier output |
| slot *s+1*, phase 10 | ADC result ready (`adc_valid`, tagged with *c*); the DSP processes it in that clock: LPF, LMS, new *y* pushed into the delay line |
| slot *s+16*, phase 0 | that *y* reaches the end of the 15-stage delay line and becomes `dac_word` for channel *c* again |

So the ADC adds one slot of delay, and the delay line adds N−1 = 15 more. The
word that comes out of the delay line drives the DAC, and one slot later it
moves to `fb`. `fb` is added back into the filter's inputs for the sample that
slot produces. An assertion in `lms_filter` checks that a sample is never
processed on a slot boundary.

## The LMS canceller (`lms_filter`)

For each sample of channel *c* (ADC code `x`, already scaled ×2 into
cancellation-word units, and `lfp`, its channel's low-pass value):

```
u = sat15(lfp + fb)            reference: low-pass estimate of offset + LFP
d = sat15(x   + fb)            desired:   the full input, offset included
y = sat15(floor(w * u / 2^34)) multiplier M2
w ← w + u * (d − y)            multiplier M1, i.e. μ = 2^-34 on a Q2.34 weight
```

The amplifier subtracts the DAC output from its input. Without the `+ fb`
terms the algorithm would see only the residual. The low-pass would then
decay to zero and starve the reference, and the "desired" node would become
the error node. Adding the applied word back to both `u` and `d` lets the
filter see the offset it is cancelling. At lock `w` ≈ 1, `y` equals the
channel's offset plus LFP, and the ADC carries only the residual (action
potential band).

The weight is 37 bits: sign, 2 integer bits and 34 fraction bits. With
μ = 2⁻³⁴ the update `μ·u·e` is then exactly the integer `u·e`. After reset
`w` is the largest representable value (≈ 4). In that state the loop is
saturated, and the 15-bit saturators on `u` and `d` keep the start-up from
overflowing. The weight then falls to ≈ 1. One weight serves all 16 channels,
and the per-channel information lives in the low-pass states and the delay
line.

## Per-channel low-pass (`lpf_bank`)

The channel tag on each sample selects one of 16 filter states (the DEMUX),
and the same tag reads that state back out (the MUX). Each filter is a leaky
integrator with unity dc gain, `acc += x − acc/16`, `lfp = acc/16`. Its output
already includes the current sample ("delay-free"). The pole, at 1 − 2⁻⁴ per
channel sample, is about 200 Hz at 20 kHz.

The pixel's LFP output is not this low-pass value but `u`, the low-pass plus
the word the DAC applied. The low-pass only sees what is left after
cancellation, while `u` holds the whole slow part of the electrode signal:
offset plus LFP.

### The band split that results

The ADC output keeps what the loop does not cancel (the AP band), and `u`
holds what it does (offset and LFP). The split is set by the loop, not by the
filter alone. The word is accumulated through `fb`, so the cancellation
integrates the low-passed residual. The integrator gain is the loop gain of
about 0.72 (ADC code ×2 against the DAC step, at the default amplifier
settings). Measured in simulation with 0.5 mV tones:

| tone | at `ap_code` (AP) | at `lfp` (offset + LFP) |
|---|---|---|
| 50 Hz | −33 dB | ≈ 0 dB |
| 2 kHz | ≈ +1 dB | −15 dB |

The crossover is therefore near 2 kHz. The published closed-loop curves cross
over near 100–200 Hz, and AP is −40 dB at 1 Hz. Matching that needs a loop gain
about 16 times lower. A smaller low-pass gain alone would leave a dead band of
several ADC codes, because the 15-bit cancellation word cannot hold the finer
steps. Carrying four fraction bits through `u`, `d`, `y`, the delay line and
`fb` fixes that, and gives a first-order split with its corner near 120 Hz.
That variant was simulated and then dropped, because of a cost that the
low-pass gain sets.

At lock the applied word is `w·(fb + lfp)`. A weight error `w − 1` therefore
leaves a residual offset of about `(w − 1)/(loop gain)` times the electrode
offset. With the 1/16 low-pass gain, the loop gain drops to about 0.04.

- A neural-band signal jitters the weight by about 5·10⁻⁴.
- Once M1 switches off, that error is frozen.
- A 50 mV electrode then sits about 30 codes off zero.

At the loop gain used here, the same weight error costs about 3 codes. The
published chip presumably resolves this with word widths the description does
not give.

## From 15 bits to the 10-bit CDAC

The cancellation word needs about 15 bits, because it must cover ±70 mV of
offset with microvolt steps. The CDAC has 10 bits. `delta_sigma_mod` is a
second-order error-feedback loop:

    v = x + 2e[n−1] − e[n−2],  q = floor(v/32),  e = v − 32q

Its output changes every clock, and over any slot the 32 codes (each worth
32 LSB of the 15-bit word) average to the word within 4 LSB. `dac_decoder` splits a code into
five binary-weighted LSB controls and 31 thermometer controls for the five
MSBs. Each control is a complementary pair (BN, BB) for the two bottom plates
of a differential capacitor block.

The CDAC shares the amplifier input node with the 2 pF coupling capacitor and
the 0.25 pF input capacitance. With 36 × 8.2 fF it reaches the input
attenuated to 0.116. On a 1.2 V supply that is ±69.5 mV. The electrode signal
itself is attenuated to 0.786, so a ±50 mV electrode offset needs ±39 mV of
the available range.

## Switching off the update multiplier (`digital_controller`)

Once the offsets are cancelled, the weight hardly moves. The controller
samples the weight on every ADC sample, in "digits" of 2⁻¹² (`weight >>> 22`).
If it stays within ±`m1_range` digits (2 by default) of a reference for
`HOLD_SAMPLES` samples (3 200 000, i.e. 10 s at 320 kHz), `m1_en` falls. The
weight then freezes, and M1 can be clock- or power-gated. The offsets are
still tracked, because the low-pass states and the loop keep running. M1
switches back on in either of two cases:

- an ADC sample hits a full-scale code, which means an offset has escaped cancellation;
- `lms_restart` is pulsed.

## Analog models

These models are for closing the loop in simulation, not for analog
accuracy:

- `analog_mux`: an ideal switch.
- `neural_amp`: input node `0.786·vin − vcancel + VOS`, followed by one pole
  stepped at the system clock and a gain. Gain is 35–52 dB and bandwidth is
  210–830 kHz, each linear in its 3-bit code. Code 2 gives 39.9 dB and
  387 kHz, which settles to 0.1 % within a slot. The output clips at ±0.6 V.
  The ac coupling is treated as dc for the multiplexed signal.
- `sar_adc`: holds the input on `sample` and runs `sar_logic` against an ideal
  comparator with a ±0.6 V full scale. The result is ready 10 clocks later as
  a signed code, with a full-scale flag.
- `cdac`: adds up the charge of the 36 capacitor blocks and returns the
  input-referred cancellation voltage. It also asserts that BN and BB are
  complementary. Each block is a pair C_α + C_β = 8.2 fF on complementary
  bottom plates. Its weight is C_β − C_α: 4/4.2 fF gives 0.2 fF (one unit) for
  B0, 3.9/4.3 fF gives two units for B1, and 0.9/7.3 fF gives 32 units for
  each MSB block. The pairs for B2–B4 continue the binary steps. Every block
  is always driven, so the 1024 levels are odd: (2·code_offset − 1023) units,
  with no zero level. The pairs are parameters, so a mismatched block can be
  modelled by changing one entry.

With these numbers one ADC LSB is about 2.8 cancellation-word LSBs, and the
loop gain seen by the filter is about 0.72. The loop locks for any gain from
at least 0.4 to 2. The weight always converges to 1, and the gain only sets
the settling speed.

## Interface of `hdnp_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 10.24 MHz clock, asynchronous active-low reset |
| `vin[16]` | in | real | electrode voltages (V) |
| `amp_gain_code`, `amp_bw_code` | in | 3 | amplifier gain / bandwidth banks |
| `m1_range` | in | 4 | gating range in weight digits |
| `lms_restart` | in | 1 | switch M1 back on |
| `ap_valid`, `ap_ch`, `ap_code` | out | 1, 4, 10 | one sample per slot: channel and offset-free ADC code |
| `lfp` | out | 15 | the LMS reference `u` of that channel: its offset plus LFP band, in cancellation-word units (≈ 4.24 µV at the amplifier input) |
| `mux_sel` | out | 4 | channel being sampled |
| `weight`, `m1_en` | out | 37, 1 | LMS weight (Q2.34) and M1 state |
| `u_sat`, `d_sat`, `adc_full_scale` | out | 1 | saturation indicators, valid with `ap_valid` |
| `dac_code`, `dac_word` | out | 10, 15 | modulator output and current cancellation word |

## Simulating

Every testbench is self-checking and ends with
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/hdnp_pkg.sv tb/tb_hdnp_top.sv --top-module tb_hdnp_top -Mdir obj -o sim
./obj/sim
```

Replace `tb_hdnp_top` with any other testbench. Verilator finds the modules
through `-Irtl`.

| testbench | what it shows | run time |
|---|---|---|
| `tb_hdnp_top` | end to end, `HOLD_SAMPLES` = 3000: start-up saturation, lock on 16 random ±50 mV offsets with a 1 mV 200 Hz signal (residual ≤ ~12 codes peak), one sample per 32 clocks in channel order, modulator dithering, M1 off, offset step → full scale → M1 on → relock, `lms_restart`, 10 mV offset drift (accelerated to 20 Hz) tracked, out-of-range offset saturates `d` | ~3 s |
| `tb_hdnp_full` | default parameters: lock with a 1 mV 200 Hz signal and a 10 mV, 0.1 Hz offset drift on every electrode (one full period), `lfp` of every channel follows the drift, no large residual, then M1 switched off after 10 s of samples (about 3.21 million samples) | ~2 min |
| `tb_hdnp_bands` | 2 kHz tones on channels 0–7 and 50 Hz tones on 8–15, ±65 mV electrode offsets on two channels and a 4.5 mV amplifier offset: the 2 kHz tones pass to `ap_code`, the 50 Hz tones are removed there and appear at `lfp`, no saturation after lock | ~1 s |
| `tb_dsp_module` | DSP against a code-level front-end model: channel tags, each channel's DAC average within 16 units of its offset, M1 gating | <1 s |
| `tb_lms_filter` | bit-exact reference of u, d, y, w, both saturations, delay-line alignment | <1 s |
| `tb_lpf_bank`, `tb_delta_sigma_mod`, `tb_dac_decoder`, `tb_sar_logic`, `tb_digital_controller` | bit-exact or bound checks of each block | <1 s |
| `tb_sar_adc`, `tb_cdac`, `tb_neural_amp`, `tb_analog_mux` | the behavioural models against their formulas | <1 s |

## Where this differs from the original chip, and what is a choice here

- The original ADC is asynchronous. Here the SAR steps on the system clock, in
  10 clocks.
- The original filter is described as a "delay-free digital integrator". Here
  it is a leaky integrator with unity dc gain and a pole at 1 − 2⁻⁴.
- The AP/LFP crossover is near 2 kHz rather than 100–200 Hz (see "The band
  split that results").
- These are this design's choices:
  - the saturation widths, 15 bits for both `u` and `d`;
  - the weight format, Q2.34;
  - the ×2 scaling between ADC code and cancellation word;
  - the size of a weight "digit", 2⁻¹²;
  - the wake-up rule for M1.
- The block diagram shows the delay chain as Z^-(N−1) followed by Z^-1. Here
  the DAC takes the first output and the filter feedback the second, because
  that is what makes the per-channel timing consistent.
- The MSB segment is a 31-unit thermometer, as the five thermometer-coded MSBs
  require. Five binary blocks plus 31 thermometer blocks also give the 36
  blocks of 8.2 fF that set the attenuation. The published capacitor-array
  drawing uses different index labels.
- The analog parts are idealised:
  - no capacitor mismatch by default (the CDAC takes mismatched pairs as
    parameters);
  - no comparator noise;
  - no amplifier noise or flicker noise;
  - no pseudo-resistor high-pass.

  The measured ADC ENOB (8 bits), INL/DNL and input-referred noise therefore
  cannot be reproduced.
- Not included:
  - the digital MUX that selects among several pixels;
  - the RF transmitter and antenna;
  - the analog debug buffer.

  The pixel's outputs are brought out as plain ports instead.

## Changing it

- Channel count, widths, oversampling ratio and loop constants are in
  `hdnp_pkg`.
- `HOLD_SAMPLES` and `W_INIT` are module parameters.
- If the channel count changes, the delay line in `lms_filter` follows
  `N_CH_P`. The slot length must stay at least 12 clocks, so that the ADC
  result arrives inside the slot after sampling.
- A real front end replaces `analog_mux`, `neural_amp`, `sar_adc` and `cdac`.
  It connects to `dsp_module` (MUX select, sample strobe, ADC code/valid/
  full-scale, DAC code) and, through `dac_decoder`, to the capacitor array.
