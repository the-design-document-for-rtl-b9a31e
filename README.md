# Two-voice audio sampler: FPGA datapath

This is the programmable-logic half of a keyboard-played audio sampler for
a Cyclone V SoC board with a WM8731 audio codec. A processor on the same chip
reads a USB-MIDI keyboard, turns each key into a note number from 0 (C2) to
48 (C6), and writes it into the FPGA. It also loads two short recordings into
on-chip memory. For every output sample, at 48 kHz, the FPGA:

- plays both recordings at the pitch of the held key;
- blends them with two level knobs;
- low-pass filters the blend with one of 64 cutoff settings chosen by a
  third knob;
- applies clipping distortion and a feedback echo;
- sends the result to the codec.

On a host command it can also record a new sample from the codec's line
input into either sample memory.

All audio is 16-bit signed. Everything here is synthesizable SystemVerilog
with no vendor IP and no data files. The coefficient tables are computed
when the design is elaborated.

```
 host (Avalon-MM) ──► note_receiver ──► sample_param ──► phase step
        │                 │ note on/off, lengths, effect settings
        │ sample loading  ▼
        ├──► sample_ram 1 ◄──► sample_player 1 ─┐
        └──► sample_ram 2 ◄──► sample_player 2 ─┤
                                                ▼
 pot1, pot2 ──────────────────────────────► mixer (2 attenuators + sum)
 pot3[7:2] ─────────────────────────────► lowpass_fir (+ fir_coef_rom)
                                                ▼
                                             clipper ──► delay_effect
                                                              ▼
 codec_i2c_config ──► I2C to codec         codec_dac_if ──► BCLK / DACLRCK / DACDAT
                                                │
                                    tick (one per 48 kHz frame) ──► sample players

 ADCDAT (line-in) ──► codec_adc_if ──► sample_recorder ──► sample_ram 1 or 2
```

## One frame, 256 clocks

The design assumes a single 12.288 MHz clock. This is 256 × 48 kHz, so one
audio frame is exactly 256 clocks. The serial codec interface
(`codec_dac_if`) drives the codec's clocks and also sets the pace for
everything else. At the start of each frame it pulses `tick` for one clock,
and the sample then moves down the chain:

| clocks after `tick` | stage |
|---|---|
| 0–2 | each `sample_player` reads its memory (1-clock synchronous RAM) and presents the word; position advances |
| 3 | `mixer` registers the weighted sum |
| 3–41 | `lowpass_fir` accepts the sum and computes 36 products serially; the result is valid in the 38th cycle after acceptance |
| ~42 | `clipper` registers the driven, saturated sample |
| ~45 | `delay_effect` reads the echo, writes the buffer, outputs dry + wet |
| next frame | `codec_dac_if` shifts the result out, MSB first |

So the output lags the key by one frame (about 21 µs), plus the filter's
group delay of 17.5 samples. The chain finishes about 200 clocks before the
next tick. For that reason no stage uses backpressure. The filter's Avalon-ST
source `ready` is tied high and its sink `ready` is left open. Two assertions
in the top check that the filter and the delay are always idle when the next
sample reaches them. If you change the clock or the codec divider, keep
`2 × CLKS_PER_BCLK_HALF × 32` (the frame length) comfortably above about 50
clocks.

## Pitch: equal-temperament phase steps

`sample_param` maps the note to a playback step. The step is unsigned fixed
point with 16 fraction bits, and each semitone multiplies it by 2^(1/12).
Note 24 (C4) plays the recording at its own rate (step 1.0), note 0 at 0.25
and note 48 at 4.0. The twelve semitone ratios `round(2^(s/12) · 2^14)` are
computed at elaboration. The step is that ratio shifted left by `note / 12`,
so every C gives an exact power of two.

Each `sample_player` holds a 32-bit position (16.16 fixed point). On each
tick it reads the word at the integer part and then adds the step. There is
no interpolation: the word below the position is used. Playback is
one-shot:

- a note-on write restarts both players;
- a player goes silent when its position leaves the sample or when the note
  is released.

In reverse mode a player starts at word `length−1` and subtracts the step.
The direction and the length are latched at note-on. Both voices always play
the same note.

## Mixing without overload

Each voice is scaled by its own attenuator (`gain/256`, with the gain taken
from an 8-bit ADC reading) before the two are added. The mixer keeps the
total gain at or below full scale:

- if `pot1 + pot2 ≤ 255`, the pot values are used as they are;
- otherwise both are scaled by `255 / (pot1 + pot2)`.

For example, both knobs at 0.75 become 0.5 each. This keeps the balance the
player set but stops two loud recordings from overflowing. The sum is still
saturated to 16 bits as a safeguard.

## The filter bank

`fir_coef_rom` holds 64 banks × 36 taps × 8 bits (18,432 bits). Bank `b` is
a Hamming-windowed sinc low-pass with cutoff `(b+1)/128` of the sample rate.
That gives 375 Hz steps, from 375 Hz up to the Nyquist frequency. Each bank
is scaled so its taps add up to 128, which is unity DC gain with 7 fraction
bits. The taps are rounded and clamped to ±127. The formula is in the
module header; the table is built by a constant function, so changing
`NTAPS` or `NBANKS` rebuilds it.

`lowpass_fir` is the direct-form filter `y[n] = Σ h[k]·x[n−k]`, built with
one multiplier:

1. An accepted sample shifts into a 36-entry history register.
2. The bank is latched from `pot3[7:2]`.
3. One coefficient is read and one product accumulated per clock.
4. The result is the accumulator shifted right by 7 and saturated.

Both sides use Avalon-ST `data/valid/ready` with ready latency 0, and the
output is held until it is taken. The 2-bit Avalon-ST `error` code is
also present: the code given with an input beat comes out with that
beat's result. The filter raises no errors of its own, and the top ties the
input code to `00`. Channel and packet signals are left out, because there
is one channel and no packets. A bank change therefore never happens in
the middle of a sample.

Measured through the full design, bank 7 (3000 Hz) passes 1 kHz at 0.999 and
5 kHz at 0.00005, and passes 14 kHz at 0.015. With 8-bit coefficients the
stop band bottoms out at about −36 dB.

## Clipping and echo

`clipper` multiplies by a drive gain in 4.4 fixed point (16 = 1.0, up to
about 16×). It saturates to ±32767/−32768 instead of wrapping, so overdriven
peaks flatten rather than flipping sign.

`delay_effect` keeps a 48000-word (1 s) circular buffer. For each sample:

- it reads `d`, the value written `delay` samples ago;
- it writes `sat(x + d·feedback/256)` back into the buffer;
- it outputs `sat(x + d·mix/256)`.

Feedback makes the echo repeat and decay, and saturation limits runaway
feedback. `delay` is clamped to 1..47999. After reset the buffer is cleared
in the background, one word per free clock (48000 clocks, about 190
frames). Until that finishes the echo is forced to silence.

## Host interface

Avalon-MM agent with 18-bit word addresses and 16-bit data (`note_receiver`).
Writes take one clock. A read holds `waitrequest` for one clock and returns
the value on the second.

| address | register |
|---|---|
| `0x00000` | NOTE: `[5:0]` note (values above 48 become 48), `[8]` on. Writing with `[8]=1` restarts playback |
| `0x00001` | LEN1: sample 1 length in words (reset 48000) |
| `0x00002` | LEN2: sample 2 length in words (reset 48000) |
| `0x00003` | REVERSE: `[0]` |
| `0x00004` | CLIPDRV: `[7:0]`, 4.4 fixed point (reset 16 = 1.0) |
| `0x00005` | DELAY: samples (reset 24000) |
| `0x00006` | FEEDBACK: `[7:0]` /256 (reset 0) |
| `0x00007` | MIX: echo level `[7:0]` /256 (reset 0, i.e. no echo) |
| `0x00008` | RECORD: a write starts recording into sample memory `[0]` (0: sample 1 for LEN1 words, 1: sample 2 for LEN2 words). Reads `[0]` = recording in progress |
| `0x10000 + i` | sample 1, word `i` (write only) |
| `0x20000 + i` | sample 2, word `i` (write only) |

## Codec

`codec_i2c_config` writes eight settings after reset, over I2C at about
99 kHz, with device address 0x34:

- reset;
- power up all sections;
- line input at 0 dB, unmuted, on both channels;
- DAC to the output, line input to the ADC;
- DAC unmuted, ADC high-pass filter on;
- left-justified 16-bit, codec as clock slave;
- 48 kHz normal mode;
- activate.

`done` rises at the end of the sequence. `error` reports a byte the codec
did not acknowledge.

`codec_dac_if` is the clock master. BCLK is clk/8, and 32 BCLKs make one
frame. DACLRCK is high for the left channel. The same mono sample goes to
both channels, changing on falling BCLK edges. The codec master clock (XCK)
is expected to come straight from the 12.288 MHz clock source. The design
does not generate it.

## Recording from line-in

The codec's ADC runs on the same BCLK as the DAC, and its ADCLRCK pin gets
the DACLRCK signal. `codec_adc_if` finds the rising BCLK edges in the
system clock domain and takes ADCDAT there, through a two-flop
synchroniser. The first 16 bits after the left/right clock rises form the
left word. It comes out with a one-clock `valid` about halfway through the
frame. The right word is ignored, so recordings are mono.

A write to RECORD starts `sample_recorder`. Each later ADC word is written
to the next word of the chosen memory, from word 0 to LEN−1 (LEN clamped to
1..48000), and then the recorder stops. A one-second recording therefore
takes one second. During a recording the recorder owns the write port of
both sample memories, and host writes to the sample regions are dropped.
Playback of the memory being recorded is not blocked: it plays whatever
is in the memory at that moment. To play the new sample, the host waits
for RECORD to read 0 and then sends a note.

## Top-level ports (`audio_sampler_top`)

- `clk`, `rst_n`: 12.288 MHz clock; reset is asynchronous and active low.
- Avalon-MM: `avs_address[17:0]`, `avs_write`, `avs_writedata[15:0]`,
  `avs_read`, `avs_readdata[15:0]`, `avs_waitrequest`.
- `pot1`, `pot2`, `pot3`: 8-bit readings of the three knobs, from the board
  ADC (the ADC driver is not part of this RTL).
- `aud_bclk`, `aud_daclrck`, `aud_dacdat`: serial audio to the codec.
- `aud_adclrck`, `aud_adcdat`: serial audio from the codec's ADC.
- `i2c_sclk`, `i2c_sdat_oe`, `i2c_sdat_in`: configuration bus. SDAT is open
  drain: tie the pad low when `i2c_sdat_oe` is 1, otherwise let it float.
- `cfg_done`, `cfg_error`, `voice_active[1:0]`: status.

Parameters: `SAMPLE_DEPTH`, `DELAY_DEPTH` (48000), `NTAPS` (36), `NBANKS`
(64), `CLKS_PER_BCLK_HALF` (4), `I2C_QUARTER` (31).

Memory at the defaults: two 768,000-bit sample memories, a 768,000-bit delay
buffer and the 18,432-bit coefficient ROM. That is 2.32 Mbit in total, about
half of the Cyclone V's embedded memory.

## What is specified and what was chosen

These parts of the design come from its specification:

- the block structure and signal flow;
- 16-bit / 48 kHz audio;
- notes 0–48 for C2–C6, in equal temperament;
- two 48000-word sample memories loaded over a memory-mapped interface;
- reverse playback;
- mixer gains normalised so the sum never exceeds one;
- a 36-tap, 64-bank, 8-bit-coefficient low-pass filter with an Avalon-ST
  interface and no backpressure;
- saturating clipping;
- a feedback delay with a 48000-word buffer;
- codec configuration over I2C;
- recording from the line input, which the specification lists only as a
  tentative feature with no details.

These choices are this implementation's own:

- the 12.288 MHz clock and the frame-driven timing;
- which note plays at the recorded rate (C4);
- one-shot playback without interpolation;
- the fixed-point formats;
- the coefficient design and the linear cutoff spacing;
- the serial (one multiplier) filter;
- placing the clipper between the filter and the delay;
- the delay and mix formulas;
- the register map and reset values;
- recording control through LEN1/LEN2 and the RECORD register, the mono
  left channel, and one word per 48 kHz frame.

The codec register values and the serial format follow the codec's data
sheet. If the reference design's 36-tap coefficient sets become available,
only `fir_coef_rom` needs to change.

Not included:

- host software: the MIDI driver, note decoding and reading samples from
  the SD card;
- the ADC that digitises the knobs;
- the microphone input (only the line input is set up for recording);
- a second one-second buffer of the mixer output that appears in the memory
  budget. Its purpose is not specified, so nothing here uses it.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the
block against a reference model written from the specification (the real
arithmetic is in `tb/tb_ref_pkg.sv`) and prints
`TB_RESULT checks=N failures=M`. `tb/wm8731_model.sv` is a behavioural model
of the codec's serial-audio receiver, ADC transmitter (random line-in
words) and I2C slave.

- `tb_audio_sampler_top` runs the whole design at its default sizes for 500
  frames. A frame-accurate model of the complete chain predicts every output
  sample, and the test compares them all. The test covers:
  - note-on, retrigger and note-off;
  - four pitches, reverse playback and the end of a sample;
  - level normalisation;
  - filter bank changes;
  - clipping;
  - echo with feedback and saturation;
  - a read with `waitrequest`;
  - the codec configuration;
  - reverse playback from the last word of the 48000-word memory;
  - a 200-word line-in recording into sample 2. The memory must then hold
    consecutive words sent by the codec model and nothing past the length,
    and a host write made during the recording must be dropped.
- `tb_workload_cutoff` plays a three-tone signal through the full design at
  the banks nearest 2.9 kHz and 7.6 kHz. It measures each tone's gain and
  compares it with the bank's frequency response.
- `tb_workload_one_second` fills all 48000 words of sample 1 (silence with
  two impulses) and plays the whole second at the recorded pitch, with the
  delay at its longest, 47999 samples. Every output sample is compared with a
  reference model, and the voice must stop exactly after the last word.
- The block testbenches cover timing (latencies, frame length, BCLK rate),
  the Avalon handshakes (held output under backpressure, a single
  `waitrequest` clock) and corner values.

All testbenches pass with Verilator 5, and all RTL also elaborates with
slang (yosys). The design has not been run on hardware. The codec settings
have only been checked against the behavioural model.

## Simulating

Verilator 5 with `--timing` is enough. From the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/audio_pkg.sv tb/tb_ref_pkg.sv tb/tb_audio_sampler_top.sv \
    --top-module tb_audio_sampler_top
./obj_dir/Vtb_audio_sampler_top
```

Replace the testbench name to run another one, for example `tb_lowpass_fir`,
`tb_delay_effect` or `tb_workload_cutoff`. Each run takes seconds. Verilator
has no X state, so all state that is read is reset, and the simulator starts
everything else at random values. The shared package `audio_pkg.sv` (types,
register addresses, `sat16`) must come first on the command line, and
`tb_ref_pkg.sv` before any testbench that uses it.
