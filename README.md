# Eight-voice MIDI synthesizer for a small FPGA

This is the FPGA half of a polyphonic MIDI synthesizer. A microcontroller
decodes MIDI note-on and note-off messages, picks one of eight note
generators for each note, and hands the FPGA a key, a velocity, an on/off bit
and the generator number. The FPGA plays up to eight notes at once. Each note
is a stored sine wave stepped at the note's pitch and shaped by an
attack/decay/sustain/release (ADSR) envelope and by the key velocity. The
voices are summed into one 16-bit sample stream at 78.125 kHz. The top 8 bits
of that stream drive an external 8-bit DAC, followed by an analog low-pass
filter.

Two ideas keep the design small:

* **Pitch comes from a phase accumulator.** Each voice adds a per-key
  increment to a 24-bit register once per sample. The top 10 bits of the
  register address the wave table. A fixed 128-entry table maps each of the
  128 MIDI keys to its increment, so no multiplier or divider is needed to
  get the pitch.
* **One ROM serves all eight voices.** The voices run at 78.125 kHz, which is
  the 20 MHz board clock divided by 256. A small arbiter on the 20 MHz clock
  reads the single wave ROM for each voice in turn, eight reads out of every
  256 fast cycles. So the 1024 x 16 table exists once, not eight times.

## Signal path

```
 key, velocity, keyon, sel, en          (from the microcontroller)
        |
  edge_detector ── en rising edge -> one-sample pulse
  voice_decoder ── pulse routed to note generator `sel`
        |
  note_generator x8  (78.125 kHz sample clock)
     key/velocity registers, key_increment_lut, phase_accumulator,
     envelope_generator (note_timer, envelope_increment, sat_adder),
     scaling by envelope and velocity, output register
        |  rom_addr[v] / rom_data[v]
  eight_port_rom  (20 MHz)  ── waveform_rom (1024 x 16 sine)
        |
  sum of 8 voices / 8  ->  audio_out[15:0], dac_data = audio_out[15:8]
```

`clock_divider` makes the sample clock from the 20 MHz clock. It is the MSB of
an 8-bit counter.

## Control interface

| port        | width | meaning                                           |
|-------------|-------|---------------------------------------------------|
| `clk`       | 1     | 20 MHz                                            |
| `reset`     | 1     | asynchronous, active high                         |
| `key`       | 7     | MIDI key number                                   |
| `velocity`  | 7     | MIDI velocity                                     |
| `keyon`     | 1     | 1 = note on, 0 = note off                         |
| `sel`       | 3     | which note generator the message is for           |
| `en`        | 1     | rising edge = "the other inputs are valid, load"  |
| `audio_out` | 16    | mixed output, unsigned, silence = `16'h7FFF`      |
| `dac_data`  | 8     | `audio_out[15:8]`                                 |
| `sample_clk`| 1     | the 78.125 kHz sample clock                       |

The microcontroller drops `en` when a note message starts. It then sets the
key, velocity, on/off and select lines, and raises `en`. Two flip-flops on
the sample clock sample `en`. The first one also acts as a synchronizer. The
output pulse is "newer sample high, older sample low", so each rising edge
loads exactly one generator for one sample. The data lines must stay stable
for the two sample clocks (about 26 µs) after `en` rises. A 3-byte MIDI
message at 115.2 kbaud takes about 260 µs, and `en` stays low for about two
byte times, so every message produces its own edge.

The microcontroller also does the voice allocation. A note-on takes the first
free generator. If all eight generators are busy, the note-on takes generator
7 and the note playing there is dropped. A note-off looks for the generator
that holds the key. The FPGA does not check any of this. A generator simply
loads whatever it is given.

## Pitch: key to phase increment

The wave ROM holds a sine of 128 samples per period. It is repeated eight
times to fill 1024 words, so the 10-bit address can wrap with no jump in the
waveform. The phase register has 24 bits. Bits [23:14] are the ROM address,
and the 14 bits below them are the fractional position. For key *k*:

```
f(k)   = 440 Hz * 2^((k - 69) / 12)
inc(k) = floor( f(k) / 78125 * 128 * 2^14 )
```

Key 0 (8.18 Hz) gives 219, which is about 1/75 of a ROM word per sample. Key
127 (12.5 kHz) gives 336721, which is about 20.6 words per sample and still
below the Nyquist limit. The 14 fractional bits keep the low notes in tune.
`key_increment_lut` builds this table when the design is elaborated, using
the `key_increment` function in `synth_pkg`. `waveform_rom` builds
`round(32767 + 32767 * sin(2*pi*i/128))` in the same way. Neither table is
stored as a data file.

The phase register runs all the time and is not cleared when a note starts.
A new note therefore starts at an arbitrary point of the sine. The envelope
starts from 0, so this cannot be heard as a click.

## Loudness: scaling about the midpoint

This is the part that is easiest to get wrong. Samples are unsigned 16-bit
values with silence at `16'h7FFF`. A value can be scaled only after it has
been centred on zero. Per sample, each voice computes:

```
c   = w - 16'h7FFF                      17-bit signed, -32767 .. 32768
e   = (c * envelope) >>> 16             envelope: 16-bit unsigned
v   = (e * velocity) >>> 7              velocity: 7-bit unsigned
out = (v + 16'h7FFF) [15:0]
```

Both shifts are arithmetic, so they round towards minus infinity. At full
envelope and full velocity the gain is (2^16-1)/2^16 · 127/128 ≈ 0.992, so the
output never reaches the rails. Zero envelope or zero velocity gives exactly
`16'h7FFF`. The multipliers sit between the ROM data and a final output
register. That register keeps glitches in the combinational logic off the
output.

Pipeline: the phase register moves at sample edge *n*. The shared ROM returns
the word before edge *n+1*. The scaled sample appears on the voice output at
edge *n+1*, and in `audio_out` in the same cycle, because the sum is
combinational.

The eight voice outputs are added into a 19-bit sum, and bits [18:3] (the sum
divided by 8) form `audio_out`. The mix therefore cannot overflow. A single
voice at full level only reaches one eighth of the output range.

## Envelope

`envelope_generator` holds a 16-bit envelope, a 20-bit note timer and the
on/off flag. Every sample it adds one signed 17-bit increment through
`sat_adder`. The adder clamps the result to 0 .. 16'hFFFF, so a slope that is
too steep saturates instead of wrapping. `envelope_increment` chooses the
increment:

| condition                         | phase   | default increment |
|-----------------------------------|---------|-------------------|
| note off                          | release | −4                |
| on, time < `atime` (32767)        | attack  | +2                |
| on, `atime` ≤ time < `dtime` (65535) | decay | −1               |
| on, time ≥ `dtime`                | sustain | 0                 |

With the defaults a note rises to 65534 in 32767 samples (419 ms). It then
falls to 32766 by sample 65535 (another 419 ms, to half level) and holds
there. After note-off it falls to 0 in about 8192 samples (105 ms). A note-on
load clears both the envelope and the timer. A note-off load changes only the
flag. The timer saturates at 2^20−1 samples (13.4 s), so a note held that
long does not fall back into its attack. The constants are an `env_cfg_t`
struct. You can change them through the `ENV_CFG` parameter of
`note_generator`.

## Sharing the wave ROM

`eight_port_rom` runs on the 20 MHz clock, and its inputs come from the
sample clock domain.

1. Each port's address passes through two flip-flops on the 20 MHz clock.
2. A 3-bit counter steps through the ports, one per fast cycle. It selects
   one synchronized address for the combinational ROM through an 8-input
   multiplexer.
3. At the next edge it writes the ROM word into that port's data register.

After a voice changes its address, the new word is in its data register
within 2 + 8 fast cycles. The voice reads it 256 fast cycles later. During
those ~10 cycles a data port may still show the old word. Because of the
synchronizers, the new address cannot reach the data registers before the
voice has finished reading the old word, even with skew between the two
clocks. The sample clock is the divider's MSB, so both clocks come from the
same source and their relationship is fixed.

## Files

All files are in `rtl/`, one module or package per file:

| file | contents |
|------|----------|
| `synth_pkg.sv` | sizes, envelope constants, `env_cfg_t`, `env_phase_t`, table formulas |
| `synth_top.sv` | top level: divider, enable edge, decoder, 8 voices, shared ROM, mixer |
| `clock_divider.sv` | 20 MHz / 256 |
| `edge_detector.sv` | `en` level to one-sample pulse |
| `voice_decoder.sv` | select → one-hot load enable |
| `note_generator.sv` | one voice |
| `key_increment_lut.sv` | key → 24-bit phase increment |
| `phase_accumulator.sv` | 24-bit phase register, address = [23:14] |
| `envelope_generator.sv` | ADSR envelope |
| `note_timer.sv` | samples since note-on, saturating |
| `envelope_increment.sv` | slope selection |
| `sat_adder.sv` | clamped two's complement adder |
| `eight_port_rom.sv` | time-shared ROM access on the fast clock |
| `waveform_rom.sv` | 1024 x 16 sine table |

In `tb/`, every module has a self-checking testbench, `<module>_tb.sv`.
`pic_model.sv` is a behavioural model of the microcontroller. It takes MIDI
bytes at 115.2 kbaud timing and drives the FPGA inputs, including voice
stealing and dropping unmatched note-offs.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. For example, the end-to-end test:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
    rtl/synth_pkg.sv tb/synth_top_tb.sv --top-module synth_top_tb -o sim
./obj_dir/sim
```

Use the same command with a block name for the other testbenches. `-Irtl
-Itb` lets Verilator find the submodules. `synth_top_tb` runs the design at
its full default size and envelope constants for about 22 million 20 MHz
cycles (roughly 84,000 samples). This takes about 11 s. The test sends nine
note-ons (the ninth steals generator 7) and holds the notes through attack
and decay into sustain. It then releases them, sends one note-off that no
generator holds, re-strikes a note during its release, and sends a non-note
byte. An independent model of the whole synthesizer predicts `audio_out` for
every sample. The test also checks the 256-cycle sample period. It reports
how often each mechanism occurred and fails if any never happened.

`synth_top_stress_tb` is a second end-to-end run at full size (about 4 s).
It sends 300 random note-on and note-off messages back to back at the full
byte rate, with more than eight keys often held, so many voices are stolen.
It then releases every held key. At the end every envelope must be zero and
the output must be silent, so no note is stuck. Both end-to-end tests share
the reference model `tb/synth_ref_model.sv`.

The block testbenches compare against models written separately from the
RTL. Some of their checks use hand-computed table entries: keys 0–3 and
123–127, and sine words 0–4 and 1020–1023. They also cover:

* both clamps of the saturating adder;
* timer saturation, using a 4-bit timer;
* the 2 + 8 cycle arrival of ROM data at every port;
* a whole default-length envelope.

## Choices and departures

* **Reset.** Every flip-flop has an asynchronous, active-high reset. The
  divider holds the sample clock low during reset, so a synchronous reset
  would never reach the sample-clock flops. In simulation, drive `reset` from
  0 to 1 so that its edge is seen.
* **Divided clock.** The sample clock is a counter bit used as a clock, as in
  the original design. On an FPGA, route it through a global clock buffer, or
  turn the design into a single 20 MHz clock with a 1-in-256 clock enable.
  The eight-port ROM's synchronizers would still work in that case.
* **Fractional bits.** The original text speaks of 10 fractional bits. Its
  address slicing ([23:14]) and its printed table values imply 14, and 14 is
  used here.
* **Sample rate.** 78.125 kHz (20 MHz / 256). A stray 71.125 kHz in the
  original text is taken as an error.
* **Multiplication order.** The envelope is applied first and the velocity
  second, as described. One drawing shows the reverse order. The two orders
  differ only in truncation.
* **Negative overflow in `sat_adder`** is clamped to 0. The original clamped
  every overflow to all ones. The envelope and timer never produce a negative
  overflow.
* **No silence multiplexer.** The original forced `16'h7FFF` when the
  envelope, the velocity or the sample was at midpoint. The arithmetic above
  already gives that value, so the mux is left out.
* **Table generation.** Both tables are computed from their formulas at
  elaboration. Increments are rounded down and sine words to nearest, which
  reproduces every value the original printed.
* **Additions.** The envelope phase output on each generator and the
  `sample_clk` output on the top are there for observation only.

## Limits

* Only note-on and note-off reach the FPGA. There is no pitch bend, no
  controllers and no sustain pedal. A note-on with velocity 0, which many
  keyboards send instead of a note-off, plays as a silent note and does not
  release the generator. That is a limitation of the microcontroller code,
  which this RTL does not include.
* The microcontroller marks a free generator with key 0, so MIDI key 0 cannot
  be tracked as held.
* With the default constants the envelope peaks at 65534, so the upper clamp
  is not reached. It comes into play only with other constants. The block
  testbench of the envelope generator exercises it.
* The microcontroller, the Bluetooth serial link, the DAC (an AD558-class
  8-bit part, 0–2.56 V) and the two RC low-pass stages (1 kΩ, 33 nF, about
  4.8 kHz, with op-amp buffers) are outside this RTL.
