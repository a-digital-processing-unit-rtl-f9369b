# Digital processing unit for a PMT receiver chip

A large photomultiplier tube (PMT) produces pulses from a single photoelectron
(p.e.) up to about a thousand. No single 8-bit ADC covers that range with
enough resolution at the low end. So the receiver digitises the same signal
with three 8-bit ADCs of different gain, in parallel:

| ADC   | range        | role                          |
|-------|--------------|-------------------------------|
| ADC 1 | 0 - 16 p.e.  | high gain, default source     |
| ADC 2 | 0 - 100 p.e. | medium gain                   |
| ADC 3 | 0 - 1000 p.e.| low gain                      |

Sending all three streams would triple the link rate. This design forwards
only one word per clock: the one from the unsaturated ADC with the best
resolution. Small metadata words tell the receiver which ADC a word came
from. While there is no light, noise words are packed two into one. A
second function regulates the baseline of each ADC: a digital loop moves the
ADC reference voltages until the *average* baseline sits on a programmed
target.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable, with one module per
file in `rtl/` and a self-checking testbench per module in `tb/`.

## Block structure

```
            +------------------- waveform_generator (test patterns) ----------------+
            |                 entry 1                          entry 2              |
 adc1 --+   v                                                  v                    |
 adc2 --+--> data_selector --> data_tagger --> ring_buffer --> output_formatter --> out_word
 adc3 --+     (stage 1)         (stage 2)      (64 entries)     (stage 3)           out_kind
   |
   +--> baseline_regulator x3 --> dac_code[0..2]  (to the analog reference DACs)
```

| file                    | what it is                                                      |
|-------------------------|-----------------------------------------------------------------|
| `rtl/adu_pkg.sv`        | widths, source and word-kind enums, buffer entry struct, metadata layout |
| `rtl/data_selector.sv`  | stage 1: three words in, one out, noise detection              |
| `rtl/data_tagger.sv`    | stage 2: time stamp, trigger, overflow flags; buffer write and drop policy |
| `rtl/ring_buffer.sv`    | circular buffer with two read windows                           |
| `rtl/output_formatter.sv` | stage 3: reset word, metadata, data, noise compression       |
| `rtl/waveform_generator.sv` | pattern memory that can replace the ADC words or the selected word |
| `rtl/baseline_regulator.sv` | offset error, coarse/fine scaling, error integrator        |
| `rtl/adu_top.sv`        | the complete unit                                               |

The ADCs, the front-end amplifier, the reference DACs (DAC MIN, DAC MID), the
reference generator and the serial output link are analog or undescribed
circuits. They are not part of the RTL. Their digital interfaces are the
ports of `adu_top`.

## Data words

Each ADC delivers four 8-bit samples per clock as one 32-bit word, with the
earliest sample in bits [7:0]. Samples 35, 36, 37, 38 (hex) therefore form the
word `32'h38373635`. The output keeps the same packing.

## Stage 1: choosing the ADC

Three programmable thresholds are applied to every clock word:

* if any ADC 2 sample is at or above `thr_med`, ADC 2 is close to saturation
  and the word is taken from **ADC 3**;
* otherwise, if any ADC 1 sample is at or above `thr_high`, the word is taken
  from **ADC 2**;
* otherwise from **ADC 1**.

The decision is made anew for every word, with no hysteresis. As soon as the
pulse falls back, the higher-gain ADC is used again. A word from ADC 1 whose
four samples are all below `thr_noise` and below 16 is flagged as noise.

## Stage 2 and the ring buffer

The tagger attaches the source ADC, the noise flag, the trigger input and a
16-bit time stamp (a count of words) to the word. It writes the 54-bit entry
into the ring buffer. When the time stamp wraps, that entry is flagged
`ts_ovf`.

The buffer exists because the output sometimes needs more than one word per
input word. A reset word or a metadata word takes an output slot, and the data
waits in the buffer meanwhile. Noise compression later frees slots and drains
it again.

**Overflow.** If the buffer is full, entries are dropped. Dropping then
continues until the buffer is half empty. The first entry written afterwards
carries a `lost` flag, plus any trigger or counter-overflow flag of the
dropped entries. The receiver sees a metadata word whose time stamp jumps
forward, so it knows exactly which words are missing.

The hysteresis is essential. A flagged entry needs a metadata word, so it
costs two output slots. Without hysteresis, every entry after an overflow
would be flagged and the buffer could never drain. The end-to-end testbench
covers this case.

The buffer has two read windows (oldest and second-oldest entry). The
formatter can therefore consume two noise entries in one clock. Without that,
compression would halve the output words but not the buffer's drain rate.

## Stage 3: the output stream

One 32-bit word leaves per clock at most. `out_kind` tells the receiver what
kind of word it is:

| `out_kind`    | word                                                                 |
|---------------|----------------------------------------------------------------------|
| `KIND_RESET`  | `32'h0000_0000`, the first word after reset                           |
| `KIND_META`   | metadata for the next word, see below                                 |
| `KIND_DATA`   | four 8-bit samples from the ADC named by the last metadata            |
| `KIND_NOISE2` | two noise words: the low nibble of each of 8 samples, older word in [15:0] |
| `KIND_NOISE1` | one noise word that could not be paired, in [15:0]; [31:16] are 0     |

The formatter sends a metadata word ahead of an entry in these cases:

* it is the first entry after reset;
* the source ADC differs from the previous one;
* the noise state differs from the previous one;
* the entry carries a trigger;
* the entry carries a time-stamp overflow;
* the entry carries a lost flag.

The metadata word is laid out as follows:

```
[31:16] time stamp of the following word
[15:8]  0
[7]     0
[6]     lost       (words before this one were dropped)
[5]     ts_ovf     (time-stamp counter wrapped)
[4]     trig
[3]     noise      (following words are compressed)
[2]     0
[1:0]   source ADC, 1..3
```

Words after the metadata have consecutive time stamps. A `KIND_NOISE2` word
counts for two. A receiver can therefore rebuild the time of every sample.

**Noise pairing.** A noise entry is paired with the next entry only if that
entry is also noise and carries no event. Otherwise it goes out alone as
`KIND_NOISE1`. A noise entry at the head of the buffer waits until a second
entry has arrived. If the input stops, the last noise entry stays in the
buffer until the input resumes.

Compression keeps four bits per sample. It is lossless because a noise sample
is by definition below 16.

**Rates.** Three 32-bit words enter per clock and at most one leaves: a 3:1
reduction. While there is no light, two words become one: a further 2:1
reduction. In simulation, 60000 dark input words gave exactly 30000 output
words.

**Latency.** A word is taken into the selector register at clock edge 0. It
appears on `out_word` after edge 3, plus one clock for each reset or metadata
word sent ahead of it while it waits. A noise word may wait one extra clock
for its partner.

## Baseline regulator

Offsets from bias drifts or from the tail of an earlier pulse move the ADC
baseline. That wastes ADC range and biases the charge integral. Each ADC has a
loop that corrects the offset at its source, the ADC reference voltages:

```
ADC word --> offset error --> scaling --> error integrator --> ctrl_code --> DAC MIN / DAC MID
   ^          sum(4 samples)    x 2^-coarse_shift  (accumulator,       (analog, outside)
   |           - 4*target       or 2^-fine_shift    FRAC fraction bits)        |
   +------------------------- reference generator <-- ADC <--------------------+
```

* **Offset error.** The error is the sum of the four samples of a word minus
  four times the target, i.e. the error of the word mean in quarter LSBs.
* **Scaling.** If the mean error is larger than `switch_thr` LSB, the error is
  scaled by 2^-`coarse_shift` (coarse tuning: fast). Otherwise it is scaled by
  2^-`fine_shift` (fine tuning: precise). The switch is automatic on every
  word.
* **Integrator.** The scaled error is added to an accumulator with `FRAC`
  fraction bits, which saturates at its limits. The top `CTRL_W` bits form
  `ctrl_code`. The code resets to mid-scale, which means no correction. A
  higher code is meant to raise the references and so lower the ADC output.

The regulator never stops. Truncating the accumulator to `ctrl_code` makes the
loop a first-order sigma-delta modulator. When the offset needed lies between
two codes, the code toggles between them and the *average* baseline settles on
the target. In the testbench the target is 3 LSB and the ADC model has noise
and offset steps of 4 LSB. The mean ADC output settles to 3.00 ± 0.05, and the
code keeps toggling. Coarse tuning settles in about 60 words, against about
125 with fine tuning alone.

The loop includes the analog path, so its delay is at least two clocks.
Coarse gains of 2^-2 or smaller keep it stable. `freeze` holds the integrator,
for example while a pulse is being digitised. All three regulators share one
set of settings.

## Waveform generator

For tests without a light source, a 64-row pattern memory is written through
`wg_cfg_*`. Each row is 96 bits: the ADC 1, 2 and 3 words. With `wg_play`
high, rows `0 .. wg_length-1` play in a loop, one per clock. `wg_entry`
selects where they enter the chain:

* `1` replaces the three ADC words, so the whole chain is exercised;
* `2` replaces the selector output. The row's bits [31:0] become the data,
  [65:64] the source and [66] the noise flag. This lets the buffer and the
  formatter be driven with any sequence.

Playback stops one clock after `wg_play` falls. The row already loaded is
still delivered.

## Top-level interface (`adu_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `adc_valid`, `adc1`, `adc2`, `adc3` | in | 1, 32 ×3 | ADC words, four samples each |
| `trig` | in | 1 | trigger, aligned with the ADC words |
| `thr_noise`, `thr_high`, `thr_med` | in | 8 ×3 | selector thresholds |
| `wg_cfg_we`, `wg_cfg_addr`, `wg_cfg_data` | in | 1, 6, 96 | pattern memory write |
| `wg_entry`, `wg_length`, `wg_play` | in | 2, 7, 1 | generator control |
| `bl_target`, `bl_coarse_shift`, `bl_fine_shift`, `bl_switch_thr`, `bl_freeze` | in | 8, 4, 4, 8, 1 | regulator settings |
| `dac_code[3]` | out | 6 ×3 | control code per ADC, for its DAC MIN and DAC MID |
| `bl_coarse` | out | 3 | regulator in coarse tuning |
| `out_valid`, `out_word`, `out_kind` | out | 1, 32, 3 | output stream |
| `buf_level`, `buf_max_level`, `buf_dropped` | out | 7, 7, 1 | buffer occupancy, high-water mark, drop pulse |

Parameters are `BUF_DEPTH` (64), `WG_DEPTH` (64), `CTRL_W` (6) and `FRAC` (8).
`BUF_DEPTH` must be a power of two.

## What is specified and what is chosen here

These points follow the original design:

* the three ADCs and their ranges;
* the three thresholds, with ADC 1 as the default;
* the three processing stages with a ring buffer;
* the reset word, and metadata ahead of data on threshold crossings and
  triggers;
* counter overflows reported in metadata;
* two-to-one noise compression;
* the internal waveform generator feeding several entry points;
* the regulator's structure: offset error, scaling with automatic coarse/fine
  switching, an error integrator driving the reference DACs, and continuous
  sigma-delta regulation.

These points are choices of this implementation:

* which ADC each threshold is compared with, and per-word selection;
* the metadata layout, and the `out_kind` side band used to parse the stream;
* the noise format: the low nibble of each sample;
* buffer depth, time-stamp width, and the drop-and-resume overflow policy;
* the two-window buffer read;
* the generator's memory size, row layout and the two entry points;
* the regulator's power-of-two scaling, averaging over four samples, widths,
  switch threshold and `freeze` input;
* the regulator's input: it reads the encoded 8-bit samples, not the raw
  comparator outputs of the ADC.

The original stream example shows a metadata word with the value
`32'h00002020` and a longer delay before the data appears. This
implementation's metadata values and clock counts differ from that example.
The reset word and the byte packing match it.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends a hung run with a failure. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/adu_pkg.sv tb/tb_adu_top.sv \
          --top tb_adu_top -Mdir obj_top && ./obj_top/Vtb_adu_top
```

Replace `tb_adu_top` with any other testbench in `tb/`:

* `tb_data_selector` checks selection against a model on random and
  threshold-edge words.
* `tb_data_tagger` runs 80000 words with random buffer-full and resume
  inputs. It checks every entry, time-stamp wrap, drops, the lost flag and
  carried-over triggers.
* `tb_ring_buffer` compares the buffer against a queue model with pops of 0,
  1 and 2 entries, running it full and empty.
* `tb_output_formatter` feeds a random entry stream through a buffer model
  and compares the output with a reference encoder, word by word.
* `tb_waveform_generator` checks pattern playback at both entry points for
  several lengths, and pass-through.
* `tb_baseline_regulator` compares against an integer model of the three
  stages in open loop. In closed loop with a behavioural ADC it checks
  settling, the average baseline and coarse-versus-fine settling time.
* `tb_adu_top` runs the full unit at its default parameters. It covers a ramp
  after reset, pulses up to 885 p.e. with triggers, and a trigger burst that
  overflows the buffer. A 70000-word dark stretch follows, with baseline steps,
  noise compression and a time-stamp wrap. Last comes waveform-generator
  playback at both entry points. A stream decoder accounts for every word and
  requires each mechanism to occur at least once. It takes under a second.
* `tb_adu_playback` plays a stored light pulse of up to 1000 p.e. through the
  waveform generator, as in a laboratory test. It runs the full unit at its
  default parameters. Every sample is rebuilt in p.e. from the ADC that the
  metadata names and must lie within one LSB of the truth. Noise and all
  three gains must each occur.
