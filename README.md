# WaveSURFER: a 32-voice wavetable synthesizer in SystemVerilog

WaveSURFER makes sound by playing back single-cycle waveforms stored in
memory. The host writes up to 16 waveforms, each 2048 signed 16-bit samples
long, into an on-chip wavetable. It then starts voices. Each voice has a
step size, which sets its pitch, and a table index, which picks its
waveform. Once per audio sample, the hardware visits all 32 voices in turn.
For each voice it advances a phase accumulator by the step size and reads
the sample at that phase from the voice's waveform. The 32 samples are then
summed, scaled by a global gain and handed to an audio sink over a streaming
interface. Every voice has its own step, so the synthesizer can play 32
notes at once. It needs one adder for all the oscillators, one adder for the
mix and one multiplier for the gain.

The architecture follows the WaveSURFER design document, a class project
for a DE1-SoC board that takes the Ensoniq 5503 "DOC" oscillator chip as
its model. That document fixes the register map, the memory sizes, the
block structure and the phase-accumulator scheme. Where it leaves a detail
open, this RTL makes its own choice. Those choices are listed in
[Choices made in this RTL](#choices-made-in-this-rtl).

## Signal chain

```
 Avalon-MM slave (host)                                   Avalon-ST source
 address/writedata/read  ┌──────────────────────────────────────────────┐
 ───────────────────────►│ wave_table_synth                             │
                         │   bus decode ──► osc_ctrl_regs (32 x 3 regs) │
                         │      │           │ step, table, gate, restart│
                         │      │     voice_sequencer ── osc_idx ──┐    │
                         │      ▼           ▼                      ▼    │
                         │  wavetable_bram ◄─addr── oscillator (32 phases)
                         │  16 x 2048 x 16 ──data─►     │ samples[32]   │
                         │                         mixer (21-bit sum /32)│
                         │  AMP_CTRL ─────────►   amplifier (x gain/128) │ sample, sample_right
                         │                              └───────────────►│ sample_valid
                         │  tick divider (50 MHz / 48 kHz)               │◄── ready_left, ready_right
                         └──────────────────────────────────────────────┘
```

| Module | Role |
|---|---|
| `wavesurfer_pkg` | sizes, register-map offsets, control codes, `voice_cfg_t` |
| `wave_table_synth` | top: bus decode, AMP_CTRL, sample tick, stream output |
| `wavetable_bram` | 32768 x 16 dual-port memory: host read/write, playback read |
| `osc_ctrl_regs` | per-voice step, control and table registers |
| `voice_sequencer` | FSM that presents voices 0..31, one per clock, per sweep |
| `oscillator` | 32 phase accumulators that share one adder, plus address generation |
| `mixer` | sums the 32 voices one per clock in a 21-bit accumulator |
| `amplifier` | one 16 x 7 multiply for the global gain |

## Pitch: the phase accumulator and the step size

This is the part that needs the most care.

Each voice owns a 24-bit phase accumulator. It is read as an unsigned
fixed-point number in Q11.13 format: 11 integer bits index the 2048-entry
table, and 13 bits hold the fraction. The memory address is

```
  bram_addr = { table_sel[3:0], phase[23:13] }     (15-bit word address)
```

The step size register is 16 bits wide, in Q11.5 format. It counts table
entries per output sample, with 5 fractional bits. The oscillator aligns
the two binary points by adding `step << 8` to the accumulator. The low 8
bits of the accumulator therefore never change. They are kept so that the
accumulator has the width the design specifies.

The host works the step out from a frequency `f` like this:

```
  step = round( f / 48000 * 2048 * 32 )
```

For example, A4 = 440 Hz gives 18.77 entries per sample, so step =
600.75, rounded to 601 (0x0259). That plays at 601/32 * 48000/2048 =
440.19 Hz. The pitch resolution is 48000 / 2048 / 32 = 0.73 Hz. The
largest step is 2047.97 entries per sample, although anything above 1024
(24 kHz) aliases. The lowest piano note, A0 at 27.5 Hz, gives step 38.

The accumulator wraps modulo 2^24, which is exactly one table period, so
the waveform repeats seamlessly. No multiplier is involved: pitch is set
only by how fast the address walks through the table.

A voice whose gate is off keeps its phase and contributes 0 to the mix.

## One sample period, clock by clock

A divider makes a sample tick every `SAMPLE_DIV` = 1042 clocks. This is
50 MHz / 48 kHz, rounded, so the real rate is 47.98 kHz. A tick starts a
sweep, provided the previous sample has left the design.

| cycle (from the tick edge) | event |
|---|---|
| 0 | `start`: the sequencer enters SWEEP |
| 1 .. 32 | voice `v` is presented in cycle `v+1`. Its registers are read, its phase is updated and `bram_addr` is registered |
| +1 | the wavetable memory returns the word (synchronous read) |
| +2 | the oscillator stores the word in `samples[v]` (0 if the gate is off) |
| 34 | oscillator `valid`: all 32 samples are fresh |
| 35 .. 66 | the mixer adds `samples[0..31]`, one per clock |
| 66 | mixer `valid_out` |
| 67 | amplifier output, then `sample_valid` from the next edge |

`sample_valid` goes high 68 clock edges after the tick. So about 70 of
the 1042 clocks in each period do work, and the rest are idle.

The oscillator's per-voice `samples` registers are what the mixer reads.
The mixer therefore needs them to stay stable for 32 clocks after the
oscillator's `valid`. The top guarantees this: it keeps only one sample in
flight. A tick that arrives while the previous sample is still in the
pipeline, or still waiting for the sink, is held back. It starts the next
sweep as soon as that sample is accepted. This happens only under
backpressure. If the sink stalls for longer than a whole period, the held
ticks merge and one sample period is lost.

## Host interface

The bus is an Avalon-MM slave with byte addresses (18 bits) and 16-bit data.
A write takes effect on the edge where `chipselect` and `write` are both
high. A read (`chipselect` and `read`) returns `readdata` one clock later.
Address bit 0 is ignored.

| Byte offset | Contents |
|---|---|
| `0x00000 + s*0x1000 + 2*i` | wavetable slot `s` (0..15), sample `i` (0..2047). Read/write |
| `0x10000 + v*8 + 0` | voice `v` step size, Q11.5 |
| `0x10000 + v*8 + 2` | voice `v` control, bits [2:0]: 1 = stop, 2 = start, 3 = reset |
| `0x10000 + v*8 + 4` | voice `v` table index (bits [3:0] select the slot; all 16 bits read back) |
| `0x10000 + v*8 + 6` | reserved: ignores writes, reads 0 |
| `0x10100` | AMP_CTRL: gain in bits [6:0]; the upper bits read 0 |
| anything else | ignores writes, reads 0 |

The control codes work as follows:

- **Start (2)** turns the voice's gate on.
- **Stop (1)** turns it off. The phase is kept, so a later start resumes
  from the same point.
- **Reset (3)** turns the gate off and latches a restart request. The next
  time the sequencer visits that voice, its accumulator restarts from 0,
  and the request is then cleared. To retrigger a note from the start of
  its waveform, write 3 and then 2.
- Any other value leaves the gate off.

On reset, every register and phase is 0. All voices are stopped and the
gain is 0, so the design is silent until the host sets it up. The
wavetable memory has no reset.

Registers can be written at any time. A change to a voice takes effect at
that voice's next visit, which may be in the sweep that is running.

## Audio stream

`sample` and `sample_right` carry the same value. `sample_valid` marks a new
sample. A transfer happens on an edge where `sample_valid`, `ready_left` and
`ready_right` are all high. When both sinks are ready, `sample_valid` lasts
exactly one clock. Otherwise the sample is held, unchanged, until both are
ready. Assertions in `wave_table_synth` check both rules: a held sample must
stay stable, and no new sample may arrive while one is still offered.

## Mix and gain arithmetic

- The mixer adds the 32 signed 16-bit samples in a 21-bit accumulator,
  which can never overflow. It outputs the top 16 bits, which is the sum
  divided by 32 with floor rounding. A single full-scale voice therefore
  comes out at 1/32 of full scale, and the full mix never clips.
- The amplifier computes `floor(mixed * AMP_CTRL / 128)`. AMP_CTRL = 127 is
  just under unity gain, and 0 is silence.

The combined gain from one voice to the output is AMP_CTRL / 4096.

## Choices made in this RTL

The design document specifies the blocks, sizes and register map. It does
not specify the following, so this RTL chose:

- the Q11.5 reading of the 16-bit step register and its shift by 8 into
  the 24-bit accumulator. The document describes the step both as "Q11.x
  with x = accumulator width − 11" and as 11 integer plus 5 fraction
  bits in 16 bits.
- the meaning of the reset command: restart from phase 0, silent until
  started again.
- the sample tick divider, and the one-sample-in-flight stall policy.
- the held `sample_valid` under backpressure. The description asks for a
  one-cycle pulse and also for backpressure to be respected. Both hold
  when the sink is ready.
- an added `read` input with one-cycle read latency, and an added
  `sample_right` output. The oscillator gets two added ports, `phase_clr`
  and `bram_data`.
- a 15-bit memory word address. The description prints 16 bits, but 4 slot
  bits plus 11 index bits need only 15.
- the voice sequencer as a module of its own beside the oscillator. The
  oscillator takes the voice index as an input.
- the mixer's own counter over the 32 samples after the sweep. The
  description's mixer port list has no voice index.
- mixer scaling by 1/32, amplifier scaling by 1/128, equal left and right
  channels, and reset values of 0.

## Not included

This RTL covers the synthesizer peripheral only. The following parts are
not included:

- the board-level wrapper.
- the hard processor and its bus bridge.
- the vendor audio core, audio PLL (12.288 MHz codec clock) and codec
  configuration core.
- the codec chip.
- the host software: USB-MIDI parsing, note-to-step conversion and
  waveform generation.

The testbench plays the host and the audio sink.

## Simulating

Each testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops by itself, and a watchdog ends
it if it hangs. Each can be built with plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/wavesurfer_pkg.sv \
    tb/tb_wave_table_synth.sv --top-module tb_wave_table_synth -o sim
./obj_dir/sim
```

Replace the testbench name to run another one.

| Testbench | What it checks |
|---|---|
| `tb_wavetable_bram` | a full fill, then random dual-port traffic against a reference array; one-cycle latency; read-first |
| `tb_osc_ctrl_regs` | random writes and read-back; gate decoding; setting and clearing the restart request, including the collision case |
| `tb_voice_sequencer` | indices 0..31 one per clock; `sample_en` on the first voice; a start during a sweep is ignored |
| `tb_oscillator` | 300 sweeps against a model of the accumulators; hashed memory contents catch wrong addresses; `valid` 34 clocks after `sample_en`; phase wrap; restart; gate off |
| `tb_mixer` | random and extreme sample sets; floor(sum/32); 32-clock latency; a spurious strobe is ignored |
| `tb_amplifier` | random and corner values; floor(x*g/128); one-clock latency; outputs hold between strobes |
| `tb_wave_table_synth` | the whole design at its default parameters (see below) |
| `tb_note_pitch` | pitch of single sawtooth notes from MIDI 21 (27.5 Hz) to 108 (4186 Hz), measured from the output over 0.2 s of audio: within 0.2 % of the frequency the step encodes, and within 0.4 Hz + 0.2 % of equal temperament. It uses a shortened tick divider |

The end-to-end test `tb_wave_table_synth` runs with every parameter at
its default. It works as follows:

- It loads all 16 slots over the bus. Slots 0 to 3 hold a sine, a
  sawtooth, a square and a triangle. The other slots hold a hash pattern.
- It reads back tables and registers.
- It plays 400 output samples while starting, stopping and resetting
  voices and changing the gain.
- At one point it has all 32 voices sounding at once.
- It applies random backpressure on both channels and on one channel at a
  time. Some stalls last longer than a whole sample period.
- It compares every output sample with a model of the complete chain.
- It checks the 1042-clock sample period and the 68-clock tick-to-output
  latency.
- It counts the mechanisms above and fails if any of them never
  happened.

It takes well under a second.

Each module's header comment gives its interface, its timing, and which
parts follow the design description and which are this RTL's own choices.
