# Omnichord-style chord synthesizer in SystemVerilog

This is an FPGA instrument modelled on the Omnichord. Each note is played from a
pre-recorded sample on an SD card. The player chooses a **chord** on a PS/2
keyboard and a **note within that chord** by touching a resistive ribbon. The
ribbon is split into twelve sections, and each section is one note of the
chord's twelve-note progression. Under any finger position the ribbon therefore
offers only notes that fit the chord. Two switches add a second note, either the
next note of the progression ("third") or the one after it ("fifth"). The two
notes are read from the card in turn and mixed.

The core difficulty is keeping one or two 44.1 kHz sample streams flowing
without gaps. The source is a card that can only be read in whole 512-byte
sectors, and the notes change at the player's will. The design handles this in
four ways:

- It stores every note padded to whole sectors.
- It alternates sectors between the two notes.
- It buffers through two FIFOs.
- It drops zero bytes, which makes the notes loop seamlessly.

## Signal path

```
PS/2 keyboard ─ ps2_decoder ─ key_hold ────────────────┐
                                                        ├─ note_selector ─ sd_reader ═ SD controller (external)
MCP3008 ADC ── ribbon_decoder ─ ribbon_stabilizer ─────┘        │  (sw[1:0])   │
                                                                       ┌────────┴────────┐
                                                                  sample_fifo 0    sample_fifo 1
                                                                       └──── sample_player ──── pwm ── aud_pwm
```

All logic runs on one 100 MHz clock, `clk`. It has a synchronous, active-high
reset, `rst`. The slow interfaces are handled by counting: the 200 kHz ADC
clock, the PS/2 clock, and the 2268-clock sample period. The one generated
clock is `sd_clk`, a 25 MHz clock for the SD-card controller, which is not part
of this RTL.

| file | role |
|---|---|
| `rtl/omnichord_pkg.sv` | shared types (`sample_t`, `sd_addr_t`, `harmony_e`, ...) and constants (512-byte sector, 27 chords, 12 notes) |
| `rtl/omnichord_top.sv` | the instrument: wires every block below |
| `rtl/ps2_decoder.sv` | PS/2 frame receiver (start/parity/stop checks, stall timeout) |
| `rtl/key_hold.sv` | keeps the last key pressed; ignores the 0xF0 release prefix |
| `rtl/ribbon_decoder.sv` | SPI master for the MCP3008; reading → section 0..12 |
| `rtl/ribbon_stabilizer.sv` | maximum of every 4096 readings |
| `rtl/note_selector.sv` | key + section + switches → SD addresses of the two notes |
| `rtl/sd_reader.sv` | sector requests, note alternation, FIFO writes |
| `rtl/sample_fifo.sv` | 2048-entry FIFO; two instances, each entry a byte plus its mode bit |
| `rtl/sample_player.sv` | sample-rate timer and two-note mixer |
| `rtl/pwm.sv` | 8-bit PWM for the mono audio pin |
| `rtl/clk_divider.sv` | 25 MHz clock for the SD controller |

## Choosing a note

### Chord

`key_hold` stores every scan code except 0xF0. A PS/2 keyboard sends the key's
code on press and `F0 <code>` on release, so the stored key stays that of the
last key pressed. A chord therefore stays selected after the key is let go.

`note_selector` maps 27 letter keys to the 27 chords, in the layout of the
Omnichord's chord buttons:

| row | chord type | keys (left to right) |
|---|---|---|
| Q W E R T Y U I O | major | Eb Bb F C G D A E B |
| A S D F G H J K L | minor | Eb Bb F C G D A E B |
| Z X C V B N M , . | seventh | Eb Bb F C G D A E B |

In the library a chord's number is `root*3 + type`. The roots are in the order
A Bb B C D Eb E F G, and the type is 0 for major, 1 for minor and 2 for seventh.
So U (A major) is chord 0 and `.` (B seventh) is chord 8. Any other key leaves
the chord unchanged.

### Position and address

The ribbon section runs from 0 to 12 and is used directly as the position;
section 12 plays position 11. Every note takes `SECTORS_PER_NOTE` = 22 sectors:
0.25 s at 44.1 kHz is 11025 bytes, padded to 11264. Notes are stored chord by
chord, so

```
address = (chord*12 + position) * 22 * 512          e.g. U, section 2  →  0x5800
```

The harmony partner is at position+1 when `sw` = 1 and at position+2 when
`sw` = 2. If that passes position 11, it wraps three positions down, which is
the same chord tone an octave lower. With `sw` = 0 or 3 only one note plays.

## Reading the card: sectors, two notes, two FIFOs

This is the part of the design that needs the most care.

**Controller handshake.** The external controller (ports `sd_*`) reads a whole
sector per request:

1. While `ready` is high, the reader raises `rd` with a sector-aligned byte
   address.
2. The reader holds `rd` until `ready` drops.
3. The controller then sends the 512 bytes. Each byte is on `dout` when
   `byte_available` rises.
4. `ready` returns when the sector is done.

The controller runs on `sd_clk`, so `ready`, `byte_available` and `dout` each
pass through two flip-flops. A byte is taken on the rising edge of the
synchronized `byte_available`, never on its level, so a byte is never counted
twice.

**Position counters.** A byte counter (0..511) tracks the position inside the
sector, and a sector counter tracks the sector inside the note. After each
sector the address moves on by 512. After sector 21 the reader starts the note
again: a note loops until the selection changes.

**Note boundaries.** The note addresses and the harmony mode are sampled only
when a note starts. A new chord, ribbon section or switch setting is therefore
heard from the next note boundary, at most 0.25 s later. Notes never change in
the middle.

**Harmony by alternation.** With a harmony selected, the reader requests
sectors in this order:

```
note1[s0] → FIFO 0,  note2[s0] → FIFO 1,  note1[s1] → FIFO 0,  note2[s1] → FIFO 1, ...
```

Each FIFO therefore holds only one note, with no extra buffering. In single-note
mode every byte is written to both FIFOs, so the read side works the same way in
both modes.

**Zero bytes.** Each note is synthesized as a whole number of sine periods. The
samples after the last complete period, and the sector padding, are stored as 0
in the unsigned 8-bit format. The reader does not write zero bytes to the FIFOs.
Because of this, a note runs into its own repetition, or into the next note,
without a click or a gap.

**Flow control.** A sector is requested only if every FIFO it goes to has room
for all 512 of its bytes (`count <= DEPTH - 512`). The FIFOs can never overflow,
and while the audio drains them the reader stays one or more sectors ahead.

## Sample rate and mixing

`sample_player` produces a tick every `SAMPLE_PERIOD` = 2268 clocks, which is
44.09 kHz at 100 MHz.

- At a tick it reads one byte from **each** FIFO, but only if **both** hold
  data. Otherwise the tick is skipped, `underrun` pulses and the previous sample
  is held.
- In harmony mode the output is `fifo0/2 + fifo1/2`. In single-note mode it is
  FIFO 0's byte unchanged.
- Which rule applies comes from a mode bit that the reader stores with every
  byte. The mixing therefore always matches the data, even while the FIFOs
  still hold samples from before a switch change.
- The FIFOs have a registered read, so the new sample appears two clocks after
  the tick.

`pwm` compares a free-running 8-bit counter with the held sample. The output is
high while `counter < sample`, so the duty cycle is `sample/256` at a PWM rate
of 390 kHz. The audio pin `aud_pwm` is driven open-drain, as the board's audio
filter expects: it is 0 when the PWM is low and high impedance when it is high.
`aud_level` carries the same level as an ordinary output.

## Ribbon interface (MCP3008)

The ribbon is a potentiometer on channel 1 of an MCP3008 10-bit converter. Its
pins are CS, D_IN, D_OUT and CLK.

`ribbon_decoder` generates the SPI clock at 200 kHz: it toggles every
`HALF_PERIOD` = 250 system clocks. It runs frames of `FRAME_CYCLES` = 20 SPI
clocks in mode 0: data changes on the falling edge and is sampled on the rising
edge. Each frame goes as follows:

| SPI clock | CS | D_IN | D_OUT |
|---|---|---|---|
| 0–4 | low | 1, 1, 0, 0, 1 (start, single-ended, channel 001) | – |
| 5 | low | – | null bit |
| 6–15 | low | – | B9 … B0 |
| 16–19 | high | – | – |

After B0 the decoder outputs the 10-bit `reading` and
`level = floor(reading*13/1024)`, a number from 0 to 12. This happens 10,000
times a second. `ribbon_stabilizer` outputs the largest level of each 4096
readings, about 2.44 updates per second. Taking the maximum filters out the
downward glitches of a resistive strip.

## Parameters

All defaults are the real instrument's values.

| module | parameter | default | meaning |
|---|---|---|---|
| top | `ADC_HALF_PERIOD` | 250 | system clocks per half SPI clock (200 kHz) |
| top | `ADC_FRAME` | 20 | SPI clocks per ADC reading |
| top | `STAB_WINDOW` | 4096 | readings per stabilized value |
| top | `SECTORS_PER_NOTE` | 22 | note length in 512-byte sectors |
| top | `FIFO_DEPTH` | 2048 | entries per FIFO (power of two, at least 1024 so that two sectors fit) |
| top | `SAMPLE_PERIOD` | 2268 | system clocks per audio sample |
| top | `SD_CLK_DIV` | 4 | 100 MHz / 4 = 25 MHz SD clock |
| top | `PS2_TIMEOUT` | 200000 | clocks after which a stalled PS/2 frame is dropped |

The card must hold the notes in the layout described above: 324 notes, each
starting on a multiple of 11264 bytes (with the default `SECTORS_PER_NOTE`),
as unsigned 8-bit samples.

## Where this design differs from the original instrument, and what it adds

The original instrument was built with vendor IP and a third-party SD
controller. Its description leaves several details open. This RTL fills them in
as follows:

- **SD controller:** not included. The top exposes its `rd / address / ready /
  byte_available / dout` interface and supplies its 25 MHz clock.
- **FIFOs:** plain synchronous FIFOs on a memory array, in place of a vendor
  FIFO.
- **Clocking:** one clock domain with enables, in place of separate 200 kHz and
  25 MHz logic clocks.
- **Keyboard:** the key layout, chord numbering and PS/2 frame checks are this
  design's own.
- **Address formula:** matches the one worked example known from the original
  (U, section 2 → 0x5800).
- **Ribbon:** the mapping of the 10-bit reading onto 13 sections is
  `floor(reading*13/1024)`. The 16 + 4 split of the 20-clock ADC frame is also
  this design's choice.
- **Harmony:** the wrap-around above position 11 is this design's choice.
- **Stabilizer window:** it counts 4096 *readings*, which gives the 2.44
  updates per second that the original quotes. A window of 4096 *clock
  cycles* would give about 49 updates per second at 200 kHz.
- **Reader:** the FIFO-room check, writing both FIFOs in single-note mode, and
  taking new notes only at note boundaries are explicit design decisions.
- **Not reproduced:** the two-stage pipeline that the original mentions for its
  SD reader. The reader here has no long combinational path worth splitting.
- **Four-note harmony:** not implemented. The original names four simultaneous
  notes only as a theoretical limit (4 × 512 clocks of sector writing against
  the 2268-clock sample period). This design, like the original, builds two.
- **After reset:** the reader's first note is the selector's reset note (chord
  0, position 0, single). The player's selection takes effect from the second
  note.
- **Mode tag:** every FIFO entry carries a mode bit next to its byte, so each
  FIFO is 2048 × 9 bits. The original's description does not say how its mixer
  learns the mode. With the tag, a switch change is applied exactly where the
  data of the new mode begins in the FIFOs.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it establishes |
|---|---|
| `tb_ps2_decoder` | good frames decoded once; bad parity/start/stop rejected; recovery after a cut-off frame |
| `tb_key_hold` | 0xF0 never replaces the held key |
| `tb_ribbon_decoder` | with an MCP3008 model: command 11001, exact readings and sections, one result per 20 SPI clocks |
| `tb_ribbon_stabilizer` | one result per window, equal to the window maximum |
| `tb_note_selector` | all 27 keys × 13 sections × 4 switch settings against an independent table; 0x5800 example |
| `tb_sd_reader` | request order in single and harmony mode, mode change at the note boundary, every non-zero byte to the right FIFO, zero bytes dropped, stop after two sectors when the FIFOs are full, mode tag on each byte |
| `tb_sample_fifo` | random traffic against a queue model |
| `tb_sample_player` | tick spacing, mixing, underrun behaviour |
| `tb_pwm` | duty cycle and exact cycle-by-cycle comparison |
| `tb_clk_divider` | divide-by-4 waveform |
| `tb_omnichord_top` | end to end at reduced sizes: single, third and fifth runs, and switch changes while playing; predicts every sample from the card contents; counts each mechanism (break code, chord change, stabilizer update, octave wrap, zero drop, FIFO-full wait, underrun, note change, live switch change) and fails if one never happens |
| `tb_omnichord_full` | end to end at the default sizes: U + section 2 → the first stable ribbon value after 4096 readings at 10 kHz, then the note at 0x5800 played completely, samples at 2268-clock spacing (about 80 M clocks, about a minute) |
| `tb_omnichord_harmony_full` | the third harmony at the default sizes: the two notes' sectors alternate (0x5800, 0x8400, 0x5A00, ...), every sample equals the predicted a/2 + b/2, and no tick finds a FIFO empty during a whole note pair |

The behavioural models used by the testbenches are:

- `sd_card_model` (controller plus card)
- `mcp3008_model`
- `ps2_keyboard_model`
- `tb_sd_data_pkg`, which gives the card contents as a hash of the address,
  with zeros at note ends and at every 97th byte

To run one testbench with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_omnichord_top -y rtl -y tb +libext+.sv -Irtl \
  rtl/omnichord_pkg.sv tb/tb_sd_data_pkg.sv tb/tb_omnichord_top.sv
./obj_dir/Vtb_omnichord_top
```

Every module in `rtl/` lints cleanly with `verilator --lint-only -Wall`, apart
from unused-signal warnings. It also elaborates in Yosys through its slang
front end. The FIFOs infer memories: 2 × 2048 × 9 bits.
