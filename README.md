# Bitmap-driven universal CCD controller

A CCD camera needs a set of clock waveforms: vertical phases that move a whole
line of charge, horizontal phases that move one pixel to the output, a reset
clock, and the timing of the correlated-double-sampling video chain and the
ADC. Every CCD model wants different patterns and different voltages. This
controller fixes no pattern in logic. It stores the waveforms as a **bitmap**
in a RAM: one 16-bit word per time step, one bit per signal. The controller
plays that RAM back: the vertical pattern once per line, then the horizontal
pattern once per pixel. It needs no processor, and the RAM's data output *is*
the digital waveform. The host computer writes the bitmap, four frame
parameters and the DAC voltage levels over a simple strobed bus. To support a
new CCD, the host writes a new bitmap and new levels.

The RTL follows a published concept for a microprocessor-free universal CCD
controller built around one programmable logic device (PLD) and one memory
chip. That concept gives the structure: four blocks inside the PLD, a bitmap
RAM, an analog board with two octal DACs and analog switches. It also gives
the bit layout of the bitmap, the four initial conditions of a readout, and
the command style: decoded addresses, with latches that clear themselves once
the command has run. It does not give bus widths, an address map, memory
depth, handshakes or any cycle timing. Those are choices made here, listed
under [Own choices](#own-choices-and-how-far-to-trust-them).

## The bitmap word

| bit | signal | meaning | bit | signal | meaning |
|----:|--------|---------|----:|--------|---------|
| 0 | `phi_h[0]` | horizontal clock phase 1 | 8 | `sr` | sample reset (integrator reset) |
| 1 | `phi_h[1]` | horizontal clock phase 2 | 9 | `ds` | dark (reference) sample |
| 2 | `phi_h[2]` | horizontal clock phase 3 | 10 | `ss` | signal sample |
| 3 | `phi_r` | reset clock | 11 | `ad` | ADC trigger |
| 4 | `phi_v[0]` | vertical clock phase 1 | 12-15 | – | spare |
| 5 | `phi_v[1]` | vertical clock phase 2 | | | |
| 6 | `phi_v[2]` | vertical clock phase 3 | | | |
| 7 | – | spare | | | |

This is the layout for a three-phase CCD: `bitmap_word_t` in `rtl/ccd_pkg.sv`.
Nothing in the controller decodes the bits. They go straight from the RAM
to the outside, so a CCD with other phases only needs a different bitmap.
Only the analog switch model gives meaning to bits 0-6, because it chooses
which voltage each clock line gets.

## How a frame is read out

The sequencer holds four *initial conditions*, written by the host:

| register | meaning |
|----------|---------|
| `V_TIME` | words in one vertical (line-transfer) pattern |
| `H_TIME` | words in one horizontal (pixel) pattern |
| `NPIX`   | pixels per line |
| `NLINE`  | lines per frame |

The RAM holds the vertical pattern at words `0 .. V_TIME-1`. The horizontal
pattern follows directly at `V_TIME .. V_TIME+H_TIME-1`, so the host writes
both in one pass. A frame is:

```
for line in 0 .. NLINE-1:
    play words 0 .. V_TIME-1                      (vertical transfer)
    repeat NPIX times:
        play words V_TIME .. V_TIME+H_TIME-1      (one pixel)
```

Each word is held for `TRES` master-clock cycles. `TRES` is the *timing
resolution*: the clocking block divides the master clock and gives the
sequencer one step-enable every `TRES` cycles. A long, slow pixel can use a
short bitmap with a large `TRES`. A finely shaped clock edge needs a small
`TRES` and more words. A frame therefore takes exactly

```
NLINE * (V_TIME + NPIX * H_TIME) * TRES   master clocks
```

At the end of the last pixel of the last line, the sequencer's line counter
gives a one-cycle **carry out**. The control block passes it on as
`frame_done`, and the sequencer parks at address 0. Zero in any of the five
registers is treated as 1.

Timing detail: the address changes on the clock edge where the step-enable is
high. The RAM has a registered read, so the waveform word appears one clock
after its address and lasts `TRES` clocks. The first word of a frame is on the
address bus in the first clock after the start command is accepted. The
waveform-buffer enable (`ctrl.wave_buf_en`) is delayed by the same one clock,
so it covers the waveform exactly. While idle, the RAM keeps presenting
word 0, so the bitmap's first word should be a safe resting state for the CCD.

## Host bus and commands

The host drives an 8-bit address, 16-bit data and a strobe. The strobe is
asynchronous to the master clock: it passes a two-flop synchroniser, and each
rising edge becomes exactly one internal write, 3 to 4 clocks later. Keep
address and data stable for at least 3 clocks after the strobe rises, and
the strobe low for at least 3 clocks between writes.

| address | name | effect |
|--------:|------|--------|
| `0x00` | START_READOUT | start one frame (ignored while busy); leaves RAM writing mode |
| `0x01` | RAM_WRITE | enter RAM writing mode, write address back to 0 (ignored while busy) |
| `0x02` | BITMAP_DATA | write `data` at the current address, advance (RAM writing mode only) |
| `0x03` | STOP | abort a frame at once; leaves RAM writing mode |
| `0x04` | SHUTTER_OPEN | shutter output high |
| `0x05` | SHUTTER_CLOSE | shutter output low, cancels a timed exposure |
| `0x06` | FILTER_STEP | one-clock trigger to the filter wheel |
| `0x07` | START_EXPOSURE | open shutter, wait `EXPTIME` units, close shutter, pulse `exposure_done` |
| `0x10` | H_TIME | parameter |
| `0x11` | V_TIME | parameter |
| `0x12` | NPIX | parameter |
| `0x13` | NLINE | parameter |
| `0x14` | TRES | master clocks per bitmap word |
| `0x15` | EXPTIME | exposure time in units of `EXP_PRESCALE` clocks |
| `0x20-0x27` | bias DAC ch 0-7 | low data byte = 8-bit level |
| `0x28-0x2F` | clock-level DAC ch 0-7 | low data byte = 8-bit level |

Parameter writes are ignored while a readout is busy.

**Command latches.** A decoded command sets a latch, and the latch stays set
until the circuit it triggers has acted. Then the latch clears itself. The
start latch drives the sequencer's `start` input until the sequencer reports
it is running. The stop latch stays set until the sequencer reports it is
idle. So a command is never lost, and a start never fires twice.

A typical session: write the DAC levels. Send RAM_WRITE and the
`V_TIME+H_TIME` bitmap words. Set the four initial conditions and `TRES`.
Run START_EXPOSURE and wait for `exposure_done`. Then send START_READOUT and
wait for `frame_done`.

## Analog driver board (behavioural)

The analog board listens to the same host bus. Its address decoder selects one
of two octal (eight-channel, 8-bit) DACs. Each channel keeps its level in a
latch until the same channel is written again.

* DAC 0: eight bias levels, brought out as `bias_v[0:7]`.
* DAC 1: clock levels. Channel 0/1 is the horizontal high/low level, 2/3 the
  vertical high/low, and 4/5 the reset clock high/low. Channels 6 and 7 are
  spare.

The analog switches connect each of the seven clock lines (`clock_v`, indexed
by bitmap bit 0-6) to the high or low level of its group, as its waveform bit
dictates. The op-amp output stage and the buffers are not modelled: the
voltages are DAC-level voltages, `code/255 * VREF`. The DAC and switch models
use `real` signals. They are meant for simulation and do not synthesise.

## Module hierarchy

```
ccd_controller_system          top: controller board + analog board
├── pld_controller             the programmable-logic controller
│   ├── interface_logic        strobe synchroniser, one write per strobe
│   ├── control_logic          address decode, command latches, exposure timer,
│   │                          shutter/filter/buffer controls, TRES register
│   ├── clocking_logic         timing-resolution divider (step enable)
│   └── sequencer_logic        initial-condition latches, address counter,
│                              pixel and line counters, end-of-frame carry
├── bitmap_memory              2**MEM_AW x 16 RAM, registered read
└── analog_driver              behavioural
    ├── dac_decoder            address -> DAC select and channel (synthesizable)
    ├── octal_dac  (x2)        behavioural: 8 latched 8-bit channels
    └── analog_switches        behavioural: high/low level per clock line
```

`ccd_pkg` holds the shared types: the bitmap word, the address map, the
sequencer control bundle and the control-output struct.

## Parameters (top level)

| parameter | default | meaning |
|-----------|--------:|---------|
| `MEM_AW` | 13 | bitmap RAM address bits (8192 words) |
| `CNT_W` | 16 | pixel and line counter width (up to 65535 each) |
| `TRES_W` | 16 | timing-resolution register width |
| `EXP_W` | 16 | exposure-time register width |
| `EXP_PRESCALE` | 10000 | master clocks per exposure-time unit (1 ms at 10 MHz) |
| `VREF` | 10.0 | DAC full-scale voltage in the model |

The 16-bit word width, the 8-bit DAC resolution and the two eight-channel DACs
come from the original concept. All the other defaults are choices made here.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/ccd_pkg.sv tb/tb_ccd_controller_system.sv \
    --top-module tb_ccd_controller_system -Mdir obj -o sim
./obj/sim +verilator+rand+reset+2
```

`tb_ccd_controller_system` runs the whole system at its default parameters. It
sets fourteen DAC levels and writes a 14-word three-phase bitmap (6 vertical
words, 8 pixel words with reset, sample-reset, dark-sample, signal-sample and
ADC-trigger timing). It steps the filter wheel, works the shutter, and runs a
timed exposure, checking its length (`2*EXP_PRESCALE+1` clocks). It reads out
a 16 x 4 frame at `TRES=3` and a 5 x 2 frame at `TRES=1`. It aborts a third
frame with STOP and checks that a bitmap word sent outside RAM writing mode
is dropped. It compares the waveform with the bitmap on every clock, and
checks each clock line's voltage against its bit. It also counts ADC
triggers, frame lengths and how often each mechanism happened.
`tb_workloads` exercises the sizes: a 65535-pixel line, a 4096-pixel by
3-line frame, and a bitmap filling all 8192 RAM words.

## Own choices, and how far to trust them

These parts follow the original concept: the bitmap layout; vertical-then-
horizontal sequencing driven by pixel time, line time, pixel count and line
count; a programmable timing resolution; the command set (start readout, RAM
writing mode, shutter, filter wheel, exposure time); self-clearing command
latches; the four-block split of the controller and its connections; two
octal 8-bit DACs with analog switches.

The following were chosen here, where the concept says nothing:

* bus widths (8-bit address, 16-bit data), the whole address map, and the
  strobe synchroniser;
* the RAM depth (8192 words) and the RAM layout (vertical pattern first,
  horizontal directly after);
* during bitmap writes, the controller counts the RAM address itself. The host
  gives only a "bitmap word" bus address, not a RAM address;
* the frame-end carry as the sequencer's carry out;
* the timing resolution done as a clock enable on one master clock, rather
  than as a separate divided clock;
* the STOP command, the exposure-time unit, the one-clock filter trigger, and
  ignoring parameter writes while busy;
* which buffers the two buffer-enable outputs drive;
* routing the host data bus into the control block too (for `TRES` and
  `EXPTIME`). The block diagram shows only the address going there;
* asynchronous active-low reset, with every parameter latch resetting to 1;
* in the analog model: the DAC channel assignment, one high/low level pair per
  clock group, latching on the falling edge of the write strobe, and the
  `code/255*VREF` transfer.

Not included: the oscillator, bus and waveform buffers, op-amps, the CCD
head and cryostat, the correlated-double-sampling video processor and the
ADC. These are analog or bought-in parts. The controller only supplies
their timing bits (`sr`, `ds`, `ss`, `ad`).

The controller-board RTL (`pld_controller`, `bitmap_memory`, `dac_decoder`)
is synthesizable. Verilator lint reports no errors, only unused-package-constant
and unused-bit warnings. Synthesis gives about 240 flip-flops and an
8192 x 16 memory. Concurrent assertions guard the bus rules. A strobe gives
exactly one write. The RAM is written only between frames. No bitmap word
reaches the sequencer during a readout. A timed exposure always has the
shutter open. Every block's testbench compares against values worked out
independently. Each testbench has also been shown to fail on a deliberately
broken copy of its block.
