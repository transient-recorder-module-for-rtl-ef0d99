# Four-channel 200 MS/s transient recorder FPGA

This is synthesizable SystemVerilog for the FPGA of a PCI transient recorder
built to digitise detector pulses from a neutron spectrometer. There are four
channels of 8-bit samples at 200 MS/s. The design does not stream every
sample. It records only the pulses that matter:

1. Each channel watches its own samples for a trigger.
2. On a trigger it keeps a programmable stretch of samples from *before* the
   trigger (the pre-trigger part) and the rest of the pulse after it.
3. It files the whole pulse in a local buffer.
4. In a shared list, it notes which channel fired, where the pulse lies in
   the buffer, and a 40-bit time mark with 5 ns resolution.

A DSP on the same board drains the buffers and the list in real time over its
64-bit external memory bus. It is interrupted when there is work to do.

The structure follows the published design of the JET MPRu transient recorder
module (a Virtex-II Pro FPGA between four ADC08200 converters and a TI
TMS320C6415 DSP). That description names the blocks, their purpose and their
key numbers. It leaves the register map, the bus details, the field layouts
and most of the internal mechanisms open. Those parts are this design's own,
and the section "Own choices" lists them.

## Block overview

```
 adc_data[c] ─► acq_channel (x4) ─────────────────────────────┐
 ext_trg[c]     ├ trigger_detection ─► trigger_format ─┐ CHx_TRG to the other channels
                │                      trigger_select ◄┘ (own or another channel's trigger)
                ├ pretrigger_buffer (2048 x 8, circular)
                ├ storing_control ─► tag ──► pulse_parameter_recorder (512 tags)
                └ secondary_buffer (2048 x 64, dual clock) ─┐      ▲
 ext_start ─► timer40 (40 bit) ── time mark ───────────────────────┘
                                                             │
 DSP EMIFA ◄─► emic ◄─► config_regs, atc, buffers ◄──────────┘
 ext_int[3:0] ◄─ igb (timer overflow, "SB holds N pulses")
```

`tr_fpga` is the top level. Every other file in `rtl/` is one block or a small
helper (`cdc_sync`, `cdc_pulse`, `cdc_gray`, `cdc_bus`, `sync_edge`). `tr_pkg` holds the
shared constants, the channel configuration struct `chan_cfg_t` and the
pulse tag struct `ppr_tag_t`.

## One channel, sample by sample

**Trigger detection.** The detector keeps the last four samples. It forms the
sliding sum of 1, 2, 3 or 4 of them, chosen by `avg_m1`. It does not divide
by the count. Instead it compares the sum with `level × (avg_m1+1)`, which
gives the same result. The level runs from 1 to 254. The input span is -5 V
to 0 V, so code 1 is about -19.6 mV and code 254 about -4.98 V: a larger code
means a more negative voltage.

A trigger is a *crossing*:

- In ascending mode, the average goes from below the level to at or above it.
- In descending mode, it goes the other way.

After each trigger, detection is blocked for `(disable_per+1) × 4` clocks.
That is 20 ns to 5.12 µs in 20 ns steps.

**Trigger format and select.** The channel's trigger `CHx_TRG` is the OR of:

- the self trigger, if its mask bit `self_en` is set;
- the synchronised external TTL trigger, if `ext_en` is set;
- the software trigger, which a register write produces.

Every channel exports `CHx_TRG`. Each channel then picks, with `src_sel`,
whose trigger starts its own storing. With that, one channel can fire several
channels together, or an external trigger can be broadcast to them.

**Pre-trigger buffer.** This is a 2048-entry circular buffer, written and read
every clock. The read pointer trails the write pointer by `pre` (0..2046) plus
a fixed 2-clock alignment. The alignment makes the first stored sample exactly
`pre` samples before the sample that completed the crossing.

The read pointer is a separate counter. Every time the write pointer wraps, it
is reloaded from the write pointer. So after an upset, after reset, or after
a change of `pre`, the buffer is correct again within one write-pointer cycle. That is
2048 clocks, or 10.24 µs. The source gives 10.23 µs, one clock less; closing
that gap would need the reload to come one clock earlier, and it was left as
it is.

**Pipeline.** Take a sample presented on `adc_data` at edge *n* that
completes a crossing:

- it is registered at the channel input (edge *n*);
- the detector flags it at *n+1*;
- the trigger select registers it at *n+2*;
- the storing control accepts it at *n+3*;
- the first sample is written to the secondary buffer at *n+4*.

A software or external trigger enters at the format stage, so it stands for
the sample presented two edges before it.

## Storing pulses: reservation, flow control and overlap

This part needs the most care when the design is used.

- **Reservation.** When the storing control accepts a trigger, it reserves
  `len_m1+1` 64-bit words in the channel's secondary buffer (SB). A pulse is
  8..2048 samples, in steps of 8. Reserving means moving the 12-bit reserve
  pointer forward; the top bit is a wrap bit. The control then writes one
  sample per clock into byte lanes 0..7 of consecutive words. Sample *k* of a
  word sits in bits `8k+7:8k`, lower byte first.
- **Tag.** At the same moment the control builds the tag. It holds the
  channel, the first reserved word, the length and the timer value. Because
  the tag is built at the trigger, it records the *reserved* length.
- **When the tag is offered.** The tag stays in the channel until its pulse is
  completely in the SB. It then goes to the pulse parameter recorder (PPR),
  together with `pulse_done`. A cut pulse's tag goes when the cutting trigger
  arrives. So every tag the DSP finds points at finished data, and the DSP
  can read pulses as soon as their tags appear.
- **Flow control.** The DSP frees SB space by writing a *release pointer* per
  channel: the word up to which it has consumed the data. A trigger is
  accepted only if all of these hold:
  - the channel is enabled;
  - the reserved-but-unreleased words plus the new pulse fit in 2048 words;
  - the PPR has room for two tags from every channel;
  - the channel's previous tag has already gone to the PPR.

  Otherwise the pulse is **lost**. It is counted in a 16-bit per-channel
  counter, readable in register 14.
- **Overlap.** A trigger can arrive while a pulse is still being written. A
  trigger on the clock that writes the last sample is not an overlap.
  Back-to-back pulses therefore run at the full storing rate under either
  policy.
  - With `overlap = OVL_DISCARD`, the new trigger is ignored.
  - With `OVL_STORE_ALL`, the new trigger gets its own reservation and tag,
    and writing switches to it at once. The first pulse is then incomplete.
    Its reserved words are only partly filled. Its tag has the `cut` bit set,
    and its valid sample count is the difference between its time mark and
    the next tag's. The reserved words after the cut keep old contents.
- **Done.** `pulse_done` pulses when the last sample of a pulse has been
  written. The IGB counts these pulses.

The storing control also exports `evt_lost`, `evt_discard` and `evt_trunc`
as one-clock event pulses.

## Pulse tags and the time base

`timer40` counts acquisition clocks (5 ns) in 40 bits. It starts on a
software command or, if enabled, on the synchronised external `ext_start`
pulse, which lets several boards share a time base. It also has stop and
clear commands. Its overflow is an interrupt source.

The PPR holds 512 tags. A round-robin arbiter takes at most one tag per clock
from the four channels. The DSP reads slots at any address. It then writes its
read pointer, which frees the slots up to it. The room flag the channels see
is "at most 504 used". Each channel has at most two tags not yet written: one
offered and one held for the pulse being stored. So a tag that belongs to a
reserved pulse always finds a slot.

Tag word: `[63:62]` channel, `[61]` cut (the pulse was cut short by a
store-all trigger), `[59:52]` words−1, `[51:40]` SB pointer (the low
11 bits are the word address), `[39:0]` time mark.

## DSP interface

**Bus timing (`emic`).** The FPGA is a synchronous slave on the DSP's 64-bit
EMIFA bus, clocked by the 100 MHz DSP clock.

- A write (`ce_n` and `awe_n` low) is taken at the command edge, with no
  latency.
- A read (`ce_n` and `are_n` low) issued at edge *k* drives `emif_ed_o` and
  `emif_ed_oe` after edge *k+2*. The DSP samples the data at *k+3*, so the
  latency is three clocks.
- Reads can be issued every clock, which gives up to 800 MB/s.

The bus pins are a simplified set: `ce_n`, `are_n`, `awe_n`, `pdt_n`, a
16-bit word address, and separate data-in and data-out. A board-level design
must map them onto the real EMIF pins.

**Address map (16-bit word address).**

| `ea[15:14]` | window | word |
|---|---|---|
| `00` | registers | `ea[3:0]` |
| `01` | PPR | slot `ea[8:0]` |
| `10` | secondary buffers | channel `ea[12:11]`, word `ea[10:0]` |
| `11` | ATC streaming port | next word of the ATC source |

**Registers (64-bit).**

| # | access | contents |
|---|---|---|
| 0 | RO | `"TRM1"`, channel count, SB/PPR address bits, timer bits |
| 1 | RW | `[0]` external-start enable, `[1]` timer running (RO); write-one commands `[8]` start, `[9]` stop, `[10]` clear, `[15:12]` software trigger of channels 3..0 |
| 2 | RW | `[4:0]` event enables (SB0..SB3 filled, timer overflow), `[17:8]` 2-bit interrupt line per event |
| 3 | RW | ATC: `[1:0]` mode (0 off, 1 SPA, 2 PDT), `[6:4]` source (0..3 SB, 4 PPR), `[27:16]` start word; a write reloads the pointer; `[59:48]` current pointer (RO) |
| 4..7 | RW | channel 0..3 configuration, `chan_cfg_t` in `[53:0]` (level, averaging, slope, dead time, masks, trigger source, pre-trigger count, length, overlap policy, enable, pulses per interrupt) |
| 8..11 | RW | SB release pointer of channel 0..3, `[11:0]` |
| 12 | RW | PPR read pointer `[9:0]`; PPR write pointer `[25:16]` (RO) |
| 13 | RO | timer |
| 14 | RO | lost pulses, 16 bits per channel |

Configuration registers are meant to be written while a channel is disabled
or idle. They cross to the acquisition clock through plain two-flop
synchronisers.

**Interrupts (`igb`).** There are five events:

- one per channel, when its SB has received `npulse_irq` more pulses
  (0 disables the event);
- timer overflow.

Each event has an enable bit and can be routed to any of four lines,
`ext_int[0..3]`, meant for the DSP's EXT_INT4..7. A line stays high for 8
acquisition clocks per event. Events that arrive while a line is still high
merge into one edge.

**Streaming transfers (`atc`).** Both modes read words without the DSP giving
an FPGA address for each one:

- In SPA (single port access), DMA reads the fixed streaming-port address
  over and over.
- In PDT (peripheral device transfer), the EMIF copies FPGA words straight
  into SDRAM while the bus carries the SDRAM address. Each cycle with `pdt_n`
  low counts as a streaming read.

In both modes the ATC supplies the next word of the chosen SB or of the PPR
and steps its pointer, wrapping inside that buffer.

## Clock domains

- `clk_adc` (200 MHz) drives the channels, the timer, PPR writes and the IGB.
- `clk_dsp` (100 MHz) drives the EMIC, the registers and the ATC.

The two clocks are treated as unrelated. The crossings are:

- The SB and PPR memories are dual-clock arrays (block RAM).
- Commands (timer start/stop/clear, software triggers) cross in toggle
  synchronisers.
- Pointers and counters that leave the acquisition domain cross in Gray code:
  the PPR write pointer, the timer and the lost counters. They change by at
  most one per clock, which is what Gray code needs.
- Pointers the DSP writes can jump by any amount: the SB release pointers and
  the PPR read pointer. They cross in a req/ack handshake (`cdc_bus`). The
  source register is held still while a value is in flight, so the far side
  only ever sees a value that was really written. Space freed by the DSP
  reaches the storing control about 40 ns after the bus write.

`rst_n` is asynchronous, and each domain releases it through two flip-flops.

## Capacities and rates

Each figure below comes from the source description, checked against this RTL
at its default parameters:

- **The oscilloscope comparison acquisition fits.** It used 7 µs of pre-trigger
  and 10 µs (2000-sample) pulses. That is 1400 pre-trigger samples (the limit
  is 2046) and 250 words per pulse (the limit is 256). One SB holds 8 such
  pulses at a time.
- **The display of 10 pulses × 2000 samples fits only if the DSP keeps
  draining.** Ten such pulses need 2500 words, more than one SB holds (2048).
- **The acquisition side can always keep up.** A channel stores one sample per
  clock, so four channels together can store 3.125 M pulses/s of 256 samples,
  or 10 M pulses/s of 80 samples.
- **The bus peak is 800 MB/s.** One 64-bit word per 100 MHz clock. Each
  pulse rate follows from the bus rate divided by the pulse size. The source
  prints the 3.125 and 3.75 M pulses/s figures the other way round; the
  arithmetic gives:

  | pulse size | sustained (300 MB/s) | peak (800 MB/s) |
  |---|---|---|
  | 256 samples | 1.17 M pulses/s | 3.125 M pulses/s |
  | 80 samples | 3.75 M pulses/s | 10 M pulses/s |

  The 10 M pulses/s peak sits exactly at the limit of both the bus and the
  storing side. The sustained rate, and more than 600 MB/s with PDT
  (7.5 M pulses/s at 80 samples), are below the bus peak. Whether they are
  reached depends on the DSP software.
- **Reading the tags costs bus time too.** The DSP reads one tag word per
  pulse. With that, the 800 MB/s bus drains at most 9.1 M pulses/s of 80
  samples (88 bytes each). A burst at the 10 M pulses/s peak is absorbed by
  the buffers, which hold 204 such pulses per channel and 504 tags.
- **The PPR never limits these rates.** It takes a tag every clock.

## Own choices

The published design gives all of the following; the RTL follows them:

- four channels of 8-bit samples at 200 MS/s;
- trigger detection on averages of 1 to 4 samples;
- levels 1..254;
- ascending or descending slope;
- a 20 ns..5.12 µs trigger dead time;
- self, external and software triggers, with masks;
- cross-channel trigger selection;
- discard and store-all overlap policies;
- 0..2046 pre-trigger samples;
- pulses of 8..2048 samples in steps of 8;
- 64-bit SB words with samples lower byte first;
- a 512-tag PPR holding channel, SB position and time;
- a 40-bit, 5 ns timer with software or external start;
- 64-bit registers;
- zero write and three-clock read latency on the DSP bus;
- interrupts on timer overflow and on "SB holds N pulses", mappable to any
  DSP interrupt line.

These parts are this design's own:

- the SB depth: 2048 words (16 KiB) per channel;
- comparing sums instead of dividing, and which direction of code counts as
  ascending;
- the 4-clock grain of the dead time;
- the pointer-reload scheme for the pre-trigger buffer;
- SB release pointers, the PPR read pointer and the lost-pulse rule;
- offering a tag only once its pulse is stored, and accepting back-to-back
  triggers;
- the tag and register layouts and the address map;
- timer stop and clear;
- interrupt pulse stretching;
- how SPA and PDT work inside the FPGA (only their names and purpose are
  given);
- the simplified bus pins;
- the clock-domain crossings and the reset scheme.

Where the RTL differs from the published figures:

- pre-trigger buffer recovery takes up to 10.24 µs, against 10.23 µs quoted;
- the pulse-rate table above swaps two of the quoted numbers, as the bus
  arithmetic requires.

These parts are not built:

- the Schmitt-trigger detector (announced but not described);
- the analog front end, the ADCs, the DSP, the SDRAM, the flash, the PCI
  parts, the clock sources and the host software.

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Example with plain Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
  rtl/tr_pkg.sv tb/tb_tr_fpga.sv --top-module tb_tr_fpga -o sim
./obj_dir/sim
```

Use the same command for any `tb/tb_<block>.sv`. The testbenches build
without warnings, with one exception: `tb_pretrigger_buffer` uses `force` on
the buffer's pointers to model radiation upsets, and Verilator reports that as
`MULTIDRIVEN`. Add `-Wno-MULTIDRIVEN` for that test. The tests are:

- **`tb_tr_fpga`** drives the whole FPGA through its ports, with the timer cut
  to 12 bits so that it overflows. It makes each of these happen and counts
  them: self, external, software and cross-channel triggers; discard and
  truncation on overlap; a lost pulse when an SB is full; both interrupt
  kinds; SPA and PDT streaming; and an external timer start. It also checks
  stored pulses sample by sample against what was presented.
- **`tb_tr_fpga_workload`** runs the oscilloscope comparison settings at the
  default sizes on all four channels: an ascending trigger at code 128
  (-2.5 V), 1400 pre-trigger samples (7 µs) and 2000-sample pulses. It sends
  nine pulses without releasing anything, so the ninth is lost on every
  channel and the 8-pulse interrupt fires once. It then reads all tags and
  samples back and checks them, releases the space, and sends two more pulses.
  Those two wrap around the end of the buffers. That makes ten stored pulses
  per channel, each checked sample by sample and by time mark.
- **`tb_tr_fpga_rate`** runs 80-sample pulses on all four channels. First
  comes a burst of 480 pulses at exactly 10 M pulses/s aggregate, with a
  trigger every 80 clocks on every channel. Then come 1600 pulses at about
  3.7 M pulses/s, which a DSP-side loop drains at the same time with
  single-clock bus reads. It checks every sample and time mark, and checks
  that nothing was lost or discarded.
- **`tb_tr_fpga_full`** runs one full-size acquisition with all defaults:
  2046 pre-trigger samples and a 2048-sample pulse, read back over the bus.
- **`tb_pretrigger_buffer`** also upsets the read or write pointer at random
  moments. It checks that the output is right again within 2049 clocks.
- **The block testbenches** check latencies and the cycle where an event
  occurs. Examples: three clocks for a bus read, the dead time in clocks, the
  pulse completion time. Several also end with a random phase:
  - `tb_acq_channel` stores pulses with random pre-trigger and pulse lengths.
  - `tb_timer40`, `tb_atc` and `tb_igb` compare each clock against a
    reference model.
  - `tb_pulse_parameter_recorder` runs tag traffic past the wrap of its
    pointers.
  - `tb_config_regs` writes random values to the channel and release
    registers and compares every channel after each write.

The simulator runs with two states and random initial values; every testbench
resets the design first.
