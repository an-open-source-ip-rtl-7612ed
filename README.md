# MVT-Quad: four-threshold pulse digitiser for FPGAs

Multi-Voltage Thresholding (MVT) digitises a fast analog pulse without an
ADC. The pulse is compared against a few reference voltages at once, like a
very coarse flash ADC, and instead of sampling the amplitude one records
*when* each comparator switches on and off. On an FPGA the comparators come
for free: every LVDS differential input receiver is a comparator, so the
pulse goes to one leg and a DAC-generated reference to the other. The
digital side then has to do two things: time every comparator transition
finely (here to one 800 MHz sample, 1.25 ns), and package the times into a
stream a processor or DMA engine can take.

This repository holds synthesizable SystemVerilog for that digital side, one
core with four comparator inputs (an "MVT-Quad"): per input a fast-clock
deserializer and a transition encoder (together the TDC), a data packager
with an AXI-Stream master, a system-clock counter for coarse time, and an
AXI-Lite register bank. Its structure, the 800 MSPS sampling and the stream
format follow the published open-source MVT-Quad IP core; the points where
that description leaves room are filled in here and listed below.

## Signal path and clocks

```
 analog pulse ──┬─▶ LVDS rx (vs Vref0) ─ cmp_i[0] ─▶ deserializer ─▶ TDC encoder ─┐
                ├─▶ LVDS rx (vs Vref1) ─ cmp_i[1] ─▶     ...      ─▶     ...     ─┤
                ├─▶ LVDS rx (vs Vref2) ─ cmp_i[2] ─▶     ...      ─▶     ...     ─┼─▶ data packager ─▶ AXI-Stream
                └─▶ LVDS rx (vs Vref3) ─ cmp_i[3] ─▶     ...      ─▶     ...     ─┘        ▲
                                                                   timestamp counter ────┘
                                   AXI-Lite ─▶ registers (enable, channel mask, status)
```

* `clk_fast` (800 MHz) samples each comparator once per rising edge:
  800 MSPS per channel.
* `clk_sys` (100 MHz) is `clk_fast` divided by 8 with rising edges aligned
  to `clk_fast`, as produced by a divide-by clock buffer on the same clock
  tree. Everything except the four 8-bit shift registers runs on it.
  One system-clock period therefore holds exactly 8 samples.
* `rst_n` is synchronous to `clk_sys`, active low.

The LVDS receivers, the reference DACs and the clock divider are outside
`mvt_quad`: the comparator outputs and both clocks are ports.

**Deserializer** (`mvt_deserializer`). A shift register on `clk_fast` takes
the new sample at its top; on each `clk_sys` edge it is copied out, so the
word holds the 8 samples taken from the previous system edge (inclusive) to
the current one (exclusive), sample 0 the earliest. Because the clocks are
edge aligned, this copy is an ordinary synchronous transfer. It stands in
for the FPGA's hard input deserializer.

**TDC encoder** (`mvt_tdc_encoder`). From the 8 samples and the last sample
of the previous period it finds the first 0→1 and the first 1→0 step and
reports each as a valid bit plus a 3-bit position: the index of the first
sample at the new level. A transition exactly on a period boundary is
reported at position 0 of the new period.

## The output stream

This is the part a user of the core has to understand, because the time of
an event is spread over several words.

**Packets.** Nothing is sent while all comparators are still. In the first
system period in which any enabled comparator switches, a packet starts:

| word | content |
|------|---------|
| 0 | timestamp `T`: the 32-bit system-clock counter |
| 1 | transitions of period `T` (the period the packager handles while the counter reads `T`) |
| 2 | transitions of period `T+1` |
| … | one word per consecutive period, every one with at least one transition |
| last | transitions of the last active period, `TLAST = 1` |

The first period with no transition on any enabled comparator ends the
packet; the payload word before it carries `TLAST`. To know that a word is
the last one the packager holds each payload word for one cycle, so a packet
of N payload words plus its timestamp is written in N+1 cycles, one word per
cycle, and an always-ready sink never causes a loss.

**Payload word.** Eight bits per comparator, comparator `c` in bits
`[8c+7:8c]`:

| bit | 7 | 6:4 | 3 | 2:0 |
|-----|---|-----|---|-----|
| field | `fall_valid` | `fall_pos` | `rise_valid` | `rise_pos` |

So one word carries up to one rising and one falling transition per
comparator per 10 ns period. If a comparator toggles more often inside one
period (a pulse or gap shorter than about 2 samples repeated), only the
first rising and first falling transition are kept.

**Absolute time.** Number the payload words of a packet with timestamp `T`
from `k = 0`. A transition at position `p` in payload `k` was seen on
sample `p` of the system period that began on the clock edge at which the
counter became `T + k − 2`. The offset of 2 is the pipeline (deserializer
copy, encoder register); it is the same for every word and cancels in any
time difference. In units of samples (1.25 ns):

    t = 8 · (T + k − 2) + p     (+ a constant fixed by the counter's reset)

The true threshold crossing lies between this sample and the one before, on
average half a sample (0.625 ns) earlier.

**Long pulses split packets.** A comparator that stays high through a whole
period produces no transition in that period. If no other comparator
switches either, the packet ends there, and the falling edge later starts a
new packet with its own timestamp. A receiver that wants on-times therefore
keeps the comparator level across packets.

**Latency.** With `TREADY` high the timestamp word is on the bus 3 system
cycles after the end of the period it marks (taken on the 4th edge after
the period's start); payload words follow one per cycle.

## Back-pressure and lost periods

The stream is produced at the rate of the signal; a sink that cannot keep
up loses data. The packager writes into a 4-entry FIFO and follows one rule:
it keeps one entry free for the word that closes a packet. A packet only
starts if two entries are free; a non-last payload word is only written if
two are free. When space runs out the held word is written with `TLAST`
(the packet is closed early), and the following active periods are dropped
until a quiet period. Every packet that leaves the core is therefore well
framed and correctly timed, only possibly shorter than the burst was. Each
dropped period sets `STATUS.OVERFLOW` and increments `DROPS`.

## Registers (AXI-Lite, 32-bit, byte addresses)

| addr | name | access | content |
|------|------|--------|---------|
| 0x00 | CTRL | RW | bit 0 `ENABLE` (reset 0); bit 1 `TS_CLEAR`: write 1 to restart the timestamp counter (reads 0) |
| 0x04 | CHAN_MASK | RW | bits 3:0, per-comparator enable (reset 0xF) |
| 0x08 | STATUS | RW1C | bit 0 `OVERFLOW` (write 1 clears it and `DROPS`); bit 1 `BUSY`, a packet is open (RO) |
| 0x0C | DROPS | RO | number of lost periods, saturating |
| 0x10 | TIMESTAMP | RO | current system-clock counter |
| 0x14 | INFO | RO | bits 31:16 samples per period (8), bits 15:0 comparators (4) |

Other addresses read 0 and answer SLVERR. A write is taken when `AWVALID`
and `WVALID` are both high; `WSTRB` is honoured. A masked or disabled
comparator counts as silent: it neither appears in payload words nor opens
or extends a packet.

## Calibrating comparator offsets

LVDS receivers are not ideal comparators: each has an input offset of up to
about ±35 mV, which shifts its effective threshold. The procedure the core
is meant for: feed a triangle pulse of known amplitude A and rise/fall time
Tr to all inputs; an ideal comparator at threshold V switches on at
`Tr·V/A` after the pulse start and off at `2·Tr − Tr·V/A`. The measured
shifts Δt of the rising and falling edges give `ΔV_re = (A/Tr)·Δt_rise` and
`ΔV_fe = −(A/Tr)·Δt_fall`. Averaging many pulses that arrive at random phase
with respect to the sample clock resolves far below one sample. Subtracting
the offset from each DAC reference (a compensation pedestal) and measuring
again should give near-zero shifts.

`tb/tb_mvt_calibration.sv` runs exactly this through the whole core: four
behavioural receivers (`tb/lvds_comparator_model.sv`) with offsets of +28,
−17, +9.5 and −33 mV, thresholds 100–400 mV, A = 500 mV, Tr = 100 ns,
48 pulses. It recovers each offset to about half a millivolt on both edges
(the test allows 2 mV) and, after compensation, sees residual shifts of the
same size.

## What follows the published core and what is this design's

Taken from the published description: four comparator inputs, each followed
by a fast-clock deserializer acting as TDC; an 800 MHz fast clock and
800 MSPS; a data packager that starts an AXI-Stream transmission when one or
more comparators switch, sends the system-clock counter as the first 32-bit
word, then 32-bit words each holding up to a rising and a falling transition
per comparator for one system period, and ends the transmission (`TLAST`)
after a period without transitions; an AXI-Lite port for configuration
registers.

Chosen here, where the description gives no detail:

* deserialization ratio 8, hence a 100 MHz system clock and 3-bit positions
  (the ratio that makes 4 × 8 bits fill the 32-bit word exactly);
* single-data-rate sampling on rising edges of `clk_fast`;
* the payload bit layout and position encoding;
* keeping the first rising and first falling transition of a period;
* the timestamp alignment (counter value when the packager sees the first
  active period) and the counter clear;
* the register map, the channel mask and the global enable;
* the output FIFO and the back-pressure rule above;
* one synchronous reset.

The published core uses the FPGA's hard deserializers and divide-by clock
buffers; here the deserializer is plain RTL and the divided clock is an
input. With the edge-aligned clocks required above they behave the same,
but on a real FPGA the fast shift register at 800 MHz should be mapped to
the input deserializer primitive.

Not part of this RTL: the LVDS receivers (analog; a behavioural model is in
`tb/`), the clock divider, the 10-bit I2C reference DACs of the mezzanine
board and their loading, and the board-level combination of eight cores
for eight analog inputs.

For size: after generic synthesis one core has 253 flip-flops plus a
132-bit register array (the FIFO), 385 storage bits in all; the published
core reports 397 registers and 213 LUTs on an UltraScale+ device.

## Files

| file | contents |
|------|----------|
| `rtl/mvt_pkg.sv` | constants, `tdc_hit_t`, register addresses |
| `rtl/mvt_quad.sv` | top: the four channels, counter, packager, registers |
| `rtl/mvt_deserializer.sv` | 1:8 fast-clock deserializer |
| `rtl/mvt_tdc_encoder.sv` | first rising / falling transition per period |
| `rtl/mvt_timestamp_counter.sv` | 32-bit system-clock counter |
| `rtl/mvt_data_packager.sv` | packet framing and back-pressure rule |
| `rtl/mvt_axis_fifo.sv` | 4-entry output FIFO with AXI-Stream master |
| `rtl/mvt_axil_regs.sv` | AXI-Lite register bank |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_mvt_quad.sv` | end-to-end test of the core at its default size |
| `tb/tb_mvt_calibration.sv` | offset calibration with triangle pulses |
| `tb/tb_mvt_sipm_pulses.sv` | SiPM-like pulses on four thresholds, crossing times checked to one sample |
| `tb/lvds_comparator_model.sv` | behavioural LVDS receiver with input offset (real-valued, not synthesizable) |

Parameters: `mvt_quad` and `mvt_data_packager` take `FIFO_DEPTH` (default 4,
a power of two, at least 2). The number of comparators, the
deserialization ratio and the word widths are constants in `mvt_pkg`;
changing the ratio changes the width of `tdc_hit_t` and hence the payload
layout, which is built for 4 × 8 bits.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and finishes; each
has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    --top-module tb_mvt_quad rtl/mvt_pkg.sv tb/tb_mvt_quad.sv
./obj_dir/Vtb_mvt_quad
```

Replace `tb_mvt_quad` with any other testbench name. `tb_mvt_quad` drives
random pulse trains on all four comparators, rebuilds the expected payload
of every period from the samples it drove, and decodes the stream. It goes
through plain acquisition, a channel mask, a disabled core, a sink that is
ready only a third of the time (early-closed packets, lost periods checked
against `DROPS` and `OVERFLOW`) and a timestamp clear, and fails if any of
these, or a rising and falling edge in one period, a boundary transition,
a packet ended by a long pulse, or a word with all four comparators, never
occurs. `tb_mvt_sipm_pulses` feeds pulses with a 5 ns rise and a 30 ns
exponential decay, of random amplitude and phase, to four ideal comparators
at 50, 100, 200 and 400 mV, and checks that exactly the crossed thresholds
report one rising and one falling transition, each on the first sample
after the analytically computed crossing. All testbenches run in about a
second.
