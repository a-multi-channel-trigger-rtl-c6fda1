# Trigger and acquisition firmware for a 16-SiPM cosmic-ray telescope

A small cosmic-ray telescope has two layers of plastic scintillator, four
tiles per layer, each tile read by two silicon photomultipliers (SiPMs).
Every SiPM signal is discriminated off-board and arrives at an FPGA as a
logic pulse whose length is the time the signal stayed over threshold. This
RTL is the FPGA side of the trigger and acquisition board: it

* measures the leading and trailing edge of every pulse with a
  time-to-digital converter (TDC) built from the FPGA's carry chain,
  with a bin of about 36 ps;
* triggers itself when a particle crosses both layers: 3 of the 4 SiPMs
  of one tile position (two above, two below) fire together;
* stamps each event with absolute time from a GPS receiver: UTC second and
  date from its NMEA sentences, and the time inside the second from a
  100 MHz counter restarted by the GPS pulse-per-second (PPS);
* packs everything into a fixed 128-byte record and streams it to a host
  through an FTDI FT232H USB bridge in its synchronous parallel FIFO mode
  (up to 60 MB/s).

The target is an Intel Cyclone V. Everything here is plain SystemVerilog
except the carry-chain delay line, which is a behavioural model (see below).

## Signal path

```
hit_i[15:0] --> tdc_delay_line x16 --> tdc_channel x16 --lead_pulse--> coincidence_trigger
  (320 MHz)      128-bit samples        edge times (rec)                    | trig
                                             |                              v
                                             +------------------------> event_builder ---> async_fifo ---> ft232h_fifo_if ---> FT232H
gps_rx --> uart_rx --> nmea_parser --(UTC time, date, position)-------->   (128-byte      (100->60 MHz)    (60 MHz, 1 byte/clk)
gps_pps --> pps_counter --(10 ns ticks since the PPS)------------------>    records)
```

`trb_top` wires these together. Three clock domains are used:

| clock     | frequency | what runs on it |
|-----------|-----------|-----------------|
| `clk_tdc` | 320 MHz   | delay-line sampling, TDC decoding, coarse counter, trigger, event capture |
| `clk_sys` | 100 MHz   | GPS UART and parser, PPS counter, event packing |
| `clk_ft`  | 60 MHz    | the FT232H's own CLKOUT; FIFO read side and the USB interface |

In the FPGA the first two would come from a PLL, which is not part of this
RTL. `rst_n` is asynchronous; `reset_sync` releases it separately in each
domain. `run_enable` (from the computer that controls the runs) gates the
trigger.

## Measuring time with a carry chain

This is the part that needs the most care.

**The delay line.** A chain of 512 carry cells, placed in one logic array
block, delays the hit signal by roughly 9 ps per cell. A register on every
fourth cell, clocked at 320 MHz, takes a snapshot of 128 points along the
chain. Tap 0 is the undelayed input. When an edge enters the chain it
spreads along it, so a snapshot is a thermometer code: the first *n* taps
already show the new level, the rest still show the old one, and *n* tells
how long before the clock edge the hit edge arrived (one count is 4 cells,
about 36 ps). The 128 taps span about 4.6 ns, more than the 3.125 ns clock
period, so every edge appears in the first snapshot after it.

`tdc_delay_line` models this behaviourally. It remembers the times of the
two latest input edges and, at each clock edge, sets tap *i* to the level
the input had `4*i*9` ps earlier. All taps have the same delay, so the
model has none of the bin-width scatter of a real chain. It assumes a pulse
is longer than the chain (4.6 ns), so that two edges are never in the line
at once; discriminated SiPM pulses are tens of ns long.

**Decoding (`tdc_channel`).** A new edge is a change of tap 0 from one
snapshot to the next: 0 to 1 is a leading edge, 1 to 0 a trailing edge.
The fine value is the number of taps carrying the new level, counted as a
population count of the whole snapshot (ones for a leading edge, zeros for
a trailing one) rather than by finding the first transition. A population
count is insensitive to "bubbles", isolated taps that disagree because the
cells are uneven. The count is split over two pipeline stages: four 32-bit
partial counts, then their sum. Latency from the sampling edge to the
updated record is three 320 MHz cycles.

Each channel keeps its latest leading edge and the first trailing edge after
it, both as `{coarse, fine}` where `coarse` is a 32-bit 320 MHz counter
shared by all channels. The time of an edge is

```
t = coarse * 3.125 ns - fine * t_bin
```

and the time over threshold is `(trail.coarse - lead.coarse) * 3.125 ns -
(trail.fine - lead.fine) * t_bin`. With the uniform model `t_bin` = 36 ps.
On hardware the bins differ from each other, and the usual remedy is a bin
occupancy histogram of random hits, turned into a per-bin width table by
offline software. The RTL ships raw counts and does no calibration.

## The coincidence trigger

Channels are numbered `layer*8 + tile*2 + sipm`, so group *g* (tile
position *g*) is channels `2g`, `2g+1` (upper layer) and `8+2g`, `9+2g`
(lower layer). Each leading edge opens a window of `WINDOW` cycles
(32 = 100 ns) for its channel. When 3 or more of the 4 windows of a group
are open, the trigger fires on the cycle this becomes true: a particle that
crosses both layers, tolerant of one SiPM that did not fire. `trig_groups`
records which groups qualified.

While the event builder is busy with the previous trigger, no trigger is
issued; a coincidence that starts then is lost (dead time, about 2 us per
event when the output is not congested).

## Absolute time: GPS sentences and the PPS counter

`uart_rx` receives the GPS serial line (8N1, 9600 baud by default).
`nmea_parser` picks out three sentence types: `GPGGA`, `GPRMC` and
`GNRMC`. The `GN` form is what combined GPS + GLONASS receivers send. It
checks the XOR checksum after `*` and only then updates:

* from both: UTC time `hhmmss`, latitude `ddmm.mmmm`, longitude
  `dddmm.mmmm` (as BCD digits, point removed), hemispheres, fix flag (GGA
  quality > 0 or RMC status `A`);
* from RMC only: the date `ddmmyy`.

Other sentences and sentences with a wrong checksum are ignored. A `$`
restarts parsing.

`pps_counter` counts 100 MHz cycles and is cleared by each PPS rising edge
(after a two-flop synchroniser), so its value is the time since the last
whole second in 10 ns steps. It also reports how many cycles the last second
had (`pps_period`), which measures the local oscillator against GPS.

## Event building and the record format

`event_builder` spans the TDC and system domains.

1. On `trig` (TDC domain) it stores the coarse time of the trigger, raises
   `busy`, and sends a toggle to the system domain. That toggle latches the
   PPS counter and the current GPS data 2-3 system cycles later (a fixed
   20-30 ns offset).
2. After `COLLECT` cycles (256 = 800 ns, enough for the trailing edges) it
   freezes a snapshot of all 16 channels. A channel counts as hit if its
   latest leading edge lies from `PRE` (64) cycles before to `COLLECT`
   cycles after the trigger.
3. A second toggle tells the system domain that the snapshot is ready. The
   system domain then writes the record into the output FIFO, one byte per
   cycle, stalling while the FIFO is full. After the last byte it toggles an
   acknowledge back, and the TDC side drops `busy`.

The frozen registers are read across the clock boundary only while the
handshake guarantees they do not change.

Record layout (multi-byte fields big-endian):

| bytes   | content |
|---------|---------|
| 0-1     | sync word `EB90` |
| 2-5     | event number, from 0 after reset |
| 6-9     | PPS counter at the trigger (10 ns since the last PPS) |
| 10-12   | UTC time `hhmmss`, BCD |
| 13-15   | UTC date `ddmmyy`, BCD |
| 16-19   | latitude, 8 BCD digits |
| 20      | `N` / `S` |
| 21-25   | longitude, 9 BCD digits (top nibble 0) |
| 26      | `E` / `W` |
| 27      | bit 7 PPS seen, bit 6 GPS fix, bits 3-0 groups that fired |
| 28-29   | leading-edge hit mask (bit *c* = channel *c*) |
| 30-31   | trailing-edge mask (channels with a time over threshold) |
| 32-127  | per channel *c* at `32+6c`: leading coarse time relative to the trigger (signed 16 bit, 3.125 ns units), leading fine count, time over threshold in coarse units (trailing minus leading coarse, 16 bit), trailing fine count. Zero for channels that were not hit. |

## USB output

`async_fifo` is a Gray-pointer dual-clock FIFO (2048 bytes, about 16
events) from the 100 MHz domain to the FT232H's 60 MHz clock. Its read port
is show-ahead. `ft232h_fifo_if` keeps one byte in an output register and
pulls `WR#` low whenever it has a byte and the bridge's `TXE#` is low. The
bridge takes a byte on every such rising edge, so the link runs at one byte
per clock, 60 MB/s. `WR#` depends combinationally on `TXE#` so that no byte
is offered while the bridge is full. Only the board-to-host direction is
used: `RD#`, `OE#` and `SIWU#` stay high. Two assertions guard the
handshakes: `WR#` is never low while `TXE#` is high, and the event
builder's output byte stays unchanged until it is taken.

## What is not in this RTL, and other departures

* The board also carries a mezzanine with an HPTDC chip that sees the same
  16 signals plus 16 more, as a backup TDC. Its readout is not part of this
  RTL, so the event holds the FPGA TDC data only.
* Run configuration by the host is reduced to the `run_enable` input.
  Discriminator thresholds, the SD card, UART-USB and spare I/O are not
  handled.
* The high-speed transceiver and the PLL are vendor blocks and not
  included.
* Not fixed by the original design, and chosen here: the GPS baud rate, the
  coincidence window, collection and pre-trigger times, the FIFO depth, all
  counter widths, the channel numbering, the decoder structure and the whole
  event record layout.
* The delay line is uniform in the model. On hardware the bin widths are
  uneven, with non-linearities around 100 ps, and a resolution of roughly
  40-90 ps RMS per channel is to be expected.
* `trb_top` contains the behavioural delay lines, so it simulates but is not
  synthesizable as it stands. For synthesis, replace `tdc_delay_line` with a
  placed carry chain feeding 128 registers; everything else is synthesizable.

## Simulating

Every module has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tdc_channel_tb \
    rtl/trb_pkg.sv rtl/tdc_channel.sv tb/tdc_channel_tb.sv
./obj_dir/Vtdc_channel_tb
```

For the whole design, list all of `rtl/*.sv` (package first):

```
verilator --binary --timing --assert -Irtl -Itb --top-module trb_top_tb \
    rtl/trb_pkg.sv rtl/*.sv tb/trb_top_tb.sv
```

| testbench | what it shows |
|-----------|---------------|
| `tdc_delay_line_tb` | thermometer code matches the edge offset, tap by tap |
| `tdc_channel_tb` | fine count, coarse time, pipeline latency, bubble tolerance, lead/trail pairing |
| `coincidence_trigger_tb` | 3-of-4 and 4-of-4 fire, 2-of-4 and cross-group patterns do not, busy and enable; random patterns against a reference model |
| `pps_counter_tb` | restart at each PPS, period, saturation |
| `uart_rx_tb` | random bytes, framing error, glitch rejection |
| `nmea_parser_tb` | GPGGA, GPRMC, GNRMC fields, foreign sentence, bad checksum, truncated sentence |
| `event_builder_tb` | every byte of the record, acceptance window, busy, PPS latch time, output stalls |
| `async_fifo_tb` | ordering across clocks, full and empty limits |
| `ft232h_fifo_if_tb` | one byte per clock at full rate, no write while `TXE#` is high |
| `trb_top_tb` | end to end with reduced sizes (10 Mbaud GPS, 50 us PPS, 16-byte FIFO): 8 events decoded from the USB byte stream. Checks edge times within one bin, time over threshold, GPS fields, dead time, disabled run, rejected non-coincidences, FIFO full and bridge back-pressure. Under a second. |
| `tdc_calibration_tb` | the two usual TDC characterisation runs on two channels: one pulse to both channels 1.75 ns apart (mean and RMS of the measured difference), and a code-density histogram from 20 000 randomly timed hits (DNL and INL printed) |
| `trb_top_full_tb` | one acquisition with every parameter at its default, including a 9600-baud GPS sentence (71 ms of simulated time, a few minutes to run) |

Verilator has no X state, so every register that is read has a reset.

## Parameters worth changing

`trb_pkg` holds the detector geometry (layers, tiles, SiPMs per tile) and
the delay-line size (`TDL_TAPS`, `TDL_STEP`). `trb_top` exposes `GPS_BAUD`,
`WINDOW` (coincidence window), `COLLECT` and `PRE` (acceptance around the
trigger, in 3.125 ns cycles) and `FIFO_AW` (output FIFO of `2**FIFO_AW`
bytes). The record length follows `N_CH` (32 + 6 bytes per channel).
