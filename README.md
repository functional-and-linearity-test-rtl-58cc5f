# BLECFT tester FPGA

The LHC beam loss monitors measure ionisation-chamber currents with a
radiation-tolerant acquisition card in the tunnel (the BLECF, or "tunnel
card"). It digitises eight channels and sends a 20-word packet every 40 us
over optical fibre. The BLECFT is a bench tester for that card. It feeds
the card's inputs with precise currents, reads its packets, and runs the
same "Running Maxima" processing as the LHC surface electronics. The results
go to a PC over USB.

This repository holds SystemVerilog for the digital part of the tester, the
FPGA. The FPGA:

* receives both optical links, checks every packet and counts errors;
* turns the counter and ADC values of each channel into one measurement
  every 40 us;
* keeps running sums of those measurements over six window lengths, and
  the maximum of each sum since the PC last asked;
* uploads to the PC, as chosen by a mode register, either the raw packets
  (Frame Mode), the card status, maxima and link statistics (Running
  Maxima), or every
  value of one channel over a window (oscilloscope mode);
* takes register writes from a slow, software-driven 8-bit bus;
* refreshes, without pause, the codes of two DACs and the bytes of six
  relay/switch latches from those registers;
* generates a sine wave from a table, used to modulate the chamber high
  voltage.

The processing keeps running in every mode. The mode only chooses what goes
up to the PC.

## Data path

```
 fibre 0 ─ TLK1501 ─► optical_rx ─► async_fifo ─► packet_decoder ─┬─► link_stats ─┐
 fibre 1 ─ TLK1501 ─► optical_rx ─► async_fifo ─► packet_decoder ─┤               │
            (rx_clk[i], 40 MHz)       │ (sys_clk, 40 MHz)          │ link select   │
                                                                   ▼               │
                                 meas_combine ─► running_sums ─► readout_mux ◄─────┘
                                 scope_capture ────────────────►    │
                                                                    ▼
                                           async_fifo (sys_clk → usb_clk 33 MHz) ─► USB module
 ctl bus ─► ctrl_bus_rx ─► reg_bank ─► dac_refresh (+ harmonic_gen) ─► 2 serial DACs
                                   └─► latch_refresh ─► 6 relay/switch latches
```

The design has three clock domains, each driven by its own oscillator:

* each link's receive clock, 40 MHz, from its TLK1501;
* the FPGA clock, 40 MHz;
* the USB module's clock, 33 MHz. The USB module masters this link.

Dual-clock FIFOs with Gray-coded pointers (`async_fifo`) are the only
paths between domains. The one exception is the control bus, which is so
slow that it goes through plain two-flip-flop synchronisers. `rst_n` is
asynchronous, and `rst_sync` releases it in step with each clock.

## The packet

The packet's contents come from the card: card ID, packet ID, 32 status
bits, and each channel's current-to-frequency counter and ADC sample. The
order of the fields and the CRC are choices made in this RTL:

| word   | content |
|--------|---------|
| 0      | card ID |
| 1      | packet ID |
| 2, 3   | status bits 31..16, 15..0 |
| 4..11  | 16-bit counter of channels 0..7 |
| 12..17 | eight 12-bit ADC samples, packed MSB first (channel 0 in bits 15..4 of word 12) |
| 18, 19 | CRC-32 of words 0..17: polynomial 0x04C11DB7, initial value 0xFFFFFFFF, MSB first, no final inversion |

To match a real card, change the constants and `crc32_word` in
`blecft_pkg.sv`, and the unpacking in `packet_decoder.sv`.

## Link reception and error accounting

`optical_rx` reads the TLK1501 status lines the usual way:

| RX_DV | RX_ER | meaning |
|-------|-------|---------|
| 1 | 0 | data word |
| 0 | 0 | idle |
| 1 | 1 | word with a code error |
| 0 | 1 | loss of synchronisation |

A packet is a run of data words between idles. The receiver tags each word
as it passes it on:

* `sop` marks the first word.
* `eop` marks the twentieth word. That word also carries the CRC result and
  whether any word of the packet had a code error.
* A run that stops early, or goes past 20 words, adds one marker entry with
  `len_err` set. Of a long run, the first 20 words have already been passed
  on.

`link_up` rises after 16 clean clocks and falls on a loss-of-sync cycle.

`packet_decoder` rebuilds the packet in the FPGA clock domain. It shows
every complete packet, flagged or not, for one clock. Frame Mode uploads
flagged packets with their flags. Only clean packets of the selected link
reach the processing.

`link_stats` keeps six saturating 16-bit counters per link:

* good packets;
* CRC errors;
* code errors;
* length errors;
* frames dropped because the upload FIFO was full;
* losses of synchronisation, counted when `link_up` falls.

The counters go up at the end of every maxima dump.

## Measurements and Running Maxima

`meas_combine` builds one measurement per channel:

    meas = counter * 4096 + (ADC_previous - ADC_now)      (clamped at 0)

The counter counts integrator resets during the 40 us. The fall of the
integrator voltage adds the part of a count not yet reached. This formula
is an assumption: the source gives only the idea that both values enter the
current. The weight of one count (a full 12-bit ADC span) and the sign are
the parts to check against a real card.

`running_sums` is the heart of the design, and it works as follows.

* **Windows.** Each channel has six running sums, over the latest 1, 2, 8,
  16, 64 and 256 measurements (40 us to 10.24 ms). These are the `RS_LEN`
  and `MAX_LEN` parameters.
* **Delay lines.** Each window has a circular delay line in memory with
  `8 * RS_LEN[k]` entries, one row per channel. Every window's pointer
  moves one step per packet.
* **Update.** When a set of measurements arrives, the block handles the
  channels one after the other, two clocks each. In the first clock it
  reads the oldest sample of every window. In the second it computes
  `sum += new - oldest`, writes the new sample over the oldest, and keeps
  the larger of the sum and the stored maximum. The block takes the new set
  in one clock, then `busy` stays high for 16 clocks. A packet period is
  1600 clocks.
* **Clear.** After reset, or the `rs_clr` command, the block zeroes every
  delay line. This takes 8 × 256 clocks. Packets that arrive meanwhile are
  ignored, and `meas_combine` forgets its previous ADC samples.
* **Snapshot.** The PC asks for a dump by writing the command register. The
  block then copies all 48 maxima into readout registers and restarts them
  at zero. Each dump therefore gives the maxima since the previous dump.
  The snapshot waits for any update in progress, so no sample is lost or
  counted twice.

The LHC system uses more windows, up to 84 s. It builds the long ones by
cascading sums of shorter sums. That structure is not built here, so the
longest window is 10.24 ms.

## Upload records

Every upload is one record:

* a tag word `{tag[3:0], 9'b0, link_up[1:0], link}`: the record type, the
  present connection state of both links, and the selected link;
* a word giving the number of words that follow;
* the data.

| mode (register 0x00 bits 1:0) | tag | data |
|---|---|---|
| 0 Frame Mode | 1 | the 20 packet words of every complete packet of the selected link, then `{14'b0, crc_err, code_err}` |
| 1 Running Maxima | 2 | on each dump command: card ID, packet ID and the two status words of the last good packet of the selected link; for channel 0..7, for window 0..5, the maximum as 3 words (48 bits, MSB first); then the 6 counters of link 0 and of link 1 |
| 2 Oscilloscope | 3 | when the armed capture ends: per packet, the counter, then `{4'b0, ADC}` |

A Frame Mode record goes in only if the whole record fits in the upload
FIFO (128 words). If it does not fit, the frame is dropped and counted.
Maxima and scope records wait for room word by word.

The USB module reads with `usb_rd` on its own clock. `usb_data` always shows
the head word, and `usb_empty` says when there is none.

## Control link and registers

The PC software drives an 8-bit bus by hand. One register write is three
bytes:

1. the address, with `ctl_start` high;
2. the data high byte;
3. the data low byte.

Each byte is taken on the rising edge of `ctl_stb`, after synchronisation.
The write happens two to three FPGA clocks after the third edge. A byte with
`ctl_start` high always begins a new write.

| address | content |
|---|---|
| 0x00 | bits 1:0 mode, bit 4 processed link |
| 0x01 | command, write 1 for a one-clock pulse: bit 0 dump maxima, bit 1 arm scope, bit 2 clear statistics, bit 3 clear running sums |
| 0x02, 0x03 | scope channel, scope length in packets (0 = 1024) |
| 0x04, 0x05 | sine phase step, sine amplitude (65535 = full scale) |
| 0x06 | bit 0 sine on, bits 7:4 DAC slot that carries it |
| 0x10..0x1F | 16-bit codes of DAC slots 0..15 (slot = DAC × 8 + channel) |
| 0x20..0x25 | bytes of the six relay/switch latches |

All registers reset to zero. There is no read-back.

## DACs, switches and the sine

The software only writes registers. The FPGA copies them out again and
again, so a new value reaches the hardware within one pass.

**DACs.** `dac_refresh` sends, in turn, one 24-bit frame per slot:
`{4'b0011, channel, code}`, MSB first. The two DACs share SCLK and SDI.
Each DAC has its own SYNC line. SCLK runs at half the FPGA clock, and SDI
changes while SCLK is low. One slot takes 50 clocks, and a pass over all 16
slots takes 20 us. The frame command and the bit order follow a common
octal 16-bit DAC. Check them against the part you use.

**Switches.** `latch_refresh` gives each of the six latches a 4-clock slot
on the shared bus, and pulses that latch's enable for 2 clocks.

What each slot and bit drives is up to the board and its software, not the
FPGA. The tester needs DAC voltages for the eight current sources, the
high-voltage base and the card's high-voltage survey input. The survey
input puts the card into its four self-test modes. The switches choose the
current range, invert a source to saturate a card input, and lower the
card's supplies to trigger its supply warning.

**Sine.** `harmonic_gen` is a 24-bit phase accumulator driving a 256-entry
sine table. The table is computed at elaboration with an integer Taylor
series. The output is

    code = 32768 + sin_table[phase] * amp / 65536

at a frequency of `40 MHz × step / 2^24`. When the sine is on, its code
replaces the register code of the chosen DAC slot. The analog board adds it
to the high-voltage control voltage.

## What comes from the tester's description and what does not

These parts follow the description of the tester:

* eight channels;
* two links carrying 20-word packets every 40 us, received by TLK1501
  transceivers on a 16-bit, 40 MHz bus;
* CRC checking and error reporting;
* three clock domains separated by FIFOs;
* the 33 MHz, 16-bit upload link mastered by the USB module;
* the 8-bit control bus carrying 8-bit addresses and 16-bit data;
* two DACs on shared lines, refreshed without pause;
* relays and switches driven over multiplexed lines;
* Running Maxima processing that runs in every mode;
* the three upload modes;
* the sine generated from a memory.

The following are choices made in this RTL. Check them before trusting a
result against real hardware:

* the packet layout and the CRC;
* the TLK1501 framing rules;
* the measurement formula;
* the window lengths and the delay-line structure;
* the record format;
* the control-bus byte protocol;
* the register map;
* the DAC serial format;
* the number of latches;
* the sine table size.

The description does not say whether both fibres carry the same data. Here
both are received and counted, and a register bit picks the link that is
processed.

These parts are not in the RTL:

* the TLK1501 transceivers and the photodiode receivers;
* the FX2 USB module and its firmware;
* the DAC chips;
* the analog current sources (10 pA to 1 mA over a 1 MOhm to 10 GOhm
  resistor network, with current-sense feedback);
* the 1500 V supply;
* the PC software that runs the functional and linearity tests.

## Simulation

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`.
Each one ends by printing `TB_RESULT checks=N failures=M`.

`tb/tunnel_card_model.sv` models a tunnel card behind a TLK1501. It builds
packets with their CRC and can inject errors.

`tb/tb_blecft_top.sv` runs the whole FPGA at its default parameters, with
both links, the USB reader, the control bus, and models of the DACs and the
latches. It covers:

* Frame Mode with clean and flagged packets;
* dropped frames while the USB reader stalls;
* three Running Maxima dumps, compared with a software model of the card
  status words, all 48 sums and the link counters;
* a switch of the processed link;
* an oscilloscope record;
* the DAC refresh, with and without the sine;
* the latch refresh;
* a loss of synchronisation, its recovery and its count in the last dump.

It counts each of these mechanisms and fails if one never happened. It
takes under a second of CPU time.

To build and run a testbench with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -y rtl -y tb \
    rtl/blecft_pkg.sv tb/tb_blecft_top.sv --top-module tb_blecft_top -o sim
./obj_dir/sim
```

Replace `tb_blecft_top` with any other testbench name. Only `blecft_pkg.sv`
must be listed; Verilator finds the other files through `-y`.

Some values are parameters:

* the window set: `RS_NUM`, `RS_LENS` and `RS_MAXLEN` on `blecft_top`;
* the scope depth and the FIFO depths.

Channel count, packet length, register map and DAC/latch counts are
constants in `blecft_pkg.sv`.
