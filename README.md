# ALCOR digital readout and a distributed sensor network

ALCOR is a readout chip for silicon photomultipliers (SiPMs) working at cryogenic
temperature. Each pixel has an analogue front end with two discriminators. Behind the
discriminators are four time-to-digital converters (TDCs). They time-stamp every trigger
with a 15-bit coarse counter plus an interpolated fine time. The digital part collects these
time stamps from a matrix of 8 columns x 4 pixels. It packs them into frames with a CRC and
sends them off chip on four 8b/10b-encoded DDR serial lines, one per pair of columns. A
small SPI slave configures everything.

This repository holds synthesizable SystemVerilog for that digital part. It also holds a
second, independent design: a **distributed sensor network (DSN)**. The DSN is a 4 x 6 grid
of nodes that pass 32-bit words from neighbour to neighbour over Manchester-coded
one-wire links. It routes around nodes that have failed. The top module `alcor_top` holds
both designs side by side. They share no signal; the network has its own `dsn_*` ports.

The analogue blocks are not modelled as circuits. These are the front ends, the bias and
threshold DACs, and the LVDS drivers. Their digital signals are ports of the top:
- `trg1`/`trg2` (discriminator outputs) come in.
- `tp_to_fe`, `pcr_out` and `bcr` go out.
- `q`, `sdo` and `clk_out` are plain logic.

The analogue TDC is the exception. It is included as a behavioural model (`tdc_analog`), so
the pixel logic can be simulated end to end.

## Time measurement in a pixel

A pixel (`alcor_pixel`) holds these parts:
- four configuration registers (`pixel_cfg`, 4 x 16 bits, triplicated);
- two trigger synchronisers (`sync_dual_edge`);
- four TDC models;
- the TDC controller (`tdc_ctrl`);
- a 4-word payload FIFO (`sync_fifo`);
- the transmitter that talks to the end of column (`pixel_data_ctrl`).

**TDC model.** A trigger at time T0 starts a fast ramp. The ramp stops at the next clock
edge the TDC uses, T1. That is the first rising edge if the clock was high at T0, otherwise
the second. The model returns the fine value `N = int(IF * (T1 - T0) / Tclk)`, where the
interpolation factor IF is 64 or 128 (a PCR bit). The coarse time is the counter value at
T1. Fine and coarse are latched into the controller by a fine-count strobe. The model uses
`$realtime` and is for simulation only.

**Operating modes** (selected per pixel in the PCR):
- *LET* (leading edge time): each trigger takes the next free TDC in round-robin order. If
  all four are busy, the trigger is counted as lost instead.
- *ToT* (time over threshold): TDCs work in pairs (0,1) and (2,3). The even TDC stamps the
  rising edge of `trg1` and the odd one the falling edge. The pair pointer alternates.
- *ToT2*: like ToT, but the falling edge is taken from `trg2`.
- *SR* (slew rate): the pair stamps `trg1` and then `trg2`. If `trg2` never comes, the
  acquisition is aborted. The pair pointer still advances.

**Watchdogs.** In ToT modes a trigger may stay high for 2^15 clock cycles. The controller
then produces the odd-TDC word with fine = 0 and the coarse time of the rising edge.

**Losses.** Words go through the 4-deep FIFO. A word that finds the FIFO full is counted
in a lost-event counter. That counter and the lost-trigger counter are reported in the
pixel's status words.

**Synchroniser.** The input is sampled on both clock edges, then goes through two
flip-flops. The first stage changes only when both samplers agree on the new value. Rising
and falling input edges therefore see the same latency: the output follows at the second
rising clock edge after the input edge if the clock was high, otherwise at the third.

## Column readout

The pixels of a column share a daisy-chained bus to the end of column (`eoc_column`):
- A pixel with a word raises a request. The end of column answers with a write enable and an
  address.
- The addressed pixel drives the word for **6 clock cycles**. At least **3 idle cycles**
  separate two words. An idle bus is all ones.
- When several pixels are ready, the one with the higher address goes first.
- A status round starts with a 2-cycle *freeze*. Every pixel then sends its status words in
  turn.

The end of column sorts incoming event words by the MSB of their coarse time into FIFO 0 or
FIFO 1, each 8 x 32. Every word therefore belongs to one half of a 2^15-cycle frame. The
pixel control FSMs keep their state in a Hamming(7,4) code (`hamming_state_dec`), so one
flipped state bit is corrected. Configuration registers are triplicated with a majority
voter (`tmr_reg`).

## Frames on the serial line

`eoc_merge` serves two columns. It holds a copy of the coarse counter and writes a 32 x 33
output FIFO, where the 33rd bit marks a K (control) word. This is the hardest part of the
design to read.

- Event words are copied as soon as they arrive. The FIFO of the half frame that has already
  ended is read first, then the FIFO of the running half.
- At the roll-over of the coarse counter, a status round is requested from both columns.
- Half a frame later the merger closes the previous frame and opens the next one with this
  sequence:

  | word | meaning |
  |---|---|
  | K28.2 | roll-over |
  | K28.3 + 8 status words | 4 per column (ECCR<15>) |
  | EoC status | `{out_loss[7:0], in_loss[7:0], events[15:0]}` |
  | K28.4 | CRC header |
  | CRC | CRC-32 of everything since the previous CRC word |
  | K28.0 | frame header |
  | frame number | 16 bits |

- The CRC is the Ethernet CRC-32: polynomial 0x04C11DB7, MSB first, initial value
  0xFFFFFFFF, reset after every CRC word. K words are included in the CRC.
- In *raw mode* (ECCR<11>) only event words are sent.
- When the output FIFO is empty, the idle comma K28.5 is sent.

Because the trailer arrives half a frame late, the first-half words of frame n+1 precede it.
A receiver assigns an event to a frame by its coarse MSB and the surrounding headers.

`ddr_serializer` takes each 33-bit word byte 0 first. It sends every byte through the 8b/10b
encoder (`enc8b10b`, standard tables with running disparity). It then splits the 10 bits
into even and odd shift registers and sends two bits per clock: the even bit while the
clock is high, the odd bit while it is low. A 32-bit word therefore takes 20 clock cycles.
At 320 MHz that is 512 Mb/s of payload per line. With the encoder off, raw 10-bit
symbols `{0, k, byte}` are sent. An align pattern can be selected for link training.

## Configuration and reset

`spi_slave` works with CPOL 0 and CPHA 1. Frames are 24 bits, MSB first:
`{command[3:0], 4'b0000, data[15:0]}`. The commands:
- write the pointer;
- write or read the data register the pointer selects;
- read the EoC status and clear it.

If pointer bit 15 is set, the pointer increments one cycle after each data access.
`eoc_config` decodes the pointer:
- `{3'b000, ..}` selects a BCR (bias register) per column;
- `{3'b001, ..}` selects the ECCR (end-of-column control register) of a double column;
- `{3'b010, 5'd0, col[2:0], pix[2:0], reg[1:0]}` selects a pixel register, which is written
  through the PCR bus.

ECCR bits:

| bit | meaning |
|---|---|
| 0 / 3 | column 0 / column 1 enable |
| 1 / 4 | column 0 / column 1 safety |
| 2 / 5 | column 0 / column 1 interpolation ratio |
| 11 | raw mode |
| 12 | 8b/10b enable |
| 13 | serialiser enable |
| 14 | align |
| 15 | status words enable |

After reset all columns and outputs are disabled. For example, 0xA009 enables both columns,
the serialiser and status words.

`reset_ctrl` decodes the length of the low pulse on `ext_nres`:
- 10 cycles reset the coarse counters only;
- 24 cycles reset the whole chip, configuration included.

## Distributed sensor network

Each node (`dsn_pixel`) has one link controller per side (`dsn_io_ctrl`): 0 right, 1 down,
2 left, 3 up. It also has a FIFO of 8 words, a one-word parking register per side and a
direction controller (`dsn_direction_ctrl`).

**Link transfer.**
1. The sender raises `req`.
2. The receiver answers `rdy` when it has room.
3. The sender transmits a Manchester frame (`manchester_tx`/`manchester_rx`): a 0 start bit,
   32 data bits MSB first, then an even-parity bit. A 1 is sent as high-then-low and a 0 as
   low-then-high. Each half bit lasts 2 clocks.
4. The sender drops `req`.

If both ends of a link request at once, the right or bottom node wins.

**Routing.** A word goes to the first reachable side in the order right, down, left, up. A
side becomes unreachable in two cases:
- its neighbour does not answer a request within 2048 cycles;
- a word arrives from the right or bottom side, which means the flow is coming back.

When no side is reachable, the node stops accepting its own data. Parked words enter the
FIFO in round-robin order over the sides. A fixed order would starve one side under load
long enough for its sender to time out and wrongly declare the node dead.

**Network.** `dsn_network` arranges 24 nodes in 4 rows x 6 columns. The columns wrap around:
the bottom row's down side connects to the top row. The network input is the left side of
node 0; the output is the right side of node 23.

## What follows the document and what does not

Taken from the document:
- the matrix size and pin list;
- the pixel modes, the round-robin TDC use, the 2^15-cycle watchdog and the 4-deep pixel FIFO;
- the 6-cycle transfer and 3-cycle gap, the 2-cycle freeze and the priority of higher
  addresses;
- the FIFO 0/1 split and the FIFO sizes (8 x 32, 32 x 33);
- the K codes, the CRC polynomial and initial value, and the byte order into the 8b/10b
  encoder;
- the reset lengths (10/24);
- the SPI mode and the main ECCR bits;
- the DSN handshake, routing order, unreachability rules, collision priority, parity and grid
  size.

This design's own choices:
- The TDC model's formula and timing.
- The synchroniser's first stage, and the refresh of the triplicated registers.
- The read order of the merger and the placement of the trailer half a frame late.
- The loss counters' exact meaning.
- The DDR bit phase and the raw-symbol format.
- SPI auto-increment timing and the exact pointer layout.
- From the DSN:
  - the half-bit length of 2 clocks (in the document's example one bit takes one clock);
  - the Manchester polarity and start bit;
  - the 2048-cycle timeout;
  - the FIFO depth, parking registers and round-robin arbitration.

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and stops
itself with a watchdog. With plain Verilator:

```
verilator --binary --timing --timescale 1ns/1ps --top tb_alcor_top -y rtl -y tb rtl/alcor_pkg.sv tb/tb_alcor_top.sv
./obj_dir/Vtb_alcor_top +verilator+seed+1
```

Replace `tb_alcor_top` with any testbench in `tb/`:

| testbench | what it covers |
|---|---|
| `tb_alcor_top` | The whole chip at default size, about 2 ms of simulated time and a few seconds of run time. It exercises all modes, trigger and FIFO losses, status rounds, frames with CRC, raw/encoded/align outputs, SPI read-back and counter reset. A receiver model (`ser_rx`) decodes the serial lines. The DSN runs beside it with one broken node. The testbench counts how often each mechanism occurred and fails if one never did. |
| `tb_alcor_pixel` | One pixel behind a one-pixel column: every mode, IF 64/128, watchdog, overflow and test pulse. |
| `tb_dsn_network` | The 24-node network, fully working and with two broken nodes. |
| `tb_manchester`, `tb_crc32_word`, `tb_enc8b10b`, `tb_sync_fifo`, `tb_sync_dual_edge`, `tb_tmr_reg`, `tb_hamming_state_dec`, `tb_reset_ctrl` | The building blocks. |

**Known open issue.** The random-hit phase of `tb_alcor_top` passes with Verilator seed 1
(`+verilator+seed+1`). With some other seeds (2, 4 and 5 were tried) it reports one to three
event words as missing or different. It has not been settled whether the testbench's
expectation model (which predicts every hit, loss and fine value) or the RTL is wrong in
those corner cases. Treat the pixel/column path under dense random traffic as not fully
verified.

`tdc_analog` uses real-valued time and is for simulation only. A synthesis flow must leave
it out and connect the real TDC macro in its place.
