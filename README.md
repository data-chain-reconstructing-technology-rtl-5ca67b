# Self-repairing daisy-chain readout for RPC muon-detector front-end cards

A muon identification system built from resistive plate chambers (RPCs) has
hundreds of front-end cards. To save cable, the cards are read out as daisy
chains: sixteen cards are linked by short cascade cables, each card passing on
the serial data of all cards before it, and only the last card of the chain is
cabled to the readout module. The weakness of such a chain is that one dead
card cuts off every card behind it.

This RTL implements the fix: every card carries a second, small FPGA (an
anti-fuse part, which is robust, live at power-up and powered separately) that
sits in the serial path. While the card works it simply passes the card's own
serial output on. When the card fails, or draws excess current because of a
short circuit, this FPGA switches the rest of the card off and takes the
card's place in the chain: it passes on the data of the previous cards and
inserts, where the card's own data would be, a frame of the same length with
all hits zero and a fault flag set. The readout keeps its data format, the
healthy cards lose nothing, and the dead card shows up as an empty, flagged
slot.

Written here are the digital parts of one chain: the card's SRAM-FPGA data
path (trigger latency, event window, event FIFO, chain shift register), the
anti-fuse FPGA (fault detection, data reconstruction, output multiplexer) and
the chain of cards. The analog parts of a card (discriminators, threshold
DAC, LVDS transceivers, the current-limited power switch) are outside the RTL;
their digital signals are ports, and a behavioural model of the power switch
is provided for simulation.

## How a chain is read out

All cards of a chain share the clock, trigger, commands, configuration and two
readout controls, `rd_load` and `rd_shift`.

* On `rd_load` every card loads one 32-bit frame into its chain shift
  register: its oldest buffered event, or the reconstructed frame if the card
  is disconnected.
* On each following cycle with `rd_shift` high, every register shifts one bit
  towards its MSB and takes in the MSB of the card before it. The chain thus
  acts as one shift register of `N_FEC * 32` bits.
* `serial_out` (the last card's MSB) is valid from the cycle right after
  `rd_load`. The readout samples it before each shift. After `N_FEC * 32`
  shifts it has received the last card's frame first and card 0's frame last,
  each MSB first. Card 0 is the first card of the chain, farthest from the
  readout. Its serial input is tied to 0.

Frame layout (`mudc_pkg::frame_t`), MSB first:

| bits  | field    | meaning                                                    |
|-------|----------|------------------------------------------------------------|
| 31    | `fault`  | 0: data from the card; 1: frame regenerated for a dead card |
| 30:27 | `fec_id` | position of the card in the chain (0 to 15)                |
| 26:16 | `evt`    | event number, 11 bits, wraps at 2048                       |
| 15:0  | `hits`   | one bit per RPC strip; all 0 in a regenerated frame         |

A regenerated frame has the same length and position as a real one, so the
readout does not need to know which cards are out. The flag tells the
readout that the zeros are not real. Because the zeros add no hits, they do
not distort hit-count histograms.

Event numbers: a card's SRAM FPGA numbers the events it has gathered. The
anti-fuse FPGA counts `rd_load` pulses. The two agree as long as every
triggered event is read exactly once. A card whose SRAM FPGA has been without
power restarts its numbering at 0 when it is reconnected. To line the
numbers up again, reset the whole chain.

## Normal mode and reconstruction mode

Inside a card (`fec`) the serial path is

```
chain_in --> fault_detect --+--> SRAM FPGA shift register -----+--> mux --> chain_out
                            |                                   |
                            +--> data_reconstruction ----------+
```

`fault_detect` steers the incoming bits to one of the two shift registers and
the multiplexer picks the matching output. Both registers load and shift on
every readout call. Only the selected one carries the chain. The multiplexer
is combinational, so a card adds exactly one 32-bit register stage in either
mode.

The card enters reconstruction mode (`recon_mode = 1`) for either of two
reasons:

1. **Command.** The readout module sends `CMD_BYPASS` to the card's address,
   or with the broadcast bit set. This handles a card that is broken but
   draws no excess current.
2. **Supply fault.** The power switch pulls its FAULT output (`fault_n`) low.
   The anti-fuse FPGA synchronizes it through two flip-flops and latches it.
   `recon_mode` rises on the second clock edge after `fault_n` falls.

In reconstruction mode `pwr_en` is low. This keeps the switched supply of the
SRAM FPGA, the DAC and the comparators off. Only the anti-fuse FPGA stays
powered. `CMD_RESTORE` clears both causes and turns the supply on again. If
the short is still there, the switch reports it again and the card drops back
into reconstruction mode by itself. If a fault and a `CMD_RESTORE` arrive in
the same cycle, the fault wins.

While a card's switched rail is down (`sf_pwr_good = 0`), its SRAM FPGA is held
in reset. The multiplexer's input from it is forced to 1, standing for an
unpowered line with a pull-up. That value is only seen in the interval between
a card failing and the anti-fuse FPGA switching over.

**Timing caveat.** The mode applies at once, not at the next readout call.
If a card fails during a readout, that event's frames from this card and
from the cards before it are lost. Once a short circuit occurs, the switch
needs its deglitch time, 7.5 ms typical for the TPS2552, before it reports
the fault. Until then the card's rail is down but the card is still
selected. Readouts in that window return ones for this card and the cards
before it. After the switch-over, every later readout is clean. The
original hardware was measured to cut the power within 10 ms of a short.

## Short-circuit protection

Each card's switched rail is fed through a TPS2552 current-limited
power-distribution switch. The anti-fuse FPGA drives its EN pin (`pwr_en`,
taken as active high) and reads its open-drain FAULT pin (`fault_n`, active
low). The switch limits the current by itself. It does not latch off, and it
releases FAULT as soon as the over-current ends. Keeping the rail off after
a fault is therefore the anti-fuse FPGA's job: it latches the fault and
holds EN low.

`tb/tps2552_model.sv` models this behaviour for simulation, in 1 µs steps:

* the output collapses at once on a short;
* FAULT goes low after `DEGLITCH_US` (7500) µs of continuous over-current;
* FAULT is released when EN goes low.

## SRAM-FPGA data path

`sf_fpga` processes the 16 discriminator outputs of the card (`hits`, one
sample per clock):

1. `trigger_latency`: a circular buffer of `MAX_LAT` samples, which must be a
   power of two. Its output is the input of `cfg_latency` clock cycles
   earlier. The latency can be set from 1 to `MAX_LAT`.
2. `data_window`: on a trigger, ORs `cfg_window` consecutive delayed samples,
   starting with the one at the trigger edge. It then emits one event record
   `{evt, hits}`, one cycle after the last sample. A trigger that arrives
   while a window is open is ignored.
3. `data_fifo_bank`: a first-word-fall-through FIFO of `FIFO_DEPTH` event
   records. If it is full, a new event is dropped and the sticky `overflow`
   output is set.
4. `chain_shift_register`: on `rd_load` it takes the oldest event, with
   header `{0, fec_id, evt}`. If the FIFO is empty, it sends a frame with no
   hits and the number the next event will get.

The anti-fuse FPGA's `data_reconstruction` uses the same
`chain_shift_register` and loads `{1, fec_id, readout count, 16'h0}`.

## Commands

`mudc_pkg::cmd_t` is `{op[1:0], bcast, addr[3:0]}`, sampled when `cmd_valid`
is high:

| op            | effect on the addressed card (or every card if `bcast`)            |
|---------------|--------------------------------------------------------------------|
| `CMD_NOP`     | none                                                               |
| `CMD_BYPASS`  | disconnect: supply off, regenerated frames                          |
| `CMD_RESTORE` | reconnect: clear the latched fault and the bypass, supply on again  |

Concurrent assertions check the interface rules during simulation:

* only defined command codes arrive;
* `rd_load` and `rd_shift` are never high together;
* a synchronized supply fault always leaves the card disconnected;
* the FIFO count never exceeds its depth.

How commands are serialized on the cable and decoded by the LVDS receiver is
outside this RTL.

## Modules

| file (`rtl/`)              | role                                                       |
|----------------------------|------------------------------------------------------------|
| `mudc_pkg.sv`              | frame, event and command types; channel and field widths   |
| `data_chain.sv`            | top: `N_FEC` cards in a daisy chain                        |
| `fec.sv`                   | one card: `sf_fpga` + `af_fpga`                            |
| `sf_fpga.sv`               | SRAM-FPGA data path                                        |
| `trigger_latency.sv`       | programmable delay of the hit inputs                       |
| `data_window.sv`           | event window after a trigger                               |
| `data_fifo_bank.sv`        | event FIFO                                                 |
| `chain_shift_register.sv`  | parallel-load, serial-shift chain stage                    |
| `af_fpga.sv`               | anti-fuse FPGA: fault detection, reconstruction, mux       |
| `fault_detect.sv`          | mode decision, power-switch control, chain routing         |
| `data_reconstruction.sv`   | zero-filled, flagged frames for a disconnected card        |

Top-level parameters (`data_chain`):

* `N_FEC` = 16: cards per chain. This is the value of the original system,
  which has 40 such chains.
* `MAX_LAT` = 64, `MAX_WIN` = 16, `FIFO_DEPTH` = 16: this design's own
  choices.

The 16 channels per card and the field widths are package constants.

At the defaults a chain synthesizes to about 2,900 word-level cells and
19,200 flip-flop bits, plus 6,900 bits of FIFO memory. Most of this is the 16
latency buffers, which are reset flip-flop arrays.

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Each testbench has a watchdog. The
testbenches use time literals, so they need `--timing`. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mudc_pkg.sv \
    tb/tb_data_chain.sv --top-module tb_data_chain -Mdir obj && obj/Vtb_data_chain
```

* `tb_data_chain` runs the full-size chain (16 cards, default parameters) as
  the readout module would. It uses a reference model of every card's event
  queue and 1 kHz triggers. It covers:
  * normal readout;
  * three cards disconnected by command;
  * a short circuit isolated within 10 ms;
  * reconnection of a repaired card;
  * reconnection of a card that is still shorted, which must fault again.

  It counts each of these mechanisms and fails if one never happens. It
  runs in a few seconds of host time, for about 20 ms of simulated time.
* `tb_table1_tests` is a four-card chain run through a laboratory test
  programme at 1 kHz: normal operation, then four patterns of damaged cards
  (first card; first three; cards 2 and 4; last three), then a short circuit.
* `tb_fec`, `tb_sf_fpga`, `tb_af_fpga`, `tb_fault_detect`,
  `tb_data_reconstruction`, `tb_trigger_latency`, `tb_data_window`,
  `tb_data_fifo_bank`, `tb_chain_shift_register`: the individual blocks, at
  reduced sizes.
* `tb_tps2552_model`: the power-switch model's timing.

## What follows the original design and what does not

Taken from the original design:

* 16 cards per chain and 16 channels per card;
* the serial daisy chain read through the last card;
* the split of each card into an SRAM FPGA and an always-powered anti-fuse
  FPGA;
* the SRAM FPGA's block chain (trigger latency, data window, FIFO bank,
  shift register);
* the anti-fuse FPGA's fault detection, data reconstruction and multiplexer;
* zero filling with a fault flag in an unchanged data format;
* command-driven and fault-driven disconnection;
* the current-limited switch that reports a short to the anti-fuse FPGA.

This design's own choices, because the original description does not give
them:

* the frame and header layout, and the event-number width;
* the `rd_load`/`rd_shift` readout protocol;
* the command set and encoding;
* latency, window and FIFO sizes;
* the OR-over-window event building;
* dropping events when the FIFO is full;
* latching the fault until `CMD_RESTORE`;
* the switch's enable polarity and its deglitch time, which come from the
  part's data sheet;
* the value read from an unpowered SRAM FPGA;
* the clock rate: the testbenches use 40 MHz, and nothing in the RTL depends
  on it.

The original description says the hits wait in FIFOs for the trigger. Its
block diagram places the FIFO bank after the trigger latency and the window.
This RTL follows the diagram: events are stored after the trigger and wait
for the readout call.

Not modelled: the analog front end, the LVDS links and their 30 m cable, the
redundant supply of the anti-fuse FPGA and LVDS drivers, and the readout
module, which the testbenches stand in for.
