# Readout Control Unit for ALTRO front-end cards

A time projection chamber read out by ALTRO chips produces data in
partitions. A partition is up to 25 front-end cards (FECs) on two shared
parallel buses, each card carrying 8 ALTRO chips of 16 channels. One Readout
Control Unit (RCU) steers each partition. It:

- passes triggers from the trigger system to the cards;
- takes accepted events out of the cards' multi-event buffers, channel by
  channel, and sends them to the data acquisition over an optical link (the
  DDL);
- loads the cards' configuration;
- watches the cards' temperatures, voltages and currents over a slow serial
  bus, and switches a card off when it reports a hard error.

This repository holds the RCU's FPGA logic in synthesizable SystemVerilog,
with a self-checking testbench for each block and one for the whole unit.

The central idea is that the RCU is the only master of the ALTRO bus. Every
bus cycle starts with an instruction from the RCU. This holds for
configuration writes and reads, and it also holds for readout: the RCU tells
one chip to send one channel, and only then does that chip drive the bus.
Readout and dead time are decoupled. The trigger side accepts new triggers as
long as the cards' 8-event buffers have room, while the readout side drains
older events at its own pace. Dead time (`busy`) appears only when all 8
buffers are in use.

## Block diagram

```
 TTC (L1 pulse, B-channel words) ──> trigger_module ──L1 / L2a / L2r──> cards
                                          │ accepted events (ev_info_t)
                                          v
                                    readout_ctrl ── channel readout instructions, one per branch at a time
                                          │                 │
                                          │                 v
                                          │        altro_bus_master  x2  <──> ALTRO bus A / B
                                          │ memory grant    │ 40-bit words, both branches at once
                                          │                 v
                                          │           chan_dmem (2 channel memories, ping-pong)
                                          v                 v
                                    ddl_formatter: 7 headers, 40->32 bit packing, trailer ──> DDL SIU

 DCS bus ──┐
 DDL (in) ─┴─ ddl_rx ──> ecn_if register map ──> instr_sequencer ──> altro_bus_master x2
                                             ──> msm (FCB master, interrupt polling, power) <──> FCB A / B
```

`rcu_top` wires these blocks together. The design runs on one 40 MHz clock,
with an active-low asynchronous reset. Shared types, encodings and the
register map are in `rcu_pkg`.

## ALTRO bus (`altro_bus_master`)

The ALTRO bus has 40 shared data lines (BD) and a few control lines, all
active low: CSTB (command strobe), WRITE, ACK, DSTB (data strobe) and TRSF
(transfer). There is one bus master per branch. It supports four kinds of
cycle:

- **Write and read.** The master puts the 20-bit instruction field on
  BD[39:20] and, for a write, the data on BD[19:0], then pulls CSTB low. It
  holds CSTB low until the addressed chip pulls ACK low, then releases CSTB.
  The chip releases ACK after that. For a read, the data is taken from
  BD[19:0] while ACK is low. If no ACK comes within `ACK_TIMEOUT` clocks, the
  cycle ends with `rsp_err` set. This is what addressing a missing card does.
- **Broadcast.** This is a write that every chip takes and no chip
  acknowledges. CSTB is held low for `BCAST_CYCLES` clocks.
- **Channel readout.** This is a write of the readout command (code `5'h1A`)
  to one channel, with the normal handshake. The chip then becomes the bus
  master for data: it pulls TRSF low and sends one 40-bit word per clock
  while DSTB is low. It may pause by raising DSTB. The transfer ends when
  TRSF rises. While TRSF is low the master keeps its BD drivers off. Each
  word goes out on `rdo_data`, and `rdo_end` marks the end of the block.

The instruction field (`rcu_pkg::mk_baddr`) is laid out as follows:

| Bits | Meaning |
|---|---|
| [19] | reserved |
| [18] | broadcast |
| [17] | broadcast-select |
| [16:12] | card: bit 16 is the branch, bits 15:12 the card |
| [11:9] | chip |
| [8:5] | channel |
| [4:0] | register or command |

The `bd_oe` output has two bits, so that the upper and lower halves of BD
can be turned around separately. The GTL transceivers themselves are outside
this logic.

## Reading out an event

1. **Trigger (`trigger_module`).** There are three modes, set in register
   `TRG_MODE`:
   - *Software*: a write to `CMD[1]`, or the sequencer's `TRG` instruction,
     acts as an L1.
   - *L1 only*: L1 comes from the TTC, and the RCU makes the L2 accept
     itself, `L2_DELAY` clocks later. That delay stands for the acquisition
     window.
   - *L1 + L2*: the TTC B-channel sends the L2 messages.

   Every L1 that is taken is passed on as `altro_l1`. The value of the local
   bunch-crossing counter (0…3563, reset by `ttc_bc_rst`) is stored in a
   queue at that moment. L2 decisions are made in order, one for each
   pending L1. An L2 accept whose bunch-crossing number differs from the
   stored one is turned into an L2 reject and counted. The B-channel word
   format is this design's own:

   | `[15:12]` | Meaning |
   |---|---|
   | 1 | L1 trigger word in [9:0] |
   | 2 | L2 accept, bunch crossing in [11:0], followed by two payload words |
   | 3 | L2 reject |

2. **Dead time.** The trigger module counts events that the cards still
   hold, meaning accepted L1s not yet rejected or read out. When `MEB_DEPTH`
   (8) are held, `busy` goes high. Further L1s are then dropped and counted.

3. **Channel selection (`readout_ctrl`).** Two tables decide which channels
   are read:
   - The *Active Channel List* (ACL) has one 16-bit channel mask per chip,
     256 entries addressed by `{branch, card[3:0], chip[2:0]}`.
   - The *active card list* has one bit per card slot, `{branch, card}`. The
     same 32-bit register holds the cards' power state, so a card that has
     been switched off drops out of the readout by itself.

   For each event the controller hands the header data to the formatter.
   Then two walkers, one per branch, go through their half of the ACL in
   address order (cards 0–15, chips 0–7, channels 0–15). Each walker issues
   one channel readout for each selected channel, with at most one channel
   in flight on its branch.

   Optionally the chips are read in an order of the user's choosing, for
   example following their place on the detector. A chip-order table holds,
   for each branch, 128 positions, and each position names a `{card, chip}`.
   With the order bit (0x100D) set, a walker reads position 0, 1, … and
   takes each chip's channel mask from the ACL as before. Channels inside a
   chip stay in ascending order. The table should name every chip once.

   Before issuing, a walker must be granted a channel memory. It gets one as
   soon as the next memory is free. When both walkers are waiting, the grant
   alternates between them. The two branches therefore transfer at the same
   time, and the DDL stream carries their channels interleaved in grant
   order. Within a branch the channels stay in list order. An ALTRO channel
   block carries its own hardware address, so the receiver can tell the
   channels apart.

   When both walkers are done, the controller signals `ev_last`, waits for
   the trailer, and releases the event, which frees one buffer slot in the
   trigger module.

   **The ACL has no reset. After power-up, write all 256 entries.**

4. **Channel memories (`chan_dmem`).** There are two memories of
   1024 × 40 bits. Each branch has its own write stream. A grant allocates
   the next memory (0, 1, 0, …) to a branch, and that branch's words go
   into it. The read side empties the memories towards the DDL in
   allocation order. At any moment both memories may be filling from the
   two branches, or one filling while the other drains. A channel that
   turns out to be empty releases its memory at
   once. A channel longer than the memory is cut short and counted in
   `overflow`.

5. **DDL framing (`ddl_formatter`).** Each event is sent as 32-bit words:

   | Word | Content |
   |---|---|
   | H0 | `FFFFFFFF` (length not known in advance) |
   | H1 | `{8'h01 version, L1 word[9:0], 2'b0, bunch crossing[11:0]}` |
   | H2 | `{8'h00, event number[23:0]}` |
   | H3 | trigger mode |
   | H4 | 32 bits of L2 payload |
   | H5, H6 | 0 (reserved) |
   | data | the 40-bit ALTRO words, packed LSB first with no gaps: four ALTRO words fill five DDL words, and the last word is padded with zeros |
   | trailer | `{8'hA0, number of data words[23:0]}` |

   The output is a valid/ready stream. `siu_dready` low holds the formatter.
   This stalls the channel memories, then the readout controller, and in the
   end, through the event count, the trigger.

## Configuration: register map and instruction sequencer

The DCS board reaches the RCU over a synchronous bus with a 16-bit address
and 32-bit data. The handshake works like this:

1. The board holds `dcs_req` with the address, the write flag and the data.
2. The RCU takes the access in the first free cycle.
3. One clock later the RCU raises `dcs_ack` for one cycle. For a read,
   `dcs_rdata` is valid in that cycle.

Configuration can also arrive over the DDL. There, each write is two 32-bit
words: first the address in [15:0], then the data (`ddl_rx`). `siu_din_busy`
asks the link to wait while a write is pending. If both sources ask in the
same cycle, the DCS goes first.

| Address | Register |
|---|---|
| 0x0000–0x03FF | instruction memory (read/write) |
| 0x0400–0x04FF | result memory (read) |
| 0x0800–0x08FF | active channel list, [15:0] channel mask |
| 0x0900–0x09FF | chip-order table (write only): entry `{branch, position}` holds `{card, chip}` in [6:0] |
| 0x1000 | trigger mode: 0 software, 1 L1, 2 L1+L2 (reset: 0) |
| 0x1001 | L2 delay in clocks for the software and L1 modes (reset: 100) |
| 0x1002 | card power state and active card list, bit {branch, card} (reset: all off) |
| 0x1003 | FCB command (write): [29] read, [28:24] card {branch, card}, [23:16] register, [15:0] data |
| 0x1004 | FCB result: [31] busy, [30] no acknowledge, [15:0] read data |
| 0x1005 | monitoring: [28:24] last card with an error, [23:16] hard errors, [15:0] last error value |
| 0x1006 | status: [31] sequencer busy, [30] sequencer error, [29] readout busy, [28] trigger busy, [27] channel memories busy, [26:24] automatic sequencer runs (low bits), [23:16] overflows, [15:0] event number |
| 0x1007 | period of the automatic check-and-correct run, in clocks; 0 = off (reset: 0) |
| 0x1008–0x100C | counters: L1, L2 accept, L2 reject, bunch-crossing mismatches, dropped L1s |
| 0x100D | [0] read chips in the order of the chip-order table (reset: 0) |
| 0x2000 | command (write): [0] start the sequencer, [1] software trigger |

The **instruction sequencer** runs the program in the instruction memory
from address 0 until `END`. Each instruction word has the opcode in [31:28]
and an ALTRO instruction field in [19:0]. Bit 16 of that field picks the
branch.

| Opcode | Words that follow | Action |
|---|---|---|
| 0 `END` | – | stop |
| 1 `WR` | data | ALTRO register write |
| 2 `RD` | – | ALTRO register read; `{timeout, 11'b0, data}` is appended to the result memory |
| 3 `BCAST` | data | broadcast write, sent on branch A and then on branch B |
| 4 `BLKWR` | pointer-register field, `{count[31:16], start[15:0]}`, then `count` data words | for each word *i*: write `start+i` to the pointer register, then write the word to the data register named in the instruction. This loads e.g. a pedestal memory. |
| 5 `BLKVF` | same as `BLKWR` | the same, but reads back and compares, and writes the expected word back where they differ; the mismatch count goes to the result memory, and a mismatch sets the error flag |
| 6 `TRG` | – | one software trigger, then wait until that event has been read out |
| 7 `WAIT` | – | wait [19:0] clocks |

Single ALTRO instructions are micro instructions. `BLKWR`, `BLKVF` and `TRG`
are macro instructions that expand into sequences of bus cycles. Readout has
priority over the sequencer on each bus, so configuration never holds up
data taking.

**Checking and correcting the configuration.** Single event upsets in the
front-end configuration are expected about once per 4-hour run. When
register 0x1007 is non-zero, the sequencer re-runs its program by itself
that many clocks after it last went idle. With 200 000 000 clocks this is
every 5 s. During such an automatic run, a bus cycle may start only inside
the LHC orbit gap. The trigger module decodes the gap from its bunch
counter as the last 119 of the 3564 bunch crossings. A program made of
`BLKVF` instructions therefore scrubs the card memories in the gaps without
touching data taking. A bus cycle started at the very end of a gap may
finish just after it.

## Front-end Control Bus and safety (`fcb_master`, `msm`)

The FCB is an I²C-like bus with separate data lines in each direction:
`sda_in` carries data to the cards and `sda_out` data from them. It runs at
5 MHz (`CLK_DIV` = 8). One transaction lasts 38 bit periods, 7.6 µs:

1. A start condition.
2. The card address and the read/write bit.
3. The register address.
4. Two data bytes.
5. A stop condition.

Each byte is followed by an acknowledge bit. Bits go MSB first. An
acknowledge is low. A missing acknowledge sets `nack`, but the frame still
runs to the stop condition.

`msm` owns one FCB engine and switches it to the branch it is addressing.
The other branch's lines stay idle high. The DCS can order single
transactions through the `FCB_CMD` register. When a branch's interrupt line
goes low:

1. `msm` reads the error register (0x12) of every powered card on that
   branch.
2. A value with any of the bits in `HARD_MASK` (0x003F) set switches the
   card off at once: its bit in the power register is cleared. This covers
   temperature or current over limit, voltage under limit, and regulator
   faults.
3. Every non-zero value is reported in the monitoring register.

Polling the 13 cards of a full branch takes about 100 µs.

## Where this design departs from the description it is based on

- **Throughput is bounded by the DDL side.** Both branches transfer at
  once, up to 400 MB/s into the channel memories. But the formatter moves
  32 bits per 40 MHz clock, 160 MB/s. With only two memories, a branch
  waits whenever both hold data not yet sent.
- **No per-event exclusion of empty channels.** In the original scheme the
  Board Controllers report empty channels after each L2 accept. This is not
  built. Empty channels are still read, and cost only their handshake.
- **Readout order at chip level.** The programmable readout order picks
  whole chips. It cannot interleave single channels of different chips.
- **Orbit gap length.** The description gives 88 µs for the orbit gap,
  which is close to the whole LHC orbit (3564 bunch crossings, 89 µs). This
  design uses a 119-bunch-crossing gap at the end of the orbit instead.
- **Own choices where the description gives only the function.** These
  include:
  - the B-channel word format;
  - the content of the DDL header and trailer words;
  - the register map;
  - the instruction encoding;
  - the error register address and bit layout;
  - the memory sizes: 1024-word instruction memory, 256-word result memory,
    1024-word channel memories.
- **Outside the logic.** The sampling-clock PLL (SCLK, 5–10 MHz from the
  40 MHz clock), the GTL transceivers, the mezzanine cards (DDL SIU,
  DCS/trigger board with the TTCrx) and the front-end cards themselves.
  The testbenches contain behavioural models of the ALTRO bus side of the
  cards (`tb/altro_model.sv`) and of their Board Controllers
  (`tb/bc_model.sv`).

A typical partition configuration (about 350 KB) is far larger than the
4 KB instruction memory, so it has to be loaded and run as a series of
programs.

## Simulation

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=<n> failures=<m>`. Build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/rcu_pkg.sv tb/tb_pkg.sv tb/<name>.sv --top-module <name>
./obj_dir/V<name> +verilator+rand+reset+2
```

| Testbench | Checks |
|---|---|
| `altro_bus_master_tb` | write, read, timeout, broadcast and readout cycles, including DSTB pauses |
| `chan_dmem_tb` | allocation order with both branches writing at once, empty channels, overflow, back-pressure |
| `readout_ctrl_tb` | ACL and active card walk on both branches at once, waiting for free memories, a random chip order |
| `ddl_formatter_tb` | headers, 40→32 packing, trailer, a stalled SIU |
| `ddl_rx_tb`, `ecn_if_tb` | configuration path and register map |
| `instr_sequencer_tb` | every instruction, a verify that corrects a wrong word, and automatic runs that use the bus only inside a gate |
| `trigger_module_tb` | three modes, bunch-crossing mismatch, busy and dropped L1s, orbit gap |
| `fcb_master_tb`, `msm_tb` | frame timing (38 × 8 clocks), reads and writes, interrupt polling, power-off |
| `rcu_top_tb` | whole unit at its default size, see below |

`rcu_top_tb` covers the whole unit. It has no parameter overrides and takes
a few seconds. It:

1. configures the unit over the DCS bus;
2. runs a software-triggered event and checks every DDL word. Headers
   and trailer must match exactly. Channels must be whole, and in list
   order within each branch;
3. loads and runs a sequencer program;
4. switches to L1+L2 mode through writes sent over the DDL, and sends good,
   mismatched and rejected L2s;
5. fills the eight event buffers with the link stalled, to see busy, dropped
   triggers and the readout waiting for memory;
6. runs an FCB read;
7. raises a hard error on one card and checks that the card is switched off
   and left out of the next event;
8. loads a chip-order table that reverses each branch and checks the next
   event's channel order;
9. plants a wrong word in a card's pedestal memory, loads a verify program
   and turns on the automatic run. It checks that the word is corrected and
   that the automatic run used the bus only in the orbit gap.

The run counts each of these mechanisms, and fails if one did not happen.

Because the simulator is two-state and starts memories at random values,
every register that is read has a reset value. The two exceptions are the
ACL and the memories, which the testbenches write before use.
