# BMTL1 readout and 10 Gb/s link protocol in SystemVerilog

This repository contains two independent pieces of firmware for a Barrel Muon
Trigger Level-1 (BMTL1) back-end board of the CMS phase-2 upgrade:

1. **The readout system.** Each LHC clock (40.078 MHz, one bunch crossing),
   one sector of the barrel produces up to thirteen 32-bit TDC hits, up to
   four trigger primitives (TPs, one per chamber MB1..MB4) and a few muon
   tracks. These come back from the track finder over CSP links. The readout
   buffers all three in block-RAM FIFOs. It sorts the data onto six lanes,
   and each lane becomes one 84-bit GBT frame per LHC clock towards a
   phase-1 board that forwards it to the DAQ. Everything runs on `clkp` =
   360 MHz = 9 × the LHC clock, from the same source.
2. **A synchronous 64b/66b link protocol** for one transceiver channel at
   10.3125 Gb/s. It has a CRC-32 per message, a self-synchronising
   scrambler, block alignment through the transceiver's RX gearbox slip,
   and a reset sequencer. User data are generated on the transmitter's own
   user clock, so the TX side needs no clock-domain crossing.

The two share no signals. `bmtl1_thesis_top` places them side by side: ports
`ro_*` belong to the readout and `lk_*` to the link.

## 1. Readout data flow

```
 hits 13x32 ─► pack ─► 7 FIFO ─► 3 mergers + 1 ─► 4 FIFO ─► 2 mergers (1 per LHC clk) ─► lanes 0,1
 TPs  4xTP_W ──────────► 4 FIFO ─► 2 mergers (1 per LHC clk, TP>64 bit split) ───────► lanes 2,3
 CSP link 0 ───────────► 1 FIFO ─► time demux (slot 0 / slot 1 of each 9) ───────────► lanes 4,5
                                                       lanes 0..5 ─► gbt_tx_sorter ×6 ─► 84-bit GBT frames
```

The readout passes data between modules as `lword_t`
(`readout_pkg.sv`): `{valid, start, last, strobe, data[63:0]}`. A word with
`valid` low is a zero word and means "nothing".

### 1.1 FIFOs (`bram_fifo`)

Every buffer is a common-clock FIFO of 512 × 64 bits. This is one RAMB36E2
in 72 × 512 mode with only 64 bits used. There are 7 + 4 + 4 + 1 = 16 per
sector. The read port is first-word-fall-through: `dout` shows the head word
while `empty` is low, and `rd_en` pops it. The block RAM is an array with a
synchronous read port, which synthesis maps to a RAM. A one-word output
register in front of it makes the port fall-through: a word written into an
empty FIFO is on `dout` two cycles later, and a word can be popped every
cycle. A write into a full FIFO is dropped
and sets a sticky `overflow` flag. `almost_full` (at most one free cell)
exists for back-pressure.

### 1.2 Hit readout (`hit_readout`)

- **Packing.** A lane with a zero value carries no hit. Hits are packed two
  per 64-bit word: hit 2k goes to bits 31:0 and hit 2k+1 to bits 63:32 of
  word k. Hit 12 goes alone into the low half of word 6. A word is written
  into its FIFO only when it is non-zero. Packing is registered, so it takes
  one clkp.
- **First sort stage (7 → 4).** FIFO pairs (0,1), (2,3) and (4,5) each feed
  one `lane_merger`. FIFO 6 drains alone onto the fourth lane.
- **Second sort stage (4 → 2).** The 4 mid FIFOs are merged in pairs (0,1)
  and (2,3) onto the two output lanes.

With this pairing, hit lanes 7 and 9 end up on different GBT links, each hit
in the upper half of its frame. That is the result seen when the board was
tested with hits on those two lanes (see `tb_readout_orbit_test`).

`lane_merger` implements the sorting rule in one place:

- if only one FIFO has data, that FIFO drives the lane;
- if neither has data, the lane carries a zero word;
- if both have data, the FIFO that was not served last is served, so the two
  alternate every cycle.

Two additions are this design's own:

- **Pacing (`MIN_GAP`).** The last stage issues at most one word per 9 clkp
  (one per LHC clock). That is the rate a GBT link can send, so the sorter
  after it never has to drop a word. The inner stages are not paced.
- **Back-pressure (`out_ready`).** A first-stage merger stops popping while
  its mid FIFO is almost full. The last stage drains at only 2 words per LHC
  clock, so without this a burst would fill a mid FIFO and lose words inside
  the tree. With it, the excess waits in the first-stage FIFOs. Only those
  FIFOs can overflow, and their overflow flags tell software that hits were
  lost.

### 1.3 TP readout (`tp_readout`)

Each chamber's TP lane (`TPG_READOUT_SIZE` bits, default 64) is written into
its own FIFO when non-zero. FIFO pairs (0,1) and (2,3) merge onto two paced
lanes. A TP wider than 64 bits (the GBT frame allows up to 84) leaves as two
lwords on consecutive clkp cycles:

- the first carries the low 64 bits, with `start` set;
- the second carries the remaining bits in its low end, with `last` set.

A 64-bit TP is one lword with both flags set. Latency is 3 clkp for a 64-bit
TP and 4 for a split one.

### 1.4 Track readout (`track_readout`)

Of the four CSP links, which carry the same tracks, link 0 is read. A CSP
link carries nine words per LHC clock; the first eight may be tracks and the
ninth is always zero. Every valid non-zero word is written into one FIFO.
The output is a time demultiplexer:

- the first word goes to lane 0;
- the next word goes to lane 1 one clkp later;
- the FIFO then waits until 9 cycles have passed since the lane-0 word.

So each lane carries at most one track per LHC clock.

### 1.5 GBT sorter (`gbt_tx_sorter`) and LHC strobe (`lhc_strobe`)

clkp and the LHC clock come from one source, so the crossing into the GBT
domain is synchronous. `lhc_strobe` marks the last clkp cycle of each LHC
period.

The sorter holds a word that arrives on its lane. At the next strobe it
presents the word as an 84-bit frame: data in the low bits, upper bits zero.
The frame then stays for one LHC period. Latency is 1 to 9 clkp. For TPs
wider than 64 bits the sorter keeps the `start` part and joins it with the
`last` part before framing.

If a second word arrives while one is held, the second word is dropped and
the sticky `drop_o` flag is set. The pacing above makes this impossible in
normal running, so a set drop flag indicates a design or configuration
error.

With `pattern_sel` set, a link sends the test word `0xCABABABABABABAB`
(60 bits) above a 24-bit counter that advances every LHC clock. This lets
the receiving board check that the link works before real data flow.

### 1.6 Readout registers (`readout_system`, `ipbus_ctrlreg`)

IPbus slave on its own clock:

| Addr | Access | Bits | Meaning |
|---|---|---|---|
| 0x0 | RW | 5:0 | per GBT link: 1 = send test pattern |
| 0x1 | RO | 15:0 | sticky FIFO overflow (10:0 hit, 14:11 TP, 15 track) |
| 0x1 | RO | 21:16 | sticky sorter drop flag per GBT link |

GBT links: 0–1 hits, 2–3 TPs, 4–5 tracks.

The bus handshake works as follows:

- `ack` or `err` comes one cycle after `strobe`;
- a write to a status register, or to an address outside the bank, answers
  `err`;
- back-to-back transactions take two cycles each.

Control bits enter the clkp domain through two-flop synchronisers (`sync2ff`),
and status bits go the other way through the same. All of these bits change
rarely.

## 2. Link protocol

```
 link_userside ─► link_tx: CRC-32 │ sync/CRC word insertion │ scrambler ─► GT TX gearbox
 (counter msgs)                                                                │ serial
 user data  ◄── link_rx: descrambler │ align + slip │ CRC check  ◄── GT RX gearbox
 link_init (free-running clock): PLL reset → lock → datapath reset → done → monitor sync
```

### 2.1 Word types

Each 66-bit block has a 2-bit header and 64 payload bits:

| Header | Payload | Meaning |
|---|---|---|
| `01` | user word | data |
| `10` | `0x5555_5555_5555_5555` | sync word (idle filler, used for alignment) |
| `10` | `{32'h0, crc}` | CRC word, ends a message |

`link_userside` sends messages of 31 counter words (0x00..0x1e) every 64
accepted cycles. In the cycle after the last data word, `link_tx` sends the
CRC word, and it fills every other idle slot with sync words.

The CRC is CRC-32 with polynomial 0x04C11DB7 and initial value 0xFFFFFFFF.
The 64-bit word is fed bit 0 first, with no final inversion. It restarts
after each CRC word. `crc32_par64` computes one whole word per cycle with
the loop unrolled in `always_comb`.

As a reference: the 30-word message 0, 1, …, 8, 10, …, 30 has the
checksum 0x7EA9C3A5, and the checksum after its first three words is
0x6904BB59, 0x2C2D77FB, 0xCCC5CE0D.

Error injection (control bit 3) inverts CRC bit 31 on transmit, so the
receiver's error detection can be tested on a live link.

### 2.2 Scrambling

Only the payload is scrambled, with the self-synchronising polynomial
1 + x^39 + x^58. The header is sent as is.

- `scrambler64` starts from all ones.
- `descrambler64` starts from zero. It needs 58 received bits, less than one
  word, before its output is right, and no seed has to be agreed between the
  two ends.

Both handle 64 bits per cycle.

### 2.3 Gearbox and timing

The transceiver is used with a 32-bit internal datapath and a 64-bit user
interface, through its synchronous gearbox.

- **TX.** `link_tx` counts `txsequence` 0..32. At 32 the gearbox takes no
  word: the pipeline holds and `user_ready` is low. A user word is on
  `txdata` two advancing cycles after it is accepted.
- **RX.** The gearbox likewise drops one cycle in 33 (`rxdatavalid` low),
  and `link_rx` ignores those cycles. A received word reaches `rxdata_o` two
  cycles later.

### 2.4 Alignment (`link_rx`)

After reset the RX gearbox may cut the bit stream at any of 66 positions.
`link_rx` classifies each descrambled block:

- **Misaligned:** header `00` or `11`, or a control word that is neither
  the sync word nor a CRC word. It clears the good-word counter and
  increments a wait counter. When the wait counter reaches 32,
  `rxgearboxslip` pulses for one cycle. That moves the boundary by one bit,
  and the counter restarts, which gives the gearbox time to settle after
  the slip.
- **Good sync word:** increments the good-word counter. After 8 good sync
  words `sync_ok` goes high.
- **Data and CRC words before sync:** ignored.

The wait counter is cleared only at sync or at a slip, not by a single good
word. The sync word 0x5555… is a period-2 pattern, so a boundary two bits
off still decodes it correctly every so often. If single good words cleared
the counter, such a position could hold the search forever.

Once in sync:

- data words go out with a one-cycle `rxdata_valid`;
- each CRC word is compared with the locally computed CRC, and `crc_match`
  holds the result;
- a mismatch pulses `crc_error`, drops `sync_ok` and restarts alignment.

### 2.5 Reset sequencing (`link_init`)

This module runs on the free-running clock, because the transceiver's user
clocks are absent during reset. It has five states:

| State | Action |
|---|---|
| PLL_RESET | hold the PLL and datapath resets |
| WAIT_LOCK | wait for PLL lock (timeout → retry) |
| DP_RESET | pulse the datapath resets |
| WAIT_DONE | wait for TX and RX reset-done (timeout → retry) |
| MONITOR | `init_done` high |

In MONITOR, if `sync_ok` stays low for too long, the link is taken as lost
and only the RX datapath is reset. Retries are counted in `retry_count`.
Software can request three reset groups:

- everything;
- PLL + TX datapath;
- RX datapath only.

### 2.6 Link registers (`link_protocol`)

| Addr | Bits | Meaning |
|---|---|---|
| 0x0 | 0 | enable the counter source |
| 0x0 | 1 | reset PLL + TX datapath |
| 0x0 | 2 | reset RX datapath |
| 0x0 | 3 | CRC error injection |
| 0x0 | 6:4 | transceiver loopback code (000 normal, 001 near-end PCS, 010 near-end PMA, 100 far-end PMA, 110 far-end PCS) |
| 0x1 | 0 | sync lock |
| 0x1 | 1 | last CRC matched |
| 0x1 | 2 | init done |

The transceiver itself (PLL, PMA/PCS, gearboxes, loopback paths) is not in
the RTL. Its signals are the `lk_gt_*` ports of the top.

## 3. Departures and own choices

These points are not fixed by the description this design follows. They
were chosen here:

- The FIFO read port is first-word-fall-through, and a write while full is
  dropped with a sticky flag.
- Hit packing order and FIFO pairing are as in 1.2. Which FIFOs share a lane
  was not specified. This pairing reproduces the frames captured when the
  board was tested: hits on lanes 7 and 9 arrive on two links, in the upper
  word half.
- Output pacing (one word per LHC clock per lane) and back-pressure inside
  the hit tree were added. Without them a burst loses words silently in the
  middle of the tree or at the GBT sorter.
- The GBT sorter drops the second word within one LHC period and flags it.
- The track readout reads CSP link 0. The others carry the same data and
  are ignored.
- The IPbus register layout of the readout, the bus handshake timing, and
  the `crc_match`/`init_done` status bits of the link are additions.
- During the TX gearbox pause the transmitter holds the user source
  (`user_ready` low), so no word is lost. A free-running source would lose
  the word offered in that cycle. The message then still has a correct CRC,
  because the CRC covers only the words actually sent, but it is one word
  short.
- Link messages repeat every 64 words. Before sync, the receiver ignores
  data and CRC words, and the wait counter is kept until sync as described
  in 2.4.
- All reset hold times and timeouts in `link_init` are arbitrary.
- The top holds one sector: 6 GBT links and 16 FIFOs. A two-sector board
  instantiates `readout_system` twice, for 12 links.
- Known constant outputs:
  - the `strobe` bit of every lword lane is always 1;
  - the upper bits of `link_userside`'s `data_o` are always 0, because the
    counter is narrow.

Rate limits at the default sizes:

- The two hit links drain 2 words (up to 4 hits) per LHC clock. Above that
  rate the 11 hit FIFOs (5632 words) absorb bursts. For example, 7 words per
  LHC clock can be sustained for about 1100 LHC clocks (28 µs) before the
  first overflow.
- TPs drain at 2 per LHC clock. A peak of 28 stubs per sector per LHC clock
  is absorbed for about 78 consecutive LHC clocks.

## 4. Simulating

All files are plain SystemVerilog-2017. Packages must be compiled first.
With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  --top-module tb_bmtl1_thesis_top -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/ipbus_pkg.sv rtl/link_pkg.sv rtl/readout_pkg.sv tb/tb_bmtl1_thesis_top.sv
./obj_dir/Vtb_bmtl1_thesis_top +verilator+rand+reset+2
```

Replace the top-module and file name for any other testbench. Every
testbench:

- is self-checking;
- compares against a model written independently in the testbench;
- ends with `TB_RESULT checks=N failures=M`;
- has a watchdog that fails it if it hangs.

| Testbench | What it checks |
|---|---|
| `tb_bram_fifo` | random push/pop against a queue model; full, empty, overflow, almost-full |
| `tb_lane_merger` | sorting rule, alternation, pacing gap, back-pressure |
| `tb_hit_readout`, `tb_tp_readout`, `tb_track_readout` | each word appears once, on the expected lane, with the expected latency and rate; TP split at 64 and 68 bits |
| `tb_gbt_tx_sorter` | frame contents, strobe timing, TP joining, test pattern, drop flag |
| `tb_readout`, `tb_readout_system` | lane assignment, overflow mapping, IPbus registers, pattern select |
| `tb_sync2ff`, `tb_ipbus_ctrlreg` | synchroniser delay; register bank handshake and err cases |
| `tb_crc32_par64`, `tb_scrambler64`, `tb_descrambler64` | against bit-serial reference models |
| `tb_link_tx`, `tb_link_rx`, `tb_link_userside`, `tb_link_init` | word sequence, gearbox pause, latency, alignment and slip counts, CRC error path, reset FSM with timeouts |
| `tb_link_protocol` | full link through a transceiver model, including lock, error injection, loopback bits and RX reset |
| `tb_readout_orbit_test` | the laboratory test: four hits per orbit on lanes 7 and 9, three orbits; frames, fixed BXs of arrival (1569..1572), no flags |
| `tb_bmtl1_thesis_top` | the whole top at default parameters (see below) |

`tb/gth_model.sv` is a behavioural model of the transceiver used by the link
testbenches. It models:

- PLL-lock and reset-done delays;
- the TX gearbox writing into a serial bit queue;
- an RX gearbox that starts at a random bit offset after each RX reset,
  drops one cycle in 33, and moves by one bit per slip request.

It is not a model of any vendor primitive's timing.

`tb_bmtl1_thesis_top` runs both designs at their default parameters
concurrently. On the readout side it drives random hits, TPs and tracks,
including a burst long enough to overflow a hit FIFO, and checks every GBT
frame against a table of the words it sent. On the link side it brings the link up
through the model and exercises CRC errors, the loss of sync and the RX
reset recovery. It counts how often each mechanism occurred:

- merger alternation;
- track demultiplexing;
- FIFO overflow;
- test pattern;
- gearbox slip;
- sync;
- CRC match;
- CRC error;
- RX reset;
- init retry.

A mechanism that never occurred counts as a failure.
