# TRT back-end readout unit

This RTL implements the off-detector electronics that read out one slice of a
straw-tube tracker (the ATLAS TRT). Each straw is read by a front-end chip, the
DTMROC, which handles 16 straws. When a level-1 trigger (L1A) accepts a bunch
crossing, each chip sends 16 × 27 bits of straw data over its own 40 Mbit/s
serial link. The back end has two jobs:

* **Control.** It distributes the 40 MHz bunch-crossing (BC) clock and the
  trigger and timing commands to the chips. It also loads and supervises the
  chips' configuration registers. This is the TRT-TTC module.
* **Readout.** It collects the serial data from 240 chips, checks that each
  chip reports the triggered event, compresses the data losslessly with a
  Huffman code, and sends complete events on an S-LINK. This is the ROD
  (readout driver).

The unit of replication is one TTC module and two RODs joined by a backplane
(P3), together with the patch panels (PP2) in front of them:

* two TTC patch panels of 20 TTC links each;
* four data patch panels of 120 data links each. Each data patch panel
  phase-aligns its 120 links and packs them, 30 at a time, onto 1.6 Gbit/s
  optical links.

Top module: `trt_readout_unit` (rtl/trt_readout_unit.sv).

```
  front-end chips (480)                                       S-LINK x2
   |  fe_cmd[40]  ^ fe_rb[40]     ^ fe_data[480]                 ^
   v              |               |                              |
 +------------------+   +--------------------+  pp2_gol_word  +---------+
 | trt_ttc          |<--| pp2_ttc_fastor x2  |   [16] (out)   | trt_rod |
 |  bc/event counter|   | (Fast OR masks)    |  ------------> | x2      |
 |  40 x link_tx    |   +--------------------+  optical link  | 240 link|
 |  40 x readback_rx|   +--------------------+  model outside | rx, hdr |
 |  param engine    |   | pp2_data x4        |  rod_gol_word  | check,  |
 |  busy monitor    |   |  120 phase aligners|  <------------ | Huffman,|
 |  Fast OR trigger |   |  4 words of 30 bits|   [16] (in)    | spy     |
 +------------------+   +--------------------+                +---------+
          |  P3: L1A + {L1ID, BCID, type}, BCR, ECR  -->  both RODs
          |  P3: BUSY <-- {S-LINK full, buffer busy} from each ROD
```

The optical links (serialiser, fibre, receiver) and the front-end chips are
not part of the RTL. The patch-panel words leave the top on `pp2_gol_word` and
return on `rod_gol_word`, so a link model (a register stage in the
testbenches) or real transceivers can sit between them.

## Clocks and timing

* `clk` is the 40 MHz BC clock. Everything except the data patch panels runs
  on it, and every serial line moves one bit per BC.
* `clk4x` (160 MHz, phase-locked to `clk`) runs the data patch panels'
  oversampling phase aligners. `bc_stb` is high in the one `clk4x` cycle of
  four that precedes a `clk` rising edge. Aligned bits and the packed 32-bit
  words change on the `clk4x` edge after that strobe. They are therefore
  stable when `clk` samples them.
* All resets are asynchronous, active low (`rst_n`).

## Front-end protocol (this design's choice)

The chip's serial formats are not specified here, so the design uses the
following. `trt_pkg` holds the widths.

| line | content, first bit first |
|---|---|
| command, L1A | `110` |
| command, BCR / ECR | `1010` / `1011` |
| command, register access | `111`, rw, chip[3:0], reg[3:0], then 32 data bits on a write (12 or 44 bits) |
| read-back | `1`, then 32 bits |
| event data | `1`, L1ID[2:0], BCID[7:0], error bit, 16 × 27 straw bits (445 bits) |

A register frame holds a command line for up to 44 BC. A fast command that
arrives meanwhile waits in a 4-entry queue in `ttc_link_tx` and goes out after
the frame. This delays it, and a BCR delayed that way shifts the chips' bunch
counters. This is why register traffic during data taking is confined to the
beam-gap window (see below). Choose that window so that it ends before the
orbit's BCR slot.

## TTC module (`trt_ttc`)

* **Command source.** The source is the TTCrx outputs (`ttc_l1a/bcr/ecr`,
  `ttc_ttype`), or the front-panel NIM inputs when `nim_sel` is set. With
  `cosmic_l1a_en`, cosmic triggers from the Fast OR logic are ORed in as L1As.
  In one BC, L1A takes priority over BCR and BCR over ECR. The command that
  loses is counted in `fc_collisions`.
* **Counters.** `ttc_bc_counter` keeps the 12-bit BCID, which wraps at 3564 per
  orbit and is reset by BCR, and the 24-bit event counter, which is reset by ECR.
  On each L1A it sends `{L1ID, BCID, trigger type}` to the RODs over P3.
* **40 command links.** `ttc_link_tx` serialises fast commands and register
  frames. Each line has its own delay of 0..15 BC (`link_delay`).
* **40 read-back links.** `ttc_readback_rx` synchronises each line and deframes
  32-bit words. In Fast OR mode the line is a level and is passed through.
* **Parameter engine** (`ttc_param_engine`). It holds a memory of NPAR words
  per link, written through `mem_*`. Entry *i* is register *i* mod 8 of chip
  *i* / 8. Its modes are:
  * `DIRECT`: one VME-style access on one link (`dir_link`, `dir_frame`,
    `dir_rdata`).
  * `INIT`: writes entries 0..`pe_n_entries`-1 on all enabled links at the same
    time. With `pe_verify` it reads each entry back and compares it.
  * `POLL`: reads every entry back and compares it with the memory, pass after
    pass, until `pe_stop`.
  * `REFRESH`: rewrites every entry, pass after pass.

  POLL and REFRESH only start an access if it will finish inside the beam-gap
  window `gap_start..gap_end` (BCID values). Otherwise they wait, counted in
  `pe_gap_waits`. A wrong or missing answer (timeout: 64 BC) sets that link's
  bit in `pe_err_link` and counts in `pe_mismatches`. This is how a register
  corrupted by a single event upset is found: POLL locates it and REFRESH
  repairs it.
* **BUSY monitor** (`busy_monitor`). It watches four inputs, the S-LINK full
  and buffer busy signals of each ROD. For each input it accumulates the BC
  periods asserted, the number of assertions and the longest assertion. The
  combined `busy_out` is the OR of the enabled inputs.
* **Fast OR cosmic trigger** (`fastor_trigger`). It counts the enabled
  read-back lines that are high. When at least `fastor_thr` are high, it emits
  `fastor_trig` and ignores the lines for `fastor_holdoff` BC. The masked lines
  also leave on `p2_lines` for an external trigger module.

## Patch panels

* `pp2_ttc_fastor` (20 links) masks the read-back lines with a programmable
  enable in Fast OR mode and gives the OR of the enabled lines. Outside Fast OR
  mode it forwards the lines unchanged. It is one register stage.
* `pp2_data` (120 links) holds one `pp2_phase_align` per link. Each aligner
  samples its line on every `clk4x` edge and records the phase at which the
  last transition was seen. It takes the bit two quarter-periods later, at mid
  bit. After 4 transitions at the same phase it reports `locked`. Every BC,
  groups of 30 aligned bits are packed as `{even parity, all locked, 30 bits}`.
  The 30 links of a group are skewed by at most one BC against each other.
  This is harmless, because the ROD finds each frame by its own start bit.

## ROD (`trt_rod`)

* **Parity.** Every optical input word is checked for parity (`parity_err`
  counters), then split into 30 link bits.
* **Link receivers** (`rod_link_rx`, 240 of them). Each waits for a start bit
  and shifts in 444 bits. It holds one complete frame for the builder while the
  next one arrives. A frame completed while one is still held is lost, which
  sets the receiver's sticky `overflow`.
* **Event builder** (`rod_event_builder`). It works from a 16-entry queue of
  triggers from P3. When every enabled link holds a frame, or 1024 BC after the
  event's first frame, it writes one event to the S-LINK, one 32-bit word per
  BC:

  ```
  header  0xEE1234EE                       ctrl=1
          {ttype[7:0], l1id[23:0]}
          {20'b0, bcid[11:0]}
  per enabled link:
          {4'hB, link[11:0], 11'b0, err[4:0]}
          Huffman codes of the 16 straws, MSB first, last word zero-padded
  trailer {4'hE, 4'b0, nerr[7:0], nwords[15:0]}   ctrl=1
  ```

  The error bits for each link are:
  * [0] L1ID[2:0] differs;
  * [1] the chip BCID differs from the trigger BCID + `bcid_offset` (mod 256);
  * [2] the chip reported an error;
  * [3] no frame arrived (timeout);
  * [4] the receiver lost a frame.

  `nerr` counts the links with any error bit set, and `sync_errors` sums them
  over events. `bcid_offset` absorbs the fixed difference between the TTC
  module's and the chips' bunch counters. This difference is the command-line
  latency; it is 255 (that is, -1) in the testbench set-up.
* **Huffman encoder** (`huffman_encoder`). A loadable table of NCODES = 512
  entries `{valid, 27-bit pattern, code up to 32 bits, length}` is searched in
  parallel, and the lowest matching entry wins. A pattern not in the table is
  sent as the escape code (at most 5 bits) followed by the 27 raw bits, and is
  counted in `escapes`. The code is lossless whatever the table holds, but a
  useful table must be prefix-free and built from pattern frequencies: one
  table for low and one for high luminosity. The reset table sends an empty
  straw as `0` and everything else escaped with the escape code `1`.
* **Spy buffer** (`spy_fifo`, 4096 × 33 bits). Every `spy_prescale`-th event
  is copied word for word, with its ctrl bit, exactly as sent. A copy is only
  started when the spy buffer is empty, so it only ever holds whole events.
* **Back-pressure and BUSY.** The builder stops while `slink_lff` is high. The
  ROD's BUSY pair to the TTC module is {`slink_lff`, trigger queue ≥ `busy_thr`
  or any receiver overflow}. A trigger arriving at a full queue is dropped and
  sets `trig_lost`.

## Where this design departs from the system it models

* **Throughput.** The encoder handles one straw per BC, so an event of 240
  links takes about 4100 BC, which limits the ROD to about 10 kHz. The
  required LVL1 rate is 100 kHz, or 400 BC per event. Reaching it would need
  about 10 straws encoded in parallel and an output wider than one 32-bit word
  per BC. An event at high luminosity, about 1100 words, would need 110 M
  words/s at 100 kHz.
* **Front-end link rate.** The assumed 445-bit frame at 40 Mbit/s also caps one
  chip link at about 90 kHz. The real chip's frame format is not modelled.
* **Link format overhead.** The per-link marker word adds 240 words per event.
  It is there for debugging and could be dropped.
* **Not built:**
  * the 0.5 ns fine delay and the LVDS repeaters of the TTC patch panel;
  * the GOL serialiser, QPLL and optics;
  * the I2C masters (ROD to data patch panel, TTC module to fine delay);
  * the temperature readout (ELMB/CAN);
  * the VME interfaces, whose registers and memories are plain ports;
  * the S-LINK mezzanine, which is a FIFO-style port with a link-full flag;
  * the TTCrx chip, whose decoded outputs are ports.
* **Delay.** Line delay in the TTC module is in whole BC periods only.
* **Orbit length.** The orbit length of 3564 BC comes from the LHC, not from
  the module's description. The beam-gap window is programmable.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| trt_readout_unit | NLINKS_TTC | 40 | TTC links |
| | NROD | 2 | RODs per unit |
| | NGOL | 8 | optical inputs per ROD (× 30 links). NROD·NGOL/4 data panels must be whole |
| | NCODES | 512 | Huffman table entries |
| | NPAR | 128 | parameter words per TTC link |
| | SPY_DEPTH | 4096 | spy buffer words |
| trt_ttc / ttc_param_engine | REGS_PER_CHIP, RB_TIMEOUT, DLY_MAX | 8, 64, 15 | registers per chip, read-back timeout, max line delay |
| trt_rod / rod_event_builder | TRIG_DEPTH, LINK_TIMEOUT | 16, 1024 | trigger queue, frame timeout (BC) |

## Simulating

Every `tb/tb_<block>.sv` is a self-checking test. Each prints
`TB_RESULT checks=N failures=M` and contains a watchdog. The front-end chip is
the behavioural model `tb/dtmroc_model.sv`. It:

* decodes commands and keeps 16 registers;
* answers reads;
* queues up to 42 events and sends them in the frame format above;
* drives its read-back line with a hit input in Fast OR mode;
* can flip a register bit to mimic an upset.

`tb/trt_tb_pkg.sv` generates the straw patterns, the test Huffman table and
the reference events. For example:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal --top-module tb_trt_readout_unit \
  -y rtl -y tb rtl/trt_pkg.sv tb/trt_tb_pkg.sv tb/tb_trt_readout_unit.sv -o sim
obj_dir/sim
```

* `tb_trt_readout_unit` runs the whole unit end to end at reduced size: 2
  optical inputs per ROD, 120 chips, and 32 parameter words per link. In order,
  it:
  1. synchronises with ECR and a BCR every orbit;
  2. loads the Huffman tables;
  3. runs INIT with verification;
  4. sends L1As from the TTCrx and one from NIM, with random S-LINK
     back-pressure on one ROD, and compares both S-LINK streams word by word
     with reference events;
  5. flips a chip register and lets POLL, gated by the beam gap, find it and
     REFRESH repair it;
  6. switches chips and module to Fast OR mode and builds an event from a
     cosmic trigger.

  It counts each of these mechanisms and fails if one never occurred.
* `tb_trt_readout_unit_full` is the same test at the default sizes: 480 chips,
  2 × 240 links, and 128 parameter words per link. Its C++ build takes about
  8 minutes; the simulation itself, three events plus the POLL/REFRESH and
  Fast OR phases, about 20 s.
* The block tests use small sizes where the block has a size parameter.

## Files

* `rtl/trt_pkg.sv`: shared constants and types.
* `rtl/*.sv`: one module per file, as named above. `ttc_bc_counter` is a
  helper of `trt_ttc`.
* `tb/`: the testbenches, the chip model and the test package.
