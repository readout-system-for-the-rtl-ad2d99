# RPC muon trigger readout: compressed links, derandomizers and event builder

The RPC muon trigger of CMS needs every strip hit of every bunch crossing
(BX, one 25 ns clock) in the counting room, about 90 m from the detector.
Hits are rare in any one BX, so each optical link sends only the non-empty
parts of the hit pattern. The compression costs a fixed extra latency and
nothing else. The same compressed packets feed two consumers:

* the trigger, which decompresses them back into full hit vectors;
* the readout, which keeps the packets for the L1 trigger latency. On an
  L1Accept it files the packets of the triggered BX in an event page and
  builds one event for the DAQ's readout data pipe (RDPM).

This repository holds synthesizable SystemVerilog for one readout module
with its link system. The module serves 48 links spread over two trigger
crates. The readout follows the published structure of the CMS RPC readout
(*Readout System for the CMS RPC Muon Trigger*):

* Slave Readout Boards (SRB) derandomize the link streams;
* a Master Readout Board (MRB) per crate concentrates them into a crate event;
* the DAQ MRB merges the two crate events into one rack event.

That description gives the structure and the principles. Bit widths, buffer
sizes, bus protocols and word formats are not given, so they are choices of
this implementation. They are listed in [Departures and choices](#departures-and-choices).

```
 hits_i[l] ─► lmux ─► optical_link ─┬─► ldemux ─► trig_frame_o[l]         (trigger)
  (24 bits/BX)        (fixed delay) │
                                    └─► srb (8 sr_channel) ─┐ local bus   (readout)
                                                            ├─► mrb (crate 0) ─┐
                               ... 3 SRBs per crate ...     ┘                  ├─► rack_merger ─► rdpm_*
                                                              mrb (crate 1) ───┘
```

## Link compression (`lmux`, `ldemux`)

The 24 strip bits of a link are cut into 6 partitions of 4 bits. The
compressor queues every BX that has hits. Each clock it sends one packet: the
lowest unsent non-empty partition of the oldest queued BX.

| bits  | field | meaning |
|-------|-------|---------|
| 10:7  | data  | the 4 hit bits of the partition |
| 6:4   | pnum  | partition number 0..5 |
| 3:1   | delay | clocks the partition waited in the compressor, 0..7 |
| 0     | eod   | last packet of its BX |

The receiver works out the BX of a packet as *arrival clock − delay*. That
BX tag is correct no matter how long the queue was, so the decompressor
(`ldemux`) can put each partition back into its BX's frame. It sends the frame
out a fixed 9 clocks after the tag, after the latest possible packet
(delay 7). From the hits at `hits_i` to `trig_frame_o` the total is
LINK_LAT + 11 clocks for every BX: 2 in the compressor, LINK_LAT on the
link, 9 in the decompressor.

Under overload the 3-bit delay field is the limit. A BX whose remaining
partitions have waited more than 7 clocks is dropped, and so is a BX that
finds the 8-entry queue full. `lost_o` pulses when either happens. At the
occupancies the RPC system expects (about 0.04–0.07 packets per link and
event) it is very rare.

## Derandomization in the SRB (`sr_channel`, `srb`)

Each SRB channel holds one link's packets for the trigger latency. On an
L1Accept it copies the packets of the triggered BX into an event page. This
is the central mechanism. It has four parts, all in one module:

1. **Data analyzer.** It tags each arriving packet with its BX (arrival
   minus delay), using the channel's free-running clock counter.
2. **Length pipeline.** A ring of DEPTH = 256 counters, one per BX tag,
   counts that BX's packets. The counter of the next BX is cleared every
   clock, so BXs without hits read as 0.
3. **Data pipeline.** A ring memory of 256 × 8 packet slots. Packet *n* of
   BX *b* goes to address {b, n}.
4. **L1Accept queue and copy engine.** An L1Accept arriving in clock *t*
   queues tag *t − L1_LAT* (up to 8 queued). The copy engine takes one entry
   at a time and copies its packets, one per clock. They go into page
   *(event number mod 16)* of the data buffer. The engine then writes the
   packet count into the length buffer of that page and increments
   `events_done_o`.

The data buffer and the length buffer form the dual-port memory. The copy
engine writes on one side, and the local bus reads the other with one clock
of latency. Every channel of every SRB sees the same L1Accepts, so event *k*
always sits in page *k mod 16*. The MRB can therefore address an event by
its number alone.

Timing constraints the user must respect:

* `L1_LAT ≥ 8`, so that all packets of the triggered BX have arrived;
* the tag must still be in the ring when it is copied. The condition is
  `L1_LAT + (queued L1Accepts × ~10 clocks) < DEPTH`. With the defaults
  (109 clocks inside the SRB, 256-BX ring) there are about 140 clocks of
  slack;
* at most 8 L1Accepts may wait at once. An overflow sets `ovf_o` and an
  assertion fires. The CMS trigger rules keep bursts far below this.

The SRB board (`srb`) puts 8 channels side by side. It answers local-bus
reads addressed to its `BOARD_ID`. Otherwise it drives zeros, so a crate's
bus is the OR of its boards. Its `events_done_o` advances only when all 8
channels have finished an event.

## Crate events and the local readout bus (`mrb`)

The MRB counts L1Accepts and BXs. The BX counter is reset by the orbit
signal `bc0_i` and wraps at 3564. The MRB passes each L1Accept to its SRBs
one clock later. This latency is accounted for in the top level.

Event *k* is built once every SRB's `events_done_o` has passed *k*. The MRB
reads the SRBs over the pipelined bus: one request per clock, data back on
the next clock. For each link it reads the count, then, if the count is
non-zero, the packets back to back. The count request of the next link goes
out in the clock in which the last answer for the previous link comes back.
An empty link thus costs one clock, and a link with *n* packets *n* + 1
clocks. The crate
event is written into page *k mod 8* of its event buffer, and its length is
stored beside it. Crate event format, in 16-bit words:

| tag (15:14) | word | contents |
|-----|------|----------|
| 11 | event header | event number (L1Accept count) mod 2^14 |
| 10 | BX header | BX counter at the L1Accept (0..3563) |
| 01 | link header | global link number (bits 13:8), packet count (3:0) |
| 00 | data | one packet (bits 10:0) |

Links without packets get no link header. With `ttc_mode_i` low
(autonomous running, without TTC) the two header words are left out.
Change the mode only while no event is pending. At most 8 crate events wait for
the merger: `merged_i` returns its progress and the MRB stalls when all pages
are full. If L1Accepts run more than 16 events ahead of the MRB, an SRB page
could be overwritten before it is read. `ovf_o` flags this.

## Rack events (`rack_merger`)

The DAQ MRB's merger waits until both crates have finished event *k*. It then
reads the two crate events and sends:

* the event and BX headers of crate 0;
* the link and data words of crate 0;
* the link and data words of crate 1.

In autonomous mode there are no headers: the rack event is crate 0's
words followed by crate 1's. An event without packets then sends nothing
and only advances `merged_o`. In TTC mode the merger also reads crate 1's
headers and compares them with crate 0's. A
difference sets the sticky `sync_err_o`. The RDPM side is a 16-bit stream
with `valid`/`ready` and `sop`/`eop`. A two-word buffer hides the one-clock
read latency, so a rack event flows at one word per clock while `ready` is
high. Finishing an event frees the page in both MRBs.

## Top level (`rpc_readout_top`)

| parameter | default | meaning |
|-----------|---------|---------|
| `N_SRB` | 3 | SRBs per crate (two crates, so 48 links) |
| `N_CH` | 8 | links per SRB |
| `LINK_LAT` | 18 | link latency in clocks (90 m of fibre) |
| `L1_LAT` | 128 | clocks from a BX's hits at `hits_i` to its L1Accept at `l1a_i` |
| `DEPTH` | 256 | BX ring depth in each SRB channel |

The SRB channels see a BX's packets LINK_LAT + 2 clocks after its hits. They
see the L1Accept one clock after `l1a_i`. The top therefore sets the SRB
latency to L1_LAT − 1 − LINK_LAT, which is 109 with the defaults.

Outside the module, as ports: TTC signals (`clk`, `l1a_i`, `bc0_i`), the
mode input `ttc_mode_i`, the
decompressed hits for the Trigger Boards, and the RDPM stream. The front-end
electronics, synchronizers, TTC receiver, VME/PCI and JTAG access, and the
DDU interface of the prototype are not part of this RTL. A full system has 18
such crates, so 9 modules like this one.

## Sizing against the expected rates

The rate study for the worst chambers (RE1/1) gives the expected load per
event: on average 4.59 packets per 48-link crate group, at most 17 in 10^6
events. Events average about 300 bytes and stay below about 1 kB.

* Buffer capacity: a crate event page (256 words) holds the worst case
  any BX can produce, 2 + 24 × 7 = 170 words. Two pages make the 512 words
  (1 kB) of the largest expected event.
* Processing time: building an event takes about 35 clocks, and merging
  takes about one clock per word. At a 100 kHz L1Accept rate there are 400
  clocks per event. `tb_workload_re11` runs both occupancies of the rate
  study at that rate. The slowest event left the module 102 clocks after its
  L1Accept (including the SRB copy and both concentration stages).

## Departures and choices

* Links per module: the description gives both 40 links per module and
  48 links per RDPM. This RTL uses 48 (three 8-link SRBs per crate).
* The packet fields, the 7-clock delay limit and the loss rules of the
  compressor are this implementation's. So are the ring sizes, the
  L1Accept queue, the copy engine and the 16 event pages of the SRB.
* The local bus protocol, the 16-bit word format, zero suppression of empty
  links, the 8-page MRB event buffer and the RDPM stream handshake are this
  implementation's. The LVDS bus between the two MRBs is the merger's read
  port into the other MRB's event buffer.
* The MRB has two modes, as the prototype board had. With `ttc_mode_i`
  high it runs with the TTC system and writes the event and BX headers.
  With it low it runs autonomously and writes only link headers and packets.
  The autonomous board's own clock is not modelled. The mode is a
  configuration input, read when an event starts. The merger follows the
  same input, which is this implementation's addition.
* The optical link is a fixed delay line (`optical_link`, a behavioural
  model). Link errors and synchronisation are not modelled.
* Reset is asynchronous and active low. Memories are not cleared; every
  read of them is covered by a count written after reset.

## Simulation

Every module has a self-checking testbench in `tb/`, and each prints
`TB_RESULT checks=N failures=M`. Example with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/rpc_ro_pkg.sv \
          tb/tb_rpc_readout_top.sv --top-module tb_rpc_readout_top
./obj_dir/Vtb_rpc_readout_top
```

| testbench | what it checks |
|-----------|----------------|
| `tb_lmux` | every packet and loss against a queue model; 2-clock latency; overload phases |
| `tb_ldemux` | frames against the hits, 9 clocks after the tag |
| `tb_optical_link` | exact delay at 5 and 18 clocks |
| `tb_sr_channel` | page contents and counts for single, burst, empty and full (6-packet) events |
| `tb_srb` | bus reads of all channels, board selection, 1-clock bus latency |
| `tb_mrb` | crate events word by word with two SRBs, BX header, waiting for free pages, autonomous mode |
| `tb_rack_merger` | rack event order, sop/eop, header mismatch flag, full rate under constant ready, autonomous mode |
| `tb_rpc_readout_top` | full 48-link module at default parameters (about 30 s) |
| `tb_workload_re11` | the module under the RE1/1 load: 0.04 and 0.065 packets per link, L1Accepts every 400 clocks on average |

The end-to-end test compares the trigger output of every link and every BX
with the hits. It also compares every rack event word by word, except the
packets' delay fields. It drives the module through:

* delayed packets and compressor overload;
* L1Accept bursts;
* an RDPM stall long enough that the MRBs wait for pages;
* empty events and orbit resets;
* a stretch in autonomous mode.

The test fails if any of these never occurs.
