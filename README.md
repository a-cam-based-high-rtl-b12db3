# CAM-based classifier-scheduler for a video network processor

A video network processor sits between an IPTV content provider and the
network. Each packet it receives must be checked against a table of
authorised flows. Packets that carry video for rights management ("VNP
packets") have their payload sent through processing engines (compression,
watermarking, encryption, scrambling) and then sewn back onto the header. All
other matching packets pass straight through. Every surviving packet is then
sent to one, several or all output ports, but only when those ports are not
congested.

This RTL implements the forwarding-plane block that does this work. It has two
halves:

* **Classifier.** A content addressable memory (CAM) compares the packet
  header with up to 32 stored patterns in a single clock. A miss drops the
  packet. A hit produces an address. VNP packets are split into header and
  payload, and the payload makes a round trip through the processing elements.
* **Scheduler.** The CAM address selects an entry in a small port RAM.
  Packets wait in a FIFO. A dispatcher forwards the head packet when the QoS
  of all its target ports is good. Otherwise it moves the packet to the FIFO
  tail and waits for a network up time before it tries again.

The design follows a published master's thesis prototype: its packet size,
CAM organisation, port count and block structure. That prototype was
experimental, and left many details open: handshakes, widths of control
signals, the port-table format, the FIFO size, what happens on reset. This
design settles them. Each such choice is named below and in the header comment
of the file concerned.

## Packet format

A packet is 32 bytes (256 bits). It is stored little endian: byte *i* is
`data[8i+7:8i]`.

| bytes | content |
|---|---|
| 0–19 | header in IPv4 layout; byte 8 is the time-to-live (hop count) |
| 20–31 | payload |

The CAM compares only the header. Header length is set per stored pattern:
the control plane gives it in bytes (`cam_hdr_bytes`) with each pattern write.
The bytes behind it are stored as "don't care". With this packet format it is
20, but a pattern can be shorter, for a protocol with a short header, or
longer. The VNP split point is fixed at 20 bytes (`HDR_BYTES`).

Both the VNP path and the normal path update the hop count. The
update decrements byte 8 and stops at 0; the header checksum is left
untouched.

Whether a packet is a VNP packet comes from the `vnp` input, which is sampled
together with the packet. The source suggests carrying this flag in the IP
options field later on.

## The CAM: comparing with look-up tables

This is the least obvious part of the design.

The CAM is not built from stored words and XOR comparators. Each 4-bit slice
(nibble) of each stored pattern is a **16-entry, 1-bit look-up table**
(`nibble_lut`). The table holds a 1 at exactly the position equal to the
stored nibble. A search then needs no comparator: the 4 key bits address the
table, and the bit read out *is* the nibble's match. A don't-care nibble has
all 16 bits set. This is the classic FPGA CAM built on shift-register LUTs
(SRL16).

**Writing a pattern (16 clocks).** A table can only be loaded serially, one
bit per clock. `cam_write_counter` therefore runs a 4-bit count from 15 down
to 0. It keeps `we` high for those 16 clocks and `cam_write_rdy` low. On each
clock, `cam_write_data` computes one bit for every nibble of the pattern:
`nibble == cnt`, or always 1 for a don't-care nibble. A nibble is don't-care
when it lies beyond the pattern's header length. `cam_addr_decoder`
routes the shift enable only to the entry being written. After 16 clocks the
bit written at count *k* sits at table position *k*. The pattern, its header length
and the address are latched when the write starts, so the bus is free again at once. Packets
are not taken while a write runs.

**Combining nibbles (carry chain).** In `swc`, the single word comparator,
each 8-bit word uses two tables. Two carry multiplexers follow them: each one
passes the incoming carry when its table says "match" and drives 0 otherwise.
`cam_entry` chains 32 such words, with the search enable as the first carry.
The end of the chain is therefore the AND of all 64 nibble matches, without a
separate gate tree. It is registered into one bit of the 32-bit match bus.

**Encoding.** `cam_match_encoder` registers the address of the matching entry
(the lowest one, if several match) and the Match Hit. When nothing matches,
Match Hit is low and the address is 0.

**Timing.** A key applied in clock *t* gives `cam_match` and
`cam_wordaddr_out` after the edge at *t*+2. A new search can start every
clock. A search that overlaps a write of the same entry sees the entry
half-loaded, which is why the classifier waits for `cam_write_rdy`.

Reset clears every table, so an unwritten entry never matches. This is a
departure from real SRL16 cells, which cannot be reset.

## Classifier flow

`classifier` handles one packet at a time, in five states:

1. **IDLE.** The enable check. A packet is taken (`in_valid && in_ready`)
   only when `cam_match_en` is high, no CAM write is running and none starts
   in that clock. The packet is searched in the CAM in the same clock.
2. **WAIT.** The match bus is registered.
3. **CHECK.** On a miss, `drop` pulses and the packet is discarded. On a hit,
   the CAM address goes to the scheduler (`addr_valid`). Then:
   * a VNP packet is split by `split_combine`: the header, with its hop count
     updated, goes into the header cache, and the payload goes out on
     `pe_out`;
   * a normal packet only gets its hop count updated.
4. **PE.** Waits for `pe_in_valid`, then merges the payload bytes of `pe_in`
   behind the cached header.
5. **FWD.** Offers the packet to the scheduler until it is accepted.

`pe_out` is 256 bits wide. The payload sits in its packet byte positions and
the header bytes are zero, so its low 160 bits are always 0. The processing
elements may take any number of clocks.

## Scheduler

**Port table.** `port_ram` has one 8-bit `port_entry_t` per CAM address:

| field | meaning |
|---|---|
| `mode` | `CAST_SINGLE`, `CAST_MULTI` or `CAST_BROAD` |
| `port` | target port for single cast |
| `mask` | target ports for multicast |

The table is read when the classifier reports the address, so the lookup
overlaps the processing-element round trip. The entry is held until the packet
arrives.

**FIFO.** `sched_fifo` is a shift chain with a tap multiplexer, 16 entries by
default. A write shifts a new entry in at the tail. The head is read at tap
`count-1`. A read and a write in the same clock, with the head as write data,
move the head to the tail. This is the re-queue operation.

**Dispatcher.** Each clock, `dispatcher` looks at the head, unless the FIFO
is empty or a wait is pending.

* **Mode check.** The targets are all ports if the `bcast` input is set or
  the entry says broadcast. Otherwise they are the mask for multicast, or the
  single port.
* **QoS check.** If every target port's `qos` bit is set, the packet appears
  on those `termn[i]` ports, with `termn_valid[i]` high for one clock, and is
  removed from the FIFO.
* **Re-queue.** Otherwise the packet is moved to the tail (`requeue` pulses).
  The dispatcher then waits `NET_UP_TIME` clocks (8 by default) before it
  looks again.

`qos` and `bcast` are registered first, so they take effect one clock after
they change. While a re-queue uses the FIFO's write port, no new packet is
accepted in that clock.

## Top level: `class_sched`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; asynchronous active-high reset |
| `data` | in | 256 | packet, or CAM pattern during a write |
| `in_valid` / `in_ready` | in/out | 1 | packet handshake |
| `vnp` | in | 1 | the packet on `data` is a VNP packet |
| `cam_match_en` | in | 1 | enable: packets are taken only while high |
| `cam_write_en`, `cam_wordaddr_in` | in | 1, 5 | start a 16-clock pattern write of entry `cam_wordaddr_in` |
| `cam_hdr_bytes` | in | 6 | header length in bytes of the pattern being written (0–32) |
| `cam_write_rdy` | out | 1 | no CAM write in progress |
| `cam_wordaddr_out`, `cam_match` | out | 5, 1 | last CAM result (address, Match Hit) |
| `ram_we`, `ram_waddr`, `ram_wdata` | in | 1, 5, 8 | write a port-table entry |
| `qos` | in | 4 | per-port QoS good |
| `bcast` | in | 1 | broadcast mode |
| `pe_out`, `pe_out_valid` | out | 256, 1 | payload to the processing elements |
| `pe_in`, `pe_in_valid` | in | 256, 1 | processed payload back |
| `termn[0:3]`, `termn_valid` | out | 4×256, 4 | output ports |
| `drop`, `requeue` | out | 1 | a packet was dropped / re-queued |
| `fifo_count` | out | 5 | packets waiting in the FIFO |

**Latency.** With good QoS and an empty FIFO, a normal packet appears on its
port 4 clocks after the clock edge that takes it:

1. CAM match bus registered.
2. Match Hit registered.
3. Packet handed to the FIFO.
4. Dispatched.

The classifier can take the next packet 4 clocks after the previous one
(3 clocks, plus one for the hand-over). A VNP packet adds the
processing-element time plus 2 clocks.

**Bringing it up.**

1. Hold `rst` high for a clock.
2. Write the patterns: pulse `cam_write_en` with the pattern on `data` and
   its header length on `cam_hdr_bytes`, then wait for `cam_write_rdy` before the next write.
3. Write a port-table entry for every pattern address.
4. Raise `cam_match_en` and send packets.

Port-table entries are not reset. An address that was never written returns
an arbitrary entry.

### Parameters

| parameter | default | from |
|---|---|---|
| `PKT_W` | 256 | source (32-byte experimental packet) |
| `HDR_BYTES` | 20 | source (VNP split point) |
| `CAM_DEPTH`, `CAM_AW` | 32, 5 | source |
| `NPORTS` (package) | 4 | source |
| `FIFO_DEPTH` | 16 | this design |
| `NET_UP_TIME` | 8 clocks | this design |

Shared types and constants live in `rtl/vnp_pkg.sv`: the packet type, the
port-table entry, the cast modes, the hop update and the target-port function.

## Where this design departs from the source or fills gaps

* **Reset.** Reset is asynchronous and active-high. It also clears the CAM
  tables, which the source's shift-register cells could not do.
* **Non-VNP packets.** The source disagrees with itself: one passage drops
  them, others forward them unchanged or with the hop count updated. Here they
  are forwarded with the hop count updated.
* **QoS.** The prototype has a single QoS bit. Here there is one bit per
  output port. Tie the four bits together for the single-bit behaviour.
* **FIFO.** It is drawn as a shift chain with a tap select, but described
  with read and write pointers. This design uses the shift chain. Its size is
  not given in the source.
* **Per-word registers.** The source's comparator drawing shows a flip-flop
  per 8-bit word. Here the carry chain runs through a whole entry and is
  registered once. The result is the same, and the search latency is 2 clocks.
* **Port table.** The entry format (mode, port, mask) is this design's own.
  The source says only that the RAM yields the port and that the scheduler
  single-, multi- or broadcasts.
* **Variable header length.** The source leaves the control plane to change
  the look-up tables when headers grow or shrink. Here that is the
  `cam_hdr_bytes` value given with each pattern write.
* **Multiple matches.** The lowest address wins. The source assumes unique
  patterns.
* **Hop update.** The header checksum is not recomputed when the hop count
  changes.
* **Not included.** The processing elements, the control plane (which loads
  the tables), and the QoS measurement that produces `qos` are outside this
  block. Their signals are ports.

## Verification

Each block has a self-checking testbench in `tb/`, named `tb_<module>`. Each
prints `TB_RESULT checks=N failures=M`. The main ones:

* `tb_cam`: 32 random headers; 16-clock writes; 2-clock search latency;
  back-to-back searches; misses; rewriting an entry; patterns of 8, 32 and 0
  header bytes.
* `tb_classifier`: drop on a miss; hop update; the VNP round trip through a
  processing-element stand-in; 3-clock latency to the scheduler; enable and
  CAM-write stalls; back-pressure.
* `tb_scheduler` and `tb_dispatcher`: single, multi and broadcast entries;
  broadcast mode; re-queue and the up-time wait under random QoS; a full FIFO.
* `tb_class_sched`: end-to-end at the default size. It runs a 32-packet
  burst, then congestion with random per-port QoS (re-queues, a full FIFO,
  classifier stalls, the enable dropped, a CAM pattern rewritten under
  traffic with a 12-byte header), then broadcast mode. A scoreboard checks that every packet reaches
  exactly its ports with the right contents, and the testbench counts each
  mechanism. Its processing-element stand-in shifts the word left by two bits,
  as the source's prototype did in place of real engines.

To run a testbench with Verilator (5.x), from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/vnp_pkg.sv tb/tb_class_sched.sv --top-module tb_class_sched
./obj_dir/Vtb_class_sched
```

All testbenches finish in well under a second of simulation time.
