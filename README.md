# DG-RDMA endpoint in SystemVerilog

DG-RDMA moves messages between two compute nodes as plain layer 2 Ethernet
datagrams. It has no TCP/IP stack, and it still delivers every message even
when the network drops packets. The idea is simple. The sender keeps every
frame it transmits in a small buffer until the far end acknowledges it. If the
acknowledgement does not come back within a timeout, it sends the frame again.
The receiver acknowledges each frame as soon as the frame has fully arrived,
before it has processed the contents.

This repository holds the RTL of one endpoint of that protocol. It is written
for a 125 MHz FPGA clock. The datapath is 16 bytes wide, and a 4-byte stream
connects it to a gigabit Ethernet MAC. Every block has a self-checking
testbench. Two end-to-end testbenches join two endpoints through behavioural
Ethernet links. One of those links loses packets on purpose.

The design follows the endpoint described in the thesis *An Open Source, Line
Rate Datagram Protocol Facilitating Message Resiliency Over an Imperfect
Channel*. It was written from that description. The thesis' own source code
was not used. Where the description leaves a choice open, or contradicts
itself, the choice made here is listed under
[Departures and open points](#departures-and-open-points).

## The endpoint at a glance

An endpoint is full duplex. It sends its own messages, and it receives the
peer's messages. Both sides share one wire through MergeToWire.

```
 send side
 producer -> sender -> fork_send -+-> fdu 0 -+-> merge_fork_fdu -> merge_to_wire -> funnel -> l2_inserter -> MAC tx
                                  +-> fdu 1 -+        ^   |             ^
                                      ^  |            |   v             |
                                      |  +-- fid --> ack_tracker        | ack frames
                                      +---- ack ------+                 |
 receive side                                                           |
 MAC rx -> l2_remover -> unfunnel -> merge_to_wire -+-> (ack frames) -> merge_fork_fdu -> ack_tracker
                                                    +-> merge_fork_fau -+-> fau 0 -+-> merge_receive -> receiver -> consumer
                                                           ^            +-> fau 1 -+                                 ^
                                                           |                 | reports                 control producer
                                                           +-- ack_aggregator <+
```

Here is one message on its way from A to B:

1. A's producer emits a message: a meta item (length, opcode) followed by its payload.
2. The sender wraps the message into a frame with a frame ID.
3. ForkSend hands the frame to a free Frame Departure Unit (FDU).
4. The FDU stores the frame and tells the AckTracker its frame ID.
5. The FDU sends the frame through MergeForkFDU and MergeToWire. The Funnel narrows it to 4-byte quads, and the L2Inserter adds the Ethernet header.
6. At B, the L2Remover checks and strips the Ethernet header, and the Unfunnel widens the stream back to 16 bytes.
7. B's MergeToWire sees that the frame carries no acknowledgement and routes it to MergeForkFAU.
8. MergeForkFAU places the frame in a free Frame Arrival Unit (FAU).
9. When the whole frame is in, the FAU reports {source ID, frame ID} to the AckAggregator.
10. The AckAggregator builds an ack frame. The ack frame goes back through MergeForkFAU and MergeToWire to the wire.
11. Meanwhile, the FAU forwards the frame through MergeReceive to the Receiver. The Receiver strips the headers, and the Consumer checks the message.
12. At A, MergeToWire recognises the ack frame and passes it through MergeForkFDU to the AckTracker.
13. The AckTracker releases the FDU that holds that frame ID, and the FDU becomes free for the next frame.

## Streams and types (`rtl/dgr_pkg.sv`)

Every connection between blocks is a valid/ready stream. A transfer happens in
a cycle where both valid and ready are high. Three payload types are used:

| type | width | meaning |
|---|---|---|
| `hexbdg_t` | 16 bytes + `nbval[4:0]` + `eop` | One beat of a frame. Byte 0 is first on the wire. Every beat but the last holds 16 valid bytes. The last beat has `eop` set and 0 to 16 valid bytes. |
| `qabs_t` | 4 × {2-bit tag, byte} | One quad on the MAC side. Tags: ValidNotEOP, ValidEOP (the last byte of a packet), EmptyEOP (an unused lane at the end), AbortEOP (not produced here). |
| `mlmesg_t` | `is_meta` + meta {length[31:0], opcode[7:0]} + 16 bytes | Message stream between producer, sender, receiver and consumer. It carries either a meta item or a data item. This struct replaces a tagged union. |

`endpoint_status_t` collects the counters of every mechanism. It is the
endpoint's `status` output (see [Observing an endpoint](#observing-an-endpoint)).

## What goes on the wire

A data packet carries one message. All multi-byte fields are sent most
significant byte first.

| bytes | field |
|---|---|
| 0–5, 6–11, 12–13 | Ethernet: destination MAC, source MAC, EtherType `0x3333` |
| 14–23 | **frame header** (10 bytes): destination ID (2), source ID (2), frame ID (2), ACKStart (2), ACKCount (1), flags (1, bit 0 = carries a message) |
| 24–47 | **message header** for the meta data (24 bytes): transaction ID (4), completion address `FEEDC0DE` (4), completion data `CAFEBABE` (4), number of data messages = 2 (2), sequence = 1 (2), data address `BEEFF00D` (4), data length = 8 (2), type = 1 (1), trailing = 1 (1) |
| 48–55 | **meta data** (8 bytes): message length (4), opcode (1), three zero bytes |
| 56–79 | **message header** for the payload: same fields, with data length = payload length, type = 0, trailing = 0 |
| 80– | payload, no padding |

So a frame is 66 bytes plus its payload, and a packet is 80 bytes plus its
payload before the MAC adds its FCS. The fixed words and field values match a
packet capture printed in the thesis, in which an 8-byte message travels in a
74-byte frame.

An **ack frame** is a frame header with nothing after it:

- destination ID = the sender of the acknowledged frame;
- source ID = this endpoint;
- frame ID = this endpoint's own ack counter;
- ACKStart = the acknowledged frame ID;
- ACKCount = 1;
- flags = 0.

Its packet is 24 bytes long, and the MAC pads it to the Ethernet minimum.

Frame IDs count up from 0 and wrap at 16 bits. The ack matching is done modulo
2^16, so a wrap does not break it.

## Holding frames until they are acknowledged

This is the heart of the protocol.

**ForkSend (`fork_send`).** Each FDU raises `free_valid` when it is empty.
ForkSend stores that as a credit. When a frame arrives, ForkSend grants it to
one unit with a credit, round robin. All beats of the frame go to that unit,
and only then is the next frame granted. Units without a credit never see a
beat.

**Frame Departure Unit (`fdu`).** An FDU is a frame-sized RAM with a small
state machine: FREE → LOAD → SEND → WAIT.

- **LOAD.** The FDU writes the beats into its RAM. It takes the frame ID from bytes 4–5 of the first beat and offers it to the AckTracker on the `fid` port.
- **SEND.** It plays the frame out of the RAM.
- **WAIT.** It counts cycles from the moment the last beat leaves. If the count reaches `TIMEOUT`, it rewinds its read pointer and goes back to SEND. It also pulses `timeout_pulse` and increments `retransmissions`.
- **Releasing the frame.** An ack for its frame ID returns the FDU to FREE. The ack can arrive while the frame is still being sent; the FDU remembers it, and the frame is released as soon as that transmission ends.

The RAM is read asynchronously, so `out_beat` follows the read pointer in the
same cycle. Synthesis tools will build it from distributed RAM or registers.
Wrapping it in a registered block-RAM read is a local change to `fdu.sv` and
`fau.sv`.

**AckTracker (`ack_tracker`).** The AckTracker keeps one entry per FDU: the
frame ID in flight, and whether it is still in flight. For each ack frame it
receives, it compares every entry with the range [ACKStart, ACKStart +
ACKCount). Every FDU whose entry matches gets a one-cycle `ack_valid` pulse, and
its entry is cleared. An ack that matches nothing is counted as stale. This is
the normal outcome when a retransmitted frame gets acknowledged twice. Beats
after an ack frame's header are skipped.

**Two frames in flight.** With `N_FDU = 2`, at most two frames are
unacknowledged at any time. That window sets the throughput over a long or
busy link (see [Measured behaviour](#measured-behaviour)). `N_FDU` is a
parameter, and the AckTracker, ForkSend and MergeForkFDU all scale with it.

**Frame Arrival Unit (`fau`) and AckAggregator (`ack_aggregator`).** An FAU
stores one incoming frame. When the frame has fully arrived, the FAU does two
things, in either order and each with its own handshake:

- it reports {source ID, frame ID} to the AckAggregator;
- it forwards the frame to MergeReceive.

The FAU is free again once both are done. The AckAggregator turns each report
into an ack frame, choosing round robin between FAUs, and counts them.
Because the ack depends only on the frame's arrival, a slow consumer does not
delay acknowledgements.

## Sharing the wire: MergeToWire

`merge_to_wire` is the single point where an endpoint's two directions meet.

**Transmit arbiter.** Two sources compete for the wire: datagram frames from
MergeForkFDU and ack frames from MergeForkFAU. A frame is never interrupted.
Plain alternation would not work, because the two kinds do not arrive in a
regular pattern. The arbiter is a three-state machine:

| state | leaves when | to |
|---|---|---|
| Idle | an ack frame is waiting | Ack Out |
| Idle | no ack, a datagram is waiting | Datagram Out |
| Ack Out | the ack frame's last beat is sent and a datagram is waiting | Datagram Out |
| Ack Out | the ack frame's last beat is sent, no datagram waiting | Idle |
| Datagram Out | the datagram's last beat is sent and an ack is waiting | Ack Out |
| Datagram Out | the datagram's last beat is sent, no ack waiting | Idle |

Acks win ties from Idle. After each frame, the arbiter turns to the other kind
if that kind is waiting. An endpoint that receives heavy traffic therefore
cannot starve its own datagrams with acks, and the reverse cannot happen
either. The counters `ack_to_dg_switches` and `dg_to_ack_switches` count the
two direct transitions. `tx_ack_frames` and `tx_dg_frames` count frames.

**Receive router.** The router reads the frame header of each incoming frame
and holds its decision until `eop`:

- a destination ID other than `my_id`: the frame is dropped and counted;
- ACKCount ≠ 0: the frame goes to the ack path (MergeForkFDU, then the AckTracker);
- otherwise: the frame goes to the datagram path (MergeForkFAU).

## Width conversion and Ethernet framing

**Funnel.** `funnel` turns each 16-byte beat into ⌈nbval/4⌉ quads, one per
cycle. It tags the last valid byte ValidEOP and any lanes after it EmptyEOP.
A frame whose last beat is empty ends with a quad whose lane 0 is EmptyEOP.
The MAC side therefore runs at 4 bytes per cycle, or 500 MB/s at 125 MHz,
which is four times gigabit line rate.

**Unfunnel.** `unfunnel` does the reverse. It collects quads until 16 bytes or
the end of the packet.

**L2Inserter.** `l2_inserter` pushes the 14-byte header (destination MAC,
source MAC, `0x3333`) into a byte shifter, followed by the frame's quads. It
realigns everything to quads, because 14 is not a multiple of 4.

**L2Remover.** `l2_remover` collects 14 bytes and compares the destination MAC
with `my_mac` and the EtherType with `0x3333`. It then either passes the rest
of the packet on, realigned, or drains the packet and counts it as dropped.
Packets shorter than the header are also dropped.

Both L2 blocks sit on the 4-byte side, between the Funnel/Unfunnel and the MAC.

## Building and taking apart frames

**Byte shifter.** `byte_shifter` is a byte queue. It accepts 0..`IN_BYTES`
bytes and releases 0..`OUT_BYTES` bytes per cycle, and `out_data` always shows
the oldest bytes. It is what lets the 10-, 24- and 8-byte headers and an
arbitrary payload length share a 16-byte datapath.

**Sender.** `sender` pushes the parts of a frame in order: frame header,
message header, meta data, message header, then payload. It pops 16 bytes
whenever more than 16 are queued. At the end of the message it flushes the
remainder as the `eop` beat.

**Receiver.** `receiver` pushes beats into its own byte shifter and pops in
the same order as the sender pushed. It emits the meta item and then the
payload in 16-byte items, filling unused bytes with the `NUKE` value. It
drains the frame without output in two cases:

- the flags say the frame carries no message;
- the frame ends early; this case is also counted in `bad_frames`.

## Test traffic: producer and consumer

**Producer.** The producer stands in for whatever would feed real messages.
It has three length modes:

- constant (`LENGTH`);
- incremental: `MINL`, `MINL+1`, … up to `MAXL`, then `done`;
- random: a 16-bit LFSR reduced into [`MINL`, `MAXL`].

It has three data modes:

- zero origin: every payload counts from 0;
- incremental origin: payload *k* counts from *k*;
- rolling: the count continues across payloads.

Unused bytes of the last data item hold `NUKE`.

**Consumer.** The consumer reads the received messages and the output of a
second, identical producer in lock step. It counts a message as correct when
the meta data and every payload byte match. Filler bytes are ignored.

## Parameters

| parameter (top) | default | meaning |
|---|---|---|
| `N_FDU`, `N_FAU` | 2, 2 | frames in flight per direction; receive buffers |
| `FRAME_BEATS` | 517 | FDU/FAU buffer depth in beats: 66 header bytes + 8192 payload bytes |
| `TIMEOUT` | 125000 | retransmission timeout in cycles (1 ms at 125 MHz) |
| `LMODE`, `LENGTH`, `MINL`, `MAXL` | incremental, 1024, 0, 1024 | producer lengths |
| `DMODE`, `NUKE`, `OPCODE` | rolling, `8'hAA`, `8'h01` | producer data |

The thesis gives the two FDUs, the two FAUs, the 125 MHz clock and the payload
range of its tests (0 to 1 KB, and up to 8 KB in its bandwidth plots). It does
not give the timeout, the buffer depth or the producer defaults; the values
here are choices made for this design. Endpoint IDs and MAC addresses are
ports, so one elaborated design serves both nodes.

## Observing an endpoint

`status` (type `endpoint_status_t`) reports the following:

- messages produced, frames sent, retransmissions;
- acks matched and stale, acks generated;
- frames received, messages delivered;
- correct and wrong messages at the consumer;
- packets dropped for a wrong MAC or EtherType, frames dropped for a wrong ID;
- truncated frames;
- ack and datagram frames sent, and both arbiter switch counts;
- `producer_done` and `tx_idle` (no frame held or being built).

`rx_mon_valid` and `rx_mon_msg` show each message item that the receiver hands
to the consumer.

## Measured behaviour

`tb_dgrdma_full` joins two endpoints at their default parameters through
gigabit-paced links. The links move one byte per cycle, plus 24 byte times of
FCS, gap and preamble per packet, and lose nothing. Each endpoint sends its
full sweep of 1025 messages, 0 to 1024 bytes long, and both consumers count
1025 correct messages with no retransmissions. The whole run takes 795,366
cycles (6.4 ms at 125 MHz).

Over the last hundred messages (925–1024 bytes), goodput is **89.2 MB/s**.
The links alone would allow 109.2 MB/s for that traffic. The thesis reports
about 106 MB/s at 1 KB.

The gap comes from the window of two frames. Traffic runs in both directions,
so an ack frame often waits behind a full-size datagram going the other way.
During that wait both FDUs are full, and the sender stalls. Raising `N_FDU`
is the lever the thesis itself names for this. The thesis' exact MAC and
switch timing is not known, so this comparison is indicative only.

`tb_dgrdma_bandwidth` sends ten 8192-byte messages, the largest payload of
the thesis' bandwidth graphs, with every frame buffer full. It runs one pair
of endpoints one way and another pair both ways. Every message arrives
correct with no retransmission. Goodput is 99.3 MB/s one way and 96.5 MB/s
per direction both ways: about 80% of the link limit of 123 MB/s. The thesis'
graphs come close to the limit at that size. Where the remaining time goes
has not been traced.

`tb_dgrdma_endpoint` runs two smaller endpoints (payloads 0–300 bytes, buffer
24 beats, timeout 4000 cycles) over two runs:

- a clean link with asymmetric pacing;
- a lossy link: every 5th long packet A→B and every 4th B→A is dropped, and
  foreign packets are injected (wrong MAC, wrong endpoint ID).

It checks that every message arrives exactly once and correct. It also checks
that each mechanism happened, and prints how often:

- retransmission;
- both arbiter switches;
- zero-length messages and partial beats;
- the use of the second FDU and the second FAU;
- L2 and ID drops.

## Departures and open points

- **Ethernet header position.** The thesis says the L2Inserter and L2Remover have 16-byte stream interfaces. Its step-by-step packet flow, however, narrows the stream to 4 bytes *before* the header is inserted, and widens it *after* the header is removed. The L2 blocks here follow the flow and work on the 4-byte stream.
- **No padding.** The thesis says message data is padded to a 16-byte boundary. Its packet capture shows no padding, and this design follows the capture.
- **When an FDU becomes free.** One passage frees an FDU when its frame leaves, and another when the frame is acknowledged. This design frees it on acknowledgement, which retransmission requires.
- **Arbiter transition label.** The printed label on the arbiter's Datagram Out → Idle transition reads like the Ack Out → Idle label. It is taken here as "datagram ended and no ack waiting", the only reading under which the Datagram Out state can end.
- **ACKStart width.** The frame header table gives ACKStart 2 bytes, while a printed example shows a 32-bit value. This design uses 16 bits.
- **Ack frame contents.** The ack frames are header-only. The thesis mentions removing message headers from ack frames but does not define their contents.
- **Not built.** The gigabit MAC and the quad-byte MAC wrapper that initialises it come from elsewhere and are not described. The endpoint brings out its QABS `tx_*` and `rx_*` streams for them.
- **One message per frame.** Frames that carry acknowledgements alongside a message (piggy-backing) are not generated. A received frame with a non-zero ACKCount is treated as an ack only.
- **Frame-size limit.** A frame longer than `FRAME_BEATS` is truncated in the FDU/FAU. Keep `MAXL` ≤ 16·`FRAME_BEATS` − 66.
- **Empty frame body.** A packet that has a valid Ethernet header but no frame bytes at all is not handled by the L2Remover. The sender never produces one.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops by
itself, including on a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dgr_pkg.sv tb/tb_fdu.sv \
          --top-module tb_fdu -Mdir obj_fdu -o sim && obj_fdu/sim
```

Replace `tb_fdu` with any testbench in `tb/`:

- one `tb_<block>` per block;
- `tb_dgrdma_endpoint` for the end-to-end test with losses (under a second);
- `tb_dgrdma_full` for the full-size run (a few seconds);
- `tb_dgrdma_bandwidth` for 8192-byte payloads (under a second).

`tb/l2_link_model.sv` is the behavioural Ethernet link the end-to-end
benches use, and `tb/bw_pair.sv` wraps two endpoints and two links for the
bandwidth bench. It provides gigabit pacing, dropping every N-th long packet, and
injection of foreign packets. It is not synthesizable.

For synthesis, read `rtl/dgr_pkg.sv` first, then the rest of `rtl/`, with
`dgrdma_endpoint` as the top. At the defaults, the four frame buffers (two
FDUs, two FAUs) hold 517 beats of 134 bits each: about 277 kbit of memory per
endpoint.
