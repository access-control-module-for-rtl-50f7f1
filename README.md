# Access control module for a hybrid-access optical LAN

This is synthesizable SystemVerilog for the access control module (ACM) of one
node on a bus-structured, 144 Mbit/s optical local area network. Every node
shares one bus. Time on the bus is cut into 5 ms frames. Each frame carries two
kinds of traffic:

* a **circuit region**, where every node gets exactly one turn to send its
  stream channels (telephony, video);
* a **packet region**, where nodes take turns sending packets. A round of
  turns may span several frames.

Nobody hands out the turns. Each node works out from what it hears on the bus
when its own turn has come. Frame structure is carried in-band by
**delimiters**, each three bytes long:

| delimiter | meaning |
|---|---|
| SF | start of frame (and of its circuit region) |
| RB | region boundary: the circuit region ends, the packet region begins |
| SR | start of a packet round |
| SC | start of a circuit channel or of a packet |
| EA | end of one node's activity (its turn is over) |

A node whose turn comes but has nothing to send stays silent. After a time-out
**TL** the next node takes over. Turns go round robin by physical position
0..N-1 on the bus. One node, the frame manager, sends SF, RB and SR. Any node
can take that role.

The ACM sits between the medium access unit (MAU, the optical
coder/decoder, which is not part of this design) and the node's host. It has
three channels, each with its own 8-bit bus to the MAU:

```
            read channel (RC)                 sense channel (SC)              write channel (WC)
 rc_rx ─► 4-byte window event unit   sc_rx ─► 4-byte window event unit    grant ─► delimiter generation
          3-byte window kind unit             3-byte window kind unit               unit (sequencer)
          bus splitter ─► stream out          TL counter                            packet round manager
                      └─► packet address      access right detection ─ grants ─►    bus splitter (stream/packet
                          detection ─► pkts   alarm generator ─► management           source select)
                                                                                    packet bus multiplexer ─► wc_tx
```

## Timing model

One clock is one byte time on the medium: 18 Mbyte/s, or 56 ns. Every unit
makes its decision within one byte time. Every MAU byte is a `mau_byte_t`
(`acm_pkg`):

* `act`: a byte is present. It is 0 when the bus is silent.
* `dlm`: the MAU decoded this byte as a delimiter symbol.
* `data[7:0]`: the byte.

The `dlm` flag keeps the data transparent, so packet and stream contents may
take any value. Delimiter byte codes are SF 0x0F, RB 0x33, EA 0x55, SR 0x66 and
SC 0x99. Any two of them differ in four bits.

## Recognising a delimiter: the 4-byte and 3-byte windows

This is the part that needs the most care. A delimiter is three identical
bytes. A receiver accepts one when **two of the three** match, so a single
corrupted byte is tolerated. The receiver therefore has to find where the
three bytes end even if one of them is damaged. It also has to steer the byte
right after the delimiter to the correct destination.

`dlm_event_detect` keeps a window of four bytes: `w[3]` is the oldest and
`w[0]` the newest. It raises `evt` when the triple `w[3..1]` is a delimiter:

```
evt = !lockout && ( all of w[3..1] flagged
                  || two of w[3..1] flagged && w[0] not flagged )
```

The fourth byte `w[0]` is what pins down the alignment. With two of three
flagged, the delimiter is taken to end at `w[1]` only if the next byte is
ordinary data. After an event, the two delimiter bytes still in the window are
marked. This blocks the next two clocks, so the same delimiter cannot be
reported again. Two delimiters sent back to back are each recognised once.

Example, with `D` a delimiter byte and `x` a corrupted one:

```
stream     p D D D n      p x D D n      p D x D n      p D D x n
accepted     D D D          x D D          D x D        p D D      (one byte early)
```

A damaged *last* byte cannot be told apart from a damaged *first* byte
within four bytes. The delimiter is then accepted one byte early. The byte
before it is lost, and the corrupted byte goes through as data. This is the
one error case the window does not absorb.

Bytes leave the window at `w[3]`. Those belonging to an accepted delimiter
have `act` cleared, so delimiters are removed before data reaches later
units. `dlm_detect3` then finds the kind with a 2-of-3 vote on the three
codes. A triple with no majority is reported as `DLM_BAD`, which raises an
alarm. Its result is registered one clock after `evt`, and the data stream is
delayed by the same register. Delimiter reports and data therefore leave in
bus order.

Latency: a delimiter is reported (`dlm_valid`) 3 clocks after its last byte
arrives on the MAU bus. This is two clocks to fill the window plus the result
register. The byte that follows the delimiter appears 3 clocks after that,
so the kind is always known before that byte has to be steered.

## Following the frame: access right detection

`access_right_detect` sees the sense-channel delimiters and the TL time-outs.
It keeps two positions:

* **circuit position**: set to 0 by SF. Each EA or TL adds one, up to N.
  At N, RB is due.
* **packet position**: set to 0 by SR. Each EA or TL in the packet region adds
  one, up to N. At N, SR is due. The position is *not* reset by SF, so a round
  cut off by the end of a frame resumes with the same node after the next RB.
  After reset it is N, so the first packet region opens with SR.

The node has its turn when the position of the current region equals
`node_id`. The rising edge of that condition is the grant pulse for the write
channel.

A frame timer restarts at each SF. Once it reaches `FRAME_BYTES` (90000 byte
times = 5 ms), no new packet turn is granted and SF becomes due. The packet
already being sent is finished first, so a frame can run over by at most one
packet.

`tl_counter` counts silent byte times on the sense bus. Any byte or
delimiter restarts it. After `TL_BYTES` it pulses once and starts again, so a
long silence skips one absent node per time-out. TL must be longer than the
bus round trip plus the 5-clock receive pipeline. Otherwise a node's own SC
would not come back before the next node's time-out.

## Sending: the write channel

`dlm_gen` sequences one turn:

```
circuit turn:   SC c c .. c  SC c .. c  EA          (while the stream source has channels)
packet turn:    SC p p .. p  SC p .. p  EA          (while packets wait and the round manager allows)
frame manager:  SF | RB | SR                        (when due and the sensed bus is idle)
```

The first SC byte is chosen in the clock of the grant. `pkt_bus_mux`
registers it, so it is on `wc_tx` one clock later. No idle byte is inserted
between data, SC and EA.

`pkt_round_mgr` caps the number of packets per turn at `MAX_PKTS`. It also
stops further packets once the frame has expired.

After sending SF, RB or SR, the frame manager waits until the sense channel
reports a delimiter (its own, returning over the bus) or `ECHO_MAX` clocks
pass. Without this wait it would send the same frame delimiter twice.

`wc_bus_splitter` gives the byte request only to the selected source, stream
or packet. If a source goes empty inside a channel or packet, the unit ends
there and raises an underrun alarm.

## Receiving: splitting and address filtering

`rc_bus_splitter` follows the region from SF and RB:

* An SC opens a channel or packet. Any other delimiter closes it.
* Bytes of a circuit channel go to the stream outputs, with `st_rx_soc` on the
  first byte of each channel. The host picks the channels it wants.
* Packet bytes go to `pkt_addr_detect`. It compares the first `ADDR_BYTES`
  (6) bytes, the destination MAC address, most significant byte first, with
  `node_addr`. On a match it passes the rest of the packet, with the address
  removed (`pk_rx_sop` marks the first byte and `pk_rx_end` follows the last).
  Otherwise the packet is dropped.

## Alarms

`alarm_gen` keeps a sticky status bit per condition. Management clears a bit
by writing 1 to it. The unit also has an interrupt mask and an 8-bit
saturating event counter. The bits (see `acm_pkg`) are:

| bit | condition |
|---|---|
| 0 | sense channel saw a delimiter with no valid code |
| 1 | the same on the read channel |
| 2 | RB outside the circuit region, or SR outside the packet region |
| 3 | a TL time-out while RB or SR was due, so the frame manager is silent |
| 4 | no SF for `FRAME_BYTES + FRAME_SLACK` byte times |
| 5 | a write source ran dry inside a channel or packet |

## Top-level interface (`acm_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | byte clock; asynchronous active-low reset |
| `node_id` | in | physical position on the bus, 0 = most upstream |
| `node_addr[47:0]` | in | this node's MAC address |
| `frame_master` | in | this node sends SF/RB/SR (set on exactly one node) |
| `rc_rx`, `sc_rx` | in | read and sense buses from the MAU (`mau_byte_t`) |
| `wc_tx` | out | write bus to the MAU |
| `st_rx_valid/data/soc` | out | received circuit bytes, start-of-channel marked |
| `st_tx_valid/data/last`, `st_tx_ready` | in/out | stream source; `last` ends a channel; keep `valid` high inside a channel |
| `pk_rx_valid/data/sop/end` | out | received packets for this node, address removed |
| `pk_tx_valid/data/last`, `pk_tx_ready` | in/out | packet source; each packet starts with the 6-byte destination address |
| `alarm_clear/mask/status/count/irq` | in/out | management alarm register |
| `frame_region`, `circ_pos`, `pkt_pos`, `wc_busy` | out | frame state, for monitoring |

A source should have its data ready when its region starts. A circuit turn
that finds the stream source empty at the grant stays silent, and the turn
passes by TL.

## Parameters

| parameter | default | origin |
|---|---|---|
| `FRAME_BYTES` | 90000 | 5 ms frame at 18 Mbyte/s, both from the protocol definition |
| `N_NODES` | 8 | design choice (the protocol has a maximum node count N but the value is open) |
| `TL_BYTES` | 32 | design choice |
| `MAX_PKTS` | 4 | design choice (packets per turn) |
| `ADDR_BYTES` | 6 | design choice (MAC destination address) |
| `FRAME_SLACK` | 4096 | design choice (frame-lost alarm margin) |
| `ECHO_MAX` (`dlm_gen`) | 64 | design choice |

## What follows the protocol and what is this design's own

These follow the protocol:

* the block structure;
* the three channels;
* 3-byte delimiters with 2-of-3 majority, found with a 4-byte event window and
  a 3-byte kind window;
* round-robin turns counted by EA and TL;
* one circuit turn per node per frame;
* packet rounds that resume across frames, with SR;
* a per-turn packet limit;
* the address filter that strips the address;
* alarms to management;
* the 5 ms / 18 Mbyte/s figures.

These are this design's own choices:

* the per-byte `dlm` flag from the MAU and the byte codes;
* the lock-out and the one-byte-early case above;
* all handshakes, marker signals and latencies;
* the numeric values marked as design choices above;
* refusing new packet turns in an expired frame;
* the echo wait of the frame manager;
* the list of alarm conditions and the register form.

The 6-byte address reads the "9-byte window" of the original description as
3 SC bytes plus 6 address bytes.

Known limits:

* All nodes are assumed to hear the bus with the same delay, for example on a
  folded bus, so their frame timers agree. Timer skew between nodes, and the
  risk that a late node starts a packet turn while the manager sends SF, is
  not handled.
* Only the frame manager sends SF, RB and SR. Nothing hands that role over
  automatically if the manager fails; this is reported through alarms 3 and 4.
* The circuit region is not length-limited. A host that keeps
  `st_tx_valid` high for ever keeps its turn.

## Verification

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M` and has a watchdog. `tb_acm_top` runs
with all parameters at their defaults:

* four ACMs sit at positions 0..3 of an 8-position network; positions 4..7
  are empty, so their turns pass by TL;
* a bus model merges the write channels, counts collisions, and feeds the
  result back to every node after 4 clocks;
* each node has stream channels every frame and an endless packet backlog to
  random destinations, including an address nobody owns;
* the test runs three full 5 ms frames (about 270 000 clocks, a few seconds).

It checks:

* every circuit byte reaches every node in order;
* every node receives exactly its own packets;
* there are no collisions;
* frames are at least 90000 byte times apart;
* a delimiter is reported exactly 3 clocks after its last byte;
* the first SC leaves one clock after each grant;
* no turn carries more than `MAX_PKTS` packets;
* a delimiter with a corrupted byte is still accepted;
* an unknown delimiter raises exactly the two delimiter alarms.

It also counts that each mechanism occurred: SF, RB, SR, SC, EA, TL, packet
limit, round resumed after RB, and address drop.

`tb_wc_two_packets` is a second full-design test, also at default
parameters. It follows one node through a single packet turn with two
packets:

* the node is the frame manager at position 0 of an otherwise empty bus;
* the test checks the exact byte sequence the node sends:
  SF, a silent circuit turn with 8 TL time-outs, RB, SR,
  SC + packet, SC + packet, EA;
* it checks that the first byte leaves one clock after the grant;
* it checks that the node's sense channel recognises each delimiter once.

Run any testbench with plain Verilator, for example:

```
verilator --binary --timing --assert rtl/acm_pkg.sv $(ls rtl/*.sv | grep -v acm_pkg) \
          tb/tb_acm_top.sv --top-module tb_acm_top -Mdir obj && obj/Vtb_acm_top
```

The package must come first. For a unit
test, give the package, the unit and its testbench, e.g.
`rtl/acm_pkg.sv rtl/dlm_event_detect.sv tb/tb_dlm_event_detect.sv`.

## Files

`rtl/acm_pkg.sv` holds the shared types, delimiter codes and alarm bits.
Each unit is in `rtl/<unit>.sv`, and `rtl/acm_top.sv` wires one node. The
testbenches are in `tb/`.
