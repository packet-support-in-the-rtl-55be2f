# Packet network of the Texas Reconfigurable Array Computer (TRAC)

TRAC joins its processors to its memory modules through a banyan of switch
nodes that normally acts as a set of reconfigurable buses.  This RTL adds the
packet support that lets processors send each other short messages over the
same network without disturbing bus traffic: packets move only in the clock
phases in which the data buses are idle, one byte per node per machine cycle,
pulled upward from the memory side to the processor side.

A packet is seven bytes: a *direction byte* (the destination processor
number) followed by six data bytes.  There are two independent channels:

* **mapping** (local) packets, used by processors of one task that run in
  lockstep to exchange data;
* **interrupting** (global) packets, used between tasks and the operating
  system; their arrival is signalled as a non-maskable interrupt.

The two channels share every wire but use different clock phases, so they
never block each other.

## Building blocks

| module | role |
|---|---|
| `trac_pkg` | constants (phase numbers, packet length), `byte_t`, `chan_e` |
| `trac_phase_gen` | numbers the clock phases of a machine cycle |
| `trac_backplane` | NEG / DIR / END synchronisation pattern for every level |
| `trac_pkt_tx` | packet buffer/transmitter at each memory module (7-byte FIFO) |
| `trac_pkt_switch` | packet switching circuit of one switch node |
| `trac_pkt_rx` | packet buffer/receiver at each processor (two 7-byte buffers) |
| `trac_packet_net` | top: the whole network, all of the above wired together |

## Clocking and phases

`clk` has one rising edge per *phase*; six phases make one machine cycle
(`NUM_PHASES`).  The packet logic uses four of them:

| phase | mapping channel | interrupting channel |
|---|---|---|
| 0 | byte moves one level up over the link data bus | |
| 1 | | byte moves one level up |
| 3 | request / grant (PR / PG) arbitration | |
| 4 | | request / grant arbitration |

A grant decided in phase 3 (4) of cycle *n* moves the byte in phase 0 (1) of
cycle *n*+1.  The transmitter takes a byte from the memory side at the end of
phase 4; the processor may strobe a read in any phase except 0 and 1.
`rst` is synchronous and active high.

## How packet trains move: the NEG / DIR / END wave

This is the central mechanism and the least obvious part of the design.

Every switch level receives three backplane signals.  Seen from one level,
they follow an 8-cycle pattern: one cycle **NEG**, one cycle **DIR**, five
blank cycles, one cycle **END**.  Each level runs one cycle behind the level
below, so the pattern climbs the network one level per cycle — at the same
speed as the packets.

```
cycle         0    1    2    3    4    5    6    7    8
level 3       -    -    -   END  NEG  DIR   -    -    -
level 2       -    -   END  NEG  DIR   -    -    -    -
level 1       -   END  NEG  DIR   -    -    -    -    -
level 0      END  NEG  DIR   -    -    -    -    -   END
```

A packet in motion therefore occupies seven consecutive nodes that ride the
wave: its direction byte sits in the node in DIR, its last byte in the node in
END, and the node in NEG just above the direction byte is the empty slot it
moves into next.  The rules each node applies in the arbitration phase are:

1. A node holding a byte raises PR on the upper link its train uses.  The
   byte that enters a node while its level is in DIR is always a direction
   byte.  Bit `LEVELS-1-k` of it (level *k*) picks left (0) or right (1), and
   the node keeps that choice for the rest of the train.  The choice is
   latched when the byte enters, not re-read on later DIR cycles.  This
   matters for a stalled train: it falls out of step with the wave, and its
   data bytes then sit in DIR nodes.
2. An **empty node in NEG** grants one requesting lower link — fixed priority
   A, then B, then C — and remembers which one.
3. A **full node that itself received PG** from above and is **not in END**
   grants the link its train comes from.
4. A node in END never grants: its byte is the train's last.

Grants therefore start at the head of a train and ripple combinationally down
through every node holding one of its bytes, stopping at the tail; in the next
data phase the whole train shifts up one node.  A head that gets no grant
leaves its whole train standing.  Because the wave comes back to the same
place eight cycles later, a blocked train tries again exactly 8 cycles later,
and trains are always separated by one empty slot.

Consequences, all checked in simulation:

* first byte at the receiver 5 cycles after the transmitter is first offered
  to the network (4 switch levels + the receiver), last byte 6 cycles after
  the first;
* one packet per 8 cycles from a single source: 6 data bytes per 8 cycles,
  0.75 byte per cycle;
* each blockage costs exactly 8 cycles;
* two packets from the same memory to the same processor arrive in order;
  packets from different sources may not;
* a receiver with packets queued behind it takes exactly one packet per
  8 cycles.  In the data-collection test, 16 packets enter one processor in
  120 cycles.

**Collisions.** Two heads arriving at one empty node in the same cycle
(*head-to-head*): the higher-priority input wins and the other waits 8
cycles; with three, they pass in priority order, 0, 8 and 16 cycles late.
A head that meets a node holding a byte of another train (*head-to-body*)
gets no grant, because rule 3 only serves the held train's own input; it
proceeds after that train has cleared the node.

## Topology

For `LEVELS` routing levels (default 4) there are `2**LEVELS` processors and
`3**LEVELS` memory modules (16 and 81).  Level *k* has `2**k * 3**(LEVELS-k)`
nodes, numbered `u * 3**(LEVELS-k) + v`, where `u` holds the routing bits
already taken.  Output *d* of node (*u*, *v*) feeds input `v % 3` of node
(`2u+d`, `v / 3`) one level up.  The receivers form level `LEVELS`; receiver
*u* belongs to processor *u*.  Each memory module has its own level-0 node,
and the transmitter feeds that node's input A.  The left/right decisions that
lead to processor *p* are the bits of *p*, most significant first, whichever
memory the packet starts from.  The path from a given memory to a given
processor is unique.  Fail-soft operation comes from sending through another
memory module of the same processor, not from alternative paths.

The spread-3 / fan-out-2 structure, the routing rule and the dedicated
level-0 node per memory module follow the original design.  The exact link
permutation is this implementation's choice.  So is the default of four
levels, which gives the five-hop latency of the original timing example; the
size of the real machine is not known.  `LEVELS` may be 1 to 8 (the direction
byte has eight bits).

## Transmitter (`trac_pkt_tx`)

A 7-byte FIFO.  Memory-side signals:

* `mpg`, `apg`: allow the buffer to send mapping or interrupting packets.
* `impsel`: the type of the packet being loaded (1 = mapping, 0 =
  interrupting).  A load of a type whose flag is off is ignored.  The first
  byte loaded into an empty buffer fixes the type.
* `load`, `din`: with `load` high, `din` is written at the end of phase 4.
* `pqen`: makes `qout[7]` read 1 while the buffer holds anything.

To send, a processor waits until the query bit reads 0.  It then loads the
seven bytes in seven consecutive cycles.  Sending starts as soon as the first
byte is in: `mpxm` / `ipxm` stay high while bytes remain, and a grant
(`gm` in phase 3, `gi` in phase 4) sends the head byte in the next data
phase.  With no blocking, the buffer empties as fast as it is filled, and the
next packet can follow straight away.  Loads into a full buffer are dropped.

## Receiver (`trac_pkt_rx`)

Two 7-byte buffers, one per channel.  Towards the network the receiver acts
like one more switch level.  An empty buffer takes a direction byte only while
its level is in NEG; the winner among PRA, PRB and PRC is chosen by fixed
priority.  The buffer then takes the rest of the train from that link until
seven bytes are in.

Processor side:

* `mpa` / `ipa` rise with the first byte and stay high until the buffer is
  released.
* A pulse on `smp` (`sip`) selects the mapping (interrupting) buffer.  Only
  one buffer can be selected at a time.
* Each `rp` pulse outside phases 0 and 1 steps to the next byte.  `dout`
  shows the current byte, and `rd_ready` says it has arrived, so reading can
  overlap filling.
* After all seven bytes are read, a second `smp` (`sip`) releases the buffer.

With `broken` set (a dead processor), each complete packet is dropped at once,
so packets to it never back up into the network.

## Where this RTL departs from or adds to the original description

* **Dead byte.** The original receiver counts eight transfers and eight reads
  per packet, the last a "dead byte", but elsewhere the receive buffer holds
  seven bytes.  Here the dead byte is the empty slot behind each train; seven
  bytes are stored and read.
* **Receiver NEG condition.** The receiver waits for NEG before taking a
  direction byte.  Without this, a train released from a full receiver at the
  wrong moment would lose its alignment with the wave.
* **Transmitter request timing.** The original raises the transmitter request
  in phase 0.  Here the request is a level, and the grant is sampled in the
  same arbitration phase the switches use.
* **Open details chosen here:**
  * six phases per cycle;
  * input priority A > B > C;
  * the order in which the processor-number bits are used;
  * `rd_ready`;
  * the reset behaviour;
  * a single byte register per channel in each node.  The original latches
    the byte into a left and a right copy, which has the same function.
* **Not included.** The processors and memory modules, the master clock, and
  the software rules (for example, only one mapping-source memory per
  processor) are not included.  Their signals are ports of
  `trac_packet_net`.

## Verification

Each module has a self-checking testbench in `tb/`.  Each one prints
`TB_RESULT checks=N failures=M` at the end.

| testbench | what it checks |
|---|---|
| `tb_trac_phase_gen` | phase order, wrap, `cycle_end` |
| `tb_trac_backplane` | every level against the table above for 24 cycles |
| `tb_trac_pkt_switch` | one node, phase by phase: priority, DIR routing, grant ripple, END cut-off, blocking, both channels |
| `tb_trac_pkt_tx` | overlapped load/send against a reference FIFO, withheld grants, overflow, query bit, type flags, interrupting phases |
| `tb_trac_pkt_rx` | NEG condition, priority, both buffers filling together, reading and releasing, RP phase restriction, broke bit |
| `tb_trac_packet_net` | whole network at its default size; see below |
| `tb_trac_workload_map` | permutation, data collection and mixed traffic from all 16 processors |
| `tb_trac_route_all` | every memory to every processor, under full load, at 4 and at 2 levels |

`tb_trac_packet_net` runs the full 81-memory, 16-processor network.  It sends
17 packets in these scenarios:

* unblocked mapping and interrupting packets;
* a head-to-head collision;
* a three-way collision;
* a simultaneous mapping and interrupting packet to one processor;
* three back-to-back packets from one memory;
* a head-to-body stall behind a train waiting at a receiver that is not
  released;
* packets to a broken processor.

It checks every byte, and checks each arrival time against `5 + 8 × blockages`
cycles.  It fails if any scenario never occurs.

`tb_trac_workload_map` runs heavier traffic on the same network.  Each of the
16 processors sends at once in three rounds:

* a permutation;
* a data collection, all 16 into processor 0;
* a second permutation overlapped with 16 interrupting packets to one
  processor.

It checks all 64 packets and their arrival times.  It also checks that the
collecting receiver stays saturated.

`tb_trac_route_all` checks the routing rule for every source.  All memory
modules stream at once, each sending one packet to every processor.  The
test runs on the default network (81 × 16 = 1296 packets) and on a
2-level network (9 × 4 = 36 packets) in the same simulation.  Each packet
must reach the processor its direction byte names, with all bytes intact.
Its first byte must arrive `(LEVELS + 1) + 8k` cycles after it was first
offered.  At the default size about a third of the packets are blocked at
least once, and all 1296 arrive within about 1200 cycles.

Simulating with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/trac_pkg.sv \
          tb/tb_trac_packet_net.sv --top-module tb_trac_packet_net
./obj_dir/Vtb_trac_packet_net
```

The same command works for the other testbenches; name `trac_pkg.sv` first.
The full network takes about a minute to compile and well under a second to
simulate.  Assertions in the switch, transmitter and receiver check the
handshake rules: a grant goes only to a requesting link and to at most one;
a node never accepts a byte while its own byte cannot leave.

## Changing the design

* `LEVELS` on `trac_packet_net` sets the network size.  `LEVELS = 2` gives 4
  processors and 9 memory modules, the size of the small routing example in
  the original description.
* `NUM_PHASES` may be 5 to 8.  Phases 0, 1, 3 and 4 keep their roles.
* `DEPTH` on the buffers is tied to the 7-byte packet.  The NEG / DIR / END
  pattern assumes seven bytes plus one empty slot per 8 cycles.  A different
  packet length also needs a different pattern period in `trac_backplane`.
