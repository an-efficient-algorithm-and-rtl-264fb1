# Speculative-admission receive path for a multiprocessor NIC

A network interface card stores incoming packets in one shared memory,
divided into one FIFO queue per application, until the host processors
take them out. When the memory is shared, one busy application can fill
it and starve the others. An admission rule therefore decides, for every
packet, whether it may enter its queue. That decision is the slowest step
of the receive path.

This design speeds up the receive path in three ways:

* **Admission rule that remembers history.** The History Based Dynamic
  Algorithm (HBDA) is a dynamic-threshold rule. It gives an application
  that has just lost packets a larger threshold.
* **Two control units that speculate.** The decision for the next packet
  starts before the decision for the current one is known. The second unit
  assumes the first packet will be accepted. Almost all packets are
  accepted, so the guess is almost always right, and the design decides up
  to two packets per decision time.
* **Host side built for several processors.**
  * The buffer has one output port per host processor, and packets leave
    through all ports in the same cycle.
  * One interrupt covers a group of stored packets.
  * A small side buffer keeps rejected packets of one highest-priority
    application, so they are not lost.

Everything is synthesizable SystemVerilog in `rtl/`. Every block has a
self-checking testbench in `tb/`.

```
               +--------------+   p1,p2   +----------------------------+
 in_pkt ------>| input_buffer |---------->| control_unit               |
 in_valid      | (FIFO, peek4)|<-- pop ---|  hbda_engine x2 (CU1, CU2) |
 in_ready <----+--------------+           |  committed Q_i, Q, history |
                                          +----------------------------+
                                 accept ->|write       |reject, app==PRIO
                                          |            v
                                          |   +--------------------+
                                          |   |priority_controller |
                                          |   |  priority_buffer   |
                                          |   +--------------------+
                                          |      | WritetoBuffer (mv_req/grant/DONE)
                                          v      v
                                 +--------------------------+
                                 | packet_buffer            |==> port 0 (host processor 1)
                                 | M slots, N_APPS queues   |==> port 1 (host processor 2)
                                 +--------------------------+
                                          | stored
                                    irq_coalescer --> irq / irq_ack
```

## The admission rule (HBDA)

The rule uses these quantities:

* `M` is the buffer size in packets.
* `Q` is the number of packets stored over all queues.
* `Q_i` is the length of the queue of the packet's application `i`.
* `psize_i` is the packet size of application `i`, in 32-byte units.

Two thresholds are computed for the packet:

```
T  = (alpha / psize_i) * (M - Q)
T' = T + H1_i * M/a + H2_i * M/b          (a = 2, b = 4)
```

`H1_i` is 1 if the last packet of application `i` was rejected. `H2_i` is
the same bit for the packet before that. The packet is handled as follows:

1. If `Q_i < T`, the packet is accepted.
2. If not, and one of the last two packets of `i` was rejected, it is
   accepted when `Q_i < T'`.
3. Otherwise it is rejected.

Every decided packet shifts its own outcome into its application's two
history bits, with 1 meaning rejected.

The second threshold makes a short burst of rejections self-limiting. An
application that has just lost a packet gets extra room of up to 3M/4 for
its next two packets. An application that keeps being accepted is held
to the plain dynamic threshold.

`hbda_decide` is the combinational datapath:

* `alpha/psize_i` is a per-application constant with 8 fraction bits,
  worked out at elaboration from the `PSIZE` parameter.
* The rest is one multiply by `(M - Q)`, two constant adds and two
  compares.
* For power-of-two packet sizes the constant is exact. For other sizes it
  is truncated, so for example 64/46 becomes 356/256.

One rule is added to the algorithm. A packet is also refused when
`Q >= M`, because `T'` can be larger than the free space.

The defaults are:

| Setting | Default | Override |
|---|---|---|
| Packet sizes | average traffic mix, `nic_pkg::PSIZE_AVG` = {8,2,8,1,4,16} | `PSIZE_HEAVY` = {4,2,4,1,8,16}; `PSIZE_ACTUAL` = {1,1,1,2,16,46} |
| `ALPHA` | 128 | 64 is the value for the actual mix |

## Two speculating control units

This is the central idea of the design and the least obvious part.
`control_unit` holds:

* two HBDA engines (`hbda_engine`), called CU1 and CU2 below;
* a full copy of the variables for each engine: `Q_i` for every
  application, `Q`, and the history bits;
* the committed copy, which is CU1's.

### One pair of packets

An engine takes 2 cycles:

* In cycle c it takes a snapshot of the packet and its variables.
* In cycle c+1 it evaluates the rule.
* In cycle c+2 the decision is visible. A new start is allowed in that
  same cycle.

In cycle c, CU1 starts on p1, the oldest packet in the input buffer, using
its own variables. CU2 starts on p2 in the same cycle. CU2 uses the
variables CU1 will have *if p1 is accepted*: `Q_p1 + 1`, `Q + 1`, and p1's
history with a 0 shifted in. Those variables are formed combinationally
from CU1's, so CU2 needs no extra cycle. In cycle c+2 both decisions are
known, and the pair is resolved by p1's outcome.

**p1 accepted.** CU2's guess was right, so p2's decision stands.

* p1 is written to the packet buffer in this cycle and p2, if accepted,
  in the next. The buffer has a single write port.
* CU2's variables, with p2's outcome applied, become the variables of
  both units.
* Both packets are popped from the input buffer. The next pair, p3 and
  p4, starts in this same cycle.
* The unit decides 2 packets every 2 cycles.

**p1 rejected.** CU2 computed p2 against a buffer that contains p1, which
is wrong, so its result is thrown away (a flush).

* CU1 applies p1's rejection to its variables and copies them to CU2.
* Only p1 is popped.
* In the same cycle CU1 starts again on p2, and CU2 starts on p3,
  assuming p2 is accepted.
* That cycle decided only one packet.

A rejected packet whose application is the priority application is offered
to the priority controller. Any other rejected packet is reported on
`drop_valid` / `drop_app`.

### Why the speculation is safe

Speculation never changes a decision: every packet is decided exactly as
if the packets had been decided one after another.

* p2's decision is kept only when p1 was accepted. In that case CU2's
  variables at the start were exactly CU1's after p1.
* Dequeues that happen while the pair is being decided are subtracted
  from both copies in the cycle they happen. A decision uses its start
  snapshot, just as a sequential unit would.

`tb_control_unit` checks this equivalence against a one-packet-at-a-time
HBDA model, decision by decision and in input order.

* The check covers bursts, flushes, and priority moves requested in the
  middle of a burst.
* That bench dequeues only while the unit is idle. Dequeues that
  overlap a decision are covered only by the end-to-end benches, which
  check that packets are conserved and that the counters agree.

### Timing at a glance

```
cycle        c        c+1       c+2                 c+3
CU1          start p1 eval      done p1 / start p3  eval
CU2          start p2 eval      done p2 / start p4  eval
write port                      p1 (if accepted)    p2 (if accepted)
```

If the input buffer holds only one packet, CU1 runs alone. With no
rejections, a stream of packets is decided at one packet per cycle on
average. Each flush costs one packet slot.

### Priority moves

A priority move writes into the packet buffer. It would change the
variables under a pair in flight, so it is serialised with the pairs:

1. The priority controller raises `mv_req`.
2. The control unit stops starting new pairs and lets the pair in flight
   finish.
3. When no pair is in flight and its own write port is free, it raises
   `mv_grant` for one cycle. In that cycle the priority controller writes
   one packet. The control unit adds the packet to `Q_i`, `Q` and both
   copies of the variables.
4. In the next cycle it answers `mv_done`, the DONE reply. Only then may
   the priority controller ask again.

## Highest-priority packets

Packets of one application (`PRIO_APP`, default 2) are not dropped when
the control unit rejects them.

`priority_controller` places such a packet in `priority_buffer`, a small
FIFO of `PB_DEPTH` entries (default 8), if the FIFO has space. Otherwise
the packet is lost.

* Either way, the history bits record that the control unit rejected the
  packet.
* The controller replies in the same cycle with `pr_taken`, so the
  control unit knows whether to report a drop.

The controller watches the committed variables and evaluates the HBDA
rule for the priority application on them. When the rule would admit
another packet of that application and the FIFO is not empty, it asks
for a move with the handshake above. In the grant cycle `WritetoBuffer`
(`write_to_buffer`) is high and the FIFO head goes into the priority
queue of the packet buffer. Because a move is only made when the rule
would admit the packet, a saved packet never gets more room than a
packet arriving at that moment would get.

## Shared packet buffer and output ports

`packet_buffer` holds `BUF_PKTS` packet slots (default 600) that all
applications share.

* Each queue is a linked list through the slots. Each queue keeps a head,
  a tail and a length, and each slot keeps a next pointer.
* Free slots come first from a counter of slots that have never been
  used, and after that from a circular free list.

Writes and reads:

* One packet is written per cycle.
* Each of the `N_PORTS` output ports (default 2, one per host processor)
  can take the head of any queue in the same cycle.
* A request is answered combinationally (`deq_ok`, `deq_pkt`), and the
  packet leaves at the clock edge.
* If several ports ask for the same queue, they receive consecutive
  packets, lowest port first, as long as the queue has enough.
* The free list takes back up to `N_PORTS` slots per cycle.

Overflow is prevented by the control unit, never by the buffer:

* Every write has passed the `Q < M` test against the committed count.
* A priority move is granted only when the rule admits the packet.
* Writing into a full buffer is an assertion failure.

## Interrupts

`irq_coalescer` raises `irq` when a packet is stored and no interrupt is
pending. `irq` stays high until `irq_ack`, so every packet stored in the
meantime is covered by the same interrupt. The host processors then drain
several packets per interrupt through the parallel ports. A packet stored
in the acknowledge cycle raises the next interrupt.

## Top-level interface (`nic_top`)

There is one clock, `clk`. `rst_n` is an asynchronous, active-low reset,
and after it every queue and counter is empty.

| Signal | Direction | Meaning |
|---|---|---|
| `in_valid`, `in_pkt`, `in_ready` | in, in, out | Packet input, at most one per cycle. `pkt_t` = {3-bit application, 32-bit payload tag}. A packet is taken when `in_valid && in_ready`. |
| `deq_req[p]`, `deq_app[p]` | in | Host processor `p` asks for the head of queue `deq_app[p]`. |
| `deq_ok[p]`, `deq_pkt[p]` | out | Answer in the same cycle. The packet is removed at the edge. |
| `qlen[i]`, `buf_full`, `prio_count` | out | Stored packets per queue, full buffer, packets waiting in the priority FIFO. |
| `irq`, `irq_ack` | out, in | Host interrupt, level, held until acknowledged. |
| `drop_valid`, `drop_app` | out | One pulse per lost packet. |
| `stats` | out | `nic_stats_t` counters: packets decided, accepted, dropped, flushes, pairs, accepted through `T'`, priority moves, priority saves and losses, interrupts, stored packets. |

Parameters of `nic_top`, with their defaults:

| Parameter | Default | Meaning |
|---|---|---|
| `N_APPS` | 6 | applications (queues) |
| `BUF_PKTS` | 600 | M, buffer size in packets |
| `ALPHA` | 128 | HBDA alpha |
| `HIST_A`, `HIST_B` | 2, 4 | history weights M/a, M/b |
| `PSIZE` | {8,2,8,1,4,16} | packet size per application, 32-byte units |
| `PRIO_APP` | 2 | highest-priority application |
| `N_PORTS` | 2 | output ports |
| `IB_DEPTH` | 16 | input FIFO depth |
| `PB_DEPTH` | 8 | priority FIFO depth |

`BUF_PKTS` may be changed freely; for example, 800 packets works. The
counter widths follow `$clog2(BUF_PKTS+1)`.

## How closely this follows the original architecture, and where it departs

These parts follow the architecture:

* the HBDA formulas and decision order;
* a = 2, b = 4, alpha = 128;
* six applications and a 600-packet buffer;
* the three packet-size tables;
* the two-unit speculation with its commit and flush-and-reprocess rules;
* the priority buffer, with place, reject, WritetoBuffer and the DONE
  reply;
* one interrupt for several packets;
* a shared buffer that several host processors read in the same cycle.

These are this design's own choices:

* **Cycle timing.** The original gives no cycle counts. The 2-cycle
  decision, writing p2 one cycle after p1, and the stall-and-grant
  protocol for priority moves are this design's.
* **What CU2 passes back when p2 is rejected.** When p1 is accepted and
  p2 rejected, CU2's variables still become the committed ones, with p2's
  rejection applied. The prose of the original only describes the case
  where both packets are accepted.
* **The `Q >= M` guard** in the admission rule.
* **Priority packets in the history.** A priority packet saved in the
  priority FIFO still counts as rejected in its history.
* **Enough space for a move.** "Enough space in the packet buffer" for a
  move is read as "the HBDA rule admits the packet".
* **Packet contents.** Packets carry only an application number and a
  tag. Payload bytes are not stored, because the buffer is sized in
  packets.
* **Memory organisation and port behaviour.** The linked-list memory, the
  free list, and the rule that any port may read any queue are this
  design's. The original's drawing shows processor 1 reading one queue
  and processor 2 another.
* **Sizes and protocols with no given value.** The input FIFO depth (16),
  priority FIFO depth (8), input back-pressure and the interrupt
  acknowledge protocol.
* **Single clock edge.** All storage is clocked on the rising edge.
* **Fixed-point thresholds.** `alpha/psize` is held in fixed point with
  8 fraction bits.

Outside the design:

* the host processors and the MAC/PHY that delivers packets;
* the traffic generator;
* the baseline algorithms (static threshold, plain dynamic threshold,
  DADT) used only for comparison.
* clearing the history bits of an application that has been idle for a
  long time. That refinement was only proposed, never specified.

## Verification

Every block has a self-checking testbench. Each one compares against an
independent model, has a watchdog, and ends with a `TB_RESULT` line:

| Testbench | What it checks |
|---|---|
| `tb_hbda_decide` | Hand-worked corner cases and random inputs, compared against the formulas in integer arithmetic. |
| `tb_hbda_engine` | Decisions and the exact 2-cycle latency. |
| `tb_input_buffer`, `tb_priority_buffer` | Against queue models, including full and empty. |
| `tb_packet_buffer` | Against per-queue models with random writes and double dequeues from the same queue. |
| `tb_priority_controller` | Place or reject, the move condition, and the mv_req/grant/DONE handshake. |
| `tb_control_unit` | Every decision, in input order, against a sequential HBDA model. It also checks that pairs, flushes, history acceptances and moves all occur, and that the first burst into an empty buffer is decided at two packets per two cycles. |
| `tb_irq_coalescer` | Interrupt count against a model. |
| `tb_nic_top` | The whole design at default parameters, described below. |
| `tb_workloads` | Packet loss over traffic mixes, loads, buffer sizes, alpha and (a,b), described below (helper: `nic_load_harness`). |

`tb_nic_top` runs about 30,000 cycles:

* **Traffic.** Bursty traffic (mean burst of 10 packets) and two host
  processors that pause in the middle of the run, so the buffer fills.
* **Scoreboard.** Every sent packet is either dequeued exactly once from
  the right queue or reported as dropped. Queues other than the priority
  queue keep their order.
* **Counters.** The counters must agree with the scoreboard.
* **Mechanisms.** Each of these must occur at least once: speculation
  pairs, flushes, accepts through `T'`, priority save, move and loss, a
  full buffer, input back-pressure, and two packets leaving in one cycle.
  Interrupts must cover several packets each.

A typical run sends about 20,600 packets and drops about 11 %.

`tb_workloads` runs fourteen configurations side by side:

* the three traffic mixes, with a 600-packet buffer;
* the average mix with 500-, 700- and 800-packet buffers;
* the average mix with alpha = 16, 32, 64 and 256;
* the average mix with history weights (a,b) = (2,2), (2,8), (4,4) and
  (4,8).

Each configuration runs for 40,000 cycles at each of the loads 0.5 to 0.9.
The traffic is bursty uniform: bursts of mean 10 packets, each burst for
one application, with idle gaps that set the load. The two host processors
together take about 10 packets per 14 cycles. Every packet is scoreboarded,
as in `tb_nic_top`. The bench prints the loss ratio of each point.

With this dequeue model:

* No packets are lost up to load 0.7, because the hosts drain faster than
  packets arrive.
* Loss rises to about 5-9 % at 0.8 and 8-14 % at 0.9. The actual mix
  loses the most.
* Larger buffers lose less.
* The priority application loses well under 1 % of its packets at the
  default settings.
* Between the alpha settings and between the (a,b) settings, loss varies
  by about as much as one random run differs from another. This bench is
  too short to rank them.

The bench checks only the trends: loss grows with load, and the
800-packet buffer does not lose more than the 500-packet one. It does not
check absolute values, which depend on the traffic model.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal rtl/nic_pkg.sv \
    $(ls rtl/*.sv | grep -v nic_pkg) tb/tb_nic_top.sv --top-module tb_nic_top
./obj_dir/Vtb_nic_top
```

Replace the testbench and top-module names to run any other bench. All
benches finish within a few seconds.

Lint may warn about unconnected threshold outputs of `hbda_decide`. It
may also warn about reset signals used in `disable iff` of assertions.
Both warnings are expected.
