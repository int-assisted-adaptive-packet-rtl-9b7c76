# Remaining-hop-aware packet scheduling for end-to-end latency control

A packet with an end-to-end latency target crosses several switches. Each switch has
only a few FIFO queues per egress port, served by weighted round robin (WRR). So its
only real decision is *which queue* the packet goes into. This switch makes that
decision per packet, from three things:

* **What the packet has already used.** In-band network telemetry (INT) carries the
  queuing delay accumulated so far (Total Queue Time) in the packet itself.
* **How many hops are left.** The control plane knows the route, so each switch holds
  the remaining hop count of every latency-constrained flow.
* **How long each queue would take.** The switch estimates this from the queue's
  length. A queue of weight `w_i` is guaranteed at least `w_i / Σw` of the port rate.
  Its worst-case delay is therefore `Q_i · k · Σw / w_i`, where `k` is the time one
  80-byte cell takes at full port rate.

The remaining delay budget is spread evenly over the remaining hops. The packet goes
into the lowest-weight queue whose worst-case delay fits its share of the budget.
Lower-weight queues are tried first, so the fast queues stay free for packets that
need them. WRR, unlike strict priority, starves no queue. If nothing fits, the share is
doubled, and this repeats up to `ceil(log2 h)` times. After that the packet is dropped:
it could not make its deadline anyway.

The RTL implements one such switch at the level of parsed packet headers. Packet
descriptors flow through an ingress pipeline, a traffic manager with WRR queues and an
egress pipeline, in the structure of a P4 programmable-switch pipeline. Queue lengths
can only be seen in the egress pipeline, but are needed in the ingress pipeline. Probe
packets carry them across by recirculation.

## Packet paths

```
            +-------------------- ingress ---------------------+   +---------- TM ----------+   +------------ egress ------------+
 in_desc -->| merge -> route_table -> pkt_classifier -> rha_scheduler |-->| 4 ports x 3 WRR queues |-->| eg_qlen_regs write, int_module |--> out_desc
   ^        |   ^                           |    (queue or drop)  |   | + recirculation queue   |   | qlm_encoder (probes)           |
   |        |   |                           +--> ig_qlen_regs  <--+   +-------------------------+   +---------------+----------------+
   |        +---|-------------------------------------------------+                                                 |
   |            +---------------- recirculation delay line (RECIRC_LAT cycles) <-- encoded probes <----------------+
```

The classifier sorts every packet into one of four types.

| type | ingress | traffic manager | egress |
|---|---|---|---|
| latency-constrained | RHA scheduler picks a queue or drops | WRR queue of its port | queue length update, then INT |
| delay-insensitive | queue from its flow entry | WRR queue of its port | queue length update |
| probe | sent to the recirculation port | probe-only queue | QLM encoding, then recirculated |
| recirculated probe | writes the ingress queue-length registers, then consumed | — | — |

A probe carries `probe_port`, the egress port whose queues it samples. The control
plane injects probes periodically; the testbench plays that role.

## The queue decision (`rha_scheduler`)

For a constrained packet with E2E tolerable queuing delay `tau` (from its flow entry),
spent queuing time `t` (the INT Total Queue Time, or 0 at the first hop) and `h`
remaining hops:

```
T   = tau - t                     remaining budget; t > tau means expired: drop
hh  = ceil(log2 h)                (h = 0 is treated as 1)
TT  = T >> hh                     per-hop share, ≈ floor(T / h) without a divider
U_j = MathUnit_j * Q_j            worst-case delay of queue j (ns), Q_j in cells
for c = 0 .. hh:                  hh+1 rounds
    for j = q1, q2, q3:           ascending weight
        if U_j <= TT << c: choose j, stop
drop if nothing was chosen
```

`MathUnit_j = ceil(k · Σw / w_j)`. It is computed at elaboration by
`rha_pkg::math_units`. With `k = 64 ns` and weights 2, 3, 5 this gives 320, 214 and
128 ns per cell. Keeping these products in a table avoids a general multiplier in a
match-action pipeline. In this RTL the product is a plain multiply.

All rounds are unrolled, so the decision takes one clock cycle. The output also gives
the round at which the queue was found (`out_round`). A non-zero round means the
packet was placed by relaxing its share.

Worked example, as used in the testbench. A packet has 6 hops left (hh = 3), tau =
100 µs and 20 µs already spent. Then T = 80 000 ns and TT = 10 000 ns. With 40 cells
in every queue, q1 would need 12 800 ns, which does not fit. q2 needs 8 560 ns, so the
packet goes to q2 in round 0.

Why the worst case is the right test: if the worst-case delay of a queue already
exceeds the share, every queue of the port is busy. All queues then run at their
guaranteed minimum rates, and no queue can do better than its bound. So the check
never rejects a queue that would in fact have been fast enough.

## Queue lengths across the pipeline

* **Egress register set (`eg_qlen_regs`).** Every data packet leaving a queue writes
  the number of cells it left behind into the register of its (port, queue).
* **Queue length encoding (`qlm_encoder`).** A probe reads all queue registers of its
  port. Each value is then raised by a constant from a match-action table, and the
  result is written into the probe. Each table entry matches a range per queue and
  adds one constant per queue. The first valid matching entry wins, the sum saturates,
  and with no match the lengths pass unchanged. The constants make up for the growth
  of the queues while the probe recirculates. The control plane sets them: larger
  increments for longer queues.
* **Recirculation.** The encoded probe comes back to the ingress after `RECIRC_LAT`
  cycles. It has priority over new packets: `in_ready` is low in that cycle.
* **Ingress register set (`ig_qlen_regs`).** The recirculated probe's lengths replace
  the registers of its port. The RHA scheduler reads these registers for the packet's
  egress port.

All registers reset to zero, so every queue looks empty until the first probe returns.

## INT handling (`int_module`)

INT is applied only to latency-constrained TCP/UDP packets.

* **First hop.** No INT header yet (IP protocol 6 or 17). The header is created with
  Hop Count 0 and Total Queue Time 0. The protocol becomes 0xfe (TCP) or 0xff (UDP).
* **Every hop.** Hop Count is incremented by 1. The queue time of this switch is added
  to Total Queue Time (48 bits, ns). The new 64-bit INT field
  `{DeviceID[31:0], QueueTime[31:0]}` appears on `out_field`. A deparser places it
  after the fields already in the packet.
* **Last hop (remaining hops ≤ 1).** The protocol is restored and `int_valid` is
  cleared. The final Hop Count and Total Queue Time are reported on `out_report`, for
  the control plane.

The classifier maps 0xfe/0xff back to 6/17 before hashing. A flow therefore finds the
same flow entry before and after its first switch.

## Traffic manager and timing model

* **Queues.** Each of the 4 front-panel ports has 3 FIFO queues (`desc_fifo`), each
  holding up to `QDEPTH` descriptors and `QCAP_CELLS` cells. A packet that does not
  fit is tail-dropped.
* **Recirculation port.** It has one queue of its own, so probes never share a queue
  with data.
* **Port rate.** A port sends one 80-byte cell per clock cycle. One cycle therefore
  stands for 64 ns at 10 Gb/s, which is `k`.
* **WRR (`wrr_port`).** It counts packets: it stays on a queue for up to `w` packets,
  then moves to the next non-empty queue, skipping empty ones. While all queues are
  backlogged, every 10 consecutive departures hold 2, 3 and 5 packets of q1, q2 and q3.
* **Queue time.** A departing packet's queue time is (dequeue cycle − enqueue cycle) ×
  64 ns. The count starts in the enqueue cycle, so a packet that leaves at once still
  shows 64 ns.
* **Egress arbitration.** Ports whose transmitter is idle compete round-robin for the
  single egress pipeline, which takes one packet per cycle.
* **Latency.** Ingress is 3 registered stages. The traffic manager output and the
  egress add one register each. A delivered packet leaves 4 cycles plus its queue time
  (in cycles) after it was accepted.

## Interfaces

**Descriptors.** Packets are `rha_pkg::pkt_desc_t` structs of 303 bits. A descriptor
holds:

* the parsed header fields: the 5-tuple, the INT header, the probe fields;
* the packet length in cells and the arrival port;
* an opaque tag naming the packet body in the packet buffer;
* the metadata added along the pipeline: type, egress port, queue, remaining hops,
  tau.

**Top-level ports of `pdp_switch`.**

| port | purpose |
|---|---|
| `in_valid`, `in_ready`, `in_desc` | packets in; `in_ready` is low while a recirculated probe enters |
| `out_valid`, `out_desc` | packets out; the port is in `out_desc.eg_port` |
| `out_field_valid`, `out_field` | the INT field to insert into the outgoing packet |
| `out_report_valid`, `out_report` | last-hop telemetry for the control plane |
| `route_*` | route table: index = low 8 bits of the destination IPv4 address |
| `flow_*` | flow table: index = low 8 bits of the CRC-16/CCITT (0x1021, init 0xffff) of the 104-bit 5-tuple, MSB first |
| `qlm_*` | QLM table: lower bounds, upper bounds and increments per queue |
| `device_id` | this switch's INT DeviceID |
| `tm_qlen` | live queue lengths, for observation |
| `events` | one-cycle strobes: route miss, RHA enqueue / relaxed / drop, tail drop, probe encoded, QLM hit, ingress register update, INT first / last hop |

Table writes take effect in the next cycle.

## Parameters (`pdp_switch`)

| parameter | default | meaning |
|---|---|---|
| `WEIGHTS` | 2, 3, 5 (q1..q3) | WRR weights; must ascend |
| `MATH_UNITS` | 320, 214, 128 | ns per cell of worst-case delay, derived from `WEIGHTS` and k = 64 |
| `QDEPTH` / `QCAP_CELLS` | 1024 / 2048 | per-queue descriptor and cell limits |
| `RECIRC_DEPTH` | 64 | probe queue size |
| `RECIRC_LAT` | 8 | recirculation delay in cycles |
| `ROUTE_ENTRIES` / `FLOW_ENTRIES` / `QLM_ENTRIES` | 256 / 256 / 4 | table sizes |
| `NS_PER_CYCLE` | 64 | ns per clock (one cell at 10 Gb/s) |

Some widths are fixed in `rha_pkg`: 3 queues, 4 ports, 8-bit hop count, 48-bit total
queue time, 32-bit DeviceID and queue time, 16-bit queue lengths. The WRR weights,
three queues per port, k = 64, the 80-byte cell and the INT field sizes are the values
of the reference design. The port count, buffer sizes, table sizes, recirculation
latency and hash function are this implementation's choices.

## Choices where the scheme leaves room

* **Number of rounds.** The search runs `ceil(log2 h) + 1` rounds, so the last round
  offers the whole remaining budget. A reading with only `ceil(log2 h)` rounds is also
  possible; this implementation takes the inclusive bound.
* **Which packets get INT.** Only latency-constrained packets. Delay-insensitive
  packets still update the egress queue-length registers.
* **Delay-insensitive packets.** Their egress port comes from routing, like every
  other packet's, and their queue from the flow entry. A flow entry could instead
  carry a port of its own; here it holds only type, budget, hops and queue. Unknown
  flows are treated as delay-insensitive and go to queue 0.
* **Recirculated probes.** They are recognised by arriving on the recirculation port.
* **Per-hop share.** The budget is split by a right shift of `ceil(log2 h)` bits, not
  by a true division `floor(T / h)`. The two agree when `h` is a power of two.
  Otherwise the shift gives the smaller, safer share and needs no divider.
* **Probe generation.** Probes enter as ordinary input packets of a probe flow.
  Deciding when to send them is left to whatever drives the switch, typically the
  control plane. The testbenches send one every 40 cycles.
* **Header level only.** No byte-level parser or deparser is included. The design
  consumes parsed descriptors and emits the INT field to insert. The control plane is
  outside the design; its writes arrive on the `route_*`, `flow_*` and `qlm_*` ports.

## Files

| file | content |
|---|---|
| `rtl/rha_pkg.sv` | types, widths, weights, MathUnit function |
| `rtl/route_table.sv`, `rtl/pkt_classifier.sv` | ingress lookup stages |
| `rtl/rha_scheduler.sv` | queue selection |
| `rtl/ig_qlen_regs.sv`, `rtl/eg_qlen_regs.sv` | ingress and egress queue-length registers |
| `rtl/qlm_encoder.sv` | queue length modification table |
| `rtl/int_module.sv` | INT header update |
| `rtl/desc_fifo.sv`, `rtl/wrr_port.sv`, `rtl/traffic_manager.sv` | queues, WRR, port arbitration |
| `rtl/pdp_switch.sv` | top level |
| `tb/*_tb.sv` | one self-checking testbench per block, plus the end-to-end test |
| `tb/wrr_delay_tb.sv`, `tb/chain_tb.sv`, `tb/qlm_tb.sv` | delay-estimate, four-switch path and QLM experiments |

## Simulation

Every testbench ends by printing `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl rtl/rha_pkg.sv rtl/*.sv tb/pdp_switch_tb.sv \
          --top-module pdp_switch_tb -Mdir obj && ./obj/Vpdp_switch_tb
```

For a unit test, replace the testbench and top module, for example
`tb/rha_scheduler_tb.sv` with `--top-module rha_scheduler_tb`.

What each testbench checks:

* **Unit tests.** Each compares its block against a reference model written
  separately, with random and directed stimulus:
  * `rha_scheduler_tb` checks the queue, the round and drops over 3000 random
    packets;
  * `traffic_manager_tb` checks the WRR shares in every window of 10 departures,
    FIFO order, one cell per cycle, queue times and tail drops;
  * `qlm_encoder_tb` checks first-match priority, saturation and the default action.
* **`pdp_switch_tb`.** It runs the whole switch at its default parameters:
  * **Traffic.** An idle phase, a congestion phase on port 0, a queue overflow on
    port 1, then relief and drain. There are constrained flows with tolerable delays
    of 16, 20 and 24 µs, plus looser ones with up to 8 hops left.
  * **Reference checks.** Every RHA decision, QLM encoding, ingress register update,
    INT update and reported queue time is checked against a reference.
  * **Accounting.** Every packet must be delivered, dropped for a reason, or consumed
    as a probe.
  * **Coverage.** Each mechanism must occur at least once.
* **`wrr_delay_tb`.** It checks the delay estimate that the scheduler relies on,
  using one port of the traffic manager at default sizes with 19-cell packets
  (1500-byte frames).
  * **Delay against length.** All three queues are held at 100, 300, 600 and 1050
    cells. Every queue time must lie between `64·Q` and `MathUnit·Q` plus one WRR round.
  * **Slope.** The measured slope is exactly 320, 214 and 128 ns per cell for q1, q2
    and q3. From 300 cells up, measured over estimated delay is within 2 to 7 %.
    At 100 cells it is about 1.25: the packet already on the wire adds a
    near-constant offset.
  * **No starvation.** q3 is kept full while q1 receives 1000 packets:
    * At 2.5 Gb/s, below q1's 2/7 share, q1 stays under 2 packets and its worst delay
      is about 5 µs.
    * At 4.1 Gb/s, q1 overflows, but it is still served at its 2/7 share. Every
      accepted packet leaves within its bound.
* **`chain_tb`.** Four switches in a line, all at default parameters.
  * **Traffic.** Constrained packets with tolerable delays of 16, 20 and 24 µs cross
    all four switches.
  * **Congestion.** Each run has 10 periods of 4800 cycles. Each switch is congested,
    by cross traffic at 0.85 of its port rate, in a random 20, 50 or 80 % of them.
  * **INT checks.** At every hop the test checks the INT field, Hop Count and running
    Total Queue Time. At the last hop it checks that INT is removed and reported.
  * **Accounting.** Every packet must be delivered or dropped.
  * **Trend checks.** Loss must rise with the congestion probability, and 16-µs packets
    must be lost at least as often as 24-µs ones.
  * **Typical loss ratios (16/20/24 µs):**
    * 16/13/12 % at 20 % congestion;
    * 42/32/22 % at 50 %;
    * 79/66/46 % at 80 %.
  * **Where losses happen.** Most scheduler drops are of packets whose budget was
    already spent.
  * **Delay ranges.** The run also prints where each packet's SW1 queuing delay falls:
    the first, second or last part of its tolerance, or over it.
* **`qlm_tb`.** Four switches receive the same one-hop constrained traffic:
  * **Setups.** The recirculation latency is 8 or 64 cycles, and the QLM table is
    either filled (+4/6/8 cells below 50 cells, +16/24/32 above) or empty.
  * **Load.** The offered load steps through 0.7, 0.9, 1.0 and 1.2 of the port rate.
  * **Checks.** Accounting, and that QLM never raises the share of delivered packets
    whose queue time exceeds their tolerance.
  * **Size.** About 10,000 packets per switch.
  * **Typical shares at load 1.2:**
    * 50 % without QLM and 32 % with it, at an 8-cycle recirculation latency;
    * 52 % and 37 % at 64 cycles.
  * **At load 1.0:** 14 % and 9 % at 8 cycles; 21 % and 14 % at 64 cycles.
  * **Below full load** no packet is late.
  * **Why packets are late.** The ingress copy of the queue lengths is refreshed only
    once per probe (every 40 cycles here). Packets arriving in between see the same
    lengths, and many of them choose the same queue.
