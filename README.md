# Weighted error detection for a mesh network-on-chip

Not all flits of a packet matter equally. The head flit carries the
destination, and a corrupted head sends the whole worm the wrong way, holding
links and buffers as it goes. Body and tail flits only carry data, and a
corrupted data flit harms nobody until it is used. This design checks the two
kinds differently:

* **head flits are checked at every hop** (switch to switch). A router that
  receives a corrupted head drops it and tells the sender, which still holds
  a copy and sends it again;
* **body and tail flits are checked once, at the destination** (end to end).
  A destination that finds corrupted payload flits asks the source to resend
  just those flits.

The hardware cost stays close to that of a router that checks only end to end.
Each router has **one** checksum encoder and **one** checksum decoder, shared in
time between the local port and the head flits that pass through. Each input
port has **one** extra flit buffer, which holds the copy of a head until the
next router has accepted it. When no head needs it, that buffer serves as
overflow space for payload flits.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. It is a 12 × 12
mesh of these routers. Each node also has a traffic generator, a sink that
measures latency, and the end-to-end recovery unit. An error generator sits
on every router-to-router link.

## Flit format

Flits are 34 bits wide. Each link also carries an 8-bit checksum on a side band.

| bits    | head flit         | body flit *k* (1..6)  | tail flit                          |
|---------|-------------------|-----------------------|------------------------------------|
| [33:32] | `11`              | `01`                  | `10`                               |
| [31:30] | packet kind       | packet kind           | packet kind                        |
| [29:16] | packet ID / start time (14 bits) | same   | same                               |
| [15:8]  | source node       | *k*                   | packet size (8), or a mask (below) |
| [7:0]   | destination node  | source node           | 0                                  |

* A node ID is `{y[3:0], x[3:0]}`.
* A packet has 8 flits: head, six bodies and a tail.
* The packet kind is `00` for data, `01` for a retransmission request and
  `10` for a resend. Bits [31:16] together form the 16-bit start-time field,
  which the generator fills with the cycle at which the packet was created.
  Of that field, only the low 14 bits are a time stamp: they also serve as
  the packet ID, and the top two bits carry the kind.
* The flit-type field [33:32] is assumed never to be corrupted. A flit whose
  type is wrong could not be handled at all, so the error generator never
  touches those bits.

**Checksum** (`wed_pkg::checksum`): the inverted modulo-256 sum of five bytes,
`{6'b0, type}` and the four bytes of [31:0]. Every single-bit error changes
the sum, so every single-bit error is detected.

## The router (`wed_router`)

The router has five ports: N, E, S, W and local. It uses XY routing, wormhole
switching and round-robin switch allocation. A 5 × 5 crossbar connects the
ports, and on/off flow control paces the links. What is new is how a router
handles the checksum.

### Input unit and the additional buffer (`wed_input_unit`)

Each input has a 4-flit FIFO (the normal buffer) and a 1-flit additional
buffer. Arriving flits are steered as follows:

* a **head** always goes into the additional buffer;
* a **body or tail** goes into the FIFO. The one exception: if the FIFO is
  full and the additional buffer is empty, the flit is parked in the
  additional buffer. It moves into the FIFO as soon as there is room.

A head then moves through these states of the additional buffer:

```
EMPTY --head arrives--> CHECK --decoder: bad--> EMPTY   (nack to upstream)
                          |
                       decoder: good (ack to upstream)
                          v
                        ROUTE --granted, to N/E/S/W--> WAIT --next hop acks--> EMPTY
                          |                             |
                     granted, to local --> EMPTY        +--next hop nacks--> RESEND --granted--> WAIT
```

Further rules:

* A head is routed only after the previous packet's tail has left this input.
* The body flits of a packet stay in the FIFO while their head is in WAIT or
  RESEND. This way a resent head can never fall behind its own payload.
* The local input has no CHECK state: flits from the core are encoded on
  entry, so they are known to be correct.

Flow control towards the upstream router:

* `rdy_head` is 1 when the additional buffer is empty.
* `rdy_body` is 1 when there is room in the FIFO, or in an empty additional
  buffer.

Both signals come from registers. The upstream router can use them in the
same cycle without any flit in flight being lost.

The per-hop acknowledgement uses its own wires. Each link has an `ack` and a
`nack` wire running backwards, both registered. A head is acked or nacked two
cycles after it arrives.

### Sharing one encoder and one decoder

The **encoder** serves two users:

* the flit the local core injects, whose checksum is computed on entry;
* the head leaving on N, E, S or W this cycle, which gets a fresh checksum.

Switch allocation lets at most one head per cycle leave towards a neighbour.
If several outputs grant a head in the same cycle, a round-robin arbiter over
the outputs keeps one. The others try again in the next cycle. The core can
inject only in a cycle in which no head uses the encoder (`inj_ready`).

The **decoder** serves two users:

* heads waiting in CHECK on the four neighbour inputs, one per cycle in
  round-robin order;
* otherwise, the flit being ejected to the local port, which gets its
  end-to-end check (`ej_err`).

Waiting heads come first. In a cycle in which the decoder checks a head, the
local output is not granted.

Body and tail flits keep the checksum that was made at injection all the way
to the destination. Their checksum is never recomputed on the way, so an error
on any link shows up at the destination.

### Timing

* A flit on an input link is written into the input unit at the next clock
  edge.
* A head spends one cycle in CHECK. The decoder check and the route
  computation happen in that cycle.
* In the next cycle, switch allocation and crossbar traversal happen together,
  and the flit is on the output link without a register in between.
* A head therefore leaves **2 cycles** after it arrived, and a body or tail
  flit **1 cycle** after.
* The upstream copy of a head is released 2 cycles after the head reaches the
  next router. The packet's payload starts moving then.
* The local sink is always ready.

## End-to-end recovery (`ee_ni`)

Each node has an `ee_ni` between its generator, its sink and the router's
local port.

**At the destination.** When a data packet arrives with payload flits that
failed the check, the unit queues a **request**. The request is a head plus a
tail. The tail carries in [14:8] a mask of the failed flits: bit *k*-1 stands
for flit *k*, and bit 6 for the tail.

**At the source.** The unit keeps the ID and destination of its last 8 data
packets. When a request arrives, it sends a **resend**: a head, the body flits
named in the mask, and a tail that carries the mask. Body flit *k* of packet
ID from node S is `{kind, ID, k, S}`, so the source rebuilds it without
storing any payload.

**Back at the destination.** The unit lines up the resend's arrival
positions with the mask. If everything arrived clean, the packet is counted as
`repaired`. If not, the failed flits are requested again.

**Corrupted control flits.** The head of a request or resend is protected
hop by hop, so its kind, ID and source are always right. If the tail of a
request fails, the whole payload is resent. If the tail of a resend fails,
the whole payload is requested again.

**Ordering and losses.**

* Requests and resends go out between data packets, ahead of new data.
* Only data packets are passed on to the sink.
* A request for a packet no longer in the source's record, or a job that
  finds the 4-entry queue full, is counted in `lost`.

## Network and test environment (`wed_noc`)

**Mesh wiring.** The top module is `ROWS × COLS` routers (12 × 12 by
default). Router (x, y) has ID `{y, x}`. Its east output feeds the west input
of (x+1, y), and its south output feeds the north input of (x, y+1). Ports on
the edge of the mesh are tied off, because XY routing never uses them.

**Error generators** (`error_gen`). One sits on each N/E/S/W output. For each
flit it draws a 32-bit LFSR value, and if that value is below `err_rate` it
flips one random bit of [31:0]. So `err_rate` is the error probability per
flit per link, times 2³².

**Traffic generator** (`pkt_gen`). It works at a constant flit rate:
`inj_rate` flits/cycle in Q0.16, so 3277 means 0.05. It adds the rate to an
accumulator every cycle and generates a packet each time the total passes
8 flits. Destinations are uniform random and never the generator's own node.
Packets wait in a 16-entry source queue, and the generator counts any packet
it has to drop (`ev_pkt_dropped`). `fixed_dst_en` sends all traffic to one
node, which makes a hot spot.

**Sink** (`pkt_sink`). It counts packets and flits and adds up the latency
measured at the tail flit (cycles since the packet was created, including the
time spent in the source queue). It also counts flits that failed the check,
packets that contained such flits, and heads that arrived at the wrong node.

**Top-level outputs** are per-node arrays of these counters and one-cycle
event pulses: head errors, overflow parking, injection stalls, encoder
conflicts, and link errors (separately for those that hit a head).

## Sizes and limits

| parameter | default | meaning |
|-----------|---------|---------|
| `ROWS`, `COLS` | 12, 12 | mesh size (at most 16 × 16 with 4-bit coordinates) |
| `DEPTH` | 4 | normal input FIFO depth |
| `PKT_LEN` | 8 | flits per packet |
| `ee_ni.RECORDS` | 8 | data packets a source can still resend |
| `ee_ni.JOBS` | 4 | queued requests/resends per node |
| `pkt_gen.QDEPTH` | 16 | packets waiting at a source |

## Measured behaviour

Average packet latency (generation to tail ejection, including source
queueing) on the 12 × 12 mesh with uniform random traffic, from
`tb_wed_noc_sweep`:

| load (flit/cycle/node) | link error rate per flit | avg latency (cycles) | head resends | packets repaired end to end |
|------|---------|-----|-----|-----|
| 0.05 | 0.001 % | 48  | 0   | 0   |
| 0.05 | 0.01 %  | 48  | 6   | 3   |
| 0.05 | 0.1 %   | 55  | 24  | 42  |
| 0.05 | 1 %     | 216 | 348 | 388 |
| 0.02 | 0       | 51  | –   | –   |
| 0.10 | 0       | 49  | –   | –   |
| 0.15 | 0       | 186 | –   | –   |

At low error rates recovery costs almost nothing. At 1 % the requests and
resends load the network, and latency grows about fourfold. Without errors
the mesh saturates between 0.10 and 0.15 flit/cycle/node. At 0.15 some
sources overflow their 16-packet queue.

## Where this departs from the original proposal, and what is missing

* **Flit-type codes.** The written description of the proposal gives body =
  `10` and tail = `01`. Its packet-format drawing shows body = `01` and tail
  = `10`, and the drawing is followed here.
* **Checksum.** The proposal says only "checksum" and gives the flit format
  no field for it. The 8-bit side band and the exact sum are this design's.
* **Pipeline.** The proposal lists a 4-stage router pipeline (buffer write,
  route computation, switch allocation, switch traversal). Here the route is
  computed in the check cycle, and allocation and traversal share a cycle:
  2 cycles per hop for heads, 1 for payload.
* **No virtual channels.** The proposal's block diagram shows two queues per
  input and a VC allocator, but its buffer-control description and its
  configuration table have one normal buffer per port. That is what is built.
* **Packet kind and ID.** The 2-bit packet kind and the 14-bit ID in [31:16]
  are this design's own format. The proposal says only that the
  retransmission request uses a special format. As a result, the start time
  is 14 bits, not 16.
* **Own choices.** The ack/nack wires, the rule that payload waits for the
  head's ack, the rules for sharing the coders, the ready signals and the
  error model are this design's choices where the proposal is silent.
* **Not modelled.** Power, area and the baseline routers (check at every
  hop, check only at the destination) with which the proposal compares this
  one.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_cs_encoder`, `tb_cs_decoder`: checksum against a reference; every
  single-bit error is detected.
* `tb_flit_fifo`, `tb_rr_arbiter`, `tb_crossbar`, `tb_xy_route`: random tests
  against models. The XY-route test is exhaustive over 12 × 12.
* `tb_wed_input_unit`: head check with ack and nack, payload held until the
  next hop acks, resend after a nack, overflow parking and flit order.
* `tb_wed_router`: one router with modelled neighbours. Checks fresh head
  checksums, nack on a bad head and forwarding of the good resend, 2-cycle and
  1-cycle latencies, resend after a downstream nack, end-to-end flagging of a
  corrupted payload flit, and one head per cycle through the encoder with
  injection held back.
* `tb_error_gen`, `tb_pkt_gen`, `tb_pkt_sink`, `tb_ee_ni`: the test
  environment and the recovery protocol, including a failed resend and a
  corrupted request.
* `tb_wed_noc`: a 4 × 4 mesh run in three phases: clean traffic, traffic with
  heavy link errors, and a hot spot. Every packet must arrive complete at the
  right node. Every head error must be caught hop by hop, and every packet
  with payload errors must be repaired. Each mechanism must have happened at
  least once: head resend, end-to-end request and resend, overflow parking,
  injection stall and encoder conflict.
* `tb_wed_noc_full`: the default 12 × 12 mesh at 0.05 flit/cycle/node with
  link errors at about 1/1000. Every packet must be delivered and every error
  recovered.
* `tb_wed_noc_sweep`: the 12 × 12 mesh over a range of operating points,
  each from reset with 2000 cycles of uniform traffic and a drain. It sweeps
  the link error rate from 0.001 % to 1 % at 0.05 flit/cycle/node, and the
  load from 0.02 to 0.15 flit/cycle/node without errors. Each point must
  deliver and repair everything.

To run a test with Verilator (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/wed_pkg.sv tb/tb_wed_noc.sv --top-module tb_wed_noc
./obj_dir/Vtb_wed_noc
```

The 12 × 12 tests take about two and a half minutes to build and a few seconds to run.
