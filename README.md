# Transport-layer-assisted routing for a thermally throttled 3D mesh NoC

In a stacked (3D) network-on-chip, the routers in the upper layers run hot.
A run-time thermal manager keeps them under the temperature limit by
*throttling* them: a throttled router stops forwarding anything. The mesh
then becomes irregular, and it changes over time. A router only knows its
neighbours, so an ordinary routing algorithm walks packets into throttled
routers, where they stall and back up the network.

This RTL moves the path decision to the sender's network interface (NI),
which knows the whole topology:

* Every NI keeps a small **topology table** that says which routers are
  throttled.
* Every NI keeps a **routing mode memory** that says, for each destination,
  which of two paths is safe:
  * **lateral-first**: XY routing inside the sender's own layer, then
    straight up or down to the destination layer;
  * **downward-first**: straight down to the bottom layer, which is never
    throttled, XY routing there, then straight up.
* The chosen mode travels as one bit in the packet's head flit. Each router
  runs a **dual-mode routing computation** that follows it.

Lateral-first spreads traffic over all layers. Downward-first always works,
but it crowds the bottom layer. This routing scheme is called DLDR
(downward-lateral deterministic routing).

The default configuration is an 8 x 8 x 4 mesh. Each tile has a 7-port
router and an NI. Flits are 34 bits: 2 type bits and 32 data bits. Router
input queues hold 16 flits. The NI's Tx payload queue holds 16 words and its
Rx packet queue holds 16 flits.

## The throttling model, and why both paths are safe

The thermal manager throttles a column of routers from the top down:

1. The bottom layer is never throttled.
2. Every router above a throttled router is also throttled.
3. Every router below a free router is also free.

Layer 0 is the top of the stack and layer `Z-1` is the bottom, next to the
heat sink. "Up" lowers `z`.

These three properties keep the state small and make a one-time check
enough:

* **Downward-first is always routable.** The sender's column is free
  below the sender. The bottom layer is entirely free. The destination's
  column is free below the destination. Every router on the path is
  therefore free.
* **Lateral-first depends only on the XY part of the path.** The XY part
  lies in the sender's layer. After it, the packet moves vertically in the
  destination's column:
  * If it moves down, property 3 applies, because the router it starts from
    is free.
  * If it moves up, it passes only routers below the destination, and the
    NI never sends to a throttled destination.

  So a destination is lateral-first routable exactly when every router on
  the XY path from the sender, within the sender's layer, is free.
* **The mode depends only on the destination's (x, y).** The layer of the
  destination does not matter. That is why the routing mode memory has one
  bit per column and not one per router.
* **A router that is never used cannot stall anyone.** The NI holds back
  any message whose source or destination router is throttled. Neither path
  passes through a throttled router. So no packet ever waits for a throttled
  router.

Sequence of channel classes: XY links in the upper layers, then down links,
then XY links in the bottom layer, then up links, then ejection. No route
goes backwards in this order, so under the stable topology the routes
cannot form a cyclic wait. The mesh-level test runs several hundred
messages through throttled regions without a stall. No formal proof is
included.

## Topology table (`topology_table`)

The table stores one number per column, not one bit per router. `f(x,y)`
is the count of throttled layers at the top of column (x,y), in log2(Z) bits
(2 bits for Z = 4). Router (x,y,z) is throttled exactly when `z < f(x,y)`.
`f` ranges from 0 to Z-1, because the bottom layer always stays free. The
table therefore holds X*Y*log2(Z) bits (128 at default size), not X*Y*Z.

Port summary:

* One write port per NI: `topo_wr_*`, one column per cycle.
* Four combinational read ports: the routability checker, the NI's own
  router, the message's destination, and an application query port.
* Reset clears the table, so no router is throttled.

## Routing mode memory and the routability check

`routing_mode_memory` holds one bit per column: `1` means lateral-first and
`0` means downward-first. It has one write port and one combinational read
port, addressed by the destination's (x, y). Reset loads downward-first
everywhere.

`route_mode_checker` rebuilds the whole memory after every topology change.
It visits one column per cycle, so a rebuild takes exactly X*Y cycles
(64 at default size). A column is routable when its router in the sender's
layer is free and the column before it on the XY path is routable. The
visit order guarantees that this predecessor is always visited first:

* **Step 1** walks the sender's row along x. It goes from the sender east
  to the mesh edge, then from the sender west.
* **Step 2** walks every column along y, starting at the sender's row. It
  goes north first, then south.
  * The step-1 result of that column seeds the walk.
  * Step-1 results are kept in an X-bit register.

A single "chain" flag carries the result along each walk, so the check needs
no random reads of the memory. The choice of east before west and north
before south is arbitrary.

## Network interface (`tlar_ni`)

| part | module | notes |
|---|---|---|
| Tx payload queue | `sync_fifo` (32 b x 16) | application writes payload words (`pl_valid/pl_ready/pl_data`) |
| control logic | `ni_control` | admission, mode lookup, starts the checker; contains `route_mode_checker` |
| packetizer | `packetizer` | head flit, then `len` payload flits, last one marked tail |
| Rx packet queue | `sync_fifo` (34 b x 16) | filled from router port L; `ack` = not full |
| de-packetizer | `depacketizer` | drops head flits, delivers words with source address |
| topology table | `topology_table` | see above |
| routing mode memory | `routing_mode_memory` | see above |

### Sending a message

1. Push the message's payload words into the Tx payload queue.
2. Hold `msg_valid` with `msg_dst` and `msg_len` (1..15 words) until
   `msg_ready` is high.

The control logic admits the message only when all of these hold:

* the NI's own router is free;
* the destination router is free;
* no routability check is running, and no check is about to start.

While the source or the destination router is throttled, the message waits
and `msg_blocked` is high. It goes out by itself once the throttling is
lifted. The request port is first-come-first-served, so later messages wait
behind a blocked one.

On admission, the control logic reads the mode for the destination's column
and hands a command to the packetizer. The packetizer timing is:

* The head flit is offered to the router one cycle after admission.
* Each payload flit follows in the cycle after the previous flit is
  acknowledged, provided the word is already in the queue.
* An n-flit packet takes n cycles on an idle channel.
* The next message can be admitted in the cycle its predecessor's tail is
  acknowledged.

### Topology changes

A write to `topo_wr_*` starts a new check one cycle later, and reset starts
one too. `mode_check_busy` is high during the X*Y check cycles. No message
is admitted from the write until the check ends.

### Receiving

A head flit costs one cycle in the de-packetizer. After that, one payload
word per cycle goes out on `rx_valid/rx_ready/rx_data/rx_last/rx_src`.

## Flit and head format (`tlar_pkg`)

```
flit  [33:32] type   00 body, 01 tail, 10 head (11 unused)
      [31:0]  data
head data  [31:29] 0   [28:25] len (payload words)   [24] mode (1 lateral-first)
           [23:12] src {x[3:0], y[3:0], z[3:0]}      [11:0] dst {x, y, z}
```

The 4-bit coordinate fields allow meshes up to 16 x 16 x 16. The field
placement and the type codes are choices of this design.

## Dual-mode router (`dldr_router`)

The router has seven ports, in input-queue order L, N, E, S, W, U, D. Port
directions:

* E is +x and N is +y.
* U goes to the layer above (z-1) and D to the layer below (z+1).

Each input has a 16-flit queue. The router uses wormhole flow control and
has two pipeline stages.

**Stage 1: routing computation and switch allocation.**
The head flit at the front of a queue goes through the address decoder and
`dldr_rc`. That module applies the following rules in order:

| condition | output |
|---|---|
| current == destination | L |
| same (x,y) as destination | U if the destination is above, else D |
| in the bottom layer, or in the source layer with mode lateral-first | XY: E/W until x matches, then N/S |
| otherwise (downward-first, not yet at the bottom) | D |

`switch_allocator` then runs a round-robin arbiter (`rr_arbiter`) for each
free output among the inputs that ask for it. The winner owns the output
until its tail flit has crossed. Then the output is free again, starting
one cycle later.

**Stage 2: switch traversal.**
`crossbar` is seven 6:1 multiplexers, one per output. Each multiplexer
leaves out the output's own port, because a flit never leaves by the port
it came in on. Each cycle, a flit crosses from an owning input into the
output register. This happens if that register is empty or is being
acknowledged in the same cycle.

**Channels** use a request/acknowledge pair:

* The sender holds `req` and the flit until it sees `ack`.
* A flit moves in every cycle in which both are high.
* `ack` means "input queue not full" and never depends on `req` in the same
  cycle, so chained routers have no combinational loops.

**Zero-load timing:**

* A head flit written into an empty queue in cycle t is allocated in t+1.
* It crosses in t+2 and is offered to the next router from t+3.
* Body flits follow one per cycle.

**Throttling:** `throttle` models a fully throttled router. The router
acknowledges nothing, offers nothing, and its state is frozen.

## Tile and mesh (`tlar_tile`, `tlar_noc3d`)

`tlar_tile` connects an NI to port L of a router. The NI's own table entry
drives the router's `throttle` input, so the NI and its router always agree.

`tlar_noc3d` builds the X x Y x Z mesh and links each router to its six
neighbours. Ports on the mesh boundary are tied off. Per-tile ports are
unpacked arrays indexed by `t = (z*Y + y)*X + x`. They include:

* the message request and payload ports;
* the receive stream;
* the table query;
* the `throttled`, `msg_blocked` and `mode_check_busy` status outputs.

The processors and the thermal manager are outside the module. A
throttling decision enters as a write of one column's `f` value on
`topo_wr_*`, broadcast to every tile in the same cycle. To change several
columns, write them in consecutive cycles. Each write restarts the rebuild
in every NI.

## Where this RTL makes its own choices

The behaviour described above follows the scheme's definition:

* the table and memory encodings;
* the two-step X*Y-cycle check;
* the DLDR decision rules;
* the 7-port, two-stage wormhole router with 6:1 crossbar multiplexers;
* all sizes.

The following are this design's own choices:

* **Handshake.** The request/acknowledge handshake is a single-cycle
  valid/ready transfer, not a four-phase protocol.
* **Pipeline split.** Which stage does what inside the two-stage router is
  chosen here.
* **Arbitration.** Switch allocation is round-robin. A released output stays
  idle for one cycle before its next grant.
* **Formats.** The flit type codes, head layout and message interface are
  chosen here.
* **Throttled routers.** A throttled router freezes. The router's throttle
  input comes from the NI's own table.
* **Topology distribution.** Updates are broadcast to all tiles. No message
  is admitted while routing modes are rebuilt.
* **Reset values.** The table resets to "nothing throttled" and the mode
  memory to downward-first. A check also runs right after reset.
* **Not built.** The NI drawing shows a multiplexer in front of the Tx
  payload queue and a link from the de-packetizer to the control logic.
  Their functions are not defined, so neither is built. A single payload
  write port is provided instead.

Known limits:

* **Throttling mid-flight.** Only a quiet change in throttling is safe.
  Throttling a router while packets are routed through it or queued in it
  can strand them. Draining traffic before the throttle is applied is left
  to the thermal manager. Lifting throttling is always safe.
* **Blocked head of line.** A message to a throttled destination blocks the
  messages behind it in the same NI.
* **No verification at scale.** No formal deadlock proof or performance
  model is included. The throughput and area behaviour of the scheme was not
  measured on this RTL.

## Simulation

Everything is plain SystemVerilog 2017. Every testbench is self-checking
and ends by printing `TB_RESULT checks=N failures=M`. Build and run one with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tlar_pkg.sv tb/tb_tlar_noc3d.sv \
          --top-module tb_tlar_noc3d -o sim
./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_sync_fifo` | random push/pop against a reference queue; flags and count |
| `tb_topology_table` | random writes and four-port reads; `z < f` rule |
| `tb_routing_mode_memory` | reset value, random writes and reads |
| `tb_route_mode_checker` | 60 random topologies and sources (corners included) against a full XY-path reference; exactly X*Y cycles; restart |
| `tb_dldr_rc` | decision rules; 3000 complete hop-by-hop routes reach their destination, lateral routes stay in the source layer |
| `tb_switch_allocator` | cycle-exact comparison with a lock/round-robin model; alternation under contention |
| `tb_crossbar` | random selects on all outputs |
| `tb_packetizer` | head fields, payload order, tail marking, hold under back-pressure; head 1 cycle after admission, 10 flits in 10 cycles |
| `tb_depacketizer` | words, source and last flag under random readiness; head costs 1 cycle |
| `tb_ni_control` | check after reset and each update (X*Y cycles), admission rules, modes, blocking and release |
| `tb_dldr_router` | all 7 inputs loaded at random against a routing model: right port, packets intact and not interleaved, per-input order; 3-cycle head latency, 1 flit/cycle; throttled router silent |
| `tb_tlar_ni` | NI at default size: head fields and modes, payloads, blocking until release, no injection during a rebuild, receive path, table queries |
| `tb_tlar_tile` | lateral-first leaves E; after throttling a neighbour column the same destination leaves D downward-first; ejection; pass-through; throttled tile silent |
| `tb_tlar_noc3d` | 4x4x4 mesh, 512 messages through a throttled region. Every message delivered once, intact, at its destination. Lateral-first and downward-first messages, held messages, throttled routers, mode rebuilds, receive back-pressure and injection stalls must all occur |
| `tb_latency_sweep` | 4x4x4 mesh with a throttled pillar, uniform random open-loop traffic at 5, 15 and 30 messages per tile per 1000 cycles. Delivery checked as above. Latency must respect the path's minimum and must not fall as the load rises |
| `tb_tlar_noc3d_full` | the same test on the default 8x8x4 mesh with two 2x2x3 throttled pillars, two messages per tile |

The reduced mesh test builds in about two minutes. The default-size test
takes about ten minutes to build and a few seconds to run. It delivers 512
messages in about 1100 cycles: roughly 400 lateral-first and 110
downward-first, with 64 held while their source or destination was throttled.

The sweep bench reports average message latencies of 30.7, 31.9 and 38.3
cycles at its three rates. Latency is measured from message creation to
the last word taken, and includes the wait in the sender. It covers only
the network itself: no thermal model is simulated.

## Files

* `rtl/tlar_pkg.sv`: shared types (flit, head, coordinates, ports, modes).
* `rtl/tlar_noc3d.sv`: the mesh.
* `rtl/tlar_tile.sv`: one tile.
* `rtl/tlar_ni.sv`, `ni_control.sv`, `route_mode_checker.sv`,
  `topology_table.sv`, `routing_mode_memory.sv`, `packetizer.sv`,
  `depacketizer.sv`: the network interface.
* `rtl/dldr_router.sv`, `dldr_rc.sv`, `switch_allocator.sv`,
  `rr_arbiter.sv`, `crossbar.sv`: the router.
* `rtl/sync_fifo.sv`: all queues.
* `tb/`: one testbench per module, as listed above.
