# Input-output selection router for a 2D-mesh network-on-chip

A wormhole router for a two-dimensional mesh that attacks congestion from
both ends of the switch:

* **Output selection** — which output a message leaves on. Routing follows a
  Hamiltonian path through the mesh, which lets one algorithm carry both
  unicast and path-based multicast traffic without deadlock. Where two
  minimal directions are allowed, the router takes the one whose downstream
  input buffer has not raised its *congestion flag* (CF).
* **Input selection** — which input wins an output. Each output has a
  *weighted round-robin* (WRR) arbiter. An input's weight is the *congestion
  level* (CL) of the router that feeds it, so traffic from congested regions
  is served for several packets in a row. No input ever starves.

CF and CL are produced locally. Each input buffer watches its fill level
and fill rate and raises CF. The router's CL is the number of its
neighbour-facing buffers with CF raised. CF travels upstream and CL travels
downstream on every link.

The default configuration is an 8x8 mesh. Flits are 32 bits wide, each input
buffer holds 10 flits, and the congestion threshold is 60 % of a buffer.

## Files

| file | contents |
|---|---|
| `rtl/noc_pkg.sv` | widths, header layout (`header_t`), link structs, direction enum, Hamiltonian label function |
| `rtl/input_fifo.sv` | register FIFO of one input buffer |
| `rtl/congestion_detector.sv` | fill-rate / threshold circuit producing CF |
| `rtl/input_port.sv` | input channel: handshake + FIFO + congestion detector |
| `rtl/cars.sv` | congestion level CL = sum of the four neighbour-facing CFs |
| `rtl/hamum_route.sv` | routing unit (address decoder): Hamiltonian-path adaptive routing, multicast header update |
| `rtl/ppe.sv` | programmable priority encoder |
| `rtl/wrr_arbiter.sv` | weighted round-robin arbiter of one output |
| `rtl/crossbar.sv` | 5-input, 6-output switch |
| `rtl/wrr_hamum_router.sv` | the router |
| `rtl/noc_mesh.sv` | top: MESH_W x MESH_H mesh of routers |
| `tb/tb_<module>.sv` | a self-checking testbench for each module |

## Messages and links

A message is one header flit followed by any number of body flits. Bit 31
of every flit is EOM (end of message) and bit 30 is BOM (begin of message).
The header packs the following fields:

```
[31] EOM  [30] BOM  [29] T (0 unicast, 1 multicast)  [28:27] NDEST
[26:21] SRC  [20:15] DEST0  [14:9] DEST1  [8:3] DEST2  [2:0] unused
```

An address is `{y[2:0], x[2:0]}`, with y growing north and x growing east.
DEST0 is always the next destination. A header therefore names at most three
destinations. A sender with a longer destination list splits it into
several messages. The EOM/BOM positions and the T field follow the original
design. The field widths and the three-destination limit are this
implementation's choices.

Every link is a valid/ready pair:

* `link_fwd_t` (upstream to downstream): `valid`, `flit`, and the sender's
  `cl`.
* `link_bwd_t` (downstream to upstream): `ready` (the buffer has a free
  slot) and the input buffer's `cf`.

A flit moves on a rising edge where `valid` and `ready` are both high.
`ready` comes from registered state only.

## Routing: the Hamiltonian path and its two subnetworks

Nodes are numbered along a boustrophedon path. Even rows count up
eastwards and odd rows count up westwards, so label = `y*W + x` in even
rows and `y*W + (W-1-x)` in odd rows. The links then split into two disjoint
sets:

* **High subnetwork.** Every hop raises the label: north everywhere, east in
  even rows, west in odd rows.
* **Low subnetwork.** Every hop lowers the label: south everywhere, west in
  even rows, east in odd rows.

A destination with a higher label than the current node is reached in the
high subnetwork, and a lower one in the low subnetwork. Inside a
subnetwork, a hop is allowed when it shortens the distance and lands on a
label between the current one and the target's. That gives at most two
choices: the vertical move, and the horizontal move when it goes the
label-raising (or label-lowering) way. The "between" condition matters
when the target is one row away. Moving north into an odd row can jump
past the target's label, and the message would then have to come back
through the other subnetwork. In that case the horizontal move is taken,
and it is always allowed. A route is therefore always minimal and never
leaves its subnetwork. Each subnetwork climbs or descends the label order and so has no
cycle, which makes routing deadlock free without virtual channels.

**Choosing between two directions.** The horizontal direction is the first
choice. The vertical one is taken only when the horizontal neighbour has
raised its CF and the vertical neighbour has not. With both flags equal, the
horizontal direction wins. The original design gives this rule; it does not
say which direction is the first choice.

**Multicast** is path-based. The sender splits its destinations into those
above and below its own label. It splits each of those sets again by column
(x at or east of its own, or west of it). It sorts each part along the
path. On reaching DEST0, a router:

1. requests its local output;
2. drops DEST0 from the header (shifts the list, decrements NDEST);
3. routes on toward the new DEST0, if any remain.

The local copy and the forwarded copy move in lock-step, one flit per cycle
to both. The exact turn rules of the original routing algorithm are not
available. `hamum_route.sv` implements the simplest minimal adaptive rule
that stays inside one subnetwork.

## Inside the router

```
in_fwd[N,E,S,W,L] -> input_port (FIFO 10 + CF) -> hamum_route -> requests
                                                                  |
                    wrr_arbiter per output (weights = upstream CL) <
                                                                  |
                    crossbar 5 -> 6 -> out_fwd[N,E,S,W,L,L2]
cars: CL = CF_N + CF_E + CF_S + CF_W  -> sent on every output
```

Timing with no contention:

* **Edge t.** The header is written into an input buffer.
* **Cycle after t.** The routing unit decodes the header at the head of the
  buffer and requests the output. The output's arbiter grants it.
* **Edge t+1.** The output becomes held by that input, and the route and the
  rewritten header are latched.
* **Edge t+2.** The downstream buffer takes the header. Body flits follow
  one per cycle.
* **EOM.** The EOM flit releases the outputs. A released output arbitrates
  again in the following cycle.

A flit moves only when every output in its route is held by its input and
every downstream buffer is ready.

**Multicast fork ordering.** A forking message requests its network output
first. It requests the local output only once it holds the network output.
So two forks never each hold the output the other needs.

**Two consumption channels (L and L2).** A fork holds its local output while
it waits for the network to accept the forwarded copy. Suppose forks of both
subnetworks shared one local output. A high-subnetwork worm could then wait
for a local port held by a low fork, which waits for a low worm, which waits
for a local port held by a high fork, and so on. Nothing in the
routing breaks such a cycle, so the network could deadlock. Forks that continue into the low subnetwork therefore deliver
their local copy on a second local output, L2. Everything else uses L.
Each subnetwork is acyclic, so the router is deadlock free provided the
processing element keeps accepting flits on both L and L2. This second
channel is this implementation's addition: the original design has one
local port and does not discuss the problem.

## Congestion flag and congestion level

`congestion_detector` compares the occupancy N_new with the value one clock
earlier, N_old:

* **Fill rate.** N_new > N_old means the buffer is filling, N_new < N_old
  that it is draining. When the occupancy does not change, the last rate
  sign is kept. Without this, a full buffer that has stalled would drop its
  flag. This is an implementation choice.
* **W_Full.** High when at least `FULL_THRESH` = 6 of 10 slots are occupied.
* **CF.** Registered `W_Full && filling`.

`cars` adds the four neighbour-facing CFs into CL (0 to 4, 3 bits). The
local input's CF is not counted.

## Weighted round-robin arbitration

`ppe` grants the first request at or after the pointer `p_enc`.
`wrr_arbiter` adds one weight down-counter per input:

* **Starting a turn.** When an input is granted at the start of its turn,
  its counter is loaded with the upstream CL. The local input uses the
  router's own CL.
* **During the turn.** The counter drops by one per packet granted. The
  pointer stays on the input until the count runs out, then rotates one
  place past it.
* **Turn length.** An input gets max(1, CL) packets per turn, so with every
  CL at 0 the arbiter is a plain round-robin arbiter.
* **Empty buffers.** An input whose buffer is empty does not request. It is
  skipped and loses the rest of its turn.

The original design gives weight in proportion to CL. The exact mapping
max(1, CL) is this implementation's choice.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `noc_mesh` | `MESH_W`, `MESH_H` | 8, 8 | mesh size (at most 8 per side with 3-bit coordinates) |
| `noc_mesh`, router, `input_port` | `DEPTH` | 10 | input buffer depth in flits |
| same | `FULL_THRESH` | 6 | occupancy at which W_Full rises |
| router | `MY_X`, `MY_Y` | 0, 0 | router position |
| `noc_pkg` | `FLIT_W` | 32 | flit width; the header layout assumes 32 |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_noc_mesh \
    rtl/noc_pkg.sv tb/tb_noc_mesh.sv -o sim
obj_dir/sim
```

Substitute any other `tb_*` name; the sources are found through `-Irtl`.

* **`tb_noc_mesh`** runs the full 8x8 mesh at its default parameters. It
  plays all 64 processing elements and runs three phases:
  * a 16-destination multicast from the node labelled 27, split into
    subsets and sorted as described above;
  * a uniform random unicast burst;
  * a 70 % / 30 % unicast/multicast mix.

  It checks that every message reaches every destination exactly once,
  intact and in order. It also counts multicast forks, L2 deliveries, CF and
  CL activity, CF-driven direction changes and WRR turns longer than one
  packet, and it fails if any of them never happens. Building the full mesh
  takes a few minutes; the simulation takes seconds.
* **`tb_wrr_hamum_router`** checks one router:
  * the header reaches the downstream buffer two cycles after it entered,
    and body flits then stream at one per cycle;
  * the CF-based choice of direction;
  * lock-step multicast forks on L and L2;
  * under saturation with upstream CLs 0/2/3, packets leave in the order
    N, S, S, W, W, W.
* **The block testbenches** compare each block against an independent
  reference: a queue model, exhaustive tables, or all 64x64 source and
  destination pairs walked hop by hop.

## Limits and departures from the original design

* Multicast messages name at most three destinations; longer lists are sent
  as several messages by the sender.
* The second consumption channel L2 is an addition (see above).
* The turn rules of the routing algorithm are not available; the rule used
  is minimal and adaptive within the high/low subnetworks, and may allow
  fewer or more choices than the original.
* Link handshake, pipeline timing, header field widths, the rate-sign hold
  in the congestion detector and the CL-to-weight mapping are choices of
  this implementation.
* The evaluation's processing elements, traffic generators and power model
  are not part of the RTL. The testbench plays the processing elements.
