# Congestion aware router for a mesh network on chip

A network on chip moves packets between the cores of a chip over a grid of
small routers. The usual way to route such packets is XY
dimension-ordered routing: go along the row until the column is right, then
along the column. XY routing is simple and cannot deadlock. It is also blind:
it keeps sending packets into a neighbour whose buffers are already full,
even when an equally short path exists.

This design keeps the simplicity of XY routing and adds congestion awareness.
Every router tells each of its four neighbours, on one wire per direction,
whether the input buffer facing that neighbour is nearly full. That flag is
the *buffer occupancy value* flag, or BOV flag. Some packets still need a hop
in both X and Y. For such a packet, a router that sees the X direction
congested, or crowded with its own waiting packets, sends it in the Y
direction first, provided Y is not congested too. Routes stay minimal: every
hop still brings the packet closer to its destination. The cost is eight pins
per router and a few comparators.

The RTL is a complete, parameterised, synthesizable mesh. It has
store-and-forward routers with virtual-channel input buffers, round-robin
switch allocation, the congestion aware route computation, and a simple core
at each node that sends and receives packets.

## Packets and flits

A packet is `PACKET_SIZE` flits of 32 bits (4 by default): one head flit,
`PACKET_SIZE-2` body flits and one tail flit. Bits 31:30 give the flit type.

| flit | 31:30 | 29:23 | 22:8 | 7:0 |
|------|-------|-------|------|-----|
| head | `11`  | destination in 29:22, rest 0 | 0 | source id |
| body | `10`  | 0 | 0 | destination id |
| tail | `01`  | 0 | packet id (15 bits) | destination id |

Node ids are 8 bits, so a mesh can be up to 15x15. The tail flit carries a
packet id so that the receiving side can match a delivery to its injection
and measure latency. The helper functions `make_head`, `make_body`,
`make_tail`, `head_dest`, `head_src`, `tail_pkt_id` and `flit_type` live in
`rtl/noc_pkg.sv`.

## The mesh

`noc_mesh` builds a `MESH_SIZE` x `MESH_SIZE` grid (4x4 by default). Nodes are
numbered 1..N row by row, starting at the bottom-left corner. Node `n` sits in
row `(n-1)/MESH_SIZE` and column `(n-1)%MESH_SIZE`. North means one row up.

Router ports are numbered North 0, East 1, South 2, West 3 and Local 4. Each
link between neighbours is two one-way channels. A channel is a 32-bit flit,
a `req` wire forward and a `ready` wire back. A flit moves on a clock edge
where both `req` and `ready` are 1.

Router *r*'s `bov_out[d]` is 1 while *r*'s input buffer on direction *d* is
over the threshold. It drives `bov_in[opposite(d)]` of the neighbour in
direction *d*. So when a router reads `bov_in[East] = 1`, the buffer its East
output would feed is congested.

Ports on the mesh edge are tied off. Nothing arrives there, nothing is
accepted there, and their flag reads 0. Minimal routing never sends a packet
toward an edge.

`noc_top` is the whole network. It contains the mesh and a `local_cpu` at
every node. It injects with `gen_pkt`, `gen_dest` and `gen_pkt_id`. It
reports each delivery on `rx_done`, `rx_src`, `rx_pkt_id` and `rx_dest_ok`.

## Inside a router

```
 in_port[p] --> input_buffer[p] --> route_compute[p] --> route latch[p]
                 (VCs, BOV)            ^     ^                |
                      |          bov_in    req_cnt            v
                      |                      \----- switch_allocator (request matrix,
                      v                              one round-robin arbiter per output)
                 front flit ------------------------> crossbar --> out_port[o]
```

### Input buffers and virtual channels (`input_buffer`)

Each input port holds `NUM_VC` FIFOs of `FIFO_DEPTH` flits (2 x 8 by
default). Flow control is store-and-forward. A packet is admitted only when
one channel has room for all of it. It is written into the lowest-numbered
channel that does, so channel 1 only starts filling once channel 0 is full. A
packet becomes visible to the rest of the router only when its tail flit has
been stored.

On the read side, the port locks onto one channel holding a complete packet
until that packet's tail has left. It picks among such channels round robin.
As a result, two packets entering one port can leave it in the opposite
order.

The buffer also keeps:

- `flit_cnt`, the flits held over all channels;
- the BOV flag, `flit_cnt > floor(BOV_PCT * FIFO_DEPTH * NUM_VC / 100)`.
  With the defaults that is more than 12 of 16 flits;
- a 32-bit count of received packets.

### Route computation (`route_compute`)

This is the part worth reading closely. The unit works out the current and
destination row and column from the node ids:

- **Already at the destination:** the packet goes to the Local port.
- **Only one dimension left:** the packet goes on its single minimal port,
  exactly as XY routing would.
- **Both dimensions left** (a *reroutable* packet): the X port (East/West) and
  the Y port (North/South) are both minimal. The unit decides between them as
  follows.

```
if requests(X) > requests(Y):
    if not bov_in[X] and requests(X) * PACKET_SIZE < PEND_THRESH:  take X
    elif not bov_in[Y]:                                           take Y   (rerouted)
    else:                                                         take X
else:                                                             take X
```

`requests(P)` is the number of this router's inputs whose latched route is
output P. That is the column sum of the router's request matrix, and it
includes a packet already being sent there.

`PEND_THRESH` is the BOV threshold in flits (12 by default). So a queue on X
counts as too long once the flits it would push downstream exceed what the
neighbour may hold before raising its own BOV flag.

Notes:

- XY routing is the fallback whenever the alternative is no better. A router
  only leaves XY when X is busier than Y here *and* either the neighbour on X
  is congested or the queue on X is long, *and* the neighbour on Y is not
  congested.
- A packet can be rerouted at any router where it still needs both
  dimensions. After its last column change it is an ordinary XY packet.
- With a 100 % BOV threshold (16 of 16 flits), a router reroutes only when
  four inputs are waiting on one X output. In practice the design then
  behaves almost like XY routing.
- `ADAPTIVE = 0` turns the unit into plain XY routing. Use it as the
  baseline for comparisons.

The unit is combinational. The router samples it once per packet, on the
cycle the packet is first presented, and latches the result until the tail
flit has left. The route therefore reflects the BOV flags and queue lengths
at that moment.

### Switch allocation (`switch_allocator`, `rr_arbiter`)

The latched routes form a 5x5 request matrix. Rows are inputs, columns are
outputs, and each row has at most one 1. Each output has its own round-robin
arbiter. After a grant, the granted input has the lowest priority and the
next input the highest. The pointer moves only when a grant is actually
taken. A grant is registered and held until the packet's tail flit has
crossed the output, so the flits of a packet are never interleaved with
another packet's flits.

### Crossbar and output handshake (`crossbar`)

One multiplexer per output connects the granted input's front flit to the
output. The output's `ready` becomes that input's pop.

In every router, `in_ready` and `out_req` depend only on registered state.
Long chains of routers therefore have no combinational path through them. A
flit on offer is held, unchanged, until it is taken; an assertion checks
this.

### Timing

These times assume no contention.

| edge | what happens |
|------|--------------|
| t | the tail flit is stored |
| t+1 | the packet is presented |
| t+2 | its route is latched |
| t+3 | the output is granted |
| t+4 | the head flit leaves, then one flit per cycle |

The tail flit leaves `PACKET_SIZE + 3` cycles after it arrived (7 for 4-flit
packets).

End to end, from the cycle a core takes `gen_pkt` to the cycle `rx_done` is
raised, the latency is `4 + (PACKET_SIZE + 3) * (routers crossed)`. Corner to
corner on a 4x4 mesh that is 4 + 7 * 7 = 53 cycles.

## The local core (`local_cpu`)

On `gen_pkt`, while `tx_busy` is 0, the core builds a packet for `gen_dest`
with packet id `gen_pkt_id`. It sends the packet one flit per accepted
handshake.

On receive, it accepts flits while `rx_en` is 1 and remembers the source from
the head flit. On the tail flit it pulses `rx_done` with the source, the
packet id and a check that the packet was addressed to this node. It also
increments `num_pkts`.

A core stays busy while its router cannot take the packet. A traffic source
that finds its core busy has to drop or delay the packet. That is how a
full network pushes back on injection.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `MESH_SIZE` | 4 | mesh is MESH_SIZE x MESH_SIZE (up to 15) |
| `FIFO_DEPTH` | 8 | flits per virtual channel |
| `NUM_VC` | 2 | virtual channels per input port |
| `PACKET_SIZE` | 4 | flits per packet (at least 2, at most FIFO_DEPTH) |
| `BOV_PCT` | 75 | BOV threshold, % of FIFO_DEPTH * NUM_VC |
| `ADAPTIVE` | 1 | 1 congestion aware X/Y routing, 0 plain XY |

The defaults are the router specification: 8-flit FIFOs, 2 virtual channels,
and a 75 % threshold.

The evaluations behind the design also use a single 16-flit channel
(`FIFO_DEPTH=16, NUM_VC=1`). That setting has the same 12-flit threshold.
They also use 8x8 meshes and 2- and 8-flit packets. All of these are
parameter overrides of the same RTL.

## Where this RTL departs from, or adds to, the original design

- **Timing.** The original performance figures come from a behavioural
  simulator that charges two cycles per router stage. This RTL is a real
  pipeline with its own timing (see above). Absolute latencies therefore
  differ from those figures. Trends under load are what to compare.
- **Route computation threshold.** The congestion aware rule compares
  pending requests on the X port with "a threshold" and gives no value. This
  RTL uses the BOV threshold, counted in flits (see route computation).
- **Choosing a virtual channel.** The buffer picks the channel itself. Flits
  carry no VC number, and links carry no per-channel flow control.
- **Reading out of the virtual channels.** The read order (round robin among
  channels holding a complete packet) is this design's own choice.
- **Packet counts.** `num_pkts` is kept per input port rather than once per
  router.
- **Reset and edge ports.** Reset is asynchronous and active low. Edge ports
  are tied off.
- **Block-level control.** The original router was produced by high-level
  synthesis and had block-level start/done control. This RTL runs freely on
  `clk`/`rst_n` and has no such control.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_noc_pkg` | flit layouts and field extraction, round trip for all ids |
| `tb_rr_arbiter` | rotation order and fairness against a reference model |
| `tb_input_buffer` | store-and-forward admission, VC filling order, `flit_cnt`, the BOV threshold edge, back-pressure |
| `tb_route_compute` | XY ports for every router/destination pair; the congestion aware rule in hand-picked cases and against a reference model with random flags and counts |
| `tb_switch_allocator` | one grant per output, grants held until the tail, round-robin order, request counts |
| `tb_crossbar` | routing, pop only on ready |
| `tb_router` | 7-cycle latency, XY to every destination, contention, stalls, BOV, a reroute |
| `tb_local_cpu` | flit sequence, delivery report, counters |
| `tb_noc_mesh` | corner-to-corner latency, all-to-all delivery, hotspot traffic |
| `tb_noc_top` | the whole network at default parameters (see below) |
| `tb_noc_routing_compare` | XY against congestion aware routing on identical traffic, on an 8x8 and a 4x4 mesh with one 16-flit channel |

`tb_noc_top` first checks zero-load latencies, including a node sending to
itself. It then runs random, shuffle, neighbour and transpose traffic, 5000
cycles each at a mean injection interval of 15 cycles. After that come a
heavier random phase and a hotspot phase. It checks that every packet
arrives exactly once at the right node, and that every counter agrees. It
also counts, inside the routers, each mechanism of the design: reroutes, BOV
flag rises, input stalls, admissions to the second virtual channel, outputs
with competing requests, and refused injections. Each must happen at least
once.

What the comparison shows with the parameters above (5000 injection cycles,
one 16-flit channel per port, 75 % threshold, identical injection attempts):

| run | packets handled XY / CA | avg latency XY / CA | peak latency XY / CA | reroutes |
|-----|-------------------------|---------------------|----------------------|----------|
| 8x8, transpose, interval 15 | 9480 / 14314 | 213.6 / 206.0 | 4842 / 1399 | 17402 |
| 4x4, random, interval 21 | 3837 / 3837 | 32.3 / 32.3 | 76 / 76 | 0 |

Adding two rows for the threshold study (4x4, transpose, interval 21,
BOV threshold 50 % and 100 %) to `row()` gave:

| run | packets handled XY / CA | avg latency XY / CA | peak latency XY / CA | reroutes |
|-----|-------------------------|---------------------|----------------------|----------|
| 4x4, transpose, interval 21, 50 % | 2825 / 2828 | 61.0 / 39.1 | 247 / 83 | 88 |
| 4x4, transpose, interval 21, 100 % | 2807 / 2807 | 47.7 / 47.7 | 160 / 160 | 0 |

These rows are left out of the default testbench only because they double
its compile time.

On transpose traffic, which loads a few links heavily, moving reroutable
packets off the congested X links lets the network accept half again as many
packets and cuts the worst-case latency by a factor of three. On a lightly
loaded 4x4 mesh with random traffic the rule never fires and the network
behaves exactly like XY routing.

`tb/noc_traffic.sv` is the reusable traffic source and checker behind the
comparison. It generates the same pseudo-random attempts for any routing
choice, and reports packets handled, average and peak latency, and waiting
time. Waiting time is latency minus the packet's zero-load latency.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/noc_pkg.sv tb/tb_noc_top.sv --top-module tb_noc_top -o sim
./obj_dir/sim
```

Replace `tb_noc_top` with any other testbench name. To study another
configuration, override the parameters of `noc_top`, for example
`noc_top #(.MESH_SIZE(8), .FIFO_DEPTH(16), .NUM_VC(1)) dut (...)`. Or add a
row to `tb_noc_routing_compare`. Each distinct configuration is a separate
elaboration of the whole network, so compile time grows with the number of
rows.
