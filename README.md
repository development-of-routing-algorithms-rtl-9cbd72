# Shortest-path routing for a network-on-chip on the circulant C(N; D, D+1)

A mesh or torus gives each router four network links. The circulant graph
C(N; D, D+1) uses the same four links per router but wires them differently.
The N routers sit on a ring, and router *i* connects to routers
*i ± D* and *i ± (D+1)* (mod N). If D is chosen as D = ⌈√(N/2) − 1⌉, the
diameter is the smallest possible for this family: 7 hops for 100 nodes,
where a 10 × 10 mesh needs 18.

Each router decides only the next hop of a packet. It uses a small piece of
arithmetic on three stored numbers (its own number, N and D) and the
destination carried in the packet. It needs no routing table, so the routing
state of a router grows with log N, not with N². Every packet still follows a
shortest path.

This repository holds synthesizable SystemVerilog for that routing unit,
a five-port router built around it, and the whole network. Self-checking
testbenches are included.

## Topology

| Port | `port_e`      | Link                |
|------|---------------|---------------------|
| 0    | `PORT_LOCAL`  | the core at this node |
| 1    | `PORT_S1_CW`  | to node i + D       |
| 2    | `PORT_S1_CCW` | to node i − D       |
| 3    | `PORT_S2_CW`  | to node i + D + 1   |
| 4    | `PORT_S2_CCW` | to node i − D − 1   |

Output port *k* of router *i* drives input port *k* of router *i + step(k)*.
So input port *k* always receives flits that travelled over a link of type
*k*.

`circ_noc_pkg::optimal_gen_d(N)` returns the smallest D with 2(D+1)² ≥ N,
which equals ⌈√(N/2) − 1⌉. It gives these sizes:

| N | 9 | 16 | 25 | 36 | 49 | 64 | 81 | 100 |
|---|---|----|----|----|----|----|----|-----|
| D | 2 | 2 | 3 | 4 | 4 | 5 | 6 | 7 |
| diameter (hops) | 2 | 3 | 3 | 4 | 5 | 6 | 6 | 7 |

The testbench checks these diameters by breadth-first search.

## The routing decision (`circ_route_unit`)

The useful fact about D and D+1 is that their difference is 1. A "single
hop" of +1 costs two link hops: +(D+1) and then −D. So any path is a mix of
big moves and small corrections. The unit finds the cheapest mix along the
ring, and then takes the first hop of that mix.

1. **Direction and length.** offset = (dst − cur) mod N. If the offset is 0,
   the packet goes to the local port. If the offset is larger than N/2, the
   packet travels counter-clockwise over l = N − offset. Otherwise it travels
   clockwise over l = offset. Every later step uses l ≥ 0, and the direction
   only picks between the `_CW` and `_CCW` ports.
2. **Two divisions.** n1 = ⌊l/D⌋, r1 = l mod D, n2 = ⌊l/(D+1)⌋ and
   r2 = l mod (D+1). Both are computed by repeated subtraction, one step per
   clock, running side by side.
3. **Choice of generator.**
   - **r2 = 0.** l is a whole number of (D+1)-hops. Take D+1.
   - **n2 + r2 ≥ D.** l can be covered in n2 + 1 hops of D or D+1 mixed.
     Take D. Each D-hop raises the remainder mod (D+1) by one, so later
     routers keep taking D until the remainder is 0, and then take D+1.
   - **Otherwise, compare two plans:**
     - Plan A goes n1 hops of D and then r1 single hops. It costs 2·r1 − n1
       hops, and its first hop is +(D+1).
     - Plan B takes one extra D-hop past the destination and then single
       hops back. It costs (n2+1)(2D+1) − 2l = 2D + 1 − n2 − 2·r2 hops, and
       its first hop is +D. The second form needs no multiplier.

     The cheaper plan wins. A tie goes to D+1.

The hop counts come from writing l = a(D+1) + bD and minimising |a| + |b|.
The cost is convex in t = a + b, so the best t is ⌈l/(D+1)⌉ or ⌊l/D⌋.
Each rule above picks a first hop after which the rest of the plan is
optimal for the next router. So the remaining hop count drops by exactly one
per hop. Every router works this out again without knowing the packet's
history, and the packet arrives in the minimum number of hops. For every
size in the table, the testbench checks all N² source/destination pairs
against a breadth-first search of the graph.

Example for N = 100, D = 7, from node 0 to node 19, which is 7 hops apart.

- At node 0, l = 19, n2 = 2 and r2 = 3. Since n2 + r2 < D, the plans are
  compared: plan A costs 2·5 − 2 = 8 and plan B costs 3·15 − 38 = 7. The
  router takes +7.
- Nodes 7 and 14 (l = 12 and l = 5) also pick plan B and take +7.
- At node 21 the destination is 2 behind. Going counter-clockwise, plan A
  costs 4 and plan B costs 11, so the router takes −8.
- Node 13 (l = 6) takes +7, and node 20 (1 behind) takes −8.
- At node 12, l = 7 gives n2 + r2 = 7 ≥ D, so the router takes +7 and the
  packet reaches node 19.

That is 7 hops, equal to the graph distance.

**Interface and timing.** `req_valid`/`req_ready` carries `req_dst`. The
answer is a one-cycle pulse on `res_valid` with `res_port` (a `port_e`) and
`res_dist`, the number of hops still needed. If the request is accepted at
edge *t*, `res_valid` is high after edge *t*+1 for a local destination, and
after edge *t* + 2 + ⌊l/D⌋ otherwise. That is at most 9 cycles for N = 100.
The unit holds 41 state bits.

## Router (`circ_router`)

Each of the five inputs has:

- a `flit_fifo` (4 deep by default);
- its own `circ_route_unit`;
- a small state machine: idle, computing, or routed to one output.

Each output has an `rr_arbiter` over the inputs routed to it. A crossbar then
forwards the winning flit. A flit leaves its buffer in the cycle where its
output's ready is high. If the output is busy or not ready, the flit waits,
and back-pressure spreads upstream as full buffers. `in_ready` is the
registered "not full" of a buffer. Routers can therefore be chained directly
with no combinational path between them.

**Flit.** A packet is one flit, `{payload, src, dst}`. Each address is
AW = ⌈log₂N⌉ bits (7 for N = 100) and the payload is `PAYLOAD_W` bits
(default 16). Only `dst` is used for routing.

**Configuration.** `cfg_node_id`, `cfg_n_nodes` and `cfg_gen_d` are loaded
into the router's registers on every clock edge while `rst_n` is low. So
`rst_n` is a synchronous load for these registers and an asynchronous reset
for everything else. Lint tools report this mix, and it is intended. Hold
reset for at least one clock edge.

**Latency without other traffic.** A flit written into an input buffer at
edge *t* leaves at edge *t* + 4 + ⌊l/D⌋. If it is addressed to this node, it
leaves at edge *t* + 3.

## Network (`circ_noc`)

`circ_noc` has these parameters:

- `N_NODES` (default 100);
- `GEN_D` (default `optimal_gen_d(N_NODES)`, which is 7);
- `PAYLOAD_W` (default 16);
- `FIFO_DEPTH` (default 4).

Its ports are unpacked arrays with one element per node:

- `inj_valid/inj_ready/inj_flit` carry flits from the core into the network;
- `ej_valid/ej_ready/ej_flit` carry flits from the network to the core.

All handshakes are valid/ready, and a flit moves when both are high. The
default network has 500 routing units and 500 four-entry buffers.

## Where this design makes its own choices

- **Router micro-architecture.** The routing method assumes an existing
  four-link router. The buffers, round-robin arbitration, crossbar,
  single-flit packets, the `src`/payload fields and the buffer depth are all
  this design's own.
- **Exact plan costs.** The step-by-step description of the method compares
  per-generator hop estimates. It also states the extra-hop test in a form
  that, read literally, takes the extra hop exactly when it does not help.
  This unit compares the exact hop counts of the two plans. That keeps the
  method's intent (take the extra D-hop when it saves single hops) and makes
  every route a shortest path.
- **Tie rule.** When both plans cost the same, D+1 wins.
- **Stored bits.** A router stores 22 configuration bits (7 + 8 + 7; N gets
  one bit more so that N = 2^AW fits). Each routing unit holds 41 bits of
  working state. The published estimate for N = 100 is 56 bits per router,
  counted for one routing computation per router. This design has one
  routing unit per input port.
- **Deadlock.** Nothing prevents it. Shortest-path routing around the
  circulant's rings, with one buffer class and no virtual channels, can
  deadlock under heavy load. With all 100 nodes injecting at 40 % and cores
  often stalling, the network locks up within a few thousand packets. The
  tests therefore use light load on the 100-node network (5 % injection per
  node). A deployment needs a deadlock-avoidance scheme, such as virtual
  channels with a dateline on each ring, which this design does not include.
- **Cores.** The cores on the local ports are outside this design.

## Verification

Every testbench checks its own results and ends with
`TB_RESULT checks=<n> failures=<m>`. A watchdog stops each one if it hangs.

| Testbench | What it shows |
|-----------|---------------|
| `tb_circ_route_unit` | For every size N = 9…100 in the table above and every source/destination pair:<ul><li>the local port is chosen only on arrival;</li><li>each hop is on a shortest path;</li><li>`res_dist` equals the distance;</li><li>the latency is exactly 1 or 2 + ⌊l/D⌋;</li><li>the largest distance equals the diameter.</li></ul> |
| `tb_flit_fifo` | Random push/pop compared with a queue model, including full and empty. |
| `tb_rr_arbiter` | The grant order compared with a reference round-robin pointer. |
| `tb_circ_router` | A router of C(100; 7, 8):<ul><li>transit time of lone flits;</li><li>a shortest-path port for every flit;</li><li>no loss or duplication under random output stalls with all inputs busy.</li></ul> |
| `tb_circ_noc` | An end-to-end run on C(25; 3, 4) (see below). |
| `tb_circ_noc_full` | The same test on the default C(100; 7, 8) with no parameter changes. |
| `tb_circ_noc_sizes` | Eight networks side by side, one for each size N = 9…100 in the table above. Random all-to-all traffic runs on each. All packets must arrive on shortest paths, and no route may be longer than the diameter. |

`tb_circ_noc` runs in three phases:

1. Lone packets: every hop and the final ejection must happen at the exact
   expected cycle.
2. All nodes inject to random destinations while cores stall at random.
3. One core stops while a neighbour sends it a burst, so a link must stall.

Every packet must arrive once, unchanged, at its destination. The total
number of link traversals must equal the sum of the shortest-path distances.
The testbench also counts how often each mechanism occurs and fails if one
never does. The mechanisms are: each link type, local delivery, all four
kinds of routing decision, counter-clockwise routing, output contention,
link back-pressure and ejection stalls.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/circ_noc_pkg.sv tb/tb_circ_noc.sv --top-module tb_circ_noc
./obj_dir/Vtb_circ_noc
```

Replace `tb_circ_noc` with any testbench name above. The full-size run takes
well under a minute.

## Files

- `rtl/circ_noc_pkg.sv`: port enumeration, the optimal-D and address-width
  functions.
- `rtl/circ_route_unit.sv`: the next-hop state machine.
- `rtl/flit_fifo.sv`, `rtl/rr_arbiter.sv`: the router's buffer and arbiter.
- `rtl/circ_router.sv`: the five-port router.
- `rtl/circ_noc.sv`: the network (top level).
- `tb/`: the testbenches listed above.
