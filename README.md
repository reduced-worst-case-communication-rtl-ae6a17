# Priority-preemptive SHARP network-on-chip

A mesh network-on-chip where a flit can cross several routers in a single
clock cycle, and where contention is settled by fixed packet priorities, not
by distance. The goal is a latency that can be bounded for real-time traffic.

In an ordinary mesh a flit pays a router pipeline at every hop. A SHARP-style
router instead lets a flit travel on a *bypass path*: a setup request (SSR)
moves ahead of it, router by router, and each router it wins at connects the
incoming link straight to the outgoing one. One cycle can cover up to
`HPC_MAX` links (6 by default). In an idle network a packet of `L` flits over
`h` links then arrives after

    2 * ceil(h / HPC_MAX) + (L - 1) cycles

that is, `(t_r + t_w) * ceil(h / HPC_MAX) + t_w * (L - 1)` with one router cycle
and one link cycle per stopping point. Unlike the original distance-based
arbitration, every arbiter here compares the same three keys, in this order:

1. the packet priority (a smaller number wins);
2. the packet's release time: among equal priorities the older packet wins (FIFO);
3. the direction of travel at an output: straight, then left turn, then right turn.

Arbitration is done again for every flit (wormhole flow control). A
high-priority packet can therefore take an output away from a low-priority
packet between two of its flits. The preempted packet waits in its virtual
channels and continues later.

## Structure

| file | what it is |
|---|---|
| `rtl/sharp_pkg.sv` | flit, link, VC-status and arbitration types; XY routing, turn classes and the compare rule |
| `rtl/prio_arbiter.sv` | N-input arbiter: a binary tree of comparators using the rule above; ties go to the lower index |
| `rtl/vc_fifo.sv` | one VC's flit buffer (`DEPTH` flits) |
| `rtl/vc_map_table.sv` | per-port VC-to-packet table keyed by (source, packet id) |
| `rtl/vc_select.sv` | finds a flit's VC in a port's status: a free VC of its priority for a head flit, its packet's VC otherwise |
| `rtl/input_unit.sv` | one input port: 12 VCs, the table, and local switch allocation (SA-L) |
| `rtl/sharp_router.sv` | five input units plus global switch allocation (SA-G) and the crossbar |
| `rtl/sharp_mesh.sv` | `MESH_X` x `MESH_Y` routers wired into a mesh (top level) |

VCs are grouped by priority: `VC_PER_PRIO` = 6 VCs per level, so a port has
`NUM_PRIO * 6` VCs. Six VCs per level are meant to cover a buffer turnaround
of about six cycles. `NUM_PRIO` is 2 by default, so the priority field is 1 bit.

## What a flit and a link carry

Every flit carries its full header:

- type (head, body, tail, or a single-flit packet);
- priority;
- 16-bit release time stamp;
- source x/y;
- 8-bit packet id;
- destination x/y;
- 32 bits of payload.

A link carries a valid bit, the hop budget left for this cycle, and the flit.
The valid bit and hop budget are the SSR part, the flit is the data part.
Both move in the same cycle. In the other direction, each input port exports
a registered status word for every VC: reserved or not, for which packet,
full, and empty. The upstream router uses this status as its credit.

## One cycle in a router (SA-G)

For each input port there are up to two candidates:

- the flit arriving on the link, which could bypass this router;
- the flit that SA-L picked from this port's buffers in the previous cycle.

The flit from the PE port is always treated as arriving and is buffered.
Candidates are screened by blocking tests, in this order:

- **flit order**: if flits of the arriving packet are already buffered here,
  the arriving flit must be buffered behind them;
- **hop limit**: a flit with no hops left stops here;
- **credit**: a request for a mesh output needs a VC at the next router. For a
  head flit that means a free VC of its priority. For a body or tail flit it
  means the VC its packet reserved. In both cases the VC needs a free slot.

The surviving candidates of each port are arbitrated (input arbitration).
Then each output arbitrates among the port winners routed to it by XY
routing (output arbitration). The configuration step follows:

- an arriving flit that won an output passes through, with its hop count
  reduced by one;
- a buffered flit that won is popped and leaves with a fresh `HPC_MAX` budget;
- an arriving flit that lost is written into its VC.

A flit whose destination is this router is handed to the PE in the same
cycle, straight off the bypass path.

Because all of this is combinational from `link_in` to `link_out`, the next
router sees the flit in the same cycle and repeats the process. The chain
ends at the first router where the flit loses, is blocked, runs out of hops,
or reaches its destination. XY routing keeps the chain free of loops: x moves
feed y moves, never the reverse. Lint tools that treat the mesh's link
arrays as single signals report a combinational loop (UNOPTFLAT) that does
not exist bit by bit.

## VC reservation

A head flit reserves a VC of its priority at **every** router it enters,
whether it stops there or passes through. The tail flit frees the VC at every
router it passes, or when it leaves the buffer there. A body flit that stops
early therefore always finds its packet's VC. The key is (source x, source y,
packet id), so two packets may use the same packet id if they come from
different sources.

## Timing

- A flit written into a VC at a clock edge is chosen by SA-L in the next
  cycle, a registered choice.
- It crosses the crossbar and links in the cycle after that.
- A stopping router therefore costs 2 cycles, then one flit follows per cycle.
- Injection: `inj_flit` is taken at a clock edge where `inj_valid` and
  `inj_ready` are both high. Ejection: `ej_valid`/`ej_flit`, and the PE must
  always accept.

The credit status is registered. With 2-flit VCs it reaches the upstream
router one cycle late. In an idle network a body flit can then see a full VC
at the next stop, although that VC is being drained in the same cycle. The
body flit stops one router earlier and pays up to 2 extra cycles for each
extra stop. The latency formula above is therefore a lower bound. With 2-flit
VCs it holds to within `2 * (stops - 1)` cycles for packets longer than two
flits. The testbenches check exactly that.

## Departures from the published scheme

- The SSR and its flit travel together in one cycle. The scheme this design
  follows separates setup and traversal into pipeline stages, which are not
  specified in detail. The resulting router stage is the best case (1 cycle
  plus 1 link cycle).
- Where a destination is reached, the router compares the destination with
  its own coordinates (`my_x`/`my_y`) instead of carrying separate eject
  flag and eject port fields.
- The direction order (straight, then left, then right) and the FIFO key
  (release time stamp) are this design's choices.
- The credit check looks only at the next router, through its registered
  status. A head flit reserves its VC at each router as it arrives.
- Preemption is a consequence of per-flit arbitration. The router only keeps
  per-output registers so that it can count preemptions.
- The low-swing clockless repeated link circuit that makes multi-hop
  traversal possible is not modelled; a link is a plain wire here. The
  processing elements are not part of the design.
- The default has 2 priority levels. The evaluated setting, one priority
  level per flow with up to 100 flows, needs `NUM_PRIO` raised in
  `sharp_pkg`, at 30 VCs per level and router.

## Parameters

| parameter | default | also used in the evaluated settings |
|---|---|---|
| `MESH_X`, `MESH_Y` | 8 | 10, 16 |
| `HPC_MAX` | 6 | 4 (at most 15 with `HOP_W` = 4) |
| `BUFF` (flits per VC) | 2 | 32 |
| `NUM_PRIO` (package) | 2 | up to 100 |
| `VC_PER_PRIO` (package) | 6 | 6 |

Coordinates are 4 bits wide, which covers meshes up to 16 x 16.

## Simulation

Every testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`. Each one has a watchdog.

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_sharp_mesh \
  -y rtl +libext+.sv rtl/sharp_pkg.sv tb/tb_sharp_mesh.sv
./obj_dir/Vtb_sharp_mesh
```

- `tb_prio_arbiter`, `tb_vc_fifo`, `tb_vc_select`, `tb_vc_map_table`:
  randomized tests against a reference model.
- `tb_input_unit`: VC choice per priority, SA-L by priority and FIFO, VC
  freeing, back-to-back pops.
- `tb_sharp_router`: one router at (2, 2) with hand-driven neighbours. It covers:
  - bypass with one hop used, and VC reservation;
  - the hop limit and restart with a fresh budget two edges later;
  - ejection from the bypass path;
  - straight/left/right order, priority over direction, and FIFO over direction;
  - credit stalls and flit-order stalls;
  - preemption of a packet from the PE.
- `tb_sharp_mesh`: a 4 x 4 mesh with `HPC_MAX` = 2 and 2-flit VCs. It runs:
  - zero-load packets, with the latency checked against the formula;
  - a preemption scenario;
  - a same-priority FIFO scenario;
  - random traffic of 5 to 50-flit packets.

  Every flit is checked for order and content at its destination. The test
  counts each mechanism (bypass, each kind of stop, preemption, FIFO wait,
  ejection from the bypass path) and fails if one never happened.

The largest configuration simulated is that 4 x 4 mesh. The 8 x 8 default
mesh compiles and passes lint, but its C++ model takes too long to build for
a routine test run. To simulate it, instantiate `sharp_mesh` with no
parameter overrides in a copy of `tb_sharp_mesh` with `MX = MY = 8` and
`HPC = 6`.
