# Virtual Circuit Tree Multicasting: a 4x4 on-chip network with hardware multicast

A conventional packet-switched network on chip sends a multicast as a burst
of unicasts, one per destination. They all leave the same source in the same
few cycles, fight for the same injection port and links, and load the
network for no gain. Virtual Circuit Tree Multicasting (VCTM) sends one packet
instead. The packet carries a small *tree number*. At every router it looks
that number up in a table that lists the output ports the tree leaves by,
and the router copies the flit to each of them.

The key idea is how the tables are filled. No separate setup protocol and no
destination list in the header are needed. The first time a source multicasts
to a new destination set, it sends ordinary X-Y routed unicasts, one per
destination, marked *unicast+setup*. Each one writes its own output port into
the tree's entry in every router it passes. Once they have passed, the union of
their X-Y paths is stored in the network as a tree. Later multicasts to the same
set are single packets that follow it.

This repository holds synthesizable SystemVerilog for the whole network:

* 16 five-port virtual-channel routers with tree tables, arranged as a 4x4 mesh;
* one network interface per tile, with the destination-set CAM;
* self-checking testbenches for every block and for the whole mesh.

## Contents

| file | what it is |
|---|---|
| `rtl/vctm_pkg.sv` | constants, flit header, link and credit types, table entry type |
| `rtl/vctm_mesh.sv` | top level: 4x4 mesh of routers and network interfaces |
| `rtl/vctm_router.sv` | one router: routing, buffers, allocation, crossbar, multicast replication |
| `rtl/vct_table.sv` | the tree table of a router |
| `rtl/xy_route.sv` | X-then-Y route computation |
| `rtl/input_buffer.sv` | per-port slot pool shared by the VC queues, with credit return |
| `rtl/vc_allocator.sv` | output VC busy bits and downstream slot accounting |
| `rtl/switch_allocator.sv` | separable round-robin switch allocator |
| `rtl/rr_arbiter.sv` | round-robin arbiter (helper) |
| `rtl/crossbar.sv` | 5x5 flit crossbar |
| `rtl/vctm_nic.sv` | network interface: unicast / multicast / setup decision, injection, ejection |
| `rtl/dest_set_cam.sv` | destination set CAM with oldest-first replacement |
| `tb/tb_<module>.sv` | a self-checking testbench per module; `tb_vctm_mesh` runs the whole mesh |
| `tb/tb_vctm_traffic.sv` | synthetic traffic on the whole mesh: broadcasts, uniform random load with multicasts |

## Default configuration

| parameter | value | where |
|---|---|---|
| mesh | 4 x 4, X-Y routing | `MESH_X`, `MESH_Y` in `vctm_pkg` |
| link / flit width | 128 bits (16 bytes) | `FLIT_W` |
| router ports | 5: Ej (local), N, S, E, W | `NUM_PORTS` |
| virtual channels per port | 4 | `NUM_VCS` |
| buffers per input port | 24 flit slots shared by the 4 VCs | `BUF_PER_PORT` |
| tree table | 1024 entries of 9 bits per router, 64 trees per source | `VCT_TOTAL`, `VCT_PER_SRC` |
| destination set CAM | 64 sets of 16 bits per interface | `CAM_ENTRIES` on `vctm_mesh` / `vctm_nic` |
| packet length | 1 to 5 flits | `req_len` |

The network size, VC count and table size are package constants, because the
flit header widths depend on them. The CAM size is a module parameter. It must
not exceed `VCT_PER_SRC`.

## Packets and the flit header

Every flit is one 128-bit word. The header occupies the top 22 bits:

| field | bits | meaning |
|---|---|---|
| kind | 2 | `00` head, `01` body, `10` tail, `11` head and tail (single flit) |
| type | 2 | `00` normal unicast, `01` unicast+setup, `10` multicast |
| Id | 1 | generation bit of the tree (see below) |
| VCT# | 10 | {source node (4), tree number at that source (6)} |
| Dst | 4 | destination node of a unicast |
| VC | 3 | virtual channel on the current link (rewritten at each hop) |
| payload | 106 | data |

Nodes are numbered row by row: node `n` is at column `n % 4` and row `n / 4`.
Row 0 is the north edge, so node 1's South neighbour is node 5.

* A **normal unicast** is X-Y routed from its Dst field and never touches
  the tree tables.
* A **unicast+setup** is routed exactly like a unicast and delivered to its
  destination. In passing, it adds its output port to the table entry
  `{source, tree}` of every router on its path.
* A **multicast** ignores Dst. At each router it reads the entry
  `{source, tree}` and is copied to every output port listed there. A copy
  that goes out through the Ej port is delivered to the local tile.

## The tree table and the Id bit

Each router holds one 9-bit entry per `{source, tree}` pair:

```
  Id | Ej N S E W | fork count (3 bits)
```

The table is divided statically among the sources, 64 entries each, so
tree numbers are local to their source. A setup packet arriving with Id `i`
and X-Y output port `p` updates the entry as follows:

* If the stored Id is not `i`, the entry belongs to an older tree that used
  the same number. It is overwritten with `{i, only p, count 1}`.
* If the Id matches and `p` is not yet marked, `p` is added and the count is
  incremented.
* If the Id matches and `p` is already marked, nothing changes. An earlier
  setup packet of the same tree already took that branch.

Example: source 0 sends to nodes {2, 3, 5} as tree 1. At node 1, the entry
of tree 1 starts as `0 | 0 0 1 0 0 | 1`, left over from an old tree. The
setup packet for node 2 arrives with Id 1. It finds the entry stale and
rewrites it to `1 | 0 0 0 1 0 | 1` (East only). The packet for node 5 adds
South: `1 | 0 0 1 1 0 | 2`. The packet for node 3 also leaves East, so it
changes nothing. A later multicast on tree 1 is therefore copied twice at
node 1. `tb_vct_table` replays this sequence of updates on a bare table.

The Id bit lets a source replace a tree without clearing the old entries
across the network. When the interface reuses a tree number, it flips that
number's Id bit. The first setup packet of the new tree to reach each router
then recognises the old entry as stale. Trees are replaced only at the
source, so a multicast never finds a missing entry downstream. An assertion
in the router checks that a multicast never reads an empty entry.

Because every tree is the union of X-Y paths from one source, all packets of
a given source enter a given router through the same input port. The table
therefore has one read/write channel per input port, and two channels can
never write the same source's partition in one cycle. An assertion checks
this too.

## Network interface

`vctm_nic` accepts one message at a time: a destination set (one bit per
node), a length in flits and a payload word. It removes its own node from
the set and then sends:

| destinations | destination CAM | what is sent |
|---|---|---|
| one | not used | one normal unicast |
| several | hit | one multicast packet with the CAM's tree number and Id |
| several | miss | the oldest tree is replaced (Id flipped); one unicast+setup per destination, lowest node first, in consecutive cycles |

The CAM is searched in the cycle the message is accepted. Every flit of the
packet carries the same payload word. The interface injects one flit per
cycle. It keeps credits for the router's local input VCs and takes an idle VC
for each packet. `req_ready` rises again once the last flit of the message
has been injected.

Ejected flits are handed to the tile unchanged (`rx_valid`, `rx_flit`) in
the cycle they arrive, and their credit goes back at once. The tile must
therefore accept every flit.

## Inside the router

### Timing

```
cycle 0  flit arrives on the link; its route is computed and written into the
         VC queue with it (X-Y logic, or the tree-table read for a multicast)
cycle 1  VC + switch allocation, crossbar, captured in the output register
cycle 2  the register drives the link: the flit arrives at the next router
```

With no contention, a flit spends two cycles per router. A one-flit unicast
from node 0 to node 15 passes 7 routers. It reaches the tile 16 cycles after
its request is presented: one edge to accept the request, one for the
interface's flit register, and 2 x 7 in the routers. `tb_vctm_mesh` checks
this figure.

Computing the route while the flit is written stands in for lookahead
routing. In a lookahead design the route, or the tree lookup, is done one hop
ahead, and the router keeps only allocation and switch traversal in its own
pipeline. This design keeps the same two-cycle hop but does not build a
separate lookahead signal network.

### Replicating a multicast flit

A buffered flit keeps a record of its route (the set of output ports), the
ports already served and the number of grants it has received. In each
cycle it requests one of its remaining ports, the lowest-numbered one that can
take it. It leaves the buffer only when the number of grants equals the fork
count of its route. Only then is its slot freed and a credit sent upstream.
A flit that branches three ways therefore leaves on its three ports in three
consecutive cycles (if nothing else competes), and its credit returns after
the third copy. `tb_vctm_router` checks both.

Each branch of a multi-flit multicast gets its own downstream VC. The head
flit allocates it on that port and the tail frees it. Body flits follow on
the VCs recorded for their packet, port by port. Nothing is reserved ahead of
a packet, and trees follow X-Y routes from their source, so multicast
branching adds no cyclic dependency to the X-Y routed network.

### Shared input buffers

Each input port has one pool of 24 flit slots, shared by its four VCs. Each
VC keeps its queue as a linked list through the pool. An arriving flit takes
the lowest free slot and is linked behind its VC's tail. A freed slot goes
back to the pool, and its credit goes upstream in the same cycle.

The upstream router (or interface) counts how many slots each VC occupies
downstream. A VC may send a flit if it holds no slot yet. It may also send
if all VCs together hold fewer than 20 slots beyond their first. So one VC
can fill up to 21 slots, and every VC always keeps one slot of its own. A
blocked packet can therefore never take the last slot another VC needs.
Sharing matters for multicast: a branching flit stays in its slot until its
last branch is served, and the shared pool absorbs that longer stay.

### Allocation

* `vc_allocator` keeps, for each output port and downstream VC, a busy bit
  and the number of downstream slots the VC occupies. It offers the lowest
  idle VC that may send under the rule above.
* A VC in `vctm_router` requests an output only when it can use it. A head
  flit needs an idle VC there that may send. A body flit needs the VC its
  packet already holds to be allowed to send. VC allocation therefore never fails, and
  it is done in the same cycle as switch allocation.
* `switch_allocator` is separable and input-first. A round-robin arbiter per
  input picks one requesting VC. A round-robin arbiter per output then picks
  one input.
* Credits go upstream combinationally, in the cycle a slot is freed, and are
  counted at the next edge.

## Where this design departs from the published one

* **Lookahead.** No lookahead network is built. Routes are computed on
  arrival, which keeps the two-cycle hop (see *Timing*). A normal unicast
  is routed from its destination field, not from a route field in the header.
* **Input buffer bypass** is not built: every flit is written into a buffer.
* **Speculation.** The original allocates VCs speculatively. Here VC and
  switch allocation happen in the same cycle without misspeculation, because
  a request is raised only when a free VC that may send exists.
* **Tables as flip-flops.** The tree table and the CAM are flip-flop arrays
  with reset, not SRAM/CAM macros. The original sizes them with memory
  compiler estimates, which this RTL does not reproduce.
* **Choices where the original is silent:** the body, tail and single-flit
  codes; the 4-bit source + 6-bit tree split of the 10-bit VCT# field; port
  order and node numbering; the interface's request format; how the
  buffer sharing is organised (linked lists, one reserved slot per VC);
  lowest-first order of setup packets; oldest-first CAM replacement as a circular
  pointer; synchronous active-low reset; lowest-free-VC selection;
  round-robin arbitration.
* **Packet ordering.** A multicast must not overtake the setup packets of its
  own tree. The network does not order packets on different VCs, so a
  multicast sent immediately after its setup packets could in principle
  reach a router before the last of them. The same holds for a tree number
  that is reused while packets of the old tree are still in flight. The
  original does not discuss this. The end-to-end testbench avoids it by
  letting each source send its next message only after the previous one has
  been delivered.
* Only the 4x4 network is built. A 5x5 mesh would need 5-bit node fields,
  which the 10-bit VCT# field cannot hold next to a 6-bit tree number.

## Configurations this RTL can and cannot hold

* Broadcast-heavy coherence protocols (all 15 other nodes) need one tree per
  source, and so do protocols with a few fixed destination sets. Both fit
  easily.
* Tables of 16 to 1024 trees in total fit, either as they are or by using
  fewer trees per source (`CAM_ENTRIES`). Larger totals (2048, 4096) need
  `VCT_TOTAL` raised. That also widens the tree field and the header.
* Packets of 1 to 5 flits fit. The length field allows 7, and one VC can
  fill up to 21 slots of its port's pool.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog that counts a failure if it hangs. The
simulator used is Verilator 5 (two-state; everything that is read is reset).

```sh
# one block, e.g. the router
verilator --binary --timing --assert -Irtl rtl/vctm_pkg.sv rtl/*.sv \
          tb/tb_vctm_router.sv --top-module tb_vctm_router -Mdir obj_router
./obj_router/Vtb_vctm_router

# the whole mesh at its default size
verilator --binary --timing --assert -Irtl rtl/vctm_pkg.sv rtl/*.sv \
          tb/tb_vctm_mesh.sv --top-module tb_vctm_mesh -Mdir obj_mesh
./obj_mesh/Vtb_vctm_mesh
```

The mesh takes a few minutes to compile, because of the sixteen
1024-entry tables. It then simulates its few thousand cycles in well under a
second. `tb_vctm_mesh` first checks the zero-load latency and one tree build
followed by a multicast on it. It then runs all sixteen tiles at once with
random unicasts (1 to 5 flits) and multicasts. Node 0 cycles through more
destination sets than it has trees, which forces trees to be replaced.
Finally, every tile at once sends 5-flit messages to 14 new destinations.
Each goes out as 70 flits of setup packets, which fills the shared input
pools and makes the interfaces stall. Every
delivered flit is checked against a scoreboard. The test also counts how
often each mechanism occurred: unicasts, tree setups, multicasts on existing
trees, tree replacements, stale table entries, branching grants, switch
contention, injection stalls and multi-flit packets. A mechanism that never
occurs counts as a failure.

`tb_vctm_traffic` runs synthetic traffic on the full mesh. First, every node
broadcasts to the 15 others twice on an otherwise idle network. The first
time, the broadcast goes out as 15 setup unicasts. The second time it is one
multicast packet. The test counts the flits that leave router ports. The
unicasts must cost the sum of their X-Y hop counts plus 15 ejections. The
multicast must cost exactly 30: one flit per tree edge, plus 15 ejections.
Both latencies are printed. At zero load the tree is not always faster.
From a corner node, its one-port-per-cycle replication can take as long as
the unicast burst. Then all tiles
run uniform random traffic at a low and a high load. 90 % of messages are
unicasts, half of them 1-flit requests and half 5-flit data packets. The
other 10 % are multicasts to reused destination sets. The test prints the
average latencies of each phase.

## Verification status

* All block testbenches and both whole-mesh testbenches pass.
* Each block testbench was also run against a copy of its module with one
  deliberate bug, and every such copy failed.
* Not verified: behaviour under sustained saturation for long runs, and
  larger table sizes than the default.
