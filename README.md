# 3D Network-in-Memory: a stacked NUCA L2 for an 8-core chip multiprocessor

A large shared L2 cache split into many small banks is fast only when the
accessed bank is near the processor. On a single die, the wires and router
hops to far banks dominate the hit latency. This design stacks the cache in
several device layers. Each layer holds a 2D mesh network-on-chip whose nodes
are L2 banks and processors. The layers are joined by a few vertical buses,
called *pillars*. A pillar reaches every layer in a single bus transfer, so a
bank directly above or below a processor is about as close as its neighbour
in the same layer.

On top of this interconnect sits a NUCA (non-uniform cache access)
management scheme, in two modes:
- **Dynamic (DNUCA, `migrate_en = 1`):** lines start in a cluster chosen by
  their address and move one cluster closer to the processor that uses them.
- **Static (SNUCA, `migrate_en = 0`):** lines stay where they were first
  placed.

The RTL here is synthesizable SystemVerilog for the interconnect, the bank
nodes and the cache directory. The processors, their L1 caches with L1
coherence, and main memory are not included. They attach at the top-level
ports.

## Floorplan of the default configuration

| item | default |
|---|---|
| layers | `NLAYERS = 2` |
| mesh per layer | `MESH_X x MESH_Y = 16 x 8` nodes |
| cluster | 4 x 4 nodes; 8 per layer, 16 in all |
| pillars | one per cluster column (the same (cx, cy) on every layer): 8 |
| pillar node | node (4cx+2, 4cy+2) of each cluster |
| processors | one per pillar: 8 CPUs, on layer (cx+cy) mod NLAYERS |
| banks | every other node: 248 x 64 KB |
| flit / link width | 128 bits |

Because CPUs go on alternating layers, no processor sits on top of another.
The hot cores are spread over all three dimensions, and each processor has
cache banks above and below it.

The processor of cluster (cx, cy) is CPU number `c = cy*NCX + cx` on the
top-level port arrays.

## Network inside a layer

Each node has a `noc_router` with five physical channels: local, N, E, S, W.
Pillar nodes have a sixth, vertical channel.

**Buffers.**
- Every input channel has 3 virtual channels (VCs).
- Each VC is a FIFO of 4 flits, which holds one message.
- The vertical channel has its own VCs and looks to the router like any
  other port.

**One cycle per hop.** The router is single-cycle. A flit written into an
input VC at one clock edge leaves on the output link at the next edge. In
that one cycle the router does all four steps:
- routing: `route_unit`;
- VC allocation: `vc_allocator`, which also keeps the credit count of each
  downstream VC;
- separable round-robin switch allocation: `switch_allocator`, with
  `rr_arbiter`;
- crossbar traversal: `crossbar`.

**Switching.** Switching is wormhole.
- A head flit takes a downstream VC only when that VC is free and its
  buffer has drained.
- The packet keeps the VC and the output port until its tail has passed.

**Flow control.** Flow control is credit based. Each input returns one
credit per flit that leaves it.

**Routing.** Routing is dimension-ordered: X first, then Y.
- A packet whose destination is on another layer carries a pillar number
  in its head flit.
- It is routed X-Y to that pillar's node and leaves on the vertical port.
- It crosses the bus, then continues X-Y on the destination layer.

### Packets and network interfaces

Every bank and every CPU node has a `network_interface`. It turns a message
(`msg_t`) into a packet and back.

**Message.** A message has:
- destination and source node;
- type: read request, write request, read reply or write acknowledgement;
- an 8-bit id;
- a 32-bit address;
- optionally a 64-byte line.

**Packet.** A packet is one head flit with all fields except the line. If
the message carries data, 4 data flits of 128 bits follow, line bits 127:0
first.

**Pillar choice.** The sending interface picks the pillar that minimises
the in-layer hops on both sides: source to pillar plus pillar to
destination.

**Receiving.** The receive side buffers each incoming VC and reassembles one
packet at a time. Packets on different VCs can overtake each other, so
replies carry the request's id.

**Bank nodes.** A bank node is an `l2_bank`: a 1024 x 512-bit line store
with a 5-cycle access. It serves one request at a time and replies to the
message's source.

## The pillar: a dynamic TDMA bus

A pillar (`dtdma_pillar`) is a 128-bit bus shared by the pillar nodes of all
layers. It is time-division multiplexed, but the frame is not fixed: a
central arbiter (`dtdma_arbiter`, one per pillar) gives one timeslot to each
layer that currently has something to send, and no others.

- One layer sending alone gets the bus every cycle.
- Two layers sending at once alternate.
- When all are silent, the frame has no slots.

This keeps the bus almost fully used, with no request/grant transaction per
transfer.

**Transceivers.** Each layer's pillar node has a `dtdma_transceiver`
between its router's vertical port and the bus.

- **Transmit side.** It buffers flits leaving the router, in per-VC FIFOs.
  While it holds a flit, it raises a request naming the destination layer.
- **Receive side.** It listens to the bus and registers an accepted flit
  into the router's vertical input.

**Slot registers.** A transceiver's Tx driver and Rx sampler are each
enabled by a fully-tapped feedback shift register (`dtdma_slot_shiftreg`).

- The register is loaded in parallel with a slot pattern and a frame
  length.
- It rotates by one position per cycle and feeds its bit 0 back in at the
  frame-length tap.
- Its bit 0 is the enable for the current cycle.

**Reprogramming.** Whenever the set of requesting layers, or a
destination, changes, the arbiter computes a new frame and loads every
register in the same cycle:
- the Tx pattern of client i is one-hot at its slot, the number of active
  clients below it;
- the Rx pattern of layer j marks the slots of the senders that target
  layer j;
- the frame length is the number of active clients.

**Bus model.** The tri-state bus is modelled as the OR of the enabled
drivers. An assertion checks that at most one layer drives in any cycle.

**Flow control across the bus.**
- A transmitter drives only if the target layer's receiver has room in the
  VC that flit will use.
- Each sender owns one VC at each receiver: VC i for a sender on a lower
  layer i, VC i-1 for one above.
- A packet holds its Tx VC until its tail has crossed, so its flits stay
  in order on one receive VC.

**Timing.** A lone flit leaving a router's vertical port reaches the router
on the other layer 3 cycles later:
1. into the Tx buffer;
2. the bus transfer;
3. the receive register.

After that, a single streaming layer moves one flit per cycle.

The `active_slots` and `bus_busy` outputs expose the frame length and bus
activity.

## Where a line lives: clusters, search and migration

**Clusters.** The banks of each 4x4 cluster form one NUCA cluster of 16
banks. Each cluster has a tag array (`cluster_tag_array`) for all of its
lines:
- 1024 sets x 16 ways;
- a 4-cycle access;
- tree pseudo-LRU replacement (`plru_tree`).

**Directory.** All 16 tag arrays sit in `l2_directory`. It is driven
through the top's `dir_*` ports by whatever serves a CPU's L2 requests.

**Address fields.** Addresses are split by `address_mapper`, for 32-bit
addresses and 64-byte lines:

| bits | field |
|---|---|
| 5:0 | offset |
| 9:6 | bank inside the cluster |
| 15:10 | set inside the bank |
| 31:16 | tag |
| 19:16 | cluster of first placement (low-order tag bits) |

**Search (`req_fill = 0`).** The search has two steps.
1. Step 1 looks up the requesting CPU's own cluster and the clusters
   directly above and below it. Those clusters are one pillar hop away.
2. If none hits, step 2 looks up all remaining clusters in parallel.

If neither step hits, the request is an L2 miss. Each step takes 6 cycles:
issue, the 4-cycle tag access, then collect. The reply reports:
- the hit and the step that hit;
- the cluster and way;
- any migration.

**Fill (`req_fill = 1`).** After a miss, the line is placed in its
first-placement cluster. Pseudo-LRU picks the way there, and any evicted
tag is reported.

**Migration (`migrate_en = 1`).** On a hit, `migration_unit` picks the next
cluster and the directory moves the tag there. The reply names the old and
new place.
- The line moves one cluster towards the requesting CPU's cluster column
  per hit, X first, then Y.
- It passes over clusters whose pillar carries a CPU on the line's layer.
- It never changes layer. A line on the other layer therefore drifts
  towards the CPU's pillar, where it is reached in step 1.

**Static mode (`migrate_en = 0`).** Lines stay where they were placed: the
static NUCA.

**Data location.** The bank data arrays are addressed by the messages
themselves. A line's slot in its bank is `{addr[23:20], addr[15:10]}`: the
set bits, widened by 4 address bits that stand in for a way number.
Copying a migrated line's data from the old bank to the new is left to the
agent that drives the directory. It uses ordinary read and write messages,
as the end-to-end testbench does when it reads a line from the bank the
directory names.

## How this differs from the document it is based on

- **Bank count.**
  - The document's system has 256 banks of 64 KB (16 MB) and 8 CPUs on a
    2-layer chip with 8 pillars.
  - Here the CPUs occupy 8 of the 256 mesh nodes, so there are 248 banks
    (15.5 MB).
- **Tag entry size.**
  - A tag entry here is a valid bit plus a 16-bit tag: 34 KB per cluster.
  - The document quotes 24 KB per cluster tag array for an address width
    it does not state.
- **Packet length.** A line-carrying packet is 5 flits here: a head with
  the address, then 4 data flits. The document counts a packet as 4 flits,
  with each VC one 4-flit message deep. The VCs are kept at 4 flits, and
  wormhole switching lets the 5-flit packet stream through.
- **Arbiter wiring.** The document states that the arbiter drives
  3n + log2(n) control wires to each of n layers. The wiring here differs:
  a load strobe, Tx and Rx slot patterns, the frame length, and a grant
  with its destination.
- **Lazy migration.** The document uses lazy migration to avoid false
  misses during a move. It is not built here: a migration updates both tag
  arrays as one directory operation.
- **Step-1 search.** The document's step 1 searches the local cluster and
  its "neighboring clusters", with the vertical ones reached through the
  pillar. This design reads that as the vertical neighbours only. Same-layer
  neighbours are covered in step 2.
- **Tag array placement.**
  - In the document, each tag array is wired to its cluster's processor or
    to a small forwarding block.
  - Here all tag arrays sit in one directory with one request port. It
    serves one search at a time, and searching does not use the network.
- **Deadlock freedom.** The routing is X-Y to a pillar, over the pillar,
  then X-Y again. The document does not discuss deadlock freedom, and it is
  not proven here.
- **Not in this RTL.** The processors, L1 caches, MSI coherence, main
  memory, the through-silicon vias as a physical structure, and the
  design-time CPU placement algorithm.

## Files

`rtl/` holds one module or package per file:

| layer of the design | files |
|---|---|
| shared types and constants | `nim_pkg` |
| router | `vc_buffer`, `route_unit`, `vc_allocator`, `switch_allocator`, `rr_arbiter`, `crossbar`, `noc_router` |
| pillar | `dtdma_slot_shiftreg`, `dtdma_arbiter`, `dtdma_transceiver`, `dtdma_pillar` |
| nodes | `network_interface`, `l2_bank` |
| directory | `address_mapper`, `plru_tree`, `cluster_tag_array`, `migration_unit`, `l2_directory` |
| top | `nim_3d_top` |

`tb/` has a self-checking testbench `tb_<module>` for each module. Each
prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, for example the pillar test:

```
verilator --binary --timing --assert --top-module tb_dtdma_pillar \
  rtl/nim_pkg.sv $(ls rtl/*.sv | grep -v nim_pkg) tb/tb_dtdma_pillar.sv
./obj_dir/Vtb_dtdma_pillar
```

**Cycle counts the testbenches check:**
- one cycle per router hop: a packet through one router and through a line
  of them;
- the 4-cycle tag access;
- the 5-cycle bank access;
- the 3-cycle lone-flit pillar crossing;
- a single streamer getting the bus every cycle;
- the frame growing to 4 slots with 4 active layers and shrinking back to
  none.

The pillar testbench runs with 4 layers.

**End-to-end test.** `tb_nim_3d_top` runs the whole design at 8 x 4 nodes
per layer and 2 layers: 2 CPUs, 2 pillars, 4 clusters, 62 banks. It plays
the CPUs and does the following:
- checks that the idle round trip grows by exactly 4 cycles when the bank is
  2 hops further away;
- streams writes and read-backs from both CPUs to random banks on both
  layers;
- makes a hot spot above one pillar, so that its bus carries traffic in both
  directions at once;
- runs the directory through a miss, a fill, a step-1 hit, a step-2 hit, a
  migration in dynamic mode, none in static mode, and an eviction.

It fails unless each of these actually happened:
- pillar transfers;
- two-slot frames;
- router output contention;
- interface back-pressure;
- directory misses, step-1 and step-2 hits, migrations and evictions.

The small modules that every router repeats (VC buffers, allocators,
arbiters, crossbar) carry a `no_inline_module` hint for Verilator. All their
instances then share one copy of code, which cuts the 8 x 4 x 2 build from
hours to about two minutes. The hint is a comment and changes no logic.

**Full size.** The default 16 x 8 x 2 configuration compiles and lints.
However, Verilator generates separate code for each of its 256 router,
interface and bank instances, because each has its own coordinate
parameters, and that build was not completed here. The largest size
simulated end to end is 8 x 4 x 2. To try the full size, instantiate
`nim_3d_top` without parameters, with `MX = 16, MYY = 8` in the testbench.
