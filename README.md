# dTDMA / NoC hybrid interconnect

A shared bus loses time to arbitration: every transfer is a transaction that
has to win the bus, send an address, and only then send data. A mesh
network-on-chip avoids the contention, but every message pays for several
router hops, and latency climbs steeply under load. This design combines the
two.

* **dTDMA bus.** A time-division bus whose number of timeslots always equals
  the number of PEs that currently want to send. A PE that starts sending gets
  a slot at the next clock edge, and a PE that stops gives its slot back. A
  stream needs no further arbitration, carries no address phase, and is never
  blocked by another PE. With k active senders, each one transmits once every
  k cycles.
* **Hybrid system.** PEs that talk to each other a lot are grouped into
  *affinity groups*. Each group shares one dTDMA bus. A bridge on each bus
  carries traffic that leaves the group into a mesh NoC, which also serves
  all PEs outside the groups.

The default configuration is a 64-PE system:

* four groups of 8 PEs, each on a 9-node bus (8 PEs plus the bridge);
* 32 further PEs;
* a 6 x 6 mesh backbone with 36 routers: the 4 bridges and the 32 further PEs;
* 512-bit messages, 128-bit NoC links, and 8-message transmit buffers.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). All files are in
`rtl/`, and there is a self-checking testbench for each module in `tb/`.

## How a timeslot is owned

Each bus node has a transmitter and a receiver (`dtdma_tx`, `dtdma_rx`). Each
of them holds a rotating shift register (`dtdma_slot_sr`) with N stages, and
only the bit in stage 0 matters. In a transmitter, that bit enables the bus
driver for the current cycle. In a receiver, it says "store what is on the bus
at the end of this cycle".

* **Rotation.** Every cycle the bits move one stage toward stage 0. Stage 0
  feeds back into stage L-1, so the register behaves as a ring of L slots.
* **Length.** L (1..N) is set by log2(N) control lines from the arbiter
  (`len_m1` = L-1). These lines pick which stage's multiplexer takes the
  feedback.
* **Loading.** When the arbiter pulses `load`, every register takes its new
  one-hot (transmitter) or multi-hot (receiver) pattern in parallel.

Example: with five slots and slot 2, the register holds `00100` in stages
0..4. It drives or samples two cycles after the load, and then every five
cycles.

## The arbiter (`dtdma_arbiter`)

The arbiter sees one `active` line and one destination vector (multi-hot over
the N nodes) per node. It recomputes the schedule only when something changes:

* **A node raises `active`.** It gets one of the first slots. Several new
  nodes are ordered by node index.
* **A node drops `active`.** Its slot disappears.
* **Survivors keep their cyclic order.** The remaining senders are
  renumbered, starting with the one that would have transmitted next, so no
  one loses their turn. For example, with the schedule C D B A: if B finishes
  during its own slot, the next cycles are A C D A C D ...
* **An active node changes its destinations.** Slots stay as they are, and
  only the receivers are reprogrammed. A stream that changes destination keeps
  its place in the rotation.

The arbiter does not read the transceivers' registers. Instead it keeps its
own copy of the schedule: a slot number per node, counting down modulo L.
From this copy it knows which sender is due next. The new configuration is
worked out combinationally within the cycle in which the request changes.

* Transmitter p gets the one-hot pattern of its new slot.
* Receiver r gets the OR of the slots of every sender whose destination vector
  contains r. A receiver can therefore listen to several senders (many-to-one
  traffic), and a sender with several destination bits multicasts at no extra
  cost.

`len_m1` and `n_slots` always describe the schedule currently in force.

## Timing on the bus

`dtdma_bus` ties N transceivers, one arbiter and the broadcast medium
together:

* A message written at an idle node in cycle t requests a slot in the same
  cycle.
* The new configuration loads at the end of t, the message is on the bus in
  cycle t+1, and it sits in the receive buffer after the edge that ends t+1.
* A transmitter drops `active` during the cycle in which it sends its last
  buffered message, so the slot disappears at the next edge. A sender that
  drains its buffer therefore releases its slot immediately, and has to
  request a new one when more data arrives.

The two-master example runs as follows. A writes A1 in T1 and A2 in T2. B
writes B1 in T2 and B2 in T3. The bus carries A1, B1, A2, B2 in T2..T5, with
1, 2, 2, 1 and then 0 slots in force. `tb_dtdma_bus` checks this cycle by
cycle, and also checks that under saturation the bus carries a word in every
cycle and each of the 9 nodes gets exactly every ninth cycle.

Each word on the bus carries, next to the 512-bit payload:

* a valid bit;
* the sender's bus index, which lets a receiver tell interleaved senders
  apart;
* a global destination address, which only the bridge uses.

A transmitter sends its head message in its own slot only if both of these
hold:

1. The message's destination vector is the one that was latched at the last
   configuration load. After a destination change, the message waits at most
   one rotation for the receivers to be reprogrammed.
2. None of its destination receivers reports a full receive buffer
   (`rx_full`). Otherwise it passes its slot and tries again one rotation
   later.

## Leaving the group: bridge and NoC

**Addresses.** A global address is `{x, y, sub}`: the mesh coordinates of a
router, plus, for a bridge router, the index of the PE inside that group.

**Group to outside.** A group PE sets the bridge bit (node N-1) in its
destination vector and puts the target address in `gdst`. The bridge
(`noc_bridge`) takes the word from its bus receiver. A network interface
(`noc_ni`) cuts it into a 4-flit packet, lowest 128 bits first. The head flit
carries the address as sideband fields.

**Outside to group.** The bridge reassembles the incoming packet and writes it
into its own bus transmitter, with the one-hot destination `sub`.

**NoC PEs.** Each of the 32 PEs outside the groups also attaches to its router
through a `noc_ni`.

**Routers.** `noc_router` has five ports (local, N, E, S, W). Its input
buffers hold 4 flits on the network ports and 32 flits (eight messages) on the
local port. It uses:

* dimension-ordered XY routing;
* wormhole switching: an output stays with one packet from head flit to tail
  flit;
* round-robin choice among competing head flits;
* a valid/ready handshake on every link.

An uncontended hop takes one cycle, so a head flit reaches a router h hops
away h+1 cycles after injection. `noc_mesh` wires the routers into an MX x MY
grid. Router (x, y) has index y*MX + x, and north is y-1.

**Floorplan.** `hybrid_soc` places the group bridges on the four mesh corners:

* group 0 at (0,0)
* group 1 at (MX-1, 0)
* group 2 at (0, MY-1)
* group 3 at (MX-1, MY-1)

The other routers serve NoC PEs 0..31 in index order, skipping the corners.

## Ports of the top (`hybrid_soc`)

Group PE j of group g has index g*8+j.

| port | meaning |
|---|---|
| `ag_in_valid/ready`, `ag_in_dest[N]`, `ag_in_gdst`, `ag_in_data[512]` | message from a group PE: local destination vector (bit 8 = bridge), global address for traffic that leaves the group |
| `ag_out_valid/ready`, `ag_out_word` | received bus word (payload, sender index; 8 = came through the bridge) |
| `np_in_valid/ready`, `np_in_dst`, `np_in_data` | message from NoC PE k, addressed globally |
| `np_out_valid/ready`, `np_out_data` | message delivered to NoC PE k |
| `ag_n_slots`, `ag_load`, `ag_rx_overflow` | per-group status: slots in force, reconfiguration, dropped words (should stay 0) |

Reset is synchronous and active low (`rst_n`). Buffer storage is not reset.

## Where this departs from the original description, and why

* **Tri-state bus.** It is modelled as an OR of gated words. The
  one-driver-per-cycle rule is an assertion.
* **Receive-buffer back-pressure (`rx_full`).** This is an addition. Without
  it, the receive buffer of a bridge whose NoC side is congested overflows,
  because it takes up to one 512-bit word per cycle but can inject only one
  message every four cycles. The receiver's sticky `overflow` flag remains as
  a check. The price is that the usual guarantee (a sender waits no more
  cycles than there are active senders) holds only while its receivers keep
  up.
* **One message per slot.** Every message is one bus word, so the start and
  end flags that multi-word messages would need become the valid bit plus the
  sender index. Reassembly of longer messages is left to the PEs.
* **Virtual channels.** The router has one channel per input. The reference
  router has twelve virtual channels of four flits, whose allocation is not
  specified. With a single channel, head-of-line blocking is stronger, so NoC
  latency under load is worse than in the reference router.
* **Design choices.** XY routing, wormhole switching, the flit sideband
  format, the 6 x 6 backbone with corner bridges, and an 8-entry receive
  buffer are all choices made here.
* **Not built:**
  * quality-of-service slot policies;
  * several bridges per group;
  * the read/write protocol for memories over the bus (address in one rotation
    of the slot, data in the next), which is a convention between PEs and
    needs no extra hardware;
  * the PEs themselves.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_dtdma_bus rtl/hybrid_pkg.sv tb/tb_dtdma_bus.sv
./obj_dir/Vtb_dtdma_bus
```

| testbench | what it shows |
|---|---|
| `tb_dtdma_slot_sr` | rotation for every length; bits beyond the length never reach stage 0 |
| `tb_dtdma_arbiter` | the A/B/C/D allocation example (owner sequence `AABACDBACDBACDA`) and random requests against a list model |
| `tb_dtdma_tx`, `tb_dtdma_rx` | slot timing, request rise/fall, destination latch, full-receiver hold, overflow |
| `tb_dtdma_bus` | two-master timing, random unicast/multicast scoreboard with slow readers, 100 % utilisation under saturation |
| `tb_noc_router`, `tb_noc_mesh` | XY routes, unbroken in-order packets, one cycle per hop |
| `tb_noc_ni`, `tb_noc_bridge` | packet format, reassembly, address translation, back-to-back streaming |
| `tb_hybrid_soc` | the whole 64-PE system at default size; bridge rates of 10, 30 and 50 % plus a saturation burst; every message delivered exactly once |

`tb_hybrid_soc` counts each mechanism and fails if any of them never happens:

* slot growth and shrinkage;
* receiver reprogramming;
* multicast;
* traffic through the bridges in both directions, including group to group;
* NoC to NoC traffic;
* full transmit buffers;
* NoC back-pressure;
* full receive buffers holding senders back.

The full-size build takes a few tens of seconds, and the run takes a few
seconds.

## Changing it

* **Bus size:** `N` on `dtdma_bus` (and on `hybrid_soc`, where N-1 PEs share
  each bus).
* **Buffer depths:** `TX_DEPTH`, `RX_DEPTH`, `BUF_DEPTH` and `LOCAL_DEPTH`.
* **Mesh size:** `MX` and `MY`. Keep them at 2 or more and at most 8, the
  limit of the 3-bit coordinates.
* **Widths:** message width, flit width and address field widths are constants
  in `hybrid_pkg`. `DATA_W` must be a multiple of `FLIT_W`.
