# A single-link-fault-tolerant application-specific NoC for an Mp3 encoder

An application-specific network-on-chip uses an irregular topology cut to fit
one application: as few routers and links as the traffic needs. Such a network
usually has exactly one route between any two routers, so one permanently broken
link disconnects part of the application and the chip is lost. This design
avoids that at low cost. A few links and routers are added so that every
router lies on a cycle, which gives every router pair a second route. Then a
small set of alternative routing tables is stored in every router next to the
default one. When a link is found broken, external select pins switch every
router to a table that avoids it, and the chip keeps working, with some flows
taking longer paths.

The RTL here is that network for the 13-node Mp3 encoder benchmark. It has 8
four-port routers and 9 links. Every router holds five routing tables: the
default table PT0 and four alternatives PT1..PT4. Each alternative avoids two
links, so any single link failure is covered by five tables and a 3-bit select.
The application nodes themselves are not part of the design. Each node has a
transmit and a receive port at the top level, and the testbenches play the nodes.

## Topology

Routers are r1..r8 and links are written l<sub>a,b</sub>. The node placement
and the link set come from the published routing tables. The port numbers are
this design's choice.

| router | port 0 | port 1 | port 2 | port 3 |
|--------|--------|--------|--------|--------|
| r1 | r2 | r3 | node 4 | node 5 |
| r2 | r1 | r4 | r5 | node 6 |
| r3 | r1 | r6 | r7 | node 2 |
| r4 | r2 | r8 | node 8 | node 13 |
| r5 | r2 | r6 | node 9 | node 10 |
| r6 | r3 | r5 | node 11 | node 12 |
| r7 | r3 | r8 | node 1 | node 3 |
| r8 | r4 | r7 | node 7 | unused |

The nine links are l1,2 l1,3 l2,4 l2,5 l3,6 l3,7 l4,8 l5,6 l7,8. They form
the cycles r1-r2-r4-r8-r7-r3, r2-r5-r6-r3-r1 and so on. No link is a bridge:
removing any one of them leaves the network connected.

The application has 13 communication flows, the edges of its communication
graph. Each flow is a packet ID:

| ID | flow | kpackets/s | ID | flow | kpackets/s |
|----|------|-----------:|----|------|-----------:|
| 0 | 1→2 | 74 | 7 | 6→7 | 5 |
| 1 | 1→3 | 145 | 8 | 6→8 | 6 |
| 2 | 1→9 | 1 | 9 | 9→10 | 74 |
| 3 | 2→5 | 35 | 10 | 10→13 | 1 |
| 4 | 3→4 | 17 | 11 | 11→12 | 140 |
| 5 | 4→5 | 35 | 12 | 12→13 | 17 |
| 6 | 5→6 | 31 | | | |

## Routing tables and how a link failure is survived

This is the core of the design. A path table lists, for each flow, the routers
the flow's packets visit. PT0 is shortest-path routing:

| flow | PT0 path | flow | PT0 path |
|------|----------|------|----------|
| 1→2 | 7 3 | 6→7 | 2 4 8 |
| 1→3 | 7 | 6→8 | 2 4 |
| 1→9 | 7 3 6 5 | 9→10 | 5 |
| 2→5 | 3 1 | 10→13 | 5 2 4 |
| 3→4 | 7 3 1 | 11→12 | 6 |
| 4→5 | 1 | 12→13 | 6 5 2 4 |
| 5→6 | 1 2 | | |

PT0 never uses l7,8, so it already survives a failure of l7,8. Each of the
other eight links is covered by an alternative table. An alternative table is
built by removing two links that lie on different cycles and rerouting only
the flows that crossed them:

| table | links it avoids | rerouted flows |
|-------|-----------------|----------------|
| PT1 | l3,6 l4,8 | 1→9: 7 3 1 2 5; 6→7: 2 1 3 7 8 |
| PT2 | l2,4 l2,5 | 6→7: 2 1 3 7 8; 6→8: 2 1 3 7 8 4; 10→13: 5 6 3 7 8 4; 12→13: 6 3 7 8 4 |
| PT3 | l1,2 l5,6 | 1→9: 7 8 4 2 5; 5→6: 1 3 7 8 4 2; 12→13: 6 3 7 8 4 |
| PT4 | l1,3 l3,7 | 1→2: 7 8 4 2 5 6 3; 1→9: 7 8 4 2 5; 2→5: 3 6 5 2 1; 3→4: 7 8 4 2 1 |

A table for each link would need ten tables, the default plus nine, and four
select pins. Pairing the links cuts this to five tables and three pins.

Inside a router a table becomes a LUT. The LUT has one line per packet ID,
and each line holds a 2-bit output port. That port leads to the next router on
the flow's path, or to the destination node if this router is the last on the
path. Lines for flows that do not pass the router are 0. Every router stores
the LUTs of all five tables, 5 × 13 × 2 bits, and `pt_sel` picks one.

The LUT contents are not typed in by hand. `noc_pkg` holds the path tables
(`PT0_PATH` and the override list `OVR_*`) and the port layout (`PORT_PEER`).
The constant function `router_lut(r)` derives router r's LUT from them when the
design is elaborated: for table t and ID e, find r on the path of e and take
the port toward the next hop. `router_fifo_used(r)` derives in the same way
which input ports ever receive traffic. To change the routing or the topology,
edit those tables. The RTL below them follows.

`pt_sel` values 5..7 and packet IDs 13..15 fall outside the table. The router
asserts that neither occurs.

Switching tables is a chip-level action, not a per-packet one. `pt_sel` is
meant to change only while the network is empty. A packet in flight when the
table changes can otherwise be sent down its new path from the middle of its
old one.

## Packets

Packets are 32 bits: `packet_t = {id[3:0], data[27:0]}`. The ID sits in the top
4 bits, because 13 flows need 4 bits. All routing is by ID, so a packet needs
no address fields. The testbenches use the data bits for sequence numbers.

## The router (`noc_router`)

```
 in[0..3] ─► FIFO ×4 (8 × 32) ─► round-robin MUX ─► head packet ─┬─► out_pkt (all ports)
                                                                 └─► LUT[pt_sel][id] ─► one-hot out_valid
```

* **Input FIFOs** (`noc_fifo`) hold eight packets each. `in_ready` is "not
  full". A port that no table ever routes a packet into gets no FIFO, and its
  `in_ready` is 0. This holds for r8's unused port and for the ports of nodes
  7, 8 and 13, which only receive. The network has 27 FIFOs in all.
* **Round-robin arbiter** (`rr_arbiter`). Each cycle it picks the first
  non-empty FIFO at or after its pointer, and the pointer then moves past the
  pick. The pointer moves even when the picked packet cannot leave, so a
  blocked FIFO does not starve the others.
* **LUT** (`route_lut`). A combinational ROM lookup of the head packet's ID
  gives the output port.
* **Routing logic**. It raises `out_valid` on that one port. All ports carry
  the same `out_pkt`, which stands in for tristate output buffers on a shared
  bus. The packet leaves, and is popped, in the cycle where that port's
  `out_ready` is high. `fwd` pulses for each packet that leaves.

The port count is the parameter `NPORTS`, 4 by default and throughout this
network. A router of another size needs its `LUT` and `FIFO_USED` parameters
supplied, because the package derives them only for the four-port routers
r1..r8. The LUT lines widen to `$clog2(NPORTS)` bits.

Timing: a packet written into a FIFO at a clock edge can leave in the next
cycle. In an idle network a flow crossing k routers therefore arrives k cycles
after its node offered it. Each router forwards at most one packet per cycle.

Flow control is valid/ready on every link. A full FIFO refuses a packet, and
the sender keeps it and retries. No packet is dropped unless a link is marked
failed. `out_valid` may fall without a transfer, when the arbiter moves on
from a blocked packet. Receivers simply take a packet whenever valid and ready
are both high in a cycle.

## Top level (`fttg_noc_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `pt_sel` | in | 3 | routing table select pins, 0..4 |
| `link_fault` | in | 9 | emulation only: link l is broken, in the link order above |
| `node_tx_valid/pkt/ready` | in/in/out | 13, 13×32, 13 | transmit port of nodes 1..13 (index 0..12) |
| `node_rx_valid/pkt/ready` | out/out/in | 13, 13×32, 13 | receive port of nodes 1..13 |
| `link_busy` | out | 9×2 | a packet crosses link l: bit 0 a→b, bit 1 b→a |
| `router_fwd` | out | 8 | router r forwards a packet this cycle |

`link_fault` models a broken wire. The receiving router sees nothing. The
sending router sees the link as always ready, so packets sent onto it are lost.
`link_busy` and `router_fwd` exist for measuring and testing. Per-router packet
counts are what the energy estimate below is built on.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a cycle-count
watchdog.

| testbench | what it checks |
|-----------|----------------|
| `noc_fifo_tb` | Random traffic against a queue model; refusal of the ninth packet; order. |
| `rr_arbiter_tb` | The selection predicted by a reference pointer for random requests; fairness when all queues request. |
| `route_lut_tb` | Every LUT line of all 8 routers × 5 tables, against the ports implied by a separately written copy of the path tables (`tb_ref_pkg`). |
| `noc_router_tb` | Random traffic through r2 under every table with random output stalls. Checks the output port per ID, a one-hot valid, per-input order, that no packet is lost, the 1-cycle latency, and that r8 has no FIFO on its unused and receive-only ports. A five-port instance with a synthetic table checks the port-count parameter. |
| `fttg_noc_top_tb` | End to end. (1) Every flow's latency equals its path length, under all 5 tables. (2) Random traffic under each table with that table's two links failed: all delivered, in order, failed links idle, and router forwards equal the sum of path lengths. (3) PT0 with l3,6 failed loses exactly flow 1→9. (4) Heavy injection with slow receivers: back-pressure and no loss. It counts table switches, fault injections, lost packets, back-pressure, blocked outputs and use of every link, and requires each to happen. |
| `mp3_workload_tb` | The Mp3 encoder traffic at default sizes: one millisecond at 50 MHz (50,000 cycles) per table, each flow injecting its kpackets/s figure as packets per ms, evenly spaced, with the table's two links failed. It checks full delivery and per-router forward counts. |

The workload run reports these router traversals per millisecond of Mp3
traffic. The energy column uses 9.152 nJ per packet per router, the figure
reported for the original FPGA build of this router on a Virtex-6, and is only
as good as that number.

| table in use | router traversals / ms | energy per second of traffic | vs. PT0 |
|--------------|-----------------------:|------------------:|--------:|
| PT0 | 827 | 7.57 mJ | 100 % |
| PT1 | 838 | 7.67 mJ | 101 % |
| PT2 | 881 | 8.06 mJ | 107 % |
| PT3 | 969 | 8.87 mJ | 117 % |
| PT4 | 1337 | 12.24 mJ | 162 % |

The busiest router forwards about 0.29 M packets/s (r7 under PT3). That is far
below the 50 M/s a router can forward at 50 MHz.

## Simulating

All modules use `noc_pkg`, and the testbenches also use `tb/tb_ref_pkg.sv`.
For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/noc_pkg.sv tb/tb_ref_pkg.sv tb/fttg_noc_top_tb.sv --top-module fttg_noc_top_tb
./obj_dir/Vfttg_noc_top_tb
```

Replace `fttg_noc_top_tb` with any other testbench name. All of them finish in
about a second. `-Wall` lint reports only unused signal bits (for example the
inputs of ports that have no FIFO), package constants a module does not use,
and the reset also appearing in assertion `disable iff` clauses.

## Where this design goes beyond, or differs from, the published one

* **Carried over from the published design**: the topology, node placement,
  all five path tables, packet size and ID width, 8-packet FIFOs, round-robin
  input selection, a LUT per router holding 13 lines of 2-bit ports, dropping
  unused FIFOs, and external table selection.
* **Chosen here, because the published design leaves it open**:
  * port numbering;
  * the packet ID numbering (the flow order above);
  * placing the ID in the top bits;
  * valid/ready flow control and refusal at a full FIFO;
  * the arbiter's pointer rule;
  * an asynchronous reset of control state (FIFO storage is not reset);
  * what out-of-range IDs and select values do.
* **Tristate output buffers** are replaced by a one-hot port valid with a
  shared packet bus, which has the same function and is synthesizable.
* **FIFO count**: the rule "a FIFO on every input port that some table routes
  into" yields 27 FIFOs. The published figure for this topology is 26, and
  the rule behind that figure is not stated. Marking one more port as unused in
  `router_fifo_used` would reproduce it if that port were known.
* **Link fault inputs and activity outputs** are additions for emulation. A
  real chip would tie `link_fault` to 0.
* **Not included**: the Mp3 encoder nodes, and the offline tools that generate
  the topology, map the application and compute the tables. The comparison
  networks (the non-fault-tolerant tree and the ring) are not built, and
  neither is router power gating (shutdown), which appears only in the energy
  analysis. Timing at 50/100 MHz and FPGA area have not been measured for this RTL.
