# A parameterizable network-on-chip for emulating multi-core traffic

This is a small network-on-chip (NoC) whose shape is fixed at elaboration time. Master
processing elements (PEs) write to and read from data memories on other nodes through it.
It is built to measure how latency and congestion change with:

- the topology (mesh, linear, torus, WK-recursive);
- the switching mode (store-and-forward or wormhole);
- the buffering (number and depth of virtual channels);
- the traffic pattern (uniform, hotspot, sporadic).

Every node has a five-port router with virtual-channel input buffers and a clock-domain
link to its PE. Monitors count how often buffers fill up. Traffic generators can stand in
for the processors, so a network can be loaded and observed without any software.

The default build is a 3x3 torus with store-and-forward switching and XY routing:

```
   (0)M --- (1)S --- (2)M        M = master node (traffic generator or external PE bus)
    |        |        |          S = slave node with a 64 KiB data memory (D-MEM)
   (3)M --- (4)S --- (5)M        every row and column also wraps around (torus)
    |        |        |
   (6)M --- (7)S --- (8)M
```

The second supported configuration is a 16-node WK-recursive network, WK(4,2), with
wormhole switching. It has four clusters of four nodes. Each cluster is fully connected,
and each pair of clusters shares one link. This configuration is a parameter setting of
the same top module.

## Clocks

Three kinds of clock are used:

| Clock | Used by | Main-configuration rate |
|---|---|---|
| `clk_noc` | all routers and monitors | 1 GHz |
| `clk_pe[n]`, master nodes | master PE or traffic generator | 250 MHz |
| `clk_pe[n]`, slave nodes | D-MEM | 250 MHz (slow) or 500 MHz (fast) |

Routers therefore run four times faster than the master PEs. Each node's link controller
moves flits between its `clk_pe` and `clk_noc` through two dual-clock FIFOs. These use
Gray-coded pointers and two-flop synchronizers, so any clock ratio works. `rst_n` is an
asynchronous, active-low reset shared by all domains.

## Packets and flits

A flit is 25 bits wide: `{id[1:0], payload[20:0], stb, we}`.

| `id` | Flit | Payload |
|---|---|---|
| 00 | HEADER | `[20]` response flag, `[15:8]` source node, `[7:0]` destination node; with source routing `[19:8]` route, `[7:0]` source node |
| 10 | ADDRESS | `[20:18]` order number, `[15:0]` local byte address |
| 01 | DATA | `[20:18]` order number, `[15:0]` half a word; low half first |
| 11 | TAIL | `[15:8]` one parity bit per ADDRESS flit, `[7:0]` one per DATA flit, each at its order number |

- `stb` marks a valid flit. `we` marks a write request.
- The parameter `PARITY_ODD` selects odd or even parity.
- A write packet is HEADER, ADDRESS, DATA..., TAIL.
- A read request is HEADER, ADDRESS, TAIL. Its response is HEADER (response flag set),
  two DATA flits, TAIL.
- The 3-bit order number limits a packet to 8 DATA flits, i.e. 4 words (`MAX_BURST`).

The 32-bit bus address that a master uses is `{8'h00, node[7:0], local[15:0]}`. Each slave
therefore has its own 64 KiB address space.

## Path of a write

1. **Core interface** (`core_interface`, master side). It takes a Wishbone-style request
   from the PE and validates it. The destination must exist and be a slave node, and the
   address must be word aligned; otherwise the request ends with `err`.
   - Writes are posted: `ack` is given at once.
   - Words of an incrementing burst (`cti = 010`, ended by `111`) to consecutive
     addresses are packed into one packet of up to `MAX_BURST` words. This is burst
     packing; it saves a HEADER, an ADDRESS and a TAIL per extra word.
   - A read waits for the response packet and checks its parity. A mismatch ends the read
     with `err` and pulses `parity_err`.
2. **Link controller** (`link_controller`). Carries the flits into the network clock domain.
3. **Routers** (`router`). They forward the packet hop by hop; see the next section.
4. **Slave network interface** (`slave_ni`). At the destination it collects the packet and
   checks the TAIL parity. A corrupted packet is dropped and `parity_err` pulses.
   - For a write it performs one bus write per word on the D-MEM.
   - For a read it reads the word and sends the response packet.

## Router: virtual channels, switching and the arbiter

A router (`router`) has five inputs and five outputs: port 0 is the local PE, and ports
1–4 are North, East, South and West.

### Input port (`input_port`)

Each input port holds `NUM_VC` FIFOs (virtual channels, VCs) of `VC_DEPTH` flits. Two
small state machines run it:

- **VC identifier.** When a HEADER arrives, it compares the VCs' fill counts. The packet
  goes to the least occupied VC that is not full; on a tie, the lowest index wins. The
  rest of the packet follows into the same VC.
  - The port's READY is low when the VC it would write is full. This is the ON/OFF flow
    control between neighbours. There are no credits: a flit moves on a clock edge where
    SEND and READY are both high.
- **Switch identifier.** It serves the VCs round-robin. The chosen VC stays selected until
  its TAIL has been forwarded. What makes a VC eligible depends on the switching mode:
  - **Store-and-forward (SF):** only when its whole packet, up to the TAIL, is buffered.
    A per-VC count of buffered TAILs tells this. So under SF a packet must fit in one VC:
    the longest packet is 11 flits, and the default depth is 16.
  - **Wormhole (WH):** as soon as the HEADER is at the front. The body then streams behind
    it, and the path may stretch across several routers.

### Arbiter (`router_arbiter`)

The arbiter holds a routing table with one output port per destination node. The table is
computed at elaboration from the topology.

- **Mesh and torus:** dimension-ordered XY routing. X is corrected first, then Y. On a
  torus each step goes in the shorter direction; on a tie it goes East or South.
- **WK(4,2):** minimal digit routing.
  - Same cluster: take the direct link.
  - Otherwise, go to the cluster's gateway node towards the destination cluster, cross
    the inter-cluster link, then take the direct link inside the destination cluster.
  - At most three hops.

The table entry for the router's own node is the local port. Each output has an IDLE/BUSY
state machine:

- In IDLE it grants itself round-robin to an input whose front flit is a HEADER routed to
  it.
- In BUSY it forwards that input's flits into a one-flit output register while the
  downstream READY allows, then returns to IDLE after the TAIL.

A lone packet therefore passes a router in a few clocks: one to grant, one in the output
register, and one per flit after that.

### Source routing (`SRC_ROUTE = 1`)

By default each router looks up the destination in its own table (distributed routing).
With `SRC_ROUTE = 1` the routing decision moves into the network adapters:

- The core interface looks up the whole path in its own table, built at elaboration with
  the same routing functions. It sends that path in the HEADER instead of the destination.
- The route is four 3-bit output-port entries, the next hop in the lowest entry.
- Each router forwards the HEADER to the port in the lowest entry, shifting the list down
  by one entry as the HEADER leaves. At the destination the remaining entry is 0, the
  local port.
- The slave network interface answers a read with the route back to the source, taken
  from its own table.
- Four entries allow at most three network hops. That covers the 3x3 torus (2 hops) and
  WK(4,2) (3 hops); elaboration stops with an error for larger networks.

Deadlock: routing is dimension-ordered, and packets are spread over VCs by occupancy.
There is no dateline VC assignment on the torus rings. The testbenches load the torus
heavily without deadlock, but that is not a proof of freedom from deadlock.

## Monitors

**Node monitor** (`node_monitor`). One per router; it looks at each input port.

| Signal | Meaning |
|---|---|
| FULL | every VC of the port is full |
| ALMOST FULL | the port holds at least `AF_LEVEL` flits; default 3/4 of its space |
| FAIL | some port has been FULL for `FAIL_CYCLES` consecutive network clocks, which means a stalled link |

The per-port ALMOST FULL flag goes to the router at the other end of that link as an early
congestion warning. The top shows it as `nb_congestion`.

**NoC monitor** (`noc_monitor`). It gathers network-wide figures:

- per node, the number of clocks spent FULL and ALMOST FULL;
- packets injected and delivered, and the difference (`in_flight`);
- sticky `any_full` and `any_fail` flags.

`mon_clear` resets all of these.

## Traffic generators

Each master node has a traffic generator (`traffic_gen`). `tg_sel[n]` chooses whether the
generator or the external PE bus `pe_req[n]`/`pe_rsp[n]` drives the core interface.

The modes are:

- **uniform:** one write every `interval + 2` PE clocks;
- **hotspot:** back-to-back writes, normally from many generators to one slave;
- **sporadic:** bursts of `burst_len` back-to-back writes separated by `interval`.

The n-th write of a run goes to local address `4n` with data `{source node, 8'h00, n}`. A
receiver can therefore check exactly what arrived.

## Top module and parameters

`noc_top` wires `COLS*ROWS` routing nodes (`routing_node`: router, link controller, network
adapter, node monitor). Slave nodes get a D-MEM (`dmem`), master nodes a traffic
generator, and the NoC monitor is attached.

| Parameter | Default | Meaning |
|---|---|---|
| `TOPOLOGY` | `TOPO_TORUS` | `TOPO_MESH` (linear when `ROWS = 1`), `TOPO_TORUS`, `TOPO_WK` |
| `SWITCHING` | `SW_SF` | `SW_SF` or `SW_WH` |
| `COLS`, `ROWS` | 3, 3 | size; for WK, `COLS` nodes per cluster and `ROWS = COLS` clusters (at most 4) |
| `NUM_VC`, `VC_DEPTH` | 2, 16 | VCs per input port and their depth in flits |
| `LC_DEPTH` | 16 | depth of each link-controller FIFO (power of two) |
| `MAX_BURST` | 4 | words per packet (at most 4) |
| `PARITY_ODD` | 0 | TAIL parity type |
| `MASTER_MASK` | `256'h16D` | bit n set: node n is a master; the others are D-MEM slaves |
| `DMEM_WORDS` | 16384 | words per D-MEM |
| `FAIL_CYCLES` | 256 | clocks a port must stay FULL before FAIL |
| `CNT_W` | 32 | monitor counter width |
| `SRC_ROUTE` | 0 | 1 = source routing by the network adapters, 0 = per-router tables |

Shared types and the routing functions are in `rtl/noc_pkg.sv`. `vc_fifo` and
`async_fifo` are helper FIFOs.

Example: WK(4,2) with wormhole switching and slaves at the cluster corners:

```systemverilog
noc_top #(.TOPOLOGY(noc_pkg::TOPO_WK), .SWITCHING(noc_pkg::SW_WH),
          .COLS(4), .ROWS(4), .MASTER_MASK(256'h7BDE)) u_noc (...);
```

## Simulation

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`. Build and run one with Verilator 5, for example:

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl rtl/noc_pkg.sv \
    tb/tb_noc_top.sv --top-module tb_noc_top -o sim && ./obj_dir/sim
```

(`noc_pkg.sv` is named explicitly so that the package is compiled first; `-y rtl` finds
the modules by name.)

| Testbench | What it exercises |
|---|---|
| `tb_noc_top` | Whole default design, no parameter changes; see below |
| `tb_noc_wk` | WK(4,2) with wormhole switching: 1-hop against 3-hop latency, burst packing, uniform traffic across clusters, hotspot, and a latency sweep over 1, 2 and 3 hops; checks that wormhole cut-through happened |
| `tb_noc_srcroute` | The same WK(4,2) test with source routing; also checks that every HEADER arrives with its route used up |
| `tb_router_arbiter` | Arbiter alone at a torus corner, at a WK(4,2) node and with source routing (random routes: output port and shifted route checked per packet) |
| `tb_noc_latency` | Average network latency against injection interval on the default torus; see below |
| `tb_routing_node`, `tb_router`, `tb_input_port`, `tb_link_controller`, `tb_core_interface`, `tb_slave_ni`, `tb_dmem`, `tb_node_monitor`, `tb_noc_monitor`, `tb_traffic_gen` | One block each, against independently computed expectations |

**`tb_noc_top`** runs the default design, under a minute under Verilator. In turn it
does:

- PE-bus writes and reads at one and two hops, including one over a wrap-around link;
- a packed four-word burst;
- uniform, hotspot and sporadic traffic;
- a phase where one D-MEM's clock is held until the monitor raises FAIL.

It checks data and word counts in every memory, and that every injected packet is
delivered. It also counts each mechanism and fails any that never occurred:

- store-and-forward hold;
- use of the second VC;
- READY back-pressure;
- wrap-around links;
- ALMOST FULL, FULL and FAIL;
- congestion warnings;
- burst packing;
- read responses.

**`tb_noc_latency`** covers uniform 1-hop and 2-hop streams, and five masters writing to
one slow D-MEM. At the default sizes it measures:

| Traffic | Latency |
|---|---|
| Lone packet, 1 hop | 112 ns |
| Lone packet, 2 hops | 144 ns |
| Five masters to one D-MEM, sparse | 192 ns |
| Five masters to one D-MEM, saturated | about 6 µs |

At saturation the slave memory, not the network, limits throughput.

On WK(4,2) with wormhole switching, `tb_noc_wk` measures 32, 48 and 64 ns for one, two
and three hops, rising by 2 ns at back-to-back injection. Each hop costs four network
clocks, because a HEADER moves on without waiting for its packet.

## How this design relates to the framework it implements

These parts follow the framework description:

- the node structure: router, link controller, master and slave network adapters, node
  monitor, NoC monitor, traffic generators;
- the five-port router with input VCs;
- least-occupied VC choice and round-robin VC service;
- the FSM arbiter with a shortest-path table;
- SF and WH switching;
- the 25-bit flit with a 2-bit type, a 3-bit order field, 16-bit values, `stb`/`we` bits
  and TAIL parity of selectable type;
- burst packing;
- READY/SEND flow control;
- FULL / ALMOST FULL / FAIL;
- the three traffic types;
- the clock plan.

Choices made here because the framework leaves them open:

- bit positions inside each flit;
- HEADER contents;
- the address map;
- Wishbone-style buses;
- posted writes and one-word read responses;
- VC count and depth;
- the ALMOST FULL level and the meaning of FAIL;
- the D-MEM size and timing;
- what the NoC monitor counts;
- the traffic generators' address and data pattern;
- the placement of master and slave nodes on the 3x3 torus.

Known differences and limits:

- **Source routes are short.** Source routing is limited to three network hops. The
  default is per-router tables, since the framework does not say which scheme is primary.
- **Fixed flit width.** The channel is 25 bits. A wider or narrower channel is not a
  parameter.
- **The PEs are not included.** The OpenRISC processors, their instruction memories, UART
  and timer slaves, and the software flow are absent. The processor's bus port is brought
  out of the top as `pe_req`/`pe_rsp`, and the traffic generators replace processors as
  traffic sources.
- **WK size.** WK networks are built for a single level of recursion only, i.e. WK(n,2)
  with n ≤ 4, which is the 16-node network used.
- **No 3-hop path on the 3x3 torus.** Its diameter is two hops, so three-hop transfers
  can only be measured on the WK network (or a larger mesh or torus).
- **No error correction or retransmission.** A packet that fails its parity check is
  dropped and reported.
