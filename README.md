# Self-healing mesh Network-on-Chip

A router failure in a mesh NoC normally cuts its processing element (PE) off
from the rest of the chip and breaks every route that crosses it. This design
keeps such a router useful without a full spare router. Two ideas make that
work:

* **The neighbours route for a broken router.** When a router's routing logic
  fails, its four neighbours are told. From then on, each packet they send it
  carries three *routing bits* that name the output port the broken router must
  use. The broken router no longer routes. A small recovery switch visits its
  buffers in turn and sends each packet out of the port its routing bits name.
* **Any buffer can stand in for a broken buffer.** Each router has five port
  buffers plus one spare. When a port buffer fails, a FIFO controller stores that
  port's packets in whichever healthy buffer has the most free slots. That
  buffer is often the spare, but it can be any other. This costs one extra
  buffer rather than five.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). It is accepted
by Verilator's linter and by the slang front end of Yosys.

## The network

`noc_mesh` is a `MESH_X` x `MESH_Y` mesh (4x4 by default). Router *n* sits at
x = n mod 4, y = n div 4. For example, router 9 is at (1,2). Its neighbours are
8 (West), 10 (East), 5 (South) and 13 (North). East is +X and North is +Y.
Every router has five ports: Local (its PE), East, West, North and South. Links
are one packet wide with valid/ready flow control. A receiver drops `ready`
when it cannot store the packet, and that is also how a full router tells its
neighbours to hold off. Ports on the edge of the mesh are tied off.

Routing is dimension-ordered X-Y: a packet first moves along X, then along Y.
Switching is store-and-forward. A packet is a single 67-bit word, and each
router stores all of it before sending it on.

### Packet format (`noc_pkg::packet_t`, MSB first)

| field     | bits | meaning                                        |
|-----------|------|------------------------------------------------|
| `dst_x`   | 2    | destination X                                  |
| `dst_y`   | 2    | destination Y                                  |
| `src_x`   | 2    | source X                                       |
| `src_y`   | 2    | source Y                                       |
| `seq`     | 8    | packet sequence number                         |
| `tstamp`  | 16   | time of transmission                           |
| `payload` | 32   | data                                           |
| `rbits`   | 3    | routing bits for a faulty router (last 3 bits) |

The first seven fields make up a 64-bit packet, and the three routing bits
follow them. The order of the fields is part of the scheme. The individual
widths are choices of this implementation.

### Port codes

The same 3-bit code names a port in the routing bits, in the recovery
multiplexer's select and in `noc_pkg::port_e`:

| code | port  |
|------|-------|
| 000  | Local |
| 001  | East  |
| 010  | West  |
| 011  | North |
| 100  | South |
| 101  | Spare (buffer only; no output port) |

## Inside a router (`noc_router`)

```
 in ports ──> fifo_controller ──> 6 x port_fifo ──┬─> xy_route x6 ─> switch_allocator ─> crossbar ─┐
 (L,E,W,N,S)    (redirects)      (L,E,W,N,S,Spare)│                                                 ├─> heal_rbits ─> out regs ─> out ports
                                                  └─> recovery_switch (mux, routing bits, demux+spare)┘  (per port)
                     fault_detect: FS[5:0], router_faulty, use_spare_demux
```

**Normal mode.** The FIFO controller writes each arriving packet into a
buffer. The head packet of each of the six buffers is routed X-Y at the
router's own coordinate (`MY_X`, `MY_Y`). For each output port, a round-robin
arbiter in the switch allocator grants one requesting buffer, provided the
output register is free and `xbar_en` is high. The crossbar then copies the
winning packet into that port's output register. Routing computation and
switch allocation share one cycle, and switch traversal is the load of the
output register. An output register counts as free when it is empty or when
the neighbour takes its packet in the same cycle, so back-pressure from a full
neighbour stops switch allocation for that port.

**Routing bits toward a broken neighbour (`heal_rbits`).** Each output port
knows whether the neighbour on that link has reported a fault
(`nbr_faulty`). If it has, every packet leaving on that port gets its routing
bits rewritten. The rewrite sits after the output register, on the link itself,
so a packet already waiting there when the neighbour fails is covered too. The new bits are computed from the neighbour's coordinate
(fx, fy):

| packet destination                  | routing bits |
|-------------------------------------|--------------|
| equals (fx, fy)                     | 000 Local    |
| dst_x < fx                          | 010 West     |
| dst_x > fx                          | 001 East     |
| dst_x = fx, dst_y > fy              | 011 North    |
| dst_x = fx, dst_y < fy              | 100 South    |

This is exactly the X-Y decision the broken router would have made, computed
one hop early by the router that sends the packet. Packets that the broken
router's own PE injects get their routing bits from the network interface in
`noc_mesh`, which computes them at the node's own coordinate. That interface
stamps every injected packet, which does no harm in healthy routers.

**Recovery mode (`recovery_switch`).** Once `router_faulty` is set:

1. The normal path (routing, switch allocation and crossbar) is switched off.
2. A select counter steps 000, 001, … 101 and wraps, one step per clock. Each
   step picks one of the six buffers.
3. If the selected buffer holds a packet, the routing block reads the packet's
   last three bits, and a demultiplexer loads the packet into that output
   register.
4. If that output register is busy, the packet stays where it is until the
   select comes round again, six cycles later.
5. A packet whose routing bits are 101–111 names no output. It is dropped and
   `bad_rbits` is raised. This cannot happen while neighbours stamp correctly.

The demultiplexer has a spare copy. After a demultiplexer fault,
`use_spare_demux` routes packets through the spare instead.

**Buffer repair (`fifo_controller`).** The fault signals `fs[5:0]` (FS_L,
FS_E, FS_W, FS_N, FS_S, FS_Spare) mark broken buffers. Each cycle:

* A healthy port writes to its own buffer if that buffer's grant (`gnt`, "has a
  free slot") is high. Otherwise the port waits.
* A port whose buffer is broken is served from the healthy buffers that are
  not already written this cycle. Of those, the one with the largest Free
  Slots Counter (`fsc`) is used. On a tie the spare wins, then the higher
  index. If several ports are broken, they are served in port order.
* `router_full` is high when no healthy buffer has a free slot.

Packets carry their own destination, so it does not matter which buffer holds
them. A broken buffer is never read again, so anything it held when it failed
is lost. The design does not try to recover that.

**Fault detection (`fault_detect`).** The design is aimed at permanent
faults. This block latches each fault indication into a sticky flag that only
reset clears. The inputs are `router_err`, `buf_err[5:0]` and `demux_err`. How a
fault is sensed is outside this design, so these inputs are where a fault
generator or a built-in checker connects. In this RTL, the same inputs also
model the fault itself:

* a buffer with `buf_err` loses what is written into it;
* a router with `router_err` stops its normal path;
* a demultiplexer with `demux_err` drives nothing.

A flag rises one clock after its indication.

## Timing

* **Healthy router.** A packet written into a buffer on edge *n* reaches the
  output register on edge *n+1* and the next router's buffer on edge *n+2*.
  That is 2 cycles per router. Corner to corner in the 4x4 mesh, (0,0) to
  (3,3), crosses 7 routers and takes 14 cycles from the PE's `valid` to the
  destination PE's `valid`. The testbench checks this number.
* **Router in recovery mode.** Each packet also waits 0–5 cycles for the
  select counter, plus six more cycles for each time it finds its output busy.
* **Flow control.** `in_ready` depends on `in_valid`, but only on the
  registered `out_valid` of the neighbour, so there is no combinational loop
  between routers.

## Parameters

| module       | parameter        | default | note |
|--------------|------------------|---------|------|
| `noc_mesh`   | `MESH_X`, `MESH_Y` | 4, 4  | rows of four follow from the scheme's example (router 9 with neighbours 5, 8, 10, 13); four rows chosen |
| `noc_mesh`, `noc_router`, `port_fifo` | `DEPTH` | 4 | packets per buffer, own choice |
| `noc_router` | `MY_X`, `MY_Y`   | 0, 0    | set per node by the mesh |

Coordinates are 2 bits wide (`noc_pkg::COORD_W`). A mesh larger than 4x4 needs
a wider `COORD_W`, which widens the packet.

## Choices and departures

* No virtual channels. The router is store-and-forward with one FIFO per
  port, as the scheme specifies; a virtual-channel variant would need a
  channel count and an allocation rule that the scheme does not give.
* The crossbar of a five-port router would be 5x5; here it is 6x5, because
  the spare buffer is a sixth source.
* A sixth fault signal, FS_L, covers the Local buffer, so any of the six
  buffers can be retired.
* The routing-bit rule for a destination with a higher X (East) mirrors the
  rule for West.
* Buffer depth, field widths, round-robin arbitration, valid/ready links,
  tie-breaking in the FIFO controller, and what happens to packets with
  invalid routing bits are all choices made here.
* The buffers of a faulty router stay in service under the FIFO controller,
  and the recovery switch reads them.
* The RTL has no fault generator and no reliability unit. Faults enter
  through the top's fault inputs; `noc_fault_campaign_tb` plays the fault
  generator in simulation.

## Limit: shared buffers and deadlock

X-Y routing on a mesh is free of deadlock when each input port has its own
buffer. Buffer repair gives that up. Once a port's packets can sit in another
port's buffer, two neighbouring routers can end up each holding, in every
buffer the other needs, packets bound for the other. Here is a case seen in
simulation:

* router 7 has a broken Local buffer, so its PE's westbound packets fill its
  West buffer;
* that West buffer is where eastbound packets from router 6 would go;
* router 6 is itself full of packets bound for router 7.

Neither router can move. In a 4x4 mesh under uniform traffic, deadlock like
this showed up when about every router had lost a buffer and several routers
had failed as well. With one faulty router and one faulty buffer, or with a
handful of each (up to three routers and four buffers, at most one buffer per
router), no deadlock was seen. The design adds no deadlock avoidance.
Keep this in mind before relying on buffer repair for many faults.

Packets that are inside a router at the moment it fails carry the routing bits
they had, which may be stale, and packets held in a buffer at the moment it
fails are lost. The testbenches therefore inject faults while the network is
idle.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares against a
reference model of its own and ends with a line
`TB_RESULT checks=N failures=M`.

| testbench             | what it checks |
|-----------------------|----------------|
| `port_fifo_tb`        | random push/pop against a queue model; head, FSC, grant |
| `fifo_controller_tb`  | East buffer broken with North most free → North stores the East packet; random fault patterns |
| `xy_route_tb`         | all 256 coordinate combinations |
| `heal_rbits_tb`       | packets sent to faulty router 9 at (1,2) for every direction; exhaustive |
| `recovery_switch_tb`  | select sequence, routing by routing bits, busy outputs, invalid bits, packet loss with a broken main demultiplexer and recovery with the spare |
| `fault_detect_tb`     | flags rise one clock after an indication and stay set until reset |
| `switch_allocator_tb` | round-robin grants against a pointer model; no starvation |
| `crossbar_tb`         | selection and enable |
| `noc_router_tb`       | one router: latency, X-Y forwarding, buffer redirection, stamping toward a faulty neighbour (also for a packet already waiting when the neighbour fails), full router, crossbar off, recovery mode, spare demultiplexer |
| `noc_mesh_tb`         | the 4x4 mesh at its default parameters, uniform random traffic (each PE to a uniformly chosen other PE), about 28,000 packets |
| `noc_fault_campaign_tb` | the 4x4 mesh under uniform traffic while a random fault generator retires routers, buffers and demultiplexers over twelve epochs; prints delivered/sent |

In `noc_mesh_tb`, router 9 fails, and so does the East buffer of router 6.
Later, router 9's demultiplexer fails too. The testbench then checks:

* every packet reaches its destination exactly once, with its fields intact;
* packets to, from and through router 9 still arrive;
* packets are redirected away from the broken buffer;
* traffic uses the spare demultiplexer;
* nothing moves while the crossbars are disabled;
* routers report full when the PEs stop accepting packets.

A failure is counted for any of these mechanisms that never occurs.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/noc_pkg.sv tb/noc_mesh_tb.sv \
          --top-module noc_mesh_tb -Mdir obj && ./obj/Vnoc_mesh_tb
```

Building the full-size mesh testbench takes about half a minute, and running it
takes under a second. The testbenches initialise whatever they read, so they
also run on two-state simulators.

## Files

* `rtl/noc_pkg.sv`: packet struct, port codes, sizes
* `rtl/noc_mesh.sv`: top level, the mesh
* `rtl/noc_router.sv`: one self-healing router
* `rtl/fifo_controller.sv`, `rtl/port_fifo.sv`: buffer repair and buffers
* `rtl/recovery_switch.sv`, `rtl/pkt_demux.sv`: data path of a faulty router
* `rtl/heal_rbits.sv`, `rtl/xy_route.sv`: routing-bit computation and X-Y routing
* `rtl/switch_allocator.sv`, `rtl/rr_arbiter.sv`, `rtl/crossbar.sv`: normal switching
* `rtl/fault_detect.sv`: sticky fault flags
* `tb/*_tb.sv`: one testbench per module
