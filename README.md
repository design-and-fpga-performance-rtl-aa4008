# 2D and 3D mesh network-on-chip routers

This RTL builds two small packet-switched networks-on-chip. Each node has a
router, and packets travel hop by hop from a source node to a destination
node:

- a **2D mesh** of 3 x 3 routers. Each router has 5 ports (East, West,
  North, South, Local) and uses **XY routing**.
- a **3D mesh** of 3 x 3 x 3 routers. Each router has 7 ports, adding Up
  and Down, and uses **XYZ routing**.

Each router buffers the flits arriving on each input. It works out each
flit's output port from the destination address alone, then switches the
flit through a crossbar into a per-output register. There is no routing
table and no virtual channel: dimension-ordered routing on a mesh never
deadlocks, so plain FIFOs and a valid/ready handshake are enough.

The design follows the 2D/3D mesh router architecture of "Design and FPGA
Performance Analysis of 2D and 3D Router in Mesh NoC". That publication gives
the structure: port counts, routing orders, packet format, mesh sizes, router
numbering and the mesh's pin list. Buffer depths, arbitration, flow control
and cycle timing are choices made here. They are listed under
[Departures and choices](#departures-and-choices).

## Packet format

Every packet is a single 150-bit flit (`noc_pkg::flit_t`):

| bits      | field            | meaning                                   |
|-----------|------------------|-------------------------------------------|
| 149       | `end_bit`        | end of transmission (always 1 here, since a packet is one flit) |
| 148:146   | `layer`          | layer identification, carried but not routed on |
| 145:137   | `src`            | source router `{X, Y, Z}`, 3 bits each    |
| 136:128   | `dst`            | destination router `{X, Y, Z}`            |
| 127:0     | `data`           | payload                                   |

In a 9-bit address X is the top three bits and Z the bottom three. The
address therefore reads as three octal digits "XYZ". For example,
`9'o102` is X=1, Y=0, Z=2, which is router R19. In the 2D mesh Z is 0.

## Router numbering and directions

Router `Rn` sits at `n = x + 3*(y + 3*z)`:

- In the 2D mesh, R0 is (0,0), R1 is (1,0), R2 is (2,0), R3 is (0,1), …, and R8 is (2,2).
- In the 3D mesh, R9 to R17 form the layer at z = 1 and R18 to R26 the layer at z = 2.

The directions are:

- East goes to larger X and West to smaller X.
- North goes to larger Y and South to smaller Y.
- Up goes to larger Z and Down to smaller Z.

The router's ports are numbered East=0, West=1, North=2, South=3, Local=4,
Up=5, Down=6 (`noc_pkg::port_e`). A 2D router uses ports 0–4.

## Inside a router (`noc_router`)

```
 in_valid/in_flit ──► [flit_fifo] ──► route_compute ─┐ req[o][i]
   (per input)          head flit                    ▼
                                 ┌──── rr_arbiter per output ◄── out_free
                                 ▼ grant
                    crossbar (NP x NP) ──► output_register ──► out_valid/out_flit
                                                    ▲
                                                out_ready
```

Each cycle:

1. **Input buffer** (`flit_fifo`, `FIFO_DEPTH` = 4). A flit enters when
   `in_valid` and `in_ready` are both high at a clock edge. `in_ready` means
   the FIFO is not full. The FIFO is first-word-fall-through, so the head
   flit is visible with no read cycle.
2. **Control logic** (`route_compute`). It compares the head flit's
   destination with the router's own address (parameters `X`, `Y`, `Z`):
   - If X differs, the flit goes East or West.
   - Otherwise, if Y differs, it goes North or South.
   - Otherwise, in 3D only, if Z differs, it goes Up or Down.
   - Otherwise it goes to the Local port.

   This logic is combinational.
3. **Arbitration** (`rr_arbiter`, one per output). Each output collects
   requests from every input whose head flit routes to it. It grants one of
   them round-robin, and only while its output register is free. The input
   just served drops to the lowest priority, so no input starves.
4. **Crossbar** (`crossbar`). One multiplexer per output copies the granted
   head flit. The granted input FIFO pops in the same cycle.
5. **Output register** (`output_register`). It holds one flit until the
   receiver takes it (`out_valid && out_ready`). A register whose flit leaves
   this cycle counts as free, so an output can carry one flit every cycle.

Because each input requests exactly one output, an input is granted at most
once per cycle. A flit written into an input FIFO at edge *k* is in the
output register after edge *k+1*, if nothing is in its way. Each router
therefore adds **two cycles**.

## The mesh and its host port (`noc_mesh`)

`noc_mesh` connects `XN x YN x ZN` routers. Neighbouring routers are joined
by a link in each direction: East to West along X, North to South along Y,
and Up to Down along Z. The FIFO's `in_ready` is the link's back-pressure.

Ports on the boundary of the mesh are unconnected. Nothing enters them, and
a flit that leaves by one is dropped. XY and XYZ routing never send a packet
with an in-mesh destination there.

Each node's processing-element side is modelled by a host port. This port
is the mesh's pin list:

| pin                | dir | meaning |
|--------------------|-----|---------|
| `clk`, `reset`     | in  | clock; active-high synchronous reset |
| `layer_address[2:0]` | in | layer field of a written packet |
| `source_xyz[8:0]`  | in  | node where `write` injects |
| `destination_xyz[8:0]` | in | packet destination, and the node that `read` pops |
| `packet_data[127:0]` | in | payload |
| `write`            | in  | inject one packet at the rising edge |
| `read`             | in  | pop one packet from the destination node's memory |
| `packet_out[127:0]`, `end_bit` | out | payload and end bit of the last packet read (registered, held until the next read) |
| `fifo_full`        | out | the source node's Local input FIFO is full, or `source_xyz` names no node |
| `fifo_empty`       | out | the destination node's memory is empty, or `destination_xyz` names no node |

How a packet moves through the host port:

- **Write.** `write` puts the flit into the Local input FIFO of the source
  router, with the end bit set. It is ignored while `fifo_full` is high.
- **Delivery.** Packets for a node leave its router's Local output and go
  into that node's **node memory**, a `flit_fifo` that is `NODE_DEPTH` = 4
  deep. When the node memory is full, it holds the router back, and the
  congestion spreads backwards to the sources.
- **Read.** `read` pops the head of the destination node's memory onto
  `packet_out`.

**Latency.** A packet written at edge *k* into an idle network reaches the
destination's node memory at edge *k + 2·(hops+1)*, where *hops* is the
Manhattan distance. `fifo_empty` for that node falls right after that edge.
For example, 102 → 222 crosses 3 links and arrives 8 edges after the write.

A typical transfer:

1. Set the addresses and data, and raise `write` for one cycle.
2. Wait until `fifo_empty` (for `destination_xyz`) is low.
3. Raise `read` for one cycle. `packet_out` then holds the data, and with a
   single packet in flight `fifo_empty = 1` and `fifo_full = 0`.

`noc_top` places the 2D mesh (`m2_*` pins) and the 3D mesh (`m3_*` pins)
side by side. They share only clock and reset.

## Files

| file | contents |
|------|----------|
| `rtl/noc_pkg.sv` | widths, `addr_t`, `flit_t`, `port_e`, `num_ports()` |
| `rtl/flit_fifo.sv` | FWFT FIFO: router input buffer and node memory |
| `rtl/route_compute.sv` | XY / XYZ routing decision |
| `rtl/rr_arbiter.sv` | round-robin output arbiter |
| `rtl/crossbar.sv` | N x N flit crossbar |
| `rtl/output_register.sv` | per-output register with valid/ready |
| `rtl/noc_router.sv` | the router (`DIM` = 2 → 5 ports, 3 → 7 ports) |
| `rtl/noc_mesh.sv` | mesh of routers plus host port and node memories |
| `rtl/noc_top.sv` | 3 x 3 2D mesh and 3 x 3 x 3 3D mesh side by side |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/router_harness.sv`, `tb/mesh_driver.sv` | shared stimulus and checkers |

Parameters:

- `noc_mesh`: `DIM`, `XN`, `YN`, `ZN`, `FIFO_DEPTH`, `NODE_DEPTH`. The defaults are the 3 x 3 x 3 3D mesh.
- `noc_router`: `DIM`, `X`, `Y`, `Z`, `FIFO_DEPTH`.
- `noc_top`: `FIFO_DEPTH` and `NODE_DEPTH`, passed down to both meshes.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
also has a watchdog that counts a failure if the run hangs. For example, to
run the end-to-end test of the whole design at its default sizes:

```
verilator --binary --timing --assert --top-module tb_noc_top \
  -y rtl -y tb +libext+.sv rtl/noc_pkg.sv tb/tb_noc_top.sv
./obj_dir/Vtb_noc_top
```

Replace `tb_noc_top` with any other `tb_*` name to run that test.

What the tests cover:

- `tb_noc_top` and `tb_noc_mesh` run four single-packet transfers. These use
  the published data patterns (FF00…, F00F…, 33F0…, F0CC…) and check the
  arrival cycle exactly.
- They check that writes to addresses outside the mesh are refused.
- They run a hot spot until a source reports `fifo_full`.
- They run random traffic, checking that every packet arrives exactly once
  and that packets from one source to one destination arrive in order.
- They count router output contention and node-memory back-pressure, and
  fail if either never happens.
- `tb_noc_router` checks the routing port, per-pair ordering and the
  two-cycle latency of 7-port and 5-port routers under random traffic.

Assertions in the FIFO, output register and arbiter check their handshake
rules. Run with `--assert` to enable them.

## Departures and choices

- **Buffer depths, arbitration, flow control and timing are not from the
  original.** The original shows an input buffer, control logic, a central
  crossbar and an output register per port. It does not say how deep the
  buffers are, how two inputs competing for one output are ordered, or how
  a router knows a neighbour can accept a flit. The choices here are:
  - depth 4;
  - round-robin arbitration;
  - valid/ready handshakes with no flit ever dropped inside the mesh;
  - two cycles per router.
- **Host port meaning.** The original lists the pins and says that `write`
  and `read` control "node memory", and that `FIFO_full`/`FIFO_empty`
  report whether nodes are busy or free. The exact meaning used here is this
  design's reading:
  - `write` injects at the source node;
  - `read` pops at the destination node;
  - `fifo_full` and `fifo_empty` report the source's Local FIFO and the
    destination's memory.
- **Layer address width.** The layer address is 3 bits, as in the packet
  format. It is carried but not used for routing: only one mesh cluster
  exists.
- **End bit.** It is set by the host port on every packet, because every
  packet is one flit.
- **Addresses outside 0..2 are refused.** Several published transfer
  scenarios use addresses with a coordinate of 3, such as 231, 323, 023 and
  123. No router has such an address in a 3 x 3 x 3 mesh. Here such writes
  are refused (`fifo_full` = 1). The tests run the published data patterns
  with in-mesh addresses instead, and check that 323 and 023 are refused.
- **Size.** The original reports 230 (2D) and 324 (3D) flip-flops for the
  whole meshes. That is less than this design needs for a single 150-bit
  output register per port. This RTL registers and buffers whole flits, so
  it is much larger:
  - A 7-port router has about 1100 flip-flops plus 4200 bits of FIFO
    storage.
  - The 3D mesh needs about 31,000 flip-flops.
  - The 2D mesh needs about 7,400 flip-flops.

  The published area and timing figures therefore do not describe this RTL.
- **Processing elements are not modelled.** The processors attached to each
  router are not designed in the original. Their side of each router (the
  Local input and the node memory) is reached through the host port.
