# Packet-switched mesh network-on-chip with round robin routers

This design connects many cores on one die through a grid of small packet
routers instead of a shared bus or dedicated wires. Each core hands a packet to
its router. The packet then hops from router to router along a shortest path
until it reaches the router of its destination core. Every router stores each
packet whole in a FIFO before it passes it on (store-and-forward). Where several
inputs want the same output in one cycle, a round robin arbiter chooses among
them, so no input is starved.

The default configuration is a 4x4 mesh of 16 five-port routers. Packets are
16 bits wide.

## Packet format

A packet is a single 16-bit word (`noc_pkg::packet_t`). Store-and-forward
switching moves whole packets, so packets are never split into flits.

| bits  | field     | meaning                       |
|-------|-----------|-------------------------------|
| 15:14 | `src_y`   | row of the sending node       |
| 13:12 | `src_x`   | column of the sending node    |
| 11:10 | `dst_y`   | row of the destination node   |
| 9:8   | `dst_x`   | column of the destination node|
| 7:0   | `payload` | data byte                     |

Row numbers grow towards the south and column numbers towards the east. The
routers use only the destination fields. The source fields travel with the
packet so that the receiver knows who sent it. With 2-bit coordinates the
network can have at most 4x4 nodes. To build a larger mesh, widen
`COORD_W` in `noc_pkg`.

## The mesh (`noc_mesh`)

Router (x, y) has five ports: local, north, east, south and west. Each pair of
neighbours is joined by two links, one in each direction. The local ports are
brought out as arrays on the top, indexed `y*COLS + x`:

| port        | dir | meaning                                   |
|-------------|-----|-------------------------------------------|
| `in_pkt[n]`, `in_valid[n]`, `in_ready[n]`    | in/in/out  | packet from the core at node n |
| `out_pkt[n]`, `out_valid[n]`, `out_ready[n]` | out/out/in | packet delivered to node n     |

Parameters: `ROWS = 4`, `COLS = 4`, `DEPTH = 4` (words per FIFO).

Links that would leave the edge of the mesh are tied off. Nothing arrives on
them, and they accept and drop anything sent out. XY routing never sends a
packet there if its destination lies inside the mesh.

### Link handshake

Every link, including the local ports, uses valid/ready. A transfer happens on
a rising edge where both `valid` and `ready` are high. Once a sender raises
`valid`, it holds the packet unchanged until it is taken. The router asserts
this rule on its outputs. `in_ready` is simply "input FIFO not full", so a
sender may raise `valid` without waiting for `ready`.

## Inside a router (`noc_router`)

```
 in link ─► input FIFO ─► head reg ─► XY route ─► request ─┐
   (x5)                                                    │   per output (x5):
                                      ┌────────────────────┘
                                      ▼
                      round robin arbiter ─► crossbar ─► output FIFO ─► out reg ─► out link
```

- **Input buffering.** Each input link writes into its own FIFO
  (`noc_fifo`).
- **Head register.** A FIFO read loads the oldest packet into the FIFO's
  `data_out` register, and that register serves as the head of the queue. A
  flag per input says whether the head register holds a packet that has not
  been passed on yet. The next read happens in the same cycle the head packet
  is switched, so an input can forward one packet per cycle.
- **Routing** (`xy_route`). The routing logic compares the head packet's
  destination with the router's own position and picks an output. It uses
  dimension order: first east or west until the column matches, then north or
  south until the row matches, and finally the local port. Every route is
  therefore a shortest path, and the fixed order of turns rules out
  routing deadlock.
- **Arbitration** (`rr_arbiter`, one per output). Each output collects
  requests from the inputs whose head packet routes to it. A grant is used
  only if the output FIFO has room. While the output FIFO is full, the arbiter's
  priority state is frozen, so the input whose turn it was keeps that turn.
- **Crossbar** (`noc_crossbar`). The crossbar moves each granted head packet
  into its output FIFO. All five outputs can take packets from five different
  inputs in the same cycle.
- **Output buffering.** Each output FIFO drives its link through its own
  `data_out` register and valid flag, using the same head-register scheme as
  the inputs.

Having FIFOs on both sides of the switch absorbs congestion at either end. When
the output FIFOs are blocked, the input FIFOs fill and `in_ready` drops, which
pushes back on the upstream router. No packet is ever dropped inside the mesh.

### Timing

At zero load a packet takes 4 clock cycles per router:

1. It is written into the input FIFO.
2. It is read into the head register.
3. It is switched into the output FIFO.
4. It is read into the output register.

If a packet is accepted on a local input at edge t, its destination H hops
away accepts it at edge `t + 4*(H+1)`, provided the sink is ready. The
end-to-end testbench checks this figure. Each output port can forward one
packet per cycle.

## Round robin arbiter (`rr_arbiter`)

The arbiter is built from two fixed priority arbiters (`priority_arbiter`, in
which the lowest index wins) and a mask register:

- **Masked arbiter.** The request vector is ANDed with the mask, which keeps
  only the requesters numbered above the one served last. The masked priority
  arbiter picks among those.
- **Unmasked arbiter.** The unmasked priority arbiter picks among all requests.
- **Output mux.** A mux passes the masked grant, unless no masked request is
  left (`masked == 0`). In that case it passes the unmasked grant, and the
  turn wraps round to the lowest index.
- **Mask update.** On an edge where the grant is used (`advance`), the mask
  becomes `~((grant << 1) - 1)`, which selects every bit above the granted
  index.

The requester just served therefore drops to lowest priority. A requester that
keeps asking is served after at most N-1 others. After reset the mask is all
ones, so index 0 has the first turn.

## FIFO (`noc_fifo`)

The FIFO is a circular buffer with write and read pointers and an occupancy
counter. Its ports are `clk`, `rst`, `write_enable`, `read_enable`, `data_in`,
`full`, `empty` and `data_out`.

- **Write.** A write stores `data_in` on a rising edge when `write_enable` is
  high and the FIFO is not full.
- **Read.** A read on a rising edge with `read_enable` high and the FIFO not
  empty moves the oldest word into the `data_out` register, where it stays
  until the next read. A read from an empty FIFO is ignored.
- **Read and write together.** Both can happen in the same cycle. A write
  into a full FIFO is ignored, even if a read comes in the same cycle.

`full` means all `DEPTH` locations hold data, and `empty` means none does.
Reset is synchronous and active high.

## What is specified and what was chosen

The following points are fixed by the design's specification:

- a mesh of routers with a core at each node (4x4 in the reference diagram);
- packet switching with store-and-forward flow and whole packets;
- a header carrying source and destination addresses;
- shortest-path routing;
- input and output FIFO buffering on every port;
- a rotating-priority arbiter per output, built from masked and unmasked
  priority arbiters with mask logic;
- the FIFO's ports, operations and flag meanings.

The following are choices made for this implementation:

- 8-bit payload and 2-bit coordinates;
- FIFO depth 4;
- XY as the shortest-path algorithm;
- the valid/ready links and the head-register pipeline;
- the registered FIFO read port;
- the arbiter's mask-update rule and its `advance` input;
- synchronous reset;
- the edge tie-off;
- the port numbering (`noc_pkg::port_e`: local 0, north 1, east 2,
  south 3, west 4).

### Not included

- **Network interfaces and cores.** The design brings the local ports out
  where the network interfaces and cores would connect, but does not build
  either of them. Their packetisation and their protocol towards the core are
  not defined.
- **Fault tolerance.** There is no fault detection and no rerouting around
  faulty routers or links. The specification states the goal of keeping
  performance in the presence of faults, but gives no mechanism for it. An
  on-line march test of the FIFO buffers is related prior work and is not
  part of this design.
- **Virtual channels.** Each port has one FIFO per direction and no virtual
  channels.

### Implementation size

One router maps to about 860 4-input LUTs and 810 flip-flops on a Spartan-3E
class FPGA (yosys `synth_xilinx`). The ten 4x16 FIFOs are built from
flip-flops. This is in the same range as the roughly 1,050 LUTs reported for
the reference implementation. A router has 182 signal ports, and the 4x4 mesh
top has 578.

## Files

| file | contents |
|------|----------|
| `rtl/noc_pkg.sv` | packet type, port enum, widths |
| `rtl/noc_fifo.sv` | synchronous FIFO |
| `rtl/priority_arbiter.sv` | fixed priority arbiter |
| `rtl/rr_arbiter.sv` | round robin arbiter |
| `rtl/xy_route.sv` | XY routing logic |
| `rtl/noc_crossbar.sv` | 5x5 crossbar |
| `rtl/noc_router.sv` | five-port router |
| `rtl/noc_mesh.sv` | ROWS x COLS mesh, top level |
| `tb/tb_<module>.sv` | self-checking testbench for each module |

## Simulation

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_noc_mesh \
    -y rtl -y tb +libext+.sv rtl/noc_pkg.sv tb/tb_noc_mesh.sv
./obj_dir/Vtb_noc_mesh
```

To run a different testbench, replace `tb_noc_mesh` with its name.

- **`tb_noc_mesh`** runs the full 4x4 mesh at its default parameters. It
  checks the zero-load latency over 0 to 6 hops. It then runs uniform random
  traffic and hotspot traffic with sinks that are often not ready, and drains
  the network. The scoreboard checks that every packet arrives once, at the
  right node, and in order for each source-destination pair. The test also
  confirms that each of these happened at least once: arbitration
  contention, back-pressure on a local port and on a router-to-router link,
  sink stalls, and traffic in all four directions.
- **`tb_noc_router`** tests one router in the same way, with random traffic
  on all five ports.
- **`tb_noc_fifo`, `tb_rr_arbiter`, `tb_priority_arbiter`, `tb_xy_route` and
  `tb_noc_crossbar`** compare their modules against reference models written
  in the testbench. The arbiter test includes the fairness and N-1 worst-case
  wait checks. The routing test walks every route hop by hop and checks that
  it has the Manhattan length.

To change the mesh size or the FIFO depth, override `ROWS`, `COLS` or `DEPTH`
on `noc_mesh`. To change the packet layout, edit `noc_pkg`.
