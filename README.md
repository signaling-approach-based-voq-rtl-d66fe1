# VOQ wormhole router with congestion signaling, for a 2D-mesh network on chip

A network on chip moves packets between the cores of a chip through a grid of
routers. Two things slow such a network down:

* **Head-of-line blocking.** When an input port keeps one FIFO, a packet waiting
  for a busy output stops every packet behind it, even those bound for idle
  outputs.
* **Congestion.** A router keeps sending packets towards a neighbour whose
  buffers are full, while another route of the same length would be free.

This router deals with the first problem by using **virtual output queues**
(VOQ). Every input port keeps a separate queue for each output port. A packet
that waits for an output only holds back traffic for that same output.

It deals with the second problem with a **signaling block**. Neighbouring
routers send each other small one-hop *signaling flits*, which say which
queues are full. Each router stores what its neighbours report in a table,
and its routing blocks read that table to send packets around a congested
neighbour.

The RTL is a five-port router (`voq_router`) and a parameterised 2D mesh of
such routers (`noc_mesh`, the top, 3 x 3 by default). It is plain
synthesizable SystemVerilog-2017.

## Flits, packets and links

A flit is 10 bits: a 2-bit type and one data byte (`voq_pkg::flit_t`).

| type      | code | data byte                                                      |
|-----------|------|----------------------------------------------------------------|
| `FT_SIG`  | 0    | signaling flit: bit q = queue q of the sender's input port is full |
| `FT_HEAD` | 1    | `{dst_y[3:0], dst_x[3:0]}`, the destination node              |
| `FT_BODY` | 2    | payload                                                        |
| `FT_TAIL` | 3    | payload, last flit of the packet                               |

A packet has one HEAD, zero or more BODY flits and one TAIL, so it is at least
two flits long. A signaling flit never becomes part of a packet. It may show
up on a link between two flits of a packet, and the next router removes it
before its queues.

Every link is one-way and carries `flit`, `valid` and `ready`. A flit moves in
a cycle where `valid && ready`. Two properties matter when you connect
routers:

* `out_valid` and `out_flit` depend only on registers. They never depend on
  `out_ready`, so links between routers form no combinational loop.
* `in_ready` depends on the flit being offered. A signaling flit is always
  accepted. A data flit is accepted when the queue it must enter has space.
  For a HEAD flit, that queue is known only after the flit has been routed,
  so `in_ready` follows from `in_flit` through the routing block.

A sender may replace an offered flit that was not taken. The router itself
does this when a signaling flit becomes due. A receiver must not assume that
the flit stays stable.

Ports are numbered 0 `LOCAL`, 1 `NORTH` (+y), 2 `EAST` (+x), 3 `SOUTH`
(-y), 4 `WEST` (-x).

## Inside the router

```
 in[p] --> input_demux --> voq_buffer[p] (5 queues) --+--> out_scheduler[0] --> out[0]
              |   ^                                   +--> out_scheduler[1] --> out[1]
      dst     v   | port                              :          ...
            route_unit <--- table --- signaling_block <--- SIG flits from every demux
                                             |  ^
                                 SIG to send v  | full flags of every queue
                                       out_scheduler[p]
```

Each input port has three blocks:

* **`input_demux`** shows the destination of a HEAD flit to the routing block.
  It writes the flit into the queue that the routing block names, and keeps
  that queue number for the packet's BODY and TAIL flits (wormhole switching).
  It passes signaling flits to the signaling block.
* **`route_unit`** is combinational, described below.
* **`voq_buffer`** holds five FIFOs, one per output. It is built from
  `voq_ctrl`, the control unit (pointers, counts, full and empty flags), and
  `voq_mem`, the memory block. The memory is a flip-flop array split into
  five fixed regions of `DEPTH` flits. It has one write port and five
  asynchronous read ports, so the five outputs can each read their own queue
  of the same input in the same cycle.

Each output port has an **`out_scheduler`**. While the output is free, a
round-robin arbiter (`rr_arbiter`) picks one of the five input queues that
feed this output. After that queue's HEAD flit leaves, the output stays
locked to that input until the TAIL flit has left. Flits of two packets
therefore never mix on a link. If the locked queue runs empty in the middle
of a packet, the output waits. Other inputs keep their flits in their own
queues for this output, and their queues for other outputs keep draining.

### Timing

A flit accepted at a clock edge is in its queue right after that edge. If its
output is free and ready, it leaves on the next cycle. An idle router therefore
adds **one cycle** per hop. A packet that crosses h links needs h + 1 cycles
from the source core's link to the destination core's link. For example, a
packet from corner (0,0) to corner (2,2) of a 3 x 3 mesh takes 5 cycles. The
router can take one flit per cycle on every input and send one flit per cycle
on every output.

## The signaling block and congestion

For each link, the congestion state that matters is this: do the queues of
the input port at the far end have free space? A queue with no free space
counts as congested.

`signaling_block` has two jobs:

1. **Sending.** For each mesh port p, it compares the full flags of its own
   input port p with the last state it sent out on output p. When they
   differ, it asks the scheduler of output p to send a signaling flit with the
   five flags. That flit has priority over data for one cycle. Signaling flits
   are therefore sent only when the state changes, each change is reported,
   and a link never carries more of them than the flags change.
2. **Receiving.** A signaling flit that arrives on port p overwrites table
   entry p. Bit q of that entry says that queue q of the neighbour's input
   port facing this router is full. The routing blocks read the table.

The local port neither sends nor uses signaling flits (`SIG_PORTS =
5'b11110`). At the edge of the mesh, signaling flits sent towards a missing
neighbour are dropped.

## Routing: XY, adaptive towards the east

`route_unit` uses dimension-ordered XY routing. The packet first moves along
x (EAST or WEST) until the column matches, then along y, then to `LOCAL`.

When `ADAPTIVE = 1`, one exception applies. It uses the table
*per queue*. For each possible next hop, the routing block works out which
queue the packet would enter at that neighbour, which is the queue of the
output the neighbour's XY rule gives the packet. It then checks whether that
queue is full.

Suppose a packet heading east still needs a y hop, its queue at the EAST
neighbour is full, and its queue at the y neighbour (NORTH or SOUTH) is not.
Then the packet takes the y hop first. Both choices are minimal, so a packet
never moves away from its destination, and livelock cannot occur. A
neighbour whose queue for some other output is full does not divert the
packet. Only the queue the packet needs counts.

Only eastbound packets adapt, and this is deliberate. If westbound packets
could also turn, a packet could later turn from NORTH or SOUTH into WEST.
With such turns, the wormhole mesh can form a cycle of packets that each wait
for the next. In simulation, the unrestricted rule deadlocked a 3 x 3 mesh
under uniform random traffic. With the restriction, the rule is the
*west-first* turn model, which cannot deadlock. `ADAPTIVE = 0` gives plain XY
routing.

## Parameters

| parameter   | where                  | default    | meaning |
|-------------|------------------------|------------|---------|
| `NPORTS`    | `voq_pkg`              | 5          | router ports, local plus four mesh directions |
| `DATA_W`    | `voq_pkg`              | 8          | data bits per flit |
| `COORD_W`   | `voq_pkg`              | 4          | bits per coordinate, so meshes up to 16 x 16 |
| `COLS, ROWS`| `noc_mesh`             | 3, 3       | mesh size |
| `DEPTH`     | `noc_mesh`, `voq_router` | 4        | flits per virtual output queue |
| `ADAPTIVE`  | `noc_mesh`, `voq_router` | 1        | congestion-adaptive routing on or off |
| `X_POS, Y_POS` | `voq_router`        | 0, 0       | position of the router in the mesh |
| `SIG_PORTS` | `voq_router`           | `5'b11110` | ports that take part in signaling |

At the defaults, each router stores 5 x 5 x 4 x 10 = 1000 bits of queue
memory plus about 290 flip-flops of control state.

## What comes from the source design, and what was chosen here

The following comes from the source design:

* A router with five input and five output ports for a 2D mesh.
* Wormhole switching.
* Virtual output queues: one queue per output on every input port, built from
  a control unit and a memory block.
* The block split into demux, routing block, VOQ, scheduler/arbiter and
  signaling block.
* Congestion defined as "no free space in the buffer".
* Signaling flits that carry this state in fixed bit positions and update a
  per-neighbour table on every arrival.
* XY routing that adapts to congestion.

Everything below is a choice made here:

* Flit format and type encodings, and the byte-wide data. The source only
  speaks of storing "data bytes".
* Queue depth (4) and static partitioning of the memory.
* The valid/ready link handshake and the one-cycle-per-hop timing.
* Round-robin scheduling with per-packet locking.
* Sending signaling flits on change, with priority over data.
* The exact adaptive rule, including its west-first restriction.
* Mesh size (3 x 3).
* Active-low asynchronous reset `rst_n`. Queue memory is not reset, because
  it is never read before it is written.

The source reports an FPGA implementation of one router of 348 slices, 477
flip-flops and 402 4-input LUTs, with 6.2 ns combinational delay. It gives no
queue depth or flit width, so those numbers are neither matched nor targeted
here.

## Files

| file | contents |
|------|----------|
| `rtl/voq_pkg.sv` | flit type, port numbers, sizes |
| `rtl/noc_mesh.sv` | top: 2D mesh |
| `rtl/voq_router.sv` | five-port router |
| `rtl/input_demux.sv` | input demux |
| `rtl/route_unit.sv` | routing block |
| `rtl/voq_buffer.sv`, `rtl/voq_ctrl.sv`, `rtl/voq_mem.sv` | VOQ block, control unit, memory |
| `rtl/out_scheduler.sv`, `rtl/rr_arbiter.sv` | output scheduler and its arbiter |
| `rtl/signaling_block.sv` | signaling block |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench checks itself and prints `TB_RESULT checks=N failures=M`. The
commands below assume Verilator 5, run from the folder that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/voq_pkg.sv tb/tb_noc_mesh.sv --top-module tb_noc_mesh -o sim
./obj_dir/sim
```

Replace `tb_noc_mesh` with any other `tb_*` name to run that test.

* **`tb_noc_mesh`** runs the whole 3 x 3 mesh at its default parameters, with
  the testbench acting as the nine cores. It sends a lone corner-to-corner
  packet and checks its 5-cycle latency. It then runs uniform random traffic
  with throttled cores, and finally a hot spot in which one core stops taking
  flits. Every packet must arrive exactly once, complete and in order, at the
  node named in its head. The test also counts, inside the routers, every
  mechanism listed above, and fails if any of them never happened: link stall,
  full queue, a write into one queue while another queue of the same input is
  full, a locked output waiting for its owner, arbitration, signaling flits
  sent and received, and adaptive re-routing.
* **`tb_noc_mesh_xy`** runs the same traffic with `ADAPTIVE = 0`. It checks
  that no packet is re-routed, and that packets of one source and destination
  pair arrive in the order they were sent.
* **`tb_voq_router`** plays the five neighbours of one router. In the XY
  phase it checks exact output ports. In a second phase, it tells the EAST
  neighbour that its NORTH and SOUTH queues are full, and checks the adaptive
  turn. In a phase with random
  signaling, any minimal port is accepted. It also checks the one-cycle
  latency, and that the router's last signaling flits report no full queue
  once everything has drained.
* The block testbenches compare each block with a reference model written in
  the testbench, over random stimulus. `tb_route_unit` covers every
  position and destination pair of a 5 x 5 mesh, with 32 random neighbour
  tables for each.

Assertions in the RTL check the queue and packet rules: no write to a full
queue, no read from an empty queue, HEAD only outside a packet and BODY/TAIL
only inside one, one-hot grants. Run with `--assert` to enable them.

## Limits

* The queue a packet would enter at a neighbour is predicted with plain XY
  routing. If the neighbour later diverts the packet, the prediction was
  wrong, but only for that hop's congestion check.
* Only eastbound packets adapt (see Routing). Westbound traffic always
  follows XY.
* A signaling flit waits only for the downstream `ready`. If `ready` is held
  low, the state update waits with it.
