# Virtual-router networks on chip (RVNOC and LVNOC)

A 3D network on chip connects many cores by stacking 2D meshes and joining
them with vertical links. Those vertical links are expensive. This design
offers the same number of cores without them. Every node of a flat
`COLS x ROWS` grid is a **global router (RG)**. Inside each RG are `NLEV`
**elementary routers** that share the same (x, y) coordinates: a base router
and `NLEV-1` "virtual" routers. Elementary router k of every RG belongs to
level k. Each level is its own separate 2D mesh, and no link joins two levels.
A **network interface (NI)** at each RG connects `NLEV` cores (IPs) to the
levels. A packet is placed on one level, crosses that mesh, and is handed to
its destination IP. With the default 3 x 3 grid and 3 levels, each network
serves 27 IPs, as many as a 3 x 3 x 3 cube, but there is no Z axis to cross.

The design implements the architecture of the publication "New Design of
Network on Chip Based on Virtual Routers". It provides two versions of the
network, and both are built and placed side by side in the top module
`vnoc_top`:

| | RVNOC (reduced virtual NoC) | LVNOC (low-latency virtual NoC) |
|---|---|---|
| local port of an RG | one input and one output, shared by the levels in time | one input and one output per level |
| when a router works | only in its level's time slot, 1 clock in `NLEV` | on every clock |
| extra hardware | half-cycle counters, zero-set units, OR gates | none |
| bidirectional links, 3x3x3 | 3 x 12 mesh + 9 local = 45 | 3 x 12 mesh + 27 local = 63 |
| zero-load latency, 2 hops (this RTL) | 9 clocks | 3 clocks |

Everything is synthesizable SystemVerilog. The parameters default to the
3 x 3 x 3 configuration.

## Links and packets

Every connection (router to router, NI to router, IP to NI) is one
`link_fwd_t` forward bundle and one `link_bwd_t` backward bundle. Both are
defined in `vnoc_pkg`.

- **Forward bundle:** `req` (a flit is on the link this step), `data` (a
  32-bit flit) and `nb` (4 bits). `nb` is the number of times the packet has
  left the XY path so far.
- **Backward bundle:** `ack_v` (an acknowledge this step) and a 2-bit `ack`:

| ack | meaning |
|---|---|
| 00 | header received |
| 01 | first body flit received |
| 11 | whole packet received; the sender may free its copy |
| 10 | refused; the sender keeps its copy and sends the whole packet again later |

The first flit of a packet is the header. From MSB to LSB it holds:

| 31:28 | 27:24 | 23:20 | 19:16 | 15:8 | 7:4 | 3:0 |
|---|---|---|---|---|---|---|
| Y source | X source | source IP | destination IP (@IP D) | length | Y dest. | X dest. |

`length` is the number of body flits that follow, from 0 to 15. A whole packet
therefore fits a 16-flit buffer. The IP fields give the core's index inside
its RG (0..NLEV-1).

A sender streams one flit per step, without waiting for each acknowledge
(cut-through). The receiver answers:

- 00 in the step after the header;
- 01 after the first body flit;
- 11 after the last flit;
- 11 straight away for a header-only packet.

When the sender sees ack 10, it drops `req` at once. It then starts again
from the header.

## The elementary router

`elementary_router` has five ports: 0 W, 1 E, 2 N, 3 S, 4 L. East is x+1 and
North is y-1. It has three parts.

**Input ports (`input_port`, `packet_buffer`).** Each input has a 16 x 32
buffer and stores every arriving packet at once, whether or not its output is
free. It accepts a new header only when the buffer is empty; otherwise it
answers ack 10. The stored copy stays until the next router answers ack 11.
This is why ack 10 (refusal) can be handled by simply sending the packet
again. The header of an arriving packet is also passed to the routing unit
in the same clock, so a packet can leave one step after it arrived.

**Routing unit (`routing_unit`).** At each step it looks at every input that
has a packet waiting and chooses an output. The order of preference is:

1. The XY port (X first, then Y), if its state bit `STA.P` is 0.
2. Otherwise, if the packet's `NB` is below the threshold `TNB`, another
   port. The two ports at right angles to the XY port come first; the one
   that also brings the packet closer on the other axis is tried first. The
   port opposite to the XY port comes last. A packet is never sent back
   through the port it came in on, and ports on the mesh border count as
   busy. Taking any port other than the XY port adds 1 to NB.
3. If nothing is free, or NB has reached TNB, the packet **waits for its XY
   port**. While it waits it reserves that port: the port reads busy to
   everyone else, and the waiting packet is served first when the port frees.
   This gives first-come, first-served order and stops starvation.

Requests made in the same step are served one by one within the step:

- waiting packets first;
- then higher NB first;
- then in the fixed order E > S > W > N > L.

So an output can never be given twice. An output stays owned until the
transfer ends with ack 11, or with ack 10, after which the packet is routed
again. The NB limit keeps adaptive routing from looping forever (livelock).
Once NB = TNB the packet follows plain XY, which is free of deadlock.

**Crossbar (`crossbar`).** This is combinational multiplexing. Each output
carries the flits of the input that owns it, and each acknowledge is steered
back to that input.

**Timing.** A flit written into a buffer at one clock edge is on the output
link right after that edge. Each router crossing therefore costs one step.

## Time-sharing in the RVNOC

In an RVNOC global router (`rvnoc_rg`) the levels take turns.

- Each elementary router has a `half_cycle_counter` that counts
  1, 2, 0, 1, 2, 0, … (modulo `NLEV`, starting at 1 after reset). Level k
  works in slot (k+1) mod `NLEV`.
- One slot is one period of `clk`. This "half cycle" is the clock of the
  time-shared port. A router is therefore active one clock in three, and
  all its registers advance only then.
- All counters leave reset together, so every router and NI of a network
  stays in step. Routers of the same level in neighbouring RGs share a slot,
  so the mesh links between them need no gating.
- **Shared local output.** Outside its slot, a router forces its local
  output and the acknowledge of its local input to 0. The local outputs of
  the levels are then simply ORed (`or_combiner`) into the RG's one local
  output, and the same is done for the acknowledges.
- **Shared local input.** The single local input wire goes to every level.
  Each level reads it only in its own slot.
- **In the NI (`rvnoc_ni`).** A `zero_set_unit` lets each IP's link through
  only in the slot of the level the IP was given, and an OR gate merges the
  IPs onto the shared wire. In the other direction, the NI's per-level
  acknowledges are gated to their slots and ORed.

The LVNOC global router (`lvnoc_rg`) is the same set of routers with
`RVNOC = 0`. They have no counter, work on every edge, and each keeps its own
local port.

## The network interface

**Sending (`ni_inject`).** When IP j raises `req` with a header, the NI gives
it a level:

- the level numbered like the destination IP (@IP D), if no other IP of this
  NI holds that level; in the RVNOC the NI waits for that level's slot;
- otherwise the lowest-numbered free level whose step it is.

IPs are served in index order. The IP keeps the level until the router
answers ack 11 or ack 10. After ack 10 the IP sends again and may get a
different level. The output `ip_step[j]` tells the IP at which clock edges
its link moves: its level's slot in the RVNOC, every edge in the LVNOC.

**Receiving (`ni_eject`).** A packet that arrives on level k for IP d takes
one of three paths:

- **Direct path.** If k = d and IP d's output is idle, the packet passes
  straight to the IP in the same step.
- **Buffered.** Otherwise it is stored whole in one of the `NLEV-1` packet
  buffers kept for IP d, the one reserved for level k. A complete buffered
  packet is then sent to the IP, one flit per step.
- **Refused.** If the direct path is busy or that buffer is occupied, the NI
  answers ack 10 and the router sends the packet again later.

Each IP output carries one packet at a time. In the RVNOC it moves only in
slot d, so a packet stored in the slot of the level it came on leaves in the
slot of its destination IP. `ip_out_v[d]` marks each delivered flit. IPs are
assumed to always accept flits.

## Meshes, IP numbering and the top module

`rvnoc_mesh` and `lvnoc_mesh` place one global router and one NI at every
(x, y). They join level k of each RG to level k of its four neighbours. IP
number `(y*COLS + x)*NLEV + j` is core j of RG (x, y).

`vnoc_top` instantiates one of each mesh. The two share only `clk` and
`rst_n`. Each has its own array of IP ports:

| port (rv_ for the RVNOC, lv_ for the LVNOC) | direction | meaning |
|---|---|---|
| `*_ip_fwd[NIP]` | in | each IP's outgoing link (req, header/body flit, nb = 0) |
| `*_ip_bwd[NIP]` | out | acknowledge to each IP (00/01/11/10) |
| `*_ip_step[NIP]` | out | the IP's link moves at this edge |
| `*_ip_out_v[NIP]`, `*_ip_out_data[NIP]` | out | a flit delivered to the IP |

An IP holds its header on `ip_fwd` with `req` high until the NI connects it.
It advances one flit at every edge where `ip_step` is high. It drops `req` on
ack 10 and resends from the header, and it is done on ack 11. The IP cores
themselves are not part of the design; in the testbenches a traffic model
plays them.

## Latency, and how it compares with the publication

For a packet in an idle network the header advances one router per step.
The publication's example sends from RG(0,2) to RG(1,1) of a 3 x 3 network.
That is two hops, so three routers are crossed (source, middle and
destination RG).

- **LVNOC.** The header reaches the destination IP 3 clocks after the edge
  at which the source IP's link moved.
- **RVNOC.** Each step is 3 clocks, so the same trip takes 9 clocks.

The publication counts 2 cycles (LVNOC) and 3 cycles (RVNOC) for the same
example. It counts hops and gives no cycle-level timing of the NI or of the
slots. The end-to-end testbench checks the 3 and 9 clocks of this RTL.

The publication also reports average-latency curves against injection rate
(uniform traffic at 3x3, 4x4 and 5x5) and FPGA area and frequency figures.
Neither was reproduced. The testbenches run uniform and hot-spot traffic at
one injection rate at 3 x 3 x 3, and uniform traffic at 4 x 4 x 3 with
`TNB = 4` (RVNOC about 118 clocks, LVNOC about 25). There, the LVNOC's mean latency is a small
fraction of the RVNOC's (for example about 21 against 220 clocks in the
combined run), which agrees with the publication's ranking.

## Where this design departs from the publication or fills gaps

- **Header width.** The publication defines a 32-bit header, but its
  fields add up to 40 bits because the length field is 16 bits. Here the
  header and flit are 32 bits, and the length field is 8 bits counting body
  flits, so a packet always fits a 16-flit buffer.
- **TNB test.** A flow chart in the publication compares NB with TNB using
  "<=". Its text says XY is used once NB *equals* TNB. The text is followed:
  adaptive while NB < TNB.
- **Counter modulus.** The text says the slot counter runs modulo N-1, but
  the published slot sequence for three routers is 1, 2, 0. The sequence is
  followed (modulo `NLEV`, start 1).
- **Routing choice.** The publication tabulates the adaptive choice only
  for one case (destination to the east, seen from the local input). The
  general rule above (perpendicular ports, nearer one first, then the
  opposite port; never back through the input; border ports busy) is a
  generalisation. When only y differs, both perpendicular ports are E/W and
  E is tried first.
- **NB transport.** NB travels as a separate 4-bit side signal on each link,
  not inside the header. It saturates at 15.
- **What ack 10 means.** The publication only says ack 10 signals a
  transmission error. Here it means refusal: a router input refuses when it
  still holds a packet, and the NI refuses when the direct path or buffer is
  busy. In both cases the packet is resent.
- **Ack timing.** Acknowledges are registered one step after the flit they
  answer, with the `ack_v` strobe added. The publication gives no timing.
- **Simultaneous requests.** The publication describes detecting and
  stopping a double grant. Here allocation is sequential inside one
  combinational pass, so a double grant cannot happen.
- **"Half cycle".** A half cycle is one period of `clk`. Both edges of a
  slower clock are not used.
- **NI buffers.** Each buffer is 16 flits (one packet); the publication
  gives no depth. Level assignment ties go to the lower IP index.
- **IP side.** The IPs are not designed. The IP-side handshake (`ip_step`,
  an always-ready sink) is this design's own.
- **Not built.** The baseline 2D and 3D networks used for comparison, and
  the FPGA implementation figures.

## Sizes and parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `COLS`, `ROWS` | 3, 3 | meshes, top, routers | grid of global routers (coordinates are 4 bits, so up to 16 x 16) |
| `NLEV` | 3 | everywhere | levels (separate meshes) = IPs per RG |
| `TNB` | 3 | routing | NB limit; the publication uses 3 for 3x3 and 4 for 4x4 |
| `DEPTH` | 16 | buffers | flits per input buffer and per NI buffer |

The default 3 x 3 x 3 runs the publication's 3 x 3 cases directly. The 4 x 4
and 5 x 5 cases need `COLS`/`ROWS` overrides, and for 4 x 4 also `TNB = 4`.
The 4 x 4 case is simulated by `tb_workload_4x4`; 5 x 5 is not. At the default size each network has
27 x 5 = 135 router input buffers. Coarse synthesis of `vnoc_top` gives about
106 k word-level cells and 10.8 k flip-flop bits, with the buffers kept as
memories (157 k bits).

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one:

- uses random stimulus (`$urandom`);
- compares against values the bench works out itself;
- has a watchdog;
- ends with the line `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_packet_buffer`, `tb_crossbar`, `tb_or_combiner`, `tb_zero_set_unit`, `tb_half_cycle_counter` | exhaustive or random comparison with a model; slot sequence 1,2,0 |
| `tb_input_port` | ack sequence 00/01/11, ack 10 when full, header bypass, transmission, rewind on ack 10, nothing moves while `en` is low |
| `tb_routing_unit` | grants against a model of the rules above at all 9 positions, NB update, wait and reservation, priority order |
| `tb_elementary_router` | random packets from all inputs with refusing neighbours at all 9 positions: integrity, legal port, NB, slot behaviour |
| `tb_rvnoc_rg`, `tb_lvnoc_rg` (body in `tb_rg_body.svh`) | the same for all three levels, plus: packets stay on their level, levels follow their slots, shared local port |
| `tb_ni_inject`, `tb_ni_eject` | level choice against a model; direct path in the same step; one packet at a time per IP; slot of the IP output |
| `tb_rvnoc_ni`, `tb_lvnoc_ni` | interface plus one RG (1 x 1 mesh) under heavy traffic |
| `tb_rvnoc_mesh`, `tb_lvnoc_mesh`, `tb_vnoc_top` | full 3x3x3 networks: zero-load latency (9 / 3 clocks), uniform then hot-spot traffic, scoreboard of every flit |
| `tb_workload_4x4` | both meshes overridden to 4 x 4 with `TNB = 4`: every packet of a uniform load delivered intact, LVNOC faster |

The mesh and top benches also count how often each mechanism happened, and
fail any that never did. The counted mechanisms are:

- adaptive misroute;
- waiting for the XY port;
- XY forced by NB = TNB;
- router ack 10 and resend;
- NI use of another level;
- NI buffering;
- NI direct path;
- local output of each level.

`tb_vnoc_top` runs at the default parameters. The shared pieces are the
traffic generator and scoreboard (`tb/noc_traffic.sv`) and the event
counters (`tb/tb_mesh_events.svh`).

Every testbench was also run against a copy of its module with one
deliberate bug, and each of those runs failed.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/vnoc_pkg.sv tb/tb_vnoc_top.sv \
    --top-module tb_vnoc_top -y rtl -y tb -Mdir obj -o sim && ./obj/sim
```

Building `tb_vnoc_top` takes about a minute; the run itself takes well under
a second.

Lint notes: `verilator -Wall` reports only unused signals. These are:

- status outputs (`en`, `sta`, `misroute`) of routers inside the RGs, which
  are observed only by the testbenches;
- header fields a block does not need;
- the NI's per-level sending links in the RVNOC, which the shared wire
  replaces.

Linting the package `vnoc_pkg` on its own also reports its constants as
unused parameters, since nothing in the package uses them. The concurrent
assertions use `disable iff (!rst_n)`. Verilator therefore reports the reset
as used both synchronously and asynchronously (SYNCASYNCNET). This affects
only the checking logic, not the circuit.

## Files

| file | contents |
|---|---|
| `rtl/vnoc_pkg.sv` | widths, link and header types, ack codes, XY direction function |
| `rtl/packet_buffer.sv` | 16 x 32 buffer, synchronous write, asynchronous read |
| `rtl/input_port.sv` | receive handshake, storage, (re)transmission |
| `rtl/routing_unit.sv` | XY / adaptive output allocation, state signals, priorities |
| `rtl/crossbar.sv` | 5 x 5 combinational switch |
| `rtl/half_cycle_counter.sv` | RVNOC slot counter |
| `rtl/elementary_router.sv` | the five-port router, RVNOC or LVNOC variant |
| `rtl/or_combiner.sv`, `rtl/zero_set_unit.sv` | RVNOC sharing logic |
| `rtl/rvnoc_rg.sv`, `rtl/lvnoc_rg.sv` | global routers |
| `rtl/ni_inject.sv`, `rtl/ni_eject.sv` | NI sending and receiving sides |
| `rtl/rvnoc_ni.sv`, `rtl/lvnoc_ni.sv` | complete network interfaces |
| `rtl/rvnoc_mesh.sv`, `rtl/lvnoc_mesh.sv` | the two networks |
| `rtl/vnoc_top.sv` | both networks side by side |
| `tb/` | testbenches and their shared models |
