# FPGA-accelerated NoC emulator: network and host interface RTL

This is the hardware half of a network-on-chip (NoC) emulator in which the
network under test runs as real logic on an FPGA, while everything that
produces and consumes traffic runs as software on an embedded soft processor.
The software side covers the traffic generators, source queues, traffic
receptors and latency statistics. Moving the traffic models into software
leaves the logic free for routers, so a larger network fits on the device.
Letting the software step the network clock keeps the emulation cycle
accurate, however long the software needs per cycle.

The RTL here contains:

* a 5x5 2D mesh of five-port, single-stage virtual-channel (VC) routers, with
  X-Y dimension-ordered routing and credit-based flow control;
* the register bank through which the processor injects flits, reads ejected
  flits, reads buffer status and steps the emulation clock;
* the shared block-RAM FIFO that the trace-driven mode uses to pass trace
  records from one processor to another.

The processors, their bus, the UART, the flash-card controller and the memories
are vendor IP and are not included. The software is represented by a
behavioural model in the end-to-end testbench.

## The emulation cycle

The network never sees a free-running clock. All of its flip-flops share the
system clock and advance only when the `tick` enable is high. `tick` is a
one-cycle pulse that `emu_clock_gen` makes whenever software writes the clock
register from 0 to 1. One emulation cycle is a fixed sequence of events:

| step | who | what happens |
|------|-----|--------------|
| A | hardware | rising edge of the emulation clock (`tick`). Every router moves its flits one step. Injected flits enter the local input buffers. Ejected flits appear in the local output registers. |
| B | software | writes 0 to the clock register and reads the input status words (full flag of every local input VC). |
| C | software | each traffic generator may build a packet into its source queue. For each node whose front flit's VC is not full, it writes the flit to that node's input data register and sets the node's valid bit. |
| D | software | reads the output status words. For every flagged node it reads that node's output data register, which holds a head flit. |
| E | software | the receptor checks the destination and computes latency from the source id and packet id. |
| F | software | writes 1 to the clock register, which starts the next cycle (back to A). |

So the network runs one cycle per pass of the software loop. The hardware
itself is limited to one injected and one ejected flit per node per cycle.

## Flit format

Links and flits are 32 bits wide. Longer packets, or wider emulated links, are
made of more flits.

```
head:  [31:30] type  [29] VCID  [28:26] CNOP  [25:23] src X  [22:20] src Y
       [19:17] dst X [16:14] dst Y  [13:12] unused  [11:0] packet id
body/tail: [31:30] type  [29] VCID  [28:0] payload
type: 00 head, 01 body, 10 tail, 11 single-flit packet (head and tail)
```

**CNOP** is the port the packet must take at the router that currently holds
it. The source fills it in for the first router. Each router rewrites it for
the next router as the head flit leaves. **VCID** names the VC the flit
occupies in the input port it is entering, and each router rewrites it to the
output VC it allocated. The 3-bit coordinates allow meshes up to 8x8. The
12-bit packet id lets each source have up to 4096 packets in flight. The
software's latency table is indexed by (source, packet id) and must not see
an id reused while in flight.

The port codes are N=0, S=1, E=2, W=3, L=4. North is +Y and east is +X. Node
(0,0) is the south-west corner, and node number n = y*MESH_X + x. These codes
and conventions are choices made for this RTL.

## The router (`router.sv`)

Each router has five ports. Each input port has an **input unit**
(`input_unit.sv`) with `NVC` = 2 VC FIFOs of `DEPTH` = 8 flits (`vc_fifo.sv`).
Each input VC also keeps its own state:

* *active*: the VC holds an output VC;
* *R*: the output port the packet takes;
* *O*: the output VC it was given.

Each output port has an **output unit** (`output_unit.sv`). It holds one
credit counter and one busy flag per downstream VC, the output register and
the programmable delay registers.

Everything a flit needs happens within a single network cycle:

1. **Route computation is done one hop ahead** (`nrc.sv`). The head flit's CNOP
   already says where it goes here. The next-hop unit works out the neighbour
   reached through that port and applies X-Y routing there: X first, then Y,
   then eject. The result replaces CNOP when the flit leaves. So routing never
   sits on the critical path of the current router.
2. **VC allocation** (`vc_alloc.sv`). An idle input VC whose front flit is a
   head asks for an output VC at port CNOP. There is one arbiter per output
   port over all 10 input VCs. The winner gets the lowest-numbered free VC of
   that port, so each port hands out at most one VC per cycle.
3. **Switch allocation** (`sw_alloc.sv`). A VC may bid if it holds an output
   VC, or is being granted one in this same cycle, and that output VC has at
   least one credit. The allocator is separable and input-first: each input
   picks one VC, then each output picks one input.
4. **Crossbar traversal** (`crossbar.sv`). The winning flits, with VCID and
   CNOP rewritten, pass through the crossbar into the output registers.

Steps 2 and 3 are chained combinationally. A head flit can therefore be
allocated a VC and switched in the same cycle it reaches the front of its
FIFO.

Both allocators use `rr_arbiter.sv`, which is round robin by default
(`ROUND_ROBIN=1`) or fixed priority. A pointer only moves when its grant is
used.

**Credits.** An output unit's counter starts at `DEPTH`. It drops by one for
each flit sent on that VC and rises by one for each credit that comes back.
An input unit returns one credit, registered, in the cycle after each flit
leaves one of its FIFOs. An output VC becomes free again when its tail flit
leaves. The local input port is the exception: it is fed from the register
bank and uses the VC full flags instead of credits. The local output port
always accepts, because the register bank credits every ejected flit straight
back.

**Timing.** A flit written into a FIFO at tick *k* can leave the router at tick
*k+1* and enter the next router's FIFO at tick *k+2*. Each router plus its
link therefore costs two cycles. An unloaded packet crossing *h* hops is seen
at the destination's local output 2(*h*+1) cycles after it is injected. For
example, a single-flit packet from (0,0) to (4,4) takes 18 cycles.

**Delay registers** (`delay_unit.sv`). `DELAY` extra register stages after
each output register emulate a deeper router pipeline or a slower link. Each
stage adds one cycle per hop without reducing throughput. The baseline uses
none: the routers build the unit with zero stages, which leaves a plain wire.
Built on its own, the unit defaults to one stage.

**Edge routers.** The mesh ties ports that face off the edge to idle. X-Y
routing never selects them, so synthesis removes their logic. The RTL has a
single five-port router; there are no separate 3- and 4-port versions.

## Mesh (`noc_mesh.sv`)

Router (x,y) connects its E port to the W port of (x+1,y), and its N port to
the S port of (x,y+1). Every link has two parts:

* a flit channel: a 32-bit flit plus a valid bit;
* a separate credit channel in the opposite direction: a valid bit plus the VC
  id.

Links are plain wires, so a link adds no register beyond the output register.
The local ports of all nodes are brought out as arrays.

## Register bank (`hw_reg_bank.sv`)

All registers are 32 bits, reached by word address through a simple port:
`bus_wr` with `bus_wdata`, and `bus_rd` with `bus_rdata`. Read data comes back
one clock later, flagged by `bus_rvalid`. This port takes the place of the
processor bus slave.

| `addr[11:8]` | index | register | access |
|---|---|---|---|
| 0 | 0 | clock, bit 0; writing 0 then 1 advances the network one cycle | R/W |
| 1 | w | input valid; bit b is node 32w+b. Cleared by hardware on each tick | R/W |
| 2 | w | input status; bit b is the full flag of VC (32w+b) mod NVC of node (32w+b) div NVC | R |
| 3 | w | output status; bit b is set when node 32w+b ejected a head flit in this cycle | R |
| 4 | n | input data for node n | R/W |
| 5 | n | output data: the flit at node n's local output in this cycle | R |

The address map, the automatic clearing of the valid bits and the
"head flits only" rule for output status are choices made for this RTL. With
the status rule, software sees one flag per arriving packet.

## Shared BRAM FIFO (`shbram_fifo.sv`)

In trace-driven mode, one processor reads the trace from the flash card and a
second one injects it. They meet in a 32 KB FIFO of 8192 words of 32 bits.
Only one side may use the memory in any cycle. The FIFO is therefore a
single-port RAM with an arbiter: when both sides ask at once, the side that
was not served last wins. Each side gets a same-cycle acknowledge. Read data
follows one cycle later, as from a block RAM. In the top level the FIFO stands
beside the network with both processor ports brought out.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `MESH_X`, `MESH_Y` | 5, 5 | mesh size, up to 8x8 by the coordinate fields |
| `NVC` | 2 | VCs per port; 1 or 2, limited by the one-bit VCID |
| `DEPTH` | 8 | flits per VC FIFO, which is also the initial credit count |
| `DELAY` | 0 | delay register stages per router output |
| `ROUND_ROBIN` | 1 | 1 for round-robin arbiters, 0 for fixed priority |
| `SHB_WORDS` | 8192 | shared FIFO depth in 32-bit words (32 KB) |

Changing any of them means re-synthesising, exactly as in the original
emulator, where such settings live in a build-time network configuration.
Everything that is a run-time setting there lives in software:

* traffic pattern;
* injection rate;
* packet length;
* number of packets;
* hotspot node.

## Where this RTL departs from, or goes beyond, the published design

* The original's router is described at block level only. Its internal
  structure is this RTL's own:
  * one VC-allocator arbiter per output port, granting the lowest free VC;
  * a separable input-first switch allocator;
  * an output register ending the router stage;
  * VC release on the tail flit;
  * registered credit return.
* The network is clock-enabled instead of being clocked by the register bit.
  The behaviour is the same: one network cycle per rising edge of the clock
  register.
* Only the 2D mesh is built. The original also offers a 2D torus.
* The flit width is a package constant (32 bits, with the field layout above),
  not a per-router parameter. The original lists packet data width among its
  configurable router settings.
* The processor bus protocol is replaced by a generic register port.
* Reset is asynchronous and active low, and clears all state.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops on a watchdog. For example, with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/noc_pkg.sv tb/tb_router.sv --top tb_router
./obj_dir/Vtb_router
```

| testbench | what it shows |
|---|---|
| `tb_vc_fifo`, `tb_delay_unit`, `tb_crossbar`, `tb_emu_clock_gen` | random stimulus against reference models |
| `tb_nrc` | every port and destination, at three router positions |
| `tb_vc_alloc`, `tb_sw_alloc` | allocation rules, round-robin turn taking, and fixed priority in the VC allocator |
| `tb_input_unit`, `tb_output_unit` | VCID/CNOP rewriting, credit counting, VC release, latency through delay registers |
| `tb_router` | a router with all five ports loaded and random credit hold-off: every packet leaves by its X-Y port, whole and in order; two-cycle latency; credit stalls occur |
| `tb_noc_mesh` | 4x3 mesh, 1500 random packets; lone-packet latency equals 2(hops+1), or 3(hops+1) with one delay register per output |
| `tb_hw_reg_bank` | every register of the address map |
| `tb_shbram_fifo` | ordering, status and the arbitration rule (reduced to 16 words) |
| `tb_acenocs_top` | the whole design at default size, driven through the register port by a software model |

`tb_acenocs_top` runs the emulation cycle above with these traffic patterns:

* bit complement with 5-flit packets (the baseline);
* matrix transpose;
* uniform random;
* bit reversal;
* shuffle;
* rotation;
* hotspot, at 100% injection.

It checks:

* the 18-cycle lone-packet latency;
* that every packet arrives exactly once at the right node;
* that no packet id is reused while in flight;
* that each of these events happens at least once:
  * VC allocation conflicts;
  * switch conflicts;
  * credit stalls;
  * full local VCs;
  * source-queue throttling;
  * use of both VCs.

It takes about two minutes in Verilator.

The trace-driven workload is not simulated, because no trace data is
included. Neither are the million-packet runs used to evaluate the original
emulator. Those runs are software-bound and need no more hardware than the
default configuration provides.
