# A parameterised network-on-chip with built-in traffic and statistics

This is a synthesizable network-on-chip (NoC) in SystemVerilog. It can do two jobs. It can act as the
interconnect of a multi-core chip, or it can run on an FPGA as a cycle-accurate NoC *simulator*
that is much faster than software. For the simulator role, every node has a synthetic traffic
generator, latency counters and a deadlock detector. A host reaches them all through one
AXI4-Lite register port. The network can be a mesh, a torus or a ring. The routers have one or
two pipeline stages and use virtual channels (VCs) with credit-based flow control. Six routing
schemes are available.

By default it builds a **4x4 mesh of single-cycle routers, with 4 VCs per port, 48-bit links and
XY routing**. Beside the mesh, the top level also holds a small application of the same network.
That application is a **1D systolic convolution**: 16 multiply-accumulate cores and two memories
sit on an 18-node ring.

```
proteus_top
 ├── noc_top (4x4 mesh)            mesh_* ports
 │     ├── router x16              input_port, switch_arbiter, crossbar, output_port, deadlock_detector
 │     ├── packet_handler x16      network interface: packets <-> flits, timestamps
 │     ├── traffic_gen x16         synthetic destinations and injection rate (lfsr)
 │     ├── latency_stats x16       per-node counters
 │     └── axil_regs               AXI4-Lite registers, seq_divider for averages
 └── systolic_ring                 sys_* ports
       ├── noc_top (18-node ring, one-flit packets)
       ├── vector_source           input memory, streams A
       ├── systolic_mac x16        core j keeps B_j
       └── vector_sink             output memory, collects C
```

## Flits, packets and node numbering

Each node gets an id of `y*COLS + x`. EAST is x+1 and NORTH is y+1. A ring is a mesh with one row
plus a wrap-around link. A torus is a mesh with wrap-around links in both dimensions.

A link carries one flit per cycle. The flit (`flit_t` in `noc_pkg`) holds 48 bits of data
(`LINK_W`). Beside the data it carries these fields on their own wires:

- valid, head and tail marks;
- the VC number;
- source and destination ids (10 bits each, so up to 1024 nodes);
- two 16-bit timestamps: creation and injection.

Putting the header on sideband wires keeps all 48 bits for data, and every flit knows its
destination. This design chose that layout; a design that packs the header into the data bits
would make the same routing decisions. Credits flow on a separate `credit_t` bundle in the
opposite direction.

A packet is 1 to `MAX_FLITS` flits long: a head, then bodies, then a tail. A 1-flit packet is both
head and tail.

## The router

The router has five ports: LOCAL, EAST, WEST, NORTH and SOUTH. It is **single-cycle**. A flit is
written into an input VC buffer at one clock edge. In the next cycle it passes through route
compute, switch arbitration and the crossbar, all combinationally, and it is on the output link at
the following edge. That is one cycle per hop. With `OUT_REG = 1`, the output port registers the
flit, which gives a two-cycle router.

**Input port.** Each port has `NUM_VCS` FIFOs of `BUF_DEPTH` flits. The default depth is 1. When
a head flit arrives, route compute chooses its output port. The input port holds that choice
until the tail has passed. When a flit leaves a buffer, the port returns a credit upstream. A
credit sent for a tail also says that the VC is free again.

**Flow control is credit-based wormhole with per-packet VC allocation.** Each output port keeps
a credit counter for every downstream VC. It also keeps a *queue of free VC ids* (`vc_queue`).
A head flit may leave only if:

- the queue is not empty, and
- that VC has a credit.

The head takes the VC at the front of the queue. The VC belongs to the packet until a credit
marked free comes back for its tail. Body flits travel on their packet's VC and need only a
credit. With 1-flit buffers, a credit returns two cycles after its flit left. So a packet's
flits follow each other every two cycles on a quiet network.

**Switch allocation** is done in two stages of matrix arbiters:

1. Each input port picks one of its eligible VCs.
2. Each output port picks one of the input ports that want it.

A matrix arbiter keeps a bit for each pair of requesters that says which one goes first. When a
winner is served, its bits drop so that it becomes last. This is strong fairness with no
round-robin pointer. Only the upper triangle of bits is stored, N(N-1)/2 flip-flops. Arbiter
priorities change only when a grant is actually used. The `stall` output is high in any cycle
where a request was refused.

**Deadlock detector.** There is one counter per VC buffer. It counts the cycles in which the
buffer holds a flit that did not move. When any counter reaches the threshold set over AXI, the
router's flag rises and stays up until it is cleared. A threshold of 0 turns detection off. This
is a watchdog for experiments: it detects, it does not resolve.

### Routing (`route_compute`)

| `ROUTING` | rule |
|---|---|
| `RT_XY` | correct x first, then y |
| `RT_YX` | correct y first, then x |
| `RT_WEST_FIRST` | go west first if needed; otherwise choose randomly among the productive east/north/south moves |
| `RT_NORTH_LAST` | choose randomly among the productive east/west/south moves; go north only when nothing else is left |
| `RT_RANDOM` | choose randomly between the productive x and y moves (oblivious) |

- **Ring:** takes the shorter way round. A tie goes EAST.
- **Torus:** takes the shorter way in each dimension. Ties go EAST or NORTH.
- **Random bits:** the random choices use one bit of a per-router LFSR.

The ring tie-break is a deliberate choice. The source material describes the same routing unit
twice, and the two versions break a tie in opposite directions. This design follows the version
that goes EAST.

## Network interface, traffic and statistics

**Packet handler.** One sits on each router's LOCAL port. It accepts a packet from the node:
valid/ready, destination, length, and up to `MAX_FLITS*48` bits of data. It stamps the packet
with its creation cycle and puts it into a `SRC_DEPTH`-entry source queue. From there it cuts
the packet into flits, following the same VC and credit rules as a router output. At injection
every flit of the packet gets the cycle in which its head entered the network. At the destination the flits are put back together. The packet then
appears for one cycle on `rx_*` with its source, length and data. The handler also reports two
latencies to the node's statistics block:

- network latency = arrival cycle - injection cycle of the head;
- queuing latency = injection cycle - creation cycle.

Timestamps are 16 bits wide and wrap around, so a difference is correct below 65536 cycles.

**Traffic generator.** A packet becomes due in a cycle when 16 LFSR bits fall below `RATE`. `RATE`
is given in packets/node/cycle × 65536. If the previous packet is still waiting for room in the
source queue, the new one is not created and a drop is counted. The destination patterns work on
the bits of the node id:

| pattern | destination |
|---|---|
| random | LFSR value modulo the node count; the node's own id becomes the next id |
| bit-complement | every bit inverted |
| bit-reverse | bit order reversed |
| shuffle | rotated left by one |
| transpose | upper and lower halves swapped |
| bit-rotation | rotated right by one |

A destination outside the node count wraps round modulo the count. While the generators are on,
they own the packet handlers and `ext_tx_ready` stays low.

**Registers (AXI4-Lite, 32-bit).**

| address | register |
|---|---|
| 0x000 | CTRL: bit 0 = generators on. Writing 1 to bit 1 clears the statistics; writing 1 to bit 2 clears the deadlock flags. |
| 0x004 | RATE: packets/node/cycle × 65536 |
| 0x008 | PATTERN: 0 random, 1 bit-complement, 2 bit-reverse, 3 shuffle, 4 transpose, 5 bit-rotation |
| 0x00C | PKT_LEN: flits per generated packet |
| 0x010 | DL_THRESH: deadlock threshold in cycles (0 = off) |
| 0x014 | STATUS: bit 0 = a router reported deadlock |
| 0x018 | CYCLES: free-running counter |
| 0x01C | NODES: number of nodes |
| 0x1000 + 0x40·n | node n statistics (offsets below) |

Offsets in each node's statistics block:

| offset | value |
|---|---|
| +0x00 | packets sent |
| +0x04 | packets received |
| +0x08 | flits received |
| +0x0C | sum of network latency |
| +0x10 | sum of queuing latency |
| +0x14 | largest network latency |
| +0x18 | average network latency |
| +0x1C | average queuing latency |
| +0x20 | the router's deadlock flag |
| +0x24 | packets generated |
| +0x28 | packets dropped |

A read of an average starts a sequential divider, and its data arrive 34 cycles after the
address. Every other read answers in one cycle. Writes need AW and W together. An unmapped
address answers SLVERR.

## The systolic convolution

The ring has 18 nodes:

- node 0 holds the input memory (vector A);
- nodes 1–16 hold the cores; core j keeps the coefficient B_j;
- node 17 holds the output memory.

Each element of A travels as a one-flit packet. The flit carries `{a (16 bits), partial sum (32
bits)}`. The packet goes core by core around the ring. For every packet it receives, a core
sends on the same *a* with `s_prev + B_j·a`, where `s_prev` is the partial sum of the packet
before. So the sum moves one element of A further along each time it moves one core. Every core
except the first ignores its first packet, and the first core starts each sum at zero. The output
memory then receives, in order,

    C_i = Σ_{j=1..16} A_(i+j) · B_j ,   i = 0 .. len-16

which for 64 elements is 49 sums. A run of 64 elements takes 211 cycles from start to the last
sum and 904 multiply-accumulates. A core does at most one multiply-accumulate per cycle.

The network has no back-pressure toward a receiving node. So the input memory paces A at one
element every two cycles (`INTERVAL`), and each core has an 8-entry output queue that absorbs
short waits for the network. The queue's overflow assertion catches a stream paced too fast.

## Parameters

`noc_top` has these parameters; the defaults give the main configuration.

| parameter | default | meaning |
|---|---|---|
| `TOPOLOGY` | `TOPO_MESH` | `TOPO_RING` (set `ROWS = 1`), `TOPO_MESH`, `TOPO_TORUS` |
| `ROUTING` | `RT_XY` | see the routing table |
| `COLS`, `ROWS` | 4, 4 | grid size; up to 1024 nodes |
| `NUM_VCS` | 4 | 1..16 VCs per port |
| `BUF_DEPTH` | 1 | flits per VC buffer |
| `OUT_REG` | 0 | 1 = two-cycle router |
| `MAX_FLITS` | 4 | longest packet at the node ports |
| `SRC_DEPTH` | 4 | packets in each source queue |

The link width `LINK_W` (48) and the id and timestamp widths are constants in `noc_pkg`. To get
another link width, edit that package. The systolic application needs exactly 48 bits (16 + 32).

## Where this design departs from the source description or fills a gap

- **Link width.** The text gives the main configuration 48-bit channels, but the router diagram
  is labelled 32 bits. This design follows the text.
- **Link width is not a parameter** of `noc_top`. Configurations from 8 to 1024 bits need an edit
  of `noc_pkg`.
- **Buffer depth.** No depth is given for the mesh. The 1-flit-per-VC default comes from the
  ring evaluation.
- **Switch allocation.** The source says only that the arbiter picks the highest-priority flit
  among the VCs of several ports. The two-stage matrix arbiter is this design's.
- **VC allocation.** The source describes credits and a queue of free VC ids from which the
  winner takes a VC. The per-packet (wormhole) holding of a VC is this design's reading of that
  description.
- **Sideband header.** The header sits on sideband wires; the source gives no flit format.
- **Matrix arbiter size.** The source counts "N one-bit registers". A matrix arbiter for N
  requesters needs N(N-1)/2 such bits, and that is what is built.
- **LFSR polynomial.** The taps are 16-bit, maximal length, x^16+x^14+x^13+x^11+1.
- **Other gaps filled here:** the pattern definitions on id bits, the rate encoding, the register
  map, the latency definitions, the ring and torus tie-breaks, and the AXI-side interface to
  external nodes. External nodes use a plain valid/ready packet port per node; AXI4-Lite is used
  for the registers only.
- **Systolic details.** The packet format, the pairing of partial sums, the input pacing, the
  output queue and the memory size (64 elements) are not given and were chosen here.
- **Coverage of other topologies.** The mesh is tested end to end. The ring is exercised by the
  systolic test. The torus, YX, West-First, North-Last and random routing are tested at the level
  of the routing unit, not in whole-network runs.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints `TB_RESULT checks=N
failures=M` and has a watchdog. Highlights:

- `tb_router`: latency of one cycle (`OUT_REG = 0`) and of two cycles (`OUT_REG = 1`).
- `tb_noc_top` and `tb_proteus_top`: these run at the default parameters.
  - A lone flit from node 0 to node 15 (6 hops) must arrive in 7 cycles.
  - A 4-flit packet must arrive in 13 cycles.
  - Every node sends about 40 random packets of 1–4 flits. Each one must arrive once, intact.
  - All six patterns are run through the registers. Each received packet is checked against its
    pattern, and the averages are compared with sum/count.
  - An overload with a small threshold must trigger the deadlock flag, and clearing must reset it.
- `tb_proteus_top` also runs two convolutions on the ring at the same time and compares every
  sum with a software reference.
- The top-level testbenches count the mechanisms that occurred: switch stalls, full source
  queues, multi-flit packets, dropped generator packets, the deadlock flag, divider reads and
  checked convolution sums. A mechanism that never occurred counts as a failure.

To run a test with plain Verilator (5.x):

    verilator --binary --timing --assert -Irtl -Itb rtl/noc_pkg.sv tb/tb_proteus_top.sv \
              --top-module tb_proteus_top -Mdir obj
    ./obj/Vtb_proteus_top

Any other testbench runs the same way. `tb_proteus_top` finishes in a few seconds.

**Synthesis.** The full top, both the mesh and the systolic ring, passes generic synthesis at about
138 k cells and 138 k flip-flop bits. Lint leaves warnings only, of three kinds:

- VC-index bit selects narrower than the 4-bit VC field;
- unused struct fields;
- the async-reset nets used in assertions.
