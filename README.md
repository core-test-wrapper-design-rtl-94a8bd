# Core test wrapper for unicast and multicast testing over a NoC

On a network-on-chip the network itself can carry test data: a tester
pushes test packets into the mesh, the routers deliver them to the cores,
and each core sends back its verdict. This design has two ideas.

- **A comparator in the wrapper.** Every core sits in an IEEE-1500-style
  test wrapper. Besides the test stimulus, the wrapper receives the
  *expected* response. An XOR comparator checks the actual response
  against it inside the wrapper. So only one result flit goes back through
  the network, not the whole response stream. A zero result means the core
  passed.
- **Multicast test packets.** One packet can name several cores at once.
  The routers copy it along a tree, so cores with the same test are
  tested in parallel. The alternative is unicast testing inside subnets:
  the mesh is split into 2, 4 or 8 regions, each fed from its own edge
  port. That needs no extra hardware here; see "Subnets" below.

The top level (`noc_test_top`) is a 4x4 mesh. Each node has a router and
a core site; each core site chains a network interface, a network adapter,
a wrapper interface circuit and the wrapper. An In/Out config circuit sits
on each of the 16 edge ports of the mesh. The cores themselves are outside
the design: their terminals are ports of the top.

```
 tester ──► port_config ──► edge port ┐
 tester ◄── port_config ◄── edge port ┤   mesh_noc (4x4 routers)
                                      └─ router ─ local port ─► ip_node:
                                             ni ─► na ─► wic ─► wrapper ─► core (external)
```

## The wrapper (`wrapper`, `wbc`, `wby`, `wir`, `wrap_pkg`)

The default geometry is the ISCAS'89 S444 benchmark core:
- 3 functional inputs and 6 functional outputs;
- two internal scan chains, whose lengths do not matter to the wrapper.

The wrapper contains:

| part | what it is |
|---|---|
| input WBR / output WBR | one boundary cell (`wbc`) per core input or output |
| WBY | 1-bit serial bypass register (`wby`) |
| parallel bypass | 3 `wby` bits, one per parallel line |
| WIR | instruction register and its controller (`wir`) |
| comparator | XOR of the serial output with `com_si`, and of each parallel output with `com_pi[k]` |
| m0..m11 | path multiplexers, driven by the decoded instruction |

**Boundary cell.** One flip-flop.
- `scan_en` chooses what the flip-flop loads: CTI (shift) or the cell's
  own CFO (capture).
- `hold_en` chooses what drives CFO: CFI (transparent) or the flip-flop
  (held).

**Modes.** The wrapper has seven modes, set by a 3-bit instruction.

| code | mode | test path |
|---|---|---|
| 0 | normal | In → core → Out, cells transparent |
| 1 | serial bypass | Si → WBY → So |
| 2 | parallel bypass | Pi[k] → bypass bit k → Po[k] |
| 3 | serial in-test | Si → inWBR → chain 2 → chain 1 → outWBR → ⊕Com_si → So |
| 4 | serial ex-test | Si → inWBR → outWBR → ⊕Com_si → So |
| 5 | parallel in-test | Pi0 → chain 1 → ⊕ → Po0; Pi1 → chain 2 → ⊕ → Po1; Pi2 → inWBR → outWBR → ⊕ → Po2 |
| 6 | parallel ex-test | Pi2 → inWBR → outWBR → ⊕ → Po2; Pi0/Pi1 through the parallel bypass |

Code 7 acts as normal. The decode of each code into m0..m11 and the
enables is `wrap_pkg::decode_instr`; each select bit's meaning is listed
there. During a test mode, `se` does three things:
- it makes the boundary cells shift (1) or capture (0);
- it drives the core's scan enable;
- the tester sets it per clock.

**Loading an instruction.** A fixed sequence on the five wrapper serial
control signals, one step per clock:
1. WRSTN goes high.
2. SelectWIR goes high.
3. CaptureWR is pulsed.
4. ShiftWR goes high for three clocks. The instruction bits enter on Si,
   bit 0 first.
5. UpdateWR is pulsed. The WIR decodes the instruction and holds the
   result.
6. SelectWIR goes low. The test begins.

WRSTN low, from any state, returns the wrapper to normal mode. While
SelectWIR is high, So shows the WIR's serial output.

**How the comparator is used.** The tester shifts the expected response
into Com_si/Com_pi in the same clocks in which the actual response leaves
the chains. So and Po then carry the bitwise difference: all zeros for a
good core.

**`test_en`.** This input is not a standard wrapper signal. When it is low,
every wrapper register and the core (`core_ce`) keep their state, so the
network can stall between payload flits without spoiling a test.

## Packets (`noc_pkg`)

Flits are 32 bits wide, plus two sideband bits that mark the head and
tail flits. A node address is 4 bits, `{y[1:0], x[1:0]}`. Address 0000 is
the top-left node.

| flit | bits |
|---|---|
| test head (type 00 unicast, 01 multicast) | [31:30] type, [29:14] destination mask (bit i = node i), [13:10] router of the test sink, [9:7] exit port there, [6:4] instruction |
| result (type 10, single flit) | [31:30] type, [29:26] destination router, [25:23] exit port, [17:14] source node, [13:0] result |
| test payload | four 8-bit slots, slot 0 in [7:0] |

Each slot is `{cmp, se, d[2:0], e[2:0]}` and is applied to the wrapper for
one clock:
- `d` drives Pi[2:0] in the parallel modes, or Si from d[0] in the serial
  modes;
- `e` drives Com_pi, or Com_si from e[0];
- `cmp=1` means the comparator outputs of this clock are counted into the
  result.

The result is a saturating 14-bit count of mismatching bits.

## Core site (`ip_node` = `ni` + `na` + `wic` + `wrapper`)

- **`ni`** sits on the router's local port.
  - Inbound: it keeps a test packet whose mask contains its own node and
    discards any other packet, so the router never blocks.
  - Outbound: it turns a result request into a one-flit result packet
    with itself as the source.
- **`na`** reads the kept head flit.
  - It starts the WIC with the instruction and records where the result
    must go.
  - It passes payload flits to the WIC as words.
  - It asks the NI to send the result.
  - It tells the core its state: `core_test_mode`, plus `last_fail` for
    the last result.
- **`wic`** drives the wrapper.
  - It plays the 10-clock WIR load sequence.
  - It applies the payload slot by slot, holding `test_en` low whenever
    the next word has not arrived.
  - It counts the ones on So or Po in slots with `cmp` set.
  - At the end it drops WRSTN, which returns the wrapper to normal mode.
  - Timing: if start is seen in clock 1, slot 0 is applied in clock 13.

## Routing and multicast (`router`, `mesh_noc`, `flit_fifo`)

Each router has five ports (local, N, E, S, W) and a 4-flit input FIFO on
each. Links use valid/ready handshakes. Switching is wormhole: once a
packet owns an output, it keeps it until its tail flit has passed.

- **Route.** Every destination in the mask is routed XY: first along X,
  then along Y. The packet is sent to every output that some destination
  needs.
- **Fork.** The copy of the head flit on each output carries only the
  destinations reached through that output. Each core therefore gets
  exactly one copy, and the packet splits into a tree.
- **Allocation.** An input takes either all the outputs it needs or none.
  Inputs are served in round-robin order. A flit moves only when every
  output in its set is ready, so the branches of a tree advance in lock
  step.
- **Result packets** are routed XY to the named router. They then leave
  through the named exit port, which is the edge port of the tester.

**Limitation.** Two multicast trees from *different* sources that overlap
can deadlock: each holds a link the other waits for, further along. Safe
uses:
- multicast from one source;
- multicast confined to disjoint rectangular subnets, whose XY trees share
  no link;
- unicast traffic, which XY routing keeps deadlock-free.

## Subnets and the edge circuits (`port_config`)

The 16 edge ports are numbered as follows:

| ports | side | position |
|---|---|---|
| 0..3 | north | x = 0..3 |
| 4..7 | east | y = 0..3 |
| 8..11 | south | x = 0..3 |
| 12..15 | west | y = 0..3 |

Each edge port has one `port_config`:
- a FIFO buffers tester flits going into the mesh;
- result flits coming out become `{source node, result, pass}` records,
  with running counters;
- anything else that arrives at the port is dropped.

A "subnet" is simply a rectangle of nodes that the tester feeds through one
of its edge ports, with results returned through another edge port (or the
same one). XY routes between two nodes of a rectangle stay inside it. So
2, 4 or 8 subnets can be tested in parallel without interfering, and
without any partitioning hardware.

## Top level (`noc_test_top`)

Parameters:
- `N_IN=3` and `N_OUT=6` set the port widths for the cores' functional
  terminals;
- `NODE_IN[16]` and `NODE_OUT[16]` give each core site its own input and
  output count. They are at most `N_IN`/`N_OUT` and default to those. A
  smaller core uses the low bits of its ports;
- `FIFO_DEPTH=4` sets the router FIFO depth.

Ports, all arrays indexed by node address or edge port:
- `ate_*`: test packets in;
- `res_*`: result records out, with `res_count` and `fail_count`;
- `core_*`, `fn_in`, `fn_out`: the wrapped cores and their chip-side
  terminals;
- event flags for discarded packets, forks and stalls.

By default all 16 sites have the S444 geometry. `tb_noc1` overrides the
parameters to build a mixed network: four core types of 7/7, 3/6, 3/6 and
14/14 terminals, placed over the mesh.

## Testbenches (`tb/`)

Every block has a self-checking testbench `tb_<block>.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.
`tb/scan_core_model.sv` is a small two-chain scan core (chains of 11 and 10
flip-flops). It can be built with a stuck-at defect. It stands in for the
real cores.

`tb_noc_test_top` runs the top at its default parameters. It has three
phases:
1. Four quadrant subnets run serial in-test at once. Each has its own
   input and output edge ports.
2. A 16-address broadcast runs parallel in-test, then a 4-address
   multicast.
3. Each remaining mode is exercised by unicast, including tests with
   deliberately wrong expected bits.

One core carries a defect, and each result is checked against an
independent model. The testbench also counts that forks, stalls, WIC
stalls, defects and parallel subnets all occurred. It runs in under a
minute.

`tb_wrapper_geom` runs the wrapper at 14 inputs and 14 outputs and checks
the length of every test path.

`tb_noc1` builds the mixed-core network and sends a serial ex-test stream
to each node. The stream's expected bits assume that node's path length of
inputs plus outputs, so the result must be 0. The testbench also checks:
- that streams sized for another core give nonzero results;
- that multicast to all cores of one size works.

`tb_noc_schemes` runs the four partitioning schemes, also at the default
parameters:
- subnet (unicast) testing with 8, 4, 2 and 1 subnets;
- multicast with 2, 4, 8 and 16 addresses per packet, one packet per
  subnet through the same ports.

Every node runs a two-pattern serial in-test. The testbench measures two
things for each scheme:
- the test time, in clocks;
- the hop count: head flits crossing router-to-router links, test and
  result packets together.

| scheme | subnets | subnet hops | subnet clocks | multicast hops | multicast clocks |
|---|---|---|---|---|---|
| a | 8 | 16 | 221 | 16 | 120 |
| b | 4 | 32 | 400 | 28 | 125 |
| c | 2 | 64 | 743 | 46 | 142 |
| d | 1 | 96 | 1218 | 63 | 158 |

The hop counts are checked against values worked out from the XY routes.
They agree with the published evaluation except in one case. For multicast
scheme c, the evaluation gives 52 hops; the XY trees here use 46 (7 tree
links plus 16 result links per half). Scheme a here uses 8 edge ports, one
per half row serving both directions, where the evaluation uses 12.
Multicast removes most of the serialisation inside a subnet: its time
hardly grows as subnets get larger.

To simulate with Verilator:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps --top-module tb_noc_test_top \
  -y rtl -y tb +libext+.sv rtl/noc_pkg.sv rtl/wrap_pkg.sv tb/tb_noc_test_top.sv
./obj_dir/Vtb_noc_test_top
```

Replace the top module and file for any other block.

## How the design relates to its source, and what it adds

Taken from the source description:
- the seven modes and their 3-bit instruction;
- the WIR load order (WRSTN, SelectWIR, CaptureWR, ShiftWR, UpdateWR) and
  the twelve path selects;
- the boundary and bypass cell structure;
- the XOR comparator with Com_si and Com_pi;
- the S444 terminal counts;
- the NI / NA / WIC / wrapper chain;
- keep-or-discard in the NI;
- the result in head-flit bits 13..0;
- the 4x4 mesh;
- multicast with 2..16 addresses;
- subnets fed through edge-port circuits.

Own choices of this design:
- the binary mode codes and the meaning of each select bit;
- the exact multiplexer wiring and chain order;
- the flit width and field layout;
- the slot format;
- the result as a mismatch count;
- XY routing, the multicast tree and the allocation scheme;
- the FIFO depths;
- the `test_en` stall mechanism;
- the internals of the NA, the WIC and the edge circuits.

Not covered:
- the cores themselves, which are external;
- multicast to cores of different sizes: a packet's expected response
  fits one size;
- any area, test-time or power figures, which depend on a cell library and
  on the benchmark test sets.
