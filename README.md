# AlterTest: a NoC router that keeps its core online during built-in self-test

Running built-in self-test (BIST) often on the routers of a network-on-chip
catches faults early. The usual way to test a router is to isolate it with
wrappers, but then its core is cut off and every packet through it stalls.
AlterTest avoids that with three parts:

* **A reconfigurable router with one bypass channel.** While a router is
  under test (a *RUT*), its core port is joined straight to one of its
  north-side ports (or south-side ports, for a router on the top row). That
  port leads to the neighbour on that side, the *ladder router*, so the core
  can still send and receive packets. Every other part of the RUT is free to
  be tested.
* **Two channel pairs in the Y dimension (1 and 2).** The bypass takes pair 1
  in one test procedure and pair 2 in the next. After two procedures the whole
  router has been tested. The two pairs also make two deadlock-free
  subnetworks for the routing algorithm.
* **A fully adaptive routing algorithm and a test schedule.** Packets go
  around RUTs. Routers under test at the same time are never neighbours.

This repository holds synthesizable SystemVerilog for the router, the 10x8
mesh and the test control, plus self-checking testbenches.

## Router

Each router has seven ports: `L` (core), `E`, `W`, `N1`, `N2`, `S1` and
`S2`. A port is named after the side of the router it sits on. Each port has
one input link and one output link (valid/ready, one flit per cycle). The
datapath is:

```
links -> bypass_mux -> flit_fifo (x7) -> route_unit (x7) -> crossbar_switch -> bypass_mux -> links
```

* `flit_fifo`: an input buffer of 4 flits. Its `ready` comes from a register,
  so readiness never passes combinationally from one router to the next.
* `route_unit`: works out the output for the head flit at each buffer.
* `crossbar_switch`: one round-robin arbiter per output, with wormhole
  switching. A head flit is granted and sent in the same cycle. The packet
  then holds the output until its tail has passed. A flit at the head of a
  buffer reaches the output link in the same cycle it is granted.
* Missing crossbar paths: the crossbar has no U-turns and no N1<->N2 or
  S1<->S2 paths. The routing never uses them, so the router is fully testable
  without them.

### Flit format

Flits use `altertest_pkg::flit_t`: `head`, `tail`, `dst_x`, `dst_y` (4 bits
each) and 32 data bits, 42 bits in all. Every flit carries its destination.

## Test procedure

A timer (`test_timer`) in each router starts one test procedure per interval.
`test_controller` then takes the router through four phases:

| phase | datapath | what happens |
|---|---|---|
| Normal | crossbar | waits for the timer |
| Emptying | crossbar | Sends ER and DNS to the neighbours. The router keeps forwarding what it holds. Its core may finish the packet it is sending but may not start a new one. Neighbours stop starting packets towards it and answer EA once nothing is half-sent to it. The phase ends when all neighbours have answered, the buffers are empty and no packet is in progress. |
| Testing | bypass | The router is isolated. The core talks to the ladder router over the bypass. CS tells the ladder router which channel (1 or 2) to use. The phase lasts `TEST_CYCLES` cycles. |
| Recovering | bypass | ER is raised again. No new packet may use the bypass. The phase ends when the neighbours have answered EA and no packet is on the bypass. |

`round` flips at the end of every procedure, so the bypass alternates between
`N1` and `N2` (`S1` and `S2` on the top row).

### Test driver

This design does not generate test patterns. During Testing, the router's
links are gated off (outputs silent, inputs not ready) and the phase simply
lasts `TEST_CYCLES` cycles. A real BIST engine would connect at that point.

### Synchronization signals

Each router sends one `sync_t` bundle on each side (`status_propagation`).
Bundles are registered, so each hop takes one cycle.

| signal | sent by | meaning |
|---|---|---|
| `er` | a RUT | emptying request |
| `ea` | a neighbour | emptying acknowledge; no packet partly sent towards the requester |
| `dns` | a RUT | "I am disabled" (Emptying, Testing, Recovering) |
| `ins_n`, `ins_s` | any router, to its E and W neighbours | "my north / south neighbour is disabled" |
| `cs_en`, `cs_sel` | a RUT, to its ladder router only | bypass connected now, and on which channel |

DNS plus INS gives every router the status of the eight routers around it
(the 3x3 area).

## Routing

This is the part that takes the most care. `route_unit` is combinational.

### Subnetworks

* **Subnetwork A** is the eastward channel plus the N1/S1 pair. East-,
  north-east- and south-east-bound packets use it.
* **Subnetwork B** is the westward channel plus the N2/S2 pair. West-,
  north-west- and south-west-bound packets use it. Packets that start out
  purely north- or south-bound also use it.
* **Moving between them.** A packet may move from B to A, but never back.
  There is one exception: if the destination is on the west border, a packet
  may turn from the eastward channel into N2/S2. That is how a packet gets
  around a RUT on the west border.
* **Which subnetwork a packet is in** depends on the input it came in on.
  Flits from the core count as new traffic, and so do flits from a neighbour
  that is under test (they arrive over its bypass).

### Normal routing

Diagonal packets move adaptively, but never line up early with the
destination's row or column. From the diagonal neighbour of the destination
they finish with a Y hop, then an X hop.

When more than one output is allowed, the first free one wins, in the order
N1, N2, S1, S2, E, W.

### Routers under test

* **Exclusion.** No packet is sent into a RUT.
* **Checking the next hop.** A move is also rejected if it lines the packet up
  with a RUT on its remaining straight path.
* **Detours.** If no minimal move is left, the packet detours:
  * A packet going straight east or west steps north (south on the top row)
    within its own subnetwork.
  * A packet going straight north or south steps west (east on the west
    border). It turns back towards the destination column only once it has
    reached the destination row.
* **Packets for a RUT's core.** These are steered to the RUT's ladder router.
  The ladder router hands them over on the channel CS selects, and only while
  CS is on. In Emptying and Recovering they wait in the ladder router's
  buffer.
* **Last resort.** If nothing else applies (for example, several RUTs in one
  3x3 area), any usable output is taken. This case has no deadlock-freedom
  argument behind it.

## Test schedule

`test_schedule` sets each router's timer.

* **Groups.** Routers are split into four groups by the parity of (x, y). Two
  routers of one group are at least two hops apart in both X and Y.
* **Slots.** Each group gets one quarter of the interval.
* **Order within a group.** Routers start in row-major order from the top
  left, `STRIDE = (INTERVAL/4 - TEST_CYCLES - MARGIN) / routers_per_group`
  cycles apart.
* **Overlap.** At short intervals several routers of a group are under test
  at once. The group windows never overlap, so at most a quarter of the
  routers are under test at any time.

For the default 10x8 mesh, interval 10000 and Testing 500:

* `STRIDE` is 96 cycles.
* The start time of router (x, y) is `2500*(x%2 + 2*(y%2)) + 96*(5*(y/2) + x/2)`.
* Its timer is loaded with `9999 - start`.

## Parameters (top `altertest_noc`)

| parameter | default | meaning |
|---|---|---|
| `MESH_X`, `MESH_Y` | 10, 8 | mesh size (columns, rows; row 0 is the top) |
| `INTERVAL` | 10000 | cycles between two test procedures of one router |
| `TEST_CYCLES` | 500 | length of the Testing phase |
| `BUF_DEPTH` | 4 | flits per input buffer |
| `TIMER_W` | 20 | timer width; 20 bits reach intervals of 10^6 cycles |

Core ports are flat packed arrays with one entry per router. Router
`r = y*MESH_X + x` has:

* `inj_valid/inj_flit/inj_ready` (core to network);
* `ej_valid/ej_flit/ej_ready` (network to core);
* `phase` and `round`, its test state.

Sizes taken from the published AlterTest evaluation:

* the 10x8 mesh;
* test intervals of 10000 or 20000 up to 10^6 cycles;
* Testing phases of 500 or 1000 cycles.

The buffer depth, flit format and link handshake are this design's own
choices.

## Where this design fills gaps or departs

* **Deadlock freedom.** The routing rules follow the two-subnetwork scheme,
  but they were checked only by simulation. The handling of several RUTs in
  one 3x3 area and the last-resort choice are unproven.
* **Left-border exception.** The exception for west-border destinations only
  looks at the destination, because flits carry no source address.
* **Phase exit conditions.** The exact conditions that end Emptying and
  Recovering, the one-cycle registers on the sync signals, and the selection
  order among adaptive outputs are this design's choices.
* **Group order.** The order of the four groups and the spacing of start
  times within a group are assumptions.
* **Hardware not included.** No BIST pattern generator or response analyser
  is included. The cores and memory controllers are not modelled.
* **Lint message.** Verilator reports `UNOPTFLAT` on the mesh's link arrays.
  It comes from whole-array dependency tracking. Every `ready` is a FIFO flag
  or a core input, so there is no real combinational loop.

## Simulation

Each testbench in `tb/` checks its own results and prints
`TB_RESULT checks=N failures=M`. Build and run one with Verilator, for
example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/altertest_pkg.sv tb/tb_altertest_noc.sv --top-module tb_altertest_noc
./obj_dir/Vtb_altertest_noc
```

### Unit testbenches

| testbench | covers |
|---|---|
| `tb_route_unit` | directed routing cases, plus random checks that routes are minimal |
| `tb_crossbar_switch` | wormhole integrity under random back-pressure |
| `tb_bypass_mux` | normal and bypass paths, isolation, holding of new packets |
| `tb_test_timer` | first trigger and period |
| `tb_test_controller` | phases, handshakes, Testing length, channel alternation |
| `tb_status_propagation` | ER/EA/DNS/INS/CS forwarding and decoding |
| `tb_test_schedule` | all 80 start times; neighbours' test windows never overlap |
| `tb_altertest_router` | one router with modelled neighbours: latency, subnetworks, detour, two complete test procedures |

### Whole-network testbenches

* `tb_altertest_noc`: a 4x4 mesh with a 1600-cycle interval, under random
  traffic (`tb/noc_traffic.sv`). It checks every packet end to end. It counts
  each mechanism and fails if one never occurs: Emptying, Recovering, both
  bypass channels, top-row bypass, packets to and from a core under test,
  held injections, and routing next to a RUT.
* `tb_altertest_noc_full`: the same checks on the 10x8 mesh at default
  parameters. It runs over two full intervals (20000 cycles), so all 80
  routers are tested on both channels. One run sent about 51,000 packets and
  completed 163 test procedures with no failures. Verilator inlines all 560
  routing units, so the C++ build takes about 25 minutes on one core. The
  simulation itself takes about 15 seconds.
