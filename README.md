# Dilated and replicated PIPN cell switches

A banyan network routes cells through log2 N stages of 2x2 switching elements by their own
address bits. It is cheap and self-routing, but it has only one path between an input and an output,
so two cells that need the same internal link collide even when they go to different outputs. Under
skewed (heterogeneous) traffic this gets much worse.

The Plane Interconnected Parallel Network (PIPN) reduces the damage in three ways. It splits the
incoming cells at random into two groups. It complements the destination address of one group,
which spreads the traffic more evenly. It then routes both groups through two interconnected
banyan planes that are each only N/2 wide, so one stage fewer than an N x N banyan. A last
dispatching stage puts the cells back together on their real outputs.

This repository has synthesizable SystemVerilog for the PIPN with two enhancements that add paths
between each input and output:

* **Dilation (D_K):** every link in the router becomes K parallel links. An SE port can then take
  and pass up to K cells per slot.
* **Replication (R_R, S_R):** R PIPN subnetworks work in parallel. A demultiplexer at each input
  spreads cells over them at random (*random loading*). Alternatively it picks a subnet from the
  top r = log2 R address bits (*selective loading*); each subnet then has a truncated router with
  r fewer stages.

`pipn_switch` covers all of these through its parameters (`K`, `R`, `SELECTIVE`). `pipn_top`
places three 256 x 256 switches side by side: D2, R2 and S2.

## Structure of one PIPN

```
 inlets ─► [demux 1:R] ─► distributor ─► router: front plane ─┐ ─► deciders ─► collectors ─► outlets
 (N)        (R > 1 only)   N/2 DEs       router: back plane  ─┘    (one per     (one per
                                         (n-1 stages, K links)      outlet)      output port)
```

* **Distributor** (`pipn_de`, `pipn_distributor`): DE_i takes inlets 2i and 2i+1. It sends one
  cell to inlet i of the front plane and one to inlet i of the back plane; a random bit chooses
  which cell goes where, or the plane of a lone cell. Back-plane cells get the low LA bits of
  their address complemented, and a `compl_f` flag in the cell records this.
* **Router** (`pipn_router`, built from `pipn_se`): two butterfly planes of N/2 lines. Stage s
  joins the lines that differ in bit b = STAGES-1-s and routes on address bit b. After the last
  stage a cell sits on the line whose index equals the low STAGES bits of its (possibly
  complemented) address. Between stages, the lower output of every SE crosses into the other
  plane. Crossing never changes the line index, so routing is unaffected; it only changes which
  cells meet next.
* **Output-port dispatcher** (`pipn_dispatcher`): one **decider** (`pipn_decider`) per router
  outlet and one **collector** (`pipn_collector`) per output port. There are no output
  multiplexers: deciders of every subnet write straight into the shared collectors.

### Why an outlet serves four output ports (the part to understand first)

Take a full PIPN, n = log2 N. The router routes on the low n-1 address bits and leaves the top bit
alone. Outlet `a` of either plane receives two kinds of cell:

* uncomplemented cells whose true low bits are `a`: outputs `{0,a}` and `{1,a}`;
* complemented cells whose true low bits are `~a`: outputs `{0,~a}` and `{1,~a}`.

So every outlet can hold cells for four output ports. The decider undoes the complement and puts
the cell on port `j = {true top bit, was-complemented}`. Turned around, collector `c`, with low bits
`low`, is reached from outlets `low` and `~low` in both planes. That gives four inlets per subnet,
each K links wide. For N = 8 this groups the outputs as {0,3,4,7} and {1,2,5,6}; the same grouping
appears in the usual drawing of the 8 x 8 PIPN.

Under selective loading, subnet s serves outputs `s*N/R ... (s+1)*N/R-1`. Its local address has
LA = n - r bits, complementing touches only those bits, and the router has n - r - 1 stages. A
router N/2 lines wide with fewer stages than line bits splits into R independent banyans. Each
routing address therefore appears on R lines per plane, so a collector again has 4R inlets. The
exact inlet numbering is in the header of `pipn_dispatcher.sv`.

## Dilated switching element

`pipn_se` is a 2x2 element with K links per port and a registered output. Cells with routing bit 0
go to the upper port, cells with bit 1 to the lower. Each port passes at most K cells; the rest are
dropped and counted on `drops`. A random `prio` bit chooses which input port is served first.
Within a port, cells are served in link order. Winners always fill the low link indices, and an
assertion checks that. With K = 1 this is the ordinary banyan SE.

The distributor drives only link 0 of each router inlet; the other K-1 links enter empty.

## Collector and its buffer

Each slot, a collector sends one cell to its outlet and keeps up to `BUF` more (default 2).
Buffered cells go first, oldest first. New arrivals follow in inlet order, starting at a
round-robin pointer that moves one inlet per slot. Cells that do not fit are dropped and counted.
`BUF = 0` gives the unbuffered collector: one arrival is delivered and the rest are lost.

## Cells, timing and counters

* A cell (`pipn_pkg::cell_t`, 26 bits) is `{valid, compl_f, dest[7:0], payload[15:0]}`. The fabric
  never reads the payload; it stands in for the body of an ATM cell. `ADDR_W = 8` limits a switch
  to 256 ports.
* One clock is one cell slot. Every inlet and outlet carries one cell per slot. There is no
  back-pressure: losses are counted, not prevented.
* Latency: one clock per router stage plus one in the collector. A cell that does not wait takes n
  clocks (8 for a 256-port D2 or R2), or n - r for selective loading (7 for S2). Every cell ahead
  of it in its collector adds one clock, so at most `BUF` extra clocks.
* `pipn_switch` outputs cumulative `router_drops`, `collector_drops` and `delivered` counters,
  cleared by reset (`rst_n`, active low, synchronous).
* All random decisions come from `pipn_rand`: independent 32-bit xorshift generators, one per 32
  bits needed, seeded from the `SEED` parameter. The same seed replays the same run.

## Module map

| module | role |
|---|---|
| `pipn_pkg` | cell type, address and payload widths |
| `pipn_top` | D2, R2 and S2 switches, 256 x 256, side by side |
| `pipn_switch` | one switch: demultiplexers, R subnets, dispatcher, counters, random source |
| `pipn_demux` | 1-to-R inlet demultiplexer, random or selective |
| `pipn_subnet` | distributor + router of one subnetwork |
| `pipn_distributor`, `pipn_de` | N/2 distributor elements |
| `pipn_router` | two interconnected butterfly planes of `pipn_se` |
| `pipn_se` | 2x2 SE with dilation K |
| `pipn_dispatcher` | deciders, collectors and the fixed wiring between them |
| `pipn_decider` | address restoration and choice of collector |
| `pipn_collector` | per-output buffer, one cell out per slot |
| `pipn_rand` | pseudo-random bits |

## Where this RTL makes its own choices

The switch's architecture follows the published PIPN with dilation and replication. These points
were left open and are decisions of this implementation:

* **Plane interconnection.** Which links cross between front and back planes is not given in a
  form the RTL could follow. Here the lower output of every SE crosses between stages.
* **Banyan topology.** A butterfly that routes on the low address bits. Low-bit routing is what
  produces the output grouping described above.
* **Which group is complemented:** the back-plane group. The `compl_f` flag is added so that a
  decider can restore a cell whatever plane it ends in.
* **Contention winners:** a random input port first in the SE; round-robin inlet order in the
  collector.
* **Pipelining:** one register per router stage and one in the collector.
* **Cell format and payload width.**
* **Load per router inlet.** Each DE feeds one inlet of each plane, so a router inlet sees the
  same load as a switch inlet. The published uniform-traffic analysis instead assumes half the
  inlet load at each router inlet. Throughput measured on this RTL is therefore not directly
  comparable with that analysis.

Not built:

* the R-to-1 output multiplexers of replicated banyans, which the PIPN variants do not need;
* a Type-II traffic generator, whose parameters are not defined precisely enough;
* an infinite collector buffer.

## Verification

Every block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_pipn_se` | K = 2 SE against a cell-by-cell reference: forwarded cells, order, drops, one-clock latency |
| `tb_pipn_distributor` | each cell leaves on exactly one plane; complementing; the split follows the random bit |
| `tb_pipn_demux` | random and selective subnet choice, R = 4 |
| `tb_pipn_decider` | address restoration and port choice for an outlet |
| `tb_pipn_collector` | outlet, buffer level and drops against a reference queue, with fills and overflows |
| `tb_pipn_router` | 8-line, 3-stage, K = 2 router: every cell on the right line after 3 clocks, losses equal to the drop count, plane crossings seen |
| `tb_pipn_dispatcher` | N = 16, R = 2, random and selective wiring: every cell reaches its outlet within 1 to 1+BUF clocks |
| `tb_pipn_switch` | PIPN, D2, D4, R2, S2, R4, S4 at N = 16, uniform full load, with a full scoreboard (`pipn_sb`) |
| `tb_pipn_type1` | the same seven switches under Type-I traffic, groups (0.30, 0.02, 0.15, 0.00, 0.20, 0.06, 0.22, 0.05) |
| `tb_pipn_top` | `pipn_top` at N = 32: all three switches end to end |

`tb_pipn_top` also fails if any of these never happens: a router contention loss, a collector
overflow, a cell waiting in a buffer, a complemented back-plane cell, a cell on a second dilated
link, or traffic into either subnet under either loading rule.

The largest size simulated is N = 32 for the three-switch top. The 256-port top passes lint and
elaboration, but its full simulation model takes too long to compile to include here.

Throughput measured at N = 16, full load, two-cell buffers (delivered cells / offered slots):

| traffic | PIPN | D2 | D4 | R2 | S2 | R4 | S4 |
|---|---|---|---|---|---|---|---|
| uniform | 0.51 | 0.81 | 0.86 | 0.69 | 0.74 | 0.77 | 0.83 |
| Type-I | 0.42 | 0.60 | 0.62 | 0.54 | 0.57 | 0.59 | 0.61 |

The ranking matches the published evaluation: dilation beats replication, degree 4 beats degree 2,
and under uniform traffic selective loading beats random loading. The published 16 x 16 Type-I
improvements over the PIPN are averages over a sweep of offered loads. The Type-I figures here are
taken at full load only and come out larger (D2 +40 %, D4 +46 %, R2 +28 %, S2 +34 %, R4 +39 %,
S4 +43 %).

## Simulating

With plain Verilator 5, from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb \
  rtl/pipn_pkg.sv tb/tb_pipn_switch.sv --top-module tb_pipn_switch
./obj_dir/Vtb_pipn_switch
```

Swap the testbench name to run another test. To try other sizes, override `N`, `K`, `R`,
`SELECTIVE` and `BUF` on `pipn_switch`. `N` must be a power of two from 4 to 256. Widen
`ADDR_W` in `pipn_pkg` for larger switches.
