# Hierarchical multiplexing interconnect for a stage-level reconfigurable CMP

A stage-level reconfigurable chip multiprocessor does not throw away a whole
core when one of its pipeline stages fails. Each in-order core has four
stages: fetch, decode, issue and execute/mem. These are decoupled, and a
switch network sits between them. With that network, a *logical pipeline* can
be built from the healthy stages of different cores. The usual network is a
full crossbar at every stage boundary. It is flexible, but its area and power
grow quickly with the number of cores.

This RTL replaces those crossbars with a two-level multiplexer structure. The
idea rests on one observation. At any boundary inside a core, a fault gives
only four cases:

| producer stage | consumer stage | what the boundary must do              |
|----------------|----------------|----------------------------------------|
| healthy        | healthy        | pass the stream locally                |
| faulty         | healthy        | take one stream **from** another core  |
| healthy        | faulty         | send one stream **to** another core    |
| faulty         | faulty         | nothing                                |

A crossbar could do incoming and outgoing at the same boundary, but a fault
never needs both. Over a whole core, the worst fault patterns are two
interleaved faults. Faulty fetch and issue needs 2 incoming and 3 outgoing
streams. Faulty decode and execute needs 3 incoming and 2 outgoing. So every
core gets exactly three incoming lanes and three outgoing lanes, and no more.

## Stage boundaries

Each core has five places where a stream enters a stage. Each of them gets one
Level#2 (L2) multiplexer. The index is `hmi_pkg::bnd_e`:

| boundary | producer    | consumer                      | meaning           |
|----------|-------------|-------------------------------|-------------------|
| `B_FE`   | execute/mem | fetch                         | branch feedback   |
| `B_FD`   | fetch       | decode                        | instruction flow  |
| `B_DI`   | decode      | issue                         | instruction flow  |
| `B_IE`   | issue       | execute/mem                   | instruction flow  |
| `B_WB`   | execute/mem | issue (register file)         | register writeback|

A stream is a 64-bit channel (the crossbar's channel width) plus a valid bit
(`hmi_pkg::stream_t`, 65 bits).

## Structure of one core (`hmi_core_node`)

```
   other cores' outgoing lanes                      this core's outgoing lanes
   ((N-1) x 3 channels)                                   (3 channels, to all others)
          |                                                      ^
   +------v-------+                                     +--------+-------+
   | L1 incoming  |  3 lanes, each picks any            | L1 outgoing    |  each lane picks
   | hmi_l1_in_mux|  (other core, lane) or idles        | hmi_l1_out_mux |  one of the 5 local
   +------+-------+                                     +--------^-------+  producer streams
          | 3 incoming lanes, shared by all five L2 muxes        |
          v                                                      |
   prod_in[b] --+--> [ L2 mux b: local | lane0 | lane1 | lane2 ] --> cons_out[b]
                |                                                |
                +------------------------------------------------+
```

* **L2 mux** (`hmi_l2_mux`): four inputs. Select 0 takes the local producer;
  select k (1..3) takes incoming lane k-1.
* **L1 incoming mux** (`hmi_l1_in_mux`): every other core's three outgoing
  lanes arrive here. Each of the three output lanes can choose any of them on
  its own, or stay idle (all zeros).
* **L1 outgoing mux** (`hmi_l1_out_mux`): each of the three outgoing lanes
  carries one of the core's five local producer streams, or stays idle. The
  three lanes are broadcast to every other core.
* **Route register**: holds the selects. After reset every L2 mux is local and
  every lane is off, so each core runs as an ordinary pipeline.

`hmi_cmp` (the top) has one node per core. It wires the three outgoing lanes of
each core to the L1 incoming mux of every other core. At 5 cores that is 4
sources per core.

### Where the outgoing lanes are tapped

In the reference structure, the outgoing lanes are drawn after the L2 muxes.
Here they read the local producers directly. The two are the same in every
useful configuration. A stream is sent out only when its local consumer is
faulty, and that boundary's L2 mux then sits on its local input. Tapping after
the L2 mux would leave a structural combinational loop: lane out of core A,
into core B, out of B, back into A. That loop is broken only by the
configuration, and lint and timing tools would flag it. Tapping the producer
leaves no loop at all.

One side effect: a core can send a local stream out while its own consumer of
that boundary takes a stream from a third core. The drawn structure could not
do that. No test relies on it.

## Routing a logical pipeline

A logical pipeline names the core that lends each of its four stages. For each
of the five boundaries, find the producing core `s` and the consuming core
`d`:

* `s == d`: set `l2_sel[d][b] = 0`.
* `s != d`: at `s`, take a free outgoing lane `ko` and set
  `out_sel[s][ko] = {en:1, bnd:b}`. At `d`, take a free incoming lane `ki`,
  set `in_en[d][ki] = 1`, `in_core[d][ki] = rel(d, s)`, `in_lane[d][ki] = ko`,
  and `l2_sel[d][b] = ki + 1`.

`rel(d, s)` numbers the other cores of `d` in ascending order, with `d` itself
skipped: `s` if `s < d`, otherwise `s - 1`.

No core may need more than three lanes in either direction. Also, no stage may
serve two pipelines: this structure has no stage sharing. So if some stage
type has fewer healthy copies than the others, the extra copies of the other
types stay unused.

Example: 5 cores, numbered 0..4. Faults: fetch of core 0, execute of core 1,
decode and issue of core 2, issue of core 4. Three logical pipelines can be
formed (F, D, I, E given as core numbers):

* (3, 3, 3, 3)
* (4, 4, 1, 4)
* (2, 0, 0, 0)

No core uses more than two lanes. `tb_hmi_cmp` routes exactly this case.

### Configuration port

`hmi_cmp` loads one node per clock edge. The node is chosen by `cfg_core` and
the load happens while `cfg_we` is high. The fields are:

* `cfg_l2_sel[5]`: 2 bits each.
* `cfg_in_en[3]`.
* `cfg_in_core[3]`: `$clog2(N_CORES-1)` bits each.
* `cfg_in_lane[3]`: 2 bits each.
* `cfg_out_sel[3]`: `{en, bnd}`.

Writing a full configuration takes `N_CORES` cycles. Settings take effect on
the edge that loads them. An assertion in each node flags an L2 mux that
selects a disabled incoming lane.

In the intended system, a firmware routine computes the routes after fault
detection. That routine is not part of this RTL. `tb/hmi_route_pkg.sv` holds a
testbench version of it (class `hmi_router`). It applies the rules above, and
it also builds pipelines from a random fault map.

## Timing

The stream paths are purely combinational. A stream reaches `cons_out` in the
same cycle it is driven on `prod_in`, whether it stays in the core or crosses
to another one. So the structure adds no cycles compared with a direct
stage-to-stage path. The testbenches check every stream in the cycle it is
driven. Only the route register is clocked. It has an active-low asynchronous
reset, `rst_n`.

## What is outside this RTL

* **The pipeline stages.** Fetch (with PC generation and branch predictor),
  decode, issue (register file, scoreboard) and execute/mem come from an
  existing 32-bit SPARC V8 core. They connect to `hmi_cmp` through
  `prod_in[core][boundary]` and `cons_out[core][boundary]`.
* **The stage buffers and stream tags.** In the reference design, each stage
  has a double buffer on its inputs and outputs and a stream identifier. Their
  handshake is not specified, so this interconnect has no ready or
  backpressure path. A stage sees a valid bit and data only.
* **The configuration manager.** It is software, as described above.

## Parameters and size

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `N_CORES` | 5  | `hmi_cmp`, `hmi_core_node`, `hmi_l1_in_mux` | number of cores |
| `CH_W`    | 64 | `hmi_pkg` | data bits per channel |
| `LANES`   | 3  | `hmi_pkg` | incoming and outgoing lanes per core |
| `N_BND`   | 5  | `hmi_pkg` | boundaries (L2 muxes) per core |

The structure was evaluated at 5, 10, 20 and 30 cores. The default top is the
5-core system. At that size, coarse synthesis gives about 1,065 word-level
cells and 185 flip-flop bits (the route registers). `tb_hmi_cmp_scale`
simulates 10, 20 and 30 cores by overriding `N_CORES`.

## Testbenches

Every testbench is self-checking. Each ends with a `TB_RESULT checks=N
failures=M` line and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_hmi_l2_mux` | all four selects with random streams |
| `tb_hmi_l1_in_mux` | every (core, lane) source on every output lane; random selects; enable and out-of-range lanes give idle outputs |
| `tb_hmi_l1_out_mux` | every boundary on every lane; disabled and out-of-range selects |
| `tb_hmi_core_node` | reset state; configuration loads only with `cfg_we`; random configurations checked against a model; same-cycle delivery |
| `tb_hmi_cmp` | the 5-core top at default parameters, end to end (see below) |
| `tb_hmi_cmp_scale` | 10-, 20- and 30-core systems under random fault maps |

`tb_hmi_cmp` runs four scenarios:

1. No faults.
2. The five-fault example above.
3. All 16 fault patterns of core 0. Each missing stage is lent by a different
   core. The incoming/outgoing counts are checked against the classification:
   1 fault gives 1/2, fetch+issue 2/3, decode+execute 3/2, 3 faults 2/1, and
   4 faults 0/0.
4. 60 random fault maps, reconfigured while traffic runs. For each map, the
   number of logical pipelines formed must equal the number of healthy copies
   of the scarcest stage type.

It also counts how often each mechanism occurs: local pass, incoming route,
outgoing route, a boundary with both stages dead, a core using all three lanes
of one direction, idle lanes, and reconfiguration. A mechanism that never
occurs counts as a failure.

A few random fault maps need more than three lanes on some core under the
planner's simple pooling and are skipped. That is a limit of the planner, not a
hardware fault.

To simulate with Verilator, run from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  --top-module tb_hmi_cmp rtl/hmi_pkg.sv tb/hmi_route_pkg.sv tb/tb_hmi_cmp.sv
./obj_dir/Vtb_hmi_cmp
```

For the other testbenches, swap in their name. `tb_hmi_cmp_scale` also needs
`tb/hmi_route_pkg.sv`. Each run takes well under a second.

## How far to trust it, and where it departs from the reference

The following come from the reference description:

* The five-boundary structure.
* Four-input L2 muxes.
* Three lanes in and out per core.
* 64-bit channels.
* Every core connected to every other core through Level#1 muxes.
* No stage sharing.

The following are this design's own choices:

* The valid bit.
* Free per-lane selection inside both L1 muxes.
* The enable bits and idle-lane zeroing.
* The route register and its port.
* The reset state.
* Tapping outgoing streams at the producers (explained above).

Not modelled: flow control between stages, and the variable number of cycles
an instruction can take across a narrow channel. Both belong to the stage
buffers, whose design is not given.
