# PLOC++ BVH builder in SystemVerilog

This is a hardware unit that builds a bounding volume hierarchy (BVH) for ray
tracing from a scene's primitives. It implements the two-level variant of the
PLOC++ algorithm (Parallel Locally-Ordered Clustering). The primitives arrive
already sorted along a Morton curve and cut into independent sequences. Each
sequence is clustered bottom-up by its own streaming sweep unit. The few
clusters each unit leaves behind are then joined into one tree by a single
unit.

The main idea is that one PLOC iteration is not run as three separate array
passes. Nearest-neighbour search, merging and compaction become a single
pipeline that consumes one cluster per clock and emits the compacted result
behind it. The only storage is a small circular window of clusters, so the
data between iterations is a plain stream into a FIFO.

Default configuration: 32 sweep units, search radius R = 16.

## The clustering rule

A cluster is a box together with the id of the BVH node it stands for. The
distance between two clusters is the surface area of the smallest box that
encloses both. One sweep over a sequence does three things:

1. Each cluster *i* finds its nearest neighbour among positions *i−R … i+R*.
   Ties go to the lower position.
2. Two clusters that are each other's nearest neighbour merge. The parent
   takes the lower position.
3. The upper partner disappears, and the sequence closes up.

A unit repeats sweeps over its sequence until R or fewer clusters remain.
Unit 0 then sweeps the concatenation of all units' leftovers, in unit order,
until one cluster remains: the root. Morton order is kept throughout,
because clusters never change position except by merging into the lower
partner.

## How a sweep unit streams (`ploc_sweep_unit`)

The hardest part of the design is how the sweep unit keeps everything
consistent with one cluster per clock.

The unit has three buffers, each with B = 64 slots and indexed modulo B:

* the **AABB buffer** holds the clusters;
* the **nearest-neighbour buffer** holds each slot's best search key so far;
* the **merged flag** marks a slot that has already been merged into a lower
  partner.

A search key is the packed word `{distance[31:0], offset+R}`. One unsigned
comparison of two keys orders them by distance, and on equal distance it
picks the lower neighbour position. This is why the offset is stored with a
bias of +R.

In every clock that the unit advances, with *p* the slot written this clock,
three positions are worked on at once:

| position | what happens |
|---|---|
| *p* | the incoming cluster is written. Its key starts as the distance to *p−R*, and its merged flag is cleared |
| *c = p−R* (search) | 16 distance metric evaluators (`dme`) compute distance(C*c*, C*c+r*) for r = 1…R |
| *l = p−2R* (decision) | the key of C*l* is final, and C*l* is merged, passed on or dropped |

Each distance computed at the search position serves both clusters of the
pair:

* Tagged with offset −r, it is folded into the key of C*c+r*.
* Tagged with +r, it goes into the comparator tree (`cmp_tree`, 8+4+2+1
  comparators). The tree's minimum is folded into the key of C*c*.

So each pair is evaluated once, which halves the search work. By the time a
slot is R positions behind the search position, every pair that involves it
has been seen, and its key is final.

At the decision position, C*l* reads its neighbour *n = l + offset*. The
possible outcomes:

* **Merge.** The neighbour lies above *l* and its key points back at *l*.
  `merge_unit` forms the union box under a new node id, the parent is
  emitted at *l*, a node record is written, and slot *n* is flagged as
  merged.
* **Pass on.** There is no mutual pair and *l* is not flagged. C*l* is
  emitted unchanged.
* **Drop.** *l* is flagged as merged. Nothing is emitted: this is the
  compaction.

The neighbour of *l* can be as far up as *l+R = c*. That slot's key is still
being completed in this same clock. The new key of *c* is therefore forwarded
straight into the mutual check.

**End of a pass.** The input sequence ends with `in_last`. The unit then
pushes 2R empty slots, which flushes the window. Empty slots have the largest
distance, so they are never chosen as neighbours. Because of this flush, the
next pass never mixes with the end of the previous one. For a pass of *n*
clusters with no input gaps:

* it takes exactly **n + 2R + 1 clocks**;
* `pass_done` is high in the last of those clocks, with `pass_count` set to
  the number of clusters emitted.

If `in_valid` is low, the whole pipeline simply holds. Outputs are registered
and have no back-pressure. A node record is written in the same clock as its
merged cluster.

The whole per-clock step is combinational between two register stages:
16 area computations, the comparator tree, the key update and the mutual
check. That gives the stated one cluster per clock, but the path is long. A
higher clock rate would need pipelining of the search stage. That changes how
far forwarding has to reach, and it is not done here.

## The control unit and passes (`ploc_bvh_builder`)

`ploc_bvh_builder` is the top level. It holds N_UNITS sweep units and, for
each unit, one `fifo_section` of FIFO_DEPTH clusters. Every cluster a unit
emits is appended to its own section. Each unit is run by a small state
machine:

* **EXT** – the first pass reads the unit's external input stream. The first
  pass always runs, even for a sequence of R or fewer primitives, because
  this is how the sequence gets into the FIFO.
* **LOOP** – each further pass reads from the unit's section exactly as many
  clusters as the previous pass emitted. Its output is appended behind them.
* **DONE** – a pass has emitted ≤ R clusters. They stay in the section.

Unit 0 continues with the top-level states:

* **TOP** – as soon as unit 0 is done, it reads section 0, then section 1,
  and so on up to the last section. At a section whose unit is not done yet,
  it stalls. Its output goes to section 0.
* **TLOOP** – further passes over section 0, until a pass emits one cluster.
* **ROOT/FIN** – the root is popped. It appears on `root` for one clock with
  `root_valid`, and `done` rises.

Every merge in any unit writes a node record `{id, left, right, box}` on that
unit's `node`/`node_valid` outputs. These records, together with the leaves'
own ids, form the complete tree: for P primitives there are exactly P−1
records.

Node ids are assigned as follows:

* **Leaves** keep the id given at the input. Its top bit must be 0.
* **Internal nodes** get `{1, unit number[7:0], counter[22:0]}`. Each unit
  numbers its own merges in order. Unit 0 keeps counting through the top
  level.

## Data formats (`ploc_pkg`)

* `aabb_t`: six unsigned 15-bit coordinates {lo_x, lo_y, lo_z, hi_x, hi_y,
  hi_z}. The scene is expected to be quantised to a 2^15 grid.
* `cluster_t` (122 bits): {id[31:0], box}.
* `bvh_node_t` (186 bits): {id, left, right, box}.
* Distance: dx·dy + dy·dz + dz·dx of the union box. This is half the surface
  area, which orders boxes exactly as the full area does. With 15-bit
  coordinates it always fits the 32-bit distance field, so no rounding or
  saturation happens.

## Interface and timing of the top level

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `start` | in | one-clock pulse: clears the sweep units and begins a build |
| `ext_valid/ext_ready/ext_last/ext_cluster[u]` | in/out | per-unit input stream. One primitive per accepted clock, with `ext_last` on the final one |
| `node_valid/node[u]` | out | BVH node records of unit *u*, at most one per clock, no back-pressure |
| `root_valid`, `root` | out | the root cluster, for one clock |
| `done` | out | build complete; held until the next `start` |

Rules for the inputs:

* Every unit must receive at least one primitive in a build.
* A unit may receive at most FIFO_DEPTH primitives.
* The sections are expected to be empty at `start`. A finished build leaves
  them empty.

All units stream their first pass in parallel, one primitive per clock each.
Assertions check that no FIFO section overflows or underflows, and that
`in_last` only comes with `in_valid`.

## Parameters

| parameter | default | where from |
|---|---|---|
| `N_UNITS` | 32 | the configuration evaluated for this design |
| `R` (search radius) | 16 | same as software PLOC++; sizes the DME bank and comparator tree |
| `B` (window slots) | 64 | own choice: the smallest power of two ≥ 2R+1 |
| `FIFO_DEPTH` (per section) | 32768 | own choice; see below |

`R` and `N_UNITS` can be changed freely: the comparator tree pads itself to
a power of two. `B` must be a power of two of at least 2R+1. `UNIT_W = 8`
bits of the node id limit `N_UNITS` to 256.

The section depth is an estimate. The design this RTL follows budgets about
0.2 mm² of FIFO memory per sweep unit but gives no capacity. 32768 clusters
(about 4 Mbit) is roughly what that area of SRAM holds in a current process.
Assume the primitives are split evenly over the 32 units. The Bunny (69.5K
triangles), Chess (163.8K), Armadillo (345.9K) and Dragon (871.4K) scenes then
fit, at up to 27.2K primitives per unit. Happy Buddha (1.1M), Mercedes Benz
(1.3M), Jaguar (1.5M) and Hairball (2.88M) need 34K–90K per unit and do not
fit unless `FIFO_DEPTH` is raised.

## Where this RTL goes its own way

These points are design choices rather than given facts:

* **Coordinate format.** The coordinates are 15-bit integers. A floating-point
  box format would need floating-point multipliers in every DME.
* **Handshakes and outputs.** The valid/ready handshakes, the node-record
  output and the root output are this design's own.
* **Per-unit first pass.** Each unit's first pass always runs.
* **Top-level start.** The top level starts when unit 0 is done and waits at
  each unfinished section. The design it follows only says that the unit
  holding the lowest indices may start first.
* **Input per clock.** The sweep unit takes one new cluster per clock and
  reads the rest of its 1+R cluster search window from its own buffer. It
  does not receive the whole window from the control unit.
* **Pass flush.** The 2R-slot flush between passes is added.
* **Offset field size.** The search key keeps the 32-bit distance but holds
  the neighbour offset in only $clog2(2R+1) bits, biased by +R. A full
  32-bit offset field would give the same ordering.
* **Clock rate.** Performance targets of this kind assume a GPU-class clock,
  around 2 GHz. The single-clock sweep step here is not pipelined for that
  (see the end of the sweep-unit section).
* **Not included.** Morton code computation, sorting and splitting into
  sequences happen before the builder, in software. Larger scenes handled as
  several sequences per unit, a spill path from the FIFO sections to external
  memory, and power or area figures are not part of this RTL.

## Files

| file | content |
|---|---|
| `rtl/ploc_pkg.sv` | types, widths, box union |
| `rtl/dme.sv` | distance metric evaluator |
| `rtl/cmp_tree.sv` | minimum-key comparator tree |
| `rtl/merge_unit.sv` | union box, new id, node record |
| `rtl/fifo_section.sv` | one FIFO section (synchronous-read array plus output register) |
| `rtl/ploc_sweep_unit.sv` | streaming sweep pipeline with its buffers |
| `rtl/ploc_bvh_builder.sv` | top level: units, sections, pass and top-level control |
| `tb/ploc_ref_pkg.sv` | reference sweep model and primitive generator for the tests |
| `tb/tb_*.sv` | self-checking testbenches |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_dme`, `tb_cmp_tree`, `tb_merge_unit` and `tb_fifo_section` check the
  small blocks against direct computations or a queue model. The comparator
  test includes many equal distances, and the FIFO test includes full, empty
  and the two-clock latency.
* `tb_ploc_sweep_unit` runs 120 primitives through repeated passes:
  * it compares every emitted cluster and node record with the reference
    sweep in `ploc_ref_pkg`, which is written independently as plain array
    code;
  * it checks the n + 2R + 1 clock count of a gap-free pass;
  * it inserts random input gaps in later passes.
* `tb_ploc_bvh_builder` builds a 4-unit tree of about 250 primitives and
  compares every node record of every unit and the root with a reference
  two-level build. It checks that there are P−1 internal nodes and that the
  sections end empty. It also checks that each mechanism happens at least
  once:
  * input stalls;
  * passes read back from the FIFO;
  * merges;
  * compaction drops;
  * forwarding of the key completed in the same clock;
  * top-level waits for an unfinished unit.
* `tb_ploc_bvh_builder_full` does the same with the top at its default
  parameters: 32 units and about 2800 primitives.
* `tb_ploc_scene_build` builds a scene-sized tree at the default parameters.
  It uses synthetic boxes with the Stanford Bunny's count of 69,451
  primitives, or another count given as `+PRIMS=<n>`. All node records are
  checked against the reference. Measured results:

  | primitives | per unit | clocks from `start` to `done` |
  |---|---|---|
  | 69,451 | about 2,170 | 14,767 |
  | 871,400 (Dragon-sized) | about 27,200 | 142,015 |

  The clock counts depend on how the boxes cluster. The synthetic scenes
  say nothing about real models.

To simulate with Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/ploc_pkg.sv tb/ploc_ref_pkg.sv rtl/dme.sv rtl/cmp_tree.sv \
  rtl/merge_unit.sv rtl/fifo_section.sv rtl/ploc_sweep_unit.sv \
  rtl/ploc_bvh_builder.sv tb/tb_ploc_bvh_builder.sv \
  --top-module tb_ploc_bvh_builder -o sim
./obj_dir/sim
```

The full-size test builds in about 1.5 minutes and runs in under a second.
The tests use `$urandom`, and they initialise everything that the design reads
before it is written, so they also pass when Verilator starts variables at
random values.
