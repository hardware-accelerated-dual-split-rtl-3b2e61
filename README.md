# Dual-split tree intersection pipeline

Ray tracers accelerate their visibility queries with a tree over the scene. The usual tree is
a bounding volume hierarchy (BVH), in which every node stores its children's boxes. Much of that
data is redundant: a child box shares most of its faces with its parent's box. A *dual-split
tree* represents the same partitioning of space with less data. Each internal node stores only
two axis-aligned planes, and the node type says how they are used:

* a **split** node divides the parent's region into a lower and an upper child. The two planes
  may overlap or leave an empty gap between the children;
* a **carving** node cuts empty space off the parent's region and has a single child. It comes
  in two forms. A *single-axis* carving node puts both planes on one axis, which keeps a slab.
  A *dual-axis* carving node puts them on two different axes, which keeps a corner region.

Decoding such a node in software costs bit manipulation and data-dependent branches. This RTL
does the whole node test in a single fixed-function pipeline. One instance serves the
traversal loop of many threads. Each clock it accepts one node test: the node's header word,
its two planes and the current ray. Eight clocks later it returns a 2-bit code that tells the
loop what to do next, the updated ray interval, and the offsets of the next node and of the
node to push on the stack. Every node type uses the same datapath, built from two FP
subtractors, two FP multipliers, comparators and two 3-input min/max units. Nothing in the
datapath branches on the node type. The type only changes which operands the multiplexers
select and how the comparison results are read.

## The node word

A node begins with a 32-bit *header-offset* word. Bits [31:26] hold a 6-bit header and bits
[25:0] hold an offset. An internal node is followed by two IEEE-754 single-precision planes.
Nodes are stored depth-first with siblings next to each other, so a node needs only the offset
of its first (left) child. For a leaf, the offset points into the triangle index list instead.

| type | bit 31 | 30 | 29 | 28 | 27 | 26 |
|---|---|---|---|---|---|---|
| leaf | 0 | x | x | x | x | 1 |
| split | 0 | axis | axis | left size | left size | 0 |
| single-axis carve | 1 | 1 | 0 | axis | axis | leaf |
| dual-axis carve | 1 | pair | pair | corner | corner | leaf |

* axis: 0 = x, 1 = y, 2 = z.
* Dual-axis pair: 00 = xy, 01 = yz, 11 = xz. The code 10 would collide with the single-axis
  type bits.
* The left child size is counted in the same units as the offset. The right child sits at
  `offset + left size`. The testbenches use 4-byte words, so a leaf is 1 word and an internal
  node is 3 words.
* Corner bits: bit 27 describes plane 1 and bit 28 describes plane 2. A set bit means that
  plane's normal points along the negative axis, so the empty space lies on its negative side.
* The leaf bit of a carving node says that the node's offset points directly at triangles.
  This saves a separate leaf node below a carving node.
* For split and single-axis carving nodes, plane 1 is the lower plane and plane 2 the upper
  one. For a split node, plane 1 is the upper bound of the left child and plane 2 the lower
  bound of the right child.

`dst_pkg::dst_decode` turns the header into the derived flags: node type, one or two axes,
left size, corner bits and leaf bit.

## How one datapath serves every node type

Every internal node needs the ray distances to its two planes:

```
t1 = (near_plane - origin[axis1]) * invdir[axis1]
t2 = (far_plane  - origin[axis2]) * invdir[axis2]
```

Each node type then reads these two distances in its own way.

**Selection (`ray_plane_select`).** Two multiplexers pick components `axis1` and `axis2` from
both the inverse-direction vector and the origin vector. For split and single-axis carving
nodes both components come from the same axis. If the ray runs in the negative direction on
that axis, the planes are swapped, so that `t1` always belongs to the plane the ray meets
first. For a dual-axis carving node the planes keep their order. Instead, the stored corner
bits are XORed with the ray's two sign bits. The result says, for each plane, whether the ray
*enters* the kept region through it (bit = 1) or *leaves* it (bit = 0). This gives four cases:
both planes are exits; plane 1 is the entry and plane 2 the exit; the reverse; and both planes
are entries.

**Distances (`fp_add` ×2, `fp_mul` ×2).** Each unit is pipelined over two cycles.

**Interval update (`plane_compare`).** Each distance is routed either into a 3-input FP max
together with `tmin` (an entry raises `tmin`) or into a 3-input FP min together with `tmax`
(an exit lowers `tmax`). Unused inputs are filled with `tmin` or `tmax` themselves.

| node | into the max (entries) | into the min (exits) | result |
|---|---|---|---|
| split | `t2` if `t2 <= tmax` (far child hit) | `t1` if `t1 >= tmin` (near child hit) | near child `[tmin, tmax_out]`, far child `[tmin_out, tmax]` |
| single-axis carve | `t1` | `t2` | trimmed interval |
| dual-axis carve | the entry planes of its case | the exit planes of its case | trimmed interval |
| leaf | — | — | interval unchanged |

The 3-input units are needed for the dual-axis cases with two entries or two exits. There,
`tmin` must be compared against both plane distances at once, and so must `tmax`. A carving
node is culled when `tmin_out > tmax_out`.

**Return code (`return_value_logic`).**

| code | meaning | produced by |
|---|---|---|
| 0 | nothing hit: pop the traversal stack | split with no child hit, culled carving node |
| 1 | continue at `out_offset` with `[out_tmin, out_tmax]` | split with one child hit, carving node |
| 2 | continue at `out_offset` with `[in tmin, out_tmax]`, push `out_offset_stack` with `[out_tmin, in tmax]` | split with both children hit |
| 3 | leaf: triangles start at `out_offset` | leaf node, carving node with leaf bit |

**Offsets (`offset_compute`).** An integer adder forms the right child's offset. The ray sign
maps left and right to near and far: a positive ray visits the left child first. The far child
is always presented on `out_offset_stack`. `out_offset` is the near child when `t1 >= tmin`,
otherwise the far child. For any node that is not a split node, `out_offset` is the header's
own offset.

A thread's traversal loop therefore never branches on node type. It issues the node, and then
pops, continues, pushes or intersects triangles according to the 2-bit code.
`tb/tb_dst_pipeline.sv` and `tb/tb_dst_traversal.sv` contain such a loop.

## Pipeline timing

| cycle | work | module |
|---|---|---|
| 1 | header decode, component and plane selection, corner case | `ray_plane_select` |
| 2–3 | `plane − origin`, both planes | `fp_add` |
| 4–5 | `× invdir` → `t1`, `t2` | `fp_mul` |
| 6 | `t1 >= tmin`, `t2 <= tmax`, routing into the min/max | `plane_compare` |
| 7 | 3-input FP max and FP min | `plane_compare` / `fp_minmax3` |
| 8 | culling compare, return code, offset selection | `return_value_logic`, `offset_compute` |

The pipeline is fully pipelined. A test presented with `in_valid` on one clock edge shows up
with `out_valid` and the same `in_tag` 8 edges later. Back-to-back issue is allowed. There is
no back-pressure and no stall: the consumer must take every result. Only the valid bits are
reset. The offsets are selected combinationally from registered values in the last stage. All
other outputs come straight from registers.

## Top-level interface (`dst_pipeline`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, active-low asynchronous reset of the valid bits |
| `in_valid`, `in_tag` | in | 1, `TAG_W` | issue a test; the tag identifies the requesting thread |
| `in_header_offset` | in | 32 | node word |
| `in_plane1`, `in_plane2` | in | 32 | the node's planes (ignored for a leaf) |
| `in_invdir`, `in_origin` | in | 3×32 (`vec3_t`) | ray inverse direction and origin |
| `in_tmin`, `in_tmax` | in | 32 | current ray interval |
| `out_valid`, `out_tag` | out | 1, `TAG_W` | result, 8 cycles after issue |
| `out_ret` | out | 2 | return code |
| `out_offset`, `out_offset_stack` | out | 32 | next node / node to push (zero-extended) |
| `out_tmin`, `out_tmax` | out | 32 | updated interval |

`TAG_W` defaults to 5, which is enough for 32 threads sharing one pipeline.

## Floating-point behaviour

`fp_add` and `fp_mul` are IEEE-754 single precision with round-to-nearest-even. Overflow
gives infinity, and infinity is propagated. Both units depart from full IEEE in the same ways:

* they flush to zero: subnormal inputs are treated as zero, and results below the smallest
  normal become a signed zero;
* every NaN result is the quiet NaN `0x7FC00000`.

`fp_cmp` follows IEEE ordering: −0 equals +0, and a NaN compares false. An axis-parallel ray
has an infinite inverse-direction component. This is handled, except when the ray origin lies
exactly on a plane of that axis: there `0 × ∞` gives NaN, both comparisons on that distance
are false, and the result is not defined geometrically. The testbenches avoid exact zero
direction components.

## Where this RTL departs from or adds to its source description

* These follow the published design: two FP adders, two FP multipliers, one integer adder,
  3-input FP max/min units and a total latency of 8 cycles. So do the data flow between the
  selection, comparison, return-value and offset blocks, and the two-cycle FP units.
* The published unit list has four FP comparators and three FP min/max units. This RTL uses
  three comparators (`t1` against `tmin`, `t2` against `tmax`, and the culling test) and two
  3-input min/max units (one max, one min), each built from two 2-input compare-selects. How
  the published counts are split up is not described, so the counts here follow from the
  data flow rather than from that list.
* These choices are this design's own:
  - the placement of the pipeline registers outside the FP units;
  - the insides of every FP unit;
  - the valid/tag interface and the absence of back-pressure;
  - the numeric codes for axes, axis pairs and corner bits;
  - the unit of the offset.
* The source text states the single-axis carving test in two ways: once as the split-node
  condition (`tmin <= t1` and `tmax >= t2`), and once as "the trimmed interval is non-empty".
  This RTL uses the trimmed interval for all carving nodes.
* The source text describes the 3-input minimum for the "both planes are exits" corner as
  producing `tmin_out`. Geometrically it bounds `tmax`, and that is what this RTL does.
* The source figure selects the final output offset with header bit 31 alone. A leaf node also
  has bit 31 = 0, but its offset must be passed through unchanged. This RTL therefore passes
  the header offset through for every node that is not a split node.
* Only the node-test unit is built. The surrounding many-core ray-tracing processor is not:
  the thread processors that run the traversal loop, the caches, DRAM and the reconfigurable
  shared execution units are outside this RTL.

## Files

| file | content |
|---|---|
| `rtl/dst_pkg.sv` | types (`f32_t`, `vec3_t`, node type, corner case), header decode, float ordering key |
| `rtl/dst_pipeline.sv` | top: the 8-stage pipeline |
| `rtl/ray_plane_select.sv` | cycle 1: decode, component/plane selection, corner case |
| `rtl/fp_add.sv`, `rtl/fp_mul.sv` | 2-cycle single-precision adder/subtractor and multiplier |
| `rtl/plane_compare.sv` | cycles 6–8: comparisons, 3-way min/max, culling, return code |
| `rtl/fp_cmp.sv`, `rtl/fp_minmax3.sv` | combinational comparator and 3-input min/max |
| `rtl/return_value_logic.sv` | 2-bit return code |
| `rtl/offset_compute.sv` | right-child adder and near/far/next offset selection |
| `tb/tb_fp_pkg.sv` | exact float ↔ double conversions used as the reference arithmetic |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_dst_traversal.sv` | workload-style test: generated tree; path-tracing, camera and shadow rays; 32 threads sharing the pipeline |

## Verification

Each testbench compares the module against a reference written independently in the
testbench. For the FP units the reference is the simulator's double-precision arithmetic
rounded once to single precision. For the sum, difference or product of two singles, this
gives exactly the correctly rounded result, so the units are checked bit-exactly.

* `tb_fp_add` and `tb_fp_mul`: about 75k operand pairs in total, plus special cases and
  rounding ties.
* `tb_plane_compare`: every node type and corner case against a case-by-case model of the
  geometry.
* `tb_dst_pipeline`, the end-to-end test, runs the top at its default parameters:
  - 20,000 random node tests are issued one per cycle. Each result is checked for value, tag
    and an exact 8-cycle latency.
  - The testbench then acts as the thread processor. It traverses a hand-built six-node tree
    that contains every node type, for 400 random rays. The set of leaves reached must equal
    the set found by clipping each ray against each leaf's region by brute force.
  - It counts each mechanism: every return code, node type and dual-corner case; plane
    swapping; near-only and far-only hits; pushes, pops; and back-to-back issue. It fails if
    any of them never occurs.
* `tb_dst_traversal` runs the pipeline the way a multiprocessor would use it. It is a small
  stand-in for real rendering workloads:
  - 96 random boxes act as primitives. A BVH is built over them. The BVH is converted to a
    dual-split tree with identical bounds: each child's box is carved out of what its parent
    leaves it, using single-axis carves, dual-axis carves and carving leaves, and inner nodes
    become split nodes.
  - 32 threads share the pipeline through the tag, each tracing its own ray. Issue is round
    robin, at most one node test per cycle.
  - Three ray sets run in turn:
    - path-tracing-like incoherent rays (random origin, random direction);
    - coherent camera rays from outside the scene, some of which miss it;
    - any-hit shadow rays towards a point light, which stop at the first leaf.
  - For every ray, the leaves reached must equal the boxes hit by a slab test that uses the
    same single-precision distances. For shadow rays, only the blocked/unblocked answer must
    match. Every result must come back to its thread after 8 cycles.
  - It prints the pipeline occupancy of each set. With 32 threads and 8 stages this is above
    99%, and the test fails below 90%.

To run a testbench with plain Verilator:

```
verilator --binary --timing -Irtl -Itb rtl/dst_pkg.sv tb/tb_fp_pkg.sv \
    rtl/fp_add.sv rtl/fp_mul.sv rtl/fp_cmp.sv rtl/fp_minmax3.sv rtl/ray_plane_select.sv \
    rtl/return_value_logic.sv rtl/plane_compare.sv rtl/offset_compute.sv rtl/dst_pipeline.sv \
    tb/tb_dst_pipeline.sv --top-module tb_dst_pipeline
./obj_dir/Vtb_dst_pipeline
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`. The whole set runs in
seconds.
