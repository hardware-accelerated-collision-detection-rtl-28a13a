# Fixed-point k-DOP collision detection accelerator

This RTL finds every intersecting triangle pair between two rigid objects.
Each object comes with a binary bounding-volume hierarchy (BVH). Every node of
a hierarchy is bounded by a 24-DOP, a convex polytope made of 12 slabs with
fixed orientations. The hardware walks both hierarchies at once. It throws away
every pair of nodes whose DOPs can be shown to be apart, and hands the leaf
pairs that survive to a triangle-triangle test.

The core of the design is an overlap test for two DOPs that uses only integer
arithmetic. It tests one candidate separating axis per clock. Its rounding is
arranged so that it can report false positives ("maybe touching") but never a
false negative: a pair that really overlaps is never thrown away. The width is
35 bits. Everything that stays the same for a whole query is precomputed by the
host, so each axis test costs only 12 multiplications, a small adder tree and a
sign test.

## 1. The overlap test (`dop_pipeline`)

### What is computed

Object O (DOP tree A) is placed relative to object Q (tree B) by a rotation and
a translation T. For each candidate axis L the host precomputes these values:

* `P_A`, `P_B` (3 entries each): the mapping vectors. The dot product of the
  three DOP coefficients that meet in a DOP's extreme vertex with `P` gives
  that vertex's projection onto L. Each entry lies in [-1, 0], provided that
  every pair of neighbouring DOP faces meets at an angle above 90 degrees.
* `j_A`, `j_B` (3 indices each, 0..K-1): which coefficients meet in the
  minimal vertex. The maximal vertex uses the opposite faces, at index
  `j + K/2 (mod K)`, with the mapping vector `-P`.
* `p = L·T`: the projected translation.

The projected intervals of the two DOPs are then

    a_min =  P_A·(a[jA])          a_max = -P_A·(a[jA+K/2])
    b_min =  P_B·(b[jB])          b_max = -P_B·(b[jB+K/2])

The axis separates the DOPs if `a_min + p - b_max > 0` or
`b_min - (a_max + p) > 0`.

### Rounding that cannot miss a collision

All coefficients of a scene are divided by the largest absolute coefficient,
so they lie in [-1, 1]. The host rounds them as follows:

| value | rounded | fraction bits |
|---|---|---|
| DOP coefficients `a`, `b` | up (toward +inf): the DOP can only grow | b = DW-2 = 33 |
| mapping vectors `P_A`, `P_B` | down (toward -inf) | c = PW-2 = 33 |
| projected translation `p` | down | z = b = 33 |

Rounding `P` down enlarges a projection when it multiplies a positive
coefficient. It shrinks the projection when it multiplies a negative one. So
for a negative coefficient the pipeline uses `P' + 2^-c`. This is the same as
adding `2^-c · sn(x)`, where `sn(x)` is the sum of the negative coefficients
among the three. In the same way, `p'` is used as is on one side and as
`p' + 2^-z` on the other. The hardware therefore evaluates

    diff1' = P'_A·a'  + 2^-c sn(a')  + P'_B·b'_k + 2^-c sn(b'_k) + p'
    diff2' = P'_B·b'  + 2^-c sn(b')  + P'_A·a'_k + 2^-c sn(a'_k) - (p' + 2^-z)
    separated  <=>  diff1' > 0  or  diff2' > 0

Here `a'` holds the coefficients at `jA` and `a'_k` those at `jA+K/2`. The
fixed-point `diff'` never exceeds the exact `diff`, and it falls short by at
most `sqrt(3)·2^(1-b) + 6·2^-c + 2^-z`. The testbench checks both bounds on
random real-valued DOPs.

### Number formats and scaling

Coefficients and `P'` entries are 35-bit two's-complement numbers with 33
fraction bits, so they cover [-2, 2). `p'` is 38 bits wide with 33 fraction
bits, so it covers [-16, 16). A product has 66 fraction bits. At that scale,
`2^-c · sn(x)` is just the raw integer `sn(x)`: no shifter is needed. `p'` is
shifted left by c, and `2^-z` becomes `1 << c`. The sums are 74 bits wide.
These formats are this design's choice. The document fixes only the 35-bit
width and the 24-DOP.

The test `> 0` is done on sign bits: `sep = !(sign(d1) & sign(d2))`. For the
sign bit to mean "<= 0", one LSB is subtracted from each sum, folded into the
p' term. Without that, a diff of exactly 0 (touching DOPs) would be reported
as separated.

### Stages

| stage | work |
|---|---|
| S1 | selection: 12 coefficients through multiplexers; the `+K/2` set comes from a second multiplexer bank fed with a rotated copy of the coefficient vector, so no adder is needed |
| S2–S4 | 12 products `P'·coefficient` (`pipe_mul`: one product stage + 2 extra stages for 35-bit operands on 18-bit multipliers); negative coefficients summed alongside |
| S5–S7 | adder tree of 6 products per diff; the p' term joins at the second level |
| S8 | scalar products + correction |
| S9 | sign test, registered `out_sep` |

Latency is `7 + MUL_EXTRA = 9` clocks. One test is accepted every clock and
the pipeline never stalls.

## 2. Traversal control

### Work items and the BV stack (`bv_stack`, `bv_control`)

A work item is a pair of node addresses, marked either as a DOP pair or as a
triangle pair. Work items are kept on a LIFO, so the traversal is depth first
and needs little storage. `start` pushes the pair of roots. The top of the
stack goes to GetData as soon as GetData can take it.

When a DOP pair survives all its tested axes, it is refined:

* both nodes are leaves: a triangle-pair item (the triangle addresses from the two leaf headers);
* node A is an inner node: `(A.left, B)` and `(A.right, B)`;
* otherwise: `(A, B.left)` and `(A, B.right)`.

Both children are pushed in the same clock. Splitting A first is this
design's own rule.

The query ends when the stack is empty, GetData holds nothing, no pair is being
issued, the pipeline is empty and no triangle result is pending. `done` then
pulses for one clock. `collide` says whether any triangle pair hit. Every hit
is also passed on to the host at once, on `hit_*`.

### Prefetch (`getdata`)

GetData has two register sets. The `new` set is filled from memory. The
`current` set feeds the pipeline. While the current pair is tested, the next
DOP pair is read into `new`. The axis controller pulses `take` when it moves
on, and `new` is copied into `current` in one clock. Triangle items use the
same memory port. Their words are streamed straight to the triangle unit.

### Axis scheduling (`axis_control`)

The host loads up to 64 axes. Only the first `n` (`cfg_n`, 24 by default) are
normally tested. After `take`, one axis per clock goes into the pipeline. The
axis carries a tag: its pair's sequence number, the two addresses, the two node
headers and a `last` flag. The tag travels through `pipedata`, a shift
register as long as the pipeline.

* Axis `i` is the pair's last when `i = N-1`, or when `i >= n-1` and either
  continuation (`cfg_cont`) is off or the next pair is already loaded. With
  continuation on, testing goes on past `n` for as long as memory is still
  busy. This can only remove more pairs, and costs nothing.
* The first separating result of a pair marks its sequence number "dead". If
  that pair is still being issued, issuing stops in the same clock. Results
  of a dead pair that are still in flight are ignored.
* A non-separating result tagged `last`, from a live pair, means that no
  tested axis separated the pair. The pair goes to `bv_control` for
  refinement.
* The next pair is taken in the clock when the last axis of the current pair
  is issued, so consecutive pairs leave no gap in the pipeline.

## 3. Interfaces

All signals are synchronous to `clk`. Reset is asynchronous and active low
(`rst_n`).

**Host.** Write the axis table one entry per clock: `ax_we`, `ax_idx`,
`ax_pa`, `ax_pb`, `ax_p`, `ax_ja`, `ax_jb`. Set `cfg_n`, `cfg_ntotal` and
`cfg_cont`. Then pulse `start` with `root_a` and `root_b` (word addresses of
the root nodes). Wait for `done`. `stack_overflow` is sticky. If it is set,
the query was incomplete; the default stack of 128 entries is far deeper than
two 13-level trees need.

**Memory** (64-bit words, 25-bit word address = 256 MB). A read request
(`mem_req_valid`/`mem_req_ready`, `mem_req_addr`, `mem_req_len`) is answered
by `mem_req_len` words on `mem_rd_valid`/`mem_rd_data`, in order, after any
latency. One request is outstanding at a time.

Node layout:

    word 0        header: [63] leaf, [49:25] right child, [24:0] left child
                  (for a leaf: [24:0] is the address of its triangle record)
    words 1..14   24 coefficients x 35 bits, packed LSB first:
                  coefficient i = bits [35i +: 35] of {word 14, ..., word 1}

A triangle record is `TRI_WORDS` (5) words. Its format belongs to the triangle
unit.

**Triangle unit.** GetData sends the 5 words of triangle A and then the 5 words
of triangle B. The signals are `tri_valid`, `tri_data`, `tri_sel` (0 = A,
1 = B) and `tri_last`, with `tri_addr_a`/`tri_addr_b` held during the stream.
There is no back-pressure: the unit must accept one word per clock. It answers
once per pair with `tri_res_valid`, `tri_res_hit` and the two triangle
addresses.

## 4. Parameters

| parameter | default | meaning |
|---|---|---|
| `K` | 24 | DOP orientations |
| `DW` / `PW` | 35 / 35 | coefficient / mapping-vector width (b = DW-2, c = PW-2) |
| `TW` | 38 | width of p' (z = DW-2) |
| `MUL_EXTRA` | 2 | extra multiplier stages; latency = 7 + MUL_EXTRA |
| `AXES_MAX` | 64 | axis table entries |
| `STACK_DEPTH` | 128 | BV stack entries |
| `TRI_WORDS` | 5 | words per triangle record |

Shared types and defaults are in `rtl/cd_pkg.sv`. Addresses are fixed at 25
bits by the record types.

## 5. What is not here, and where this design departs

* **Triangle-triangle test.** It is not included. The design brings its data
  stream out and takes its result in. The intended method transforms one
  triangle into the unit triangle and tests the other against it.
* **Memory bandwidth.** The memory port moves one 64-bit word per clock. A
  DOP pair (30 words) therefore loads in more than 30 clocks. A double-data-rate
  64-bit bus loads a full coefficient set in about 20 clocks, which is less than
  24 axis tests. With a slower memory, continuation matters more than it would
  on such a board.
* **Multipliers.** They are written as `a*b` followed by registers. Mapping the
  product onto 18-bit hard multipliers is left to synthesis retiming.
* **Own choices.** These are all of this design's own making: the number
  formats, the sequence-number scheme for stale results, the node layout, the
  descent rule (A first), the handshakes and the stack depth.
* **Host precomputation.** The test axes, mapping vectors, correspondences and
  p' (with the rounding directions above) are computed in software. They are
  not part of the RTL.

## 6. Files and simulation

`rtl/`: `cd_pkg.sv` (types, defaults), `dop_pipeline.sv` + `pipe_mul.sv`,
`pipedata.sv`, `bv_stack.sv`, `bv_control.sv`, `axis_control.sv`,
`getdata.sv`, `collision_top.sv` (top).

`tb/`: one self-checking testbench per block (`tb_<block>.sv`) and
`ddr_model.sv`, a behavioural memory. Each testbench prints
`TB_RESULT checks=N failures=M`.

* `tb_dop_pipeline`: latency 9; the exact `= 0` / `> 0` boundary; 3000 random
  integer tests against an independent reference; 3000 rounded real-valued
  DOPs checking the error bound and that no false negatives occur.
* `tb_axis_control`: issue order, stop on separation, the `last` rule with and
  without continuation, and overlap reports, against a stand-in pipeline.
* `tb_bv_control`: the sets of DOP and triangle pairs tested and the `done`
  and `collide` results, against a recursive reference traversal.
* `tb_getdata`, `tb_bv_stack`, `tb_pipedata`: data paths, LIFO order,
  overflow and delay.
* `tb_collision_top`: whole queries at default parameters on two 31-node
  trees with random 24-DOPs and 40 axes. The triangle pairs tested and the
  hits reported are compared with a reference traversal. The test also
  requires each mechanism to occur: early stop, stale results, continued
  axes, prefetch, child scheduling, triangle tests and hits.

Two further testbenches run the studies the design was tuned with:

* `tb_axes_sweep`: one scene, 60 axes loaded, queries with n = 12, 16, 20,
  24, 28, 40 and 60 axes per pair (and n = 24 with continued testing), each
  checked against the reference and its clock count printed. On the built-in
  scene, continued testing roughly halves the clocks at n = 24 (about 12.9 k
  against 20.0 k), because pairs that the first 24 axes cannot separate are
  often separated by later ones while the next pair is still loading. For
  n = 60 it also prints, per axis position, how many of the pair tests that
  reached it were separated there.
* `tb_precision_sweep`: the overlap pipeline elaborated at 12, 16, 18, 19, 24,
  35 and 44 bits. For each width it checks that no overlapping pair is ever
  reported separated and counts the conservative false "overlap" results
  against an exact reference. Half the boxes are placed close to touching.
  False positives appear at 16 bits and below and vanish from 18 bits up.
  This matches the observation that 18 bits is about the narrowest width
  that loses no pruning.

Example (any block):

    verilator --binary --timing --assert -Irtl -y rtl rtl/cd_pkg.sv \
        tb/ddr_model.sv tb/tb_collision_top.sv --top-module tb_collision_top
    ./obj_dir/Vtb_collision_top
