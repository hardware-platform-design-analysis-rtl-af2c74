# K-Means assignment step for two clusters, 8-bit samples

K-Means clustering alternates two steps: assign every sample to the cluster
whose centroid is nearest, then move each centroid to the mean of its
members, until no assignment changes. This design is the first of those
steps, done in hardware for the smallest useful case. There are K = 2
clusters, and samples and centroids are one-dimensional unsigned 8-bit
values. Two centroids and one sample go in. The sample comes out on the
output port of the cluster it belongs to, and the other output port reads
zero.

The block is purely combinational. It has no clock and no reset, and its
five 8-bit ports are its whole interface. Computing the centroid means and
deciding when to stop iterating are left to whatever drives it, such as a
processor, a state machine or a testbench. The end-to-end testbench shows the
complete loop wrapped around the block.

## Datapath

```
 data ─────┬──────────────┬───────────────────────────────┐
           │              │                               │
 centroid1 ┤ abs_dist     │                               │
           └─► dist1 ─┐   │                               ▼
                      ├─► nearest_cmp ── sel ──► cluster_mux ──► cluster1
 centroid2 ┐ abs_dist │                                      └──► cluster2
           └─► dist2 ─┘
```

| module        | what it does |
|---------------|--------------|
| `kmeans_pkg`  | `cluster_e` (`CLUSTER1`, `CLUSTER2`) and the default width `DATA_W = 8` |
| `abs_dist`    | `distance = |a - b|`. A `>` comparator picks which operand to subtract from which, so the result fits in W bits with no sign bit. |
| `nearest_cmp` | Compares the two distances with a `>` comparator and an `==` comparator. It gives `sel = CLUSTER2` only when `dist2 < dist1`, and `tie` when they are equal. |
| `cluster_mux` | Both outputs default to zero, and the one named by `sel` takes the sample. |
| `kmeans_top`  | Wires the four blocks above: two distance units, one comparator, one output mux. |

### Distance

The distance is the Euclidean distance. For scalar samples that is just
`|data - centroid|`. The square root never has to be taken, because only the
order of the two distances matters. A multi-dimensional version would need a
sum of squared (or absolute) differences per centroid. This RTL does not
provide one.

### Ties and the zero output

Two rules in this design are easy to overlook:

* **Tie.** When the sample is equally far from both centroids, it goes to
  **cluster 1**. This is a choice of this design. The comparator result
  `tie` exists inside `nearest_cmp` but is not a top-level port.
* **Zero on the idle output.** The output that does not get the sample is
  driven to `8'h00`. Writing the default assignment first in every
  evaluation also keeps the logic free of latches. There is no valid flag,
  so a sample whose value is 0 cannot be told apart from "nothing assigned
  here". If that matters to you, add a one-bit `sel` output to the top. The
  select already exists as `u_cmp.sel`.

## Interface of `kmeans_top`

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `centroid1` | in  | W | centroid of cluster 1 |
| `centroid2` | in  | W | centroid of cluster 2 |
| `data`      | in  | W | sample to classify |
| `cluster1`  | out | W | `data` if it is nearest to centroid 1 (or tied), else 0 |
| `cluster2`  | out | W | `data` if it is strictly nearest to centroid 2, else 0 |

Parameter `W` (default 8) sets the width of all five ports. K is fixed at 2.

**Timing.** The outputs follow the inputs through one combinational path:
subtract, compare, compare, mux. The longest path runs from a centroid to a
cluster output. The reference implementation targets a 50 MHz (20 ns)
system clock, and a post-route delay of about 5 ns fits easily in that
period. The testbenches sample the outputs 1 ns after each input change. To
use the block in a clocked system, register its inputs or outputs (or both)
outside it.

**Size.** Synthesis of the top gives about 18 word-level cells and no
flip-flops: five 8-bit adders/subtractors or comparators, four 8-bit
multiplexers and a few gates.

## Using it in a full K-Means loop

One full pass over N samples needs N evaluations of the block. After each
pass, the driver does the following:

1. It adds up the samples that came out on `cluster1` and on `cluster2`, and
   counts each group. Remember that a zero sample cannot be seen on the
   outputs. Keep track of which sample was applied, or use `sel`.
2. It sets each centroid to the mean of its group, keeping the old centroid
   if the group is empty.
3. It repeats until no sample changes cluster.

`tb/tb_kmeans_top.sv` does exactly this in SystemVerilog, and can serve as a
reference for writing a controller.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and contains a watchdog.

| testbench        | coverage |
|------------------|----------|
| `tb_abs_dist`    | all 65,536 operand pairs against integer `|a-b|` |
| `tb_nearest_cmp` | all 65,536 distance pairs: `sel`, `tie`, and the number of ties seen |
| `tb_cluster_mux` | every sample value with both selects, toggling between them to expose held values |
| `tb_kmeans_top`  | see below |

`tb_kmeans_top` runs at the default parameters, in two parts:

* It first checks all 2^24 combinations of `centroid1`, `centroid2` and
  `data` against an independent reference model. It counts how often
  cluster 1 won, how often cluster 2 won and how often there was a tie, and
  fails if any of the three never happened.
* It then runs eight complete K-Means clusterings. Each uses 64 samples drawn
  from two separated groups (20–80 and 170–230), with the first two samples
  as the initial centroids. The block does the assignment and the testbench
  updates the means. Each run must converge within 32 passes and must
  separate the two groups.

The whole run takes a few seconds. With Verilator 5:

```
verilator --binary --timing --assert -y rtl +libext+.sv \
    rtl/kmeans_pkg.sv tb/tb_kmeans_top.sv --top-module tb_kmeans_top -o sim
./obj_dir/sim
```

Swap in another testbench name to run the unit tests. `rtl/kmeans_pkg.sv`
must be compiled first, because the modules import it.

## What follows the reference design and what does not

These points follow the reference design:

* K = 2 and 8-bit centroids, sample and cluster outputs.
* A purely combinational datapath with no asynchronous controls, built from
  comparators (greater-than and equality) and 2-to-1 multiplexers.
* Zero on the cluster output that does not receive the sample.
* The port set: five 8-bit ports, 40 pins.

These points are this design's own choices:

* Samples are unsigned.
* A tie goes to cluster 1.
* The distance is built as compare-then-subtract.
* The split into `abs_dist`, `nearest_cmp` and `cluster_mux`.

Not provided:

* The centroid update and convergence control. In the reference design they
  lie outside the hardware block.
* Multi-dimensional samples.
* K > 2.
* A valid or select output.
