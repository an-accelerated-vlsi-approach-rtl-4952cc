# A parallel, pipelined k-means clustering engine

K-means groups a set of points into *k* clusters. It repeats two steps:
assign every point to its nearest centre, then move every centre to the mean
of the points assigned to it. It stops when no centre moves any more, or after
a fixed number of passes. Run in software, each pass is a loop over points and
clusters. This engine does one point per clock cycle instead:

- the distances from a point to **all** centres are computed in parallel in one cycle;
- the nearest centre is picked in the same cycle that those distances are registered;
- the point is added into that cluster's running sum while the next points are already in flight;
- at the end of a pass, **all** new centres are computed by parallel dividers in a single cycle.

A pass over *N* points therefore takes *N* + 2 cycles. That is 189 cycles for
the design's reference data set, a gene-expression matrix of 187 points with
7 features each (log-ratios of mRNA levels of yeast genes at seven time
points), clustered into 6 groups. At the 18 passes that data set needs, a run
is 18 × 189 = 3402 cycles, plus one final divide cycle. At the roughly 45 MHz
that a comparable implementation reaches on a Virtex-7 FPGA, that is about
75 µs. No timing closure was done for this
RTL.

The RTL is written in SystemVerilog and is synthesizable. Every size is a
parameter. The defaults are 7 features, 6 clusters, 16-bit data and 256 points.

## Number format

Every feature is a 16-bit two's-complement fixed-point number in **Q6.10**
format: 6 integer bits including the sign, and 10 fractional bits. A value *v*
is stored as the integer nearest to v × 1024 (the host does the conversion). This covers the -6.4 … +4.2 range of the
reference data and resolves 0.001. The binary point matters only at the edges
of the design. Distances, sums and means are computed as plain integers on
these words, because the mean of Q6.10 words is again a Q6.10 word.

Widths that follow from this (`kmeans_pkg`):

| quantity | width | why |
|---|---|---|
| feature / centre | 16 (`DATA_W`) | Q6.10 |
| Manhattan distance | 19 (`DIST_W`) | 7 magnitudes of at most 2^16-1 |
| accumulated sum | 24 (`ACC_W`) | up to 256 words of 16 bits |
| point count | 9 (`CNT_W`) | 0 … 256 |
| cluster index | 3 | 1-based, `001` … `110` |

## The datapath

```
 wr_point ─► feature buffers (7 × 256×16) ──point_q──┬─► distance unit 1 ─┐
            rewind / replay each pass                 │   …                ├─► min distance finder ─ idx
                                                      ├─► distance unit 6 ─┘        │
                                                      └─► point_d (align) ──► accumulator bank (demux by idx) ─ A1..A6
                                                               count_en ────► counter bank (demux by idx) ───── C1..C6
                       A_c, C_c ─► divider c ─► centre register c (nwcntr_reg) ─► back to distance unit c
```

**Feature buffers** (`kmeans_fifo`). There are seven buffers, one per feature
column. Each is a 256 × 16 dual-port memory with a write pointer and a read
pointer. All seven are written together, one point per cycle. A word written
in cycle *t* can be read in cycle *t*+1. So the first pass starts clustering
while the data set is still being loaded, rather than after a complete
block-RAM load. Reading does not consume data: after the last point of a pass,
`rewind` sends the read pointer back to word 0, and the next pass replays the
same words. `clear` empties the buffers for a new data set.

**Distance units** (`kmeans_dist`, one per cluster). Each unit computes the
Manhattan distance Σ|p_f − c_f| between the point and one centre, then
registers it. The Manhattan distance is the Minkowski distance with r = 1. It
needs only subtractors, absolute values and adders, with no multipliers.

**Minimum distance finder** (`kmeans_min_finder`). This is combinational. It
returns the 1-based index of the nearest centre and the distance to it. On a
tie, the lower cluster number wins.

**Accumulator and counter banks** (`kmeans_accumulator`, `kmeans_counter`).
The index drives two demultiplexers. Only the selected cluster's register adds
the point (seven per-feature sums), and only its counter increments.

**Dividers** (`kmeans_divider`, one per cluster). Once a pass is complete, each
divider divides its cluster's seven sums by the cluster's count,
combinationally, and loads the result into its **centre register**
`nwcntr_reg`. That register feeds the cluster's distance unit directly, so the
new centre is in use from the next pass onwards. The register also takes the
initial centre when a run starts. The divider has two control inputs:

- `div_en` enables it for the length of a run;
- `flag` marks the cycle in which the sums are final.

The register loads only when both are high.

## Timing of a pass — the part to read carefully

One point moves through three stages. The controller tracks it with two valid
bits, `v_rd` and `v_dist`:

| cycle | stage |
|---|---|
| *t* | `rd_en` — the point is read from the buffers |
| *t*+1 | `v_rd` — the point is on the buffer outputs; the 6 distances are computed; the point is copied into `point_d` |
| *t*+2 | `v_dist` — distances registered; the comparator gives `idx`; the accumulator and counter of `idx` update at the end of the cycle |

For a pass whose first read is in cycle S, with N points:

```
S … S+N-1      reads (one per cycle)
S+N+1          last accumulation (end of cycle)
S+N+2          divide cycle: div_flag=1, all centres updated at its end,
               accumulators and counters cleared at its end,
               and — if the run continues — the first read of the next pass
```

So passes follow each other with no gap: a new pass starts every N + 2 cycles.
Only the divide cycle of the last pass is not overlapped, so a run of T passes
ends T × (N + 2) + 1 cycles after its first read. The
first read of the next pass is issued in the divide cycle. Its data reaches
the distance units one cycle later, when the new centres are already in their
registers. This is why the centre update and the next read can overlap.

**Stalls.** During the first pass the buffers may still be filling. A read
waits while the buffers are empty, and `stall` is high during the wait. The
valid bits carry the resulting bubbles down the pipeline. The divide cycle is
the first cycle in which all points have been read and both valid bits are
clear. Stalls therefore only lengthen the first pass.

## Controller and the run loop

`kmeans_ctrl` is the engine's single FSM, with states `IDLE`, `RUN` and `DONE`.

When `start` is pulsed, it does four things in one cycle:

- loads `init_centers` into the centre registers;
- rewinds the buffers;
- clears the sums;
- latches `n_points` and `max_iter`.

In every divide cycle, each divider reports whether its centre would change
(`moved`). The run ends if none moved (`converged` = 1), or if `max_iter`
passes have been done (`converged` = 0). `iterations` counts the passes
completed, including the final pass that found nothing to move.

After `done`, the outputs hold these values:

- `centers` holds the final centres.
- `acc` and `counts` hold the sums and cluster sizes of the last pass.

A new `start` runs again on the same data, for example with other initial
centres.

## Using the top level (`kmeans_top`)

1. Pulse `clear_data`.
2. Write the points: `wr_en` with `wr_point` (all 7 features), one point per cycle.
3. Pulse `start` with `n_points`, `max_iter` and `init_centers` valid. `start`
   may come before all the points are written: the first pass follows the
   writes.
4. Wait for `done`.

While a run is in progress, the cluster assignment streams out. Each cycle
with `assign_valid` high carries one point's cluster (`assign_idx`, 1-based)
and its distance (`assign_dist`). The points come in buffer order. `div_flag`
marks the divide cycles.

Preconditions:

- `n_points` must be between 1 and the number of points written.
- Write at most `DEPTH` points (`full` is raised at `DEPTH`).
- Do not write during a pass after the first.

## What follows the reference architecture, and what is this design's own

These parts follow the reference architecture:

- seven feature buffers of 256 × 16 words, readable one cycle after the write;
- one distance unit per cluster, using the Manhattan distance, with latency 1;
- a comparator that gives the index in the same cycle;
- demultiplexed accumulators and counters, with index codes `001` … `110`;
- one single-cycle divider per cluster, with `div_en` and `flag` inputs;
- one FSM;
- Q6.10 data;
- 6 clusters;
- 189 cycles per pass for 187 points.

These are this design's own choices:

- **Replaying the data.** The buffers replay (rewind) instead of popping, so
  that every pass can reuse the data.
- **`clear` and the status flags.** The `clear` input and the full/empty flags
  are additions.
- **`div_en` and `flag`.** Only the names of these divider inputs are known.
  Their meaning here (run enable, and "sums are final") is an interpretation.
- **Division and empty clusters.** Division truncates toward zero. A cluster
  that receives no point keeps its centre.
- **Ties.** On a tie, the lowest cluster index wins.
- **Widths and control.** Accumulator, distance and counter widths, reset
  behaviour (asynchronous, active low), the `moved`-based convergence test,
  the `max_iter` input and the stall behaviour are all this design's own.
- **Alignment register.** The register `point_d` keeps the point aligned with
  its distances.

How this RTL compares with a reference FPGA build of the same architecture:

- **Mapping and clock speed.** The reference build reports many latches and
  about 45 MHz. This RTL has no latches, and its clock speed was not
  measured.
- **Critical path.** It is the 24-by-9-bit combinational divider feeding the
  centre register. Pipelining it would add a cycle to every pass.
- **Host side.** Preprocessing of the expression data (filtering, conversion
  to fixed point) and a host that loads the buffers are outside the RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
module's outputs with values computed independently in the testbench:

- the buffer against a queue model;
- distances against integer arithmetic;
- the sums, counts and quotients against reference arrays;
- the controller against a buffer model, checking reads per pass, N + 2
  cycles per pass, stalls, and both ways a run can end.

`tb_kmeans_top` runs the whole engine at its default sizes on a synthetic
187 × 7 data set: six noisy groups inside the reference value range. It
compares the engine with a software k-means model written in the testbench.
It checks:

- the final centres, the iteration count and the convergence flag;
- the cluster sizes;
- every point's assignment and distance in the last pass;
- 189 cycles for every pass;
- the total run length.

It makes each mechanism happen at least once:

- reads overlapping the load;
- stalls;
- accumulation into all six clusters;
- back-to-back passes;
- a run ended by convergence, and a run ended by the iteration limit;
- an empty cluster that keeps its centre.

`tb_kmeans_workload` reproduces the reference workload's operating point. It
uses a synthetic 187 × 7 data set in the same value range, drawn so that the
model needs exactly 18 passes. It checks that the engine runs those 18 passes
at 189 cycles each (3403 cycles to `done`) and ends with the model's centres,
sizes and assignments.

The real expression data set is not included, so the engine is not run on it.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal rtl/kmeans_pkg.sv tb/tb_kmeans_top.sv \
          -y rtl -y tb --top-module tb_kmeans_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_kmeans_top` with any other testbench in `tb/` to test a single
block. Each testbench prints `TB_RESULT checks=<n> failures=<n>` and finishes.
The full-size top-level test runs in well under a second.

## Files

| file | content |
|---|---|
| `rtl/kmeans_pkg.sv` | sizes and derived widths |
| `rtl/kmeans_fifo.sv` | feature buffer with replay |
| `rtl/kmeans_dist.sv` | Manhattan distance unit |
| `rtl/kmeans_min_finder.sv` | nearest-centre comparator |
| `rtl/kmeans_accumulator.sv` | demux + per-cluster sums |
| `rtl/kmeans_counter.sv` | demux + per-cluster counts |
| `rtl/kmeans_divider.sv` | single-cycle divider + centre register |
| `rtl/kmeans_ctrl.sv` | run/pass FSM |
| `rtl/kmeans_top.sv` | the engine |
| `tb/tb_kmeans_<module>.sv` | one self-checking testbench per module |
| `tb/tb_kmeans_workload.sv` | 18-pass, 187-point run with cycle count |
