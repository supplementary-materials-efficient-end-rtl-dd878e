# Anchor-chaining accelerator for long-read mapping

Long-read mappers such as minimap2 find short exact seed matches ("anchors")
between a read and the reference and then *chain* them: for every anchor i,
sorted by reference position, they look back at up to H earlier anchors,
score how well each one could precede i on a colinear chain, and keep the
best score f[i] and the best predecessor p[i]. This dynamic program is a large
share of mapping time, and its inner loop is regular enough to unroll in
hardware.

This RTL implements such a chaining engine. Its main idea is to decouple the
look-back depth H from the amount of scoring hardware: the H earlier anchors
are split into **M sub-parts of P anchors** (H = M·P), and one anchor is
processed as a sequence of sub-parts, P scores in parallel per sub-part. The
host tells the engine how many sub-parts each anchor actually needs, so an
anchor with few usable predecessors costs one sub-part and a dense region
costs up to M. The engine issues one sub-part every 3 clock cycles.

Several identical engines ("kernels") sit side by side; the host hands each
whole chaining task to one of them.

## Block structure

```
              chain_accel_top  (N kernels, independent)
                    |
              chain_kernel  ---- control FSM: SEL -> CALC -> UPD
               |        |
   history_shift_reg  history_shift_reg      (A[]: anchors, F[]: scores,
               |        |                     M*P+1 entries each)
        subpart_mux  subpart_mux             (pick the P entries of one sub-part)
               |        |
        P x chain_score_unit                 (pair scores, in parallel)
                    |
              subpart_max                    (best score / predecessor)
```

| File | Role |
|---|---|
| `rtl/chain_pkg.sv` | anchor, score, configuration and result types |
| `rtl/chain_score_unit.sv` | score of anchor i against one earlier anchor |
| `rtl/history_shift_reg.sv` | shift-register FIFO of the last M·P anchors or scores |
| `rtl/subpart_mux.sv` | selects the P entries of a sub-part |
| `rtl/subpart_max.sv` | reduces P scores to (max_f, max_j) |
| `rtl/chain_kernel.sv` | one chaining kernel with its control |
| `rtl/chain_accel_top.sv` | N kernels |

## The history FIFOs and sub-parts

Each kernel keeps two shift registers of M·P+1 entries. In the anchor FIFO,
entry 0 is the anchor i being processed and entry k is anchor i−k. In the
score FIFO, entry 0 is the best score found so far for anchor i and entry k is
f[i−k]. Sub-part s (0-based) covers entries s·P+1 … s·P+P, so lane j−1
(j = 1..P) of sub-part s compares anchor i with anchor i − s·P − j.

When the last sub-part of an anchor is done, both FIFOs shift by one: the
finished anchor and its final score become entry 1, and the oldest entry
falls off. Score entry 0 then restarts at 0. The update of F[0], the shift
and the clear all happen in the same clock edge; `history_shift_reg` has a
separate `d1` input for the value that enters entry 1 so that the *updated*
F[0] is the one that is pushed.

At task start both FIFOs are cleared to zero. Each anchor entry carries a
`valid` bit so the zero fill can never be scored as a real anchor at
position 0.

## One sub-part, step by step

Per sub-part the kernel runs three states, one cycle each unless stalled:

1. **SEL**: if this is the anchor's first sub-part, take `{anchor,
   num_subparts}` from the input stream into entry 0 (waits here while
   `in_valid` is low). Register the P anchors and P scores the sub-part
   selects.
2. **CALC**: P `chain_score_unit`s compute in parallel; results are
   registered.
3. **UPD**: `subpart_max` reduces the P scores. Starting from
   max_f = q_span and max_j = −1, lanes are visited from the farthest
   (j = P) to the nearest (j = 1). A score is taken when it is ≥ max_f and
   not equal to q_span, giving the index i − j − s·P. So the winner is the
   largest score above q_span and, on ties, the nearest anchor. If max_f
   beats F[0], F[0] takes it and `{i, max_f, max_j}` is written out. This
   write waits while `out_ready` is low. Because the comparison with F[0] is
   strict, a tie in a later (farther) sub-part does not replace an earlier
   result.

An anchor can therefore be written out more than once: once for its first
sub-part, and again each time a later sub-part finds a better predecessor.
The last write for an index is the final f[i], p[i]. This is the memory
write pattern of the loop as specified, and it is kept as is.

The control loop counts sub-parts (`g`), the sub-part within the anchor
and the anchor index `i`. The task ends after `total_subparts` sub-parts.

### Timing

* Throughput: one sub-part every 3 cycles (initiation interval 3). The loop
  cannot be overlapped further because the first sub-part of anchor i+1
  reads F[i], which is final only after anchor i's last UPD.
* A task of S sub-parts keeps `busy` high for exactly 3·S cycles, plus one
  cycle per stall: a SEL cycle with no anchor offered, or an UPD cycle with a
  result not accepted.
* `start` is sampled while idle. `done` rises in the cycle after the final
  UPD and stays high until the next `start`. A task with
  `total_subparts == 0` finishes at once.

## The pair score

`chain_score_unit` uses minimap2's single-segment chaining score. Let ai be
anchor i and aj the earlier anchor. Define:

* dr = ai.x − aj.x (64-bit)
* dq = ai.y[31:0] − aj.y[31:0] (32-bit)
* dd = |dr − dq|

The pair is **rejected** (score = INT32_MIN) when any of these holds:

* aj is not a loaded anchor
* dr = 0
* dq ≤ 0
* dq > max_dist_y
* dq > max_dist_x
* dd > bw

Otherwise:

```
score = min(min(dq, dr), q_span) - floor(dd * avg_qspan_scaled) - (floor(log2 dd) >> 1) + F[j]
```

`avg_qspan_scaled` is 0.01 × the average seed length, in unsigned Q16.16
fixed point. The product is truncated, as the software's float-to-int cast
does for positive values. This formula is the standard minimap2 one; the RTL
does not get it from a hardware description.

Anchors use minimap2's 128-bit layout:

* `x = {strand, reference id, reference position}`
* `y = {flags, seed length in bits 39:32, query position in bits 31:0}`

A different reference id or strand makes dr huge, so the pair fails the band
test.

## Interfaces

`chain_kernel` (arrays of N of the same ports in `chain_accel_top`):

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start` | in | 1 | begin a task; clears FIFOs and counters |
| `total_subparts` | in | 32 | sub-parts in the task (Σ num_subparts) |
| `cfg` | in | `chain_cfg_t` | q_span, avg_qspan_scaled, max_dist_x, max_dist_y, bw |
| `busy`, `done` | out | 1 | status |
| `in_valid`/`in_ready` | in/out | 1 | anchor stream handshake |
| `in_anchor`, `in_nsub` | in | 128, 32 | a[i] and num_subparts[i] (1..M) |
| `out_valid`/`out_ready` | out/in | 1 | result stream handshake |
| `out_result` | out | `chain_result_t` | {i, f[i], p[i]} |

The streams stand in for the device-memory reads of a[] and
num_subparts[] and the writes of f[] and p[]. An assertion checks that
num_subparts is in 1..M. Another checks that a result held back by
`out_ready` stays stable.

### What the host must provide

For each anchor the host computes num_subparts. It takes the software
loop's start index st, the first j with a[i].x ≤ a[j].x + max_dist_x. Then
num_subparts = max(1, ⌈min(i − st, M·P) / P⌉). The testbenches do the same.
Within the last sub-part, lanes beyond st are still scored. They are only
excluded by the score's own distance tests, so results can differ slightly
from a pure software chain with the same H.

## Parameters

| Parameter | Default | Where |
|---|---|---|
| `P` (score units per sub-part) | 16 | kernel, top |
| `M` (sub-parts) | 16, so H = 256 | kernel, top |
| `N` (kernels) | 4 | top |
| `AVG_FRAC` (fraction bits of avg_qspan_scaled) | 16 | `chain_pkg` |

The approach fixes only three things: H must exceed the 64 of a
single-pass design, H = M·P, and II = 3. The values of M, P and N above are
this design's own choices. Each kernel holds (M·P+1)·(129+32) flip-flops
of history.

## Departures and own choices

* Streaming valid/ready ports instead of direct memory access. There is no
  memory controller.
* The FIFO `valid` flag keeps zero-filled history out of scoring.
* INT32_MIN marks a rejected pair.
* The fixed-point gap term replaces floating point.
* The three-state split of the 3-cycle interval, the reset and the
  start/done protocol.
* M = P = 16 and N = 4.
* Not in the RTL, because it is host software: predicting hardware and
  software time for each task and choosing where to run it; spreading tasks
  over the kernels with per-kernel queues and locks; and preparing anchors.
  Nothing schedules across kernels in hardware.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and has a watchdog.
`tb/chain_ref_pkg.sv` holds an independent integer model of the score and
a literal model of the sub-part loop. It also computes num_subparts as the
host does, and generates anchor sets that look like long-read seed hits:
colinear runs with jitter, indels, query back-steps, reference switches, and
bursts of repeat-copy anchors that push the best predecessor more than P
places back.

* `tb_chain_score_unit`: directed cases for each rejection rule plus 3000
  random pairs.
* `tb_history_shift_reg`, `tb_subpart_mux`, `tb_subpart_max`: random stimulus
  against array models. The max test checks ties and the q_span exclusion.
* `tb_chain_kernel` (M = P = 4): four tasks compared write by write with
  the model. With no stalls, busy time must be exactly 3 cycles per
  sub-part; with random input gaps and output back-pressure, it must be
  3 cycles per sub-part plus the stall cycles.
* `tb_chain_accel_top`: the full default configuration (N = 4, M = P = 16).
  All four kernels run concurrently, two rounds, with long-read-like limits
  (max gap 5000, band 500). The test requires each of these to happen at
  least once:
  * anchor-stream stall
  * result-stream stall
  * anchor needing more than one sub-part
  * anchor needing all M sub-parts
  * more anchors than history entries
  * better predecessor found in a later sub-part
  * rejected pairs
  * all kernels busy at once

Run a test with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/chain_pkg.sv tb/chain_ref_pkg.sv \
  rtl/chain_score_unit.sv rtl/history_shift_reg.sv rtl/subpart_mux.sv \
  rtl/subpart_max.sv rtl/chain_kernel.sv rtl/chain_accel_top.sv \
  tb/tb_chain_accel_top.sv --top-module tb_chain_accel_top
./obj_dir/Vtb_chain_accel_top
```

The full-size test runs in well under a second once built.

## Fit to the evaluated workloads

The engine's on-chip state does not depend on read or task length: a task
streams through with only M·P+1 history entries. Task length is limited by
the 32-bit counters to 2³²−1 sub-parts. The datasets used to evaluate this
approach are whole-genome mapping runs:

* 1,000,000 simulated ONT reads
* PacBio CCS reads of 15 kb mean and 20 kb maximum length
* real ONT and PacBio data, with and without base-level alignment

A chaining task from one such read is far below that counter limit. The
accuracy difference to software chaining is governed by H, and at H = 256
it has not been measured on those datasets.
