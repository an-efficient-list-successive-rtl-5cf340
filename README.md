# Polar-code list SC decoder with shared first stages

A list successive-cancellation (SCL) decoder keeps L candidate decodings
("paths") alive while it decides the bits of a polar codeword one after
another. The usual way to build it is to put L complete SC decoders side by
side, each a binary tree of log2 N stages with N-1 merged processing elements
(MPEs). That costs L(N-1) MPEs.

This design uses a different idea, published as the merged-PE-sharing (MPES)
architecture in "An Efficient List Successive Cancellation Decoder for Polar
Codes" (Piao, Kim, Chung). Stages 1 and 2 hold three quarters of the MPEs of an SC
decoder but are the least busy. They can be shared by all paths:

* Stage 1 sees only channel values. These are the same for every path, so one
  copy of stage 1 serves the whole list.
* Stage 2 sees stage 1's outputs. During the first half of the codeword these
  are the F outputs, again the same for every path. During the second half
  they are G outputs. These depend on the path, but only through two partial-sum
  bits per stage 2 MPE. Those two bits have four possible values. Four extra
  copies of stage 2 compute all four cases ahead of time. Each path then picks
  its case with a multiplexer.

So the decoder has one stage 1 (N/2 MPEs), five stage 2 blocks (5 x N/4 MPEs)
and L private copies of stages 3 .. log2 N. In total that is
N/2 + 5N/4 + L(N/4 - 1) MPEs.

| N    | L  | MPEs, L full SC decoders | MPEs, this design | saving |
|------|----|-------------------------:|------------------:|-------:|
| 32   | 4  | 124    | 84    | 32 %  |
| 32   | 8  | 248    | 112   | 55 %  |
| 1024 | 8  | 8,184  | 3,832 | 53 %  |
| 1024 | 32 | 32,736 | 9,952 | 70 %  |
| 2048 | 2  | 4,094  | 4,606 | -13 % |

For large N the saving tends to (3L - 7) / (4L). Sharing pays off from L = 4
up; at L = 2 the five stage 2 blocks cost more than they save.

The default build is N = 32, L = 8, with 6-bit channel values.

## Soft values: log-likelihood pairs

Every soft value is a pair of signed numbers (LL(0), LL(1)): the log-likelihood
of the bit being 0 and of it being 1. Larger means more likely. Using pairs
instead of a single LLR makes the two polar kernels simple:

```
F (check node) : f0 = max(a0+b0, a1+b1)      f1 = max(a0+b1, a1+b0)
G, partial sum 0: g0 = (a0+b0, a1+b1)
G, partial sum 1: g1 = (a1+b0, a0+b1)
```

These are the likelihood-ratio kernels F(a,b) = (ab+1)/(a+b) and
G(a,b,u) = a^(1-2u) b in the log domain. F uses the max-log approximation.
The four sums are shared by F and both G results. F then needs two
compare-and-select units. One `mpe` produces F, G0 and G1 at once. This is
what makes the latency-reduced schedule below possible. The next stage later
picks one of the three with its select signal m and the partial sum u_s.

A bonus of the pair form: at a leaf, the LL pair is already the max-log
joint log-likelihood of the whole path. The path metric is therefore read
straight off the last stage. No metric is accumulated, and the metrics of
different paths compare directly.

All internal values are W = Q + log2 N bits (11 by default). A value after s
stages is a sum of 2^s channel values, so this width never overflows. No
saturation or normalisation is needed.

## The tree and its schedule

The polar transform is taken in natural order, x = u F^(kron n) with
F = [1 0; 1 1]. A node of 2m values passes
(value k, value k+m) to MPE k. Stage s has N/2^s MPEs and works on the node at
tree depth s-1.

Decoding is depth first, one stage per clock cycle (`scl_controller`). Bits
are decided two at a time: the last stage's single MPE gives F for
u_2t and G0/G1 for u_2t+1. Before pair t, every stage whose input node has
changed is run again, lowest first:

* pair 0: stages 1, 2, ..., log2 N;
* pair t > 0: stages log2 N - tz(t) .. log2 N, where tz is the number of
  trailing zero bits of t.

Stage s runs 2^(s-1) times, and one codeword takes N - 1 cycles. For N = 8
the order is 1, 2, 3 | 3 | 2, 3 | 3. The select signal of depth d is
m_d = bit (log2 N - 1 - d) of t. It is 0 while the path is in the left
(F) half of that node and 1 in the right (G) half.

## Shared stages and the per-path view

`stage1_block` runs once per codeword, in the cycle `start` is high. It
stores F, G0 and G1 of its N/2 MPEs.

`stage2_block` has five blocks of N/4 MPEs, each with F/G0/G1 registers:

| block | written at | MPE j inputs |
|-------|------------|--------------|
| stage2_F   | first stage 2 run (pair 0)     | F[j], F[j+N/4] of stage 1 |
| stage2_Gab | second stage 2 run (pair N/4)  | G_a[j], G_b[j+N/4] of stage 1, for a, b in {0,1} |

`stage2_sel` is each path's view of these memories. It works out the path's
depth-2 node, the input of its private stage 3. For stage 2 MPE j it takes:

```
block = m1 ? stage2_G{ps1[j], ps1[j+N/4]} : stage2_F
value = m2 ? (ps2[j] ? G1 : G0) of block   : F of block
```

Here ps1 and ps2 are the path's own partial sums at depths 1 and 2. Nothing is
computed per path in stages 1 and 2, and the stage 2 results are never copied
between paths. Only these multiplexers are per path.

## Per-path state

Each path `p` owns three blocks:

* `sc_lane`: the ordinary stages 3 .. log2 N. Stages 3 .. log2(N)-1 keep
  F/G0/G1 registers. The last stage is combinational and feeds the sorter
  directly. The input multiplexer of stage s > 3 reads stage s-1's registers
  with m_(s-1) and the path's partial sums at depth s-1.
* `feedback_part`: for each depth d from 1 to log2(N)-1, the partial-sum vector
  of the last completed left node at that depth (N/2^d bits). It also keeps the
  decided bits. A decided pair forms the sums (u_2t xor u_2t+1, u_2t+1) and
  walks up the tree. At a left child it is stored. At a right child it merges
  with the stored left sibling as (left xor right, right) and moves up one
  depth.
* path valid flag.

Path copying happens in the sort cycle. Output slot r gets the candidate of
rank r. If that candidate descends from path p, slot r loads lane p's
registers and updates its feedback state from path p's state. Registers,
partial sums and decided bits all change on one clock edge. Slots that receive
no candidate become invalid.

## Metric and sorting

In the last-stage cycle each valid path offers its four extensions
(u_2t, u_2t+1). Candidate number 4p + 2u_2t + u_2t+1 has metric
G_(u_2t)[u_2t+1] from the path's last stage. A candidate that puts a 1 on a
frozen position is invalid. `metric_sort` ranks all 4L candidates in
parallel. A candidate's rank is the number of valid candidates with a larger
metric, or with an equal metric and a lower number. The candidate of rank r
goes to slot r. Slot 0 therefore always holds the most likely path, and it is
the decoder's output. Decoding starts with only slot 0 valid.

## Interface and timing (`scl_decoder`)

| port | dir | width | |
|------|-----|-------|--|
| clk, rst_n | in | 1 | clock, asynchronous active-low reset |
| start  | in  | 1 | one-cycle pulse; `y` and `frozen` are sampled and stage 1 runs in this cycle |
| y      | in  | N x 2 x Q | channel LL pairs, element 0 = LL(bit 0), signed |
| frozen | in  | N | 1 = frozen position (always decoded as 0) |
| busy   | out | 1 | high for the N-2 cycles after `start` |
| done   | out | 1 | one-cycle pulse after the last pair |
| u_hat  | out | N | decided u vector of the best path, bit i = u_(i+1); valid from `done` until the next `start` |
| metric | out | W | log-likelihood of that path |

From the cycle with `start` to the cycle before `done` there are N-1 clock
cycles (31 at the default size). A new `start` may follow `done` immediately.
A `start` while `busy` is ignored. The frozen set is an input, so any code
construction can be used. The testbenches use a Bhattacharyya-parameter
construction.

For a BPSK channel with LLR lambda, one valid pair is LL(0) = min(0, lambda),
LL(1) = min(0, -lambda). Only the difference within a pair, and the sum over
paths, matter.

## Where this implementation departs from the published architecture

* **Latency and the synchronization memories.** The published decoder has a
  latency of N + 4L - 6 cycles. It places extra memory (3, 2 and 1 register
  sets for lists 1 to 3 of an L = 4 example) between the shared stage 2 and
  the lists' stage 3, so the lists are staggered in time. How these memories
  are filled and read is not specified. Here all paths run in lockstep on the
  conventional N-1 cycle schedule, and none of that memory exists. The MPE
  count is unchanged.
* **Bit order.** The published figures use the bit-reversed form, where stage
  1 pairs adjacent channel values. This design uses the natural order. The two
  differ by a fixed permutation of the channel inputs.
* **Feedback part.** The published feedback part is a network of XOR gates,
  D flip-flops and demultiplexers drawn for N = 8. Here it is the generic
  walk-up-the-tree register set described above. It produces the same partial
  sums.
* **Own choices.** The published text gives none of the following, so they
  are this design's choices: word lengths, the path metric, the sorter
  structure, path copying, reset, and the start/busy/done handshake.
* Stage 2's G blocks are written at stage 2's second run, as in the published
  algorithm. They depend only on stage 1, so they could be written together
  with stage2_F. That would not shorten the schedule.

## Files

`rtl/`

| file | |
|------|--|
| polar_pkg.sv      | default sizes, controller phase type, index helpers (`bl_off`, `stg_off`) |
| mpe.sv            | one LL-pair MPE (F, G0, G1, selected output) |
| mpe_bank.sv       | K MPEs with their F/G0/G1 registers and a parallel load for path copies |
| stage1_block.sv   | shared stage 1 |
| stage2_block.sv   | the five shared stage 2 blocks |
| stage2_sel.sv     | per-path selection of stage 3 input from stage 2 |
| sc_lane.sv        | per-path stages 3 .. log2 N |
| feedback_part.sv  | per-path partial sums and decided bits |
| metric_sort.sv    | keep-best-L rank sorter |
| scl_controller.sv | stage schedule |
| scl_decoder.sv    | top level |

Parameters of `scl_decoder`: `N` (code length, power of two, at least 8),
`L` (list size, at least 2), `Q` (channel LL width) and `W` (internal width,
default Q + log2 N). With N = 8 the last stage is stage 3, and the lanes have
no registers.

The default size synthesizes to about 13,500 word-level cells and 7,200
flip-flops, before technology mapping. Most of the flip-flops are the shared
stage 1 and stage 2 memories and the per-path registers of stages 3 and 4. The
rank sorter (4L - 1 comparisons per candidate, 4L candidates) is the largest
combinational block and grows as L^2.

## Simulation

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<n>`. For example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/polar_pkg.sv tb/scl_ref_pkg.sv tb/tb_scl_decoder.sv \
    --top-module tb_scl_decoder -o sim
./obj_dir/sim
```

For the other testbenches, replace the testbench file and top-module name.

* `tb_scl_decoder`: the full default size (N = 32, L = 8), 80 codewords. Each
  result is compared with `scl_ref_pkg`, a recursive software list decoder that
  recomputes every leaf from the channel values. It checks every decided bit,
  the metric and the N-1 cycle latency. Noiseless words must also decode to the
  word sent. The harness (`scl_harness`) counts that each mechanism occurred:
  stage2_F and each of the four stage2_G blocks being selected, pruning, a full
  list, a path splitting into two survivors, a path dying out, and all three
  frozen-pair kinds.
* `tb_scl_configs`: the same checks at N = 8 (L = 4 and L = 2), N = 16 (L = 2),
  N = 32 (L = 4) and N = 64 (L = 4), 40 codewords each.
* `tb_scl_table3`: the same checks at N = 512 (L = 2) and N = 1024 (L = 4),
  4 codewords each. Compiling it takes a few minutes.
* One testbench per block (`tb_mpe`, `tb_stage1_block`, `tb_stage2_block`,
  `tb_stage2_sel`, `tb_sc_lane`, `tb_feedback_part`, `tb_metric_sort`,
  `tb_scl_controller`). Each compares the block with integer models. The
  controller testbench checks the exact stage order and that stage s runs
  2^(s-1) times.

Error-rate curves were not simulated. The decoder matches the software
reference bit for bit, so its error-correcting performance is that of a
max-log SCL decoder with the same list size.
