# A pipelined phylogenetic likelihood co-processor

Bayesian phylogeny programs such as MrBayes spend nearly all their time in
Felsenstein's pruning step. For every internal node of a candidate tree they
combine the conditional probability vectors of the node's two children into
the node's own vector. Then they rescale that vector against underflow, and at
the root they reduce it to one log-likelihood number. The loop over the
characters (alignment columns) has no branches and no dependences between
iterations. This RTL maps the whole per-node computation onto one deep,
fixed-latency floating-point pipeline that accepts one character per clock:

1. **Conditional probabilities** (single precision): for each nucleotide N,
   `L_N(k) = (Σ_S P_NS(i)·L_S(i)) · (Σ_S P_NS(j)·L_S(j))`, with i, j the
   children and P their 4×4 transition matrices.
2. **Scaling**: `m = max_N L_N(k)`, `L_N(k) /= m`, `scP = ln m`,
   `lnScaler(k) = lnScaler(i) + lnScaler(j) + scP`.
3. **Likelihood** (double precision):
   `lnL = Σ_c numSites(c) · (ln(Σ_N π_N L_N(k)(c)) + lnScaler(k)(c))`.
   This is formed for every node, and the host keeps it only for the root.

The host keeps the tree search, the tree topology and memory allocation. The
accelerator keeps every node's vectors in six banks of SRAM on the card.
Per node the host sends only three base addresses and a sequence length.

## Data flow and memory layout

```
 host PIO: left, right, cur, nchar ──► plf_controller ──► done, lnl
                                        │ LOAD: P(left), P(right) from bank 0,
                                        │       numSites(cur) from bank 1
 banks 0-2 (left child) ─┐              │ STREAM: one read per bank per character
 banks 3-5 (right child) ┴─► cp_unit ─► scale_lik ─┬─► FIFO  L_A..L_T (128 b)
   lnScaler(left)+lnScaler(right) ──────┘          ├─► FIFO  lnScaler
                                                   ├─► FIFO  scP
                                                   └─► lik_accum ─► lnl
                                        │ WRITE: FIFOs ─► cur+c in banks 0-5
```

Each SRAM port carries a 64-bit word, which is two floats. A node with base
address B stores character c as follows. These are word addresses, the same in
every bank.

| bank (group g = 0, 1) | word B+c | word B+MAXC+w |
|---|---|---|
| 3g+0 | {L_C, L_A} | bank 0 only: transition table, {P[2w+1], P[2w]}, P index = N·4+S |
| 3g+1 | {L_T, L_G} | bank 1 only: numSites, {ns[2w+1], ns[2w]} |
| 3g+2 | {scP, lnScaler} | — |

The left child is always read from group 0 and the right child from group 1.
Reading both together uses all six ports every cycle. For this reason every
result is written to **both** groups, so that a node can later serve as either
child. Writing can only begin once all input has been read. Until then the
results wait in three FIFOs, each `MAXC` = 8192 characters deep. This sets the
design's limit of 8192 characters per node. The host pre-loads the leaves in
the same layout, into both groups, and also supplies each node's transition
table and numSites. For commit/reject, the host passes the node's "pending"
copy as `cur` and swaps addresses on acceptance; the RTL does not need to know
about this.

## The logarithm unit (`cheb_log`)

The two logarithms per character are the most expensive operators. Both run
on one double-precision unit that uses no large tables:

* **Segment select.** The range 1e-32…1 is cut into 16 segments of two
  decades each. Four comparators in series do a binary search on the value.
  The first compares with 1e-16 (address bit A3). The second compares with
  1e-24 or 1e-8, chosen by A3 (bit A2). The third compares with one of 1e-28,
  1e-20, 1e-12 or 1e-4 (bit A1). The fourth compares with one of the eight odd
  decades (bit A0). The 4-bit address reads five coefficients from a
  16-entry ROM. Each bit is set when x ≥ threshold.
* **Powers.** In parallel, three multipliers form x², x³ = x²·x and x⁴ = x²·x².
* **Polynomial.** Four multipliers form cᵢ·xⁱ and an adder tree adds them:
  `((c4x⁴ + c3x³) + (c2x² + c1x)) + c0`.

The coefficients are written for raw powers of x. For the smallest segment c4
is about 3e121, which is far beyond single-precision range. That is why the
unit is double precision, with conversions around it when a single-precision
log is needed. `rtl/cheb_coef.hex` holds one line per segment: c4, c3, c2, c1,
c0 as IEEE doubles, c4 first. The values come from the first-kind Chebyshev
series of ln(x) on [a, 100a]: `a_n = (2/M) Σ_j ln(x_j) cos(n θ_j)` with
`θ_j = π(j+½)/M`, `x_j = a + (100a − a)(1 + cos θ_j)/2`, and M = 64 (a_0
halved). The series is truncated after T₄. It is then expanded in powers of
`t = (2x − 101a)/(99a)`, and t is replaced by x. Every segment has the same
error curve, up to 0.515 at its lower end. This coarse approximation is
inherent to the method, not an implementation fault. Values below 1e-32 fall
in segment 0 and are extrapolated.

## The accumulator (`lik_accum`)

A double adder needs 14 cycles, and one term arrives every cycle. Feeding the
sum back directly would therefore be a hazard. The accumulator uses one
14-stage adder as a circulating store instead:

* While input flows, each input is added to whatever leaves the adder that
  cycle. This keeps 14 independent partial sums in flight.
* After the last input, a one-word buffer catches a value leaving the adder.
  The next value to leave is added to the buffered one, and the buffer is
  cleared. This repeats until the pipeline is empty and the buffer holds the
  total.

A valid bit travels with every value. Reducing 14 partial sums takes at most
69 cycles after the last input, which is about five passes through the adder.
Because addition happens in a different order, the sum differs from a serial
sum in the last bits. The testbenches allow a relative error of 1e-12.

## Timing

All units are fully pipelined with fixed latencies, and there is no
back-pressure anywhere. Default latencies (package `plf_pkg`): single mul 8,
add 11, div 30, max 1; double mul 9, add 14; conversions 1.

| path | cycles |
|---|---|
| conditional probabilities (`cp_unit`) | 38 |
| normalised values, after `cp_unit` | 32 |
| scP and updated lnScaler, after `cp_unit` | 84 |
| log unit | 69 |
| likelihood term into the accumulator, after `cp_unit` | 162 |
| accumulator reduction after the last term | ≤ 69 |

A node of n characters takes `max(16, ⌈n/2⌉) + RL` cycles to load (RL = SRAM
read latency) and `n + RL` cycles to stream. Write-back takes n cycles and
overlaps the pipeline drain. The node then finishes when the log-likelihood
has been reduced.

## Capacity

Each bank has `AW` = 24 address bits, which is 16M words. A node region
spans `MAXC` words for the characters. In banks 0 and 1 it also needs room
for the transition table and for numSites, which is ⌈n/2⌉ words. The host
needs two copies of every node, one current and one pending. An alignment
of n characters over T taxa therefore needs about
`2 · (2T − 1) · (MAXC + ⌈n/2⌉)` words per bank for one chain.

| alignment | taxa | characters | fits |
|---|---|---|---|
| m993 | 63 | 963 | yes |
| m1319 | 37 | 1366 | yes |
| m346 | 64 | 1620 | yes |
| m1038 | 297 | 2021 | yes |
| m1485 | 63 | 3009 | yes |
| m4056 | 434 | 9563 | no: more than 8192 characters, and about 22.5M words |
| m3631 | 191 | 13568 | no: more than 8192 characters |

Longer alignments would need deeper output FIFOs, or a split of each node
into passes of at most `MAXC` characters. This design does neither.

## Departures and choices

* The conditional probability pipeline (38) and the normalisation pipeline
  (32) match latencies published for this architecture on a Virtex-2 Pro.
  The per-unit latencies were chosen to make them match.
* The log unit, and the paths through it, are longer than published: 69
  against 50 cycles, and 162 against about 125 for the likelihood path. The
  double multiplier latency is a guess, and the log's three adder levels use
  the 14-cycle double adder. The scP/lnScaler path is 84 cycles after the
  conditional probabilities, against a published 49, because it runs through
  the same log unit. The published figures for a whole node are 119 cycles
  (non-root) and 251 (root), against 38 + 84 = 122 and 38 + 162 = 200 plus
  the accumulator reduction here. Throughput is one character per clock in
  both.
* The floating-point units are this design's own. They round to nearest even
  and flush subnormals to zero. An infinite or NaN operand passes through,
  and overflow saturates to infinity.
* The two children's lnScaler values are summed in front of the scaling
  stage. This way a node's lnScaler covers all the scaling in its subtree.
* The 72-bit memory ports are used as 64 data bits. The bank-group layout and
  the double write-back are this design's choice.
* The log-likelihood is `Σ numSites·(log(...) + lnScaler)`, using the updated
  lnScaler.
* The host command is a valid/ready handshake that also carries the sequence
  length. Nodes are not overlapped: the next command is accepted after
  `done`.
* Not included: the host software, the DMA engine, and the SRAM devices. A
  behavioural bank model (`tb/sram_model.sv`) stands in for the SRAM.

## Files

`rtl/` contains one module per file:

* `plf_accel` (top)
* `plf_controller`
* `cp_unit`, `cp_row`
* `scale_lik`, `lik_accum`
* `cheb_log` with `cheb_coef.hex`
* `out_fifo`
* `fp_add`, `fp_mul`, `fp_div`, `fp_max`, `fp_s2d`, `fp_d2s`
* `pipe_delay`
* `plf_pkg`

`tb/` has a self-checking testbench for each block. Each prints
`TB_RESULT checks=N failures=M`. `tb/tb_fp_pkg.sv` holds the reference
arithmetic: IEEE double arithmetic of the simulator with explicit rounding to
single precision. `tb_plf_accel` runs three dependent nodes through the top at
its default parameters. It checks every word written back and every node's
log-likelihood against a model computed inside the testbench.

Simulate from the repository root, because the coefficient file is opened as
`rtl/cheb_coef.hex`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_plf_accel \
  rtl/plf_pkg.sv tb/tb_fp_pkg.sv tb/sram_model.sv tb/tb_plf_accel.sv rtl/*.sv -o sim
./obj_dir/sim
```

For a unit testbench, replace the top module and the testbench file, for
example `tb_cheb_log` with `tb/tb_cheb_log.sv`.
