# Clustered phase-locked clock synchronization with malicious-fault tolerance

A large multiprocessor needs its processor clocks kept in step even when some clocks are
*malicious*: a broken clock may show one waveform to some receivers and a different one to
others. The classic hardware answer is to phase-lock every clock to every other one, which
needs a fully connected clock network of N(N-1) links. This design keeps the phase-locked
algorithm but cuts the wiring:

* The clocks are grouped into **clusters**. Every clock listens to all clocks of its own
  cluster and to exactly **one clock of every other cluster**. With 8 clocks in 4 clusters of 2,
  each clock has 5 inputs (itself included) instead of 8; with 100 clocks in 10 clusters of 10,
  19 instead of 100.
* Every clock has its own **synchronization node**. Once per global clock cycle it time-stamps
  the first tick of each of its inputs, sorts them into the order in which they arrived (the
  *tick sequence*), picks one input as its reference according to where its own clock landed
  in that order, and pulls its oscillator towards that reference.

If a node with n inputs is to tolerate m faulty inputs it needs n > 3m. Nonfaulty clocks in
the same cluster then stay within some skew δ of each other, and any two nonfaulty clocks in
the whole network within 3δ, because between any two clusters there is a path of at most two
nonfaulty links (as long as no cluster has more than 2M-2 clocks, M being the number of
clusters).

All of it is written in synthesizable SystemVerilog except the oscillator loop (Block D),
which is analog in a real implementation and is given here as a discrete-time behavioural
model so that the whole network can be simulated.

## The network (`clock_network`)

Clusters of two sizes are supported: M1 clusters of P1 clocks, then M2 clusters of P2 clocks
(N = M1·P1 + M2·P2). Clusters and their members are numbered from 0. Clock j of cluster i
receives

* every clock of cluster i, and
* from every other cluster k, the member number `i mod p_k` of cluster k.

The `i mod p_k` choice spreads the outgoing links evenly, so every clock drives about the same
number of others; any choice that takes one clock from every other cluster would synchronize
as well. The default configuration is 4 clusters of 2 clocks, whose connection matrix is
(row = receiver, column = sender, clocks c_ij with 1-based i, j):

|      | c11 | c12 | c21 | c22 | c31 | c32 | c41 | c42 |
|------|-----|-----|-----|-----|-----|-----|-----|-----|
| c11, c12 | 1 | 1 | 1 | 0 | 1 | 0 | 1 | 0 |
| c21, c22 | 0 | 1 | 1 | 1 | 0 | 1 | 0 | 1 |
| c31, c32 | 1 | 0 | 1 | 0 | 1 | 1 | 1 | 0 |
| c41, c42 | 0 | 1 | 0 | 1 | 0 | 1 | 1 | 1 |

A clock of a P-sized cluster has n = M1 + M2 + P - 1 inputs, and the total link count,
self-links included, is

    J = N(M1 + M2 - 1) + M1·P1² + M2·P2²

Every node tolerates `F_SPEC` faulty inputs, so every n must exceed 3·F_SPEC; this is checked
at elaboration. The cluster sizes for a given N and fault tolerance are chosen off-line to
minimize J (for example N = 20, f = 3: 2 clusters of 3 and 7 of 2, J = 206; N = 64, f = 3:
8 clusters of 8, J = 960). The connection pattern is computed at elaboration by the constant
functions of `clksync_pkg`, so any such configuration is one parameter set.

For testing, every link can be overridden: while `inj_en[s]` is high, clock d receives
`inj_val[d][s]` instead of `c_out[s]`, so a test can make clock s lie differently to every
receiver. Tie `inj_en` low otherwise.

## One synchronization node (`sync_node`)

```
 c_other ─┐
          ├─► Block A ──counts──► Block B ──tick sequence──► Block C ──ref──► Block D ──► c_s
 c_s ─────┘   clock_input          tick_sorter               ref_selector       freq_adjust
   ▲                                                                                │
   └────────────────────────────────────────────────────────────────────────────────┘
```

Everything runs on the high-frequency clock `clk_hf`; one global clock cycle (gcc) is
`CNT_MOD` = T_gcc / T_hf periods of it (33 by default: a 1 MHz global clock and a 33 MHz
high-frequency clock).

**Block A, `clock_input`.** A k-bit counter (k = ceil(log2 CNT_MOD)) counts 0..CNT_MOD-1 and
wraps. Each input clock has a flip-flop that a high input sets and that stays set for the rest
of the gcc, so a faulty clock cannot produce a second tick in the same cycle. The edge that
sets the flip-flop loads the counter value into that input's k-bit register: register i is the
arrival time of clock i, and two clocks arriving in the same clk_hf period get the same value.
While the counter is 0 (`line_a`, "Line A") all flip-flops are cleared and all registers are
preset to all ones, the value of a clock that never ticks, which therefore sorts last.

**Block B, `tick_sorter`.** A combinational sorting network orders the n counts, each
carrying its clock ID, into ascending order. It is built recursively (`sort_core`): sort both
halves, compare element i of the upper half with element n/2-1-i of the lower half in a column
of comparison-and-exchange modules, then sort the n/2 minima and the n/2 maxima. The recursion
ends in a 4-input sorter (`sorter4`, five comparators) or a single comparison-and-exchange
module (`cmp_exchange`). That module compares by subtraction: the carry
`G[k-1] | P[k-1]G[k-2] | ... ` with `G = ~A & B`, `P = ~A | B` is 1 when B > A; XORed with an
`invert` input it steers a MIN and a MAX multiplexer. For n = 8 the longest path crosses 7
modules. A node whose n is not a power of two is padded with all-ones entries.

**Block C, `ref_selector`.** Described in the next section.

**Block D, `freq_adjust` (behavioural model).** A phase detector measures how many clk_hf
periods the own tick lags (positive) or leads (negative) the reference edge; a filter adjusts
an oscillator. The model's oscillator is a fixed-point phase accumulator with nominal period
CNT_MOD and a per-clock frequency error `DRIFT`; on each measurement the phase moves by half
the error and a leaky integrator (the low-pass filter) adjusts the frequency. The integral gain
is small, so the phase steps do most of the work and the integrator only trims a constant
offset. Like a real VCO the frequency word has a limited range, ±1/8 of nominal. The local
clock is a pulse of 2 clk_hf periods.

**Timing within a node.** Ticks of the current gcc are time-stamped as they come; Blocks B and
C settle combinationally; at the next Line A Block C registers its choice, which then steers
the reference for the whole following gcc. Each decision is therefore based on the arrival
order of the previous cycle, which is harmless because a clock's frequency changes little in
one period.

## Choosing the reference (`ref_selector`)

This is the heart of the phase-locked algorithm. Let the own clock be at position x (1-based)
of the tick sequence of n clocks, of which up to m may be faulty:

| own position x    | reference is the … clock of the sequence |
|-------------------|------------------------------------------|
| x ≥ n − m         | (m+1)-th                                  |
| x ≤ 2m            | (2m+1)-th                                 |
| otherwise         | 2m-th                                     |

A clock near the end follows one near the front, a clock near the front follows one further
back, and a clock in the middle follows one slightly ahead. The (m+1)-th clock is preceded by
at most m faulty ones, so at least one nonfaulty clock is at or before it; the (2m+1)-th clock
has at least m+1 nonfaulty clocks at or before it. With n > 3m the chosen position is never the
own one. For the default network (n = 5, m = 1): positions 1–2 follow position 3, position 3
follows position 2, positions 4–5 follow position 2. For n = 8, m = 2: 1–4 follow 5, 5 follows
4, 6–8 follow 3.

In hardware, each sequence position has an ID comparator against the node's own ID; three OR
gates group the comparators into the three ranges. At Line A three registers load the IDs found
at positions m+1, 2m and 2m+1, each with an enable bit from its range. Each register selects one
of the raw input clocks through a multiplexer, the enables gate them, and the three are ORed
into `ref_sig`. Because the reference is the selected input's actual waveform, Block D
compares edges directly. An own clock that did not tick at all (it is sorted among the padding)
is treated as slowest.

## Where this RTL departs from the published design, and why

* **gcc boundary alignment (own addition).** In the published circuit the Block A counter runs
  freely. When the local clock and C_hf are not in an exact ratio, the gcc boundary then slides
  through the ticks and eventually splits one cycle's ticks across two windows. Here every own
  tick loads the counter with CNT_MOD/2 (`align` input of `clock_input`), so Line A stays half a
  period from the own tick and the ticks of clocks in step with it fall in one window. With
  `align` tied low, Block A is the published one.
* **Register preset.** The registers are preset to all ones and the counter starts from 0 at
  each gcc, so a missing tick reads as the latest possible.
* **Sorter depth.** The recursion gives 7 comparison-and-exchange stages for n = 8; the published
  delay estimate assumes 8. Which outputs the middle comparators pair is this design's choice
  (see Block B), as is the inside of the 4-input sorter.
* **Ties.** Equal counts leave the comparator's B input on the min side; clocks in the same
  clk_hf period are thus ordered by the network's wiring, not by ID.
* **Edge and sampling.** Everything is on the rising edge of `clk_hf` (the published circuit
  uses the trailing edge of C_hf). Input clocks are sampled directly, as published; clocks
  asynchronous to C_hf need a synchronizer in front of Block A in silicon.
* **One clk_hf.** In the network all nodes share one `clk_hf`; in a real system each clock has
  its own high-frequency oscillator.
* **Block D** is a behavioural model. Its leaky integrator matters: the reference rule pulls
  more positions towards earlier clocks than towards later ones (3 of 5 for n = 5), so with a
  pure integrator in every node the common frequency of the network runs away. With the leak,
  the network settles at a common period close to the nominal one. An earlier tuning with a
  strong integrator held the 8-clock network, but in the 20-clock network with three liars it
  let some nodes run at twice the nominal frequency. The weak integrator and the ±1/8 range
  fix this.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| clock_network | M1, P1 | 4, 2 | clusters of the first size, and their size |
| | M2, P2 | 0, 1 | clusters of the second size, and their size |
| | F_SPEC | 1 | faults tolerated per node (every n > 3·F_SPEC) |
| | CNT_MOD | 33 | T_gcc / T_hf |
| | DRIFT_SPREAD | 1 | scale of the model oscillators' frequency errors (1/256 units) |
| sync_node | N, M | 8, 2 | inputs n (own clock included), faults m |
| | SELF_ID | 0 | position of the own clock among the inputs |
| | DRIFT, INIT_PHASE | 0, 0 | oscillator model: frequency error, start phase |
| clock_input | N, CNT_MOD, K | 8, 33, 6 | inputs, counter modulo, register width |
| tick_sorter | N, W | 8, 6 | entries, count width (ID width and padded size follow) |
| ref_selector | N, M, SELF_ID | 8, 2, 0 | as sync_node |
| freq_adjust | KP_SHIFT, KI_SHIFT, LEAK_SHIFT | 1, 12, 3 | loop gains of the model |
| freq_adjust | RANGE | 32 | tuning range, in 1/256 of nominal frequency |

## Files

| file | content |
|---|---|
| `rtl/clksync_pkg.sv` | rule enum; constant functions for the connection pattern and J |
| `rtl/clock_network.sv` | top: the clustered network of nodes |
| `rtl/sync_node.sv` | one clock's synchronization circuitry (Blocks A–D) |
| `rtl/clock_input.sv` | Block A |
| `rtl/tick_sorter.sv`, `rtl/sort_core.sv`, `rtl/sorter4.sv`, `rtl/cmp_exchange.sv` | Block B |
| `rtl/ref_selector.sv` | Block C |
| `rtl/freq_adjust.sv` | Block D, behavioural model |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus the workloads |
| `tb/net_harness.sv` | harness used by the workload testbench |

## Simulating

Every testbench ends with a line `TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/clksync_pkg.sv \
          tb/tb_clock_network.sv --top-module tb_clock_network -o sim
./obj_dir/sim
```

Replace the testbench name for the others. What they check:

* `tb_cmp_exchange` – all pairs of 4-bit counts, both `invert` values.
* `tb_sorter4`, `tb_tick_sorter` – random and corner-case inputs (n = 8 and a padded n = 5):
  ascending order, every ID exactly once, counts kept with their IDs.
* `tb_clock_input` – time stamps, equal stamps for same-period arrivals, a second pulse
  ignored, all ones for a missing tick, clearing at Line A, Line A every 33 periods, `align`.
* `tb_ref_selector` – every own position for n = 8, m = 2, the chosen clock, and that
  `ref_sig` follows exactly that input until the next Line A.
* `tb_freq_adjust` – free-running period, pulse width, every reported phase error against an
  independent measurement, lock to a reference within ±1 period.
* `tb_sync_node` – a 5-input node locks to four ideal clocks within ±2 periods, and again after
  they jump and one of them turns malicious (two pulses per cycle at random times).
* `tb_clock_network` – the default 8-clock network at its default parameters: the connection
  matrix above, lock from scattered phases, then clock 5 lying to every receiver differently
  (with double pulses on some links). It requires all good clocks within 6 clk_hf periods of
  each other in every measured cycle, a common period of 30–36, and that all three reference
  rules, phase corrections, lies and double pulses all occurred. Observed: worst spread 3,
  both without and with the malicious clock.
* `tb_network_workloads` – the link count of every row of the published table of network sizes
  (N = 20…100, f = 3, 5, 7) and simulation of the N = 20, f = 3 network (2 clusters of 3,
  7 of 2; 10 or 11 inputs per node) with 3 malicious clocks. It requires the 17 good clocks
  within 9 clk_hf periods of each other (3δ with δ = 3) in 30 measured cycles; observed worst
  spread 3. Larger rows differ only in size;
  they elaborate the same way but take long to compile for simulation, because every node is
  a separately parameterized instance (the N = 30, f = 7 row did not finish compiling in 15
  minutes).

## How far to trust it

The digital blocks (A, B, C) follow the published circuit closely and are tested exhaustively
or with thousands of random cases each. The network-level claims (lock, 3δ-style bound under
malicious faults) are shown by simulation of specific configurations and fault patterns, with a
behavioural oscillator whose gains were chosen for this model; a real analog loop needs its own
design. The skew achievable is bounded below by one C_hf period, the resolution of Block A.
