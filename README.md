# Folded third-order Chebyshev-I high-pass filter

A third-order IIR filter in direct form II needs six additions and seven
multiplications for each sample. When the sample rate is far below the clock
rate, a separate adder and multiplier for each operation is wasteful. This
design executes all thirteen operations on **one adder and one multiplier**. It
takes one input sample and produces one output sample every **7 clock
cycles**. Three classic transformations produce the architecture:

1. **Folding** maps the operations onto the two shared units, one per clock
   cycle, in a fixed order. It also fixes how long each intermediate result must
   be stored.
2. **Retiming** moves delays around the data-flow graph until no stored result
   would be needed before it is produced.
3. **Register minimisation** uses lifetime analysis to find the fewest registers
   that can hold all the live intermediate results. Forward-backward allocation
   then assigns the results to those registers.

The result is a datapath of one 1-stage adder, one 2-stage multiplier, seven
data registers and a 7-state controller. The folding, retiming and allocation
method comes from the paper *Synthesis of Chebyshev-I filter using folding and
retiming*. The exact schedule, register allocation, word widths and
coefficients used here were computed or chosen for this implementation. Where
they differ from the paper, the differences are listed below.

## The filter being folded

```
w(n) = x(n) - a1*w(n-1) - a2*w(n-2) - a3*w(n-3)
y(n) = b0*w(n) + b1*w(n-1) + b2*w(n-2) + b3*w(n-3)
```

The operations are numbered as nodes of a data-flow graph. The feedback
coefficients are stored negated (`NAk = -ak`), so every node is a plain sum or
product:

| node | operation | node | operation |
|------|-----------|------|-----------|
| 1 | w(n) = x(n) + n3 | 7  | b0 · w(n) |
| 2 | y(n) = n7 + n4 | 8  | −a1 · w(n−1) |
| 3 | n8 + n5 | 9  | b1 · w(n−1) |
| 4 | n9 + n6 | 10 | −a2 · w(n−2) |
| 5 | n10 + n12 | 11 | b2 · w(n−2) |
| 6 | n11 + n13 | 12 | −a3 · w(n−3) |
|   |  | 13 | b3 · w(n−3) |

The default coefficients give a Chebyshev type-I high-pass response with 0.5 dB
passband ripple and its cut-off at a quarter of the sample rate:

- b = 0.158919 · (1, −3, 3, −1)
- a = (1, 0.126776, 0.523875, 0.125744)

The coefficients are quantised to Q2.14, for example `B0 = 2604` and
`NA2 = -8583`. They are top-level parameters, so any third-order
direct-form-II IIR filter can be loaded without changing the schedule.

Number format:

- **Samples:** signed 16-bit Q1.15.
- **Internal words:** 24 bits with the same binary point. This leaves 8 guard
  bits. The state w(n) of the default filter grows by at most about 2.1×.
- **Products:** truncated by an arithmetic right shift, then wrapped to 24
  bits.
- **Sums:** wrap on overflow.
- **Output:** saturated to 16 bits.

## The folding schedule

Each iteration (one sample) has seven steps. The adder takes 1 cycle and the
multiplier takes 2 (P_A = 1, P_M = 2).

| step | 0 | 1 | 2 | 3 | 4 | 5 | 6 |
|------|---|---|---|---|---|---|---|
| adder node | 6 | 5 | 4 | 3 | 1 | 2 | idle |
| multiplier node | 8 | 13 | 9 | 12 | 11 | 10 | 7 |

### How long each result is stored

Take an edge U→V that has w delays in the graph, where node U runs in step u
and node V runs in step v. After folding, the result of U must be stored for

```
D(U→V) = 7·w_r − P_U + v − u   cycles
```

Here w_r is the edge's delay count after retiming. With no retiming, five
edges have a negative D. For example, multiplication 7 finishes in step 8, but
addition 2 needs its result in step 5 of the same iteration. Solving the
constraints `r(U) − r(V) ≤ floor(D(U→V)/7)` gives the following retiming:

- r(2) = r(4) = r(6) = +1
- r(10) = r(12) = −1
- every other node: 0

All the resulting delays are non-negative:

| edge | D | edge | D | edge | D |
|------|---|------|---|------|---|
| 1→7 | 1 | 1→12 | 12 | 12→5 | 3 |
| 1→8 | 2 | 1→13 | 17 | 7→2 | 4 |
| 1→9 | 4 | 8→3 | 1 | 9→4 | 5 |
| 1→10 | 7 | 3→1 | 0 | 4→2 | 2 |
| 1→11 | 13 | 10→5 | 1 | 11→6 | 1 |
| 5→3 | 1 | 6→4 | 1 | 13→6 | 4 |

D = 0 on edge 3→1 means that addition 1 reads the adder's own output register
directly.

Retiming the feed-forward adders (nodes 2, 4 and 6) by one iteration has a
cost: node 2 in hardware iteration J computes y(J−1). The output therefore
leaves one iteration later than in the unfolded filter.

### Register minimisation

Each node's result is live from the cycle after it is produced until its last
use, `u + P_U + max D`. Counting the live results in each step, modulo 7, gives
7, 6, 5, 5, 5, 6, 6. So seven registers are enough. A search over all legal retimings with values
from −2 to +2 found none that needs fewer with these step assignments.

The allocation is forward-backward:

- A new result always enters the lowest free register. In practice every
  product enters R1.
- Each cycle, a stored value moves forward one register, Rk → Rk+1.
- If a value reaches R7 while it is still needed, it moves back to the lowest
  free register.

The contents of the registers in each step, where `nK` is node K's result:

| step | R1 | R2 | R3 | R4 | R5 | R6 | R7 |
|------|----|----|----|----|----|----|----|
| 0 | n11@-1 | n12@-1 | n9@-1 | n13@-1 | w(n-1) | w(n-2) | w(n-3) |
| 1 | n10@-1 | w(n-3) | n12@-1 | n9@-1 | – | w(n-1) | w(n-2) |
| 2 | n7@-1 | n6 | w(n-2) | – | n9@-1 | – | w(n-1) |
| 3 | n8 | n7@-1 | n5 | w(n-2) | w(n-1) | – | – |
| 4 | n13 | n4 | n7@-1 | – | w(n-2) | w(n-1) | – |
| 5 | n9 | n13 | n4 | n7@-1 | – | w(n-2) | w(n-1) |
| 6 | n12 | n9 | n13 | w(n) | w(n-1) | – | w(n-2) |

Here n is the sample that step 4 of the current iteration takes in. A
result marked `@-1` was computed in the previous iteration.
`cheb1_pkg::step_ctrl()` encodes this table. For each step it gives:

- the load source of every register: adder, multiplier, another register, or
  hold;
- the two adder operands;
- the multiplier's data operand and coefficient.

## Blocks

| file | role |
|------|------|
| `rtl/cheb1_pkg.sv` | constants, control-word types, the per-step schedule `step_ctrl()` |
| `rtl/fold_ctrl.sv` | free-running modulo-7 step counter and schedule decode |
| `rtl/fold_regs.sv` | registers R1..R7 with their per-step input switches |
| `rtl/fold_add.sv` | the shared adder, one pipeline register |
| `rtl/fold_mult.sv` | the shared multiplier, operand register + product register |
| `rtl/cheb1_folded.sv` | top: operand and coefficient switches, output register with saturation |

## Interface and timing (`cheb1_folded`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous, active low; clears all state (zero filter state) |
| `x_in` | in | 16 | input sample, read in the cycle `x_ready` is high |
| `x_ready` | out | 1 | high in step 4 of each iteration, once every 7 cycles |
| `y_out` | out | 16 | output sample, updated once per iteration |
| `y_valid` | out | 1 | one-cycle pulse when `y_out` is new |

- **Input:** the source presents x(n) and keeps it until the cycle in which
  `x_ready` is high. It may change `x_in` in any later cycle.
- **Rate:** one sample every 7 cycles.
- **Latency:** y(n) appears with `y_valid` exactly 10 cycles after the
  `x_ready` cycle that took x(n).
- **Start-up:** the first `y_take` after reset would deliver y(−1), which is
  zero. It is suppressed, so the first `y_valid` after reset carries y(0).

## Differences from the published design

- **Folding factor 7 instead of 6.** The paper states a folding factor of 6
  and uses 6 in its folding equations. However, its folding sets have seven
  entries, and seven multiplications cannot share one multiplier in six
  cycles. This design uses 7 steps. It keeps the paper's step order, which is
  the one in the table above.
- **Seven registers instead of six.** With 7 steps the lifetime analysis needs
  7 registers. The paper's register count of 6 belongs to its 6-step
  schedule.
- **Different retiming values.** The paper's retiming (r(10) = r(11) =
  r(12) = −1) was solved for 6 steps and leaves edge 7→2 negative. The values
  above were re-solved for 7 steps. The lifetimes and the allocation table were
  recomputed to match.
- **Details the paper does not give.** The paper gives no word widths, rounding
  rules, coefficients (ripple, cut-off, sample rate), input/output handshake or
  reset behaviour. All of these are this design's choices.
- **Resource figures.** No FPGA mapping is attempted, so the
  paper's Spartan-3A slice, LUT and flip-flop counts cannot be compared. With 24-bit internal words,
  generic synthesis gives 277 flip-flop bits:
  - 168 in R1..R7;
  - 64 in the multiplier pipeline;
  - 24 in the adder;
  - 18 in the output register and its flags;
  - 3 in the step counter.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

- **`tb_cheb1_folded`:** runs the whole filter at its default parameters.
  - It sends 940 samples: an impulse, random data, a constant, an alternating
    ±0.5 signal at half the sample rate, and full-scale random data.
  - Every output is compared bit for bit with a model of the unfolded direct
    form II filter that uses the same arithmetic.
  - It checks the 10-cycle latency and the 7-cycle rate.
  - It checks the filter's behaviour: the constant input is rejected, and the
    gain at half the sample rate is within the 0.5 dB ripple.
  - It counts the idle adder slots, forward shifts, backward moves,
    zero-delay reuse of the adder output and output saturations. If any of
    these never happens, it counts a failure.
- **`tb_cheb1_response`:** measures the gain of the default filter at nine
  tones, from 0.1 to 0.9 of half the sample rate. It compares each gain with
  the Chebyshev type-I formula |H| = 1/sqrt(1 + ε²·C3(x)²), where
  C3(x) = 4x³ − 3x and x = tan(ωc/2)/tan(ω/2), which is the formula mapped by
  the bilinear transform. Measured and formula gains agree within 0.0005. The
  test also checks that the passband stays inside the 0.5 dB ripple band and
  that the stopband gain rises monotonically.
- **`tb_fold_ctrl`:** checks the schedule against the data-flow graph, not
  against a copy of the table. It tracks (node, sample) tags through a model of
  the registers, driven by the control words. In every step it checks that each
  unit receives exactly the operands and coefficient that the graph and the
  retiming call for.
- **`tb_fold_regs`, `tb_fold_add`, `tb_fold_mult`:** check the datapath
  blocks against reference models, with random stimulus and corner cases.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/cheb1_pkg.sv rtl/fold_*.sv \
    rtl/cheb1_folded.sv tb/tb_cheb1_folded.sv --top-module tb_cheb1_folded
./obj_dir/Vtb_cheb1_folded
```

## Changing the design

- **Coefficients and widths** (`DATA_W`, `ACC_W`, `COEF_W`, `COEF_FRAC`, `B0`
  to `B3`, `NA1` to `NA3`): change the parameters of `cheb1_folded`. The
  testbench's reference model uses the same constants and must be updated with
  them.
- **Schedule:** changing the step order, the unit latencies or the retiming
  changes the folded delays and the lifetimes. The table in
  `cheb1_pkg::step_ctrl()` must then be recomputed, using the procedure above:
  1. Compute the delays D.
  2. Retime until every D is non-negative.
  3. Count the live results per step, modulo 7.
  4. Allocate forward-backward.

  `tb_fold_ctrl` will report any operand that does not match the graph.
