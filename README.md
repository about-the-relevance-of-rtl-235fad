# Multispeculative DWT datapath

This datapath computes the Discrete Wavelet Transform (DWT) data-flow graph. Its adders never wait for a carry to ripple across the whole word. Each addition is cut into K-bit fragments that all add in parallel. The carry that leaves a fragment is not passed on in the same cycle. It is stored in a one-bit flip-flop, called a *predictor*, and fed into the same fragment boundary of the *next* addition of the same additive tree. Addition is associative, so a carry that was left out can be added back later without changing the result. Only at the end of a tree must every pending carry be gone.

When the last addition of a tree (its *root*) produces no carry at any boundary, its result is exact: this is a *hit*. Otherwise a *recovery addition* adds the pending carries back in. This usually takes one cycle, and the controller repeats it in a *correction* state until no carry comes out. The schedule arranges that:

- recovery additions that share a cstep with work in flight cost nothing;
- a cstep that holds nothing but a recovery addition is skipped whenever its tree's root hit.

The result is a variable-latency datapath. One DWT evaluation takes **19 cycles** when the three relevant roots hit and **22 cycles** when none does. Each extra correction cycle adds one more. Each unit's critical path is a K-bit adder, not an N-bit one.

The scheme is called multispeculation in high-level synthesis. The units here are:

| unit | count | latency |
|---|---|---|
| multispeculative adder (MSADD) | 1 | 1 cycle |
| multispeculative multiplier (MSMUL) | 2 | 3 cycles |

## Values with pending carries

Every intermediate value is kept in redundant form as three fields:

- `s`: the N-bit fragment sums;
- `c`: N/K-1 predictor bits. `c[i]` is the carry out of fragment i, still owed to bit position K·(i+1);
- `d`: a second vector of the same shape, called *deferred* carries. It holds carries that the adder had no free input for.

The value represented is

    s + Σ_i (c[i] + d[i]) · 2^(K·(i+1))      (mod 2^N)

All arithmetic is modulo 2^N, and products keep their low N bits.

The adder (`msadd`) has one carry-in bit per fragment boundary. An original tree addition `A + B` therefore works like this:

- The predictor bits of operand **A** go in as the carry-in vector.
- The new fragment carry-outs become the result's `c`.
- The predictor bits of operand **B** cannot enter, so they are copied into the result's `d`.
- The addition hits only if both its own carry-outs and B's carries are zero.

A recovery addition works on register R. It adds `R.d`, placed at the fragment boundaries, to `R.s`, with `R.c` as carry-in. It then clears `d`. Its hit means that no new carry came out.

A fragment adds at most `(2^K-1) + 1 + 1`, so its carry-out is always a single bit, and the recovery addition needs no wider logic.

## The multiplier

`msmul` forms the low N bits of `a·b` in three pipelined cycles:

1. The partial products of `b[N/2-1:0]` are reduced to a sum/carry pair by a Wallace-style carry-save tree (`csa_tree`).
2. That pair and the partial products of `b[N-1:N/2]` are reduced to a final pair.
3. An `msadd` with static zero prediction (no carry-in) adds the pair.

The carries of step 3 are not resolved. They leave with the product as `p_c`, and the tree addition that consumes the product absorbs them. `en` low freezes all three stages. The controller uses it during correction cycles.

## The DWT graph and its schedule

The graph has 17 operations, grouped into six additive trees. A tree holds additions only; products can appear only as its leaves.

| tree | operations | result register | recovery addition |
|---|---|---|---|
| T1 | x1 = in0·c0, +2 = x1 + in1, x3 = in2·c1, +4 = +2 + x3 | R0 | 4' |
| T2 | x5 = R0·c2, +7 = x5 + in3 | R1 | 7' |
| T3 | x6 = in4·c3, +8 = x6 + in5 | R2 | 8' |
| T4 | x9 = R1·c5, +11 = x9 + R2 | R3 | 11' |
| T5 | x10 = in6·c4, +12 = x10 + in7 | R4 | 12' |
| T6 | x13 = R3·c6, +15 = x13 + R4, x14 = in8·c7, +16 = x14 + in9, +17 = +15 + +16 | R5 (R6 holds +16) | 17' |

Schedule (`dwt_sched_pkg::sched`). Primed rows are the skippable csteps:

| cstep | adder | multiplier 0 | multiplier 1 |
|---|---|---|---|
| 1 | – | start x1 | start x3 |
| 2–3 | – | x1 | x3 |
| 4 | +2 → R0 | start x6 | – |
| 5 | +4 → R0 (root T1, x3's carries deferred) | x6 | – |
| 6 | 4' (recovery slot) | x6 | – |
| 7 | +8 → R2 (root T3) | start x5 | start x10 |
| 8 | 8' (recovery slot) | x5 | x10 |
| 9 | – | x5 | x10 |
| 10 | +7 → R1 (root T2) | – | – |
| 10' | 7', skipped if +7 hit | – | – |
| 11 | +12 → R4 (root T5) | start x9 | start x14 |
| 12 | 12' (recovery slot) | x9 | x14 |
| 13 | – | x9 | x14 |
| 14 | +11 → R3 (root T4) | – | – |
| 14' | 11', skipped if +11 hit | – | – |
| 15 | +16 → R6 | start x13 | – |
| 16–17 | – | x13 | – |
| 18 | +15 → R5 | – | – |
| 19 | +17 → R5 (root T6, R6's carries deferred) | – | – |
| 19' | 17', skipped if +17 hit | – | – |

Three properties make the skipping and the slots safe:

- No multiplication is in flight during a skippable cstep, so removing that cycle shortens nothing else.
- Every register that feeds a multiplier has been made exact by its tree's recovery addition first. An assertion in `dwt_ms_top` checks this.
- The recovery additions 4', 8' and 12' sit in csteps where products are still being computed, so they are free when one try is enough.

The run time is therefore

    cycles = 19 + (number of the roots +7, +11, +17 that missed) + (correction cycles)

The outputs are `y[0..5] = R0..R5`, which hold +4, +7, +8, +11, +12 and +17.

## Controller (`ms_ctrl`)

The controller is a program counter over the schedule ROM, with three states: IDLE, RUN and CORR.

In **RUN**, every unit does what the current cstep says. Then:

- If a recovery addition missed, the controller goes to **CORR**.
- Otherwise it moves to the next cstep. When that next cstep is skippable and its tree's root hit, the controller jumps over it in the same clock edge, so a skip costs zero cycles. The hit may have been recorded in this very cycle.

In **CORR**, only the recovery addition repeats, on the updated register. The multipliers are frozen and issue nothing. CORR is left as soon as the recovery hits.

The controller also counts three things per run: `cycles`, `skipped` and `corrections`.

## Top-level interface (`dwt_ms_top`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst | in | 1 | clock; synchronous active-high reset |
| start | in | 1 | begin a run (accepted when idle) |
| in_x | in | 10 × N | samples in0..in9; hold stable until done |
| coef | in | 8 × N | coefficients c0..c7; hold stable until done |
| y | out | 6 × N | tree results; valid when done pulses, held until the next start |
| busy | out | 1 | high during every cstep of a run |
| done | out | 1 | one-cycle pulse after the last cstep |
| cycles, skipped, corrections | out | 8, 2, 8 | statistics of the last run |
| correcting | out | 1 | controller is in the correction state |

Parameters:

- `N` = 16: word width.
- `K` = 4: fragment width. N must be a multiple of K, with N/K ≥ 2.

The number of predictors per value is N/K-1.

## Files

| file | contents |
|---|---|
| `rtl/dwt_sched_pkg.sv` | step type, schedule ROM, graph constants |
| `rtl/msadd.sv` | fragment adder with carry-in/carry-out vectors and hit |
| `rtl/csa_tree.sv` | Wallace-style 3:2 reduction |
| `rtl/msmul.sv` | three-cycle multiplier |
| `rtl/ms_regfile.sv` | registers with sum, predictor bits and deferred carries |
| `rtl/ms_ctrl.sv` | controller |
| `rtl/dwt_ms_top.sv` | datapath top |
| `tb/tb_<module>.sv` | self-checking testbench for each module |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. For example:

    verilator --binary --timing -Irtl -Itb rtl/dwt_sched_pkg.sv rtl/*.sv \
        tb/tb_dwt_ms_top.sv --top-module tb_dwt_ms_top
    ./obj_dir/Vtb_dwt_ms_top

Swap the testbench name to run another one.

`tb_dwt_ms_top` runs the design at its default sizes, end to end:

- three directed runs (all zero, all ones, a dense carry pattern) and 400 random runs;
- every result is compared with plain modulo-2^N arithmetic of the graph;
- the cycle, skip and correction counts are compared with a fragment-level model written in the testbench;
- it fails if any of these never happened: a skipped cstep, an executed recovery cstep, a correction in a recovery slot, a correction after a skippable cstep, a deferred carry, a 19-cycle run.

With the default 4-bit fragments and random data, about one root in seven hits. Real signal data with small magnitudes hits far more often.

The unit testbenches cover:

- the fragment arithmetic and the hit rule;
- carry-save sums for 2, 8, 10 and 17 operands;
- the multiplier's value, its 3-cycle latency, stalls and back-to-back issue;
- the register file against a mirror;
- the controller's cstep order, skips, freezing in CORR and cycle counts, using a scripted adder.

## What is fixed by the scheme and what was chosen here

These follow the published multispeculation scheme for this graph:

- fragments joined by predictor flip-flops that pipeline carries between csteps;
- static zero prediction in the last stage, with a miss whenever a fragment carry-out is 1;
- hit → next state, miss → correction state;
- MSMUL = CSA tree + MSADD;
- 1 adder, 2 multipliers, latencies of 3 and 1;
- six trees, each with one recovery addition;
- recovery slots in csteps 6, 8 and 12; skippable csteps 10', 14' and 19';
- 19–22 cycles.

These are this implementation's own choices, and the places to look first when adapting it:

- **N = 16, K = 4.** The scheme does not fix the word or fragment width.
- **Graph details.** Which operands come from outside the graph (in0..in9, c0..c7) is a reading of the graph, not given by the scheme. So are the two cross edges +8 → +11 and +12 → +15.
- **Schedule and binding.** The exact cstep of each operation and the register binding were constructed here. They meet the constraints listed above, but they are not the output of the scheduling and binding algorithm the scheme uses, which is not reproduced.
- **Predictor placement.** There is one set of predictor bits per register, not one per adder. With a single shared set, additions of different trees could not be interleaved.
- **Deferred carries.** The vector `d` handles additions whose two operands both carry pending carries (+4 with x3, +17 with +16). The scheme only states that such carries may be accumulated later.
- **Multiplier split.** How the partial products are divided over the first two cycles was chosen here. The multiplier hands its own carries on to the next addition rather than correcting them itself.
- **Controller details.** Reset is synchronous and active high. Inputs are not latched. Skips cost zero cycles through look-ahead.
- **Not provided.** There is no conventional, non-speculative baseline datapath. There are no schedules for the other benchmarks the scheme has been evaluated on (Dilation, Accum, FIR, ARF, Simpson 3/8, Trapezoid, Dot-8), because their graphs are not available. `dwt_sched_pkg` is where such a schedule would go.
- **No product handshake.** The schedule, not a handshake, decides when a product is read. The `p_done` outputs of the multipliers only feed an assertion, and `p_hit` is left open.
