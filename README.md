# Split-shift MUX-FSM stochastic multiplier

A MUX-FSM stochastic multiplier computes a product `I × W` by counting ones.
A finite state machine steps the select of a multiplexer through a fixed
sequence of indices into the bits of `I`. The selected bit is counted for `W`
cycles, and the count approximates `I·W / 2^N`. This is cheap in area but slow:
the multiplier needs up to `2^N` cycles, and on average `|W|` cycles.

This design gets the same count, bit for bit, in far fewer cycles. The index
sequence is highly regular. Split into groups of `2^(N/2)` positions, every full
group starts with the same sub-sequence. So the count of that common part is
formed once, in `N/2` cycles, and multiplied by the number of groups with one-bit
shifts of the counter, not counted again and again. The remaining bits are then
counted one per cycle as before.

For `N = 6` the average drops from 16.0 to 8.64 cycles over signed 6-bit weights
(46 % fewer). For `N = 8` it drops from 64.0 to 18.31 cycles (71 % fewer). The
default unit has `N = 8` and 16 lanes that share one weight and one controller.
It computes `I_1×W + … + I_16×W`, the inner step of a neural-network
multiply-accumulate.

## What is being counted

Number the stream positions `k = 1, 2, …`. Position `k` selects input bit
`I[N-1-tz(k)]`, where `tz(k)` is the number of trailing zeros of `k`. For `N = 6`
that is

```
k      1 2 3 4 5 6 7 8 9 10 11 12 13 14 15 16 ...
index  5 4 5 3 5 4 5 2 5 4  5  3  5  4  5  1  ...
```

Over the first `W` positions, bit `I[N-j]` is selected `round(W / 2^j)` times,
with halves rounded up. The count is therefore

```
P(I, W) = Σ_{j=1..N} round(W / 2^j) · I[N-j]  ≈  I·W / 2^N
```

and it never exceeds `W`. Every multiplier of this family (one bit per cycle,
with pre-counting, with bit-parallel counting, or this one) produces exactly this
`P`. Only the number of cycles differs. The RTL returns `P`, and for several
lanes `Σ_l P(I_l, W)`.

## Splitting the weight

Write `W = W_H · 2^H + W_L` with `H = N/2`. Cut the first `W` stream positions
into groups of `2^H`. There are `W_H` full groups, followed by a partial group of
`W_L` positions.

* **Common streams.** In every full group the first `2^H − 1` positions select
  the same indices, because `tz(g·2^H + m) = tz(m)` for `m < 2^H`. For `N = 6`
  they are `5 4 5 3 5 4 5`. Their count is
  `C = Σ_{t=0..H-1} 2^(H-1-t) · I[N-1-t]`. This is simply the upper half of `I`
  read as a number: `C = I[N-1:H]`.
* **Tail bits.** The last position of full group `g` is `g·2^H`. It selects
  `I[N-1-H-tz(g)]`, which depends only on `g`. For `N = 6` and `g = 1, 2, 3`
  these are bits 2, 1, 2.
* **Rest.** The partial group is positions `m = 1 … W_L`. It selects the same
  bits as the first `W_L` positions of the sequence.

So `P = W_H · C + Σ_{g=1..W_H} I[tail(g)] + Σ_{m=1..W_L} I[N-1-tz(m)]`. The
three terms are counted in three steps.

| step | counts | how | cycles |
|---|---|---|---|
| 1 | `W_H · C` | shift-and-count, Horner scan of `W_H` | `popcount(W_H)·H + ⌊log2 W_H⌋` |
| 2 | `W_H` tail bits | one per cycle, index from a LUT | `W_H` |
| 3 | `W_L` rest bits | one per cycle, index `N-1-tz(m)` | `W_L` |

Steps 1 and 2 are skipped when `W_H = 0`, and step 3 is skipped when `W_L = 0`.

Example, `N = 6`, `W = 26 = 011 010₂`: step 1 takes 7 cycles, step 2 takes 3
and step 3 takes 2. That is 12 cycles, against 26 for the one-bit-per-cycle
multiplier.

## Step 1: shift-and-count

Step 1 is the hardest part. It computes `W_H · C` with a counter whose only
arithmetic is "add the selected bit(s)" and "double".

*Forming C.* `C` is built Horner-style, most significant bit first. The first
cycle loads `I[N-1]`. Each following cycle doubles the partial value and adds the
next bit, down to `I[N-H]`. That takes `H` cycles, one per distinct index of the
common stream, instead of `2^H − 1` cycles.

*Multiplying by W_H.* `W_H` is also scanned Horner-style, starting at its leading
1, which a leading-one detector finds. For each bit below the leading one the
running total is doubled (one cycle). For each 1-bit of `W_H`, `C` is formed
again and added (`H` cycles).

*Keeping the two apart.* The doublings that build `C` must not double the running
total. The counter therefore has two registers:

| register | width | role |
|---|---|---|
| `cs` | `H + ⌈log2(LANES+1)⌉` | holds the partial `C` while it is being shifted-and-counted |
| `acc` | `N + ⌈log2(LANES+1)⌉` | holds the running product |

On the last cycle of a common stream, `acc += 2·cs + bit`. This folds the
finished `C` into the total without spending a cycle on it.

For `W_H = 3` and `N = 6` the operations are:

| cycle | operation |
|---|---|
| 1 | `cs = I5` |
| 2 | `cs = 2cs + I4` |
| 3 | `acc += 2cs + I3` (now `acc = C`) |
| 4 | `acc <<= 1` |
| 5 | `cs = I5` |
| 6 | `cs = 2cs + I4` |
| 7 | `acc += 2cs + I3` (now `acc = 3C`) |

The counter operations are the enum `cnt_op_e` in `sc_pkg`: `OP_CLEAR`, `OP_ADD`,
`OP_SHL`, `OP_CS_FIRST`, `OP_CS_SHIFT` and `OP_CS_LAST`.

## Structure

```
             w ──► W_H, W_L
                    │
  start ──► sc_master_fsm ── step ──┬─► sc_common_fsm (step 1) ──┐
               ▲   ▲   ▲            ├─► sc_tail_fsm   (step 2) ──┤ op, sel
               └───┴───┴── last ────┴─► sc_rest_fsm   (step 3) ──┤ (routed by step)
                                                                 │
  i_vec, signed_i ─► operand reg ─► sc_input_mux × LANES ◄─ sel ─┤
                                     (sign-bit inverter)         │
                                            │ one bit per lane   │
                                            ▼                    │
                                       sc_popcount ─► inc ─► sc_shift_counter ◄─ op
                                                                 │
                                                               result
```

| module | role |
|---|---|
| `ss_sc_mac` | top: operand register, the FSMs, the per-step routing of `op`/`sel`, lanes, counter |
| `sc_master_fsm` | IDLE → STEP1 → STEP2 → STEP3 → DONE, with skips; clears the counter and loads the slaves at start |
| `sc_common_fsm` | step 1 slave: Horner scan of `W_H`, shift-and-count of `C` |
| `sc_lead_one` | leading-one detector for `W_H` |
| `sc_tail_fsm` | step 2 slave: group counter `g = 1…W_H` addressing the tail LUT |
| `sc_tail_lut` | constant table `g → N-1-H-tz(g)`, built at elaboration |
| `sc_rest_fsm` | step 3 slave: counter `m = 1…W_L` and trailing-zero encoder |
| `sc_shift_counter` | `acc`/`cs` registers with one-bit left shift |
| `sc_input_mux` | per-lane N-to-1 bit select, with the switchable sign-bit inverter |
| `sc_popcount` | sum of the lanes' selected bits |
| `sc_pkg` | `cnt_op_e`, `step_e`, `tz()` |

A slave FSM raises `last` on its final cycle, and the master moves to the next
step on the following cycle. No cycle is lost at a hand-over, so the busy time is
exactly the sum of the step formulas.

## Interface and timing (`ss_sc_mac`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `start` | in | 1 | begin an operation; accepted only while `ready` |
| `w` | in | `N` | weight, unsigned |
| `i_vec` | in | `LANES × N` (packed) | activations |
| `signed_i` | in | 1 | activations are two's complement: invert their sign bit at the MUX |
| `ready` | out | 1 | idle |
| `busy` | out | 1 | high for exactly the counting cycles |
| `done` | out | 1 | one-cycle pulse after the last counting cycle |
| `result` | out | `N + ⌈log2(LANES+1)⌉` | `Σ_l P(I_l, W)` (with `I_l + 2^(N-1)` when `signed_i`); valid from `done` until the next start |

`w`, `i_vec` and `signed_i` are sampled on the accepted `start` edge and may change
afterwards. The latency from that edge to `done` is `cycles(W) + 1` clock cycles,
where `cycles(W)` is the sum of the step column above. After `done` the unit
spends one cycle in IDLE, so back-to-back operations cost `cycles(W) + 2` cycles.
A weight of 0 gives `done` one cycle after `start`, with result 0.

Parameters: `N` is the operand width (default 8; it must be even). `LANES` is the
number of activations that share the weight (default 16; 1 gives a single
multiplier).

Operands of a smaller width `n < N` can run unchanged on the default unit. Put
`I` in the top `n` bits and zero-extend `W`. This selects the same bits, so the
count is identical, but the cycles follow the `N`-bit split.

## Cycle counts

These figures are measured in simulation with one lane, over every signed weight
of the range taken as its magnitude (`|W| ≤ 2^(N-1)`):

| N | one bit per cycle | split-shift | reduction |
|---|---|---|---|
| 6 | 16.00 | 8.64 | 46.0 % |
| 8 | 64.00 | 18.31 | 71.4 % |

The published figures for this scheme are 8.64 cycles for `N = 6` and 18.93 for
`N = 8`. The `N = 6` result agrees exactly. The published `N = 8` average is
0.6 cycles higher than the step formulas give, and the source of the difference
is not known. The worst case is `W = 2^N − 1`: `N/2·N/2 + N/2 − 1 + 2·(2^(N/2) − 1)`
cycles, which is 49 for `N = 8` against 255.

## Where this RTL departs from the published design, or fills gaps

* **Signed activations.** The scheme is explained for unsigned operands. For
  signed activations the published multipliers put an inverter on one MUX
  input. Here it sits on the sign-bit input and `signed_i` switches it per
  operation. The count then belongs to `I + 2^(N-1)`, and `2P − |W|`
  estimates `|W|·I / 2^(N-1)` per lane. Forming that value and applying the
  weight's sign are left to whatever consumes `result`; the weight itself is
  always given as a magnitude.
* **Step-1 control.** Published: a LUT holds the shift-control signals for each
  `W_H`, next to a leading-one detector. Here the detector alone drives a bit
  scan that produces the same schedule, and there is no step-1 LUT.
* **Step-1 cycle formula.** A tabulated formula for step 1,
  `popcount(W_H)·(2⌈N/2⌉−1)`, disagrees with the worked example (7 cycles for
  `W_H = 3`, `N = 6`). The RTL follows the worked example, which also reproduces
  the published `N = 6` average.
* **Counter internals.** The published counter has an internal register for
  bits shifted out at the LSB. Its exact use is not specified. Here that
  register is `cs`, and `acc` is wide enough that no bit is lost.
* **Common-stream MUX.** Step 1 selects through the lane MUX (its select stays
  in the upper half of `I`), not through a separate small MUX.
* **Lane summation.** The published configuration has 16 MUXes driven by one
  controller. Here their bits are added by a popcount into a single shared
  counter, so the output is the sum, not 16 separate products.
* **Handshake, operand registers and reset** are this design's own choices.
* **Not included.** The pre-counting and bit-parallel combinations of the
  split-shift scheme are not part of this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. The reference models in
`tb/tb_ref_pkg.sv` come from the definitions, not from the RTL:

* `stream_count` walks the full index stream position by position.
* `eq1_count` evaluates the rounded sum.
* `split_cycles` evaluates the cycle formula.

| testbench | what it shows |
|---|---|
| `tb_ss_sc_mac` | default unit (N = 8, 16 lanes): every weight 0…255 ×4 plus 200 random, with random, all-ones, all-zero and one-hot activations, unsigned and signed; result = stream walk = rounded sum; busy cycles = formula; `done`/`ready` sequence; counts step-1 skips, step-3 skips, runs with all three steps, runs with shift cycles, zero weights and signed runs; fails if any never occurs; for signed runs checks `2·result − 16·W` against `Σ W·I/2^(N-1)` within `16·N` |
| `tb_table2_cycles` | one lane at N = 6 and N = 8 over all signed weights; prints the average cycles and checks 8.64 for N = 6 |
| `tb_sc_master_fsm` | step order, skips, step lengths, `start` ignored while busy |
| `tb_sc_common_fsm` | every `W_H` at N = 6 and 8: count = `W_H · I[N-1:H]`, cycle count, single `last` |
| `tb_sc_tail_fsm`, `tb_sc_rest_fsm` | select sequence against the stream index, cycle count |
| `tb_sc_tail_lut` | all entries at N = 6 and 8; tails 2, 1, 2 for N = 6 |
| `tb_sc_shift_counter` | random operation sequences against a model |
| `tb_sc_input_mux` | every select, inverter off and on |
| `tb_sc_lead_one`, `tb_sc_popcount` | exhaustive or random against direct formulas |

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sc_pkg.sv tb/tb_ref_pkg.sv tb/tb_ss_sc_mac.sv --top-module tb_ss_sc_mac
./obj_dir/Vtb_ss_sc_mac
```

Testbenches that do not use the reference package can leave `tb/tb_ref_pkg.sv`
out. Every testbench runs in well under a second.

The RTL is synthesizable SystemVerilog-2017. Assertions in the slave FSMs check
that a step is never entered with a zero length. An assertion in the top checks
that no start is accepted while busy.
