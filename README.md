# Split-shift MUX-FSM stochastic multiplier

This is a multiply unit for neural-network inference built on deterministic
stochastic computing. It computes 16 products that share one weight W,
`I1*W + ... + I16*W`, each about `I*W / 2**N`. It uses only a MUX and a small
counter per activation, plus one controller shared by all lanes.

A conventional MUX-FSM multiplier needs W clock cycles for a weight W. This
design splits W into two halves and counts a pattern that repeats in the
bit stream only once. A one-bit shift then stands in for the repeated
counting. For 8-bit operands the worst case drops from 255 cycles to 49, and
the average over all weights from 127.5 to 25.1 cycles. The result is bit for
bit the same as the conventional MUX-FSM's.

## The product being computed

For n-bit unsigned operands, the conventional MUX-FSM product of activation
`I` and weight `W` is

    P(I, W) = sum over k = 1 .. W of  I[n-1-tz(k)]

where `tz(k)` is the number of trailing zeros of k. The k-th clock selects bit
`n-1-tz(k)` of I through a MUX, and a counter counts the ones. The index
sequence for n = 6 is `5 4 5 3 5 4 5 2 5 4 5 3 5 4 5 1 ...`. Bit `I[n-j]` is
selected about `W/2**j` times, so `P` approximates `I*W/2**n`. This design
produces exactly `P(I, W)` but needs far fewer cycles to do it.

## The split-shift schedule

Write `W = W_H * 2**h + W_L` with `h = n/2`. The first `W_H * 2**h` positions
of the sequence form `W_H` groups of `2**h` positions. The last group is
partial, with `W_L` positions.

* **Common bit stream (CBS).** The first `2**h - 1` positions of every full
  group are the same. They select `I[n-1]` `2**(h-1)` times, `I[n-2]` half as
  often, and so on down to `I[n-h]` once. Their count is
  `C = sum_i I[n-1-i] * 2**(h-1-i)`, i = 0..h-1, so all the CBSs together
  contribute `W_H * C`.
* **Tail bits.** The last position of group m (m = 0..W_H-1) selects bit
  `h-1-tz(m+1)`. For n = 6 these bits are 2, 1, 2, 0, 2, 1, 2.
* **The rest.** The partial group is simply positions 1..W_L of the ordinary
  sequence.

The controller runs three steps, one after the other:

| step | FSM | what it does | cycles |
|---|---|---|---|
| 1 | `cbs_fsm` | `W_H * C` by binary multiplication, MSB of W_H first. A 1 bit costs h cycles: cycle i adds `I[n-1-i]` at weight `2**(h-1-i)`. Between bits of W_H, one cycle doubles the counter with a shift | `popcount(W_H)*h + bitlen(W_H) - 1` |
| 2 | `tail_fsm` | one tail bit per cycle, its index read from `tail_lut` | `W_H` |
| 3 | `wl_fsm` | one position of the partial group per cycle, index `n-1-tz(k)` | `W_L` |

Steps 1 and 2 are skipped when `W_H = 0`, and step 3 when `W_L = 0`. Each step
starts in the cycle after the previous one ends, so no cycle is spent between
steps. Example with n = 6, W = 26 = `011 || 010`: step 1 takes 3 + 1 + 3 = 7
cycles, step 2 takes 3 and step 3 takes 2, so 12 cycles in all. The
conventional schedule takes 26.

The delicate part is step 1. A CBS could be counted by Horner's rule: count
`I[n-1]`, then shift the counter and count `I[n-2]`, and so on. That only
works while the counter is empty, because each shift would also scale the
CBSs already counted. So the lane counter here adds the selected bit at a
weight of `2**wsh`, and a CBS is added in h cycles without shifting. The only
shifts are the doublings between bits of W_H. Their cycle count is the same
as the Horner description's.

## Bit-parallel lanes (parameter `R`)

The default, `R = 1`, is the serial architecture described above: each lane
has one MUX and counts one bit per cycle. Setting `R > 1` builds the
bit-parallel extension, where each lane has R MUXes and an accumulator that
adds up to R selected bits per cycle. The same three steps then run as
follows:

* **Step 1.** A common bit stream is added R bits at a time, in
  `ceil(h/R)` cycles. The doubling between bits of W_H is merged into the
  first of those cycles (`CNT_SHIFT_ADD`), and a 0 bit costs one plain shift.
  For `R >= h` the whole step takes `bitlen(W_H)` cycles, one per bit of W_H.
  The parallel lane already has an adder, so merging the shift costs nothing
  there. The serial lane keeps the shift as a cycle of its own.
* **Steps 2 and 3.** These take R tail bits or R positions per cycle, so
  `ceil(W_H/R)` and `ceil(W_L/R)` cycles.

With R = 4 and N = 8 a multiplication takes
`ceil(log2(W_H+1)) + ceil(W_H/4) + ceil(W_L/4)` cycles: at most 12, and 7.56
on average over all weights. A conventional bit-parallel MUX-FSM averages
32.25.

## Structure

```
sc_mac16 (top)
 ├─ sc_controller              shared by all lanes
 │   ├─ master_fsm             splits W, clears lanes, sequences the steps, forwards commands
 │   ├─ cbs_fsm                step 1
 │   ├─ tail_fsm ─ tail_lut    step 2
 │   └─ wl_fsm                 step 3
 ├─ sc_lane  x LANES           MUX + counter with weighted add and one-bit shift
 └─ adder tree + sum register
sc_pkg                         command type and helpers
```

The controller drives every lane with one command per clock. The command is a
`cnt_cmd_t`. Its `op` field is one of `CNT_NONE`, `CNT_CLR`, `CNT_SHIFT`,
`CNT_ADD` or `CNT_SHIFT_ADD`. It also has eight slots, each with three
fields:

* `en`: the slot counts a bit this cycle
* `sel`: which activation bit the MUX selects
* `wsh`: the increment weight, as a left shift

A lane uses slots 0 to R-1.

The commands depend only on W, so any number of lanes can share one
controller. That sharing is what the 16-lane configuration is for.

## Interface and timing of `sc_mac16`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | one-cycle pulse; ignored while `busy` |
| `w` | in | N | shared weight, sampled with `start` |
| `act` | in | LANES x N | activations, captured with `start` |
| `busy` | out | 1 | high from the cycle after `start` to the last command |
| `done` | out | 1 | one-cycle pulse; `sum` and `count` valid |
| `count` | out | LANES x N | per-lane products `P(I_l, W)`; held until the next start |
| `sum` | out | N + clog2(LANES+1) | `sum_l P(I_l, W)`; held until the next `done` |

The parameters are:

* `N`: operand width, even, 2 to 16, default 8
* `LANES`: number of lanes, default 16
* `R`: bits counted per cycle per lane, 1 to 8, default 1

If `start` is in cycle 0, `done` arrives 2 cycles after the last command
cycle. With R = 1 that is cycle
`2 + popcount(W_H)*N/2 + max(bitlen(W_H)-1, 0) + W_H + W_L`. For W = 0 it is
cycle 2. `w` and `act` only need to be valid in the start cycle.

`sc_controller` alone has the same interface without the lanes. Its `done`
comes one cycle earlier, when the lane counters are final.

## What follows the source design and what is added here

These parts follow the published design:

* the split of W into two halves
* the three steps, with a master FSM over three slave FSMs
* skipping empty steps
* the tail-index LUT
* the one-bit shift added to the MUX-counter datapath
* one controller shared by 16 MUX lanes for a 16-term sum with a common weight

These are choices of this implementation:

* **Step-1 cycle count.** This design's cost is `popcount(W_H)*h + bitlen(W_H) - 1`,
  as in the worked example above (7 cycles for W_H = 3, n = 6). A closed-form
  expression published with the method is `popcount(W_H)*(2*h - 1)`, which
  gives 10 cycles for that example. The worked example was followed.
* **Weighted add.** The lane adds the selected bit at a weight of `2**wsh`
  rather than counting with a shifted counter (see above).
* **Index sequence.** Position k selects `n-1-tz(k)`. This matches every
  published fragment of the sequence. Note that it counts `I[n-j]`
  `floor(W/2**(j-1)) - floor(W/2**j)` times, which is not always
  `ceil(W/2**j)`.
* **Reset and handshake.** The reset, the start/busy/done handshake, the
  go/last handshake between master and slaves, and the lane clear in the
  start cycle are this design's own.
* **Capturing I.** The activation is captured at start.
* **Summing the lanes.** Each lane keeps its own N-bit counter, and an adder
  tree sums the 16 counts into a register after the last command. The source
  does not say how the sum is formed.

These parts are not implemented:

* **Signed operands.** The underlying MUX-FSM handles signs with an inverter
  and an XOR, but only unsigned operands are described in detail, and this RTL
  is unsigned.
* **Pre-count variant.** The pre-count variant of the split-shift method
  starts the counter at the count of the most significant activation bit. It
  is given only as a cycle formula and is not built. The bit-parallel variant
  is built (`R > 1`).
* **Odd N.** Odd operand widths are not supported.

## Verification

Each module has a self-checking testbench in `tb/`. All of them compare
against `tb_sc_ref_pkg`, which computes `P(I, W)` by walking the whole
conventional sequence, and the expected cycle count in closed form.

* `tb_sc_lane`: random command streams against a model counter, for R = 1
  and R = 4.
* `tb_tail_lut`: the table for N = 8 and N = 6 against positions
  `2**h*(m+1)` of the sequence, including the 2, 1, 2 example.
* `tb_cbs_fsm`, `tb_tail_fsm`, `tb_wl_fsm`: every non-zero half-weight at
  N = 8 and N = 6, with serial and bit-parallel lanes. Each checks the count,
  the exact cycle count and `last`.
* `tb_master_fsm`: step order, skipping, gap-free hand-over, the done timing,
  and a start while busy, using stand-in slaves.
* `tb_sc_controller`: every W at N = 8 and N = 6 (R = 1), and at N = 8 with
  R = 4 and R = 2. It uses four model lanes and checks the products and the
  cycle counts, including the `ceil(log2(W_H+1)) + ceil(W_H/4) + ceil(W_L/4)`
  count for R = 4.
* `tb_sc_mac16`: the top at its default size (N = 8, 16 lanes). It runs every
  W from 0 to 255, then 200 random weights, and checks the lane products,
  the sum and the latency. It also counts doubling shifts, CBS counts, tail
  bits, W_L bits, skipped steps, W = 0, and a start while busy, and fails if
  any of them never happens.
* `tb_cycle_sweep`: sweeps all weights through the 16-lane unit at N = 6 and
  N = 8, with R = 1 and R = 4, and prints the average cycle counts:

  | N | R | average cycles | conventional MUX-FSM |
  |---|---|---|---|
  | 6 | 1 | 12.75 | 31.5 |
  | 8 | 1 | 25.125 | 127.5 |
  | 6 | 4 | 4.625 | 8.25 |
  | 8 | 4 | 7.5625 | 32.25 |

These averages assume all weights are equally likely. The reductions
published for the method are averaged over the weights of trained networks,
so they are not reproduced here.

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and ends with
`$finish`. To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sc_pkg.sv tb/tb_sc_ref_pkg.sv tb/tb_sc_mac16.sv --top-module tb_sc_mac16 -o sim
./obj_dir/sim
```

Every testbench finishes within seconds.
