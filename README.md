# Modified delayed-LMS adaptive filter with partial-product-generator multipliers

An LMS adaptive filter learns the N coefficients of an FIR filter so that its
output `y = wᵀx` follows a desired signal `d`; every sample it nudges each
weight by `mu · e · x`, where `e = d − y` is the error. In hardware the error
takes several clock cycles to compute, so the weight update can only use an
old error. A *delayed* LMS (DLMS) filter accepts this and updates with
`e(n−m)`; the cost is slower convergence as the adaptation delay `m` grows.

This design keeps that delay small by splitting it in two and putting each
part where it is cheapest:

```
e(n)   = d(n) − w(n−n2)ᵀ · x(n)                    (filter uses slightly old weights)
w(n+1) = w(n) + mu · e(n−n1) · x(n−n1)              (update uses slightly old error)
```

* **n1** is the latency of the *error-computation block*, which merges the
  FIR inner product and the subtraction `d − y` into one pipelined datapath.
  The samples multiplied with the error are delayed by the same n1 cycles.
* **n2** is a short register delay on the new weights on their way back into
  the filter.

Both multiplier arrays avoid general-purpose multipliers: each sample is cut
into 2-bit (radix-4) digits, and a *partial product generator* (PPG) picks
0, w, 2w or 3w per digit with a decoder and an AND/OR gate row. In the filter
the partial products of the same digit position are first summed across all
taps, and only then are the digit sums shifted into place, so one shift-add
tree serves all N taps.

An 8×8 Wallace-tree multiplier is included as a separate unit with its own
ports; it is not part of the filter datapath.

## Top level (`dlms_top`)

```
             x_in ──┬──────────────────────────────┐
                    │                              ▼
 d_in ─────────────►│      error_computation  (latency n1 = 2)
                    │   delay line → N PPGs → L/2 adder trees ─► reg
                    │   ─► shift-add tree ─► d − y ─► reg ──────────► e(n−2)
                    │          ▲ w(n−n2)           x_taps[N−1]          │
                    │          │                       │                │
                    │   delay_line (n2 = 1)      delay_line (n1 = 2)    │
                    │          ▲                       │                │
                    │          │               x(n−n1−k), k=0..N−1      │
                    │          └───────── weight_update ◄───────────────┘
```

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset, clears every register |
| `x_in` | in | L | input sample, one per clock |
| `d_in` | in | W | desired sample, one per clock, aligned with `x_in` |
| `y_out` | out | W | filter output `y(n−1)` |
| `e_out` | out | W | error `e(n−2)`, the value the weight update is using |
| `w_out[N]` | out | W each | weight registers `w(n)` |
| `mult_a`, `mult_b` | in | 8 | Wallace multiplier operands (unsigned) |
| `mult_p` | out | 16 | `mult_a · mult_b`, combinational |

There is no handshake: the filter takes one `(x, d)` pair per clock and
produces one error per clock. All weights start at zero after reset.

### Timing, cycle by cycle

With `x(n)`, `d(n)` applied during cycle `n`:

* cycle `n`: the PPGs and adder trees work on `x(n) … x(n−N+1)` and the
  filter weights `w(n−n2)`; the L/2 digit sums are registered at the end of
  the cycle, together with `d(n)`;
* cycle `n+1`: the shift-add tree forms `y(n)` (visible on `y_out`) and
  `d(n) − y(n)` is registered;
* cycle `n+2`: `e(n)` is on `e_out` and the weight update applies it with
  `x(n−k)`, which it reads from two extra registers appended to the
  filter's input delay line. The new weights are in the weight registers
  at the next edge and reach the filter one cycle later (n2 = 1).

The total adaptation delay is therefore n1 + n2 = 3 cycles.

## The partial product generator (`ppg`)

An L-bit two's-complement sample `x` is the sum of L/2 digits
`x = Σ u_l · 4^l`. The lower digits are unsigned, `u_l ∈ {0,1,2,3}`. The top
digit carries the sign bit and is worth `−2·x[L−1] + x[L−2] ∈ {0, 1, −2, −1}`.

Per digit:

* a 2-to-3 decoder (`ppg_decoder`) raises `b0`, `b1` or `b2` for digit
  values 1, 2 or 3, and none for 0;
* an AND/OR cell (`ppg_aoc`) gates one of three precomputed multiples with
  those lines and ORs them. Lower digits use `w, 2w, 3w`; the top digit uses
  `w, −2w, −w`.

`2w` is a wire shift. `3w = w + 2w` takes one adder per PPG. The negations are
two's complement. Each partial product is W+2 bits, sign-extended.

## Error computation (`error_computation`)

* `adder_tree`: a binary tree of ⌈log2 N⌉ stages. L/2 such trees each sum
  one digit position over all N taps, `q_l = Σ_k u_l(x(n−k)) · w_k`. They
  grow the width by log2 N bits, so nothing overflows.
* Pipeline register on all `q_l`, plus `d` delayed to match.
* `shift_add_tree`: ⌈log2(L/2)⌉ = log2 L − 1 stages. Stage `s` adds
  neighbouring nodes with the upper one shifted by `2·2^s` bits, so the result
  is `Σ q_l · 4^l`, the full-precision inner product.
* Subtract and register the error.

### Fixed-point formats

Samples are fractions with L−1 fraction bits. Weights, `d`, `y` and `e` are
fractions with W−1 fraction bits. The inner product carries (L−1)+(W−1)
fraction bits. `y` takes W bits of it from bit L−1, which truncates the
low bits and drops the high bits. `d − y` is kept to W bits with
wrap-around. These choices are safe only while `|y|` and `|d|` stay below 1.
An LMS filter drives `y` towards `d`, so keeping `d` in range keeps `e` in
range. Nothing saturates: a `d` near full scale can wrap. Scale the input to
avoid this.

## Weight update (`weight_update`)

Each of the N cells multiplies the error by its delayed sample with the same
machinery: a `ppg` (error as multiplicand, sample as digits) followed by a
`shift_add_tree`. The W+L+1-bit product is arithmetically shifted right by
`L−1+MU_SHIFT`. This puts it in the weight format and applies
`mu = 2^−MU_SHIFT`. The dropped bits are truncated, which rounds towards
minus infinity. The result is added to the weight register, also with
wrap-around. The update takes no extra pipeline register. The n2 delay is
applied to the weights on their way to the filter.

## Wallace-tree multiplier (`wallace_multiplier`)

Unsigned 8×8 → 16 bits. `AB_i = (a & {8{b_i}}) << i` gives eight partial
products. Six 3:2 carry-save adders (`csa`) in four levels reduce them to
two words:

1. (AB5, AB4, AB3) and (AB2, AB1, AB0)
2. (AB7, AB6, one word from the first CSA) and the other three level-1 words
3. one word from the first level-2 CSA plus both words of the second
4. the remaining level-2 word plus both level-3 words

A carry-propagate adder then sums the final two words. Sum and carry words
were assigned to the CSA inputs freely, because a 3:2 tree gives the same
product under any assignment.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 16 | taps |
| `L` | 8 | sample width (must be even) |
| `W` | 16 | weight, `d`, `y`, `e` width |
| `N2` | 1 | weight delay into the filter (must be ≥ 1) |
| `MU_SHIFT` | 4 | step size `mu = 2^−MU_SHIFT` |
| `lms_pkg::LMS_N1` | 2 | error-computation latency and depth of the sample delay for the update; it must equal the number of pipeline registers in `error_computation`, so change both together |

The defaults are in `rtl/lms_pkg.sv`. The structure is parameterised, but the
values themselves are this implementation's choice. The same holds for the
reset scheme, the absence of saturation and where the pipeline register sits.

## Where this departs from, or goes beyond, the reference structure

* **Word lengths, N, n1, n2, mu**: chosen here, as explained above.
* **Sample delay for the update**: drawn as a separate `n1`-cycle delay ahead
  of the weight-update block. Here the filter's own tapped delay line is
  extended by n1 registers and shared. The values are the same and fewer
  registers are needed.
* **Error delay**: the `n1`-cycle delay on the error is the error-computation
  block's own latency, not additional registers.
* **Pipeline cut**: one register between the adder trees and the shift-add
  tree, one on the error. A different cut, for example inside the adder
  trees for large N, would change n1 and need `d` and the sample delay
  adjusted to match.
* **Weight-update insides**: only known to be PPG-based. The per-cell
  PPG + shift-add-tree multiplier is the simplest such structure.
* **Not built**: multiple-constant multiplication (MCM) by shared shift-adds
  is mentioned as a technique but has no defined place in this filter, whose
  coefficients vary. The conventional DLMS structure with one lumped delay
  exists only as a point of comparison.

## Files

| file | contents |
|---|---|
| `rtl/lms_pkg.sv` | default sizes |
| `rtl/dlms_top.sv` | filter top plus Wallace multiplier |
| `rtl/error_computation.sv` | delay line, PPGs, adder trees, shift-add tree, error |
| `rtl/weight_update.sv` | N weight cells |
| `rtl/ppg.sv`, `rtl/ppg_decoder.sv`, `rtl/ppg_aoc.sv` | partial product generator |
| `rtl/adder_tree.sv`, `rtl/shift_add_tree.sv` | reduction trees |
| `rtl/delay_line.sv` | register chain |
| `rtl/wallace_multiplier.sv`, `rtl/csa.sv` | Wallace-tree multiplier |
| `tb/tb_*.sv` | one self-checking testbench per block |

## Simulation and verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>`. Each one has a
watchdog that counts a failure if the simulation hangs. For example:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/lms_pkg.sv tb/tb_dlms_top.sv --top-module tb_dlms_top
./obj_dir/Vtb_dlms_top
```

* `tb_dlms_top` runs the top at its default parameters as a
  system-identification test. A random 16-tap plant produces `d` from random
  samples. The testbench checks `y_out`, `e_out` and all 16 weights every
  cycle against an independent integer model of the two recursions above.
  This also pins the latencies: `y(n−1)` on `y_out`, `e(n−2)` on `e_out`,
  and the filter computing with `w(n−1)`. The run takes
  4000 cycles. At the end the mean error must have fallen by at least 20×
  (typically from about 2800 to about 40 LSBs), and every weight must be
  within 64 LSBs of the plant's coefficient. The test also counts weight
  updates, negative samples (which exercise the signed top digit), errors of
  both signs and Wallace products, and fails if any of these never happens.
* `tb_error_computation` and `tb_weight_update` check those blocks
  cycle-exactly with random inputs. Full-scale and wrapping values are
  included.
* `tb_ppg` covers all 256 sample values against random and extreme
  multiplicands. `tb_wallace_multiplier` is exhaustive.
* `tb_adder_tree` and `tb_shift_add_tree` test the default size and a size
  that is not a power of two.

For each block, a deliberately broken variant was confirmed to make its
testbench fail.

Not verified: behaviour under overflow of `y` or of the weights beyond
matching the wrap-around model, and timing or area of any synthesized
netlist.
