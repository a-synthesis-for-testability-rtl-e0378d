# Split-coded FSM with clock control: a testable modulo-N counter

A finite state machine is hard to test when its states are far apart: to
reach a state that excites a fault, a test generator may have to clock the
machine through most of its state graph. Scan removes the problem by making
every flip-flop loadable, at the cost of a mux per flip-flop and test
sequences that pass through states the machine never uses.

This design takes another route. Its flip-flops are split into two fixed
groups, **alpha** and **beta**, and one extra input **C** freezes the beta
group:

* `C = 0`: both groups load. The machine takes its normal transition,
  `<a1,b1> -> <a2,b2>` (an *alpha-beta transition*).
* `C = 1`: only the alpha group loads. The machine goes to `<a2,b1>`
  (an *alpha transition*), a state it could not reach in one step before.

Freezing half the register only helps if the state codes are chosen so that
the new alpha transitions are useful shortcuts. The state codes here come from
a **split-code**, a numbering of states under which the alpha transitions
turn a long cycle of states into something close to a barrel-shifter network.
Two extra outputs, **P1** and **P2**, then make every state identifiable from
a short, fixed input sequence.

The scheme is the one of K. L. Einspahr, S. K. Mehta and S. C. Seth, "A
Synthesis for Testability Scheme for Finite State Machines Using Clock
Control" (1999). This RTL implements it for a machine whose state graph is one cycle:
a modulo-N counter. The default is a modulo-10 counter encoded with the
split-code S(3,2), with 4 flip-flops.

## Split-codes

A split-code S(m,k), with `0 < k <= m`, is a sequence of pairs
`<alpha, beta>` with `0 <= alpha < m` and `0 <= beta < 2^k`:

```
<alpha^0, beta^0>         = <0, 0>
<alpha^(j+1), beta^(j+1)> = <alpha^j + 1 mod m,  beta^j + 2^(alpha^j) mod 2^k>
```

Alpha counts round `0 .. m-1`. Each time alpha passes through value `i < k`,
beta is incremented by `2^i`; for `alpha >= k` beta does not change. After
`m` steps alpha is back where it started and beta has been incremented by
`2^0 + ... + 2^(k-1) = 2^k - 1`, i.e. it has been **decremented by one**. So
the sequence visits all `m * 2^k` pairs exactly once before it repeats. For
S(3,2):

| index | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|
| pair | 0,0 | 1,1 | 2,3 | 0,3 | 1,0 | 2,2 | 0,2 | 1,3 | 2,1 | 0,1 | 1,2 | 2,0 |

State `S_j` of the counter is given pair `j`. Alpha is stored in its own
`ceil(log2 m)` flip-flops and beta in `k` flip-flops, each under some binary
code. Which binary code is used does not change the state graph, only the
logic size.

### Why the alpha transitions are shortcuts

From state `<alpha, beta>` the normal step goes to
`<alpha+1, beta + 2^alpha>`; the alpha transition goes to `<alpha+1, beta>`,
i.e. it **skips the increment of beta bit `alpha`**. In index terms, it jumps
forward by `1 + m * 2^alpha` states instead of 1 (for `alpha < k`). Any
target can therefore be reached by first stepping normally until alpha has
the target's value (fewer than m steps), and then walking alpha once round
its range (m steps) while choosing, for each bit position, whether to add
that power of two to beta: normal step where the difference of the two beta
values has a 1, alpha step where it has a 0. Between two states of a cycle
of `N = m * 2^k` states this gives a path of at most `2m - 1` steps, where
the plain counter needs up to `N - 1`.

When `N < m * 2^k`, the last state `S_(N-1)` returns to `S_0` instead of to
the next pair, and the `m * 2^k - N` leftover pairs are not counter states.
The bound becomes `4m - 1` (run to the end of the cycle, wrap, start again).

### Choosing m and k

`m * 2^k >= N` is needed. The smallest register is obtained with
`k + ceil(log2 m) = ceil(log2 N)`, and a small m keeps the paths short. A
practical rule is to take the k listed below and `m = max(k, ceil(N / 2^k))`:

| N | 2-6 | 7-20 | 21-48 | 49-112 | 113-288 | 289-640 | 641-1408 | 1409-3072 |
|---|---|---|---|---|---|---|---|---|
| k | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |

Examples: N = 10 gives k = 2, m = 3 (4 bits); N = 185 gives k = 5,
m = max(5, 6) = 6 (3 + 5 = 8 bits, the same as a binary counter). These
values are set by the user through the parameters; the RTL does not compute
them.

## The modulo-10 example

With the default encoding `ENC_EXAMPLE`

| alpha | code |   | beta | code |
|---|---|---|---|---|
| 0 | 00 | | 0 | 11 |
| 1 | 11 | | 1 | 01 |
| 2 | 01 | | 2 | 10 |
|   |    | | 3 | 00 |

the register `{alpha_code, beta_code}` runs through
`S0..S9 = 0011 1101 0100 0000 1111 0110 0010 1100 0101 0001`.
The alpha transitions of the ten states are:

| from | pair | C=1 goes to |
|---|---|---|
| S0 | 0,0 | S4 (1,0) |
| S1 | 1,1 | S8 (2,1) |
| S2 | 2,3 | S3, same as the normal step |
| S3 | 0,3 | S7 (1,3) |
| S4 | 1,0 | unused pair (2,0) |
| S5 | 2,2 | S6, same as the normal step |
| S6 | 0,2 | unused pair (1,2) |
| S7 | 1,3 | S2 (2,3) |
| S8 | 2,1 | S9, same as the normal step |
| S9 | 0,1 | S9 itself (the wrap to S0 keeps alpha at 0) |

The unused pairs (indices 10 and 11) continue along the split-code, so from
them the counter returns to S0 within two clocks with C = 0. With these transitions the
longest shortest path between two counter states drops from 9 to 6 and the
average (over all ordered pairs, a state to itself counting 0) from 4.5 to
2.63. The original account of this example gives 6.0 and 2.7; the
difference in the average is not resolved. If paths are not allowed through
the unused pairs, the figures are 7 and 2.82.

## Clock control

`split_state_reg` holds the two groups and offers two ways to freeze beta,
chosen by the `STYLE` parameter:

* `CC_MUX` (default): a 2:1 mux in front of every beta flip-flop, `C` as
  select. `C = 0` passes the next-state bit, `C = 1` feeds back the
  flip-flop's own output. The clock tree is untouched; the cost resembles a
  scan mux, but one mux input is local.
* `CC_GATE`: the beta flip-flops run on a gated clock from
  `beta_clock_gate`. No logic is added in the data path. The original scheme
  places a tri-state buffer controlled by C in the beta clock branch; since a
  floating clock net has no two-state model, this RTL uses the usual
  latch-and-AND clock gate. It has the same function, and the latch keeps a
  change of C during the high phase of the clock from cutting a pulse. Expect
  a latch warning on it.

Both styles give identical cycle behaviour (the end-to-end test runs them in
lock-step). `C` is a synchronous input: set it before the rising edge it is
meant for.

## Observability: P1, P2 and the distinguishing sequence

```
P1 = bit alpha of beta     (0 when alpha >= k)
P2 = (alpha == 0)
```

Holding `C = 1` for m clocks moves alpha once round its range with beta
frozen, and in a cycle of `N = m * 2^k` states the counter ends where it
started. Reading (P1, P2) before each of these clocks:

* P2 is 1 exactly once, at step `j`; the start alpha is `(m - j) mod m`.
* Step `t` shows bit `(alpha + t) mod m` of beta; bits `>= k` read 0.

Example, S(3,2), starting in `<1,3>`: responses `(1,0) (0,0) (1,1)`.
P2 = 1 at j = 2, so alpha = 1; step 0 gives bit 1 = 1, step 2 gives bit 0 =
1, so beta = 3. The same m-clock sequence identifies every state, is only m
long (about log2 N), and leaves the machine in its start state. When
`N < m * 2^k` it may pass through unused pairs or stop at the wrap, so it is
a strong aid rather than a guaranteed identification.

## The top module: `splitcode_counter`

| parameter | default | meaning |
|---|---|---|
| `N` | 10 | number of counter states, `2 <= N <= M * 2^K` |
| `M` | 3 | split-code parameter m (alpha range) |
| `K` | 2 | split-code parameter k (beta width) |
| `ENC` | `ENC_EXAMPLE` | binary codes of alpha/beta: `ENC_EXAMPLE` (table above, only for M=3, K=2) or `ENC_BINARY` (plain binary) |
| `STYLE` | `CC_MUX` | clock-control implementation, see above |

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous active-low reset to S0 |
| `c` | in | 1 | clock control: 0 normal step, 1 alpha step (beta held) |
| `alpha_code` | out | `max(1, ceil(log2 M))` | alpha flip-flops |
| `beta_code` | out | `K` | beta flip-flops |
| `count` | out | `max(1, ceil(log2 N))` | index j of the current state S_j, 0 if unused pair |
| `state_valid` | out | 1 | register holds one of the N counter states |
| `p1`, `p2` | out | 1 | observability outputs |

Timing: the state changes on the rising edge of `clk`; `count`,
`state_valid`, `p1` and `p2` are decoded combinationally from the state.
The counter advances every clock; there is no enable.

Inside: the state codes are decoded to alpha and beta values,
`splitcode_step` forms the split-code successor, a compare on the pair of
`S_(N-1)` substitutes `<0,0>`, the result is encoded again and loaded into
`split_state_reg`. `obs_logic` produces P1/P2 from the decoded values
(with `ENC_BINARY` it is exactly a k-input mux addressed by the alpha bits
and a zero-detect on them).

Other choices made in this RTL, beyond the scheme itself: the asynchronous
reset, the `count` and `state_valid` outputs, the behaviour of unused pairs
(they follow the split-code), and the decoding of an alpha code word that
belongs to no alpha value (it reads as alpha = 0). P1 and P2 are defined as
state decodes, i.e. Moore outputs.

## Files

| file | contents |
|---|---|
| `rtl/splitcode_pkg.sv` | enums for `STYLE` and `ENC`, code/decode and split-code functions |
| `rtl/splitcode_step.sv` | split-code successor (combinational) |
| `rtl/split_state_reg.sv` | alpha/beta register with clock control |
| `rtl/beta_clock_gate.sv` | gated clock for the beta group (`CC_GATE`) |
| `rtl/obs_logic.sv` | P1/P2 |
| `rtl/splitcode_counter.sv` | top: split-coded modulo-N counter |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_splitcode_counter_full` (top with no overrides) and `tb_splitcode_counter_table2` (larger sizes) |
| `tb/splitcode_counter_checker.sv` | reusable driver/checker for counters of any size |

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
through a watchdog if it hangs.

* `tb_splitcode_step`: the S(3,2) walk against the table above, exhaustive
  check of the recurrence for S(3,2) and S(5,3), and for S(5,3) that all 40
  pairs are distinct, the walk closes after 40 steps, and m steps lower beta
  by one.
* `tb_obs_logic`: exhaustive P1/P2 for S(3,2) and S(5,3), and the `<1,3>`
  example response.
* `tb_split_state_reg`: both styles against a reference model under random
  data and C, with an asynchronous reset in mid-cycle.
* `tb_beta_clock_gate`: no clock pulse while C = 1, no clipped or extra pulse
  when C changes in the high phase, pulse count equals the number of edges
  with C = 0.
* `tb_splitcode_counter` (top, default parameters): 3000 random cycles
  against a table model, with the mux and gated versions in lock-step and a
  modulo-12 instance; the distinguishing sequence from all 12 states of the
  modulo-12 counter; then the state graph is explored through the outputs
  and the distances above (9/4.5 and 6/2.63 for modulo-10; 11/5.5 and
  5/2.67 for modulo-12) are checked. It also counts normal steps, alpha
  steps that add a new edge, alpha self-loops, wraps, entries into unused
  pairs and identifications, and fails if any never happened.
* `tb_splitcode_counter_full`: the top with no parameter overrides: two
  full counting cycles against the codes listed above, one alpha step from
  each state, the path S6 -> S7 -> S2 -> S3 -> S4 (normal, alpha, alpha,
  normal step), and 2000 random cycles against the table model.
* `tb_splitcode_counter_table2`: N = 185 with S(6,5) (longest distance 13,
  within 4m - 1 = 23) and N = 192 (distinguishing sequence on all 192
  states, longest distance 11 = 2m - 1).

Run one with Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/splitcode_pkg.sv tb/tb_splitcode_counter.sv --top-module tb_splitcode_counter
./obj_dir/Vtb_splitcode_counter
```

Each testbench runs in well under a second.

## Scope and limits

* Only the counter (a single-cycle state graph) is built. The scheme itself
  applies to any FSM: cover its state graph with as few disjoint paths as
  possible, give consecutive states along the paths consecutive split-code
  pairs, and synthesize the next-state logic from that assignment. That
  design flow (path cover, logic synthesis) is software and is not part of
  this RTL; `split_state_reg` and `obs_logic` are the pieces a general FSM
  would reuse, with its own next-state logic in place of `splitcode_step`.
* The tri-state clock buffer of the clock-distribution variant is replaced by
  a latch-based clock gate, as explained above.
* For `N < M * 2^K` an alpha step can leave the counter's states (from S4 and
  S6 in the modulo-10 example); the machine comes back along the split-code.
  Only for `N = M * 2^K` do all shortcuts stay inside the counter.
* `ENC_EXAMPLE` is defined only for M = 3, K = 2; other sizes use
  `ENC_BINARY` (an elaboration error reports a mismatch).

To change the counter, set `N`, `M`, `K` (from the table above) and
`ENC = ENC_BINARY`. To use another binary assignment, extend `alpha_enc` /
`beta_enc` in the package; decoding follows automatically.
