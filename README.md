# Dual-state systolic RLS array and look-ahead Huffman decoders

This repository holds two independent pieces of signal-processing hardware in SystemVerilog.

1. **A sliding-window recursive least-squares (RLS) processor.** It keeps the QR
   factor of the last `L` rows of a data matrix. On every data clock it adds the newest row
   and removes the oldest one. One triangular systolic array does both jobs: its processors
   switch between a Givens rotation (adding a row, "updating") and a hyperbolic rotation
   (removing a row, "downdating") on alternate clocks. Along the way the array also delivers
   the newest optimal residuals.
2. **Huffman decoders for a five-symbol example code.** The first is the plain bit-serial
   finite-state machine. The other two use look-ahead. A pipelined decoder still reads one
   bit per clock, but its state loop is spread over `M` registers. A block decoder reads
   `M` bits per clock, yet its feedback loop is still a single small Boolean
   matrix-vector product.

The two designs share only the clock and reset in `design_top`. A Viterbi decoder of the
same decoder family is not included (see "Not included").

---

## 1. Sliding-window least squares

### The problem

A window holds the `L` most recent rows `[x_k^T : y_k]`, where `x_k` has `P` entries. The
task is to find the weight vector `w` that minimises `||X w - y||` over that window, and to
keep it current as the window slides forward. The array does not store `X`. It stores the
upper-triangular Cholesky factor `R` (`P x P`) and the rotated right-hand side `u`, so that
`R^T R = X^T X` and `R^T u = X^T y` over the window. The weights could be found from
`R w = u` by back-substitution, but this design does not compute them. It outputs `[R : u]`
and the residuals instead.

Sliding the window by one row takes two steps:

* **Update** with the new row `[x_{n+1} : y_{n+1}]`. The array applies `P` Givens rotations.
  Each one zeroes one element of the new row against the matching diagonal element `r`:
  `r' = sqrt(r^2 + x^2)`, `c = r/r'`, `s = x/r'`. The elements further along the row are
  rotated with `r' = c r + s x` and `x' = -s r + c x`.
* **Downdate** with the row that leaves, `[x_{n+1-L} : y_{n+1-L}]`. The array applies `P`
  hyperbolic rotations: `r' = sqrt(r^2 - x^2)`, `c = r/r'`, `s = x/r'`. The elements further
  along the row are rotated with `r' = c r - s x` and `x' = -s r + c x`.

The two steps use the same datapath. They differ in one sign in the norm and one sign in
the rotation of `r`. So a single control bit (`rls_pkg::rot_mode_e`) is enough to switch
every processor between the two modes.

### The triarray (`rls_triarray`)

```
 column:   0      1      2      3      4 (= y / u)
 row 0    [B]----(I)----(I)----(I)----(I)
           \      |      |      |      |
 row 1      `-->[B]----(I)----(I)----(I)
                  \      |      |      |
 row 2             `-->[B]----(I)----(I)
                         \      |      |
 row 3                    `-->[B]----(I)
                                       |
                                    v ---> [residual multiplier] --> e
                            gamma -------^
```

* `[B]` is `rls_boundary_cell`, the diagonal processor. It stores one diagonal element of
  `R`, generates `(c, s)` and sends them to the right. It also multiplies the running
  product of cosines `gamma` by its own `c` and passes the result down the diagonal.
* `(I)` is `rls_internal_cell`. It stores one element of `[R : u]`, applies `(c, s)`, sends
  the rotated `x'` down and passes `(c, s)` on to the right.
* Every cell registers its outputs. Cell `(i, j)` therefore sees a given wavefront `i + j`
  clocks after cell `(0, 0)` did. Input column `j` must be delayed by `j` clocks (skewed) so
  that each row arrives as a diagonal wavefront.
* The `gamma` path between diagonal cells has one extra register. This keeps it in step with
  the data, which needs two hops (one right, one down) to reach the next diagonal cell.

**Why the processors flip state every clock.** Wavefronts enter on every processor clock, in
the order update, downdate, update, and so on. The mode bit travels with each wavefront, so
each processor changes mode on every clock. At any one moment, a processor and its
horizontal or vertical neighbours are working on consecutive wavefronts. That puts them in
opposite modes, while diagonal neighbours share a mode. The whole array thus looks like a
checkerboard of Givens and hyperbolic processors, and the pattern inverts every clock.
Assertions in `rls_triarray` check this property for horizontal and vertical neighbours on
every clock.

### Window buffers, selection switches and the data clock (`rls_dual_state_array`)

The processors run at twice the input data rate, so each data clock is two processor
clocks long. `rls_frontend_ctrl` keeps track of which half is which:

| processor clock | `phase` | what enters column `j` (before the skew)                 |
|-----------------|---------|----------------------------------------------------------|
| t               | 0       | downdate of the previous data clock's old row; `in_ready`=1, a new row may be accepted |
| t+1             | 1       | update with the row accepted at `t`                      |
| t+2             | 0       | downdate with the row that row replaced in the window    |

Each of the `P+1` columns has a window buffer (`rls_window_buffer`), which is an `L`-word
circular memory. All columns share one write pointer. A buffer reads before it writes, so
while it stores `x(n+1)` it shows the word being overwritten, `x(n+1-L)`. That word is
exactly the sample that must be downdated. The column's selection switch
(`rls_select_switch`) captures both samples when the row is accepted. It then emits the new
sample (tagged update) in phase 1 and the old sample (tagged downdate) in the next phase 0.
The skew chain (`rls_skew_delay`) comes after the switch.

Not every slot carries data. No row is offered on some data clocks. During the first `L`
rows the window is still filling and nothing is old enough to downdate. In both cases the
slot still passes through the array with its mode bit, but with `valid` low. Processors
leave their stored value alone for such a slot.

### Residuals (`rls_residual_cell`)

The element that leaves the bottom of the `u` column is `v`. It meets the cosine product
`gamma` of the same wavefront, and the residual multiplier puts out `e = -gamma * v`:

* For an **update** wavefront, `e_u1(n+1) = x_{n+1}^T w - y_{n+1}`. Here `w` is the
  least-squares solution over `L+1` rows (the old window plus the new row), because the
  downdate has not happened yet.
* For a **downdate** wavefront, `e_2(n+1) = x_{n+1-L}^T w' - y_{n+1-L}`. Here `w'` is the
  solution over the new window of `L` rows: the residual of the departing row after it has
  been removed.

The residual convention is `e = X w - y`. `e_mode` says which of the two residuals `e_out`
holds. The a-posteriori residual of the new row on exactly `L` rows cannot be taken from
the array, and it is not produced.

**Timing.** A row is accepted in a clock where `in_valid && in_ready`. Its update residual
appears `2P+2` clocks later, and its downdate residual one clock after that. Input
throughput is one row per two clocks.

### Number format and numerical limits

All array arithmetic is signed fixed point, `FX_W = 32` bits with `FX_F = 16` fraction bits
(set in `rls_pkg`). The boundary cell computes its square root and two divisions
combinationally in one clock. This gives the simplest and most readable cell, not the
fastest one. A real implementation would pipeline it or use CORDIC rotations.

Keep the inputs well inside ±1.0. With `L = 16` the elements of `R` then stay within a few
units, and the rotation parameters stay in range. Hyperbolic rotations are not
unconditionally stable. If `r^2 - x^2 <= 0` the boundary cell cannot downdate, which can
happen when the data are inconsistent with `R` (for example, after `clear`) or from
round-off on ill-conditioned data. In that case the cell keeps `r`, passes the identity
rotation and raises `dd_fail` for one clock. Repeated up/downdating in fixed point also
makes `R` drift slowly. In the tests, `R^T R` stays within about 0.5 % of the window sums
after 100 slides, and the residuals stay within 1e-3 of a floating-point least-squares
solve.

### Interface of `rls_dual_state_array`

| port | dir | meaning |
|------|-----|---------|
| `in_valid`, `in_ready` | in/out | handshake; `in_ready` is high every other clock |
| `in_x[P]`, `in_y` | in | new row, `rls_pkg::fx_t` |
| `e_valid`, `e_mode`, `e_out` | out | residual, with `ROT_UPDATE` or `ROT_DOWNDATE` |
| `dd_fail` | out | some boundary cell could not downdate |
| `r_mat[P][P+1]` | out | stored `[R : u]`; entries below the diagonal are constant zero |
| `clear` | in | zero `R`, only when no rows are in flight; it does not empty the window buffers |

---

## 2. Huffman decoders

### The code and its state machine (`huffman_fsm_decoder`)

The five symbols have probabilities 0.5, 0.25, 0.1, 0.1 and 0.05. Their code words are
`a:0`, `b:10`, `c:110`, `e:1110` and `d:1111`, which gives an average length of 1.9 bits.
Decoding is a walk down the code tree, so it can be written as a four-state machine with a
one-hot row vector `s = [S1 S2 S3 S4]`. `S1` is the root, and `S2`, `S3` and `S4` follow
the prefixes `1`, `11` and `111`. Each step is `s(n+1) = s(n) T(x(n))`, a Boolean
vector-matrix product:

```
        | ~x  x  0  0 |        S1: 0 -> a, back to S1;  1 -> S2
   T =  | ~x  0  x  0 |        S2: 0 -> b;              1 -> S3
        | ~x  0  0  x |        S3: 0 -> c;              1 -> S4
        |  1  0  0  0 |        S4: 0 -> e, 1 -> d; always back to S1
```

The decoder reads one bit per clock. Its outputs are five one-hot flags, each high in the
clock in which the last bit of that symbol's code word is read. These are Mealy outputs of
`s(n)` and `x(n)`. `bit_valid` low holds the state.

### Look-ahead pipelined decoder (`huffman_pipelined_decoder`)

In the plain machine the state must be ready one clock after it was computed, so the
feedback loop cannot be pipelined. Look-ahead removes this limit by expressing the state
in terms of the state `M` bits earlier:

```
s(n+1) = s(n+1-M) * W(n),    W(n) = T(n+1-M) T(n+2-M) ... T(n)
```

`W(n)` depends only on the last `M` input bits. A feed-forward stage computes it from a
bit-history register, outside the loop, and registers it. The loop now spans `M` clocks and
so holds `M` registers. One register sits between the AND terms `s_i & W_ij` and the OR
that forms the next state. The other `M-1` registers hold the state history that supplies
`s(n+1-M)`. The decoder still takes one bit per clock, and the flags of each bit appear
exactly two clocks later. At reset the bit history is filled with zeros and all states are
set to `S1`. Because a `0` bit sends every state back to `S1`, this is the same as having
started in `S1`. The loop advances only on valid bits, so idle clocks can come at any time.

### Look-ahead block decoder (`huffman_lookahead_decoder`)

Applying the update `M` times gives `s(n+M) = s(n) T(n) T(n+1) ... T(n+M-1)`. The product of
the `M` matrices depends only on the input bits, not on the state. It can therefore be
computed ahead of time, outside the feedback loop. The loop that remains is always one
4x4 Boolean vector-matrix product, whatever `M` is. That is what lets the decoder read `M`
bits per clock without a longer critical path in the loop.

* **Stage 1 (feed-forward).** This stage builds the prefix products `P_k = T(n)...T(n+k-1)`
  for `k = 1..M`, incrementally with `P_{k+1} = P_k T(n+k)`, and registers them.
* **Stage 2 (loop).** This stage computes `s(n+M) = s(n) P_M`. The state inside the block,
  `s(n+k) = s(n) P_k`, yields the flags of bit position `k`, using the same output rule as
  the serial machine.

Code words may cross block boundaries freely. Bit 0 of `blk_bits` is the earliest bit. The
flags appear two clocks after the block, and the decoder takes one block per clock. With
`M = 4` it reads four code bits per clock, about two symbols per clock on average. The loop
logic is a 4-input OR-of-ANDs per state bit. The prefix-product logic grows linearly with
`M` and could be cut further by logic minimisation, which is left here to the synthesis
tool.

---

## 3. Not included

* **Viterbi decoder.** A pipelined Viterbi decoder that uses look-ahead and decomposition
  belongs to the same family of tree-based decoders. It is not part of this RTL, because
  its code, trellis and datapath are not specified here.
* **Weight extraction.** `w` is not computed. `R w = u` can be solved by back-substitution
  from `r_mat`.

## 4. Choices of this design

These points are this design's choices rather than part of the original architecture:

* Sizes: `P = 4`, `L = 16` and `M = 4`. The architecture itself is defined for any `P`,
  any `L > P` and any `M`.
* Number format: Q15.16 fixed point. The cell arithmetic is computed in one clock.
* Behaviour on an impossible downdate (`dd_fail`).
* Empty (`valid` low) slots. These cover rows that are not offered and the downdates
  while the window fills. The original algorithm assumes the window is already full.
* The `in_valid`/`in_ready` handshake and the `clear` input.
* The pipeline stages of the two look-ahead Huffman decoders and where their loop
  registers sit. The serial decoder's Mealy flags and the `bit_valid` inputs.
* Cells use an asynchronous active-low reset. The Huffman decoders reset synchronously.

## 5. Files

| file | contents |
|------|----------|
| `rtl/rls_pkg.sv` | fixed-point format, wavefront and rotation structs, `fx_mul`, `fx_div`, `fx_isqrt` |
| `rtl/rls_boundary_cell.sv`, `rtl/rls_internal_cell.sv` | the two processor types |
| `rtl/rls_triarray.sv` | the triangular array |
| `rtl/rls_window_buffer.sv`, `rtl/rls_select_switch.sv`, `rtl/rls_frontend_ctrl.sv`, `rtl/rls_skew_delay.sv` | front end |
| `rtl/rls_residual_cell.sv` | residual multiplier |
| `rtl/rls_dual_state_array.sv` | complete RLS processor |
| `rtl/huffman_pkg.sv` | `T` matrix, Boolean products, output rule |
| `rtl/huffman_fsm_decoder.sv`, `rtl/huffman_pipelined_decoder.sv`, `rtl/huffman_lookahead_decoder.sv` | the three decoders |
| `rtl/design_top.sv` | both designs side by side |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_rls_ref_pkg.sv` (floating-point least-squares reference) |

## 6. Simulating

Every testbench prints `TB_RESULT checks=N failures=F` and stops itself. A watchdog stops it
if it hangs. The RLS testbenches compare against a floating-point least-squares solve in
`tb_rls_ref_pkg`, not against a copy of the fixed-point arithmetic. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rls_pkg.sv rtl/huffman_pkg.sv tb/tb_rls_ref_pkg.sv tb/tb_design_top.sv \
    --top-module tb_design_top -o sim
./obj_dir/sim
```

`tb_design_top` runs the whole design at its default parameters. It sends 100 rows through
the RLS processor and checks every update and downdate residual and its latency. It then
clears `R` to provoke impossible downdates. It also decodes about 600 random symbols with
all three Huffman decoders. It counts each mechanism (updates, downdates, empty downdate slots,
back-to-back rows, flagged downdates, every symbol, code words that cross blocks, idle
clocks) and fails if any count is zero. All the testbenches pass. Each one has also been
checked against a deliberately broken copy of its module and fails as it should.

To change a size, override the parameters of `design_top` (`P`, `L`, `M`). To change the
number format, edit `FX_W` and `FX_F` in `rls_pkg`. The testbench tolerances assume
16 fraction bits.
