# Truncated arithmetic circuits with profile-based output padding

Cutting the least significant cells out of an arithmetic array is the
cheapest way to trade accuracy for area and power, but it biases the result:
the dropped cells would, on average, have contributed a positive amount, so
the truncated result is systematically too small. This design removes that
bias at almost no cost. Where the dropped cells used to produce bits, the
circuit outputs (or adds) a constant, the **padding**, equal to the mean value
of what was dropped under uniformly distributed operands. The error of each
individual result is unchanged in spread, but its distribution is moved back
so that it is centred on zero: the average signed error drops from
−(mean of dropped part) to a fraction of one LSB.

The scheme is applied to three signed/unsigned integer circuits, all
combinational:

| circuit | module | what is truncated | padding |
|---|---|---|---|
| ripple-carry adder, run-time tunable | `tunable_trunc_adder` | low k sum cells (k ≤ N/2), power gated | k ones, value 2^k − 1 |
| Baugh-Wooley array multiplier | `bw_trunc_multiplier` | low K columns (vertical) or low K rows (horizontal) of partial products | ⌊((K−1)·2^K + 1)/4⌋ vertical, ⌊(2^(N+1)−1)(2^K−1)/4 + 2^N⌋ horizontal |
| non-restoring array divider | `nr_trunc_divider` | last K rows (the K quotient LSBs) | 2^(K−1) in the K quotient LSBs |

and two application datapaths are built from them: a multiply-accumulate
unit for matrix multiplication (`mm_pe`) and a pixel-ratio divider for change
detection between video frames, both brought out side by side by `approx_top`.

## Where the padding values come from

The padding is the expected value of the removed part, so it can be derived
per circuit (the formulas live in `rtl/approx_pkg.sv`):

* **Adder.** With the low k cells gone, the result is
  `(A_hi + B_hi)·2^k + pad` while the exact one is `(A_hi + B_hi)·2^k + A_lo + B_lo`.
  The error is `pad − (A_lo + B_lo)`; the truncated sum is symmetric around
  2^k − 1, so `pad = 2^k − 1` (all ones) gives a mean error of exactly 0.
* **Multiplier, vertical.** Columns 0..K−1 of the array are removed. Row i
  loses K−i partial-product bits, each 1 with probability 1/4, so the mean
  loss is Σ(2^K − 2^i)/4 = ((K−1)·2^K + 1)/4. Rounded down: K = 1..4 give
  0, 1, 4, 12, leaving a mean error of −0.25.
* **Multiplier, horizontal.** Rows 0..K−1 are removed. A row of the
  Baugh-Wooley array has mean (2^(N+1) − 1)/4 (its sign position holds a NAND,
  which is 1 three times out of four), row i is weighted by 2^i, and the
  2^N correction constant of the signed array goes with the first row. For
  N = 8 this gives 383, 639, 1150, 2172 for K = 1..4.
* **Divider.** Dropping the last K rows leaves the quotient `Q'` of the
  upper bits, with the K low quotient bits `Q''` missing. Under uniform
  operands `Q''` averages (2^K − 1)/2, so the padding 2^(K−1) leaves a constant
  mean error (exact − approximate) of −1/2.

These numbers assume uniform operands. For another input distribution the
same procedure applies: simulate the truncated circuit on representative
data, record the mean signed error, and use it as the padding. The adder takes
its padding as an input for exactly this reason; the multiplier takes it as a
parameter (`PAD`), defaulting to the formula above.

## The tunable adder and power gating

`tunable_trunc_adder` is an N-bit ripple-carry adder. Its N/2 low cells are
`pg_full_adder` cells: full adders with a gating input `con` that, when high,
forces both outputs to 0. This stands for a CMOS gate with a PMOS in series
with its pull-up network and an NMOS across its pull-down network: the gate
stops switching and its output is held low, which is where the power saving
comes from. Only that logic effect is modelled; the transistors themselves
and the pull-up networks that hold the selectors are not RTL.

Behind each gated cell a multiplexer, selected by the same `con[i]`, outputs
either the cell's sum (`con[i] = 0`) or padding bit `pad[i]` (`con[i] = 1`).
A gated cell produces no carry, so the first live cell starts from carry 0.
Truncation is limited to the lower half of the word. The usual setting for
truncation level k is `con = pad = {k{1'b1}}`; other masks work and are
simply "those cells off". The sum is N+1 bits, sign-extended, so it never
wraps. If the truncation level never changes, tie `con` and `pad` to
constants: synthesis then removes the gated cells and multiplexers and the
padding becomes hard-wired low bits, the cheaper fixed-k form of the same
adder.

## The Baugh-Wooley multiplier and its two truncation styles

For N-bit two's-complement operands, the Baugh-Wooley scheme writes the
product as a sum of N rows of N partial-product bits plus the constant
2^N + 2^(2N−1). Row r is `a[j] & b[r]` at weight 2^(r+j), except that a bit
with exactly one sign operand (`j = N−1` or `r = N−1`, not both) is a NAND.

`bw_trunc_multiplier` builds this as an array of `bw_ppc` cells, one row per
multiplier bit. Each cell adds its partial product to the sum coming from the
cell above and the carry from the cell to its right, so each row is a
ripple-carry adder and the carry out of a row's leftmost cell becomes the next
bit of the running sum. After the array, one adder adds the Baugh-Wooley
constant and the padding.

Truncation is a parameter (`K`, `MODE`). A removed cell is not generated: its
sum input passes straight down and it produces no carry.

* `TRUNC_VERTICAL`: cells with `r + j < K` are removed, i.e. a triangle of
  K(K+1)/2 cells in the K low product columns.
* `TRUNC_HORIZONTAL`: the K low rows (K·N cells) and the 2^N constant are
  removed. Far more logic goes, and the error spread (not its mean) is much
  larger, since whole rows carry high-weight bits.

The padding is added rather than concatenated because it can be wider than K
bits (vertical K = 8 gives 448).

## The non-restoring divider with truncated rows

`nr_trunc_divider` divides a 2N-bit unsigned dividend by an N-bit unsigned
divisor; the quotient must fit N bits (`a[2N−1:N] < d`, and `d ≠ 0`),
otherwise the outputs are meaningless. Row i of the array shifts the (N+1)-bit
two's-complement partial remainder left, brings in dividend bit `a[N−1−i]`
and adds or subtracts `d` with N+1 `nr_div_cell` cells. A cell is a full
subtractor with an XOR on its divisor input; the row control `add` both
inverts the divisor bits and sets the initial borrow, so the same row
computes `x − d` or `x + d`. The first row subtracts; each following row adds
if the previous partial remainder was negative (non-restoring rule). The
quotient bit of a row is the inverted sign of its result.

Truncation removes the last K rows. The quotient's K low bits are then the
constant 2^(K−1), so the two low outputs of the default divider are constant
by design. A last row of the same cells adds `d` back to a negative remainder:
with K = 0, `r` is the exact remainder; with K > 0 it is the remainder of
`a[2N−1:K] / d`, which is of little use but well defined. This correction row
is a choice of this design; the scheme itself only concerns the quotient.

## The application datapaths (`approx_top`)

* **Matrix multiplication.** `P_ij = Σ_k A_ik·B_kj` is accumulated by
  `mm_pe`, which computes `S_out = A·B + S_in` with a 16-bit truncated
  multiplier (vertical, K = 4) and a 32-bit tunable adder. Feed `mm_s_out` back
  into `mm_s_in` for the next k. The adder truncation of 8 bits used for this
  unit is set by `mm_con = mm_pad = 16'h00ff`; `16'h0000` makes the adder
  exact. The running sum is 32 bits and wraps when it leaves that range.
* **Change detection.** Two frames are compared pixel by pixel through their
  ratio, computed by a 16-by-8 divider with K = 2. For 8-bit pixels, a ratio
  below one is formed as `(min << 8) / max`; unchanged regions give a
  constant value, moving regions do not.

The two paths share nothing. Everything is combinational: there is no clock,
no reset and no handshake; a result is valid one combinational delay after its
operands.

| parameter | default | meaning |
|---|---|---|
| `MM_N` | 16 | multiplier operand width (sum is 2·MM_N) |
| `MM_K` | 4 | multiplier truncation level |
| `MM_MODE` | `TRUNC_VERTICAL` | multiplier truncation style |
| `DIV_N` | 8 | divisor/quotient width (dividend 2·DIV_N) |
| `DIV_K` | 2 | truncated quotient bits |

## How far it has been checked

Every module has a self-checking testbench in `tb/` that compares against
results computed independently (from the signed product or quotient and the
definition of the removed cells, not from the RTL's structure):

* `tunable_trunc_adder_tb`: all 65536 operand pairs of the 8-bit adder, bit
  exact, k = 0..4. Over the 49152 pairs without overflow it reproduces the
  known error statistics of k = 2 for paddings 00/01/10/11 (zero-error counts
  3072/6144/9216/12288, worst errors −6/−5/−4/−3, mean distances
  3/2.125/1.5/1.25, mean errors −3/−2/−1/0) and mean errors
  −1/−3/−7/−15 without and 0 with padding for k = 1..4.
* `bw_trunc_multiplier_tb`: all 65536 pairs of 8-bit operands for the exact
  array and both truncation styles with K = 1..4, bit exact, and the exact
  mean errors: vertical −0.25/−1.25/−4.25/−12.25 without padding and −0.25
  with; horizontal −383.75/−639.25/−1150.25/−2172.25 without and
  −0.75/−0.25/−0.25/−0.25 with. 16-bit K = 4 and 8, both styles, on random
  operands.
* `nr_trunc_divider_tb`: 8-by-4 exhaustively for K = 0..3 (mean error exactly
  (2^K−1)/2 without and −1/2 with padding) and 16-by-8 on 100000 random pairs
  for K = 0, 1, 2, 4, and 32-by-16 on 20000 random pairs for K = 4, 8.
* `mm_pe_tb`, cell testbenches, and `approx_top_tb`, which runs the top at its
  default parameters: a 4×4 matrix product with the adder exact and
  truncated, 20000 random multiply-accumulate steps (with the adder truncated
  by 8 the padding cuts the mean error by a factor of about 60), and change
  detection on two synthetic 8×8 frames.

Three further testbenches run the evaluation workloads and report
statistics:

* `mult_workload_tb`: 8-bit K = 2, 4 and 16-bit K = 4, 8, both styles,
  1,000,000 random pairs each; the mean signed error must agree with −0.25
  within five standard errors. Horizontal truncation has a far larger
  spread, so its sample mean wanders (hundreds of LSB for 16-bit K = 8).
* `mm_workload_tb`: the multiply-accumulate unit with each multiplier
  variant and adder truncation 2, 4, 8 and 16, 1,000,000 random steps. The
  ratio |mean error with padding| / |mean error without| is printed and must
  be below 1; it ranges from about 0.0001 to 0.24. When the adder truncates
  more bits than the multiplier's padding occupies below them, part of that
  padding is cut off again (16-bit K = 8 vertical: 448 → 256 after an 8-bit
  adder truncation), so the cascaded unit keeps a residual bias of a few
  tens of LSB.
* `change_detection_tb`: two synthetic 64×64 frames with a moving square,
  divider K = 1, 2, 4: PSNR of the ratio image against the exact divider,
  about 50, 47 and 35 dB. Padding lowers the mean square error 2.5× at
  K = 2 and 6× at K = 4; at K = 1 it cannot help (the error is 0 or 1 in
  magnitude either way).

What is not covered: area, delay and power, which depend on a cell library,
and natural images.

## Departures and points to watch

* The multiplier's residual mean error with padding at K = 4, vertical, is
  −0.25 (12.25 − 12), by the formula and by exhaustive simulation, not −0.5.
  For K = 1, horizontal, the padding is 383, the formula value that leaves the
  −0.75 residual, not the 8-bit all-ones pattern 255.
* The divider is unsigned, although the scheme is described for signed
  arithmetic; its analysis and its uses (8-bit pixels) are unsigned.
* With random operands the low bits of a product are not uniform (even
  values are more common), so an adder padded with all ones after a
  multiplier leaves a small negative bias (about −4 LSB for 16-bit operands
  and k = 8). A padding profiled on the actual data removes it; this is what
  the `pad` input is for.

## Simulating

Each testbench is a module without ports that prints
`TB_RESULT checks=<n> failures=<n>` and finishes. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/approx_pkg.sv tb/approx_top_tb.sv \
          --top-module approx_top_tb -Mdir obj && obj/Vapprox_top_tb
```

Replace `approx_top_tb` by any other testbench in `tb/`. All finish in
seconds. The package `approx_pkg` must be read first; all other files are found
through `-Irtl -Itb`.

To change a configuration, override the parameters: `N`, `K`, `MODE` (and
optionally `PAD`) of `bw_trunc_multiplier`, `N` of `tunable_trunc_adder`,
`N`, `K` of `nr_trunc_divider`, or the `MM_*`/`DIV_*` parameters of
`approx_top`. The padding formulas follow the parameters automatically.
