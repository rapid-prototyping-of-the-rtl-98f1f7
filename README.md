# MMSE-VBLAST MIMO detector with a division-free Cholesky inversion

This is a pipelined hardware detector for a spatially multiplexed MIMO link.
N transmit antennas send independent BPSK symbols at the same time and
frequency. N receive antennas see the mixture `r = H s + n`. The detector
recovers `s` with the ordered MMSE-VBLAST algorithm (successive interference
cancellation):

1. Form `G = H^H H + sigma^2 I` for the channels that are still undetected.
2. Invert G, giving `Q = G^-1`.
3. Pick the channel j whose diagonal entry `Q(j,j)` is smallest. This is the
   channel with the lowest post-detection error.
4. Form the MMSE nulling vector `w = Q_j H^H` (row j of Q times `H^H`).
   Estimate that channel's symbol from `w r`.
5. Subtract the decided symbol times column j of H from r. Delete column j
   from H.
6. Repeat with one channel fewer, until every channel is decided.

Step 2 is the expensive one. Done directly it needs square roots (Cholesky)
and divisions (back substitution), and it runs N times per received vector on
shrinking matrices. This design removes every square root and every division:

- The Cholesky factorisation is done in fraction-free form.
- The triangular inverse is computed up to a common scale factor.
- The final division of the symbol estimate is replaced by a sign test.

Only multipliers, adders, shifters and comparators are left. The whole
detector is one feed-forward pipeline that accepts a new `(H, r)` every clock
cycle.

The default configuration is 4x4 with 24-bit signed samples. The same RTL
builds a 2x2 detector with `N=2, W=16`.

## Top level and data flow

```
 raw H, r ──► agc_scale ──► level_est(K=N) ──► level_est(K=N-1) ──► … ──► level_est(K=1)
               (×lambda)      │ decision, channel #     │                       │
                              ▼                         ▼                       ▼
                          delay lines ───────────────────────────────────► output register
                                                                         sym_neg[N], order[N]
```

Each `level_est` is one iteration of the algorithm above. Inside it:

| stage       | module        | cycles | what it does |
|-------------|---------------|--------|--------------|
| G matrix    | `gram_unit`   | 1      | `H^H H + sigma2 I`, normalised to the W-bit word |
| Cholesky    | `chol_ff`     | K      | fraction-free factor P and weights D |
| inversion   | `tri_inv`     | 1      | `X = pi * P^-1` (pi is the product of the pivots) |
| minimum     | `min_search`  | 1      | `Q(j,j) = sum_k D(k) abs(X(k,j))^2`, argmin |
| detection   | `null_detect` | 1      | row j of Q, w, BPSK sign, cancel, drop column j |

A level's latency is K+4 cycles. H, r and the list of original channel
numbers travel alongside the matrix pipeline in a K+3 deep delay line, so they
arrive at `null_detect` together with the selected index. The reduced problem
(H without column j, the cancelled r, the shorter channel list) is the next
level's input.

The top delays the decision of each level so that all N decisions leave
together. It also scatters them into `sym_neg[c]` by original channel number.

## The division-free Cholesky factorisation (`chol_ff`)

This is the heart of the design and the part that needs the most care.

**Fraction-free elimination.** Ordinary Cholesky divides every Schur
complement update by the pivot. The fraction-free form multiplies by the pivot
instead:

```
Y'(i,j) = Y(k,k) * Y(i,j) - Y(i,k) * conj(Y(j,k))        i >= j > k
```

Starting from `Y = G` and applying this for k = 0, 1, …, K-1 produces the
matrices A (= G), B-bar, C-bar, D-bar, … of the 4x4 case. Column k of the k-th
matrix becomes column k of a lower triangular matrix P. Each such column is
the true Cholesky column scaled by an accumulated product of pivots.

**What is left of the inverse.** Write `D(k)` for the product of the pivots
up to and including k: `D(0) = A11`, `D(1) = A11*B22`, `D(2) = A11*B22*C33`,
and so on. Then

```
G      ~  P diag(D)^-1 P^H
G^-1   ~  P^-H diag(D) P^-1
```

Here `~` means "equal up to one positive common factor". The common factor
does not matter, because the detector only compares diagonal entries of Q and
takes signs of products built from it. So `chol_ff` outputs P and the vector
D, and never takes a square root or a quotient.

**Keeping the numbers in range.** Without rescaling, the fraction-free entries
double their bit width with every stage. After the update, each Schur
complement is shifted right by one common amount `t(k)`, so that its largest
diagonal entry sits in `[2^(W-2), 2^(W-1))`. This is block floating point,
one exponent per stage. A common factor on a Schur complement rescales all
later columns of P; the weights make up for it. With a running scale d
(starting at 1):

```
D(k) = P(k,k) * d          d <- D(k) * 2^-t(k)
```

D is carried through the stages as a W-bit mantissa plus a 16-bit exponent.
At the last stage all D(k) are aligned to the largest exponent and leave as
plain W-bit numbers that share one scale. Weights far below the largest one
round to zero. Their channels then contribute almost nothing to Q anyway.

**Pipelining.** Stage k finishes column k of P and D(k), and computes the
normalised trailing block for stage k+1. There are K register stages, so a
new G enters every cycle.

## Division-free triangular inverse (`tri_inv`)

The inverse of a lower triangular matrix needs a division by the diagonal
element in every row. Multiplying the whole inverse by `pi = prod_k P(k,k)`
removes those divisions. Every column of `X = pi * P^-1` is computed
independently by this recursion:

```
V(j) = 1
for i = j+1 .. K-1:
    V(i) = - sum_{k=j..i-1} P(i,k) V(k)      new element
    V(k) = V(k) * P(i,i)   for j <= k < i    keep the common scale
V(k) = V(k) * P(m,m)       for every m < j   remaining factors of pi
```

All columns run in parallel. Every product is shifted right by `PSH = W-2`, so
multiplying by a normalised pivot (about `2^(W-2)`) keeps the magnitude. The
starting "1" is `2^(W-5)`. This leaves a factor of 8 of headroom for the
off-diagonal growth, which would otherwise saturate.

`min_search` then forms the diagonal of `Q = X^H diag(D) X` at W+5 bits. It
selects the smallest entry with a chain of compare-and-select steps; on a tie
the lower index wins.

## Detection without division (`null_detect`)

For the selected channel j:

```
Q(j,a) = sum_k conj(X(k,j)) D(k) X(k,a)
w(n)   = sum_a Q(j,a) conj(H(n,a))
s_hat  = (w . r) / (w . h_j)
```

Any positive scale on w cancels in `s_hat`. For BPSK only the sign matters,
so the block computes the real parts of numerator and denominator at full
precision and compares their signs: the symbol is -1 when they differ. The
decision is cancelled from r (`r - s h_j`, saturated), and column j is removed
from H and from the channel-number list.

## Fixed point

| quantity | format |
|----------|--------|
| raw H, r, AGC output | W-bit signed (default 24) |
| lambda | LW = 18 bits, unsigned, LF = 12 fraction bits |
| sigma2 | W-1 bits, unsigned, in G-matrix units (see below) |
| G, P, X, D | W-bit signed, block-normalised |
| Q diagonal | W+5 bits |
| intermediates | 64-bit, shifted and saturated back to W bits |

The 64-bit intermediates limit W to at most 29. Simulations at W=24 (4x4) and
W=16 (2x2) give the same decisions as a double-precision MMSE-VBLAST for
every vector tested.

`gram_unit` first shifts the full-precision `H^H H` right by a fixed
`GSH = W-1+log2(N)`, then adds `sigma2`, then normalises. So `sigma2` is the
noise variance of the AGC-scaled samples divided by `2^GSH`.

## AGC and the per-frame inputs

The samples are scaled by a 3-sigma automatic gain control, so that three
standard deviations of the received signal fill the converter range:

```
lambda = (2^W - 1) / (6 * sqrt(1/2 + sigma_n^2 / 2))
```

This factor needs a square root and a division. It changes only once per
frame, so it is computed by the host. `agc_scale` multiplies every part of H
and r by `lambda`, truncates LF bits and saturates to W bits. Samples that
would exceed the range are clipped. The host supplies two values per frame
and holds them steady while the frame streams through:

- `lambda`: the gain above, scaled to the raw-sample units and to LF fraction
  bits.
- `sigma2 = sigma_n^2 * lambda^2 / 2^GSH`: the noise variance in G-matrix
  units.

The end-to-end testbench computes both exactly like this. For raw samples
`x * 2^(W-4)` and a channel with variance `1/(2N)` per real part, the integer
lambda is `lambda / 2^(W-4) * 2^LF`.

## Interface and timing (`vblast_detector`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset of the valid bits |
| `in_valid` | in | 1 | one `(H, r)` set is present |
| `lambda` | in | LW | AGC gain, per frame |
| `sigma2` | in | W-1 | scaled noise variance, per frame |
| `h_re`, `h_im` | in | W x N x N | channel matrix, `[rx][tx]` |
| `r_re`, `r_im` | in | W x N | received vector |
| `out_valid` | out | 1 | decisions are valid |
| `sym_neg` | out | N | bit c = 1 means transmit channel c sent -1 |
| `order` | out | CW x N | channel detected at level i |

There is no back-pressure and no stall. A set may be applied on every cycle.
The latency is `2 + sum_{K=1..N}(K+4)` cycles: 28 for 4x4 and 13 for 2x2. At
80 MHz this is 80 M vectors/s, four times the one-set-per-4-cycles rate that
a 20 MHz channel needs. Reset clears only the valid bits; the data registers
need no reset.

## Verification

Every block has its own self-checking testbench in `tb/`. They compare the
block's outputs bit for bit with `vblast_ref_pkg`, an independent model that
is written as plain sequential code rather than as a pipeline. They also
check latency and cover the corner cases of each block:

- ties in the minimum search, both symbol signs;
- removal of every column position;
- AGC clipping at both rails;
- an exact `X P = 2^k I` identity on matrices whose inverse is known.

`tb_vblast_detector` runs the default 4x4, 24-bit detector end to end. It
sends five frames at SNR 0, 5, 10, 15 and 20 dB, 300 vectors each, without
gaps. It checks:

- bit-exact decisions and order against the reference model;
- the measured latency;
- agreement with a double-precision MMSE-VBLAST;
- that the error rate falls with SNR.

It also counts, and requires at least once each: back-to-back inputs, frame
changes, AGC clipping, both symbol values, and every channel detected first.
`tb_vblast_2x2` does the same for the 2x2, 16-bit build.

Simulate with Verilator, for example:

```
verilator --binary --timing -Irtl -Itb rtl/mimo_pkg.sv tb/vblast_ref_pkg.sv \
    rtl/agc_scale.sv rtl/gram_unit.sv rtl/chol_ff.sv rtl/tri_inv.sv \
    rtl/min_search.sv rtl/null_detect.sv rtl/level_est.sv rtl/vblast_detector.sv \
    tb/tb_vblast_detector.sv --top-module tb_vblast_detector
./obj_dir/Vtb_vblast_detector
```

Each testbench ends with a line `TB_RESULT checks=… failures=…` and has a
watchdog. The unit testbenches need only `mimo_pkg`, `vblast_ref_pkg` and the
modules they instantiate.

## Where this design goes its own way

- **The AGC gain is an input.** lambda and the scaled noise variance are
  computed per frame outside the detector. The per-sample scaling is in
  hardware.
- **Full pipelining.** The Cholesky stages, the inversion and the detection
  all accept a new input every cycle. The original design points at 4 cycles
  per set.
- **Fixed-point scheme.** The following are this design's own: the
  block-floating normalisation of G and of each Schur complement, the
  mantissa/exponent weights D, the `2^(W-5)` unity of the inverse, and the
  shift amounts.
- **Symbol decision.** The division in the symbol estimate is replaced by a
  sign comparison. This is exact for BPSK only. Higher-order constellations
  would need the real quotient, or a scaled slicer.
- **One level design for all sizes.** Every level, including the 2x2 ones,
  uses the same G / Cholesky / inversion chain. A 2x2 inverse could be written
  in closed form; here it is simply the K=2 case of the general chain.
- **Not covered:** mapping to a particular FPGA, timing closure at 80 MHz, and
  resource use. None of these has been measured.

## Changing it

- `N` and `W` are the main parameters of `vblast_detector`. `LW`/`LF` set the
  AGC gain format.
- `GSH` sets the units of `sigma2`. `PSH` sets the product shift in the
  inversion, the Q diagonal and detection.
- A level for another matrix size is `level_est` with `K` set. Its latency
  follows automatically.
- After changing any arithmetic, update `vblast_ref_pkg` to match; every
  testbench checks against it bit for bit.
