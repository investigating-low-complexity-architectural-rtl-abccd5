# Reconfigurable DHT and CORDIC FastICA for underdetermined source separation

Blind source separation recovers N unknown sources from M sensor mixtures.
When there are fewer sensors than sources (underdetermined, M < N) two
front-end operations become the hard part in hardware:

* **With several sensors**, each mixture must be turned into its analytic
  signal `x(n) + j·H{x}(n)`, which needs a Discrete Hilbert Transform (DHT).
  Its frame length differs between applications (speech, EEG, ...), so one
  chip should serve any frame length.
* **With a single sensor** (single-channel ICA), the mixture is expanded into
  several signals and separated by FastICA, whose dimension N again changes
  from case to case.

This repository holds synthesizable SystemVerilog for both:

| part | top module | what is reconfigurable at run time |
|---|---|---|
| Reconfigurable DHT | `dht_core` | frame length M: any multiple of the kernel size N, up to `MMAX` |
| CORDIC FastICA | `fastica_core` + `zw_memory` | number of signals (2 .. `NMAX`) and frame length L (1 .. `LMAX`) |

`ubss_top` places the two side by side. They share only clock and reset; the
rest of a complete separation system (Wigner-Ville analysis, mixing-matrix
estimation, whitening, clustering, filtering) is not part of this RTL.

## The reconfigurable DHT

### The matrix view

For an M-point frame (M a multiple of 4) the transform is

    h(n) = sum_{p=0}^{M/4-1} ( x((n-2p-1) mod M) - x((n+2p+1) mod M) ) · k_(p+1)
    k_q  = (2/M) · cot( pi·(2q-1) / M )

This is `h = K·x` with an M×M circulant matrix K. Entry `K[n][m]` depends
only on `d = (n - m) mod M`:

* `d` even: 0 (every other diagonal is zero);
* `d` odd and `d < M/2`: `+k_((d+1)/2)`;
* `d` odd and `d > M/2`: `-k_((M-d+1)/2)`.

### Re-using one N-point kernel

Cut x and h into `B = M/N` sub-vectors of N samples and K into B×B
sub-matrices. Because K is circulant, sub-matrix (i, j) depends only on
`s = (i - j) mod B`. Output block i is then

    H_i = sum_{j=0}^{B-1} K_s · X_j,   s = (i - j) mod B

A single hardware kernel does one `N×N · N×1` product per clock. An M-point
transform is `B² = (M/N)²` kernel uses, whatever M is. A chip built with a
fixed N therefore handles every M that is a multiple of N. A systolic-array
DHT takes about `2·(M/N)²` clocks for the same job.

Each `K_s` is Toeplitz and has only N non-zero diagonals, so N signed
constants describe it. `kv[t]` is the constant on diagonal
`r - c = 2t - (N-1)`. The list starts at the top-right diagonal and ends at
the bottom-left one. For M = 16, N = 8:

    s = 0:  {-k4, -k3, -k2, -k1,  k1,  k2,  k3,  k4}
    s = 1:  { k1,  k2,  k3,  k4, -k4, -k3, -k2, -k1}

### Blocks

```
 m_in ─► dht_m_reg ── M, B, table base ──────────────┐
                                                     ▼
 samples ─► dht_x_memory ── X_j (N words) ─► dht_kernel ─► dht_output ─► h(N·i .. N·i+N-1)
                 ▲  data_ready               ▲    ▲             ▲
                 │                 dht_k_memory ──┘ kv[N]       │
                 └──────── dht_controller ──────────────────────┘
```

* `dht_m_reg` holds M. It refuses zero, values that are not a multiple of N,
  and values above `MMAX`, and pulses `m_err` for them. It also registers
  `B = M/N` and the table address of `k_1` for this M.
* `dht_x_memory` stores the frame in N banks. Bank b holds `x(N·q + b)`, so
  one read returns a whole sub-vector. `data_ready` rises after M samples;
  later samples are refused until the frame has been transformed.
* `dht_k_memory` is a constant table. It holds the M/4 constants of every
  `M = 4, 8, …, MMAX`, one M after another: 32 896 words at `MMAX = 1024`.
  The table is filled from the cotangent formula at elaboration, using
  integer arithmetic only: a series gives sin and cos of π/M, and a
  rotation recurrence steps through the angles (`dht_pkg`). The table
  therefore synthesizes as a ROM with computed contents. Each
  read computes `d = (N·s + 2t - N + 1) mod M` for the N diagonals, reduces
  each d to an index and a sign, and returns the N signed constants.
* `dht_kernel` is N×N/2 multipliers (the zero diagonals are skipped) with a
  registered result.
* `dht_output` adds the B kernel results of block i and rounds away the 15
  fractional bits of the constants. It then presents the N samples of the
  block together with the block index.
* `dht_controller` walks i (outer) and j (inner) and keeps
  `s = (i - j) mod B` by counting down.

### Timing

* Loading M takes effect the next clock. It is ignored while a frame is
  buffered or being transformed.
* Loading a frame takes M clocks, one sample per clock.
* The transform starts by itself. It keeps `busy` high for `(M/N)² + 2`
  clocks: for example 3 clocks at M = 4 and 65 538 clocks at M = 1024.
* Blocks come out in order 0 .. B-1, each with a one-clock `out_valid`.
  They are spaced B clocks apart. `done` comes with the last block.
* Loading and transforming do not overlap.

### Numbers

* Samples are 16-bit signed integers.
* Constants are 16-bit with 15 fractional bits (`|k| < 2/π`).
* Kernel sums and accumulators are 40 bits wide.
* Outputs are 24-bit integers.

Against the exact transform in floating point, outputs are within about one
LSB. The constant rounding bounds the error at `(M/2)·max|x|·2⁻¹⁶`. All widths
are in `dht_pkg`.

## The CORDIC FastICA

For whitened signals `z` (N × L), one FastICA unit finds a unit vector w of
extreme kurtosis by iterating

    w ← E[ z · (wᵀz)³ ] − 3·w,    w ← w / |w|

Every square root, division by |w| and projection is done by one shared
CORDIC unit (`cordic`), used in two modes:

1. **Angles of w (vectoring, N-1 times).** Start with `a = w_1`. For each
   r, set `θ_r = atan2(w_(r+1), a)` and `a = sqrt(a² + w_(r+1)²)`. After
   the last step a equals |w|.
2. **Unit vector (rotation, N-1 times).** Start from (1, 0) and rotate by
   `θ_(N-1)`, then `θ_(N-2)`, …, `θ_1`. Each rotation's y output is one entry
   `w_(r+1)/|w|`. The last x output is `w_1/|w|`.
3. **Projection (rotation, (N-1)·L times).** For each sample column z_j,
   start with `a = z_1`. For each r, rotate `(a, z_(r+1))` by `-θ_r` and
   keep x. The final a is `G(j) = wᵀz_j / |w|`. No multiplier and no
   normalised w are needed.
4. **Update.** Accumulate `z_k·G³` for every k, using one cube and N
   multiply-adds per sample. Then divide by L (a sequential divider) and
   subtract `3·w_k`.
5. **Convergence.** After the next normalisation, compare the new unit
   vector with the previous one. The run stops when `|w_new · w_old| ≥ 1 −
   conv_tol`, or when `max_iter` updates have been made. The test ignores
   the sign, since w and −w are the same component.

One iteration uses the CORDIC `(N-1)(L+1)` times in rotation mode and `N-1`
times in vectoring mode.

The CORDIC (`cordic.sv`) works as follows:

* It is iterative: 20 micro-rotations, one per clock.
* A first step folds the input into the right half plane.
* A final multiply by 0.60725 removes the CORDIC gain.
* Each operation takes 22 clocks.

Rotation is counter-clockwise by the given angle. Angles are 24-bit binary
angles, where `2²⁴` is a full turn.

Data words are 24-bit signed with 16 fractional bits (range ±128), defined in
`ica_pkg`. Sums are 64 bits wide, and results that overflow a word are
saturated.

### Using it

1. Write the whitened samples into `zw_memory`: signal k, sample j at
   (k, j).
2. Write a start vector with `w_wr`, or set `w_rand` together with
   `start` to draw one on chip.
3. Set `n_sig`, `l_len`, `max_iter` and `conv_tol`, then pulse `start`.
4. When `done` pulses, `w_out` holds the unit estimator vector. Entries at
   index `n_sig` and above are zero. `converged` and `iters` report how the
   run ended.

With whitened test mixtures, runs typically converge in 3–5 iterations.

### Limits of this part

* Each run finds one vector from the given start vector. Nothing here keeps
  several vectors apart (no deflation or orthogonalisation). To extract
  several components, add that outside, or seed the runs differently and
  check the results.
* The start vector is either loaded or, with `w_rand` set at `start`,
  drawn on chip from a 32-bit LFSR (`x³²+x²²+x²+x+1`). The LFSR advances
  from run to run, so repeated runs start from different points.
* The iteration time is dominated by L·(N-1) CORDIC operations of 22 clocks
  each.

## Where this RTL makes its own choices

The method itself comes from the description this design follows: the
circulant and kernel decomposition, the constant sets, the block structure
(M register, X memory, K memory, N-point kernel, output stage, controller),
and the CORDIC formulation of FastICA with its operation counts. The
following are this design's own choices:

* all word widths and fixed-point formats;
* the banked X memory and the packed constant-table layout;
* the pipeline: a one-clock memory read, a one-clock kernel and a one-clock
  output stage, giving `(M/N)² + 2` clocks;
* placing the accumulation of the B kernel results in the output stage;
* the frame handshake, the refusal of illegal M, and the reset values
  (asynchronous, active low);
* the iterative CORDIC with its quadrant fold and gain correction;
* the rotation sign convention;
* the dot-product convergence test with its tolerance and iteration limit;
* the sequential divider and the LFSR random-start generator;
* `NMAX = 8` and `LMAX = 1024` for the FastICA, since no sizes are given
  for it.

Defaults that do come from the description: kernel size `N = 4` and
`MMAX = 1024` for the DHT.

## Files

* `rtl/dht_pkg.sv`, `rtl/ica_pkg.sv`: widths, number formats, shared types.
* `rtl/dht_*.sv`: the DHT blocks above. `rtl/dht_core.sv` is the DHT top.
* `rtl/cordic.sv`, `rtl/seq_divider.sv`, `rtl/zw_memory.sv` and
  `rtl/fastica_core.sv`: the FastICA part.
* `rtl/ubss_top.sv`: both parts together.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each ends by
  printing `TB_RESULT checks=<n> failures=<n>`. `tb/tb_ubss_top.sv` runs the
  top at its default sizes. It covers DHT frames up to M = 1024, FastICA
  with 8 signals of 1024 samples, refused M, input back-pressure, and a run
  stopped by the iteration limit.
  `tb/tb_dht_sweep.sv` runs every frame length M = 4, 8, …, 1024 and checks
  the clock count and sampled outputs of each.

## Simulating

Each testbench references only its own module. Verilator finds the other
modules in `rtl/` by file name:

    verilator --binary --timing --assert -Irtl -y rtl \
        rtl/dht_pkg.sv rtl/ica_pkg.sv tb/tb_ubss_top.sv --top tb_ubss_top
    ./obj_dir/Vtb_ubss_top

Replace `tb_ubss_top` with any other testbench name to run that one. The
full-size top test runs in well under a second. To change sizes, override
the parameters of `ubss_top` (or `dht_core` / `fastica_core`), or edit the
widths in the packages. N must be a multiple of 4, and `MMAX` a multiple
of N.
