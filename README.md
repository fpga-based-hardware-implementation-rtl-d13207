# Subspace DOA estimation with LDL / Cholesky factorisation: a five-stage fixed-point pipeline

This RTL estimates the directions of arrival (DOA) of one or two narrowband
far-field sources. The sources are seen by a uniform linear array (ULA) of M
antennas spaced half a wavelength apart. Classic subspace methods such as
ESPRIT find the signal subspace with an eigen-decomposition or a QR
factorisation of the array covariance matrix. This design uses a cheaper
triangular factorisation instead. The covariance matrix is factored as
`L D L^H` (LDL) or as `L L^H` (Cholesky). The first K columns of `L` span the
same space as the K steering vectors. That is enough to run the shift-invariance
step of ESPRIT on them:

```
Rxx  = (1/N) sum_t x(t) x(t)^H                       stage 1  cov_matrix
Ls   = L(:, 1:2),  Rxx = L D L^H  or  Rxx = L L^H     stage 2  ldl_decomp / chol_decomp
Ls1  = Ls(1:M-1, :),  Ls2 = Ls(2:M, :)
Lam  = (Ls1^H Ls1)^-1 Ls1^H Ls2                       stage 3  ls_solve
g_k  = eigenvalues of Lam  (2x2)                      stage 4  eig2x2
th_k = acos(-arg(g_k) / pi)                           stage 5  doa_angle
```

For a half-wavelength ULA, each eigenvalue is ideally `exp(-j*pi*cos(th_k))`.
Its phase therefore gives the angle, measured from the array axis, in the
range 0 to 180 degrees.

The pipeline is written in SystemVerilog in 16-bit fixed point with 8 integer
bits. Both factorisations are present. A mode input picks one of them for
each estimate, and a second input chooses one or two sources.

## Top level: `doa_top`

```
s_valid/s_ready, s_re[M], s_im[M]   one array snapshot per handshake (WL-bit signed, FRAC=WL-IWL)
use_chol                            0: LDL, 1: Cholesky   (sampled per estimate)
two_src                             0: one source, 1: two (sampled per estimate)
doa_valid/doa_ready                 one estimate per handshake
theta[2]                            angles in degrees, unsigned, 7 fraction bits (0..180)
src_valid[2]                        which theta entries are meaningful ({two_src, 1})
doa_chol                            the factorisation that produced this estimate
```

| Parameter    | Default | Meaning |
|--------------|---------|---------|
| `M`          | 4       | array elements (8 is also supported) |
| `WL`, `IWL`  | 16, 8   | word length and integer bits of every stage's data |
| `NSNAP`      | 100     | snapshots averaged into one covariance estimate |
| `FIFO_DEPTH` | 128     | snapshot queue entries |
| `ANG_FRAC`   | 7       | fraction bits of the output angle |

The top has a reset that is asynchronous on assertion (`rst_n` low) and one
clock. Snapshots first pass through `snapshot_fifo`. This queue separates the
stream from the host link from the covariance stage, which refuses snapshots
while it holds an unclaimed matrix.

## The stage handshake and the mode tag

Every stage, and the queue, uses the same valid/ready contract:

* a stage accepts a frame on `in_valid && in_ready`;
* it computes for a fixed number of cycles;
* it raises `out_valid` and holds the result, unchanged, until `out_ready`;
* it accepts the next frame only after its result has been taken.

Five estimates can therefore be in flight, one per stage. A slow consumer
stalls the stages behind it and never loses data. Assertions in the stages
check that a held output does not change.

`use_chol` and `two_src` are sampled when a covariance matrix enters stage 2.
From then on they travel with the frame as a small tag (`doa_pkg::frame_tag_t`)
through stages 3 to 5. Two things follow from this:

* the mode can change on any estimate, even while earlier ones are still in the pipeline;
* `doa_chol` always names the factorisation that produced the result it comes with.

Stage 2 holds both decomposers. It accepts a matrix only when both are idle,
so estimates always come out in the order their snapshots went in.

## Fixed-point arithmetic

All data between stages is `WL`-bit two's complement with `FRAC = WL - IWL`
fraction bits, so 16/8 by default. Inside a stage, sums and products are kept
at full width in a 96-bit accumulator type (`doa_pkg::acc_t`). They are brought
back to the stage format once, by `doa_pkg::rnd` (round half up) and
`doa_pkg::sat` (saturate).

Three shared sequential units do the non-linear work:

* `fx_div`: a restoring divider that produces one quotient bit per cycle. Each
  factorisation column uses `2(M-1)` of them in parallel, one for the real and
  one for the imaginary part of each entry. Stage 3 uses eight.
* `fx_sqrt`: a digit-by-digit integer square root that produces one result bit per cycle.
* `cordic_atan2`: a vectoring CORDIC that returns the angle in degrees with 16
  fraction bits, one iteration per cycle. The arctangent table is computed at
  elaboration time (`doa_pkg::atan_deg16`), so there is no memory file.

Two places are numerically delicate at 16/8, and they carry 4 guard bits below
the LSB:

* **The Gram matrix `G = Ls1^H Ls1` of stage 3.** It is nearly singular when
  the sources are close or the SNR is low.
* **The discriminant of the 2x2 eigenvalue problem in stage 4.** Its square
  root amplifies the quantisation error when the two eigenvalues are close.

A pivot, radicand or determinant that quantisation drives to zero or below is
replaced by one LSB. The result is then saturated instead of dividing by zero.

## Stage details

**Stage 1, `cov_matrix`.** Snapshots are accumulated as they arrive, one per
cycle. The `M(M+1)/2` lower-triangle products `x_i x_j^*` each have their own
accumulator. After the N-th snapshot, three cycles follow:

1. latch the sums;
2. multiply them by the constant `round(2^18/N)`;
3. round and saturate.

The upper triangle is written as the conjugate of the lower one.

**Stage 2, `ldl_decomp` / `chol_decomp`.** Only the two columns of `L` that the
later stages use are formed. They are computed one after the other, and the
`M-1` entries of each column are computed in parallel.

* LDL: `D1 = r11`, `l_i1 = r_i1/D1`, `D2 = r22 - |l21|^2 D1`,
  `l_i2 = (r_i2 - l_i1 conj(l21) D1)/D2`. There are no square roots, and `L`
  has a unit diagonal.
* Cholesky: `l11 = sqrt(r11)`, `l_i1 = r_i1/l11`,
  `l22 = sqrt(r22 - |l21|^2)`, `l_i2 = (r_i2 - l_i1 conj(l21))/l22`.

**Stage 3, `ls_solve`.** This stage forms `G = Ls1^H Ls1` and
`H = Ls1^H Ls2`. It then inverts the 2x2 matrix `G` through its adjugate:
`Lam = adj(G) H / det(G)`. The final division runs on eight dividers at once.
With one source, `Lam` is the scalar `h11/g11`.

**Stage 4, `eig2x2`.** The eigenvalues are `m +/- s`, where `m = (a+d)/2` and
`s = sqrt(((a-d)/2)^2 + bc)`. The complex square root is computed as follows:

* one real square root gives the modulus `|z|`;
* two more, run in parallel, give `sqrt((|z| +/- x)/2)`.

With one source, the eigenvalue is `Lam` itself.

**Stage 5, `doa_angle`.** There are two identical lanes, one per source. Each
lane works in three steps:

1. A CORDIC gives `arg(g)` in degrees.
2. A constant multiply gives `u = -arg(g)/180`, and a square root gives
   `w = sqrt(1-u^2)`.
3. A second CORDIC gives `theta = atan2(w, u) = acos(u)`.

## Latency

The table counts clock cycles at 16/8. Each stage is counted from the edge on
which it accepts a frame to the rise of its `out_valid`. The end-to-end figure
runs from the edge that accepts the last snapshot of an estimate to `doa_valid`,
on an otherwise idle pipeline. It includes one cycle for each of the four hand-overs.

| Stage | LDL | Cholesky | Formula |
|---|---|---|---|
| 1 covariance | 3 | 3 | fixed |
| 2 factorisation | 39 | 69 | `2(WL+1)+5`; `2(WL+1)+2((WL+FRAC)/2+1)+9` |
| 3 least squares | 21 | 21 | `WL+5` |
| 4 eigenvalues | 46 | 46 | `(WL+FRAC)/2 + 8 + WL + 10` |
| 5 angle | 57 | 57 | `2*ITER + 14 + 11`, ITER = 16 |
| end to end | **170** | **200** | |

The reference implementation reports 175 cycles (LDL) and 194 (Cholesky) in
total at 16/8. Its per-stage split differs: 3 / 44 or 63 / 28 / 76 / 24. The
stage counts here follow from this design's own arithmetic units, and no stage
is padded to match those figures.

At 20/10, the bit-serial divider and square roots make the pipeline 19 cycles
longer (189 for LDL). With `M = 8` the cycle count is the same as with `M = 4`.
Every wider operation runs in parallel, so only the width of the adder trees
grows.

The throughput limit is the snapshot stream. One estimate needs `NSNAP`
snapshot cycles, and every later stage is shorter than that.

## Accuracy

The end-to-end tests generate ULA snapshots of one or two unit-power sources
with random phases plus complex noise (uniformly distributed, of a set rms),
quantised to the input format. At 20 dB SNR, 16/8 and 100 snapshots, every
estimate of the following scenes lies within 0.4 degrees (the test bound is
2.5 degrees), with both factorisations:

* two sources at 105/150, 55/130, 70/110, 90/120, 100/135 and 60/125 degrees;
* one source at 20 or 55 degrees.

Mean absolute errors at 10 dB SNR, 100 snapshots, sources at 105/150 degrees
unless stated:

| Configuration | Mean abs. error (deg) |
|---|---|
| M = 4, 12/6 | about 0.5 |
| M = 4, 16/8 | about 0.3 to 0.5 |
| M = 4, 20/10 | about 0.35 |
| M = 8, 16/8, sources at 70/120 | about 0.12 |
| M = 4, 16/8, one source at 20, 500 snapshots | about 0.14 |

## Departures from the textbook method, and design choices

* **Latency split.** The per-stage cycle counts are this design's own. They
  are listed above against the reference figures.
* **Only two columns of `L`.** Only the first two columns of `L` are computed.
  They are all that the later stages use, so three sources (which would need a
  3x3 eigenvalue stage) are not supported. `doa_pkg::NSRC` is 2.
* **Least-squares formula.** The least-squares solution is written with the
  Hermitian transpose on both factors, `(Ls1^H Ls1)^-1 Ls1^H Ls2`. This is
  the form that minimises `||Ls2 - Ls1 Lam||`.
* **Angle sign.** The angle uses `acos(-arg(g)/pi)`. The minus sign matches
  the steering vector `exp(-j*pi*m*cos(theta))`. Without it the result would be
  `180 - theta`.
* **Degenerate pivots.** Zero or negative pivots, radicands and determinants
  are clamped to one LSB. This keeps the hardware well defined on degenerate
  data, which the method does not discuss.
* **Handshakes, queue and tag.** The valid/ready handshakes, the snapshot queue
  depth, the per-frame method tag and the output angle format are choices of
  this implementation.
* **Front end not included.** The radio front end, the phase calibration of
  the receivers, the link that carries snapshots from the host, and the host
  software are outside this RTL. `doa_top` expects phase-aligned complex
  baseband snapshots on its stream input.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints a
`TB_RESULT checks=... failures=...` line at the end. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/doa_pkg.sv tb/tb_doa_pkg.sv tb/tb_doa_top.sv --top-module tb_doa_top
./obj_dir/Vtb_doa_top
```

Replace `tb_doa_top` with any other testbench to run it.

| Testbench | What it covers |
|---|---|
| `tb_snapshot_fifo` | order and completeness under random valid/ready, `in_ready` drop at full |
| `tb_cov_matrix` | covariance against a double-precision average (1 LSB), Hermitian symmetry, 3-cycle latency |
| `tb_ldl_decomp`, `tb_chol_decomp` | L columns against a floating-point factorisation, exact latency |
| `tb_ls_solve` | `Lam` against a floating-point solution, one and two sources |
| `tb_eig2x2` | eigenvalues against the closed form in double precision, latency |
| `tb_doa_angle` | angles across 5..175 degrees, both lanes, latency |
| `tb_doa_top` | full pipeline at default parameters (see below) |
| `tb_doa_configs` | 12/6, 16/8 and 20/10, M = 8, 500 snapshots (uses `tb_doa_run`) |

`tb_doa_top` sends 16 estimates, alternating the method and the source count.
It checks:

* the exact end-to-end latency on an idle pipeline;
* every angle against the true one.

It then holds `doa_ready` low for long stretches, so that these events occur:

* every stage stalls;
* the snapshot queue fills;
* the output is held.

It also counts LDL frames, Cholesky frames, one-source and two-source frames,
and method switches. Any event that never occurs is counted as a failure.

`tb/tb_doa_pkg.sv` holds the floating-point complex helpers and the ULA
signal generator that the testbenches share.
