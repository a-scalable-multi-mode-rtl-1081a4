# napSVD — a scalable, multi-mode SVD precoder in SystemVerilog

This is synthesizable SystemVerilog RTL for a singular value decomposition
(SVD) engine for MIMO precoding. It decomposes complex N x N matrices
(N = 2, 4, 6 or 8, chosen at run time) as M = U Λ V^H. It uses the
two-sided cyclic Jacobi method with parallel (Brent–Luk) ordering. It
follows the napSVD ASIC described in "A Scalable, Multi-Mode SVD Precoding
ASIC Based on the Cyclic Jacobi Method".

One 2x2 SVD generator is built from CORDIC units. It runs at one 2x2 SVD
per *computational cycle* of C_S = 4 clocks. Two 2x2 matrix-multiplication
engines then apply each 2x2 result to the rest of the matrix:

- the Λ engine applies J_l and J_r to the rows and columns of Λ;
- the V engine applies J_r to the precoding matrix V.

Several matrices are processed interleaved, to keep the 2x2 SVD pipeline
full. The register file can hold:

- four 8x8 matrices;
- five 6x6 matrices;
- eight 4x4 matrices;
- sixteen 2x2 matrices.

Three knobs trade precision against energy at run time:

- the number of sweeps;
- the number of CORDIC micro-rotations (iteration cycles and bypassed iterators);
- the effective word width (an LSB mask in the CORDICs).

## Algorithm

Start with Λ = M and V = I. One *sweep* runs N−1 *permutations* of the
parallel ordering. Each permutation pairs all N indices into N/2 disjoint
pairs (p, q). For each pair, in each matrix, the engine does three steps:

1. Take the 2x2 block of Λ at rows/columns (p, q) and compute its 2x2 SVD
   J_l · B · J_r = diag(σ1, σ2).
2. Replace every 2x2 block (p,q)×(u,v) of Λ with J_l(p,q) · B · J_r(u,v).
   J_l comes from the pair owning the rows, and J_r from the pair owning
   the columns. The diagonal blocks (u = v) become diagonal.
3. Replace the V block (rows 2k, 2k+1; columns p, q) with V_blk · J_r.

After the configured number of sweeps, the IO register file holds Λ. Its
diagonal is the singular values, up to a unit phase per entry, and the V
register file holds V.

### 2x2 SVD (`svd2x2`)

The 2x2 SVD is done in two two-sided unitary steps. Each step needs only
angles, which the CORDICs provide.

- **Q1 (`q1_unit`)** makes M upper triangular, with a real non-negative t22.
  - From the magnitudes and angles of m21 and m22 it forms
    Ψ1 = atan(|m21| / |m22|) and the phases θ_a1 = −(θ21+θ22)/2 and
    θ_g1 = (θ22−θ21)/2.
  - V_l1 is a pure phase matrix. V_r1 is the unitary transformation
    matrix (UTM) built from (Ψ1, θ_g1, −θ_g1).
- **Q2 (`q2_unit`)** diagonalises T = V_l1 M V_r1.
  - Let a = |t11|, b = |t12| and d = t22. Then
    A = atan(b/(d−a)) = Φ2+Ψ2 and B = atan(b/(d+a)) = Φ2−Ψ2 (full-quadrant
    angles). These give the rotation angles of V_l2 and V_r2.
  - The phases of t11 and t12 give the phase terms.
  - Amplitude ratios need no CORDIC gain correction.
- **UTM generator (`utm_gen`)** runs in two stages:
  - one rotation CORDIC produces (cos φ, sin φ);
  - four rotation CORDICs apply the two phases.
- **One shared multiplier (`mmu2x2`)** forms, in four clock slots per
  computational cycle: V_l1·M, T = (V_l1 M)·V_r1, J_l = V_l2·V_l1 and
  J_r = V_r1·V_r2.

One 2x2 SVD is accepted every computational cycle. Its result appears
**12 computational cycles** later (`svd2x2.LAT`). The block also passes its
input matrix through, and the diagonal block of Λ is later taken from
there.

### CORDIC (`cordic`)

Each CORDIC does one operation per computational cycle. It works in four
steps:

1. Quadrant preprocessing.
2. A chain of CHAIN = 2 micro-rotation iterators, fed back for up to three
   clocks. This gives at most 6 micro-rotations.
3. Scaling by κ in postprocessing, which can be switched off per instance.
4. Rounding of the result.

Inside, the datapath is 17 bits wide plus 8 guard fraction bits. Angles are
12 bits, a full turn = 4096.

The runtime configuration `cordic_cfg_t` has three fields:

| field      | meaning                                                     |
|------------|-------------------------------------------------------------|
| `iter_cyc` | iteration cycles 1..3 (2 micro-rotations each)              |
| `bypass`   | iterators skipped in the last cycle                         |
| `mask`     | LSBs zeroed before every micro-rotation and postprocessing |

### N x N flow (`nxn_ctrl`, `napsvd_top`)

The controller runs four nested loops:

- serial: the N/2 pairs of a permutation;
- matrix: the M_I interleaved matrices;
- permutation;
- sweep.

Within each computational cycle:

- **Phase 3** reads the next 2x2 block for the SVD from the IO register file.
- **Phases 0 .. N/2−2** read one off-diagonal block each for the Λ engine.
  There are N/2−1 of them per (pair, matrix), plus the diagonal block from
  the middle-factor buffer.
- **The V engine** updates N/2 V blocks per (pair, matrix).

Read addresses go through delay lines matching the engine latencies, 5 and
3 clocks. They are reused as write-back addresses.

J_l, J_r and the passed-through diagonal blocks are collected per
(matrix, permutation) in double-banked buffers (`jbuf`). Multiplications
for a (matrix, permutation) start once all its N/2 SVD results are present.

The SVDs of a matrix's next permutation read what the previous permutation
wrote back. So one *round* (one permutation of all M_I matrices) lasts

    R = max(M_I · N/2, N + 13) computational cycles.

When M_I·N/2 is smaller than N+13, the remaining issue slots are bubbles.
A job of S sweeps takes

    4 · (S · (N−1) · R + (N+13) + 1) clocks.

### Number formats (`napsvd_pkg`)

| quantity                 | format                                         |
|--------------------------|------------------------------------------------|
| stored scalar (re, im)   | 13 bit two's complement, 10 fraction bits (±4) |
| CORDIC datapath          | 17 bit (+8 internal guard bits)                |
| angle                    | 12 bit, full turn = 4096                       |
| κ constants              | 14 fraction bits                               |

The multipliers round to nearest and saturate.

## Top-level interface (`napsvd_top`)

| port                                   | dir | meaning |
|----------------------------------------|-----|---------|
| `clk`, `rst_n`                         | in  | clock, asynchronous active-low reset |
| `cfg_n`                                | in  | N = 2, 4, 6, 8 |
| `cfg_mi`                               | in  | number of interleaved matrices, 1 .. 32/N |
| `cfg_sweeps`                           | in  | sweeps, 1..7 |
| `cfg_cordic`                           | in  | CORDIC precision, see above |
| `start`                                | in  | one-clock pulse while idle |
| `busy`, `done`                         | out | busy while running; `done` pulses once at the end |
| `io_we`, `io_row`, `io_col`, `io_wdata` | in | load one scalar of M (ignored while busy) |
| `io_rdata`                             | out | IO register file scalar at (`io_row`, `io_col`), combinational |
| `v_row`, `v_half`, `v_col`, `v_rdata`  | in/out | read V entry (`v_half` selects one of the two V rows stored at `v_row`) |
| `evt_*`                                | out | strobes for activity counting: SVD issued, bubble, multiplication, permutation, sweep |

Matrix slot m of size N lives in IO rows m·N .. m·N+N−1 and columns 0..N−1.
Its V lives in V register file rows m·N/2 .. m·N/2+N/2−1. Each of those
rows holds two V rows.

### Settings per size (from the precision study of the reference design)

| N | micro-rotations | `cfg_cordic` (iter_cyc, bypass, mask) | word width | sweeps | M_I | clocks per matrix per sweep (built / reference) |
|---|-----------------|---------------------------------------|------------|--------|-----|-------------------------------------------------|
| 2 | 4 | (2, 0, 3) | 10 | 1   | 16 | 4 / 4 |
| 4 | 5 | (3, 1, 1) | 12 | 2   | 8  | 25.5 / 24 |
| 6 | 5 | (3, 1, 1) | 12 | 2–3 | 5  | 76 / 60 |
| 8 | 6 | (3, 0, 0) | 13 | 3–4 | 4  | 147 / 112 |

## Differences from the reference design

These are the points where this RTL knowingly differs from the published
description, or fills in something it leaves open.

- **2x2 SVD latency is 12 computational cycles, not 9.** Besides the four
  Q1 and four Q2 stages, the pipeline has an input register, the shared
  multiplier's products (T between Q1 and Q2, J_l/J_r after Q2) and an
  output stage that realigns J_l and J_r to a whole computational cycle.

  In addition, a matrix is reissued only after its whole Λ update has been
  written back. This sets the minimum round to N+13 computational cycles
  rather than 13.

  As a result, 8x8 and 6x6 with the reference M_I run with bubbles:
  - 8x8: 147 instead of 112 clocks per matrix and sweep;
  - 6x6: 76 instead of 60.

  2x2 matches, and 4x4 is within 6%.
- **Binary point.** The reference gives 13-bit scalars and 12-bit angles,
  but not the split. This design uses 10 fraction bits. Inputs should have
  |entries| below about 1, so Λ stays below the ±4 range.
- **Rounding.** The CORDIC keeps 8 guard bits and rounds its outputs. The
  multipliers round to nearest. This keeps V unitary over many sweeps; with
  truncation it drifts by several percent.
- **The LSB mask truncates.** With masked bits, the singular values come
  out a few percent small: about 3% per masked bit at 8x8, 4 sweeps.
- **Q2 angle signs.** The sum/difference arctangent form above was chosen
  because it demonstrably diagonalises T. Q2 relies on Q1 delivering a real
  t22 ≥ 0.
- **Rotation-mode quadrant preprocessing.** This rotates by +k·π/2 and
  subtracts k·π/2 from the angle.
- **Micro-rotation granularity.** Two iterators per chain and up to three
  iteration cycles are this design's choice.
- **Host interface.** The scalar load/read ports, start/busy/done and the
  event strobes are additions. The register-file layout for N < 8 is this
  design's own.
- **No clock gating or power modelling.** The energy figures of the
  reference are not reproduced. The `evt_*` strobes allow activity to be
  counted.

## Files

| file | content |
|------|---------|
| `rtl/napsvd_pkg.sv` | types, widths, CORDIC angle and κ tables |
| `rtl/cordic.sv` | multi-cycle CORDIC |
| `rtl/utm_gen.sv` | unitary transformation matrix generator |
| `rtl/mmu2x2.sv` | pipelined 2x2 complex multiplier |
| `rtl/q1_unit.sv`, `rtl/q2_unit.sv` | the two 2x2 transformation stages |
| `rtl/svd2x2.sv` | 2x2 SVD generator |
| `rtl/pair_gen.sv` | parallel-ordering pair generator |
| `rtl/io_regfile.sv`, `rtl/v_regfile.sv` | register files for Λ and V |
| `rtl/jbuf.sv` | double-banked J buffers |
| `rtl/lambda_mul.sv`, `rtl/v_mul.sv` | multiplication engines |
| `rtl/nxn_ctrl.sv` | control flow and address generation |
| `rtl/napsvd_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/*.svh` | shared testbench helpers |

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and finishes.
Each has a watchdog. For example, with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/napsvd_pkg.sv tb/tb_napsvd_top.sv --top-module tb_napsvd_top -o sim
    ./obj_dir/sim

What each testbench checks:

- **`tb_cordic`**
  - Rotation and vectoring against `$cos`/`$sin`/`$atan2`, for 6, 5 and
    4 micro-rotations.
  - The masked LSBs.
  - An unbiased gain.
- **`tb_utm_gen`** checks that the generated matrices equal the analytic
  V_l / V_r.
- **`tb_mmu2x2`, `tb_lambda_mul`, `tb_v_mul`** check bit-exact results
  against a rounding/saturating reference, with the exact latency.
- **`tb_q1_unit`, `tb_q2_unit`** check that V_l1 M V_r1 is upper
  triangular, and that V_l2 T V_r2 is diagonal, unitary and aligned in
  time.
- **`tb_svd2x2`** checks that J_l M J_r is diagonal, that σ matches the
  exact singular values, that J is unitary, the 12-cycle latency, the tags
  and the pass-through.
- **`tb_pair_gen`** checks that, for every N, each pair meets exactly once
  per sweep.
- **`tb_io_regfile`, `tb_v_regfile`, `tb_jbuf`** check random 2x2 and
  scalar traffic against a reference array, including the identity load of
  V.
- **`tb_nxn_ctrl`** runs with the 2x2 SVD replaced by a 12-cycle delay
  model. It checks the job length, that every pair and matrix is issued
  once per permutation, that every read sees the latest write-back, that
  every block is written, the bubbles and the V initialisation.
- **`tb_napsvd_top`** is the full-size design with no parameter overrides.
  It runs 8x8 ×4, 6x6 ×5, 4x4 ×8, 4x4 ×2 and 2x2 ×16 back to back, using
  the settings of the table above. It checks:
  - that the off-diagonal energy falls below a fraction of |M|;
  - that |Λ| preserves |M|;
  - that the largest diagonal entry matches σ_max;
  - that V is unitary;
  - that the column norms of M·V equal those of Λ;
  - the exact clock count.
