# Systolic Toeplitz solver (Bareiss algorithm, linear time, linear storage)

This RTL solves a linear system **T x = b** whose matrix is Toeplitz. A Toeplitz
matrix is constant along each diagonal, so the whole (n+1)×(n+1) matrix is fixed by
2n+1 numbers: t_k = T[i][i+k] above the diagonal and t_-k = T[i+k][i] below it.
The solver is a one-dimensional systolic array of n+1 processors. It finishes in
**4n time steps** and keeps only a **constant number of values per processor**.
A general-purpose solver needs O(n³) time, and a sequential Toeplitz solver such as
Levinson's or Bareiss' needs O(n²).

The design follows the systolic Bareiss solver described in *A Systolic Array for
the Linear-Time Solution of Toeplitz Systems of Equations*. The repository holds
three arrays:

* `toeplitz_solver`: the general array, for any Toeplitz matrix (no symmetry
  needed).
* `toeplitz_sym_solver`: a leaner array for symmetric Toeplitz matrices.
* `regen_array`: a small array that rebuilds the upper triangular factor of T,
  one row at a time, from its last column and the elimination multipliers. The
  factor can then be reused without storing all of it.

`toeplitz_system` places the three side by side as the top level.

## The algorithm in one page

The Bareiss algorithm removes one subdiagonal and one superdiagonal per step.
Write T⁽⁰⁾ = T. Step i subtracts a multiple of a copy of the matrix that has been
shifted down i rows. This gives T⁽⁻ⁱ⁾, which has i zero subdiagonals. Step i then
subtracts a multiple of an up-shifted copy, giving T⁽ⁱ⁾, which has i zero
superdiagonals. The multipliers are m₋ᵢ and mᵢ. The right-hand side b gets the
same operations. After n steps:

* T⁽⁻ⁿ⁾ is upper triangular.
* T⁽ⁿ⁾ is lower triangular.
* Together they form an LU factorisation of T.
* T⁽⁻ⁿ⁾ x = b⁽⁻ⁿ⁾ is solved by back substitution.

The algorithm has no pivoting. It works whenever every leading principal submatrix
of T is nonsingular, and it is numerically about as good as Gaussian elimination
without pivoting. It is comfortable on diagonally dominant or positive definite
matrices.

Two facts make the algorithm fit a linear array with O(1) storage per cell:

1. **During elimination only four Toeplitz triangles are alive.** Part of each
   intermediate matrix is still Toeplitz. So one number per diagonal describes
   it: α, β for T⁽⁻ⁱ⁾ and γ, δ for T⁽ⁱ⁾. Processor S_k holds diagonal k of each.
2. **The upper factor never has to be stored.** At the end of Phase 1,
   processor k holds only the last column of T⁽⁻ⁿ⁾. The rows of T⁽⁻ⁿ⁾ needed
   for back substitution are rebuilt from that column and the 2n multipliers.
   The elimination is run backwards, and each row appears just when back
   substitution needs it. This is why storage is O(n) and not O(n²).

## The general array

```
   x out  <--  S_0  <==>  S_1  <==>  S_2  <==> ... <==>  S_N  <--  {t_k, t_-k, b_(N-k)} in
             (divides)
```

There are N+1 identical processors S_0 … S_N (`bareiss_cell`). Only S_0 divides.
Each processor holds eight registers:

| register | Phase 1 role | Phase 2 role |
|---|---|---|
| α, β | element of T⁽⁻ⁱ⁾ (lower/upper Toeplitz part) | β: row element of T⁽⁻ⁿ⁾ being regenerated |
| γ, δ | element of T⁽ⁱ⁾ | δ: the shifted partial row used to regenerate β |
| λ, μ | multipliers m₋ⱼ, m₊ⱼ | multipliers replayed in reverse order |
| ξ, η | right-hand sides b⁽ⁱ⁾, b⁽⁻ⁱ⁾ | ξ: solution component; η: partial sum |

Neighbours are joined by five lines:

* Three lines run left: outL1..3 of S_k feed inR1..3 of S_(k-1).
* Two lines run right: outR1..2 of S_k feed inL1..2 of S_(k+1).

What travels on them depends on the phase:

| phase | leftwards (outL1, outL2, outL3) | rightwards (outR1, outR2) |
|---|---|---|
| 1: factorisation | α, δ, ξ | λ, μ |
| 2: back substitution | λ, μ, η | ξ, δ |

### Schedule: who is active when

All processors see one global step counter τ = 1 … 4N. Processor k is active
only in these steps:

* **Phase 1**: τ+k is odd and k < τ < 2N−k, which is N−k steps.
* **Phase 2**: τ+k is even and 2N+k ≤ τ ≤ 4N−k, which is N+1−k steps.

Adjacent processors therefore never work in the same step. A value written on a
line in step τ is read by the neighbour in step τ+1, so each line is a plain
register. Activity spreads from S_0 outwards in Phase 1 and shrinks back towards
it in Phase 2. On average a processor is busy one step in four.

**Phase 1 step** of S_k:

1. From its second step on, take α, δ, ξ from the right.
2. Form the multipliers. S_0 computes λ = α/γ. The other processors take λ and μ
   from the left and update α −= λγ.
3. Update β −= λδ and η −= λξ.
4. S_0 computes μ = δ/β with the new β. The other processors update γ −= μα,
   δ −= μβ and ξ −= μη, using the new α, β and η.
5. Send α, δ, ξ left and λ, μ right.

The multipliers thus start at S_0 and ripple right, one processor per step.
Matrix data ripples left into S_0.

**Phase 2 step** of S_k:

1. From its second step on, take λ, μ, η from the right.
2. S_0 produces a solution component, ξ = η/β, and starts δ = μβ. The other
   processors take ξ and δ from the left, update η −= βξ (the back-substitution
   sum) and update δ += μβ.
3. Update β += λδ. This regenerates the next row element of the upper factor.
4. Send λ, μ, η left and ξ, δ right.

After step 4N, S_k holds x_k in ξ.

### Initial values

Processor k starts with:

* α = t_−(k+1), β = t_k, γ = t_−k, δ = t_(k+1)
* λ = μ = 0
* ξ = b_(N−k−1), η = b_(N−k)

The values t_±(N+1) and b_−1 are taken as 0.

## The symmetric array

For T = Tᵀ the pairs coincide: α = δ, β = γ and λ = μ. Each processor
(`bareiss_sym_cell`) keeps only α, β, λ, ξ, η, and two lines run each way:

| phase | leftwards (outL1, outL2) | rightwards (outR1, outR2) |
|---|---|---|
| 1 | α, ξ | λ |
| 2 | λ, η | ξ, α |

In Phase 1, every processor except S_0 applies the multiplier to both members of
the (α, β) pair and of the (η, ξ) pair. Each update uses the *old* value of the
partner register. In Phase 2, every processor computes

* α := (α + λβ) / ((1 − λ)(1 + λ))
* β := β + λα

So the symmetric array has a divider in every processor, not only in S_0. The
division by 1 − λ² is also why the general array is the better-behaved choice
numerically. The schedule and the 4N step count are the same, except that Phase 1
accepts τ ≤ 2N−k, which selects the same steps because of the parity rule.

Initial values for the symmetric array:

* α_k = t_(k+1) for k < N, and 0 for k = N
* β_k = t_k
* λ = 0
* ξ_k = b_(N−k−1) for k < N, and 0 for k = N
* η_k = b_(N−k)

## The factor regeneration array

The elimination turns T into an upper triangular matrix U = T⁽⁻ⁿ⁾. Storing U takes
O(n²) words. Only its last column and the 2n multipliers m_±1 … m_±n are needed,
because each elimination step can be undone, for i = n, n−1, …, 1:

* adding m_i times the up-shifted T⁽⁻ⁱ⁾ to T⁽ⁱ⁾ gives back T⁽ⁱ⁻¹⁾;
* adding m_−i times the down-shifted T⁽ⁱ⁻¹⁾ to T⁽⁻ⁱ⁾ gives back T⁽⁻ⁱ⁺¹⁾.

`regen_array` runs this inverse with N processors B_0 … B_(N−1) in a row. Each has
two registers, U and D:

* D starts with one element of U's last column: B_k holds t_(N−k, N).
* U starts at zero.

Iteration i = 1 … N works with the multiplier pair of k = N+1−i, and only
B_0 … B_(i−1) are active. It has three steps, one clock cycle each:

1. m_k is broadcast to all processors, and each active B_j does U_j += m_k · D_j.
2. m_−k is broadcast, and each active B_j does D_j += m_−k · U_j. The new D_j
   appears on output `d_data[j]` (line outd_j).
3. Every U moves one processor to the right, and U_0 becomes 0.

After step 2 of iteration i, `d_data[0 .. i−1]` is row N−i of U, from column N−i to
N−1. Column N of that row is the input column itself, so the rows come out bottom
to top. This is the order that back substitution needs them in.

Interface:

* `col_in`: N words with valid/ready, t_(N,N) first and t_(1,N) last. They shift
  in from the right end.
* `mult_in`: N pairs `{m_pos: m_k, m_neg: m_−k}` with valid/ready, k = N first.
  A pair is taken in step 1. The array waits in step 1 while `mult_valid` is low.
* Outputs: `d_valid` pulses once per iteration, in its third cycle. `d_count` is i
  and `d_last` marks i = N.

A regeneration takes N load cycles plus 3N cycles. In the worked example below,
the column that goes in is the β values that the general array holds after
Phase 1 (−288, −360, −480, −720). The rows that come out are −300; −320, −400;
−360, −480, −600; 120, 240, 360, 480.

The multiplier is broadcast to all processors in one step. A variant that passes
it from processor to processor, with B_k running k steps behind B_0, would avoid
the broadcast. That variant is not built.

## Interface and timing

Both solver arrays use the same protocol. The sequencer (`toeplitz_ctrl`) runs it:

1. **Load (N+1 cycles at full rate).**
   * Handshake: valid/ready; `in_ready` is high only while loading.
   * General array: word k = `{t_pos: t_k, t_neg: t_-k, b: b_(N-k)}`.
   * Symmetric array: word k = `{t: t_k, b: b_(N-k)}`.
   * Order: k = 0, 1, …, N. Words enter at S_N and shift left, so the first word
     ends up in S_0. Gaps in `in_valid` are allowed.
2. **Init (1 cycle).** Every processor copies its right neighbour's β, γ, η into
   δ, α, ξ. This is exactly t_(k+1), t_−(k+1), b_(N−k−1). Zeros enter beyond S_N.
3. **Run (4N cycles).** One time step per clock, τ = 1 … 4N.
4. **Unload (N+1 cycles).** ξ shifts left. `x_data` carries x_0, x_1, …, x_N on
   consecutive cycles with `x_valid`. `x_last` marks x_N. There is no
   back-pressure.

x_0 appears 4N+2 cycles after the last input word. A complete solve takes
(N+1) + 1 + 4N + (N+1) = 6N+3 cycles. The next system can be loaded as soon as
unloading ends.

Reset (`rst_n`) is synchronous and active low: it clears every register on a
rising clock edge while it is low.

## Number format

Every value is signed fixed point: 32 bits, 16 of them fraction bits (Q15.16).
The range is ±32768 and the resolution is 1.5·10⁻⁵. The package `toeplitz_pkg`
holds the format (`DATA_W`, `FRAC_W`) and the arithmetic helpers:

* Addition, subtraction and multiplication saturate instead of wrapping.
* Multiplication truncates towards −∞.
* Division truncates towards zero.
* Division by zero saturates towards the sign of the dividend.

The algorithm is normally stated for floating point. Fixed point is this design's
choice, made to keep every processor plain integer logic. It means:

* T and b must be scaled so that the intermediate values stay within range. In the
  5×5 example below, values reach 4560.
* Accuracy is set by the absolute resolution, not a relative one. On the test
  matrices (diagonal 3.5–4.5, off-diagonals in ±1, N = 4 and 12) the solution
  agrees with a double-precision solve to better than 10⁻⁴.

To use another format, change `DATA_W`/`FRAC_W` in the package.

## Hardware cost and critical path

One time step is one clock cycle, and the whole step is combinational. The longest
path is in S_0's Phase 1 step: a 64/32-bit division, two multiply-subtracts, a
second division, then three more multiply-subtracts. The critical path is
therefore long. If a higher clock rate is needed, the natural refinements are:

* pipeline the step over several cycles (the schedule only needs every processor
  to advance together);
* use an iterative divider.

Neither is built here. Only S_0 of the general array has dividers, two of them.
Every processor of the symmetric array has one, for the 1 − λ² division.

At N = 4 the regeneration array needs about 425 flip-flops (two registers, one
output line and the sequencer). The general array synthesises to about 1,900 flip-flops, mostly the eight
32-bit registers and five 32-bit output lines of each processor. Logic grows
linearly with N.

## Where this RTL departs from, or adds to, the published design

* **Fixed point instead of floating point** (see above).
* **Loading and unloading.** The published design only states that the initial
  values can be put in place in O(n) time from one end of the array. The shift
  chains, the one-cycle init copy and the serial output of x are this design's.
* **Global step counter.** Each processor knows its index (parameter `K`) and
  receives τ from a shared counter, which is one of the two options the published
  design allows. The alternative, 1-bit systolic control paths, is not built.
* **Not built:**
  * pairing adjacent processors into one (possible because only one of each pair
    is active, which would raise utilisation from 25 % to 50 %);
  * merging each in/out line pair into one bidirectional line.

  Both are mentioned as possible refinements.
* **Stepping-stone arrays.** The published design reaches the complete solver
  through three simpler arrays:
  * a 2n−1 processor factorisation array;
  * a back-substitution array;
  * an n-processor array that regenerates the upper factor.

  Each processor S_k of the solver merges all three roles. Of the three, only
  the regeneration array is also built on its own (`regen_array`), with the
  multiplier broadcast. The other two have no module of their own.
* **Default size N = 4** (5×5 systems), the size of the worked example. Any
  N ≥ 1 can be set. An array of size N solves systems of order N+1 only.

## Files

| file | contents |
|---|---|
| `rtl/toeplitz_pkg.sv` | number format, bus and load-word structs, saturating fixed-point helpers |
| `rtl/bareiss_cell.sv` | processor S_k of the general array |
| `rtl/toeplitz_ctrl.sv` | load / init / run / unload sequencer and step counter τ |
| `rtl/toeplitz_solver.sv` | general array: N+1 processors + sequencer |
| `rtl/bareiss_sym_cell.sv` | processor S_k of the symmetric array |
| `rtl/toeplitz_sym_solver.sv` | symmetric array: N+1 processors + sequencer |
| `rtl/regen_cell.sv` | processor B_k of the regeneration array |
| `rtl/regen_array.sv` | regeneration array: N processors + its three-step sequencer |
| `rtl/toeplitz_system.sv` | top level: the three arrays side by side |
| `tb/tb_bareiss_cell.sv` | one step of S_0 and S_2 against a double-precision model of the program |
| `tb/tb_bareiss_sym_cell.sv` | the same for the symmetric processor |
| `tb/tb_toeplitz_ctrl.sv` | sequencer: word count, init, τ = 1…4N, unload, x_last |
| `tb/tb_toeplitz_solver.sv` | general array, N = 4: 20 random systems against Gaussian elimination; step count, latency, per-phase activity |
| `tb/tb_toeplitz_solver_n12.sv` | the same at N = 12 |
| `tb/tb_toeplitz_sym_solver.sv` | symmetric array, N = 4, 20 random symmetric systems |
| `tb/tb_regen_array.sv` | regeneration array, N = 4: the worked example's factor, then 30 random cases against a model of the three steps; 3 cycles per iteration |
| `tb/tb_toeplitz_system.sv` | whole design at default parameters: all three arrays concurrently; the two solvers are cross-checked on the same symmetric system |
| `tb/tb_bareiss_example.sv` | the worked 5×5 example below, step by step |

## The worked example

`tb_bareiss_example` uses the 5×5 example:

* T = 120 · toeplitz(1, 2, 3, 4, 5), so t_k = t_−k = 120(k+1).
* b = 120 · (30, 22, 18, 20, 30).

In the general array the testbench checks these intermediate values:

| quantity | expected values |
|---|---|
| S_0's multipliers m₋₁…m₋₄ | 2, −1, −2/3, −1/2 |
| S_0's multipliers m₁…m₄ | −2/3, −1/8, −1/10, −1/12 |
| β_0…β_4 at the end of Phase 1 (last column of the upper factor) | −288, −360, −480, −720, 600 |
| η_0…η_4 at the end of Phase 1 (b⁽⁻⁴⁾ in reverse order) | 0, −1200, −2560, −4560, 3600 |

Both arrays must then produce x = (1, 2, 3, 4, 0).

## Simulating

All testbenches are self-checking. Each prints `TB_RESULT checks=N failures=M`
and stops with `$finish`. Each has a watchdog that counts a failure if the
simulation hangs. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -y rtl rtl/toeplitz_pkg.sv \
          tb/tb_toeplitz_system.sv --top-module tb_toeplitz_system -o sim
./obj_dir/sim
```

Replace the testbench name to run the others. `-y rtl` lets Verilator find the
modules a testbench uses. Each run takes well under a second.

The RTL contains concurrent assertions:

* adjacent processors are never active in the same step;
* τ stays within 1…4N while running;
* a processor is never asked to step and load/unload at once;
* the active processors of the regeneration array are always B_0 … B_(i−1).

`--assert` turns them on.

## How far to trust it

* **Tested:**
  * both processor programs step by step against an independent
    floating-point model;
  * both solver arrays end to end on random systems at N = 4 (and the general
    array at N = 12) against Gaussian elimination;
  * the regeneration array on the worked example's factor and on random
    columns and multipliers;
  * the schedule, down to the cycle;
  * the worked example's intermediate values.
* **Not covered by any test:**
  * systems whose leading principal submatrices are singular or
    nearly so (the algorithm does not pivot, so such systems fail);
  * systems whose intermediate values leave the fixed-point range (results then
    saturate);
  * large N, for example N ≈ 1000. Nothing in the RTL limits N, but simulation
    and synthesis grow linearly with it.
