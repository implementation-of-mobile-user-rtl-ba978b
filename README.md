# Systolic array for conjugate-gradient mobile user tracking

A base station with an array of M antennas can follow mobile users by
tracking, for each user, a weight vector `w` that converges to that user's
steering vector. The signal-subspace tracker implemented here updates `w`
once per snapshot with the modified, sample-by-sample conjugate gradient
algorithm (MCG):

```
alpha(n) = eta * p^H(n-1) g(n-1) / p^H(n-1) R(n-1) p(n-1)
w(n)     = w(n-1) + alpha(n) p(n-1)
g(n)     = lambda g(n-1) - alpha(n) R(n-1) p(n-1) + x(n) (d(n) - x^H(n) w(n-1))
beta(n)  = max{ (g(n) - g(n-1))^H g(n) / g^H(n-1) g(n-1), 0 }
p(n)     = g(n) + beta(n) p(n-1)
```

`R` is the M x M sample correlation matrix, `x(n)` the antenna snapshot,
`d(n)` the user's reference signal, `lambda` the forgetting factor and
`eta` an auxiliary step size with `lambda - 0.5 <= eta <= lambda`.

The recursion is serial, so the whole algorithm does not map well onto an
array, and its choice of `beta` reset rules is easier to handle in
software. The cost, O(M^2) per user and sample, is almost all in four
products:

| product            | used for                  |
|--------------------|---------------------------|
| `v = R p`          | denominator of alpha, update of g |
| `pg = p^H g`       | numerator of alpha        |
| `pv = p^H v`       | denominator of alpha      |
| `gg = g^H g`       | denominator of beta       |

This RTL computes exactly these four in a systolic array of M^2 + M cells,
so a host processor is left with O(M) work per user: two divisions and a
few vector updates. One vector pair takes O(M) clock cycles instead of
O(M^2) multiply steps.

## The array

```
              r_row (preload, shifts down)
                |      |      |      |
  p_0 ------> [PE1]->[PE1]->[PE1]->[PE1]--+ p_0
  p_1 -(1)--> [PE1]->[PE1]->[PE1]->[PE1]--|--+ p_1
  p_2 -(2)--> [PE1]->[PE1]->[PE1]->[PE1]--|--|--+ p_2
  p_3 -(3)--> [PE1]->[PE1]->[PE1]->[PE1]--|--|--|--+ p_3
                |v_0   |v_1   |v_2   |v_3 |  |  |  |
   0 ------>  [PE2]->[PE2]->[PE2]->[PE2]----> pg, pv, gg
                 |      |      |      |
                v_0    v_1    v_2    v_3   (extra ports)
   (k) = delay of k cycles; g_c reaches PE2 c through a delay of M + c
```

* **PE1 grid (M x M).** Grid cell (k, c) stores the element `R[c][k]`.
  Element `p_k` enters row k from the left and moves one cell right per
  cycle; the partial sum of `v_c` moves one cell down column c per cycle.
  Each cell adds `p_k * R[c][k]` to the sum passing through it, so `v_c`
  leaves the bottom of column c complete. The stored element never moves
  during computation: once loaded, R serves any number of vector pairs,
  which is what the N users of one snapshot need, since they all share
  `R(n)`.
* **PE2 linear array (M cells)** sits under the grid. PE2 c takes `v_c`
  from above and adds `conj(p_c) g_c`, `conj(p_c) v_c` and `|g_c|^2` to
  three running sums that move right. The last cell delivers `pg`, `pv`
  and `gg`. Each PE2 has an extra output port that hands `v_c` out, so the
  host gets all of `v` for the `g` update without storing it in the cells
  and shifting it out afterwards.
* **Where p and g meet v.** `p_c` leaves the right end of grid row c in
  exactly the cycle in which `v_c` leaves the bottom of column c (both
  after M + c cycles), so it is routed from there to PE2 c. `g_c` has no
  use in the grid and reaches PE2 c through a delay line of M + c cycles.

### Complex multipliers

Every cell multiplies complex numbers with the strength-reduced form
(`cmul_sr`), which shares one product between the real and imaginary
parts:

```
re = (a_re - a_im) * b_im + a_re * (b_re - b_im)
im = (a_re - a_im) * b_im + a_im * (b_re + b_im)
```

Three real multiplications instead of four, at the cost of three extra
additions, which saves area and power since multipliers dominate both. A
parameter `CONJ_A` negates `a_im` first, giving `conj(a) * b` for the
Hermitian inner products. The grid needs one multiplier per cell, the
linear array three, so the array has M^2 + 3M complex multipliers, i.e.
3M^2 + 9M real multipliers (60 for M = 4).

## Timing

One clock cycle is one time step; every cell registers its outputs.

| phase    | cycles | what happens |
|----------|--------|--------------|
| preload  | M      | `r_load` high; one row of grid values per cycle shifts down the columns |
| compute  | 2M     | M cycles through the grid (plus skew), M through the linear array |
| total    | 3M     | first preload cycle to result, 12 for M = 4 |

Inside the array the elements are skewed: `p_k` enters row k k cycles
after `p_0`. The input delay lines do this, and output delay lines
(`M - 1 - c` cycles on `v_c`) line the elements of `v` up again, so the
host presents and receives whole vectors. The array is fully pipelined:
a new `(p, g)` pair may be presented in every cycle, and N users need
`M + 2M + N - 1` cycles per snapshot.

## Interface of `mcg_systolic_array`

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; synchronous reset, active low, clears all registers |
| `r_load` | in | shift `r_row` into the top grid row |
| `r_row[M]` | in | at load step t (t = 0 .. M-1), `r_row[c] = R[c][M-1-t]`: the last column of R first |
| `r_ready` | out | M load steps completed and no load in this cycle |
| `busy` | out | vector pairs in flight |
| `in_valid`, `p_vec[M]`, `g_vec[M]` | in | one vector pair |
| `out_valid` | out | results valid, 2M cycles after `in_valid` |
| `pg`, `pv` | out | `p^H g`, `p^H R p`, complex |
| `gg` | out | `g^H g`, real |
| `v_vec[M]` | out | `v = R p` |

Rules, checked by assertions in the RTL: present vectors only while
`r_ready` is high; raise `r_load` only while `busy` is low. A new
preload restarts after M load cycles, so loading a new `R(n)` is simply
M more cycles of `r_load`.

### Number formats (`mts_pkg`)

* Inputs (`R`, `p`, `g`): complex, 16-bit two's complement real and
  imaginary parts with 12 fraction bits (range -8 .. +8).
* Partial sums, `v` and the three results: 32-bit parts, 12 fraction bits.
* Each product is formed exactly and then truncated (arithmetic shift
  right by 12) before it is added, so results match a reference that
  truncates each term the same way, bit for bit.

The word lengths, the truncation, the handshake and the reset are this
design's choices; nothing in the algorithm fixes them. The host must keep
R, p and g within the input range; in the tracking workload below nothing
saturates with lambda = 0.9 and input amplitudes up to about 0.75.

## What is left to the host

The host (software in the intended partitioning) forms `R(n)`, divides
for `alpha` and `beta`, applies the `beta` reset rule and updates `w`, `g`
and `p`. The angle-of-arrival estimation (a least-squares fit on the
tracked weight vectors) and the conventional beamformer
`y = (w^H w)^-1 w^H x` also run on the host. None of this is in the RTL.

## Departures and open points

* The cell counts (M^2 PE1 + M PE2), the preload of M steps and the
  3M-step total are the reference architecture's. The orientation (p along
  rows, v down columns), the routing of p and g to the linear array, the
  skew and alignment delay lines and the valid flags are this design's
  own, chosen to meet those numbers.
* Only the modified PE2 with the extra output port is built. The
  alternative, a small memory in each PE2 from which `v` is shifted out
  through the last PE2 afterwards, is not.
* `gg` uses a full SR multiplier on `conj(g) * g` and keeps the real part;
  its imaginary part is exactly zero and is dropped, so lint reports that
  signal as unused. A dedicated squarer with two multipliers would be
  smaller.
* No saturation: an accumulator overflow would wrap. With 16-bit inputs
  and 32-bit accumulators no sum can overflow for M < 16, even with
  full-scale inputs (`pv` is the first to reach the limit, at M = 16).

## Files

| file | content |
|------|---------|
| `rtl/mts_pkg.sv` | word widths and complex struct types |
| `rtl/cmul_sr.sv` | three-multiplier complex multiplier |
| `rtl/pe1.sv` | grid cell |
| `rtl/pe2.sv` | linear-array cell with the v output port |
| `rtl/delay_line.sv` | parameterised delay used for skew and alignment |
| `rtl/mcg_systolic_array.sv` | the array (top), parameter `M` = 4 |
| `tb/tb_cmul_sr.sv` | multiplier against the four-multiplication formula, corner and random values |
| `tb/tb_pe1.sv`, `tb/tb_pe2.sv` | cell functions, one cycle at a time |
| `tb/tb_mcg_systolic_array.sv` | end to end at M = 4: preload, 3M timing, 2M latency, back-to-back users, gaps, reloads |
| `tb/tb_mcg_systolic_array_m5.sv` | the same at M = 5 |
| `tb/tb_mcg_tracking.sv` | the full MCG recursion for two users over 300 snapshots, host in floating point, products from the array; checks every product, the latency, and that both weight vectors lock on to their users |

## Verification

* `cmul_sr` is compared with the four-multiplication complex product on
  all pairs of corner values (most negative word, -1, 0, 1, most positive)
  and 2000 random operand sets, for `a*b`, `conj(a)*b` and the wide
  variant used for `p^H v`. The results are exact, so the comparison is
  bit for bit.
* `pe1` and `pe2` are checked cycle by cycle against the same formulas,
  including that `r` holds while `load` is low.
* The array (M = 4 and M = 5) is checked bit for bit against a reference
  that truncates each product as the cells do, with a new random
  Hermitian R for each of seven preloads: one single operation (3M cycles
  from the first preload step to the result), five vector pairs back to
  back, twenty with random gaps, and short bursts after further reloads.
  Every result must appear exactly 2M cycles after its vectors.
* The tracking workload runs the whole MCG loop for two users at -20 and
  +35 degrees on a four-element half-wavelength array, with lambda = 0.9
  and eta = 0.6. After 300 snapshots each weight vector has a normalised
  correlation of about 0.99 with its user's steering vector, and the angle
  read from the phase step between neighbouring weights is within about
  2 degrees. No value sent to the array saturates.

In a trial with one user moving 15 degrees over the 300 snapshots, the
estimate trailed the true angle by several degrees while the residual
`b - R w` stayed small: the lag lies in the exponentially weighted
least-squares solution the algorithm tracks, not in the array, so moving
users are not part of the checks.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops (the
testbenches compare values as 64-bit integers, so Verilator reports width
extensions there; `-Wno-fatal` keeps those as warnings). With
Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mts_pkg.sv tb/tb_mcg_tracking.sv --top-module tb_mcg_tracking -o sim
./obj_dir/sim
```

Replace the testbench name for the others. To change the number of
antennas, override `M` on `mcg_systolic_array`; the word formats are in
`rtl/mts_pkg.sv`.
