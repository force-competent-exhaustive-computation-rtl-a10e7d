# Two-step low-power parallel Chien search

A BCH decoder ends with a Chien search: it tries every field element
alpha^i as a root of the error-locator polynomial

    lambda(x) = 1 + lambda_1 x + lambda_2 x^2 + ... + lambda_T x^T     over GF(2^M)

and flags position i wherever lambda(alpha^i) = 0. A P-parallel search
tries P elements per clock, so each cycle it runs P x T constant
multipliers of M bits. Almost all of that work is wasted: only a handful of
the thousands of positions are roots.

This design cuts that waste by testing each sum in two steps. A root needs
the sum `lambda_1 alpha^i + ... + lambda_T alpha^(iT)` to equal 1, so its top
L bits must be zero. The first step computes only those L bits, every
cycle. Only when they are zero, which on random data happens about once in
2^L cycles, does the second step compute the other M-L bits, in the next
cycle. A flip-flop between the steps keeps the critical path as short as
that of a one-step search.

With M = 14 and L = 3 the multiplier activity falls to about 40% of a
one-step search (about 60% saving under the model below), and L = 3 is the
best choice for M = 14.

## How one row is split

Column j keeps a register `r_j = lambda_j * alpha^(w*P*j)` for block w. The
block covers positions w*P+1 ... w*P+P. Row I (1..P) needs

    S_I = sum_j r_j * alpha^(I*j)          root at alpha^(w*P+I)  <=>  S_I == 1

Multiplying by a constant is linear over GF(2), so every product bit is an
XOR of input bits, and any subset of output bits can be built on its own.
A *partial* constant multiplier builds only some rows of that matrix. This
is `cs_ffm` with `HI`/`LO`.

* **Row P** (`two_step_cs`, `cs_coef_reg`). Its products `r_j * alpha^(P*j)`
  are exactly the next register values, so these full multipliers are
  shared with the register update. Row P tests all M bits at once.
* **Rows 1..P-1, step 1** (`cs_step1_row`). T partial multipliers keep
  product bits `[M-1:M-L]`. Their XOR is tested for zero, because 1 has
  zeros there. The result goes into a flip-flop, `flag`.
* **Rows 1..P-1, step 2** (`cs_step2_row`). This step runs one cycle
  later, when the registers already hold block w+1, i.e. `r_j * alpha^(P*j)`.
  It does not keep copies of the old register values. It multiplies the new
  ones by `alpha^((I-P)*j)` (negative exponent, taken modulo 2^M-1). That
  gives the same terms as before, with no extra storage. Only bits
  `[M-L-1:0]` are built, and their XOR is compared with `0...01`.
* **Switching the second step off.** The second-step multiplier inputs are
  forced to zero while `flag` is clear. Then they do not toggle. Their sum is
  also zero, which never equals `0...01`, so the same gating masks the
  error flag too.

The flag of row P is also registered once, so all P results of a block
appear together.

## Interface and timing (`two_step_cs`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; active-low asynchronous reset |
| `start` | in | 1 | one-cycle pulse; `lambda` is sampled in that cycle |
| `lambda` | in | M x [T] | `lambda[j-1]` = lambda_j (lambda_0 = 1 implied; unused high terms 0) |
| `busy` | out | 1 | a search or its last result is in progress |
| `err_valid` | out | 1 | `err` holds one block |
| `err_blk` | out | clog2(NB) | block index w |
| `err` | out | P | `err[I-1]` = lambda(alpha^(w*P+I)) == 0 |
| `done` | out | 1 | high with the last block |
| `step2_on` | out | P-1 | second step of row I is switched on (activity monitor) |

A search covers alpha^1 ... alpha^N in NB = ceil(N/P) blocks:

* edge 1 after `start`: the registers load lambda;
* edges 2 .. NB+1: one block per cycle is searched;
* `err_valid` rises 2 cycles after `start` and stays high for NB cycles;
* `done` comes NB+1 cycles after `start`.

`start` is ignored during a search, but is accepted in the `done` cycle, so
searches can run back to back. A new search then starts every NB+1 cycles.
Positions past N in the last block read 0.

The design flags roots alpha^i. Which code-word bit a root stands for
(alpha^i, or its inverse, for a shortened or full-length code) depends on
the code, and the user does that mapping.

Parameters, with their defaults:

| parameter | default | notes |
|---|---|---|
| `M` | 14 | field dimension (2..16) |
| `L` | 3 | MSBs tested in the first step (1..M-1) |
| `P` | 8 | parallel factor (>= 2) |
| `T` | 40 | error-correction capacity, number of coefficients |
| `N` | 2^M-1 | positions searched |
| `POLY` | x^14+x^10+x^6+x+1 | primitive polynomial, bit k = coefficient of x^k; change it together with M |

M = 14 and L = 3 are the configuration the method was evaluated with.
P, T, N and the polynomial are choices of this implementation. The
constant-multiplier matrices are computed at elaboration (functions in
`cs_pkg`), so any parameter set works without tables.

At the defaults, synthesis gives about 15k word-level cells and 592
flip-flops. Most of the logic is in the 40 full, 280 MSB-partial and 280
LSB-partial constant multipliers.

## Choosing L

The usual estimate assumes that multipliers dominate power. Each one costs
in proportion to its output width times how often its inputs change. Per
cycle, relative to a one-step search:

    activity = (M + (P-1) * (L + (M-L) * a)) / (P*M),     a ~ 2^-L

A larger L examines more bits every cycle, but it switches the second step
on less often. `tb_cs_power_model` runs L = 2, 3, 4 and 5 side by side on
the same random polynomials and measures a:

| L | measured a | activity | saving |
|---|---|---|---|
| 2 | 0.247 | 0.435 | 56% |
| 3 | 0.124 | 0.398 | 60% |
| 4 | 0.061 | 0.413 | 59% |
| 5 | 0.030 | 0.454 | 55% |

These are multiplier-activity estimates, not power measured on a netlist.
The best L depends on M and P and is worth a sweep with real power
analysis. Two things are not in the model: the flip-flops, and the
first-step XOR trees. The model also assumes random coefficients. With
lambda(x) = 1 (no errors), every first-step sum is 0, so the second step
runs every cycle. The results are still correct; only the saving is lost.

## Files

| file | contents |
|---|---|
| `rtl/cs_pkg.sv` | default parameters, primitive polynomial, elaboration-time GF helpers |
| `rtl/cs_ffm.sv` | constant multiplier by alpha^EXP, full or partial (`HI`/`LO`) |
| `rtl/cs_coef_reg.sv` | coefficient register, load multiplexer, alpha^(P*j) update multiplier |
| `rtl/cs_step1_row.sv` | first step of one row: MSB partial multipliers, zero test, flag flip-flop |
| `rtl/cs_step2_row.sv` | second step of one row: gated LSB partial multipliers, compare with 0...01 |
| `rtl/cs_ctrl.sv` | load / NB search cycles / output marking / done |
| `rtl/two_step_cs.sv` | top: T columns, P-1 split rows, full-width row P, controller |
| `tb/tb_gf_pkg.sv` | independent reference GF(2^14) arithmetic (log/antilog tables) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the power-model sweep |

## Verification

Every testbench checks against its own field arithmetic in `tb_gf_pkg`.
That package uses MSB-first multiplication and log tables, not the design's
helpers. Each testbench prints `TB_RESULT checks=N failures=F` and has a
cycle watchdog.

* `tb_cs_ffm`: full and partial multipliers, with positive and negative
  exponents. Inputs are the basis vectors and 2000 random values.
* `tb_cs_coef_reg`: load priority, hold, and stepping.
* `tb_cs_step1_row` and `tb_cs_step2_row`: the last register value is
  solved for so that the row sum hits a chosen target. Targets are random,
  zero in the MSBs, 0...01 in the LSBs, or exactly 1. The test also checks
  the gating.
* `tb_cs_ctrl`: the cycle-exact sequence, starts that must be ignored, and
  a back-to-back start.
* `tb_two_step_cs`: the whole design at default parameters. It runs six
  searches: no errors, one error at position 1, five errors, 40 errors, and
  two random polynomials. Every one of the 16383 positions is compared with
  a direct evaluation of lambda. The test checks latency (2 cycles) and
  search time (NB+1 = 2049 cycles). It counts second-step activations,
  first-step false alarms, roots found by split rows and by row P, masking
  past N, and back-to-back starts, and requires each of these at least once.
* `tb_cs_power_model`: the L sweep above. The four instances must agree on
  every result.

To simulate with Verilator:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/cs_pkg.sv tb/tb_gf_pkg.sv tb/tb_two_step_cs.sv \
        --top-module tb_two_step_cs -o sim && ./obj_dir/sim

Run the same command with another `tb_*` name for the other testbenches.
The full-size test builds in about half a minute and runs in about a
second. The power sweep builds four full-size instances and takes about a
minute and a half.

## Limits and departures

* In the reference architecture the last-row result leaves its comparator
  unregistered. Here it is registered, so that a block's P flags line up.
  Remove `err_p_q` to go back to that timing. Rows 1..P-1 would then report
  one cycle after row P.
* The second step is switched off by forcing its inputs to zero. Latching
  the inputs would work as well. The gate style was a free choice.
* The search control (start/done, masking past N, positions starting at
  alpha^1) belongs to this implementation. So do P = 8, T = 40 and the
  primitive polynomial.
* Syndrome calculation and key-equation solving, which feed this block in
  a BCH decoder, are not included. `lambda` is their output.
* No power analysis of a netlist has been done. Only the activity model
  above is checked. The method is expected to save roughly half of the
  power of a one-step search in practice.
* Two other schemes are not built: early termination after the last
  error, and area-sharing search structures. Either could be combined with
  the two-step test.
