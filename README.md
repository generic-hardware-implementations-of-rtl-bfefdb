# AMNS modular multiplier on DSP blocks

This is a modular multiplier for large integers (a 256-bit modulus by default). It keeps
its numbers in the Adapted Modular Number System (AMNS). In AMNS an integer modulo `p` is
a short polynomial with small signed coefficients, evaluated at a secret point
`gamma`. A modular multiplication is then a polynomial product followed by two
reductions. Each step splits into many independent small products, and those map well
onto the 25x18-bit multiply / 48-bit add DSP blocks of an FPGA.

The RTL is generic in the number of coefficients `N`, the number of 17-bit sections
per coefficient `K`, the reduction constant `lambda` and `phi`. It offers two ways
of recombining partial products, the *Line Column* model (the default, fewer cycles)
and the *Column* model (shorter wires). The architecture follows the work
"Generic Hardware Implementations of AMNS Arithmetic". The section "What is taken from
the original design and what is not" lists where this RTL fills gaps in it.

## The arithmetic

An AMNS is defined by `p`, `N`, `gamma` and `lambda`, with `gamma^N = lambda (mod p)`
and `|lambda| <= 16`. Let `E = X^N - lambda`. An integer `a` is represented by
`A = A_0 + A_1 X + ... + A_(N-1) X^(N-1)` with `A(gamma) = a (mod p)` and every
`|A_i| < rho`.

Multiplying two representations needs two reductions:

* **External reduction** (the number of coefficients). `A*B` has degree `2N-2`. Since
  `X^N = lambda`, every term of degree `N+k` folds back onto degree `k` with a factor
  `lambda`:

      C_j = sum over t of  w(t,j) * A_t * B_((j-t) mod N),   w = lambda if t > j, else 1

* **Internal reduction** (the size of coefficients). This is Montgomery's trick in
  polynomial form. It uses `phi = 2^PHI_W` and two constant polynomials `M`, `M'` with
  `M(gamma) = 0 (mod p)` and `M*M' = -1 mod (E, phi)`:

      C = A*B mod E
      Q = C*M' mod (E, phi)          (every coefficient taken mod phi)
      S = (C + Q*M mod E) / phi      (the division is exact)

  `S(gamma) = A(gamma)*B(gamma)*phi^-1 (mod p)`. As with Montgomery multiplication,
  operands stay in the "times phi" domain.

The coefficients of `S` are small again when `rho` is chosen large enough for `M` and
small enough for `phi`. Roughly, `2*N*|lambda|*max|M_i| <= rho` and
`N*|lambda|*rho^2 < phi*rho/2` are needed. Only then can `S` be fed back as an operand.
Choosing the AMNS, `M` and `M'` happens off-line and is not part of this RTL.

## One coefficient product on K*K DSP blocks

A coefficient is a two's-complement number of `17K` bits (68 bits for `K = 4`). It is
cut into `K` sections of 17 bits, `A = a_0 + a_1 Y + ... + a_(K-1) Y^(K-1)` with
`Y = 2^17`. Every section is widened to 18 bits: the low sections with a zero, and the
top section with its sign bit (or a zero, for non-negative values mod `phi`). The section
then fits the signed multiplier. One *coefficient resource* has `K*K` DSP blocks. DSP
`(i,j)` multiplies `a_i` by `b_j`.

**The lambda factor costs no DSP.** `lambda` has at most 5 bits of magnitude. An 18-bit
section times `lambda` fits the 25-bit A port, so the section is scaled before the
multiplier (`lambda_mul`). This gives `lambda*A = lambda*a_0 + lambda*a_1 Y + ...`,
still split into sections.

**Accumulation.** A resource computes a whole sum such as
`lambda*A_1*B_2 + lambda*A_2*B_1 + A_0*B_0`. It gets one term per cycle, and every DSP
accumulates its partial product over the `N` cycles. The 48-bit accumulators leave room
for this growth. The worst case at `N <= 7`, `K <= 5`, `|lambda| <= 16` stays below
2^46.

**Recombination** turns the `K*K` accumulators back into one integer. Group the DSPs by
weight `Y^d` (`d = i + j`). A chain then runs from weight 0 upwards,
`R_d = (sum of weight d) + (R_(d-1) >>> 17)`. The low 17 bits of each `R_d` are result
bits. The two models differ in how they form the per-weight sums:

* **Column model** (`coef_mult_column`). All `K*K` DSPs form a single cascade in
  weight order. At step `s`, DSP `s` adds the accumulator of DSP `s-1`, shifted right
  by 17 where the weight changes. The cascade has `K*K-1` steps. For `K = 3`:

  | step | action |
  |---|---|
  | 1 | `P1 += P0 >>> 17` (a0b1) |
  | 2 | `P2 += P1` (a1b0) |
  | 3 | `P3 += P2 >>> 17` (a0b2) |
  | 4, 5 | `P4 += P3`, `P5 += P4` |
  | 6 | `P6 += P5 >>> 17` |
  | 7 | `P7 += P6` |
  | 8 | `P8 += P7 >>> 17` |

* **Line Column model** (`coef_mult_line_column`). The DSPs of one weight form a *line*
  and add up along it, one neighbour per step. The last DSP of weight `d` adds both its
  line neighbour and the shifted chain value at step `d`. This uses the DSP's
  three-input adder. The lines fill up while the carry chain is still on its way, so a
  full recombination takes only `2K-2` steps. For `K = 3`:

  | step | action |
  |---|---|
  | 1 | `P2 += P1 + (P0 >>> 17)`, `P4 += P3` |
  | 2 | `P5 += P4 + (P2 >>> 17)` |
  | 3 | `P7 += P6 + (P5 >>> 17)` |
  | 4 | `P8 += (P7 >>> 17)` |

  The rule for any `K` is as follows. The DSP at position `p` of a line adds its
  predecessor at step `p`. The last DSP of weight `d` adds at step `d`. A line of weight
  `d` has at most `d+1` members, so it is always complete by step `d`.

**Short recombination.** `Q` is needed only modulo `phi = 2^(17K)`, so only weights
`0..K-1` matter. The chain stops after `K-1` steps (Line Column) or `K(K+1)/2-1` steps
(Column).

The result of a resource is `17*(2K-2) + 48` bits wide: 17 bits from the last DSP of
each weight except the top one, then the 48-bit top accumulator.

## N resources and the term schedule

`amns_ext_mult` puts `N` resources side by side, one per output coefficient. In term
cycle `t = 0..N-1`:

* all resources receive the same `A_t`;
* resource `j` receives `B_((j-t) mod N)`;
* resource `j` turns on its lambda pre-multiplier when `t > j`, which is exactly the
  terms that wrapped past `X^N`.

After `N` cycles every resource recombines, and all `N` coefficients of the product
mod `E` come out together.

## The three products and the cycle budget

`amns_ctrl` runs the three products of the internal reduction one after the other on
the same resources. Each product needs the previous one's result.

| product | A side | B side | top sections | recombination |
|---|---|---|---|---|
| `C = A*B mod E` | `A` | `B` | both signed | full |
| `Q = C*M' mod (E,phi)` | `C mod phi` | `M' mod phi` | both unsigned | short |
| `U = C + Q*M mod E` | `Q` | `M` | `Q` unsigned, `M` signed | full |

The addition of `C` in the last product costs nothing. Every DSP adder has a third
input (its C port). `C_j` is kept in the result format, 17-bit pieces plus a 48-bit top
part. Each piece enters the first DSP of its weight together with the first product
term. The result `U_j` is divisible by `phi`, so `S_j = U_j >>> PHI_W` is plain wiring,
truncated to `17K` bits into the output register.

Every product costs `N` issue cycles plus its recombination steps plus three register
stages: the operand register after `lambda_mul`, the DSP product register, and the
capture of the result. Add one cycle to capture the operands and one for the output
register. The total is

    Line Column:  10 + 3N + 2(2K-2) + (K-1)          = 40 cycles at N=5, K=4
    Column:       10 + 3N + 2(K*K-1) + K(K+1)/2 - 1  = 64 cycles at N=5, K=4

These are the cycle counts of the original design. It reports 40 and 64 cycles for a
256-bit modulus on 80 DSPs, and 51 cycles on 175 DSPs for 512 bits (`N = 7`, `K = 5`).
Only the overall count of 10 extra cycles is given there. How those cycles are spread
over the stages is this implementation's choice.

## Interface and timing (`amns_mult`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start_i` | in | 1 | start; sampled only when idle, and captures `a_i`, `b_i` |
| `a_i`, `b_i` | in | `N x 17K` | operands, coefficient `j` in `[j]`, two's complement |
| `m_i` | in | `N x 17K` | `M`, signed; hold stable while busy |
| `mp_i` | in | `N x 17K` | `M'`, used mod `phi`; hold stable while busy |
| `busy_o` | out | 1 | a multiplication is running; `start_i` is ignored |
| `done_o` | out | 1 | one-cycle pulse, `s_o` is valid from this cycle |
| `s_o` | out | `N x 17K` | `S`, held until the next `done_o` |

If `start_i` is sampled high on clock edge 0, `done_o` is high after edge 40 (defaults).
The multiplier is not pipelined across operations: one multiplication runs at a time.

Parameters:

| parameter | default | meaning |
|---|---|---|
| `N` | 5 | coefficients per number |
| `K` | 4 | 17-bit sections per coefficient (`N*K*K` DSP blocks) |
| `LAMBDA` | 2 | `E = X^N - LAMBDA`, magnitude at most 16 |
| `MODEL` | `MODEL_LINE_COLUMN` | or `MODEL_COLUMN` |
| `PHI_W` | `17*K` | `phi = 2^PHI_W`, `1 <= PHI_W <= 17K` |

## What is taken from the original design and what is not

Taken from it:
* the AMNS algorithm;
* 17-bit sections on 18-bit signed ports, and the 25-bit A port used for the lambda
  pre-multiplication;
* the 48-bit three-input accumulating DSP, with an extra input on the first DSP of
  each weight;
* `N` parallel coefficient resources;
* both recombination schedules for `K = 3`, the short recombination mod `phi`;
* the cycle counts for any `N`, `K`;
* the names `signed_en_i`, `lambda_mul_en_i`, `mul_input_a` of the operand stage.

This implementation's own choices:
* `N = 5`, `K = 4` are worked out from the published resource and cycle figures. They
  are not stated directly.
* `phi = 2^(17K)` follows from the short recombination, which keeps exactly `K`
  sections. The original says only that `phi` is a power of two.
* `LAMBDA = 2` is an arbitrary default. No lambda value is given for the evaluated
  AMNS.
* The schedules are generalised from `K = 3` to any `K`. Inside a weight the DSPs are
  ordered by ascending `i`.
* Partial sums are shifted arithmetically (`>>>`). The original tables write `>>` in
  one place and `>>>` in another.
* The term order differs: the original feeds the lambda-weighted terms first, while
  here term `t` pairs `A_t` with `B_((j-t) mod N)`. The sum is the same.
* The start/busy/done handshake, the reset, and `M`, `M'` as input ports rather than
  stored constants are also this implementation's own.
* Each DSP has one product register.
* The extra DSP inputs carry `C` into the last product. The original shows these
  inputs without saying what they carry.
* The B operand gets its own register next to the lambda stage.
* The third model of the original, *Flat Line Column* (`N*(2K-1)` DSPs, `(N+1)*K`
  cycles per product), is **not implemented**: its schedule is not described.
* Frequencies, LUT counts and area-delay figures are FPGA results that simulation
  cannot check.

A detail worth knowing: with `PHI_W = 17K` the signed/unsigned choice for the top
section does not matter in the `C*M'` product, because the difference is a multiple of
`phi`. It does matter for `Q` in the `Q*M` product, where `Q` must be read as non-negative.

## Files

`rtl/`:
* `amns_pkg.sv`: widths, enumerations, latency helpers
* `amns_mult.sv`: top level
* `amns_ctrl.sv`: sequencer
* `amns_ext_mult.sv`: `N` resources and the operand schedule
* `coef_mult_line_column.sv`, `coef_mult_column.sv`: one resource per model
* `lambda_mul.sv`: section split, sign handling, lambda pre-multiplication
* `dsp_resource.sv`: DSP block model

`tb/`:
* one self-checking testbench per module
* `amns_ref_pkg.sv`: big-integer reference
* `amns_mult_harness.sv`: generic driver for the top
* `tb_amns_mult_512.sv`: the 512-bit size on a real AMNS
* `tb_amns_mult_models.sv`: other sizes and models

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself through a
watchdog.

* `tb_amns_mult` runs the defaults (N=5, K=4, lambda=2, Line Column). It builds a real
  AMNS: `gamma = 2^50 + 24691`, `p = gamma^5 - 2` (255 bits), `M = X - gamma`, and `M'`
  by Newton iteration. For each of 40 multiplications (some chained, some at the
  extreme operand values) it checks:
  * every coefficient against a big-integer reference;
  * the congruence `S(gamma)*phi = A(gamma)*B(gamma) (mod p)`;
  * the 40-cycle latency.

  It also counts lambda-weighted terms, short recombinations, `Q` values with the top
  bit set, negative results and an ignored start.
* `tb_amns_mult_512` does the same at the 512-bit size (N=7, K=5, `phi = 2^85`,
  `gamma = 2^72 + 1234567`, a 505-bit `p = gamma^7 - 2`, operands below 2^78) and
  checks the 51-cycle latency.
* `tb_amns_mult_models` covers five more configurations:
  * N=5/K=4 Column with lambda=-16 (64 cycles);
  * N=7/K=5 Line Column (51 cycles) and Column (93 cycles);
  * N=3/K=3 with `phi = 2^48`;
  * N=2/K=2.
* The unit testbenches check each block against arithmetic written independently in
  the testbench:
  * the DSP model against a cycle reference;
  * the lambda stage section by section;
  * both resources at K=4 and K=3 against big-integer sums, including their latency;
  * the resource bank against the polynomial product mod E;
  * the sequencer against a stand-in for the resources.

To run one with Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb \
        rtl/amns_pkg.sv tb/amns_ref_pkg.sv tb/tb_amns_mult.sv --top-module tb_amns_mult
    ./obj_dir/Vtb_amns_mult

`-y` lets Verilator find every other module by its file name. Change the testbench
file and `--top-module` for the other testbenches. Each runs in well under a second.
