# Two-step low-power parallel Chien search for binary BCH codes

A BCH decoder ends with a Chien search: the error-locator polynomial

    Lambda(x) = lambda_0 + lambda_1 x + ... + lambda_t x^t

is evaluated at one field element per code position, and each zero marks a bit to flip.
A decoder with high throughput tests p positions per clock. That takes p·t constant
finite-field multipliers (FFMs) and p wide XOR trees. They switch on every cycle, but almost
none of the tested positions is an error. This Chien search is often the largest power
consumer in the decoder.

The idea implemented here is to split each root test into two steps:

1. **Step 1** computes only the W1 most significant bits of the sum
   `lambda_0 + sum_j lambda_j alpha^(j·i)` and checks them for zero.
2. **Step 2** computes the remaining m−W1 least significant bits, and only for positions that
   passed step 1.

A position that is not a root passes step 1 with probability of about 2^−W1. The
LSB-multipliers therefore stay idle almost all the time. With W1 = 4 of 14 bits, they were
active for about 6.5 % of the positions in the full-size simulation. That figure includes the
real roots. Splitting the test would lengthen the critical path. To avoid that, the two steps
are pipelined: step 2 runs one clock after step 1.

The design files are in `rtl/` and the self-checking testbenches are in `tb/`.

## The parallel search and its registers

For a p-parallel search, register j (j = 1..t) holds `lambda_j·alpha^(j·b)`. Here b is the
exponent just before the p positions tested in the current cycle. Row k (k = 1..p) needs
`regs[j]·alpha^(j·k)` for position b+k.

Row p is special. Its products `regs[j]·alpha^(j·p)` are exactly the next register values.
Its FFMs therefore have to run at full width every cycle, and it gains nothing from the split.
Row p is evaluated in one full-width step, and its result is delayed by a cycle to line up with
the other rows. Rows 1..p−1 use the two-step test.

```
            +--------------------- full FFMs, x alpha^(j p) ----------------+
            |                                                               |
  lambda -> regs[1..t] --+--> row 1..p-1: MSB partial FFMs -> XOR -> =0? --> s1_zero_q --+
            |            |                                                               |
            |            +--> regs_d[1..t] (delay registers)                             |
            |                     |                                                      v
            |                     +--> AND s1_zero_q -> LSB partial FFMs -> XOR -> =0? -> root
            |
            +--> row p: full sum -> =0? -> 1-cycle delay ------------------------------> root
```

Step 2 needs the register values of the cycle in which step 1 ran. By then the coefficient
registers have already moved on by p positions. The design handles this in one of two ways,
selected by the top-level parameter `STEP2_FROM_RENEWED`.

- **`STEP2_FROM_RENEWED = 0`** (the default) uses delay registers. A second bank of t
  registers (`regs_d`) keeps the previous cycle's values for the LSB multipliers. This is the
  straightforward way to pipeline the two steps. It costs t·m extra flip-flops: 560 at the
  default size.
- **`STEP2_FROM_RENEWED = 1`** uses the renewed registers. Step 2 reads the coefficient
  registers as they are now, p positions ahead. It compensates through its constants:
  `regs_new[j]·alpha^(j·(k−p)) = regs_old[j]·alpha^(j·k)`. The delay bank disappears and the
  step-2 multipliers change only their constants. This variant is this implementation's own
  way of removing the extra registers.

"Activating" step 2 is done by operand isolation. The LSB multiplier inputs are ANDed with the
registered step-1 result, so the LSB network sees constant zeros, and does not toggle, unless
step 1 passed. A step-2 result counts only when the stored step-1 result is 1.

## Partial FFMs

Multiplying by a constant `alpha^e` is a linear map over GF(2). Each product bit is the XOR of
a fixed subset of the input bits. `gf_const_mult` computes the columns of that matrix at
elaboration: column c is `alpha^e · alpha^c`. It then builds only the requested output rows
`HI..LO`.

- A full FFM uses rows 13..0.
- The step-1 partial FFM uses rows 13..14−W1.
- The step-2 partial FFM uses rows 13−W1..0.

Since the sum over j is taken bit by bit, the MSB test and the LSB test together are exactly
the full-width zero test.

## Code positions and timing

The field is GF(2^14) with primitive polynomial x^14 + x^10 + x^6 + x + 1. The default code is
a shortened BCH(8752, 8192, 40), whose code rate is 0.936.

- **Numbering.** Received bits are numbered by arrival: index 0 is r_{N−1} (the highest
  degree) and index N−1 is r_0.
- **Roots.** An error at degree l = N−1−idx is the root alpha^(−l) = alpha^(2^14−1−l).
- **Start of the scan.** The registers load `lambda_j·alpha^(j·START)` with
  START = 2^14 − N − 1. Row k of scan cycle g then tests index g·p + k − 1.
- **Last group.** The scan takes G = ceil(N/p) cycles. When N is not a multiple of p, the
  bits of the last group that lie beyond index N−1 are forced to 0.

```
cycle after edge:   A       A+1     A+2     A+3    ...   A+G+1
coef registers      grp 0   grp 1   grp 2   grp 3
step 1 (MSBs)       grp 0   grp 1   grp 2   grp 3
step 2 (LSBs)               grp 0   grp 1   grp 2
out_valid, out_loc                  grp 0   grp 1  ...   grp G-1 (out_last)
```

- **Start.** `start` is sampled on a clock edge when no scan is running. The coefficients on
  `lambda` are loaded on that edge (A). A `start` during a scan is ignored.
- **Outputs.** Scan cycle g produces `out_loc` with `out_valid` after edge A+2+g, one group
  per clock, with `out_last` on the final group. Bit k−1 of `out_loc` means an error at index
  `out_group·P + k − 1`.
- **Back-to-back words.** The next `start` is accepted in the cycle after the last scan
  cycle. Words can therefore follow every G+1 clocks, and their outputs run without a gap
  except for that one cycle.
- **`step2_active[k−1]`.** This output is high in the cycle where row k's LSB multipliers work
  on a group. It is meant for power and activity accounting.
- **`busy`.** High from the load until the last output.
- **Reset.** Asynchronous and active low.

Throughput at the default size is 8 positions per clock: 1095 clocks per 8752-bit word,
including the load cycle.

## Files and parameters

| file | content |
|---|---|
| `rtl/gf_pkg.sv` | field size `M`=14, primitive polynomial, elaboration-time `gf_mul` and `alpha_pow` |
| `rtl/gf_const_mult.sv` | constant FFM by `alpha^EXP`, output bits `HI..LO` |
| `rtl/cs_coef_regs.sv` | the t coefficient registers, their load constants, row p's full FFMs and full-width root test |
| `rtl/cs_two_step_row.sv` | one two-step row: MSB partial FFMs, zero test, pipeline flag, isolated LSB partial FFMs; `S2_BACK` says how far ahead its step-2 operands are (0 or p) |
| `rtl/two_step_chien_search.sv` | top: scan controller, delay registers (or their bypass), p−1 two-step rows, output alignment |

Top-level parameters:

| parameter | default | meaning |
|---|---|---|
| `N` | 8752 | code length in bits (at most 16383) |
| `T` | 40 | error-correction capability: number of locator coefficients besides lambda_0 |
| `P` | 8 | positions tested per clock |
| `W1` | 4 | bits checked in step 1, from 1 to 13 |
| `STEP2_FROM_RENEWED` | 0 | 0: step 2 from delay registers; 1: step 2 from the renewed registers |

The field is fixed in the package. To change it, edit `M` and `PRIM_POLY` in `gf_pkg.sv`;
the testbenches' reference model (`tb/ref_gf_pkg.sv`) assumes GF(2^14).

At the default size, the design has 1 188 flip-flops: t·m coefficient registers, t·m delay
registers, lambda_0 and the control logic. Nothing else is clocked. With
`STEP2_FROM_RENEWED = 1` the count drops by 560. The constant-multiplier networks are:

- t·(p−1) MSB partial networks and t·(p−1) LSB partial networks for rows 1..p−1;
- t full networks for row p;
- t full networks for the load constants.

## Where this design makes its own choices

The architecture follows the published two-step method:

- p-parallel rows;
- row p at full width, renewing the registers;
- the MSB/LSB split;
- step 2 enabled only after a zero first step;
- a pipeline register between the steps, with extra registers holding the step-2 operands.

The following are choices of this implementation:

- **Code and field.** BCH(8752, 8192, 40) over GF(2^14), with p = 8. The method is
  presented for codes of rate 0.93. No code length, t or p is fixed by it.
- **First-step width.** W1 = 4. The source only notes that the saving depends on this width
  and grows when few bits are checked first. The expected fraction of partial-FFM output bits
  in use per position, W1/14 + (14−W1)/14·2^−W1, is 0.33 at W1 = 4, near its minimum of 0.31
  at W1 = 3.
- **Pipelining.** By default, step 2 takes its operands from a bank of delay registers,
  which is the straightforward pipelining. The source also refers to a more efficient
  pipelined structure but does not describe it. The `STEP2_FROM_RENEWED = 1` option is this
  design's own way to avoid the extra registers. It is verified to give identical results,
  but it may differ from the published structure.
- **Activation.** Step 2 is activated by operand isolation (AND gating), not by clock
  gating.
- **Interface and order.** The start/valid interface, the position numbering, the load
  constant and the output alignment are this design's own.
- **Rest of the decoder.** The surrounding decoder stages, syndrome computation and
  key-equation solving, are not included. `lambda` is expected from a key-equation solver.
  The error counters and early termination of earlier low-power Chien searches are not part
  of this design.
- **Reed-Solomon.** The same two-step search could serve other codes whose decoders use a
  Chien search, such as Reed-Solomon codes. Only the binary BCH case is built here.

The testbenches do not measure power. The source reports about 50 % lower Chien-search
power than a conventional parallel search at 200 MHz in a 130-nm CMOS process. What the
testbench measures is the step-2 activity: 4 474 activations out of 68 922 row-positions in
the full-size run. That is 6.5 %. Of those activations, 137 were real roots and the rest were
MSB-only matches.

## Verification

Every testbench checks itself and prints `TB_RESULT checks=<n> failures=<n>`. Each one also
has a watchdog.

- **`tb_gf_const_mult`** compares full and partial constant multipliers with an independent
  reference model (`tb/ref_gf_pkg.sv`). That model does carry-less multiplication with
  reduction, and square-and-multiply powers. The test covers unit vectors, corner values and
  random operands, and exponents beyond 2^14−1.
- **`tb_cs_coef_regs`** checks:
  - loading, renewal and hold;
  - that load takes priority over advance;
  - the full-width row-p root test, over 60 cycles with exponents wrapping past 2^14−1, using
    locators with known roots.
- **`tb_cs_two_step_row`** streams 3000 vectors of four kinds: random, exact roots, LSB-only
  differences (step 2 runs but finds no root) and MSB-only differences (step 1 must reject
  them). It checks `root` and `step2_active` one cycle later, and checks that `en` suppresses
  both. Two rows run side by side, one with delayed operands and one with renewed operands
  (`S2_BACK = 5`).
- **`tb_two_step_chien_search`** is the end-to-end test at N=1003, T=8, P=8. The last group
  is partial. It builds `Lambda = s·prod(1 + alpha^l x)` from chosen error positions, with a
  random scale s so that lambda_0 ≠ 1. For every group it checks:
  - the location bits, the group index, the last flag, `busy`, and the exact output cycle;
  - the step-2 activity of every row, against a reference evaluation of Lambda at every
    position.

  It also counts and requires each of these: roots in every row, step-2 false alarms,
  skipped second steps, back-to-back words, ignored mid-scan starts, and partial last groups.
- **`tb_chien_w1_sweep`** runs five copies that differ only in W1 (2, 3, 4, 6 and 8) on
  the same words, with N=2000, T=16 and P=8. It checks every output of every copy. It also
  checks that the non-root step-2 rate stays within a factor of two of 2^−W1 and falls as W1
  grows. One run gave:

  | W1 | non-root step-2 rate | 2^−W1 | fraction of partial-FFM output bits in use |
  |---|---|---|---|
  | 2 | 0.247 | 0.250 | 0.357 |
  | 3 | 0.124 | 0.125 | 0.315 |
  | 4 | 0.066 | 0.063 | 0.336 |
  | 6 | 0.016 | 0.016 | 0.440 |
  | 8 | 0.004 | 0.004 | 0.575 |

  Wider first steps cut the step-2 activity, but the always-on step-1 multipliers grow. For a
  14-bit field the balance lies at 3 to 4 bits.
- **`tb_two_step_chien_search_renewed`** repeats the end-to-end test with
  `STEP2_FROM_RENEWED = 1`.
- **`tb_two_step_chien_search_full`** runs the same checks with all top parameters at their
  defaults. It uses errors spaced about N/V apart for V = 1, 2, 5, 10, 20, 30 and 40, plus
  random and boundary patterns. It runs in under a second once built.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/gf_pkg.sv tb/ref_gf_pkg.sv tb/tb_two_step_chien_search_full.sv \
    --top-module tb_two_step_chien_search_full
./obj_dir/Vtb_two_step_chien_search_full
```

Replace the testbench name to run any of the others. All of them use the reference package
`tb/ref_gf_pkg.sv`, which must be listed before the testbench, as above.
