# Montgomery modular multiplier with one configurable carry-save adder

This design computes a Montgomery product

    z = x * y * 2^-(K+1)  mod n        (n odd, n < 2^K, 0 <= x, y < n)

for K = 192 bits by default. A multiplier for RSA or elliptic-curve cryptography normally needs
wide carry-propagate adders, and their carry chains set the clock period. This design has none
in its main loop. It keeps the running sum in carry-save form: a save-sum vector SS and a
save-carry vector SC whose sum is the true value. One adder does every addition. It is a single
level of carry-save adder that can be switched between two modes:

* **full-adder mode:** a 3:2 compression, `SS + SC + Y`, used in the Montgomery iterations;
* **two-half-adder mode:** `SS + SC + 0` with two half adders in series per bit. Carries move
  two bit places per clock. This mode turns a carry-save pair into a binary number by repeating
  the step until SC is zero.

The same adder therefore also does the two carry-propagate additions the algorithm needs: the
precomputation `8y + n` and the final conversion of the result to binary. The path through
the adder holds one shift multiplexer, the 4:1 operand multiplexer and one full adder. No
clock period has been measured for this RTL.

With operands in Montgomery form (`x' = x*R mod n`, `R = 2^(K+1)`), the product `z` is again in
Montgomery form. A chain of multiplications, such as a modular exponentiation, converts into
and out of that form only once. This design does not do those conversions itself. Converting
into Montgomery form is one more multiplication by `R^2 mod n`. Converting back is a
multiplication by 1.

## The iteration

The multiplier is based on the radix-2 Montgomery recurrence

    S(i+1) = (S(i) + x_i * Bh + q_i * n) / 2,     q_i = S(i) mod 2

with three changes that make it fit a single adder level and a short clock.

**Bh = 8y instead of y.** The multiple of y is shifted left by three. Two things follow:

* Every `x_i * Bh` term has three zero low bits, so the parity of the next two partial sums
  does not depend on x at all. The quotient look-ahead below relies on this.
* Three more halving steps are needed to divide the factor 8 out again. The loop runs over
  i = 0 .. K+3 (K+4 real steps) instead of K+1 steps.

Because Bh = 8y and there are K+4 halvings, the factor is `8 / 2^(K+4) = 2^-(K+1)`.

**One adder operand per step.** `x_i * Bh + q_i * n` is one of 0, n, Bh or `D = Bh + n`. The
multiplexer picks it from `{x_i, q_i}`. D is computed once per multiplication, before the loop,
in the two-half-adder mode. Then each step is one 3:2 addition.

**Quotient look-ahead and skipping.** In the clock that performs step i, `mmm_qgen` works out
`q(i+1)` and `q(i+2)` from the low five bits of SS and SC, from q_i and from n[2:0]. Let
`U = (S(i) + q_i*n) mod 8`. Then:

* `q(i+1) = U[1]`;
* `q(i+2) = ((U[2:1] + q(i+1)*n[1:0]) mod 4)[1]`.

If `x_{i+1} = 0` and `q(i+1) = 0`, step i+1 would add nothing and only halve. It is skipped:
its halving is merged into the shift of step i, and the next clock goes on at step i+2, whose
quotient is already known. To prime the look-ahead, the loop starts at an extra step i = -1
with q = 0 and x_{-1} = 0. One multiplication thus takes `K+5 - skips` iteration clocks. With
random 192-bit operands that is about 150 clocks; the fewest seen in testing was 99.

**Delayed shift.** The result of a step is stored before the division by two. The shift by 1,
or by 2 after a skip, happens at the start of the next clock, in the SS/SC feedback
multiplexers (`mmm_shift_align`). This keeps the shifter and the skip decision out of the path
through the adder.

### The lost carry of a split shift

Shifting SS and SC right separately is exact only if their dropped low bits add up to zero.
The true sum is always divisible by 2^sh, so the dropped parts add up to either 0 or exactly
2^sh. In the second case one unit would be lost. For a one-bit shift this happens when both
bit 0s are 1. For the two-bit shift after a skip it happens when the low two bits sum to 4.
`mmm_shift_align` reports the lost unit, and the adder takes it back as a carry-in at bit 0.
The registers always hold the exact value, and two assertions in `mmm_core` check that a
pending shift never drops a non-zero remainder.

### Range and width

If `S(i) < Bh + n`, the same bound holds for `S(i+1)`, so every value in the loop stays below
`2(Bh + n) < 18n < 2^(K+5)`. The datapath is therefore `W = K+5` bits (197 for K = 192) and no
carry ever leaves the top bit. The final S satisfies `S < y/2 + n < 2n`. One conditional
subtraction (`mmm_final_sub`) brings it below n, so z fits in K bits.

## The configurable carry-save adder

Each bit of `mmm_ccsa` is two half adders. The first adds SS and SC. The second adds the first
one's sum to a third input chosen by the mode:

| mode        | third input                              | carry out of the bit          | result per clock          |
|-------------|------------------------------------------|-------------------------------|---------------------------|
| `CCSA_FA`   | operand Y (0, n, Bh or D)                | OR of both half-adder carries | `SS + SC + Y + cin`, 3:2  |
| `CCSA_HAHA` | carry of the first half adder, bit below | second half adder's carry     | `SS + SC + cin`, carries move 2 places |

When two-half-adder mode is repeated until SC = 0, SS ends up holding the binary sum. A single
half-adder level would take about twice as many clocks. The worst case is about W/2 clocks, when
a carry has to ripple the full width. Typical random data needs far fewer.

## Phases and timing

`mmm_core` runs one multiplication through four states (`state_t` in `mmm_pkg`):

| state     | what happens                                             | clocks                  |
|-----------|----------------------------------------------------------|-------------------------|
| `ST_IDLE` | waits for `start`; captures x, y, n; loads SS=8y, SC=n     | 1                       |
| `ST_PRE`  | two-half-adder steps until SC = 0; then D = SS            | data dependent, ≤ W/2+2 |
| `ST_ITER` | steps i = -1 .. K+3 with skipping, full-adder mode        | K+5 − skips             |
| `ST_CONV` | pending shift, then two-half-adder steps until SC = 0     | data dependent, ≤ W/2+3 |

`mmm_final_sub` then takes one more registered clock. At K = 192 with random operands, the
latency from `start` to `done1` measured 104 to 297 clocks, about 164 on average. The longest
runs come from the few operands whose carries ripple almost the full width during conversion.

## Interface (`mont_mult_modi`)

| port    | dir | width | meaning                                                          |
|---------|-----|-------|------------------------------------------------------------------|
| `clk`   | in  | 1     | clock                                                            |
| `reset` | in  | 1     | synchronous, active high                                         |
| `start` | in  | 1     | one-clock pulse in idle; x, y, n are captured on that edge       |
| `x`,`y` | in  | K     | operands, `< n`                                                  |
| `n`     | in  | K     | odd modulus, `< 2^K`                                             |
| `z`     | out | K     | `x*y*2^-(K+1) mod n`; holds its value until the next result      |
| `done1` | out | 1     | one-clock pulse when z is new                                    |

A `start` while a multiplication is running is ignored. The only parameter is `K` (operand
width, default 192).

## Files

| file                      | contents                                                          |
|---------------------------|-------------------------------------------------------------------|
| `rtl/mmm_pkg.sv`          | state and adder-mode enums                                        |
| `rtl/mmm_ccsa.sv`         | configurable carry-save adder                                     |
| `rtl/mmm_shift_align.sv`  | delayed 0/1/2-bit shift of SS/SC with lost-carry output           |
| `rtl/mmm_qgen.sv`         | q(i+1), q(i+2), skip(i+1) look-ahead                              |
| `rtl/mmm_core.sv`         | registers, operand multiplexer, controller                        |
| `rtl/mmm_final_sub.sv`    | registered conditional subtraction                                |
| `rtl/mont_mult_modi.sv`   | top level                                                         |
| `tb/mmm_ref_pkg.sv`       | binary reference model of the skip schedule, random helpers       |
| `tb/tb_*.sv`              | one self-checking testbench per module                            |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. For example,
the full-size end-to-end test:

    verilator --binary --timing --assert rtl/mmm_pkg.sv tb/mmm_ref_pkg.sv \
        rtl/mmm_ccsa.sv rtl/mmm_shift_align.sv rtl/mmm_qgen.sv rtl/mmm_core.sv \
        rtl/mmm_final_sub.sv rtl/mont_mult_modi.sv \
        tb/tb_mont_mult_modi.sv --top-module tb_mont_mult_modi
    ./obj_dir/Vtb_mont_mult_modi

List the two packages first, and each file only once. Swap in another `tb/tb_<module>.sv` and top module to run a unit test.
Every run takes well under a second.

## Verification

* `tb_mont_mult_modi` runs at K = 192 with default parameters, 88 multiplications. The cases
  are edge values (0, n−1, moduli 9, 13 and 15, the all-ones modulus, the P-192 prime) and
  random moduli from 4 to 192 bits. For each result it checks:
  * that z < n and z·2^(K+1) ≡ x·y (mod n), using wide integer arithmetic;
  * that z equals the reference model's result, bit for bit;
  * the exact number of iteration clocks.

  It also counts how often each mechanism happened, and fails if one never did: skipped and
  unskipped steps, lost-carry correction on 1- and 2-bit shifts, multi-clock precomputation
  and conversion, subtraction taken and not taken, and a start pulse while busy.
* `tb_mmm_core` (K = 12) sweeps all operands for several small moduli plus 300 random cases. It
  compares the un-reduced result and D with the reference model and checks the clock count of
  each phase.
* The unit testbenches check the adder identities in both modes, including convergence within
  W/2+1 steps. They also check the exactness of the shift and the look-ahead bits against
  full-width integer arithmetic.

Every testbench was also run against a deliberately broken copy of its module, and each one
caught the fault.

## Where this design makes its own choices

The published description gives the architecture at the level of ideas:

* a one-level configurable CSA made of a full adder or two serial half adders;
* `B+n` precomputation and format conversion by repeating `SS + SC + 0` until SC = 0;
* K+4 iterations instead of K+1, because B is replaced by a scaled B̂;
* a loop index starting at −1, with q and x initialised to 0;
* q(i+1), q(i+2) and skip(i+1) computed in parallel with the step;
* the right shift delayed to the next clock;
* a 192-bit top module with `clk`, `reset`, `start`, `x`, `y`, `z` and `done1`.

The following are this implementation's own choices, made where the description is silent:

* B̂ = 8y, which matches the "three extra halvings", and the look-ahead equations derived from it;
* the skip condition `x_{i+1} = q(i+1) = 0`;
* the 0/n/Bh/D operand multiplexer;
* the cell wiring of the configurable adder;
* the two-bit shift and its lost-carry correction;
* widths, state encoding, reset and handshake;
* the modulus input `n`, which the 192-bit symbol does not show but the flow of data does;
* the final conditional subtraction stage.

Not included:

* conversion into and out of Montgomery form;
* storing precomputed constants across several multipliers, which was suggested only as
  future work;
* an FPGA-specific implementation or timing constraints. The RTL is generic.
