# Bit-serial Montgomery multiplier with a configurable carry-save adder and iteration skipping

This RTL computes the Montgomery product

    result ≡ A · B · 2^-K  (mod N),   0 ≤ result < 2N

for an odd modulus N < 2^K, a multiplier A < 2^K and a multiplicand B < N.
It handles one multiplier bit per clock cycle. The running sum is kept in
carry-save form (a sum word SS and a carry word SC), so no carry ripples
through the word inside the loop. Two things keep the cycle count low and the
logic small:

* **Iteration skipping.** A small gate network, the *skip detector*, looks at
  the three low bits of SS and SC and at the next two multiplier bits. When the
  next iteration would add nothing (quotient bit 0 and multiplier bit 0), it
  folds that iteration into the following one: the stored sum is shifted right
  by two and one addition is saved.
* **A configurable carry-save adder (CCSA).** Each bit position is built from
  two half adders in series. Used together they form a 3:2 carry-save adder for
  the loop. Used alone, the first half adder collapses a carry-save pair into
  plain binary, one pass per carry position. The same adder therefore also does
  the operand pre-computation and the final conversion, and no separate
  carry-propagate adder is needed.

Two datapaths are provided, and `mont_top` places them side by side:

| unit | module | adder levels | feedback shift |
|------|--------|--------------|----------------|
| two-level | `mont_mult_d1` | CCSA1 → CCSA2 | wiring, picked by the controller |
| one-level | `mont_mult_d2` | one CCSA | 4:1 multiplexers M1 / M2 |

The one-level unit has the shorter critical path: one adder level plus the
multiplexers. The two-level unit ripples conversion carries twice as fast, so
it needs fewer clock cycles.

## The recurrence and why the multiplicand is doubled

The textbook bit-serial loop is `S ← (S + A_i·B + q_i·N) / 2`, with `q_i`
chosen to make the bracket even. Then `q_i` depends on `A_i·B_0` as well as on
the sum. This design uses the equivalent form

    S_{j+1} = (S_j + q_j·N) / 2 + A_j·B,    q_j = S_j mod 2,    j = 0 … K

and stores the un-halved value `T_j = S_j + q_j·N + 2·A_j·B` in SS/SC. Each
iteration is then

    T_j = T_{j-1}/2 + q_j·N + A_j·(2B),     q_j = bit 1 of T_{j-1}

The addend is one of four operands: 0, N, 2B or `D = 2B + N`. D is computed
once per multiplication. Because the multiplicand is added doubled, its bit 0
is zero and `q_j` depends only on the stored sum. The quotient bit can then be
read straight from SS and SC without waiting for the multiplier bit.

The loop runs over bit indices 0 … K, where bit K of A is an implicit zero.
After the loop, `S_{K+1} = T_K / 2 ≡ A·B·2^-K (mod N)`. For B < N the sum
stays below 3N inside the loop. The last iteration adds no multiple of B, so it
brings the result below 2N. There is no final subtraction: the result can feed
the next Montgomery multiplication directly. SS and SC are K+3 bits wide, since
T < 6N < 2^(K+3). Under this bound the adders never drop a carry, and
assertions check this.

## Skip detector

With the stored sum `T = SS + SC`:

    q_next = bit 1 of T       = (ss1 ^ sc1) ^ (ss0 & sc0)
    skip   = ~((ss1 ^ sc1) | (ss0 & sc0) | a1)
    q_skip = bit 2 of T ^ (a & q1) = (ss2 ^ sc2) ^ (ss1 & sc1) ^ (a & q1)
    q      = skip ? q_skip : q_next
    A      = skip ? a2     : a1

`a1` and `a2` are the next two multiplier bits. The network has five XORs,
three ANDs, one NOR and two 2:1 multiplexers. `skip` is conservative. It is
raised only when bit 1 of T is certainly zero, which needs ss1 = sc1 and not
both ss0 and sc0. A pair with ss0 = sc0 = 1 and bit 1 zero is not folded; the
result is still correct, just one cycle slower. The `a & q1` term is the
multiplicand-LSB product term for the folded iteration. Both units drive `a`
with `a2` and `q1` with bit 0 of 2B, so that term is zero in this datapath. The
input is kept so the detector stays general.

## Shifting a carry-save pair, and the lost carry

Halving T means shifting SS and SC right separately. That loses a carry
whenever the bits shifted out of both words are 1 (`ss0 & sc0` for a shift by
one, `ss1 & sc1` for a shift by two when folding). The CCSA's carry vector is
returned already shifted left, so its bit 0 is free. The lost carry is put back
there as a carry-in, and the shifted sum stays exact. These are the same two
AND terms the skip detector uses.

## Operand selection (MM3)

The 4:1 choice among 0, N, 2B and D is made from two 2:1 multiplexers and an
AND, since one input is zero. `q` picks 2B or D, `N & q` gives N or 0, and `a`
picks between the two. During the loop (a, q) come from the skip detector.

| a | q | operand |
|---|---|---------|
| 0 | 0 | 0 |
| 0 | 1 | N |
| 1 | 0 | 2B |
| 1 | 1 | D = 2B + N |

## One multiplication, phase by phase (`mont_ctrl`)

| phase | what happens | cycles |
|-------|--------------|--------|
| IDLE | `start` captures a, b, n, loads the A shift register, clears SS/SC | 1 |
| PRE_LOAD | 2B and N enter the adder (SS + SC = 2B + N) | 1 |
| PRE_CONV | half-adder passes until SC = 0, then D ← SS and SS/SC cleared | passes + 1 |
| MUL | one iteration per cycle; a fold consumes two bit indices | K + 1 − folds |
| CONV_LOAD | T/2 (or T/4, see below) into the adder | 1 |
| CONV | half-adder passes until SC = 0 | passes + 1 |
| DONE | `done` pulses, `result` = SS[K:0] and holds until the next `start` | 1 |

If the detector signals a skip at the last index K, that iteration would add
nothing and only halve. It is dropped without a write, and CONV_LOAD quarters T
instead of halving it.

Each conversion pass moves the carries at least one position, so a conversion
takes at most about K+3 passes. It is usually far fewer, because carry chains
are short. In the two-level unit both CCSAs run as half adders during
conversions: each cycle does two passes. In its pre-computation, CCSA1 takes 2B
from a 2:1 multiplexer and CCSA2 takes N through MM3, so the load is one cycle.
In the loop, CCSA1 (half-adder mode) takes the shifted SS/SC and the carry-in,
and CCSA2 (3:2 mode) adds the MM3 operand.

Measured start-to-done latency, worst case seen:

| K | two-level | one-level |
|---|-----------|-----------|
| 4 (exhaustive) | 14 cycles | 18 cycles |
| 24 (300 random operand sets) | 37 cycles | 45 cycles |
| 128 (60 random operand sets) | 141 cycles | 150 cycles |

The loop itself always takes K+1 cycles less the number of folds. With random
operands an iteration is foldable about a quarter of the time (quotient bit and
multiplier bit both zero). The two-level unit folds about 21 % of its
iterations at K = 128. The one-level unit folds about 8 %. The difference
lies in where the re-inserted carry lands. In the one-level unit it sits in bit
0 of the stored SC, and a stored pair with ss0 = sc0 = 1 is never folded. In
the two-level unit it enters at the first level, and the second level's carry
vector has bit 0 = 0, so that case never arises.

## Interface

`mont_mult_d1` and `mont_mult_d2` have the same ports. `mont_top` prefixes them
with `d1_` / `d2_` and shares `clk` / `rst_n`.

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk | in | 1 | rising-edge clock |
| rst_n | in | 1 | synchronous, active-low reset |
| start | in | 1 | one-cycle request, sampled only when idle; captures a, b, n |
| a, b, n | in | K | multiplier, multiplicand (< n), odd modulus |
| busy | out | 1 | high from the cycle after `start` through the `done` cycle |
| done | out | 1 | one-cycle pulse: result valid |
| result | out | K+1 | A·B·2^-K mod N, in [0, 2N) |
| skip_taken | out | 1 | pulses for each cycle that folded two iterations |
| phase | out | 3 | controller state (`mont_pkg::phase_e`) |

Parameter `K` (operand width) defaults to 4, i.e. 4-bit operands. The RTL is
written for any K ≥ 2. It has been simulated at K = 4, 24 and 128, and the
controller alone at K = 6.

## Files

| file | content |
|------|---------|
| `rtl/mont_pkg.sv` | phase and feedback-select enums |
| `rtl/ccsa.sv` | configurable carry-save adder |
| `rtl/skip_detector.sv` | skip detector |
| `rtl/modified_mux.sv` | MM3 operand selector |
| `rtl/a_shift_reg.sv` | multiplier shift register (shift by one or two) |
| `rtl/mont_ctrl.sv` | control part |
| `rtl/mont_mult_d1.sv` | two-level unit |
| `rtl/mont_mult_d2.sv` | one-level unit |
| `rtl/mont_top.sv` | both units side by side |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/mont_bench.sv` | shared stimulus/checker for one multiplier instance |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. For example:

    verilator --binary --timing --assert -y rtl -y tb rtl/mont_pkg.sv \
        tb/tb_mont_top.sv --top-module tb_mont_top -Mdir obj_top
    ./obj_top/Vtb_mont_top

Replace `tb_mont_top` with any other `tb_*` module. The testbenches check:

* `tb_mont_top` runs both units at the default K = 4 on every odd N < 16, every
  A < 16 and every B < N: 1024 products per unit. It checks each result against
  an independent reference, which applies K modular halvings to A·B mod N. It
  also checks the result is below 2N and that loop cycles + folds = K + 1. It
  fails unless each mechanism occurred at least once in each unit: folds,
  dropped last iterations, carry re-insertion, multi-pass pre-computation,
  multi-pass conversion, and each of the four MM3 operands.
* `tb_mont_mult_d1` / `tb_mont_mult_d2` run the same exhaustive set at K = 4,
  plus 300 random operand sets at K = 24 and 60 at K = 128. These include
  all-ones and single-bit multipliers, which give many folds.
* The leaf testbenches check the skip detector exhaustively (all 1024 input
  combinations, against integer arithmetic on the low bits) and the CCSA in
  both modes with random operands. They also check MM3, the shift register and
  the controller, the controller against an independent model of the phase
  sequence.

Assertions in both units check that the stored carry-save sum is even during
the loop, and that no adder drops a carry.

## Where this design makes its own choices

The block structure follows the published architecture: skip detector gates,
MM3 structure, CCSA built from two serial half adders, M1/M2 inputs, B/N/D
registers, and one- and two-level adder arrangements. The following were not
specified there and are this design's:

* The recurrence with a doubled multiplicand, and D = 2B + N where the
  conventional pre-computation uses D = B + N. This is what makes the quotient
  bit depend only on the stored sum, as the detector's logic requires.
* What the configurable adder's two configurations are: 3:2 carry-save, or a
  half-adder pass for conversion.
* The carry-in at bit 0 of the carry vector, which keeps separate shifts of SS
  and SC exact.
* The meaning of the detector inputs `a` and `q1`.
* The MM3 output is not inverted. The original drawing marks an inverted
  output but does not say where the inversion is undone.
* K+1 iterations, a result in [0, 2N) without final subtraction, and the
  operand ranges.
* The use of the two adder levels in the two-level unit, and its feedback
  shifts as controller-selected wiring.
* The controller's phases, the dropped last iteration, the start/busy/done
  handshake, synchronous active-low reset, and the register widths.

Not reproduced: the published FPGA area/delay/power figures. The published
example waveforms use even moduli (for example A=9, B=13, N=10), for which no
Montgomery product exists. They are not used as reference values. The
conventional semi-carry-save multipliers that served as comparison baselines
are not part of this RTL.
