# On-line arithmetic unit: Y = A·X + B, most significant digit first

This is a chained-module datapath. It computes the product of two numbers plus an addend, and it works from the most significant end. The operands A and X come in one signed digit per cycle, leading digit first. The result Y comes out the same way, a fixed few cycles behind. So a result digit can feed the next unit before the operands are complete.

Several such units connected in a network evaluate polynomials or iterate x ← P(x) to find a root. The latency of the whole network is then roughly the sum of the small per-unit delays, not the sum of full word-length computations.

The unit is split into identical modules, each holding 8 bit positions of the operands. A unit for N-digit operands is N/8 modules connected only to their neighbours. The RTL is parameterised in module width and module count. The default is two 8-bit modules, i.e. 16-digit operands.

## Number representation

- **On-line digits.** A, X and Y are radix-2 signed-digit fractions: Σ d_j·2^-j, d_j ∈ {-1, 0, +1}. A digit travels as a 2-bit `sd_t` struct `{s, d}`: `00` = 0, `01` = +1, `11` = -1. The pattern `10` is not used.
- **B** is an ordinary N-bit two's complement word, given in parallel at the start. Its top bit is the sign at weight -1/2, the next bit weighs 1/4, and so on, so |B| ≤ 1/2.
- **Operand range.** Convergence needs |A| + |X| < 1/4; |A|, |X| < 1/8 is the simple sufficient form. Inside that range the result digits satisfy the bound below exactly.

## The recurrence

With A_j and X_j the values of the first j digits, the unit keeps a residual

    w_j = 2·(w_{j-1} − d_{j-1}) + X_j·a_j + A_{j-1}·x_j,   w_0 = B

and picks each output digit d_j from a short estimate of w_j. The scaled error z_j = 2^j·(B + A_j·X_j − D_j) then stays in [-1/2, 5/8), so D_j converges to A·X + B one bit per cycle.

The two product terms each need only a multiple of a stored operand by a single digit: 0, the operand itself, or its negative. Using A_{j-1} in place of A_j is what avoids double-counting the a_j·x_j cross term.

The residual is a large number that changes every cycle, so it is never resolved. It is held in carry-save form (C, S). Only its top few bits are ever added up, to choose the digit.

## Turning on-line digits back into two's complement: the A and X registers

Each operand register holds one bit and one *unconfirmed* flag per position. The flag marks a bit that a later negative digit may still flip. For example, after digits 0, +1 the value is 0.01. A following -1 turns it into 0.001, so the 1 just written has to change.

The rule per position, where "current digit" is the digit arriving in that cycle:

| State | Event | New state |
|---|---|---|
| any | `init` | 0, confirmed |
| any | load pulse at this position | the digit's magnitude, unconfirmed |
| unconfirmed | current digit +1 | unchanged, confirmed |
| unconfirmed | current digit -1 | complemented, confirmed |
| any | otherwise | unchanged |

The two positions left of the binary point, which hold the sign, start as 0-unconfirmed. A leading -1 digit then turns them into ones.

A load pulse moves one position down the register each cycle. So the register always equals the signed-digit prefix received so far, in two's complement, with no carry chain.

A is loaded one cycle later than X, from a one-cycle-old digit. This gives the A_{j-1} of the recurrence.

## Residual datapath per bit slice

Every slice holds one bit of A, X, C and S. It has two digit-multipliers (select 0, the bit, or its complement) and two full adders:

- **First level.** Adds A·x_j, X·a_j and the previous C shifted left by two places.
- **Second level.** Adds that sum, the first-level carries and the previous S shifted left by one place.

Negating an operand is done as complement plus one. Unfilled positions of a register are zero, so after complementing they are all ones. The +1 therefore always lands in the lowest position of the lowest module. That module feeds the two +1s into the two carry inputs that are free at its bottom: the first-level carry-in and bit 0 of the new C.

Each module also has two sign-extension slices, at weights 1 and 2, which have no C/S registers. Instead, the top of the residual lives in a 2-bit register `z` in the selection logic. It holds the integer part of w_j − d_j, sign-extended. That is all that survives the doubling.

## Digit selection

The selection block forms two values:

- **ŵ.** The sum of z and the top three bits of C and S, at weights -2…1/2, taken modulo 8 as a 3-bit number with one fraction bit.
- **cin.** A carry-in from the next four bits: cin = C₂S₂ + (C₂ + S₂)·C₃S₃.

The digit is chosen from ŵ + cin/2:

| ŵ + cin/2 | d | z next |
|---|---|---|
| ≥ 1/2 | +1 | ŵ − 1 (integer part) |
| −1/2 … 0 | 0 | ŵ |
| ≤ −1 | −1 | ŵ + 1 |

The next z is {ŵ₁ ∨ cin, ŵ₁}, where ŵ₁ is the units bit.

The range bound of z_j makes three combinations of ŵ and cin impossible. The table still gives them the nearest legal digit, so the logic is total.

## Pipeline and latency

A module is five register stages deep:

| Stage | What is registered |
|---|---|
| 1 | input digits |
| 2 | A/X conversion |
| 3 | the two digit-multiples |
| 4 | the carry-save sum, i.e. the new C and S. This is the only feedback loop. |
| 5 | the selected digit |

With one module, d_j leaves 5 cycles after a_j, x_j enter.

The step-1 residual is taken from B. When the first step of an operation reaches the adders (marked by the delayed `init`), a multiplexer presents B as the previous C and 0 as the previous S. It also loads z with B's sign extended. An operation can therefore follow the previous one with no idle cycle. The older result's remaining digits still come out first, then the new d_1. The digit d_0 (always 0) is not emitted.

## Chaining modules

Digits and `init` enter the least significant module (`lob` = 1) and ripple upward, one module per cycle. So module k runs one cycle behind module k+1 below it.

Each cycle a module passes four registered bits to the module above:

- `c_out[1]`: the second-level carry from its top slice
- `c_out[0]`: the previous C bit of its top slice
- `s_out`: the previous S bit of its top slice
- `cp_out`: the first-level carry from its top slice

The upper module is one cycle behind, so these bits arrive exactly when they are needed. No extra adder level is required, and the only cost is latency: d_j appears MODULES + 4 cycles after a_j, x_j enter the unit.

| Operand digits | Module width | Modules | Latency (cycles) |
|---|---|---|---|
| 16 | 8 | 2 | 6 |
| 16 | 16 | 1 | 5 |
| 64 | 8 | 8 | 12 |
| 64 | 16 | 4 | 8 |

The load pulse travels the other way. The init that reaches the most significant module is also wired to that module's `ld_in`. From there the pulse crosses the module's slices one per cycle, then continues into the next lower module through `ld_out`/`ld_in`. `ld_out` is taken one slice before the end, because the lower module registers `ld_in` together with its digits.

Only the most significant module's digit output is used. Only the least significant module applies the complement correction; the other modules have those carry inputs fed from below.

## Using it in networks

Result digits have the same format as input digits, so units chain directly. Two arrangements were built and simulated as testbenches:

- **Third-degree polynomial (Horner's scheme).** p₀ + x(p₁ + x(p₂ + x·p₃)) uses three units. The x digits (and init) are delayed 6 and 12 cycles to follow each unit's output. B of the 2nd and 3rd units is loaded with p₁, p₀ when their operation starts. With 16-digit operands and 8-bit modules, the first digit of the value appears 18 cycles after x₁ and the last 33 cycles after. For the worked example (p₀ = 1.1111101011010010, p₁ = 1.1111000010110111, p₂ = 0.0011011111011101, p₃ = 0.0010111011011101, x = 0.000T110TTT00010T with T = −1), the network produces 0.0000T10T01T10001 = −1231·2⁻¹⁶ ≈ −0.0187836. The true polynomial value is −0.018787.
- **Root of x = P(x) for a fourth-degree polynomial.** Four units evaluate P(x_k) in Horner form, giving x_{k+1} = P(x_k). With 32-digit operands and 16-bit modules, the evaluator's first output digit comes 24 cycles after x_k's first digit. The output re-enters through an 8-stage digit buffer, exactly when the evaluator has taken in the last digit of x_k. An iteration therefore starts every 32 cycles: the first is complete after 55 cycles and ten after 343. With two evaluators feeding each other, an iteration starts every 24 cycles and ten take 271 cycles. With 64-digit operands on four 16-bit modules per unit, the evaluator latency is 32 cycles and the buffer 32 stages. The first iteration is then complete after 95 cycles, and ten after 671 cycles with one evaluator or 383 with two.

## Files

| File | Contents |
|---|---|
| `rtl/olau_pkg.sv` | digit type and helpers |
| `rtl/olau_conv.sv` | on-line to two's complement register (A and X) |
| `rtl/olau_mult.sv` | digit-multiple selector with negation flag |
| `rtl/olau_csa.sv` | the two carry-save adder levels |
| `rtl/olau_select.sv` | ŵ/cin adder, digit selection, z register |
| `rtl/olau_module.sv` | one module (WIDTH slices, pipeline, load chain, inter-module bits) |
| `rtl/olau_unit.sv` | the unit, MODULES chained modules (top) |
| `tb/tb_olau_*.sv` | one self-checking testbench per module, plus `tb_olau_unit64` (64-digit units) and the two networks |
| `tb/olau_poly3_net.sv`, `tb/olau_root4_eval.sv`, `tb/olau_root4_net.sv` | network building blocks used by `tb_olau_poly3` and `tb_olau_root4` |
| `tb/olau_tb_pkg.sv` | exact reference checks for the testbenches |

## What the testbenches check

The unit and module tests do not compare against a golden digit string, because the digits are not unique. Instead, for every prefix of every result they check the defining bound

    −1/2 ≤ 2^j·(B + A_j·X_j − D_j) < 5/8

in exact wide-integer arithmetic, and they check the latency to the cycle.

`tb_olau_unit` runs the unit at its default size:

- 300 random operations, including extreme operands and back-to-back starts.
- It counts that every mechanism occurred: each digit value, negative digits of A and X (complement correction), leading negative digits (sign fill), back-to-back operations, and traffic on the inter-module wires.

The block tests compare against independent models:

- **Converter:** exact value and flags.
- **Carry-save adders:** sum conservation.
- **Selection:** an arithmetic model of the digit rule over all legal inputs.

The network tests check:

- the worked example's result, to the last bit and against the exact polynomial value, and the residual bound of every unit over 60 further random polynomials;
- the cycle counts of the polynomial evaluator: first/last result digit at 18/33 cycles (16 digits, 8-bit modules), 18/49 cycles (32 digits, 16-bit modules) and 24/55 cycles (32 digits, 8-bit modules);
- the cycle counts of the root iteration: 55 cycles for the first iteration, 343 for ten with one evaluator and 271 with two (32 digits); 95, 671 and 383 (64 digits);
- that one and two evaluators produce the same digits, and that the iteration converges.

`tb_olau_unit64` runs 64-digit units of eight 8-bit and four 16-bit modules. It measures latencies of 12 and 8 cycles, so a full result is complete 76 and 72 cycles after the first input digits, and it checks the residual bound on every digit.

Each test prints `TB_RESULT checks=… failures=…` and stops itself through a watchdog if it hangs.

Running a test with Verilator 5:

    verilator --binary --timing --timescale 1ns/1ps -y rtl -y tb \
              rtl/olau_pkg.sv tb/olau_tb_pkg.sv tb/tb_olau_unit.sv \
              --top-module tb_olau_unit
    ./obj_dir/Vtb_olau_unit

Use `--top-module` to pick another testbench. The network and 64-digit tests set WIDTH and MODULES on the units they build. Their building blocks in `tb/` are found through `-y tb`.

## Departures from the original circuit

The arithmetic, the module partitioning, the pins between modules and the timing in cycles follow the original nMOS design. The implementation differs in these points:

- **Clocking and reset.** It uses one rising-edge clock, not two non-overlapping phases, and adds a synchronous active-low reset. The original has only `init`.
- **First adder.** The original splits the first adder into a part that does not depend on C, placed before a clock phase, and a small part that does, so that the critical loop stays short. Here each level is a plain full-adder row, and both levels sit in one stage. The count of five stages per module is kept.
- **Start of an operation.** The original loads B into the C registers and sets the S registers at start. Here B enters through a multiplexer in the first step. The result is the same, and it removes the need for an idle cycle between operations.
- **Selection logic.** The original uses two PLAs, one forming partial sums and one finishing the addition and the selection. Here it is an adder and a case table. The S register also holds true values here; the original stores the complement of S.
- **Load pulse for A.** The original takes A's load pulse from the neighbouring slice. Here each slice delays its own pulse by a cycle, which is the same signal.
- **Not modelled.** Pads, clock buffers and the other analogue parts of the chip.
- **64-digit root finder timing.** For 64-digit operands, the original comparison table lists 91 and 667 cycles for one and ten iterations with a single evaluator. Those numbers correspond to a 28-cycle evaluator latency. With four 16-bit modules per unit the latency here is 32 cycles, the value the original's own formulas and its 383-cycle figure for two evaluators assume. This design therefore takes 95 and 671 cycles.
- **Inputs and operand range.** Operands outside |A| + |X| < 1/4, or |B| > 1/2, break the convergence bound as in the original. Nothing checks for them. The unused digit pattern `10` reads as 0 everywhere.
