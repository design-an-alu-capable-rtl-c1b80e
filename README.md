# Polynomial definite-integral ALU (8-bit)

This is an arithmetic unit that computes the definite integral of a cubic
polynomial with integer coefficients in hardware. It does not integrate
numerically. It uses the Newton-Leibniz formula:

    f(x) = a0 + a1 x + a2 x^2 + a3 x^3
    F(x) = a0 x + (a1/2) x^2 + (a2/3) x^3 + (a3/4) x^4      (antiderivative)
    integral from lower to upper of f(x) dx = F(upper) - F(lower)

The inputs are four signed 8-bit coefficients and two signed 8-bit limits. The
result is a signed 16-bit integer. The unit works in three stages:

1. **Coefficient processing** turns each a_n into the antiderivative
   coefficient b_n = a_n / (n+1), one term per clock.
2. **Polynomial evaluation** runs in two identical evaluators side by side.
   One computes F(upper) and the other F(lower).
3. **Subtraction** stores F(upper) − F(lower) in the result register.

There is no central state machine. Each stage starts on the rising edge of the
previous stage's "done" signal. Small edge-detector cells turn those levels into
one-cycle pulses.

The block structure follows an 8-bit ALU originally drawn as a Logisim
schematic: signed 8- and 16-bit registers, an edge-pulse cell, a 4-entry
constant ROM, a per-term write-pulse cell, an 8×8→16 signed multiplier, a
coefficient register bank, a limit register pair, the coefficient processor and
the polynomial evaluator. This RTL is a re-implementation of that structure.
Wherever the schematic left a detail open, this implementation made its own
choice. The section *Where this RTL makes its own choices* lists those choices.

## Fixed-point reciprocals: how a_n/(n+1) is formed

Division is avoided. A 4×8 ROM (`const_rom`) holds 1/(n+1) as a fixed-point
number with 4 fraction bits, rounded to the nearest integer:

| n | 1/(n+1) | entry = round(16/(n+1)) |
|---|---------|-------------------------|
| 0 | 1       | 0x10                    |
| 1 | 1/2     | 0x08                    |
| 2 | 1/3     | 0x05 (= 0.3125)         |
| 3 | 1/4     | 0x04                    |

The coefficient processor multiplies a_n by entry n and rounds the 16-bit
product back to an integer:

    b_n = (a_n * entry_n + 8) >>> 4        (round to nearest, ties upward)

Consequences worth knowing before you trust a result:

* b_n is an **integer**. An integral whose antiderivative coefficients are not
  whole numbers is computed with rounded coefficients. For example, a1 = 3 gives
  b1 = 2, not 1.5.
* The entry for n = 2 is 5/16, not 1/3, so b2 equals a2/3 only when a2 is a
  multiple of 3 between −21 and 24. For example, a2 = 3 gives 15/16, which
  rounds to 1. Larger multiples of 3 drift: a2 = 27 gives 8 instead of 9, and
  a2 = −24 gives −7 instead of −8.
* The rounding matters. With truncation, a2 = 3 would give 0, and the reference
  example (see Verification) would give 34 instead of 41.
* b_n is stored in 8 bits. Every b_n fits, because |a_n · entry_n| ≤ 128·16.

The table is computed at elaboration from `integral_pkg::recip_const(n, FRAC)`,
which returns round(2^FRAC/(n+1)). It is not stored as literal data.

## Horner evaluation and its 8-bit operand limit

`poly_eval` has one multiplier, one adder and a 16-bit accumulator Y. It
evaluates

    F(x) = x·(b0 + x·(b1 + x·(b2 + x·b3)))

in four clock steps, using the highest coefficient first:

    Y ← 0
    repeat for n = 3, 2, 1, 0:   Y ← x × (Y + b_n)

A 2-bit counter is loaded with 3 and counts down. It drives the coefficient
multiplexer. The step at count 0 is the last one.

The multiplier is 8×8→16, and only the **low 8 bits** of (Y + b_n) reach it.
So every intermediate sum Y + b_n must lie in −128…127. Only the final product
uses the full 16 bits. This limit comes with the 8-bit multiplier of the
original structure and is kept on purpose. Outside the range, the operand wraps
modulo 256 and the result is wrong without any warning. The testbench models
this wrap exactly and also checks exact values where no wrap occurs.

The subtraction F(upper) − F(lower) wraps modulo 2^16.

## Timing of one calculation

Each calculation takes 12 clock cycles from the btn edge to `result_valid`.
Cycle 0 is the cycle in which `btn` is first seen high.

| cycle | what happens |
|-------|--------------|
| 0     | btn edge accepted (`press`). `coeff_reg` stores `a_in`. `busy` rises. |
| 1     | delayed press (`go`) starts `coeff_proc` (its RUN flag is set). |
| 2–5   | `coeff_proc` writes b0, b1, b2, b3, one per cycle. `done` is high in cycle 5. |
| 5     | the edge of `done` clears RUN in `coeff_proc` and starts both `poly_eval`s. |
| 6–9   | the four Horner steps, in both evaluators at once. |
| 10    | the evaluators' `done_pulse` loads `F_a` (upper) and `F_b` (lower) into 16-bit registers and sets a flag for each. |
| 11    | both flags set: `F_a − F_b` is loaded into the result register. |
| 12    | `result` holds the integral. `result_valid` is high for one cycle and `busy` falls. |

Rules for the inputs:

* The limits are written independently of the calculation, on any cycle where
  `lim_load` is high. They must be stable from cycle 6 through cycle 9.
* A btn edge is ignored while `busy` is high.
* Holding btn down starts only one calculation.

In `coeff_proc`, each result register is written by its own one-cycle enable.
A decoder line, enabled by RUN, goes high while the counter is at n. An `ox_d`
cell turns the rising edge of that line into a single write. Because the
decoder is gated by RUN, the first term also gets a rising edge.

## Top-level interface (`poly_integral_alu`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk | in | 1 | clock; all flip-flops use its rising edge |
| rst | in | 1 | synchronous, active-high reset; clears every register |
| btn | in | 1 | start: on its rising edge the coefficients are stored and a calculation begins |
| a_in[0:3] | in | 4 × 8 signed | a0 … a3 |
| lim_load | in | 1 | level write enable of the two limit registers |
| lim_upper, lim_lower | in | 8 signed | integration limits |
| result | out | 16 signed | F(upper) − F(lower) |
| result_valid | out | 1 | one-cycle strobe in the cycle after the result register was written |
| busy | out | 1 | a calculation is in progress |

`NT` (4 terms) is a parameter. The widths come from `integral_pkg` (`W` = 8,
`RW` = 16, `FRAC` = 4). All counters and decoders follow `NT`, but the design
has only been checked at `NT` = 4.

## Blocks

| module | role |
|--------|------|
| `integral_pkg` | widths, `coeff_t` (signed 8) and `wide_t` (signed 16) types, the reciprocal formula |
| `signed_register_8` | 8-bit register with load enable |
| `register_16` | 16-bit register with load enable (F_a, F_b, result) |
| `pulse` | rising-edge detector: `done & ~done_delayed` |
| `ox_d` | write-pulse cell: `run & dec & ~dec_delayed` |
| `const_rom` | 4-entry reciprocal table |
| `mul8s` | signed 8×8 multiplier, full 16-bit product |
| `run_ctrl` | RUN flag: set by go_pulse (takes priority), cleared by done_pulse |
| `coeff_reg` | four coefficient registers, loaded together on the rising edge of their btn input |
| `limits` | upper and lower limit registers with a shared load |
| `coeff_proc` | counter, ROM, multiplier, rounding, decoder, four `ox_d`s, four result registers |
| `poly_eval` | down-counter, coefficient multiplexer, adder, multiplier, accumulator, RUN flag |
| `poly_integral_alu` | top: wiring, stage pulses, join flags, subtractor, result register |

`poly_integral_alu` contains one assertion: the two evaluators must be busy in
the same cycles.

## Where this RTL makes its own choices

These points are either not fixed by the original design or differ from it on
purpose:

* **Rounding of b_n.** The schematic does not show which product bits are kept.
  Round-to-nearest was chosen. It is the only reading that reproduces the
  reference example (1, 2, 3, 8 → 1, 1, 1, 2).
* **Evaluator loop order.** The evaluator computes x·(Y + b_n), adding first
  and then multiplying. That form gives F(x) with its leading factor x in four
  steps. The schematic does not show the order of adder and multiplier clearly.
* **Evaluator structure.** A prose description of the evaluator mentions a
  power generator, a multiplier array and an adder chain. The schematic, which
  was followed here, shows a single sequential multiplier and adder.
* **Sign extension.** The schematic fills the upper byte of the coefficient
  with zeros before the adder. Here it is sign-extended. Because only the low
  byte of the sum reaches the multiplier, both give the same result.
* **Done timing.** The evaluator's done pulse is registered one cycle after the
  last step, so that F is final when it is sampled.
* **Handshake.** The exact handshake between stages is this implementation's
  own: the one-cycle delay before coefficient processing, the join flags, and
  the choice to ignore btn while busy.
* **Reset.** Every register clears synchronously. The original registers have
  asynchronous clear pins and power up at zero.
* **RUN flag.** The internals of the RUN flag were not given. It is a
  set/clear flip-flop.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. What they check:

* **Registers, edge cells, RUN flag, coefficient bank, limits:** randomised
  sequences compared with reference models.
* **`tb_mul8s`:** all 65 536 operand pairs.
* **`tb_const_rom`:** the four table values.
* **`tb_coeff_proc`:** the reference example and 200 random coefficient sets,
  checked against rounding done in real arithmetic. It also checks that `done`
  comes exactly 4 cycles after `go_pulse`.
* **`tb_poly_eval`:** F(2) = 46 and F(1) = 5. Also 300 small cases against the
  exact polynomial, and 300 full-range cases against a model of the 8-bit
  operand path. It also checks that `done_pulse` comes exactly 5 cycles after
  `start`.
* **`tb_poly_integral_alu`:** the end-to-end test at default parameters. It
  covers:
  * the reference example ∫₁² (8x³ + 3x² + 2x + 1) dx = 41;
  * ∫₋₁² (8x³ + 6x² + 4x + 2) dx = 60;
  * ∫₀³ −3x² dx = −27;
  * 400 random calculations. Each is checked against the datapath model, and
    where all b_n are exact and nothing wraps, also against the real-valued
    integral.

  It checks the 12-cycle latency and the single `result_valid` strobe. It also
  counts each mechanism and fails if any never occurs: coefficient loads, limit
  loads (including one in the same cycle as btn), processing runs, both
  evaluations, result loads, rounded-up coefficients, negative results, long
  button presses, ignored presses during a calculation, and 8-bit operand
  wraps.

Each testbench was also run against a copy of its module with one deliberate
bug, and every testbench caught its bug.

Not verified: timing closure, area or power on any technology, and any value
of `NT` other than 4.

## Simulating

With Verilator 5:

    verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
        rtl/integral_pkg.sv tb/tb_poly_integral_alu.sv \
        --top-module tb_poly_integral_alu --Mdir obj_top
    ./obj_top/Vtb_poly_integral_alu

To run any other testbench, put its name in place of `tb_poly_integral_alu`.
The package must be listed first. Each run takes well under a second.
