# Calibrated Mitchell logarithmic converter (8-bit, parallel)

This design turns an unsigned binary number X into a fixed-point base-2 logarithm
code in a few gate levels, with no shifter, counter or priority chain. Uses
include log-domain multiplication and division, where a product becomes a sum of
logarithms.

The conversion follows Mitchell's approximation. Write X = 2^I (1 + F), with I
the position of the leading one and F the bits below it read as a binary fraction.
Then log2 X = I + log2(1 + F), and log2(1 + F) is approximated by F. The
approximation is never too large. Its mean error over F in [0,1) is about 0.057.

The design adds one calibration step. When F lies in the middle of its range,
the fixed constant (0.0001)_2 = 1/16 is added to it. Near F = 0 and F = 1, where
Mitchell's error is already small, F is left alone. This single comparison with
fixed bounds, plus a carry-in-only add, cuts the mean absolute error to about
0.0155, roughly 72 % less.

A second idea is the circuit style. The logic is meant to run either from a dc
supply (fast combinational logic) or from four clocked-power phases 90 degrees
apart (adiabatic, charge-recovery logic). In the second case every gate level
evaluates one phase after the one before it. The RTL models both modes, and it
includes a behavioural model of the ring-oscillator source that makes the phases.

## The code format

For an N-bit input S_{N-1}..S_0 (N = 8 by default), the output is

    I_{n} .. I_0 . F_{N-2} .. F_0        (n + 1 = log2 N integer bits, N - 1 fraction bits)

- `int_out` holds I. It is the index of the highest set bit. Inputs 0 and 1 both give 0.
- `frac_out` holds the calibrated fraction. It is made from the bits below the
  leading one, shifted up so that the bit right under the leading one lands in
  F_{N-2}, with zeros filling in below. The calibration constant is then added.
- `c_en` is high when the constant was added.

Examples at N = 8:

| input      | Mitchell code | calibrated output | why |
|------------|---------------|-------------------|-----|
| 0001 0101 (21) | 100.0101000 | 100.0110000 | F = 0.0101 is inside the region |
| 1111 1111  | 111.1111111   | 111.1111111       | F is above the upper bound |
| 1110 1000  | 111.1101000   | 111.1110000       | inside |
| 0000 1111  | 011.1110000   | 011.1111000       | F = 0.111 exactly is still inside |
| 0000 0000  | 000.0000000   | 000.0000000       | F = 0 is below the lower bound |

The true value for 21 is log2 21 = 4.392. Mitchell gives 4.3125 and the calibrated
code gives 4.375.

## Calibration rule, exactly

The constant is added when the six leading fraction bits F_{N-2}..F_{N-7}, read
as an unsigned number v, satisfy 5 <= v <= 56. In binary that is 000101 to
111000, both ends included. All lower fraction bits are ignored.

As fractions, the region runs from 0.000101 (0.078) up to 0.111000111... (just
below 0.890625). The error curve is therefore cut at 0.078 and at 0.8906, not at
0.875 exactly. This comes from the six-bit judgement, and it is the reason
0000 1111 above is calibrated. The effect on the mean error is negligible.

Measured on the RTL, with all 2^15 fractions of a 16-bit build:

| quantity | value |
|----------|-------|
| mean absolute error, calibrated | 0.01553 |
| mean error, plain Mitchell | 0.05730 |
| largest positive error | +0.0304 |
| largest negative error | -0.0343 (just below F = 0.890625) |

With the 8-bit default build (7-bit fraction) the mean absolute error is 0.01552.

## How the parallel converter works

All parts are combinational and N-generic. N must be a power of two and at least 8.

**Enables (`enable_gen`).** EN_i is high when S_i is the leading one: S_i is set
and every higher bit is clear. EN_0 is simply "no bit above 0 is set", so the
enables are one-hot for every input, including 0. Everything else works from
these N one-hot lines instead of from a priority chain.

**Integer part (`integer_enc`).** This is the least obvious block. Integer bit I_b
must be 1 when the enabled position p has bit b set. Call the N/2 enables with
bit b of p set the *high set*, and the other N/2 the *low set*. The block
computes

    I_b = ( OR over groups of four high-set enables:
              exactly one of the four is high )
          AND ( no low-set enable is high )

Each group contributes four 4-input AND terms, one per single-hot pattern, so a
group needs no gate wider than four inputs. The NOR of the low set only confirms
what the one-hot property already guarantees. The structure is kept because it
is the gate-level form of the design. For N = 8:

    I_2 = onehot(E7,E6,E5,E4) & ~(E3|E2|E1|E0)
    I_1 = onehot(E7,E6,E3,E2) & ~(E5|E4|E1|E0)
    I_0 = onehot(E7,E5,E3,E1) & ~(E6|E4|E2|E0)

**Fraction (`fraction_gen`).** An AND array forms R_{m,k} = EN_m & S_k. Each
fraction bit is the OR

    F_i = R_{N-1,i} | R_{N-2,i-1} | ... | R_{N-1-i,0}

Only one EN_m is high, so F_i picks S_{i-(N-1-m)}. The result is a shift by a
variable amount, done with one AND level and one OR level. This array grows as
N^2 and dominates the size for wide inputs.

**Case judgement (`case_judgement`).** This is not a general comparator. Five
AND terms mark the places where the constant must *not* be added, and a NOR of
them gives `c_en`:

| term | meaning |
|------|---------|
| F_{N-2}F_{N-3}F_{N-4}F_{N-5} | 0.1111 or more |
| F_{N-2}F_{N-3}F_{N-4}F_{N-6} | 0.111x1 |
| F_{N-2}F_{N-3}F_{N-4}F_{N-7} | 0.111xx1 |
| ~F_{N-2}~F_{N-3}~F_{N-4}~F_{N-5} | below 0.0001 |
| ~F_{N-2}~F_{N-3}~F_{N-4}F_{N-5}~F_{N-6}~F_{N-7} | 0.000100 |

That is two gate levels for any N.

**Adder (`calib_adder`, inside `calibration`).** Adding 1/16 means adding a carry-in
at bit F_{N-5} to an all-zero word. Every generate term is then 0, and every
propagate term is the operand bit itself. What remains is:

    carry into bit k = cin & a_0 & ... & a_{k-1}
    sum_k            = a_k ^ carry_k

`calibration` applies this to F_{N-5}..F_{N-2} and the integer bits. The lower
fraction bits bypass it. The region ends below 0.1111, so the add never carries
out of the fraction. An assertion in `calibration` checks this.

## Power modes and timing

`log_converter_top` connects the power part (`clock_generator`) to the logic part
(`logic_part`).

- **dc power** (`dc_mode` = 1, control voltage at or below 1.2 V). The converter is
  combinational, and the output follows `s` with zero delay in simulation.
- **Clocked power** (control voltage above 1.2 V). In adiabatic logic each gate
  level evaluates on the phase after its predecessor. Dummy buffers give every
  path the same number of levels, so the logic behaves as a balanced pipeline.
  `ecrl_chain` models exactly that. The finished result passes STAGES registers,
  and register k loads on the rising edge of `phase[k mod 4]`. STAGES = 8 is the
  longest logic path of the 8-bit converter.
  - A new input is sampled at the next `phase[0]` rise. It reaches the output
    1.75 periods later, so the delay after an input change is 1.75 to 2.75 periods.
  - At 498 MHz that is 3.5 to 5.5 ns. Until the chain has filled, the output is
    stale.
  - The chain accepts a new input every period.

The model carries the finished result, not the individual gate levels. It is a
functional and timing model of the adiabatic pipeline, not of its energy
behaviour. It has no reset. Like the real circuit, it gives nothing meaningful
until it has filled.

`clock_generator` is a behavioural model (not synthesizable) of four seven-stage
voltage-controlled ring oscillators. It maps `vctrl_mv` to a frequency by
straight lines through these points:

| V_CTRL | frequency |
|--------|-----------|
| 1.2 V | 0 (dc) |
| 1.3 V | 79 MHz |
| 1.5 V | 498 MHz |
| 1.8 V and above | 0.981 GHz |

It drives `phase[3:0]` as 50 %-duty square waves, each lagging the previous one
by a quarter period, in place of the real sine waves. While in dc it holds all
phases high and raises `dc_mode`. It re-reads the control voltage every quarter
period.

## Modules

| file | role | parameters |
|------|------|------------|
| `rtl/log_converter_top.sv` | whole design: power part + logic part (simulation top) | N = 8, STAGES = 8 |
| `rtl/logic_part.sv` | synthesizable core: converter, calibration, dc/clocked output select | N = 8, STAGES = 8 |
| `rtl/log_converter.sv` | uncalibrated Mitchell converter | N = 8 |
| `rtl/enable_gen.sv` | one-hot leading-one enables | N = 8 |
| `rtl/integer_enc.sv` | integer part from enables | N = 8 |
| `rtl/fraction_gen.sv` | fraction AND-OR array | N = 8 |
| `rtl/calibration.sv` | case judgement + adder | N = 8 |
| `rtl/case_judgement.sv` | C_EN from six fraction bits | none |
| `rtl/calib_adder.sv` | carry-in-only lookahead adder | W = 7 |
| `rtl/ecrl_chain.sv` | four-phase level chain | W = 11, STAGES = 8 |
| `rtl/clock_generator.sv` | behavioural four-phase source | none |

For a different input width, set N on `logic_part` or `log_converter_top`. The
16-, 32- and 64-bit builds are exercised by the testbenches. For wider builds a
larger STAGES is the natural choice, since the longest path grows with N.

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=<n> failures=<m>`
and ends with `$finish`. The package `tb/log_ref_pkg.sv` holds the arithmetic
reference: highest set bit, shifted fraction, and the 5..56 rule. Build and run
one testbench with:

    verilator --binary --timing --assert -Wall -Wno-fatal --timescale 1ns/1ps \
      --top-module tb_log_converter_top -y rtl -y tb +libext+.sv \
      tb/log_ref_pkg.sv tb/tb_log_converter_top.sv
    ./obj_dir/Vtb_log_converter_top

| testbench | what it checks |
|-----------|----------------|
| `tb_log_converter_top` | Full design at default size. All 256 inputs on dc power. Then the sequence 11111111, 11101000, 00001111, 00000000 at 100 MHz with 498 MHz and 0.981 GHz clocked power, checked 6 ns after each change, with a check that the result is not yet there 0.5 ns after the first change. Counts that calibration, both out-of-region cases, zero input, both power modes and mode switches all occur. |
| `tb_logic_part` | Exhaustive in dc mode. In clocked mode, the value held right after an input change and the new value 6 ns later. |
| `tb_error_analysis` | The mean error figures above. Calibrated mean must be within 0.0150..0.0160, Mitchell within 0.0568..0.0578. |
| `tb_wide_converter` | 32- and 64-bit builds: random, single-bit and all-ones inputs. |
| `tb_enable_gen`, `tb_integer_enc`, `tb_fraction_gen`, `tb_log_converter` | Exhaustive at 8 and 16 bits (integer encoder also at 32). |
| `tb_case_judgement`, `tb_calib_adder`, `tb_calibration` | Exhaustive, plus random 16-bit pairs for `calibration`. |
| `tb_ecrl_chain` | Exact latency, to within 0.1 ns, and streaming one value per period. |
| `tb_clock_generator` | dc below 1.2 V; periods at 1.3, 1.5 and 1.8 V to within 1 %; quarter-period phase offsets. |

All of them pass, and each fails when its module is broken in a way that matters.
The only lint warning is Verilator's note that the oscillator model's delay is
computed at run time.

## What is modelled and what is not

These follow the reference design:

- the enable, integer, fraction, case-judgement and adder structures;
- the calibration constant and its bounds;
- the 8-bit default size and the 8-level path used for the clocked-mode latency;
- the oscillator frequency points.

These are choices made here:

- the adder also spans the integer bits (no carry ever reaches them);
- the dc/clocked output select and the `dc_mode` signal;
- the register-chain abstraction of the adiabatic logic;
- straight-line interpolation between the frequency points;
- square waves standing in for sine phases;
- the millivolt control input.

Not modelled:

- The electrical side: DCVSL/ECRL gates, charge recovery and power dissipation.
- Phase error between the oscillators, which is up to about 5 % at high
  frequency in the real circuit.
- The fan-in limit of eight inputs per gate and the dummy buffers. Wide
  reductions are written as reductions and left to synthesis to split.
