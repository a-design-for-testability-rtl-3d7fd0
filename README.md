# Two-vector stuck-at testing for majority-voter (QCA) adders

Quantum-dot cellular automata (QCA) compute with one primitive, the
three-input majority voter `MAJ(a,b,c) = ab + bc + ca`. A voter whose third
input is tied to 0 is an AND, and one tied to 1 is an OR. That fixed input is a
*control line*. In a network of voters where every voter's control line comes
from one of two shared pins, U0 (the ANDs) and U1 (the ORs), two vectors test
the whole data path for single stuck-at faults:

* **U0U1 = 00 with every data input at 1.** Every voter becomes an AND, every
  fault-free node is 1, and any node stuck at 0 pulls an output to 0.
* **U0U1 = 11 with every data input at 0.** Every voter becomes an OR, every
  fault-free node is 0, and any node stuck at 1 drives an output to 1.

This trick breaks down as soon as the logic needs an inverter. If both `b` and
`b'` feed the network, no input pattern can make them both 1 or both 0. This
RTL implements a fix in which a column of **Test Enable** voters sits between
the literals and the AND-OR network. In normal operation the column passes the
literals. In test mode it overrides them with all ones or all zeros. The scheme
is shown on a full adder in two variants, and on a cascaded N-bit adder, which
needs an extra fault-propagation output, **CTEST**.

## The control word

Every circuit here is steered by four control lines, carried as the packed
struct `dft_ctrl_t {c0, c1, u0, u1}` from `qca_dft_pkg`:

| {C0,C1,U0,U1} | Test Enable voters `MAJ(C0,C1,lit)` | AND-OR voters | fault-free outputs |
|---|---|---|---|
| 0101 or 1001 | pass the literal | ANDs and ORs as designed | the sum |
| 1100 | force every literal to 1 | all AND | all 1 (detects stuck-at-0) |
| 0011 | force every literal to 0 | all OR | all 0 (detects stuck-at-1) |

`CTRL_NORMAL` (0101), `CTRL_SA0` (1100) and `CTRL_SA1` (0011) are
package constants. `ctrl_for(mode)` maps a `dft_mode_t` to one of them.

## The literal-input full adder

The adder has no inverter inside the voter network. The inverting block
`qca_literal_gen` makes the true and complemented literal of each input. In
QCA this is an inverter chain with ripper cells. The AND-OR network
`qca_andor_fa` then uses eleven voters:

| net | function | voter control | feeds |
|---|---|---|---|
| `ab`, `anbn` | a·b, a'·b' | U0 | `xnor_o` (`ab` also feeds `carry`) |
| `abn`, `anb` | a·b', a'·b | U0 | `xor_o` |
| `xnor_o` | ab + a'b' | U1 | `xnor_c` |
| `xor_o` | ab' + a'b | U1 | `xor_cn`, `xor_c` |
| `xor_cn` | xor·c' | U0 | `sum` |
| `xnor_c` | xnor·c | U0 | `sum` |
| `xor_c` | xor·c | U0 | `carry` |
| `sum` | xor·c' + xnor·c | U1 | output |
| `carry` | ab + xor·c | U1 | output |

This way of sharing xor and xnor is a reconstruction, not a given. It was
chosen to match four fault observations for this adder:

* xnor stuck-at-0 shows on sum only.
* The `ab` line stuck-at-1 shows on both outputs.
* The xor·c line stuck-at-0 shows on carry only.
* The a'b' line stuck-at-1 shows on sum only.

The testbenches check all four.

## Design 1 and Design 2

* **`qca_fa_design1`** puts a Test Enable voter on all six literals, 2n for
  n inputs. In test mode the data inputs do not matter. The two test vectors
  are the 4-bit control words 1100 and 0011, whatever the circuit's size.
* **`qca_fa_design2`** puts Test Enable voters on the three complemented
  literals only, n voters. The true literals go straight through, so the data
  pins must carry the test value too. The vectors become
  {C0,C1,U0,U1,A,B,Cin} = 1100111 and 0011000, so their length grows with the
  number of inputs.

Both are combinational.

## Cascading: carry masking and the CTEST line

`qca_modular_adder` chains N Design 1 stages, with N = 4 by default. Each
stage runs its incoming carry through its own inverting block and Test Enable
voters, so one control word tests every stage. The side effect: in test mode,
stage k+1's Test Enable voters overwrite the carry of stage k. A stuck-at fault
that only reaches that carry then never shows at `sum` or `cout`.

`qca_ctest_line` fixes this. It taps every stage carry and folds them together
with a chain of N-1 voters: MV-1 takes carry0 and carry1, MV-2 takes the output
of MV-1 and carry2, and so on. The control line of these voters is U0, so they
are:

* ANDs in normal mode and in the stuck-at-0 test;
* ORs in the stuck-at-1 test.

A masked carry fault therefore flips `ctest` while `sum` and `cout` keep their
fault-free test values. In normal mode `ctest` is the AND of the stage
carries, which carries no meaning there.

## Timing: clock zones as a pipeline

A QCA layout is split into clock zones driven by four clock phases 90°
apart. Each zone holds its result while the next one switches, so a QCA
circuit is a pipeline that takes a new input every cycle. The 1-bit adders
span nine zones and deliver their result two clock cycles after the inputs.
The voter networks here are combinational, and `qca_pipe` models that latency
in a synchronous design. It is a register delay line (`DEPTH` stages, one per
clock cycle, asynchronous active-low clear). It does not model anything
happening inside a clock cycle.

`qca_dft_top` puts the three circuits side by side, each with its own control
word and data ports (`d1_*`, `d2_*`, `m_*`):

* Design 1 and Design 2 sit behind a `FA_LATENCY` = 2 cycle pipe.
* The modular adder sits behind `MOD_LATENCY` cycles. The default,
  2 × N = 8, assumes each rippled stage adds one adder latency.

## What the testbenches establish

Each `tb/<module>_tb.sv` checks its block against values it computes itself,
and prints `TB_RESULT checks=… failures=…`:

* **`qca_mv_tb`** checks the majority function, the AND/OR forms, and the
  single-voter vectors {U,A,B} = 011 and 100.
* **`qca_fa_design1_tb`, `qca_fa_design2_tb`:**
  * Exhaustive normal addition, for both C0C1 = 01 and 10.
  * The fault-free test responses.
  * Complementing all seven inputs complements both outputs, a property of
    any voter network.
  * Every one of the 17 data-path lines of the adder (six literal inputs and
    eleven voter outputs) forced stuck-at-0 and stuck-at-1 with `force`. All
    34 faults are caught by the two vectors.
* **`qca_modular_adder_tb`** runs `qca_modular_adder_check` at N = 4 and
  N = 2:
  * Exhaustive addition.
  * Every stuck-at fault on every stage's 17 lines: 136 and 68 faults, all
    caught.
  * Each inter-stage carry fault is confirmed masked at `sum`/`cout` and
    visible at `ctest`.
* **`qca_dft_top_tb`** runs the top at its default parameters for 3000
  cycles:
  * It mixes normal and test cycles at random, with faults injected on single
    test cycles.
  * It checks every output exactly 2 (or 8) cycles after its input.
  * It counts normal adds, both test vectors, faults caught in each design,
    and masked carry faults caught on CTEST. It fails if any of these never
    happened.

**What is not covered:**

* Stuck-at faults on the lines between the inverting block and the Test
  Enable voters. Test mode overwrites these lines, so the two vectors cannot
  see them. Normal-mode vectors must test them.
* Faults on the control lines themselves. These need vectors from a
  conventional ATPG.
* Faults on individual fan-out branches, as opposed to the stems.

## Departures and own choices

* The full adder's gate-level structure is reconstructed as described above.
* The AND voters take U0 and the OR voters U1, so normal mode is U0U1 = 01.
* The CTEST voters are controlled by U0.
* The modular adder is built only from Design 1 stages.
* The latency is modelled with registers. The modular adder's latency
  (2 × N) and the pipe's reset are assumptions.
* Nothing physical is modelled: cell geometry, cell defects, or the four-phase
  clock field.

## Files and simulation

`rtl/`:

* `qca_dft_pkg` holds the control types and constants.
* `qca_mv`, `qca_literal_gen`, `qca_test_enable` and `qca_andor_fa` are the
  building blocks.
* `qca_fa_design1`, `qca_fa_design2`, `qca_ctest_line` and
  `qca_modular_adder` are the testable circuits.
* `qca_pipe` is the latency model.
* `qca_dft_top` is the top.

`tb/` holds one testbench per module, plus `qca_modular_adder_check`.

With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/qca_dft_pkg.sv \
    tb/qca_dft_top_tb.sv --top-module qca_dft_top_tb
./obj_dir/Vqca_dft_top_tb
```

Substitute any other `*_tb`. The package must come first. Modules are found
through `-Irtl`/`-Itb` by file name.

To change the adder width, set `N` on `qca_modular_adder` or
`qca_dft_top`; `qca_ctest_line` needs N ≥ 2.
