# Semi-concurrently self-checking AR filter data path

A data path that processes a continuous stream of data cannot be taken
off-line for testing, and duplicating it to check every result concurrently
doubles its functional units. This design takes a middle road: it recomputes
the results of only *every second* input set, and does so on the functional
units the nominal computation already has, in the control steps where they
would otherwise sit idle. Only one extra adder and one comparator (checker) are
added. A permanent fault in any functional unit that the data excite makes the
recomputed result differ from the nominal one, and the checker raises an error.

The circuit is an auto-regressive (AR) lattice-style filter of 28 one-cycle
operations (16 multiplications, 12 additions) with two outputs per input set.
Its nominal schedule takes 8 control steps on 4 multipliers (m1..m4) and 2
adders (a1, a2). With the extra adder a3, a second copy of the graph, the
*checking* computation, fits into the free slots of two consecutive nominal
iterations, so checking costs no throughput: an input set is still accepted
every 8 clock cycles.

## The shared schedule

Everything the hardware does is fixed by one 16-row table (two nominal
iterations). Rows are clock cycles while the stream does not pause; columns are
the units. A plain number is a nominal operation, `Nc` is operation N of the
checking computation, which works on the input set of the first of the two
iterations (the *checked* set).

| step | m1  | m2  | m3  | m4  | a1 | a2  | a3  | checker |
|------|-----|-----|-----|-----|----|-----|-----|---------|
| 1    | 1   | 2   | 3   | 4   |    |     |     |         |
| 2    | 15  | 16  | 17  | 18  | 5  | 6   |     |         |
| 3    | 2c  | 1c  | 4c  | 3c  | 7  | 8   |     |         |
| 4    | 9   | 10  | 11  | 12  | 23 | 24  | 5c  |         |
| 5    | 16c | 15c | 18c | 17c | 13 | 14  | 6c  |         |
| 6    | 19  | 20  | 21  | 22  | 8c | 7c  | 23c |         |
| 7    | 10c | 9c  | 12c | 11c | 25 | 26  | 24c |         |
| 8    |     |     |     |     | 27 | 28  | 13c |         |
| 9    | 1   | 2   | 3   | 4   |    |     | 14c |         |
| 10   | 15  | 16  | 17  | 18  | 5  | 6   |     |         |
| 11   | 20c | 19c | 22c | 21c | 7  | 8   |     |         |
| 12   | 9   | 10  | 11  | 12  | 23 | 24  | 25c |         |
| 13   |     |     |     |     | 13 | 14  | 26c |         |
| 14   | 19  | 20  | 21  | 22  |    | 27c | 28c |         |
| 15   |     |     |     |     | 25 | 26  |     | out 27  |
| 16   |     |     |     |     | 27 | 28  |     | out 28  |

Three rules make this table a self-checking schedule:

* **Never the same unit twice.** Every checking operation runs on a different
  unit of the same type than its nominal twin (1 runs on m1, 1c on m2; 27 on
  a1, 27c on a2, and so on). A faulty unit therefore corrupts at most one of
  the two computations of any single operation. With only two adders in the
  nominal design there would be too few free adder slots to finish the
  checking additions in time, which is why a3 exists; a3 does nothing but
  checking work.
* **Dependencies.** Every checking operation runs after the checking
  operations it reads. The checking computation finishes in step 14.
* **Checks.** Outputs 27 and 28 of the checked set are compared in steps 15 and
  16, one comparison per step on one checker.

The sharing does leave a small chance of *aliasing*: along one path of the
graph, one unit can compute operation X nominally and operation Y in the
checking copy, so a single faulty unit can disturb both results. The two errors
would then have to cancel exactly for the fault to go unseen. That can happen
only for particular data values, and it needs two different operands to
excite the same fault. A fault that the data never excite is not seen at all.
Semi-concurrent checking accepts both risks and relies on the stream of real
data acting as a long random test. Registers are never shared between the two
computations, so a fault in a register, or in the multiplexer in front of it,
corrupts only one computation and is detected whenever the data excite it.

## The filter graph

Operation numbers and unit bindings follow the table above. Which value each
operation reads is this design's own reconstruction, built to fit both the
nominal and the checking columns of the table. `x0..x7` are the input set and
`c0..c15` the coefficients. All arithmetic wraps modulo 2^WIDTH.

```
 1..4 : x0*c0, x1*c1, x2*c2, x3*c3           15..18: x6*c8, x7*c9, x6*c10, x7*c11
 5 = 1+2    6 = 3+4    7 = 5+x4    8 = 6+x5  23 = 15+16   24 = 17+18
 9 = 7*c4  10 = 7*c5  11 = 8*c6   12 = 8*c7
13 = 9+12  14 = 10+11
19 = 13*c12  20 = 13*c13  21 = 14*c14  22 = 14*c15
25 = 19+22  26 = 20+21
27 = 25+23 (output)     28 = 26+24 (output)
```

The longest path, 1-5-7-9-13-19-25-27, is eight operations long, which matches
the 8 nominal steps. The filter's delay-line state is treated as part of each
input set, so the graph has no state from one iteration to the next. To run a
different filter with the same schedule, edit `dfg_src_a`/`dfg_src_b` in
`scsc_pkg` and the reference model in `tb/ar_ref_pkg.sv`. Any new graph must
still respect the dependency rule of the table; the controller testbench
checks the table itself, not the graph.

## Data path

`sc_datapath` has four parts:

* **Functional units.** There are seven combinational units (`mult_fu` x4,
  `add_fu` x3). Each finishes one operation per clock.
* **Two register sets (`dfg_regs`).** The nominal set holds the current input
  set and one register per operation result. The checking set holds the same
  for the checked input set, and is loaded only when a checked iteration
  starts. Any unit's result bus can write any register of either set.
* **Operand multiplexers.** These sit in front of the units. The control word
  gives each unit an enable, a *checking* flag and the 5-bit number of the
  operation to perform. The number selects the operation's two sources: an
  input word, an earlier result or a coefficient. The flag selects which
  register set they come from and which set the result goes to. Coefficients
  are shared by both computations.
* **Save registers and checker.** In step 9 the nominal outputs 27 and 28 of
  the checked set are copied into two save registers. They would otherwise be
  overwritten in step 16. In steps 15 and 16, `sc_checker` compares a save
  register with the matching checking result.

`sc_checker` is a self-checking equality checker. Bit *i* of the two words forms
the two-rail pair (a_i, NOT b_i). That pair is a valid code word (01 or 10)
exactly when the bits are equal. A chain of two-rail checker cells (`trc_cell`)
merges the pairs into one pair. The result is 01 or 10 when the words are equal
and 00 or 11 when they differ. A stuck-at fault inside the checker also
eventually produces 00 or 11, so the checker does not need a checker of its
own. Its output is registered as `chk_pair`, and `chk_err` flags a non-code
pair.

## Controller and interface timing

`sc_controller` counts the step within an iteration (0..7) and the iteration
within the checking cycle. The row it issues is 1..8 in iteration 0 and 9..16
in iteration 1. With `CHECK_ITERS > 2`, further iterations issue rows 1..8
with all checking work removed.

| signal | behaviour |
|--------|-----------|
| `in_valid`/`in_ready`, `x_in[8]` | An input set is taken in a cycle where both are high. `in_ready` is high while idle and in the last step of each iteration. |
| pause | If no input set is offered at the end of an iteration, the schedule stops (nothing is written) and resumes with the next row. The checking work pauses with it. |
| `out_valid`, `y27`, `y28` | `out_valid` pulses 9 cycles after the accepting cycle, when both outputs are in the nominal registers. `out_checked` marks the set that will be checked. |
| `chk_valid`, `chk_pair`, `chk_err` | The results of checking output 27 and output 28. Without pauses, they appear 16 and 17 cycles after the checked set was accepted. |
| `error` | Sticky error flag, cleared only by reset (asynchronous, active low). |
| `ctrl_step` | The table row executing now. |
| `coef[16]` | Coefficients, one per multiplication. Hold them stable while running. |

An immediate assertion in the controller enforces the allocation rule: no
checking operation may be issued on its nominal unit.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `WIDTH` | 16 | Word width of data, coefficients and units. This is a design choice. |
| `CHECK_ITERS` | 2 | Nominal iterations per checking cycle. At 2, every second input set is checked, as in the table. Larger values check less often. Values below 2 are rejected. |

The checking period the filter was designed against is 3 iterations (one
check within 24 steps). The table meets it with room to spare: it checks
every 2 iterations and finishes in 16 steps.

## What follows the method and what is this design's own

The following come from the method and its AR filter example: the unit counts,
the binding of nominal operations to units, the whole 16-row table, checking
every second iteration, separate registers for the two computations, the
multiplexers at unit and register inputs, holding checked outputs until they
are compared, and one step per check on a self-checking checker.

The following are this design's own choices: the edges of the filter graph
(see above), the word width and wrap-around arithmetic, coefficients as an
input port, one register per operation instead of lifetime-based register
sharing, the control word coding, saving the checked outputs in step 9, the
two-rail chain checker, the valid/ready handshake with pausing, the sticky
error flag, reset behaviour and the `CHECK_ITERS > 2` extension.

Not provided: a second worked example, an elliptic filter that needs no extra
adder, because its graph and schedule are not available. The scheduling and
allocation algorithm that produces such tables is a design-time method, not
hardware, and is not part of this RTL.

## Files and simulation

`rtl/`: `scsc_pkg` (types, the graph, the table), `mult_fu`, `add_fu`,
`trc_cell`, `sc_checker`, `dfg_regs`, `sc_controller`, `sc_datapath`, and the
top level `ar_filter_scsc`.

`tb/`: one self-checking testbench per module (`tb_<module>`), `ar_ref_pkg`
(reference model of the graph), and `tb_ar_filter_scsc_p3` (top level with
`CHECK_ITERS = 3`). Each testbench prints `TB_RESULT checks=N failures=M`.
`tb_ar_filter_scsc` runs the top level at its default parameters. It covers a
gap-free stream (rate and latencies checked), a stream with random pauses, and
faults forced into m1 and into a3. `tb_sc_datapath` also forces a register
of the checking set and expects the check to flag it. Each mechanism has to occur at least once:
a pause, a checked set, a passing check of each output and a detected error.

Run any testbench from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/scsc_pkg.sv tb/ar_ref_pkg.sv tb/tb_ar_filter_scsc.sv --top-module tb_ar_filter_scsc
./obj_dir/Vtb_ar_filter_scsc
```

The fault-injection testbenches (`tb_sc_datapath`, `tb_ar_filter_scsc*`) use
`force` on unit outputs through hierarchical names such as `dut.u_dp.u_m1.y`.
Keep those instance names if you restructure the data path.
