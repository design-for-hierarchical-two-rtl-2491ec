# Hierarchically two-pattern testable data paths

Delay defects are found with **two-pattern tests**. A vector `v1` is applied
to the start of a path and the logic settles. In the very next clock a
vector `v2` launches a transition. The end of the path then captures the
result one clock later. Enhanced scan can apply such pairs anywhere, but it
costs a lot of area and shifts every vector in serially.

This design takes the other route, at register-transfer level. Test vector
pairs travel from the primary inputs (PIs) to the registers on the
*existing* data path lines. Responses travel from the registers to the
primary outputs (POs) the same way. Small DFT elements are added only where
the existing lines cannot do the job:

* **test MUXes**, which give a PI a direct path to a register;
* **thru masks**, which make an adder or multiplier pass one operand
  unchanged;
* **REFF registers**, made of rotating enhanced flip-flops, which can store
  a vector pair and replay it.

A data path in which every RTL path can be tested this way is
*hierarchically two-pattern testable* (HTPT). An RTL path has sequential
depth one: PI→register, register→register or register→PO. The gate-level
vectors for each operational module come from ordinary combinational ATPG,
generated for that module alone.

The RTL here contains four things:

* the DFT elements as reusable modules;
* an example data path with its DFT elements already inserted;
* a parameterised pair of control paths that shows how hold registers line
  up a vector pair;
* a top that puts the example data path, two control-path pairs and a
  global REFF register side by side.

The controller is not part of the design. Every control input (load
enables, MUX selects, test-MUX select, mask enable) is a primary input. The
test sequencing is done by the testbenches, which play the role of the
tester.

## Terms

| term | meaning |
|---|---|
| RTL path | a path of sequential depth one, e.g. `R1-MUX3-MUX5-MULT-R5` |
| degree | the number of inputs of the operational module the path crosses (1 if it crosses none) |
| control path | a route that carries test vectors from a PI to a register |
| observation path | a route that carries a response from a register to a PO |
| test plan | one control path per module input, plus one observation path |
| thru function | a module passing one input straight through, e.g. `x + 0` or `x * 1` |
| support path | a control path that supplies the constant for a thru function |
| merging point (MP) | the last point that two control paths share |
| feedback register (FR) | a register that is both an input and an output of the same module |
| hold register | a register with a load enable |

## The example data path (`rtl/htpt_datapath.sv`)

```
R1   <- PI1                         ADD   = R1 + mask0(MUX4(R3, R4))
R2   <- MUX1(PI2, MULT)             TMUX  = test_mode ? PI2 : ADD      (test MUX)
R3   <- MUX2(TMUX, K)               MULT  = MUX5(MUX3(R1, R3), R4) * R2
R4   <- MUX6(TMUX, K)               PO1   = R4
R5   <- MULT                        PO2   = R5
```

`K` is a constant register (parameter `CONST_VAL`). Paths that start at a
constant register are not tested. Every register has a load enable.

Without the test MUX and the mask (`tmux_sel = 0`, `add_mask = 0`) this is
the original data path. It has two PIs, two POs, five registers, six MUXes,
an adder and a multiplier. Its 18 RTL paths are:

| # | path | degree |
|---|---|---|
| 1 | PI1-R1 | 1 |
| 2 | PI2-MUX1-R2 | 1 |
| 3-6 | {R1, R3, R4, R2}-MULT-MUX1-R2 | 2 |
| 7-9 | {R1, R3, R4}-ADD-MUX2-R3 | 2 |
| 10-12 | {R1, R3, R4}-ADD-MUX6-R4 | 2 |
| 13-16 | {R1, R3, R4, R2}-MULT-R5 | 2 |
| 17 | R4-PO1 | 1 |
| 18 | R5-PO2 | 1 |

### Why the test MUX is needed

R3 and R4 are feedback registers of ADD: accumulators that start from the
constant K. Without DFT, the only way to load them from a PI passes through
ADD itself (PI1-R1-ADD-...). Such a path is
no good for testing a path that starts at R3 or R4 and crosses ADD. The
pair would have to pass through the very adder whose inputs `v1` is meant
to settle.

The test MUX on the ADD output gives PI2 a direct path to both R3 and R4.
One MUX serves both registers because MUX2 and MUX6 both take the ADD
output. PI2 is used rather than PI1 because ADD's other input, R1, is loaded
from PI1. The two control paths are therefore disjoint, and disjoint
control paths can always be scheduled together.

### Why the mask is needed

Paths from R3 into MULT need two pairs at once: one in R3 and one in R2. R2
can only be loaded from PI2. The test MUX path into R3 also uses PI2, and
both paths have depth one from the same PI. Those two cannot deliver a
pair; see the conditions below.

R3 is therefore loaded the long way, over PI1-R1-ADD-MUX2-R3. For this, ADD
must pass R1 through unchanged, so its other operand must be 0. A support
path could supply that 0 only through PI2, which is busy in those clocks.
So a mask forces ADD's right operand to 0 (`add_mask`).

The multiplier's thru function (other operand = 1) has a support path with
no such conflict. A 1 is loaded into R1 or R2 beforehand and held, so MULT
gets no mask. R2 is also a feedback register of MULT, but it has its own
direct path from PI2, so it needs no test MUX.

### Test plans as applied

`tb/tb_htpt_all_paths.sv` runs a plan for each of the 18 paths through the
PIs and POs only. Each plan takes 3 to 5 clocks, not counting the clock
that loads a support value. The plans used are:

* **ADD paths.** R1←PI1 and R3/R4←PI2 through the test MUX, in the same
  two clocks. The capture clock follows. An R4 result is already on PO1. An
  R3 result moves through MULT (×R2 = 1) into R5 and out on PO2.
* **MULT paths.** R1←PI1, or R3/R4←PI1-R1-ADD with the mask on. R2←PI2 in
  the matching clocks. The capture goes into R5 (PO2) or into R2. An R2
  result leaves through MULT, with R1 = 1 loaded in the capture clock.
* **Degree-1 paths.** PI1-R1 and PI2-MUX1-R2 capture the second vector.
  It is then observed through MULT, with the support value 1 held in the
  other operand register. R4-PO1 gets its pair through the test MUX, and
  R5-PO2 gets it over PI1-R1-MULT with R2 = 1. Both pairs are seen at the
  PO in consecutive clocks.

## Lining up a vector pair: hold registers (`rtl/cpath_pair.sv`)

Two control paths that share an MP get one partial vector per clock through
it. They can still put `v11`/`v12` at their end points in the same clock,
and `v21`/`v22` in the next, when at least one of these holds:

1. the paths are disjoint;
2. their depths from the MP differ by 2 or more;
3. one of them crosses at least two hold registers;
4. their depths differ by exactly 1, and the shallower one crosses a hold
   register.

For two paths, these four conditions are also the only ways. Otherwise the
pairs would have to pass through the MP in an order that cannot be
untangled.

`cpath_pair` builds the disjoint parts as two register chains fed from
`mp`. Parameters `N1` and `N2` set the chain lengths. The bit masks `HOLD1`
and `HOLD2` mark which registers have a load enable. Every other register
loads every clock. All register contents are output, so a test can follow
a schedule step by step.

* **Default: condition 3.** `N1 = N2 = 5`, hold registers at positions 2
  and 4 of the first chain. The MP receives `v11, v21, v12, v22` in clocks
  0–3. `v11` waits in position 4 and `v21` waits in position 2. The pair
  reaches the end points in clocks 7 and 8.
* **Condition 4.** `N1 = 3, HOLD1 = 3'b010, N2 = 4`. The MP receives
  `v11, v12, v22, v21`. `v11` waits in the hold register while `v12/v22`
  enter the deeper chain. The pair arrives in clocks 5 and 6.

* **Condition 2.** `N1 = 4, N2 = 2`, with no hold registers. `v11, v21`
  enter the deeper chain first and `v12, v22` follow two clocks later. The
  pair arrives in clocks 4 and 5.

`tb/tb_cpath_pair.sv` checks the first two schedules register by register
and the third at the end points.

## REFF register (`rtl/reff_reg.sv`)

Each bit is two flip-flops, A and B, with a MUX in front of A. B always
copies A. In normal mode A takes `d`, so `q` (= A) behaves like a plain
flip-flop. Two loads leave `v1` in B and `v2` in A. In test mode A takes B,
so the two bits swap every clock and are never lost: `q` shows
`v1, v2, v1, v2, …`. The register is thus a two-word hold register.

A single-input data path has no second PI to build disjoint control paths
from. For such a data path the method adds one **global REFF register** on
the PI and test MUXes from it to the registers that need them. The top
includes one such register, with its own PI, as a stand-alone part. The
example data path has two PIs and does not need it.

## Other elements

* `mux2` is an n-bit 2:1 MUX. When it selects an input, each output bit
  depends only on the same input bit. Paths through it are therefore
  independent 1-bit paths, and the unselected input is a don't care.
* `thru_mask` passes its input, or the constant `MASK_VALUE` when
  `mask_en` = 1. Use 0 in front of an adder and 1 in front of a
  multiplier.
* `hold_reg` is a register with a load enable and an asynchronous
  active-low reset to `RESET_VAL`. An assertion checks that it keeps its
  value while the enable is low. `reff_reg` has a similar assertion that
  the two bits rotate in test mode.
* `op_add` and `op_mult` work at the bus width. The carry and the upper
  half of the product are dropped.
* `htpt_pkg` holds the bus width `DP_WIDTH` (16) and the control struct
  `dp_ctrl_t`.

## Top (`rtl/htpt_top.sv`)

The top has four independent parts that share only the clock and reset:

| instance | part | port prefix |
|---|---|---|
| `u_dp` | example data path | `dp_` |
| `u_cp_c` | control-path pair for condition 3 | `cpc_` |
| `u_cp_d` | control-path pair for condition 4 | `cpd_` |
| `u_greff` | global REFF register | `greff_` |

The only parameter is `WIDTH` (default 16).

## Where this departs from, or goes beyond, the method

* **Example data path connections.** Several things follow the method:
  the element names, the paths it names, MULT writing R2, the count of 18
  RTL paths, R3 being reachable from a PI only through ADD, and one test MUX
  from PI2 serving both R3 and R4. Together these fix the constant inputs
  of MUX2 and MUX6. MUX3 = (R1, R3), MUX5 = (MUX3, R4), MUX4 = (R3, R4) and
  PO1 = R4 are this design's choices, made to agree with them.
* **Placement of the test MUX and the mask.** The method requires one
  shared test MUX from PI2. Placing it on the ADD output, and placing the
  mask on ADD's right operand, are this design's choices. Both follow the
  insertion rules described above.
* **Assumed details.** The bus width (16), the register reset values, the
  output of the REFF taken from flip-flop A, and the encodings of the
  selects and the mask are assumptions.
* **The insertion algorithm itself is not hardware and is not included.**
  That algorithm builds a port graph of the data path and uses
  breadth-first search for the shortest control and observation paths. It
  then uses register compatibility graphs and test cliques to choose which
  elements to add.
* **Not built.** The benchmark data paths (Paulin, LWF, Tseng, a 32-bit
  RISC) are not included, because only their element counts are known.
  Data paths of mixed bus widths, which can need an extra MUX or an REFF
  plus a MUX, are not modelled.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_mux2`, `tb_thru_mask`, `tb_op_add`, `tb_op_mult`, `tb_hold_reg`, `tb_reff_reg` | random and directed vectors against reference expressions; the REFF replay order |
| `tb_cpath_pair` | the condition-2, -3 and -4 schedules with random vectors; for conditions 3 and 4, every listed register in every clock |
| `tb_htpt_datapath` | 3000 random clocks against a cycle model of the data path; one complete two-pattern test plan |
| `tb_htpt_all_paths` | a plan for each of the 18 RTL paths at default parameters |
| `tb_htpt_top` | end to end at default parameters: four test plans, both schedules and the REFF replay, with a count of how often each mechanism occurred (test MUX, mask, support path, hold, schedules, rotation) |

Each testbench was also run against a deliberately broken copy of its
module, and each one reported failures.

To simulate one testbench with Verilator, list the package first, then the
modules:

```
verilator --binary --timing --assert -Irtl rtl/htpt_pkg.sv rtl/*.sv \
          tb/tb_htpt_top.sv --top-module tb_htpt_top -Mdir obj_top
./obj_top/Vtb_htpt_top
```

Replace `tb_htpt_top` with any other testbench name. The leaf-module
testbenches only need the package and their own module. Every simulation
finishes in well under a second.
