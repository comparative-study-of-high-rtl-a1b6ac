# Braun array multipliers with bypassing and fast last stages

An unsigned N×N Braun multiplier is a grid of AND gates and full adders.
The partial products `a_i & b_j` are summed row by row in carry-save form, and one
carry-propagate adder at the bottom merges the two vectors that remain. This RTL
builds five variants of that array and lets each end in one of three last-stage adders:

| architecture (`arch_e`) | what it skips |
|---|---|
| `ARCH_BRAUN` standard Braun array | nothing |
| `ARCH_ROW` row bypassing | a whole row `j` when multiplier bit `b_j = 0` |
| `ARCH_COL` column bypassing | a whole column `i` when multiplicand bit `a_i = 0` |
| `ARCH_2D` two-dimensional bypassing | any cell whose partial product is 0, unless a carry enters it |
| `ARCH_RC` row-and-column bypassing | as `ARCH_2D`, but with simplified A+1 / A+B+1 cells instead of full adders |

| last stage (`final_adder_e`) | structure |
|---|---|
| `ADD_RCA` | ripple-carry, the original last stage |
| `ADD_CLA` | two-level carry-lookahead, 4-bit groups (**default**) |
| `ADD_KSA` | Kogge-Stone parallel prefix |

Bypassing aims at dynamic power: an adder whose inputs do not change does not
switch. The faster last stages aim at the critical path. In a Braun array that
path runs down the array and then along the whole ripple-carry adder. The
design follows a comparative study of these fifteen combinations at 4×4, 8×8
and 16×16 bits. That study found carry-lookahead the best balance of area,
delay and power. This is why it is the default here. Kogge-Stone is fastest but
largest.

Everything is combinational. There are no clocks, resets or registers, and the product
`p = a * b` is valid one combinational delay after the operands change.

## The array

All five architectures share one layout. For N = 16 the signals are:

* **Row 0** is just the partial products `s[0][i] = a_i & b_0`. It has no carries.
* **Row j** (`j = 1 … N-1`) has N-1 cells, in columns `i = 0 … N-2`. Cell `(i, j)` adds three bits, all of weight `2^(i+j)`:
  * the partial product `a_i & b_j`
  * the sum `s[j-1][i+1]` from one column to the left in the row above
  * the carry `c[j-1][i]` from the same column in the row above.

  So sums move one column right per row and carries go straight down.
  Column `N-1` of each row holds only the partial product `a_{N-1} & b_j`.
* **Product bit j** (`j < N`) is the column-0 sum of row j.
* **The last stage** adds the N-1 sums `s[N-1][N-1:1]` and the N-1 carries `c[N-1][N-2:0]`.
  Its N-1-bit sum is `p[2N-2:N]` and its carry out is `p[2N-1]`.

The standard array therefore has N² AND gates, (N-1)² array full adders and an
N-1-bit last stage. With the ripple-carry last stage that makes N(N-1) full adders.

Because carries go straight down, **column i only ever holds a carry if
`a_i = 1`**. The column-bypassing scheme rests on this fact, and the 2-D and
row-and-column schemes use it too.

## How each bypass stays exact

Every bypassed cell is *isolated*: its adder inputs are ANDed with the cell's
enable, so they are held at 0 instead of toggling. A multiplexer then picks the
forwarded value in place of the adder's output. The products are identical in
all fifteen variants. Only the amount of switching differs.

**Column bypassing** (`col_bypass_mult`). If `a_i = 0`, every cell of column `i`
has partial product 0 and, by the fact above, carry input 0. It would compute
`0 + s + 0`, so it forwards its sum input and outputs carry 0. No correction is needed.

**Row bypassing** (`row_bypass_mult`). If `b_j = 0`, row j adds no partial
products, but the row above hands it two vectors, sums and carries. Merging
them would still need adders. Instead, the bypassed row passes both vectors to
row j+1, each shifted one column right. This shift keeps every bit at its
weight: sum `s[j-1][i+1]` becomes `s[j][i]` and carry `c[j-1][i+1]` becomes `c[j][i]`.
One bit is left over: the carry `c[j-1][0]` has the weight of product bit j but
has no slot to go to. Each row therefore has one extra **edge correction full
adder** at the right edge:

* row active (`b_j = 1`): the correction adds the column-0 cell's sum and the edge carry `k[j-1]`.
* row bypassed (`b_j = 0`): the correction adds `s[j-1][1] + c[j-1][0] + k[j-1]`.

The correction's sum is product bit j and its carry is `k[j]`. That carry
passes down the edge, and `k[N-1]` becomes the carry in of the last-stage adder.
This costs N-1 extra full adders, and the edge adders stay active even in
bypassed rows.

**Two-dimensional bypassing** (`twod_bypass_mult`). A cell may be skipped if
its partial product is 0, whether because of its row or its column. The catch:
in an idle row, a cell in a busy column may still receive a carry. It must then
add. The extra circuitry per cell is that test:

    bypass(i, j) = ~(a_i & b_j) & ~c[j-1][i]

This covers every cell of an idle column (it never holds a carry) and the
carry-free cells of an idle row.

**Row-and-column bypassing** (`rc_bypass_mult`, cell `rc_cell`). This uses the
same bypass condition, but exploits the fact that the partial product is known
before the addition. The three-input full adder is replaced by three cheaper behaviours:

| partial product | carry in | cell behaves as | s | co |
|---|---|---|---|---|
| 1 | any | A+B+1 adder | `~(a ^ b)` | `a \| b` |
| 0 | 1 | A+1 incrementer | `~a` | `a` |
| 0 | 0 | bypass | `a` | `0` |

Here `a` is the sum input and `b` the carry input. Each row of the table equals `a + b + pp`.

Every variant has a `bypassed` output with one flag per array cell. The flag
for row `j`, column `i` is bit `(j-1)*(N-1)+i`, and it is set when that cell's
adder is isolated. The two-dimensional and row-and-column arrays give the same
flags, because their carries are identical. Only the cells that compute them differ.

## Last-stage adders

* `rca_adder`: a chain of `full_adder`s.
* `cla_adder`: bits in groups of `CLA_GROUP = 4` (`braun_pkg`).
  * Inside a group, every carry is a sum of products of the bit generate/propagate signals and the group's carry in.
  * A second level computes each group's carry in directly from the group generate/propagate signals and `cin`.
  * No carry ripples between groups. The last group may be narrower.
* `ksa_adder`: radix-2 Kogge-Stone.
  * `cin` enters as a generate at position -1, so the tree spans W+1 positions over `ceil(log2(W+1))` levels.
  * At level `l`, each node combines with the node `2^l` positions below it.

`final_adder` chooses one of these three by its `KIND` parameter at elaboration.

## Top level

`braun_compare_top #(N = 16)` drives all fifteen variants from one pair of operands:

| port | width | meaning |
|---|---|---|
| `a`, `b` | `N` | unsigned operands |
| `p` | `[5][3][2N]` | `p[arch][adder]`, the product of each variant, indexed by `arch_e` and `final_adder_e` |
| `bypassed` | `[5][(N-1)²]` | bypass flags of each architecture's carry-lookahead variant |

`bypassed[ARCH_BRAUN]` is constant 0, because the standard array has nothing to bypass.

Each multiplier can also be used on its own. For example,
`row_bypass_mult #(.N(8), .FINAL_ADDER(ADD_KSA))` is an 8×8 row-bypassing
multiplier with a Kogge-Stone last stage. Any `N >= 2` works.

## Where this departs from, or adds to, the source study

* The study describes each bypassing scheme by what it skips. The exact carry handling here is this design's own, chosen so that every product is exact:
  * the row scheme's edge correction adders and the `k` carry into the last stage
  * the per-cell carry test of the 2-D scheme
  * the rule that picks the A+1 / A+B+1 / bypass cell.

  The original circuits may place their correction logic differently.
* Skipping is modelled by AND-gate operand isolation plus a multiplexer. Published bypassing multipliers often use latches or tri-state buffers to hold the inputs instead.
* The CLA group size (4) and two-level form and the Kogge-Stone radix (2) are not specified by the study.
* Putting the fifteen variants side by side in one top is an arrangement for comparing them. The study builds each one separately.
* Delay, area and power are not modelled. The study measured them on Xilinx Spartan-3E and Virtex-4/5/6 devices and in a 90 nm library. Those numbers depend on the target and are not reproduced here.
* Signed multiplication, which the study leaves as future work, is not built.

## Verification

Every testbench in `tb/` is self-checking. It prints `TB_RESULT checks=… failures=…` and has a watchdog.

* `tb_full_adder`, `tb_rc_cell`: all input combinations.
* `tb_rca_adder`, `tb_cla_adder`, `tb_ksa_adder`:
  * widths 1, 2, 3, 4, 5, 8, 15, 16 and 31
  * corner and random operands, both values of `cin`
  * the run must see a carry out, and a carry rippling across all 15 bits.
* `tb_braun_mult`, `tb_row_bypass_mult`, `tb_col_bypass_mult`, `tb_twod_bypass_mult`, `tb_rc_bypass_mult`:
  * every operand pair at N = 4 and N = 8, with each last stage
  * 20 000 corner, random and sparse pairs at N = 16
  * the bypass flags against the rule of that architecture.

  The 2-D and row-and-column testbenches also require that an idle-row cell kept busy by a carry actually occurs.
* `tb_braun_compare_top`: every pair at N = 4 and N = 8 through the top. All fifteen products are checked, and so are the flags. Each mechanism must occur at least once:
  * row bypass
  * column bypass
  * cell bypass
  * an idle-row cell kept busy by a carry
  * a product whose top bit comes from the last stage's carry out.
* `tb_braun_full`: the top at its default size (16×16), 12 000 vectors, with the same checks.
* `tb_bypass_activity`: the five 16×16 arrays on 4 000 random and sparse
  pairs. It counts how often each array cell's adder outputs change, and checks
  that an isolated adder whose cell stays bypassed from one pair to the next
  never switches. One run gave these totals:

  | array | cell output toggles |
  |---|---|
  | standard | 547 652 |
  | row bypassing | 372 913 |
  | column bypassing | 387 736 |
  | 2-D bypassing | 314 014 |
  | row-and-column | 547 652 |

  The row-and-column count equals the standard count because each of its
  cells outputs the same bits as a full adder would. Its saving is inside the
  cell, which is smaller, and does not show at the cell's outputs. These
  counts cover the array cells only. The edge correction adders and the
  multiplexers are not counted, so the counts are a rough guide, not a power figure.

Each testbench was also run against a deliberately broken copy of its module, for example a 2-D bypass that ignores the carry test, or a Kogge-Stone tree one level short. Every one of them reported failures.

## Simulating

Every module uses `braun_pkg`, so list it first. For example, to run the full-size test:

    verilator --binary --timing --assert -Irtl rtl/braun_pkg.sv tb/tb_braun_full.sv \
        -y rtl --top-module tb_braun_full -o sim
    ./obj_dir/sim

Replace `tb_braun_full` with any other testbench. Each run takes about a second.
To lint a module: `verilator --lint-only -Wall -Irtl -y rtl rtl/braun_pkg.sv rtl/<module>.sv`.
Verilator warns about the unused `[79:64]` slice of `pl` in `ksa_adder` (the
propagate signals of the last prefix level are not needed). It also warns about
the bypass flags of the ripple-carry and Kogge-Stone instances in the top,
which are not brought out. Both are harmless.

## Files

| file | content |
|---|---|
| `rtl/braun_pkg.sv` | `final_adder_e`, `arch_e`, `CLA_GROUP` |
| `rtl/full_adder.sv` | 1-bit full adder |
| `rtl/rc_cell.sv` | A+1 / A+B+1 / bypass cell |
| `rtl/rca_adder.sv`, `rtl/cla_adder.sv`, `rtl/ksa_adder.sv` | last-stage adders |
| `rtl/final_adder.sv` | picks one of the three |
| `rtl/braun_mult.sv` | standard array |
| `rtl/row_bypass_mult.sv`, `rtl/col_bypass_mult.sv`, `rtl/twod_bypass_mult.sv`, `rtl/rc_bypass_mult.sv` | bypassing arrays |
| `rtl/braun_compare_top.sv` | all fifteen variants |
