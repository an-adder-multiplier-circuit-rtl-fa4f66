# One-hot residue adder/multiplier

In a residue number system (RNS) an integer is carried as its remainders
modulo a few small, pairwise prime moduli, and each remainder is processed on
its own with no carries between channels. In the *one-hot* form of RNS, a
remainder `x` in `[0, m)` takes `m` wires, and only wire `x` is high. Modular
addition then becomes a barrel shifter. It is an `m x m` grid of switches: the
switch in column `i` (operand `a`) and row `j` (operand `b`) connects to output
line `(i + j) mod m`. A one-hot multiplier is the same grid with each switch
connected to line `(i * j) mod m` instead. Each operation costs `m^2`
switches, so a channel that needs both would normally need `2 m^2`.

This RTL implements the circuit from "An Adder/Multiplier Circuit for One Hot
Residue Number System" (Ghanatghehstani, Ghavami, Pedram). Because both
operands are one-hot, **exactly one switch in the grid conducts** for any valid
pair of operands. That switch identifies `(i, j)` completely, so it can drive
two output lines at once: one in the add-out set and one in the multiply-out
set. One grid of `m^2` switches therefore yields the sum and the product
together, with the same single-switch delay as a plain one-hot adder.

## The switch grid

`ohr_add_mul` instantiates `M x M` `ohr_cell`s. Cell `(i, j)` receives `a[i]`
and `b[j]`. When both are high it drives:

| output set | line driven       |
|------------|-------------------|
| `add_out`  | `(i + j) mod M`   |
| `mul_out`  | `(i * j) mod M`   |
| `sub_out`  | `(i - j) mod M`, only with `WITH_SUB = 1` |

For the default `M = 5`, each cell in the grid drives these lines, listed as
multiply line / add line:

| b \ a | 4   | 3   | 2   | 1   | 0   |
|-------|-----|-----|-----|-----|-----|
| 0     | 0/4 | 0/3 | 0/2 | 0/1 | 0/0 |
| 1     | 4/0 | 3/4 | 2/3 | 1/2 | 0/1 |
| 2     | 3/1 | 1/0 | 4/4 | 2/3 | 0/2 |
| 3     | 2/2 | 4/1 | 1/0 | 3/4 | 0/3 |
| 4     | 1/3 | 2/2 | 3/1 | 4/0 | 0/4 |

For example, with `a = 2` and `b = 3` the single conducting switch raises add
line 0 and multiply line 1.

### From pass transistors to gates

The physical circuit is one pass transistor per cell: `a_i` drives its gate,
`b_j` its drain, and its source is wired straight to the output lines. Many
transistor outputs share one line, and for a legal input at most one of them
conducts. The RTL models this at the logic level:

* A cell is `on = a_i & b_j`. It presents the result as `M`-bit drive vectors
  (`add_drv`, `mul_drv`, `sub_drv`) with `on` on its own line and 0 on every
  other line.
* Each output line is the OR of the drive vectors of all cells. This is the
  gate-level equivalent of the wired connection. A line that no switch drives
  reads 0, which assumes the lines are pulled low.

Electrical details are not modelled: output buffers, a transmission-gate
version of the switch, and the inverters that make complemented shift lines.
None of them changes the logic function.

Synthesis makes `M^2` two-input ANDs plus an OR tree per output line. For
`M = 5` that is 25 ANDs and 48 ORs.

## Interface and timing

```
module ohr_add_mul #(parameter int unsigned M = 5, parameter bit WITH_SUB = 1'b0)
  (input  logic [M-1:0] a, b,
   output logic [M-1:0] add_out, mul_out, sub_out);
```

* `a` and `b` must be one-hot. All-zero means "no operand", and all outputs
  are then zero.
* An operand with more than one high line is outside the code. Several output
  lines then go high. An immediate assertion (`$onehot0`) reports this in
  simulation, and nothing corrects it.
* The circuit is purely combinational, with no clock, reset or state. Results
  are valid one switch delay after the operands. In a clocked system they can
  be registered in the same cycle.
* `sub_out` is all-zero unless `WITH_SUB = 1`.

`ohr_pkg` holds the three line-index functions (`add_line`, `mul_line`,
`sub_line`). They are used only at elaboration, to route each cell.

## What is original and what is added

The following come from the published circuit:

* the single shared grid;
* the add and multiply routing (the table above);
* the worked example;
* the default `M = 5`;
* the claim that the scheme holds for any modulus.

The following are choices made in this RTL:

* **Subtraction** (`WITH_SUB`). Subtraction is named as one of the operations
  the shared grid can produce, but the modulus-5 circuit has only add and
  multiply outputs. So the third fan-out is optional and off by default. The
  operand order `a - b` (`a` is the minuend) is a choice made here.
* **Gate-level modelling** of the wired pass-transistor outputs, as described
  above.
* **Behaviour for absent or illegal operands.** No line gives zero outputs;
  several lines trigger an assertion.
* **No pipeline registers.** The circuit suits pipelined use, but no registers
  are specified, so none are added.

Conversion between binary and one-hot, and reconstruction of an integer from
its residues (Chinese remainder theorem), are not part of the circuit. The
testbenches do these conversions in behavioural code.

## Verification

| testbench        | what it shows |
|------------------|---------------|
| `tb_ohr_cell`    | All 25 cells of a modulus-5 grid and all 49 of a modulus-7 grid (subtraction enabled), under all four input combinations. Each cell drives exactly its own add, multiply and subtract lines, and only when both inputs are high (888 checks). |
| `tb_ohr_add_mul` | The default configuration with no parameter overrides. Covers all 25 operand pairs and the absent-operand cases, plus the `2 + 3` / `2 * 3` example. The expected results come from a hand-entered copy of the routing table above, which is itself cross-checked against integer arithmetic. Each result is checked in the same cycle its operands are applied. The testbench also counts that every switch conducted, and that wrapped sums, reduced products, zero products and idle inputs all occurred. |
| `tb_ohr_rns`     | Single channels at `M = 2, 3, 5, 7, 8, 16`, over every operand pair (subtraction at 5 and 7). Then a three-channel RNS with moduli {3, 5, 7}: for every `X, Y` in `[0, 105)`, the output residues are turned back into integers with the Chinese remainder theorem and compared with `(X op Y) mod 105` (34,223 checks). |

Each testbench prints `TB_RESULT checks=N failures=F` and has a cycle
watchdog.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_ohr_add_mul \
    -y rtl -y tb +libext+.sv rtl/ohr_pkg.sv tb/tb_ohr_add_mul.sv
./obj_dir/Vtb_ohr_add_mul
```

Replace `tb_ohr_add_mul` with `tb_ohr_cell` or `tb_ohr_rns` to run the other
testbenches. Lint the RTL with
`verilator --lint-only -Wall -y rtl rtl/ohr_pkg.sv rtl/ohr_add_mul.sv`.

## Changing it

* **Another modulus:** set `M`. Cost grows as `M^2` cells and `M` OR trees of
  `M` inputs each.
* **Another operation:** add a line function to `ohr_pkg`, a drive vector to
  `ohr_cell`, and an OR term to `ohr_add_mul`. Any operation on two residues
  works this way, because the conducting switch identifies both operands.
* **RNS datapath:** build it from one `ohr_add_mul` per modulus, as
  `tb_ohr_rns` does.
