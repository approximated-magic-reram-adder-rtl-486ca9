# Approximate ripple carry adders for MAGIC in-memory computing

Error-tolerant workloads such as machine learning can accept a slightly wrong
sum in exchange for a cheaper adder. This design builds that trade-off into a
ripple carry adder (RCA). The full adders of the low-order bits are replaced
by full adders whose Sum and Carry outputs are simplified Boolean functions.
The target is a memristive (ReRAM) crossbar running MAGIC stateful logic,
which computes with NOR and NOT gates inside the memory array. On such a
substrate, every gate removed from the netlist saves memristors and
initialise/evaluate cycles.

The RTL has two parts:

* **The approximate adder** (`approx_rca`, `approx_fa`). This is the function
  under study. It is parameterised so that one module describes every member
  of the library.
* **A MAGIC crossbar model** (`magic_crossbar`). This is a bit-level
  behavioural model of the memristor array. It executes NOR/NOT
  micro-operations, row-parallel, and counts the cycles they take.

`magic_adder_top` places the two side by side.

## The adder library

An approximated full adder is described by two 8-bit truth tables. Each table
is indexed by the three inputs:

    sum  = SUM_TT  [{a, b, cin}]
    cout = CARRY_TT[{a, b, cin}]

Bit *i* of a table is the output for the input combination whose binary value
is *i*, with `a` as the most significant input. Each table can hold any of the
2^8 = 256 three-input functions, so there are 256 × 256 = 65,536 full-adder
variants. Two of the tables have fixed meanings:

| table      | function            | value   |
|------------|---------------------|---------|
| exact sum  | a ^ b ^ cin         | `8'h96` |
| exact carry| majority(a, b, cin) | `8'hE8` |
| OR sum     | a \| b              | `8'hFC` |
| AND carry  | a & b               | `8'hC0` |

`approx_rca #(N, APPROX_BITS, SUM_TT, CARRY_TT)` chains N full adders:

* The lowest `APPROX_BITS` full adders all use the same approximate pair.
* The upper `N - APPROX_BITS` full adders are exact.

For N = 8, the library has 7 × 65,536 = 458,752 designs: `APPROX_BITS` runs
from 1 to 7 and any table pair can be chosen. Each design is one parameter
setting. Setting `APPROX_BITS = 0`, or using the exact tables, gives an exact
adder.

Approximate bits do not cost the same everywhere. A table that ignores `cin`
breaks the carry chain at that bit. The low bits then depend only on their own
operand bits, and a mapped circuit needs fewer gates and fewer sequential
levels. The price is an error that grows with the weight of the approximated
bits. The carry of the top approximated bit still enters the exact part, so
the high bits stay close to right.

Take the default build (`APPROX_BITS = 4`, sum = a | b, carry = a & b). Its
result has this closed form:

    {a[7:4] + b[7:4] + (a[3] & b[3]),  a[3:0] | b[3:0]}

The error against a + b is `(a & b) mod 2^(k-1) - 2^(k-1) · (a & b)[k-1]`, where k
is the number of approximated bits. It is bounded by ±2^(k-1).

### Measured accuracy

`tb/rca_error_metrics_tb.sv` applies 10,000 operand pairs from a normal
distribution (mean 128, σ = 32, clipped to 0–255). It measures 8 function
pairs at every k from 1 to 7. Some of the results, with cin = 0:

| SUM_TT / CARRY_TT | k = 2 MSE / MAE | k = 4 MSE / MAE | k = 7 MSE / MAE |
|-------------------|-----------------|-----------------|-----------------|
| 96 / E8 (exact)   | 0 / 0           | 0 / 0           | 0 / 0           |
| FC / C0 (OR/AND)  | 0.98 / 0.61     | 15.3 / 2.77     | 709 / 18.7      |
| 96 / C0           | 1.88 / 0.47     | 42.2 / 3.35     | 2654 / 28.3     |
| FE / E8           | 1.92 / 0.85     | 48.6 / 4.92     | 3418 / 41.2     |
| F0 / F0 (sum = carry = a) | 5.45 / 1.98 | 86.6 / 8.01 | 5976 / 64.0     |

Error grows by roughly 4× in MSE for each extra approximated bit. The choice
of function pair moves the error by up to an order of magnitude at a fixed k.
Because the distribution's mean and spread are assumptions, these numbers show
relative behaviour only.

`tb/rca_library_sweep_tb.sv` sweeps one table at a time at k = 4, on the same
kind of trace. It tries all 256 Sum functions with the AND carry, and all 256
Carry functions with the OR sum. The exact XOR sum is not the best partner for
an AND carry: `SUM_TT = 8'hBE` (MSE 10.5, MAE 1.68) partly cancels the
carry's error. With the OR sum, the AND carry `8'hC0` is the best carry
function (MSE 15.3).

## The MAGIC crossbar

In MAGIC, a memristor's resistance is the stored bit: low resistance (R_on) is
1 and high resistance (R_off) is 0. A gate occupies memristors in one row: its
input cells and its output cell sit in different columns. Evaluating a gate
takes two steps:

1. **INIT** presets the output memristor to R_on.
2. **EVAL** drives the input columns and grounds the output column. The output
   switches to R_off if any input is R_on; otherwise it keeps its state.

An initialised output therefore ends as NOR(inputs). With a single input
column the gate is a NOT. An output that was never preset stays 0, and the
model reproduces that failure mode.

`magic_crossbar` performs one micro-operation per clock on every row selected
by `row_mask`. This is the row-wise parallelism that makes the crossbar fast:
one EVAL computes the same gate for `ROWS` independent data sets.

| `op`       | effect on each selected row                                          | counted |
|------------|----------------------------------------------------------------------|---------|
| `XB_NOP`   | none                                                                 | no      |
| `XB_WRITE` | `state[out_col] <= wr_data[row]`                                     | no      |
| `XB_INIT`  | every column set in `col_mask` becomes 1 (several outputs at once)   | yes     |
| `XB_EVAL`  | `state[out_col] <= state[out_col] & ~\|(state & col_mask)`           | yes     |

* `rd_data` returns column `rd_col` of every row, combinationally.
* `cycles` counts INIT and EVAL cycles since reset. That count is the latency
  measure for MAGIC ("total cycles, Init + Eval").
* An assertion rejects three kinds of EVAL:
  * one with no input;
  * one with more than `MAX_FANIN` inputs (default 2, for NOT and 2-input NOR);
  * one whose output column is also one of its inputs.
* Reset is asynchronous and active-low. It clears every cell to R_off.

This model is a logical abstraction of an analog array. It does not model
voltages, resistance ratios, device variation or write endurance.

### Mapping an adder onto the crossbar

The crossbar runs whatever NOR/NOT program it is given. Turning an adder
into such a program takes two steps: logic synthesis to a NOR/NOT netlist,
then placement and scheduling of the gates. Both are done offline. This RTL
has no micro-operation sequencer; the program enters through the `xb_*` ports.

`tb/magic_adder_top_tb.sv` contains a small example mapping. It places one
8-bit addition in each of the 8 rows:

* Columns 0–7 hold a, columns 8–15 hold b, and column 16 holds cin.
* Gate outputs follow from column 17.
* An approximated OR/AND bit takes 5 gates: NOR(a,b) then NOT for the sum;
  NOT a, NOT b, then NOR for the carry.
* An exact bit takes 9 two-input NORs: XNOR(a,b) via four NORs, then three
  NORs with the carry for the sum, and one NOR for the carry out.
* One INIT presets all 56 gate outputs, then each gate is one EVAL. An
  addition therefore takes 1 + 4·5 + 4·9 = 57 cycles and 73 memristors per row.

The testbench checks that cycle count. It also checks every row's result
against `approx_rca` and against the closed form above. The schedule is
serial and unoptimised. A level-wise schedule (as-late-as-possible levels,
evaluated row-parallel) and a denser placement would give different cycle and
memristor counts.

## Interfaces and timing

`approx_fa`, `approx_rca`: purely combinational, with no clock or registers.
`approx_rca` ports:

| port     | dir | width | meaning |
|----------|-----|-------|---------|
| `a`, `b` | in  | N     | operands |
| `cin`    | in  | 1     | carry into bit 0 (tie to 0 for a two-operand adder) |
| `sum`    | out | N     | approximate sum |
| `cout`   | out | 1     | carry out of bit N-1 |

`magic_crossbar`: `clk`, `rst_n`, `op` (`magic_pkg::xb_op_e`),
`row_mask[ROWS]`, `col_mask[COLS]`, `out_col`, `wr_data[ROWS]`, `rd_col`,
`rd_data[ROWS]` and `cycles[32]`. An operation presented before a rising edge
takes effect at that edge. Reads are combinational.

`magic_adder_top`: the adder ports prefixed `add_`, and the crossbar ports
prefixed `xb_`.

## Parameters

| module            | parameter     | default | origin |
|-------------------|---------------|---------|--------|
| `approx_rca`, top | `N`           | 8       | the 8-bit adder the library is built for |
| `approx_rca`, top | `APPROX_BITS` | 4       | example; the library spans 1–7 |
| `approx_rca`, top | `SUM_TT`      | `8'hFC` | example pair (a \| b) |
| `approx_rca`, top | `CARRY_TT`    | `8'hC0` | example pair (a & b) |
| `approx_fa`       | `SUM_TT`, `CARRY_TT` | exact | |
| `magic_crossbar`, top | `ROWS` × `COLS` | 8 × 128 | assumed; fits one 8-bit addition per row in the example mapping |
| `magic_crossbar`, top | `MAX_FANIN` | 2   | NOT and 2-input NOR |

## What follows the method and what is this design's own

These parts follow the method:

* the truth-table-per-output approximation of the full adder;
* one shared approximate pair for the low bits, with exact upper bits;
* the 8-bit width and the 1–7 approximated-bit range;
* R_on = 1;
* two-phase INIT/EVAL gates limited to NOT and 2-input NOR;
* row-parallel evaluation;
* latency counted as INIT plus EVAL cycles.

These are this design's own choices:

* the table bit order `{a, b, cin}`;
* the default approximate pair and `APPROX_BITS = 4`;
* the `cin` port;
* the crossbar size;
* the micro-operation encoding, the multi-column INIT, and the WRITE/READ
  ports;
* reset to R_off;
* the example NOR/NOT mapping in the testbench and its serial schedule.

Not provided:

* **A micro-operation controller or stored program for the crossbar.**
  Scheduling and mapping are offline steps.
* **Cycle and memristor counts from an optimised mapping.** For reference, an
  optimised level-wise mapping of the exact 8-bit RCA is reported at
  295 memristors and 170 cycles. Across the approximate designs, it ranges
  from 13 memristors and 20 cycles up to those values. The example mapping
  here does not reproduce those figures.
* **An analog device model.**

## Simulating

All files are SystemVerilog-2017. `rtl/magic_pkg.sv` must come first. Each
testbench ends by printing `TB_RESULT checks=N failures=M`.

    # end-to-end: the default top, the example crossbar mapping, 8 rows x 64 additions
    verilator --binary --timing --assert -Irtl rtl/magic_pkg.sv rtl/approx_fa.sv \
        rtl/approx_rca.sv rtl/magic_crossbar.sv rtl/magic_adder_top.sv \
        tb/magic_adder_top_tb.sv --top magic_adder_top_tb -Mdir obj_top
    ./obj_top/Vmagic_adder_top_tb

    # accuracy sweep: 10,000 normal samples, 56 eight-bit designs and one 16-bit design
    verilator --binary --timing --assert -Irtl rtl/magic_pkg.sv rtl/approx_fa.sv \
        rtl/approx_rca.sv tb/rca_error_metrics_tb.sv --top rca_error_metrics_tb -Mdir obj_err
    ./obj_err/Vrca_error_metrics_tb

    # all 256 Sum and all 256 Carry functions at k = 4 (512 adders, about 10 s to build)
    verilator --binary --timing --assert -Irtl rtl/magic_pkg.sv rtl/approx_fa.sv \
        rtl/approx_rca.sv tb/rca_library_sweep_tb.sv --top rca_library_sweep_tb -Mdir obj_sweep
    ./obj_sweep/Vrca_library_sweep_tb

The unit testbenches follow the same pattern:

* `tb/approx_fa_tb.sv` checks all inputs of three variants.
* `tb/approx_rca_tb.sv` checks all 8-bit operand and carry combinations for
  three builds, plus a random 16-bit build.
* `tb/magic_crossbar_tb.sv` checks INIT, NOT, NOR, uninitialised evaluation,
  partial row masks and the cycle count.

To try another member of the library, override the parameters, for example
`approx_rca #(.APPROX_BITS(6), .SUM_TT(8'h96), .CARRY_TT(8'hC0))`. Then add
the matching pair to the `STT`/`CTT` lists in the error testbench. The
simulator is two-state, so everything that is read is reset or initialised.
