# Accuracy configurable adder with carry prediction

An N-bit adder (8 bits by default) that can trade exactness for a shorter
carry path at run time. The operand bits are cut into segments; at each
segment boundary the carry that crosses into the next segment is either the
real carry (accurate mode) or a *predicted* carry that is available after a
single gate, the generate bit `a_i AND b_i` of the boundary bit (approximate
mode). In approximate mode the long carry chain is cut into independent
pieces, one per segment, so the worst-case delay shrinks; the price is that a
carry that would have rippled *through* the boundary bit is lost.

Two versions of the same adder are provided, differing only in the cells the
segments are built from:

* `aca_csla` – conventional carry select (CSLA) cells: every bit or group of
  bits is computed twice, for carry in 0 and for carry in 1, with full adders,
  and the real carry picks one result with a mux.
* `aca_hscg` – half-sum carry generation (HSCG) cells: one XOR, one AND, one
  OR and an inverter produce both candidate sums (`a^b`, `~(a^b)`) and both
  candidate carries (`a&b`, `a|b`); two muxes pick them. Fewer gates than the
  CSLA cell, and the faster of the two in the published comparison.

`aca_top` instantiates both side by side on shared inputs so they can be
compared bit for bit. Everything is combinational: there is no clock, no
register and no latency beyond gate delay.

## The segment boundary

With the default `N = 8`, `L = 4` the adder is laid out as

```
 bits:   [2:0]          [3]             mux           [4]            [7:5]
 cin -> sub adder -> carry-out block -> predict -> carry-in block -> sub adder -> cout
                        |  ac, cpre       mux  rec
```

* **Carry-out block** (top bit `i` of the lower segment). Computes sum bit
  `i` and the accurate carry `ac = c_(i+1)` from the carry of the sub adder
  below, and also outputs `cpre = a_i AND b_i` (the carry it would give with
  carry in 0). `cpre` does not depend on anything below bit `i`.
* **Prediction mux** (`carry_predict_mux`). `rec = acc_mode ? ac : cpre`.
* **Carry-in block** (bottom bit `i+1` of the upper segment). Has two select
  inputs: `cin` selects its sum, `cpr` selects its carry. Both are driven by
  `rec`, so in approximate mode
  `c_(i+2) = g_(i+1) + p_(i+1) * g_i`, the predicted-carry equation.
* **Sub adders** fill the remaining bits of each segment.

For more than two segments (`N/L > 2`) every middle segment is carry-in
block, `(L-2)`-bit sub adder, carry-out block. `N` must be a multiple of `L`,
`L >= 3`, and there must be at least two segments; other values stop
elaboration with an error. One `acc_mode` input controls every boundary.

### What approximate mode gets wrong

The predicted carry `g_i` differs from the real carry `c_(i+1)` exactly when
bit `i` propagates (`a_i XOR b_i = 1`) and a carry arrives into it. Then the
upper segment misses one carry, so the result is low by `2^(j*L)` for
boundary `j`. For the default 8-bit adder and uniformly random operands this
happens for 1/4 of all inputs (bit 3 propagates with probability 1/2, a carry
reaches it with probability 1/2), and the error is always exactly −16 on the
9-bit result `{cout, sum}`. When no carry reaches the boundary, or the
boundary bit generates one by itself, the approximate result is exact.

The source publication states that both modes give the accurate result; its
own predicted-carry equation does not, and this RTL implements the equation.
The error described above is what the approximate mode really does.

## Modules

| module | what it is |
|---|---|
| `aca_top` | both adders, shared `a`, `b`, `cin`, `acc_mode`; outputs `sum_csla`, `cout_csla`, `sum_hscg`, `cout_hscg` |
| `aca_csla` | N-bit adder from CSLA cells |
| `aca_hscg` | N-bit adder from HSCG cells |
| `carry_predict_mux` | boundary mux, input 0 = predicted carry, input 1 = accurate carry |
| `csla_sub_adder` | W-bit carry select adder: two ripple chains (carry in 0 / 1) and W+1 output muxes |
| `csla_carry_out_block` | one bit: two full adders, sum and carry muxes on `cin`, `ca_pre` from the carry-in-0 adder |
| `csla_carry_in_block` | one bit: two full adders, sum mux on `cin`, carry mux on `cpr` |
| `hscg_cell` | one HSCG bit: XOR/AND/OR, inverter, two muxes on `cin`; `cpre = a & b`. Also serves as the HSCG carry-out block |
| `hscg_sub_adder` | W-bit chain of `hscg_cell`, each selected by the carry of the cell below |
| `hscg_carry_in_block` | one HSCG bit: sum mux on `cin`, carry mux on `cpr` |
| `full_adder` | helper for the CSLA cells |

Ports of `aca_csla` / `aca_hscg`: `a[N-1:0]`, `b[N-1:0]`, `cin`, `acc_mode`
(1 = accurate, 0 = approximate) in; `sum[N-1:0]`, `cout` out.
Parameters: `N` (default 8) and `L` (default 4); sub adders take `W`
(default 3).

## Choices made where the description is open

* **Mode encoding.** The boundary mux is labelled with predicted carry on
  input 0 and accurate carry on input 1; the select is therefore `acc_mode`,
  1 = accurate. The published 8-bit design lists 17 inputs (A, B, CIN) and no
  mode pin; here the mode is an input so it can change at run time.
* **Carry-in block selects.** The top-level block diagram shows a single wire
  from the prediction mux into the carry-in block, while a more detailed
  diagram routes the predicted carry to the carry select even in accurate
  mode, which would make accurate mode inexact. Both selects are driven from
  the mux output here, which makes accurate mode exact and approximate mode
  follow the predicted-carry equation. The carry-in blocks keep their two
  separate select pins.
* **HSCG sub adder.** Only its name and its bit cell are given. It is built as
  a chain of HSCG cells, each cell's muxes selected by the carry of the cell
  below.
* **Full adder.** Textbook XOR/majority form.
* **Generalisation.** `N`, `L` and `W` are parameters; the defaults are the
  published 8-bit, 4-bit-segment, 3-bit-sub-adder layout.
* **Worked examples.** The first published example (0x95 + 0x62, carry in 0 →
  0xF7, carry out 0) is reproduced. The second (0xBA + 0x91, carry in 1)
  is printed with sum 0xCC; the arithmetic sum is 0x14C, i.e. sum 0x4C and
  carry out 1, and both adders give that (sum bit 7 cannot be 1 here because
  bits 6 of both operands are 0).
* **Not modelled.** Delay, area and power figures of the publication come
  from an FPGA implementation and are not reproduced by RTL simulation.

## Verification

Each module has a self-checking testbench in `tb/` named `tb_<module>`. All
are combinational: a vector is applied, checked 1 ns later, and every
testbench ends with a `TB_RESULT checks=… failures=…` line and a watchdog.

* Cells: exhaustive over their inputs; the HSCG cell and the 3-bit sub adders
  also against the published truth tables (HSCG cell table, 3-bit CSLA
  table).
* `tb_aca_csla`, `tb_aca_hscg`: the default 8-bit adder over all
  2^18 combinations of `a`, `b`, `cin` and `acc_mode`, plus random vectors
  on 12-bit/4-bit-segment, 12-bit/3-bit-segment and 16-bit/8-bit-segment
  instances. Reference models are in `tb/aca_ref_pkg.sv`: `exact_add`,
  and `approx_add`, which adds each segment separately with the generate bit
  of the segment below as its carry in. The lost-carry count of the 8-bit run
  is checked against its closed form, 32768.
* `tb_aca_top`: the default top, all 2^17 operand/carry combinations in both
  modes with the mode toggling every vector; both adders against the models
  and against each other; counts accurate and approximate vectors, mode
  switches, boundary carries, correct predictions with a boundary carry and
  lost carries, and fails if any of them never occurs.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_aca_top tb/aca_ref_pkg.sv tb/tb_aca_top.sv
./obj_dir/Vtb_aca_top
```

Any other testbench runs the same way with its own name. Lint the RTL with
`verilator --lint-only -Wall -Irtl rtl/aca_top.sv`; the only warning is the
unused `cpre` outputs inside `hscg_sub_adder`.

## Changing it

* Wider adder: set `N` and `L` on `aca_top`, `aca_csla` or `aca_hscg`
  (`N % L == 0`, `L >= 3`, `N >= 2L`). Shorter segments shorten the
  approximate-mode carry path and increase the error rate.
* Per-boundary mode control would need `acc_mode` widened to `K-1` bits and
  indexed by `j` in the generate loop of `aca_csla` / `aca_hscg`.
