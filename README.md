# 32-bit NCL adders

A set of clockless 32-bit adders in NULL Convention Logic (NCL), written in
SystemVerilog, along with the parts needed to compose and measure them. It
contains:

- several dual-rail full-adder components (A, B, C, D and the integrated A1,
  A2 and C1) and a quaternary (radix-4) digit adder (Q);
- three ways of building a 32-bit word from those components: 2D pipelined,
  full-word completeness and digit completeness;
- a counter that acts as an NCL token source;
- a top, `adder_sandbox32`, where two counters feed every adder
  configuration side by side.

## NCL in brief

- **Encoding.** Each bit travels on two wires (dual-rail). `01` is DATA 0,
  `10` is DATA 1 and `00` is NULL; `11` never occurs. A quaternary digit
  uses four wires, one-hot: wire k high means value k, all low means NULL.
  Packages: `ncl_pkg` (`dr_t`, `qr_t`).
- **Wavefronts.** An operation is a DATA wavefront followed by a NULL
  wavefront. A result is complete when every output holds DATA. It is
  cleared when every output is back to NULL.
- **Threshold gates.** `ncl_th` is THmn with optional weights on inputs 0
  and 1. The output goes to 1 when the weighted count of high inputs
  reaches m. It goes to 0 only when every input is 0; in between it holds.
  `ncl_thxor` is THXOR0, which sets on AB + CD. `ncl_the` is a THmn with an
  enable: it may set only while enabled and reset only while disabled.
- **Links.** A link (`ncl_link`, or `ncl_qlink` for 4-rail digits) is one
  TH22 per wire. The second input of each TH22 is the inverted completion
  of the consumer, its *closure*. The link passes DATA when the consumer
  asks for DATA and passes NULL when it asks for NULL. A TH12 or TH14 on
  the link outputs gives the link's own completion.
- **done.** A component's `done` is the C-element (TH22) of its output
  completions. That signal is what closes the component's inputs.
  `ncl_ctree` builds wide completions as a tree of THnn and TH22 gates.
- **Polarity convention.** Every `close`/`*_close` input in this design is
  a completion: 1 means "I hold DATA, send NULL". The inversion into a
  request sits inside the receiving link.

## Timing model

The gates are not combinational. Each threshold gate and each inverter is
a state element updated on every rising edge of `tick`. So one tick
stands for one gate delay, and the asynchronous behaviour (wavefronts
racing, handshakes, hysteresis) is simulated in a plain cycle-based way,
with all gates having the same delay. `tick` is a simulation time base,
not a clock of the design: nothing waits for it except the gate delays.
`rst` is synchronous. It sets every gate to 0 (all NULL) and every
closure inverter to 1 (request DATA). This model is a choice of this
design: real NCL gates are transistor circuits with hysteresis.

## Full-adder components

All binary components share one interface: `a`, `b`, `ci` in (dual-rail);
`s`, `co` out; `s_close`, `co_close` from the two consumers; `done` out.

| module | logic | cells |
|---|---|---|
| `fulladdA` | carryout/v = TH23(A/v, B/v, ci/v); sum/1 = TH34W2(co/0 weight 2, A/1, B/1, ci/1); sum/0 likewise with co/1. Output links. | 13 |
| `fulladdB` | two THXOR half adders for the sum. carryout/v = TH23W2(TH22(suma/1, ci/v) weight 2, A/v, B/v): the carry gate is split so that a carry decided by A = B does not wait on carryin. | 17 |
| `fulladdC` | canonical form: eight TH33 minterms and four TH14 ORs | 21 |
| `fulladdD` | half adder, half adder, OR, each a TH22 minterm rank plus OR gates | 28 |
| `fulladdA1` | fulladdA with the link rank merged into the logic: the TH23 and TH34W2 gates take their consumer's request as an enable | 9 |
| `fulladdA2` | fulladdA1 without the large enabled sum gate: TH34W2(X weight 2, A, B, C) = XA + XB + XC + ABC, with each product an enabled C-element and a TH14 as the OR | 17 |
| `fulladdC1` | fulladdC as three pipeline stages, all enabled gates: eight minterms, then minterm pairs midA (for the sum) and midB (for the carry) as one-hot 4-rail values, then the sum and carryout rails. `done` is the minterm rank's completion, so the inputs are released while the later ranks still hold the result | 33 |
| `fulladdQ` | radix-4 digit adder: one-hot 4-rail A, B, sum; dual-rail carries | — |

Each `fulladdX` is `fa_coreX` (logic only) plus `fa_outlinks` (two links
and a TH22 done); the integrated A1, A2 and C1 are single modules.
`fa_core_sel` picks a core from the `fa_kind_e` value.

## Word structures

Each structure has a binary version (`WIDTH = 32`, `KIND` selects the
component) and a quaternary version (`DIGITS = 16`, using `fulladdQ`).

- **2D pipelined** (`twoD_adder32`, `twoD_adder32Q`). Every component
  links both its sum and its carry. Carry link i is closed by the `done`
  of component i+1. Digits of successive additions flow independently,
  so a long carry chain does not hold back the rest of the word.
- **Full-word completeness** (`fullword_adder32`, `fullword_adder32Q`).
  The component logic ripples unregistered through the word. A single rank
  of links holds the result, under a single closure. A completion tree over
  all outputs gives one `done`.
- **Digit completeness** (`digit_adder32`, `digit_adder32Q`). There is one
  sum link per digit and no carry links. `done[i]` is the C-element of the
  completions of sum i and sum i+1; the last digit pairs with the carryout.
  So the carry is held indirectly through the neighbouring sum's
  completeness.

## The carry chain in NCL

In NCL the delay of an addition depends on its operands, not on a worst
case. A digit whose two summand bits are equal (00 or 11) knows its
carryout without waiting for its carryin, if its gates allow it. Only a run
of propagate digits (a ≠ b) makes the carry ripple. Components A, B, A1 and
A2 decide such carries locally. C, D and C1 always wait for carryin (every
minterm needs it), so they ripple through the whole word.

Measured with the unit-delay model (ticks from the operands to `done`
closing the inputs). "Chain-free" is a sum with no propagate run. The long
chain is a full 32-bit propagate run.

| structure | A | B | C | D | A1 | A2 | C1 |
|---|---|---|---|---|---|---|---|
| 2D pipelined, chain-free / long | 8 / 69 | 8 / 100 | 101 / 101 | 134 / 134 | 6 / 37 | 7 / 38 | 98 / 99 |
| full word, chain-free / long | 10 / 42 | 10 / 73 | 73 / 73 | 106 / 107 | – | – | – |

The quaternary full-word adder needs 18 ticks without a chain and 25 with
one.

## The top: `adder_sandbox32`

Two `ncl_counter`s produce the operand streams A = k·STEP_A and
B = k·STEP_B. The counters step only after every adder has closed its
inputs: all `done` outputs meet in one completion tree. Carryin is a DATA 0
that follows the wavefronts of bit 0 of A. The top has 14 configurations,
each with its own result ports and close input:

- binary `bin_*[0..10]`: fullword A, fullword B, digit A, digit B, and twoD
  A, B, C, D, A1, A2, C1;
- quaternary `q_*[0..2]`: twoD Q, fullword Q, digit Q. Their operands are
  converted from dual-rail pairs by `ncl_dr2qr`.

## What differs from the source design

- The delay model is one tick per gate, not transistor timing.
- fulladdB has 17 cells counting the two closure inverters. The
  printed counts are 15 and 16.
- The counters are a behavioural token source, not an NCL counter built
  from gates.
- Not built: the integrated B1 and B2; the internally pipelined D1–D5;
  and the quaternary variants Q1–Q3.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_twoD_adder32 \
    rtl/ncl_pkg.sv tb/tb_twoD_adder32.sv -y rtl -y tb
./obj_dir/Vtb_twoD_adder32
```

`tb_adder_sandbox32` runs the top at its default size. It checks 40
additions on each configuration under random back pressure from the
consumers. It also counts the mechanisms exercised: carry out of bit 31,
long propagate chains, consumer stalls, a chain-free addition and counter
wrap-around.
