# A single add-compare-select stage of a hard-decision Viterbi decoder

A Viterbi decoder recovers the most likely bit sequence behind a
convolutionally encoded stream that was corrupted on the way. It does this in
trellis steps. In each step, every encoder state has two incoming branches.
Each branch is scored by how far the received symbol is from the symbol that
branch would have produced. That score, the *branch metric*, is added to the
accumulated *path metric* of the state the branch comes from. The smaller
total wins and becomes the state's new path metric.

This RTL is one such step for one state. It is the small decoder that was
designed as a pass-transistor-logic circuit, written at register-transfer
level. It has:

* two **branch metric units** that count Hamming distances bit by bit;
* an **add-compare-select unit**: two 3-bit adders, a less-than comparator
  and a 4-bit selector;
* a **survivor memory** of four 4-stage shift registers that records the
  selected path metric;
* a **decoded-output path**: a 2:1 mux steered by the same less-than
  decision, followed by two flip-flops.

The original circuit's point was the logic style. Its multiplexers and
flip-flops were built from pass transistors to save transistors, area and
delay. None of that is visible at RTL. Here the mux and the flip-flop are
ordinary logic. The block structure, the widths and the select polarity are
kept.

## Data flow of one step

```
 bmu0_a ─┐                                  sum0 ┌────────────┐
 bmu0_b ─┤ BMU 0 ── bm0 (3b) ──► adder ─────────►│            │  new_pm (4b)  ┌──────────────┐ smu_q / smu_qb
 bmu0_t ─┘                     ▲  pm0 (3b)       │  selector  │──────────────►│ survivor mem │──────────────►
                               │                 │ 4 x mux2   │               │ 4 x SISO(4)  │ smu_taps
 bmu1_a ─┐                     │            sum1 │            │               └──────────────┘
 bmu1_b ─┤ BMU 1 ── bm1 (3b) ──► adder ─────────►│            │
 bmu1_t ─┘                        pm1 (3b)       └─────▲──────┘
                               sum0, sum1 ──► comparator ── lt ──┘
                                                          │
                               dec_a ─┐                   ▼
                               dec_b ─┴─► mux2 (lt) ─► DFF ─► DFF ─► dout
```

Every flip-flop in the design runs on one clock, `clk`. `rst_n` is an
asynchronous active-low reset that clears all of them.

## Branch metric units: counting mismatches

Each branch metric unit (`bmu`) takes one received bit (`a`) and one
expected bit (`b`) per clock. The XOR of the two is 1 on a mismatch. That XOR
enables a 3-bit up counter built from T flip-flops (`tcounter`, made of `tff`,
made of `dff` plus an XOR). After *n* bit pairs the count is the Hamming
distance of the two *n*-bit sequences, modulo 8. For a rate-1/2 code, one
2-bit symbol takes two clocks.

* `t` (the counter's T input) gates the count. Tie it high for normal use.
  Pulling it low freezes the metric while the bits keep moving.
* `bm_clr` (synchronous, one shared clear for both units) starts a new
  branch. On the next edge the count is 0 and that cycle's bit pair is
  ignored.
* The count is registered. `bm0`/`bm1` include the bit pair that was present
  at the previous rising edge.

**Departure from the original circuit.** There, the XOR output *was* the
clock of the first T flip-flop, and each flip-flop clocked the next as a
ripple counter. A ripple counter clocked by the XOR sees one rising edge for a
whole run of consecutive mismatches, so it counts that run once. For
example, received `10` against expected `01` would score 1 instead of 2. This
design samples the XOR once per bit on the common clock and forms the carry
from the lower bits. The cascade of T flip-flops and the 3-bit width are
kept. Each mismatching bit counts, and no clock is derived from data.

## Add, compare, select

`acsu` adds each branch metric to the path metric of its source state:
`sum0 = bm0 + pm0` and `sum1 = bm1 + pm1`. Each sum keeps its carry, so two
3-bit operands give a 4-bit result. The comparator produces only
`lt = (sum0 < sum1)`. That one bit drives the select line of all four 2:1
muxes of the selector. It also drives the select line of the decoded-output
mux.

The mux convention is **select = 1 passes input `a`**, and select = 0 passes
`b`. Input `a` is always branch 0, so:

| condition      | `lt` | `new_pm` | decoded bit taken |
|----------------|------|----------|-------------------|
| sum0 < sum1    | 1    | sum0     | `dec_a`           |
| sum0 > sum1    | 0    | sum1     | `dec_b`           |
| sum0 == sum1   | 0    | sum1     | `dec_b`           |

A tie goes to branch 1. This follows from the comparator giving only
less-than.

The add-compare-select path is purely combinational. `sum0`, `sum1`, `lt` and
`new_pm` follow `bm0`/`bm1` and `pm0`/`pm1` without a register.

## Survivor memory and decoded output

The survivor memory (`smu`) has four serial-in serial-out shift registers
(`siso_shift_register`), one per bit of `new_pm`. Each register is four
D flip-flops long. There is no shift enable: every rising edge moves
`new_pm` one stage further. `smu_q` is therefore `new_pm` from four edges
earlier, and `smu_qb` is its complement. `smu_taps` exposes every stage.
Register *i* occupies bits `[i*4 +: 4]`. Within one register, the highest bit
is the newest stage and bit 0 is the serial output.

The decoded-output path (`decode_out`) picks `dec_a` or `dec_b` with `lt`.
It then delays the chosen bit by two flip-flops, so `dout` trails the
decision by two rising edges.

### Timing summary

| signal                        | relative to inputs                                   |
|-------------------------------|------------------------------------------------------|
| `bm0`, `bm1`                  | registered; include the bit pair of the previous edge |
| `sum0`, `sum1`, `lt`, `new_pm`| combinational from `bm*` and `pm*`                   |
| `smu_q`, `smu_qb`             | `new_pm` sampled 4 rising edges earlier              |
| `dout`                        | `lt ? dec_a : dec_b` sampled 2 rising edges earlier  |

A typical trellis step, as the end-to-end testbench drives it, takes four
clocks:

1. assert `bm_clr`;
2. present the first symbol bit;
3. present the second symbol bit;
4. hold with `t` low, and read `lt`/`new_pm`, which the survivor memory
   captures at the following edge.

## What this stage does not do

These are properties of the design as specified, and they matter for anyone
building a complete decoder from it.

* **Path metrics come from outside.** `pm0` and `pm1` are inputs. Nothing
  feeds `new_pm` back to them, and there is no metric normalisation. A
  multi-state decoder needs one stage per state, plus that feedback.
* **The survivor memory delays; it does not trace back.** It shifts the
  selected path metric through fixed-length registers. It stores no decision
  history per state and has no traceback or register-exchange logic. Its
  length of four corresponds to a small encoder. The encoder itself is not
  specified, so the length was not derived from a constraint length.
* **The meaning of `dec_a`/`dec_b` is left to the user.** The stage only
  chooses between them with the same decision that picks the survivor.
* **Only a less-than output** exists on the comparator.
* **Nothing saturates.** Branch metrics wrap modulo 8; the 4-bit sums of two
  3-bit operands are exact (at most 14).

## Parameters

| module                | parameter   | default | meaning                               |
|-----------------------|-------------|---------|---------------------------------------|
| `viterbi_decoder`     | `BM_W`      | 3       | branch/path metric width              |
| `viterbi_decoder`     | `SMU_DEPTH` | 4       | length of each survivor register      |
| `bmu`, `tcounter`     | `W`         | 3       | counter width                         |
| `acsu`, `adder`       | `W`         | 3       | operand width (result is `W+1`)       |
| `comparator`, `selector` | `W`      | 4       | word width                            |
| `smu`                 | `N`, `DEPTH`| 4, 4    | number of registers, length           |
| `siso_shift_register` | `DEPTH`     | 4       | length                                |
| `decode_out`          | `DEPTH`     | 2       | output delay in flip-flops            |

The shared defaults live in `rtl/viterbi_pkg.sv`. The number of survivor
registers always equals the sum width, `BM_W + 1`.

## Files

`rtl/` holds one module per file. The hierarchy is:

```
viterbi_decoder
├── bmu (x2) ── tcounter ── tff (x3) ── dff
├── acsu ── adder (x2), comparator, selector ── mux2 (x4)
├── smu ── siso_shift_register (x4) ── dff (x4)
└── decode_out ── mux2, dff (x2)
```

`viterbi_pkg.sv` holds the shared widths. The full adder chain, the
comparator's borrow chain and the mux are written as gate equations. This
mirrors their transistor-level origin, and any synthesis tool will map them
freely.

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`. Each one
compares the module with a model computed independently in the testbench,
prints `TB_RESULT checks=N failures=M`, and has a watchdog. The small
combinational blocks are checked exhaustively. The sequential ones run
hundreds of random cycles against an integer or queue model.

`tb_viterbi_decoder` runs the whole stage at its default sizes. It has a
cycle-accurate model and three parts:

* three hand-worked trellis steps. Each expected metric, sum and decision is
  written down in the testbench.
* 400 random trellis steps.
* 2000 cycles with every input random.

It counts and requires each mechanism at least once:

* branch 0 selected;
* branch 1 selected;
* a tie;
* a counter clear;
* a counter wrap;
* a count held by `t = 0`;
* an adder carry;
* the decoded bit taken from each mux input;
* survivor words leaving the memory.

## Simulating

With Verilator 5, from the repository root:

```sh
verilator --binary --timing --assert -Irtl -Itb \
    tb/tb_viterbi_decoder.sv rtl/viterbi_pkg.sv -y rtl --top-module tb_viterbi_decoder
./obj_dir/Vtb_viterbi_decoder
```

Any other testbench runs the same way with its own name. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/viterbi_pkg.sv rtl/<module>.sv -y rtl`.
The remaining lint messages are the two unconnected inverted outputs of
flip-flops, left open on purpose, and package constants that a single module
does not use.

## How far to trust it

Every module is checked against an independent model. The whole stage passes
about 7,200 cycle-level comparisons. Each testbench was also run against a
deliberately broken copy of its module, and each one caught the break.

What the checks cannot establish is whether this stage is the right building
block for a particular code. The original circuit was specified only at the
level described above: no code, no trellis, no survivor traceback and no
throughput. The choices listed under *Branch metric units* and *What this
stage does not do* are therefore this implementation's own. The original's
power, area and speed figures describe transistor-level circuits and do not
carry over to this RTL.
