# Timing-error-tolerant pipeline with time borrowing and clock gating

A flip-flop whose data arrives a little after the clock edge normally stores
the wrong value. This design detects such a late arrival at the flip-flop
itself and repairs the stored value within the same clock cycle. No replay
and no pipeline stall are needed. It works as follows:

* A **transition detector** watches the flip-flop's data input and emits a
  short pulse on every edge of it.
* A **master clock generator** ORs that pulse into the master-latch clock of a
  master-slave flip-flop. If data changes while the clock is high, the master
  latch reopens briefly. The slave latch is transparent in that phase, so the
  late value goes straight through to Q before the clock falls.
* The corrected value leaves the flip-flop late, so it also reaches the *next*
  flip-flop late. A **time-borrowing circuit** handles this by delaying the
  next flip-flop's capture edge for exactly one cycle.
* All of it runs on a clock gated by a plain AND gate (**clock gating**) to
  save clock power in idle cycles.

Everything is single-bit and gate-level, and it is written in SystemVerilog.
The delays that make the scheme work are behavioural models, so the RTL is
meant for event-driven simulation with real delays. Synthesis tools drop those
delays, as described below.

## The pipeline

```
 d ─► FF1 ──q1──► [logic 1] ──in2──► FF2 ──q2──► [logic 2] ──in3──► FF3 ──► q3
       ▲                        │     ▲ ▲                             ▲
       │               transition     │ │ gclk (slave)               │ CLK_TB
       │               detector ─Er─► master clock ─CM─┬─► time-borrowing
       │                              generator        │   circuit ◄─ gclk
 clk ─AND─ gclk (to everything)                        └── (CM)
 en ──┘
```

| stage | master latch clock | slave latch clock | role |
|---|---|---|---|
| FF1 | ~gclk | gclk | ordinary rising-edge flip-flop |
| FF2 | CM = Er \| ~gclk | gclk | error-correcting flip-flop |
| FF3 | ~CLK_TB | CLK_TB | flip-flop that borrows time after a stage-2 correction |

`logic 1` and `logic 2` are outside the design. The scheme does not depend on
what they compute, only on their delay. The top brings out their ports
(`q1`→`in2`, `q2`→`in3`).

## How a late value is repaired (stage 2)

Each flip-flop is two latches in series: the master is transparent while its
clock is high, the slave while its clock is high. With no error, CM = ~gclk,
so FF2 is an ordinary rising-edge flip-flop.

Suppose `in2` changes at time t, after the rising edge but while gclk is still
high:

1. The transition detector compares `in2` with an inverted, delayed copy of
   itself. One AND fires on a rising input, and an AND with inverted inputs
   fires on a falling input. Their OR, `er`, is high for `TD_DELAY_PS` after t.
2. CM = er | ~gclk goes high for that pulse. The master latch takes the new
   value. The slave is open because gclk is high, so `q2` becomes correct at
   about t.
3. At the falling edge the slave closes on the corrected value.

Edges that arrive while the clock is low also produce `er` pulses. Those pulses
are harmless, because CM is already high in the low phase.

## Time borrowing (stage 3)

After a correction, `q2` changes up to half a period late. Everything
downstream of it is late by the same amount. `time_borrow_circuit` produces
`CLK_TB` for FF3:

* `set = CM & gclk` is high only when an error pulse falls in the high phase.
  It sets a NOR-NOR SR latch (`cm_sr`).
* A D flip-flop clocked on the falling edge copies `cm_sr` to `borrow`.
  `borrow` clears the SR latch through feedback.
* `CLKD` is gclk through a delay buffer, and `CLKDD = gclk & CLKD`. CLKDD
  rises `TB_DELAY_PS` after gclk and falls with it.
* A multiplexer gives `CLK_TB = borrow ? CLKDD : gclk`.

`borrow` is high from the falling edge that ends the erroneous cycle to the
next falling edge. Exactly one rising edge of FF3 is delayed. The multiplexer
switches only while both of its inputs are low, so `CLK_TB` does not glitch.

## Clock gating

`gclk = clk & en`: a bare AND gate with no enable latch. `en` must change
only while `clk` is low, or `gclk` glitches. In a cycle with `en` low, no
stage sees an edge and all stages hold their values.

## Timing rules for correct operation

The scheme is for paths whose delay is more than half a clock period, and it
corrects a limited amount of lateness. With period T, error-pulse width
`TD_DELAY_PS` and borrowed time `TB_DELAY_PS`:

* **Minimum path delay > T/2** (plus the pulse width). Otherwise a fast new
  value for the *next* cycle arrives during the high phase. The detector
  mistakes it for a late value and overwrites the correct one.
* **Normal arrival at FF2 before T − TD_DELAY_PS.** This keeps the pulse of a
  normal arrival from reaching into the high phase. If it does, the data stays
  right, but a needless borrowing cycle follows.
* **A late value at FF2 must arrive before the clock falls.** The correction
  window is the high phase.
* **At FF3, lateness must be below `TB_DELAY_PS`, and `TB_DELAY_PS` < T/2.**
  The second bound protects FF3's hold time.
* **No errors in two consecutive cycles.** The SR latch is cleared while
  `borrow` is high, and the clear wins. So an error in the cycle right after a
  borrowing cycle is not registered, and its downstream stage gets no borrowed
  time.
* **`en` changes only while `clk` is low.**

## Parameters

| parameter | module | default | meaning |
|---|---|---|---|
| `TD_DELAY_PS` | `tet_pipeline_top` | 500 | error-pulse width (delay buffer of the transition detector) |
| `TB_DELAY_PS` | `tet_pipeline_top` | 3000 | time borrowed by FF3 (delay of CLKD) |
| `DELAY_PS` | `transition_detector`, `time_borrow_circuit`, `delay_buffer` | 500 / 3000 / 500 | the same delays, per block |

Both delay values are this design's own choices, sized for a 20 ns clock. The
scheme specifies no values, only that the pulse should be as short as possible
to avoid hold problems.

## Files

| file | contents |
|---|---|
| `rtl/tet_pipeline_top.sv` | the three-stage pipeline (top) |
| `rtl/transition_detector.sv` | edge detector that produces the error pulse |
| `rtl/master_clock_gen.sv` | CM = Er \| ~CLK |
| `rtl/ms_flip_flop.sv` | master-slave flip-flop with separate latch clocks |
| `rtl/time_borrow_circuit.sv` | SR latch, falling-edge flip-flop, CLKDD, multiplexer |
| `rtl/clock_gate.sv` | AND clock gate |
| `rtl/delay_buffer.sv` | behavioural delay cell (`assign #DELAY_PS`) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

All files use `timeunit 1ps`. The delays need Verilator's timing mode. All delays in the testbenches are non-zero, which is why the command passes `--no-sched-zero-delay`:

```
verilator --binary --timing --no-sched-zero-delay --assert -Irtl -y rtl \
    tb/tb_tet_pipeline_top.sv --top-module tb_tet_pipeline_top
./obj_dir/Vtb_tet_pipeline_top
```

Every testbench ends by printing `TB_RESULT checks=N failures=M`.

The end-to-end testbench, `tb_tet_pipeline_top`, uses the top's default
parameters. It runs 400 cycles at a 20 ns period and models the two logic
blocks as inverters whose delay is chosen for each launch:

* Normal launches take between T/2 + 0.5 ns and T − 1 ns.
* About a third of the eligible launches are made late by 0.2–2.5 ns at FF2.
* After a late launch, the second path is slow (T − 2.5 to T − 1 ns). The
  corrected value then also reaches FF3 after the clock edge.
* About one cycle in six is gated.

After the n-th gated edge, it checks `q1 = D(n)`, `q2 = ~D(n−1)` and
`q3 = D(n−2)`, and it checks `borrow` against the cycles that had an error
pulse in the high phase. It also counts stage-2 corrections, borrowing cycles,
borrowed FF3 captures and gated cycles, and fails if any of them never occurs.

Runs with different seeds give about 23–28 corrections, as many borrowing cycles,
5–15 borrowed captures and 60–80 gated cycles.

Verilator is a two-state simulator. The latches start at random values, and
the testbench starts checking after the first few edges.

## Synthesis

The logic (latches, AND/OR gates, the falling-edge flip-flop, the multiplexer)
synthesizes. The `#` delays do not, so a synthesis tool reduces the error pulse
to a constant 0 and CLKDD to CLK. To build this circuit, instantiate real
delay cells in place of `delay_buffer`, keep the latches and clock gates from
being restructured, and check the pulse width and borrowed time with static
timing analysis. The latches and the combinational clock paths are deliberate
and are the point of the design.

## Where this RTL makes its own choices

* **CLKDD = CLK AND CLKD.** This gives a capture edge that is delayed while the
  falling edge is unchanged. An OR would lengthen the high phase instead, which
  gives a master-slave flip-flop no extra time to capture.
* **Set condition `CM AND CLK`.** It lets only an error pulse in the high phase
  start a borrowing cycle.
* **Latch polarity.** Each latch is open while its clock is high. FF1 and FF3
  get the inverted clock on their master.
* **Reset.** `rst` (asynchronous, active high) clears only the time-borrowing
  flip-flop and its latch. The data latches have no reset.
* **Delay values.** Both delays and the 20 ns test clock are assumptions.
* **Data width.** The data path is one bit wide. A wider register would repeat
  the detector and master clock generator per bit and OR the errors into the
  time-borrowing circuit; this RTL does not do that.
* **The logic blocks between the stages.** They are left outside the top,
  because only their delay matters.
