# VHF charge-pump PLL with an all-digital built-in self-test

This design is an integer-N frequency synthesizer for the VHF band. A
charge-pump PLL multiplies a 1.25–3.1 MHz reference by N = 32 and produces
40–100 MHz. Around it sits a built-in self-test (BIST) that needs only two
extra pins and no analog test circuitry. Its main idea is reuse:

* the PLL's **feedback divider** is also the **BIST controller**: six ripple
  stages that count a 6.25 MHz test clock through 64 states;
* the **phase/frequency detector** is also the **stimulus injector**: in test
  mode it is fed synthetic reference and feedback edges that hold the loop in
  continuous charge, hold or continuous discharge;
* one set of six flip-flops is both the **frequency counter** and the
  **serial read-out register** of the result.

A test therefore drives the loop filter voltage up or down and counts VCO
cycles in a 0.32 µs window. The count comes out of one pin, and a tester
compares it with the value expected for a good part.

The digital parts are synthesizable SystemVerilog. The charge pump, loop
filter and VCO are analog circuits. They are given here as real-valued
behavioural models, so the whole loop can be simulated with Verilator.

## Structure

```
             start_bist ─────┬──────────────┬───────────────────────┐
                             │              │                       │
 ref_clk ──► SW1 (test_switch) ──► ┌─────┐  │  ┌────┐  ┌────┐  ┌─────┐  output_freq
                ▲ tck_n            │ pfd ├─UP/DN─►│ CP ├─►│LPF ├─►│ VCO ├──────┬────►
             ┌──┴──┐               │     │  │  └────┘  └────┘  └─────┘      │
 fbk ──────► SW2 ──┼─────────────► └─────┘  │                                │
   ▲         ▲ tfb_n                        ▼                                │
   │      ┌──┴──┐  state[5:0]  ┌──────────────────────┐   ┌─────────┐       │
   │      │ tsg │◄─────────────┤ fb_divider           │◄──┤ clk_mux │◄──────┤
   │      └──┬──┘              │ (BIST controller)    │   └─────────┘       │
   └─────────┼─────── stage E ─┤ 6 ripple stages A..F │        ▲ bist_clk   │
             │ sel_mode        └──────────────────────┘                     │
             ▼                                                              │
      ┌─────────────────────┐◄── bist_clk                                   │
      │ response_collector  │◄── output_freq (CNT_CLK) ─────────────────────┘
      └──────────┬──────────┘
                 └──► bist_output (serial, MSB first)
```

| Module | Kind | Role |
|---|---|---|
| `pll_bist_top` | structural | the complete synthesizer with BIST |
| `pfd` | RTL | tri-state phase/frequency detector, UP/DN and complements |
| `charge_pump` | behavioural | ±25 µA switched current |
| `loop_filter` | behavioural | C1 = 76.9 pF in series with R = 26.9 kΩ, parallel with C2 = 7.5 pF |
| `vco` | behavioural | seven-stage current-starved ring, 290 Mrad/Vs, 30–105 MHz |
| `clk_mux` | RTL | divider clock: VCO (normal mode) or BIST clock (test mode) |
| `fb_divider` | RTL | six toggle stages; stage E = f/32 feedback; all six = controller state |
| `tsg` | RTL | combinational decode of the state into TCK, TFB, SEL_MODE |
| `test_switch` | RTL | two-NAND switch in front of each PFD input (SW1, SW2) |
| `response_collector`, `rc_cell` | RTL | six dual-mode flip-flops: counter or shift register |

Top-level ports: `rst_n` (asynchronous, active low), `ref_clk`, `bist_clk`
(6.25 MHz), `start_bist` (1 = normal mode, 0 = self-test), `output_freq`,
`bist_output`.

## Normal mode (`start_bist = 1`)

`clk_mux` clocks the divider from the VCO output. Stage E, the fifth stage,
toggles every 16 VCO cycles and returns f_vco/32 to the PFD through SW2.
The reference reaches the PFD through SW1. The PFD sets UP on a reference
edge and DN on a feedback edge, and clears both once both are set. The
charge pump turns UP/DN into ±25 µA, and the filter integrates it into V_ctrl.

The loop values give a natural frequency of
√(K_vco·I_cp / (2π·N·C1)) ≈ 0.69 Mrad/s and a damping factor R·C1·ω_n/2 ≈ 0.71.
In simulation the loop acquires each frequency from the bottom of its range
(`tb/pll_synthesis_tb.sv`):

| f_ref (MHz) | f_out (MHz) | simulated time to ±1 % (µs) | reference figure (µs) |
|---|---|---|---|
| 1.25 | 40 | 10 | 11.6 |
| 1.72 | 55 | 11 | 12.2 |
| 2.18 | 70 | 12 | 10.9 |
| 2.66 | 85 | 15 | 15.7 |
| 3.125 | 100 | 22 | 25.1 |

The times are sampled on a 1 µs grid. The reference column holds lock times
from the source design's transistor-level simulations. Its 100 MHz row is
listed there with a 3.25 MHz reference, but 32 × 3.25 MHz would be 104 MHz.
This table uses 100/32 = 3.125 MHz.

## Test mode (`start_bist = 0`)

### The controller

`clk_mux` now clocks the divider from `bist_clk`. Each stage is clocked by
the Q output of the stage before it, so the state {F,E,D,C,B,A} (A least
significant) counts **down** by one per BIST clock. One pass through all
64 states takes 64 × 160 ns = 10.24 µs. The divider has no other control:
the controller is simply free-running.

### Test stimuli

`tsg` decodes the state:

```
TCK      = A·B·D·~E·~F + A·B·~C·~D·~E·~F     → states 3, 11, 15
TFB      = A·B·D·~E·~F + ~A·B·D·E·F          → states 11, 15, 58, 62
SEL_MODE = B + E + F + C·~D + ~C·D           → 0 only in states 13, 12, 1, 0
```

Because A is the fastest stage, the four SEL_MODE = 0 states form two
windows of two consecutive states. Each window is 0.32 µs long.

The switches in front of the PFD are two NAND gates each:
`out = START_BIST·Y + ~Z`. Y is the functional signal (reference or
feedback) and Z is the TSG line. In test mode the PFD receives ~Z. In
normal mode it receives Y only while Z = 1. The TSG therefore outputs
`tck_n = ~TCK` and `tfb_n = ~TFB`, and forces both to 1 whenever
`start_bist = 1`. That forcing gate is this implementation's addition: a
switch this cheap only works if its Z input is guaranteed to be 1 in normal
mode. In test mode the PFD sees a rising edge at the **end** of each decoded
state.

A steady stream of edges on only one PFD input keeps UP (or DN) asserted
permanently, so the loop charges (or discharges) at full current. Edges on
both inputs at the same time leave the PFD idle, and the loop holds its
voltage. Over one cycle (time runs toward lower state numbers):

| after state | PFD edges | loop |
|---|---|---|
| 62 | feedback | DN set: discharge (or the end of the charge phase) |
| 58 | feedback | discharge continues |
| 15 | both | idle: hold |
| 13–12 | — | **count window 1**: the discharged frequency |
| 11 | both | hold |
| 3 | reference | UP: charge |
| 1–0 | — | **count window 2**: the frequency during the charge |

### Response collector

Each `rc_cell` is a flip-flop with two multiplexers. With SEL_MODE = 0 it
toggles on its B clock, and with SEL_MODE = 1 it loads A on the shift clock.
Cell 1's B is the VCO output and its A is tied to 0. Every later cell takes
both A and B from the cell before it. So the six cells form a ripple counter
in one mode and a shift register in the other. The last cell, inverted, is
`bist_output`.

* Most of the time the register shifts, which fills it with zeros.
* In a window it counts VCO edges. With each stage clocked by the previous
  Q it counts down, so k edges leave (−k) mod 64.
* After the window, the six shifts put the inverted register out, MSB first.
  The serial word is therefore **(k − 1) mod 64**. Bit 5 is on the pin from
  the rising BIST clock edge that closes the window. Each further bit follows
  one BIST cycle later.

The frequency is (word + 1)/0.32 µs. An 84 MHz VCO gives k = 27 and a
word of 26 (011010).

The shift clock is the **inverted** BIST clock. SEL_MODE changes just after a
rising BIST edge, and both come from the same clock. If the shift clock were
the BIST clock itself, the clock multiplexers would switch while it is high
and produce a spurious first shift. Delaying it by half a period removes that
race, so the first shift after a window is a clean edge. The source design
puts a delay element on this line for the same reason, but gives no length
for it.

### What a test produces with these models

`tb/pll_bist_top_tb.sv` runs four test cycles after the loop has been locked
at 85 MHz. From the third cycle on, both windows read 9 (10 VCO edges,
≈31 MHz), and the readings repeat from cycle to cycle. With this schedule the
discharge lasts 43 states, which drives V_ctrl to the rail. The charge lasts
only 5 states, too short to lift the VCO off the bottom of its band, so both
windows see nearly the same frequency.

The source design reports about 84 MHz in one window and 74 MHz in the other
(words 26 and 23). It describes the phases in the order initialization,
charging, f_max measurement, discharge, f_min measurement. The printed
equations above do not produce that order, whichever way the controller
counts. This RTL keeps the printed equations. If the intended schedule is
known, it is a change to `tsg.sv` alone, and the counter, collector and
switches need not change. Treat the TSG decode as the least certain part of
this design.

### Defects the test catches

`tb/pll_bist_fault_tb.sv` runs the self-test from a fixed starting point
(reset, filter at 0 V) for three test cycles. The fault-free run reads
9, 10, 9, 9, 9, 10, and a second fault-free run reads the same to within one
count. The testbench then forces one defect at a time on internal nets. A
defect counts as caught when a word of the last cycle moves by more than one
count:

| injected defect | words of the run | caught |
|---|---|---|
| both charge-pump sources open | 22 22 22 22 22 22 | yes |
| charge-pump sink open | 22 31 25 33 27 33 | yes |
| VCO output stuck at 0 | 63 63 63 63 63 63 | yes |
| first controller stage stuck at 0 | 14 14 28 28 56 49 | yes |
| third collector flip-flop stuck at 0 | 63 63 63 63 63 63 | yes |
| PFD feedback input stuck at 1 | 33 33 33 33 33 33 | yes |
| charge-pump source open | 9 9 10 9 9 9 | no |

The missed defect is the weakness of the schedule described above: the
charge phase never raises the frequency by a measurable amount, so losing
the charging current changes nothing the collector sees. These are
logic-level stand-ins for defects. The source design's fault list (stuck-on
transistors, open sources and drains, gate shorts) needs a circuit simulator.

## Behavioural models

All three models use a 1 ns / 1 ps time unit. Voltages are relative to
mid-supply (the circuit runs from ±1.5 V).

* `charge_pump`: `i_out = +25 µA·[UP] − 25 µA·[DN]`. A source counts only
  when its true and complement controls agree. It has no mismatch.
* `loop_filter`: it integrates the two capacitor voltages with forward Euler.
  It steps at every change of the input current, so pulses of any width are
  integrated exactly in charge, and at least every 1 ns between changes.
  V_ctrl is clamped to ±1.5 V, and starts at −1.5 V.
* `vco`: `f = 70 MHz + (290 Mrad/Vs / 2π)·V_ctrl`, limited to 30–105 MHz.
  So 40 MHz is at −0.65 V and 100 MHz at +0.65 V, a 1.3 V span. The half
  period is recomputed at every output toggle. Phase noise is not modelled.

These models are not synthesizable, and a synthesis flow has to replace them
with the real macros. Their ports are those of the real blocks: UP/UP_b/DN/DN_b
in, current out; current in, V_ctrl out; V_ctrl in, clock out.

## Choices made here

* `rst_n` resets every flip-flop (PFD, controller, collector) asynchronously.
  The original circuit has no reset.
* The PFD is written as two edge-set flip-flops with a common clear. It
  behaves like the latch-and-NAND network and has no combinational loop. The
  anti-dead-zone delay in the clear path is a transistor-level property. In
  zero-delay simulation the UP/DN overlap has zero width, and the filter model
  still integrates every non-zero pulse.
* The counting direction (down) comes from clocking each stage by the previous
  Q. Stage A is taken as the least significant stage. This is the only order
  in which the SEL_MODE windows are 0.32 µs long.
* TCK appears in two forms in the source: with `~C` or with `C` in its second
  term (state 3 or state 7). The `~C` form is used.
* Where the source states the switch's forbidden input combination, the
  combination it names conflicts with its own `X·Y + ~Z` equation. The
  equation is followed, and the TSG holds Z = 1 in normal mode.
* The response collector's shift-clock delay is half a BIST period.
* Model values: 25 µA both ways (the source measured 24.9/24.5 µA), and a VCO
  gain of 290 Mrad/Vs (the source also quotes 302 Mrad/Vs measured).

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `pfd_tb`: lead and lag, repeated edges, simultaneous edges, reset.
* `fb_divider_tb`: down-count sequence, wrap every 64, fbk period 32.
* `tsg_tb`: all 64 states in both modes against the active-state lists.
* `test_switch_tb`, `clk_mux_tb`: full truth tables.
* `response_collector_tb`: counts 0–34 read back serially as (k − 1) mod 64,
  and the register is cleared afterwards.
* `charge_pump_tb`, `loop_filter_tb`, `vco_tb`: current values, the charge
  and R·C response against closed-form values, and frequency against V_ctrl.
* `pll_bist_top_tb`, at default parameters: lock at 40 MHz, reprogram to
  85 MHz, four BIST cycles, then return to 40 MHz. In BIST mode it tracks the
  controller state on its own and counts VCO edges in each window. Every
  serial word must equal (count − 1) mod 64. Every window must last
  0.32 µs and recur every 10.24 µs. It also counts the charge,
  discharge and hold phases, windows, read-outs, simultaneous edges, mode
  switches and the relock, and fails if any of them never occurs. It
  simulates about 0.1 ms in under a second.
* `pll_synthesis_tb`: the five synthesis points of the table above.
* `pll_bist_fault_tb`: the defect-injection runs of the previous section.
  It fails if a run without defects does not repeat, or if any defect other
  than the open charge-pump source goes uncaught.

To simulate with Verilator 5 from the project root:

```
verilator --binary --timing --assert -Irtl -Itb --top-module pll_bist_top_tb tb/pll_bist_top_tb.sv -o sim
./obj_dir/sim
```

Any other testbench is run the same way with its own name. Lint with
`verilator --lint-only -Wall -Irtl rtl/<module>.sv`. Lint reports three
warnings on purpose:

* the collector cells are used both as clock and as data (explained in the
  collector's header);
* the VCO's delay is computed at run time (explained in the VCO's header);
* the top leaves the collector's `value` port open, because that port only
  serves observation in the collector's own testbench.

Not covered: the analog circuits themselves (transistor sizing, phase noise,
charge-pump mismatch, the dead-zone delay). Nor is the transistor-level fault
campaign that the BIST was designed for (stuck-on, open and short faults);
that needs a circuit simulator. Only the logic-level defects listed above
were injected.
