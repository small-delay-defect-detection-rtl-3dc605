# Race-based small-delay-defect test structures

Small delay defects (resistive vias, thinned lines) add tens of
picoseconds to a path. On a short path that extra delay hides in the slack
of an at-speed test, and catching it normally needs a faster-than-at-speed
clock, which brings IR-drop noise and yield loss. The idea implemented
here avoids that clock: two paths are launched at the same instant, a
*reference* segment whose delay is already known to be bounded and a
*test* segment that should be faster, and they converge on one gate. The
transitions are chosen so that the gate's output stays flat when the test
segment wins the race and produces a short static hazard (a glitch) when
it loses. A **glitch detector** at the nearest endpoint records whether the
hazard happened, and the result is read out through the scan chain. No
capture clock is applied, which also lowers test power.

The RTL provides the on-chip parts of this method:

* the glitch-detecting scan cell placed at endpoints of the logic under
  test, and
* the **reference path test structure (RPTS)**, a calibratable on-chip
  delay that is raced against core paths to validate the shorter reference
  paths, with a ring-oscillator mode for calibration,

and a top level that chains them together. The logic under test itself,
and the generation of race patterns, are outside this RTL.

## The race

At a convergence NAND gate with inputs `r` (reference) and `t` (test):

| launched transitions | test faster than reference | test slower than reference |
|---|---|---|
| `r`: 0 -> 1, `t`: 1 -> 0 | `t` reaches 0 first, output stays 1 | both inputs are 1 for `delay(t) - delay(r)`: output pulses low |

The pulse width equals the amount by which the test segment is late, so a
detector that can see narrow pulses catches very small defects. With the
transitions reversed (`r` falling, `t` rising) the interpretation flips: a
passing test then *requires* a glitch, and the reference must be longer by
at least the gate's inertial delay plus a margin.

Once a segment has passed, it can serve as the reference for segments
that converge on its own side inputs, so the method works backward from
the longest paths (validated by an ordinary at-speed test, or by the RPTS)
to progressively shorter ones. The detector should sit at the endpoint
closest to the convergence gate: gates along the way can shrink a glitch,
and hazards on their side inputs can spoil the result.

## Glitch detector (`glitch_detector`)

```
 d ──┬──────────────────────────────────────────────► D   capture-flop
     ├──► XOR A ◄── inv ◄── inv ◄─┘                        (scan, SE)
     │      │ pulse                                   SI ◄── MUX ◄── si
     │      ▼                                                ▲   ▲
     │   NOR latch ── glitch_q ───────────► XOR B ───────────┘   │ glitch_en
     │      ▲ clear                           ▲ si
     └   glitch_en
```

* `glitch_rectifier`: XOR of the input with a copy delayed by two
  inverters. Every transition of `d`, and each edge of a glitch of either
  polarity, becomes a positive pulse about two inverter delays wide.
* `glitch_latch`: a NOR set/reset latch. Held clear while `glitch_en` is
  high. Once `glitch_en` is low, the first pulse sets it.
* `glitch_scan_capture`: the capture-flop. Its scan input comes through
  XOR B and a multiplexer. With `glitch_en` high, `si` passes unchanged
  (normal shifting). With `glitch_en` low, `si ^ glitch_q` is shifted in.

Test protocol for every detector in a chain:

1. Shift the pattern in with `glitch_en = 1` and `se = 1`.
2. Drop `glitch_en`. Launch the transitions, either with the last shift
   (launch-on-shift) or with a capture cycle (launch-on-capture). Any
   transition at a detector input sets its latch, asynchronously.
3. Give one more shift clock with `glitch_en` still low. Every detector
   whose latch is set inverts the bit that moves into it.
4. Raise `glitch_en` (clears all latches) and shift out.

After step 3, bit *i* of the chain equals the bit that bit *i-1* held,
XORed with detector *i*'s result. The tester therefore compares the
scan-out with the expected shifted pattern; every mismatch marks a
detector that saw a transition. The detector records *any* transition,
not only a glitch. Patterns must therefore keep the endpoint steady in
the passing case, as the race above does.

## Reference path test structure (`rpts`)

```
 launch-flop ─► tri-inv ─┬─► inv ─► inv ─► ... ─► inv     (CHAIN_INV inverters)
 (scan)          (~ro_en)│ tap0    tap1          tapN
                 tri-inv ┘        │ delay-select MUX (delay_sel) │
                 (ro_en)  ◄───────┴──────────────┬───────────────┘
                                                 ├─► freq_divider ─► freq_out
                                                 ▼
 core_paths ─► path-select MUX (path_sel) ─► NAND A ─► glitch_detector (capture-flop, scan)
 tap0 (calibration) ──┘
```

* **Delay emulation.** The launch-flop drives an inverter chain through a
  tri-state inverter. The delay-select code picks tap *k*, giving a
  reference delay of `TRI + k*INV` that arrives at NAND A, the convergence
  gate. The path-select code routes one core endpoint to NAND A's other
  input. The tester launches the core path and the RPTS at the same clock
  edge, with the launch value chosen so that the selected tap rises (the
  launch-flop falls for even *k* and rises for odd *k*) while the core
  endpoint falls. No glitch means the core path is faster than the
  emulated delay. Sweeping *k* brackets the path delay to within one
  inverter delay.
* **Calibration.** With `ro_en = 1` the launch inverter is disabled and a
  second tri-state inverter feeds the selected tap back to the chain
  input. For an even tap (the default `CHAIN_INV = 16` selects the whole
  chain) this closes a ring with an odd number of inversions, of period
  `2*(TRI + k*INV)`. `freq_divider` divides it by `2**DIV_BITS` onto
  `freq_out` for an external meter:
  `TRI + k*INV = 1 / (2 * f_out * 2**DIV_BITS)`.
  Measuring two or more taps separates the per-inverter delay from the
  fixed part.
* **Configuration.** `rpts_config_reg` is a shift register of
  `DSEL_W + PSEL_W` bits (5 + 3 by default), loaded through
  `cfg_si`/`cfg_se`/`cfg_so`. It is shifted least significant bit first,
  with the delay code in the low bits. It is kept apart from the main
  scan chain, so the launch shift cannot change the selected tap.
* **Path-select code 0** routes the chain's own input node to NAND A. This
  is the calibration connection. It lets the chain be raced against its
  start through the same multiplexer. Codes 1..`N_CORE_PATHS` select
  `core_paths[0..]`.

## Top level (`sdd_test_top`)

One scan chain runs through all cells:
`si -> RPTS launch-flop -> endpoint detector 0 .. N_ENDPOINTS-1 -> RPTS capture-flop -> so`.
`ep_d` are the endpoint signals from the logic under test, and `ep_q` the
flop outputs back to it. `rpts_paths` are the core endpoints the RPTS can
validate. `ep_glitch` and `rpts_glitch` expose the latch states for
simulation only. On silicon the results travel through the chain.

## Parameters

All sizes live in `sdd_pkg` and are parameters of the modules:

| parameter | default | meaning |
|---|---|---|
| `N_ENDPOINTS` | 8 | detector cells in the top |
| `CHAIN_INV` | 16 | inverters in the RPTS chain (taps = `CHAIN_INV+1`) |
| `N_CORE_PATHS` | 7 | core inputs of the path-select multiplexer |
| `DIV_BITS` | 8 | ring divided by 256 |
| `INV_DELAY_PS`, `TRI_DELAY_PS` | 20, 20 | chain gate delays (models only) |
| `RECT_DELAY_PS` | 10 | rectifier inverter delay (model only) |

None of these numbers is fixed by the method. All are choices of this
implementation.

## What is behavioural and what is synthesizable

The method depends on physical gate delays, so two modules are
behavioural models with `#` delays. They are not for synthesis.

* `glitch_rectifier`: its inverter pair must be a real delay.
* `delay_chain`: the inverter chain and the two tri-state inverters.

Both model delays as inertial: a pulse narrower than one gate delay is
absorbed by that gate. The rectifier still passes such a pulse, because
the pulse reaches XOR A directly. On silicon these are custom cells, laid
out for delay and for narrow-pulse sensitivity.

Everything else is synthesizable: the latch, the scan cells, the
multiplexers, the configuration register and the divider. Two structures
trigger tool warnings, and both are intentional:

* the ring-oscillator loop through `delay_chain` and `delay_select_mux`;
* the level-sensitive latch in `glitch_latch`.

## Where this RTL departs from, or adds to, the method as published

* `glitch_en` is active high at both the latch and the scan multiplexer:
  high clears the latch and gives normal shifting, and low arms the latch
  and inserts the result.
* The launch-flop has a functional D input (`rpts_launch_d`) so that
  launch-on-capture works.
* Added by this implementation: the separate configuration chain, its bit
  order and reset, the divider's reset, the scan-chain order, the meaning
  of unused select codes, and all sizes.
* The optional input buffer inverter in front of the rectifier is not
  included. It only reduces the load on the endpoint.
* Not included: the logic under test, the test-pattern generation for
  simultaneous races (an open problem for the method), and the off-chip
  frequency meter.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. Verilator needs `--timing` for the
delays:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/sdd_pkg.sv tb/sdd_test_top_tb.sv --top-module sdd_test_top_tb -o sim
./obj_dir/sim
```

`sdd_test_top_tb` runs the whole infrastructure at its default sizes. It
uses `tb/core_race_model.sv`, a behavioural pair of segments converging on
a NAND, as the logic under test. The model drives four races
and one plain transition:

* a race with a slow ("defective") test segment;
* a clean race;
* a race with reversed transitions, where passing produces a glitch;
* a reversed race whose 10 ps margin is below the convergence gate's
  20 ps inertial delay, so the glitch is absorbed and the segment cannot
  be shown to pass;
* a plain transition that reaches another endpoint. For each pattern the testbench:

* loads an RPTS tap through the configuration chain;
* runs the four-step protocol and checks every scan-out bit against a
  model of the chain;
* checks that the RPTS passes when the tap is longer than a 250 ps core
  path and fails when it is shorter.

It then checks the ring-oscillator period on `freq_out`. It counts every
mechanism and fails if any never occurred. `rpts_tb` also covers
launch-on-capture, a full tap sweep and the calibration input.
