# Glitch-free 10 Hz trigger multiplexer for a booster synchrotron timing system

The LINAC that fills a booster synchrotron has to be triggered at 10 Hz all
the time. That keeps its temperature, and so its beam, stable. There are two
sources for the trigger:

* **the peaking strip clock (PS).** A magnetic-field sensor in the booster
  produces it at the start of every 10 Hz acceleration cycle. It is the right
  timing reference, but it only exists while the booster is running.
* **the PG&E clock.** It is derived from the 60 Hz power line and is always
  there. It is used as a "housekeeping" trigger while the booster is off.

The two sources are not locked to each other. A plain 2:1 multiplexer that
switches between them can emit a shortened pulse or a double pulse at the
moment of switching, and that costs injection cycles. This RTL puts a
glitch-free clock multiplexer between the two sources. Around it sit the
pieces a working trigger channel needs:

* a divider that makes 10 Hz from the line;
* an optional 40 ms delay on the PG&E path;
* a selector that can run from a remote SELECT line, or switch by itself and
  prefer the peaking strip whenever it is running.

```
line_clk 60 Hz --> line_clock_divider (/6) --> pge_10hz --+--> edge_delay 40 ms --+
                                                           +-----------------------+--> CLK0 --+
                                                                         pge_delay_en           |
ps_clk 10 Hz ----------------------------------------------------------------------> CLK1 --+  glitch_free_clk_mux --> linac_trig
                                                                                            |
select, auto_en, ps_clk --> auto_select --------------------------------> SELECT, clr1_n ---+
```

## The glitch-free switch (`glitch_free_clk_mux`)

This is the core of the design, and the only part whose gate-level structure
comes from a published circuit. The gate names below are the usual ones for
that circuit. Each clock has its own *enable path* of two D flip-flops, both
clocked by that same clock:

| clock | request gate | first flop | second flop | gate |
|---|---|---|---|---|
| CLK1 | AND1-1 = SELECT & !en0 | DFF1-1, rising edge of CLK1 | DFF1-2, falling edge of CLK1 → en1 | AND1-2 = CLK1 & en1 |
| CLK0 | AND0-1 = !SELECT & !en1 | DFF0-1, rising edge of CLK0 | DFF0-2, falling edge of CLK0 → en0 | AND0-2 = CLK0 & en0 |

`clk_out = AND0-2 | AND1-2` (OR1).

Three properties make it glitch-free:

1. **The enable changes only while its own clock is low.** The second flop
   runs on the falling edge, so the AND gate never cuts a high phase short and
   never opens in the middle of one.
2. **Break before make.** A path's request is ANDed with the *inverted final
   enable of the other path*. The new clock cannot be requested until the old
   path has actually switched off.
3. **Metastability.** SELECT is asynchronous to both clocks. The first,
   rising-edge flop of each path gives a half clock period for a metastable
   sample to settle before the falling-edge flop uses it.

### A switch, step by step (SELECT 0 → 1)

1. The next rising edge of CLK0 samples the drop of the CLK0 request into
   DFF0-1.
2. The following falling edge of CLK0 clears en0. CLK0 is now low, so the
   output just stays low.
3. !en0 opens AND1-1. The next rising edge of CLK1 loads DFF1-1, and the
   falling edge after it sets en1 while CLK1 is low.
4. The next high phase of CLK1 is the first one to reach the output.

So a switch takes at most `T_old + H_old + T_new + H_new`, where T is the
period and H the high time of each clock. Two consequences follow directly
and are kept on purpose:

* **A pulse is lost on every switch.** The old clock still delivers one
  more pulse after SELECT changes. The first pulse of the new clock after
  that is then swallowed while its enable path loads. So with two 10 Hz
  pulse trains, the trigger stream has one missing pulse at each change of
  source.
* **It cannot leave a stopped clock.** Step 2 needs a falling edge of the old
  clock. If the peaking strip stops while selected, setting SELECT to 0 does
  nothing: the output stays low until CLK1 runs again. This is why
  `auto_select` exists (below).

The RTL adds an active-low asynchronous clear to each path (`clr0_n`,
`clr1_n`); the published circuit has none. With both clears held high the
module is exactly the circuit described above. Two concurrent assertions,
one on each clock, check that `en0` and `en1` are never on together. Verilator
reports that the clears are used both synchronously and asynchronously; the
synchronous use is only the assertions' `disable iff`.

## The LINAC trigger channel (`booster_timing_mux`)

The top builds one trigger channel. CLK0 is the PG&E clock and CLK1 is the
peaking strip, and a SELECT value of 1 means "peaking strip". It has two
static setting pins:

| `auto_en` | `pge_delay_en` | behaviour |
|---|---|---|
| 0 | 0 | the prototype: remote SELECT chooses the source, no delay. Stalls if the peaking strip stops while selected. |
| 1 | 1 | the deployable channel: peaking strip whenever present, otherwise PG&E delayed by 40 ms. |

The other two combinations are also legal. `pge_delay_en` chooses which
signal feeds a clock input of the mux, so change it only while the peaking
strip is selected, or in reset.

### PG&E 10 Hz (`line_clock_divider`)

A registered modulo-6 counter runs on the squared-up 60 Hz line. Its output
is high for 3 line periods (50 ms) out of 6. `DIV` and `HIGH_COUNTS` are
parameters.

### 40 ms PG&E delay (`edge_delay`)

The existing timing system triggers the LINAC 40 ms after a PG&E pulse, and
with no delay after a peaking strip pulse. This block reproduces that. It
samples the PG&E clock on a 1 MHz reference clock (`ref_clk`). It then delays
the rising and the falling edge by one down-counter each, by exactly
`DELAY_CYCLES` = 40 000 cycles. So the pulse width is kept to within one
reference cycle, and the delay can be set in 1 µs steps. Each counter holds
one pending edge. Consecutive rising edges, and consecutive falling edges,
must therefore be more than the delay apart: 100 ms against 40 ms here.

### Self-switching (`auto_select`)

The peaking strip counts as **present** once two of its rising edges arrive
less than the timeout apart. It counts as **missing** once the timeout passes
without an edge. The timeout is 150 ms, one and a half periods. Missing
includes the state after reset.

When `auto_en` = 1:

* SELECT follows `ps_present`.
* While the peaking strip is missing, `clr1_n` is held low. This clears the
  mux's peaking strip path, so the switch to PG&E completes even though CLK1
  no longer has edges.

When `auto_en` = 0, SELECT follows the remote `select` input, and `clr1_n` is
only low during reset.

All outputs of this block are registered on `ref_clk`. One caveat: if the
peaking strip stops while its level is high, the clear ends that high level
early. That is the only way this design can shorten a pulse.

## Interface of `booster_timing_mux`

| port | dir | meaning |
|---|---|---|
| `ref_clk` | in | 1 MHz reference for the delay and the detector. The trigger path does not run through it. |
| `rst_n` | in | asynchronous reset, active low |
| `line_clk` | in | 60 Hz line clock, logic level |
| `ps_clk` | in | 10 Hz peaking strip clock, active-high pulses |
| `select` | in | remote select: 0 = PG&E, 1 = peaking strip |
| `auto_en`, `pge_delay_en` | in | static settings, see the table above |
| `linac_trig` | out | multiplexed trigger |
| `pge_10hz` | out | 10 Hz clock derived from the line |
| `select_eff` | out | SELECT as applied to the mux |
| `ps_present` | out | peaking strip detected |
| `pge_active`, `ps_active` | out | which enable path is gated through (en0, en1) |

Parameters, all with the values above as defaults: `REF_HZ` (1 000 000),
`LINE_DIV` (6), `PGE_DELAY_MS` (40), `PS_TIMEOUT_MS` (150). Shared constants
are in `timing_pkg`.

The trigger's rising edge comes straight from the chosen input through two
gates. Only the delayed PG&E path is retimed to `ref_clk`, so it has up to
1 µs of sampling jitter against the line.

## What comes from the source design and what does not

* **From the source design.** The mux's structure, gate for gate, including
  its pulse loss and its stall on a stopped clock. The source assignment
  (PG&E on CLK0, peaking strip on CLK1). The 60 Hz → 10 Hz relation. The need
  for a 40 ms PG&E delay. The need for self-switching that gives the peaking
  strip priority.
* **Choices made here.**
  * the 1 MHz reference clock;
  * the counter-based divider and its 50 % duty cycle;
  * the two-timer delay;
  * the edge-timeout detector, its 150 ms timeout and its two-edge rule;
  * clearing the peaking strip path to escape the stall;
  * the reset;
  * the two setting pins.

  The trigger channel was only sketched in the original work, as one LINAC
  channel. Further channels (extraction trigger, ejection kicker), the
  output line drivers, the pulse fan-out and the control-system interface
  that drives SELECT are not part of this RTL. Each further channel would be
  another instance of the mux.
* **Not done.** The output pulse loss at a switch remains. A different
  topology would be needed to avoid it.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_glitch_free_clk_mux` switches at random times between clocks of
  different rates, and between narrow pulse trains of nearly equal rate. It
  checks:
  * no runt pulse: every high pulse is one whole high phase of a source, and
    every low gap is at least the shorter low phase;
  * once the switch bound above has passed, the output follows the selected
    clock;
  * the enables are never on together;
  * the stall on a stopped clock, and its release by `clr1_n`.
* `tb_switch_pulse_loss` repeats the bench test of the circuit with two
  independent generators. The pairs are two 10 Hz trigger trains in real
  time, 60 Hz against 10 Hz, kHz clocks and MHz against 73 kHz. On every
  switch it measures two things. First, exactly one old pulse still passes
  after the select change. Second, exactly one new-clock pulse is dropped
  before the new clock appears.
* `tb_line_clock_divider` checks the output against the edge count for
  /6 and /5.
* `tb_edge_delay` checks both edges against a recorded input history, at
  40 000 cycles and at 40 cycles.
* `tb_auto_select` checks the present/missing decisions, with their
  latencies, and the registered select and clear outputs. It runs at a short
  timeout and at the default 150 ms.
* `tb_booster_timing_mux` runs the whole channel at its default sizes, over
  about 8 s of machine time. It sorts every trigger edge as peaking strip,
  prompt PG&E or 40 ms-delayed PG&E, and treats anything else as a glitch.
  It goes through seven phases: manual selection both ways, the delay, the
  stall, automatic fallback, automatic return and a second loss. It counts
  each of these mechanisms and fails if one never happens. It runs in a few
  seconds.

To run one, with plain Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/timing_pkg.sv tb/tb_booster_timing_mux.sv \
    --top-module tb_booster_timing_mux
./obj_dir/Vtb_booster_timing_mux
```

Replace the testbench name to run another bench. Verilator finds the modules
in `rtl/` through `-Irtl`. To lint a module:
`verilator --lint-only -Wall -Irtl rtl/timing_pkg.sv rtl/<module>.sv`.

The benches use `$urandom` only, and Verilator's two-state simulation:
everything that is read is reset or initialised.
