# Vernier ring-oscillator time-to-digital converter

This converter measures the time between the rising edge of a START pulse and
the rising edge of a STOP pulse with a resolution much finer than any clock
period in the circuit. It is intended for time-of-flight measurements, where
the alternative, counting a fast system clock between START and STOP, would
need a clock in the GHz range for nanosecond resolution.

The idea is a vernier built from two ring oscillators with slightly different
periods:

* START switches on a **slow** oscillator of period T1 = 7.82 ns.
* STOP switches on a **fast** oscillator of period T2 = 6.817 ns.

The fast clock starts later but gains T1 - T2 = 1.003 ns on the slow clock
every cycle. After a few cycles one of its rising edges catches up with a
rising edge of the slow clock. A **phase detector** sees that moment. A
**coarse counter** on the slow clock and a **fine counter** on the fast clock
then stop. With n1 and n2 the two counts, the interval is

    T = T1 * (n1 - 2) - T2 * (n2 - 2)

and the resolution is T1 - T2, about 1 ns, although neither oscillator runs
faster than 147 MHz.

## Block diagram

```
 start ─► edge_detector ─en─► ring_oscillator (T1) ──slow_clk──┬──────────────► coarse_counter ─► n1, done
                                                              │                    ▲
                                                              ▼                    │ pd
                                                        phase_detector ──pd────────┤
                                                              ▲                    ▼
 stop  ─► edge_detector ─en─► ring_oscillator (T2) ──fast_clk──┴──────────────► fine_counter ───► n2
                                                                         n1, n2 ─► interval_calc ─► interval_ps
 clear ─► every flip-flop (asynchronous, active high)
```

| File | Module | What it is |
|---|---|---|
| `rtl/tdc_pkg.sv` | `tdc_pkg` | Default periods, counter and result widths |
| `rtl/edge_detector.sv` | `edge_detector` | Flip-flop with D tied high, clocked by START or STOP |
| `rtl/ring_oscillator.sv` | `ring_oscillator` | **Behavioural model** of the gated ring oscillator |
| `rtl/phase_detector.sv` | `phase_detector` | Three flip-flops that detect the coincidence |
| `rtl/coarse_counter.sv` | `coarse_counter` | Counts slow edges (n1) and flags the end of a measurement |
| `rtl/fine_counter.sv` | `fine_counter` | Counts fast edges (n2) |
| `rtl/interval_calc.sv` | `interval_calc` | Evaluates the interval formula in picoseconds |
| `rtl/vernier_tdc.sv` | `vernier_tdc` | Top level |

## The oscillators

Each oscillator is a loop made of a two-input AND gate, a buffer, an
inverting feedback gate and a second buffer. On the FPGA the feedback gate is
an and-or-invert cell in the slow oscillator and a NOR cell in the fast one.
Their spare inputs are tied to ground, so each acts as an inverter. The
second AND input is the enable from the edge detector. While it is low the
output is held low. When it rises the loop oscillates with a period set
entirely by cell and routing delays. Getting two periods that differ by only
1 ns therefore depends on manual placement of these cells. Logic cannot
express it, so `ring_oscillator` is a behavioural model. It uses delay
statements, with `HIGH_PS` and `LOW_PS` as the two half periods. Because of
this, `vernier_tdc` simulates but does not synthesize as a whole. Every
other module is ordinary synthesizable logic. To build hardware, replace
`ring_oscillator` with a placed and hand-routed macro that has the same ports,
then measure its real periods and pass them to `vernier_tdc` as `T1_PS` and
`T2_PS`.

In the model, the output rises at the same moment as the enable, and a
period is split into T/2 high and the remainder low. Both are choices of the
model. Any start-up delay that the two oscillators share cancels in the
measurement.

## Detecting the coincidence

The phase detector has three flip-flops:

1. `q1` samples the slow clock on each fast rising edge.
2. `q2` is `q1` delayed by one more fast edge.
3. The third flip-flop has D tied high. It is clocked by the *inverted*
   output of `q2`, so it sets `pd` when `q2` falls.

Take φ as the time from the latest slow rising edge to a fast rising edge. φ
shrinks by T1 - T2 on every fast cycle. While φ is less than half a slow
period, the slow clock is high and `q1` samples 1. At some fast edge φ
would go below zero. That fast edge now arrives *just before* a slow rising
edge, so it samples the slow clock low. This 1 → 0 change in `q1` is the
coincidence: the two rising edges are less than T1 - T2 apart. One fast edge
later `q2` falls and `pd` rises.

Because `q2` has to be high first, a STOP that lands in the slow clock's
low half is not taken for a coincidence. The detector waits until it has
seen the slow clock high. There is one corner case. The very first fast edge
may already fall within T1 - T2 before a slow edge. Then no earlier
high sample exists, so that coincidence is skipped and the next one, one
vernier beat later (about 8 fast cycles), is used. The formula holds for
either coincidence, so the result is still correct. The measurement just
takes longer.

## The counts and the "- 2"

Both counters count from the start of their own oscillator. They stop as
follows:

* **Fine counter:** `pd` is produced from fast-clock edges, so it is
  synchronous to this counter. The fast edge that sets `pd` is still
  counted, and no later edge is. That edge is the second fast edge after
  the coincident one, so n2 = j + 1, where j is the number of the coincident
  fast edge.
* **Coarse counter:** it samples `pd` on slow edges. It still counts the
  first slow edge at which it sees `pd` high, and then stops. Its `stopped`
  output goes high on that edge and is brought out as `done`. The coincident
  slow edge k is followed by `pd` less than one slow period later, so
  n1 = k + 1.

The coincidence means slow edge k and fast edge j are less than T1 - T2
apart, so T ≈ (k - 1)·T1 - (j - 1)·T2 = T1·(n1 - 2) - T2·(n2 - 2). More
precisely, the computed interval exceeds the true one by more than 0 and at
most T1 - T2. The published waveforms of the implemented delay line end with
slow count 4 and fast count 3. With these counting rules, any interval
between 7.82 ns and 8.823 ns gives exactly those counts.

The error bound holds everywhere, but the steps of the output are not all
equal. Within one slow period the result rises in steps of exactly
T1 - T2. Where the true interval crosses a multiple of T1, one step is
shorter (799 ps with the default periods), because 7820 is not a whole
multiple of 1003.

## Interface and timing

```
vernier_tdc #(T1_PS = 7820, T2_PS = 6817, CNT_W = 8, TIME_W = 32)
  in:  start, stop, clear
  out: slow_clk, fast_clk, pd, done, n1[CNT_W], n2[CNT_W], interval_ps[TIME_W] (signed)
```

1. Raise `clear` and hold it for at least one slow period. This resets every
   flip-flop and switches both oscillators off. The clear acts on its rising
   edge and level, like an ordinary asynchronous reset. Then lower it.
2. Pulse `start`, then pulse `stop`. Only the rising edges matter, and STOP
   must not come before START.
3. Wait for `done`. It rises one slow edge after `pd`. Then `n1`, `n2` and
   `interval_ps` hold until the next clear. `interval_ps` is combinational
   from the counts.

`pd` rises at most on the 10th fast edge after STOP (about 61 ns), and
`done` follows within one slow period, so a result is ready less than 70 ns
after STOP. With 8-bit counters, n1 is at most 255, so intervals up to about
1.9 µs can be measured. Widen `CNT_W` for more range.
The oscillators keep running after `done` until the next clear.

## Choices not fixed by the original design

* **Clear:** one asynchronous, active-high clear for all flip-flops. The
  original circuit shows a Clear pin only on the edge-detector flip-flops.
* **Counter stop rules:** the rules above (count the `pd` edge on the fast
  side, and one edge past `pd` on the slow side) were chosen so that the
  published formula, with its "- 2", is exact to one resolution step.
* **`done` output and in-logic evaluation of the formula** (`interval_calc`)
  are additions. The counts alone are what the original circuit produces.
* **Widths:** 8-bit counters that wrap at 256, and a 32-bit signed result.
  They are not specified elsewhere.
* **Clock-domain crossing:** `pd` enters the slow-clock domain without a
  synchronizer, as in the original circuit. On hardware this flip-flop can
  go metastable when `pd` changes close to a slow edge.
* **Power:** the oscillators are not switched off at `pd`. Stopping them
  earlier would save power in a real implementation.

## Simulating

Every testbench is self-checking. It ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb \
    rtl/tdc_pkg.sv tb/tb_vernier_tdc.sv --top-module tb_vernier_tdc
./obj_dir/Vtb_vernier_tdc
```

Replace the testbench name to run another one. The converter's
asynchronous clears act on edges, so each testbench first raises `clear`
from low. This keeps the test valid in a two-state simulator that starts
registers at random values.

| Testbench | What it checks |
|---|---|
| `tb_edge_detector` | Set on the first rising edge, held through later pulses, asynchronous clear |
| `tb_ring_oscillator` | Exact period and high time for both settings, gating on and off, restart |
| `tb_phase_detector` | `pd` rises on exactly the fast edge predicted by edge arithmetic, for 60 random delays |
| `tb_coarse_counter` | Counts up to `pd`, plus one edge, then holds and raises `stopped` |
| `tb_fine_counter` | Counts the edge that raises `pd` and none after it, whether `pd` arrives with the edge or mid-cycle |
| `tb_interval_calc` | The formula against 64-bit integer arithmetic, corner cases and random counts |
| `tb_vernier_tdc` | End to end at the default parameters, as described below |

`tb_vernier_tdc` runs about 960 measurements with delays from 1 ps to
1.5 µs, including a 1–30 ns sweep in 37 ps steps. For each one it compares
n1 and n2 with counts predicted independently from edge arithmetic. It also
checks that the computed interval lies within (0, T1 - T2] above the true
delay, and that the sweep's output is monotonic with no step larger than one
resolution step. Finally it checks that each mechanism happened at least
once: a coincidence, a STOP in the slow clock's low half, a skipped first
coincidence, a restart after clear, and the 8.5 ns case that gives counts
4 and 3.

The oscillator model makes the measurement ideal. Jitter, period drift with
temperature and voltage, and gate delays in the phase detector and counters
are not modelled. On hardware these set the real resolution and linearity.
