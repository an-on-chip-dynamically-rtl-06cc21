# Dynamically recalibrated delay line for self-timed systems

A self-timed (clockless) chip that talks to clocked parts, off-chip memory
for instance, needs a known delay to time each access: long enough to meet
the memory's minimum timing, but no longer, or performance is lost. A fixed
on-chip delay must carry a large margin for process, voltage and temperature;
a fast crystal oscillator costs power and synchronisation.

This design gets an accurate delay from the slow 32.768 kHz crystal that an
embedded system already runs for its real-time clock. A tunable delay line is
periodically turned into a ring oscillator, its oscillations are counted over
one reference period (30.5 us), and the line is lengthened or shortened by
one cell depending on whether the count is above or below a threshold. Two
identical lines are used: while one serves requests the other is measured and
adjusted, then they swap. Calibration runs once a second, or back to back
("fast mode") while the delay is still far off, and the circuit is idle
between calibrations.

With the defaults (25 cells of 7.5 ns, threshold 254), a request on `din`
is acknowledged on `dout` after about 120 ns, within about one line step.

## Signal flow

```
             +-----------+     +---------+      +-----------+       +-----------------------+
 din  ------>| decoupler |---->| arbiter |----->| Q-element |--ro-->| double-buffered delay |
 dout <------|           |<----|  r2/g2  |      |           |<--ai--|  din/dout: line in use |
             +-----------+     |         |      +-----------+       |                       |
 swapreq ---------------------->  r1/g1  |--> toggle FF (dsel) ---->|  dsel                 |
 swapack <-------------- D1 <-------------                          |                       |
                                                                    |  cin/cout: line under |
   control module: NOR(rst, a) -> arbiter -> Q-element --cin------->|  calibration          |
                   counter <- grant           <---------cout--------|  sclk, slr            |
                   one-hot FSM on clk32, divider, >MAX_COUNT ------>|  fastmode             |
                                                                    +-----------------------+
```

The user path and the calibration loop are built from the same parts (an
arbiter, a Q-element and a line), so the period of the calibration
oscillator closely matches the delay a user request sees. That is what makes
the count a good measure of the user delay.

## How the delay is measured

This is the part that needs the most care.

**The oscillator.** In the control module a NOR gate drives the lower
(`r2`) request of an arbiter. The NOR's inputs are the global reset and the
acknowledge `a` of a Q-element, and the Q-element is driven by the arbiter's
lower grant. Its inner channel (`cin`/`cout`) runs through the line under
calibration. Follow one cycle: `a` is low, so the NOR requests. The grant
rises and the Q-element sends a rising and then a falling event through the
line. Then `a` rises, the NOR withdraws the request, the grant falls, `a`
falls, and the NOR requests again. One oscillation therefore takes two
passes through the line plus the arbiter and gate delays. A user request
(`din` up to `dout` up) takes the same two passes through the other line,
behind the same kind of arbiter and Q-element.

**Starting and stopping cleanly.** The upper arbiter input is the inverse of
the controller's `Scount` state. Outside `Scount` it holds the arbiter, so
the oscillator stops once its current cycle ends, and the grant that clocks
the counter never produces a runt pulse. The upper grant is deliberately
left unconnected: the controller just waits one reference period (`Swait`)
and assumes the arbiter has settled by then.

**Counting and deciding.** A ripple counter counts rising edges of the
lower grant during `Scount` (exactly one reference period). In `Slr` the
comparison `count > MAX_COUNT` is latched into `slr`:

* count above `MAX_COUNT`: the loop is faster than the target, so shift
  right (one more cell, longer delay);
* otherwise: shift left (one cell fewer).

So `MAX_COUNT = T_ref / T_target`. With T_ref = 1/32768 Hz = 30517.6 ns and
a 120 ns target, that gives 254. Because the line only moves one cell per
calibration, a settled line alternates between the two settings on either
side of the target. The result is always within about one step (two cell
delays, since both edges pass through the line) of the target.

**Offset between the two paths.** The calibration period also contains the
return-to-zero half of the handshake: the arbiter releasing and re-granting,
a few local-clock periods of the clocked arbiter. The user delay is measured
only up to `dout` rising. The settled user delay therefore sits a little
below T_target. In simulation, with 7.5 ns cells, the lines settle between
7 and 8 cells, and the user delay alternates between about 111 and 126 ns
for the 120 ns target.

## The tunable delay line (`tunable_delay_line`, `delay_cell`)

Each cell holds one bit of a shift register. The bits form a thermometer
code, zeros on the left and ones on the right. An event entering the line
passes through the delay element of every cell whose bit is 0. At the first
cell whose bit is 1 it is tapped onto a chain of OR gates that carries it
back to the line output. If all bits are 0 (the reset state), the event runs
through all cells and the end of the last cell feeds the OR chain, giving
the longest delay. So the number of delay elements in use equals the number
of leading zeros, from 0 to `N_CELLS`.

* Shift left (`slr = 1`): each bit takes its right neighbour's value and a 1
  enters at the right end. The first 1 moves left, one cell fewer.
* Shift right (`slr = 0`): each bit takes its left neighbour's value and a 0
  enters at the left end. One cell more.
* `min` is the leftmost bit (no delay elements in use). `notmax` is the
  rightmost bit (not all cells in use).

Cells past the tap carry no events, so spare cells for extreme conditions
cost no dynamic power. The delay element itself depends on the technology,
and `delay_element` is only a behavioural transport delay (7.5 ns default).
The OR chain has no modelled delay.

## Double buffering and the swap (`double_buffered_delay`, `swap_toggle`, `arbiter`, `decoupler`)

`dsel` chooses the lines' roles through two 2x2 crossbars:

| dsel | line 0      | line 1      |
|------|-------------|-------------|
| 0    | in use      | calibrated  |
| 1    | calibrated  | in use      |

`sclk` is gated so that only the line under calibration shifts, and a single
fast-mode detector watches the limit flags of that line.

A swap is a four-phase handshake. In `Sswap` the controller sets a
`swapreq` flip-flop. `swapreq` is the upper input of the arbiter in the user
path, so a swap is granted only between user requests. The grant toggles
`dsel`. After the matched delay D1 it returns as `swapack`, which clears
`swapreq`, and the grant and `swapack` then fall. The controller does not
wait for `swapack`. It relies on the swap finishing long before the next
calibration, at least five reference periods later. A user request that
arrives during a swap is simply delayed by the arbiter.

If the user held `din` high for a long time, the arbiter would stay granted
and the swap could slip into the next calibration. The decoupler prevents
this. It returns the inner handshake to zero as soon as it is acknowledged,
and holds `dout` high until `din` falls. `dout` falls only when `din` is low
and the inner handshake is idle, so the user cannot start a new request
early.

## Calibration control (`control_module`, `cal_fsm`, `ref_divider`, `ripple_counter`)

A one-hot state machine runs on the 32.768 kHz clock. Each state bit comes
straight from a flip-flop, so it is glitch free and is used directly as a
strobe or clock.

| state    | lasts      | does                                                         |
|----------|------------|--------------------------------------------------------------|
| SwaitHz  | until tick | idle; calibration circuitry dormant                          |
| Sclear   | 1 period   | clears the counter                                           |
| Scount   | 1 period   | releases the oscillator; the counter counts                  |
| Swait    | 1 period   | oscillator stopped; counter and comparator settle            |
| Slr      | 1 period   | its rising edge latches `count > MAX_COUNT` into `slr`       |
| Sshift   | 1 period   | is `sclk`: shifts the line under calibration                 |
| Sswap    | 1 period   | sets `swapreq`; also clears the counter                      |

After `Sswap` the machine goes back to `SwaitHz`, or straight to `Scount`
if `fastmode` is set. A fast-mode recalibration therefore repeats every five
periods (152.6 us). The tick comes from a ripple chain of 15 toggle
flip-flops (32768 / 2^15 = 1 Hz). The chain is sampled on the falling
reference edge and edge-detected into a one-period pulse. The first tick
comes 0.5 s after reset, when the last stage first rises, and then one per
second.

**Fast mode.** The detector stores the direction of each shift on `sclk`.
It sets `fastmode` when a shift goes the same way as the previous one and
the line is not yet at that end (`min` for left, `notmax` for right). The
limits are sampled before the shift. From reset, both lines start at the
maximum delay. The first two ticks shift left, which sets fast mode, and
both lines then converge within a few milliseconds. The detector is shared
and the lines alternate, so once settled the last two shifts (one per line)
sometimes agree. Fast mode then stays on intermittently and calibrations
come every 152 us instead of every second. This costs a little power but
does not hurt the delay. `FASTMODE_EN = 0` turns fast mode off completely.

## Self-timed elements

These three blocks have no published gate-level circuit here and are this
design's own implementations. Each is a small latch-based circuit:

* `q_element`: on `r+` it runs one full four-phase cycle on `ro`/`ai`
  before raising `a`. A latch `x` is set by `ai` and cleared when `r` and
  `ai` are both low. `ro = r & ~x` and `a = r & x & ~ai`.
* `decoupler`: `dout` is a latch, set by `ai` and cleared when `din` and
  `ai` are both low. `ri = din & ~dout & ~ai`.
* `arbiter`: a clocked mutual-exclusion element, as used where no analogue
  mutex cell is available (for example an FPGA). Input flip-flops sample the
  requests and a three-state machine (idle, grant 1, grant 2) drives the
  grants. Both run on a local clock (`local_clock_gen`, a behavioural gated
  oscillator, 4 ns). The clock runs only while a grant has to change: a free
  arbiter with a request, or a grant whose request has been withdrawn. A
  decision takes two to three local periods. A tie goes to `r1`. A
  full-custom version would use an analogue mutex instead.

## Parameters (top level `recal_delay_top`)

| parameter        | default | meaning                                                            |
|------------------|---------|--------------------------------------------------------------------|
| `N_CELLS`        | 25      | cells per line                                                     |
| `CELL_DELAY_PS`  | 7500    | delay element model, ps (FPGA cells are 7-8 ns)                    |
| `MAX_COUNT`      | 254     | oscillations per reference period at the target (30517.6 ns / 120 ns) |
| `COUNT_W`        | 16      | counter width                                                      |
| `DIV_STAGES`     | 15      | reference divider stages (2^15 periods = 1 s)                      |
| `LCLK_PERIOD_PS` | 4000    | arbiter local clock model, ps                                      |
| `D1_PS`          | 5000    | swap matched delay model, ps                                       |
| `FASTMODE_EN`    | 1       | 0 disables fast mode                                               |

To change the target, set `MAX_COUNT = round(30517.6 ns / target)`. Make
sure `N_CELLS` is enough for twice the slowest cell delay to still reach the
target.

## Top-level interface and timing

* `clk32`: the free-running 32.768 kHz reference. `rst`: asynchronous,
  active high. It clears both lines to maximum delay, selects line 0 and
  puts the controller in `SwaitHz`. Keep `din` low during reset.
* `din`/`dout`: four-phase. Raise `din` and wait for `dout` to rise (the
  calibrated delay). Lower `din` and wait for `dout` to fall (a few ns).
  Before the first calibrations, the delay is that of the full line (about
  380 ns).
* Observation outputs: `dsel`, `fastmode`, `sclk`, `slr`, `swapreq`,
  `swapack`, the one-hot `cal_state` (type `recal_pkg::cal_state_t`),
  `cal_count` and both shift registers (bit 0 is the input end).

## Files

`rtl/` holds one module or package per file:

* `recal_pkg`: shift-direction constants, one-hot state type.
* `recal_delay_top` instantiates `decoupler`, `arbiter`, `q_element`,
  `swap_toggle`, `double_buffered_delay` and `control_module`.
* `double_buffered_delay` instantiates `crossbar_switch` (x2),
  `tunable_delay_line` (x2) and `fastmode_detect`.
* `tunable_delay_line` instantiates `delay_cell` (xN), and each
  `delay_cell` instantiates a `delay_element`.
* `control_module` instantiates `ref_divider`, `cal_fsm`, `arbiter`,
  `q_element` and `ripple_counter`.
* `arbiter` instantiates `local_clock_gen`.
* `swap_toggle` instantiates a `delay_element` as D1.

`tb/` has one self-checking testbench per module (`tb_<module>.sv`) plus:

* `tb_recal_delay_top`: end to end with a 16-period tick. It covers fast
  mode, swaps, requests that meet a swap, `din` held across a swap and a
  heating step, and checks every settled delay against the target.
* `tb_recal_delay_top_full`: all defaults. It covers the first real 1 Hz
  ticks at 0.5 s and 1.5 s, fast-mode convergence, and 200 delays checked.
  It takes about 3 s to run.
* `tb_temperature_sweep`: fast mode off, one pulse after every swap. The
  cell delay follows a heat, cool and re-heat profile, with line 1 4 %
  slower than line 0. It checks that the lines track the temperature and
  that steps are larger when hot.

Every testbench prints `TB_RESULT checks=<n> failures=<n>`.

## Simulating

Verilator 5 with timing support:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/recal_pkg.sv tb/tb_recal_delay_top.sv --top-module tb_recal_delay_top
./obj_dir/Vtb_recal_delay_top
```

Substitute any other testbench name. Every file sets `timeunit 1ns;
timeprecision 1ps`. The delays are real time, so the behavioural models
(`delay_element`, `local_clock_gen`) need `--timing`.

## How far to trust it, and where it departs from the published design

* **Behavioural parts.** `delay_element` (the cell delay and D1) and
  `local_clock_gen` are models, not logic. In silicon they are a
  technology-specific delay and a gated ring oscillator. All the absolute
  delays, and so the cell count that settles, come from these models.
  Temperature is emulated by changing the model delays at run time.
* **Structure.** The structure follows the published design: the
  cell-by-cell line, the shared fast-mode detection, the crossbars, the
  toggle flip-flop with D1 and the arbiter that guards the swap. It also
  follows the published control unit: Q-elements in both paths, NOR with
  reset, ripple counter, one-hot FSM and divider.
* **Own choices.** The gate-level Q-element, decoupler and crossbar; the
  arbiter's states and clock gating; the slr encoding and which `dsel`
  selects which line; the D1 and local-clock values; the 16-bit counter;
  and the 1 Hz edge detection.
* **MAX_COUNT.** It is derived from the 120 ns target rather than given.
* **Fast-mode loop.** The published figure for fast mode is five reference
  periods, but the published state list would give six. Here `Sswap`
  returns straight to `Scount`, and the counter is also cleared in `Sswap`.
* **Cell count.** The FPGA prototype needed 10 to 13 cells of 7-8 ns for
  120 ns, because of routing outside the line. This model has no such
  routing, so it settles at 7 to 8 cells. Each pass uses both edges.
* **Not built.** Two things are only suggested as extensions: changing the
  requested delay at run time, and using the line as a clock generator.
  Neither is built. A constant offset delay in front of the line is
  mentioned as an option and is not built either.
* **Synthesis.**
  * The design uses gated and derived clocks on purpose: state bits clock
    the `slr` and `swapreq` flip-flops, and the counter and divider ripple.
  * It contains latches: the Q-element, the decoupler and the clock model.
  * It contains self-timed loops. With a line at its minimum, the
    Q-element, crossbar and line form a combinational loop that lint tools
    report. The loop is intended and settles after one handshake.
  * Timing closure for such a circuit needs the usual relative-timing
    constraints, which are not part of this RTL.
  * The two paths must be laid out alike. Any mismatch shows up directly
    as a delay error.
