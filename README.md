# Timing-slack monitoring with in-clock-tree detection windows

Adaptive voltage and frequency scaling needs to know, at run time, how close
the chip's critical paths are to failing. This design watches that margin
directly on the flip-flops that end the critical paths. Next to each such
flip-flop a small **sensor** watches its D input. A **clock-tree cell (CC)**
at the flip-flop's clock leaf generates a short pulse, CP, that opens a
**detection window** just before the flip-flop's clock edge. If the data
input still changes inside that window, the path has almost no slack left.
The sensor then latches a **warning**. This happens while the flip-flop
still captures correct data, so the system can lower the frequency or raise
the supply before an error happens. Nothing has to be replayed.

The RTL models the monitoring system of a 32-bit VLIW DSP block:

- 50 monitored endpoint flip-flops;
- 19 sensors, each shared by up to four endpoints;
- 11 clock-tree cells, each serving several sensors and their flip-flops.

The sensor and the clock-tree cell are custom transistor-level standard
cells, so they are written here as **behavioural models with picosecond
delays**. They are meant for simulation only. They reproduce the cells'
characterised timings, not their transistors. The only synthesizable logic
is the endpoint flip-flops and the wiring between the parts.

## Files

| file | contents |
|---|---|
| `rtl/tsm_pkg.sv` | characterised timing constants (sensor tables by input count, clock-tree cell delays), the `dw_sel_e` window-select type |
| `rtl/clock_tree_cell.sv` | behavioural model of the programmable clock-tree cell |
| `rtl/slack_sensor.sv` | behavioural model of the 1- to 4-input timing-slack sensor |
| `rtl/slack_monitor_system.sv` | top: endpoint flip-flops, sensors and clock-tree cells wired together |
| `tb/tb_clock_tree_cell.sv` | edge-timing checks of the clock-tree cell |
| `tb/tb_slack_sensor.sv` | window, reset and enable checks of the sensor |
| `tb/tb_slack_monitor_system.sv` | end-to-end test of the full-size system |
| `tb/tb_fmax_sensor_sweep.sv` | clock-period sweep: warning-free against error-free frequency |

## The detection window (the part to understand first)

All times are relative to the leaf clock edge, for the default (mean, 1.1 V,
25 °C) clock-tree cell timings:

| event | DW1 (narrow) | DW2 (wide) |
|---|---|---|
| CLK_DFF rises (flip-flop samples) | 231 ps | 231 ps |
| CP rises | 224 ps | 173 ps |
| CP falls (CP width `dw`) | 330 ps (106) | 387 ps (214) |

The CP pulse straddles the flip-flop clock edge. It starts a little before
the edge (7 ps with DW1, 58 ps with DW2) and ends about 100 to 150 ps after
it. The sensor does not react to the pulse itself. It reacts to input
transitions that reach its internal discharge path while CP is high.

Each input drives an inverter chain. A transition briefly turns on one of two
transistor stacks, one for rising and one for falling inputs. The node C of
the latch is pulled down only if that short conduction interval overlaps the
CP pulse long enough. So the **effective window**, in terms of the input
transition time `t`, is

    t_CP_rise - InCpRise  <=  t  <=  t_CP_fall - InCpFall

- `InCpRise` (In_A-to-CP_r) says how far ahead of CP a transition can be and
  still be caught.
- `InCpFall` (In_A-to-CP_f) says how long before CP ends a transition must
  arrive to discharge C completely.

The window width is `dw + InCpRise - InCpFall`. The model captures the
sensor only through these characterised quantities.

Effective windows relative to the CLK_DFF edge (negative means before the
edge):

| sensor inputs | InCpRise / InCpFall | DW1 window | DW2 window |
|---|---|---|---|
| 1 | 63 / 98 ps | −70 … +1 ps | −121 … +58 ps |
| 2 | 53 / 102 ps | −60 … −3 ps | −111 … +54 ps |
| 3 | 54 / 110 ps | −61 … −11 ps | −112 … +46 ps |
| 4 | 48 / 105 ps | −55 … −6 ps | −106 … +51 ps |

How to read the table:

- **Narrow window (DW1).** For sensors with two or more inputs, the window
  ends a few ps before the clock edge. A transition that the sensor flags is
  therefore still captured correctly: a warning, not an error. The gap
  between the end of the window and the flip-flop's setup window is the
  guard margin. A transition inside that gap is neither flagged nor an error
  in this model. In silicon the gap must stay small, or a fast slowdown
  could pass through it unseen.
- **Wide window (DW2).** The window opens earlier, so warnings come with
  more margin. It also extends past the clock edge, so a late transition can
  be flagged when it is already an error.

Choosing between the two windows trades timing margin against resolution.
The intended use is to switch to the wider window when process spread (low
supply voltages) makes the narrow one unreliable.

Short paths that end at a monitored flip-flop must not toggle inside the
window, or they raise false warnings. In silicon this is solved with hold-style
buffers on those paths. Here it is the driver of `d`'s responsibility.

## Clock-tree cell (`clock_tree_cell`)

The cell is built from these parts:

- an input buffer, giving node n1;
- a delay D1 from n1 to **CLK_DFF**;
- a pulse generator: an inverting delay D2 (node n2) and a two-input NAND of
  n1 and n2. On each rising edge, node n3 is low for D2;
- an inverting delay D3 that turns that low pulse into the positive **CP**
  pulse.

D2 sets the pulse width. D1 and D3 set where the pulse sits relative to
CLK_DFF. Falling clock edges make no pulse.

`dw_sel` (DW1/DW2) switches D2 and D3 between the two characterised
settings. CLK_LEAF to CLK_DFF is 231 ps in both settings, so the window can
be switched without disturbing the clock skew.

The published timings are end-to-end means: 231, 224/173 and 106/214 ps. The
split into a 20 ps buffer, a 10 ps NAND, D1 and D3 is this model's own. All
delays are transport delays, so a pulse shorter than a delay still passes.

## Sensor (`slack_sensor`)

`N_IN` (1 to 4) transition detectors share node C and a weak-feedback latch.
`qn` is active low and means "at least one input changed in the window".
Sharing the latch saves area:

| sensor | transistors | per monitored bit |
|---|---|---|
| 1-input | 22 | 22 |
| 4-input | 58 | 14.5 |

For comparison, a minimum flip-flop has 26 transistors. The cost of sharing
is slower timing, which is why the timing defaults depend on `N_IN`:

| inputs | In-to-QN rise/fall | RN-to-QN | RN min low |
|---|---|---|---|
| 1 | 156/203 ps | 221 ps | 165 ps |
| 2 | 263/302 ps | 404 ps | 215 ps |
| 3 | 278/322 ps | 531 ps | 280 ps |
| 4 | 295/359 ps | 573 ps | 320 ps |

These are worst-process, 1.05 V, 125 °C figures.

Behaviour of the model:

- **Detection.** A detected transition pulls `qn` low In-to-QN after the
  input edge. The rise or fall value is used according to the input edge's
  direction.
- **Reset.** `rn` must be low for at least "RN min low". `qn` then returns
  high RN-to-QN after `rn` fell. A shorter pulse leaves the warning in place.
  While `rn` is low, nothing is latched.
- **Enable.** `sel` is the enable of the discharge path (transistor T6).
  With `sel` low the sensor never warns.

The model decides on each transition `InCpFall + 1` ps after it. By then
every CP edge that matters is known. The model compares the recorded CP
edge times rather than the level of `cp`, so a CP edge that falls on that
same picosecond cannot cause a race. The timings must satisfy
`InCpRise <= InCpFall < In-to-QN`. Elaboration checks this.

## The monitored block (`slack_monitor_system`)

Parameters: `N_EP = 50` endpoints, `N_SENS = 19` sensors, `N_CC = 11`
clock-tree cells.

Grouping:

- Endpoints are dealt to sensors in order. Sensor `s` watches endpoints
  `floor(s*N_EP/N_SENS)` to `floor((s+1)*N_EP/N_SENS)-1`. With the defaults
  that is two or three endpoints per sensor.
- Sensor `s` and its flip-flops use clock-tree cell `floor(s*N_CC/N_SENS)`.

In a chip the grouping follows placement: nearby endpoints share a sensor,
up to four. The order used here is only a stand-in. Elaboration rejects a
configuration that needs more than four inputs on a sensor.

Ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk_leaf` | in | 1 | leaf clock, fed to every clock-tree cell (the clock tree in front of the cells is ideal) |
| `dw_sel` | in | `dw_sel_e` | DW1 / DW2 window of all cells |
| `sensor_sel` | in | 1 | enable of all sensors |
| `rn` | in | 1 | active-low reset of all warning latches |
| `d` | in | `N_EP` | ends of the monitored critical paths |
| `q` | out | `N_EP` | endpoint flip-flop outputs |
| `qn` | out | `N_SENS` | active-low warning of each sensor |

The endpoint flip-flops are plain rising-edge flip-flops without reset,
clocked by their cell's CLK_DFF. The warnings are not combined: what to do
with them (a voltage/frequency policy) belongs to the system around this
block.

## How far the models can be trusted

The models reproduce one timing corner of the characterised cells. Beyond
that:

- **No variation.** There is no voltage, temperature or process dependence
  and no statistical spread.
- **All-or-nothing detection.** Partial discharge of node C (a transition
  just outside the window) is never detected.
- **No setup time.** The flip-flops have zero setup time, so "error" here
  means "arrived after the clock edge".
- **Minimum CP width not enforced.** The sensor's characterised minimum CP
  high time (about 165 ps) is longer than the narrow 106 ps window, yet the
  narrow window is meant to work. The model follows the intended use and
  does not enforce the minimum.
- **Window edges are an interpretation.** The characterisation gives
  In-to-CP as a "rise/fall" pair. It is read as the values at the CP rising
  and falling edges. It might instead belong to rising and falling input
  transitions, which would make the window depend on the data direction.
- **Not modelled:**
  - the host DSP itself;
  - the clock tree with its clock gating;
  - the zero-delay placement cells between each path and its flip-flop and
    sensor;
  - the buffers added to short paths;
  - any adaptive controller.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends by itself.
All files use `timeunit 1ps`. Example, the full-size end-to-end test:

    verilator --binary --timing --assert --no-sched-zero-delay \
      rtl/tsm_pkg.sv rtl/clock_tree_cell.sv rtl/slack_sensor.sv \
      rtl/slack_monitor_system.sv tb/tb_slack_monitor_system.sv \
      --top-module tb_slack_monitor_system
    obj_dir/Vtb_slack_monitor_system

For the other testbenches, swap in their file and top module. The cell
testbenches need only the package and their cell. `--no-sched-zero-delay`
is valid because no delay in the models is ever zero. Without it, Verilator
stops on its zero-delay warnings unless `-Wno-fatal` is given.

- `tb_slack_monitor_system`. Runs at the default size. For every endpoint it
  checks:
  - capture by the flip-flop;
  - that exactly the right sensor warns for data 30 ps before the edge.

  It also covers:
  - the window switch (90 ps before the edge warns only with DW2);
  - early data that never warns;
  - late data that is captured a cycle late, missed by the narrow window
    and flagged by the wide one;
  - disabled sensors;
  - resets.

  It counts each of these and fails if one never happened.
- `tb_slack_sensor`. Places single transitions around a CP pulse, to the
  picosecond at both window edges. It does this for a 4-input and a 1-input
  sensor and both window widths. It also checks In-to-QN and RN-to-QN
  timing, short reset pulses, and that a warning is held.
- `tb_clock_tree_cell`. Measures every output edge in both window settings.
- `tb_fmax_sensor_sweep`. A 1780 ps critical path ends at endpoint 0. The
  test lowers the clock period in 1 ps steps and finds where warnings start
  and where errors start. Results: the warning-free frequency is 96.7 % of
  the error-free one with DW1 and 94.1 % with DW2. The warning always comes
  first. Silicon characterisation reported about 94 % and 90 % at typical
  conditions; the difference comes from the model's zero setup time and
  single corner.

## Changing the design

- **Sizes.** `N_EP`, `N_SENS` and `N_CC` are parameters of the top. Keep
  `ceil(N_EP/N_SENS) <= 4` and `N_CC <= N_SENS`.
- **Sensor timings.** Every timing of a sensor is a parameter. Its default
  comes from the `tsm_pkg` tables for its `N_IN`. Override them to model
  another corner.
- **Clock-tree cell timings.** The cell's end-to-end delays are parameters
  of `clock_tree_cell`. A single-window cell is the same model with
  `dw_sel` tied to one value.
