# Two-pin run-time debug controller for FPGA-emulated circuits

When a circuit is prototyped in an FPGA and run inside its real system, the
interesting failures happen at full speed and deep inside the design, where a
simulator's stimuli never reach. This controller is a small block inserted
next to the circuit under debug. It lets a host computer

* stop the circuit on programmed conditions, exactly on the clock cycle where
  a watched group of signals takes a programmed value;
* step the frozen circuit one clock cycle at a time;
* take a snapshot of every flip-flop after the stop and after every step,
  using the FPGA's built-in state-capture primitive and configuration readback
  (these are device resources, not part of this RTL);
* find out which condition fired, because the event flags are ordinary
  flip-flops captured along with the user's registers.

All of this costs the circuit under debug only two pins: an open-collector
**event line** and a **resume line**.

## The main idea: freeze with the clock enable, not the clock

The FPGA clock is never stopped or gated. Clock managers need many cycles to
lock and cannot simply pause, and gating a clock invites glitches. Instead,
every flip-flop of the circuit under debug that is to be frozen is given the
controller's `clock_enable`:

```systemverilog
always_ff @(posedge clk) if (clock_enable) q <= d;
```

Only the flip-flops wired to `clock_enable` freeze. A circuit may therefore be
frozen in part, and the controller's own flip-flops always keep running.

The controller drops `clock_enable` in the same cycle the stop condition
appears (the comparators and the enable path are combinational), so the
circuit holds the very state that matched and no cycle is lost. A step is one
cycle with the enable high.

## The event line: one wire, two directions

The event pad is open-collector with an external pull-up, so both the
emulator and the host can pull it low and it reads high only when neither
does.

| Situation | Emulator | Host | Line |
|---|---|---|---|
| Circuit running, no event | pulls low | releases | low: "running" |
| Event held | releases | releases | high: "event, frozen or snapshot taken" |
| Host requests a step | releases | pulls low, then releases | low, then high |

While running, the emulator holds the line low. Every condition's event flag
is ORed together, and when any flag is set the emulator lets go and the
pull-up takes the line high, which the host sees. While frozen, the host uses
the same line to ask for single steps: each low-then-high pulse gives exactly
one enabled clock cycle. The rising edge of the line at the moment of the
freeze is the emulator letting go and not a host request. The step machine
therefore first waits for the line to read high (state `ST_RELEASE`) and
only then starts looking for a host pulse.

The **resume line** is a plain input. A rising edge erases all event flags and
lets the circuit run again.

## Timing of one debug session

Cycle by cycle, with the default two-stage synchronisers:

1. **Stop.** In the cycle where `watch[i] == ref_value[i]`, `clock_enable` is
   0. The circuit keeps that state. On the clock edge that ends the cycle the
   event flag `i` is set.
2. **Capture.** In the next cycle (`ST_FREEZE`) `capture` is 1. The snapshot
   taken on that edge therefore holds the matching state *and* the flag that
   names the condition.
3. **Line goes high** on the same edge that sets the flag, because the pad
   driver is released then. The host polls the line, waits for the capture
   to complete, and then reads the snapshot back.
4. **Step.** The host pulls the line low and lets it go. The step cycle
   (`ST_STEP`, enable high) starts on the third clock edge after the line
   rises: two edges for the synchroniser, one for the state machine. The
   next cycle (`ST_CAPTURE`) raises `capture` with the enable low, so the
   snapshot holds the state after the step. If the host already holds the line
   low in that capture cycle, the request is kept (`ST_LOW`).
5. **Resume.** A rising edge on the resume line erases all flags three clock
   edges later. After a resume each condition is masked until the circuit has
   advanced one enabled cycle. Without this mask, a condition that still
   matches the frozen state would stop the circuit again at once, and resume
   could never move it.

### Freeze mode and snapshot mode

After an event the circuit can either stay frozen or run on. Staying frozen
keeps every cycle but loses step with the outside world. Running on keeps
real time but gives only one snapshot. The `freeze_mode` input selects which.
With `freeze_mode = 0` the enable never drops. One cycle after a new event,
`capture` is raised once, so the snapshot holds the state one cycle after the
match together with the flags. The event line still goes high, and resume
erases the event.

## Blocks

| File | Block | What it does |
|---|---|---|
| `rtl/unshades_debug.sv` | top | wires N conditions, detectors, line driver, synchronisers and the step machine |
| `rtl/condition_comparator.sv` | condition | equality of `WIDTH` watched bits with a programmed value, combinational |
| `rtl/event_detector.sv` | detector | holds one event until resume; masks its condition after resume until the circuit advances |
| `rtl/event_line_driver.sv` | event line | ORs the flags onto the pad (driver enable), forms the combined `stop` and `onset` |
| `rtl/edge_detector.sv` | edge detector | `SYNC_STAGES`-deep synchroniser plus rising-edge pulse; one for resume, one for the event line |
| `rtl/step_fsm.sv` | step machine | run / freeze / wait-release / held / low / step / capture states; drives `clock_enable` and `capture` |
| `rtl/unshades_pkg.sv` | package | `step_state_t` state enum |

### Top-level ports (`unshades_debug`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock shared with the circuit under debug; asynchronous active-low reset |
| `freeze_mode` | in | 1 | 1 = stay frozen on an event, 0 = snapshot and run on |
| `watch` | in | `N_EVENTS`×`WATCH_W` | signals watched by each condition |
| `ref_value` | in | `N_EVENTS`×`WATCH_W` | value each condition compares against; tie to constants in use |
| `event_line_in` | in | 1 | level sensed on the event pad |
| `event_pull_low` | out | 1 | 1 = drive the event pad to ground (the output enable of an open-drain pad driving 0) |
| `resume_line` | in | 1 | resume pad level |
| `clock_enable` | out | 1 | enable for every frozen flip-flop of the circuit under debug |
| `capture` | out | 1 | capture request for the FPGA state-capture primitive (its CAP input) |
| `frozen` | out | 1 | 1 while the circuit is held |
| `event_flags` | out | `N_EVENTS` | held flag of each condition; wire into the captured state |
| `step_state` | out | 3 | step machine state, for observation |

Parameters: `N_EVENTS = 4`, `WATCH_W = 16`, `SYNC_STAGES = 2`. The number of
conditions and their width are left open by the original design, which allows
any number. These defaults are this implementation's choice, so change them
freely. At the defaults the controller synthesizes to about 80 word-level
cells and fewer than 20 flip-flops.

## What is outside this RTL

* **State capture and readback.** In the FPGA, a vendor primitive copies all
  flip-flops into configuration memory in one cycle. The host then reads
  them through the byte-wide configuration port. Neither is logic you
  write; the controller only drives the capture request. `tb/capture_model.sv`
  is a behavioural stand-in that takes the state explicitly and reads it back
  one byte at a time.
* **Pads and pull-up.** The event pad's three-state driver and resistor are
  pad resources. The testbench resolves the line as
  `event_line = ~(event_pull_low | host_pull_low)`.
* **The host side.** The board, host software, waveform output and the
  planned editing of flip-flop contents while frozen are not hardware in this
  design.
* **Inserting the controller** into a synthesized netlist, and connecting
  `clock_enable` to every flip-flop, is done by the flow that uses it.

## Where this implementation makes its own choices

The source design fixes the principle: enable-based freeze, one comparator
per event, events ORed onto an open-collector line that reads low while
running, one cycle per rising edge of that line, capture when the enable is
deasserted and again after each step, and a resume line through an edge
detector that erases the events. The following are choices of this
implementation:

* equality as the comparison (no masks or ranges) and reference values as
  ports;
* the rising edge on the resume line, and two-stage synchronisers on both
  lines;
* the post-resume mask in each event detector;
* the wait for the event line to read high before steps are accepted;
* capture in the first frozen cycle rather than in the matching cycle, so
  the snapshot also holds the event flags; in snapshot mode this means the
  state is one cycle past the match;
* the `freeze_mode` input that selects between staying frozen and running on;
* asynchronous active-low reset and the state encoding.

The original design's resource claim (well under a hundred gates for the step
circuit) is met in spirit: the step machine is a 3-bit state register, a
snapshot flag and a few gates. A vendor "system gate" count cannot be
compared directly with these cells.

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The end-to-end test `tb/tb_unshades_debug.sv`
runs the top at its default parameters together with a small circuit under
debug (`tb/debug_target.sv`, a counter and an LFSR), the capture model and a
host. The host freezes on a count, steps five times, resumes, freezes on an
LFSR value, resumes while that condition still matches, sees two conditions
fire together, and takes a snapshot in run-on mode. Every snapshot is read
back and checked.

`tb/tb_unshades_single.sv` runs the smallest form, with one condition, an
8-bit watch and three-stage synchronisers. It makes 40 steps with random
host timing and checks that each step starts `SYNC_STAGES + 1` clock edges
after the host releases the line.

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  --top-module tb_unshades_debug rtl/unshades_pkg.sv tb/tb_unshades_debug.sv
./obj_dir/Vtb_unshades_debug
```

Replace the top-module name and file to run another block's testbench (for
example `tb_step_fsm`). The package must be given first. The step machine
carries two concurrent assertions: a step is exactly one enabled cycle
followed by a capture cycle, and the enable stays low while frozen and not
stepping. `--assert` enables them.
