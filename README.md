# Self-adaptive clock generator for dynamic frequency scaling

This is a clock source that sets its own frequency from how fast the chip's logic
actually is. A ring oscillator made of ordinary logic gates produces the clock. A few
time-to-digital converters (TDCs), placed around the die, measure how far a transition
travels through a chain of gates in one clock period. A small controller then lengthens
or shortens the ring until the *worst* sensor reads exactly the requested number of
stages, the **setpoint**.

Three properties follow from this:

* **Uniform variation.** A uniform change of process, voltage, temperature or ageing
  (PVTA) slows the ring as much as the logic it clocks, so the period follows it
  without any help from the loop.
* **Local variation.** A local slow spot shows up as a low TDC reading, and the loop
  lengthens the ring until that spot meets the setpoint again.
* **Frequency selection.** The setpoint acts as a frequency-select input. A larger
  setpoint asks for a deeper propagation per cycle, so it gives a longer period,
  nearly linear in the setpoint.

Everything is digital except the ring and the delay lines. Their delays are physical,
so this RTL gives them as behavioural models with calibrated delays (see
[Models and calibration](#models-and-calibration)).

## The loop

```
             setpoint (4b)
                 |
  +-------+  crs[0]   +-----+ crs_min +----------------+ l_vlro +---------+ pass/sel +------+
  | tdc 0 |---------->|     |-------->| adapt_control  |------->| vlro_   |--------->| vlro |--> clk_vlro
  +-------+    ...    | tdc_|         |  Err = SP-Crs* |  (5b)  | decoder |  (30b    |      |      |
  | tdc 3 |---------->| min |         |  L = Lprev+Err |        +---------+   each)  |      |      |
  +-------+  crs[3]   +-----+         +----------------+--- e_config -------------->|      |      |
      ^                                       ^                                     +------+      |
      |                                       |                                                   |
      +------------------ clk_global <-------- global clock buffer (outside) <-------------------+
```

| Module | Role |
|---|---|
| `adaptive_clock_system` | Top level. Four sensors, min, control, decoder, oscillator. |
| `tdc` | Sensor: sequencer, trigger flop, offset delay, 15 stages, encoder. |
| `tdc_stage` | One delay stage (k gates) plus its capture flop. |
| `delay_chain` | Behavioural chain of gates, used for the offset and stage delays. |
| `tdc_encoder` | Turns the captured taps into the number of stages crossed. |
| `tdc_min` | Picks the smallest reading, Crs* (the slowest region). |
| `adapt_control` | Setpoint and L_prev registers, error, new length, its own sequencer. |
| `vlro_decoder` | Turns the length into the Pass and Select vectors. |
| `vlro` | Behavioural ring oscillator, with synthesizable control registers. |
| `adapt_fsm` | Sequencer. One copy sits in every sensor and one in the control block. |
| `adapt_pkg` | Widths, default timing constants and the phase enum. |

Default sizes: 4-bit setpoint and readings, so 15 stages per sensor. The length is
5 bits, for a 32-stage ring and 30-bit Pass/Select vectors. There are four sensors.

## One adaptation round

Every sequencer shares the same reset and the same global clock, so they all step
together. No strobes are wired between the sensors and the control block, and an
assertion in the top checks that they stay in step. One round lasts 8 global cycles:

| Cycle | Phase | What happens at the end of the cycle |
|---|---|---|
| 0 | `PH_TRIG` | The trigger flop goes high and launches a rising edge into the offset delay. |
| 1 | `PH_CAPTURE` | This is one period after the launch. Every stage flop samples its delay output. The setpoint register loads SP, and `L_prev` loads the length now in use. The trigger flop goes low. |
| 2–5 | `PH_WAIT` | Readings go through the encoder, min, subtract, add and decode. This path gets several cycles. |
| 6 | `PH_CONFIG` | `e_config` is high. The oscillator's control registers load the new Pass/Select. |
| 7 | `PH_IDLE` | The new period settles before the next launch. |

Config comes `CONFIG_WAIT` = 5 cycles after Capture. `IDLE_WAIT` = 1 is this design's
own choice. Both are parameters of `adapt_fsm`, passed down from the top.

The control law is

```
Err    = SP − Crs*              (signed, Crs* = min over sensors)
L_VLRO = clamp(L_prev + Err, 1, 31)
```

Nothing changes between a Config and the next Capture, so `L_prev` always holds the
length the ring is running with. The loop is therefore a pure integrator of the error.
The gain per round is (change of Crs* per unit of length), which is below 1 for the
default sizes, so the loop converges without overshoot:

* A step of the setpoint from 1 to 14 settles in two or three rounds.
* Setpoints 1..14 settle at ring lengths 3..18.

The loop cannot always hit the setpoint exactly, because one unit of length may move
the reading by more than one stage. In that case Crs* either locks at the setpoint
with one of two neighbouring lengths, or it alternates above and below the setpoint
in a limit cycle. With the default calibration every setpoint locks. The testbenches
accept either behaviour. Setpoints 0 and 15 are best avoided: a sensor saturates at 0
and 15, so at those values the error keeps its sign and drives the length into the
clamp.

## Two clocks: local and global

The ring output `clk_vlro` leaves the block. It is meant to go onto the chip's global
clock network (a global buffer or clock tree), and it comes back as `clk_global`. All
logic runs on `clk_global`, except the oscillator's own Pass/Select registers, which
run on `clk_vlro`. That way, a length change happens on an edge of the ring itself.

`e_config` is generated in the global domain, so it lags the local clock by the buffer
delay. It stays high for one global cycle. Exactly one local edge sees it, provided
**the buffer delay is shorter than one clock period** (about 8 ns at the shortest
setting). The Pass/Select inputs have been stable for several cycles by then.

A new length is loaded on a local rising edge and takes effect from the following
half-period. So the period that contains the load is a mix of the old and new
lengths, and the next launch/capture pair already sees a clean new period.

## The sensor

`tdc` launches a rising edge at one global clock edge and captures the delay line at
the next. Stage `s` (0-based) reads 1 if its output edge has arrived, that is if

    (OFFSET_GATES + (s+1)·STAGE_GATES) · GATE_PS  <  T_clk

The encoder returns the length of the run of ones from tap 0 (0..15). It does not
count all ones. At short periods, the falling edge of the previous pulse can still be
travelling near the end of the line, and it would otherwise add to the reading.

* **Offset delay.** The offset shifts the reading window.
* **Stage length.** The stage length sets the resolution.

The per-sensor parameter arrays `OFFSET_GATES` and `STAGE_GATES` of the top default
to 16/8, 14/7, 12/6 and 10/5 gates. This emulates a die whose regions differ in
speed: sensor 0 is the slowest, so it is the one the loop regulates.

## Models and calibration

Two parts cannot be ordinary RTL.

* **`delay_chain`** is a chain of `GATES` buffers with a delay of `GATE_PS` each,
  written as delayed continuous assignments. In hardware, the cells must be kept and
  placed as a real chain. The gates themselves are ordinary logic.
* **`vlro`** models the ring: a length L closes the loop at stage L, and the output
  toggles every `(L+1)·STAGE_PS`. The internal structure of the glitch-free ring, and
  the exact bit meaning of Pass and Select, are not specified here beyond the
  following convention, which `vlro_decoder` and `vlro` share:
  * stage 0 is always in the loop, and stage 31 always turns the wave back;
  * `pass[j]` = stage j+1 forwards the wave (j+1 < L);
  * `sel[j]` = stage j+1 closes the loop (j+1 = L).

  The control registers in `vlro` are ordinary flip-flops. If you replace the model
  with a real ring, keep them and keep this decoding, or change the decoder to match.

The delays are calibrated so that the closed loop reproduces FPGA-scale numbers:
`GATE_PS` = 300 ps per gate and `STAGE_PS` = 1052 ps per ring stage. These values are
this design's own choices.

The odd 1052 ps is deliberate. With it, a clock period 2·(L+1)·1052 ps can never equal
a delay-line arrival time, which is a multiple of 300 ps, for any gate count. A
simulated sensor therefore never samples an edge at exactly the moment it moves, and
results do not depend on the simulator's event order. With these values, the settled
clock periods for setpoints 1..14 are:

| Sensors (stage/offset gates) | Period at SP 1 | Period at SP 14 |
|---|---|---|
| 8/16 (all four) | 8.4 ns | 40.0 ns |
| 9/18 (all four) | 10.5 ns | 44.2 ns |
| 10/20 (all four) | 10.5 ns | 48.4 ns |

The slope is about 2.4–2.8 ns per setpoint step, and slower sensors always give the
longer clock. The models do not vary delay with supply voltage or temperature.

* **Uniform slowdown.** Scale `GATE_PS` and `STAGE_PS` together. The loop then keeps
  the same ring length, and the period scales by itself (`tb_uniform_slowdown`).
* **Local slowdown.** Change one sensor's gate counts.

## Where this design makes its own choices

* Reset is asynchronous and active high everywhere. After reset, `L_prev` and the
  oscillator start at length 16 (`L_RESET` in `adapt_pkg`), and the sequencers start
  in the idle phase.
* The new length is clamped to 1..31 instead of wrapping.
* `IDLE_WAIT` = 1 cycle between Config and the next launch.
* The encoder counts the run of ones starting at tap 0.
* The Pass/Select bit meaning is the one described above.
* The decoder is instantiated in the top, between the control block and the
  oscillator. It is not inside `adapt_control`.
* There is no hysteresis or dead band in the control law. This means a limit cycle
  around an unreachable setpoint is possible. Adding a dead band is the natural
  extension.
* The global clock buffer is not part of the RTL.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`. Build any
of them with plain Verilator 5 from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/adapt_pkg.sv \
          tb/tb_adaptive_clock_system.sv --top-module tb_adaptive_clock_system
./obj_dir/Vtb_adaptive_clock_system
```

| Testbench | What it covers |
|---|---|
| `tb_adaptive_clock_system` | The whole loop at default parameters. It runs the setpoint pattern 14→1, 14, 1, 14, 1, 1→14, ten rounds per value. Every round it checks each sensor against the delay-line timing formula, each new length against the control law, and the clock period against the ring model. It also checks that every setpoint is reached and that the period rises with the setpoint. It counts length increases, decreases and holds, disagreeing sensors and saturated readings, and requires each to occur. |
| `tb_delay_configs` | Three copies of the system whose sensors are all 8/16, 9/18 or 10/20 gates, run through the same pattern. It checks the period ordering and that the period rises with the setpoint, and prints the period curves. |
| `tb_uniform_slowdown` | Two copies of the system, the second with every gate 25 % slower. The ring lengths must match, and the periods must differ by exactly 1.25. |
| `tb_tdc` | Two sensors over clock periods of 5–60 ns, checked against the timing formula. |
| `tb_adapt_control` | The control law, the clamp at both limits, and the Config timing. |
| `tb_adapt_fsm` | The strobe order, the Config spacing and the round length. |
| `tb_vlro` | Period versus length, and loading only on `e_config`. |
| Unit testbenches | `tb_tdc_stage`, `tb_tdc_encoder`, `tb_tdc_min`, `tb_vlro_decoder` and `tb_delay_chain` cover the small blocks. |

`tb/bufg_model.sv` is the stand-in for the global clock buffer: a pure 1.5 ns delay.
Every simulation runs in about a second, except `tb_delay_configs`, which takes about
20 seconds.

## Synthesis notes

`adapt_fsm`, `tdc_encoder`, `tdc_min`, `vlro_decoder`, `adapt_control`, `tdc_stage`
and the register part of `tdc` and `vlro` are synthesizable. For silicon or an FPGA:

* Replace `delay_chain` with kept gate chains (for example LUT buffers with
  keep/dont-touch attributes).
* Replace the ring part of `vlro` with a real glitch-free variable-length ring.
* Place the ring by hand.
* Declare the TDC-to-oscillator path as a multi-cycle path of `CONFIG_WAIT` cycles.
* Declare the launch-to-capture path of each sensor as a false path for timing
  analysis: it is the quantity being measured.
