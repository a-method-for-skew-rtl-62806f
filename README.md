# Skew-free signal distribution with matched variable delay lines

A signal sent across a large board or backplane arrives after a delay that
depends on the wire and cannot be predicted well enough: copies of one clock
reach their destinations at different times, and that skew comes out of the
usable clock period. The circuit here lets the **sender alone** set the
arrival time at the far end of a wire, with nothing to measure or adjust at
the receiving end.

The idea rests on one fact: if a signal goes out on one wire and comes back on
a second wire of the same electrical length, the one-way trip takes exactly
half the round trip. The sender puts a variable delay line in the outgoing
path and a second, identical one in the returning path, always set to the same
code. It then adjusts that code until the round trip equals a fixed reference
delay `T_ref`. At that point

    round trip = 2 * (T_pd + T_delay + T_line) = T_ref
    one way    =      T_pd + T_delay + T_line  = T_ref / 2

where `T_pd` is a pad buffer delay (the same for output and input pads),
`T_delay` the delay of one variable line and `T_line` the wire. The far end
therefore sees the signal `T_ref / 2` after it left the sender, whatever the
wire length, to within one delay-line step. Wires of different lengths all
arrive at the same time if each one is calibrated this way.

The same two-line circuit also works in the other direction: a receiver
placed somewhere along the wire sees every edge twice, outgoing and returning,
and the far end sees it exactly in the middle. Delaying the outgoing edge
through two matched lines until it lines up with the returning edge leaves,
at the tap between the two lines, a copy of the signal with the far end's
timing. So receivers anywhere on the run can all be deskewed.

Calibration is done once, at setup, since wire delays do not change once the
system is built. It is controlled and read back through a scan register, so
the rest of the system can learn how much delay each wire has.

## Structure

```
skew_comp_top
├── skew_comp_sender          calibrating sender, N_WIRES forward wires
│   ├── scan_reg              command in / status out (capture, shift, update)
│   ├── delay_ctrl            step-by-step search for the code
│   ├── cal_pulse_gen         slow square wave used as calibration signal
│   ├── reference_delay       T_ref (behavioural)
│   ├── phase_detector        edge-triggered register: early or late
│   ├── variable_delay_line   x N_WIRES outgoing + 1 returning (behavioural)
│   └── pad_buffer            x N_WIRES output + 1 input (behavioural)
├── reflection_detector       two trip points on wire 0's voltage (behavioural)
├── pwm_dac                   the sender's code as a PWM signal
└── dist_receiver             deskewing receiver for a point along a wire
    ├── pad_buffer            x 2 (incident, returned)
    ├── variable_delay_line   x 2 in series, output taken between them
    ├── phase_detector
    └── delay_ctrl
```

`skew_pkg` holds the code width, the code type, the scan command and status
structs and the controller's state type.

The sender and the distributed receiver would sit on different chips on the
same wire. In the top they stand side by side, each with its own ports; the
wires between them are outside the design (the end-to-end testbench models
them).

## Synthesizable logic and behavioural models

The delay elements are timing, not logic. `variable_delay_line`,
`reference_delay` and `pad_buffer` are behavioural models built from
continuous assignments with `#` delays. In silicon they are a chain of buffers
feeding a multiplexer, a tuned fixed delay, and pad drivers. They compile in
lint and elaboration but synthesize to plain wires (and a multiplexer for the
delay line). `reflection_detector` is a behavioural model of two analog
comparators; it takes a `real` line voltage, so the top, which contains it,
does not go through logic synthesis as a whole. Everything else is ordinary
synchronous RTL: `phase_detector`, `delay_ctrl`, `cal_pulse_gen`, `scan_reg`,
`pwm_dac`, and the sender and receiver compositions.

All files use a 1 ps time unit; every delay parameter is in picoseconds.

## The calibration loop in the sender

A run starts when a scan update writes a command with the `start` bit set;
the command's code is the starting point of the search.

1. While the controller is busy, `cal_pulse_gen` drives wire 0 with a square
   wave: 64 clocks high, 64 low (1.28 µs at 100 MHz). The edges are sharp and
   far apart, so each returning edge can only belong to the edge just sent.
2. The same square wave goes through `reference_delay`. Its rising edge
   clocks the sampling register in `phase_detector`, which stores the
   returned signal (after the input pad and the returning delay line). A 1
   means the return was already there: the round trip is shorter than
   `T_ref`, more delay is needed (`early = 1`).
3. The sample and a toggle bit, both taken on the reference edge, are
   synchronized into the system clock. `valid` pulses 4 to 5 clocks after
   the reference edge.
4. `delay_ctrl` moves the code one step toward the reported direction on
   each valid sample. The first sample whose direction differs from the
   previous one ends the run with `locked`. The code stays where the reversal
   was seen. From below, that is the smallest code whose round trip reaches
   `T_ref`. From above, it is one step lower. Either way the error is under
   one step. If the code would leave 0..63 the run ends with `at_limit`
   instead: the wire is too long or too short for the range.
5. A sample arriving within 8 clocks of a start or a step is ignored. Its
   edges may have passed the lines before the code changed.

One step changes the round trip by two taps (both lines move), and the far-end
arrival by one tap, 100 ps by default. A run from code 0 to code 45 takes 46
calibration periods, about 59 µs.

Both lines of the pair and the forward lines of the other wires always get the
same code: the calibrated code, or, if the scan command's `manual` bit is set,
the command's own code. After the run, wire 0 carries `data_in[0]` again. The
reference arm is an ordinary signal wire outside calibration.

### Operating range at the defaults

| quantity | default | |
|---|---|---|
| delay line | 64 taps, 100 ps per tap, 500 ps multiplexer: 0.5 to 6.8 ns | `TAP_PS`, `MUX_PS`, `CODE_W` |
| pad buffer | 1 ns | `PAD_PS` |
| reference delay | 20 ns, so far-end arrival at 10 ns | `REF_DELAY_PS` |
| calibration signal | 64 + 64 clocks | `HALF_CYCLES` |
| wires | 4 forward, wire 0 with its return wire | `N_WIRES` |
| compensable one-way wire delay | 2.2 ns to 8.5 ns | follows from the above |

A wire outside 2.2 to 8.5 ns ends with `at_limit`. A wire of 2.2 to 8.5 ns is
roughly 13 to 50 inches of board trace at about 6 in/ns. To move the window,
change `REF_DELAY_PS`. `HALF_CYCLES` clock periods must stay longer than
`REF_DELAY_PS` plus the detector's 5-clock latency.

## Calibrating without a return wire

The return wire can be dropped. The sender drives wire 0 through a series
termination equal to the line impedance, and the far end is left
high-impedance (underterminated). A rising edge then lifts the wire end of the
termination resistor to half the swing. The wave reflects at the far end with
the same sign. When it gets back, one round trip later, the voltage there
doubles to the full swing.

`reflection_detector` watches that voltage (`line0_v`, as a fraction of the
swing) with two trip points, at 1/4 and 3/4 of the swing. The high one
(`reflected`) marks the returned step. With `one_wire` high, the top feeds it
to the sender in place of `ret_in`. It then passes the same input pad and
returning delay line, so the lock condition and the far-end arrival at
`T_ref / 2` are unchanged. The low one (`incident`) is brought out as
`line0_incident`. Only rising edges carry the round trip: on a falling edge the first step
already takes the voltage below the high trip point.

The comparators are ideal. A real line with distributed loads rings and
bounces more than once, and one threshold may not pick out the true
reflection. Keep `one_wire` steady during a run.

## The distributed receiver

`dist_receiver` takes the wire's outgoing signal (`fwd_in`) and returning
signal (`rev_in`) at its position. Each goes through an identical input pad.
The incident signal passes through two delay lines in series, both on the
receiver's code. The phase detector is clocked by the returned edge and
samples the output of the second line. The controller searches exactly as in
the sender. When locked, the two lines together delay the incident edge by
the spacing between incident and returned edges, so the tap between them
(`sig_out`) is half that spacing later than the incident edge. That is the
far end's arrival time, plus the same pad delay the far end's receiver has.

The receiver does not drive the wire. It only needs the sender to be sending
calibration edges while it runs, so start it while the sender calibrates, or
start a sender run for it. Its edges must be at least two minimum line delays
apart (1 ns at the defaults). A receiver closer than 0.5 ns of wire to the
far end therefore ends with `at_limit`.

## Scan register

An 8-bit shift register, controlled by `scan_capture`, `scan_shift` and
`scan_update` on the system clock. Capture has priority over shift, and shift
over update. Bits leave at `scan_tdo` bit 0 first, and `scan_tdi` enters at
bit 7.

| bit | captured status | updated command |
|---|---|---|
| 7 | `at_limit` | `start`: begin a run (one-cycle pulse on update) |
| 6 | `locked` | `manual`: apply the command's code instead of the calibrated one |
| 5:0 | code in use | start code of a run, or the manual code |

The status code is the amount of compensation applied. With the line model
above it gives the wire delay: `T_line = T_ref/2 - T_pd - MUX_PS - code*TAP_PS`.
A system can use it to know how many pipeline stages a wire represents. The
register is a data register only; a full test-access-port controller is not
part of this design.

## PWM output

`pwm_dac` outputs the sender's code as a pulse train: high for `code` of every
64 clocks, the code taken at the start of each period. After a low-pass filter
this is a control voltage, for delay lines tuned by a voltage (for example
RC lines) rather than by a tap select. The digital delay lines here do not use
it.

## What this design adds, and what it leaves out

The method itself is a published one: the matched pair locked to a reference
delay, the buffer-chain delay line, the edge-triggered direction detector,
the reflection-based one-wire form, the distributed receiver, and control
through boundary scan. This RTL is one implementation of it. Everything
numeric is this design's choice: code width, tap and multiplexer
delays, pad delay, reference delay, calibration period, number of wires,
settling window. So are the following:

- the step-by-step search and its stop rule;
- the synchronizers and toggle in the phase detector;
- the scan register layout and the manual override;
- the PWM format.

Not built:

- **Full-duplex return.** In this variant the far end drives the signal back
  on the same wire, and the sender subtracts its own outgoing signal from the
  line voltage. That is analog subtraction, a hybrid, and is not modelled.
  The one-wire form built here uses the reflection instead.
- **Wires of different lengths sharing one calibration.** The other wires
  reuse the reference arm's code. That is correct only when they are as long
  as the reference arm.
- **Pad mismatch.** Input and output pads are modelled as identical. Real
  input and output buffers differ, and the manual code is the only way here
  to correct for that.
- **Analog alternatives.** RC delay lines and XOR-type phase detectors are not
  built. The comparators exist only as the ideal behavioural model.
- **Pipeline control** that would use the measured delays.

The models are ideal: lines match exactly, edges are sharp, and the wire has
no reflections. Accuracy in silicon is limited by delay-line matching and by
noise at the detector's threshold, neither of which is simulated.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
        rtl/skew_pkg.sv tb/tb_skew_comp_top.sv --top-module tb_skew_comp_top -o sim
    ./obj_dir/sim

Replace `tb_skew_comp_top` with any other testbench in `tb/`:

| testbench | what it shows |
|---|---|
| `tb_skew_comp_top` | default sizes, whole board model, as listed below |
| `tb_skew_comp_sender` | four wire lengths from 2.31 to 8.37 ns all arrive at 10 ns ± 100 ps; scan status |
| `tb_dist_receiver` | random edge spacings: code, output at the midpoint ± 100 ps, limit when too close |
| `tb_delay_ctrl` | search against a threshold model: outcome, final code, step count, ignored samples |
| `tb_phase_detector` | direction and latency of each sample, no sample on falling edges |
| `tb_variable_delay_line` | delay = MUX_PS + code*TAP_PS for every code |
| `tb_scan_reg`, `tb_pwm_dac`, `tb_cal_pulse_gen` | register, duty and period behaviour |
| `tb_reflection_detector` | trip points; reflected step one round trip after the incident step |
| `tb_reference_delay`, `tb_pad_buffer` | fixed delays |

`tb_skew_comp_top` models a board with four wires of 4.04 ns, wire 0 looped
back at the far end (or, in one-wire mode, left open), and a receiver tap 1.53 ns from the sender. It runs in
about a second, and every test in it uses the top at its default parameters:

1. A calibration from code 0 steps up to the predicted code 45, while the
   receiver locks at its predicted code 21.
2. The status is read back through the scan register, and the PWM duty is
   checked.
3. Data edges on all four wires, wire 0 included, reach the far end
   10 ns ± 100 ps after they leave.
4. The receiver's output lines up with the far end's receiver to within
   100 ps.
5. A calibration from code 63 steps down and locks.
6. A 12 ns longer return path forces `at_limit`.
7. A receiver tap 0.2 ns from the far end forces the receiver's `at_limit`.
8. A manual code set through the scan register sets the wire delay.
9. With `one_wire` high, wire 0 is modelled as a series-terminated line with
   a high-impedance far end. Calibration through the reflection detector
   gives the same code and far-end timing.

The testbench counts each of these mechanisms and fails if any of them never
happened.

`tb_line` is a wire segment model used only by the testbenches.
