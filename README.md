# Maximum delay sensor: a TDC that only remembers the worst case

Transistors age. As a chip is used, its critical paths slow down until, one
day, a flip-flop captures a late value and the chip fails. If the arrival time
of a path's end point could be watched while the chip does its normal work, a
controller could warn before that day comes, or trade the margin for speed or
lower supply voltage.

The maximum delay sensor (MDS) does this watching with very little logic. It
is a small time-to-digital converter (TDC) hung on one end point of a logic
block. Each clock cycle in which that end point toggles is one measurement.
The sensor keeps only the **largest** arrival time it has seen, as a
thermometer code, and needs no test mode and no interruption of normal
operation. A separate warning unit reads the code from time to time and flags
the block when the worst arrival time crosses a threshold.

This repository holds SystemVerilog for the sensor, the warning unit and the
test circuit used to demonstrate the sensor on an FPGA. The sensor follows a
published gate-level design. Delays are modelled with simulation delays, and
the warning unit's insides are this design's own.

## How the sensor measures

The heart is a *monotonic* TDC with N stages (N = 4 here):

```
 start ──┬──[tau0]──┬──[tau1]──┬──[tau2]──┐
         │          │          │          │
        D FF0      D FF1      D FF2      D FF3
         ▲          ▲          ▲          ▲
 stop ───┴──────────┴──────────┴──────────┘      (all clocked by stop)
```

A rising edge on `start` runs down a chain of buffers. A rising edge on
`stop`, Δt later, clocks all flip-flops at once. Flip-flop i reads 1 only if
the start edge has already passed i buffers, so the code Q0Q1Q2Q3 is a
thermometer code for Δt:

| Δt (buffer delays τ = 1) | Q0 Q1 Q2 Q3 |
|--------------------------|-------------|
| 0 ≤ Δt < 1               | 1 0 0 0     |
| 1 ≤ Δt < 2               | 1 1 0 0     |
| 2 ≤ Δt < 3               | 1 1 1 0     |
| 3 ≤ Δt                   | 1 1 1 1     |

An N-stage TDC resolves N−1 buffer delays. In general, stage i captures 1 when

    Δt ≥ T_SETUP + τ0 + … + τ(i−1)

The code is printed Q0 first. In the RTL, `q[i]` is Q_i, so the vector `q`
prints with Q0 on the right.

### The maximum-hold trick

Each flip-flop is clocked by `stop OR Q_i` instead of by `stop` alone
(`mds_stage`). While the stage holds 0, the OR gate passes every `stop`
edge. As soon as the stage has captured a 1, the gate's output is stuck at 1
and no later edge reaches the flip-flop. A stage can therefore go from 0 to
1 but never back, and the whole code can only grow:

* After a measurement of 2 buffer delays the code is 1100. Q0 and Q1 are
  frozen.
* A later, shorter measurement (0.5) presents 1000. Only FF2 and FF3 are
  clocked, and they capture 0 again, so the code stays 1100.
* A longer measurement (2.5) presents 1110. FF2 captures its 1 and the code
  becomes 1110.

`rst_n = 0` clears all stages asynchronously. That is the only way down.

### From end point to start/stop

`mds` wraps the TDC with three pieces:

* **DL** (`dl_delay`): a delay on the clock. A TDC's area grows with the
  span it covers. The interesting window, however, lies near the end of the
  clock period, far from the clock edge. DL moves the start of the window
  there: the sensor measures `Δt = t_ep − (t_clk + T_DL)`. It sees path
  delays from `T_DL + T_SETUP` to `T_DL + T_SETUP + Στ`. In silicon DL
  would be set by a delay-locked loop in steps of its resolution. Here it is
  a chain of `T_DL_PS / T_RES_PS` steps.
* **Polarity XOR** (`mds_input_select`): `ep XOR ntrn`. With `ntrn = 0` the
  sensor measures rising transitions of the end point, with `ntrn = 1`
  falling ones.
* **Mode multiplexers S0/S1** (`mds_input_select`):

  | mode | meaning    | start       | stop        |
  |------|------------|-------------|-------------|
  | 0    | initialise | ep XOR ntrn | clk         |
  | 1    | measure    | clk via DL  | ep XOR ntrn |

  To initialise, hold `mode = 0` and `rst_n = 0` for a clock, then raise
  both. Mode 0 is also used by the calibration circuit (below).

### When the clock is a pulse, not a step

The start signal is the (delayed) clock, which is high for only half a
period. If the end point arrives *after* that pulse has ended, the first
stages see 0 but the far stages may still see the tail of the pulse, which
is travelling down the buffers. They capture 1 and the code is not a
thermometer code (for example Q0..Q3 = 0011). The gate-level circuit does
the same. Valid readings need the end point to arrive while the delayed
clock is high, which is what DL is chosen for. The prototype testbench
deliberately produces such a code and checks that the model reproduces it.

## The warning unit (`mds_warning`)

The sensor's code changes at end-point edges, which are unrelated to any
clock. The warning unit passes it through a two-flop synchroniser. On a
`sample` pulse it stores the number of ones in `max_count` and sets `warn`
when that count is **greater than** `threshold`. Because the sensor only keeps
maxima, `warn` stays set until the sensor is reset. A sample caught while
several stages change at once reads too low by the stages still in flight.
The next sample corrects it.

The original design only says that a warning is given when the captured
maximum exceeds a threshold at periodic sampling times. The synchroniser,
the strobe, the count encoding and the strict comparison are choices made
here.

## The FPGA test circuit (`mds_top`)

The top level is the demonstration circuit around a four-stage sensor, plus
the warning unit:

* `reconfig_delay_line` is a stand-in for a logic path. The 100 MHz
  reference clock runs through six sections of 1, 2, 4, 8, 16 and 32 buffers.
  Each section is bypassed by a multiplexer when its bit of `s` is 0, so the
  delay is `s × BUF_PS`.
* `cal_path` chooses the sensor inputs with two multiplexers driven by
  `cal`:
  * `cal = 0`: ep comes from the delay line and clk is the reference clock.
  * `cal = 1`: ep is the reference clock after two buffers, and clk is
    `clk_shift`, a phase-shifted copy of the clock from a clock manager
    outside this design.
* **Calibration.** Set `cal = 1` and `sel = 0`, so ep starts and the shifted
  clock stops. Step the phase of `clk_shift` upward in small steps (39 ps on
  the original board). The phase at which Q_i first turns 1 marks
  `2·BUF + τ0 + … + τ(i−1)`, and differences between these phases give each
  buffer delay τ_i. Because the sensor holds its maximum, a monotonic sweep
  needs no reset between steps.
* **Measurement.** Set `cal = 0` and `sel = 1`. Change `s` and watch the code
  grow, or stay, as the path gets longer or shorter.

Top-level ports: `clk_ref`, `clk_shift`, `cal`, `s[5:0]`, `sel` (sensor
mode), `ntrn`, `rst_n`, `sample`, `threshold[2:0]` in; `q[3:0]`,
`max_count[2:0]`, `warn` out.

## Parameters and where the numbers come from

| Module | Parameter | Default | Origin |
|---|---|---|---|
| `mds` | `N` | 4 | original design |
| `mds` | `TAU_PS` | 10 ps each | the original quotes a resolution "of the order of 10 ps" |
| `mds` | `T_DL_PS` | 30 ps | original circuit simulation |
| `mds` | `T_SETUP_PS` | 5 ps | chosen here so that 10, 20 and 40 ps give 1000, 1100 and 1111, the values reported for the original |
| `mds` | `T_RES_PS` | 10 ps | chosen here (DLL step, not given) |
| `mds_top` | `TAU_PS` | 550, 770, 70 ps | buffer delays measured on the original FPGA board |
| `mds_top` | `SECTIONS`, `CAL_BUFS` | 6, 2 | original test circuit |
| `mds_top` | `BUF_PS` | 600 ps | chosen here (FPGA buffer delay not given) |
| `mds_top` | `T_DL_PS` | 6.1 ns | chosen here, so that the settings 101101, 101100 and 101110 (45, 44 and 46 buffers, the ones used on the board) fall inside the sensor window |
| `mds_top` | `T_RES_PS` | 100 ps | chosen here |
| `mds_top` | `T_SETUP_PS` | 0 | chosen here |

`TAU_PS` is an unpacked array with one entry per buffer (N−1 entries).
When overriding it through several levels with Verilator, pass a named
array parameter (`localparam tau_t T = '{default: 10};`) rather than an
assignment pattern written in the instance; `tb/mds_size_run.sv` shows how.

With the top's defaults, the three line settings give Δt = 900, 300 and
1500 ps. The codes are 1100, then 1100 held (a fresh 300 ps reading would be
1000), then 1111. With a threshold of 2, `warn` rises only after the third
setting.

To size a sensor for a real path, pick `T_DL` just below the shortest delay
of interest and enough stages to cover the expected drift. For example, a
1 GHz block with an 800 ps critical path that may slow by 80 ps needs about
nine 10 ps stages and a DL of roughly 800 ps. `tb_mds_sizes` simulates that
case.

## What is a model and what is logic

* `delay_buf` and `dl_delay` are **behavioural models**. In silicon the
  buffers are standard cells or FPGA routing, and their delay is a physical
  property. The model is an inertial delay (`assign #D`): a pulse shorter than
  one element is swallowed, as by a real gate. Long delays are chains of
  short elements. Synthesis ignores the delays. Process variation, aging and
  jitter are not modelled: every delay is a fixed parameter.
* `tdc_delay_line` is a chain of `delay_buf`. A flip-flop setup time is
  modelled there, as a shift of every tap by `T_SETUP_PS`, so that the
  flip-flops themselves stay plain.
* `mds_stage`, `mds_input_select`, `mds_warning` and the multiplexers of
  `reconfig_delay_line` and `cal_path` are synthesizable logic. `mds_tdc`,
  `mds` and `mds_top` are structural. Their gates synthesize, but a real
  implementation must hand-place the buffers and keep synthesis from
  optimising them away.
* The flip-flops of `mds_stage` are clocked by a signal derived from their
  own output. That is the point of the circuit, not a mistake. Timing
  analysis of a real implementation has to treat each stage clock as
  generated.

Not included:

* The delay-locked loop that tunes DL.
* The on-line calibration schemes the original design relies on to correct
  the buffer delays.
* The clock manager that shifts `clk_shift`.
* The logic analyzer used on the FPGA board.
* The monitored logic itself.

The testbench `tb_mds_top` contains a simple clock-manager model.

## Testbenches

Each testbench checks itself and prints `TB_RESULT checks=N failures=M`.

| Testbench | What it shows |
|---|---|
| `tb_delay_buf` | edges delayed exactly; short glitches swallowed |
| `tb_dl_delay` | a 6.1 ns DL passes a 5 ns clock pulse intact |
| `tb_tdc_delay_line` | tap arrival times with unequal buffers and setup shift |
| `tb_mds_stage` | capture, freeze after 1, asynchronous reset, random sequence |
| `tb_mds_input_select` | all 32 input combinations |
| `tb_mds_tdc` | the thermometer table above, both hold cases, random running maximum |
| `tb_mds` | sensor defaults against the reference waveform (10 ns clock, 20/10/40 ps → 1100, 1100, 1111), a 4–40 ps sweep, falling-edge paths, mode 0 |
| `tb_mds_warning` | count and threshold compare, synchroniser latency, hold between samples |
| `tb_reconfig_delay_line` | delay = s × 600 ps for the board settings, the extremes and random settings |
| `tb_cal_path` | both multiplexers and the two-buffer path |
| `tb_mds_top` | whole test circuit at its defaults, with the steps below |
| `tb_mds_sizes` | 8- and 16-stage sensors, and the 9-stage, 800 ps DL, 1 GHz aging example |

`tb_mds_top` takes the whole test circuit through the following steps:

* calibration sweep, recovering τ within one 39 ps phase step;
* the three-step delay-line experiment, with hold and update;
* the warning;
* falling-edge measurement.

It also counts each of these mechanisms and fails if any of them never
occurred.

Run one with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl rtl/mds_pkg.sv tb/tb_mds_top.sv -y rtl \
          --top-module tb_mds_top -o sim && ./obj_dir/sim
```

`tb_mds_sizes` also needs `-y tb`, for its helper `mds_size_run`.

All of them finish within a few seconds. `mds_stage` carries an assertion
that a stage never falls except under reset; build with `--assert` to
enable it.

## Where this departs from the original

* The original circuit was simulated at transistor level. Here each delay
  is a single fixed number, with a single setup time standing in for the
  flip-flop's real sampling behaviour. The 5 ps setup time reproduces the
  three reported readings (10, 20 and 40 ps). Readings near a step boundary
  may differ from the transistor-level curve, which had steps about 12 ps
  apart.
* In the original, the clock delay DL appears outside the sensor in the
  conceptual drawing and inside it in the gate-level drawing. This design
  follows the gate-level drawing: DL delays the clock only on its way to
  `start`, and the `stop` side of mode 0 gets the clock undelayed.
* One sentence of the original associates initialisation with mode 1. Every
  other statement, and the reference waveform, uses mode 0 for
  initialisation and mode 1 for measurement, and so does this design.
* The warning unit is this design's own construction; the original gives
  only its function.
* The FPGA buffer delay and the DL value of the test circuit are not known
  from the original. The codes expected for the three board settings are
  computed from the values assumed here, not copied from measurements.
