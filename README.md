# Total-ionizing-dose smart sensor (self-timed delay-path sensor)

Ionizing radiation builds up trapped charge in MOS transistors and shifts
their threshold voltages. As the dose accumulates, a chain of minimum-size
CMOS inverters gets slower. This sensor measures that slowdown with
digital logic only: no radiation-sensitive FET and no hardened ADC are
needed. A pulse runs around a loop that contains a 256-inverter chain. A
small counter stops the loop after a programmed number of pulses. The time
from the sensor's `Start` input to its `Done` output is the dose reading,
and a clocked time-to-digital converter turns that time into a number.

The sensor core has no clock. It paces itself, so the reading does not
depend on the quality of a clock. Only the converter that digitizes the
Start-to-Done time is clocked.

In the silicon this RTL describes, only the inverter chain is meant to be
radiation sensitive. The pulse generator and counter are built with
radiation-hardened layout. That hardening is a layout matter (enclosed-
layout transistors, guard rings, isolation wells), so it does not appear
in RTL.

## Block structure

```
               +------------------- tid_smart_sensor -------------------+
 measure ----->|  tdc_controller          tid_sensor                    |
 pulse_count ->|  (clk domain)      +---------------------------------+ |
 _cfg          |                    | pulse_generator --> delay_path  | |
               |   sensor_reset --->|   ^  (armed by       (256 inv.) | |
               |   sensor_start --->|   |   Start)            |       | |
               |                    |   +----- echo ----------+       | |
               |                    |   ^                     v       | |
               |                    |   +---- done ---- pulse_counter | |
               |   sensor_done <----|-------------------------+       | |
               |                    +---------------------------------+ |
 delay_cycles <|  counter of clk cycles from Start to synchronized Done  |
               +--------------------------------------------------------+
```

| Module | Kind | Role |
|---|---|---|
| `tid_pkg` | package | counter width, controller state type |
| `pulse_generator` | RTL | start/stop gate of the ring oscillator, armed by a rising `start` |
| `delay_path` | behavioural model | 256-inverter chain with a per-stage delay parameter |
| `pulse_counter` | RTL | counts pulses leaving the chain, raises `done` |
| `tid_sensor` | RTL | the clockless sensor: the three blocks above in a loop |
| `tdc_controller` | RTL | clocked control: resets the sensor, drives Start, times Done |
| `tid_smart_sensor` | RTL (top) | controller and sensor together |

## How one conversion works

This part is the least obvious, because the sensor is an oscillator that
switches itself off.

1. The controller pulses `sensor_reset`. This clears the pulse generator's
   "armed" flag and the pulse counter (count 0, `done` low).
2. The controller raises `sensor_start`. The rising edge sets "armed". The
   generator output is `armed & ~done & ~echo`, where `echo` is the
   delay-path output. Because `echo` is low, the generator output rises at
   once.
3. The edge takes one trip through the chain, time
   `D = N_STAGES x STAGE_DELAY_PS`. The chain has an even number of stages,
   so it does not invert. When `echo` rises, the generator output falls.
   That falling edge comes back after another `D` and makes the output rise
   again. The generator and the chain therefore form a ring oscillator with
   period `2D`. The generator launches each new edge when the previous one
   returns, so no clock is involved.
4. The counter is clocked by `echo`. Rising edges of `echo` arrive at times
   `D, 3D, 5D, ...`. On pulse number `count_cfg + 1` the counter sets
   `done`. `done` forces the generator output low, so the ring stops and
   the chain goes quiet.

So the Start-to-Done time is

    T = (2 * P - 1) * N_STAGES * t_inv,     P = count_cfg + 1 pulses

With the defaults (256 stages, 70 ps, P = 16) this gives T = 31 x 17.92 ns
= 555.52 ns. Dose slows every inverter by the same fraction, so the change
in T is proportional to `2P - 1`. This is the sensor's configurable
sensitivity. More pulses give a longer conversion and a larger change per
krad. Fewer pulses suit high doses, where T would otherwise become long.
The 4-bit constant allows 1 to 16 pulses. The fabricated prototype used
16 pulses, and curves for 8, 12 and 16 pulses motivate the test settings.

## The controller and time-to-digital converter

`tdc_controller` is a small state machine (`IDLE -> RESET -> RUN -> DONE`)
on the reference clock:

- A `measure` request taken in `IDLE` starts `RESET`. In that state
  `sensor_reset` is high for `RESET_CYCLES` clocks (default 4).
- In `RUN`, `sensor_start` is high and a `TDC_W`-bit counter (default 16)
  counts clocks. `sensor_done` is asynchronous and passes through a
  two-flop synchronizer.
- When the synchronized Done is seen, Start is released. The count goes to
  `delay_cycles` and `result_valid` pulses for one clock.
- If the counter fills before Done arrives, the reading is all ones and
  `timeout` is set.

For a Start-to-Done time `T` that is not a multiple of the clock period:

    delay_cycles = ceil(T / Tclk) + 1        (the +1 is synchronizer latency)

From the clock edge that accepts `measure` to the one that raises
`result_valid`, a measurement takes `RESET_CYCLES + delay_cycles + 1`
cycles. At 100 MHz, the default 16-pulse conversion reads 57.

The resolution is one clock period. 10 ns at 100 MHz is coarse next to
the few-ns shifts that low doses cause. Use a faster clock, or subtract a
calibrated zero-dose reading and average several conversions. The
original measurements of this kind of sensor timed Start and Done with an
oscilloscope.

`sensor_reset` is high while `rst_n` is low and during `RESET`, and low
otherwise. Each measurement therefore gives the sensor's asynchronous-reset
flops a fresh rising reset edge. Two assertions check that Start never
rises without a preceding reset and that Start and reset are never both
high.

## Modelling the dose

`delay_path` is a behavioural model. Each of the `N_STAGES` inverters is a
continuous assignment with delay `STAGE_DELAY_PS` picoseconds. There is no
dose input. The response of a real chain to dose is a device-physics
curve, and it is represented here only by choosing a larger stage delay.
The testbenches use 70 ps for a fresh chain and 80 ps for a degraded one.

The default of 70 ps is an estimate. Reported unirradiated readings for a
16-pulse sensor of this kind in a 0.35 um process are about 555 ns, and
555 ns / (31 x 256) is about 70 ps. Measured readings rose to about 770 ns
after 575 krad and relaxed (annealed) towards about 640 ns over
roughly 80 hours. At the defaults, all of these fit easily in the 16-bit
converter (about 78 cycles at 100 MHz, against 65535).

## Where the RTL makes its own choices

These points are not fixed by the sensor's published description. They
are the choices made here.

- **Loop closure.** The published block diagram shows Start and Reset into
  the pulse generator, generator -> delay path -> counter -> Done, and Done
  back to the generator. Here the delay-path output also feeds the
  generator. Only then does every counted pulse cross the chain, which the
  stated pulse-count-dependent sensitivity requires.
- **Counter encoding.** The pulses counted are `count_cfg + 1`. The
  largest 4-bit value, 15, then gives the sixteen-pulse setting.
- **Edges and levels.** The counter counts rising `echo` edges. The
  generator is armed by a rising Start. `done` stays high until reset.
  Resets are active high inside the sensor and active low (`rst_n`,
  synchronous) on the controller.
- **Controller.** Everything about the controller is this design's own:
  its structure, the reference clock (100 MHz in the testbenches),
  `TDC_W`, `RESET_CYCLES`, the synchronizer, the timeout, and holding
  Start until Done. The published description only requires an external
  control that resets the sensor, raises Start, waits for Done, and a
  time-to-digital converter.
- **Configurable pulse count.** The count is a top-level port
  (`pulse_count_cfg`). A chip short of pads can tie it to 15.
- **Not provided.** There is no on-chip monitoring-network interface: the
  reading is brought out as plain ports. There is no radiation-hardening
  layout.

## Implementation notes and caveats

- **Intended combinational loop.** `pulse_generator` and `delay_path` form
  a ring oscillator. Synthesis tools report it as a logic loop, and
  that is its purpose. A real implementation must keep the inverter chain
  intact (don't-touch / hand placement). Otherwise synthesis removes it,
  because an even chain is logically a wire.
- **Self-clocked counter.** `pulse_counter` is clocked by the chain output.
  Treat that net as a clock in timing analysis. Its `done` crosses into the
  controller's clock domain only through the synchronizer.
- **Reset in simulation.** The sensor's flops use asynchronous reset on a
  rising edge. A testbench that drives the sensor directly should make
  `reset` go from 0 to 1, not start it at 1.
- The delay model uses inertial assignment delays. This is harmless
  because the pulses (tens of ns) are far wider than one stage delay.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `N_STAGES` | 256 | `delay_path`, `tid_sensor`, top | inverters in the chain (keep even) |
| `STAGE_DELAY_PS` | 70 | same | delay of one inverter, stands for the dose |
| `CNT_W` | 4 | `pulse_counter`, `tid_sensor` | width of the pulse-count constant |
| `TDC_W` | 16 | `tdc_controller`, top | width of the converter counter |
| `RESET_CYCLES` | 4 | `tdc_controller`, top | length of the sensor reset pulse |

## Simulating

All files use `timescale 1ns/1ps`. The testbenches need Verilator's timing
support. From the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/tid_pkg.sv tb/tb_tid_smart_sensor.sv --top-module tb_tid_smart_sensor
./obj_dir/Vtb_tid_smart_sensor
```

Replace the testbench name to run another one. Each testbench prints one
`TB_RESULT checks=N failures=M` line and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_pulse_generator` | gate function against a reference model; arming only on a rising Start; reset; 400 random steps |
| `tb_delay_path` | polarity and exact delay of the 256 x 70 ps chain and of an 8 x 125 ps chain |
| `tb_pulse_counter` | Done on pulse `cfg + 1` for all 16 constants; Done held; reset during a count |
| `tb_tid_sensor` | Start-to-Done time `(2P-1) x 256 x t_inv` for 8, 12 and 16 pulses, at 70 and 80 ps; larger shift with more pulses; the ring stops after Done; abort by reset |
| `tb_tdc_controller` | reset length, reading `ceil(T/Tclk)+1` for 20 random times, latency, one-cycle strobe, timeout on a 5-bit counter |
| `tb_tid_smart_sensor` | end to end: fresh, degraded and short-converter sensors; the readings for 8, 12 and 16 pulses; dose shift detected and growing with pulse count; timeout; ring stop. Each mechanism is counted and must occur |
| `tb_tid_dose_sweep` | a dose campaign: six sensors with 70 to 97 ps inverters (about 555 to 770 ns); exact readings (57 to 78 cycles with 16 pulses), rising with dose, no overflow, smaller shifts with 8 pulses |
| `tb_tid_smart_sensor_full` | the top at its default parameters: three 16-pulse measurements, 555.52 ns raw time, reading 57, latency 62 cycles |

## How far to trust it

The digital behaviour (gate, counter, controller) is fully specified in
the RTL and checked against independent models. The timing numbers come
from the behavioural delay model and an estimated inverter delay, so they
show the mechanism, not silicon accuracy. The real dose response is
non-linear and also depends on bias during irradiation (unbiased parts
shift much less) and on annealing afterwards. Calibrate it per device
against a zero-dose reading.
