# Self-timed delay sensor for FPGAs

On-chip delay tells you about process corner, temperature and ageing, but
the delay of a short logic chain is far too small to digitise directly. The
sensor here amplifies it without any clock: a pulse is sent round a chain of
LUT + latch stages again and again, a small counter clocked by the chain
itself counts the trips, and after a fixed number of trips the sensor raises
*Done*. The time from *Start* to *Done* is a pulse width equal to about
`2 * LOOP_COUNT` chain delays. That width is the measurement. A clocked
time-to-digital converter (TDC) can sit anywhere, even far from the sensor.
Because all sensors share one *Start* line, one TDC can digitise many of them
in a single operation.

The default configuration is a network of four sensors with chains of 20,
40, 60 and 80 stages. Each counts 1024 loops, and one 100 MHz TDC reads
them all. With the 1.1 ns per stage used by the simulation model, the
80-stage sensor measures about 180 µs (18,000 TDC cycles).

## The self-timed loop

One sensor (`delay_sensor`) has four parts, wired in a ring:

```
 Start ──►┌──────────────┐ pulse ┌─────────────┐ chain_out ┌──────────────┐ count ┌────────────┐
 Reset ──►│pulse_generator├──────►│ delay_chain ├─────┬────►│ loop_counter ├──────►│ comparator ├──┬──► Done
          └──────▲───▲───┘       └─────────────┘     │     └──────────────┘       └────────────┘  │
                 │   └────────────── chain_out ──────┘            ▲ Reset                           │
                 └──────────────────────────────────────── Done ─┴──────────────────────────────────┘
```

### Clock generator f(x)

The heart of the loop is a three-input function of *Start*, *Done* and the
chain output (`clock_gen`):

| Condition | Start | Done | chain_out | f(x) |
|---|---|---|---|---|
| C1 | 0 | 0 | 0 | 0 |
| C2 | 0 | 1 | 0 | 1 |
| C3 | 0 | 0 | 1 | 0 |
| C4 | 0 | 1 | 1 | 0 |
| C5 | 1 | 0 | 0 | 1 |
| C6 | 1 | 1 | 0 | 0 |
| C7 | 1 | 0 | 1 | 0 |
| C8 | 1 | 1 | 1 | 0 |

This reduces to `f = ~chain_out & (start ^ done)`.

### Pulse generator

`pulse_generator` clocks two toggle flip-flops (D = ~Q) from f(x). One takes
the clock through a buffer, so it toggles on rising edges. The other takes
it through an inverter, so it toggles on falling edges. The XOR of the two
Q outputs rises after every rising edge of f(x) and falls after every
falling edge. The output therefore copies f(x), but it is driven from
flip-flops.

### One measurement, step by step

1. **Idle (C1).** *Start*, *Done* and the chain are all low, so f = 0.
2. **Start rises (C5).** f = 1 and the pulse generator output rises.
3. **Pulse returns (C7).** After one chain delay, chain_out rises. This
   clocks the counter and forces f = 0, so the pulse generator output falls.
4. **Low level returns (C5 again).** After another chain delay, chain_out
   falls and f = 1 again. Steps 3 and 4 repeat: the loop is a ring
   oscillator with a period of two chain delays, plus the fixed delay of the
   control logic.
5. **Count limit reached (C8).** The counter reaches `LOOP_COUNT-1` on its
   `LOOP_COUNT-1`th clock edge and the comparator raises *Done*. Since
   *Start* and *Done* are both high, f stays 0 and the oscillation stops.
   In the model, Start to Done is exactly `(2*LOOP_COUNT - 3)` chain delays.
6. **Start released (C4/C6, then C2).** The reader sees *Done* and pulls
   *Start* low. Once the chain output is low, f = 1 (C2). This launches one
   more pulse.
7. **Wrap (C3, then C1).** When that pulse returns, the counter wraps from
   `LOOP_COUNT-1` to 0. *Done* falls, f = 0, and the sensor is idle and
   ready for the next *Start*.

### Why the Done feedback does not glitch the clock

*Done* is a decode of the counter. The counter changes only on a rising edge
of chain_out, and a high chain_out forces f to 0. A change of *Done* therefore
always meets f = 0 and cannot cause a spurious edge.

On silicon this guarantee also depends on balanced routing. The published
sensor achieves that by placing the f(x) logic and both flip-flops with placement
constraints. RTL cannot express that step.

### Interface and reset

| Signal | Meaning |
|---|---|
| `rst` | Asynchronous, active high. Clears both pulse-generator flip-flops and the counter. |
| `start` | Hold high until *Done* is seen, then lower it. |
| `done` | Stays high from the end of the measurement until the wrap pulse has returned. |

Reset has no effect on the delay chain. The chain settles to the low pulse
level within one chain delay, so hold reset at least that long.

## The delay chain model

`delay_chain` is a behavioural model, not logic to synthesise. Each stage is
a transport delay of `STAGE_DELAY_PS` picoseconds. On an FPGA, each stage
must be built as a LUT and a transparent latch, kept and placed with
constraints; synthesis would otherwise reduce the chain to a wire.

The default of 1100 ps per stage is derived from one reference measurement:
an 80-stage sensor counting 1024 loops measured 180,000 ns, and
180000 ns / (2 * 1023 * 80) ≈ 1.1 ns.

The expected temperature behaviour is roughly linear:
`t(T) = t(T0) * (1 + k1 * (T - T0))`. To simulate another temperature or
process corner, set `STAGE_DELAY_PS` to the delay at that condition. The
control logic is modelled with zero delay. On a device, the control logic
adds a small constant delay to every loop. That constant is why very short
chains (fewer than about 15 stages) give a larger relative error.

## The shared converter

`tdc` is a clocked block. It is this design's own construction; the
published design only states what the converter has to do.

- **Request.** A one-cycle `meas_req` in idle raises the common
  `sensor_start` on the next clock edge and clears a free-running cycle
  counter.
- **Synchronisers.** Each sensor's *Done* passes through a two-flip-flop
  synchroniser.
- **Capture.** In the first cycle a *Done* is seen, the counter value is
  stored in `result[i]`. The number of sensors captured in earlier cycles
  is stored in `rank[i]`: rank 0 is the fastest sensor, and sensors seen in
  the same cycle share a rank.
- **Release.** When every sensor has reported, `sensor_start` falls. The
  TDC waits until every *Done* has fallen (each sensor makes its wrap
  trip), then pulses `result_valid` for one cycle.

For a *Done* edge arriving T after *Start*, `result = ceil(T / Tclk) + 1`.
The `+1` plus rounding is the constant latency of the synchroniser, so
subtract 2 for the interval in cycles. The counter saturates at all ones.
With `WIDTH = 16` at 100 MHz, the TDC holds 655 µs.

The TDC uses a synchronous reset and the sensors use an asynchronous one.
They are two clock domains by design: the sensors have no clock. That is
why lint reports the shared `rst` net as both synchronous and asynchronous.

## Top level: `sensor_network`

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_SENSORS` | 4 | Sensors sharing the TDC |
| `CHAIN_STAGES[NUM_SENSORS]` | `'{20, 40, 60, 80}` | Chain length of each sensor |
| `LOOP_COUNT` | 1024 | Counter states, i.e. loops per measurement |
| `STAGE_DELAY_PS` | 1100 | Model delay per stage, the same for all sensors |
| `TDC_WIDTH` | 16 | Timestamp width |

Ports: `clk` (TDC clock), `rst`, `meas_req`, `busy`, `result_valid`,
`result[i]`, `rank[i]`, and `sensor_done[i]` for observation.

The sensors are wired straight to the TDC: a common *Start* and one *Done*
wire per sensor. For a large array, the published work instead uses a separate
lightweight monitoring network, described elsewhere, to carry the pulses to
one converter. That network is not included here.

Constants and the TDC state type are in `delay_sensor_pkg`. Every file sets
`timescale 1ps/1ps`.

## Sizing notes

- **Measurement time.** A measurement takes about
  `(2*LOOP_COUNT - 3) * CHAIN_STAGES * stage delay`. Accuracy trades against
  sampling rate through both `LOOP_COUNT` and `CHAIN_STAGES`.
- **Counter.** The loop counter is `$clog2(LOOP_COUNT)` bits wide, and *Done*
  is raised at `LOOP_COUNT-1`. Make `LOOP_COUNT` a power of two if you want
  the counter to wrap naturally.
- **TDC width.** Keep `TDC_WIDTH` wide enough for the slowest sensor at the
  hottest temperature.

## Differences from the published sensor, and how far to trust this RTL

- **Delay model.** The stage delay and the linear temperature model are
  simulation models. The absolute numbers are estimates taken from the
  published measurements, not characterised silicon.
- **Control-logic delay.** The control logic has zero delay in simulation,
  so the measured interval has no constant offset.
- **Structure.** The counter wrap, the comparator as an equality decode, and
  the reset polarity are choices consistent with the published chronogram,
  in which the count runs 0..63 and Done falls as the count returns to 0.
- **Converter.** The TDC's synchroniser, ranking, handshake and width are
  this design's own.
- **Loop counts of other experiments.** The loop counts used in the
  published chain-length and temperature experiments are not known.
  Their absolute delays differ from the 180 µs reference by factors of about
  2 to 2.5. The testbenches reproduce the published shapes (linearity,
  proportional sensitivity, board-to-board ratio) rather than their absolute
  numbers, except where noted.

## Testbenches

All testbenches are self-checking and print `TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `clock_gen_tb` | f(x) against all eight truth-table rows |
| `pulse_generator_tb` | Pulse follows the C-conditions; both clock edges act; Done stops it; reset |
| `delay_chain_tb` | Delay is exactly `STAGES * STAGE_DELAY_PS`; pulse width is kept |
| `loop_counter_tb` | Counting, wrap at `LOOP_COUNT-1`, asynchronous reset |
| `comparator_tb` | Exhaustive decode |
| `delay_sensor_tb` | Exact Start-to-Done interval; loop count; release timing in both orders; reset mid-measurement |
| `tdc_tb` | Timestamps, ranks (including ties), Start held until the last Done, valid after all Done fall |
| `sensor_network_tb` | Full default size, two measurements. Also checks the 80-stage reading against 180 µs and counts every mechanism. |
| `chain_sweep_tb` | Chains of 5–130 stages on two "boards" 6 % apart; linearity and board ratio |
| `temperature_tb` | Four-sensor network at 20–100 °C. The delay model is fitted to published 80-stage readings (446 µs at 20 °C, 483 µs at 100 °C). Two-point calibration must hold within 0.5 °C. |
| `variability_map_tb` | 30 × 10 array of 16-stage sensors on one 300-channel TDC, 256 loops; every result and rank is exact |

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/delay_sensor_pkg.sv tb/sensor_network_tb.sv --top-module sensor_network_tb
./obj_dir/Vsensor_network_tb
```

`--timing` is required, because the delay chain model uses delays.
`sensor_network_tb` runs in a few seconds. `temperature_tb` and
`variability_map_tb` each take under a minute.

Simulation time grows with the number of distinct stage delays multiplied by
the total number of stages. Large arrays simulate fastest when their sensors
share a few delay values.
