# Two-axis resonant piezo-mirror driver with a digital phase-locked loop

A piezoelectric MEMS scanning mirror has two orthogonal resonant axes. Each axis
has its own pair of actuators and a pair of sense electrodes. This RTL keeps both
axes oscillating at resonance, and it runs entirely on logic-level signals. The
drive is a square wave sent to a buffer. The sense signal reaches the FPGA only as a
comparator output. Everything else is done digitally:

* frequency synthesis, in steps of one 8 ns clock cycle;
* a sense-to-drive delay, which closes a self-oscillating loop through the mirror;
* a lossless hand-over from a fixed frequency to that loop;
* recovery after the oscillation is lost;
* a 1 ns timer that logs both axes' periods and phases at every sample instant, for
  a host that needs to know where the beam points.

With the oscillation frequency set by the mirror and a digital delay, a 1.8 V drive
is enough. No DAC, ADC or analog filter is needed in the loop.

```
               +-----------+   ref   +------------------+ drive1_0 / drive1_180
  cfg1 ------> | freq_gen  |-------->| mirror_loop_ctrl |-----------------------> AFE / mirror
               +-----------+         +------------------+
                                         ^ sense1 (comparator)
  (axis 2 identical: cfg2, sense2, drive2_0 / drive2_180)
                                         |
  clk_0/45/90/135 --> +----------------+ |   record     +------------+      +-----------------+
  sample_clk/ext_trig>| timing_monitor |<+------------->| angle_calc |----->| data_serializer |--> uart_txd
                      | 3 x tdc_channel|--------------------------------->  | + uart_tx       |
                      +----------------+      raw T1,phi1,T2,phi2          +-----------------+
```

`moems_top` holds two axes: each is one `freq_gen` feeding one `mirror_loop_ctrl`.
It also holds one `timing_monitor`, one `angle_calc` and one `data_serializer`. The
PLL that makes the clocks, the analog front end, the mirror and the UART-USB bridge
are outside the RTL. Their signals are ports of the top.

## Clocks and resolutions

| signal | frequency | use |
|---|---|---|
| `clk_0` | 125 MHz | system clock; every counter in the drive path counts its 8 ns cycles |
| `clk_45`, `clk_90`, `clk_135` | 125 MHz, shifted 1, 2, 3 ns | used only by the timing monitor's samplers |
| `sample_clk` | e.g. 100 kHz | sample events for the timing monitor (asynchronous) |
| `baud_clk` | e.g. 12 MHz | one UART bit per rising edge (asynchronous, synchronised inside) |

The drive therefore has 8 ns resolution. For example, 145146 cycles give 861.2 Hz
and 136608 cycles give 915 Hz. Measurements have 1 ns resolution.

`rst_n` asserts asynchronously and must be released synchronously to `clk_0`.

## One axis: frequency generator and loop controller

**`freq_gen`** waits `startup_cycles` after reset or `soft_rst`, then outputs a
square wave:

* Startup: the intended start-up delay is 32 s (`moems_pkg::STARTUP_32S`). The two
  axes can start at different times.
* Static mode: the wave has `period` cycles, with ceil(P/2) cycles high.
* Sweep mode (`sweep_en`): the period steps linearly from `period` to `sweep_stop`,
  by `sweep_step`, once every `sweep_dwell` periods. At the end it raises
  `sweep_done` and stays there.

**`mirror_loop_ctrl`** is the core of the design. It has the following states
(`loop_state_e`):

1. **OFF**: the generator is not running. Both drive outputs are low, so the analog
   front end idles.
2. **OPEN**: the drive is the generator's square wave, unchanged. On every sense
   rising edge the controller records the following (all in cycles):
   * the reference period T;
   * the lag phi from the last reference rise to the sense rise;
   * whether phi agrees with the previous lag within `PHASE_TOL`.
3. **SWITCH**: this state is entered when `pll_req` is set and `LOCK_COUNT`
   consecutive lags agree. At that sense edge the adjustable delay block is loaded
   with D = T - phi - 1, which makes the delayed sense edge land exactly on the
   next reference rising edge. At that edge (the toggle event) the drive source
   changes. No drive edge moves.
4. **PLL**: each sense rising edge, delayed by D cycles, starts a drive pulse.
   * Pulse length: `duty`/256 of the last measured sense period.
   * Loop: the mirror closes the loop, and its period becomes D plus the mirror's
     own lag. Changing D (or the duty cycle) therefore moves the frequency.
   * Delay ramp: D walks towards `delay_target` by at most `delay_step` per period.
     A target of 0 keeps D.
   * Loss: if no sense edge arrives for two periods (a shock, or lost resonance),
     the controller falls back to OPEN (`lost_evt`) and goes through the hand-over
     again.

`drive_0` and `drive_180` are the drive and its complement, one for each actuator of
the pair. The sense input goes through a two-flop synchroniser. Its two cycles of
latency are part of the measured phi, so the hand-over formula already accounts for
it.

Limits:

* D must stay below one mirror period, because there is only one pending delayed
  edge.
* With `PER_W` = 18, periods and delays up to 262143 cycles (about 2.1 ms, or
  477 Hz) can be used. Typical delays of 100-200 µs are 12500-25000 cycles.

## Timing monitor: 1 ns periods and phases

**`tdc_channel`** samples an asynchronous input with eight flip-flops: the rising
and the falling edge of each of the four phase-shifted clocks. These samples fall
0, 1, ... 7 ns into each `clk_0` period. The eight bits are retimed twice into
`clk_0` and searched for the first 0-to-1 step. The result is an edge pulse plus a
3-bit slot, with a fixed latency of four cycles. No delay line is used.

A timestamp is `{clk_0 cycle counter, slot}` in ns. All three channels have the
same latency, so differences between timestamps are exact to 1 ns.

**`timing_monitor`** uses three channels: sense 1, sense 2, and the sample event
(`sample_clk`, or `ext_trig` when `trig_sel` is set).

* Per axis, T is the difference between consecutive sense rising-edge timestamps.
  It is updated at every sense rising edge, i.e. once per mirror period.
* At each sample event, phi is the time since that axis' last sense rising edge. A
  sense edge in the same 8 ns window, no later than the sample, counts as the last
  edge.
* A record `{T1, phi1, T2, phi2}` (24 bits each, ns, saturating) is issued five
  cycles after the sample.

## Records to the host

**`data_serializer`** sends each record on the UART (8N1, LSB first, one bit per
`baud_clk` edge). `out_mode` selects one of two formats:

| `out_mode` | bytes | content |
|---|---|---|
| 0 (raw) | 12 | T1, phi1, T2, phi2, 24 bits each, most significant byte first |
| 1 (angle) | 4 | angle1, angle2, signed 16 bits each, most significant byte first |

At 12 MBd a raw record takes 120 bit times, so the link carries exactly 100 000
records per second. Angle records allow three times that rate.

A record that arrives while the previous one is still being handed over is dropped
and counted (`rec_dropped`), so the host only ever sees whole records. There is no
header byte. At full rate the records follow each other back to back, so the host
has to frame them by counting bytes from the start of the stream.

**`angle_calc`** converts a record to angles: angle = k0 * sin(2 pi phi / T).

* k0 is a 15-bit calibration gain per axis.
* phi/T is taken as a 12-bit fraction of a turn, computed by a restoring divider
  at one bit per cycle.
* The sine is read from a 1024-entry quarter-wave table. The table is built at
  elaboration from a Taylor series:
  `entry[i] = round(32767 * sin(2 pi (i + 0.5) / 4096))`.
* The result is a signed 16-bit number. Latency is 31 cycles for both axes, 12
  cycles less for each axis whose phase is clamped (next point).
* phi >= T is clamped to the last step of the turn.

This is the simple single-gain model. Pattern distortion (barrel, pincushion,
keystone) and the coupling between the axes are not corrected.

## Configuration (`moems_pkg::axis_cfg_t`, per axis)

| field | width | meaning |
|---|---|---|
| `startup_cycles` | 32 | delay from reset to the first drive edge (32 s = 4 000 000 000) |
| `period` | 18 | open-loop period in 8 ns cycles, or the start of a sweep |
| `sweep_en`, `sweep_stop`, `sweep_step`, `sweep_dwell` | 1, 18, 18, 8 | linear sweep |
| `pll_req` | 1 | hand the drive over to the sense loop |
| `delay_target`, `delay_step` | 18, 18 | delay ramp in PLL mode |
| `duty` | 8 | drive high time in PLL mode, in 1/256 of the period |

The settings are plain input ports. A host interface that writes them, for example
a UART receiver, is not part of this RTL.

## What is the reference design and what is chosen here

These parts follow the reference design:

* the block structure;
* the two operating modes and the hand-over rule (match the delay, then switch at
  the toggle event);
* the adjustable delay and duty cycle;
* the 8 ns drive and 1 ns measurement resolutions, and the four-phase, dual-edge
  sampling;
* the record contents (T and phi of both axes per sample);
* the 100k records/s target;
* the angle formula;
* the 32 s start-up delay;
* the example counter values.

These details are choices made here:

* the stability test (`LOCK_COUNT` = 4 lags within `PHASE_TOL` = 64 cycles);
* the loss timeout (two periods);
* the delay ramp;
* the duty cycle in 1/256 of the period;
* the sweep profile;
* all word widths;
* the record byte layout, the drop policy and the UART frame;
* the table size of the angle conversion.

The timing monitor's retiming of the 1 ns samples into `clk_0` is tight in real
hardware: the sample taken at 7 ns is retimed 1 ns later. On an FPGA this needs
placement constraints, which are not part of this RTL. The monitor reports at most
one rising edge per 8 ns window, and it has no glitch filter. A false edge caused by
crosstalk on the sense line will corrupt a period and can end a lock.

Two assertions guard the rules that matter most. In `mirror_loop_ctrl`, the two
drive outputs of a pair are never high together. In `data_serializer`, a byte
offered to the transmitter stays unchanged until it is taken. Simulate with
`--assert` to enable them.

Yosys reports about 980 cells and 1240 flip-flops for the whole top. The angle
table is 1024 x 15 bits.

## Simulation

Plain Verilator 5 is enough. Every file has one module or package named after it,
so Verilator finds the files itself:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/moems_pkg.sv tb/tb_moems_top.sv --top-module tb_moems_top
./obj_dir/Vtb_moems_top
```

Each testbench checks itself and ends with `TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_freq_gen` | start-up delay, even/odd periods, sweep steps, soft reset |
| `tb_mirror_loop_ctrl` | open-loop lag, seamless hand-over (±2 cycles), free running without reference, delay ramp, duty, loss and relock |
| `tb_tdc_channel` | 40 edges at half-ns times: each reported once, slot exact |
| `tb_timing_monitor` | 200 samples against periods and phases worked out from the stimulus |
| `tb_angle_calc` | 300 records against real-valued sine, latency, drop while busy |
| `tb_uart_tx`, `tb_data_serializer` | byte framing, 100 kHz without loss at 12 MBd, drops at 200 kHz, angle records |
| `tb_moems_top` | whole design at its real sizes (the top has no parameters): staggered start, sweep, the 145146/136608-cycle 16:17 pattern measured as 1161168/1092864 ns, hand-over of both axes, delay ramp (-8 µs period), shock and relock, angle records, trigger burst with drops, decoded UART stream; about 35 ms of simulated time |
| `tb_resonance_tracking` | one axis in closed loop with a resonant mirror model (Q = 200, resonance at 1000 cycles): the loop settles at the resonance (999.97 cycles on average), a 10-cycle change of D moves it by less than half a cycle, and a 0.5 % shift of the resonance (the size of the few-hertz shift a hardening spring causes near 900 Hz) is followed to 1004.75 cycles without losing lock |
| `tb_prime_periods` | the 145177/136621-cycle prime setting: periods exact, and the phase pair does not repeat after 18.6 ms |

Testbench helpers:

* `tb/mirror_model.sv` stands in for the mirror and its analog chain. It is a pure
  transport delay from `drive_0` to `sense`, with a stall input that simulates a
  shock. It does not model resonance. The loop frequency in the PLL tests that use
  it therefore comes from the delay alone, not from a resonance peak.
* `tb/resonant_mirror_model.sv` gives the sense edge the phase lag of a
  second-order resonator at the measured drive period (90 degrees at resonance).
  The lag settles with the mechanical time constant, about Q/pi periods, and the
  resonance can be moved at run time. With it the loop finds the resonance peak on
  its own: the delay D only selects a point on the steep phase curve. It models
  the phase only, not the amplitude or any non-linear spring.
* `tb/uart_rx_model.sv` decodes the serial line.

The start-up delay is shortened through `startup_cycles` in every testbench.
Simulating the full 32 s delay is not practical.
