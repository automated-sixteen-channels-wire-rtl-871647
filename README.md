# Sixteen-channel wire tension meter: digital logic

The wires of a drift tube have to be strung to a specified mechanical tension,
and the tension can be read off the wire's mechanical resonance frequency. This
meter finds that resonance electrostatically, on sixteen tubes at once. A high
voltage between wire and tube wall is switched on and off at a modulation
frequency. The pull on the wire makes it oscillate, and it swings hardest when
the modulation is near the resonance (about 37 Hz for a 3.8 m tube). The wire's
distance from the wall changes the wire-tube capacitance. That capacitance
detunes a small LC oscillator of about 20 MHz (the *sensor*) coupled to the wire.

So the meter counts sensor periods twice per modulation cycle, once in the
half-period with HV on and once with HV off. The difference between the two
counts is the oscillation amplitude at that modulation frequency. The host
steps the modulation frequency across the expected resonance, collects one
amplitude per step, and fits the resonance curve. Only the difference between
the two counts of the same sensor matters, so the sixteen sensors need not run
at the same frequency.

This repository holds synthesizable SystemVerilog for the digital part:

- the **timing unit**: modulation generator, HV drive, counting gates, fine
  delay and measurement sequencing;
- four **scaler FPGAs** with eight 32-bit counters each, two counters per tube;
- an **RS232 command interface** that turns host commands into system-bus
  cycles.

The analog parts stay outside the RTL: sensors, comparators, HV supplies, HV
switches and power supplies.

```
 PC ──RS232──► wtm_serial_ctrl ──system bus (8-bit addr/data)──┬─► wtm_timing_unit ──► hvc_even/hvc_odd ─► HV modulators
                                                               │        │ scaler_f1, scaler_f2, scaler_clear
                                                               │        ▼
 sensors/comparators ─ sensor_in[15:0] ────────────────────────┴─► 4 × wtm_scaler8 (channels 4k..4k+3)
```

## The timing chain

Everything in the timing unit runs on one 16.8 MHz clock. The chain is built
from four blocks, and its settings are a 48-bit word `D<47..0>` written over
the bus.

**1. Modulation divider (`wtm_mod_divider`).** This is a 16-bit up-counter. It
reloads `D<15..0>` after reaching all-ones and gives a one-clock pulse `fout`
at each reload. The `fout` period is `65536 − D<15..0>` clocks. D = 0 gives the
slowest rate: 16.8 MHz / 65536 = 256 Hz. While the control bit LOAD_COUNT is
held high, the counter stays at its load value.

**2. Gate generator (`wtm_gate_gen`).** An 8-bit phase counter `qcc` advances
once per `fout`. Its bit 7 is the HV modulation:

    f_mod = 16.8 MHz / (256 · (65536 − D<15..0>))      1.0 Hz … 65.6 kHz

For 37.0 Hz, set D<15..0> = 63763. Near that point one divider step moves the
frequency by about 0.02 Hz.

The HV drives are `hvc_even = ¬(hv_on ∧ qcc[7])` and
`hvc_odd = ¬(hv_on ∧ ¬qcc[7])`. Low means HV on. Even and odd tubes are
therefore pulled in opposite half-periods, and each HV supply feeds one even
and one odd tube.

The counting gates come from the shifted phase `qc = qcc + D<23..16>`. A gate
is open while `qc[6:0] ≥ D<30..24>`: F10 in the half where `qc[7] = 0`, F20 in
the half where `qc[7] = 1`. One bit of `D<30..24>` is one `fout` period (3.9 ms
at the 256 Hz minimum).

- **Position 0.** A gate opens `width` steps after an HV edge and closes on
  the next HV edge. This skips the settling right after the HV switches.
- **Position p with 0 < p < width.** Both gate edges move p steps earlier, so
  the gate sits inside the HV half-period. `width` then sets the gate length
  (`128 − width` steps) and `position` sets where it sits.

```
qcc[7] (HV, even tubes on when high) ____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\________________/‾‾‾‾
F10   (position 0)                   ‾‾‾‾\____________________________/‾‾‾‾\____
F20   (position 0)                   ____________/‾‾‾‾‾‾‾‾\_________________________
                                          |<-width->|
```

**3. Fine delay (`wtm_fine_delay`).** This compensates for the HV cable delay.
A free-running 8-bit counter supplies eight rates, and `D<34..32>` = k picks a
shift rate of clk / 2^(k+1). F10 and F20 each shift into a 32-stage register
at that rate. `D<39..35>` = t picks the tap, so F1/F2 lag F10/F20 by (t + 1)
shift periods. That is 32 delays in steps of 2^(k+1) clocks. `D<39>` picks the
upper or lower 16 stages, and `D<38..35>` picks the stage within them.

**4. Measure control (`wtm_measure_ctrl`).** Setting START opens a window that
passes F1/F2 to the scalers as `scaler_f1`/`scaler_f2`. The window only opens
or closes on a falling edge of F2, so the scalers always see whole F1/F2
pairs, F1 first.

- The block counts the F2 pulses it passes. When the `D<47..40>`-th one
  (1…255) begins, it sets MC.
- The window closes at the end of that pulse.
- END_M is high from MC until the window has closed.
- MC stays set until the host writes timing register 15. After that, a START
  that is still set begins a new run.
- `D<47..40>` = 0 ends a run at once, with no gates.

So one START makes every scaler add up n gate periods per phase. The host then
reads the scalers once instead of once per modulation period.

The top level also brings the internal timing signals out as outputs, so they can be
watched: `fout`, `loadout` (high on the clock
that reloads the divider, either from its own wrap or from LOAD_COUNT),
`gate_f10`/`gate_f20` before the fine delay, `scaler_f1`/`scaler_f2` after
the measure window, `out_mc_n` (MC, active low) and `end_m`.

## Scalers and readout

Each `wtm_scaler8` serves four channels. Channel c has counter 2c (counts
during F1) and counter 2c+1 (counts during F2), each 32 bits and clocked by the
channel's own comparator output. Edges are counted only while F1 or F2 is
open. The scaler clear pulse zeroes all counters asynchronously.

The counters run in the sensor clock domains, about 20 MHz and unrelated to
the 16.8 MHz clock. The gates reach them without a synchroniser, as in the
original circuit. An edge that falls exactly on a gate edge may therefore land
on either side, which makes each count uncertain by one per window. **Read the
counters only after MC is set.** The read path is a plain multiplexer, not a
snapshot.

Which counter holds the HV-on count depends on the tube:

| tube (channel) | HV on during | HV-on count | HV-off count |
|---|---|---|---|
| even | F2 | counter 2c+1 | counter 2c |
| odd  | F1 | counter 2c   | counter 2c+1 |

## System bus and registers

The bus has an 8-bit address, 8-bit data, one-clock write and read strobes,
and combinational read data. The block is chosen by `addr[7:5]`:

| addr[7:5] | block | addr[4:0] |
|---|---|---|
| 0–3 | scaler FPGA k (channels 4k…4k+3) | `{counter[2:0], half, byte}`: byte address = 4·counter + byte 0…3, low byte first |
| 4 | timing unit | register below |

A counter's 32-bit value for channel ch and phase ph (0 = F1, 1 = F2) is at
byte addresses `32·(ch/4) + 4·(2·(ch%4) + ph) + 0…3`.

| timing reg | access | content |
|---|---|---|
| 0, 1 | r/w | D<15..0> divider (low, high) |
| 2 | r/w | D<23..16> gate position |
| 3 | r/w | D<30..24> gate width (bit 7 unused) |
| 4 | r/w | D<39..32>: bits 7..3 fine tap, bits 2..0 fine clock |
| 5 | r/w | D<47..40> number of measurements |
| 6 | r/w | bit 0 START, bit 1 HV on, bit 2 LOAD_COUNT, bit 3 (write 1) scaler clear pulse, reads 0 |
| 7 | r | bit 0 MC, bit 1 window open |
| 8 | r | gate pairs passed in the current or last run |
| 15 | w | any write clears MC |

Everything resets to zero: divider at 256 Hz, HV off, nothing started.

## Serial protocol

The host (master) sends one line per command at 57600 baud, 8N1. The line is
four fields of two ASCII hex digits each, then CR LF:

    <slave> <command> <address> <data> CR LF        FF = write, 00 = read
    e.g.  "01FF8503\r\n"   unit 01: write 03 to timing register 5

The unit whose `board_id` (hex switches) equals `<slave>` runs one bus cycle.
It answers with

    <00> <command> <address> <data written, or data read> CR LF

Slave 00 is the master's number and is never answered. The following are
dropped silently, so up to 255 units can share one line:

- frames for other slave numbers;
- commands other than FF and 00;
- lines that are not exactly eight hex digits;
- commands that arrive while this unit is answering.

`tx_oe` is high only while a unit answers, to enable its line driver. One
exchange takes 20 characters, about 3.5 ms. Reading all 128 counter bytes of a
unit therefore takes about 0.45 s.

A typical frequency point:

1. Write registers 0–5. Holding LOAD_COUNT while doing so restarts the
   divider from a known phase.
2. Write 02, then 03, to register 6 (HV on, then START).
3. Poll register 7 until bit 0 (MC) is set. The `out_mc_n` and `end_m` pins
   show the same event.
4. Write 02 to register 6 (drop START), then wait until bit 1 of register 7
   clears.
5. Read the 128 counter bytes.
6. Write register 15 (clear MC), then write 0A to register 6 (clear the
   scalers).

## How this RTL relates to the original instrument

The following follow the original circuit. Each module's header comment says
which of its details are choices of this design.

- The block structure.
- The setting-word bit fields.
- The divider with reload on terminal count.
- The phase counter, adder, comparator and gating by bit 7.
- The NAND drive of the two HV phases.
- The clock-select and 32-stage tap structure of the fine delay.
- START re-timed on F2, the F2 counting, MC cleared by a select-15 write, and
  END_M.
- The scaler counter pairs, board-address compare, word/byte select decoding
  and byte order.
- The protocol fields and codes, and the 57600 baud rate.

Departures and additions:

- **The local processor is replaced by hardware.** The original uses an
  8051-family microcontroller running firmware. Here `wtm_serial_ctrl`
  implements the same command/echo protocol directly. The hex-ASCII coding of
  the fields and the handling of bad lines are this design's reading.
- **Register map and bus numbering** of the timing unit, and the scaler clear
  bit, are this design's own. The original does not show how the processor
  reaches these bits.
- **Single clock domain in the timing unit.** Where the original clocks
  flip-flops from derived signals (the divider carry, a divided clock, F2), this
  RTL uses clock enables and edge detection on the 16.8 MHz clock. Some edges
  therefore move by one clock (60 ns) compared with the original.
- **Gated scaler clock.** The original gates each sensor clock with F1 OR F2.
  Here that condition is part of the count enable, which counts the same edges.
- **Measure window.** It closes on MC without waiting for the host to drop
  START.
- **Counting of measurements.** It uses an up-count against `D<47..40>`
  instead of the original down-counter's terminal count. `D<47..40>` = 0 means
  "no gates".
- **Tristate buses** are replaced by multiplexers with an enable.
- **Not built:**
  - the ADC/DAC control that sets and reads back the HV supplies (its function
    is not specified);
  - the sensor, comparators, HV supplies and switches, and power supplies
    (analog);
  - the host program.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. Build
and run, for example:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
        rtl/wtm_pkg.sv tb/tb_wtm_top_full.sv --top-module tb_wtm_top_full -o sim
    ./obj_dir/sim

| testbench | what it checks |
|---|---|
| `tb_wtm_mod_divider` | `fout` period = 65536 − D for 1 … 65536 clocks; LOAD_COUNT |
| `tb_wtm_gate_gen` | F10/F20/HVC after every `fout` against a model of the gate rule; gate length and placement |
| `tb_wtm_fine_delay` | delay (t+1)·2^(k+1) clocks for several k and t, both gates, both edges |
| `tb_wtm_measure_ctrl` | exactly n gate pairs for n = 0, 1, 6, 17, 255; F1 first; MC at the last F2; one END_M; MC hold and clear |
| `tb_wtm_timing_unit` | bus programming and read-back; `fout`, HV and gate lengths in clocks; a 3-measurement run; status, clear registers |
| `tb_wtm_scaler8` | 8 counters against exact reference counts, past 16 bits; address compare; byte order; clear |
| `tb_wtm_uart` | 8N1 line timing bit by bit at 292 clocks/bit; loopback; bad stop bit dropped |
| `tb_wtm_serial_ctrl` | write/read frames and echoes, other slave, unknown command, malformed and lower-case lines, exchange time |
| `tb_wtm_top` | two frequency points end to end over a fast serial line; all 32 counters against the testbench's own edge counts and HV phase |
| `tb_wtm_scan` | a host-style frequency scan over eight modulation frequencies with 16 modelled wire resonances; each tube's HV-off minus HV-on count must peak at its own resonance |
| `tb_wtm_top_full` | one complete 37 Hz measurement at the default parameters (57600 baud, 16 channels); about 40 s |

`tb/wtm_tb_sensor.sv` is a behavioural sensor-plus-comparator model: a square
wave whose period changes while its tube's HV is on. `tb/wtm_tb_host.sv` models
the PC side of the serial line.

## Files

- `rtl/wtm_pkg.sv`: shared constants, the register map, and the `D<47..0>`
  and control structs.
- `rtl/wtm_top.sv`: the whole digital system.
- `rtl/wtm_timing_unit.sv`: the timing FPGA, built from `wtm_mod_divider`,
  `wtm_gate_gen`, `wtm_fine_delay` and `wtm_measure_ctrl`.
- `rtl/wtm_scaler8.sv`: one scaler FPGA.
- `rtl/wtm_serial_ctrl.sv`: the command interface, using `wtm_uart_rx` and
  `wtm_uart_tx`.
