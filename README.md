# 24-hour digital clock with alarm

A clock, an alarm and a time-entry keypad built from nothing but switches, one
push button, seven seven-segment displays and an LED, for an FPGA board with a
50 MHz oscillator (the target is a Cyclone IV board of the DE2-115 kind). The
design is small and fully synchronous to two clocks: the 50 MHz board clock,
and a 1 Hz clock divided from it that paces everything that keeps or changes
time.

The user works in three steps:

1. **Enter a time.** Four switches select the hour tens, hour units, minute
   tens and minute units digit; each second the push button is held, every
   selected digit goes up by one and wraps around at its limit.
2. **Load it.** The `LD_time` switch copies the entered time into the running
   clock; the `LD_alarm` switch copies it into the alarm time.
3. **Watch and wake.** Three switches choose what the displays show: the
   clock (`ctime`), the alarm time (`atime`) or the entered time (`stime`).
   With `AL_ON` on, the alarm LED lights when the clock reaches the alarm
   time and stays lit until `STOP_al` is switched on.

The behaviour, the block structure, the signal names and the display codes
follow a published FPGA clock design; where that description leaves a detail
open, the choice made here is stated below and in the header comment of each
file.

## Block structure

```
 clk_50MHz ──► clock_division ──► clk_1s ──┬──► time_input ──► H_in1 H_in0 M_in1 M_in0 ─┐
                                           │                                             │
                                           ├──► clock_function ◄── LD_time, LD_alarm ◄──┘
                                           │      │  tmp_hour/minute/second (binary)
                                           │      │  a_hour1..a_sec0 (BCD alarm time)
                                           │      ▼
                                           │    clock_output ──► H_out1..S_out0 (BCD)
                                           │      │
                                           └──► alarm_function ◄── AL_ON, STOP_al ──► Alarm
 clk_50MHz ──► display_mode ◄── ctime, atime, stime + all three times ──► HEX0, HEX2..HEX7
```

| Module | File | Clock | What it holds / does |
|---|---|---|---|
| `clock_division` | `rtl/clock_division.sv` | 50 MHz | 25-bit counter; toggles `clk_1s` every 25,000,000 cycles |
| `time_input` | `rtl/time_input.sv` | 1 Hz | four BCD entry digits, stepped by the button |
| `clock_function` | `rtl/clock_function.sv` | 1 Hz | running clock (binary h/m/s) and alarm time (BCD, seconds 00) |
| `clock_output` | `rtl/clock_output.sv` | none | binary clock time to six BCD digits |
| `alarm_function` | `rtl/alarm_function.sv` | 1 Hz | alarm flag: set on match with `AL_ON`, cleared by `STOP_al` |
| `display_mode` | `rtl/display_mode.sv` | 50 MHz | mode selection and seven-segment encoding, registered |
| `digital_clock_alarm` | `rtl/digital_clock_alarm.sv` | both | top level, wires the six blocks |
| `alarm_clock_pkg` | `rtl/alarm_clock_pkg.sv` | - | digit/segment types, digit limits, segment patterns |

## The two clocks

`clk_1s` is a flip-flop output, and the entry, clock and alarm registers use
it directly as their clock, as in the original design. The divider counts
0 to `HALF_PERIOD-1` and toggles `clk_1s` on each wrap, so both halves of the
1 Hz clock last exactly `HALF_PERIOD` = 25,000,000 cycles of 50 MHz. The first
rising edge of `clk_1s` comes `HALF_PERIOD` cycles after reset is released.

Consequences a user of this RTL should know:

* Every switch and the button are **sampled once per second**, at the rising
  edge of `clk_1s`. A button press shorter than the time between two edges
  may be missed, and holding it steps the selected digits once a second.
* The displays are registered on the 50 MHz clock, so they follow the 1 Hz
  registers one 50 MHz cycle later; mode switches act within 20 ns.
* On an FPGA a derived clock like `clk_1s` is usually better replaced by a
  1-cycle enable on the 50 MHz clock. This RTL keeps the derived clock of the
  original design; timing tools will want `clk_1s` declared as a generated
  clock.

`reset` is active high and asynchronous in every 1 Hz and divider register,
clearing the clock, the alarm time, the entered time and the alarm flag to
00:00:00 / off. The display register has no reset and is valid one 50 MHz
cycle after power-up.

## Entering a time

`time_input` keeps the digits `H_in1 H_in0 : M_in1 M_in0`. At each 1 Hz edge
with `increment_button` high, each digit whose switch (`switch_Hin1`,
`switch_Hin0`, `switch_Min1`, `switch_Min0`) is on steps by one. Several
digits may step together.

| Digit | Range | After the largest value |
|---|---|---|
| hour tens `H_in1` | 0-2 | 0 |
| hour units `H_in0` | 0-9, or 0-3 while `H_in1` is 2 | 0 |
| minute tens `M_in1` | 0-5 | 0 |
| minute units `M_in0` | 0-9 | 0 |

The wrap of the hour tens after 2 is from the original description; the other
limits follow from "a valid 24-hour time". One rule is this design's own: if
stepping the hour tens to 2 would leave an hour above 23 (19 becomes 2x), the
hour units are cleared, giving 20. The entered time is therefore always a
valid hh:mm.

`increment_button` is **active high** at this module's port, as in the
original simulations. A board push button that reads 0 when pressed needs an
inverter in front of the port.

## Clock and alarm time

`clock_function` keeps the clock in binary (`tmp_hour` 5 bits, `tmp_minute`
and `tmp_second` 6 bits) and adds one second per 1 Hz edge with the usual
carries; 23:59:59 is followed by 00:00:00 (any hour of 23 or more wraps to 0).

The load switches are levels, not pulses:

* While `LD_time` is on, each 1 Hz edge sets the clock to the entered hh:mm
  with seconds 00, so the clock stands still until the switch is turned off.
  Seconds cleared on load is this design's choice.
* While `LD_alarm` is on, each 1 Hz edge copies the entered digits into
  `a_hour1 a_hour0 a_min1 a_min0`; the alarm seconds `a_sec1 a_sec0` are
  always 00. The clock keeps running meanwhile.

Both loads may be on at once; both then happen.

## The alarm

`alarm_function` compares all six clock digits (including seconds) with the
six alarm digits at each 1 Hz edge. Because the alarm seconds are 00, the
clock matches for exactly one second, hh:mm:00, and `Alarm` turns on at the
edge that ends that second (when the display already shows hh:mm:01).

| At a 1 Hz edge | `Alarm` becomes |
|---|---|
| `reset` | 0 (asynchronously) |
| `STOP_al` on | 0 |
| match and `AL_ON` on | 1 |
| otherwise | unchanged |

So once on, the alarm stays on, even if `AL_ON` is then turned off, until
`STOP_al` is switched on; with `AL_ON` off a match is ignored. `STOP_al`
winning over a match in the same second is this design's choice. While
`STOP_al` stays on, the alarm cannot ring at all.

## Display

Seven displays are driven: `HEX7 HEX6` hours, `HEX5 HEX4` minutes,
`HEX3 HEX2` seconds and `HEX0` a letter for the mode. `HEX1` is not part of
the design.

| Switch on | HEX0 | HEX7..HEX4 | HEX3 HEX2 |
|---|---|---|---|
| `ctime` | C | clock hh mm | clock seconds |
| `atime` (and not `ctime`) | A | alarm hh mm | alarm seconds (always 00) |
| `stime` (and neither above) | E | entered hh mm | blank |
| none | blank | blank | blank |

The priority between switches that are on together is this design's choice.
Segments are **active low**, bit 6..0 = segments g f e d c b a:

| Symbol | Pattern | Symbol | Pattern |
|---|---|---|---|
| 0 | 1000000 | 6 | 0000010 |
| 1 | 1111001 | 7 | 1111000 |
| 2 | 0100100 | 8 | 0000000 |
| 3 | 0110000 | 9 | 0010000 |
| 4 | 0011001 | C | 1000110 |
| 5 | 0010010 | A | 0001000 |
| E | 0000110 | blank | 1111111 |

The digit, C and E patterns are those of the original design; the A pattern
is the usual one.

## Parameters

| Parameter | Where | Default | Meaning |
|---|---|---|---|
| `HALF_PERIOD` | `clock_division`, `digital_clock_alarm` | 25,000,000 | 50 MHz cycles per half second |

`HALF_PERIOD` is the only parameter. Lower it in simulation to make a second
short; the logic is otherwise unchanged. Everything else (digit limits,
segment patterns) is in `alarm_clock_pkg`.

## Board pin-out of the original build

The original build used these board controls (pin assignment is not part of
the RTL): SW0-SW3 = `switch_Min0`, `switch_Min1`, `switch_Hin0`,
`switch_Hin1`; SW4-SW6 = `ctime`, `atime`, `stime`; SW13 = `STOP_al`,
SW14 = `AL_ON`, SW15 = `LD_alarm`, SW16 = `LD_time`, SW17 = `reset`;
KEY3 = `increment_button`; LEDR17 = `Alarm`.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops with a watchdog if it hangs.
Reference patterns for the displays are kept separately in
`tb/clock_tb_pkg.sv`. In the RTL, immediate assertions in `time_input` and
`clock_function` check at every 1 Hz edge that the entered time and the clock
time are valid times; run with `--assert` to enable them.

| Testbench | What it checks |
|---|---|
| `clock_division_tb` | exact edge spacing at `HALF_PERIOD` = 5 and at the full 25,000,000 (one full 1 s period), reset |
| `time_input_tb` | every digit wrap, the 23-hour limit, held button, reset, 2000 random seconds against a model |
| `clock_function_tb` | loads, minute/hour/midnight carries, ~60,000 seconds against a seconds-of-day model |
| `clock_output_tb` | all hour, minute and second values |
| `display_mode_tb` | all four modes with random digits, segment by segment |
| `alarm_function_tb` | AL_ON gating, latching, STOP_al priority, 3000 random seconds |
| `digital_clock_alarm_tb` | whole design at `HALF_PERIOD` = 4: the 00:01 alarm scenario, entry of 23:59, midnight, alarm raised/held/stopped/ignored, then 600 random seconds against a model of the whole clock; counts that each of 14 mechanisms occurred |
| `board_demo_tb` | whole design at `HALF_PERIOD` = 4: alarm 01:53:00, entry 01:53, clock 01:52:39 shown as on the board, alarm at 01:53:00 |
| `digital_clock_alarm_full_tb` | whole design at default parameters (real 1 s): enter 00:01, load alarm and clock, alarm on, stop; about 6 simulated seconds, 300 million 50 MHz cycles, a few minutes of run time |

To run one with Verilator 5 (two-state simulation; give it random initial
values to catch missing resets):

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/alarm_clock_pkg.sv tb/clock_tb_pkg.sv tb/digital_clock_alarm_tb.sv \
    --top-module digital_clock_alarm_tb -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Lint a module with `verilator --lint-only -Wall -y rtl rtl/alarm_clock_pkg.sv
rtl/<module>.sv`. Warnings about unused constants of the package remain.

## Limits

* No debouncing or synchronisers for the push button and switches. Sampling
  once a second hides bounce, but a press shorter than a second can be
  missed, and an input that changes right at a 1 Hz edge is taken in either
  second.
* No snooze, no 12-hour mode, no separate alarm seconds: the published design
  has none of these.
* The alarm LED is a level; there is no buzzer output.
