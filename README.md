# Four-sensor greenhouse monitor and controller

This is the FPGA logic for a small, self-regulating climate monitor for a greenhouse or
workshop. It is built around an Intel MAX10 board (DE10-Lite class). Four analog sensors sit
on the FPGA's on-chip ADC, each behind its own voltage divider:

- an IR photodiode (infrared),
- a light-dependent resistor (visible light),
- an NTC thermistor (temperature),
- a humidity module.

The logic does four things:

- It shows two of the four voltages at a time, as `X.YZ` volts, on six seven-segment digits.
- For every sensor it raises one of three control bits. Each bit can drive an LED or switch an
  actuator (lamp, heater, dryer):
  - *blue*: the voltage is too low;
  - *red*: the voltage is too high;
  - *yellow*: a time limit has passed.
- It sums up the state of the whole area on five alarm LEDs. One LED is lit for each possible
  number of sensors out of range: green for none, then blue, white and yellow, and red for all
  four.
- For visible light only, it also:
  - drives a stepper motor that opens the curtains when the light is too low and closes them
    when it is too high;
  - when the light is too high, lights all ten board LEDs and sounds a buzzer.

There is no processor. Everything is a handful of counters, comparators and one small state
machine, and all thirteen controls (twelve per-sensor ones plus the alarm level) run in
parallel, all the time.

```
 ADC (on-chip IP) <-> adc_sequencer --adcin--> refresh_timer --ad--> 4 x volt_to_bcd
                                                                         |  cv    | digits
                          seconds_counter --seconds--> 4 x sensor_control |        v
                                                           | out_of_range |   display_mux -> HEX5..HEX0
                                                           v              |   (SW0 picks the pair)
                                                       alarm_level        |
                                     visible blue/red -> stepper_controller, buzzer_driver, board LEDs
```

## Sensor slots

All four sensors are carried in arrays indexed by *slot*, defined in `greenhouse_pkg`:

| slot | sensor        | ADC channel | shown on           |
|------|---------------|-------------|--------------------|
| 0    | infrared      | 1           | HEX5..HEX3, SW0 = 0 |
| 1    | visible light | 2           | HEX2..HEX0, SW0 = 0 |
| 2    | temperature   | 3           | HEX5..HEX3, SW0 = 1 |
| 3    | humidity      | 4           | HEX2..HEX0, SW0 = 1 |

Which physical sensor ends up on which channel is a matter of board wiring. The slot order is
fixed by the display pairing (infrared with visible, temperature with humidity) and by the
visible-light extras, which read slot 1.

## The ADC round-robin and its one-step lag

This is the least obvious part of the design. `adc_sequencer` talks to the vendor ADC core over
an Avalon-ST command/response pair. After reset it raises `cmd_valid` with channel 1 and never
drops it. It then steps through four states. In each state it waits for a response, stores the
result in that state's holding register and presents the next channel number (2, 3, 4, then 1
again).

Because the command stays valid, the converter accepts its next command as soon as it is idle.
That happens in the same clock in which it delivers a response, before the sequencer has moved
to the new channel number. So channel 1 is converted twice at start-up, and from then on every
result belongs to the channel requested one step earlier. The states store their results
crosswise (state 1 into slot 3, states 2..4 into slots 0..2), and this lag puts channel *n* in
slot *n*-1. The one exception is the first result after reset, which lands in slot 3 and is
replaced one round later.

This relies on the converter taking one command per conversion while the request stays valid,
which is what the behavioural model `tb/adc_model.sv` does. If your ADC core pipelines
differently, check the slot mapping with `tb_adc_sequencer` against a model of your core.

Two assertions in the sequencer state the command-side rules:

- the channel is always 1..4 while the request is valid;
- the request is never withdrawn once raised.

## Voltages, digits and the refresh

The four holding registers are not used directly. `refresh_timer` copies them into a second set
of registers once every `REFRESH + 1` clocks. That is every 20,000,001 clocks, or 0.4 s at
50 MHz, so the displayed digits do not flicker. All controls act on these copied values, so a
change at a sensor takes effect at the next refresh.

`volt_to_bcd` converts a 12-bit code `c` into hundredths of a volt: `cv = floor(c * 500 / 4096)`.
That is a 0..5 V scale with codes 0..4095 reading 0..499. It then splits `cv` into volts,
tenths and hundredths for the display:

- volts = `cv / 100`
- tenths = `(cv mod 100) / 10`
- hundredths = `cv mod 10`

All thresholds in the design are in these centivolt units.

`display_mux` routes one pair of digit triples to the six digits, following `SW0`. Each digit
goes through a `seven_seg_decoder`:

- segments are active low, with bit 7 the decimal point;
- the point is lit on the first digit of each half (HEX5 and HEX2);
- the 6 is drawn without its top bar and the 9 without its bottom bar;
- codes above 9 blank the digit.

## The thirteen controls

**Per sensor (`sensor_control`, four instances, purely combinational)**

| output (control system) | condition with default limits         |
|-------------------------|---------------------------------------|
| blue (1)                | `cv <= 20` (at or below 0.20 V)       |
| red (2)                 | `cv >= 100` (at or above 1.00 V)      |
| yellow (3)              | `seconds >= 60`                       |

Between 0.21 V and 0.99 V both blue and red are 0. A sensor is *out of range* when blue or red is
set.

The time control compares one elapsed-seconds count that is shared by all sensors
(`seconds_counter`). That count starts at reset and can be cleared with its own switch. It does
not measure how long a particular sensor has been in range. The time limit marks the end of a
period, after which the operator may change the ranges.

**Alarm level (`alarm_level`)**

This block counts the out-of-range flags and lights exactly one LED: green for 0, blue for 1,
white for 2, yellow for 3, red for 4. The level drops again as soon as a sensor returns into
range.

## Visible light: curtains, buzzer and board LEDs

`stepper_controller` drives a four-coil motor through its driver board with half-steps. The coil
pattern for position `s` (0..7) works like this:

- even `s`: coil `s/2` alone is energised;
- odd `s`: coils `s/2` and `s/2 + 1` (mod 4) are energised.

That gives the sequence 0001, 0011, 0010, 0110, 0100, 1100, 1000, 1001.

Every `STEP_PERIOD + 1` clocks (1,250,001, about 25 ms) the position moves as follows:

- +1 (clockwise, opening the curtains) while visible light is at or below its lower limit;
- -1 (counter-clockwise, closing them) while it is at or above its upper limit;
- no move otherwise. The coils stay energised, so the motor holds its place.

Reset turns the coils off and schedules a step on the very next clock.

While visible light is at or above its upper limit:

- all ten board LEDs are lit;
- `buzzer_driver` beeps: on for `BUZZ_PERIOD + 1` clocks and off for `BUZZ_PERIOD`, about 1 s
  each at the defaults. It starts with the on phase, and it is silent whenever the light is not
  too bright.

## Resets

The design has three resets, as on the original board.

| port            | polarity, kind      | clears                                              |
|-----------------|---------------------|-----------------------------------------------------|
| `rst_n`         | low, asynchronous   | ADC sequencer, refresh timer and its copies, buzzer |
| `n_rst_seconds` | low, synchronous    | elapsed-seconds count (restarts the time limit)     |
| `rst_step`      | high, asynchronous  | stepper: coils off, position 7                      |

Until the first refresh all voltages read 0 V. So right after reset every sensor counts as too
low, the alarm shows red and the curtains start opening. This lasts 0.4 s at the defaults.

## Parameters (top level `greenhouse_top`)

| parameter     | default          | meaning                                    |
|---------------|------------------|--------------------------------------------|
| `CLK_FREQ_HZ` | 50,000,000       | clocks per second for the seconds count     |
| `REFRESH`     | 20,000,000       | refresh period minus one                    |
| `STEP_PERIOD` | 1,250,000        | stepper half-step period minus one          |
| `BUZZ_PERIOD` | 50,000,000       | buzzer half period (the on phase lasts one clock longer) |
| `LOW_LIMIT`   | `'{4{20}}`       | per-slot lower limit, centivolts            |
| `HIGH_LIMIT`  | `'{4{100}}`      | per-slot upper limit, centivolts            |
| `TIME_LIMIT`  | `'{4{60}}`       | per-slot time limit, seconds                |

The limits are arrays, one entry per slot. The defaults give every sensor the same range and
time, and any sensor can be given its own.

In practice the divider resistors are chosen so that the range of interest maps onto
0.2..1.0 V. For example, 650 lux read 0.20 V and 3500 lux read 1.00 V on the prototype's
light-dependent resistor. The alternative is to change the limits.

## Departures from the original design, and choices it left open

- **Alarm level.** The original enumerated the sixteen cases as sum-of-products terms, and one
  two-sensor term leaves out the temperature condition. With that term, visible, temperature
  and humidity all out of range would show white instead of yellow. This RTL counts the flags,
  which is what the alarm level is specified to show.
- **Buzzer while not alarming.** The original froze the buzzer and its phase counter in whatever
  state they were in when the light dropped back into range. So the buzzer could stay on. Here
  it is forced off and the phase cleared.
- **Resets.** The original leaves several registers uninitialised: the refreshed copies, the ADC
  command valid, the buzzer, and the stepper position after power-up. Here they are reset.
- **HEX1 and HEX0** use the same decoding as the other undotted digits.
- **Redundant ports.** The original also brought each control LED out twice, under two port
  names; here each appears once.
- **Per-sensor limits** are parameters. The original hard-coded equal limits.
- **Comparisons.** The upper limit is tested with `>=` and the time limit with `>=` (the limit
  is "reached" rather than "exceeded"), as in the original logic.

## Outside the FPGA logic

These parts have no RTL here:

- the on-chip ADC core (a vendor IP, reached through the `adc_*` ports);
- the sensors and their dividers;
- the LEDs and their resistors;
- the transistor stage that drives the buzzer;
- the stepper driver board and motor;
- any real actuators.

`tb/adc_model.sv` is a behavioural stand-in for the ADC, for simulation only. It accepts a
command when idle, answers `LATENCY` clocks later with the code on `chan_code[channel]`, and
takes the next command in the response clock.

## Simulating

Every testbench is self-checking. Each one ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    --top-module tb_greenhouse_top rtl/greenhouse_pkg.sv tb/tb_greenhouse_top.sv
./obj_dir/Vtb_greenhouse_top
```

Replace `tb_greenhouse_top` with any other testbench name.

| testbench               | what it shows                                                        |
|-------------------------|----------------------------------------------------------------------|
| `tb_greenhouse_top`     | end to end at reduced clock counts. It replays the demonstrated board states (see below), covering every alarm level, both motor directions and hold, the buzzer pattern, both display pairs and the time limit. It also runs a second instance with a different limit per sensor. |
| `tb_greenhouse_full`    | all defaults at 50 MHz, about 70 million clocks (about 1 minute of simulation). It checks the first refresh exactly at clock 20,000,001, the buzzer on for exactly 50,000,001 clocks, the first second at clock 50,000,000, and half-steps every 1,250,001 clocks in both directions. The 60 s time limit (3·10⁹ clocks) is too long to simulate at full scale and is covered by the reduced test. |
| `tb_adc_sequencer`      | channel order including the start-up repeat, slot mapping, one conversion per `LATENCY+1` clocks |
| `tb_refresh_timer`      | copy period and hold                                                 |
| `tb_volt_to_bcd`        | all 4096 codes against `c*500/4096` and its digits                   |
| `tb_seconds_counter`, `tb_sensor_control`, `tb_alarm_level`, `tb_buzzer_driver`, `tb_stepper_controller`, `tb_seven_seg_decoder`, `tb_display_mux` | exhaustive or boundary-plus-random checks of each block |

The board states replayed by `tb_greenhouse_top`:

1. infrared 0.04 V, visible 0.18 V, temperature low, humidity 4.50 V: red alarm, curtains
   opening;
2. visible 1.83 V: board LEDs, buzzer, curtains closing;
3. visible 0.23 V: yellow alarm, motor stops;
4. visible 0.29 V and infrared 0.50 V: white alarm;
5. then the blue and green levels, and the exact limit values.

Each block was also checked against a deliberately broken copy of itself, for example a swapped
direction, an off-by-one period or a wrong glyph, and its testbench fails on each one.

## Files

`rtl/` holds one module per file, plus `greenhouse_pkg.sv`, which has the shared types (sensor
slots, centivolts, BCD triples, control and alarm LED structs), the default constants and the
half-step function. `tb/` holds one testbench per block, the full-size testbench and the ADC
model.
