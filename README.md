# Home automation and security system controller

A single clocked controller for a house that looks after three things at once:

- **comfort** – the lamp is dimmed or brightened from daylight and motion, and
  one of five HVAC actuators (heater, three fan speeds, air conditioner) is
  chosen from the room temperature;
- **security** – a 12-bit passcode opens the door, wrong codes are counted and
  the third wrong code locks the keypad and sets off the alarms; window and
  fire alarms run alongside;
- **power failure prevention** – the load is fed from solar power while the
  solar voltage is healthy and moved to the grid otherwise.

The design follows the controller described in *VLSI Design for Low Power Home
Automation and Security System Controller* (2021), which gives the systems,
their port names and widths, the 100 MHz clock, the lamp PWM counter, the
dimming level, the solar voltage window and the three-trial lockout. That
description says *what* each system does, not *how*; the logic inside each
block, the temperature bands and several encodings are this design's own
choices. They are listed in [Departures and own choices](#departures-and-own-choices).

Everything is plain synchronous logic on one clock: about 60 flip-flops, a
19-bit PWM counter and a handful of 8-bit comparators.

## Block structure

```
                      has_security_controller
  keypad, button,   +-------------------------------------------+
  window, motion,-->| h1 security_ctrl                          |--> lights, door,
  smoke             |      password_auth (passcode, trials)     |    alarms
                    |                                           |
  solar, grid V --->| h2 load_transfer_switch                   |--> PowerLine_Select
                    |                                           |
  light, motion, -->| h3 comfort_ctrl                           |--> LAMP, HEATER,
  temperature       |      light_ctrl -> lamp_pwm               |    FANSPEED1..3,
                    |      temp_ctrl                            |    AIRCON
                    +-------------------------------------------+
```

The three systems share only the clock, the reset and the motion sensor
(which feeds both the window alarm and the comfort system). Shared constants
and types are in `has_pkg`.

| File | Module | Role |
|---|---|---|
| `rtl/has_pkg.sv` | package | constants, `line_e`, `lamp_mode_e`, `hvac_t` |
| `rtl/has_security_controller.sv` | top | wires h1, h2, h3 to the chip ports |
| `rtl/security_ctrl.sv` | h1 | alarms and indicator lights around `password_auth` |
| `rtl/password_auth.sv` | | passcode register, trial counter, lockout |
| `rtl/load_transfer_switch.sv` | h2 | solar / grid selection |
| `rtl/comfort_ctrl.sv` | h3 | sensor sample register, `light_ctrl` and `temp_ctrl` |
| `rtl/light_ctrl.sv` | | day / night / motion to lamp mode |
| `rtl/lamp_pwm.sv` | | 500000-clock PWM generator |
| `rtl/temp_ctrl.sv` | | temperature bands to one HVAC actuator |

## Passcode entry and lockout

This is the only part with real state, and the part whose rules need the most
care.

- `resetpass` restores the factory passcode `12'h000` and clears the trial
  counter. It also ends a lockout.
- `chgpass` stores `password_in` as the new passcode. There is no check that
  the person changing the code knows the old one.
- A **rising edge** of `confirm_in` compares `password_in` with the stored
  code. Holding the confirm key counts once.
  - Match: `GreenLight_o` and `DOOR_OPEN` pulse for one clock and
    `Trials_counter` returns to 0.
  - Mismatch: `YellowLight_o` pulses for one clock and `Trials_counter` goes up
    by one.
- When `Trials_counter` reaches 3 the controller is **locked out**. Two wrong
  codes are tolerated; the third trips it. `YellowLight_o`, `DOOR_ALARM`,
  `WINDOW_ALARM` and `RedLight_o` then stay on. Confirmations and passcode
  changes are ignored until `reset` or `resetpass`.
- Priority when several arrive in one clock: `reset`, then `resetpass`, then
  `chgpass`, then a confirmation.

Timing: `password_in` is sampled on the clock edge that first sees
`confirm_in` high. The grant or deny pulse appears on the top-level outputs
two clocks later: one clock in `password_auth` and one in the output register
of `security_ctrl`. `Trials_counter` updates one clock after that edge.

Assertions in `password_auth` check two things: the counter never passes 3,
and grant and deny never fire together. An assertion in `security_ctrl` checks
that the door is never opened while the door alarm is on.

## Alarms and lights

| Output | On when |
|---|---|
| `FIRE_ALARM` | `smoke_sensor` is 1 |
| `WINDOW_ALARM` | lockout, or window open (`magneticswitch` = 0) while `motion_sensor` = 1 and `button` is not held |
| `DOOR_ALARM` | lockout |
| `YellowLight_o` | one clock after a wrong code; steadily in lockout |
| `RedLight_o` | any of the three alarms above is on |
| `GreenLight_o`, `DOOR_OPEN` | one clock after a correct code |

`button` works as a silence push-button. While it is held it suppresses the
window alarm caused by an open window. It cannot silence a lockout or the fire
alarm. All of these outputs are registered, one clock after their inputs.

## Power line selection

`PowerLine_Select` is 1 (solar) when `200 <= SOLAR_VOLTAGE <= 240`, and 0
(grid) otherwise. The grid is also used when both sources are out of range.
That lets the solar battery recharge while the load runs from the grid.
`GRID_VOLTAGE` therefore never changes the choice. It is kept as a port
because the published top level has it, and Verilator's lint reports it as
unused. The output is registered, and reset selects the grid.

## Lighting

`light_sensor` = 1 means daylight. `light_ctrl` picks one of three lamp modes:

| Daylight | Motion | Lamp |
|---|---|---|
| 1 | – | off |
| 0 | 1 | 100 % (held high) |
| 0 | 0 | 40 % PWM |

`lamp_pwm` counts 0 to 499999 (a 5 ms period, 200 Hz at 100 MHz). In dim mode
the output is high while the count is below 200000. The counter only runs in
dim mode and rests at 0 otherwise. That saves toggling, and it makes every dim
phase start with the on-part of a period. `PERIOD` and `DIM_PERCENT` are
parameters. `comfort_ctrl` samples its sensors into a register first, so the
lamp follows a sensor change two clocks later.

## Temperature management

`temp_ctrl` drives exactly one actuator, and only while `motion_sensor`
reports that someone is in the room. Otherwise all are off.

| Temperature (°C, unsigned 8-bit) | Actuator |
|---|---|
| ≤ 15 | `HEATER` |
| 16 – 20 | `FANSPEED1` |
| 21 – 25 | `FANSPEED2` |
| 26 – 30 | `FANSPEED3` |
| > 30 | `AIRCON` |

The band limits are parameters (`HEAT_MAX`, `FAN1_MAX`, `FAN2_MAX`,
`FAN3_MAX`) with defaults in `has_pkg`. An assertion checks that at most one
actuator is on. The outputs follow the sensors two clocks later.

## Departures and own choices

The published design fixes these points, and this RTL follows them:

- the three systems and the top-level port names and widths;
- the 100 MHz clock;
- lamp off in daylight, 40 % at night with no motion, 100 % with motion;
- a 500000-count PWM counter;
- the 200 V to 240 V solar window, with fall-back to the grid;
- a 12-bit passcode;
- lockout with door alarm, window alarm, red and yellow lights at the third
  wrong code;
- the set of HVAC actuators.

The following are this design's own choices, because the published design
leaves them open:

- **Temperature bands** (15 / 20 / 25 / 30 °C) and switching the HVAC only
  when someone is present.
- **Window alarm condition** (open window while motion is seen) and the use
  of `button` as a silence button.
- **Red light** shows any alarm, not only the lockout.
- **Fire alarm** simply follows the smoke sensor. There is no latching and no
  acknowledge.
- **Passcode details**: factory code `000`, edge-triggered confirm,
  `resetpass` also ending a lockout, no authorisation needed for `chgpass`,
  one-clock grant and deny pulses. A real door release would likely need a
  longer pulse.
- **Sensor polarities**: 1 = daylight, 1 = motion, 1 = window closed,
  1 = smoke. Encoding: `PowerLine_Select` 1 = solar. Readings are unsigned
  volts and degrees.
- **Synchronous, active-high reset** that clears every register. The passcode
  returns to `000` on reset.
- **No input synchronisers or debouncing**. All inputs are assumed to be
  synchronous to `clk` already, for example from an off-chip sensor interface.
  Add two-flop synchronisers in front of the top if they are not.
- The published block diagram shows a two-way link between the power switch
  and the main control system, but not what it carries. No such link exists
  here.

The published power, area and timing results belong to a 90 nm
implementation and say nothing this RTL can be checked against.

## Simulation

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Build and run one with plain Verilator, for
example the full design:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/has_pkg.sv tb/tb_has_security_controller.sv \
    --top-module tb_has_security_controller -Mdir obj_top
./obj_top/Vtb_has_security_controller
```

| Testbench | What it covers |
|---|---|
| `tb_lamp_pwm` | default 500000-clock period and 200000-clock high time, edge to edge over several periods; off and full modes |
| `tb_light_ctrl` | all day / night / motion cases, 40 % duty (100-clock period) |
| `tb_temp_ctrl` | every temperature, occupied and empty, plus random values, against the band table |
| `tb_comfort_ctrl` | the published test temperatures (35, 18, 24, 10, 28, 35 °C) under every light/motion case, two-clock latency |
| `tb_password_auth` | the published code sequence (ABC, BAD, ABC, A67, 666, 888), lockout and recovery, then 2000 random operations against a reference model |
| `tb_security_ctrl` | window-alarm truth table, fire alarm, pulse timing, lockout outputs, silence button during lockout |
| `tb_load_transfer_switch` | every solar reading against six grid readings, including the published voltage pairs |
| `tb_has_security_controller` | end-to-end run at the default size (see below) |

`tb_has_security_controller` uses the top with all defaults, including the
full 500000-clock PWM period, and finishes in about a second. It replays a
scenario built on the published top-level test run: the same passcodes,
voltage pairs and temperatures. After each step it compares every output
with a reference computed in the testbench. It counts each behaviour as it
sees it on the outputs:

- solar and grid selection;
- passcode restore and change;
- grant, deny and lockout;
- window alarm, button silence and fire alarm;
- lamp off, dim and full;
- each HVAC actuator, and HVAC idle.

A behaviour that never occurs counts as a failure.

Simulation is two-state. Everything the outputs depend on is reset, and the
testbenches drive every input from time 0.
