// has_security_controller: home automation and security system controller.
//
// One clocked chip that joins three systems:
//   security_ctrl        (h1) passcode entry with trial counter and lockout,
//                        door / window / fire alarms and indicator lights
//   load_transfer_switch (h2) picks the solar or grid power line for the load
//   comfort_ctrl         (h3) lamp PWM from daylight and motion, and HVAC
//                        actuators from temperature and occupancy
// The blocks share only the clock, the reset and the motion sensor, which
// serves both the window alarm and the comfort system.
//
// Interface: the port names are those of the published top level. All inputs
// are taken as synchronous to clk (100 MHz nominal); reset is synchronous and
// active high. Every output is registered. Latencies: power line select one
// clock; alarms and lights one clock (two after a confirm edge for passcode
// results); comfort outputs two clocks.
//
// The three systems, their ports and the instance split follow the published
// design; what is exchanged between the power switch and the main control is
// not specified there, so the two are not connected here.
module has_security_controller
  import has_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  // keypad and door
  input  logic        resetpass,
  input  logic        chgpass,
  input  logic [11:0] password_in,
  input  logic        confirm_in,
  input  logic        button,
  // power sources (volts)
  input  logic [7:0]  SOLAR_VOLTAGE,
  input  logic [7:0]  GRID_VOLTAGE,
  // sensors
  input  logic        smoke_sensor,
  input  logic        motion_sensor,
  input  logic        magneticswitch,
  input  logic [7:0]  temperature_sensor,
  input  logic        light_sensor,
  // power switch
  output logic        PowerLine_Select,
  // security
  output logic [11:0] Saved_password,
  output logic [1:0]  Trials_counter,
  output logic        YellowLight_o,
  output logic        GreenLight_o,
  output logic        DOOR_OPEN,
  output logic        RedLight_o,
  output logic        DOOR_ALARM,
  output logic        WINDOW_ALARM,
  output logic        FIRE_ALARM,
  // comfort
  output logic        HEATER,
  output logic        FANSPEED1,
  output logic        FANSPEED2,
  output logic        FANSPEED3,
  output logic        AIRCON,
  output logic        LAMP
);

  line_e line;

  security_ctrl h1 (
    .clk            (clk),
    .reset          (reset),
    .resetpass      (resetpass),
    .chgpass        (chgpass),
    .password_in    (password_in),
    .confirm_in     (confirm_in),
    .button         (button),
    .magneticswitch (magneticswitch),
    .motion_sensor  (motion_sensor),
    .smoke_sensor   (smoke_sensor),
    .Saved_password (Saved_password),
    .Trials_counter (Trials_counter),
    .YellowLight_o  (YellowLight_o),
    .GreenLight_o   (GreenLight_o),
    .DOOR_OPEN      (DOOR_OPEN),
    .RedLight_o     (RedLight_o),
    .DOOR_ALARM     (DOOR_ALARM),
    .WINDOW_ALARM   (WINDOW_ALARM),
    .FIRE_ALARM     (FIRE_ALARM)
  );

  load_transfer_switch h2 (
    .clk           (clk),
    .reset         (reset),
    .solar_voltage (SOLAR_VOLTAGE),
    .grid_voltage  (GRID_VOLTAGE),
    .line_o        (line)
  );

  assign PowerLine_Select = line;

  comfort_ctrl h3 (
    .clk                (clk),
    .reset              (reset),
    .light_sensor       (light_sensor),
    .motion_sensor      (motion_sensor),
    .temperature_sensor (temperature_sensor),
    .lamp_o             (LAMP),
    .heater_o           (HEATER),
    .fan1_o             (FANSPEED1),
    .fan2_o             (FANSPEED2),
    .fan3_o             (FANSPEED3),
    .aircon_o           (AIRCON)
  );

endmodule
