// light_ctrl: lighting part of the comfort system.
//
// The light-dependent resistor reports daylight (light_sensor = 1) or
// darkness (0). In daylight the lamp stays off even when someone is present.
// In darkness the lamp runs at the dimmed PWM level while no motion is seen
// and at full brightness while the motion sensor reports someone. The choice
// is a small combinational decode into has_pkg::lamp_mode_e, fed to lamp_pwm.
//
// Interface: clk, synchronous active-high reset, light_sensor, motion_sensor,
// lamp_o (the PWM drive of the lamp). lamp_o follows the sensors one clock
// later, through the registered output of lamp_pwm.
//
// The day-off / 40 % / 100 % behaviour is the published one; the sensor
// polarities (1 = daylight, 1 = motion) are this design's reading of the
// published waveform's signal values.
module light_ctrl
  import has_pkg::*;
#(
  parameter int unsigned PERIOD      = has_pkg::PWM_PERIOD,
  parameter int unsigned DIM_PERCENT = has_pkg::LAMP_DIM_PERCENT
) (
  input  logic clk,
  input  logic reset,
  input  logic light_sensor,
  input  logic motion_sensor,
  output logic lamp_o
);

  lamp_mode_e mode;

  always_comb begin
    if (light_sensor)       mode = LAMP_OFF;
    else if (motion_sensor) mode = LAMP_FULL;
    else                    mode = LAMP_DIM;
  end

  lamp_pwm #(
    .PERIOD      (PERIOD),
    .DIM_PERCENT (DIM_PERCENT)
  ) u_pwm (
    .clk   (clk),
    .reset (reset),
    .mode  (mode),
    .pwm_o (lamp_o)
  );

endmodule
