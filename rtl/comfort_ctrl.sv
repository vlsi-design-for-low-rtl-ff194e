// comfort_ctrl: environment comfort system (lighting and temperature).
//
// The three comfort sensors are first sampled into a register, so that the
// lighting and HVAC decisions are taken from one consistent snapshot per
// clock. The light sensor and motion sensor then drive light_ctrl (lamp off
// in daylight, dimmed PWM at night with nobody present, full at night with
// motion), and the temperature reading and motion sensor drive temp_ctrl
// (heater, three fan speeds, air conditioner).
//
// Interface: clk, synchronous active-high reset, light_sensor, motion_sensor,
// temperature_sensor[7:0]; lamp_o, heater_o, fan1_o, fan2_o, fan3_o, aircon_o.
// Latency from sensors to outputs: two clocks (sample register, then the
// output register of each sub-block).
//
// The split into lighting and temperature management follows the published
// design; the input sample register is this design's choice.
module comfort_ctrl
  import has_pkg::*;
#(
  parameter int unsigned PERIOD      = has_pkg::PWM_PERIOD,
  parameter int unsigned DIM_PERCENT = has_pkg::LAMP_DIM_PERCENT
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       light_sensor,
  input  logic       motion_sensor,
  input  logic [7:0] temperature_sensor,
  output logic       lamp_o,
  output logic       heater_o,
  output logic       fan1_o,
  output logic       fan2_o,
  output logic       fan3_o,
  output logic       aircon_o
);

  logic       light_q, motion_q;
  logic [7:0] temp_q;
  hvac_t      hvac;

  always_ff @(posedge clk) begin
    if (reset) begin
      light_q  <= 1'b0;
      motion_q <= 1'b0;
      temp_q   <= '0;
    end else begin
      light_q  <= light_sensor;
      motion_q <= motion_sensor;
      temp_q   <= temperature_sensor;
    end
  end

  light_ctrl #(
    .PERIOD      (PERIOD),
    .DIM_PERCENT (DIM_PERCENT)
  ) u_light (
    .clk           (clk),
    .reset         (reset),
    .light_sensor  (light_q),
    .motion_sensor (motion_q),
    .lamp_o        (lamp_o)
  );

  temp_ctrl u_temp (
    .clk         (clk),
    .reset       (reset),
    .temperature (temp_q),
    .occupied    (motion_q),
    .hvac_o      (hvac)
  );

  assign heater_o = hvac.heater;
  assign fan1_o   = hvac.fan1;
  assign fan2_o   = hvac.fan2;
  assign fan3_o   = hvac.fan3;
  assign aircon_o = hvac.aircon;

endmodule
