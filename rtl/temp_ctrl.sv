// temp_ctrl: temperature management of the comfort system.
//
// The 8-bit temperature reading (degrees Celsius) is sorted into five bands,
// each driving one actuator: heater, fan speed 1, 2 or 3, or the air
// conditioner. Exactly one actuator runs at a time, and only while the motion
// sensor reports that the room is occupied; with nobody present all
// actuators are off to save energy.
//
// Interface: clk, synchronous active-high reset, temperature[7:0], occupied,
// hvac_o (has_pkg::hvac_t). Outputs are registered: one clock of latency.
//
// The set of actuators (heater, three fan speeds, air conditioner) is the
// published one. The band limits (15, 20, 25 and 30 degrees, parameters
// below) and the gating by occupancy are this design's choices.
module temp_ctrl
  import has_pkg::*;
#(
  parameter logic [7:0] HEAT_MAX = has_pkg::T_HEAT_MAX,
  parameter logic [7:0] FAN1_MAX = has_pkg::T_FAN1_MAX,
  parameter logic [7:0] FAN2_MAX = has_pkg::T_FAN2_MAX,
  parameter logic [7:0] FAN3_MAX = has_pkg::T_FAN3_MAX
) (
  input  logic       clk,
  input  logic       reset,
  input  logic [7:0] temperature,
  input  logic       occupied,
  output hvac_t      hvac_o
);

  hvac_t hvac_d;

  always_comb begin
    hvac_d = '0;
    if (occupied) begin
      if      (temperature <= HEAT_MAX) hvac_d.heater = 1'b1;
      else if (temperature <= FAN1_MAX) hvac_d.fan1   = 1'b1;
      else if (temperature <= FAN2_MAX) hvac_d.fan2   = 1'b1;
      else if (temperature <= FAN3_MAX) hvac_d.fan3   = 1'b1;
      else                              hvac_d.aircon = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (reset) hvac_o <= '0;
    else       hvac_o <= hvac_d;
  end

  // At most one actuator is driven at any time.
  a_one_actuator: assert property (@(posedge clk) disable iff (reset) $onehot0(hvac_o));

endmodule
