// has_pkg: constants and types shared by the home automation and security
// controller. The 100 MHz clock, the 500000-count lamp PWM period, the 40 %
// night dimming level, the 200 V to 240 V solar window, the 12-bit passcode
// and the limit of three identification trials follow the published design.
// The temperature bands of the HVAC controller are this design's own choice.
package has_pkg;

  // Lighting (the clock is 100 MHz, so one PWM period is 5 ms)
  localparam int unsigned PWM_PERIOD   = 500_000;   // counts per PWM period
  localparam int unsigned LAMP_DIM_PERCENT = 40;        // night, no motion

  // Power source selection (volts, 8-bit readings)
  localparam logic [7:0] SOLAR_MIN_V = 8'd200;
  localparam logic [7:0] SOLAR_MAX_V = 8'd240;

  // Passcode and identification trials
  localparam int unsigned PASS_W     = 12;
  localparam int unsigned PASS_MAX_TRIALS = 3;

  // Temperature bands (degrees Celsius, 8-bit readings): this design's choice
  localparam logic [7:0] T_HEAT_MAX = 8'd15;   // <= 15 : heater
  localparam logic [7:0] T_FAN1_MAX = 8'd20;   // 16..20: fan speed 1
  localparam logic [7:0] T_FAN2_MAX = 8'd25;   // 21..25: fan speed 2
  localparam logic [7:0] T_FAN3_MAX = 8'd30;   // 26..30: fan speed 3, above: air conditioner

  // Power line selected for the load
  typedef enum logic {
    LINE_GRID  = 1'b0,
    LINE_SOLAR = 1'b1
  } line_e;

  // Lamp brightness requested from the PWM generator
  typedef enum logic [1:0] {
    LAMP_OFF  = 2'd0,
    LAMP_DIM  = 2'd1,
    LAMP_FULL = 2'd2
  } lamp_mode_e;

  // HVAC actuator outputs
  typedef struct packed {
    logic heater;
    logic fan1;
    logic fan2;
    logic fan3;
    logic aircon;
  } hvac_t;

endpackage
