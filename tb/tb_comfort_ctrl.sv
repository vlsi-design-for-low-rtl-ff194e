// tb_comfort_ctrl: self-checking testbench for comfort_ctrl.
//
// Uses a 50-count PWM period. Steps through the temperature readings of the
// published test run (35, 18, 24, 10, 28, 35 degrees) and through the
// day/night and motion combinations, and checks two clocks after every
// change the lamp mode (off, 40 % or full) and the single HVAC actuator
// expected from the band table: <=15 heater, 16..20 fan 1, 21..25 fan 2,
// 26..30 fan 3, above 30 air conditioner, nothing when nobody is present.
`timescale 1ns/1ps
module tb_comfort_ctrl;
  logic clk = 1'b0;
  logic reset, light, motion;
  logic [7:0] temp;
  logic lamp, heater, fan1, fan2, fan3, aircon;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  comfort_ctrl #(.PERIOD(50), .DIM_PERCENT(40)) dut (
    .clk(clk), .reset(reset), .light_sensor(light), .motion_sensor(motion),
    .temperature_sensor(temp), .lamp_o(lamp), .heater_o(heater), .fan1_o(fan1),
    .fan2_o(fan2), .fan3_o(fan3), .aircon_o(aircon));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [4:0] prev_exp = 5'b00000;

  task automatic step(input int t, input bit l, input bit m);
    logic [4:0] exp, got;
    int highs, lat;
    temp = 8'(t); light = l; motion = m;
    if (!m)        exp = 5'b00000;
    else if (t <= 15) exp = 5'b10000;
    else if (t <= 20) exp = 5'b01000;
    else if (t <= 25) exp = 5'b00100;
    else if (t <= 30) exp = 5'b00010;
    else              exp = 5'b00001;
    @(posedge clk); #1;
    got = {heater, fan1, fan2, fan3, aircon};
    check(got == prev_exp, $sformatf("t=%0d: hvac changed after one clock", t));
    @(posedge clk); #1;
    got = {heater, fan1, fan2, fan3, aircon};
    check(got == exp, $sformatf("t=%0d motion=%0b: hvac %b exp %b", t, m, got, exp));
    prev_exp = exp;
    highs = 0;
    repeat (100) begin @(posedge clk); #1 if (lamp) highs++; end
    if (l)      check(highs == 0,   $sformatf("day: lamp high %0d", highs));
    else if (m) check(highs == 100, $sformatf("night/motion: lamp high %0d", highs));
    else        check(highs == 40,  $sformatf("night/no motion: lamp high %0d of 100", highs));
  endtask

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int temps[6] = '{35, 18, 24, 10, 28, 35};
    reset = 1; light = 1; motion = 0; temp = 8'd35;
    repeat (3) @(posedge clk);
    #1 reset = 0;
    foreach (temps[i]) begin
      step(temps[i], 1'b0, 1'b0);
      step(temps[i], 1'b0, 1'b1);
      step(temps[i], 1'b1, 1'b1);
      step(temps[i], 1'b1, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
