// tb_light_ctrl: self-checking testbench for light_ctrl.
//
// Uses a 100-count PWM period to keep the run short. Checks: in daylight the
// lamp is off with and without motion; at night with motion it is fully on;
// at night without motion it is on for 40 of every 100 clocks.
`timescale 1ns/1ps
module tb_light_ctrl;
  logic clk = 1'b0;
  logic reset, light, motion, lamp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  light_ctrl #(.PERIOD(100), .DIM_PERCENT(40)) dut (
    .clk(clk), .reset(reset), .light_sensor(light), .motion_sensor(motion), .lamp_o(lamp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // count high cycles of the lamp over n clocks
  task automatic measure(input int n, output int highs);
    highs = 0;
    repeat (n) begin @(posedge clk); #1 if (lamp) highs++; end
  endtask

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h;
    reset = 1'b1; light = 1'b1; motion = 1'b0;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    // day, nobody
    @(posedge clk); measure(300, h); check(h == 0, "day/no motion: lamp on");
    // day, motion: still off
    motion = 1'b1;
    @(posedge clk); measure(300, h); check(h == 0, "day/motion: lamp on");
    // night, motion: full
    light = 1'b0;
    @(posedge clk); measure(300, h); check(h == 300, $sformatf("night/motion: %0d of 300", h));
    // night, no motion: 40 %
    motion = 1'b0;
    @(posedge clk); #1;
    measure(500, h); check(h == 200, $sformatf("night/no motion: %0d of 500", h));
    measure(1000, h); check(h == 400, $sformatf("night/no motion: %0d of 1000", h));
    // daylight returns: off one clock later
    light = 1'b1;
    @(posedge clk); @(posedge clk); #1 check(lamp == 1'b0, "lamp not off after daylight");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
