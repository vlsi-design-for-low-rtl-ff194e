// tb_security_ctrl: self-checking testbench for security_ctrl.
//
// Checks, against values written out here: the fire alarm follows the smoke
// sensor one clock later; the window alarm for all eight combinations of
// window contact, motion and silence button; the red light as the OR of the
// alarms; a correct passcode gives one-clock green light and door-open pulses
// two clocks after confirm_in rises; a wrong one gives a one-clock yellow
// pulse; the third wrong passcode turns on and holds the yellow light, door
// alarm, window alarm and red light; resetpass ends the lockout.
`timescale 1ns/1ps
module tb_security_ctrl;
  logic clk = 1'b0;
  logic reset, resetpass, chgpass, confirm, button, mag, motion, smoke;
  logic [11:0] pw, saved;
  logic [1:0]  trials;
  logic yellow, green, door_open, red, door_alarm, window_alarm, fire_alarm;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  security_ctrl dut (
    .clk(clk), .reset(reset), .resetpass(resetpass), .chgpass(chgpass),
    .password_in(pw), .confirm_in(confirm), .button(button),
    .magneticswitch(mag), .motion_sensor(motion), .smoke_sensor(smoke),
    .Saved_password(saved), .Trials_counter(trials), .YellowLight_o(yellow),
    .GreenLight_o(green), .DOOR_OPEN(door_open), .RedLight_o(red),
    .DOOR_ALARM(door_alarm), .WINDOW_ALARM(window_alarm), .FIRE_ALARM(fire_alarm));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // confirm a code; return the cycle (1-based, after the rise) of each pulse
  task automatic confirm_code(input logic [11:0] code, output int g_at, output int y_at,
                              output int g_n, output int y_n);
    pw = code; confirm = 1'b1;
    g_at = 0; y_at = 0; g_n = 0; y_n = 0;
    for (int c = 1; c <= 6; c++) begin
      @(posedge clk); #1;
      if (c == 3) confirm = 1'b0;
      if (green)  begin g_n++; if (g_at == 0) g_at = c; end
      if (yellow) begin y_n++; if (y_at == 0) y_at = c; end
      check(green == door_open, "door open differs from green light");
    end
  endtask

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int g_at, y_at, g_n, y_n;
    reset = 1; resetpass = 0; chgpass = 0; confirm = 0; button = 0;
    mag = 1; motion = 0; smoke = 0; pw = '0;
    repeat (3) @(posedge clk);
    #1 reset = 0;
    check(!red && !yellow && !green && !door_alarm && !window_alarm && !fire_alarm, "outputs after reset");

    // fire alarm
    smoke = 1; @(posedge clk); #1;
    check(fire_alarm && red, "smoke does not raise fire alarm and red light");
    smoke = 0; @(posedge clk); #1;
    check(!fire_alarm && !red, "fire alarm stays after smoke clears");

    // window alarm truth table
    for (int v = 0; v < 8; v++) begin
      bit exp;
      {mag, motion, button} = 3'(v);
      exp = !mag && motion && !button;
      @(posedge clk); #1;
      check(window_alarm == exp, $sformatf("window alarm mag=%0b motion=%0b button=%0b", mag, motion, button));
      check(red == exp, "red light differs from window alarm");
    end
    mag = 1; motion = 0; button = 0;

    // set passcode 0xABC
    pw = 12'habc; chgpass = 1; @(posedge clk); #1 chgpass = 0;
    check(saved == 12'habc, "passcode not stored");

    // correct code
    confirm_code(12'habc, g_at, y_at, g_n, y_n);
    check(g_at == 2 && g_n == 1 && y_n == 0, $sformatf("grant pulse at %0d x%0d", g_at, g_n));
    // wrong code
    confirm_code(12'hbad, g_at, y_at, g_n, y_n);
    check(y_at == 2 && y_n == 1 && g_n == 0, $sformatf("deny pulse at %0d x%0d", y_at, y_n));
    check(trials == 1 && !door_alarm, "one wrong code");
    confirm_code(12'h666, g_at, y_at, g_n, y_n);
    check(trials == 2 && !door_alarm && !yellow, "two wrong codes");
    // third wrong code: lockout
    confirm_code(12'h888, g_at, y_at, g_n, y_n);
    check(trials == 3, "trial counter not at three");
    check(yellow && door_alarm && window_alarm && red, "lockout alarms not all on");
    // lockout holds; correct code ignored, button cannot silence it
    button = 1;
    confirm_code(12'habc, g_at, y_at, g_n, y_n);
    check(g_n == 0, "door opened in lockout");
    check(yellow && door_alarm && window_alarm && red, "lockout alarms dropped");
    button = 0;
    // resetpass ends the lockout
    resetpass = 1; @(posedge clk); #1 resetpass = 0;
    @(posedge clk); #1;
    check(!yellow && !door_alarm && !window_alarm && !red && trials == 0 && saved == 0,
          "resetpass does not end the lockout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
