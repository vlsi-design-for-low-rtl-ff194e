// tb_has_security_controller: end-to-end test of the whole controller at its
// default parameters (100 MHz clock, 500000-clock lamp PWM period).
//
// Replays a day in the life that follows the published top-level test run:
// the same passcodes (ABC, BAD, A67, 666, 888), the same solar/grid voltage
// pairs and the same temperatures, plus the daylight, motion, window, smoke
// and button changes needed to reach every behaviour. After each step the
// testbench waits for the outputs to settle and compares all of them with a
// reference computed here from the stated rules. The lamp's 40 % level is
// measured over two full PWM periods (1,000,000 clocks).
//
// Every mechanism is counted where it is observed on the outputs: solar and
// grid selection, passcode restore and change, grant, deny, lockout, window
// alarm, button silence, fire alarm, lamp off / dim / full, heater, three fan
// speeds, air conditioner, HVAC idle. One that never happens is a failure.
`timescale 1ns/1ps
module tb_has_security_controller;
  logic clk = 1'b0;
  logic reset, resetpass, chgpass, confirm_in, button;
  logic [11:0] password_in;
  logic [7:0]  solar, grid, temp;
  logic smoke, motion, mag, light;
  logic        sel;
  logic [11:0] saved;
  logic [1:0]  trials;
  logic yellow, green, door_open, red, door_alarm, window_alarm, fire_alarm;
  logic heater, fan1, fan2, fan3, aircon, lamp;
  int checks = 0, failures = 0;

  // mechanism counters
  typedef enum int {
    M_SOLAR, M_GRID, M_RESTORE, M_CHANGE, M_GRANT, M_DENY, M_LOCKOUT,
    M_WINDOW, M_SILENCE, M_FIRE, M_LAMP_OFF, M_LAMP_DIM, M_LAMP_FULL,
    M_HEATER, M_FAN1, M_FAN2, M_FAN3, M_AIRCON, M_HVAC_IDLE, M_COUNT
  } mech_e;
  int seen[M_COUNT];

  // reference state
  logic [11:0] m_saved;
  int          m_trials;

  always #5 clk = ~clk;

  has_security_controller dut (
    .clk(clk), .reset(reset), .resetpass(resetpass), .chgpass(chgpass),
    .password_in(password_in), .confirm_in(confirm_in), .button(button),
    .SOLAR_VOLTAGE(solar), .GRID_VOLTAGE(grid), .smoke_sensor(smoke),
    .motion_sensor(motion), .magneticswitch(mag), .temperature_sensor(temp),
    .light_sensor(light), .PowerLine_Select(sel), .Saved_password(saved),
    .Trials_counter(trials), .YellowLight_o(yellow), .GreenLight_o(green),
    .DOOR_OPEN(door_open), .RedLight_o(red), .DOOR_ALARM(door_alarm),
    .WINDOW_ALARM(window_alarm), .FIRE_ALARM(fire_alarm), .HEATER(heater),
    .FANSPEED1(fan1), .FANSPEED2(fan2), .FANSPEED3(fan3), .AIRCON(aircon),
    .LAMP(lamp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic clocks(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // compare the steady-state outputs with the reference
  task automatic check_steady(input string where);
    bit lock, win, solar_ok;
    logic [4:0] hv;
    lock     = (m_trials == 3);
    win      = lock || (!mag && motion && !button);
    solar_ok = (solar >= 200 && solar <= 240);
    if (!motion)         hv = 5'b00000;
    else if (temp <= 15) hv = 5'b10000;
    else if (temp <= 20) hv = 5'b01000;
    else if (temp <= 25) hv = 5'b00100;
    else if (temp <= 30) hv = 5'b00010;
    else                 hv = 5'b00001;
    check(sel == solar_ok, $sformatf("%s: line select %0b", where, sel));
    check(saved == m_saved, $sformatf("%s: passcode %h", where, saved));
    check(trials == 2'(m_trials), $sformatf("%s: trials %0d", where, trials));
    check(yellow == lock && door_alarm == lock, $sformatf("%s: yellow/door alarm", where));
    check(window_alarm == win, $sformatf("%s: window alarm %0b", where, window_alarm));
    check(fire_alarm == smoke, $sformatf("%s: fire alarm", where));
    check(red == (win || smoke), $sformatf("%s: red light", where));
    check(!green && !door_open, $sformatf("%s: door open at rest", where));
    check({heater, fan1, fan2, fan3, aircon} == hv,
          $sformatf("%s: hvac %b exp %b", where, {heater, fan1, fan2, fan3, aircon}, hv));
    // count what is visible
    if (sel)  seen[M_SOLAR]++; else seen[M_GRID]++;
    if (lock) seen[M_LOCKOUT]++;
    if (window_alarm && !lock) seen[M_WINDOW]++;
    if (!window_alarm && !mag && motion && button) seen[M_SILENCE]++;
    if (fire_alarm) seen[M_FIRE]++;
    if (heater) seen[M_HEATER]++;
    if (fan1)   seen[M_FAN1]++;
    if (fan2)   seen[M_FAN2]++;
    if (fan3)   seen[M_FAN3]++;
    if (aircon) seen[M_AIRCON]++;
    if (!motion && {heater, fan1, fan2, fan3, aircon} == 0) seen[M_HVAC_IDLE]++;
  endtask

  // lamp: measure n clocks and compare with the expected level
  task automatic check_lamp(input string where);
    int highs = 0;
    int n;
    n = (!light && !motion) ? 1_000_000 : 2_000;
    clocks(3);   // settle, and in dim mode start on a period boundary
    repeat (n) begin @(posedge clk); #1 if (lamp) highs++; end
    if (light) begin
      check(highs == 0, $sformatf("%s: lamp on in daylight (%0d)", where, highs));
      if (highs == 0) seen[M_LAMP_OFF]++;
    end else if (motion) begin
      check(highs == n, $sformatf("%s: lamp not full (%0d/%0d)", where, highs, n));
      if (highs == n) seen[M_LAMP_FULL]++;
    end else begin
      check(highs == 400_000, $sformatf("%s: lamp dim level %0d/1000000", where, highs));
      if (highs == 400_000) seen[M_LAMP_DIM]++;
    end
  endtask

  // confirm a code and check the grant / deny pulse two clocks later
  task automatic enter_code(input logic [11:0] code);
    bit lock, ok;
    int g = 0, y = 0, g_at = 0;
    lock = (m_trials == 3);
    ok   = !lock && (code == m_saved);
    password_in = code; confirm_in = 1'b1;
    for (int c = 1; c <= 10; c++) begin
      @(posedge clk); #1;
      if (c == 5) confirm_in = 1'b0;
      if (green && door_open) begin g++; if (g_at == 0) g_at = c; end
      if (yellow) y++;
    end
    if (lock) begin
      check(g == 0, "door opened in lockout");
    end else if (ok) begin
      check(g == 1 && g_at == 2, $sformatf("code %h: grant pulses %0d at %0d", code, g, g_at));
      if (g == 1) seen[M_GRANT]++;
      m_trials = 0;
    end else begin
      m_trials++;
      if (m_trials < 3) begin
        check(y == 1, $sformatf("code %h: deny pulses %0d", code, y));
        if (y == 1) seen[M_DENY]++;
      end else begin
        check(y >= 1, "no yellow light at lockout");
        seen[M_DENY]++;
      end
    end
  endtask

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; resetpass = 0; chgpass = 0; confirm_in = 0; button = 0;
    password_in = 12'habc; solar = 8'd240; grid = 8'd194;
    smoke = 0; motion = 0; mag = 1; light = 0; temp = 8'd35;
    m_saved = '0; m_trials = 0;
    clocks(5);
    reset = 0;

    // restore the factory passcode, then set ABC
    resetpass = 1; clocks(1); resetpass = 0; clocks(1);
    check(saved == 12'h000, "restore: passcode not zero");
    if (saved == 12'h000) seen[M_RESTORE]++;
    chgpass = 1; clocks(1); chgpass = 0; clocks(1);
    m_saved = 12'habc;
    check(saved == 12'habc, "change: passcode not ABC");
    if (saved == 12'habc) seen[M_CHANGE]++;

    // night, empty house, solar 240 V / grid 194 V, 35 degrees
    clocks(3); check_steady("night empty"); check_lamp("night empty");
    enter_code(12'habc); clocks(3); check_steady("after ABC");

    // someone comes in through an open window; solar sags to 195 V
    solar = 8'd195; grid = 8'd240; temp = 8'd18; motion = 1; mag = 0;
    clocks(3); check_steady("window open"); check_lamp("night motion");
    enter_code(12'hbad); clocks(3); check_steady("after BAD");
    enter_code(12'habc); clocks(3); check_steady("after ABC again");
    button = 1; clocks(3); check_steady("silenced");
    button = 0; mag = 1; clocks(3); check_steady("window closed");

    // smoke, both sources at 250 V, 24 degrees
    solar = 8'd250; grid = 8'd250; temp = 8'd24; smoke = 1;
    clocks(3); check_steady("smoke");
    smoke = 0; light = 1; clocks(3); check_steady("daylight"); check_lamp("day");

    // temperatures 10, 28, 35 with someone present; grid 240 V
    grid = 8'd240;
    temp = 8'd10; clocks(3); check_steady("10 degrees");
    temp = 8'd28; clocks(3); check_steady("28 degrees");
    motion = 0;   clocks(3); check_steady("28 degrees empty");
    motion = 1;
    temp = 8'd35; clocks(3); check_steady("35 degrees");

    // three wrong codes: lockout
    enter_code(12'ha67); clocks(3); check_steady("after A67");
    enter_code(12'h666); clocks(3); check_steady("after 666");
    enter_code(12'h888); clocks(3); check_steady("after 888");
    enter_code(12'habc); clocks(3); check_steady("ABC in lockout");

    // solar back to 240 V
    solar = 8'd240; clocks(3); check_steady("solar 240 V");

    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin
        failures++;
        $display("FAIL: mechanism %s never happened", mech_e'(i));
      end
    end
    $display("mechanisms: solar=%0d grid=%0d restore=%0d change=%0d grant=%0d deny=%0d lockout=%0d",
             seen[M_SOLAR], seen[M_GRID], seen[M_RESTORE], seen[M_CHANGE], seen[M_GRANT],
             seen[M_DENY], seen[M_LOCKOUT]);
    $display("mechanisms: window=%0d silence=%0d fire=%0d lamp off/dim/full=%0d/%0d/%0d",
             seen[M_WINDOW], seen[M_SILENCE], seen[M_FIRE], seen[M_LAMP_OFF],
             seen[M_LAMP_DIM], seen[M_LAMP_FULL]);
    $display("mechanisms: heater=%0d fan1=%0d fan2=%0d fan3=%0d aircon=%0d idle=%0d",
             seen[M_HEATER], seen[M_FAN1], seen[M_FAN2], seen[M_FAN3], seen[M_AIRCON],
             seen[M_HVAC_IDLE]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
