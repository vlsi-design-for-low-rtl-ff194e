// security_ctrl: security system of the controller.
//
// Wraps password_auth (user identification with trial counter and lockout)
// and adds the alarms and indicator lights:
//   GreenLight_o / DOOR_OPEN  one-clock pulse when a correct passcode is confirmed
//   YellowLight_o             one-clock pulse on a wrong passcode, held on in lockout
//   DOOR_ALARM                on in lockout (third wrong passcode)
//   WINDOW_ALARM              on in lockout, or when a window is open
//                             (magneticswitch = 0) while motion is seen and the
//                             silence button is not held
//   FIRE_ALARM                follows the smoke sensor
//   RedLight_o                warning light: on whenever any alarm is on
// The alarm and light outputs are registered (one clock after their inputs,
// two clocks after the confirm edge for the passcode results).
//
// Interface: clk, synchronous active-high reset, the keypad signals
// (resetpass, chgpass, password_in, confirm_in), button, magneticswitch,
// motion_sensor, smoke_sensor; the outputs above plus Saved_password and
// Trials_counter for observation.
//
// The lights and alarms, and the rule that door alarm, window alarm, red and
// yellow lights all come on at the third wrong passcode, are published
// behaviour. The window-alarm condition, the use of button as an alarm
// silence push-button, the red light covering all alarms and the pulse
// lengths are this design's choices.
module security_ctrl
  import has_pkg::*;
#(
  parameter int unsigned PW         = has_pkg::PASS_W,
  parameter int unsigned MAX_TRIALS = has_pkg::PASS_MAX_TRIALS,
  localparam int unsigned TW        = $clog2(MAX_TRIALS + 1)
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          resetpass,
  input  logic          chgpass,
  input  logic [PW-1:0] password_in,
  input  logic          confirm_in,
  input  logic          button,
  input  logic          magneticswitch,
  input  logic          motion_sensor,
  input  logic          smoke_sensor,
  output logic [PW-1:0] Saved_password,
  output logic [TW-1:0] Trials_counter,
  output logic          YellowLight_o,
  output logic          GreenLight_o,
  output logic          DOOR_OPEN,
  output logic          RedLight_o,
  output logic          DOOR_ALARM,
  output logic          WINDOW_ALARM,
  output logic          FIRE_ALARM
);

  logic granted, denied, lockout;
  logic window_d, fire_d;

  password_auth #(
    .PW         (PW),
    .MAX_TRIALS (MAX_TRIALS)
  ) u_auth (
    .clk            (clk),
    .reset          (reset),
    .resetpass      (resetpass),
    .chgpass        (chgpass),
    .password_in    (password_in),
    .confirm_in     (confirm_in),
    .saved_password (Saved_password),
    .trials         (Trials_counter),
    .granted_o      (granted),
    .denied_o       (denied),
    .lockout_o      (lockout)
  );

  assign window_d = lockout | (~magneticswitch & motion_sensor & ~button);
  assign fire_d   = smoke_sensor;

  always_ff @(posedge clk) begin
    if (reset) begin
      GreenLight_o  <= 1'b0;
      DOOR_OPEN     <= 1'b0;
      YellowLight_o <= 1'b0;
      DOOR_ALARM    <= 1'b0;
      WINDOW_ALARM  <= 1'b0;
      FIRE_ALARM    <= 1'b0;
      RedLight_o    <= 1'b0;
    end else begin
      GreenLight_o  <= granted;
      DOOR_OPEN     <= granted;
      YellowLight_o <= denied | lockout;
      DOOR_ALARM    <= lockout;
      WINDOW_ALARM  <= window_d;
      FIRE_ALARM    <= fire_d;
      RedLight_o    <= lockout | window_d | fire_d;
    end
  end

  // The door is never opened while the alarms of a lockout are on.
  a_no_open_in_lockout: assert property (@(posedge clk) disable iff (reset)
                                         DOOR_OPEN |-> !DOOR_ALARM);

endmodule
