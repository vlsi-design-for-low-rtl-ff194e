// password_auth: user identification for the security system.
//
// A 12-bit passcode is held in a register. resetpass restores the factory
// passcode (all zeros) and clears the trial counter; chgpass loads the code on
// password_in as the new passcode. A rising edge of confirm_in compares
// password_in with the stored passcode: a match grants entry (one-clock
// granted_o pulse) and clears the trial counter, a mismatch gives a one-clock
// denied_o pulse and adds one to the counter. When the counter reaches
// MAX_TRIALS (three) the block is locked out: further confirmations and
// passcode changes are ignored and lockout_o stays high until reset or
// resetpass. Two wrong entries are therefore tolerated and the third trips
// the alarms.
//
// Interface: clk, synchronous active-high reset, resetpass, chgpass,
// password_in, confirm_in; saved_password, trials, granted_o, denied_o,
// lockout_o. Priority: reset, resetpass, chgpass, confirmation. All outputs
// are registered; the result of a confirmation appears one clock after the
// clock edge that first samples confirm_in high.
//
// The 12-bit passcode, the trial counter and the lockout at three are
// published behaviour. Edge detection on confirm_in, the all-zero factory
// code, what resetpass clears and the ignoring of chgpass under lockout are
// this design's choices.
module password_auth
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
  output logic [PW-1:0] saved_password,
  output logic [TW-1:0] trials,
  output logic          granted_o,
  output logic          denied_o,
  output logic          lockout_o
);

  localparam logic [TW-1:0] TMAX = TW'(MAX_TRIALS);

  logic confirm_q;
  logic confirm_rise;

  assign confirm_rise = confirm_in & ~confirm_q;
  assign lockout_o    = (trials == TMAX);

  always_ff @(posedge clk) begin
    if (reset) confirm_q <= 1'b0;
    else       confirm_q <= confirm_in;
  end

  always_ff @(posedge clk) begin
    granted_o <= 1'b0;
    denied_o  <= 1'b0;
    if (reset || resetpass) begin
      saved_password <= '0;
      trials         <= '0;
    end else if (!lockout_o) begin
      if (chgpass) begin
        saved_password <= password_in;
      end else if (confirm_rise) begin
        if (password_in == saved_password) begin
          granted_o <= 1'b1;
          trials    <= '0;
        end else begin
          denied_o  <= 1'b1;
          trials    <= trials + 1'b1;
        end
      end
    end
  end

  // The trial counter never passes the lockout limit.
  a_trials_bounded: assert property (@(posedge clk) disable iff (reset) trials <= TMAX);
  // Entry is never granted and denied at once.
  a_grant_xor_deny: assert property (@(posedge clk) disable iff (reset) !(granted_o && denied_o));

endmodule
