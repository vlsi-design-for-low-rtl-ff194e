// tb_password_auth: self-checking testbench for password_auth.
//
// First replays the passcode sequence of the published test run: restore the
// factory code, set 0xABC, then confirm ABC (accepted), BAD (wrong), ABC
// (accepted, counter back to 0), A67, 666 and 888 (three wrong: lockout).
// Then runs a long random sequence of restore / change / confirm operations
// against a reference model kept in the testbench. Each confirmation must
// give exactly one grant or deny pulse, one clock after confirm_in rises,
// and holding confirm_in high must not count again.
`timescale 1ns/1ps
module tb_password_auth;
  logic clk = 1'b0;
  logic reset, resetpass, chgpass, confirm;
  logic [11:0] pw, saved;
  logic [1:0]  trials;
  logic granted, denied, lockout;
  int checks = 0, failures = 0;

  // reference model
  logic [11:0] m_saved;
  int          m_trials;

  always #5 clk = ~clk;

  password_auth dut (
    .clk(clk), .reset(reset), .resetpass(resetpass), .chgpass(chgpass),
    .password_in(pw), .confirm_in(confirm), .saved_password(saved),
    .trials(trials), .granted_o(granted), .denied_o(denied), .lockout_o(lockout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic check_state(input string where);
    check(saved == m_saved, $sformatf("%s: saved %h exp %h", where, saved, m_saved));
    check(trials == 2'(m_trials), $sformatf("%s: trials %0d exp %0d", where, trials, m_trials));
    check(lockout == (m_trials == 3), $sformatf("%s: lockout %0b", where, lockout));
  endtask

  task automatic do_resetpass();
    resetpass = 1'b1; @(posedge clk); #1 resetpass = 1'b0;
    m_saved = '0; m_trials = 0;
    check_state("resetpass");
  endtask

  task automatic do_change(input logic [11:0] code);
    pw = code; chgpass = 1'b1; @(posedge clk); #1 chgpass = 1'b0;
    if (m_trials != 3) m_saved = code;
    check_state("change");
  endtask

  task automatic do_confirm(input logic [11:0] code, input int hold);
    bit exp_grant, exp_deny;
    int g = 0, d = 0;
    exp_grant = (m_trials != 3) && (code == m_saved);
    exp_deny  = (m_trials != 3) && (code != m_saved);
    pw = code; confirm = 1'b1;
    @(posedge clk); #1;
    check(granted == exp_grant && denied == exp_deny,
          $sformatf("confirm %h: grant %0b deny %0b, exp %0b %0b", code, granted, denied, exp_grant, exp_deny));
    if (exp_grant) m_trials = 0;
    if (exp_deny)  m_trials++;
    repeat (hold) begin @(posedge clk); #1 g += granted; d += denied; end
    confirm = 1'b0;
    repeat (2) begin @(posedge clk); #1 g += granted; d += denied; end
    check(g == 0 && d == 0, "held confirm counted more than once");
    check_state("confirm");
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; resetpass = 0; chgpass = 0; confirm = 0; pw = '0;
    m_saved = '0; m_trials = 0;
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;
    check_state("reset");

    // published sequence
    do_resetpass();
    do_change(12'habc);
    do_confirm(12'habc, 3);  check(trials == 0, "abc accepted");
    do_confirm(12'hbad, 3);  check(trials == 1, "bad counted");
    do_confirm(12'habc, 3);  check(trials == 0, "abc clears counter");
    do_confirm(12'ha67, 3);
    do_confirm(12'h666, 3);
    do_confirm(12'h888, 3);  check(trials == 3 && lockout, "lockout after three wrong");
    do_confirm(12'habc, 3);  check(lockout, "lockout left by a confirmation");
    do_change(12'h123);      check(saved == 12'habc, "passcode changed in lockout");
    do_resetpass();          check(!lockout, "resetpass leaves lockout");

    // random operations
    repeat (2000) begin
      int op = $urandom_range(0, 9);
      if (op == 0)      do_resetpass();
      else if (op <= 2) do_change(12'($urandom));
      else if (op <= 5) do_confirm(m_saved, $urandom_range(0, 3));
      else              do_confirm(12'($urandom), $urandom_range(0, 3));
    end

    // reset clears everything
    reset = 1'b1; @(posedge clk); #1 reset = 1'b0;
    m_saved = '0; m_trials = 0;
    check_state("reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
