// tb_lamp_pwm: self-checking testbench for lamp_pwm at its default size.
//
// Checks that LAMP_OFF holds the output low, LAMP_FULL holds it high, and
// that LAMP_DIM gives a wave whose period is 500000 clocks with 200000 clocks
// high (40 %), measured edge to edge over several periods. The expected
// numbers are written out here, not taken from the block.
`timescale 1ns/1ps
module tb_lamp_pwm;
  import has_pkg::*;

  localparam int EXP_PERIOD = 500_000;
  localparam int EXP_HIGH   = 200_000;

  logic       clk = 1'b0;
  logic       reset;
  lamp_mode_e mode;
  logic       pwm;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lamp_pwm dut (.clk(clk), .reset(reset), .mode(mode), .pwm_o(pwm));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int highs, lows, t_rise, t_prev_rise, t_fall, cyc;
    bit prev;
    reset = 1'b1; mode = LAMP_OFF;
    repeat (3) @(posedge clk);
    reset = 1'b0;

    // OFF: low for a while
    highs = 0;
    repeat (1000) begin @(posedge clk); #1 if (pwm) highs++; end
    check(highs == 0, "OFF mode drives the lamp");

    // FULL: high after one clock of latency
    mode = LAMP_FULL;
    @(posedge clk); #1 check(pwm == 1'b1, "FULL not seen after one clock");
    lows = 0;
    repeat (1000) begin @(posedge clk); #1 if (!pwm) lows++; end
    check(lows == 0, "FULL mode has low cycles");

    // DIM: measure three full periods from rising edge to rising edge
    mode = LAMP_DIM;
    @(posedge clk); #1;
    prev = pwm; cyc = 0; t_prev_rise = -1;
    highs = 0;
    for (int n = 0; n < 4 * EXP_PERIOD; n++) begin
      @(posedge clk); #1; cyc++;
      if (pwm && !prev) begin
        if (t_prev_rise >= 0) begin
          check(cyc - t_prev_rise == EXP_PERIOD, $sformatf("period %0d", cyc - t_prev_rise));
          check(highs == EXP_HIGH, $sformatf("high time %0d", highs));
        end
        t_prev_rise = cyc;
        highs = 0;
      end
      if (pwm) highs++;
      prev = pwm;
    end
    check(t_prev_rise > 0, "no rising edge in DIM mode");

    // back to OFF
    mode = LAMP_OFF;
    @(posedge clk); #1 check(pwm == 1'b0, "OFF not seen after one clock");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
