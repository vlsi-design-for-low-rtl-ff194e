// tb_temp_ctrl: self-checking testbench for temp_ctrl.
//
// Sweeps every 8-bit temperature, occupied and empty, plus a random
// sequence, and compares the registered actuator outputs one clock later
// with a reference written from the band table: <=15 heater, 16..20 fan 1,
// 21..25 fan 2, 26..30 fan 3, above 30 air conditioner, all off when empty.
`timescale 1ns/1ps
module tb_temp_ctrl;
  import has_pkg::*;
  logic clk = 1'b0;
  logic reset, occ;
  logic [7:0] temp;
  hvac_t hvac;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  temp_ctrl dut (.clk(clk), .reset(reset), .temperature(temp), .occupied(occ), .hvac_o(hvac));

  function automatic logic [4:0] expect_hvac(input int t, input bit o);
    // bit order: heater, fan1, fan2, fan3, aircon
    if (!o)      return 5'b00000;
    if (t <= 15) return 5'b10000;
    if (t <= 20) return 5'b01000;
    if (t <= 25) return 5'b00100;
    if (t <= 30) return 5'b00010;
    return 5'b00001;
  endfunction

  task automatic apply(input int t, input bit o);
    logic [4:0] got;
    temp = 8'(t); occ = o;
    @(posedge clk); #1;
    got = {hvac.heater, hvac.fan1, hvac.fan2, hvac.fan3, hvac.aircon};
    checks++;
    if (got !== expect_hvac(t, o)) begin
      failures++;
      $display("FAIL: t=%0d occ=%0b got %b exp %b", t, o, got, expect_hvac(t, o));
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
    reset = 1'b1; temp = '0; occ = 1'b0;
    repeat (3) @(posedge clk);
    #1 checks++; if (hvac !== '0) begin failures++; $display("FAIL: reset"); end
    reset = 1'b0;
    for (int t = 0; t < 256; t++) apply(t, 1'b1);
    for (int t = 0; t < 256; t++) apply(t, 1'b0);
    repeat (500) apply($urandom_range(0, 255), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
