// tb_load_transfer_switch: self-checking testbench for load_transfer_switch.
//
// Applies every solar reading against a spread of grid readings, including
// the pairs of the published test run (240/194, 195/240, 250/250, 250/240,
// 240/240), and checks one clock later that solar (1) is chosen exactly when
// 200 <= solar <= 240, and grid (0) otherwise. Also checks grid after reset.
`timescale 1ns/1ps
module tb_load_transfer_switch;
  import has_pkg::*;
  logic clk = 1'b0;
  logic reset;
  logic [7:0] solar, grid;
  line_e line;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  load_transfer_switch dut (.clk(clk), .reset(reset), .solar_voltage(solar),
                            .grid_voltage(grid), .line_o(line));

  task automatic apply(input int s, input int g);
    bit exp;
    solar = 8'(s); grid = 8'(g);
    exp = (s >= 200 && s <= 240);
    @(posedge clk); #1;
    checks++;
    if (line !== exp) begin
      failures++;
      $display("FAIL: solar=%0d grid=%0d got %0d exp %0d", s, g, line, exp);
    end
  endtask

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int grids[6] = '{0, 150, 199, 220, 240, 255};
    reset = 1'b1; solar = 8'd220; grid = 8'd220;
    repeat (3) @(posedge clk);
    #1 checks++; if (line !== LINE_GRID) begin failures++; $display("FAIL: reset"); end
    reset = 1'b0;
    apply(240, 194); apply(195, 240); apply(250, 250); apply(250, 240); apply(240, 240);
    foreach (grids[i]) for (int s = 0; s < 256; s++) apply(s, grids[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
