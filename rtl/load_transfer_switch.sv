// load_transfer_switch: automatic load transfer switching control.
//
// The load is fed from the primary source (solar) whenever its voltage
// reading lies inside the window SOLAR_MIN .. SOLAR_MAX (200 V to 240 V,
// inclusive). Outside that window the load is moved to the secondary source
// (grid), which also leaves the solar battery free to charge back into range.
// The grid is the fallback even when its own reading is out of range, since
// it is the only source that does not need recharging.
//
// Interface: clk, synchronous active-high reset, solar_voltage[7:0],
// grid_voltage[7:0] (volts); line_o (has_pkg::line_e: 1 = solar, 0 = grid).
// The grid reading does not change the choice: it is kept as an input so
// that the block has the ports of the published one.
// Outputs are registered: one clock of latency. Reset selects the grid.
//
// The 200 V to 240 V window, the solar-first rule and the fall-back to the
// grid are published behaviour; the inclusive limits, the 1 = solar encoding
// and the grid selection at reset are this design's choices.
module load_transfer_switch
  import has_pkg::*;
#(
  parameter logic [7:0] SOLAR_MIN = has_pkg::SOLAR_MIN_V,
  parameter logic [7:0] SOLAR_MAX = has_pkg::SOLAR_MAX_V
) (
  input  logic       clk,
  input  logic       reset,
  input  logic [7:0] solar_voltage,
  input  logic [7:0] grid_voltage,
  output line_e      line_o
);

  logic solar_ok;

  assign solar_ok = (solar_voltage >= SOLAR_MIN) && (solar_voltage <= SOLAR_MAX);

  always_ff @(posedge clk) begin
    if (reset) line_o <= LINE_GRID;
    else       line_o <= solar_ok ? LINE_SOLAR : LINE_GRID;
  end

endmodule
