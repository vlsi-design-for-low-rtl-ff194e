// lamp_pwm: pulse-width modulator for the lamp of the comfort system.
//
// A free-running counter counts 0 .. PERIOD-1 and the output is high for the
// first PERIOD*DIM_PERCENT/100 counts of every period when dimming is asked
// for. LAMP_FULL holds the output high and LAMP_OFF holds it low. The counter
// only runs while the lamp is dimmed and rests at zero otherwise, so it does
// not toggle when no PWM wave is needed; each new dimmed phase therefore
// starts with the on-part of a period.
//
// Interface: clk, synchronous active-high reset, mode (has_pkg::lamp_mode_e),
// pwm_o. The output is registered: it follows mode one clock later.
//
// The 500000-count period (5 ms, 200 Hz at 100 MHz) and the 40 % level are the
// published figures; the counter-compare scheme, the idle counter and the
// registered output are this design's choices.
module lamp_pwm
  import has_pkg::*;
#(
  parameter int unsigned PERIOD      = has_pkg::PWM_PERIOD,
  parameter int unsigned DIM_PERCENT = has_pkg::LAMP_DIM_PERCENT
) (
  input  logic       clk,
  input  logic       reset,
  input  lamp_mode_e mode,
  output logic       pwm_o
);

  localparam int unsigned CW = (PERIOD > 1) ? $clog2(PERIOD) : 1;
  localparam int unsigned ON_COUNT = (PERIOD * DIM_PERCENT) / 100;
  localparam logic [CW-1:0] LAST   = CW'(PERIOD - 1);
  localparam logic [CW-1:0] ON_CNT = CW'(ON_COUNT);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (reset || mode != LAMP_DIM) cnt <= '0;
    else if (cnt == LAST)           cnt <= '0;
    else                            cnt <= cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (reset) pwm_o <= 1'b0;
    else begin
      unique case (mode)
        LAMP_FULL: pwm_o <= 1'b1;
        LAMP_DIM:  pwm_o <= (cnt < ON_CNT);
        default:   pwm_o <= 1'b0;
      endcase
    end
  end

endmodule
