// i2c_clock_divider: derives the I2C serial clock from the video decoder's 27 MHz clock.
//
// A counter runs from 0 to DIV-1 and wraps; the output clock is high for the first
// ceil(DIV/2) counts and low for the rest, so its period is exactly DIV input clocks
// (27 MHz / 675 = 40 kHz, the rate the tutorial measures on the scope; the decoder
// allows up to 400 kHz). Because the divider runs from the decoder's clock output, the
// serial clock halves when the decoder's clock is programmed down to 13.5 MHz, as the
// tutorial observes (20 kHz).
//
// Besides the square wave, `step_tick` pulses for one input clock four times per
// period (at counts 0, DIV/4, DIV/2 and 3*DIV/4, rounded down); the I2C loader takes one
// step per pulse, so its SCL runs at the same rate as `sclk_div`.
// `en` is the clock enable (switch 0 on the board); while it is low the counter holds
// at zero. The 675 divisor and the 40 kHz rate are the tutorial's; the duty split and
// the tick output are this design's choices.
module i2c_clock_divider #(
  parameter int unsigned DIV = 675            // input clocks per serial clock period
) (
  input  logic clk,        // 27 MHz from the decoder
  input  logic rst,        // synchronous, active high
  input  logic en,         // divider enable
  output logic sclk_div,   // divided clock, period DIV
  output logic step_tick   // one-cycle pulse, four per period of sclk_div
);
  localparam int unsigned HIGH_CNT = (DIV + 1) / 2;
  localparam int CW = (DIV > 2) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst || !en)                     cnt <= '0;
    else if (cnt == CW'(DIV - 1))       cnt <= '0;
    else                                cnt <= cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      sclk_div  <= 1'b1;
      step_tick <= 1'b0;
    end else begin
      sclk_div  <= (cnt < CW'(HIGH_CNT));
      step_tick <= (cnt == '0) || (cnt == CW'(DIV / 4)) || (cnt == CW'(DIV / 2)) ||
                   (cnt == CW'((3 * DIV) / 4));
    end
  end

endmodule
