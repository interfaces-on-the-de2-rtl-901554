// vga_timing: pixel clock and raster counters for a 640x480, 60 Hz VGA monitor.
//
// The 50 MHz board clock is divided by two: `vid_clk` toggles every clock, and
// `pix_en` is high in the clock cycle that ends with a rising edge of `vid_clk`, so
// logic on the 50 MHz clock that is gated by `pix_en` behaves as if clocked by the
// 25 MHz pixel clock. On each such edge the horizontal counter advances from 0 to
// H_TOTAL-1 and wraps; at the wrap the vertical counter advances from 0 to V_TOTAL-1.
// Decoded from the counters (combinational, valid for the current pixel):
//   hsync      low while HS_START <= h < HS_END          (664..759: 96 pixels)
//   vsync      low while VS_START <= v < VS_END          (491..492: 2 lines)
//   vid_blank  high (show video) while BL_V_START <= v < BL_V_END and
//              BL_H_START <= h < BL_H_END                (lines 8..419, pixels 20..623)
// `frame_end` marks the last pixel of a frame (the edge where both counters wrap).
// All the numbers are the tutorial's. The tutorial's counters clear one count past
// 800 and 525; here they wrap after exactly H_TOTAL and V_TOTAL counts, the standard
// 800 x 525 raster that the tutorial names.
module vga_timing #(
  parameter int unsigned H_TOTAL    = 800,
  parameter int unsigned V_TOTAL    = 525,
  parameter int unsigned HS_START   = 664,
  parameter int unsigned HS_END     = 760,
  parameter int unsigned VS_START   = 491,
  parameter int unsigned VS_END     = 493,
  parameter int unsigned BL_H_START = 20,
  parameter int unsigned BL_H_END   = 624,
  parameter int unsigned BL_V_START = 8,
  parameter int unsigned BL_V_END   = 420
) (
  input  logic       clk,        // 50 MHz
  input  logic       rst,        // synchronous, active high
  output logic       vid_clk,    // 25 MHz pixel clock
  output logic       pix_en,     // this 50 MHz cycle ends on a rising edge of vid_clk
  output logic [9:0] h,          // contvidh
  output logic [9:0] v,          // contvidv
  output logic       hsync,
  output logic       vsync,
  output logic       vid_blank,
  output logic       frame_end
);
  always_ff @(posedge clk) begin
    if (rst) vid_clk <= 1'b0;
    else     vid_clk <= !vid_clk;
  end

  assign pix_en = !vid_clk && !rst;

  wire h_last = (h == 10'(H_TOTAL - 1));
  wire v_last = (v == 10'(V_TOTAL - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      h <= '0;
      v <= '0;
    end else if (pix_en) begin
      h <= h_last ? '0 : h + 1'b1;
      if (h_last) v <= v_last ? '0 : v + 1'b1;
    end
  end

  assign hsync     = !((h >= 10'(HS_START)) && (h < 10'(HS_END)));
  assign vsync     = !((v >= 10'(VS_START)) && (v < 10'(VS_END)));
  assign vid_blank = (v >= 10'(BL_V_START)) && (v < 10'(BL_V_END)) &&
                     (h >= 10'(BL_H_START)) && (h < 10'(BL_H_END));
  assign frame_end = pix_en && h_last && v_last;

endmodule
