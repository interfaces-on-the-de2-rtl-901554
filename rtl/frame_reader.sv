// frame_reader: fetches each displayed pixel from the SRAM half that is not being
// written, and lines the pixel up with the VGA sync signals.
//
// Works on the 50 MHz clock, stepping on `pix_en` (one step per 25 MHz pixel), with the
// raster position h, v from vga_timing. For the first AD_H_END pixels of the first
// AD_V_END lines (624 x 420) the address enable `adden` is high and one byte is read:
//   even display lines (v[0] = 0) read the low byte lane, odd lines the high byte lane,
// matching the way video_capture stores the two fields of a frame in the two lanes.
// Four address counters, one per memory half and lane, start at the base of their half
// (word 0 or 0x20000) and advance by one for each pixel read from their half and lane;
// all four return to their base below line AD_V_END. So 420 display lines walk each
// lane of one half once: 210 lines x 624 words.
// `framem` picks the half (1: upper). It is taken at the end of each display frame
// from the capture side's half select, passed through a two-flop synchronizer: when
// the capture writes the lower half the display shows the upper one, and the other way
// round. Taken only at frame ends, the display never changes half in mid-frame.
// Timing: at the pixel step that sees position (h, v), the read request (`rd_valid`,
// `rd_addr`, `rd_upper`) is set for that pixel; sram_arbiter performs the read in the
// second half of the pixel period, while `vid_clk` is low, and at the next pixel step
// the byte is taken from `rd_data` into `video`. The sync and blank outputs are
// delayed by the same two steps, so `video`, `hsync`, `vsync` and `blank` describe
// the same pixel. Outside the enabled area `video` is 0.
// The enables, the four counters and their bases, and the lane per line follow the
// tutorial. The tutorial's enable runs through line 420 inclusive; here it stops after
// line 419, since a half holds 210 lines per lane. The synchronized half choice and
// the output alignment are this design's.
module frame_reader
  import de2_video_pkg::*;
#(
  parameter int unsigned AD_H_END = 624,   // pixels read per line
  parameter int unsigned AD_V_END = 420    // lines read per frame
) (
  input  logic               clk,             // 50 MHz
  input  logic               rst,
  input  logic               pix_en,
  input  logic [9:0]         h,
  input  logic [9:0]         v,
  input  logic               hsync_in,
  input  logic               vsync_in,
  input  logic               blank_in,
  input  logic               frame_end,
  input  logic               capture_half_low, // from the capture clock domain
  input  logic [SRAM_DW-1:0] rd_data,         // SRAM data, valid at the pixel step after a read
  output logic               rd_valid,
  output logic [SRAM_AW-1:0] rd_addr,
  output logic               rd_upper,
  output logic [7:0]         video,
  output logic               hsync,
  output logic               vsync,
  output logic               blank,
  output logic               framem,
  output logic               adden,
  output logic               read_ll_n,       // lower half, low lane (odd lines) enable
  output logic               read_lh_n,       // lower half, high lane (even lines)
  output logic               read_hl_n,       // upper half, low lane
  output logic               read_hh_n        // upper half, high lane
);
  logic [SRAM_AW-1:0] addr_l_odd, addr_l_even, addr_h_odd, addr_h_even;
  logic               half_meta, half_sync;
  logic               hs_d, vs_d, bl_d;

  always_ff @(posedge clk) begin
    half_meta <= capture_half_low;
    half_sync <= half_meta;
  end

  wire oddeven = v[0];          // 1: high byte lane
  wire ramvidv = (v >= 10'(AD_V_END));
  assign adden = (h < 10'(AD_H_END)) && (v < 10'(AD_V_END));

  assign read_ll_n = !(!framem && adden && !oddeven);
  assign read_lh_n = !(!framem && adden &&  oddeven);
  assign read_hl_n = !( framem && adden && !oddeven);
  assign read_hh_n = !( framem && adden &&  oddeven);

  always_ff @(posedge clk) begin
    if (rst) begin
      addr_l_odd  <= HALF_LOW_BASE;
      addr_l_even <= HALF_LOW_BASE;
      addr_h_odd  <= HALF_HIGH_BASE;
      addr_h_even <= HALF_HIGH_BASE;
      framem      <= 1'b0;
    end else if (pix_en) begin
      if (ramvidv) begin
        addr_l_odd  <= HALF_LOW_BASE;
        addr_l_even <= HALF_LOW_BASE;
        addr_h_odd  <= HALF_HIGH_BASE;
        addr_h_even <= HALF_HIGH_BASE;
      end else begin
        if (!read_ll_n) addr_l_odd  <= addr_l_odd  + 1'b1;
        if (!read_lh_n) addr_l_even <= addr_l_even + 1'b1;
        if (!read_hl_n) addr_h_odd  <= addr_h_odd  + 1'b1;
        if (!read_hh_n) addr_h_even <= addr_h_even + 1'b1;
      end
      if (frame_end) framem <= half_sync;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_valid <= 1'b0;
      rd_addr  <= '0;
      rd_upper <= 1'b0;
      video    <= '0;
      hs_d     <= 1'b1;
      vs_d     <= 1'b1;
      bl_d     <= 1'b0;
      hsync    <= 1'b1;
      vsync    <= 1'b1;
      blank    <= 1'b0;
    end else if (pix_en) begin
      // byte read for the previous pixel
      video    <= rd_valid ? (rd_upper ? rd_data[15:8] : rd_data[7:0]) : 8'h00;
      // request for this pixel
      rd_valid <= adden;
      rd_upper <= oddeven;
      unique case ({framem, oddeven})
        2'b00: rd_addr <= addr_l_odd;
        2'b01: rd_addr <= addr_l_even;
        2'b10: rd_addr <= addr_h_odd;
        2'b11: rd_addr <= addr_h_even;
      endcase
      hs_d  <= hsync_in;
      vs_d  <= vsync_in;
      bl_d  <= blank_in;
      hsync <= hs_d;
      vsync <= vs_d;
      blank <= bl_d;
    end
  end

endmodule
