// de2_video_top: live camcorder video on a VGA monitor with the DE2 board's parts.
//
// The composite-video decoder delivers interlaced NTSC fields as 8-bit bytes on its
// own 27 MHz clock. video_capture keeps a 624 x 210 window of every field and writes
// it into one half of the 512 KB SRAM: odd fields into the low byte of each 16-bit
// word, even fields into the high byte, switching halves after every two fields.
// On the 50 MHz board clock, vga_timing makes a 25 MHz, 640x480 raster, and
// frame_reader reads the other half back line by line (alternating byte lanes
// rebuild the interlaced picture, 624 x 420). sram_arbiter gives the SRAM to the
// display for the low half of each pixel clock and to the buffered camera writes for
// the rest of the time.
// The decoder is configured over I2C: the switches set a register address and data
// (hex_register_file, shown on HEX3..HEX0 with the fixed command 0x40 on HEX5/HEX4),
// and a rising edge on the GO switch makes i2c_loader send command, address and data,
// clocked at 40 kHz by i2c_clock_divider from the decoder's clock.
//
// Switches: SW0 releases the decoder from reset (which starts its 27 MHz clock) and
// enables the serial clock divider; SW[GO_SW] is GO; SW17..SW11 set the registers.
// KEY0 (active low) resets the whole design. Pixel bytes are shown as 4 bits red,
// 2 green, 2 blue ([7:4], [3:2], [1:0]), widened to the DAC's 10 bits by repeating
// bits. VGA_CLK is the inverted pixel clock, so the DAC samples in mid-pixel.
// `gpio0` carries probe signals (WE, OE, LD, UD, READ, HSYNC, VSYNC, VID_CLK and the
// low 8 address bits on bits 0..15), `gpio1[2:0]` the divider's enable, the 27 MHz
// clock and the 40 kHz clock. Bidirectional pins (SRAM data, I2C data) are split into
// input, output and output-enable signals; the I2C data line is open drain.
// Where the pieces come from: the structure, the window and raster numbers, the
// memory split and the switch map are the tutorial's; the synchronizers, the capture
// buffer, the colour bit order, the reset and the GO switch number are this design's
// (the tutorial names switch 1 as GO in one place and switch 2 in another; switch 1
// is the default here).
module de2_video_top
  import de2_video_pkg::*;
#(
  // capture window (decoder pixel clocks and lines)
  parameter int unsigned CAP_H_START = 300,
  parameter int unsigned CAP_H_END   = 1548,
  parameter int unsigned CAP_V_START = 30,
  parameter int unsigned CAP_V_END   = 240,
  // VGA raster
  parameter int unsigned H_TOTAL     = 800,
  parameter int unsigned V_TOTAL     = 525,
  parameter int unsigned HS_START    = 664,
  parameter int unsigned HS_END      = 760,
  parameter int unsigned VS_START    = 491,
  parameter int unsigned VS_END      = 493,
  parameter int unsigned BL_H_START  = 20,
  parameter int unsigned BL_H_END    = 624,
  parameter int unsigned BL_V_START  = 8,
  parameter int unsigned BL_V_END    = 420,
  parameter int unsigned AD_H_END    = 624,
  parameter int unsigned AD_V_END    = 420,
  // I2C
  parameter int unsigned I2C_DIV     = 675,
  parameter int unsigned GO_SW       = 1
) (
  input  logic               clock_50,
  input  logic               key0_n,
  input  logic [17:0]        sw,
  output logic [6:0]         hex_n [8],
  // video decoder
  input  logic               td_clk27,
  input  logic [7:0]         td_data,
  input  logic               td_hs,
  input  logic               td_vs,
  output logic               td_reset,
  // I2C bus
  output logic               i2c_sclk,
  output logic               i2c_sdat_drive_low,
  input  logic               i2c_sdat_i,
  output logic               i2c_busy,
  output logic               i2c_ack_error,
  // SRAM
  output logic [SRAM_AW-1:0] sram_addr,
  output logic [SRAM_DW-1:0] sram_dq_o,
  output logic               sram_dq_oe,
  input  logic [SRAM_DW-1:0] sram_dq_i,
  output logic               sram_we_n,
  output logic               sram_oe_n,
  output logic               sram_ub_n,
  output logic               sram_lb_n,
  output logic               sram_ce_n,
  // VGA DAC
  output logic [9:0]         vga_r,
  output logic [9:0]         vga_g,
  output logic [9:0]         vga_b,
  output logic               vga_clk,
  output logic               vga_blank,
  output logic               vga_hs,
  output logic               vga_vs,
  // probes and status
  output logic [15:0]        gpio0,
  output logic [2:0]         gpio1,
  output logic               capture_overflow
);
  logic rst50, rst27;

  reset_sync u_rs50 (.clk(clock_50), .rst_n_async(key0_n), .rst(rst50));
  reset_sync u_rs27 (.clk(td_clk27), .rst_n_async(key0_n), .rst(rst27));

  assign td_reset = sw[0];

  // ---------------- I2C configuration (27 MHz domain) ----------------
  logic       sclk_div, step_tick, i2c_done;
  logic [7:0] reg_cmd, reg_addr, reg_data;
  logic       en_meta, en_sync;

  always_ff @(posedge td_clk27) begin
    en_meta <= sw[0];
    en_sync <= en_meta;
  end

  i2c_clock_divider #(.DIV(I2C_DIV)) u_div (
    .clk(td_clk27), .rst(rst27), .en(en_sync), .sclk_div(sclk_div), .step_tick(step_tick)
  );

  hex_register_file u_regs (
    .clk(td_clk27), .rst(rst27), .sw_hi(sw[17:11]),
    .command(reg_cmd), .address(reg_addr), .data(reg_data), .hex_n(hex_n)
  );

  i2c_loader u_i2c (
    .clk(td_clk27), .rst(rst27), .step_tick(step_tick), .go(sw[GO_SW]),
    .command(reg_cmd), .address(reg_addr), .data(reg_data),
    .sda_i(i2c_sdat_i), .scl(i2c_sclk), .sda_drive_low(i2c_sdat_drive_low),
    .busy(i2c_busy), .done(i2c_done), .ack_error(i2c_ack_error)
  );

  // ---------------- capture (27 MHz domain) ----------------
  logic       cam_wr_valid;
  cam_write_t cam_wr;
  logic       cam_we_n, cam_ud_n, cam_ld_n, cam_vert, cam_horiz, cam_frame, cam_half_low;
  logic [1:0] cam_field;

  video_capture #(
    .H_START(CAP_H_START), .H_END(CAP_H_END), .V_START(CAP_V_START), .V_END(CAP_V_END)
  ) u_cap (
    .clk(td_clk27), .rst(rst27), .td_data(td_data), .td_hs(td_hs), .td_vs(td_vs),
    .wr_valid(cam_wr_valid), .wr(cam_wr), .we_n(cam_we_n), .ud_n(cam_ud_n), .ld_n(cam_ld_n),
    .vert(cam_vert), .horiz(cam_horiz), .frame(cam_frame),
    .write_half_low(cam_half_low), .field(cam_field)
  );

  // ---------------- display (50 MHz domain) ----------------
  logic       vid_clk, pix_en, t_hs, t_vs, t_blank, frame_end;
  logic [9:0] h, v;

  vga_timing #(
    .H_TOTAL(H_TOTAL), .V_TOTAL(V_TOTAL), .HS_START(HS_START), .HS_END(HS_END),
    .VS_START(VS_START), .VS_END(VS_END), .BL_H_START(BL_H_START), .BL_H_END(BL_H_END),
    .BL_V_START(BL_V_START), .BL_V_END(BL_V_END)
  ) u_vga (
    .clk(clock_50), .rst(rst50), .vid_clk(vid_clk), .pix_en(pix_en), .h(h), .v(v),
    .hsync(t_hs), .vsync(t_vs), .vid_blank(t_blank), .frame_end(frame_end)
  );

  logic               rd_valid, rd_upper, framem, adden;
  logic [SRAM_AW-1:0] rd_addr;
  logic [SRAM_DW-1:0] rd_data;
  logic [7:0]         video;
  logic               read_ll_n, read_lh_n, read_hl_n, read_hh_n;
  logic               read_n, write_waited;

  frame_reader #(.AD_H_END(AD_H_END), .AD_V_END(AD_V_END)) u_rd (
    .clk(clock_50), .rst(rst50), .pix_en(pix_en), .h(h), .v(v),
    .hsync_in(t_hs), .vsync_in(t_vs), .blank_in(t_blank), .frame_end(frame_end),
    .capture_half_low(cam_half_low), .rd_data(rd_data),
    .rd_valid(rd_valid), .rd_addr(rd_addr), .rd_upper(rd_upper),
    .video(video), .hsync(vga_hs), .vsync(vga_vs), .blank(vga_blank),
    .framem(framem), .adden(adden),
    .read_ll_n(read_ll_n), .read_lh_n(read_lh_n), .read_hl_n(read_hl_n), .read_hh_n(read_hh_n)
  );

  sram_arbiter u_arb (
    .cam_clk(td_clk27), .cam_rst(rst27), .cam_wr_valid(cam_wr_valid), .cam_wr(cam_wr),
    .cam_overflow(capture_overflow),
    .clk(clock_50), .rst(rst50), .vid_clk(vid_clk),
    .rd_valid(rd_valid), .rd_addr(rd_addr), .rd_upper(rd_upper), .rd_data(rd_data),
    .read_n(read_n), .write_waited(write_waited),
    .sram_addr(sram_addr), .sram_dq_o(sram_dq_o), .sram_dq_oe(sram_dq_oe),
    .sram_dq_i(sram_dq_i), .sram_we_n(sram_we_n), .sram_oe_n(sram_oe_n),
    .sram_ub_n(sram_ub_n), .sram_lb_n(sram_lb_n), .sram_ce_n(sram_ce_n)
  );

  // ---------------- outputs ----------------
  assign vga_r   = {video[7:4], video[7:4], video[7:6]};
  assign vga_g   = {5{video[3:2]}};
  assign vga_b   = {5{video[1:0]}};
  assign vga_clk = !vid_clk;

  assign gpio0 = {sram_addr[7:0], vid_clk, vga_vs, vga_hs, read_n,
                  sram_ub_n, sram_lb_n, sram_oe_n, sram_we_n};
  assign gpio1 = {sclk_div, td_clk27, en_sync};

endmodule
