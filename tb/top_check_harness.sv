// top_check_harness: end-to-end test of de2_video_top, shared by the scaled-down and
// the full-size testbench. With FULL = 1 the top is built with its default
// parameters; otherwise with the small raster and window given here.
//
// Around the top: a decoder stream model, an I2C slave model and an SRAM model.
// 1. I2C: the switches load address 0x8F and data 0x50 nibble by nibble; the displays
//    must show 40 8F 50; GO sends the transfer; the slave must receive 40 8F 50 with
//    every byte acknowledged.
// 2. Video: a shadow copy of both SRAM halves is built from the stream model alone: when
//    a field's last window line has passed, its expected bytes go into the lane and half
//    that the field number selects. The VGA output (pixel byte rebuilt from the colour
//    bits, position recovered from HS and VS) is recorded for each display frame; at the
//    frame's end, if no SRAM write touched the displayed half during the frame and both
//    lanes of that half hold a captured field, every recorded pixel must equal the
//    shadow. At least MIN_CLEAN such frames are required.
// 3. Mechanisms counted, each must happen: I2C transfer, capture half swap, display
//    half swap, display reads, camera writes inside the display window (between reads),
//    camera writes in blanking, a camera byte waiting for a display read, both byte
//    lanes displayed. The SRAM model must see no OE/WE overlap; the capture buffer must
//    not overflow.
module top_check_harness #(
  parameter bit FULL      = 1'b0,
  parameter int MIN_CLEAN = 2
) (
  output logic done
);
  import de2_video_pkg::*;
  // sizes: the tutorial's in the full build, small ones otherwise
  localparam int CHS  = FULL ? 300  : 20,  CHE = FULL ? 1548 : 100;
  localparam int CVS  = FULL ? 30   : 4,   CVE = FULL ? 240  : 16;
  localparam int HT   = FULL ? 800  : 100, VT  = FULL ? 525  : 40;
  localparam int HSS  = FULL ? 664  : 85,  HSE = FULL ? 760  : 90;
  localparam int VSS  = FULL ? 491  : 34,  VSE = FULL ? 493  : 36;
  localparam int BHS  = FULL ? 20   : 2,   BHE = FULL ? 624  : 40;
  localparam int BVS  = FULL ? 8    : 1,   BVE = FULL ? 420  : 24;
  localparam int ADH  = FULL ? 624  : 40,  ADV = FULL ? 420  : 24;
  localparam int DIV  = FULL ? 675  : 16;
  localparam int LINE_CLKS = FULL ? 1716 : 200, HS_LEN = FULL ? 128 : 10;
  localparam int FIELD_LINES = FULL ? 262 : 40, VS_LINES = 3;
  localparam int W = (CHE - CHS) / 2;
  localparam int MAX_FRAMES = 14;

  logic clock_50 = 1'b0, td_clk27 = 1'b0, key0_n = 1'b1;
  logic [17:0] sw = '0;
  logic [6:0] hex_n [8];
  logic [7:0] td_data;
  logic td_hs, td_vs, td_reset;
  logic scl, m_low, s_low, sda, i2c_busy, i2c_ack_error;
  logic [SRAM_AW-1:0] sram_addr;
  logic [15:0] dq_o, dq_i;
  logic dq_oe, we_n, oe_n, ub_n, lb_n, ce_n;
  logic [9:0] vga_r, vga_g, vga_b;
  logic vga_clk, vga_blank, vga_hs, vga_vs, overflow;
  logic [15:0] gpio0;
  logic [2:0] gpio1;
  int sfield, sline, sh;
  logic src_start = 1'b0;

  always #10   clock_50 = !clock_50;
  always #18.5 td_clk27 = !td_clk27;
  assign sda = !(m_low || s_low);

  if (FULL) begin : g_full
    de2_video_top dut (
      .clock_50, .key0_n, .sw, .hex_n, .td_clk27, .td_data, .td_hs, .td_vs, .td_reset,
      .i2c_sclk(scl), .i2c_sdat_drive_low(m_low), .i2c_sdat_i(sda), .i2c_busy, .i2c_ack_error,
      .sram_addr, .sram_dq_o(dq_o), .sram_dq_oe(dq_oe), .sram_dq_i(dq_i), .sram_we_n(we_n),
      .sram_oe_n(oe_n), .sram_ub_n(ub_n), .sram_lb_n(lb_n), .sram_ce_n(ce_n),
      .vga_r, .vga_g, .vga_b, .vga_clk, .vga_blank, .vga_hs, .vga_vs, .gpio0, .gpio1,
      .capture_overflow(overflow));
  end else begin : g_small
    de2_video_top #(
      .CAP_H_START(CHS), .CAP_H_END(CHE), .CAP_V_START(CVS), .CAP_V_END(CVE),
      .H_TOTAL(HT), .V_TOTAL(VT), .HS_START(HSS), .HS_END(HSE), .VS_START(VSS), .VS_END(VSE),
      .BL_H_START(BHS), .BL_H_END(BHE), .BL_V_START(BVS), .BL_V_END(BVE),
      .AD_H_END(ADH), .AD_V_END(ADV), .I2C_DIV(DIV)
    ) dut (
      .clock_50, .key0_n, .sw, .hex_n, .td_clk27, .td_data, .td_hs, .td_vs, .td_reset,
      .i2c_sclk(scl), .i2c_sdat_drive_low(m_low), .i2c_sdat_i(sda), .i2c_busy, .i2c_ack_error,
      .sram_addr, .sram_dq_o(dq_o), .sram_dq_oe(dq_oe), .sram_dq_i(dq_i), .sram_we_n(we_n),
      .sram_oe_n(oe_n), .sram_ub_n(ub_n), .sram_lb_n(lb_n), .sram_ce_n(ce_n),
      .vga_r, .vga_g, .vga_b, .vga_clk, .vga_blank, .vga_hs, .vga_vs, .gpio0, .gpio1,
      .capture_overflow(overflow));
  end

  video_source_model #(.LINE_CLKS(LINE_CLKS), .HS_LEN(HS_LEN), .FIELD_LINES(FIELD_LINES),
                       .VS_LINES(VS_LINES))
    u_src (.clk(td_clk27), .start(src_start), .data(td_data), .hs(td_hs), .vs(td_vs),
           .field(sfield), .line(sline), .h(sh));

  logic [7:0] sl_bytes [4];
  int sl_n, sl_starts, sl_stops, sl_transfers;
  i2c_slave_model #(.DEV_ADDR(8'h40)) u_slave (
    .clk(td_clk27), .scl(scl), .sda(sda), .ack_en(1'b1), .sda_drive_low(s_low),
    .bytes(sl_bytes), .nbytes(sl_n), .starts(sl_starts), .stops(sl_stops), .transfers(sl_transfers));

  sram_model u_sram (.clk(clock_50), .addr(sram_addr), .dq_from_ctrl(dq_o), .dq_oe(dq_oe),
                     .dq_to_ctrl(dq_i), .we_n(we_n), .oe_n(oe_n), .ub_n(ub_n), .lb_n(lb_n),
                     .ce_n(ce_n));

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---------------- shadow of the SRAM, from the stream model ----------------
  logic [15:0] shadow [2][131072];
  logic [1:0]  lane_valid [2];
  int          fields_shadowed = 0;

  initial begin
    for (int a = 0; a < 262144; a++) u_sram.mem[a] = 16'h0000;
    for (int hf = 0; hf < 2; hf++) begin
      lane_valid[hf] = 2'b00;
      for (int a = 0; a < 131072; a++) shadow[hf][a] = 16'h0000;
    end
  end

  always @(posedge td_clk27) begin
    if (src_start && sline == CVE + 1 && sh == 0) begin
      logic [1:0] fld;
      int hf;
      fld = 2'(sfield + 1);           // the capture's field counter, one VS ahead
      hf  = fld[1] ? 0 : 1;           // 0: lower half, 1: upper half
      for (int l = CVS + 1; l <= CVE; l++)
        for (int j = 0; j < W; j++) begin
          int a;
          a = (l - CVS - 1) * W + j;
          if (fld[0]) shadow[hf][a][15:8] = tb_video_pkg::pix(sfield, l, CHS + 2 + 2 * j);
          else        shadow[hf][a][7:0]  = tb_video_pkg::pix(sfield, l, CHS + 2 + 2 * j);
        end
      lane_valid[hf][fld[0]] = 1'b1;
      fields_shadowed++;
    end
  end

  // ---------------- SRAM traffic ----------------
  longint t50 = 0, last_write [2];
  int n_reads = 0, n_writes_between_reads = 0, n_writes_idle = 0, n_waited = 0, cap_swaps = 0;
  logic prev_was_read = 1'b0, last_wr_half = 1'b0, any_write = 1'b0;
  logic prev_was_write = 1'b0, prev2_was_write = 1'b0, last_read_half = 1'b0;
  int since_read = 0;

  initial begin last_write[0] = -1; last_write[1] = -1; end

  always @(posedge clock_50) begin
    t50++;
    if (!oe_n) begin n_reads++; since_read = 0; end
    else since_read++;
    if (!we_n) begin
      last_write[sram_addr[17]] = t50;
      if (any_write && sram_addr[17] != last_wr_half) cap_swaps++;
      last_wr_half = sram_addr[17];
      any_write = 1'b1;
      if (prev_was_read) n_writes_between_reads++;
      if (since_read > 4) n_writes_idle++;
    end
    // a write, a display read, and a write again: the second byte waited for the read
    if (!we_n && prev_was_read && prev2_was_write) n_waited++;
    prev_was_read = !oe_n;
    prev2_was_write = prev_was_write;
    prev_was_write  = !we_n;
    if (!oe_n) last_read_half = sram_addr[17];
  end

  // ---------------- VGA output ----------------
  logic [7:0] fbuf [ADV * ADH];
  int   th = 0, tv = 0, vga_synced = 0, frames_seen = 0, clean_frames = 0, dirty_frames = 0;
  int   half_swaps = 0, n_blank_edges = 0;
  logic hs_p = 1'b1, vs_p = 1'b1, bl_p = 1'b0, frame_half = 1'b0, prev_frame_half = 1'b0;
  logic [1:0] lanes_shown = '0;
  longint frame_t0 = 0;

  always @(posedge vga_clk) begin
    logic [7:0] px;
    px = {vga_r[9:6], vga_g[9:8], vga_b[9:8]};
    if (vga_hs && !hs_p) th = HSE;
    else begin
      th = (th == HT - 1) ? 0 : th + 1;
      if (th == 0) tv = (tv == VT - 1) ? 0 : tv + 1;
    end
    if (vga_vs && !vs_p) begin
      tv = VSE;
      check(th == 0, "vsync rises at the start of a line");
      vga_synced++;
    end
    if (vga_blank != bl_p) n_blank_edges++;
    if (vga_synced > 0) begin
      if (th == 0 && tv == 0) begin
        // end of the previous frame: judge it
        if (frames_seen > 0) begin
          if (last_write[frame_half] < frame_t0 - 4 && lane_valid[frame_half] == 2'b11) begin
            int bad;
            bad = 0;
            for (int y = 0; y < ADV; y++)
              for (int x = 0; x < ADH; x++) begin
                logic [15:0] wd;
                logic [7:0]  e;
                wd = shadow[frame_half][(y / 2) * ADH + x];
                e  = y[0] ? wd[15:8] : wd[7:0];
                if (fbuf[y * ADH + x] != e) begin
                  if (bad < 5) $display("FAIL frame %0d half %0d pixel (%0d,%0d) = %h, expected %h",
                                        frames_seen, frame_half, x, y, fbuf[y * ADH + x], e);
                  bad++;
                end
              end
            check(bad == 0, $sformatf("frame %0d: %0d pixels differ", frames_seen, bad));
            clean_frames++;
          end else dirty_frames++;
        end
        prev_frame_half = frame_half;
        frame_half = last_read_half;   // half of the reads just made for this frame
        if (frames_seen > 0 && frame_half != prev_frame_half) half_swaps++;
        frame_t0 = t50;
        frames_seen++;
      end
      if (tv < ADV && th < ADH) begin
        fbuf[tv * ADH + th] = px;
        if (px != 8'h00) lanes_shown[tv % 2] = 1'b1;
      end else begin
        check(px == 8'h00, $sformatf("pixel (%0d,%0d) outside the picture is %h", th, tv, px));
      end
      check(vga_blank == (tv >= BVS && tv < BVE && th >= BHS && th < BHE),
            $sformatf("blank at (%0d,%0d)", th, tv));
      check(vga_hs == !(th >= HSS && th < HSE), $sformatf("hsync at (%0d,%0d)", th, tv));
    end
    hs_p = vga_hs; vs_p = vga_vs; bl_p = vga_blank;
  end

  // ---------------- stimulus ----------------
  task automatic set_nibble(input logic [1:0] sel, input logic [3:0] val);
    sw[17:11] = {1'b1, sel, val};
    repeat (6) @(posedge td_clk27);
    sw[17] = 1'b0;
    repeat (4) @(posedge td_clk27);
  endtask

  int tr0, cont0;

  initial begin
    done = 1'b0;
    #1 key0_n = 1'b0;                // press the reset button
    sw[0] = 1'b1;                    // decoder out of reset, divider enabled
    repeat (5) @(posedge td_clk27);
    key0_n = 1'b1;
    repeat (5) @(posedge td_clk27);
    cont0 = u_sram.contention;       // before reset the strobes are undefined
    src_start = 1'b1;
    // I2C: address 8F, data 50 from the switches, then GO
    set_nibble(2'b11, 4'h8);
    set_nibble(2'b10, 4'hF);
    set_nibble(2'b01, 4'h5);
    set_nibble(2'b00, 4'h0);
    check(hex_n[5] == ~tb_video_pkg::seg_on(4'h4) && hex_n[4] == ~tb_video_pkg::seg_on(4'h0) &&
          hex_n[3] == ~tb_video_pkg::seg_on(4'h8) && hex_n[2] == ~tb_video_pkg::seg_on(4'hF) &&
          hex_n[1] == ~tb_video_pkg::seg_on(4'h5) && hex_n[0] == ~tb_video_pkg::seg_on(4'h0) &&
          hex_n[7] == 7'h7F && hex_n[6] == 7'h7F, "displays show 40 8F 50");
    tr0 = sl_transfers;
    sw[1] = 1'b1;
    wait (sl_transfers == tr0 + 1);
    sw[1] = 1'b0;
    repeat (DIV * 2) @(posedge td_clk27);
    check(sl_n == 3 && sl_bytes[0] == 8'h40 && sl_bytes[1] == 8'h8F && sl_bytes[2] == 8'h50,
          $sformatf("I2C slave received %0d bytes %h %h %h", sl_n, sl_bytes[0], sl_bytes[1], sl_bytes[2]));
    check(!i2c_ack_error, "I2C transfer acknowledged");
    check(td_reset == 1'b1, "decoder released from reset by switch 0");
    // video: wait for enough verified frames
    wait (clean_frames >= MIN_CLEAN || frames_seen >= MAX_FRAMES);
    $display("frames %0d clean %0d dirty %0d, display half swaps %0d, capture half swaps %0d",
             frames_seen, clean_frames, dirty_frames, half_swaps, cap_swaps);
    $display("reads %0d, writes between reads %0d, writes in blanking %0d, waited %0d, fields %0d",
             n_reads, n_writes_between_reads, n_writes_idle, n_waited, fields_shadowed);
    check(clean_frames >= MIN_CLEAN, $sformatf("%0d whole frames verified", clean_frames));
    check(sl_transfers >= tr0 + 1, "mechanism: I2C transfer");
    check(cap_swaps >= 1, "mechanism: capture changed memory half");
    check(half_swaps >= 1, "mechanism: display changed memory half");
    check(n_reads > 0, "mechanism: display reads");
    check(n_writes_between_reads > 0, "mechanism: camera write between display reads");
    check(n_writes_idle > 0, "mechanism: camera write outside the display window");
    check(n_waited > 0, "mechanism: camera byte waited for a display read");
    check(lanes_shown == 2'b11, "mechanism: both byte lanes (both fields) displayed");
    check(n_blank_edges > 0, "mechanism: blanking");
    check(u_sram.contention == cont0, "OE and WE never low together");
    check(!overflow, "capture buffer never overflowed");
    done = 1'b1;
  end

  initial begin
    repeat (HT * VT * 2 * (MAX_FRAMES + 6)) @(posedge clock_50);
    failures++;
    $display("watchdog expired");
    done = 1'b1;
  end
endmodule
