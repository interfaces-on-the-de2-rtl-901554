// tb_frame_reader: a small raster (40 x 30, 20 x 20 pixels read) from vga_timing drives
// frame_reader; the SRAM is a function of the address that the testbench applies to
// every request. For every pixel the output byte, hsync, vsync and blank are compared
// with values computed from the raster position two pixel steps earlier: the byte at
// base + (v/2)*20 + h, high lane on odd lines, low lane on even lines, 0 outside the
// read area. The half select (framem) must follow the capture-side input at frame ends
// only; the input is changed in mid-frame.
module tb_frame_reader;
  import de2_video_pkg::*;
  localparam int HT = 40, VT = 30, HSS = 30, HSE = 34, VSS = 26, VSE = 28;
  localparam int BHS = 2, BHE = 20, BVS = 1, BVE = 20, ADH = 20, ADV = 20;

  logic clk = 1'b0, rst = 1'b1;
  logic vid_clk, pix_en, t_hs, t_vs, t_bl, frame_end;
  logic [9:0] h, v;
  logic half_in = 1'b0;
  logic rd_valid, rd_upper, framem, adden, hsync, vsync, blank;
  logic [SRAM_AW-1:0] rd_addr;
  logic [15:0] rd_data;
  logic [7:0] video;
  logic ll, lh, hl, hh;
  int checks = 0, failures = 0;

  function automatic logic [15:0] memf(input logic [SRAM_AW-1:0] a);
    return 16'((a * 40503) ^ (a >> 5));
  endfunction

  assign rd_data = memf(rd_addr);

  vga_timing #(.H_TOTAL(HT), .V_TOTAL(VT), .HS_START(HSS), .HS_END(HSE), .VS_START(VSS),
               .VS_END(VSE), .BL_H_START(BHS), .BL_H_END(BHE), .BL_V_START(BVS), .BL_V_END(BVE))
    u_t (.clk(clk), .rst(rst), .vid_clk(vid_clk), .pix_en(pix_en), .h(h), .v(v),
         .hsync(t_hs), .vsync(t_vs), .vid_blank(t_bl), .frame_end(frame_end));

  frame_reader #(.AD_H_END(ADH), .AD_V_END(ADV)) dut (
    .clk(clk), .rst(rst), .pix_en(pix_en), .h(h), .v(v), .hsync_in(t_hs), .vsync_in(t_vs),
    .blank_in(t_bl), .frame_end(frame_end), .capture_half_low(half_in), .rd_data(rd_data),
    .rd_valid(rd_valid), .rd_addr(rd_addr), .rd_upper(rd_upper), .video(video),
    .hsync(hsync), .vsync(vsync), .blank(blank), .framem(framem), .adden(adden),
    .read_ll_n(ll), .read_lh_n(lh), .read_hl_n(hl), .read_hh_n(hh));

  always #10 clk = !clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  int   ph1 = -1, pv1 = -1, ph2 = -1, pv2 = -1, steps = 0, frames = 0, pix_checked = 0;
  logic exp_half = 1'b0, half_of_frame = 1'b0, half_prev_frame = 1'b0;
  logic [1:0] lanes_seen = '0;

  always @(posedge clk) begin
    if (!rst && pix_en) begin
      ph2 <= ph1; pv2 <= pv1;
      ph1 <= int'(h); pv1 <= int'(v);
      half_prev_frame <= half_of_frame;
      steps <= steps + 1;
      if (int'(h) == HT - 1 && int'(v) == VT - 1) begin
        exp_half <= half_in;
        half_of_frame <= half_in;
        frames <= frames + 1;
      end
    end
  end

  always @(negedge clk) begin
    if (!rst && steps > 3 && pv2 >= 0) begin
      logic [7:0] e;
      logic [SRAM_AW-1:0] a;
      logic fm;
      // the pixel two steps back belongs to this frame unless the frame just turned over
      fm = (pv2 == VT - 1 && ph2 >= HT - 2) ? half_prev_frame : half_of_frame;
      a = (fm ? 18'h20000 : 18'h00000) + 18'((pv2 / 2) * ADH + ph2);
      e = (pv2 < ADV && ph2 < ADH) ? (pv2[0] ? memf(a)[15:8] : memf(a)[7:0]) : 8'h00;
      if (pv2 < ADV && ph2 < ADH) lanes_seen[pv2[0]] = 1'b1;
      check(video == e, $sformatf("pixel (%0d,%0d) = %h, expected %h", ph2, pv2, video, e));
      check(hsync == !(ph2 >= HSS && ph2 < HSE), $sformatf("hsync at (%0d,%0d)", ph2, pv2));
      check(vsync == !(pv2 >= VSS && pv2 < VSE), $sformatf("vsync at (%0d,%0d)", ph2, pv2));
      check(blank == (pv2 >= BVS && pv2 < BVE && ph2 >= BHS && ph2 < BHE),
            $sformatf("blank at (%0d,%0d)", ph2, pv2));
      check(framem == exp_half, "framem follows the capture half at the frame end");
      pix_checked++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // change the capture half in mid-frame, four times
    for (int f = 0; f < 6; f++) begin
      wait (v == 10 && h == 0);
      half_in = ~half_in;
      wait (v == 11);
    end
    wait (frames == 7);
    repeat (4) @(posedge clk);
    check(lanes_seen == 2'b11, "both byte lanes read");
    check(pix_checked > 6 * HT * VT, "pixels checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * HT * VT * 12) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
