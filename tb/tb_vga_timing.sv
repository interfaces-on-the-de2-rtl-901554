// tb_vga_timing: the default 800 x 525 raster. Measures, in 50 MHz clocks, the hsync
// and vsync periods and pulse widths, the frame_end period, the 25 MHz pixel clock,
// the number of displayed (vid_blank high) pixels per frame and where in the line the
// display window starts, all against the tutorial's numbers.
module tb_vga_timing;
  logic clk = 1'b0, rst = 1'b1;
  logic vid_clk, pix_en, hsync, vsync, vid_blank, frame_end;
  logic [9:0] h, v;
  int checks = 0, failures = 0;

  vga_timing dut (.clk(clk), .rst(rst), .vid_clk(vid_clk), .pix_en(pix_en), .h(h), .v(v),
                  .hsync(hsync), .vsync(vsync), .vid_blank(vid_blank), .frame_end(frame_end));

  always #10 clk = !clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  int t = 0, hs_fall = -1, hs_rise = -1, vs_fall = -1, fe = -1, bl_cnt = 0, frames = 0;
  int hs_checks = 0;
  logic hs_p = 1'b1, vs_p = 1'b1, bl_p = 1'b0, vc_p = 1'b0;

  always @(posedge clk) begin
    t++;
    if (!rst) begin
      if (t > 5) check(vid_clk != vc_p, "pixel clock toggles every 50 MHz clock");
      if (pix_en && vid_blank) bl_cnt++;
      if (!hsync && hs_p) begin
        if (hs_fall >= 0 && hs_checks < 2000) begin
          check(t - hs_fall == 1600, $sformatf("hsync period %0d", t - hs_fall));
          hs_checks++;
        end
        hs_fall = t;
      end
      if (hsync && !hs_p) begin
        if (hs_checks < 2000) check(t - hs_fall == 192, $sformatf("hsync width %0d", t - hs_fall));
        hs_rise = t;
      end
      if (vid_blank && !bl_p) check(t - hs_rise == 120, $sformatf("display starts %0d clocks after hsync", t - hs_rise));
      if (!vsync && vs_p) begin
        if (vs_fall >= 0) check(t - vs_fall == 840000, $sformatf("vsync period %0d", t - vs_fall));
        vs_fall = t;
      end
      if (vsync && !vs_p) check(t - vs_fall == 2 * 1600, $sformatf("vsync width %0d", t - vs_fall));
      if (frame_end) begin
        if (fe >= 0) begin
          check(t - fe == 840000, $sformatf("frame period %0d", t - fe));
          check(bl_cnt == 412 * 604, $sformatf("%0d displayed pixels per frame", bl_cnt));
          frames++;
        end
        fe = t;
        bl_cnt = 0;
      end
    end
    hs_p = hsync; vs_p = vsync; bl_p = vid_blank; vc_p = vid_clk;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (frames == 2);
    repeat (10) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * 840000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
