// tb_video_capture: a scaled-down decoder stream (40 clocks per line, 12 lines per
// field) into video_capture with a 20-clock by 4-line window. Every write is compared,
// in order, with a list built from the stream's own pixel function: which bytes are
// kept (every other one of the window), their word addresses, byte lane (field parity)
// and memory half (changing every two fields). Also checks the write rate (one byte
// per two clocks inside a line) and the number of writes per field.
module tb_video_capture;
  import de2_video_pkg::*;
  localparam int H_START = 10, H_END = 30, V_START = 3, V_END = 7;
  localparam int LINE_CLKS = 40, FIELD_LINES = 12;
  localparam int W = (H_END - H_START) / 2;          // bytes kept per line
  localparam int NFIELDS = 6;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [7:0] td_data;
  logic td_hs, td_vs;
  int sfield, sline, sh;
  logic wr_valid, we_n, ud_n, ld_n, vert, horiz, frame, half_low;
  cam_write_t wr;
  logic [1:0] field;
  int checks = 0, failures = 0;

  video_source_model #(.LINE_CLKS(LINE_CLKS), .HS_LEN(4), .FIELD_LINES(FIELD_LINES), .VS_LINES(2))
    u_src (.clk(clk), .start(start), .data(td_data), .hs(td_hs), .vs(td_vs),
           .field(sfield), .line(sline), .h(sh));

  video_capture #(.H_START(H_START), .H_END(H_END), .V_START(V_START), .V_END(V_END)) dut (
    .clk(clk), .rst(rst), .td_data(td_data), .td_hs(td_hs), .td_vs(td_vs),
    .wr_valid(wr_valid), .wr(wr), .we_n(we_n), .ud_n(ud_n), .ld_n(ld_n),
    .vert(vert), .horiz(horiz), .frame(frame), .write_half_low(half_low), .field(field));

  always #18.5 clk = !clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  cam_write_t expq [$];
  int         t = 0, last_t = -100, nwr = 0, rate_bad = 0;

  initial begin
    for (int fs = 0; fs < NFIELDS - 1; fs++) begin
      logic [1:0] fld;
      fld = 2'(fs + 1);
      for (int l = V_START + 1; l <= V_END; l++)
        for (int j = 0; j < W; j++) begin
          cam_write_t e;
          e.addr  = (fld[1] ? 18'h00000 : 18'h20000) + 18'((l - V_START - 1) * W + j);
          e.upper = fld[0];
          e.data  = tb_video_pkg::pix(fs, l, H_START + 2 + 2 * j);
          expq.push_back(e);
        end
    end
  end

  always @(posedge clk) begin
    t++;
    if (wr_valid) begin
      nwr++;
      if (nwr % W != 1 && t - last_t != 2) rate_bad++;
      last_t = t;
      check(!we_n && (ud_n == !wr.upper) && (ld_n == wr.upper), "strobes match the write");
      if (expq.size() == 0) check(1'b0, "write beyond the expected list");
      else begin
        cam_write_t e;
        e = expq.pop_front();
        check(wr == e, $sformatf("write %0d: addr %h lane %0d data %h, expected %h %0d %h",
                                 nwr, wr.addr, wr.upper, wr.data, e.addr, e.upper, e.data));
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (5) @(posedge clk);
    start <= 1'b1;
    wait (sfield == NFIELDS - 1);
    repeat (10) @(posedge clk);
    check(expq.size() == 0, $sformatf("%0d expected writes missing", expq.size()));
    check(nwr == (NFIELDS - 1) * (V_END - V_START) * W, $sformatf("%0d writes", nwr));
    check(rate_bad == 0, $sformatf("%0d writes not two clocks apart", rate_bad));
    check(field == 2'(NFIELDS), "field counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (LINE_CLKS * FIELD_LINES * (NFIELDS + 3)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
