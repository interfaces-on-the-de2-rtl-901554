// video_source_model: behavioural stand-in for the composite-video decoder's digital
// output. After `start` it sends lines of LINE_CLKS pixel clocks; HS is low for the
// first HS_LEN clocks of each line, VS is low for the first VS_LINES lines of each
// field, and a field has FIELD_LINES lines. The byte at (field, line, h) is
// tb_video_pkg::pix(field, line, h), the field counted from 0 at the first field.
// Before `start`, HS and VS are high and the data is 0.
module video_source_model #(
  parameter int LINE_CLKS   = 1716,
  parameter int HS_LEN      = 128,
  parameter int FIELD_LINES = 262,
  parameter int VS_LINES    = 3
) (
  input  logic       clk,
  input  logic       start,
  output logic [7:0] data,
  output logic       hs,
  output logic       vs,
  output int         field,
  output int         line,
  output int         h
);
  logic running = 1'b0;

  initial begin
    field = 0; line = 0; h = 0;
    data = '0; hs = 1'b1; vs = 1'b1;
  end

  always @(posedge clk) begin
    if (!running) begin
      if (start) running <= 1'b1;
      hs <= 1'b1; vs <= 1'b1; data <= '0;
      if (start) begin
        hs   <= 1'b0;
        vs   <= 1'b0;
        data <= tb_video_pkg::pix(0, 0, 0);
      end
    end else begin
      int nh, nl, nf;
      nh = h + 1; nl = line; nf = field;
      if (nh == LINE_CLKS) begin
        nh = 0; nl = line + 1;
        if (nl == FIELD_LINES) begin nl = 0; nf = field + 1; end
      end
      h <= nh; line <= nl; field <= nf;
      hs   <= !(nh < HS_LEN);
      vs   <= !(nl < VS_LINES);
      data <= tb_video_pkg::pix(nf, nl, nh);
    end
  end

endmodule
