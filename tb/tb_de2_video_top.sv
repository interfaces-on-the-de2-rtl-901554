// tb_de2_video_top: end-to-end test of the whole design at a small raster (100 x 40)
// and capture window (40 x 12 bytes per field); see top_check_harness.
module tb_de2_video_top;
  logic done;
  top_check_harness #(.FULL(1'b0), .MIN_CLEAN(3)) u_h (.done(done));
  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", u_h.checks, u_h.failures);
    $finish;
  end
endmodule
