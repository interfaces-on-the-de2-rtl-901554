// tb_de2_video_top_full: end-to-end test of the design at its default sizes: NTSC-like
// fields of 262 lines of 1716 clocks, a 624 x 210 capture window per field, the
// 800 x 525 VGA raster and a 624 x 420 picture, I2C at 40 kHz; see top_check_harness.
// Runs until two whole displayed frames have been verified pixel by pixel.
module tb_de2_video_top_full;
  logic done;
  top_check_harness #(.FULL(1'b1), .MIN_CLEAN(2)) u_h (.done(done));
  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", u_h.checks, u_h.failures);
    $finish;
  end
endmodule
