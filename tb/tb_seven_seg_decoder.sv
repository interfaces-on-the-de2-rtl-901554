// tb_seven_seg_decoder: all 16 digits, lit and blanked, against a segment list
// written per digit (tb_video_pkg::seg_on).
module tb_seven_seg_decoder;
  logic [3:0] value;
  logic       blank;
  logic [6:0] seg_n;
  int checks = 0, failures = 0;

  seven_seg_decoder dut (.value(value), .blank(blank), .seg_n(seg_n));

  initial begin
    for (int b = 0; b < 2; b++) begin
      for (int d = 0; d < 16; d++) begin
        value = 4'(d);
        blank = b[0];
        #1;
        checks++;
        if (seg_n !== (blank ? 7'h7F : ~tb_video_pkg::seg_on(value))) begin
          failures++;
          $display("FAIL digit %h blank %0d: seg_n=%b", value, blank, seg_n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
