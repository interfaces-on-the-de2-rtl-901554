// tb_i2c_clock_divider: at the default divisor (675, giving 40 kHz from 27 MHz) checks
// the period and high time of the divided clock, four step ticks per period, and that
// the output stops (held high, no ticks) while the enable is low.
module tb_i2c_clock_divider;
  localparam int DIV = 675;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic sclk_div, step_tick;
  int checks = 0, failures = 0;
  int t = 0, last_rise = -1, last_fall = -1, ticks = 0, periods = 0;
  logic prev = 1'b1;

  i2c_clock_divider dut (.clk(clk), .rst(rst), .en(en), .sclk_div(sclk_div), .step_tick(step_tick));

  always #18.5 clk = !clk;   // 27 MHz

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    t++;
    if (en && !rst) begin
      if (step_tick) ticks++;
      if (sclk_div && !prev) begin
        if (last_rise >= 0) begin
          check(t - last_rise == DIV, $sformatf("period %0d", t - last_rise));
          check(ticks == 4, $sformatf("%0d ticks in a period", ticks));
          periods++;
        end
        last_rise = t;
        ticks = 0;
      end
      if (!sclk_div && prev) begin
        if (last_rise >= 0) check(t - last_rise == (DIV + 1) / 2, $sformatf("high time %0d", t - last_rise));
      end
    end
    prev = sclk_div;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (10) @(posedge clk);
    check(sclk_div == 1'b1 && step_tick == 1'b0, "idle while disabled");
    en <= 1'b1;
    repeat (DIV * 8) @(posedge clk);
    check(periods >= 5, "periods counted");
    en <= 1'b0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < DIV; i++) begin
      @(posedge clk);
      if (step_tick || !sclk_div) begin failures++; $display("FAIL output moved while disabled"); break; end
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (DIV * 20) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
