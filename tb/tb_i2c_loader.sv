// tb_i2c_loader: the loader and a small clock divider against the I2C slave model.
// Sends random address/data pairs with command 0x40 and checks the bytes the slave
// received, one start and one stop per transfer, no acknowledge error, the SCL period
// (one divider period per bit) and the transfer length (113 steps). Then a transfer
// to a slave that does not acknowledge must raise ack_error. Also checks that SDA
// changes only while SCL is low, except at start and stop.
module tb_i2c_loader;
  localparam int DIV = 16;
  logic clk = 1'b0, rst = 1'b1, go = 1'b0;
  logic sclk_div, step_tick;
  logic [7:0] cmd, addr, data;
  logic scl, m_low, s_low, busy, done, ack_error, ack_en;
  logic sda;
  logic [7:0] bytes [4];
  int nbytes, starts, stops, transfers;
  int checks = 0, failures = 0;

  assign sda = !(m_low || s_low);

  i2c_clock_divider #(.DIV(DIV)) u_div (.clk(clk), .rst(rst), .en(1'b1),
                                        .sclk_div(sclk_div), .step_tick(step_tick));
  i2c_loader dut (.clk(clk), .rst(rst), .step_tick(step_tick), .go(go), .command(cmd),
                  .address(addr), .data(data), .sda_i(sda), .scl(scl), .sda_drive_low(m_low),
                  .busy(busy), .done(done), .ack_error(ack_error));
  i2c_slave_model #(.DEV_ADDR(8'h40)) u_slave (
    .clk(clk), .scl(scl), .sda(sda), .ack_en(ack_en), .sda_drive_low(s_low),
    .bytes(bytes), .nbytes(nbytes), .starts(starts), .stops(stops), .transfers(transfers));

  always #18.5 clk = !clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // SDA may change while SCL is high only for start and stop. Counted from the pins:
  // within a transfer, a fall before the first SCL rise (start) and a rise after the
  // last (stop) are the only such changes. SCL periods are measured between the
  // rising edges of the 27 bit slots.
  logic scl_p = 1'b1, sda_p = 1'b1;
  int   illegal = 0, scl_rises = 0, last_rise = -1, period_bad = 0, t = 0;
  int   hi_falls = 0, hi_rises = 0;
  always @(posedge clk) begin
    t++;
    if (!rst && scl && scl_p && sda != sda_p) begin
      if (!sda && scl_rises == 0) hi_falls++;
      else if (sda && scl_rises == 27 + 1) hi_rises++;
      else begin illegal++; $display("SDA changed while SCL high at t=%0d (rise %0d)", t, scl_rises); end
    end
    if (scl && !scl_p) begin
      if (scl_rises >= 1 && scl_rises <= 26 && (t - last_rise) != DIV)
        period_bad++;
      last_rise = t;
      scl_rises++;
    end
    scl_p = scl;
    sda_p = sda;
  end

  task automatic transfer(input logic [7:0] a, input logic [7:0] d, input logic expect_ack);
    int st, s0, p0, tr0, steps;
    cmd = 8'h40; addr = a; data = d;
    s0 = starts; p0 = stops; tr0 = transfers;
    scl_rises = 0; hi_falls = 0; hi_rises = 0;
    @(negedge clk) go = 1'b1;
    wait (busy);
    steps = 1;
    while (!done) begin
      @(posedge clk);
      if (step_tick) steps++;
    end
    go = 1'b0;
    repeat (DIV * 2) @(posedge clk);
    check(starts == s0 + 1 && stops == p0 + 1 && transfers == tr0 + 1, "one start and one stop");
    check(scl_rises == 27 + 1, $sformatf("%0d SCL rising edges", scl_rises));
    check(hi_falls == 1 && hi_rises == 1, $sformatf("start/stop edges on the pins: %0d falls, %0d rises", hi_falls, hi_rises));
    check(steps == 113 || steps == 114, $sformatf("transfer took %0d steps", steps));
    if (expect_ack) begin
      check(!ack_error, "acknowledged transfer flagged");
      check(nbytes == 3 && bytes[0] == 8'h40 && bytes[1] == a && bytes[2] == d,
            $sformatf("slave got %0d bytes %h %h %h, sent 40 %h %h", nbytes, bytes[0], bytes[1], bytes[2], a, d));
    end else begin
      check(ack_error, "missing acknowledge not flagged");
    end
  endtask

  initial begin
    ack_en = 1'b1;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (DIV * 2) @(posedge clk);
    check(scl && sda && !busy, "bus idle after reset");
    transfer(8'h8F, 8'h00, 1'b1);     // LLC control register, 27 MHz
    transfer(8'h8F, 8'h50, 1'b1);
    transfer(8'h15, 8'h00, 1'b1);
    transfer(8'h17, 8'h41, 1'b1);
    for (int i = 0; i < 4; i++) transfer(8'($urandom), 8'($urandom), 1'b1);
    ack_en = 1'b0;
    transfer(8'h3A, 8'h5A, 1'b0);
    ack_en = 1'b1;
    transfer(8'h3A, 8'hA5, 1'b1);
    check(illegal == 0, $sformatf("%0d SDA changes while SCL high", illegal));
    check(period_bad == 0, $sformatf("%0d SCL periods not %0d clocks", period_bad, DIV));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (DIV * 40 * 12) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
