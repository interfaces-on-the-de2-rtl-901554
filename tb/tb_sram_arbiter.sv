// tb_sram_arbiter: the arbiter between a random display read stream (a request in
// about 70% of pixel periods, from a preloaded region) and a camera writing at its
// highest rate (one byte per two 27 MHz clocks) in bursts, with the SRAM model.
// Every read must show OE low with the requested address and return the preloaded
// byte; every camera byte must reach the SRAM (count and content, checked against a
// shadow copy); OE and WE must never be low together; the buffer must not overflow.
module tb_sram_arbiter;
  import de2_video_pkg::*;
  localparam int NWRITES = 3000;

  logic clk = 1'b0, cam_clk = 1'b0, rst = 1'b1, cam_rst = 1'b1;
  logic vid_clk = 1'b0;
  logic rd_valid = 1'b0, rd_upper = 1'b0;
  logic [SRAM_AW-1:0] rd_addr = '0;
  logic [15:0] rd_data;
  logic cam_wr_valid = 1'b0, cam_overflow, read_n, write_waited;
  cam_write_t cam_wr;
  logic [SRAM_AW-1:0] sram_addr;
  logic [15:0] dq_o, dq_i;
  logic dq_oe, we_n, oe_n, ub_n, lb_n, ce_n;
  int checks = 0, failures = 0;

  function automatic logic [15:0] memf(input logic [SRAM_AW-1:0] a);
    return 16'((a * 40503) ^ (a >> 3));
  endfunction

  sram_arbiter dut (
    .cam_clk(cam_clk), .cam_rst(cam_rst), .cam_wr_valid(cam_wr_valid), .cam_wr(cam_wr),
    .cam_overflow(cam_overflow), .clk(clk), .rst(rst), .vid_clk(vid_clk),
    .rd_valid(rd_valid), .rd_addr(rd_addr), .rd_upper(rd_upper), .rd_data(rd_data),
    .read_n(read_n), .write_waited(write_waited),
    .sram_addr(sram_addr), .sram_dq_o(dq_o), .sram_dq_oe(dq_oe), .sram_dq_i(dq_i),
    .sram_we_n(we_n), .sram_oe_n(oe_n), .sram_ub_n(ub_n), .sram_lb_n(lb_n), .sram_ce_n(ce_n));

  sram_model u_sram (.clk(clk), .addr(sram_addr), .dq_from_ctrl(dq_o), .dq_oe(dq_oe),
                     .dq_to_ctrl(dq_i), .we_n(we_n), .oe_n(oe_n), .ub_n(ub_n), .lb_n(lb_n),
                     .ce_n(ce_n));

  always #10 clk = !clk;
  always #18.5 cam_clk = !cam_clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic [15:0] shadow [4096];
  int reads = 0, waited = 0, pushes = 0;

  initial begin
    for (int a = 0; a < 4096; a++) begin
      u_sram.mem[18'h30000 + a] = memf(18'h30000 + a);
      u_sram.mem[a] = 16'h0000;
      shadow[a] = 16'h0000;
    end
  end

  // display side: pixel clock and requests like frame_reader
  always @(posedge clk) begin
    if (!rst) begin
      vid_clk <= !vid_clk;
      if (write_waited) waited++;
      if (!vid_clk) begin                   // pixel step
        if (rd_valid) begin
          logic [15:0] m;
          m = memf(rd_addr);
          reads++;
          check(!oe_n && we_n && sram_addr == rd_addr && ub_n == !rd_upper && lb_n == rd_upper,
                "read cycle strobes and address");
          check((rd_upper ? rd_data[15:8] : rd_data[7:0]) == (rd_upper ? m[15:8] : m[7:0]),
                $sformatf("read %h returned %h", rd_addr, rd_data));
        end
        rd_valid <= ($urandom % 10) < 7;
        rd_addr  <= 18'h30000 + 18'($urandom % 4096);
        rd_upper <= 1'($urandom);
      end
    end
  end

  // camera side: bursts at the highest rate
  initial begin
    repeat (4) @(posedge cam_clk);
    cam_rst <= 1'b0;
    repeat (10) @(posedge cam_clk);
    while (pushes < NWRITES) begin
      int burst;
      burst = 20 + ($urandom % 200);
      for (int i = 0; i < burst && pushes < NWRITES; i++) begin
        cam_write_t w;
        w.addr  = 18'($urandom % 4096);
        w.upper = 1'($urandom);
        w.data  = 8'($urandom);
        if (w.upper) shadow[w.addr][15:8] = w.data;
        else         shadow[w.addr][7:0]  = w.data;
        cam_wr       <= w;
        cam_wr_valid <= 1'b1;
        pushes++;
        @(posedge cam_clk);
        cam_wr_valid <= 1'b0;
        @(posedge cam_clk);
      end
      repeat ($urandom % 50) @(posedge cam_clk);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (pushes == NWRITES);
    repeat (100) @(posedge clk);
    check(u_sram.writes == NWRITES, $sformatf("%0d SRAM writes for %0d bytes", u_sram.writes, NWRITES));
    for (int a = 0; a < 4096; a++)
      check(u_sram.mem[a] == shadow[a], $sformatf("word %h = %h, expected %h", a, u_sram.mem[a], shadow[a]));
    check(u_sram.contention == 0, "OE and WE never low together");
    check(!cam_overflow, "capture buffer never overflowed");
    check(reads > 1000, $sformatf("%0d reads", reads));
    check(waited > 0, "some camera byte waited for a display read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
