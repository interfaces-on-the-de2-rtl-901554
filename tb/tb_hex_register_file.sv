// tb_hex_register_file: drives random switch settings and checks the command, address
// and data registers and all eight displays against a reference kept in the testbench.
// Also checks that nothing loads while SW17 is down and that a setting takes effect
// within three clocks (two synchronizer stages and the register).
module tb_hex_register_file;
  logic       clk = 1'b0, rst = 1'b1;
  logic [6:0] sw_hi = '0;
  logic [7:0] command, address, data;
  logic [6:0] hex_n [8];
  logic [7:0] ref_addr = '0, ref_data = '0;
  int checks = 0, failures = 0;

  hex_register_file dut (.clk(clk), .rst(rst), .sw_hi(sw_hi), .command(command),
                         .address(address), .data(data), .hex_n(hex_n));

  always #5 clk = !clk;

  task automatic check_all();
    logic [3:0] dig [8];
    dig[0] = ref_data[3:0]; dig[1] = ref_data[7:4];
    dig[2] = ref_addr[3:0]; dig[3] = ref_addr[7:4];
    dig[4] = 4'h0;          dig[5] = 4'h4;
    checks++;
    if (command !== 8'h40 || address !== ref_addr || data !== ref_data) begin
      failures++;
      $display("FAIL regs cmd=%h addr=%h/%h data=%h/%h", command, address, ref_addr, data, ref_data);
    end
    for (int i = 0; i < 8; i++) begin
      logic [6:0] exp_n;
      exp_n = (i >= 6) ? 7'h7F : ~tb_video_pkg::seg_on(dig[i]);
      checks++;
      if (hex_n[i] !== exp_n) begin
        failures++;
        $display("FAIL HEX%0d = %b, expected %b", i, hex_n[i], exp_n);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (3) @(posedge clk);
    check_all();
    for (int n = 0; n < 200; n++) begin
      logic [6:0] s;
      s = 7'($urandom);
      @(negedge clk);
      sw_hi = s;
      if (s[6]) begin
        unique case (s[5:4])
          2'b00: ref_data[3:0] = s[3:0];
          2'b01: ref_data[7:4] = s[3:0];
          2'b10: ref_addr[3:0] = s[3:0];
          2'b11: ref_addr[7:4] = s[3:0];
        endcase
      end
      repeat (3) @(posedge clk);
      #1;
      check_all();
    end
    // switch settings that must not load: enable down
    @(negedge clk);
    sw_hi = 7'b0_10_1111;
    repeat (5) @(posedge clk);
    #1;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
