// i2c_slave_model: behavioural I2C write-only slave for the testbenches, standing in
// for the video decoder's register port. Samples SCL and SDA on `clk` (much faster
// than SCL), detects start and stop, shifts in bytes on SCL rising edges and pulls
// SDA low through each acknowledge clock when `ack_en` is set and the first byte is
// its device address (DEV_ADDR). Received bytes of the last transfer are kept in
// `bytes`; `starts`, `stops` and `transfers` count events.
module i2c_slave_model #(
  parameter logic [7:0] DEV_ADDR = 8'h40
) (
  input  logic       clk,
  input  logic       scl,
  input  logic       sda,          // resolved line level
  input  logic       ack_en,
  output logic       sda_drive_low,
  output logic [7:0] bytes [4],
  output int         nbytes,
  output int         starts,
  output int         stops,
  output int         transfers
);
  logic       scl_p = 1'b1, sda_p = 1'b1;
  logic       active = 1'b0, acking = 1'b0;
  logic [7:0] sh = '0;
  int         bitcnt = 0;
  logic       addressed = 1'b0;

  initial begin
    sda_drive_low = 1'b0;
    nbytes = 0; starts = 0; stops = 0; transfers = 0;
    for (int i = 0; i < 4; i++) bytes[i] = '0;
  end

  always @(posedge clk) begin
    scl_p <= scl;
    sda_p <= sda;
    if (scl && scl_p && sda_p && !sda) begin            // start
      starts++;
      active <= 1'b1; acking <= 1'b0; bitcnt = 0; nbytes = 0;
      sda_drive_low <= 1'b0;
    end else if (scl && scl_p && !sda_p && sda) begin   // stop
      stops++;
      if (active) transfers++;
      active <= 1'b0; sda_drive_low <= 1'b0;
    end else if (active && scl && !scl_p) begin         // SCL rising
      if (bitcnt < 8) begin
        sh = {sh[6:0], sda};
        bitcnt++;
      end
    end else if (active && !scl && scl_p) begin         // SCL falling
      if (bitcnt == 8 && !acking) begin
        acking <= 1'b1;
        if (nbytes == 0) addressed = (sh == DEV_ADDR);
        sda_drive_low <= ack_en && addressed;
      end else if (acking) begin
        acking <= 1'b0;
        sda_drive_low <= 1'b0;
        if (nbytes < 4) bytes[nbytes] = sh;
        nbytes++;
        bitcnt = 0;
      end
    end
  end

endmodule
