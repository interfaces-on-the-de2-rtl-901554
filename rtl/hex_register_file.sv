// hex_register_file: the command, address and data registers of one I2C load, set from
// the board's switches and shown on the eight seven-segment displays.
//
// The command register is fixed (0x40, a write to the video decoder). The address and
// data registers are written one nibble at a time: while the load enable (SW17) is up,
// the nibble picked by the two select switches (SW16, SW15) takes the value on SW14..SW11
// (SW14 is the most significant bit) at every clock:
//   SW16 SW15 = 0 0 -> data[3:0]  (HEX0)     1 0 -> address[3:0] (HEX2)
//               0 1 -> data[7:4]  (HEX1)     1 1 -> address[7:4] (HEX3)
// With SW17 down nothing changes. HEX5/HEX4 show the command, HEX7/HEX6 are blank.
// Switch inputs are asynchronous to the clock, so they pass a two-flop synchronizer;
// a change on the switches reaches the registers three clocks later.
// The switch map, the fixed command and the display layout are the tutorial's; the
// reset values (address 0x00, data 0x00) and the synchronizer are this design's.
module hex_register_file
  import de2_video_pkg::*;
#(
  parameter logic [7:0] COMMAND = I2C_VIDEO_WRITE
) (
  input  logic       clk,
  input  logic       rst,          // synchronous, active high
  input  logic [6:0] sw_hi,        // SW17..SW11: {load_en, sel[1:0], value[3:0]}
  output logic [7:0] command,
  output logic [7:0] address,
  output logic [7:0] data,
  output logic [6:0] hex_n [8]     // HEX0..HEX7 segment lines, active low
);
  logic [6:0] sw_meta, sw_sync;

  always_ff @(posedge clk) begin
    sw_meta <= sw_hi;
    sw_sync <= sw_meta;
  end

  wire       load_en = sw_sync[6];
  wire [1:0] sel     = sw_sync[5:4];
  wire [3:0] value   = sw_sync[3:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      address <= '0;
      data    <= '0;
    end else if (load_en) begin
      unique case (sel)
        2'b00: data[3:0]    <= value;
        2'b01: data[7:4]    <= value;
        2'b10: address[3:0] <= value;
        2'b11: address[7:4] <= value;
      endcase
    end
  end

  assign command = COMMAND;

  logic [3:0] digit [8];
  assign digit[0] = data[3:0];
  assign digit[1] = data[7:4];
  assign digit[2] = address[3:0];
  assign digit[3] = address[7:4];
  assign digit[4] = command[3:0];
  assign digit[5] = command[7:4];
  assign digit[6] = 4'h0;
  assign digit[7] = 4'h0;

  for (genvar i = 0; i < 8; i++) begin : g_disp
    seven_seg_decoder u_seg (.value(digit[i]), .blank(i >= 6), .seg_n(hex_n[i]));
  end

endmodule
