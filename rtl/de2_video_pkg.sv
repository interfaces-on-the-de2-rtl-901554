// de2_video_pkg: types and constants shared by the DE2 camcorder-to-VGA design.
//
// The SRAM on the board is 256K words of 16 bits (512 KB). The design splits it into
// two halves of 128K words: the half at word 0 and the half at word 0x20000. Within a
// half, one 16-bit word holds two pixels of the same column: the low byte (LB lane)
// comes from the odd field of an interlaced frame and the high byte (UB lane) from the
// even field. A camera write therefore carries an 18-bit word address, a lane select
// and one byte.
package de2_video_pkg;

  localparam int SRAM_AW = 18;                      // 256K words
  localparam int SRAM_DW = 16;                      // two byte lanes
  localparam logic [SRAM_AW-1:0] HALF_HIGH_BASE = 18'h20000;  // start of the upper 256 KB
  localparam logic [SRAM_AW-1:0] HALF_LOW_BASE  = 18'h00000;  // start of the lower 256 KB

  // I2C command bytes of the two decoder/codec chips (write / read)
  localparam logic [7:0] I2C_VIDEO_WRITE = 8'h40;
  localparam logic [7:0] I2C_VIDEO_READ  = 8'h41;
  localparam logic [7:0] I2C_AUDIO_WRITE = 8'h34;
  localparam logic [7:0] I2C_AUDIO_READ  = 8'h35;

  // One byte written by the capture side: word address, lane (1 = high byte) and data.
  typedef struct packed {
    logic [SRAM_AW-1:0] addr;
    logic               upper;
    logic [7:0]         data;
  } cam_write_t;

  localparam int CAM_WRITE_W = $bits(cam_write_t);

endpackage
