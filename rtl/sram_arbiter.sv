// sram_arbiter: shares the one SRAM port between the display, which reads, and the
// camera, which writes, with the display setting the pace.
//
// Each 25 MHz pixel period is two 50 MHz cycles. In the cycle where `vid_clk` is low
// the display may read: if frame_reader requests a byte (`rd_valid`), the SRAM sees
// OE low, the requested word address and the byte lane of the request, and the data
// on `sram_dq_i` at the end of that cycle is the pixel. Every other cycle (the high
// half of every pixel period, and both halves outside the displayed area) is free for
// the camera. Camera writes arrive on the 27 MHz clock; they go into a small
// dual-clock buffer, the temporary storage that decouples the two clocks, and each
// free cycle writes the oldest buffered byte: WE low, its address, its byte on both
// lanes of the data bus and only its lane enabled (UB for the high lane, LB for the
// low lane). OE and WE are never low in the same cycle. CE is held low.
// The capture needs one write per 74 ns at most, and at least one free cycle comes
// every 40 ns, so the buffer never holds more than a few bytes.
// All SRAM outputs are registered on the 50 MHz clock; the bidirectional data pins
// are split into `sram_dq_o`, `sram_dq_oe` and `sram_dq_i`, joined at the pad.
// `read_n` is the tutorial's READ signal (low during a display read). `write_waited`
// pulses when a buffered camera byte had to wait because the cycle was a display read.
// Reading in the low half of the pixel clock and writing in the other half comes from
// the tutorial; the tutorial latches one camera byte and writes it whenever READ is
// high, which can lose a byte between the two clocks. The dual-clock buffer of
// BUF_DEPTH bytes that replaces that latch is this design's choice.
module sram_arbiter
  import de2_video_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 8
) (
  // camera side, 27 MHz
  input  logic               cam_clk,
  input  logic               cam_rst,
  input  logic               cam_wr_valid,
  input  cam_write_t         cam_wr,
  output logic               cam_overflow,
  // display side, 50 MHz
  input  logic               clk,
  input  logic               rst,
  input  logic               vid_clk,
  input  logic               rd_valid,
  input  logic [SRAM_AW-1:0] rd_addr,
  input  logic               rd_upper,
  output logic [SRAM_DW-1:0] rd_data,
  output logic               read_n,
  output logic               write_waited,
  // SRAM pins
  output logic [SRAM_AW-1:0] sram_addr,
  output logic [SRAM_DW-1:0] sram_dq_o,
  output logic               sram_dq_oe,
  input  logic [SRAM_DW-1:0] sram_dq_i,
  output logic               sram_we_n,
  output logic               sram_oe_n,
  output logic               sram_ub_n,
  output logic               sram_lb_n,
  output logic               sram_ce_n
);
  cam_write_t   head;
  logic         buf_empty, buf_full, pop;
  logic [CAM_WRITE_W-1:0] head_bits;

  async_fifo #(.WIDTH(CAM_WRITE_W), .DEPTH(BUF_DEPTH)) u_buf (
    .wr_clk(cam_clk), .wr_rst(cam_rst), .wr_push(cam_wr_valid), .wr_data(cam_wr),
    .full(buf_full), .overflow(cam_overflow),
    .rd_clk(clk), .rd_rst(rst), .rd_pop(pop), .rd_data(head_bits), .empty(buf_empty)
  );
  assign head = cam_write_t'(head_bits);

  // the next cycle is a display read when vid_clk is about to go low
  wire next_is_read = vid_clk && rd_valid;
  assign pop = !next_is_read && !buf_empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      sram_addr    <= '0;
      sram_dq_o    <= '0;
      sram_dq_oe   <= 1'b0;
      sram_we_n    <= 1'b1;
      sram_oe_n    <= 1'b1;
      sram_ub_n    <= 1'b1;
      sram_lb_n    <= 1'b1;
      write_waited <= 1'b0;
    end else begin
      write_waited <= next_is_read && !buf_empty;
      if (next_is_read) begin
        sram_addr  <= rd_addr;
        sram_dq_oe <= 1'b0;
        sram_we_n  <= 1'b1;
        sram_oe_n  <= 1'b0;
        sram_ub_n  <= !rd_upper;
        sram_lb_n  <= rd_upper;
      end else if (!buf_empty) begin
        sram_addr  <= head.addr;
        sram_dq_o  <= {head.data, head.data};
        sram_dq_oe <= 1'b1;
        sram_we_n  <= 1'b0;
        sram_oe_n  <= 1'b1;
        sram_ub_n  <= !head.upper;
        sram_lb_n  <= head.upper;
      end else begin
        sram_dq_oe <= 1'b0;
        sram_we_n  <= 1'b1;
        sram_oe_n  <= 1'b1;
        sram_ub_n  <= 1'b1;
        sram_lb_n  <= 1'b1;
      end
    end
  end

  assign sram_ce_n = 1'b0;
  assign read_n    = sram_oe_n;
  assign rd_data   = sram_dq_i;

  a_oe_we_exclusive: assert property (@(posedge clk) disable iff (rst) sram_oe_n || sram_we_n)
    else $error("sram_arbiter: OE and WE both active");
  a_no_drive_on_read: assert property (@(posedge clk) disable iff (rst) !(sram_dq_oe && !sram_oe_n))
    else $error("sram_arbiter: data bus driven during a read");

endmodule
