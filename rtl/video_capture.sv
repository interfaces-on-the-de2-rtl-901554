// video_capture: turns the video decoder's 8-bit, 27 MHz pixel stream into SRAM byte
// writes, one interlaced frame per memory half.
//
// Three counters follow the decoder's sync outputs (both taken as active low):
//   horizontal  pixel clocks since the last falling edge of HS
//   line        HS falling edges since the last falling edge of VS
//   field       VS falling edges (2 bits): bit 0 tells odd from even field, bit 1
//               picks the memory half and so changes every two fields (one frame)
// A pixel is inside the capture window when H_START < horizontal <= H_END and
// V_START < line <= V_END (defaults 300/1548 and 30/240: 1248 clocks by 210 lines).
// The decoder sends two bytes per pixel; only every other byte of the window is kept,
// so a field gives 624 x 210 bytes. A window counter, cleared at each VS, counts window
// clocks; its bit 0 picks the kept bytes and its upper bits are the word address
// inside the half. Both fields of a frame use the same word addresses: the odd field
// (field bit 0 = 0) goes to the low byte lane (LB) and the even field to the high lane
// (UB), so each 16-bit word holds one pixel of two neighbouring lines. Field bit 1 = 1
// writes the lower half (words 0..), 0 writes the upper half (words 0x20000..).
// Outputs are registered: `wr_valid` and `wr` appear one clock after the input byte
// enters the first register stage, i.e. two clocks after it is on the pins. `we_n`,
// `ud_n`, `ld_n` are the active-low strobes of the write that `wr` describes, for probing.
// `write_half_low` is field bit 1 (1: the lower half is being written).
// The window numbers, the counters, the lane and half assignment follow the tutorial;
// the sync edge choice, the saturating counters and the single window counter (in
// place of one counter per half) are this design's.
module video_capture
  import de2_video_pkg::*;
#(
  parameter int unsigned H_START = 300,   // window opens after this many pixel clocks
  parameter int unsigned H_END   = 1548,  // and closes after this one
  parameter int unsigned V_START = 30,    // lines skipped at the top of a field
  parameter int unsigned V_END   = 240    // last line captured
) (
  input  logic       clk,       // 27 MHz decoder clock
  input  logic       rst,       // synchronous, active high
  input  logic [7:0] td_data,
  input  logic       td_hs,     // active low
  input  logic       td_vs,     // active low
  output logic       wr_valid,  // one byte to store
  output cam_write_t wr,
  output logic       we_n,
  output logic       ud_n,
  output logic       ld_n,
  output logic       vert,      // line counter inside the window
  output logic       horiz,     // pixel counter inside the window
  output logic       frame,     // both: the capture window
  output logic       write_half_low,
  output logic [1:0] field
);
  logic [7:0]  data_q;
  logic        hs_q, vs_q, hs_prev, vs_prev;
  logic [10:0] horizontal;
  logic [9:0]  line;
  logic [17:0] win_cnt;

  always_ff @(posedge clk) begin
    data_q <= td_data;
    if (rst) begin
      hs_q    <= 1'b1;
      vs_q    <= 1'b1;
      hs_prev <= 1'b1;
      vs_prev <= 1'b1;
    end else begin
      hs_q    <= td_hs;
      vs_q    <= td_vs;
      hs_prev <= hs_q;
      vs_prev <= vs_q;
    end
  end

  wire hs_fall = hs_prev && !hs_q;
  wire vs_fall = vs_prev && !vs_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      horizontal <= '0;
      line       <= '0;
      field      <= '0;
    end else begin
      if (hs_fall)              horizontal <= '0;
      else if (!(&horizontal))        horizontal <= horizontal + 1'b1;
      if (vs_fall)              line <= '0;
      else if (hs_fall && !(&line))   line <= line + 1'b1;
      if (vs_fall)              field <= field + 1'b1;
    end
  end

  assign vert  = (line > 10'(V_START)) && (line <= 10'(V_END));
  assign horiz = (horizontal > 11'(H_START)) && (horizontal <= 11'(H_END));
  assign frame = vert && horiz;
  assign write_half_low = field[1];

  always_ff @(posedge clk) begin
    if (rst || vs_fall) win_cnt <= '0;
    else if (frame)     win_cnt <= win_cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_valid <= 1'b0;
      wr       <= '0;
    end else begin
      wr_valid <= frame && !win_cnt[0] && !vs_fall;
      if (frame && !win_cnt[0]) begin
        wr.addr  <= (field[1] ? HALF_LOW_BASE : HALF_HIGH_BASE) | SRAM_AW'(win_cnt[17:1]);
        wr.upper <= field[0];
        wr.data  <= data_q;
      end
    end
  end

  assign we_n = !wr_valid;
  assign ud_n = !(wr_valid && wr.upper);
  assign ld_n = !(wr_valid && !wr.upper);

endmodule
