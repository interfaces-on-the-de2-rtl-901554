// async_fifo: small first-in first-out buffer between two unrelated clocks.
//
// DEPTH (a power of two) words of WIDTH bits. The write and read pointers are one bit
// wider than the address and kept in Gray code; each side sees the other's pointer
// through a two-flop synchronizer, so `full` and `empty` are conservative: a push or
// pop takes two or three clocks of the other side to become visible there.
// The read side is show-ahead: `rd_data` is the oldest word whenever `empty` is low,
// and `rd_pop` removes it at the next read clock edge. A push while `full` is dropped
// and sets the sticky `overflow` flag (write side); an assertion flags it in simulation.
module async_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8
) (
  input  logic             wr_clk,
  input  logic             wr_rst,
  input  logic             wr_push,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  output logic             overflow,
  input  logic             rd_clk,
  input  logic             rd_rst,
  input  logic             rd_pop,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty
);
  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;    // read pointer seen by the write side
  logic [AW:0] wgray_r1, wgray_r2;    // write pointer seen by the read side

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wbin     <= '0;
      wgray    <= '0;
      overflow <= 1'b0;
    end else if (wr_push) begin
      if (full) begin
        overflow <= 1'b1;
      end else begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_push && !full) mem[wbin[AW-1:0]] <= wr_data;
  end

  // read side
  assign empty   = (rgray == wgray_r2);
  assign rd_data = mem[rbin[AW-1:0]];

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rbin  <= '0;
      rgray <= '0;
    end else if (rd_pop && !empty) begin
      rbin  <= rbin + 1'b1;
      rgray <= bin2gray(rbin + 1'b1);
    end
  end

  a_no_overflow: assert property (@(posedge wr_clk) disable iff (wr_rst) !(wr_push && full))
    else $error("async_fifo: push while full");

endmodule
