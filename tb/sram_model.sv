// sram_model: behavioural model of the board's 256K x 16 asynchronous SRAM for the
// testbenches. Reads are combinational: with CE and OE low and WE high, `dq_to_ctrl`
// shows the addressed word (a lane whose enable is high reads as 0). Writes happen at
// rising edges of `clk` (the controller's clock, to which all its SRAM outputs are
// registered) when CE and WE are low, into the lanes whose UB/LB enables are low.
// `contention` counts cycles with OE and WE both low or with the controller driving
// the bus during a read; `writes` and `reads` count accesses.
module sram_model #(
  parameter int AW = 18
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [15:0]   dq_from_ctrl,
  input  logic          dq_oe,
  output logic [15:0]   dq_to_ctrl,
  input  logic          we_n,
  input  logic          oe_n,
  input  logic          ub_n,
  input  logic          lb_n,
  input  logic          ce_n
);
  logic [15:0] mem [2**AW];
  int contention = 0;
  int writes = 0;
  int reads = 0;

  always_comb begin
    dq_to_ctrl = '0;
    if (!ce_n && !oe_n && we_n) begin
      if (!ub_n) dq_to_ctrl[15:8] = mem[addr][15:8];
      if (!lb_n) dq_to_ctrl[7:0]  = mem[addr][7:0];
    end
  end

  always @(posedge clk) begin
    if (!ce_n && !oe_n && !we_n) contention++;
    if (!ce_n && !oe_n && dq_oe) contention++;
    if (!ce_n && !oe_n && we_n) reads++;
    if (!ce_n && !we_n) begin
      writes++;
      if (!ub_n) mem[addr][15:8] <= dq_from_ctrl[15:8];
      if (!lb_n) mem[addr][7:0]  <= dq_from_ctrl[7:0];
    end
  end

endmodule
