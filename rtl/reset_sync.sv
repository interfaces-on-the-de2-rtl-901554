// reset_sync: turns an asynchronous active-low reset (a push button) into a reset
// that is asserted at once and released synchronously to `clk`, two clocks after the
// button is let go. Output is active high.
module reset_sync (
  input  logic clk,
  input  logic rst_n_async,
  output logic rst
);
  logic [1:0] q;

  always_ff @(posedge clk or negedge rst_n_async) begin
    if (!rst_n_async) q <= 2'b11;
    else              q <= {q[0], 1'b0};
  end

  assign rst = q[1];

endmodule
