// nic_reset_sync: reset bridge for one clock domain.
//
// Asserts rst_out_n at once (asynchronously) when rst_in_n goes low and
// releases it two rising edges of clk after rst_in_n goes high, so every
// flip-flop of the domain leaves reset on the same clock edge.
module nic_reset_sync (
  input  logic clk,
  input  logic rst_in_n,
  output logic rst_out_n
);

  logic [1:0] q;

  always_ff @(posedge clk or negedge rst_in_n) begin
    if (!rst_in_n) q <= 2'b00;
    else           q <= {q[0], 1'b1};
  end

  assign rst_out_n = q[1];

endmodule
