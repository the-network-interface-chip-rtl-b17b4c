// nic_sync: multi-flop synchroniser for a signal entering a clock domain.
//
// Passes din through STAGES flip-flops clocked by clk. It is meant for
// single bits and for Gray-coded pointers, where at most one bit changes
// between successive values, so every sampled value is either the old or
// the new one. Output latency is STAGES clock cycles. The reset value is 0.
module nic_sync #(
  parameter int unsigned WIDTH  = 1,
  parameter int unsigned STAGES = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic [STAGES-1:0][WIDTH-1:0] q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= {q[STAGES-2:0], din};
  end

  assign dout = q[STAGES-1];

endmodule
