// gray_sync: two-flop synchronizer for a Gray-coded pointer.
//
// Carries a pointer from one clock domain into the domain of clk. Because
// the pointer is Gray coded, at most one bit changes per step, so the value
// seen after the two flops is always either the old or the new pointer.
// Latency: two rising edges of clk. Reset (asynchronous, active high)
// clears both stages. The source says only that the FIFO's two sides run on
// different clocks; this synchronizer is this design's way of crossing.
module gray_sync #(
  parameter int unsigned WIDTH = 3
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
