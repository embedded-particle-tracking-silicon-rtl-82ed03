// loss_counter: total of channel transitions lost to bandwidth and latency.
//
// Every channel server pulses its `lost` line for one clock when it has to
// drop a transition because its local FIFO is full. Several servers may drop
// in the same clock, so the counter adds the number of set lines each clock.
// It restarts from zero on `clear` (start of an acquisition) and saturates at
// its maximum rather than wrapping. Software reads it through the LOST
// register. The width and the saturation are this design's choices.
module loss_counter #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clear,
  input  logic [N-1:0] lost,
  output logic [W-1:0] total
);

  logic [$clog2(N+1)-1:0] ones;
  logic [W:0]             sum;

  always_comb begin
    ones = '0;
    for (int i = 0; i < N; i++) ones = ones + lost[i];
    sum = {1'b0, total} + (W+1)'(ones);
  end

  always_ff @(posedge clk) begin
    if (rst || clear) total <= '0;
    else              total <= sum[W] ? '1 : sum[W-1:0];
  end

endmodule
