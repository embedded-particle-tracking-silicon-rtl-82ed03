// timestamp_counter: the local time base that stamps every channel transition.
//
// Counts data clocks (20 ns each at the 50 MHz data clock) while enabled by the
// data-clock enable, and restarts from zero on `clear`, which the peripheral
// raises when an acquisition starts. The original design description says only that transitions
// are stamped relative to the FPGA's local clock; the unit (data clocks), the
// 40-bit width (about six hours before wrapping) and the clear-on-start rule
// are this design's choices. The counter wraps silently.
module timestamp_counter
  import eptsm_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic clear,   // synchronous restart from zero
  input  logic dce,     // data-clock enable
  output ts_t  ts
);

  always_ff @(posedge clk) begin
    if (rst || clear) ts <= '0;
    else if (dce)     ts <= ts + 1'b1;
  end

endmodule
