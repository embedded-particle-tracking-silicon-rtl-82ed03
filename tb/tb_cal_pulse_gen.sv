// tb_cal_pulse_gen: checks the calibration pulse generator.
//
// A pmfe_clkgen supplies the data-clock enable. For several pulse counts and
// periods the testbench starts a burst and counts rising edges of `pulse`: the
// number must equal the programmed count (the original design's example is 100
// pulses giving 100 hits), each pulse must be high for period/2 data clocks
// and repeat every `period` data clocks, and `busy` must drop afterwards. The
// continuous type must keep pulsing while enabled and stop when disabled.
module tb_cal_pulse_gen;
  import eptsm_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [SLOT_W-1:0] slot;
  logic dce, dclk, pclk;
  logic enable = 1'b0, continuous = 1'b0;
  logic [15:0] count = '0, period = '0, sent;
  logic pulse, busy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pmfe_clkgen u_clk (.clk, .rst, .slot, .dce, .dclk, .pclk);
  cal_pulse_gen dut (.clk, .rst, .dce, .enable, .continuous, .count, .period, .pulse, .busy, .sent);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Runs a burst and measures it in system clocks (2 per data clock).
  task automatic burst(input int n, input int per, input int max_cycles);
    int rises, high_len, last_rise, c;
    bit prev;
    @(negedge clk);
    count = 16'(n); period = 16'(per); continuous = 1'b0; enable = 1'b1;
    rises = 0; high_len = 0; last_rise = -1; prev = 1'b0;
    for (c = 0; c < max_cycles; c++) begin
      @(negedge clk);
      if (pulse && !prev) begin
        if (last_rise >= 0) check(c - last_rise == 2 * per, $sformatf("period %0d", c - last_rise));
        last_rise = c; rises++;
      end
      if (!pulse && prev) check(high_len == 2 * (per / 2), $sformatf("width %0d", high_len));
      high_len = pulse ? (prev ? high_len + 1 : 1) : 0;
      prev = pulse;
      if (!busy && c > 4 && !pulse) break;
    end
    check(rises == n, $sformatf("pulse count %0d exp %0d", rises, n));
    check(int'(sent) == n, "sent counter");
    check(!busy, "busy drops after burst");
    repeat (50) @(negedge clk);
    check(!pulse, "no pulses after burst");
    enable = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    int rises;
    bit prev;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    burst(100, 10, 3000);
    burst(1, 4, 100);
    burst(7, 3, 200);
    burst(25, 2, 200);
    burst(0, 10, 50);
    // continuous type
    @(negedge clk);
    continuous = 1'b1; period = 16'd8; enable = 1'b1;
    rises = 0; prev = 1'b0;
    for (int c = 0; c < 1600; c++) begin
      @(negedge clk);
      if (pulse && !prev) rises++;
      prev = pulse;
    end
    check(rises >= 99 && rises <= 101, $sformatf("continuous pulses %0d", rises));
    enable = 1'b0;
    repeat (3) @(negedge clk);
    check(!pulse && !busy, "continuous stops when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
