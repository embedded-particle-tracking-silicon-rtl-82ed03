// tb_pmfe_clkgen: checks the PMFE clock generator.
//
// Over many frames it checks that the slot counter runs 0..9, that the data
// clock is high in even slots and low in odd ones (period two system clocks,
// 50 MHz at a 100 MHz system clock), that the pulsed clock is high for exactly
// one data clock (two system clocks) out of every five, and that the data
// clock enable pulses once per data clock.
module tb_pmfe_clkgen;
  import eptsm_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [SLOT_W-1:0] slot;
  logic dce, dclk, pclk;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pmfe_clkgen dut (.clk, .rst, .slot, .dce, .dclk, .pclk);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pclk_high, dce_cnt, prev_slot, pclk_rises;
    logic pclk_q;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    prev_slot = -1;
    pclk_high = 0; dce_cnt = 0; pclk_rises = 0; pclk_q = pclk;
    for (int c = 0; c < 200; c++) begin
      @(posedge clk);
      #1;
      check(slot < SLOTS, "slot range");
      if (prev_slot >= 0) check(int'(slot) == (prev_slot + 1) % SLOTS, "slot sequence");
      prev_slot = slot;
      check(dclk == ~slot[0], "dclk level");
      check(pclk == (slot < 2), "pclk level");
      check(dce == slot[0], "dce position");
      if (pclk) pclk_high++;
      if (dce) dce_cnt++;
      if (pclk && !pclk_q) pclk_rises++;
      pclk_q = pclk;
    end
    // 200 system clocks = 20 frames = 100 data clocks
    check(pclk_high == 40, "pclk duty: 1 of 5 data clocks");
    check(dce_cnt == 100, "one dce per data clock");
    check(pclk_rises == 20, "one pclk pulse per 5 data clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
