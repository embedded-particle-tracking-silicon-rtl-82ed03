// tb_timestamp_counter: checks that the timestamp counts data-clock enables,
// holds between them, and restarts from zero on clear.
module tb_timestamp_counter;
  import eptsm_pkg::*;

  logic clk = 1'b0, rst = 1'b1, clear = 1'b0, dce = 1'b0;
  ts_t  ts;
  longint unsigned model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  timestamp_counter dut (.clk, .rst, .clear, .dce, .ts);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    model = 0;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      checks++;
      if (ts != TS_W'(model)) begin
        failures++;
        $display("FAIL cycle %0d ts=%0d expected %0d", c, ts, model);
      end
      dce   = ($urandom_range(0, 2) == 0);
      clear = ($urandom_range(0, 400) == 0);
      if (clear)    model = 0;
      else if (dce) model = model + 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
