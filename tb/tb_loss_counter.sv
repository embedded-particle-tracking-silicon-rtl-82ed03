// tb_loss_counter: checks that the loss counter adds the number of lost pulses
// per clock, clears, and saturates (tested with a narrow 6-bit counter).
module tb_loss_counter;
  logic clk = 1'b0, rst = 1'b1, clear = 1'b0;
  logic [15:0] lost = '0;
  logic [31:0] total;
  logic [5:0]  total_s;
  logic        clear_s = 1'b0;
  int checks = 0, failures = 0;
  longint model, model_s;

  always #5 clk = ~clk;

  loss_counter #(.N(16), .W(32)) dut  (.clk, .rst, .clear, .lost, .total);
  loss_counter #(.N(16), .W(6))  dut6 (.clk, .rst, .clear(clear_s), .lost, .total(total_s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sat_seen = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    model = 0; model_s = 0;
    for (int c = 0; c < 1000; c++) begin
      @(negedge clk);
      checks += 2;
      if (total != 32'(model)) begin failures++; $display("FAIL total=%0d exp %0d", total, model); end
      if (total_s != 6'(model_s)) begin failures++; $display("FAIL sat total=%0d exp %0d", total_s, model_s); end
      if (model_s == 63) sat_seen++;
      lost    = 16'($urandom) & 16'($urandom);
      clear   = (c % 300 == 299);
      clear_s = (c % 97 == 96);
      if (clear) model = 0; else model += $countones(lost);
      if (clear_s) model_s = 0; else model_s = (model_s + $countones(lost) > 63) ? 63 : model_s + $countones(lost);
    end
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
