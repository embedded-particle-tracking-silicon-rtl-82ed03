// tb_sync_fifo: random push/pop traffic against a queue reference model.
//
// Checks head data, empty/full/half flags and occupancy every cycle, with
// simultaneous push and pop, including push while full combined with pop.
module tb_sync_fifo;
  localparam int W = 12, D = 16;

  logic clk = 1'b0, rst = 1'b1;
  logic push = 1'b0, pop = 1'b0;
  logic [W-1:0] din = '0, dout;
  logic empty, full, half;
  logic [$clog2(D):0] count;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0;
  int full_seen = 0, both_at_full = 0;

  always #5 clk = ~clk;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst, .push, .din, .pop, .dout, .empty, .full, .half, .count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bias;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      // compare outputs with the model
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == D), "full");
      check(half == (q.size() >= D/2), "half");
      check(int'(count) == q.size(), "count");
      if (q.size() > 0) check(dout == q[0], "head data");
      if (full) full_seen++;
      // new stimulus, biased to sweep between empty and full
      bias = ((c / 300) % 2) ? 3 : 1;
      push = ($urandom_range(0, 3) < bias + 1) && (q.size() < D || $urandom_range(0,1) == 1);
      pop  = ($urandom_range(0, 3) < 3 - bias + 1) && (q.size() > 0);
      if (q.size() == D && push) pop = 1'b1;   // never overflow
      din  = W'($urandom);
      if (q.size() == D && push && pop) both_at_full++;
      @(posedge clk);
      if (pop && q.size() > 0) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    check(full_seen > 0, "full reached");
    check(both_at_full > 0, "push+pop while full exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
