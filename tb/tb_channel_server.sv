// tb_channel_server: checks one channel server (server 5, channels 20..23)
// against a cycle-level reference model.
//
// The testbench generates the PMFE timing with pmfe_clkgen, raises `frame` once
// per ten clocks together with a new random state of the four channels, and
// changes the mask and the acquisition enable at random frame boundaries. The
// reference model steps through the channels on the four data clocks after
// each frame exactly as the design description prescribes and predicts every
// logged entry (edge direction, channel id, timestamp taken on the data clock
// of that channel's step) and every dropped one. The reader pops the local
// FIFO at varying rates so that the FIFO also overflows. Checks: every popped
// entry, the flags, and the total of `lost` pulses.
module tb_channel_server;
  import eptsm_pkg::*;
  localparam int D = 8;
  localparam int SID = 5;

  logic clk = 1'b0, rst = 1'b1;
  logic [SLOT_W-1:0] slot;
  logic dce, dclk, pclk;
  logic frame = 1'b0;
  logic [3:0] chan_in = '0, mask = '0;
  logic acq_en = 1'b0;
  ts_t  timestamp = '0;
  logic pop = 1'b0;
  cs_entry_t head;
  logic empty, half, lost;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pmfe_clkgen u_clk (.clk, .rst, .slot, .dce, .dclk, .pclk);

  channel_server #(.SERVER_ID(SID), .DEPTH(D)) dut (
    .clk, .rst, .dce, .frame, .chan_in, .mask, .acq_en, .timestamp,
    .pop, .head, .empty, .half, .count, .lost);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cs_entry_t q[$];
    cs_entry_t e;
    logic [3:0] snap, prev;
    int step, lost_exp, lost_seen, pushes, masked_skips;
    bit rec, full_m;
    snap = '0; prev = '0; step = 4; lost_exp = 0; lost_seen = 0; pushes = 0; masked_skips = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      // outputs of the previous edge
      check(empty == (q.size() == 0), "empty flag");
      check(half == (q.size() >= D/2), "half flag");
      check(int'(count) == q.size(), "count");
      if (lost) lost_seen++;
      // stimulus for the coming edge
      frame = (slot == 4'd7);
      if (frame) begin
        chan_in = 4'($urandom);
        if ($urandom_range(0, 9) == 0) mask = 4'($urandom) & 4'($urandom);
        if ($urandom_range(0, 19) == 0) acq_en = ($urandom_range(0, 3) != 0);
      end
      if (c < 200) acq_en = 1'b1;
      case ((c / 1500) % 3)
        0: pop = (q.size() > 0) && ($urandom_range(0, 9) == 0);
        1: pop = (q.size() > 0) && ($urandom_range(0, 1) == 0);
        default: pop = (q.size() > 0);
      endcase
      if (pop) check(head == q[0], "popped entry");
      // reference model of the coming edge
      rec = 1'b0; full_m = (q.size() == D);
      if (dce && !frame && step < 4) begin
        if (snap[step] != prev[step]) begin
          prev[step] = snap[step];
          if (acq_en && !mask[step]) begin
            rec = 1'b1;
            e.updown = snap[step];
            e.channel = CH_W'(SID * 4 + step);
            e.timestamp = timestamp;
          end else masked_skips++;
        end
      end
      if (pop) void'(q.pop_front());
      if (rec) begin
        if (full_m) lost_exp++;
        else begin q.push_back(e); pushes++; end
      end
      if (frame) begin snap = chan_in; step = 0; end
      else if (dce && step < 4) step++;
      @(posedge clk);
      if (dce) timestamp <= timestamp + 1;
    end
    @(negedge clk);
    if (lost) lost_seen++;
    check(lost_seen == lost_exp, $sformatf("lost total %0d vs %0d", lost_seen, lost_exp));
    check(lost_exp > 0, "overflow exercised");
    check(masked_skips > 0, "mask / inhibit exercised");
    check(pushes > 100, "entries logged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
