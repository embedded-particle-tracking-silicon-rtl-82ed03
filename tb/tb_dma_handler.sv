// tb_dma_handler: checks DMA burst reads of the main FIFO.
//
// A sync_fifo in the testbench plays the main FIFO. The testbench issues
// 16-word bursts (the burst length of the original system), bursts of other
// lengths and single reads, sometimes reading more words than the FIFO holds.
// Checks: each request cycle is answered by exactly one word on the next clock
// (so the last word follows the clock on which the burst signal falls), the
// DMA DCI counts every word, valid words carry the FIFO entries in order,
// invalid words are flagged with valid = 0 and a zero payload, and nothing is
// acknowledged without a request or when the chip enable is low.
module tb_dma_handler;
  import eptsm_pkg::*;
  localparam int D = 64;

  logic clk = 1'b0, rst = 1'b1;
  logic clear_dci = 1'b0, fifo_ce = 1'b0, rd_req = 1'b0, burst = 1'b0;
  logic push = 1'b0;
  fifo_entry_t din, fifo_head;
  logic [FIFO_ENTRY_W-1:0] head_bits;
  logic fifo_empty, fifo_full, fifo_half, fifo_pop;
  logic [$clog2(D):0] fifo_count;
  packet_t ip2bus_data;
  logic rd_ack;
  fifo_entry_t q[$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sync_fifo #(.WIDTH(FIFO_ENTRY_W), .DEPTH(D)) u_fifo (
    .clk, .rst, .push, .din, .pop(fifo_pop), .dout(head_bits), .empty(fifo_empty),
    .full(fifo_full), .half(fifo_half), .count(fifo_count));
  assign fifo_head = fifo_entry_t'(head_bits);

  dma_handler dut (.clk, .rst, .clear_dci, .fifo_ce, .rd_req, .burst, .fifo_head, .fifo_empty,
                   .fifo_pop, .ip2bus_data, .rd_ack);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Fill the FIFO with n entries.
  task automatic fill(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      push = 1'b1;
      din.updown = 1'($urandom); din.fifo_dci = DCI_W'($urandom); din.channel = CH_W'($urandom);
      din.timestamp = {8'($urandom), 32'($urandom)};
      q.push_back(din);
    end
    @(negedge clk);
    push = 1'b0;
  endtask

  int dci_exp = 0, words = 0, invalid_words = 0, bursts16 = 0;

  // One read transaction of n words; burst or single reads.
  task automatic read(input int n, input bit use_burst, input bit ce = 1'b1);
    int got, req_cycles;
    bit pending;
    packet_t exp;
    got = 0; req_cycles = 0; pending = 0;
    for (int c = 0; c < n + 2; c++) begin
      @(negedge clk);
      // the answer to the previous cycle's request
      if (pending && ce) begin
        check(rd_ack, "ack one clock after request");
        if (q.size() > 0) begin
          exp = {1'b1, q[0].updown, DCI_W'(dci_exp), q[0].fifo_dci, q[0].channel, q[0].timestamp};
          void'(q.pop_front());
        end else begin
          exp = '0; exp.dma_dci = DCI_W'(dci_exp);
          invalid_words++;
        end
        check(ip2bus_data == exp, $sformatf("word %0d: %h exp %h", got, ip2bus_data, exp));
        dci_exp = (dci_exp + 1) % 256; got++; words++;
      end else begin
        check(!rd_ack, "no ack without request");
      end
      pending = (c < n);
      fifo_ce = (c < n) ? ce : 1'b0;
      burst   = use_burst && (c < n);
      rd_req  = !use_burst && (c < n);
    end
    if (ce) check(got == n, $sformatf("words per transaction %0d exp %0d", got, n));
    if (use_burst && n == 16 && ce) bursts16++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    clear_dci = 1'b1; @(negedge clk); clear_dci = 1'b0;
    fill(40);
    read(16, 1'b1);
    read(16, 1'b1);
    read(1, 1'b0);
    read(16, 1'b1);        // reads past the end: 7 valid, 9 invalid
    read(4, 1'b1, 1'b0);   // chip enable low: ignored
    for (int r = 0; r < 60; r++) begin
      fill($urandom_range(0, (D - q.size() < 30) ? D - q.size() : 30));
      read($urandom_range(0, 1) ? 16 : $urandom_range(1, 40), $urandom_range(0, 3) != 0);
    end
    while (q.size() > 0) read(16, 1'b1);
    check(bursts16 > 10, "16-word bursts");
    check(invalid_words > 0, "reads beyond FIFO contents");
    $display("words=%0d invalid=%0d", words, invalid_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
