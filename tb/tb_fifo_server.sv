// tb_fifo_server: checks the FIFO server's merge policy and the FIFO DCI.
//
// Sixteen queues in the testbench stand in for the channel servers' local
// FIFOs (depth 16, half full at 8 entries). Random traffic, with bursts aimed
// at a few servers, fills them; the main FIFO back-pressure is toggled at
// random. A reference model of the policy (round robin one entry at a time
// while no FIFO is half full; otherwise take the next half-full FIFO from the
// pointer and empty it completely) predicts the pop vector every cycle.
// Checks: pop vector, entry written to the main FIFO, FIFO DCI sequence, that
// nothing moves while the main FIFO is full, that each drain ends with its
// FIFO empty, and that both modes occur.
module tb_fifo_server;
  import eptsm_pkg::*;
  localparam int N = 16, D = 16;

  logic clk = 1'b0, rst = 1'b1;
  logic clear_dci = 1'b0;
  cs_entry_t cs_head [N];
  logic [N-1:0] cs_empty, cs_half, cs_pop;
  logic main_full = 1'b0, main_wr;
  fifo_entry_t main_din;
  logic draining, drain_start;
  cs_entry_t q [N][$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fifo_server #(.N(N)) dut (.clk, .rst, .clear_dci, .cs_head, .cs_empty, .cs_half, .cs_pop,
                            .main_full, .main_wr, .main_din, .draining, .drain_start);

  // Presents the queues on the FIFO-side ports; called after every change.
  task automatic refresh();
    for (int i = 0; i < N; i++) begin
      cs_empty[i] = (q[i].size() == 0);
      cs_half[i]  = (q[i].size() >= D/2);
      cs_head[i]  = (q[i].size() > 0) ? q[i][0] : '0;
    end
  endtask

  function automatic int exp_pop_idx(input logic [N-1:0] v);
    for (int i = 0; i < N; i++) if (v[i]) return i;
    return 0;
  endfunction

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
    int cur, m_drain, dci, drains, rr_moves, drain_moves, hot;
    logic [N-1:0] exp_pop;
    bit any_half, move;
    int nh;
    cur = 0; m_drain = 0; dci = 0; drains = 0; rr_moves = 0; drain_moves = 0; hot = 3;
    refresh();
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int c = 0; c < 30000; c++) begin
      @(negedge clk);
      // traffic into the local queues for the coming edge (applied after it)
      main_full = ($urandom_range(0, 7) == 0);
      clear_dci = (c == 15000);
      #1;
      // reference model
      any_half = 1'b0; nh = cur;
      for (int k = N - 1; k >= 0; k--)
        if (q[(cur + k) % N].size() >= D/2) begin any_half = 1'b1; nh = (cur + k) % N; end
      move = !main_full && q[cur].size() > 0 && (m_drain || !any_half);
      exp_pop = '0;
      if (move) exp_pop[cur] = 1'b1;
      check(cs_pop == exp_pop, $sformatf("pop vector %h exp %h", cs_pop, exp_pop));
      check(main_wr == move, "main_wr");
      check(draining == m_drain[0], $sformatf("draining flag cur=%0d dutcur=%0d sz=%0d", cur, dut.cur, q[cur].size()));
      if (move) begin
        check(main_din.updown == q[cur][0].updown && main_din.channel == q[cur][0].channel &&
              main_din.timestamp == q[cur][0].timestamp, "entry contents");
        check(main_din.fifo_dci == DCI_W'(dci), $sformatf("fifo dci %0d exp %0d cur %0d drain %0d", main_din.fifo_dci, dci%256, cur, m_drain));
        if (m_drain) drain_moves++; else rr_moves++;
      end
      if (main_full) check(!main_wr, "no write while main FIFO full");
      @(posedge clk);
      #1;
      // apply the model's state update
      if (clear_dci) dci = 0; else if (move) dci++;
      if (m_drain) begin
        if (q[cur].size() == 0) begin m_drain = 0; cur = (cur + 1) % N; end
      end else if (any_half) begin
        m_drain = 1; cur = nh; drains++;
      end else cur = (cur + 1) % N;
      if (move) void'(q[exp_pop_idx(exp_pop)].pop_front());
      // new entries from the channel servers
      if (c % 2000 == 0) hot = $urandom_range(0, N - 1);
      for (int i = 0; i < N; i++) begin
        int p;
        p = (i == hot || i == (hot + 5) % N) ? 3 : 60;
        if (((c / 4000) % 2 == 1) && i % 2 == 0) p = 4;
        if (q[i].size() < D && $urandom_range(0, p - 1) == 0) begin
          cs_entry_t e;
          e.updown = 1'($urandom); e.channel = CH_W'(i * 4 + $urandom_range(0, 3));
          e.timestamp = TS_W'(c);
          q[i].push_back(e);
        end
      end
      refresh();
    end
    check(drains > 20, $sformatf("drain mode entered (%0d)", drains));
    check(rr_moves > 100, "round-robin moves");
    check(drain_moves > 100, "drain moves");
    $display("drains=%0d rr_moves=%0d drain_moves=%0d", drains, rr_moves, drain_moves);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
