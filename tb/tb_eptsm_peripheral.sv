// tb_eptsm_peripheral: end-to-end test of the read-out peripheral at its
// default sizes (16-entry channel-server FIFOs, 512-entry main FIFO).
//
// A behavioural PMFE (pmfe_model, 23 ns round trip) serializes 64 channel
// levels driven by the testbench. The testbench plays the processor: it
// programs the registers and moves data out with 16-word DMA bursts, checking
// every packet against the transitions it generated. Phases:
//   1 phase scan    : static pattern, find the offset at which RAW reads back
//                     the pattern, as an operator adjusts the clock phase
//   2 tracking      : random hits (each level held >= 4 frames) on all
//                     channels, four of them masked; every valid packet must
//                     match the next expected transition of its channel
//                     (direction exactly, timestamp within the frame and
//                     channel-step latency), DCIs must be continuous
//   3 inhibit       : transitions while acq_inhibit is high must not appear
//   4 calibration   : 100 calibration pulses must give exactly 100 rising and
//                     100 falling transitions on each calibrated channel
//   5 overflow      : heavy traffic with no read-out fills the main FIFO and
//                     then the channel-server FIFOs; afterwards the packets
//                     read plus the LOST register must equal the transitions
//                     generated, and the packets read must equal the total
//                     buffer capacity; resuming the read-out drains half-full
//                     channel-server FIFOs first
// Each mechanism is counted and a failure is counted for any that never
// happened.
module tb_eptsm_peripheral;
  import eptsm_pkg::*;

  localparam int CS_D = 16, MAIN_D = 512;
  localparam logic [63:0] CAL_SEL  = 64'h0000_0100_0000_0F00;  // channels 8..11 and 40
  localparam logic [63:0] MASK_SEL = 64'h8004_0000_0002_0008;  // channels 3, 17, 50, 63

  logic clk = 1'b0, rst = 1'b1;
  logic pmfe_dclk, pmfe_pclk, cal_pulse;
  logic [NWIRES-1:0] pmfe_sdata;
  logic acq_inhibit = 1'b0;
  logic [63:0] bus2ip_data = '0;
  logic [7:0]  bus2ip_be = '0;
  logic [NREGS-1:0] bus2ip_rdce = '0, bus2ip_wrce = '0;
  logic bus2ip_fifo_ce = 1'b0, bus2ip_rdreq = 1'b0, bus2ip_burst = 1'b0;
  logic [63:0] ip2bus_data;
  logic ip2bus_rdack, ip2bus_wrack;
  logic [63:0] chan_tb = '0;

  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  eptsm_peripheral dut (
    .clk, .rst, .pmfe_dclk, .pmfe_pclk, .pmfe_sdata, .cal_pulse, .acq_inhibit,
    .bus2ip_data, .bus2ip_be, .bus2ip_rdce, .bus2ip_wrce, .bus2ip_fifo_ce,
    .bus2ip_rdreq, .bus2ip_burst, .ip2bus_data, .ip2bus_rdack, .ip2bus_wrack);

  pmfe_model #(.RT_DELAY(23)) u_pmfe (
    .dclk(pmfe_dclk), .pclk(pmfe_pclk), .chan(chan_tb), .cal(cal_pulse), .cal_sel(CAL_SEL),
    .sdata(pmfe_sdata));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ mechanisms
  int n_scan_match = 0, n_masked = 0, n_inhibited = 0, n_matched = 0, n_invalid = 0;
  int n_bursts16 = 0, n_cal_pulses = 0, n_drains = 0, n_main_full = 0, n_lost = 0;
  int n_dci_wrap = 0, n_up = 0, n_down = 0;

  always @(posedge clk) begin
    if (dut.u_fsrv.drain_start) n_drains++;
    if (dut.main_full) n_main_full++;
  end
  always @(posedge cal_pulse) n_cal_pulses++;

  // ------------------------------------------------------------- bus tasks
  task automatic reg_write(input int r, input logic [63:0] d);
    @(negedge clk);
    bus2ip_wrce = '0; bus2ip_wrce[r] = 1'b1; bus2ip_data = d; bus2ip_be = 8'hff;
    @(negedge clk);
    bus2ip_wrce = '0;
    check(ip2bus_wrack, "register write acknowledged");
  endtask

  task automatic reg_read(input int r, output logic [63:0] d);
    @(negedge clk);
    bus2ip_rdce = '0; bus2ip_rdce[r] = 1'b1;
    @(negedge clk);
    bus2ip_rdce = '0;
    check(ip2bus_rdack, "register read acknowledged");
    d = ip2bus_data;
  endtask

  function automatic logic [63:0] ctrl_word(input bit run, input bit cal_en, input bit cal_type,
                                            input int align, input int cnt, input int per);
    ctrl_t c;
    c = '0;
    c.run = run; c.cal_enable = cal_en; c.cal_type = cal_type; c.align = 4'(align);
    c.cal_count = 16'(cnt); c.cal_period = 16'(per);
    return c;
  endfunction

  // -------------------------------------------------- expected transitions
  typedef struct { bit level; longint t; } exp_t;
  exp_t expq [64][$];
  longint start_cyc = 0;
  int  mode = 0;          // 0 = match against expq, 1 = count only
  int  last_fifo_dci = -1, last_dma_dci = -1;
  int  cal_up [64], cal_down [64];
  int  received = 0;

  task automatic new_run();
    last_fifo_dci = -1; last_dma_dci = -1; received = 0;
  endtask

  task automatic take_word(input packet_t p);
    if (last_dma_dci >= 0)
      check(int'(p.dma_dci) == (last_dma_dci + 1) % 256, "DMA DCI continuous");
    last_dma_dci = p.dma_dci;
    if (!p.valid) begin
      n_invalid++;
      check(p.channel == '0 && p.timestamp == '0, "invalid word has zero payload");
      return;
    end
    received++;
    if (last_fifo_dci >= 0)
      check(int'(p.fifo_dci) == (last_fifo_dci + 1) % 256, "FIFO DCI continuous");
    else
      check(p.fifo_dci == '0, "FIFO DCI starts at 0");
    if (p.fifo_dci == 8'hff) n_dci_wrap++;
    last_fifo_dci = p.fifo_dci;
    check(!MASK_SEL[p.channel] || mode == 2, "no packets from masked channels");
    if (p.updown) n_up++; else n_down++;
    if (mode == 0) begin
      if (expq[p.channel].size() == 0) begin
        check(1'b0, $sformatf("unexpected packet channel %0d", p.channel));
      end else begin
        exp_t e;
        longint dt;
        e = expq[p.channel].pop_front();
        dt = longint'(p.timestamp) - (e.t - start_cyc) / 2;
        check(p.updown == e.level, $sformatf("direction ch %0d", p.channel));
        check(dt >= -3 && dt <= 14, $sformatf("timestamp ch %0d off by %0d", p.channel, dt));
        n_matched++;
      end
    end else if (mode == 1) begin
      if (p.updown) cal_up[p.channel]++; else cal_down[p.channel]++;
    end
  endtask

  task automatic dma_burst(input int n);
    int got = 0;
    for (int c = 0; c < n + 1; c++) begin
      @(negedge clk);
      if (c > 0) begin
        check(ip2bus_rdack, "DMA word acknowledged one clock after request");
        take_word(packet_t'(ip2bus_data));
        got++;
      end
      bus2ip_fifo_ce = (c < n);
      bus2ip_burst   = (c < n);
    end
    @(negedge clk);
    check(!ip2bus_rdack, "no extra DMA word");
    check(got == n, "burst length");
    if (n == 16) n_bursts16++;
  endtask

  function automatic int pending();
    int s = 0;
    for (int i = 0; i < 64; i++) s += expq[i].size();
    return s;
  endfunction

  // Read until the FIFO has run dry (a burst that returns invalid words).
  task automatic drain();
    int inv0;
    repeat (60) @(negedge clk);
    do begin
      inv0 = n_invalid;
      dma_burst(16);
    end while (n_invalid == inv0);
  endtask

  // ------------------------------------------------------------- stimulus
  bit  stim_on = 0, recording = 0;
  int  stim_rate = 800;         // 1 in stim_rate chance per channel per cycle
  longint last_change [64];
  int  generated = 0;

  initial begin
    for (int i = 0; i < 64; i++) last_change[i] = 0;
    forever begin
      @(negedge clk);
      if (stim_on) begin
        for (int ch = 0; ch < 64; ch++) begin
          if (CAL_SEL[ch]) continue;
          if (cyc - last_change[ch] >= 40 && $urandom_range(0, stim_rate - 1) == 0) begin
            chan_tb[ch] = ~chan_tb[ch];
            last_change[ch] = cyc;
            if (!recording) continue;
            if (MASK_SEL[ch]) n_masked++;
            else if (acq_inhibit) n_inhibited++;
            else begin
              expq[ch].push_back('{level: chan_tb[ch], t: cyc});
              generated++;
            end
          end
        end
      end
    end
  end

  task automatic quiet();
    stim_on = 0;
    repeat (80) @(negedge clk);
  endtask

  // ----------------------------------------------------------------- main
  initial begin
    logic [63:0] rd, pattern;
    int align = -1;
    int busy_servers;
    repeat (5) @(posedge clk);
    rst <= 1'b0;

    // 1: phase scan
    pattern = 64'hA5C3_0F96_3C5A_E718;
    chan_tb = pattern;
    for (int a = 0; a < SLOTS; a++) begin
      reg_write(REG_CTRL, ctrl_word(0, 0, 0, a, 0, 0));
      repeat (40) @(negedge clk);
      reg_read(REG_RAW, rd);
      if (rd == pattern) begin n_scan_match++; if (align < 0) align = a; end
    end
    check(n_scan_match == 1, $sformatf("exactly one phase offset works (%0d)", n_scan_match));
    check(align == 2, "offset matches the 23 ns round trip (two 10 ns bit slots)");
    if (align < 0) align = 0;
    $display("phase offset %0d", align);
    chan_tb = '0;
    reg_write(REG_CTRL, ctrl_word(0, 0, 0, align, 0, 0));
    repeat (40) @(negedge clk);

    // 2: tracking with masked channels
    reg_write(REG_MASK, MASK_SEL);
    reg_write(REG_CTRL, ctrl_word(1, 0, 0, align, 0, 0));
    start_cyc = cyc - 1;
    new_run();
    recording = 1; mode = 0; stim_on = 1;
    repeat (300) begin
      repeat (120) @(negedge clk);
      dma_burst(16);
    end
    quiet();
    drain();
    check(pending() == 0, $sformatf("all tracked transitions read (%0d left)", pending()));
    reg_read(REG_LOST, rd);
    check(rd == 0, "nothing lost at moderate rate");

    // 3: inhibit
    stim_on = 1; repeat (3000) @(negedge clk); quiet();
    acq_inhibit = 1'b1; repeat (20) @(negedge clk);
    stim_on = 1; repeat (3000) @(negedge clk); quiet();
    reg_read(REG_STATUS, rd);
    check(rd[18] == 1'b0, "status shows acquisition inhibited");
    acq_inhibit = 1'b0; repeat (20) @(negedge clk);
    stim_on = 1; repeat (3000) @(negedge clk); quiet();
    drain();
    check(pending() == 0, $sformatf("no inhibited transitions, all others read (%0d left)", pending()));

    // 4: calibration, 100 pulses of 40 data clocks
    recording = 0; mode = 1;
    reg_write(REG_CTRL, ctrl_word(1, 1, 0, align, 100, 40));
    repeat (20) @(negedge clk);
    do begin
      repeat (200) @(negedge clk);
      dma_burst(16);
      reg_read(REG_STATUS, rd);
    end while (rd[17]);
    drain();
    reg_write(REG_CTRL, ctrl_word(1, 0, 0, align, 100, 40));
    for (int ch = 0; ch < 64; ch++)
      if (CAL_SEL[ch])
        check(cal_up[ch] == 100 && cal_down[ch] == 100,
              $sformatf("calibration ch %0d: %0d up %0d down", ch, cal_up[ch], cal_down[ch]));
    check(n_cal_pulses == 100, "100 calibration pulses sent");

    // 5: overflow in a new run
    mode = 2;
    reg_write(REG_CTRL, ctrl_word(0, 0, 0, align, 0, 0));
    repeat (20) @(negedge clk);
    reg_write(REG_CTRL, ctrl_word(1, 0, 0, align, 0, 0));
    new_run();
    generated = 0; recording = 1; stim_rate = 20; stim_on = 1;
    repeat (20000) @(negedge clk);
    quiet();
    for (int i = 0; i < 64; i++) expq[i].delete();
    reg_read(REG_LOST, rd);
    n_lost = int'(rd[31:0]);
    drain();
    $display("overflow: generated %0d received %0d lost %0d", generated, received, n_lost);
    check(received + n_lost == generated, "received + lost == generated");
    // every channel server with random traffic ends with a full local FIFO
    busy_servers = 0;
    for (int s = 0; s < NSERVERS; s++)
      if (((~CAL_SEL >> (s * 4)) & 64'hf) != 0) busy_servers++;
    check(received == MAIN_D + busy_servers * CS_D,
          $sformatf("received == buffer capacity (%0d servers with traffic)", busy_servers));
    reg_read(REG_LOST, rd);
    check(int'(rd[31:0]) == n_lost, "no loss while draining");

    // mechanism coverage
    $display("scan=%0d matched=%0d masked=%0d inhibited=%0d invalid=%0d bursts16=%0d cal=%0d drains=%0d main_full=%0d lost=%0d dci_wrap=%0d up=%0d down=%0d",
             n_scan_match, n_matched, n_masked, n_inhibited, n_invalid, n_bursts16, n_cal_pulses,
             n_drains, n_main_full, n_lost, n_dci_wrap, n_up, n_down);
    check(n_matched > 1000, "tracked transitions");
    check(n_up > 0 && n_down > 0, "both edge directions");
    check(n_masked > 0, "masked channel activity");
    check(n_inhibited > 0, "inhibited activity");
    check(n_invalid > 0, "reads beyond FIFO contents");
    check(n_bursts16 > 0, "16-word bursts");
    check(n_drains > 0, "half-full drain");
    check(n_main_full > 0, "main FIFO full back-pressure");
    check(n_lost > 0, "lost transitions");
    check(n_dci_wrap > 0, "DCI wrap-around");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
