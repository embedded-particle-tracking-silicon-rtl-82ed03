// tb_reg_handler: checks the software registers.
//
// Random writes with random byte enables to CTRL and MASK are compared with a
// byte-lane reference model; reads of every register, including the read-only
// RAW, LOST and STATUS ones driven with random values, are compared with the
// expected contents. It also checks the one-clock acknowledge timing, the
// decoded control fields, and that writes to read-only registers change
// nothing.
module tb_reg_handler;
  import eptsm_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [63:0] bus2ip_data = '0;
  logic [7:0]  bus2ip_be = '0;
  logic [NREGS-1:0] rd_ce = '0, wr_ce = '0;
  logic [63:0] ip2bus_data;
  logic rd_ack, wr_ack;
  ctrl_t ctrl;
  logic [NCHAN-1:0] mask, raw = '0;
  logic [31:0] lost = '0;
  logic [15:0] fifo_count = '0;
  logic fifo_empty = 1'b1, cal_busy = 1'b0, acq_en = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  reg_handler dut (.clk, .rst, .bus2ip_data, .bus2ip_be, .rd_ce, .wr_ce, .ip2bus_data, .rd_ack,
                   .wr_ack, .ctrl, .mask, .raw, .lost, .fifo_count, .fifo_empty, .cal_busy, .acq_en);

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

  logic [63:0] m_ctrl = '0, m_mask = '0;

  function automatic logic [63:0] lanes(input logic [63:0] old, input logic [63:0] d, input logic [7:0] be);
    logic [63:0] r = old;
    for (int b = 0; b < 8; b++) if (be[b]) r[b*8 +: 8] = d[b*8 +: 8];
    return r;
  endfunction

  task automatic wr(input int r, input logic [63:0] d, input logic [7:0] be);
    @(negedge clk);
    wr_ce = '0; wr_ce[r] = 1'b1; bus2ip_data = d; bus2ip_be = be;
    @(negedge clk);
    wr_ce = '0;
    check(wr_ack, "write ack one clock later");
    if (r == REG_CTRL) m_ctrl = lanes(m_ctrl, d, be);
    if (r == REG_MASK) m_mask = lanes(m_mask, d, be);
    @(negedge clk);
    check(!wr_ack, "single write ack");
  endtask

  task automatic rd(input int r, input logic [63:0] expd);
    @(negedge clk);
    rd_ce = '0; rd_ce[r] = 1'b1;
    @(negedge clk);
    rd_ce = '0;
    check(rd_ack, "read ack one clock later");
    check(ip2bus_data == expd, $sformatf("reg %0d read %h exp %h", r, ip2bus_data, expd));
    @(negedge clk);
    check(!rd_ack && ip2bus_data == '0, "bus idle after read");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    rd(REG_CTRL, '0);
    rd(REG_MASK, '0);
    for (int i = 0; i < 300; i++) begin
      int r;
      r = $urandom_range(0, NREGS - 1);
      raw = {$urandom, $urandom}; lost = $urandom; fifo_count = 16'($urandom);
      fifo_empty = 1'($urandom); cal_busy = 1'($urandom); acq_en = 1'($urandom);
      if ($urandom_range(0, 1)) wr(r, {$urandom, $urandom}, 8'($urandom));
      check(ctrl == m_ctrl && mask == m_mask, "register outputs");
      check(ctrl.run == m_ctrl[0] && ctrl.cal_enable == m_ctrl[1] && ctrl.cal_type == m_ctrl[2] &&
            ctrl.align == m_ctrl[7:4] && ctrl.cal_count == m_ctrl[47:32] &&
            ctrl.cal_period == m_ctrl[63:48], "control field layout");
      case (r)
        REG_CTRL:   rd(r, m_ctrl);
        REG_MASK:   rd(r, m_mask);
        REG_RAW:    rd(r, raw);
        REG_LOST:   rd(r, {32'd0, lost});
        default:    rd(r, {45'd0, acq_en, cal_busy, fifo_empty, fifo_count});
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
