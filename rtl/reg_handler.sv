// reg_handler: software-accessible registers of the peripheral.
//
// Translates the IPIF register interface (one write and one read chip enable
// per 64-bit register, byte enables on writes) into named control buses and
// back. Register map:
//   0 CTRL   RW  run, calibration enable and type, deserializer phase
//                offset, calibration pulse count and period (see ctrl_t)
//   1 MASK   RW  channel mask, bit c = 1 ignores channel c
//   2 RAW    RO  current parallel channel state, for troubleshooting
//   3 LOST   RO  transitions lost to full channel-server FIFOs
//   4 STATUS RO  [15:0] main FIFO occupancy, [16] main FIFO empty,
//                [17] calibration burst busy, [18] acquisition enabled
// The original design description lists what the registers are for (start/stop, calibration mode
// and type, channel mask, raw channel data, lost transition count); the
// addresses, bit positions and the status register are this design's choices.
//
// Timing: a chip enable is acknowledged on the next clock (wr_ack / rd_ack);
// read data is registered and valid with rd_ack, zero otherwise. Byte lane b
// of a write is taken when be[b] is set, lane 0 holding bits 7:0.
module reg_handler
  import eptsm_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic [63:0]      bus2ip_data,
  input  logic [7:0]       bus2ip_be,
  input  logic [NREGS-1:0] rd_ce,
  input  logic [NREGS-1:0] wr_ce,
  output logic [63:0]      ip2bus_data,
  output logic             rd_ack,
  output logic             wr_ack,
  // named buses to the rest of the peripheral
  output ctrl_t            ctrl,
  output logic [NCHAN-1:0] mask,
  input  logic [NCHAN-1:0] raw,
  input  logic [31:0]      lost,
  input  logic [15:0]      fifo_count,
  input  logic             fifo_empty,
  input  logic             cal_busy,
  input  logic             acq_en
);

  function automatic logic [63:0] merge(input logic [63:0] old, input logic [63:0] wdata,
                                        input logic [7:0] be);
    logic [63:0] r;
    for (int b = 0; b < 8; b++)
      r[b*8 +: 8] = be[b] ? wdata[b*8 +: 8] : old[b*8 +: 8];
    return r;
  endfunction

  logic [63:0] rdata;

  always_comb begin
    rdata = '0;
    unique case (1'b1)
      rd_ce[REG_CTRL]:   rdata = ctrl;
      rd_ce[REG_MASK]:   rdata = mask;
      rd_ce[REG_RAW]:    rdata = raw;
      rd_ce[REG_LOST]:   rdata = {32'd0, lost};
      rd_ce[REG_STATUS]: rdata = {45'd0, acq_en, cal_busy, fifo_empty, fifo_count};
      default:           rdata = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl        <= '0;
      mask        <= '0;
      ip2bus_data <= '0;
      rd_ack      <= 1'b0;
      wr_ack      <= 1'b0;
    end else begin
      if (wr_ce[REG_CTRL]) ctrl <= ctrl_t'(merge(ctrl, bus2ip_data, bus2ip_be));
      if (wr_ce[REG_MASK]) mask <= merge(mask, bus2ip_data, bus2ip_be);
      wr_ack      <= |wr_ce;
      rd_ack      <= |rd_ce;
      ip2bus_data <= rdata;
    end
  end

  // The IPIF raises at most one chip enable at a time.
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert ($onehot0(rd_ce)) else $error("reg_handler: several read chip enables");
      assert ($onehot0(wr_ce)) else $error("reg_handler: several write chip enables");
    end
  end

endmodule
