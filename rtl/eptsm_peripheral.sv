// eptsm_peripheral: read-out logic of the Embedded Particle Tracking Silicon
// Microscope, the custom peripheral on the processor local bus.
//
// Data path (one system clock, twice the PMFE data clock):
//   pmfe_clkgen  -> data clock and pulsed clock out to the PMFE, bit-slot count
//   pmfe_deser   -> 64-bit channel state word from the 8 serial wires, once per frame
//   channel_server x16 -> each watches 4 channels, logs every change with a
//                   timestamp into a small local FIFO
//   fifo_server  -> merges the 16 local FIFOs into the main FIFO, draining
//                   half-full ones first, adds the FIFO continuity counter
//   sync_fifo    -> main FIFO
//   dma_handler  -> answers DMA burst reads with 64-bit packets, adds the DMA
//                   continuity counter and the valid bit
// Glue: reg_handler (software registers), cal_pulse_gen (calibration pulses),
// loss_counter (transitions dropped at full local FIFOs), timestamp_counter,
// and the acquisition gate: transitions are recorded only while the run bit is
// set and the external `acq_inhibit` input is low. A rising edge of the run bit
// restarts the timestamp, both continuity counters and the loss count.
//
// Bus side: the ports are the user-side signals of the vendor bus interface
// (IPIF): register chip enables with byte-enabled 64-bit writes, and a
// FIFO chip enable with read request / burst for DMA. Register reads and
// FIFO reads are both answered one clock after the request; their data are
// ORed onto ip2bus_data since only one can be active at a time.
//
// The LVDS buffers, the clock manager, the bus interface itself, the CPU and
// the PMFE lie outside this module; their signals are the ports below.
module eptsm_peripheral
  import eptsm_pkg::*;
#(
  parameter int unsigned CS_FIFO_DEPTH   = 16,
  parameter int unsigned MAIN_FIFO_DEPTH = 512
) (
  input  logic              clk,            // system / bus clock, 2 x data clock
  input  logic              rst,
  // PMFE side
  output logic              pmfe_dclk,      // 50 MHz data clock
  output logic              pmfe_pclk,      // pulsed clock, 1 of 5 data clocks
  input  logic [NWIRES-1:0] pmfe_sdata,     // serial channel data
  output logic              cal_pulse,      // calibration pulse output
  input  logic              acq_inhibit,    // external veto of acquisition
  // bus interface, user side
  input  logic [63:0]       bus2ip_data,
  input  logic [7:0]        bus2ip_be,
  input  logic [NREGS-1:0]  bus2ip_rdce,    // register read chip enables
  input  logic [NREGS-1:0]  bus2ip_wrce,    // register write chip enables
  input  logic              bus2ip_fifo_ce, // cycle addresses the FIFO
  input  logic              bus2ip_rdreq,
  input  logic              bus2ip_burst,
  output logic [63:0]       ip2bus_data,
  output logic              ip2bus_rdack,
  output logic              ip2bus_wrack
);

  localparam int unsigned CS_CW   = $clog2(CS_FIFO_DEPTH) + 1;
  localparam int unsigned MAIN_CW = $clog2(MAIN_FIFO_DEPTH) + 1;

  // ---------------------------------------------------------------- clocks
  logic [SLOT_W-1:0] slot;
  logic              dce;

  pmfe_clkgen u_clkgen (
    .clk  (clk),
    .rst  (rst),
    .slot (slot),
    .dce  (dce),
    .dclk (pmfe_dclk),
    .pclk (pmfe_pclk)
  );

  // ------------------------------------------------------------- registers
  ctrl_t             ctrl;
  logic [NCHAN-1:0]  mask;
  logic [NCHAN-1:0]  chan_state;
  logic [31:0]       lost_total;
  logic              cal_busy;
  logic              acq_en;
  logic              run_q, start;
  logic [63:0]       reg_rdata;
  logic              reg_rdack;
  logic [MAIN_CW-1:0] main_count;
  logic              main_empty;

  reg_handler u_regs (
    .clk         (clk),
    .rst         (rst),
    .bus2ip_data (bus2ip_data),
    .bus2ip_be   (bus2ip_be),
    .rd_ce       (bus2ip_rdce),
    .wr_ce       (bus2ip_wrce),
    .ip2bus_data (reg_rdata),
    .rd_ack      (reg_rdack),
    .wr_ack      (ip2bus_wrack),
    .ctrl        (ctrl),
    .mask        (mask),
    .raw         (chan_state),
    .lost        (lost_total),
    .fifo_count  (16'(main_count)),
    .fifo_empty  (main_empty),
    .cal_busy    (cal_busy),
    .acq_en      (acq_en)
  );

  // Acquisition gate and start-of-run detection.
  assign acq_en = ctrl.run && !acq_inhibit;
  assign start  = ctrl.run && !run_q;

  always_ff @(posedge clk) begin
    if (rst) run_q <= 1'b0;
    else     run_q <= ctrl.run;
  end

  // ------------------------------------------------------------ front end
  logic frame;
  ts_t  timestamp;

  pmfe_deser u_deser (
    .clk        (clk),
    .rst        (rst),
    .slot       (slot),
    .align      (ctrl.align),
    .sdata      (pmfe_sdata),
    .chan_state (chan_state),
    .frame      (frame)
  );

  timestamp_counter u_ts (
    .clk   (clk),
    .rst   (rst),
    .clear (start),
    .dce   (dce),
    .ts    (timestamp)
  );

  cal_pulse_gen u_cal (
    .clk        (clk),
    .rst        (rst),
    .dce        (dce),
    .enable     (ctrl.cal_enable),
    .continuous (ctrl.cal_type),
    .count      (ctrl.cal_count),
    .period     (ctrl.cal_period),
    .pulse      (cal_pulse),
    .busy       (cal_busy),
    .sent       ()
  );

  // ------------------------------------------------------- channel servers
  cs_entry_t           cs_head  [NSERVERS];
  logic [NSERVERS-1:0] cs_empty, cs_half, cs_pop, cs_lost;

  for (genvar s = 0; s < NSERVERS; s++) begin : g_cs
    logic [CS_CW-1:0] cs_count;
    channel_server #(.SERVER_ID(s), .DEPTH(CS_FIFO_DEPTH)) u_cs (
      .clk       (clk),
      .rst       (rst),
      .dce       (dce),
      .frame     (frame),
      .chan_in   (chan_state[s*CH_PER_SERVER +: CH_PER_SERVER]),
      .mask      (mask[s*CH_PER_SERVER +: CH_PER_SERVER]),
      .acq_en    (acq_en),
      .timestamp (timestamp),
      .pop       (cs_pop[s]),
      .head      (cs_head[s]),
      .empty     (cs_empty[s]),
      .half      (cs_half[s]),
      .count     (cs_count),
      .lost      (cs_lost[s])
    );
  end

  loss_counter #(.N(NSERVERS), .W(32)) u_loss (
    .clk   (clk),
    .rst   (rst),
    .clear (start),
    .lost  (cs_lost),
    .total (lost_total)
  );

  // ----------------------------------------------------------- FIFO server
  logic        main_full, main_wr, main_pop;
  fifo_entry_t main_din;
  logic [FIFO_ENTRY_W-1:0] main_head;
  logic        draining, drain_start;

  fifo_server #(.N(NSERVERS)) u_fsrv (
    .clk         (clk),
    .rst         (rst),
    .clear_dci   (start),
    .cs_head     (cs_head),
    .cs_empty    (cs_empty),
    .cs_half     (cs_half),
    .cs_pop      (cs_pop),
    .main_full   (main_full),
    .main_wr     (main_wr),
    .main_din    (main_din),
    .draining    (draining),
    .drain_start (drain_start)
  );

  sync_fifo #(.WIDTH(FIFO_ENTRY_W), .DEPTH(MAIN_FIFO_DEPTH)) u_main_fifo (
    .clk   (clk),
    .rst   (rst),
    .push  (main_wr),
    .din   (main_din),
    .pop   (main_pop),
    .dout  (main_head),
    .empty (main_empty),
    .full  (main_full),
    .half  (),
    .count (main_count)
  );

  // ----------------------------------------------------------- DMA handler
  packet_t dma_data;
  logic    dma_rdack;

  dma_handler u_dma (
    .clk         (clk),
    .rst         (rst),
    .clear_dci   (start),
    .fifo_ce     (bus2ip_fifo_ce),
    .rd_req      (bus2ip_rdreq),
    .burst       (bus2ip_burst),
    .fifo_head   (fifo_entry_t'(main_head)),
    .fifo_empty  (main_empty),
    .fifo_pop    (main_pop),
    .ip2bus_data (dma_data),
    .rd_ack      (dma_rdack)
  );

  assign ip2bus_data  = reg_rdata | dma_data;
  assign ip2bus_rdack = reg_rdack | dma_rdack;

  // The two read paths share ip2bus_data, so a register read and a FIFO read
  // must never be requested in the same clock.
  a_one_read_path: assert property (@(posedge clk) disable iff (rst)
                                    !((|bus2ip_rdce) && bus2ip_fifo_ce));

endmodule
