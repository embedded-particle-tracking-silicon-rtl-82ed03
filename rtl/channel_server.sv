// channel_server: watches a group of four channels and logs their transitions.
//
// One channel server serves channels SERVER_ID*4 .. SERVER_ID*4+3. Its state
// machine follows the PMFE clocking: it synchronises on the frame strobe
// (derived from the pulsed clock), taking a snapshot of its four channel bits,
// and then steps to the next channel of its group on each of the following
// four data clocks (the fifth data clock of the pulsed-clock period is the
// sync step). In the step of channel i it compares the snapshot bit with the
// last state it saw on that channel. On a change it writes
// {updown = new state, channel id, timestamp} into its local FIFO, provided
// acquisition is enabled and the channel is not masked. If the local FIFO is
// full the transition is dropped and `lost` pulses for one cycle.
//
// The group of four channels per server, the data-clock stepping and the
// pulsed-clock synchronisation follow the original design description. The local FIFO depth, the
// rule that masked channels still update their last-seen state (so unmasking
// does not log a stale edge) and the all-low state after reset are this
// design's choices.
//
// Interface: the local FIFO is read out first-word-fall-through through
// head/empty/pop by the FIFO server; `half` and `count` expose its occupancy.
module channel_server
  import eptsm_pkg::*;
#(
  parameter int unsigned SERVER_ID = 0,
  parameter int unsigned DEPTH     = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     dce,        // data-clock enable
  input  logic                     frame,      // new channel state word, frame sync
  input  logic [CH_PER_SERVER-1:0] chan_in,    // the group's channel bits
  input  logic [CH_PER_SERVER-1:0] mask,       // 1 = ignore the channel
  input  logic                     acq_en,     // acquisition running and not inhibited
  input  ts_t                      timestamp,
  input  logic                     pop,
  output cs_entry_t                head,
  output logic                     empty,
  output logic                     half,
  output logic [$clog2(DEPTH):0]   count,
  output logic                     lost        // a transition was dropped (FIFO full)
);

  typedef enum logic [2:0] {S_SYNC, S_CH0, S_CH1, S_CH2, S_CH3} state_t;

  state_t                   state;
  logic [CH_PER_SERVER-1:0] snap;   // channel bits latched at the sync step
  logic [CH_PER_SERVER-1:0] prev;   // last state seen on each channel
  logic [1:0]               idx;
  logic                     changed, record, push, full;
  cs_entry_t                entry;

  always_comb begin
    idx     = 2'(state - S_CH0);
    changed = (state != S_SYNC) && dce && (snap[idx] != prev[idx]);
    record  = changed && acq_en && !mask[idx];
    push    = record && !full;
    entry.updown    = snap[idx];
    entry.channel   = CH_W'(SERVER_ID * CH_PER_SERVER) + CH_W'(idx);
    entry.timestamp = timestamp;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_SYNC;
      snap  <= '0;
      prev  <= '0;
      lost  <= 1'b0;
    end else begin
      lost <= record && full;
      if (changed) prev[idx] <= snap[idx];
      if (frame) begin
        snap  <= chan_in;
        state <= S_CH0;
      end else if (dce) begin
        case (state)
          S_CH0:   state <= S_CH1;
          S_CH1:   state <= S_CH2;
          S_CH2:   state <= S_CH3;
          default: state <= S_SYNC;
        endcase
      end
    end
  end

  logic [CS_ENTRY_W-1:0] head_bits;

  sync_fifo #(.WIDTH(CS_ENTRY_W), .DEPTH(DEPTH)) u_fifo (
    .clk   (clk),
    .rst   (rst),
    .push  (push),
    .din   (entry),
    .pop   (pop),
    .dout  (head_bits),
    .empty (empty),
    .full  (full),
    .half  (half),
    .count (count)
  );

  assign head = cs_entry_t'(head_bits);

endmodule
