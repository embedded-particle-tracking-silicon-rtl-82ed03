// fifo_server: merges the channel servers' local FIFOs into the main FIFO.
//
// Policy, as the original design description describes it: while no local FIFO is at least half
// full, a pointer walks the channel servers in turn and moves one entry from
// each non-empty FIFO it passes. As soon as any FIFO is at least half full the
// server switches to draining: it takes the next qualifying FIFO, counting
// from the pointer, and moves entries from it until it is empty, then looks
// for the next half-full FIFO. Priority has a single level, so FIFOs that are
// all half full are drained one after the other. Before each entry enters the
// main FIFO the FIFO data continuity indicator (FIFO DCI) is attached; it
// counts every entry written since the last `clear_dci`.
//
// Timing: at most one entry is moved per clock; `cs_pop` is one-hot and
// combinational from the current state, and the entry is written to the main
// FIFO in the same cycle. Nothing is moved while the main FIFO is full, so
// back-pressure reaches the local FIFOs and, when they fill, the channel
// servers' loss counters. Starting a drain costs one cycle without a move,
// and so does leaving it; the one-cycle-per-entry rate and these idle cycles
// are this design's choices.
module fifo_server
  import eptsm_pkg::*;
#(
  parameter int unsigned N = NSERVERS
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear_dci,   // restart the FIFO DCI (new acquisition)
  input  cs_entry_t        cs_head  [N],
  input  logic [N-1:0]     cs_empty,
  input  logic [N-1:0]     cs_half,
  output logic [N-1:0]     cs_pop,
  input  logic             main_full,
  output logic             main_wr,
  output fifo_entry_t      main_din,
  output logic             draining,    // a half-full FIFO is being emptied
  output logic             drain_start  // pulses when a drain begins
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] cur;       // channel server under the pointer
  logic [IW-1:0] next_half; // first half-full server at or after cur
  logic          any_half;
  dci_t          fifo_dci;
  logic          move;

  // Search for the first half-full FIFO, starting at the pointer.
  always_comb begin
    any_half  = 1'b0;
    next_half = cur;
    for (int k = N - 1; k >= 0; k--) begin
      int unsigned j;
      j = (int'(cur) + k) % N;
      if (cs_half[j]) begin
        any_half  = 1'b1;
        next_half = IW'(j);
      end
    end
  end

  always_comb begin
    move = !main_full && !cs_empty[cur] && (draining || !any_half);
    cs_pop = '0;
    if (move) cs_pop[cur] = 1'b1;
    main_wr           = move;
    main_din.updown   = cs_head[cur].updown;
    main_din.fifo_dci = fifo_dci;
    main_din.channel  = cs_head[cur].channel;
    main_din.timestamp = cs_head[cur].timestamp;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cur         <= '0;
      draining    <= 1'b0;
      drain_start <= 1'b0;
      fifo_dci    <= '0;
    end else begin
      drain_start <= 1'b0;
      if (clear_dci)    fifo_dci <= '0;
      else if (move)    fifo_dci <= fifo_dci + 1'b1;

      if (draining) begin
        // Empty the selected FIFO entirely, then move on. The FIFO interface
        // has no "one entry left" flag, so a drain ends on the cycle after the
        // FIFO reads empty.
        if (cs_empty[cur]) begin
          draining <= 1'b0;
          cur      <= IW'((int'(cur) + 1) % N);
        end
      end else if (any_half) begin
        draining    <= 1'b1;
        drain_start <= 1'b1;
        cur         <= next_half;
      end else begin
        cur <= IW'((int'(cur) + 1) % N);
      end
    end
  end

endmodule
