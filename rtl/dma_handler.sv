// dma_handler: serves DMA burst reads of the main FIFO on the processor local bus.
//
// Software moves data out by having the bus-master DMA engine read the
// peripheral's FIFO address in bursts (16 words on the original system, but no
// burst length is assumed). The read request (single read) or the burst
// signal is high for one clock per word; each request cycle is answered on the
// following clock with one 64-bit packet and a read acknowledge, so the word
// for the last request cycle appears on the clock after the burst signal
// falls. Each packet is the FIFO head entry extended with the DMA data
// continuity indicator (DMA DCI), which counts every word delivered since the
// last `clear_dci`, and a valid bit. When the FIFO is empty the word is still
// delivered, with valid = 0 and zero payload, so a read larger than the FIFO
// contents never stalls the bus; software discards those words.
//
// Field order follows the original design's packet layout. The zero payload in
// invalid words and the one-cycle answer latency are this design's choices,
// modelled on the bus behaviour the original design description describes.
module dma_handler
  import eptsm_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        clear_dci,  // restart the DMA DCI (new acquisition)
  input  logic        fifo_ce,    // the bus cycle addresses the FIFO
  input  logic        rd_req,     // single-word read request
  input  logic        burst,      // burst read, high for one clock per word
  input  fifo_entry_t fifo_head,
  input  logic        fifo_empty,
  output logic        fifo_pop,
  output packet_t     ip2bus_data,
  output logic        rd_ack
);

  logic word_req;
  dci_t dma_dci;

  assign word_req = fifo_ce && (rd_req || burst);
  assign fifo_pop = word_req && !fifo_empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      ip2bus_data <= '0;
      rd_ack      <= 1'b0;
      dma_dci     <= '0;
    end else begin
      rd_ack <= word_req;
      if (word_req) begin
        ip2bus_data.valid     <= !fifo_empty;
        ip2bus_data.dma_dci   <= dma_dci;
        ip2bus_data.updown    <= fifo_empty ? 1'b0 : fifo_head.updown;
        ip2bus_data.fifo_dci  <= fifo_empty ? '0 : fifo_head.fifo_dci;
        ip2bus_data.channel   <= fifo_empty ? '0 : fifo_head.channel;
        ip2bus_data.timestamp <= fifo_empty ? '0 : fifo_head.timestamp;
      end else begin
        ip2bus_data <= '0;
      end
      if (clear_dci)     dma_dci <= '0;
      else if (word_req) dma_dci <= dma_dci + 1'b1;
    end
  end

  // Bus rule: exactly one acknowledged word on the clock after each request
  // clock, and no acknowledge otherwise.
  a_ack_follows_req: assert property (@(posedge clk) disable iff (rst) word_req |=> rd_ack);
  a_no_spurious_ack: assert property (@(posedge clk) disable iff (rst) !word_req |=> !rd_ack);
  a_invalid_is_zero: assert property (@(posedge clk) disable iff (rst)
                                      (rd_ack && !ip2bus_data.valid) |-> (ip2bus_data.timestamp == '0));

endmodule
