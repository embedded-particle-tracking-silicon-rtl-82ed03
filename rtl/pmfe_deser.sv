// pmfe_deser: rebuilds the 64-bit channel state word from the PMFE serial wires.
//
// Each of the NWIRES wires carries BITS_PER_WIRE channel bits per pulsed-clock
// period, one bit per data clock edge. The system clock runs at the bit rate,
// so one sample per system clock is the same as sampling on both data clock
// edges. Bit k of wire w is channel w*BITS_PER_WIRE + k. It is captured on the
// clock edge where slot == (k + align) mod SLOTS; `align` absorbs the round-trip
// delay of clock out and data back. The remaining slots of the frame carry no
// data. One cycle after the last bit the assembled word is copied to chan_state
// and `frame` pulses; chan_state then holds for a whole frame.
//
// The bit-to-channel order and the position of the unused slots at the end of
// the frame are this design's choices; the original design description gives only the 8 x 8 bit
// organisation and the need for a phase adjustment.
module pmfe_deser
  import eptsm_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [SLOT_W-1:0] slot,        // from pmfe_clkgen
  input  logic [SLOT_W-1:0] align,       // phase offset in bit slots, 0..SLOTS-1
  input  logic [NWIRES-1:0] sdata,       // serial data from the PMFE
  output logic [NCHAN-1:0]  chan_state,  // one bit per channel, 1 = charge present
  output logic              frame        // chan_state updated this cycle
);

  logic [NCHAN-1:0]  shreg;
  logic [SLOT_W:0]   diff;
  logic [SLOT_W-1:0] rel;   // slot relative to the aligned frame start

  always_comb begin
    diff = {1'b0, slot} + SLOT_W'(SLOTS) - {1'b0, align};
    rel  = (diff >= (SLOT_W+1)'(SLOTS)) ? SLOT_W'(diff - (SLOT_W+1)'(SLOTS)) : diff[SLOT_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg      <= '0;
      chan_state <= '0;
      frame      <= 1'b0;
    end else begin
      frame <= 1'b0;
      if (rel < SLOT_W'(BITS_PER_WIRE)) begin
        for (int w = 0; w < NWIRES; w++)
          shreg[w*BITS_PER_WIRE + int'(rel)] <= sdata[w];
      end
      if (rel == SLOT_W'(BITS_PER_WIRE)) begin
        chan_state <= shreg;
        frame      <= 1'b1;
      end
    end
  end

endmodule
