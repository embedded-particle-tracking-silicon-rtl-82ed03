// pmfe_clkgen: data clock and pulsed clock for the PMFE serializer.
//
// The PMFE has no clock of its own; the FPGA sends it a 50 MHz data clock,
// whose two edges each carry one bit (100 Mbit/s per wire), and a pulsed clock
// that is high for one data clock out of every five and marks the start of a
// packet. Here both are derived from one system clock at twice the data clock
// rate (100 MHz). A bit-slot counter runs 0..SLOTS-1 (ten slots = five data
// clocks); the data clock is high in even slots and low in odd slots, and the
// pulsed clock is high in slots 0 and 1. The slot count and a data-clock enable
// (one system clock per data clock, in the odd slot) drive the rest of the
// read-out logic, which thereby stays in the one system clock domain.
//
// In the original system these clocks come from the FPGA's clock managers with
// an adjustable phase; generating them from a counter and moving the phase
// adjustment into the deserializer (pmfe_deser.align) is this design's choice.
//
// Timing: all outputs are registered; dclk and pclk change only at system
// clock edges.
module pmfe_clkgen
  import eptsm_pkg::*;
#(
  parameter int unsigned SLOTS_P = SLOTS
) (
  input  logic              clk,
  input  logic              rst,
  output logic [SLOT_W-1:0] slot,   // bit slot of the current system clock cycle
  output logic              dce,    // one cycle per data clock (last half of it)
  output logic              dclk,   // data clock to the PMFE
  output logic              pclk    // pulsed clock to the PMFE
);

  logic [SLOT_W-1:0] slot_next;

  always_comb begin
    if (slot == SLOT_W'(SLOTS_P - 1)) slot_next = '0;
    else                              slot_next = slot + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      slot <= '0;
      dclk <= 1'b1;
      pclk <= 1'b1;
      dce  <= 1'b0;
    end else begin
      slot <= slot_next;
      dclk <= ~slot_next[0];
      pclk <= (slot_next < SLOT_W'(2));
      dce  <= slot_next[0];
    end
  end

endmodule
