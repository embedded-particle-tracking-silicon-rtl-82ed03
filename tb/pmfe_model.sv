// pmfe_model: behavioural model of the PMFE front-end chip's digital side, for
// simulation only (not synthesizable).
//
// The real chip amplifies and discriminates the charge on 64 detector strips
// and serializes the 64 comparator outputs on eight LVDS wires, clocked by the
// data clock and framed by the pulsed clock that the read-out logic sends it.
// This model takes the comparator outputs directly as `chan` (1 = charge
// present). It counts data clock edges, resynchronising to the pulsed clock
// (seen high at the falling data clock edge of the first data clock of a
// frame), takes a snapshot of the channels at the first edge of each frame,
// and puts bit k of wire w (channel 8w+k) out after the k-th edge. Every
// output change is delayed by RT_DELAY ns to stand for the cable and buffer
// round trip, which the read-out's phase offset must absorb.
// The calibration input `cal` adds a hit on every channel selected by
// `cal_sel` while it is high, as the chip's calibration input feeds the
// front of its signal chain.
module pmfe_model #(
  parameter int RT_DELAY = 23   // ns
) (
  input  logic        dclk,
  input  logic        pclk,
  input  logic [63:0] chan,
  input  logic        cal,
  input  logic [63:0] cal_sel,
  output logic [7:0]  sdata
);

  int          edge_no = 0;
  logic [63:0] snap = '0;
  logic [7:0]  bits;

  initial sdata = '0;

  always @(posedge dclk or negedge dclk) begin
    if (!dclk && pclk) edge_no = 1;            // second edge of a frame
    else               edge_no = (edge_no + 1) % 10;
    if (edge_no == 0) snap = chan | (cal ? cal_sel : 64'd0);
    for (int w = 0; w < 8; w++)
      bits[w] = (edge_no < 8) ? snap[w*8 + edge_no] : 1'b0;
    fork
      begin
        automatic logic [7:0] b = bits;
        #(RT_DELAY) sdata = b;
      end
    join_none
  end

endmodule
