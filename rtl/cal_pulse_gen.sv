// cal_pulse_gen: calibration pulses for the PMFE calibration input.
//
// For calibration the PMFE's calibration input is driven with a known number
// of pulses; the host then checks that exactly that many hits were read out.
// A rising edge of `enable` starts a burst of `count` pulses when `continuous`
// is low; with `continuous` high pulses repeat for as long as `enable` stays
// high. Each pulse period is `period` data clocks long (values below 2 are
// treated as 2) and the pulse is high for the first half of it, rounded down.
// `busy` is high while pulses are being produced and `sent` counts the pulses
// of the current burst.
//
// The original design description says only that the FPGA generates calibration pulses and that
// software sets the calibration mode and type; the burst/continuous types, the
// period in data clocks and the 50 % duty cycle are this design's choices.
module cal_pulse_gen (
  input  logic        clk,
  input  logic        rst,
  input  logic        dce,         // data-clock enable: the time unit
  input  logic        enable,
  input  logic        continuous,
  input  logic [15:0] count,
  input  logic [15:0] period,
  output logic        pulse,
  output logic        busy,
  output logic [15:0] sent
);

  logic        enable_q;
  logic [15:0] phase;
  logic [15:0] per;

  assign per = (period < 16'd2) ? 16'd2 : period;

  always_ff @(posedge clk) begin
    if (rst) begin
      enable_q <= 1'b0;
      busy     <= 1'b0;
      phase    <= '0;
      sent     <= '0;
      pulse    <= 1'b0;
    end else begin
      enable_q <= enable;
      if (!enable) begin
        busy  <= 1'b0;
        pulse <= 1'b0;
      end else if (!enable_q) begin
        // Rising edge of enable: start a new burst.
        busy  <= continuous || (count != 16'd0);
        phase <= '0;
        sent  <= '0;
        pulse <= 1'b0;
      end else if (busy && dce) begin
        if (phase == 16'd0) begin
          pulse <= 1'b1;
          sent  <= sent + 1'b1;
        end
        if (phase == (per >> 1)) pulse <= 1'b0;
        if (phase == per - 16'd1) begin
          phase <= '0;
          if (!continuous && (sent == count)) busy <= 1'b0;
        end else begin
          phase <= phase + 1'b1;
        end
      end
    end
  end

endmodule
