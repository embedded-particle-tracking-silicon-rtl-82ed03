// tb_pmfe_deser: drives serial frames with known channel words and checks the
// reassembled 64-bit word for every phase offset 0..9.
//
// The testbench keeps its own slot count and puts bit k of wire w on the wire
// in the cycle whose slot is (k + align) mod 10, so each bit is sampled at the
// next clock edge with that slot value. It also checks that `frame` pulses
// once per ten clocks and that chan_state holds between frames.
module tb_pmfe_deser;
  import eptsm_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [SLOT_W-1:0] slot = '0, align = '0;
  logic [NWIRES-1:0] sdata = '0;
  logic [NCHAN-1:0]  chan_state;
  logic              frame;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pmfe_deser dut (.clk, .rst, .slot, .align, .sdata, .chan_state, .frame);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NCHAN-1:0] words[8];
    logic [NCHAN-1:0] expect_word, held;
    int fi, frames_seen, cyc_since;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int a = 0; a < SLOTS; a++) begin
      align = SLOT_W'(a);
      for (int i = 0; i < 8; i++) words[i] = {$urandom, $urandom};
      fi = 0; frames_seen = 0; cyc_since = 0; held = chan_state;
      // 9 frames: the first word may be partial after a phase change
      for (int c = 0; c < 9 * SLOTS; c++) begin
        int rel;
        @(negedge clk);
        slot = SLOT_W'(c % SLOTS);
        rel  = (c % SLOTS - a + SLOTS) % SLOTS;
        if (rel == 0 && c > 0) fi++;
        for (int w = 0; w < NWIRES; w++)
          sdata[w] = (rel < BITS_PER_WIRE) ? words[fi % 8][w*BITS_PER_WIRE + rel] : 1'b0;
        @(posedge clk);
        #1;
        cyc_since++;
        if (frame) begin
          frames_seen++;
          if (frames_seen > 1) check(cyc_since == SLOTS, "frame period");
          cyc_since = 0;
          // the frame that just completed was started at the last rel==0
          expect_word = words[fi % 8];
          if (c >= SLOTS) check(chan_state == expect_word, $sformatf("word align=%0d", a));
          held = chan_state;
        end else begin
          check(chan_state == held, "hold between frames");
        end
      end
      check(frames_seen >= 8, "frames seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
