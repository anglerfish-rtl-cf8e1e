// tb_ws2811_strip_driver: self-checking test of the strip (major) state machine.
// A 5-IC strip is refreshed three times with random colours supplied through
// px_index/px_rgb.  A line monitor checks the bit timings, including the short
// extra low time between blocks, and the 120 decoded bits of each refresh must
// be the five packets in IC order.  A refresh must take 5 x 6004 cycles.
//
// The expected results are worked out here from the stimulus, independently
// of the design under test; the sizes and the stimulus are this test's own
// choices, the timings checked are the design's.
module tb_ws2811_strip_driver;
  localparam int NI = 5;
  logic clk = 0, rst = 1, start = 0;
  logic [2:0] px_index;
  anglerfish_pkg::rgb_t px_rgb;
  logic dout, busy, done;
  logic [23:0] colours [NI];
  int checks = 0, failures = 0;

  assign px_rgb = (px_index < NI) ? colours[px_index] : 24'hDEAD00;

  ws2811_strip_driver #(.NUM_ICS(NI)) dut (.*);
  ws2811_line_monitor #(.LATCH_SEEN(3000)) mon (.clk, .rst, .din(dout));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int f = 0; f < 3; f++) begin
      int cyc;
      for (int i = 0; i < NI; i++) colours[i] = 24'($urandom);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != NI * 6004 + 1) begin failures++; $display("refresh took %0d cycles", cyc); end
      repeat (3100) @(negedge clk);
      checks++;
      if (mon.frame_bits.size() != 24 * NI) begin
        failures++; $display("%0d bits decoded", mon.frame_bits.size());
      end else begin
        for (int i = 0; i < NI; i++) begin
          logic [23:0] got;
          for (int k = 0; k < 24; k++) got[23 - k] = mon.frame_bits[24*i + k];
          checks++;
          if (got !== colours[i]) begin failures++; $display("IC %0d: %h expected %h", i, got, colours[i]); end
        end
      end
    end
    checks++;
    if (mon.errors != 0 || mon.frames != 3) begin failures++; $display("%0d timing errors, %0d frames", mon.errors, mon.frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
