// tb_ws2811_bit_encoder: self-checking test of the WS2811 bit encoder.
// Random 24-bit packets (and all-zero / all-one ones) are sent one at a time;
// a line monitor checks every high and low time against the typical WS2811
// timings at 100 MHz and decodes the bits, which must equal the packet MSB
// first.  Each packet must take 1 + 24 x 250 cycles from rgb_valid to done.
//
// The expected results are worked out here from the stimulus, independently
// of the design under test; the sizes and the stimulus are this test's own
// choices, the timings checked are the design's.
module tb_ws2811_bit_encoder;
  logic clk = 0, rst = 1, rgb_valid = 0;
  logic [23:0] rgb = '0;
  logic dout, busy, done;
  int checks = 0, failures = 0;

  ws2811_bit_encoder dut (.*);
  ws2811_line_monitor #(.LATCH_SEEN(300)) mon (.clk, .rst, .din(dout));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int i = 0; i < 20; i++) begin
      logic [23:0] p;
      int cyc;
      p = (i == 0) ? 24'h000000 : (i == 1) ? 24'hFFFFFF : (i == 2) ? 24'h800001 : 24'($urandom);
      @(negedge clk); rgb_valid = 1; rgb = p;
      @(negedge clk); rgb_valid = 0; rgb = '0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 2 + 24 * 250) begin failures++; $display("packet took %0d cycles", cyc); end
      repeat (400) @(negedge clk);     // line low: the monitor closes the packet
      checks++;
      if (mon.frame_bits.size() != 24) begin
        failures++; $display("%0d bits decoded", mon.frame_bits.size());
      end else begin
        logic [23:0] got;
        for (int k = 0; k < 24; k++) got[23 - k] = mon.frame_bits[k];
        checks++;
        if (got !== p) begin failures++; $display("sent %h decoded %h", p, got); end
      end
    end
    checks++;
    if (mon.errors != 0) begin failures++; $display("%0d timing errors", mon.errors); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
