// tb_uart_tx: self-checking test of the 8N1 UART transmitter.
// Random bytes are sent at 16 cycles per bit; a receiver model samples tx in
// the middle of each bit and checks start bit, data (LSB first) and stop bit,
// and that done pulses in the cycle right after the tenth bit time.
//
// The expected results are worked out here from the stimulus, independently
// of the design under test; the sizes and the stimulus are this test's own
// choices, the timings checked are the design's.
module tb_uart_tx;
  localparam int CPB = 16;
  logic clk = 0, rst = 1, start = 0;
  logic [7:0] data = '0;
  logic tx, busy, done;
  int checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    checks++; if (tx !== 1'b1) begin failures++; $display("tx not idle high"); end
    for (int i = 0; i < 40; i++) begin
      logic [7:0] b, got;
      int cyc;
      b = (i == 0) ? 8'h00 : (i == 1) ? 8'hFF : 8'($urandom);
      @(negedge clk); start = 1; data = b;
      @(negedge clk); start = 0; data = 8'($urandom);
      // now in the first cycle of the start bit
      repeat (CPB/2 - 1) @(negedge clk);
      checks++; if (tx !== 1'b0) begin failures++; $display("bad start bit"); end
      for (int k = 0; k < 8; k++) begin
        repeat (CPB) @(negedge clk);
        got[k] = tx;
      end
      repeat (CPB) @(negedge clk);
      checks++; if (tx !== 1'b1) begin failures++; $display("bad stop bit"); end
      checks++; if (got !== b) begin failures++; $display("sent %h received %h", b, got); end
      cyc = CPB/2 + 9*CPB;
      while (!done) begin @(negedge clk); cyc++; end
      checks++; if (cyc != 10*CPB + 1) begin failures++; $display("frame took %0d cycles", cyc); end
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
