// tb_bram_uart_readout: self-checking test of the memory-to-UART dump.
// A 40-word memory of random bytes is dumped at 8 cycles per bit; a UART
// receiver model decodes tx and every byte must arrive in address order.  A
// second en after the dump must not send anything again.  The number of cycles
// from en to sent_all is checked against 40 frames of 10 bits plus the
// controller's few cycles per word.
//
// The expected results are worked out here from the stimulus, independently
// of the design under test; the sizes and the stimulus are this test's own
// choices, the timings checked are the design's.
module tb_bram_uart_readout;
  localparam int D = 40, CPB = 8, AW = $clog2(D);
  logic clk = 0, rst = 1, en = 0;
  logic [AW-1:0] mem_addr;
  logic [7:0] mem_data;
  logic tx, busy, sent_all;
  logic [7:0] img [D];
  logic unused_we = 0;
  int checks = 0, failures = 0, nrx = 0;

  bram_uart_readout #(.DATA_W(8), .DEPTH(D), .CLKS_PER_BIT(CPB)) dut (.*);
  bram_single_port #(.WIDTH(8), .DEPTH(D)) u_mem (
    .clk, .we(unused_we), .addr(mem_addr), .din(8'h00), .dout(mem_data));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // UART receiver model
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge tx);
      repeat (CPB/2) @(posedge clk);
      for (int k = 0; k < 8; k++) begin
        repeat (CPB) @(posedge clk);
        b[k] = tx;
      end
      repeat (CPB) @(posedge clk);
      checks++;
      if (tx !== 1'b1) begin failures++; $display("missing stop bit"); end
      checks++;
      if (nrx >= D || b !== img[nrx]) begin
        failures++; $display("byte %0d: %h expected %h", nrx, b, (nrx < D) ? img[nrx] : 8'hxx);
      end
      nrx++;
    end
  end

  initial begin
    int cyc;
    for (int i = 0; i < D; i++) begin
      img[i] = 8'($urandom);
      u_mem.mem[i] = img[i];
    end
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    @(negedge clk); en = 1;
    cyc = 1;
    while (!sent_all) begin @(negedge clk); cyc++; end
    repeat (CPB * 12) @(negedge clk);
    checks++;
    if (nrx != D) begin failures++; $display("received %0d bytes", nrx); end
    checks++;
    if (cyc < D * (10*CPB + 1) || cyc > D * (10*CPB + 6) + 6) begin
      failures++; $display("dump took %0d cycles", cyc);
    end
    // en still high after a complete dump: nothing is sent again
    repeat (30 * CPB) @(negedge clk);
    checks++;
    if (nrx != D || busy) begin failures++; $display("dump repeated"); end
    // en low, then high again: a second complete dump
    @(negedge clk); en = 0;
    @(negedge clk); en = 1;
    nrx = 0;
    while (!sent_all) @(negedge clk);
    repeat (CPB * 12) @(negedge clk);
    checks++;
    if (nrx != D) begin failures++; $display("second dump: %0d bytes", nrx); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
