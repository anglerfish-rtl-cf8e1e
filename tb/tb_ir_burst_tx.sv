// tb_ir_burst_tx: self-checking test of the 38 kHz burst transmitter.
// With the default 1316-cycle half period (38 kHz at 100 MHz) and a short
// 20000-cycle burst, every carrier half period and the burst length are
// measured; the LED must stay dark outside bursts, and a retrigger during a
// burst must restart it.
//
// The expected results are worked out here from the stimulus, independently
// of the design under test; the sizes and the stimulus are this test's own
// choices, the timings checked are the design's.
module tb_ir_burst_tx;
  localparam int HP = 1316, BURST = 20000;
  logic clk = 0, rst = 1, trigger = 0;
  logic ir_led, active;
  int checks = 0, failures = 0;
  int run = 0, nhalf = 0;
  logic led_q = 0;

  ir_burst_tx #(.BURST_CYCLES(BURST)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // every complete high or low carrier phase inside a burst lasts HP cycles
  always @(posedge clk) begin
    led_q <= ir_led;
    if (rst || !active || trigger) begin
      run <= 0;                       // phases cut by a burst edge are not measured
    end else begin
      if (ir_led != led_q) begin
        if (run != 0 && active) begin
          checks++; nhalf++;
          if (run != HP) begin failures++; $display("half period %0d", run); end
        end
        run <= 1;
      end else if (run != 0) run <= run + 1;
    end
  end

  task automatic fire_and_time(int expect_len);
    int len = 0;
    @(negedge clk); trigger = 1;
    @(negedge clk); trigger = 0;
    while (active) begin @(negedge clk); len++; end
    checks++;
    if (len != expect_len) begin failures++; $display("burst %0d cycles", len); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    repeat (5000) begin
      @(negedge clk);
      if (ir_led) begin failures++; $display("LED on while idle"); break; end
    end
    checks++;
    fire_and_time(BURST);
    repeat (3000) @(negedge clk);
    checks++;
    if (ir_led) begin failures++; $display("LED on after burst"); end
    // retrigger in the middle of a burst
    @(negedge clk); trigger = 1;
    @(negedge clk); trigger = 0;
    repeat (7000) @(negedge clk);
    fire_and_time(BURST);
    checks++;
    if (nhalf < 20) begin failures++; $display("only %0d carrier phases", nhalf); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
