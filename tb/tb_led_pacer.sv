// tb_led_pacer: self-checking test of the moving pacing target.
// A 4-IC strip is run for 14 refreshes.  Each refresh is decoded by a line
// monitor: exactly one IC must show the target colour, and its position must
// follow 0,1,2,3,2,1,0,1,... (forward to the far end, then back).  The latch time
// is checked both when latch_cycles is below the 5000-cycle minimum (clamped)
// and above it, and the step period must be NUM_ICS*6004 + latch + 3 cycles.
// Both direction changes (turn pulses) and both FORWARD and REVERSE states
// must be seen.
//
// The expected results are worked out here from the stimulus, independently
// of the design under test; the sizes and the stimulus are this test's own
// choices, the timings checked are the design's.
module tb_led_pacer;
  localparam int NI = 4;
  localparam logic [23:0] TGT = 24'h12_34_56;
  logic clk = 0, rst = 1, enable = 0;
  logic [31:0] latch_cycles = 32'd100;
  logic dout, reverse, turn;
  logic [1:0] target_pos;
  logic [2:0] state_o;
  int checks = 0, failures = 0;
  int turns = 0, n_fwd = 0, n_rev = 0, latch_len = 0, frames_checked = 0;
  int last_tx_start = -1, cycle = 0, want_latch = 5000;
  int latch_lens [$], periods [$];

  led_pacer #(.NUM_ICS(NI), .TARGET_RGB(TGT)) dut (.*);
  ws2811_line_monitor #(.LATCH_SEEN(3000)) mon (.clk, .rst, .din(dout));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [2:0] state_q = 3'd0;
  always @(posedge clk) begin
    cycle++;
    state_q <= state_o;
    if (!rst) begin
      if (turn) turns++;
      if (state_o == 3'd1 && state_q != 3'd1) n_fwd++;
      if (state_o == 3'd2 && state_q != 3'd2) n_rev++;
      if (state_o == 3'd3) latch_len++;
      if (state_o != 3'd3 && state_q == 3'd3) begin latch_lens.push_back(latch_len); latch_len = 0; end
      if (state_o == 3'd4 && state_q != 3'd4) begin
        if (last_tx_start >= 0) periods.push_back(cycle - last_tx_start);
        last_tx_start = cycle;
      end
    end
  end

  // check every decoded refresh
  int expected_pos [$] = '{0, 1, 2, 3, 2, 1, 0, 1, 2, 3, 2, 1, 0, 1};
  int frames_seen = 0;
  always @(posedge clk) begin
    if (mon.frames != frames_seen) begin
      int lit, where;
      frames_seen = mon.frames;
      lit = 0; where = -1;
      checks++;
      if (mon.frame_bits.size() != 24 * NI) begin
        failures++; $display("refresh with %0d bits", mon.frame_bits.size());
      end else begin
        for (int i = 0; i < NI; i++) begin
          logic [23:0] got;
          for (int k = 0; k < 24; k++) got[23 - k] = mon.frame_bits[24*i + k];
          if (got == TGT) begin lit++; where = i; end
          else if (got != 0) begin failures++; $display("IC %0d shows %h", i, got); end
        end
        checks++;
        if (lit != 1 || where != expected_pos[frames_checked]) begin
          failures++; $display("refresh %0d: target at %0d (%0d lit), expected %0d",
                               frames_checked, where, lit, expected_pos[frames_checked]);
        end
      end
      frames_checked++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0; enable = 1;
    wait (frames_checked == 6);
    @(negedge clk); latch_cycles = 32'd7000;
    wait (frames_checked == 14);
    @(negedge clk); enable = 0;
    repeat (20000) @(negedge clk);
    checks++;
    if (state_o != 3'd0) begin failures++; $display("did not stop"); end
    // latch lengths: the first ones clamped to 5000, later 7000
    foreach (latch_lens[i]) begin
      checks++;
      if (latch_lens[i] != 5000 && latch_lens[i] != 7000) begin failures++; $display("latch %0d cycles", latch_lens[i]); end
    end
    checks++;
    if (latch_lens[0] != 5000 || latch_lens[latch_lens.size() - 1] != 7000) begin failures++; $display("latch not updated"); end
    foreach (periods[i]) begin
      checks++;
      if (periods[i] != NI * 6004 + latch_lens[i] + 3) begin
        failures++; $display("step %0d took %0d cycles with latch %0d", i, periods[i], latch_lens[i]);
      end
    end
    checks++;
    if (turns < 3 || n_fwd == 0 || n_rev == 0) begin failures++; $display("turns %0d fwd %0d rev %0d", turns, n_fwd, n_rev); end
    checks++;
    if (mon.errors != 0) begin failures++; $display("%0d timing errors", mon.errors); end
    $display("turns=%0d forward=%0d reverse=%0d refreshes=%0d", turns, n_fwd, n_rev, frames_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
