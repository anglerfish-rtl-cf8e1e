// tb_lap_timer: self-checking test of the split-time recorder.
// With a 10-cycle tick and a 200-cycle gap filter, demodulated IR bursts
// (active low, with short drop-outs inside a burst) are applied at known
// times after start.  Each burst must raise new_lap once, and lap_bcd must hold
// the elapsed ticks since the previous split as BCD.  Drop-outs shorter than
// the gap must not count as new bursts.  Ten laps are timed, one of them long
// enough to carry through five BCD digits; the running time is checked in the
// middle of every lap, and new_lap must come a fixed three cycles after the
// receiver output goes active.
//
// The expected results are worked out here from the stimulus, independently
// of the design under test; the sizes and the stimulus are this test's own
// choices, the timings checked are the design's.
module tb_lap_timer;
  localparam int TICK = 10, GAP = 200;
  logic clk = 0, rst = 1, start = 0, ir_rx = 1;
  logic running, new_lap;
  logic [31:0] time_bcd, lap_bcd;
  logic [7:0] lap_count;
  int checks = 0, failures = 0, nlaps = 0;

  lap_timer #(.TICK_CYCLES(TICK), .GAP_CYCLES(GAP)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] to_bcd(int v);
    logic [31:0] r;
    for (int i = 0; i < 8; i++) begin r[4*i +: 4] = 4'(v % 10); v /= 10; end
    return r;
  endfunction

  always @(posedge clk) if (!rst && new_lap) nlaps++;

  int fall_cycle = 0, lat [$];
  task automatic burst();
    // 3 pieces separated by 20-cycle drop-outs, as a demodulator may give
    fall_cycle = cycle;
    repeat (3) begin
      ir_rx = 0; repeat (60) @(negedge clk);
      ir_rx = 1; repeat (20) @(negedge clk);
    end
  endtask

  int cycle = 0, last_split = 0, split_cycles [$];
  always @(posedge clk) begin
    cycle++;
    if (start) last_split = cycle;
    if (!rst && new_lap) begin
      split_cycles.push_back(cycle - last_split);
      lat.push_back(cycle - fall_cycle);
      last_split = cycle;
    end
  end

  initial begin
    int gaps [10];
    gaps = '{370, 12340, 250, 2600, 1234560, 999, 4321, 300, 77777, 1500};
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    for (int l = 0; l < 10; l++) begin
      int n0, t, e;
      repeat (gaps[l] / 2) @(negedge clk);
      // running time half-way through the lap: whole ticks since the split
      e = (cycle - last_split) / TICK;
      checks++;
      if (time_bcd !== to_bcd(e) && time_bcd !== to_bcd(e - 1)) begin
        failures++; $display("lap %0d: running time %h expected %h", l, time_bcd, to_bcd(e));
      end
      repeat (gaps[l] - gaps[l] / 2) @(negedge clk);
      n0 = nlaps;
      burst();
      repeat (GAP + 10) @(negedge clk);
      checks++;
      if (nlaps != n0 + 1) begin failures++; $display("lap %0d: %0d new_lap pulses", l, nlaps - n0); end
      else begin
        checks++;
        // ir_rx changes between edges; the first edge samples it, and new_lap
        // is registered three edges later (two synchroniser flops, one edge
        // register), so the testbench sees it at the fourth edge
        if (lat[l] != 4) begin failures++; $display("lap %0d: new_lap %0d cycles after the burst began", l, lat[l]); end
        // the recorded lap is the number of whole ticks between the two splits
        t = split_cycles[l] / TICK;
        checks++;
        if (lap_bcd !== to_bcd(t) && lap_bcd !== to_bcd(t - 1)) begin
          failures++; $display("lap %0d: %h expected %h", l, lap_bcd, to_bcd(t));
        end
      end
      checks++;
      if (lap_count != 8'(l + 1)) begin failures++; $display("lap count %0d", lap_count); end
    end
    checks++;
    if (!running) begin failures++; $display("timer stopped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
