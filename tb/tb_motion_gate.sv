// tb_motion_gate: self-checking test of the peripheral lap detector.
// On an 8 x 32 frame, a random background is learned; then live frames show a
// bright 4 x 3 "swimmer" (plus single-pixel noise below the threshold) moving
// right, turning, moving left and turning again.  The centre of mass must
// equal the integer mean column of the changed pixels computed here, lap must
// pulse exactly on the two frames where the direction reverses, and a frame
// without a swimmer must give no centre of mass.
//
// The expected results are worked out here from the stimulus, independently
// of the design under test; the sizes and the stimulus are this test's own
// choices, the timings checked are the design's.
module tb_motion_gate;
  localparam int ROWS = 8, COLS = 32, TH = 40;
  logic clk = 0, rst = 1, learn = 1, pix_valid = 0, frame_end = 0;
  logic [7:0] pix = '0;
  logic [5:0] pix_x = '0;
  logic [3:0] pix_y = '0;
  logic com_valid, lap;
  logic [5:0] com_x;
  logic [1:0] direction;
  logic [7:0] bg [ROWS][COLS];
  int checks = 0, failures = 0, laps = 0, coms = 0;
  int last_com = -1;

  motion_gate #(.ROWS(ROWS), .COLS(COLS), .THRESH(TH), .MIN_PIXELS(6), .MIN_STEP(2)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (lap) laps++;
    if (com_valid) begin coms++; last_com = int'(com_x); end
  end

  // one frame; swimmer columns sx..sx+2 of rows 2..5 (sx < 0: no swimmer)
  task automatic frame(int sx, output int exp_com);
    int sum = 0, cnt = 0;
    for (int y = 0; y < ROWS; y++)
      for (int x = 0; x < COLS; x++) begin
        logic [7:0] p;
        if (learn) begin bg[y][x] = 8'($urandom_range(60, 190)); p = bg[y][x]; end
        else if (sx >= 0 && y >= 2 && y < 6 && x >= sx && x < sx + 3) begin
          p = (bg[y][x] > 128) ? bg[y][x] - 8'(TH + 20) : bg[y][x] + 8'(TH + 20);
          sum += x; cnt++;
        end else p = bg[y][x] + 8'($urandom_range(0, TH / 2));
        @(negedge clk);
        pix_valid = 1; pix = p; pix_x = 6'(x); pix_y = 4'(y);
        @(negedge clk);
        pix_valid = 0;
      end
    repeat (4) @(negedge clk);
    frame_end = 1;
    @(negedge clk);
    frame_end = 0;
    repeat (60) @(negedge clk);     // divider finishes
    exp_com = (cnt > 0) ? sum / cnt : -1;
  endtask

  initial begin
    int path [10] = '{4, 8, 12, 17, 22, 18, 13, 9, 10, 15};
    int lap_at [10] = '{0, 0, 0, 0, 0, 1, 0, 0, 0, 1};
    int e, n0, c0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    frame(-1, e);                       // learn the background
    learn = 0;
    c0 = coms;
    frame(-1, e);                       // empty pool: no centre of mass
    checks++;
    if (coms != c0) begin failures++; $display("centre of mass on an empty frame"); end
    for (int i = 0; i < 10; i++) begin
      n0 = laps; c0 = coms;
      frame(path[i], e);
      checks++;
      if (coms != c0 + 1 || last_com != e) begin
        failures++; $display("frame %0d: com %0d expected %0d", i, last_com, e);
      end
      checks++;
      if (laps - n0 != lap_at[i]) begin failures++; $display("frame %0d: %0d lap pulses", i, laps - n0); end
    end
    $display("laps=%0d", laps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
