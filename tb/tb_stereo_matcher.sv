// tb_stereo_matcher: self-checking test of the SSD disparity engine.
// A small stereo pair (10 lines of 24 pixels, 6x6 blocks) is built from random
// texture: the right image is the left image shifted left by a disparity that
// changes from band to band, plus noise; the last three lines are flat so that
// many offsets tie.  The engine's disparity map is
// compared pixel by pixel with a full-search SSD model written here (same
// block position, zero padding, ties to the smaller offset), and the frame
// must take exactly the cycle count the controller promises:
// 3 + sum over pixels of (22 * offsets + 1).  A second run with MAX_DISP = 5
// checks the limited search range.
//
// The expected results are worked out here from the stimulus, independently
// of the design under test; the sizes and the stimulus are this test's own
// choices, the timings checked are the design's.
module tb_stereo_matcher;
  localparam int N = 6, ROWS = 10, COLS = 24, WORDS = COLS / N;
  localparam int AW = $clog2(ROWS * WORDS), DAW = $clog2(ROWS * COLS);
  logic clk = 0, rst = 1;
  logic [7:0] limg [ROWS][COLS], rimg [ROWS][COLS];
  logic [7:0] dmap [2][ROWS*COLS];
  int checks = 0, failures = 0;

  // frame buffers loaded by the test
  logic we = 0;
  logic [AW-1:0] wa = '0;
  logic [N*8-1:0] wl = '0, wr = '0;

  logic start [2];
  logic busy [2], done [2];
  logic [AW-1:0] l_addr [2], r_addr [2];
  logic [N*8-1:0] l_data [2], r_data [2], ul [2], ur [2];
  logic disp_we [2];
  logic [DAW-1:0] disp_addr [2];
  logic [7:0] disp_data [2];
  anglerfish_pkg::stereo_state_t st [2];

  for (genvar g = 0; g < 2; g++) begin : g_dut
    stereo_matcher #(.N(N), .ROWS(ROWS), .COLS(COLS), .MAX_DISP(g == 0 ? COLS : 5)) dut (
      .clk, .rst, .start(start[g]), .busy(busy[g]), .done(done[g]),
      .l_addr(l_addr[g]), .l_data(l_data[g]), .r_addr(r_addr[g]), .r_data(r_data[g]),
      .disp_we(disp_we[g]), .disp_addr(disp_addr[g]), .disp_data(disp_data[g]), .state_o(st[g]));
    bram_dual_port #(.WIDTH(N*8), .DEPTH(ROWS*WORDS)) u_l (
      .clk, .a_we(we), .a_addr(wa), .a_din(wl), .a_dout(ul[g]),
      .b_we(1'b0), .b_addr(l_addr[g]), .b_din('0), .b_dout(l_data[g]));
    bram_dual_port #(.WIDTH(N*8), .DEPTH(ROWS*WORDS)) u_r (
      .clk, .a_we(we), .a_addr(wa), .a_din(wr), .a_dout(ur[g]),
      .b_we(1'b0), .b_addr(r_addr[g]), .b_din('0), .b_dout(r_data[g]));
    always @(posedge clk) if (disp_we[g]) dmap[g][disp_addr[g]] <= disp_data[g];
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int px(bit right, int r, int c);
    if (r >= ROWS || c >= COLS || c < 0) return 0;
    return right ? int'(rimg[r][c]) : int'(limg[r][c]);
  endfunction

  function automatic int ref_disp(int x, int y, int maxd);
    int best = -1, bd = 0;
    int dl = (x < maxd - 1) ? x : maxd - 1;
    for (int d = 0; d <= dl; d++) begin
      int s = 0;
      for (int r = 0; r < N; r++)
        for (int k = 0; k < N; k++) begin
          int e;
          e = px(0, y + r, x + k) - px(1, y + r, x - d + k);
          s += e * e;
        end
      if (best < 0 || s < best) begin best = s; bd = d; end
    end
    return bd;
  endfunction

  function automatic int expected_cycles(int maxd);
    int c = 3;
    for (int y = 0; y < ROWS; y++)
      for (int x = 0; x < COLS; x++) c += 22 * (((x < maxd - 1) ? x : maxd - 1) + 1) + 1;
    return c;
  endfunction

  int cyc [2];
  bit seen [2];
  initial begin
    start[0] = 0; start[1] = 0;
    for (int r = 0; r < ROWS; r++) begin
      int shift;
      shift = (r < 4) ? 3 : (r < 7) ? 7 : 1;
      for (int c = 0; c < COLS; c++) limg[r][c] = 8'($urandom);
      for (int c = 0; c < COLS; c++)
        rimg[r][c] = (c + shift < COLS) ? 8'(int'(limg[r][c + shift]) ^ ($urandom_range(0, 3)))
                                        : 8'($urandom);
      // the last lines are flat in both images: every offset gives the same
      // SSD there, so the tie rule alone decides the result
      if (r >= 7)
        for (int c = 0; c < COLS; c++) begin
          limg[r][c] = 8'd100;
          rimg[r][c] = 8'd100;
        end
    end
    repeat (3) @(posedge clk);
    rst = 0;
    for (int r = 0; r < ROWS; r++)
      for (int w = 0; w < WORDS; w++) begin
        @(negedge clk);
        we = 1; wa = AW'(r * WORDS + w);
        for (int k = 0; k < N; k++) begin
          wl[8*k +: 8] = limg[r][w*N + k];
          wr[8*k +: 8] = rimg[r][w*N + k];
        end
      end
    @(negedge clk); we = 0;
    start[0] = 1; start[1] = 1;
    @(negedge clk);
    start[0] = 0; start[1] = 0;
    cyc[0] = 1; cyc[1] = 1; seen[0] = 0; seen[1] = 0;
    while (!(seen[0] && seen[1])) begin
      for (int g = 0; g < 2; g++) begin
        if (done[g] && !seen[g]) begin
          seen[g] = 1;
          checks++;
          if (cyc[g] != expected_cycles(g == 0 ? COLS : 5)) begin
            failures++;
            $display("run %0d took %0d cycles, expected %0d", g, cyc[g], expected_cycles(g == 0 ? COLS : 5));
          end
        end
        if (!seen[g]) cyc[g]++;
      end
      @(negedge clk);
    end
    for (int g = 0; g < 2; g++)
      for (int y = 0; y < ROWS; y++)
        for (int x = 0; x < COLS; x++) begin
          int e;
          e = ref_disp(x, y, g == 0 ? COLS : 5);
          checks++;
          if (int'(dmap[g][y*COLS + x]) != e) begin
            failures++;
            $display("run %0d pixel (%0d,%0d): disparity %0d expected %0d", g, x, y, dmap[g][y*COLS + x], e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
