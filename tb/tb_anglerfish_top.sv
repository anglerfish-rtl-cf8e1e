// tb_anglerfish_top: end-to-end test of the Anglerfish design at reduced sizes (12 lines of 24 pixels, 4 LED ICs, fast UART and timers).
//
// Camera models send a textured stereo pair (the right image is the left one
// shifted by a per-line disparity) and, for the peripheral unit, an empty pool
// followed by a swimmer that swims to the far side and back.  The test
//   * captures one frame from each camera and lets the matcher run; every
//     disparity (all 288 of them) is compared with a full-search SSD model written
//     here, and the matcher's busy time with its cycle formula;
//   * dumps the disparity memory over the UART and decodes the whole map;
//   * decodes every WS2811 refresh: one lit IC moving 0,1,..,end,..,1,0,...
//     and the refresh period NUM_ICS*6004 + latch + 3 for two speed settings;
//   * checks the display stream for both settings of the camera switch;
//   * has the peripheral motion gate detect the turns, sends the IR bursts
//     through a receiver model into the lap timer, and checks the lap count,
//     the lap times and the seven-segment digits.
// Each mechanism is counted and one that never happens is a failure.
//
// The expected results are worked out here from the stimulus, independently
// of the design under test; the sizes and the stimulus are this test's own
// choices, the timings checked are the design's.
module tb_anglerfish_top;
  localparam int N = 6, ROWS = 12, COLS = 24, WORDS = COLS / N;
  localparam int NUM_ICS = 4, LATCH_MIN = 5000, LATCH_STEP = 1000;
  localparam int CPB = 8, TICK = 100;
  localparam int DUMP_BYTES = ROWS * COLS;
  localparam int PACER_STEPS = 10;
  localparam int SW = 3, SH = 4;          // swimmer size in pixels
  localparam int PATH_LEN = 10;
  localparam int XW = $clog2(COLS + 1), YW = $clog2(ROWS + 1), IW = $clog2(NUM_ICS);

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  // ---------------- stimulus ----------------
  function automatic logic [7:0] tex(int r, int c);
    int unsigned v;
    v = (r * 73856093) ^ (c * 19349663) ^ 32'h2545F491;
    v = v ^ (v >> 13);
    v = v * 32'h5BD1E995;
    v = v ^ (v >> 15);
    return v[7:0];
  endfunction
  function automatic int shift_of(int r);
    return (r % 5) + 1;
  endfunction
  function automatic logic [7:0] left_px(int r, int c);
    return tex(r, c);
  endfunction
  function automatic logic [7:0] right_px(int r, int c);
    return (c + shift_of(r) < COLS) ? tex(r, c + shift_of(r)) : tex(r + 5000, c);
  endfunction
  function automatic logic [7:0] bg_px(int r, int c);
    return 8'(100 + int'(tex(r + 9000, c)) % 40);
  endfunction
  function automatic int swimmer_col(int k);     // k-th frame after learning
    int path [10] = '{2, 5, 8, 11, 14, 11, 8, 5, 8, 11};
    return (k < 10) ? path[k] : path[9];
  endfunction

  // camera models
  logic c0_pclk, c0_href, c0_vsync, c1_pclk, c1_href, c1_vsync, p_pclk, p_href, p_vsync;
  logic [7:0] c0_data, c1_data, p_data, c0_pix, c1_pix, p_pix;
  int c0_f, c0_r, c0_c, c1_f, c1_r, c1_c, p_f, p_r, p_c;
  int learn_frames = 2;
  logic p_sw0 = 0;
  assign c0_pix = left_px(c0_r, c0_c);
  assign c1_pix = right_px(c1_r, c1_c);
  always_comb begin
    int sx;
    sx = (p_f >= learn_frames) ? swimmer_col(p_f - learn_frames) : -1;
    p_pix = bg_px(p_r, p_c);
    if (sx >= 0 && p_c >= sx && p_c < sx + SW && p_r >= ROWS / 3 && p_r < ROWS / 3 + SH)
      p_pix = bg_px(p_r, p_c) + 8'd80;
  end

  ov7670_model #(.ROWS(ROWS), .COLS(COLS), .PHASE(3ns)) cam0 (
    .pclk(c0_pclk), .href(c0_href), .vsync(c0_vsync), .data(c0_data),
    .frame_no(c0_f), .row(c0_r), .col(c0_c), .pix(c0_pix));
  ov7670_model #(.ROWS(ROWS), .COLS(COLS), .PHASE(11ns)) cam1 (
    .pclk(c1_pclk), .href(c1_href), .vsync(c1_vsync), .data(c1_data),
    .frame_no(c1_f), .row(c1_r), .col(c1_c), .pix(c1_pix));
  ov7670_model #(.ROWS(ROWS), .COLS(COLS), .PHASE(7ns)) camp (
    .pclk(p_pclk), .href(p_href), .vsync(p_vsync), .data(p_data),
    .frame_no(p_f), .row(p_r), .col(p_c), .pix(p_pix));

  // ---------------- design ----------------
  logic cam_xclk, capture_start = 0, dump_en = 0, sw_cam_sel = 0, pacer_en = 0, lap_start = 0;
  logic [3:0] sw_speed = 4'd0;
  logic ir_rx, stereo_busy, stereo_done, uart_txd, dump_done, led_dout, target_reverse;
  logic [IW-1:0] target_pos;
  logic [7:0] seg_an, lap_count;
  logic [6:0] seg_cat;
  logic seg_dp, view_valid, p_ir_led, p_lap, p_com_valid;
  logic [31:0] lap_bcd;
  logic [7:0] view_pix;
  logic [XW-1:0] view_x, p_com_x;
  logic [YW-1:0] view_y;

  anglerfish_top #(.ROWS(ROWS), .COLS(COLS), .CLKS_PER_BIT(CPB), .NUM_ICS(NUM_ICS), .LATCH_STEP(LATCH_STEP),
                   .TICK_CYCLES(TICK), .GAP_CYCLES(2000), .REFRESH(8), .IR_HALF(20), .IR_BURST(400),
                   .MG_MIN_PIX(6)) dut (
    .clk, .rst, .cam_xclk,
    .cam0_pclk(c0_pclk), .cam0_href(c0_href), .cam0_vsync(c0_vsync), .cam0_data(c0_data),
    .cam1_pclk(c1_pclk), .cam1_href(c1_href), .cam1_vsync(c1_vsync), .cam1_data(c1_data),
    .capture_start, .dump_en, .sw_cam_sel, .pacer_en, .sw_speed, .lap_start, .ir_rx,
    .stereo_busy, .stereo_done, .uart_txd, .dump_done, .led_dout, .target_pos, .target_reverse,
    .seg_an, .seg_cat, .seg_dp, .lap_count, .lap_bcd,
    .view_valid, .view_pix, .view_x, .view_y,
    .p_cam_pclk(p_pclk), .p_cam_href(p_href), .p_cam_vsync(p_vsync), .p_cam_data(p_data),
    .p_sw0, .p_ir_led, .p_lap, .p_com_x, .p_com_valid);

  ir_receiver_model #(.HOLD(100)) u_irrx (.clk, .ir_light(p_ir_led), .out_n(ir_rx));
  ws2811_line_monitor #(.LATCH_SEEN(3000)) mon (.clk, .rst, .din(led_dout));

  // ---------------- bookkeeping ----------------
  int checks = 0, failures = 0, cycle = 0;
  int n_capture = 0, n_stereo = 0, n_best_update = 0, n_straddle = 0, n_edge = 0;
  int n_uart = 0, n_refresh = 0, n_fwd_turn = 0, n_rev_turn = 0, n_view0 = 0, n_view1 = 0;
  int n_plap = 0, n_clap = 0, n_seg = 0, busy_cycles = 0;
  int plap_cycle [$];
  logic rev_q = 0;

  always @(posedge clk) begin
    cycle++;
    if (!rst) begin
      if (dut.cap_done[0]) n_capture++;
      if (dut.cap_done[1]) n_capture++;
      if (stereo_busy) busy_cycles++;
      if (stereo_done) n_stereo++;
      if (dut.u_stereo.state == anglerfish_pkg::ST_UPDATE_DISPARITY &&
          dut.u_stereo.ssd_q < dut.u_stereo.best && dut.u_stereo.d != 0) n_best_update++;
      if (dut.u_stereo.fetch_start && (int'(dut.u_stereo.x - dut.u_stereo.d) % N) != 0) n_straddle++;
      if (dut.u_stereo.fetch_start && int'(dut.u_stereo.x) > COLS - N) n_edge++;
      rev_q <= target_reverse;
      if (target_reverse && !rev_q) n_fwd_turn++;
      if (!target_reverse && rev_q) n_rev_turn++;
      if (p_lap) begin n_plap++; plap_cycle.push_back(cycle); end
      if (dut.u_lap.new_lap) n_clap++;
      if (view_valid) begin
        logic [7:0] e;
        e = sw_cam_sel ? right_px(int'(view_y), int'(view_x)) : left_px(int'(view_y), int'(view_x));
        if (sw_cam_sel) n_view1++; else n_view0++;
        if (view_pix !== e) begin
          failures++;
          if (failures < 10) $display("view (%0d,%0d) cam %0d: %h expected %h", view_x, view_y, sw_cam_sel, view_pix, e);
        end
      end
    end
  end

  // seven-segment check: the lit digit shows the matching digit of lap_bcd
  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};
  function automatic logic [6:0] pattern(int d);
    logic [6:0] p = '0;
    for (int i = 0; i < lit[d].len(); i++) p[lit[d][i] - "a"] = 1'b1;
    return p;
  endfunction
  always @(negedge clk) begin
    if (!rst && n_clap > 0 && (cycle % 997) == 0) begin
      int dig;
      dig = -1;
      for (int i = 0; i < 8; i++) if (!seg_an[i]) dig = i;
      checks++; n_seg++;
      if (dig < 0 || ~seg_cat !== pattern(int'(lap_bcd[4*dig +: 4]))) begin
        failures++; $display("seven-segment digit %0d shows %b for %h", dig, seg_cat, lap_bcd);
      end
    end
  end

  // UART receiver
  logic [7:0] rx_bytes [$];
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge uart_txd);
      if (rst) continue;
      repeat (CPB / 2) @(posedge clk);
      for (int k = 0; k < 8; k++) begin
        repeat (CPB) @(posedge clk);
        b[k] = uart_txd;
      end
      repeat (CPB) @(posedge clk);
      rx_bytes.push_back(b);
      n_uart++;
    end
  end

  // reference disparity
  function automatic int px_l(int r, int c);
    return (r < ROWS && c < COLS) ? int'(left_px(r, c)) : 0;
  endfunction
  function automatic int px_r(int r, int c);
    return (r < ROWS && c < COLS) ? int'(right_px(r, c)) : 0;
  endfunction
  logic [7:0] lrow [ROWS + N][COLS + N], rrow [ROWS + N][COLS + N];
  function automatic int ref_disp(int x, int y);
    int best = -1, bd = 0;
    for (int d = 0; d <= x; d++) begin
      int s = 0;
      for (int r = 0; r < N; r++)
        for (int k = 0; k < N; k++) begin
          int e;
          e = int'(lrow[y + r][x + k]) - int'(rrow[y + r][x - d + k]);
          s += e * e;
        end
      if (best < 0 || s < best) begin best = s; bd = d; end
    end
    return bd;
  endfunction

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog: capture=%0d stereo=%0d uart=%0d refresh=%0d plap=%0d clap=%0d",
             n_capture, n_stereo, n_uart, n_refresh, n_plap, n_clap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pacer check: every decoded refresh
  int exp_pos = 0, exp_dir = 1, refresh_seen = 0;
  int latch_of [$];
  always @(posedge clk) begin
    if (mon.frames != refresh_seen) begin
      int lit_n, where;
      refresh_seen = mon.frames;
      lit_n = 0; where = -1;
      checks++;
      if (mon.frame_bits.size() != 24 * NUM_ICS) begin
        failures++; $display("refresh with %0d bits", mon.frame_bits.size());
      end else begin
        for (int i = 0; i < NUM_ICS; i++) begin
          logic [23:0] got;
          for (int k = 0; k < 24; k++) got[23 - k] = mon.frame_bits[24*i + k];
          if (got == 24'hFFFFFF) begin lit_n++; where = i; end
          else if (got != 0) begin failures++; $display("IC %0d shows %h", i, got); end
        end
        checks++;
        if (lit_n != 1 || where != exp_pos) begin
          failures++; $display("refresh %0d: target at %0d, expected %0d", n_refresh, where, exp_pos);
        end
      end
      n_refresh++;
      if (exp_dir > 0 && exp_pos == NUM_ICS - 1) exp_dir = -1;
      else if (exp_dir < 0 && exp_pos == 0) exp_dir = 1;
      exp_pos += exp_dir;
      latch_of.push_back(LATCH_MIN + int'(sw_speed) * LATCH_STEP);
    end
  end

  initial begin
    int e;
    for (int r = 0; r < ROWS + N; r++)
      for (int c = 0; c < COLS + N; c++) begin
        lrow[r][c] = 8'(px_l(r, c));
        rrow[r][c] = 8'(px_r(r, c));
      end
    repeat (5) @(posedge clk);
    @(negedge clk); rst = 0;
    pacer_en = 1;
    repeat (4000) @(negedge clk);      // let reset-time activity on the IR link die out
    lap_start = 1;
    @(negedge clk); lap_start = 0;
    // learn the empty pool for the first frames, then watch
    fork
      begin
        wait (p_f == learn_frames - 1);
        @(posedge p_vsync);
        p_sw0 = 1;
      end
    join_none
    // capture one stereo pair
    @(negedge clk); capture_start = 1;
    @(negedge clk); capture_start = 0;
    wait (n_stereo == 1);
    checks++;
    if (busy_cycles != 79491 - 1) begin
      failures++; $display("matcher busy %0d cycles, expected %0d", busy_cycles, 79491 - 1);
    end
    sw_cam_sel = 1;
    // dump and check the disparity map
    @(negedge clk); dump_en = 1;
    wait (n_uart >= DUMP_BYTES);
    repeat (CPB * 12) @(negedge clk);
    for (int y = 0; y < ROWS; y++)
      for (int x = 0; x < COLS; x++) begin
        e = ref_disp(x, y);
        checks++;
        if (int'(dut.u_disparity.mem[y * COLS + x]) != e) begin
          failures++;
          if (failures < 20) $display("pixel (%0d,%0d): disparity %0d expected %0d", x, y, dut.u_disparity.mem[y * COLS + x], e);
        end
        if (y * COLS + x < DUMP_BYTES) begin
          checks++;
          if (int'(rx_bytes[y * COLS + x]) != e) begin failures++; $display("UART byte %0d: %0d expected %0d", y * COLS + x, rx_bytes[y * COLS + x], e); end
        end
      end
    // second pacer speed
    sw_speed = 4'd3;
    wait (n_refresh >= PACER_STEPS && p_f >= learn_frames + PATH_LEN);
    repeat (3000) @(negedge clk);
    // refresh periods
    for (int i = 0; i + 1 < mon.starts.size(); i++) begin
      checks++;
      if (mon.starts[i + 1] - mon.starts[i] != NUM_ICS * 6004 + latch_of[i] + 3 &&
          mon.starts[i + 1] - mon.starts[i] != NUM_ICS * 6004 + LATCH_MIN + 3 * LATCH_STEP + 3) begin
        failures++; $display("refresh %0d period %0d", i, mon.starts[i + 1] - mon.starts[i]);
      end
    end
    checks++;
    if (mon.errors != 0) begin failures++; $display("%0d WS2811 timing errors", mon.errors); end
    // laps: every peripheral lap reaches the lap timer
    checks++;
    if (n_clap != n_plap || int'(lap_count) != n_plap) begin
      failures++; $display("peripheral laps %0d, central laps %0d (count %0d)", n_plap, n_clap, lap_count);
    end
    if (n_plap >= 2) begin
      int t;
      t = (plap_cycle[n_plap - 1] - plap_cycle[n_plap - 2]) / TICK;
      checks++;
      if (int'(lap_bcd[3:0]) + 10 * int'(lap_bcd[7:4]) + 100 * int'(lap_bcd[11:8]) + 1000 * int'(lap_bcd[15:12]) +
          10000 * int'(lap_bcd[19:16]) < t - 1 ||
          int'(lap_bcd[3:0]) + 10 * int'(lap_bcd[7:4]) + 100 * int'(lap_bcd[11:8]) + 1000 * int'(lap_bcd[15:12]) +
          10000 * int'(lap_bcd[19:16]) > t + 1) begin
        failures++; $display("last lap %h, expected about %0d ticks", lap_bcd, t);
      end
    end
    // every mechanism must have happened
    begin
      int counts [15];
      string names [15];
      counts = '{n_capture, n_stereo, n_best_update, n_straddle, n_edge, n_uart, n_refresh,
                          n_fwd_turn, n_rev_turn, n_view0, n_view1, n_plap, n_clap, n_seg, int'(dump_done || DUMP_BYTES < ROWS * COLS)};
      names = '{"frame captures", "stereo frames", "disparity updates", "straddling blocks",
                            "right-edge blocks", "UART bytes", "LED refreshes", "far-end turns",
                            "near-end turns", "camera 0 view", "camera 1 view", "peripheral laps",
                            "central laps", "seven-segment samples", "complete dump"};
      for (int i = 0; i < 15; i++) begin
        $display("%s: %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin failures++; $display("  never happened"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
