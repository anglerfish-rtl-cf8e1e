// anglerfish_top: the Anglerfish swim pacer, central and peripheral units.
//
// Central unit (the FPGA at the near end of the pool):
//   * two camera_capture blocks take one frame each from the left and right
//     cameras into two dual-port frame buffers (12800 words of six pixels);
//     both cameras get the same clock, cam_xclk (clk/4 = 25 MHz);
//   * when both frames are in, stereo_matcher computes the disparity of every
//     pixel by 6x6 SSD block matching and writes it to the 76800-entry
//     disparity memory;
//   * bram_uart_readout copies the disparity memory to a computer over uart_tx
//     while dump_en is high and the matcher is idle;
//   * led_pacer drives the WS2811 strip with a moving target; its latch time,
//     and so its speed, is LATCH_MIN + sw_speed * LATCH_STEP cycles;
//   * lap_timer takes the demodulated IR receiver output and shows the last
//     lap time on the seven-segment display;
//   * sw_cam_sel picks which camera's pixel stream goes to the display output
//     (view_*), meant for an HDMI encoder outside this design.
// Peripheral unit (the FPGA at the far wall), side by side with its own ports:
//   camera_capture in stream mode feeds motion_gate, which learns the empty
//   pool while p_sw0 is low and, with p_sw0 high, pulses a lap when the
//   swimmer's centre of mass turns around; ir_burst_tx then flashes the IR LED
//   with a 38 kHz burst.  The IR light path and the receiver/demodulator are
//   outside the design: p_ir_led and ir_rx are separate ports.
//
// Control: capture_start (pulse) arms both cameras for their next frame; the
// matcher starts by itself when both have been written.  A new capture is
// refused while the matcher or the readout is busy.  The disparity memory has
// one port: the matcher owns it while busy, the readout otherwise.
// All logic runs on one 100 MHz clock with a synchronous active-high reset.
module anglerfish_top #(
  parameter int unsigned N            = 6,
  parameter int unsigned ROWS         = 320,
  parameter int unsigned COLS         = 240,
  parameter int unsigned MAX_DISP     = COLS,
  parameter int unsigned CLKS_PER_BIT = 868,
  parameter int unsigned NUM_ICS      = 100,
  parameter int unsigned LATCH_MIN    = 5000,
  parameter int unsigned LATCH_STEP   = 500_000,
  parameter int unsigned TICK_CYCLES  = 1_000_000,
  parameter int unsigned GAP_CYCLES   = 10_000_000,
  parameter int unsigned REFRESH      = 100_000,
  parameter int unsigned IR_HALF      = 1316,
  parameter int unsigned IR_BURST     = 2_000_000,
  parameter int unsigned MG_THRESH    = 40,
  parameter int unsigned MG_MIN_PIX   = 64,
  parameter int unsigned MG_MIN_STEP  = 2,
  parameter int unsigned T0H          = 50,
  parameter int unsigned T0L          = 200,
  parameter int unsigned T1H          = 120,
  parameter int unsigned T1L          = 130,
  // derived sizes
  parameter int unsigned WORDS        = COLS / N,
  parameter int unsigned FAW          = $clog2(ROWS * WORDS),
  parameter int unsigned DAW          = $clog2(ROWS * COLS),
  parameter int unsigned XW           = $clog2(COLS + 1),
  parameter int unsigned YW           = $clog2(ROWS + 1),
  parameter int unsigned IW           = $clog2(NUM_ICS)
) (
  input  logic           clk,
  input  logic           rst,
  // ---------------- central unit ----------------
  output logic           cam_xclk,
  input  logic           cam0_pclk, cam0_href, cam0_vsync,
  input  logic [7:0]     cam0_data,
  input  logic           cam1_pclk, cam1_href, cam1_vsync,
  input  logic [7:0]     cam1_data,
  input  logic           capture_start,
  input  logic           dump_en,
  input  logic           sw_cam_sel,
  input  logic           pacer_en,
  input  logic [3:0]     sw_speed,
  input  logic           lap_start,
  input  logic           ir_rx,
  output logic           stereo_busy,
  output logic           stereo_done,
  output logic           uart_txd,
  output logic           dump_done,
  output logic           led_dout,
  output logic [IW-1:0]  target_pos,
  output logic           target_reverse,
  output logic [7:0]     seg_an,
  output logic [6:0]     seg_cat,
  output logic           seg_dp,
  output logic [7:0]     lap_count,
  output logic [31:0]    lap_bcd,
  output logic           view_valid,
  output logic [7:0]     view_pix,
  output logic [XW-1:0]  view_x,
  output logic [YW-1:0]  view_y,
  // ---------------- peripheral unit ----------------
  input  logic           p_cam_pclk, p_cam_href, p_cam_vsync,
  input  logic [7:0]     p_cam_data,
  input  logic           p_sw0,
  output logic           p_ir_led,
  output logic           p_lap,
  output logic [XW-1:0]  p_com_x,
  output logic           p_com_valid
);
  // ---- shared camera clock (25 MHz) ----
  logic [1:0] xclk_div;
  always_ff @(posedge clk) begin
    if (rst) xclk_div <= '0;
    else     xclk_div <= xclk_div + 1'b1;
  end
  assign cam_xclk = xclk_div[1];

  // ---- camera capture into the frame buffers ----
  logic            arm, cap_busy [2], cap_done [2], got [2];
  logic            pv [2];
  logic [7:0]      pp [2];
  logic [XW-1:0]   px [2];
  logic [YW-1:0]   py [2];
  logic            fb_we [2];
  logic [FAW-1:0]  fb_waddr [2];
  logic [N*8-1:0]  fb_wdata [2];
  logic            readout_busy, stereo_start;

  assign arm = capture_start && !stereo_busy && !readout_busy && !cap_busy[0] && !cap_busy[1];

  camera_capture #(.N(N), .ROWS(ROWS), .COLS(COLS)) u_cap_left (
    .clk, .rst, .cam_pclk(cam0_pclk), .cam_href(cam0_href), .cam_vsync(cam0_vsync),
    .cam_data(cam0_data), .arm, .capturing(cap_busy[0]), .frame_done(cap_done[0]),
    .pix_valid(pv[0]), .pix(pp[0]), .pix_x(px[0]), .pix_y(py[0]),
    .frame_start(), .frame_end(),
    .fb_we(fb_we[0]), .fb_addr(fb_waddr[0]), .fb_data(fb_wdata[0]));

  camera_capture #(.N(N), .ROWS(ROWS), .COLS(COLS)) u_cap_right (
    .clk, .rst, .cam_pclk(cam1_pclk), .cam_href(cam1_href), .cam_vsync(cam1_vsync),
    .cam_data(cam1_data), .arm, .capturing(cap_busy[1]), .frame_done(cap_done[1]),
    .pix_valid(pv[1]), .pix(pp[1]), .pix_x(px[1]), .pix_y(py[1]),
    .frame_start(), .frame_end(),
    .fb_we(fb_we[1]), .fb_addr(fb_waddr[1]), .fb_data(fb_wdata[1]));

  // both frames written -> start the matcher
  always_ff @(posedge clk) begin
    if (rst || arm) begin
      got[0] <= 1'b0;
      got[1] <= 1'b0;
    end else if (stereo_start) begin
      got[0] <= 1'b0;
      got[1] <= 1'b0;
    end else begin
      if (cap_done[0]) got[0] <= 1'b1;
      if (cap_done[1]) got[1] <= 1'b1;
    end
  end
  assign stereo_start = got[0] && got[1];

  // display stream: camera chosen by the switch
  always_comb begin
    view_valid = sw_cam_sel ? pv[1] : pv[0];
    view_pix   = sw_cam_sel ? pp[1] : pp[0];
    view_x     = sw_cam_sel ? px[1] : px[0];
    view_y     = sw_cam_sel ? py[1] : py[0];
  end

  // ---- frame buffers ----
  logic [FAW-1:0] l_raddr, r_raddr;
  logic [N*8-1:0] l_rdata, r_rdata;

  bram_dual_port #(.WIDTH(N*8), .DEPTH(ROWS*WORDS)) u_fb_left (
    .clk, .a_we(fb_we[0]), .a_addr(fb_waddr[0]), .a_din(fb_wdata[0]), .a_dout(),
    .b_we(1'b0), .b_addr(l_raddr), .b_din('0), .b_dout(l_rdata));

  bram_dual_port #(.WIDTH(N*8), .DEPTH(ROWS*WORDS)) u_fb_right (
    .clk, .a_we(fb_we[1]), .a_addr(fb_waddr[1]), .a_din(fb_wdata[1]), .a_dout(),
    .b_we(1'b0), .b_addr(r_raddr), .b_din('0), .b_dout(r_rdata));

  // ---- stereo matcher and disparity memory ----
  logic           disp_we;
  logic [DAW-1:0] disp_waddr, ro_addr, disp_addr;
  logic [7:0]     disp_wdata, disp_rdata;

  stereo_matcher #(.N(N), .ROWS(ROWS), .COLS(COLS), .MAX_DISP(MAX_DISP)) u_stereo (
    .clk, .rst, .start(stereo_start), .busy(stereo_busy), .done(stereo_done),
    .l_addr(l_raddr), .l_data(l_rdata), .r_addr(r_raddr), .r_data(r_rdata),
    .disp_we, .disp_addr(disp_waddr), .disp_data(disp_wdata), .state_o());

  assign disp_addr = stereo_busy ? disp_waddr : ro_addr;

  bram_single_port #(.WIDTH(8), .DEPTH(ROWS*COLS)) u_disparity (
    .clk, .we(disp_we), .addr(disp_addr), .din(disp_wdata), .dout(disp_rdata));

  bram_uart_readout #(.DATA_W(8), .DEPTH(ROWS*COLS), .CLKS_PER_BIT(CLKS_PER_BIT)) u_readout (
    .clk, .rst, .en(dump_en && !stereo_busy && !stereo_start), .mem_addr(ro_addr), .mem_data(disp_rdata),
    .tx(uart_txd), .busy(readout_busy), .sent_all(dump_done));

  // ---- LED pacing target ----
  logic [31:0] latch_cycles;
  assign latch_cycles = 32'(LATCH_MIN) + 32'(sw_speed) * 32'(LATCH_STEP);

  led_pacer #(.NUM_ICS(NUM_ICS), .LATCH_MIN(LATCH_MIN),
              .T0H(T0H), .T0L(T0L), .T1H(T1H), .T1L(T1L)) u_pacer (
    .clk, .rst, .enable(pacer_en), .latch_cycles, .dout(led_dout),
    .target_pos, .reverse(target_reverse), .turn(), .state_o());

  // ---- split times ----
  lap_timer #(.TICK_CYCLES(TICK_CYCLES), .GAP_CYCLES(GAP_CYCLES)) u_lap (
    .clk, .rst, .start(lap_start), .ir_rx, .running(), .time_bcd(),
    .lap_bcd, .lap_count, .new_lap());

  seven_seg_driver #(.REFRESH_CYCLES(REFRESH)) u_seg (
    .clk, .rst, .value_bcd(lap_bcd), .an(seg_an), .seg(seg_cat), .dp_n(seg_dp));

  // ---- peripheral unit: motion gate and IR transmitter ----
  logic          p_pv, p_fend;
  logic [7:0]    p_pp;
  logic [XW-1:0] p_px;
  logic [YW-1:0] p_py;

  camera_capture #(.N(N), .ROWS(ROWS), .COLS(COLS)) u_p_cap (
    .clk, .rst, .cam_pclk(p_cam_pclk), .cam_href(p_cam_href), .cam_vsync(p_cam_vsync),
    .cam_data(p_cam_data), .arm(1'b0), .capturing(), .frame_done(),
    .pix_valid(p_pv), .pix(p_pp), .pix_x(p_px), .pix_y(p_py),
    .frame_start(), .frame_end(p_fend), .fb_we(), .fb_addr(), .fb_data());

  motion_gate #(.ROWS(ROWS), .COLS(COLS), .THRESH(MG_THRESH),
                .MIN_PIXELS(MG_MIN_PIX), .MIN_STEP(MG_MIN_STEP)) u_gate (
    .clk, .rst, .learn(!p_sw0), .pix_valid(p_pv), .pix(p_pp), .pix_x(p_px), .pix_y(p_py),
    .frame_end(p_fend), .com_valid(p_com_valid), .com_x(p_com_x), .direction(), .lap(p_lap));

  ir_burst_tx #(.HALF_PERIOD(IR_HALF), .BURST_CYCLES(IR_BURST)) u_ir (
    .clk, .rst, .trigger(p_lap), .ir_led(p_ir_led), .active());
endmodule
