// anglerfish_pkg: constants and types shared by the Anglerfish swim-pacer RTL.
//
// The numbers follow the prototype: a 100 MHz system clock, 8-bit grey pixels,
// 6x6 SSD blocks, frames stored as 320 lines of 240 pixels (40 words of six
// pixels per line), a 76800-entry disparity memory of 8-bit disparities, and the
// WS2811 "typical" bit timings converted to 10 ns cycles.  The UART baud rate,
// the number of WS2811 ICs on the strip and the lap-timer resolution are this
// design's own choices, as the prototype does not state them.
package anglerfish_pkg;

  // System clock
  localparam int unsigned CLK_HZ       = 100_000_000;

  // Stereo image geometry
  localparam int unsigned PIX_W        = 8;     // bits per pixel
  localparam int unsigned BLOCK_N      = 6;     // SSD block is BLOCK_N x BLOCK_N
  localparam int unsigned FRAME_ROWS   = 320;   // lines per stored frame
  localparam int unsigned FRAME_COLS   = 240;   // pixels per stored line
  localparam int unsigned DISP_W       = 8;     // disparity word width (max 239)

  // WS2811 symbol timings in 10 ns cycles (typical column of the timing table)
  localparam int unsigned WS_T0H       = 50;    //  500 ns
  localparam int unsigned WS_T0L       = 200;   // 2000 ns
  localparam int unsigned WS_T1H       = 120;   // 1200 ns
  localparam int unsigned WS_T1L       = 130;   // 1300 ns
  localparam int unsigned WS_LATCH_MIN = 5000;  // 50 us reset/latch
  localparam int unsigned WS_NUM_ICS   = 100;   // ICs on the 5 m strip (assumed)

  // UART (assumed 115200 baud, 8N1)
  localparam int unsigned UART_CLKS_PER_BIT = CLK_HZ / 115_200;

  // Infra-red link: 38 kHz carrier
  localparam int unsigned IR_HALF_PERIOD = CLK_HZ / (2 * 38_000);

  // Major FSM of the stereo matcher
  typedef enum logic [2:0] {
    ST_IDLE, ST_NEW_FRAME, ST_UPDATE_CENTERS, ST_UPDATE_BUFFERS,
    ST_CALCULATE, ST_UPDATE_DISPARITY, ST_SAVE
  } stereo_state_t;

  // One 24-bit WS2811 colour packet, sent R7..R0, G7..G0, B7..B0
  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

endpackage
