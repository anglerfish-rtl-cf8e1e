// tb_camera_capture: self-checking test of the camera interface.
// A camera model drives pixel clock (80 ns period), href, vsync and data for
// frames of 4 lines of 12 pixels (plus two extra pixels per line and one extra
// line that must be dropped).  The first frame arrives before arm and must not
// be written; the second is written.  Every frame-buffer write (address and six
// packed pixels) and every pixel of the stream is compared with the frame the
// model sent, and frame_done must pulse once.
//
// The expected results are worked out here from the stimulus, independently
// of the design under test; the sizes and the stimulus are this test's own
// choices, the timings checked are the design's.
module tb_camera_capture;
  localparam int N = 6, ROWS = 4, COLS = 12, WORDS = COLS / N;
  localparam int AW = $clog2(ROWS * WORDS);
  logic clk = 0, rst = 1;
  logic cam_pclk = 0, cam_href = 0, cam_vsync = 1;
  logic [7:0] cam_data = '0;
  logic arm = 0, capturing, frame_done, pix_valid, frame_start, frame_end;
  logic [7:0] pix;
  logic [3:0] pix_x;
  logic [2:0] pix_y;
  logic fb_we;
  logic [AW-1:0] fb_addr;
  logic [N*8-1:0] fb_data;
  logic [7:0] img [ROWS+1][COLS+2];
  int checks = 0, failures = 0, nwrites = 0, npix = 0, ndone = 0;
  bit expect_writes = 0;

  camera_capture #(.N(N), .ROWS(ROWS), .COLS(COLS)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_frame();
    for (int r = 0; r < ROWS + 1; r++)
      for (int c = 0; c < COLS + 2; c++) img[r][c] = 8'($urandom);
    #400 cam_vsync = 0;
    #400;
    for (int r = 0; r < ROWS + 1; r++) begin
      for (int c = 0; c < COLS + 2; c++) begin
        cam_data = img[r][c]; cam_href = 1;
        #40 cam_pclk = 1;
        #40 cam_pclk = 0;
      end
      cam_href = 0;
      repeat (4) begin #40 cam_pclk = 1; #40 cam_pclk = 0; end
    end
    #200 cam_vsync = 1;
    #600;
  endtask

  always @(posedge clk) begin
    if (fb_we && !rst) begin
      logic [N*8-1:0] e;
      int r, w;
      r = int'(fb_addr) / WORDS; w = int'(fb_addr) % WORDS;
      for (int k = 0; k < N; k++) e[8*k +: 8] = img[r][w*N + k];
      checks++; nwrites++;
      if (!expect_writes || fb_data !== e || r >= ROWS) begin
        failures++; $display("write %0d: %h expected %h", fb_addr, fb_data, e);
      end
    end
    if (pix_valid && !rst) begin
      checks++; npix++;
      if (pix_x >= COLS || pix_y >= ROWS || pix !== img[pix_y][pix_x]) begin
        failures++; $display("pixel (%0d,%0d) %h", pix_x, pix_y, pix);
      end
    end
    if (frame_done && !rst) ndone++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    send_frame();                       // not armed: stream only
    checks++; if (nwrites != 0 || npix != ROWS*COLS) begin failures++; $display("frame 1: %0d writes %0d pixels", nwrites, npix); end
    @(negedge clk); arm = 1; @(negedge clk); arm = 0;
    expect_writes = 1;
    send_frame();
    checks++; if (nwrites != ROWS*WORDS) begin failures++; $display("frame 2: %0d writes", nwrites); end
    checks++; if (ndone != 1) begin failures++; $display("frame_done %0d times", ndone); end
    expect_writes = 0;
    send_frame();                       // no new arm: no writes
    checks++; if (nwrites != ROWS*WORDS || npix != 3*ROWS*COLS) begin failures++; $display("frame 3: %0d writes", nwrites); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
