// camera_capture: OV7670 camera interface and frame-buffer writer.
//
// The camera's pixel clock, line valid (href), frame sync (vsync) and 8-bit
// data arrive asynchronously; all four pass through a two-flop synchroniser on
// the 100 MHz system clock, and a pixel is taken on each rising edge of the
// synchronised pixel clock while href is high.  vsync high marks the gap
// between frames: its falling edge starts a frame (line and pixel counters
// cleared) and its rising edge ends it.  Each camera byte is taken as one 8-bit
// grey pixel; lines are COLS pixels and frames ROWS lines, matching the 320 x 240
// frame stored as 320 lines of 240 pixels.  Pixels beyond COLS or ROWS are
// dropped.
//
// Every pixel is also given out as a stream (pix_valid, pix, pix_x, pix_y) for
// a display or the motion gate.  After arm, the next complete frame is packed N
// pixels to a word (pixel k of a word in bits [8k+7:8k]) and written to the
// frame buffer at line*COLS/N + column/N, one write per word; frame_done pulses
// when that frame's vsync rises.  The synchroniser adds three cycles between a
// camera pixel-clock edge and the pixel stream.  The synchroniser and the
// pixel-clock-edge sampling are this design's choices (the system clock must be
// at least 4x the pixel clock).
module camera_capture #(
  parameter int unsigned N     = 6,
  parameter int unsigned PIX_W = 8,
  parameter int unsigned ROWS  = 320,
  parameter int unsigned COLS  = 240,
  parameter int unsigned WORDS = COLS / N,
  parameter int unsigned AW    = $clog2(ROWS * WORDS),
  parameter int unsigned XW    = $clog2(COLS + 1),
  parameter int unsigned YW    = $clog2(ROWS + 1)
) (
  input  logic               clk,
  input  logic               rst,
  // camera pins
  input  logic               cam_pclk,
  input  logic               cam_href,
  input  logic               cam_vsync,
  input  logic [PIX_W-1:0]   cam_data,
  // control
  input  logic               arm,
  output logic               capturing,
  output logic               frame_done,
  // pixel stream
  output logic               pix_valid,
  output logic [PIX_W-1:0]   pix,
  output logic [XW-1:0]      pix_x,
  output logic [YW-1:0]      pix_y,
  output logic               frame_start,
  output logic               frame_end,
  // frame buffer write port
  output logic               fb_we,
  output logic [AW-1:0]      fb_addr,
  output logic [N*PIX_W-1:0] fb_data
);
  logic [PIX_W+2:0] s1, s2, s3;   // {pclk, href, vsync, data}
  logic             armed;
  logic [XW-1:0]    x;
  logic [YW-1:0]    yl;
  logic             href_q;
  logic [N*PIX_W-1:0] pack;
  logic [$clog2(N)-1:0] slot;

  wire pclk_s  = s2[PIX_W+2], href_s = s2[PIX_W+1], vs_s = s2[PIX_W];
  wire pclk_p  = s3[PIX_W+2], vs_p   = s3[PIX_W];
  wire [PIX_W-1:0] data_s = s2[PIX_W-1:0];
  wire pclk_rise = pclk_s && !pclk_p;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= '0; s2 <= '0; s3 <= '0;
    end else begin
      s1 <= {cam_pclk, cam_href, cam_vsync, cam_data};
      s2 <= s1;
      s3 <= s2;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      armed <= 1'b0; capturing <= 1'b0; frame_done <= 1'b0;
      pix_valid <= 1'b0; pix <= '0; pix_x <= '0; pix_y <= '0;
      frame_start <= 1'b0; frame_end <= 1'b0;
      fb_we <= 1'b0; fb_addr <= '0; fb_data <= '0;
      x <= '0; yl <= '0; href_q <= 1'b0; pack <= '0; slot <= '0;
    end else begin
      frame_done  <= 1'b0;
      pix_valid   <= 1'b0;
      frame_start <= 1'b0;
      frame_end   <= 1'b0;
      fb_we       <= 1'b0;
      if (arm) armed <= 1'b1;

      if (!vs_s && vs_p) begin                 // vsync falls: frame begins
        frame_start <= 1'b1;
        x <= '0; yl <= '0; slot <= '0; href_q <= 1'b0;
        if (armed || arm) begin
          capturing <= 1'b1;
          armed     <= 1'b0;
        end
      end else if (vs_s && !vs_p) begin        // vsync rises: frame ends
        frame_end <= 1'b1;
        if (capturing) begin
          capturing  <= 1'b0;
          frame_done <= 1'b1;
        end
      end else if (pclk_rise) begin
        href_q <= href_s;
        if (href_s) begin
          if (x < XW'(COLS) && yl < YW'(ROWS)) begin
            pix_valid <= 1'b1;
            pix       <= data_s;
            pix_x     <= x;
            pix_y     <= yl;
            pack[PIX_W*slot +: PIX_W] <= data_s;
            if (slot == ($clog2(N))'(N - 1)) begin
              slot    <= '0;
              fb_we   <= capturing;
              fb_addr <= AW'(int'(yl) * WORDS + int'(x) / N);
              fb_data <= pack;
              fb_data[PIX_W*(N-1) +: PIX_W] <= data_s;
            end else begin
              slot <= slot + 1'b1;
            end
          end
          if (x < XW'(COLS)) x <= x + 1'b1;
        end else if (href_q) begin             // href fell: line ends
          x    <= '0;
          slot <= '0;
          if (yl < YW'(ROWS)) yl <= yl + 1'b1;
        end
      end
    end
  end
endmodule
