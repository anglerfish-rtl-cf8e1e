// ov7670_model: behavioural model of an OV7670 camera's video output, for
// test benches only.  It runs freely, sending frame after frame: vsync high
// for VBLANK pixel clocks, then ROWS lines, each with href high for COLS pixel
// clocks followed by HBLANK clocks with href low.  Data changes on the falling
// edge of pclk and is meant to be sampled on the rising edge.  The pixel value
// comes from the parent: the model shows the position it is sending on
// (frame_no, row, col) and sends whatever arrives on pix.  One byte per pixel.
// PHASE shifts the model's pixel clock against the test bench clock.
//
// This model is a test-bench aid of this design's own; it stands in for an
// external part that the design connects to and is not synthesizable logic.
module ov7670_model #(
  parameter int  ROWS   = 320,
  parameter int  COLS   = 240,
  parameter int  HBLANK = 16,
  parameter int  VBLANK = 64,
  parameter time HALF   = 20ns,
  parameter time PHASE  = 3ns
) (
  output logic       pclk,
  output logic       href,
  output logic       vsync,
  output logic [7:0] data,
  output int         frame_no,
  output int         row,
  output int         col,
  input  logic [7:0] pix
);
  initial begin
    pclk = 0; href = 0; vsync = 1; data = '0;
    frame_no = 0; row = 0; col = 0;
    #(PHASE);
    forever begin
      vsync = 1;
      repeat (VBLANK) begin #(HALF) pclk = 1; #(HALF) pclk = 0; end
      vsync = 0;
      repeat (4) begin #(HALF) pclk = 1; #(HALF) pclk = 0; end
      for (int r = 0; r < ROWS; r++) begin
        for (int c = 0; c < COLS; c++) begin
          row = r; col = c;
          #1ps;
          data = pix; href = 1;
          #(HALF) pclk = 1;
          #(HALF) pclk = 0;
        end
        href = 0;
        repeat (HBLANK) begin #(HALF) pclk = 1; #(HALF) pclk = 0; end
      end
      repeat (4) begin #(HALF) pclk = 1; #(HALF) pclk = 0; end
      frame_no++;
    end
  end
endmodule
