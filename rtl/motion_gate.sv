// motion_gate: lap detector of the peripheral unit (camera at the far wall).
//
// While learn is high (board switch 0 off) every camera pixel is written to a
// background frame memory.  While learn is low each live pixel, as it arrives
// from the camera, is compared with the stored background pixel at the same
// place; a pixel whose absolute difference exceeds THRESH counts as "swimmer":
// its column is added to a sum and a counter is incremented.  At frame_end, if
// at least MIN_PIXELS pixels changed, a sequential divider forms the centre of
// mass column com_x = sum / count (one quotient bit per cycle).
//
// The centre of mass is then compared with the last accepted one.  A move of
// more than MIN_STEP columns gives a direction (towards higher or lower
// columns) and becomes the new reference; smaller moves are ignored.  When the
// direction reverses, lap pulses for one cycle: the swimmer has touched the wall
// and is heading back.  Frames with too few changed pixels leave the tracking
// state alone.  Using columns only, the threshold, MIN_PIXELS and MIN_STEP are
// this design's choices.  Background reads use the two-cycle memory latency,
// so the pixel stream is delayed two cycles to meet them.
module motion_gate #(
  parameter int unsigned ROWS       = 320,
  parameter int unsigned COLS       = 240,
  parameter int unsigned PIX_W      = 8,
  parameter int unsigned THRESH     = 40,
  parameter int unsigned MIN_PIXELS = 64,
  parameter int unsigned MIN_STEP   = 2,
  parameter int unsigned XW         = $clog2(COLS + 1),
  parameter int unsigned YW         = $clog2(ROWS + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             learn,
  input  logic             pix_valid,
  input  logic [PIX_W-1:0] pix,
  input  logic [XW-1:0]    pix_x,
  input  logic [YW-1:0]    pix_y,
  input  logic             frame_end,
  output logic             com_valid,
  output logic [XW-1:0]    com_x,
  output logic [1:0]       direction,   // 0 unknown, 1 towards higher columns, 2 lower
  output logic             lap
);
  localparam int unsigned DEPTH = ROWS * COLS;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned CNTW  = $clog2(DEPTH + 1);
  localparam int unsigned SUMW  = CNTW + XW;
  localparam int unsigned QCW   = $clog2(SUMW + 1);

  logic [PIX_W-1:0] bg;
  logic [AW-1:0]    addr;
  logic             v_p [2];
  logic [PIX_W-1:0] pix_p [2];
  logic [XW-1:0]    x_p [2];
  logic [SUMW-1:0]  sum_x;
  logic [CNTW-1:0]  count;
  logic [PIX_W-1:0] diff;
  logic             hit;

  assign addr = AW'(pix_y * COLS + pix_x);

  bram_single_port #(.WIDTH(PIX_W), .DEPTH(DEPTH)) u_background (
    .clk, .we(learn && pix_valid), .addr, .din(pix), .dout(bg)
  );

  assign diff = (pix_p[1] > bg) ? pix_p[1] - bg : bg - pix_p[1];
  assign hit  = v_p[1] && !learn && (diff > PIX_W'(THRESH));

  // divider and tracking state
  logic            dividing, frame_end_q [2];
  logic [SUMW-1:0] dividend, quotient;
  logic [SUMW:0]   remainder;
  logic [CNTW-1:0] divisor;
  logic [QCW-1:0]  qbit;
  logic            have_ref;
  logic [XW-1:0]   ref_x;
  logic [SUMW:0]   rem_shift;

  assign rem_shift = {remainder[SUMW-1:0], dividend[SUMW-1]};

  always_ff @(posedge clk) begin
    if (rst) begin
      v_p[0] <= 1'b0; v_p[1] <= 1'b0;
      frame_end_q[0] <= 1'b0; frame_end_q[1] <= 1'b0;
      sum_x <= '0; count <= '0;
      dividing <= 1'b0; dividend <= '0; quotient <= '0; remainder <= '0;
      divisor <= '0; qbit <= '0;
      com_valid <= 1'b0; com_x <= '0; direction <= 2'd0; lap <= 1'b0;
      have_ref <= 1'b0; ref_x <= '0;
    end else begin
      v_p[0]   <= pix_valid;  pix_p[0] <= pix;      x_p[0] <= pix_x;
      v_p[1]   <= v_p[0];     pix_p[1] <= pix_p[0]; x_p[1] <= x_p[0];
      frame_end_q[0] <= frame_end;
      frame_end_q[1] <= frame_end_q[0];
      com_valid <= 1'b0;
      lap       <= 1'b0;

      if (hit) begin
        sum_x <= sum_x + SUMW'(x_p[1]);
        count <= count + 1'b1;
      end

      if (frame_end_q[1]) begin
        if (!learn && count >= CNTW'(MIN_PIXELS)) begin
          dividing  <= 1'b1;
          dividend  <= sum_x;
          divisor   <= count;
          remainder <= '0;
          quotient  <= '0;
          qbit      <= QCW'(SUMW);
        end
        sum_x <= '0;
        count <= '0;
      end

      if (dividing) begin
        // restoring division, one quotient bit per cycle, MSB first
        if (rem_shift >= (SUMW+1)'(divisor)) begin
          remainder <= rem_shift - (SUMW+1)'(divisor);
          quotient  <= {quotient[SUMW-2:0], 1'b1};
        end else begin
          remainder <= rem_shift;
          quotient  <= {quotient[SUMW-2:0], 1'b0};
        end
        dividend <= {dividend[SUMW-2:0], 1'b0};
        qbit     <= qbit - 1'b1;
        if (qbit == QCW'(1)) dividing <= 1'b0;
      end

      if (dividing && qbit == QCW'(1)) begin
        logic [XW-1:0] c;
        c = XW'({quotient[SUMW-2:0], (rem_shift >= (SUMW+1)'(divisor))});
        com_x     <= c;
        com_valid <= 1'b1;
        if (!have_ref) begin
          have_ref <= 1'b1;
          ref_x    <= c;
        end else if (c > ref_x + XW'(MIN_STEP)) begin
          ref_x     <= c;
          direction <= 2'd1;
          lap       <= (direction == 2'd2);
        end else if (c + XW'(MIN_STEP) < ref_x) begin
          ref_x     <= c;
          direction <= 2'd2;
          lap       <= (direction == 2'd1);
        end
      end

      if (learn) begin
        have_ref  <= 1'b0;
        direction <= 2'd0;
      end
    end
  end
endmodule
