// stereo_matcher: block-matching disparity engine (sum of squared differences).
//
// For every pixel (x, y) of the left frame the engine compares the N x N left
// block whose top-left pixel is (x, y) with the right blocks at (x-d, y) for
// every offset d = 0 .. min(x, MAX_DISP-1), and stores the offset with the
// smallest SSD in the disparity memory at address y*COLS + x.  Ties keep the
// smaller offset (a new offset wins only with a strictly smaller SSD).  Pixels
// of a block that fall beyond the right or bottom edge of the frame count as 0
// in both images.  With the prototype's 320 x 240 frames this is
// 320 * (1 + 2 + ... + 240) = 9,254,400 block comparisons per frame.
//
// The controller is the seven-state machine of the prototype:
//   IDLE              wait for start (a new stereo frame pair is in memory)
//   NEW_FRAME         clear the counters
//   UPDATE_CENTERS    advance (x, y, d): next offset, or next pixel after SAVE,
//                     or back to IDLE (done pulse) after the last pixel
//   UPDATE_BUFFERS    refill the temporary block buffers (temp_buffer_fetch)
//   CALCULATE         one block pair through the ssd_block_unit (3 cycles)
//   UPDATE_DISPARITY  keep the offset if its SSD is the smallest so far;
//                     more offsets -> UPDATE_CENTERS, else -> SAVE
//   SAVE              write the best offset to the disparity memory
// The return from UPDATE_DISPARITY to UPDATE_CENTERS for the next offset is
// this design's reading of the prototype's loop.
//
// Timing: each offset takes 2N+10 cycles (22 for N=6): 1 in UPDATE_CENTERS,
// 2N+4 refilling buffers, 4 in CALCULATE, 1 in UPDATE_DISPARITY; each pixel adds
// one SAVE cycle.  busy is high from the cycle after start until the done pulse.
// The frame buffers are read through their two-cycle-latency ports; the
// disparity memory is written with a one-cycle we pulse.
module stereo_matcher #(
  parameter int unsigned N        = 6,
  parameter int unsigned PIX_W    = 8,
  parameter int unsigned ROWS     = 320,
  parameter int unsigned COLS     = 240,
  parameter int unsigned MAX_DISP = COLS,
  parameter int unsigned DISP_W   = 8,
  parameter int unsigned WORDS    = COLS / N,
  parameter int unsigned AW       = $clog2(ROWS * WORDS),
  parameter int unsigned DAW      = $clog2(ROWS * COLS),
  parameter int unsigned XW       = $clog2(COLS),
  parameter int unsigned YW       = $clog2(ROWS)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  output logic               busy,
  output logic               done,
  // left / right frame buffer read ports
  output logic [AW-1:0]      l_addr,
  input  logic [N*PIX_W-1:0] l_data,
  output logic [AW-1:0]      r_addr,
  input  logic [N*PIX_W-1:0] r_data,
  // disparity memory write port
  output logic               disp_we,
  output logic [DAW-1:0]     disp_addr,
  output logic [DISP_W-1:0]  disp_data,
  output anglerfish_pkg::stereo_state_t      state_o
);
  localparam int unsigned SSD_W = 2*PIX_W + $clog2(N*N) + 1;

  anglerfish_pkg::stereo_state_t state;
  logic [XW-1:0] x, d;
  logic [YW-1:0] y;
  logic          first, pixel_done, req_sent;
  logic [SSD_W-1:0] best, ssd_q;
  logic [XW-1:0] best_d;
  logic [XW-1:0] d_last;

  logic fetch_start, fetch_busy, fetch_done;
  logic ssd_in_valid, ssd_out_valid;
  logic [SSD_W-1:0] ssd;
  logic [N*PIX_W-1:0] left_block [N], right_block [N];

  assign state_o = state;
  assign busy    = (state != anglerfish_pkg::ST_IDLE);
  assign d_last  = (x < XW'(MAX_DISP - 1)) ? x : XW'(MAX_DISP - 1);

  assign fetch_start  = (state == anglerfish_pkg::ST_UPDATE_BUFFERS) && !req_sent;
  assign ssd_in_valid = (state == anglerfish_pkg::ST_CALCULATE) && !req_sent;

  temp_buffer_fetch #(.N(N), .PIX_W(PIX_W), .ROWS(ROWS), .COLS(COLS)) u_fetch (
    .clk, .rst, .start(fetch_start), .lx(x), .rx(x - d), .y,
    .busy(fetch_busy), .done(fetch_done),
    .l_addr, .l_data, .r_addr, .r_data,
    .left_block, .right_block
  );

  ssd_block_unit #(.N(N), .PIX_W(PIX_W), .SSD_W(SSD_W)) u_ssd (
    .clk, .rst, .in_valid(ssd_in_valid),
    .left_rows(left_block), .right_rows(right_block),
    .ssd, .out_valid(ssd_out_valid)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= anglerfish_pkg::ST_IDLE;
      x <= '0; y <= '0; d <= '0;
      first      <= 1'b0;
      pixel_done <= 1'b0;
      req_sent   <= 1'b0;
      best       <= '1;
      best_d     <= '0;
      ssd_q      <= '0;
      done       <= 1'b0;
      disp_we    <= 1'b0;
      disp_addr  <= '0;
      disp_data  <= '0;
    end else begin
      done    <= 1'b0;
      disp_we <= 1'b0;
      unique case (state)
        anglerfish_pkg::ST_IDLE: if (start) state <= anglerfish_pkg::ST_NEW_FRAME;

        anglerfish_pkg::ST_NEW_FRAME: begin
          x <= '0; y <= '0; d <= '0;
          first      <= 1'b1;
          pixel_done <= 1'b0;
          best       <= '1;
          best_d     <= '0;
          state      <= anglerfish_pkg::ST_UPDATE_CENTERS;
        end

        anglerfish_pkg::ST_UPDATE_CENTERS: begin
          state    <= anglerfish_pkg::ST_UPDATE_BUFFERS;
          req_sent <= 1'b0;
          if (first) begin
            first <= 1'b0;
          end else if (pixel_done) begin
            pixel_done <= 1'b0;
            d    <= '0;
            best <= '1;
            if (x == XW'(COLS - 1)) begin
              x <= '0;
              if (y == YW'(ROWS - 1)) begin
                y     <= '0;
                done  <= 1'b1;
                state <= anglerfish_pkg::ST_IDLE;
              end else begin
                y <= y + 1'b1;
              end
            end else begin
              x <= x + 1'b1;
            end
          end else begin
            d <= d + 1'b1;
          end
        end

        anglerfish_pkg::ST_UPDATE_BUFFERS: begin
          req_sent <= 1'b1;
          if (fetch_done) begin
            state    <= anglerfish_pkg::ST_CALCULATE;
            req_sent <= 1'b0;
          end
        end

        anglerfish_pkg::ST_CALCULATE: begin
          req_sent <= 1'b1;
          if (ssd_out_valid) begin
            ssd_q    <= ssd;
            state    <= anglerfish_pkg::ST_UPDATE_DISPARITY;
            req_sent <= 1'b0;
          end
        end

        anglerfish_pkg::ST_UPDATE_DISPARITY: begin
          if (ssd_q < best) begin
            best   <= ssd_q;
            best_d <= d;
          end
          state <= (d == d_last) ? anglerfish_pkg::ST_SAVE : anglerfish_pkg::ST_UPDATE_CENTERS;
        end

        anglerfish_pkg::ST_SAVE: begin
          disp_we    <= 1'b1;
          disp_addr  <= DAW'(y * COLS + x);
          disp_data  <= DISP_W'(best_d);
          pixel_done <= 1'b1;
          state      <= anglerfish_pkg::ST_UPDATE_CENTERS;
        end

        default: state <= anglerfish_pkg::ST_IDLE;
      endcase
    end
  end

  // the buffer refill must have finished before a block enters the SSD unit
  assert property (@(posedge clk) disable iff (rst) ssd_in_valid |-> !fetch_busy);
endmodule
