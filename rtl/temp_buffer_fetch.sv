// temp_buffer_fetch: temporary block buffers and the logic that refills them.
//
// Four buffers of N words each hold the rows of the current left and right
// blocks: a "back" buffer with the word that contains the block's first column
// and a "front" buffer with the following word, for each image.  A block that
// starts at column x covers columns x..x+N-1 of rows y..y+N-1; it usually spans
// two stored words, so row r of the block is taken from the 2N-pixel
// concatenation {front[r], back[r]} starting at pixel x mod N.
//
// On start the module latches the left column lx, right column rx and top row y
// and reads 2N words from each frame buffer (left and right in parallel, one read
// per cycle per memory): the N back words, then the N front words.  Both buffers
// are always refilled, which keeps the controller simple at the cost of N extra
// reads.  Words beyond the right edge of a line (word index COLS/N) or below the
// last line are not read but loaded as zero pixels.
//
// Timing: start is sampled in cycle t; addresses are issued in cycles t+1 ..
// t+2N; with the two-cycle memory latency the last word is captured at the end
// of cycle t+2N+2 and done is high for one cycle in cycle t+2N+3 (t+15 for N=6).
// The block outputs are valid from done until the next start.  start is
// ignored while busy.
//
// Four buffers of six words, front and back per image, and refilling both with
// 12 reads follow the prototype.  The read order, the shift used to cut a block
// out of two words and zero padding at the frame edges are this design's choices.
module temp_buffer_fetch #(
  parameter int unsigned N     = 6,
  parameter int unsigned PIX_W = 8,
  parameter int unsigned ROWS  = 320,
  parameter int unsigned COLS  = 240,
  parameter int unsigned WORDS = COLS / N,
  parameter int unsigned AW    = $clog2(ROWS * WORDS),
  parameter int unsigned XW    = $clog2(COLS),
  parameter int unsigned YW    = $clog2(ROWS)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic [XW-1:0]      lx,
  input  logic [XW-1:0]      rx,
  input  logic [YW-1:0]      y,
  output logic               busy,
  output logic               done,
  // frame buffer read ports (two-cycle latency)
  output logic [AW-1:0]      l_addr,
  input  logic [N*PIX_W-1:0] l_data,
  output logic [AW-1:0]      r_addr,
  input  logic [N*PIX_W-1:0] r_data,
  // extracted block rows
  output logic [N*PIX_W-1:0] left_block  [N],
  output logic [N*PIX_W-1:0] right_block [N]
);
  localparam int unsigned WW = N*PIX_W;
  localparam int unsigned CW = $clog2(2*N + 1);
  localparam int unsigned WIW = $clog2(WORDS + 1);

  logic [WW-1:0] back_l [N], front_l [N], back_r [N], front_r [N];

  logic [WIW-1:0] wl, wr;            // word index of the back words
  logic [$clog2(N)-1:0] ol, orr;     // pixel offset inside the back word
  logic [YW-1:0]  y_q;
  logic [CW-1:0]  issue;             // read being issued
  logic           issuing;

  // two-stage pipeline following each read back from the memory
  logic [CW-1:0]  idx_p [2];
  logic           vl_p [2], vr_p [2], act_p [2];

  // address and in-range flags of the current read
  logic [YW:0]    row;
  logic [WIW-1:0] wl_i, wr_i;
  logic           row_ok, l_ok, r_ok;
  logic           front_sel;

  always_comb begin
    front_sel = (issue >= CW'(N));
    row       = {1'b0, y_q} + (front_sel ? (YW+1)'(issue - CW'(N)) : (YW+1)'(issue));
    wl_i      = front_sel ? wl + 1'b1 : wl;
    wr_i      = front_sel ? wr + 1'b1 : wr;
    row_ok    = row < (YW+1)'(ROWS);
    l_ok      = row_ok && (wl_i < WIW'(WORDS));
    r_ok      = row_ok && (wr_i < WIW'(WORDS));
    l_addr    = l_ok ? AW'(row * WORDS + wl_i) : '0;
    r_addr    = r_ok ? AW'(row * WORDS + wr_i) : '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      issuing  <= 1'b0;
      issue    <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      act_p[0] <= 1'b0;
      act_p[1] <= 1'b0;
      wl <= '0; wr <= '0; ol <= '0; orr <= '0; y_q <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        wl      <= WIW'(lx / XW'(N));
        wr      <= WIW'(rx / XW'(N));
        ol      <= ($clog2(N))'(lx % XW'(N));
        orr     <= ($clog2(N))'(rx % XW'(N));
        y_q     <= y;
        issue   <= '0;
        issuing <= 1'b1;
        busy    <= 1'b1;
      end else if (issuing) begin
        if (issue == CW'(2*N - 1)) issuing <= 1'b0;
        issue <= issue + 1'b1;
      end
      act_p[0] <= issuing;
      idx_p[0] <= issue;
      vl_p[0]  <= l_ok;
      vr_p[0]  <= r_ok;
      act_p[1] <= act_p[0];
      idx_p[1] <= idx_p[0];
      vl_p[1]  <= vl_p[0];
      vr_p[1]  <= vr_p[0];
      if (act_p[1] && idx_p[1] == CW'(2*N - 1)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  // capture returning words
  always_ff @(posedge clk) begin
    if (act_p[1]) begin
      for (int r = 0; r < N; r++) begin
        if (idx_p[1] == CW'(r)) begin
          back_l[r] <= vl_p[1] ? l_data : '0;
          back_r[r] <= vr_p[1] ? r_data : '0;
        end
        if (idx_p[1] == CW'(N + r)) begin
          front_l[r] <= vl_p[1] ? l_data : '0;
          front_r[r] <= vr_p[1] ? r_data : '0;
        end
      end
    end
  end

  // block extraction: N pixels starting at the offset inside {front, back}
  always_comb begin
    for (int r = 0; r < N; r++) begin
      logic [2*WW-1:0] cat_l, cat_r;
      cat_l = {front_l[r], back_l[r]} >> (PIX_W * ol);
      cat_r = {front_r[r], back_r[r]} >> (PIX_W * orr);
      left_block[r]  = cat_l[WW-1:0];
      right_block[r] = cat_r[WW-1:0];
    end
  end
endmodule
