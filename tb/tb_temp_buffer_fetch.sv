// tb_temp_buffer_fetch: self-checking test of the block-buffer refill logic.
// Two small frame buffers (20 lines of 36 pixels, 6-pixel words) are filled
// with random pixels.  Random block positions, including blocks that run past
// the right and bottom edges, are fetched; every extracted block row is compared
// with the pixels taken straight from the test's own copy of the images (zero
// outside the frame), and done must come exactly 2N+3 cycles after start.
//
// The expected results are worked out here from the stimulus, independently
// of the design under test; the sizes and the stimulus are this test's own
// choices, the timings checked are the design's.
module tb_temp_buffer_fetch;
  localparam int N = 6, ROWS = 20, COLS = 36, WORDS = COLS / N;
  localparam int AW = $clog2(ROWS * WORDS), XW = $clog2(COLS), YW = $clog2(ROWS);
  logic clk = 0, rst = 1, start = 0;
  logic [XW-1:0] lx = '0, rx = '0;
  logic [YW-1:0] y = '0;
  logic busy, done;
  logic [AW-1:0] l_addr, r_addr, wa = '0;
  logic [N*8-1:0] l_data, r_data, wl = '0, wr = '0, unused_l, unused_r;
  logic we = 0;
  logic [N*8-1:0] left_block [N], right_block [N];
  logic [7:0] limg [ROWS][COLS], rimg [ROWS][COLS];
  int checks = 0, failures = 0;

  temp_buffer_fetch #(.N(N), .ROWS(ROWS), .COLS(COLS)) dut (.*);
  bram_dual_port #(.WIDTH(N*8), .DEPTH(ROWS*WORDS)) u_l (
    .clk, .a_we(we), .a_addr(wa), .a_din(wl), .a_dout(unused_l),
    .b_we(1'b0), .b_addr(l_addr), .b_din('0), .b_dout(l_data));
  bram_dual_port #(.WIDTH(N*8), .DEPTH(ROWS*WORDS)) u_r (
    .clk, .a_we(we), .a_addr(wa), .a_din(wr), .a_dout(unused_r),
    .b_we(1'b0), .b_addr(r_addr), .b_din('0), .b_dout(r_data));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] px(bit right, int r, int c);
    if (r >= ROWS || c >= COLS) return 8'h00;
    return right ? rimg[r][c] : limg[r][c];
  endfunction

  task automatic fetch_and_check(int x_l, int x_r, int y0);
    int cyc;
    @(negedge clk);
    lx = XW'(x_l); rx = XW'(x_r); y = YW'(y0); start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 2*N + 3) begin failures++; $display("fetch took %0d cycles", cyc); end
    for (int r = 0; r < N; r++) begin
      logic [N*8-1:0] el, er;
      for (int k = 0; k < N; k++) begin
        el[8*k +: 8] = px(0, y0 + r, x_l + k);
        er[8*k +: 8] = px(1, y0 + r, x_r + k);
      end
      checks++;
      if (left_block[r] !== el || right_block[r] !== er) begin
        failures++;
        $display("block (%0d,%0d,%0d) row %0d: got %h/%h expected %h/%h",
                 x_l, x_r, y0, r, left_block[r], right_block[r], el, er);
      end
    end
  endtask

  initial begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        limg[r][c] = 8'($urandom);
        rimg[r][c] = 8'($urandom);
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
    fetch_and_check(0, 0, 0);
    fetch_and_check(1, 0, 0);
    fetch_and_check(5, 3, 2);
    fetch_and_check(COLS - 1, COLS - 6, ROWS - 1);
    fetch_and_check(COLS - 4, 7, ROWS - 3);
    for (int i = 0; i < 60; i++)
      fetch_and_check($urandom_range(0, COLS - 1), $urandom_range(0, COLS - 1), $urandom_range(0, ROWS - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
