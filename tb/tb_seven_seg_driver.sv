// tb_seven_seg_driver: self-checking test of the multiplexed display.
// With a 4-cycle refresh, random 8-digit BCD values are shown; in every cycle
// exactly one digit enable must be low, digits must scan 0..7 in turn, the
// segments must be the standard pattern of that digit (table written here from
// the segment names a..g) and the decimal point must be lit only on digit 2.
//
// The expected results are worked out here from the stimulus, independently
// of the design under test; the sizes and the stimulus are this test's own
// choices, the timings checked are the design's.
module tb_seven_seg_driver;
  localparam int R = 4;
  logic clk = 0, rst = 1;
  logic [31:0] value_bcd = '0;
  logic [7:0] an;
  logic [6:0] seg;
  logic dp_n;
  int checks = 0, failures = 0;
  // segments per digit, listed by name
  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};

  seven_seg_driver #(.REFRESH_CYCLES(R)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [6:0] pattern(int d);
    logic [6:0] p = '0;
    for (int i = 0; i < lit[d].len(); i++) p[lit[d][i] - "a"] = 1'b1;
    return p;
  endfunction

  initial begin
    int prev = -1;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int v = 0; v < 20; v++) begin
      for (int i = 0; i < 8; i++) value_bcd[4*i +: 4] = 4'($urandom_range(0, 9));
      if (v == 0) value_bcd = 32'h7654_3210;
      if (v == 1) value_bcd = 32'hFA98_0000;
      for (int c = 0; c < 8 * R; c++) begin
        int dig, n;
        @(negedge clk);
        n = 0; dig = -1;
        for (int i = 0; i < 8; i++) if (!an[i]) begin n++; dig = i; end
        checks++;
        if (n != 1) begin failures++; $display("%0d digits enabled", n); continue; end
        if (prev >= 0 && dig != prev && dig != (prev + 1) % 8) begin failures++; $display("digit %0d after %0d", dig, prev); end
        prev = dig;
        checks++;
        if (value_bcd[4*dig +: 4] <= 9) begin
          if (~seg !== pattern(value_bcd[4*dig +: 4])) begin
            failures++; $display("digit %0d value %0d seg %b", dig, value_bcd[4*dig +: 4], seg);
          end
        end else if (seg !== 7'h7F) begin
          failures++; $display("code %0d not blank", value_bcd[4*dig +: 4]);
        end
        checks++;
        if (dp_n !== (dig != 2)) begin failures++; $display("decimal point on digit %0d", dig); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
