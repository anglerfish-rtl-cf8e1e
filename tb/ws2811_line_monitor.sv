// ws2811_line_monitor: test-bench model of the first IC on a WS2811 strip.
// It ignores the line during rst, then measures every high and low time on the data line (in clock cycles),
// decodes bits (high longer than half-way between the 0 and 1 high times is a
// 1), counts timing errors against the given cycle counts (a low time may be up
// to SLACK cycles longer, as between blocks), and collects the bits of a
// refresh.  When the line has been low for LATCH_SEEN cycles the refresh ends:
// frames increments and the bits are left in frame_bits for the test to read;
// starts records the cycle at which each refresh began.
//
// This model is a test-bench aid of this design's own; it stands in for an
// external part that the design connects to and is not synthesizable logic.
module ws2811_line_monitor #(
  parameter int T0H = 50, T0L = 200, T1H = 120, T1L = 130,
  parameter int SLACK = 15, LATCH_SEEN = 4000
) (
  input  logic clk,
  input  logic rst,
  input  logic din
);
  int  hcnt = 0, lcnt = 0, errors = 0, frames = 0, last_low = 0, cycle = 0;
  int  starts [$];                 // cycle of the first rising edge of each refresh
  bit  last_bit = 0, in_frame = 0;
  bit  bits_q [$];
  bit  frame_bits [$];
  logic din_q = 0;

  always @(posedge clk) begin
    cycle++;
    din_q <= din;
    if (!rst && din && !din_q && !in_frame) starts.push_back(cycle);
    if (rst) begin
      hcnt <= 0; lcnt <= 0; in_frame = 0; bits_q.delete();
    end else if (din) begin
      if (!din_q && in_frame) begin
        // rising edge: check the low time of the bit just finished
        int want;
        want = last_bit ? T1L : T0L;
        if (lcnt < want || lcnt > want + SLACK) begin
          errors++; $display("low time %0d after a %0d bit", lcnt, last_bit);
        end
      end
      hcnt <= din_q ? hcnt + 1 : 1;
      lcnt <= 0;
    end else begin
      if (din_q) begin
        // falling edge: decode the bit from the high time
        last_bit = (hcnt > (T0H + T1H) / 2);
        if (hcnt != (last_bit ? T1H : T0H)) begin
          errors++; $display("high time %0d", hcnt);
        end
        bits_q.push_back(last_bit);
        in_frame = 1;
        lcnt <= 1;
      end else begin
        lcnt <= lcnt + 1;
        if (in_frame && lcnt + 1 == LATCH_SEEN) begin
          in_frame = 0;
          frames++;
          frame_bits = bits_q;
          bits_q.delete();
        end
      end
    end
  end
endmodule
