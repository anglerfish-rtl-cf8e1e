// seven_seg_driver: multiplexed 8-digit seven-segment display.
//
// Shows an 8-digit BCD value (digit 0 in bits [3:0], the right-most digit).
// The digits are lit one at a time, each for REFRESH_CYCLES cycles (1 ms at
// 100 MHz by default), fast enough to look steady.  an is the active-low digit
// enable (an[i] low lights digit i), seg the active-low segments {g,f,e,d,c,b,a};
// dp lights the decimal point after digit DP_DIGIT (2: seconds.hundredths).
// Codes 10..15 show a blank.  Active-low drive and the scan rate are this
// design's choices for a common-anode display.
module seven_seg_driver #(
  parameter int unsigned REFRESH_CYCLES = 100_000,
  parameter int unsigned DP_DIGIT       = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] value_bcd,
  output logic [7:0]  an,
  output logic [6:0]  seg,
  output logic        dp_n
);
  localparam int unsigned RW = $clog2(REFRESH_CYCLES + 1);
  logic [RW-1:0] cnt;
  logic [2:0]    digit;
  logic [3:0]    code;
  logic [6:0]    on;     // active-high {g,f,e,d,c,b,a}

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      digit <= '0;
    end else if (cnt == RW'(REFRESH_CYCLES - 1)) begin
      cnt   <= '0;
      digit <= digit + 1'b1;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  assign code = value_bcd[4*digit +: 4];

  always_comb begin
    unique case (code)
      4'd0: on = 7'b011_1111;
      4'd1: on = 7'b000_0110;
      4'd2: on = 7'b101_1011;
      4'd3: on = 7'b100_1111;
      4'd4: on = 7'b110_0110;
      4'd5: on = 7'b110_1101;
      4'd6: on = 7'b111_1101;
      4'd7: on = 7'b000_0111;
      4'd8: on = 7'b111_1111;
      4'd9: on = 7'b110_1111;
      default: on = 7'b000_0000;
    endcase
  end

  assign seg  = ~on;
  assign an   = ~(8'b1 << digit);
  assign dp_n = ~(digit == 3'(DP_DIGIT));
endmodule
