// ir_burst_tx: infra-red burst transmitter of the peripheral unit.
//
// A trigger pulse starts a burst: for BURST_CYCLES cycles the IR LED output
// carries a square wave that toggles every HALF_PERIOD cycles (1316 cycles =
// 38 kHz from 100 MHz, the receiver's carrier frequency).  Otherwise the LED
// is off.  A trigger during a burst restarts it.  The burst length (20 ms by
// default) is this design's choice; the carrier frequency follows the
// prototype.
module ir_burst_tx #(
  parameter int unsigned HALF_PERIOD  = 1316,
  parameter int unsigned BURST_CYCLES = 2_000_000
) (
  input  logic clk,
  input  logic rst,
  input  logic trigger,
  output logic ir_led,
  output logic active
);
  localparam int unsigned BW = $clog2(BURST_CYCLES + 1);
  localparam int unsigned HW = $clog2(HALF_PERIOD + 1);
  logic [BW-1:0] left;
  logic [HW-1:0] half;
  logic          phase;

  assign active = (left != '0);
  assign ir_led = active && phase;

  always_ff @(posedge clk) begin
    if (rst) begin
      left  <= '0;
      half  <= '0;
      phase <= 1'b0;
    end else if (trigger) begin
      left  <= BW'(BURST_CYCLES);
      half  <= '0;
      phase <= 1'b1;
    end else if (active) begin
      left <= left - 1'b1;
      if (half == HW'(HALF_PERIOD - 1)) begin
        half  <= '0;
        phase <= ~phase;
      end else begin
        half <= half + 1'b1;
      end
    end else begin
      phase <= 1'b0;
    end
  end
endmodule
