// ir_receiver_model: behavioural model of a 38 kHz IR receiver/demodulator
// module, for test benches only.  Its output (active low, like common
// receiver modules) is low while carrier edges keep arriving on ir_light, and
// returns high HOLD clock cycles after the last edge.
//
// This model is a test-bench aid of this design's own; it stands in for an
// external part that the design connects to and is not synthesizable logic.
module ir_receiver_model #(
  parameter int HOLD = 4000
) (
  input  logic clk,
  input  logic ir_light,
  output logic out_n
);
  int   since = HOLD;
  logic q = 0;
  always @(posedge clk) begin
    q <= ir_light;
    if (ir_light != q) since <= 0;
    else if (since < HOLD) since <= since + 1;
  end
  assign out_n = !(since < HOLD);
endmodule
