// smac_engine: squared-difference multiply-accumulate over one word of pixels.
//
// Takes two words of PIXELS 8-bit pixels (48 bits for the prototype's six
// pixels), one from the left block and one from the right block.  For each pixel
// pair it forms the difference and squares it, adds the PIXELS squares together
// and accumulates the sum into the engine's accumulator register.
//
// Timing: two pipeline stages.  Inputs sampled with en=1 in cycle t give squares
// registered at the end of cycle t; the accumulator is updated at the end of
// cycle t+1 and out_valid is high in cycle t+2.  With clear=1 the accumulator is
// loaded with the new sum instead of adding to it, which starts a new block.
// Pixel k of a word occupies bits [8k+7:8k].
//
// Difference, square and accumulate over six pixel pairs follow the engine
// description; where the pipeline registers sit and the accumulator width are
// this design's choices.
module smac_engine #(
  parameter int unsigned PIXELS = 6,
  parameter int unsigned PIX_W  = 8,
  parameter int unsigned ACC_W  = 2*PIX_W + $clog2(PIXELS) + 8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic                    clear,
  input  logic [PIXELS*PIX_W-1:0] a,
  input  logic [PIXELS*PIX_W-1:0] b,
  output logic [ACC_W-1:0]        acc,
  output logic                    out_valid
);
  localparam int unsigned SQ_W = 2*PIX_W;

  logic [SQ_W-1:0] sq [PIXELS];
  logic            v1, c1;
  logic [ACC_W-1:0] row_sum;

  // stage 1: difference and square of every pixel pair
  always_ff @(posedge clk) begin
    for (int k = 0; k < PIXELS; k++) begin
      logic signed [PIX_W:0] diff;
      diff  = $signed({1'b0, a[k*PIX_W +: PIX_W]}) - $signed({1'b0, b[k*PIX_W +: PIX_W]});
      sq[k] <= SQ_W'(diff * diff);
    end
  end

  always_comb begin
    row_sum = '0;
    for (int k = 0; k < PIXELS; k++) row_sum += ACC_W'(sq[k]);
  end

  // stage 2: accumulate
  always_ff @(posedge clk) begin
    if (rst) begin
      v1        <= 1'b0;
      c1        <= 1'b0;
      out_valid <= 1'b0;
      acc       <= '0;
    end else begin
      v1        <= en;
      c1        <= clear;
      out_valid <= v1;
      if (v1) acc <= c1 ? row_sum : acc + row_sum;
    end
  end
endmodule
