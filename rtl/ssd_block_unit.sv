// ssd_block_unit: sum of squared differences of two N x N pixel blocks.
//
// N smac_engine instances work in parallel, engine r on row r of the left and
// right blocks, so a whole block enters in one cycle.  A third register stage
// adds the N engine accumulators into the block SSD.
//
// Timing: fully pipelined, one block per cycle.  A block presented with
// in_valid=1 in cycle t gives ssd with out_valid=1 in cycle t+3 (three cycles per
// calculation, as in the prototype).  Each block clears the engines, so every
// result is the SSD of exactly one block pair.  Rows are packed words of N 8-bit
// pixels, pixel k in bits [8k+7:8k].
//
// N engines in parallel, a final sum across them and the three-cycle latency
// follow the prototype.  Feeding all N rows in one cycle (one engine per row) and
// clearing the engines for every block are this design's reading of it.
module ssd_block_unit #(
  parameter int unsigned N     = 6,
  parameter int unsigned PIX_W = 8,
  parameter int unsigned SSD_W = 2*PIX_W + $clog2(N*N) + 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic [N*PIX_W-1:0]   left_rows  [N],
  input  logic [N*PIX_W-1:0]   right_rows [N],
  output logic [SSD_W-1:0]     ssd,
  output logic                 out_valid
);
  logic [SSD_W-1:0] acc [N];
  logic [N-1:0]     v;
  logic [SSD_W-1:0] total;

  for (genvar r = 0; r < N; r++) begin : g_engine
    smac_engine #(.PIXELS(N), .PIX_W(PIX_W), .ACC_W(SSD_W)) u_smac (
      .clk, .rst, .en(in_valid), .clear(1'b1),
      .a(left_rows[r]), .b(right_rows[r]),
      .acc(acc[r]), .out_valid(v[r])
    );
  end

  always_comb begin
    total = '0;
    for (int r = 0; r < N; r++) total += acc[r];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      ssd       <= '0;
    end else begin
      out_valid <= v[0];
      if (v[0]) ssd <= total;
    end
  end
endmodule
