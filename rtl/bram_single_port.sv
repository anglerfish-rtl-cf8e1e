// bram_single_port: single-port block RAM with a two-cycle read latency.
//
// Used as the disparity map: one 8-bit disparity for each of the 76800 pixels
// of a 320 x 240 frame.  One address per cycle, either a write (we=1) or a read.
// Read data for an address presented in cycle t is on dout during cycle t+2.
// The memory has no reset.
//
// The size, width and two-cycle latency follow the prototype; read-during-write
// returning the old word and the absence of a reset are this design's choices.
module bram_single_port #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 76800,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [WIDTH-1:0] q;

  always_ff @(posedge clk) begin
    if (we && {1'b0, addr} < (AW+1)'(DEPTH)) mem[addr] <= din;
    q    <= mem[addr];
    dout <= q;
  end
endmodule
