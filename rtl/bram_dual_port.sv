// bram_dual_port: true dual-port block RAM with a two-cycle read latency.
//
// Used as the left and right camera frame buffers.  Each of the two ports can
// write or read every cycle.  A read address presented in cycle t is registered
// at the first clock edge, the memory output is registered again at the second,
// so the data is on dout during cycle t+2 (the "two cycles" the readout and
// buffer-fetch logic wait for).  The default shape is one stored frame: 12800
// words (320 lines x 40 words) of 48 bits (six 8-bit pixels).  Port A is written
// by the camera capture and port B is read by the stereo matcher, but both ports
// are identical.  The memory has no reset; a write and a read of the same word in
// the same cycle on different ports return the old word.
//
// The dual-port organisation, depth, width and the two-cycle latency follow the
// prototype's memory architecture; the read-during-write behaviour and the absence
// of a reset are this design's choices.
module bram_dual_port #(
  parameter int unsigned WIDTH = 48,
  parameter int unsigned DEPTH = 12800,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  // port A
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_din,
  output logic [WIDTH-1:0] a_dout,
  // port B
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_din,
  output logic [WIDTH-1:0] b_dout
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [WIDTH-1:0] a_q, b_q;

  always_ff @(posedge clk) begin
    if (a_we && {1'b0, a_addr} < (AW+1)'(DEPTH)) mem[a_addr] <= a_din;
    a_q    <= mem[a_addr];
    a_dout <= a_q;
  end

  always_ff @(posedge clk) begin
    if (b_we && {1'b0, b_addr} < (AW+1)'(DEPTH)) mem[b_addr] <= b_din;
    b_q    <= mem[b_addr];
    b_dout <= b_q;
  end
endmodule
