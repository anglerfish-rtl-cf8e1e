// ws2811_strip_driver: sends one colour block to every IC of a WS2811 strip.
//
// The major state machine of the LED driver.  Each IC on the strip keeps the
// first 24 bits it receives and passes the rest on, so a refresh is NUM_ICS
// blocks sent back to back, IC 0 first:
//   IDLE         wait for start
//   START_BLOCK  ask for the colour of IC px_index (px_rgb, combinational from
//                the user) and hand it to the bit encoder
//   IN_BLOCK     wait for the encoder to finish the 24 bits
//   END_BLOCK    next IC, or done after the last one
// The line is left low afterwards; the caller holds it low for the latch time
// (at least 50 us) before the colours show.  Between blocks the line stays low
// for three extra cycles (30 ns), well inside the 150 ns tolerance of the low
// times.  One block takes 24 x 250 = 6000 cycles at the default timings.
//
// The four states and one block per IC follow the driver description; the
// colour request handshake (px_index/px_rgb) and the IC count are this design's
// choices.
module ws2811_strip_driver #(
  parameter int unsigned NUM_ICS = 100,
  parameter int unsigned T0H     = 50,
  parameter int unsigned T0L     = 200,
  parameter int unsigned T1H     = 120,
  parameter int unsigned T1L     = 130,
  parameter int unsigned IW      = $clog2(NUM_ICS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  output logic [IW-1:0] px_index,
  input  anglerfish_pkg::rgb_t px_rgb,
  output logic          dout,
  output logic          busy,
  output logic          done
);
  typedef enum logic [1:0] {M_IDLE, M_START_BLOCK, M_IN_BLOCK, M_END_BLOCK} blk_state_t;
  blk_state_t state;
  logic enc_valid, enc_busy, enc_done;

  assign busy      = (state != M_IDLE);
  assign enc_valid = (state == M_START_BLOCK);

  ws2811_bit_encoder #(.T0H(T0H), .T0L(T0L), .T1H(T1H), .T1L(T1L)) u_enc (
    .clk, .rst, .rgb_valid(enc_valid), .rgb(px_rgb),
    .dout, .busy(enc_busy), .done(enc_done)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= M_IDLE;
      px_index <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        M_IDLE: if (start) begin
          px_index <= '0;
          state    <= M_START_BLOCK;
        end
        M_START_BLOCK: state <= M_IN_BLOCK;
        M_IN_BLOCK:    if (enc_done) state <= M_END_BLOCK;
        M_END_BLOCK: begin
          if (px_index == IW'(NUM_ICS - 1)) begin
            done  <= 1'b1;
            state <= M_IDLE;
          end else begin
            px_index <= px_index + 1'b1;
            state    <= M_START_BLOCK;
          end
        end
        default: state <= M_IDLE;
      endcase
    end
  end

  // a new block is only handed over while the encoder is idle
  assert property (@(posedge clk) disable iff (rst) enc_valid |-> !enc_busy);
endmodule
