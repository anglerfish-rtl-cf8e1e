// ws2811_bit_encoder: sends one 24-bit colour packet as WS2811 line codes.
//
// The minor state machine of the LED driver.  On rgb_valid (while idle) the
// packet is loaded into a shift register (RECEIVED_INPUT).  Its most
// significant bit selects TRANSMIT_1 or TRANSMIT_0; each of these drives the
// line high for T1H/T0H cycles and low for T1L/T0L cycles, then shifts the
// register left by one and goes straight to the state of the next bit, so the
// bits follow each other without a gap.  After 24 bits done pulses for one cycle
// and the machine returns to IDLE with the line low.  Bit order is R7..R0,
// G7..G0, B7..B0.  The default cycle counts are the typical timings at 100 MHz:
// 0 code 500 ns high + 2000 ns low, 1 code 1200 ns high + 1300 ns low.
//
// Timing: the first bit starts two cycles after rgb_valid, a packet lasts
// 24 x 250 = 6000 cycles and done comes 6002 cycles after rgb_valid.  busy is
// high from the cycle after rgb_valid until done.
//
// The four states, the packet order and the shift-left/read-MSB scheme follow
// the WS2811 driver description; the typical values of the timing table are
// used for the high and low times.  Sending bits back to back and the
// done/busy handshake are this design's choices.
module ws2811_bit_encoder #(
  parameter int unsigned T0H = 50,
  parameter int unsigned T0L = 200,
  parameter int unsigned T1H = 120,
  parameter int unsigned T1L = 130
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        rgb_valid,
  input  logic [23:0] rgb,
  output logic        dout,
  output logic        busy,
  output logic        done
);
  typedef enum logic [1:0] {B_IDLE, B_RECEIVED_INPUT, B_TRANSMIT_0, B_TRANSMIT_1} bit_state_t;
  localparam int unsigned CW = $clog2(T0H + T0L + T1H + T1L);

  bit_state_t    state;
  logic [23:0]   shreg;
  logic [4:0]    nbits;
  logic [CW-1:0] cnt;
  logic [CW-1:0] th, tl;

  assign busy = (state != B_IDLE);
  assign th   = (state == B_TRANSMIT_1) ? CW'(T1H) : CW'(T0H);
  assign tl   = (state == B_TRANSMIT_1) ? CW'(T1L) : CW'(T0L);
  assign dout = (state == B_TRANSMIT_0 || state == B_TRANSMIT_1) && (cnt < th);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= B_IDLE;
      shreg <= '0;
      nbits <= '0;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        B_IDLE: if (rgb_valid) begin
          shreg <= rgb;
          state <= B_RECEIVED_INPUT;
        end
        B_RECEIVED_INPUT: begin
          nbits <= '0;
          cnt   <= '0;
          state <= shreg[23] ? B_TRANSMIT_1 : B_TRANSMIT_0;
        end
        B_TRANSMIT_0, B_TRANSMIT_1: begin
          if (cnt == th + tl - 1'b1) begin
            cnt   <= '0;
            shreg <= {shreg[22:0], 1'b0};
            nbits <= nbits + 1'b1;
            if (nbits == 5'd23) begin
              state <= B_IDLE;
              done  <= 1'b1;
            end else begin
              state <= shreg[22] ? B_TRANSMIT_1 : B_TRANSMIT_0;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= B_IDLE;
      endcase
    end
  end
endmodule
