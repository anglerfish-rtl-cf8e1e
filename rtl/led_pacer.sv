// led_pacer: moving light target for the swimmer to follow.
//
// One IC of the strip (the target) is lit with TARGET_RGB, all others are
// off.  Each refresh sends the whole strip (TRANSMIT), holds the line low for
// the latch time (LATCH) and then moves the target one IC: FORWARD towards the
// far end, REVERSE back.  Once the target has reached the last IC the machine
// enters REVERSE, and at IC 0 FORWARD again, so the light swims laps.  The speed
// is set only by the latch time: latch_cycles, clamped to at least LATCH_MIN
// (5000 cycles = 50 us at 100 MHz), is sampled at the start of every LATCH.
// One step therefore takes NUM_ICS*6004 + latch + 3 cycles at the
// default WS2811 timings.  Deasserting enable stops at the end of a latch.
// turn pulses when the direction changes.
//
// The five states, the single lit target, the bounce at the ends and speed set
// by the latch length with its 5000-cycle minimum follow the pacer description.
// The target colour, the strip length (100 ICs) and the exact step timing are
// this design's choices.
module led_pacer #(
  parameter int unsigned NUM_ICS    = 100,
  parameter int unsigned LATCH_MIN  = 5000,
  parameter logic [23:0] TARGET_RGB = 24'hFF_FF_FF,
  parameter int unsigned T0H        = 50,
  parameter int unsigned T0L        = 200,
  parameter int unsigned T1H        = 120,
  parameter int unsigned T1L        = 130,
  parameter int unsigned IW         = $clog2(NUM_ICS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          enable,
  input  logic [31:0]   latch_cycles,
  output logic          dout,
  output logic [IW-1:0] target_pos,
  output logic          reverse,
  output logic          turn,
  output logic [2:0]    state_o
);
  typedef enum logic [2:0] {P_IDLE, P_FORWARD, P_REVERSE, P_LATCH, P_TRANSMIT} pace_state_t;
  pace_state_t state;

  logic          drv_start, drv_done, drv_dout;
  logic [IW-1:0] px_index;
  anglerfish_pkg::rgb_t px_rgb;
  logic [31:0]   latch_cnt;
  logic          sent;

  assign state_o   = state;
  assign px_rgb    = (px_index == target_pos) ? TARGET_RGB : '0;
  assign drv_start = (state == P_TRANSMIT) && !sent;
  assign dout      = drv_dout;

  ws2811_strip_driver #(.NUM_ICS(NUM_ICS), .T0H(T0H), .T0L(T0L), .T1H(T1H), .T1L(T1L)) u_drv (
    .clk, .rst, .start(drv_start), .px_index, .px_rgb,
    .dout(drv_dout), .busy(), .done(drv_done)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= P_IDLE;
      target_pos <= '0;
      reverse    <= 1'b0;
      turn       <= 1'b0;
      latch_cnt  <= '0;
      sent       <= 1'b0;
    end else begin
      turn <= 1'b0;
      unique case (state)
        P_IDLE: if (enable) begin
          sent  <= 1'b0;
          state <= P_TRANSMIT;
        end
        P_TRANSMIT: begin
          sent <= 1'b1;
          if (drv_done) begin
            latch_cnt <= (latch_cycles < LATCH_MIN) ? LATCH_MIN - 1 : latch_cycles - 1;
            state     <= P_LATCH;
          end
        end
        P_LATCH: begin
          if (latch_cnt != 0) begin
            latch_cnt <= latch_cnt - 1;
          end else if (!enable) begin
            state <= P_IDLE;
          end else if (!reverse && target_pos == IW'(NUM_ICS - 1)) begin
            reverse <= 1'b1;             // far end reached: turn around
            turn    <= 1'b1;
            state   <= P_REVERSE;
          end else if (reverse && target_pos == '0) begin
            reverse <= 1'b0;             // back at the start: next lap
            turn    <= 1'b1;
            state   <= P_FORWARD;
          end else begin
            state <= reverse ? P_REVERSE : P_FORWARD;
          end
        end
        P_FORWARD: begin
          sent       <= 1'b0;
          target_pos <= target_pos + 1'b1;
          state      <= P_TRANSMIT;
        end
        P_REVERSE: begin
          sent       <= 1'b0;
          target_pos <= target_pos - 1'b1;
          state      <= P_TRANSMIT;
        end
        default: state <= P_IDLE;
      endcase
    end
  end

  // the line must be low while the strip latches
  assert property (@(posedge clk) disable iff (rst) (state == P_LATCH) |-> !dout);
endmodule
