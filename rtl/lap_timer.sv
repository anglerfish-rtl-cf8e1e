// lap_timer: split-time recorder of the central unit.
//
// The peripheral unit at the far wall flashes a 38 kHz infra-red burst when the
// swimmer turns; the IR receiver module demodulates it, so ir_rx is active
// (ACTIVE_LOW=1: low) for the length of a burst.  ir_rx is synchronised with two
// flops.  A burst counts as new when the line becomes active after it has been
// inactive for at least GAP_CYCLES, which rejects drop-outs inside one burst.
//
// The timer counts hundredths of a second (one tick every TICK_CYCLES cycles)
// as an 8-digit BCD number from the start pulse.  On each new burst the running
// time is copied to lap_bcd, lap_count increments, new_lap pulses, and the
// running time restarts from zero.  lap_bcd is meant for the seven-segment
// display.  The start pulse, the hundredths resolution, the gap filter and the
// receiver polarity are this design's choices.  new_lap follows the falling
// edge of ir_rx by three cycles.
module lap_timer #(
  parameter int unsigned TICK_CYCLES = 1_000_000,   // 10 ms at 100 MHz
  parameter int unsigned GAP_CYCLES  = 10_000_000,  // 100 ms of silence between bursts
  parameter bit          ACTIVE_LOW  = 1'b1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        ir_rx,
  output logic        running,
  output logic [31:0] time_bcd,
  output logic [31:0] lap_bcd,
  output logic [7:0]  lap_count,
  output logic        new_lap
);
  localparam int unsigned TW = $clog2(TICK_CYCLES + 1);
  localparam int unsigned GW = $clog2(GAP_CYCLES + 1);

  logic [1:0]    sync;
  logic          active, active_q;
  logic [GW-1:0] quiet;
  logic [TW-1:0] tick_cnt;
  logic          tick, burst;

  assign active = sync[1] ^ ACTIVE_LOW;
  assign burst  = active && !active_q && (quiet == GW'(GAP_CYCLES));
  assign tick   = running && (tick_cnt == TW'(TICK_CYCLES - 1));

  // BCD increment of an 8-digit number
  function automatic logic [31:0] bcd_inc(input logic [31:0] v);
    logic [31:0] r;
    logic        c;
    r = v;
    c = 1'b1;
    for (int i = 0; i < 8; i++) begin
      if (c) begin
        if (r[4*i +: 4] == 4'd9) r[4*i +: 4] = 4'd0;
        else begin
          r[4*i +: 4] = r[4*i +: 4] + 4'd1;
          c = 1'b0;
        end
      end
    end
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      sync      <= {2{ACTIVE_LOW}};
      active_q  <= 1'b0;
      quiet     <= GW'(GAP_CYCLES);
      tick_cnt  <= '0;
      running   <= 1'b0;
      time_bcd  <= '0;
      lap_bcd   <= '0;
      lap_count <= '0;
      new_lap   <= 1'b0;
    end else begin
      sync     <= {sync[0], ir_rx};
      active_q <= active;
      new_lap  <= 1'b0;
      if (active) quiet <= '0;
      else if (quiet != GW'(GAP_CYCLES)) quiet <= quiet + 1'b1;

      if (start) begin
        running  <= 1'b1;
        time_bcd <= '0;
        tick_cnt <= '0;
      end else begin
        if (running) tick_cnt <= tick ? '0 : tick_cnt + 1'b1;
        if (burst && running) begin
          lap_bcd   <= time_bcd;
          lap_count <= lap_count + 1'b1;
          new_lap   <= 1'b1;
          time_bcd  <= '0;
          tick_cnt  <= '0;
        end else if (tick) begin
          time_bcd <= bcd_inc(time_bcd);
        end
      end
    end
  end
endmodule
