// bram_uart_readout: sends the whole contents of a block RAM over a UART.
//
// Used to copy the disparity map (or any other memory) to a computer.  A small
// state machine walks the memory from address 0 to DEPTH-1:
//   IDLE      wait for en (a level, e.g. a switch); once the memory has been
//             sent completely it is not sent again until en has gone low
//   INIT      request address 0 and wait the two cycles the memory needs
//   SET_DATA  save the word now on the memory output in a register and request
//             the next address
//   SEND_DATA hand the saved word to the UART and wait for its done pulse, then
//             go to SET_DATA, or to IDLE after the last word
// After the last word the machine returns to IDLE with sent_all set; the
// prototype's description mentions INIT there, and IDLE is this design's
// reading.  Words of DATA_W bits are sent as ceil(DATA_W/8) bytes, low byte
// first; the default memory holds 8-bit disparities, one byte per word.
// Memory reads use the two-cycle-latency port of bram_single_port.
module bram_uart_readout #(
  parameter int unsigned DATA_W       = 8,
  parameter int unsigned DEPTH        = 76800,
  parameter int unsigned CLKS_PER_BIT = 868,
  parameter int unsigned AW           = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  output logic [AW-1:0]     mem_addr,
  input  logic [DATA_W-1:0] mem_data,
  output logic              tx,
  output logic              busy,
  output logic              sent_all
);
  localparam int unsigned BYTES = (DATA_W + 7) / 8;
  localparam int unsigned BW    = (BYTES > 1) ? $clog2(BYTES) : 1;

  typedef enum logic [1:0] {R_IDLE, R_INIT, R_SET_DATA, R_SEND_DATA} rd_state_t;
  rd_state_t state;

  logic [BYTES*8-1:0] word_q;
  logic [1:0]         wait_cnt;
  logic [BW-1:0]      byte_idx;
  logic               last_word, sending;
  logic               u_start, u_busy, u_done;
  logic [7:0]         u_data;

  assign busy   = (state != R_IDLE);
  assign u_data = word_q[8*byte_idx +: 8];

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk, .rst, .start(u_start), .data(u_data), .tx, .busy(u_busy), .done(u_done)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= R_IDLE;
      mem_addr  <= '0;
      word_q    <= '0;
      wait_cnt  <= '0;
      byte_idx  <= '0;
      last_word <= 1'b0;
      sending   <= 1'b0;
      sent_all  <= 1'b0;
      u_start   <= 1'b0;
    end else begin
      u_start <= 1'b0;
      unique case (state)
        R_IDLE: begin
          if (!en) sent_all <= 1'b0;
          else if (!sent_all) state <= R_INIT;
        end

        R_INIT: begin
          mem_addr <= '0;
          wait_cnt <= wait_cnt + 1'b1;
          if (wait_cnt == 2'd2) begin
            wait_cnt <= '0;
            state    <= R_SET_DATA;
          end
        end

        R_SET_DATA: begin
          word_q    <= (BYTES*8)'(mem_data);
          last_word <= (mem_addr == AW'(DEPTH - 1));
          mem_addr  <= (mem_addr == AW'(DEPTH - 1)) ? mem_addr : mem_addr + 1'b1;
          byte_idx  <= '0;
          sending   <= 1'b0;
          state     <= R_SEND_DATA;
        end

        R_SEND_DATA: begin
          if (!sending && !u_busy) begin
            u_start <= 1'b1;
            sending <= 1'b1;
          end else if (u_done) begin
            sending <= 1'b0;
            if (byte_idx != BW'(BYTES - 1)) begin
              byte_idx <= byte_idx + 1'b1;
            end else if (last_word) begin
              sent_all <= 1'b1;
              state    <= R_IDLE;
            end else begin
              state <= R_SET_DATA;
            end
          end
        end

        default: state <= R_IDLE;
      endcase
    end
  end
endmodule
