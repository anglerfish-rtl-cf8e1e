// uart_tx: 8N1 UART transmitter.
//
// A one-cycle start pulse with data latches the byte and sends a low start bit,
// the eight data bits LSB first and a high stop bit, each CLKS_PER_BIT cycles
// long.  tx idles high.  busy is high from the cycle after start until the
// stop bit ends; done is a one-cycle pulse in the cycle after the stop bit.
// start is ignored while busy.  The default of 868 cycles per bit is 115200 baud
// from a 100 MHz clock; the baud rate is this design's choice.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [7:0] data,
  output logic       tx,
  output logic       busy,
  output logic       done
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);
  logic [9:0]    frame;      // stop, data[7:0], start  (sent LSB first)
  logic [3:0]    bit_idx;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      tx      <= 1'b1;
      frame   <= '1;
      bit_idx <= '0;
      cnt     <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        tx <= 1'b1;
        if (start) begin
          frame   <= {1'b1, data, 1'b0};
          tx      <= 1'b0;
          busy    <= 1'b1;
          bit_idx <= '0;
          cnt     <= '0;
        end
      end else if (cnt == CW'(CLKS_PER_BIT - 1)) begin
        cnt <= '0;
        if (bit_idx == 4'd9) begin
          busy <= 1'b0;
          done <= 1'b1;
          tx   <= 1'b1;
        end else begin
          bit_idx <= bit_idx + 1'b1;
          tx      <= frame[bit_idx + 1'b1];
        end
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
