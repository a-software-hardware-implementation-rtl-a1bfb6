// UART transmitter, 8 data bits, no parity, one stop bit.
//
// The serial line idles high. When tx_start is high while the transmitter is
// idle, tx_data is latched and sent as a frame: a low start bit, the eight
// data bits least significant first, and a high stop bit, each held for
// CLK_HZ / BAUD clock cycles (5208 cycles at 50 MHz and 9600 baud). tx_busy is
// high from the cycle after tx_start until the stop bit has been sent; tx_done
// pulses for one cycle at the end of the frame. The baud rate of 9600 and the
// absence of a parity bit follow the design; the 8-bit character, the single
// stop bit and the 50 MHz clock are this design's choices.
//
// Ports: clk, reset (synchronous, active high), tx_start, tx_data[7:0] ->
// txd, tx_busy, tx_done. A frame takes 10 * CLK_HZ / BAUD cycles.
module uart_tx
  import dh_tea_pkg::*;
#(
  parameter int unsigned CLK_HZ = CLK_HZ_DEFAULT,
  parameter int unsigned BAUD   = BAUD_DEFAULT
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       tx_start,
  input  logic [7:0] tx_data,
  output logic       txd,
  output logic       tx_busy,
  output logic       tx_done
);

  localparam int unsigned DIV = CLK_HZ / BAUD;
  localparam int unsigned DW  = (DIV > 1) ? $clog2(DIV) : 1;

  logic [DW-1:0] baud_cnt;
  logic [3:0]    bit_idx;    // 0 = start bit, 1..8 = data, 9 = stop bit
  logic [9:0]    frame;

  always_ff @(posedge clk) begin
    if (reset) begin
      txd      <= 1'b1;
      tx_busy  <= 1'b0;
      tx_done  <= 1'b0;
      baud_cnt <= '0;
      bit_idx  <= '0;
      frame    <= '1;
    end else begin
      tx_done <= 1'b0;
      if (!tx_busy) begin
        if (tx_start) begin
          frame    <= {1'b1, tx_data, 1'b0};
          txd      <= 1'b0;
          tx_busy  <= 1'b1;
          baud_cnt <= '0;
          bit_idx  <= '0;
        end
      end else if (baud_cnt == DW'(DIV - 1)) begin
        baud_cnt <= '0;
        if (bit_idx == 4'd9) begin
          tx_busy <= 1'b0;
          tx_done <= 1'b1;
          txd     <= 1'b1;
        end else begin
          bit_idx <= bit_idx + 1'b1;
          txd     <= frame[bit_idx + 1'b1];
        end
      end else begin
        baud_cnt <= baud_cnt + 1'b1;
      end
    end
  end

endmodule
