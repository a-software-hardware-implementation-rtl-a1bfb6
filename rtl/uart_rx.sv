// UART receiver, 8 data bits, no parity, one stop bit.
//
// rxd is first passed through a two-flop synchronizer. A falling edge on the
// idle-high line starts a frame; the line is sampled in the middle of each bit
// period (CLK_HZ / BAUD clock cycles per bit). A start bit that is no longer
// low at its middle is taken as a glitch and ignored. After the eight data
// bits (least significant first) the stop bit is sampled: rx_data is updated
// and rx_valid pulses for one cycle; frame_err is raised with it when the stop
// bit was low. Baud rate (9600) and no parity follow the design; the rest of
// the frame format, the mid-bit sampling and the error flag are this
// design's choices.
//
// Ports: clk, reset (synchronous, active high), rxd -> rx_data[7:0],
// rx_valid, frame_err.
module uart_rx
  import dh_tea_pkg::*;
#(
  parameter int unsigned CLK_HZ = CLK_HZ_DEFAULT,
  parameter int unsigned BAUD   = BAUD_DEFAULT
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       rxd,
  output logic [7:0] rx_data,
  output logic       rx_valid,
  output logic       frame_err
);

  localparam int unsigned DIV = CLK_HZ / BAUD;
  localparam int unsigned DW  = (DIV > 1) ? $clog2(DIV) : 1;

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rstate_t;

  rstate_t       state;
  logic [1:0]    sync;
  logic [DW-1:0] baud_cnt;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;
  logic          rx_s;

  assign rx_s = sync[1];

  always_ff @(posedge clk) begin
    if (reset) begin
      sync      <= 2'b11;
      state     <= R_IDLE;
      baud_cnt  <= '0;
      bit_idx   <= '0;
      shreg     <= '0;
      rx_data   <= '0;
      rx_valid  <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync     <= {sync[0], rxd};
      rx_valid <= 1'b0;
      unique case (state)
        R_IDLE: begin
          baud_cnt <= '0;
          if (!rx_s) state <= R_START;
        end
        R_START: begin                          // wait to the middle of the start bit
          if (baud_cnt == DW'(DIV / 2 - 1)) begin
            baud_cnt <= '0;
            bit_idx  <= '0;
            state    <= rx_s ? R_IDLE : R_DATA;
          end else begin
            baud_cnt <= baud_cnt + 1'b1;
          end
        end
        R_DATA: begin
          if (baud_cnt == DW'(DIV - 1)) begin
            baud_cnt <= '0;
            shreg    <= {rx_s, shreg[7:1]};
            if (bit_idx == 3'd7) state <= R_STOP;
            bit_idx  <= bit_idx + 1'b1;
          end else begin
            baud_cnt <= baud_cnt + 1'b1;
          end
        end
        R_STOP: begin
          if (baud_cnt == DW'(DIV - 1)) begin
            baud_cnt  <= '0;
            rx_data   <= shreg;
            rx_valid  <= 1'b1;
            frame_err <= !rx_s;
            state     <= R_IDLE;
          end else begin
            baud_cnt <= baud_cnt + 1'b1;
          end
        end
        default: state <= R_IDLE;
      endcase
    end
  end

endmodule
