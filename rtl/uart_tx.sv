// uart_tx: asynchronous serial transmitter (8 data bits, no parity, 1 stop bit).
//
// A byte accepted on the valid/ready handshake is sent as a start bit (0), the eight data bits
// least significant first, and a stop bit (1); each bit lasts CLKS_PER_BIT clocks, 868 by
// default, i.e. 115200 baud from the 100 MHz board clock. The line idles high.
//
// Interface and timing: ready is high only in the idle state; a byte is taken on a clock edge
// with valid && ready, the start bit appears on tx on the next cycle, and ready returns
// 10*CLKS_PER_BIT cycles after the byte was taken.
// Reset is asynchronous, active low. The frame format and baud rate are this design's choice:
// the serial port was only named as the link that sent the bits to a PC.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = prbg_pkg::CLKS_PER_BIT
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       tx
);
  import prbg_pkg::*;

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  uart_state_e   state;
  logic [CW-1:0] baud_cnt;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;
  logic          bit_end;

  always_comb bit_end = (baud_cnt == CW'(CLKS_PER_BIT - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= UART_IDLE;
      baud_cnt <= '0;
      bit_idx  <= '0;
      shreg    <= '0;
      tx       <= 1'b1;
    end else begin
      unique case (state)
        UART_IDLE: begin
          tx       <= 1'b1;
          baud_cnt <= '0;
          if (valid) begin
            shreg <= data;
            tx    <= 1'b0;
            state <= UART_START;
          end
        end
        UART_START: begin
          if (bit_end) begin
            baud_cnt <= '0;
            bit_idx  <= '0;
            tx       <= shreg[0];
            state    <= UART_DATA;
          end else begin
            baud_cnt <= baud_cnt + 1'b1;
          end
        end
        UART_DATA: begin
          if (bit_end) begin
            baud_cnt <= '0;
            if (bit_idx == 3'd7) begin
              tx    <= 1'b1;
              state <= UART_STOP;
            end else begin
              bit_idx <= bit_idx + 1'b1;
              tx      <= shreg[bit_idx + 3'd1];
            end
          end else begin
            baud_cnt <= baud_cnt + 1'b1;
          end
        end
        UART_STOP: begin
          if (bit_end) begin
            baud_cnt <= '0;
            state    <= UART_IDLE;
          end else begin
            baud_cnt <= baud_cnt + 1'b1;
          end
        end
        default: state <= UART_IDLE;
      endcase
    end
  end

  assign ready = (state == UART_IDLE);

  initial assert (CLKS_PER_BIT >= 2) else $error("uart_tx: CLKS_PER_BIT must be at least 2");

endmodule
