// uart_rx: UART configuration receiver of the function generator.
//
// Byte level: the serial input `uart_sin` (RS232 framing, 8 data bits, LSB
// first, no parity, one stop bit) passes a two-flop synchroniser.  In idle
// the receiver holds `reset_uclk` high.  A high-to-low edge (start bit)
// drops `reset_uclk`, which starts uart_baudgen; the receiver shifts in the
// line on each of the eight rising edges of `uart_clk` (bit centres), then
// waits for the line to be high (stop bit) and raises `reset_uclk` again,
// ready for the next start edge.  There is no framing check.
//
// Packet level: a configuration packet is the header byte 90 followed by 14
// bytes (amplitude, frequency word 1 MSB first, frequency word 2, phase
// word 1 as two bytes, phase word 2, work mode).  The bytes are shifted
// into `data_all[111:0]`, first byte ending up in bits 111:104 and the work
// mode in bits 7:0.  The header clears the data-ready flag `data_all[112]`;
// the 14th byte sets it, telling the controller a complete packet is ready.
// Outside a packet, byte 0x98 sets `soft_reset` (hold reset) and 0x99
// clears it (break reset); other bytes are ignored.  `reset` (synchronous,
// active high) is the hard reset; the soft reset does not reset this block,
// so it can always receive the break command.
//
// The 113-bit register layout, header value, byte order and reset commands
// follow the generator's description; the byte-level state machine, the
// synchroniser and the stop-bit handling are this design's choices.
module uart_rx
  import fgen_pkg::*;
(
  input  logic                  clk,
  input  logic                  reset,
  input  logic                  uart_sin,
  input  logic                  uart_clk,
  output logic                  reset_uclk,
  output logic [DATA_ALL_W-1:0] data_all,
  output logic                  soft_reset
);

  typedef enum logic [1:0] {S_IDLE, S_DATA, S_STOP} rx_state_e;

  rx_state_e state;
  logic      rx_meta, rx_sync, rx_prev, uclk_prev;
  logic      start_edge, uclk_rise;
  logic [7:0] shreg, rx_byte;
  logic [2:0] nbits;
  logic       in_pkt;
  logic [3:0] pkt_cnt;

  always_ff @(posedge clk) begin
    if (reset) begin
      rx_meta   <= 1'b1;
      rx_sync   <= 1'b1;
      rx_prev   <= 1'b1;
      uclk_prev <= 1'b0;
    end else begin
      rx_meta   <= uart_sin;
      rx_sync   <= rx_meta;
      rx_prev   <= rx_sync;
      uclk_prev <= uart_clk;
    end
  end

  assign start_edge = rx_prev & ~rx_sync;
  assign uclk_rise  = uart_clk & ~uclk_prev;
  assign rx_byte    = {rx_sync, shreg[7:1]};

  always_ff @(posedge clk) begin
    if (reset) begin
      state      <= S_IDLE;
      reset_uclk <= 1'b1;
      shreg      <= '0;
      nbits      <= '0;
      in_pkt     <= 1'b0;
      pkt_cnt    <= '0;
      data_all   <= '0;
      soft_reset <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start_edge) begin
          reset_uclk <= 1'b0;
          nbits      <= '0;
          state      <= S_DATA;
        end
        S_DATA: if (uclk_rise) begin
          shreg <= rx_byte;
          nbits <= nbits + 1'b1;
          if (nbits == 3'd7) begin
            state <= S_STOP;
            if (!in_pkt) begin
              if (rx_byte == UART_HEADER) begin
                in_pkt                <= 1'b1;
                pkt_cnt               <= '0;
                data_all[DATA_ALL_W-1] <= 1'b0;
              end else if (rx_byte == UART_HOLD_RESET) begin
                soft_reset <= 1'b1;
              end else if (rx_byte == UART_BREAK_RESET) begin
                soft_reset <= 1'b0;
              end
            end else begin
              data_all[DATA_ALL_W-2:0] <= {data_all[DATA_ALL_W-10:0], rx_byte};
              pkt_cnt                  <= pkt_cnt + 1'b1;
              if (pkt_cnt == 4'(CFG_BYTES - 1)) begin
                in_pkt                 <= 1'b0;
                data_all[DATA_ALL_W-1] <= 1'b1;
              end
            end
          end
        end
        S_STOP: if (rx_sync) begin
          reset_uclk <= 1'b1;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
