// uart_baudgen: UART receive-clock generator.
//
// Produces `uart_clk`, a clock whose rising edges fall in the centre of the
// eight data bits of an RS232 character.  While `reset_uclk` is high the
// counters are cleared, no clock is produced and the 4-bit baud selection
// `sel_baud` is loaded into the baud rate register.  When the receiver drops
// `reset_uclk` at the leading edge of a start bit, the first rising edge
// follows 1.5 bit times later (middle of D0) and then one every bit time,
// eight in all; no edge is produced for the start or the stop bit.  Each
// pulse is high for half a bit time.
//
// Baud rate register (from the generator's selection table):
//   1 -> 1200, 2 -> 2400, 3 -> 4800, 4 -> 9600, 5 -> 19200, 6 -> 38400 bps.
// Any other code produces no clock.  The bit time in clocks is
// round(CLK_HZ / baud); CLK_HZ defaults to the 100 MHz reference clock.
// The counter-based implementation and the silence on unused codes are this
// design's choices.
module uart_baudgen #(
  parameter int unsigned CLK_HZ    = 100_000_000,
  parameter int unsigned DATA_BITS = 8
) (
  input  logic       clk,
  input  logic [3:0] sel_baud,
  input  logic       reset_uclk,
  output logic       uart_clk
);

  localparam int unsigned CNT_W = $clog2(CLK_HZ / 1200 * 2 + 1);

  typedef logic [CNT_W-1:0] cnt_t;
  typedef cnt_t bit_table_t [16];

  // Bit time in clocks for every selection code, worked out at elaboration
  // so that the hardware holds only a 16-entry constant table.
  function automatic bit_table_t bit_table();
    bit_table_t t;
    for (int unsigned sel = 0; sel < 16; sel++) begin
      int unsigned baud;
      if (sel == 0 || sel > 6) begin
        t[sel] = '0;
      end else begin
        baud   = 1200 << (sel - 1);
        t[sel] = cnt_t'((CLK_HZ + baud / 2) / baud);
      end
    end
    return t;
  endfunction

  localparam bit_table_t BIT_CLOCKS = bit_table();

  logic [3:0]       baud_reg;
  logic [CNT_W-1:0] period, cnt, target;
  logic [3:0]       pulses;
  logic             first;

  assign period = BIT_CLOCKS[baud_reg];
  // First edge 1.5 bit times after the start edge, then one per bit time.
  assign target = first ? period + (period >> 1) : period;

  always_ff @(posedge clk) begin
    if (reset_uclk) begin
      baud_reg <= sel_baud;
      cnt      <= '0;
      pulses   <= '0;
      first    <= 1'b1;
      uart_clk <= 1'b0;
    end else if (period != '0) begin
      if (pulses < 4'(DATA_BITS)) begin
        if (cnt == target - 1'b1) begin
          cnt      <= '0;
          first    <= 1'b0;
          pulses   <= pulses + 1'b1;
          uart_clk <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end else begin
        cnt <= cnt + 1'b1;
      end
      // Falling edge half a bit time after each rising edge.
      if (uart_clk && cnt == (period >> 1) - 1'b1) uart_clk <= 1'b0;
    end
  end

endmodule
