// tb_uart_rx: self-checking testbench of the UART configuration receiver,
// run together with the baud generator that clocks it (100 MHz reference,
// 38400 bps).  A transmitter task sends RS232 characters (start, 8 data
// bits LSB first, stop).  Checked: reset_uclk is high between characters
// and low during them; a configuration packet (header 90 + 14 bytes) lands
// in the 113-bit register in the documented layout, with the data-ready
// flag low until the 14th byte and high after it; a new header clears the
// flag; 0x98 and 0x99 outside a packet hold and release the soft reset,
// while the same values inside a packet are plain data; other bytes
// outside a packet are ignored; a slightly fast transmitter (+2%) is still
// received.
module tb_uart_rx;
  timeunit 1ns;
  timeprecision 1ps;
  import fgen_pkg::*;

  logic         clk = 1'b0;
  logic         reset;
  logic         uart_sin;
  logic         uart_clk, reset_uclk;
  logic [112:0] data_all;
  logic         soft_reset;
  logic [3:0]   sel_baud = 4'd6;
  int checks = 0, failures = 0;
  real bit_ns = 1.0e9 / 38400.0;

  always #5 clk = ~clk;

  uart_baudgen u_bg (.clk(clk), .sel_baud(sel_baud), .reset_uclk(reset_uclk | reset),
                     .uart_clk(uart_clk));
  uart_rx dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_byte(logic [7:0] b);
    uart_sin = 1'b0;
    #(bit_ns);
    check(!reset_uclk, "reset_uclk still high during a character");
    for (int i = 0; i < 8; i++) begin
      uart_sin = b[i];
      #(bit_ns);
    end
    uart_sin = 1'b1;
    #(bit_ns);
    check(reset_uclk, "reset_uclk not back high after the stop bit");
  endtask

  task automatic send_packet(logic [111:0] payload);
    send_byte(8'd90);
    check(!data_all[112], "flag not cleared by the header");
    for (int i = 13; i >= 0; i--) begin
      send_byte(payload[i*8 +: 8]);
      if (i > 0) check(!data_all[112], "flag set before the 14th byte");
    end
    check(data_all[112], "flag not set after 14 bytes");
    check(data_all[111:0] == payload, $sformatf("packet %h expected %h", data_all[111:0], payload));
  endtask

  initial begin
    logic [111:0] p1, p2;
    uart_sin = 1'b1;
    reset = 1'b1;
    repeat (5) @(posedge clk);
    reset = 1'b0;
    #(3 * bit_ns);
    check(reset_uclk && data_all == '0 && !soft_reset, "idle state after reset");

    // Example packet: amplitude 0x60, f1 0x4010040D, f2 0x02431124,
    // phase1 0x231, phase2 0x114, mode 4.
    p1 = 112'h60_4010040D_02431124_0231_0114_04;
    send_packet(p1);

    // Bytes outside a packet that are not commands change nothing.
    send_byte(8'h55);
    send_byte(8'h00);
    check(data_all == {1'b1, p1} && !soft_reset, "stray bytes changed the receiver");

    // Soft reset hold / break.
    send_byte(8'h98);
    check(soft_reset, "0x98 did not set soft reset");
    send_byte(8'h5B);
    check(soft_reset, "soft reset dropped by an unrelated byte");
    send_byte(8'h99);
    check(!soft_reset, "0x99 did not release soft reset");

    // Command values inside a packet are data.
    p2 = 112'h78_98994020_86631004_0099_0398_07;
    send_packet(p2);
    check(!soft_reset, "0x98 inside a packet acted as a command");

    // Fast transmitter, random payload.
    bit_ns = 1.0e9 / (38400.0 * 1.02);
    for (int r = 0; r < 3; r++) begin
      logic [111:0] p;
      for (int i = 0; i < 14; i++) p[i*8 +: 8] = 8'($urandom);
      send_packet(p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
