// tb_uart_baudgen: checks the receive clock of every baud rate code at the
// default 100 MHz reference: no clock while reset_uclk is high, the first
// rising edge 1.5 bit times after reset_uclk falls, then one per bit time,
// exactly eight edges (none for the stop bit), each pulse high for half a
// bit time; codes outside 1..6 give no clock, and raising reset_uclk in the
// middle of a character restarts the sequence.
module tb_uart_baudgen;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned CLK_HZ = 100_000_000;

  logic       clk = 1'b0;
  logic [3:0] sel_baud;
  logic       reset_uclk;
  logic       uart_clk;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  uart_baudgen dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Release reset_uclk and record the clock cycle of each rising and
  // falling edge of uart_clk during `window` cycles.
  task automatic capture(int window, output int rises[$], output int falls[$]);
    logic prev;
    rises = {}; falls = {};
    @(negedge clk);
    reset_uclk = 1'b0;
    prev = uart_clk;
    for (int t = 1; t <= window; t++) begin
      @(posedge clk); #1;
      if (uart_clk && !prev) rises.push_back(t);
      if (!uart_clk && prev) falls.push_back(t);
      prev = uart_clk;
    end
  endtask

  initial begin
    int rises[$], falls[$];
    int baud, n;
    reset_uclk = 1'b1;
    sel_baud   = 4'd4;
    repeat (5) @(posedge clk);
    check(!uart_clk, "clock while reset_uclk high");

    for (int code = 1; code <= 6; code++) begin
      @(negedge clk);
      reset_uclk = 1'b1;
      sel_baud   = 4'(code);
      repeat (3) @(posedge clk);
      baud = 1200 << (code - 1);
      n = (CLK_HZ + baud / 2) / baud;
      capture(11 * n, rises, falls);
      check(rises.size() == 8, $sformatf("code %0d: %0d rising edges, expected 8", code, rises.size()));
      check(falls.size() == 8, $sformatf("code %0d: %0d falling edges", code, falls.size()));
      if (rises.size() == 8 && falls.size() == 8) begin
        check(rises[0] >= n + n / 2 - 1 && rises[0] <= n + n / 2 + 1,
              $sformatf("code %0d: first edge at %0d, expected %0d", code, rises[0], n + n / 2));
        for (int i = 1; i < 8; i++)
          check(rises[i] - rises[i-1] == n,
                $sformatf("code %0d: spacing %0d expected %0d", code, rises[i] - rises[i-1], n));
        for (int i = 0; i < 8; i++)
          check(falls[i] - rises[i] == n / 2,
                $sformatf("code %0d: high time %0d expected %0d", code, falls[i] - rises[i], n / 2));
      end
    end

    // Unused codes give no clock.
    for (int k = 0; k < 3; k++) begin
      logic [3:0] bad;
      bad = (k == 0) ? 4'd0 : (k == 1) ? 4'd7 : 4'd15;
      @(negedge clk);
      reset_uclk = 1'b1;
      sel_baud   = bad;
      repeat (3) @(posedge clk);
      capture(30000, rises, falls);
      check(rises.size() == 0, $sformatf("code %0d produced a clock", bad));
    end

    // Restart in mid character: the sequence begins again from 1.5 bits.
    @(negedge clk);
    reset_uclk = 1'b1;
    sel_baud   = 4'd6;
    repeat (3) @(posedge clk);
    capture(3 * 2604, rises, falls);
    @(negedge clk);
    reset_uclk = 1'b1;
    sel_baud   = 4'd5;     // loaded only while reset_uclk is high
    @(negedge clk);
    check(!uart_clk, "clock not cleared by reset_uclk");
    capture(11 * 5208, rises, falls);
    check(rises.size() == 8 && rises[0] >= 7811 && rises[0] <= 7813,
          "restart after reset_uclk");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
