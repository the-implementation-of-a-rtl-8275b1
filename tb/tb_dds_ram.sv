// tb_dds_ram: checks every word of the quarter-wave sine table against the
// sine of its sample angle, the registered one-cycle read latency, and that
// the table never decreases up to full scale 0xFFF.
module tb_dds_ram;
  timeunit 1ns;
  timeprecision 1ps;
  import fg_ref_pkg::*;

  logic        clk = 1'b0;
  logic [7:0]  addr;
  logic [11:0] data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dds_ram dut (.clk(clk), .addr(addr), .data(data));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev;
    prev = 2048;
    addr = '0;
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i);
      @(posedge clk);
      // value must not change before the clock edge has been seen
      #1;
      check(int'(data) == sine_ref(i), $sformatf("word %0d = %h expected %h", i, data, sine_ref(i)));
      check(int'(data) >= prev, $sformatf("word %0d below previous", i));
      prev = int'(data);
      @(negedge clk);
    end
    check(prev == 4095, "last word is not full scale");
    // read latency: change the address and look before the next edge
    addr = 8'd0;
    @(posedge clk); #1;
    addr = 8'd255;
    #3;
    check(int'(data) == sine_ref(0), "read is not registered");
    @(posedge clk); #1;
    check(data == 12'hFFF, "registered read of word 255");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
