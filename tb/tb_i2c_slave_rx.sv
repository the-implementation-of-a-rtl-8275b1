// tb_i2c_slave_rx: self-checking testbench of the I2C slave receiver.
// A bus-master task set drives SCL and an open-drain SDA (the line is the
// AND of the master's and the slave's drivers) in fast mode (400 kbit/s)
// and standard mode (100 kbit/s) against a 100 MHz system clock.  Checked:
// acknowledge on the 9th clock for the matching write address, the
// sub-address and every data byte; no acknowledge and no register writes
// for another address or a read request; sub-address auto-increment over a
// 14-byte burst; repeated START; the R/W bit on write_read.
module tb_i2c_slave_rx;
  timeunit 1ns;
  timeprecision 1ps;

  logic       clk = 1'b0;
  logic       reset;
  logic       scl, sda_m, sda_in;
  logic       sda_drive_low;
  logic [6:0] address = 7'b1001100;
  logic [7:0] subaddress, data;
  logic       data_wr, write_read, slave_ack;
  int checks = 0, failures = 0;
  int acks_seen = 0;
  time q = 625ns;
  logic [15:0] writes[$];

  always #5 clk = ~clk;
  assign sda_in = sda_m & ~sda_drive_low;

  i2c_slave_rx dut (.*);

  always @(posedge clk) begin
    if (data_wr && !reset)   writes.push_back({subaddress, data});
    if (slave_ack && !reset) acks_seen++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic i2c_start();
    sda_m = 1'b1; #(q); scl = 1'b1; #(q);
    sda_m = 1'b0; #(q);
    scl = 1'b0; #(q);
  endtask

  task automatic i2c_stop();
    sda_m = 1'b0; #(q);
    scl = 1'b1; #(q);
    sda_m = 1'b1; #(2*q);
  endtask

  task automatic i2c_byte(logic [7:0] b, output logic ack);
    for (int i = 7; i >= 0; i--) begin
      sda_m = b[i]; #(q);
      scl = 1'b1; #(2*q);
      scl = 1'b0; #(q);
    end
    sda_m = 1'b1; #(q);
    scl = 1'b1; #(q);
    ack = ~sda_in;
    #(q);
    scl = 1'b0; #(q);
    check(!sda_drive_low, "SDA still held after the acknowledge clock");
  endtask

  initial begin
    logic ack;
    scl = 1'b1; sda_m = 1'b1;
    reset = 1'b1;
    repeat (5) @(posedge clk);
    reset = 1'b0;
    repeat (5) @(posedge clk);

    // 1. Full 14-byte burst from sub-address 1, fast mode.
    i2c_start();
    i2c_byte(8'h98, ack); check(ack, "no ACK for own address");
    check(write_read == 1'b0, "write_read not 0 for a write");
    i2c_byte(8'h01, ack); check(ack, "no ACK for sub-address");
    for (int i = 0; i < 14; i++) begin
      i2c_byte(8'(8'h02 + i), ack);
      check(ack, $sformatf("no ACK for data byte %0d", i));
    end
    i2c_stop();
    check(writes.size() == 14, $sformatf("%0d writes, expected 14", writes.size()));
    for (int i = 0; i < 14 && i < writes.size(); i++)
      check(writes[i] == {8'(i + 1), 8'(8'h02 + i)},
            $sformatf("write %0d: %h", i, writes[i]));
    check(acks_seen == 16, $sformatf("%0d acknowledges, expected 16", acks_seen));
    writes = {};

    // 2. Another slave's address: ignored.
    i2c_start();
    i2c_byte(8'h9A, ack); check(!ack, "ACK for a foreign address");
    i2c_byte(8'h02, ack); check(!ack, "ACK after a foreign address");
    i2c_byte(8'h55, ack); check(!ack, "ACK for foreign data");
    i2c_stop();
    check(writes.size() == 0, "write for a foreign address");

    // 3. Read request to our address: not supported, not acknowledged.
    i2c_start();
    i2c_byte(8'h99, ack); check(!ack, "ACK for a read request");
    check(write_read == 1'b1, "write_read not 1 for a read");
    i2c_byte(8'h02, ack); check(!ack, "ACK after a read request");
    i2c_stop();
    check(writes.size() == 0, "write during a read request");

    // 4. Standard mode, short write, then a repeated START.
    q = 2500ns;
    i2c_start();
    i2c_byte(8'h98, ack); check(ack, "standard mode: no address ACK");
    i2c_byte(8'h05, ack); check(ack, "standard mode: no sub-address ACK");
    i2c_byte(8'hA5, ack); check(ack, "standard mode: no data ACK");
    i2c_byte(8'h3C, ack); check(ack, "standard mode: no data ACK");
    i2c_start();            // repeated START
    i2c_byte(8'h98, ack); check(ack, "no ACK after repeated START");
    i2c_byte(8'h0E, ack); check(ack, "no sub-address ACK after repeated START");
    i2c_byte(8'h13, ack); check(ack, "no data ACK after repeated START");
    i2c_stop();
    check(writes.size() == 3, $sformatf("%0d writes, expected 3", writes.size()));
    if (writes.size() == 3) begin
      check(writes[0] == 16'h05A5, "standard mode write 0");
      check(writes[1] == 16'h063C, "auto-increment in standard mode");
      check(writes[2] == 16'h0E13, "write after repeated START");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
