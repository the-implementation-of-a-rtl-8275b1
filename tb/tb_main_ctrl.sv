// tb_main_ctrl: self-checking testbench of the main controller.  It plays
// the UART receiver (driving the 113-bit packet register) and the I2C
// receiver (sub-address / data write pulses) and checks the register
// values handed to the DDS for the two example packets of the design
// description, every I2C sub-address, the register selection of all
// non-modulated work modes, FSK and PSK switching by fpsk_data (3-clock
// latency), loading on the rising edge of the data-ready flag only, and
// reset clearing the configuration.
module tb_main_ctrl;
  timeunit 1ns;
  timeprecision 1ps;
  import fgen_pkg::*;

  logic         clk = 1'b0;
  logic         reset;
  logic [112:0] data_all;
  logic         fpsk_data;
  logic [7:0]   i2c_subaddress, i2c_data;
  logic         i2c_wr;
  logic [6:0]   i2c_address;
  logic [31:0]  freq_reg;
  logic [9:0]   phase_reg;
  logic [7:0]   wave_amp;
  logic [4:0]   work_mode;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  main_ctrl dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic i2c_write(logic [7:0] sub, logic [7:0] d);
    @(negedge clk);
    i2c_subaddress = sub; i2c_data = d; i2c_wr = 1'b1;
    @(negedge clk);
    i2c_wr = 1'b0;
  endtask

  // Deliver a packet as the UART receiver does: flag low, data, flag high.
  task automatic uart_packet(logic [111:0] p);
    @(negedge clk);
    data_all[112] = 1'b0;
    @(negedge clk);
    data_all = {1'b1, p};
  endtask

  initial begin
    logic [31:0] f1, f2;
    logic [9:0]  p1, p2;
    reset = 1'b1; data_all = '0; fpsk_data = 1'b0;
    i2c_subaddress = '0; i2c_data = '0; i2c_wr = 1'b0;
    tick(3);
    reset = 1'b0;
    tick(2);
    check(i2c_address == 7'b1001100, "slave address");
    check(freq_reg == 0 && phase_reg == 0 && wave_amp == 0 && work_mode == 0, "reset values");

    // Example 1: mode 4 (square, frequency 1, phase 1).
    uart_packet(112'h60_4010040D_02431124_0231_0114_04);
    tick(3);
    check(freq_reg == 32'h4010040D, $sformatf("ex1 freq %h", freq_reg));
    check(phase_reg == 10'h231, $sformatf("ex1 phase %h", phase_reg));
    check(wave_amp == 8'h60 && work_mode == 5'h04, "ex1 amplitude / mode");

    // Example 2: mode 7 (square, frequency 2, phase 2).
    uart_packet(112'h78_40100420_86631004_0087_0372_07);
    tick(3);
    check(freq_reg == 32'h86631004, $sformatf("ex2 freq %h", freq_reg));
    check(phase_reg == 10'h372, $sformatf("ex2 phase %h", phase_reg));
    check(wave_amp == 8'h78 && work_mode == 5'h07, "ex2 amplitude / mode");

    // The flag staying high does not reload over I2C writes.
    i2c_write(8'd1, 8'hF0);
    tick(2);
    check(wave_amp == 8'hF0, "I2C write overwritten by a stale UART packet");

    // Every I2C sub-address.
    f1 = 32'hCAFE_1234; f2 = 32'h0BAD_F00D; p1 = 10'h2A5; p2 = 10'h15A;
    i2c_write(8'd2,  f1[31:24]); i2c_write(8'd3,  f1[23:16]);
    i2c_write(8'd4,  f1[15:8]);  i2c_write(8'd5,  f1[7:0]);
    i2c_write(8'd6,  f2[31:24]); i2c_write(8'd7,  f2[23:16]);
    i2c_write(8'd8,  f2[15:8]);  i2c_write(8'd9,  f2[7:0]);
    i2c_write(8'd10, {6'd0, p1[9:8]}); i2c_write(8'd11, p1[7:0]);
    i2c_write(8'd12, {6'd0, p2[9:8]}); i2c_write(8'd13, p2[7:0]);
    i2c_write(8'd0,  8'hFF);     // not a register
    i2c_write(8'd15, 8'hFF);     // not a register
    i2c_write(8'd1,  8'h33);
    for (int m = 0; m < 16; m++) begin
      i2c_write(8'd14, 8'(m) | 8'hE0);   // upper bits must be ignored
      tick(2);
      check(work_mode == 5'(m), $sformatf("mode %0d not stored", m));
      check(freq_reg  == (m[1] ? f2 : f1), $sformatf("mode %0d frequency register", m));
      check(phase_reg == (m[0] ? p2 : p1), $sformatf("mode %0d phase register", m));
      check(wave_amp == 8'h33, "amplitude via I2C");
    end

    // FSK: fpsk_data picks the frequency register, 3 clocks latency.
    i2c_write(8'd14, 8'h10);
    @(negedge clk); fpsk_data = 1'b0;
    tick(4);
    check(freq_reg == f1 && phase_reg == p1, "FSK with data 0");
    @(negedge clk); fpsk_data = 1'b1;
    tick(2);
    check(freq_reg == f1, "FSK switched too early");
    tick(1);
    check(freq_reg == f2 && phase_reg == p1, "FSK with data 1");
    // PSK: fpsk_data picks the phase register.
    i2c_write(8'd14, 8'h11);
    tick(2);
    check(freq_reg == f1 && phase_reg == p2, "PSK with data 1");
    @(negedge clk); fpsk_data = 1'b0;
    tick(3);
    check(freq_reg == f1 && phase_reg == p1, "PSK with data 0");

    // Reset clears everything; a packet still flagged is not re-applied.
    @(negedge clk); reset = 1'b1;
    tick(2);
    @(negedge clk); reset = 1'b0;
    tick(5);
    check(freq_reg == 0 && phase_reg == 0 && wave_amp == 0 && work_mode == 0,
          "configuration not cleared by reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
