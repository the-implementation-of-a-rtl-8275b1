// tb_fg_workloads: runs the frequency and interface corner points of the
// generator's specification on the whole design at default parameters
// (100 MHz reference): a 40 MHz sine loaded over the UART at 38400 bps, a
// 10 MHz triangle and a 10 MHz ramp loaded over I2C, a 500 Hz sine (the
// worked example, frequency word 21475) loaded over the UART at 1200 bps,
// and the 23 mHz resolution (frequency word 1).  For each, every output
// sample is checked against the table address three clocks earlier, and
// the number of completed output periods over the observation window is
// checked against Fout = FCR * 100 MHz / 2^32.
module tb_fg_workloads;
  timeunit 1ns;
  timeprecision 1ps;
  import fg_ref_pkg::*;

  logic        clk = 1'b0;
  logic        reset;
  logic        uart_sin;
  logic [3:0]  sel_baud;
  logic        scl, sda_m, sda_in, sda_drive_low;
  logic        trigger, trig_enb, fpsk_data;
  logic [11:0] wave_out, max_output;
  logic        sync_clk, soft_reset;
  logic [9:0]  ram_addr_out;
  int checks = 0, failures = 0;
  int wraps;
  real bit_ns = 1.0e9 / 38400.0;
  time q = 625ns;

  always #5 clk = ~clk;
  assign sda_in = sda_m & ~sda_drive_low;

  func_gen dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ UART side
  task automatic uart_byte(logic [7:0] b);
    uart_sin = 1'b0;
    #(bit_ns);
    for (int i = 0; i < 8; i++) begin
      uart_sin = b[i];
      #(bit_ns);
    end
    uart_sin = 1'b1;
    #(bit_ns);
  endtask

  task automatic uart_packet(logic [7:0] amp, logic [31:0] f1, logic [31:0] f2,
                             logic [9:0] p1, logic [9:0] p2, logic [4:0] mode);
    logic [111:0] p;
    p = {amp, f1, f2, 6'd0, p1, 6'd0, p2, 3'd0, mode};
    uart_byte(8'd90);
    for (int i = 13; i >= 0; i--) uart_byte(p[i*8 +: 8]);
    #(1us);
  endtask

  // ------------------------------------------------------------- I2C side
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
  endtask

  // Write `bytes` starting at sub-address `sub`; returns 1 if all acked.
  task automatic i2c_write(logic [7:0] sub, logic [7:0] bytes[$], output bit all_ack);
    logic ack;
    all_ack = 1'b1;
    i2c_start();
    i2c_byte(8'h98, ack); all_ack &= ack;
    i2c_byte(sub, ack);   all_ack &= ack;
    foreach (bytes[i]) begin
      i2c_byte(bytes[i], ack); all_ack &= ack;
    end
    i2c_stop();
  endtask

  // ------------------------------------------------------------- checking
  // Observe `n` clocks of free-running output.  Each sample must be the
  // scaled waveform of the address three clocks earlier.  If `exact_step`
  // is non-negative every address step must equal it; the total advance
  // must match n * freq / 2^22 within one table step.
  task automatic observe(int n, int mode, int amp, logic [31:0] freq, int exact_step);
    int hist[$];
    longint advance, expect_adv;
    int w;
    w = mode_wave_ref(mode);
    advance = 0;
    for (int k = 0; k < n; k++) begin
      @(posedge clk); #1;
      hist.push_back(int'(ram_addr_out));
      if (hist.size() > 1) begin
        int d;
        d = (hist[hist.size()-1] - hist[hist.size()-2] + 1024) % 1024;
        advance += d;
        if (exact_step >= 0)
          check(d == exact_step, $sformatf("address step %0d expected %0d", d, exact_step));
      end
      if (hist.size() > 3) begin
        int e;
        e = scale_ref(shape_ref(w, hist[hist.size()-4]), amp);
        check(int'(wave_out) == e,
              $sformatf("mode %0d addr %0d: out %h expected %h", mode,
                        hist[hist.size()-4], wave_out, e));
      end
    end
    expect_adv = (longint'(n - 1) * longint'(freq)) >> 22;
    check(advance >= expect_adv - 1 && advance <= expect_adv + 1,
          $sformatf("phase advance %0d expected %0d", advance, expect_adv));
    wraps = int'(advance / 1024);
  endtask

  // Completed periods over `n` clocks must match n * freq / 2^32.
  task automatic periods(int n, logic [31:0] freq, int mode, int amp);
    longint exp_p;
    observe(n, mode, amp, freq, -1);
    exp_p = (longint'(n - 1) * longint'(freq)) >> 32;
    check(wraps >= exp_p - 1 && wraps <= exp_p + 1,
          $sformatf("%0d periods in %0d clocks, expected %0d", wraps, n, exp_p));
    $display("FCR %0d: %0d periods in %0d clocks (expected %0d)", freq, wraps, n, exp_p);
  endtask

  initial begin
    bit ok;
    reset = 1'b1; uart_sin = 1'b1; sel_baud = 4'd6;
    scl = 1'b1; sda_m = 1'b1;
    trigger = 1'b0; trig_enb = 1'b0; fpsk_data = 1'b0;
    repeat (10) @(posedge clk);
    @(negedge clk) reset = 1'b0;

    // 40 MHz sine and square, loaded over the UART at 38400 bps.
    uart_packet(8'hFF, 32'd1717986918, 32'd429496730, 10'h000, 10'h155, 5'd0);
    periods(100_000, 32'd1717986918, 0, 255);
    // square on frequency 1 via I2C
    i2c_write(8'd14, '{8'h04}, ok); check(ok, "I2C write");
    periods(50_000, 32'd1717986918, 4, 255);
    // 10 MHz triangle and ramp on frequency 2 via I2C
    i2c_write(8'd14, '{8'h0A}, ok); check(ok, "I2C write");
    periods(100_000, 32'd429496730, 10, 255);
    i2c_write(8'd14, '{8'h0F}, ok); check(ok, "I2C write");
    periods(100_000, 32'd429496730, 15, 255);

    // 500 Hz sine, loaded over the UART at 1200 bps (code 1).
    sel_baud = 4'd1;
    bit_ns = 1.0e9 / 1200.0;
    #(1us);
    uart_packet(8'h80, 32'd21475, 32'd1, 10'h000, 10'h000, 5'd0);
    periods(400_000, 32'd21475, 0, 128);

    // 23 mHz resolution: frequency word 1 moves the accumulator by one LSB;
    // the table address does not move within the window.
    i2c_write(8'd14, '{8'h02}, ok); check(ok, "I2C write");
    repeat (10) @(posedge clk);
    begin
      logic [9:0] a0;
      #1 a0 = ram_addr_out;
      repeat (100_000) begin
        @(posedge clk); #1;
        check(ram_addr_out == a0, "address moved at the lowest frequency");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
