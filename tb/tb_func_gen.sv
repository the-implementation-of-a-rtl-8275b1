// tb_func_gen: end-to-end testbench of the function generator at its
// default parameters (100 MHz reference clock, I2C address 1001100).
//
// The generator is configured through both serial interfaces by tasks that
// act as a UART transmitter (38400 bps, baud code 6) and as an I2C bus
// master (400 kbit/s, open-drain SDA).  While it runs, every clock is
// checked: the output sample must equal the selected waveform of the table
// address three clocks earlier, scaled by the amplitude register; the table
// address must advance by the frequency word (exactly, for words that are
// multiples of 2^22, and on average otherwise).  The test walks through:
// a UART packet load, waiting for a trigger, the trigger delay and first
// address (= phase offset), all four waveforms and amplitude scaling, I2C
// single-byte and burst loads, FSK and PSK switching by the external data
// input, the UART soft reset (hold and break) and free running with the
// trigger disabled.  Each mechanism is counted and one that never happened
// is a failure.
module tb_func_gen;
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
  real bit_ns = 1.0e9 / 38400.0;
  time q = 625ns;

  // mechanism counters
  typedef enum int {M_UART_LOAD, M_I2C_LOAD, M_TRIG_WAIT, M_TRIG_START, M_SINE,
                    M_SQUARE, M_TRIANGLE, M_RAMP, M_AMP_SCALE, M_FSK, M_PSK,
                    M_SOFT_HOLD, M_SOFT_BREAK, M_FREE_RUN, M_COUNT} mech_e;
  int mech[M_COUNT];

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
    repeat (5_000_000) @(posedge clk);
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
    case (w)
      0: mech[M_SINE]++;
      1: mech[M_SQUARE]++;
      2: mech[M_TRIANGLE]++;
      default: mech[M_RAMP]++;
    endcase
    if (amp != 255) mech[M_AMP_SCALE]++;
  endtask

  initial begin
    bit ok;
    int lat;
    logic [7:0] burst[$];
    foreach (mech[i]) mech[i] = 0;
    reset = 1'b1; uart_sin = 1'b1; sel_baud = 4'd6;
    scl = 1'b1; sda_m = 1'b1;
    trigger = 1'b0; trig_enb = 1'b1; fpsk_data = 1'b0;
    repeat (10) @(posedge clk);
    @(negedge clk) reset = 1'b0;

    // 1. UART load, trigger enabled: nothing until the trigger.
    uart_packet(8'hF0, 32'h0100_0000, 32'h0040_0000, 10'h100, 10'h200, 5'd0);
    mech[M_UART_LOAD]++;
    repeat (1000) begin
      @(posedge clk); #1;
      check(wave_out == 12'h800 && ram_addr_out == 10'h100, "output before trigger");
    end
    mech[M_TRIG_WAIT]++;
    @(negedge clk) trigger = 1'b1;
    lat = 0;
    do begin
      @(posedge clk); lat++; #1;
    end while (wave_out == 12'h800 && lat < 20);
    check(lat == 5, $sformatf("trigger to first output sample: %0d clocks, expected 5", lat));
    check(wave_out == 12'(scale_ref(sine_ref(10'h100), 8'hF0)),
          "first sample not at the phase offset");
    mech[M_TRIG_START]++;
    @(negedge clk) trigger = 1'b0;
    observe(3000, 0, 8'hF0, 32'h0100_0000, 4);

    // 2. I2C: square wave on frequency 2 / phase 2, amplitude 0x80.
    i2c_write(8'd1, '{8'h80}, ok);  check(ok, "I2C amplitude write not acknowledged");
    i2c_write(8'd14, '{8'h07}, ok); check(ok, "I2C mode write not acknowledged");
    mech[M_I2C_LOAD]++;
    observe(3000, 7, 8'h80, 32'h0040_0000, 1);

    // 3. I2C burst of all 14 registers: triangle, full amplitude.
    burst = '{8'hFF, 8'h03, 8'h45, 8'h67, 8'h89, 8'h00, 8'hC0, 8'h00, 8'h00,
              8'h00, 8'h40, 8'h03, 8'h10, 8'h08};
    i2c_write(8'd1, burst, ok); check(ok, "I2C burst not acknowledged");
    mech[M_I2C_LOAD]++;
    observe(5000, 8, 255, 32'h0345_6789, -1);
    // ramp on frequency 2 (step 3)
    i2c_write(8'd14, '{8'h0E}, ok); check(ok, "I2C mode write not acknowledged");
    observe(3000, 14, 255, 32'h00C0_0000, 3);

    // 4. FSK: fpsk_data chooses frequency 1 or 2.
    i2c_write(8'd2, '{8'h01, 8'h00, 8'h00, 8'h00}, ok);   // f1 = 0x01000000 (step 4)
    i2c_write(8'd14, '{8'h10}, ok); check(ok, "I2C FSK mode write");
    observe(2000, 16, 255, 32'h0100_0000, 4);
    @(negedge clk) fpsk_data = 1'b1;
    repeat (6) @(posedge clk);
    observe(2000, 16, 255, 32'h00C0_0000, 3);
    @(negedge clk) fpsk_data = 1'b0;
    repeat (6) @(posedge clk);
    observe(1000, 16, 255, 32'h0100_0000, 4);
    mech[M_FSK]++;

    // 5. PSK: fpsk_data chooses phase 1 (0x040) or phase 2 (0x310).
    i2c_write(8'd14, '{8'h11}, ok); check(ok, "I2C PSK mode write");
    repeat (6) @(posedge clk);
    begin
      int a0, a1;
      @(posedge clk); #1; a0 = int'(ram_addr_out);
      @(negedge clk) fpsk_data = 1'b1;
      // the phase register changes 3 clocks after the input
      repeat (3) @(posedge clk);
      #1 a1 = int'(ram_addr_out);
      check(a1 == (a0 + 3 * 4 + 10'h310 - 10'h040) % 1024,
            $sformatf("PSK phase jump: %0d -> %0d", a0, a1));
    end
    observe(2000, 17, 255, 32'h0100_0000, 4);
    mech[M_PSK]++;

    // 6. Soft reset over UART: output stops, configuration is lost.
    uart_byte(8'h98);
    #(1us);
    check(soft_reset, "soft reset not held");
    repeat (100) begin
      @(posedge clk); #1;
      check(wave_out == 12'h800 && ram_addr_out == 10'h000, "output during soft reset");
    end
    i2c_write(8'd1, '{8'h55}, ok);
    check(!ok, "I2C acknowledged during soft reset");
    mech[M_SOFT_HOLD]++;
    uart_byte(8'h99);
    #(1us);
    check(!soft_reset, "soft reset not released");
    @(negedge clk) trigger = 1'b1;
    repeat (200) begin
      @(posedge clk); #1;
      check(wave_out == 12'h800 && ram_addr_out == 10'h000,
            "generation resumed with the old configuration");
    end
    @(negedge clk) trigger = 1'b0;
    mech[M_SOFT_BREAK]++;

    // 7. Trigger disabled: a new UART packet starts generation at once.
    trig_enb = 1'b0;
    uart_packet(8'hC8, 32'h1234_5678, 32'h0, 10'h3FF, 10'h0, 5'd0);
    mech[M_UART_LOAD]++;
    observe(4000, 0, 8'hC8, 32'h1234_5678, -1);
    mech[M_FREE_RUN]++;

    foreach (mech[i]) begin
      check(mech[i] > 0, $sformatf("mechanism %s never exercised", mech_e'(i)));
      $display("mechanism %-14s %0d", mech_e'(i), mech[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
