// tb_wave_logic: self-checking testbench of the waveform construction,
// amplitude scaling and output selection.  The testbench plays the DDS: it
// presents a table address and, two clocks later, the sine sample of that
// address, and checks every output against the reference shapes and the
// scaling formula, one clock after the sine sample.  It includes the
// worked example of the design description (sample 0x864, amplitude 0xF0
// gives 0x85D), mid-scale output while no samples are valid, and the DAC
// clock being the inverted system clock.
module tb_wave_logic;
  timeunit 1ns;
  timeprecision 1ps;
  import fg_ref_pkg::*;

  logic        clk = 1'b0;
  logic        reset;
  logic [9:0]  ram_addr_out;
  logic [11:0] max_output;
  logic        sample_valid;
  logic [7:0]  wave_amp;
  logic [4:0]  work_mode;
  logic [11:0] wave_out;
  logic        sync_clk;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  wave_logic dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(clk) begin
    #1;
    check(sync_clk == ~clk, "sync_clk is not the inverted clock");
  end

  // Stream addresses; sine sample follows its address by two clocks and
  // wave_out follows the sine sample by one.
  task automatic stream(int mode, int amp, int start, int step, int n);
    int hist[$];
    work_mode = 5'(mode); wave_amp = 8'(amp);
    for (int k = 0; k < n + 3; k++) begin
      int a;
      @(negedge clk);
      a = (start + k * step) % 1024;
      ram_addr_out = 10'(a);
      hist.push_back(a);
      if (hist.size() >= 3) max_output = 12'(sine_ref(hist[hist.size()-3]));
      if (hist.size() >= 4) begin
        int e;
        e = scale_ref(shape_ref(mode_wave_ref(mode), hist[hist.size()-4]), amp);
        check(int'(wave_out) == e,
              $sformatf("mode %0d amp %0d addr %0d: %h expected %h",
                        mode, amp, hist[hist.size()-4], wave_out, e));
      end
    end
  endtask

  initial begin
    reset = 1'b1; ram_addr_out = '0; max_output = 12'h800;
    sample_valid = 1'b0; wave_amp = 8'hFF; work_mode = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 1'b0;
    repeat (3) @(posedge clk); #1;
    check(wave_out == 12'h800, "output not mid scale while samples are invalid");

    // Worked example of the description.
    @(negedge clk);
    sample_valid = 1'b1; work_mode = 5'd0; wave_amp = 8'hF0; max_output = 12'h864;
    @(posedge clk); #1;
    check(wave_out == 12'h85D, $sformatf("0x864 x 0xF0 gave %h, expected 85D", wave_out));

    // All waveforms, full and reduced amplitude, all addresses.
    for (int mode = 0; mode < 16; mode += 4) begin
      stream(mode, 255, 0, 1, 1024);
      stream(mode, 128, 7, 3, 400);
      stream(mode + 3, 1, 900, 17, 200);
      stream(mode + 1, 0, 5, 5, 50);
    end
    // Modulation modes use the sine.
    stream(16, 200, 0, 9, 300);
    stream(17, 77, 300, 31, 300);

    // Samples invalid again: mid scale.
    @(negedge clk) sample_valid = 1'b0;
    @(posedge clk); #1;
    check(wave_out == 12'h800, "output not mid scale after sample_valid fell");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
