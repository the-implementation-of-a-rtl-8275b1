// tb_fg_spectrum: spectral purity of the DDS sine output.
//
// The DDS runs with frequency words k * 2^20 (k odd), so the accumulator
// returns to its start after exactly 4096 clocks and its low 22 bits are
// not zero: the 10-bit phase truncation is active.  4096 consecutive
// samples of max_output are captured and a direct DFT over all bins gives
// the spurious-free dynamic range, carrier power against the largest other
// bin (DC excluded).  A 1024-point, 12-bit quarter-wave table is expected
// to give about 60 dB; each run must reach at least 57 dB.  The carrier
// must also sit in bin k.
module tb_fg_spectrum;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int N = 4096;
  localparam real PI = 3.14159265358979323846;

  logic        clk = 1'b0;
  logic        reset;
  logic [31:0] freq_reg;
  logic [9:0]  phase_reg;
  logic        trig_enb = 1'b0, trigger = 1'b0;
  logic [11:0] max_output;
  logic [9:0]  ram_addr_out;
  logic        sample_valid;
  int checks = 0, failures = 0;
  real x[N];
  real cos_t[N], sin_t[N];

  always #5 clk = ~clk;

  dds dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(int k, int phase);
    real best_spur, carrier, p, re, im, sfdr;
    int peak_bin;
    @(negedge clk);
    reset = 1'b1; freq_reg = 32'(k) << 20; phase_reg = 10'(phase);
    repeat (2) @(negedge clk);
    reset = 1'b0;
    do @(posedge clk); while (!sample_valid);
    for (int n = 0; n < N; n++) begin
      #1 x[n] = real'(max_output) - 2047.5;
      @(posedge clk);
    end
    carrier = 0.0; best_spur = 0.0; peak_bin = 0;
    for (int b = 1; b <= N / 2; b++) begin
      re = 0.0; im = 0.0;
      for (int n = 0; n < N; n++) begin
        int idx;
        idx = (b * n) % N;
        re += x[n] * cos_t[idx];
        im += x[n] * sin_t[idx];
      end
      p = re * re + im * im;
      if (p > carrier) begin
        if (carrier > best_spur) best_spur = carrier;
        carrier = p; peak_bin = b;
      end else if (p > best_spur) begin
        best_spur = p;
      end
    end
    sfdr = 10.0 * $log10(carrier / best_spur);
    $display("k=%0d (Fout = %0.3f MHz at 100 MHz): carrier bin %0d, SFDR %0.1f dB",
             k, 100.0 * k / N, peak_bin, sfdr);
    check(peak_bin == k, $sformatf("carrier in bin %0d, expected %0d", peak_bin, k));
    check(sfdr >= 57.0, $sformatf("SFDR %0.1f dB below 57 dB", sfdr));
  endtask

  initial begin
    for (int n = 0; n < N; n++) begin
      cos_t[n] = $cos(2.0 * PI * real'(n) / real'(N));
      sin_t[n] = $sin(2.0 * PI * real'(n) / real'(N));
    end
    reset = 1'b1; freq_reg = '0; phase_reg = '0;
    repeat (3) @(posedge clk);
    measure(37, 0);
    measure(301, 123);
    measure(1001, 700);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
