// tb_dds: self-checking testbench of the DDS core.
//
// A cycle-by-cycle reference keeps its own 32-bit phase accumulator and
// checks, every clock, the table address (top 10 accumulator bits plus the
// phase offset) and the sine sample two clocks after its address.  It also
// checks the trigger behaviour: nothing is produced while waiting for a
// trigger, the first sample appears 4 clocks after the first clock edge
// that sees the trigger high, the first address equals the phase offset,
// and with the trigger disabled generation starts straight out of reset
// with address 0x000 and sample 0x800 during reset.
module tb_dds;
  timeunit 1ns;
  timeprecision 1ps;
  import fg_ref_pkg::*;

  logic        clk = 1'b0;
  logic        reset;
  logic [31:0] freq_reg;
  logic [9:0]  phase_reg;
  logic        trig_enb, trigger;
  logic [11:0] max_output;
  logic [9:0]  ram_addr_out;
  logic        sample_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dds dut (.*);

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

  // Wait for the first valid sample, then check `n` clocks of generation
  // against the reference.  The first valid sample belongs to the address
  // shown two clocks earlier, i.e. accumulator value 0.
  task automatic run_and_check(int n);
    logic [31:0] acc;
    int addr_hist[$];
    int guard;
    guard = 0;
    do begin
      @(posedge clk); #1; guard++;
    end while (!sample_valid && guard < 50);
    check(sample_valid, "generation did not start");
    addr_hist.push_back(int'(phase_reg));
    addr_hist.push_back((int'(freq_reg >> 22) + int'(phase_reg)) % 1024);
    acc = freq_reg + freq_reg;
    for (int k = 0; k < n; k++) begin
      int exp_addr, a;
      exp_addr = (int'(acc >> 22) + int'(phase_reg)) % 1024;
      check(int'(ram_addr_out) == exp_addr,
            $sformatf("addr %0d expected %0d (k=%0d)", ram_addr_out, exp_addr, k));
      a = addr_hist.pop_front();
      addr_hist.push_back(exp_addr);
      check(sample_valid, "sample_valid low while running");
      check(int'(max_output) == sine_ref(a),
            $sformatf("sample %h for addr %0d expected %h", max_output, a, sine_ref(a)));
      acc = acc + freq_reg;
      @(posedge clk); #1;
    end
  endtask

  initial begin
    int lat;
    reset = 1; trig_enb = 1; trigger = 0;
    freq_reg = 32'd0; phase_reg = 10'h333;
    repeat (4) @(posedge clk);
    #1 reset = 0;
    // Waiting for a trigger: nothing moves.
    freq_reg = 32'h0134_5678;
    repeat (50) begin
      @(posedge clk); #1;
      check(!sample_valid && max_output == 12'h800, "output before trigger");
      check(ram_addr_out == 10'h333, "address moved before trigger");
    end
    // Trigger between clock edges; count edges until the first sample.
    @(negedge clk);
    trigger = 1;
    lat = 0;
    do begin
      @(posedge clk); lat++; #1;
    end while (!sample_valid && lat < 20);
    check(lat == 4, $sformatf("trigger delay %0d clocks, expected 4", lat));
    check(max_output == 12'(sine_ref(10'h333)), "first sample is not at the phase offset");
    trigger = 0;
    // Trigger already consumed: continuous run.  Re-align the reference by
    // restarting generation with a reset.
    #1 reset = 1;
    @(posedge clk); #1;
    check(ram_addr_out == 10'h333 && max_output == 12'h800, "values during reset");
    @(negedge clk);
    trigger = 1;
    reset = 0;
    run_and_check(3000);
    trigger = 0;

    // Trigger disabled: starts right after reset, at a higher frequency.
    reset = 1; trig_enb = 0; phase_reg = 10'h000; freq_reg = 32'd0;
    @(posedge clk); #1;
    check(ram_addr_out == 10'h000 && max_output == 12'h800,
          "reset values: address 0x000, sample 0x800");
    @(negedge clk);
    freq_reg = 32'h0ABC_DEF1; phase_reg = 10'h1F0;
    reset = 0;
    run_and_check(3000);

    // Slow sweep: each sample repeats several clocks (small frequency word).
    @(negedge clk);
    reset = 1;
    @(negedge clk);
    reset = 0; freq_reg = 32'h0010_0000; phase_reg = 10'h3FF;
    run_and_check(5000);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
