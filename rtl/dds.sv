// dds: direct digital synthesiser core of the function generator.
//
// A 32-bit phase accumulator adds the frequency control word `freq_reg`
// every clock, so the output frequency is Fout = freq_reg * Fclk / 2^32
// (23 mHz steps at 100 MHz).  The accumulator is quantised to its top 10
// bits and the 10-bit phase offset `phase_reg` is added, giving the look-up
// table address `ram_addr_out` (1024 points per period).  The two top
// address bits select the quadrant: the second and fourth quadrants read the
// quarter-wave table (dds_ram) with the low 8 address bits inverted, and the
// lower half-period inverts the table word, so the 256-word table yields the
// full offset-binary sine 0x000..0xFFF on `max_output`.
//
// Trigger logic: with `trig_enb` low the accumulator runs as soon as reset
// is released.  With `trig_enb` high it waits, accumulator held at zero,
// until a rising edge of the asynchronous `trigger` input; once started it
// keeps running until reset.  `trigger` is registered once and edge
// detected, so the first sample appears on `max_output` on the 4th rising
// clock edge counted from the first edge that sees `trigger` high (the
// 4-clock trigger delay of the specification).  The single input register
// leaves no room for a second synchroniser stage within that budget: an
// asynchronous trigger source should be clean and slow compared with the
// clock.
// The address-to-sample latency is 2 clocks (table read, quadrant mapping).
// While the generator is not running `max_output` holds mid scale 0x800 and
// `sample_valid` is low.  `reset` is synchronous and active high.
//
// Follows the generator's description: accumulator and word widths, the
// quantise-then-add-offset order, the 256 x 12 quarter-sine table, the
// 2-cycle address-to-sample delay and the 4-cycle trigger delay.  The
// trigger register, the hold-at-zero behaviour before a trigger and the
// quadrant-mapping arithmetic are this design's choices.
module dds
  import fgen_pkg::*;
(
  input  logic               clk,
  input  logic               reset,
  input  logic [FREQ_W-1:0]  freq_reg,
  input  logic [PHASE_W-1:0] phase_reg,
  input  logic               trig_enb,
  input  logic               trigger,
  output logic [SAMP_W-1:0]  max_output,
  output logic [PHASE_W-1:0] ram_addr_out,
  output logic               sample_valid
);

  // ---------------------------------------------------------------- trigger
  logic trig_q1, trig_q2, trig_rise, run;

  always_ff @(posedge clk) begin
    if (reset) begin
      trig_q1 <= 1'b0;
      trig_q2 <= 1'b0;
    end else begin
      trig_q1 <= trigger;
      trig_q2 <= trig_q1;
    end
  end

  assign trig_rise = trig_q1 & ~trig_q2;

  always_ff @(posedge clk) begin
    if (reset)                       run <= 1'b0;
    else if (!trig_enb || trig_rise) run <= 1'b1;
  end

  // ------------------------------------------------------ phase accumulator
  logic [FREQ_W-1:0] acc;

  always_ff @(posedge clk) begin
    if (reset)    acc <= '0;
    else if (run) acc <= acc + freq_reg;
  end

  // Quantise to the table resolution, then add the phase offset (mod 1024).
  assign ram_addr_out = acc[FREQ_W-1 -: PHASE_W] + phase_reg;

  // ------------------------------------------------- quarter-wave look-up
  logic [LUT_AW-1:0] lut_addr;
  logic [SAMP_W-1:0] lut_data;
  logic              neg_half_q, valid_q;

  assign lut_addr = ram_addr_out[LUT_AW] ? ~ram_addr_out[LUT_AW-1:0]
                                         :  ram_addr_out[LUT_AW-1:0];

  dds_ram u_ram (
    .clk  (clk),
    .addr (lut_addr),
    .data (lut_data)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      neg_half_q   <= 1'b0;
      valid_q      <= 1'b0;
      max_output   <= MID_SCALE;
      sample_valid <= 1'b0;
    end else begin
      neg_half_q   <= ram_addr_out[PHASE_W-1];
      valid_q      <= run;
      sample_valid <= valid_q;
      if (valid_q) max_output <= neg_half_q ? ~lut_data : lut_data;
      else         max_output <= MID_SCALE;
    end
  end

endmodule
