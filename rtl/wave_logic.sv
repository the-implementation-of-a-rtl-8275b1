// wave_logic: waveform construction, amplitude scaling and output selection.
//
// The DDS provides sine samples (`max_output`, offset binary, 0x800 = zero)
// and the look-up table address `ram_addr_out`, which sweeps 0..1023 once
// per output period.  This block builds the other waveforms from that
// address, delayed by two clocks so that it lines up with the sine sample
// for the same address:
//   ramp      {a, a[9:8]}                      (address stretched to 12 bits)
//   square    0xFFF in the first half period, 0x000 in the second
//   triangle  rising 0x000->0xFFF over the first half, falling over the second
// The waveform is chosen by the work mode (see fgen_pkg) and scaled about
// mid scale by the 8-bit amplitude register:
//   out = 0x800 + ((sample - 0x800) * amplitude) >>> 8
// (e.g. sample 0x864, amplitude 0xF0 -> 0x85D), then registered.  While the
// DDS is not producing samples (`sample_valid` low) the output is 0x800.
// Latency: `wave_out` follows `max_output` by one clock.
//
// `sync_clk` is the inverted system clock: samples change on the rising
// edge of `clk`, so a DAC clocked on the rising edge of `sync_clk` converts
// in the middle of the sample.  `reset` is synchronous, active high.
//
// Follows the generator's description: the waveforms are derived from the
// table address, the amplitude is applied by multiplication, the work mode
// drives the output multiplexer and the DAC clock is the inverted clock.
// The exact shape formulas, the scaling about mid scale with a shift by 8
// (which reproduces the example value above) and the use of one multiplier
// after the multiplexer instead of one per waveform are this design's
// choices.
module wave_logic
  import fgen_pkg::*;
(
  input  logic               clk,
  input  logic               reset,
  input  logic [PHASE_W-1:0] ram_addr_out,
  input  logic [SAMP_W-1:0]  max_output,
  input  logic               sample_valid,
  input  logic [AMP_W-1:0]   wave_amp,
  input  mode_t              work_mode,
  output logic [SAMP_W-1:0]  wave_out,
  output logic               sync_clk
);

  assign sync_clk = ~clk;

  logic [PHASE_W-1:0] addr_d1, addr_d2;

  always_ff @(posedge clk) begin
    if (reset) begin
      addr_d1 <= '0;
      addr_d2 <= '0;
    end else begin
      addr_d1 <= ram_addr_out;
      addr_d2 <= addr_d1;
    end
  end

  logic [SAMP_W-1:0] ramp, square, triangle, rise, selected;

  assign ramp     = {addr_d2, addr_d2[PHASE_W-1 -: 2]};
  assign square   = addr_d2[PHASE_W-1] ? '0 : FULL_SCALE;
  assign rise     = {addr_d2[PHASE_W-2:0], addr_d2[PHASE_W-2 -: 3]};
  assign triangle = addr_d2[PHASE_W-1] ? ~rise : rise;

  always_comb begin
    unique case (mode_wave(work_mode))
      WAVE_SINE:     selected = max_output;
      WAVE_SQUARE:   selected = square;
      WAVE_TRIANGLE: selected = triangle;
      WAVE_RAMP:     selected = ramp;
      default:       selected = max_output;
    endcase
  end

  // Signed scaling about mid scale.
  logic signed [SAMP_W:0]         centred;
  logic signed [SAMP_W+AMP_W+1:0] product;
  logic signed [SAMP_W:0]         scaled;

  assign centred = $signed({1'b0, selected}) - $signed({1'b0, MID_SCALE});
  assign product = centred * $signed({1'b0, wave_amp});
  assign scaled  = (SAMP_W+1)'(product >>> AMP_W);

  always_ff @(posedge clk) begin
    if (reset)             wave_out <= MID_SCALE;
    else if (sample_valid) wave_out <= SAMP_W'(scaled + $signed({1'b0, MID_SCALE}));
    else                   wave_out <= MID_SCALE;
  end

endmodule
