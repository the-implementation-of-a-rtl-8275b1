// fgen_pkg: types and constants shared by the DDS function generator.
//
// Widths follow the specification of the generator: a 32-bit frequency
// control word, a 10-bit phase offset (the look-up table is addressed with
// 10 bits, i.e. 1024 points per period), 12-bit output samples, an 8-bit
// amplitude register and a 5-bit work-mode register.  The work-mode decode
// (which waveform, which frequency and which phase register) is kept here so
// that the controller and the waveform logic agree on it.
//
// Work-mode encoding: bits [3:2] choose sine/square/triangle/ramp, bit 1
// chooses frequency register 2, bit 0 chooses phase register 2.  The two
// modulation modes use bit 4, which no other mode uses: 5'b10000 is FSK and
// 5'b10001 is PSK, both on a sine carrier.  The placement of the two
// modulation codes is this design's choice.
package fgen_pkg;

  localparam int unsigned FREQ_W  = 32;   // frequency control word
  localparam int unsigned PHASE_W = 10;   // quantised phase / table address
  localparam int unsigned SAMP_W  = 12;   // output sample width
  localparam int unsigned AMP_W   = 8;    // amplitude register
  localparam int unsigned MODE_W  = 5;    // work-mode register
  localparam int unsigned LUT_AW  = 8;    // quarter-wave table: 256 words

  // Offset-binary mid scale (zero of the waveform) and full scale.
  localparam logic [SAMP_W-1:0] MID_SCALE  = 12'h800;
  localparam logic [SAMP_W-1:0] FULL_SCALE = 12'hFFF;

  // Configuration packet header and soft-reset commands on the UART.
  localparam logic [7:0] UART_HEADER      = 8'd90;
  localparam logic [7:0] UART_HOLD_RESET  = 8'h98;
  localparam logic [7:0] UART_BREAK_RESET = 8'h99;
  localparam int unsigned CFG_BYTES       = 14;
  localparam int unsigned DATA_ALL_W      = 8*CFG_BYTES + 1;  // 113 bits

  typedef enum logic [1:0] {
    WAVE_SINE     = 2'd0,
    WAVE_SQUARE   = 2'd1,
    WAVE_TRIANGLE = 2'd2,
    WAVE_RAMP     = 2'd3
  } wave_e;

  typedef logic [MODE_W-1:0] mode_t;

  // Configuration register set held by the main controller.
  typedef struct packed {
    logic [AMP_W-1:0]   amplitude;
    logic [FREQ_W-1:0]  freq1;
    logic [FREQ_W-1:0]  freq2;
    logic [PHASE_W-1:0] phase1;
    logic [PHASE_W-1:0] phase2;
    mode_t              mode;
  } cfg_t;

  function automatic logic mode_is_fsk(mode_t m);
    return m == 5'b10000;
  endfunction

  function automatic logic mode_is_psk(mode_t m);
    return m == 5'b10001;
  endfunction

  // Waveform selected by a work mode; the modulation modes use a sine carrier.
  function automatic wave_e mode_wave(mode_t m);
    if (m[4]) return WAVE_SINE;
    return wave_e'(m[3:2]);
  endfunction

endpackage
