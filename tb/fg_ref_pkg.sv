// fg_ref_pkg: reference model functions for the function generator
// testbenches.  They compute expected values from the definitions of the
// design (sine of the full phase angle, waveform shapes, amplitude scaling)
// without reusing the RTL's quadrant decomposition.
package fg_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  // Expected unscaled sine sample for a 10-bit table address: the sine of
  // the angle (2a+1)*pi/1024 scaled by 2047 and rounded away from zero,
  // around 0x800 in the upper half period and 0x7FF in the lower one.
  function automatic int sine_ref(int a);
    real s;
    s = $sin((2.0 * real'(a) + 1.0) * PI / 1024.0);
    if (a < 512) return 2048 + int'($floor(2047.0 * s + 0.5));
    else         return 2047 - int'($floor(-2047.0 * s + 0.5));
  endfunction

  // Expected unscaled sample for waveform w (0 sine, 1 square, 2 triangle,
  // 3 ramp) at table address a.
  function automatic int shape_ref(int w, int a);
    int half_pos;
    case (w)
      0: return sine_ref(a);
      1: return (a < 512) ? 4095 : 0;
      2: begin
        half_pos = a % 512;                       // 0..511
        // 9-bit position stretched to 12 bits by repeating its top bits
        half_pos = half_pos * 8 + half_pos / 64;
        return (a < 512) ? half_pos : 4095 - half_pos;
      end
      default: return a * 4 + a / 256;
    endcase
  endfunction

  // Amplitude scaling about mid scale, floor division by 256.
  function automatic int scale_ref(int sample, int amp);
    int p;
    p = (sample - 2048) * amp;
    if (p >= 0) return 2048 + p / 256;
    else        return 2048 - ((-p + 255) / 256);
  endfunction

  // Waveform chosen by a 5-bit work mode.
  function automatic int mode_wave_ref(int mode);
    if (mode >= 16) return 0;
    return (mode / 4) % 4;
  endfunction

endpackage
