// dds_ram: quarter-wave sine look-up table of the DDS, 256 words x 12 bits.
//
// The table holds the first quadrant of one sine period in offset binary,
// entry i = 2048 + round(2047 * sin((2i+1) * pi / 1024)), so that entries
// run from just above mid scale (0x806) up to full scale (0xFFF).  Sampling
// at half-step offsets makes the quadrant exactly mirror-symmetric, so the
// DDS can rebuild the other three quadrants by inverting the address and/or
// the data bits.  As in the generator's specification the table keeps the
// full 12-bit width (the one-bit saving a quarter wave would allow is not
// taken).  The half-step sampling is this design's choice.
//
// Interface: one read port.  `addr` is sampled on the rising edge of `clk`
// and the word appears on `data` one cycle later (registered read, so the
// array maps onto a block RAM).  The contents are computed at elaboration;
// there is no write port.
module dds_ram
  import fgen_pkg::*;
(
  input  logic              clk,
  input  logic [LUT_AW-1:0] addr,
  output logic [SAMP_W-1:0] data
);

  localparam int unsigned DEPTH = 1 << LUT_AW;

  logic [SAMP_W-1:0] mem [DEPTH];

  function automatic logic [SAMP_W-1:0] quarter_sine(int unsigned i);
    real ang;
    ang = (2.0 * real'(i) + 1.0) * 3.14159265358979323846 / (4.0 * real'(DEPTH));
    return SAMP_W'(2048 + int'($floor(2047.0 * $sin(ang) + 0.5)));
  endfunction

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) mem[i] = quarter_sine(i);
  end

  always_ff @(posedge clk) data <= mem[addr];

endmodule
