// fft_pkg -- types and constants shared by the 64-point GALS FFT.
//
// A sample is a complex number with DATA_W-bit two's-complement real and
// imaginary parts (cplx_t). Twiddle factors are COEF_W-bit signed numbers with
// COEF_FRAC fractional bits, so 1.0 is 2**COEF_FRAC. The quarter-wave table
// QCOS holds round(2**14 * cos(2*pi*i/64)) for i = 0..16; every other W64
// power is derived from it by symmetry in twiddle_cmult. The word widths are
// this design's own choice: the original design only fixes the 64-point size, the
// two cascaded 8-point radix-2^3 FFTs and the single twiddle multiplier.
`timescale 1ps/1ps
package fft_pkg;

  localparam int unsigned N_POINTS  = 64;  // FFT size
  localparam int unsigned DATA_W    = 16;  // bits per real / imaginary part
  localparam int unsigned COEF_W    = 16;  // twiddle coefficient width
  localparam int unsigned COEF_FRAC = 14;  // fractional bits of a coefficient

  typedef struct packed {
    logic signed [DATA_W-1:0] re;
    logic signed [DATA_W-1:0] im;
  } cplx_t;

  // round(2**14 * cos(2*pi*i/64)), i = 0..16
  localparam logic signed [COEF_W-1:0] QCOS [17] = '{
    16'sd16384, 16'sd16305, 16'sd16069, 16'sd15679, 16'sd15137, 16'sd14449,
    16'sd13623, 16'sd12665, 16'sd11585, 16'sd10394, 16'sd9102,  16'sd7723,
    16'sd6270,  16'sd4756,  16'sd3196,  16'sd1606,  16'sd0
  };

  // 1/sqrt(2) in the coefficient format, used by the W8 rotations
  localparam logic signed [COEF_W-1:0] INV_SQRT2 = 16'sd11585;

  // Rotation applied after a butterfly stage inside an 8-point radix-2^3 FFT
  typedef enum logic [1:0] {
    ROT_NONE  = 2'd0,  // no rotation
    ROT_MINUSJ = 2'd1, // multiply by -j where selected (after 1st stage)
    ROT_W8    = 2'd2   // multiply by W8^m where selected (after 2nd stage)
  } rot_kind_e;

  // Test modes of the chip (Table "average operating current" labels)
  // bit 2: GALS (local ring oscillators) / synchronous (external clock)
  // bit 1: clock phase shift (skew) between blocks
  // bit 0: clock jitter
  typedef enum logic [2:0] {
    MODE_S_N  = 3'b000,
    MODE_S_J  = 3'b001,
    MODE_G_N  = 3'b100,
    MODE_G_J  = 3'b101,
    MODE_G_S  = 3'b110,
    MODE_G_SJ = 3'b111
  } chip_mode_e;

  // Arithmetic shift right by one with rounding toward minus infinity
  function automatic logic signed [DATA_W-1:0] half(input logic signed [DATA_W:0] v);
    return v[DATA_W:1];
  endfunction

endpackage
