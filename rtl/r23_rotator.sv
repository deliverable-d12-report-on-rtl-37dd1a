// r23_rotator -- the constant rotations inside an 8-point radix-2^3 FFT.
//
// The radix-2^3 decomposition of an 8-point DFT needs no general multiplier:
// after the first butterfly stage some samples are multiplied by -j
// (KIND = ROT_MINUSJ), after the second by W8^m = exp(-j*2*pi*m/8), m = 0..3
// (KIND = ROT_W8). Which sample gets which factor follows from its position t
// (0..63) in the 64-sample frame, counted here over accepted samples. HI is
// the bit of t that carries the first output bit of this 8-point FFT (5 for
// the first FFT, on stride-8 data, and 2 for the second one):
//   ROT_MINUSJ: multiply by -j   when t[HI] & t[HI-1]
//   ROT_W8    : multiply by W8^m when t[HI-2], with m = t[HI] + 2*t[HI-1]
// The 1/sqrt(2) factor of W8^1 and W8^3 is a 16-bit constant multiply with
// rounding and saturation. Purely combinational in the data path; only the
// position counter is clocked, advancing on in_valid.
// The original design names the radix-2^3 algorithm; this factorisation is the
// standard one for it and the arithmetic details are this design's.
`timescale 1ps/1ps
module r23_rotator
  import fft_pkg::*;
#(
  parameter rot_kind_e   KIND = ROT_MINUSJ,
  parameter int unsigned HI   = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_data,
  output logic  out_valid,
  output cplx_t out_data
);

  logic [5:0] t;
  logic [1:0] m;
  logic       sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        t <= '0;
    else if (in_valid) t <= t + 1'b1;
  end

  assign out_valid = in_valid;

  function automatic logic signed [DATA_W-1:0] sat(input logic signed [DATA_W+1:0] v);
    if (v > $signed((DATA_W+2)'(2**(DATA_W-1) - 1)))  return {1'b0, {(DATA_W-1){1'b1}}};
    if (v < -$signed((DATA_W+2)'(2**(DATA_W-1))))     return {1'b1, {(DATA_W-1){1'b0}}};
    return v[DATA_W-1:0];
  endfunction

  // (v * 1/sqrt(2)) rounded, v being a DATA_W+1 bit sum
  function automatic logic signed [DATA_W-1:0] mul_isq2(input logic signed [DATA_W:0] v);
    logic signed [DATA_W+COEF_W:0] p;
    p = v * INV_SQRT2 + (DATA_W+COEF_W+1)'(2**(COEF_FRAC-1));
    return sat(p[DATA_W+COEF_FRAC+1:COEF_FRAC]);
  endfunction

  function automatic logic signed [DATA_W-1:0] neg(input logic signed [DATA_W-1:0] v);
    return sat(-(DATA_W+2)'(v));
  endfunction

  logic signed [DATA_W:0] apb, bma;   // a+b, b-a
  assign apb = in_data.re + in_data.im;
  assign bma = in_data.im - in_data.re;

  always_comb begin
    m   = {t[HI-1], t[HI]};
    sel = 1'b0;
    out_data = in_data;
    case (KIND)
      ROT_MINUSJ: begin
        sel = t[HI] & t[HI-1];
        if (sel) out_data = '{re: in_data.im, im: neg(in_data.re)};
      end
      ROT_W8: begin
        sel = t[HI-2];
        if (sel) begin
          case (m)
            2'd0: out_data = in_data;
            2'd1: out_data = '{re: mul_isq2(apb), im: mul_isq2(bma)};
            2'd2: out_data = '{re: in_data.im, im: neg(in_data.re)};
            2'd3: out_data = '{re: mul_isq2(bma), im: mul_isq2(-apb)};
          endcase
        end
      end
      default: out_data = in_data;
    endcase
  end

endmodule
