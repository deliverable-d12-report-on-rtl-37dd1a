// twiddle_cmult -- the one general complex multiplier of the 64-point FFT.
//
// Between the two cascaded 8-point FFTs every sample is multiplied by
// W64^e = exp(-j*2*pi*e/64). With the frame position t (0..63) of the sample,
// counted over accepted samples, the first FFT's output index is
// k = bitrev3(t[5:3]) and the second FFT's input index is n = t[2:0], so
// e = n * k. The cosine and sine of 2*pi*e/64 come from the 17-entry
// quarter-wave table QCOS of fft_pkg by quadrant symmetry.
// (a + jb)(c - js) = (ac + bs) + j(bc - as), rounded and saturated back to
// DATA_W bits. The data path is combinational; the position counter advances
// on in_valid, so out belongs to the same accepted sample as in.
// The original design gives the multiplier's place and purpose; the table form, the
// rounding and the combinational timing are this design's.
`timescale 1ps/1ps
module twiddle_cmult
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_data,
  output logic  out_valid,
  output cplx_t out_data
);

  logic [5:0] t, e;
  logic [2:0] k, n;
  logic [4:0] r;
  logic signed [COEF_W-1:0] c, s;
  logic signed [DATA_W+COEF_W:0] pre, pim;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        t <= '0;
    else if (in_valid) t <= t + 1'b1;
  end

  assign k = {t[3], t[4], t[5]};
  assign n = t[2:0];
  assign e = 6'(k * n);
  assign r = {1'b0, e[3:0]};

  always_comb begin
    case (e[5:4])
      2'd0: begin c =  QCOS[r];      s =  QCOS[16-r]; end
      2'd1: begin c = -QCOS[16-r];   s =  QCOS[r];    end
      2'd2: begin c = -QCOS[r];      s = -QCOS[16-r]; end
      default: begin c = QCOS[16-r]; s = -QCOS[r];    end
    endcase
  end

  function automatic logic signed [DATA_W-1:0] rnd_sat(input logic signed [DATA_W+COEF_W:0] p);
    logic signed [DATA_W+COEF_W:0] q;
    q = (p + (DATA_W+COEF_W+1)'(2**(COEF_FRAC-1))) >>> COEF_FRAC;
    if (q > (DATA_W+COEF_W+1)'(2**(DATA_W-1) - 1)) return {1'b0, {(DATA_W-1){1'b1}}};
    if (q < -(DATA_W+COEF_W+1)'(2**(DATA_W-1)))    return {1'b1, {(DATA_W-1){1'b0}}};
    return q[DATA_W-1:0];
  endfunction

  assign pre = in_data.re * c + in_data.im * s;
  assign pim = in_data.im * c - in_data.re * s;

  assign out_data  = '{re: rnd_sat(pre), im: rnd_sat(pim)};
  assign out_valid = in_valid;

endmodule
