// sdf_bf_stage -- one radix-2 butterfly stage of the pipelined FFT, built as a
// single-path delay-feedback (SDF) stage.
//
// The stage takes one complex sample per accepted input (in_valid) and gives
// one complex sample back for it. A delay line of DELAY words (DELAY = 32, 16,
// 8, 4, 2, 1 for butterfly stages 1..6 of the 64-point FFT) pairs sample p
// with sample p+DELAY. In the first half of each 2*DELAY-sample group the
// input is written into the delay line and the line's oldest word (a stored
// difference) is output; in the second half the stage outputs
// (a+b)/2 and writes (a-b)/2 back, a being the delayed and b the current
// sample. The division by two keeps the word width constant; a 64-point
// transform therefore comes out scaled by 1/64.
//
// Timing: the stage is data-driven. out is a combinational function of in and
// the stage state; the state advances only on in_valid. Sample p of the input
// stream leaves as output DELAY accepted samples later; out_valid is low for
// the first DELAY inputs after reset while the delay line fills.
// The original design names the six butterfly stages and their grouping; the SDF
// organisation, the scaling and the data-driven timing are this design's.
`timescale 1ps/1ps
module sdf_bf_stage
  import fft_pkg::*;
#(
  parameter int unsigned DELAY = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_data,
  output logic  out_valid,
  output cplx_t out_data
);

  localparam int unsigned AW = (DELAY > 1) ? $clog2(DELAY) : 1;

  cplx_t           dline [DELAY];
  logic [AW-1:0]   ptr;
  logic            phase;    // 0: fill half, 1: butterfly half
  logic            primed;   // delay line holds DELAY valid words
  cplx_t           head, wr_data;
  logic signed [DATA_W:0] sum_re, sum_im, dif_re, dif_im;

  assign head   = dline[ptr];
  assign sum_re = head.re + in_data.re;
  assign sum_im = head.im + in_data.im;
  assign dif_re = head.re - in_data.re;
  assign dif_im = head.im - in_data.im;

  always_comb begin
    if (phase) begin
      out_data = '{re: half(sum_re), im: half(sum_im)};
      wr_data  = '{re: half(dif_re), im: half(dif_im)};
    end else begin
      out_data = head;
      wr_data  = in_data;
    end
  end

  assign out_valid = in_valid && primed;

  always_ff @(posedge clk) begin
    if (in_valid) dline[ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr    <= '0;
      phase  <= 1'b0;
      primed <= 1'b0;
    end else if (in_valid) begin
      if (ptr == AW'(DELAY - 1)) begin
        ptr    <= '0;
        phase  <= ~phase;
        primed <= 1'b1;
      end else begin
        ptr <= ptr + 1'b1;
      end
    end
  end

endmodule
