// sync_block4 -- synchronous block 4 of the GALS FFT: butterfly stages 4, 5, 6.
//
// The second 8-point radix-2^3 FFT: butterfly stage 4 (4-word delay line),
// -j rotation, stage 5 (2 words), W8 rotation, stage 6 (1 word). Its output
// is the 64-point transform scaled by 1/64, in bit-reversed order: the sample
// at frame position t is X[bitrev6(t)].
// Interface and timing as sync_block1: data-driven valid/ready stream,
// in_ready = out_ready, output combinational for the accepted sample, and
// out_valid low for the first 4 + 2 + 1 samples after reset.
// The block contents follow the original design's partition table; the output order
// and the stream handshake are this design's.
`timescale 1ps/1ps
module sync_block4
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_data,
  output logic  in_ready,
  output logic  out_valid,
  output cplx_t out_data,
  input  logic  out_ready
);

  logic  push, s4_valid, r4_valid, s5_valid, r5_valid;
  cplx_t s4_data, r4_data, s5_data, r5_data;

  assign in_ready = out_ready;
  assign push     = in_valid && out_ready;

  sdf_bf_stage #(.DELAY(4)) u_bf4 (
    .clk, .rst_n, .in_valid(push), .in_data,
    .out_valid(s4_valid), .out_data(s4_data));

  r23_rotator #(.KIND(ROT_MINUSJ), .HI(2)) u_rot4 (
    .clk, .rst_n, .in_valid(s4_valid), .in_data(s4_data),
    .out_valid(r4_valid), .out_data(r4_data));

  sdf_bf_stage #(.DELAY(2)) u_bf5 (
    .clk, .rst_n, .in_valid(r4_valid), .in_data(r4_data),
    .out_valid(s5_valid), .out_data(s5_data));

  r23_rotator #(.KIND(ROT_W8), .HI(2)) u_rot5 (
    .clk, .rst_n, .in_valid(s5_valid), .in_data(s5_data),
    .out_valid(r5_valid), .out_data(r5_data));

  sdf_bf_stage #(.DELAY(1)) u_bf6 (
    .clk, .rst_n, .in_valid(r5_valid), .in_data(r5_data),
    .out_valid, .out_data);

endmodule
