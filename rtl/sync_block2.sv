// sync_block2 -- synchronous block 2 of the GALS FFT: butterfly stages 2 and 3.
//
// Butterfly stage 2 (16-word delay line), the W8 rotation of the radix-2^3
// algorithm, and butterfly stage 3 (8-word delay line). Its output is the
// result of the first 8-point FFT, in the order of frame position t with the
// three upper bits of t holding the 8-point output index bit-reversed.
// Interface and timing as sync_block1: data-driven valid/ready stream,
// in_ready = out_ready, output combinational for the accepted sample, and
// out_valid low for the first 16 + 8 samples after reset.
// The block contents follow the original design's partition table; the stream
// handshake is this design's.
`timescale 1ps/1ps
module sync_block2
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

  logic  push, s2_valid, r2_valid;
  cplx_t s2_data, r2_data;

  assign in_ready = out_ready;
  assign push     = in_valid && out_ready;

  sdf_bf_stage #(.DELAY(16)) u_bf2 (
    .clk, .rst_n, .in_valid(push), .in_data,
    .out_valid(s2_valid), .out_data(s2_data));

  r23_rotator #(.KIND(ROT_W8), .HI(5)) u_rot2 (
    .clk, .rst_n, .in_valid(s2_valid), .in_data(s2_data),
    .out_valid(r2_valid), .out_data(r2_data));

  sdf_bf_stage #(.DELAY(8)) u_bf3 (
    .clk, .rst_n, .in_valid(r2_valid), .in_data(r2_data),
    .out_valid, .out_data);

endmodule
