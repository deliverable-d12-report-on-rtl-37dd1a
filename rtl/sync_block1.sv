// sync_block1 -- synchronous block 1 of the GALS FFT: butterfly stage 1.
//
// Holds butterfly stage 1 (32-word delay line) and the -j rotation that the
// radix-2^3 algorithm applies to its output. It is one of the four clock
// domains of the chip; its input arrives through a P port and its output
// leaves through a D port.
// Interface: a valid/ready stream in and out. The block is data-driven: a
// sample is accepted (and the block state advances) only when in_valid and
// out_ready are both high, so in_ready = out_ready. The output of an accepted
// sample is presented combinationally in the same cycle; out_valid is low
// while the delay line fills (first 32 samples after reset).
// The split of the stages over four blocks follows the original design's partition
// table; the stream handshake is this design's.
`timescale 1ps/1ps
module sync_block1
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

  logic  push, s1_valid;
  cplx_t s1_data;

  assign in_ready = out_ready;
  assign push     = in_valid && out_ready;

  sdf_bf_stage #(.DELAY(32)) u_bf1 (
    .clk, .rst_n, .in_valid(push), .in_data,
    .out_valid(s1_valid), .out_data(s1_data));

  r23_rotator #(.KIND(ROT_MINUSJ), .HI(5)) u_rot1 (
    .clk, .rst_n, .in_valid(s1_valid), .in_data(s1_data),
    .out_valid, .out_data);

endmodule
