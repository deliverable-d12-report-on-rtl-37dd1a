// sync_block3 -- synchronous block 3 of the GALS FFT: the complex multiplier.
//
// Multiplies each sample of the first 8-point FFT's output by its W64 twiddle
// factor (see twiddle_cmult) before the second 8-point FFT.
// Interface and timing as sync_block1: data-driven valid/ready stream,
// in_ready = out_ready, output combinational for the accepted sample. There
// is no fill latency: out_valid follows an accepted input directly.
// The block contents follow the original design's partition table; the stream
// handshake is this design's.
`timescale 1ps/1ps
module sync_block3
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

  logic push;

  assign in_ready = out_ready;
  assign push     = in_valid && out_ready;

  twiddle_cmult u_cmult (
    .clk, .rst_n, .in_valid(push), .in_data,
    .out_valid, .out_data);

endmodule
