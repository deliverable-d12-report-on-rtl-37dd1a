// gals_pport -- receiving asynchronous port (P port) of a GALS wrapper.
//
// Receives words from the previous block's D port over the two-phase
// bundled-data channel (req, data, ack). req passes a two-flop synchronizer;
// a word is pending while the synchronized req differs from ack. The pending
// word is offered to the block as out_valid/out_data and taken with
// out_ready, which toggles ack. data is read directly from the sender's
// register: it has been stable since req toggled, at least two clocks of
// this domain before out_valid rises.
// Timing: out_valid rises two to three clocks after the sender's req toggle
// and falls in the cycle after the word is taken.
// The original design names the P port; protocol and synchronizer are this design's.
`timescale 1ps/1ps
module gals_pport
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // asynchronous channel
  input  logic  req,
  input  cplx_t data,
  output logic  ack,
  // synchronous side
  output logic  out_valid,
  output cplx_t out_data,
  input  logic  out_ready
);

  logic req_s1, req_s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_s1 <= 1'b0;
      req_s2 <= 1'b0;
      ack    <= 1'b0;
    end else begin
      req_s1 <= req;
      req_s2 <= req_s1;
      if (out_valid && out_ready) ack <= ~ack;
    end
  end

  assign out_valid = (req_s2 != ack);
  assign out_data  = data;

  // A pending word must not change until it has been taken.
  a_stable: assert property (@(posedge clk) disable iff (!rst_n)
                             out_valid && !out_ready |=> $stable(out_data));

endmodule
