// gals_dport -- sending asynchronous port (D port) of a GALS wrapper.
//
// Takes words from its synchronous block with a valid/ready handshake and
// hands them to the next block's P port over a two-phase bundled-data
// channel: loading a word toggles req; the receiver toggles ack once it has
// taken the word. data is held stable from the req toggle until the ack
// toggle. ack is brought into this clock domain by a two-flop synchronizer;
// the port is free again (in_ready high) when the synchronized ack equals
// req, i.e. about two clocks after the receiver's ack.
// pause_req asks this block's pausable clock generator to stop the clock:
// it is high while the block has work waiting (want, e.g. a word at its
// input) that it cannot do because the port cannot take its result and the receiver has not yet acknowledged (raw ack still differs from
// req). It drops as soon as the asynchronous ack arrives, so the clock
// restarts without waiting for the synchronizer.
// The original design names the D and P ports of each asynchronous wrapper and says
// the blocks' clocks are pausable; the two-phase protocol, the synchronizers
// and this pause rule are this design's.
`timescale 1ps/1ps
module gals_dport
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // synchronous side
  input  logic  in_valid,
  input  cplx_t in_data,
  output logic  in_ready,
  input  logic  want,
  output logic  pause_req,
  // asynchronous channel
  output logic  req,
  output cplx_t data,
  input  logic  ack
);

  logic ack_s1, ack_s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_s1 <= 1'b0;
      ack_s2 <= 1'b0;
    end else begin
      ack_s1 <= ack;
      ack_s2 <= ack_s1;
    end
  end

  assign in_ready  = (req == ack_s2);
  assign pause_req = want && !in_ready && (req != ack);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req  <= 1'b0;
      data <= '0;
    end else if (in_valid && in_ready) begin
      req  <= ~req;
      data <= in_data;
    end
  end

  // Bundled-data rule: the word may only change when the port is free.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           !in_ready |=> $stable(data));

endmodule
