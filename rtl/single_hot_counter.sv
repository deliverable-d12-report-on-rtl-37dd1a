// single_hot_counter -- one-hot ring counter that steers the jitter
// generator's multiplexer.
//
// N_TAPS flip-flops hold a single 1 that moves one place per rising clock
// edge while en is high, wrapping from the last position to the first.
// Because exactly one select line is ever high and it changes only at a
// known point of the clock (see jitter_gen), the multiplexer it drives can
// switch without glitches. INIT_POS is the position after reset: giving the
// four blocks' counters different start positions starts their clock-period
// modulation at different offsets.
// The original design gives the single-hot coding and the 16 multiplexer inputs; the
// reset value and the enable are this design's.
`timescale 1ps/1ps
module single_hot_counter #(
  parameter int unsigned N_TAPS   = 16,
  parameter int unsigned INIT_POS = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  output logic [N_TAPS-1:0] sel
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  sel <= N_TAPS'(1) << INIT_POS;
    else if (en) sel <= {sel[N_TAPS-2:0], sel[N_TAPS-1]};
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(sel));

endmodule
