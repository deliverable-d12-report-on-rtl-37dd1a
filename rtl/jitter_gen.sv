// jitter_gen -- behavioural model of the clock jitter generator (delay line,
// multiplexer and single-hot counter); the delay cells and the multiplexer
// are not synthesizable, the counter is the RTL single_hot_counter.
//
// clk_in passes a chain of delay cells of 1, 2, 3, 4, 3, 2 and 1 units of
// DELTA_PS (150 ps), giving eight taps with cumulative delays of
// 0, 1, 3, 6, 10, 13, 15 and 16 units. A 16-input multiplexer picks the
// output; its inputs i and 15-i are both tap i, so as the one-hot select
// walks through positions 0..15 the tap goes 0,1,..,7,7,..,1,0. The period
// of the output changes by the step between consecutive taps:
// +1,+2,+3,+4,+3,+2,+1,0,-1,..,-4,..,-1,0 units, a triangle between
// T-4*DELTA and T+4*DELTA over 16 cycles.
// The counter is clocked by the inverted multiplexer output delayed by
// 4*DELTA, i.e. after the falling edge; at that time both the old and the
// new tap are low, so switching the select cannot glitch the clock.
// With en low the counter holds and the clock passes undelayed.
// The tap values, DELTA and the counter clocking follow the original design
// description; that the cells form one chain is read from the +/-4*DELTA period
// range it gives. Each cell is modelled as a delay shorter than half a
// clock period, so every edge passes every cell.
`timescale 1ps/1ps
module jitter_gen #(
  parameter int          DELTA_PS = 150,
  parameter int unsigned INIT_POS = 0
) (
  input  logic clk_in,
  input  logic rst_n,
  input  logic en,
  output logic clk_out
);

  logic        t1, t2, t3, t4, t5, t6, t7;   // taps 1..7; tap 0 is clk_in
  logic [15:0] sel;
  logic        clk_mux, clk_mux_d, cnt_clk;
  logic [2:0]  idx;

  // delay-cell chain of 1, 2, 3, 4, 3, 2, 1 units; each cell is a delay
  // shorter than half a clock period
  always @(clk_in) t1 <= #(1 * DELTA_PS) clk_in;
  always @(t1)     t2 <= #(2 * DELTA_PS) t1;
  always @(t2)     t3 <= #(3 * DELTA_PS) t2;
  always @(t3)     t4 <= #(4 * DELTA_PS) t3;
  always @(t4)     t5 <= #(3 * DELTA_PS) t4;
  always @(t5)     t6 <= #(2 * DELTA_PS) t5;
  always @(t6)     t7 <= #(1 * DELTA_PS) t6;

  // multiplexer inputs i and 15-i carry the same tap
  always_comb begin
    idx = '0;
    for (int i = 0; i < 16; i++) if (sel[i]) idx = (i < 8) ? 3'(i) : 3'(15 - i);
  end

  always_comb begin
    if (!en) clk_mux = clk_in;
    else
      case (idx)
        3'd0:    clk_mux = clk_in;
        3'd1:    clk_mux = t1;
        3'd2:    clk_mux = t2;
        3'd3:    clk_mux = t3;
        3'd4:    clk_mux = t4;
        3'd5:    clk_mux = t5;
        3'd6:    clk_mux = t6;
        default: clk_mux = t7;
      endcase
  end

  initial clk_mux_d = 1'b0;
  always @(clk_mux) clk_mux_d <= #(4 * DELTA_PS) clk_mux;
  assign cnt_clk = ~clk_mux_d;

  single_hot_counter #(.N_TAPS(16), .INIT_POS(INIT_POS)) u_cnt (
    .clk(cnt_clk), .rst_n, .en, .sel);

  assign clk_out = clk_mux;

endmodule
