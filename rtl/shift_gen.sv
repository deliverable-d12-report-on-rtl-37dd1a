// shift_gen -- behavioural model of the programmable clock delay line used
// for phase modulation (not synthesizable: a chain of delay cells).
//
// clk_out is clk_in delayed by sel * STEP_PS when en is high, and undelayed
// otherwise: a chain of three delay cells of STEP_PS each and a 4-input
// multiplexer. A cell delay must stay below half the clock period (true for
// every configured frequency up to 88 MHz). The default step, 3162 ps, is a
// quarter of the 79.0625 MHz period of configuration 10111, the setting used
// for the measurements; sel = 0, 1, 2, 3 then gives the clock shifts 0,
// T/4, T/2 and 3T/4 that the four blocks receive. The step value and the
// 2-bit select are this model's choices.
`timescale 1ps/1ps
module shift_gen #(
  parameter int STEP_PS = 3162
) (
  input  logic       clk_in,
  input  logic       en,
  input  logic [1:0] sel,
  output logic       clk_out
);

  logic t1, t2, t3;

  // three equal delay cells; each is shorter than half a clock period
  always @(clk_in) t1 <= #(STEP_PS) clk_in;
  always @(t1)     t2 <= #(STEP_PS) t1;
  always @(t2)     t3 <= #(STEP_PS) t2;

  always_comb begin
    if (!en) clk_out = clk_in;
    else
      case (sel)
        2'd0:    clk_out = clk_in;
        2'd1:    clk_out = t1;
        2'd2:    clk_out = t2;
        default: clk_out = t3;
      endcase
  end

endmodule
