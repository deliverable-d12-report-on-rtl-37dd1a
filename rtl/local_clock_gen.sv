// local_clock_gen -- behavioural model of one block's clock source: the
// pausable ring oscillator, the shift generator (phase modulation) and the
// jitter generator (frequency modulation), in that order.
//
// In GALS modes (gals = 1) the block runs on its own ring oscillator,
// optionally shifted by shift_sel quarter periods (skew_en) and modulated by
// the jitter generator (jit_en); pause_req from the block's D port can stop
// it. In synchronous modes the block takes sync_clk, the chip-wide clock,
// and pause_req is ignored. core_en low stops the clock, which is how blocks
// not under test are kept from switching. The oscillator is also held while
// rst_n is low, so all blocks' oscillators start together when reset ends
// and the programmed phase shifts hold from the first cycle. Mode changes are meant to be made
// while the design is held in reset.
// The chain of three generators is the original design's; the mode switching, the
// enable and the per-instance oscillator mismatch are this model's.
`timescale 1ps/1ps
module local_clock_gen #(
  parameter int          MISMATCH_PPM = 0,
  parameter int unsigned JIT_INIT_POS = 0,
  parameter int          STEP_PS      = 3162,
  parameter int          DELTA_PS     = 150
) (
  input  logic       rst_n,
  input  logic       sync_clk,
  input  logic       core_en,
  input  logic       gals,
  input  logic       skew_en,
  input  logic       jit_en,
  input  logic [4:0] cc,
  input  logic [1:0] shift_sel,
  input  logic       pause_req,
  output logic       clk,
  output logic       paused
);

  logic ro_clk, sh_clk, jt_clk;

  ring_osc #(.MISMATCH_PPM(MISMATCH_PPM)) u_ro (
    .en(core_en && gals && rst_n), .cc, .pause_req, .clk(ro_clk), .paused);

  shift_gen #(.STEP_PS(STEP_PS)) u_shift (
    .clk_in(ro_clk), .en(skew_en), .sel(shift_sel), .clk_out(sh_clk));

  jitter_gen #(.DELTA_PS(DELTA_PS), .INIT_POS(JIT_INIT_POS)) u_jit (
    .clk_in(sh_clk), .rst_n, .en(jit_en), .clk_out(jt_clk));

  assign clk = !core_en ? 1'b0 : (gals ? jt_clk : sync_clk);

endmodule
