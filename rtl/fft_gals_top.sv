// fft_gals_top -- 64-point pipelined FFT built as a GALS (globally
// asynchronous, locally synchronous) system for low supply noise.
//
// The FFT is two cascaded 8-point radix-2^3 FFTs with one twiddle multiplier
// between them: six butterfly stages in all. They are split into four
// synchronous blocks of similar power: block 1 = stage 1, block 2 = stages 2
// and 3, block 3 = the complex multiplier, block 4 = stages 4 to 6. Each
// block has its own clock and talks to its neighbours only through an
// asynchronous channel, a D port (sender) paired with a P port (receiver).
// Two more channels connect the first and last block with the ext_clk
// domain of the chip's data pins, so din/dout are ordinary synchronous
// streams on ext_clk whatever the internal clocking.
//
// Clocking (mode, plain 3-bit code of fft_pkg::chip_mode_e):
//   S_N  000  all blocks on ext_clk
//   S_J  001  all blocks on ext_clk passed through one jitter generator
//   G_N  100  each block on its own pausable ring oscillator (cc_fft sets it)
//   G_J  101  as G_N, each clock modulated by its own jitter generator
//   G_S  110  as G_N, block i shifted by shift_sel[i] quarter periods
//   G_SJ 111  shift and jitter together
// In GALS modes a block whose D port is blocked pauses its own clock until
// the receiver acknowledges. core_en = 0 stops all block clocks. Change
// mode, cc_fft or shift_sel only while rst_n is low.
//
// Data: din (cplx_t, valid/ready on ext_clk) takes samples in natural order,
// 64 per frame, back to back. dout (valid/ready on ext_clk) gives X[k]/64 in
// bit-reversed order: the t-th output word of a frame is X[bitrev6(t)]. The
// pipeline holds 63 samples, so a frame's last outputs appear only as the
// next frame (or padding) is fed in. Throughput is set by the channels, about
// one word per five or six clocks of the slower side.
//
// BIST: with bist_en high after reset, bist_pattern_gen replaces din with
// BIST_FRAMES pseudo-random frames plus a padding frame, and bist_misr folds
// the BIST_FRAMES*64 results into a signature compared with bist_expected.
// A stand-alone ring oscillator (tcg_*) lets the clock generator be tested
// on its own: running, pausing and stopping.
//
// The block partition, the three-part clock generators, the phase offsets,
// the jitter scheme, the CC_FFT frequency table and the six test modes are
// the original design's. Channel protocol, word widths, stream interfaces, output
// order, mode encoding and the BIST scheme are this design's choices.
// Two outputs are left unread on purpose: the input D port's pause_req
// (ext_clk cannot be paused) and the BIST generator's done flag.
`timescale 1ps/1ps
module fft_gals_top
  import fft_pkg::*;
#(
  parameter int unsigned BIST_FRAMES = 4
) (
  input  logic             ext_clk,
  input  logic             rst_n,
  input  logic [2:0]       mode,
  input  logic [4:0]       cc_fft,
  input  logic [3:0][1:0]  shift_sel,
  input  logic             core_en,
  // sample input stream (ext_clk)
  input  logic             din_valid,
  input  cplx_t            din,
  output logic             din_ready,
  // result output stream (ext_clk)
  output logic             dout_valid,
  output cplx_t            dout,
  input  logic             dout_ready,
  // built-in self-test
  input  logic             bist_en,
  input  logic [31:0]      bist_expected,
  output logic             bist_done,
  output logic             bist_pass,
  output logic [31:0]      bist_signature,
  // stand-alone clock generator test
  input  logic             tcg_en,
  input  logic             tcg_pause_req,
  output logic             tcg_clk,
  output logic             tcg_paused,
  // observation of the block clocks and their pause state
  output logic [3:0]       blk_clk,
  output logic [3:0]       blk_paused
);

  // Oscillators of equal setting in different blocks are not exactly equal;
  // the model gives them slightly different periods (parts per million).
  localparam int MISMATCH_PPM [4] = '{0, 200, 400, 600};

  logic gals, skew_en, jit_en;
  assign gals    = mode[2];
  assign skew_en = mode[1];
  assign jit_en  = mode[0];

  // ---------------- clocks ----------------
  logic sync_jit_clk, sync_clk;
  logic [3:0] clk, rstn, pause;
  logic ext_rstn;

  jitter_gen #(.INIT_POS(0)) u_sync_jit (
    .clk_in(ext_clk), .rst_n, .en(jit_en && !gals), .clk_out(sync_jit_clk));
  assign sync_clk = sync_jit_clk;

  for (genvar i = 0; i < 4; i++) begin : g_clk
    local_clock_gen #(.MISMATCH_PPM(MISMATCH_PPM[i]), .JIT_INIT_POS(4 * i)) u_lcg (
      .rst_n, .sync_clk, .core_en, .gals, .skew_en, .jit_en(jit_en && gals),
      .cc(cc_fft), .shift_sel(shift_sel[i]), .pause_req(pause[i]),
      .clk(clk[i]), .paused(blk_paused[i]));
    reset_sync u_rs (.clk(clk[i]), .rst_n_in(rst_n), .rst_n_out(rstn[i]));
  end
  assign blk_clk = clk;

  reset_sync u_rs_ext (.clk(ext_clk), .rst_n_in(rst_n), .rst_n_out(ext_rstn));

  ring_osc u_test_clkgen (
    .en(tcg_en), .cc(cc_fft), .pause_req(tcg_pause_req),
    .clk(tcg_clk), .paused(tcg_paused));

  // ---------------- channels ----------------
  // ch[0]: ext -> block1, ch[1..3]: block i -> block i+1, ch[4]: block4 -> ext
  logic  [4:0] ch_req, ch_ack;
  cplx_t       ch_data [5];

  // block-side streams: rx_* out of a P port, tx_* into a D port
  logic  [3:0] rx_valid, rx_ready, tx_valid, tx_ready;
  cplx_t       rx_data [4];
  cplx_t       tx_data [4];

  // ext side: input D port, fed by din or the BIST generator
  logic  in_valid, in_ready, bist_src_valid, bist_src_done, ext_pause;
  cplx_t in_data, bist_src_data;

  bist_pattern_gen #(.N_FRAMES(BIST_FRAMES)) u_bist_gen (
    .clk(ext_clk), .rst_n(ext_rstn), .start(bist_en),
    .out_valid(bist_src_valid), .out_data(bist_src_data), .out_ready(in_ready),
    .done(bist_src_done));

  // ext_clk comes from outside and cannot be paused; the generator's done
  // flag is only needed by a tester watching the stimulus.

  assign in_valid  = bist_en ? bist_src_valid : din_valid;
  assign in_data   = bist_en ? bist_src_data  : din;
  assign din_ready = !bist_en && in_ready;

  gals_dport u_dp_in (
    .clk(ext_clk), .rst_n(ext_rstn), .in_valid, .in_data, .in_ready,
    .want(1'b0), .pause_req(ext_pause),
    .req(ch_req[0]), .data(ch_data[0]), .ack(ch_ack[0]));

  for (genvar i = 0; i < 4; i++) begin : g_port
    gals_pport u_pp (
      .clk(clk[i]), .rst_n(rstn[i]),
      .req(ch_req[i]), .data(ch_data[i]), .ack(ch_ack[i]),
      .out_valid(rx_valid[i]), .out_data(rx_data[i]), .out_ready(rx_ready[i]));
    gals_dport u_dp (
      .clk(clk[i]), .rst_n(rstn[i]),
      .in_valid(tx_valid[i]), .in_data(tx_data[i]), .in_ready(tx_ready[i]),
      .want(rx_valid[i]), .pause_req(pause[i]),
      .req(ch_req[i+1]), .data(ch_data[i+1]), .ack(ch_ack[i+1]));
  end

  // ---------------- synchronous blocks ----------------
  sync_block1 u_sb1 (
    .clk(clk[0]), .rst_n(rstn[0]),
    .in_valid(rx_valid[0]), .in_data(rx_data[0]), .in_ready(rx_ready[0]),
    .out_valid(tx_valid[0]), .out_data(tx_data[0]), .out_ready(tx_ready[0]));

  sync_block2 u_sb2 (
    .clk(clk[1]), .rst_n(rstn[1]),
    .in_valid(rx_valid[1]), .in_data(rx_data[1]), .in_ready(rx_ready[1]),
    .out_valid(tx_valid[1]), .out_data(tx_data[1]), .out_ready(tx_ready[1]));

  sync_block3 u_sb3 (
    .clk(clk[2]), .rst_n(rstn[2]),
    .in_valid(rx_valid[2]), .in_data(rx_data[2]), .in_ready(rx_ready[2]),
    .out_valid(tx_valid[2]), .out_data(tx_data[2]), .out_ready(tx_ready[2]));

  sync_block4 u_sb4 (
    .clk(clk[3]), .rst_n(rstn[3]),
    .in_valid(rx_valid[3]), .in_data(rx_data[3]), .in_ready(rx_ready[3]),
    .out_valid(tx_valid[3]), .out_data(tx_data[3]), .out_ready(tx_ready[3]));

  // ext side: output P port, read by dout or the BIST compactor
  logic out_valid, out_ready;
  cplx_t out_data;

  gals_pport u_pp_out (
    .clk(ext_clk), .rst_n(ext_rstn),
    .req(ch_req[4]), .data(ch_data[4]), .ack(ch_ack[4]),
    .out_valid, .out_data, .out_ready);

  assign out_ready  = bist_en ? 1'b1 : dout_ready;
  assign dout_valid = !bist_en && out_valid;
  assign dout       = out_data;

  bist_misr #(.N_WORDS(BIST_FRAMES * 64)) u_bist_misr (
    .clk(ext_clk), .rst_n(ext_rstn), .in_valid(bist_en && out_valid),
    .in_data(out_data), .expected(bist_expected),
    .signature(bist_signature), .done(bist_done), .pass(bist_pass));

endmodule
