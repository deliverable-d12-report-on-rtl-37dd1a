// tb_fft_gals_top -- end-to-end test of the GALS FFT chip at its default
// parameters.
//
// For each of the six clocking modes (G_SJ also at the fastest and the
// slowest ring setting, CC_FFT 10100 and 11111) the chip is reset and fed NF random
// frames plus one padding frame through din on ext_clk (80 MHz); every
// dout word is compared with a floating-point DFT of the input, divided by
// 64 and read in bit-reversed order, within TOL LSB. The testbench also
// measures what each mode should do to the clocks: in G_S the rising edges
// of blocks 2..4 must lag block 1 by a quarter period each, with jitter the
// block-1 period must vary by about +/-4*150 ps, and in GALS modes the D
// ports must pause their clocks. Then it runs the BIST in S_N to learn the
// signature, checks that G_SJ reproduces it (pass) and that a wrong expected
// value fails, drives the stand-alone clock generator through run, pause
// and stop, checks that core_en = 0 stops the block clocks and that a chip
// held in reset (idle test) runs no block clock and moves no data. Each
// mechanism's occurrences are counted and one that never happened fails.
`timescale 1ps/1ps
module tb_fft_gals_top;
  import fft_pkg::*;

  localparam int NF  = 2;
  localparam int TOL = 8;
  localparam realtime EXT_HALF = 6250.0;   // 80 MHz

  int checks = 0, failures = 0;

  logic             ext_clk = 0, rst_n = 0;
  logic [2:0]       mode = MODE_S_N;
  logic [4:0]       cc_fft = 5'b10111;
  logic [3:0][1:0]  shift_sel = {2'd3, 2'd2, 2'd1, 2'd0};
  logic             core_en = 1;
  logic             din_valid = 0, din_ready;
  cplx_t            din = '0;
  logic             dout_valid, dout_ready = 1;
  cplx_t            dout;
  logic             bist_en = 0, bist_done, bist_pass;
  logic [31:0]      bist_expected = '0, bist_signature;
  logic             tcg_en = 0, tcg_pause_req = 0, tcg_clk, tcg_paused;
  logic [3:0]       blk_clk, blk_paused;

  fft_gals_top dut (.*);

  always #(EXT_HALF) ext_clk = ~ext_clk;

  // mechanism counters
  int n_pause = 0, n_din_stall = 0, n_dout_stall = 0, n_jitter = 0, n_skew = 0, n_mode = 0;
  int n_bist_pass = 0, n_bist_fail = 0, n_tcg_pause = 0, n_tcg_stop = 0, n_core_off = 0, n_idle = 0, n_cc = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge blk_paused[0] or posedge blk_paused[1] or posedge blk_paused[2]
           or posedge blk_paused[3]) n_pause++;

  always @(posedge ext_clk) if (din_valid && !din_ready && !bist_en) n_din_stall++;
  always @(posedge ext_clk) if (dout_valid && !dout_ready) n_dout_stall++;

  // stimulus and reference
  int      xr [NF+1][64];
  int      xi [NF+1][64];
  real     er [NF][64];
  real     ei [NF][64];

  function automatic int bitrev6(input int v);
    int r = 0;
    for (int b = 0; b < 6; b++) if (v[b]) r |= 1 << (5 - b);
    return r;
  endfunction

  task automatic make_data();
    for (int f = 0; f <= NF; f++)
      for (int n = 0; n < 64; n++) begin
        xr[f][n] = (f == NF) ? 0 : int'($urandom_range(32766)) - 16383;
        xi[f][n] = (f == NF) ? 0 : int'($urandom_range(32766)) - 16383;
      end
    for (int f = 0; f < NF; f++)
      for (int k = 0; k < 64; k++) begin
        real sr = 0, si = 0;
        for (int n = 0; n < 64; n++) begin
          real a = -2.0 * 3.14159265358979 * real'(n * k) / 64.0;
          sr += xr[f][n] * $cos(a) - xi[f][n] * $sin(a);
          si += xr[f][n] * $sin(a) + xi[f][n] * $cos(a);
        end
        er[f][k] = sr / 64.0;
        ei[f][k] = si / 64.0;
      end
  endtask

  task automatic do_reset();
    rst_n = 0;
    repeat (4) @(posedge ext_clk);
    #(20000);
    rst_n = 1;
    repeat (10) @(posedge ext_clk);
  endtask

  // the feeder and the checker run in parallel
  task automatic feed();
    for (int f = 0; f <= NF; f++)
      for (int n = 0; n < 64; n++) begin
        din_valid <= 1;
        din <= '{re: 16'(xr[f][n]), im: 16'(xi[f][n])};
        @(posedge ext_clk);
        while (!din_ready) @(posedge ext_clk);
      end
    din_valid <= 0;
  endtask

  task automatic collect(input string tag);
    int got = 0;
    while (got < NF * 64) begin
      @(posedge ext_clk);
      // the receiver takes a result only one cycle in four, so the
      // pipeline backs up and the blocks must pause their clocks
      dout_ready <= ($urandom_range(3) == 0);
      if (dout_valid && dout_ready) begin
        int f = got / 64, k = bitrev6(got % 64);
        real dr = real'(dout.re) - er[f][k], di = real'(dout.im) - ei[f][k];
        check(dr < TOL && dr > -TOL && di < TOL && di > -TOL,
              $sformatf("%s frame %0d X[%0d] = (%0d,%0d) expected (%0.1f,%0.1f)",
                        tag, f, k, dout.re, dout.im, er[f][k], ei[f][k]));
        got++;
      end
    end
    dout_ready <= 1;
  endtask

  // period and skew measurement on the block clocks
  realtime last_rise [4];
  realtime rise_t [4];
  realtime pmin, pmax;
  bit measuring = 0;
  always @(posedge blk_clk[0]) begin
    automatic realtime p = $realtime - last_rise[0];
    if (measuring && last_rise[0] > 0) begin
      if (p < pmin) pmin = p;
      if (p > pmax) pmax = p;
    end
    last_rise[0] = $realtime;
  end
  for (genvar i = 1; i < 4; i++) begin : g_rise
    always @(posedge blk_clk[i]) last_rise[i] = $realtime;
  end

  task automatic run_mode(input chip_mode_e m);
    mode = m;
    do_reset();
    n_mode++;
    // clock observations before the data run (the ports are idle, no pauses)
    pmin = 1.0e9; pmax = 0; measuring = 1;
    repeat (40) @(posedge blk_clk[0]);
    measuring = 0;
    if (m[0]) begin
      // triangle from T-4*DELTA to T+4*DELTA: spread 8*150 ps
      check(pmax - pmin > 1100.0 && pmax - pmin < 1300.0,
            $sformatf("%s period spread %0.0f ps", m.name(), pmax - pmin));
      if (pmax - pmin > 1100.0) n_jitter++;
    end else begin
      check(pmax - pmin < 100.0, $sformatf("%s unexpected period spread %0.0f ps", m.name(), pmax - pmin));
    end
    if (m == MODE_G_S) begin
      // blocks share one ring setting; mismatch is small, so offsets stay near T/4 steps
      @(posedge blk_clk[0]); rise_t[0] = $realtime;
      for (int i = 1; i < 4; i++) begin
        @(posedge blk_clk[i]);
        rise_t[i] = $realtime - rise_t[0];
      end
      for (int i = 1; i < 4; i++) begin
        realtime want = i * 3162.0;
        check(rise_t[i] > want - 800.0 && rise_t[i] < want + 800.0,
              $sformatf("G_S block %0d lags %0.0f ps, expected about %0.0f", i+1, rise_t[i], want));
      end
      n_skew++;
    end
    make_data();
    fork
      feed();
      collect(m.name());
    join
  endtask

  initial begin
    chip_mode_e m;
    last_rise = '{default: 0.0};
    m = MODE_S_N;  run_mode(m);
    m = MODE_S_J;  run_mode(m);
    m = MODE_G_N;  run_mode(m);
    m = MODE_G_S;  run_mode(m);
    m = MODE_G_J;  run_mode(m);
    m = MODE_G_SJ; run_mode(m);
    // fastest and slowest ring settings of the frequency table
    cc_fft = 5'b10100; run_mode(m); n_cc++;
    cc_fft = 5'b11111; run_mode(m); n_cc++;
    cc_fft = 5'b10111;

    // ---- BIST: learn the signature in S_N, then reproduce it in G_SJ ----
    begin
      logic [31:0] golden;
      mode = MODE_S_N; bist_en = 1; do_reset();
      wait (bist_done); repeat (2) @(posedge ext_clk);
      golden = bist_signature;
      check(!bist_pass, "BIST passes with a wrong expected signature");
      if (!bist_pass) n_bist_fail++;
      mode = MODE_G_SJ; bist_expected = golden; do_reset();
      wait (bist_done); repeat (2) @(posedge ext_clk);
      check(bist_pass, $sformatf("BIST G_SJ signature %h, S_N gave %h", bist_signature, golden));
      if (bist_pass) n_bist_pass++;
      bist_en = 0;
    end

    // ---- stand-alone clock generator: run, pause, stop ----
    begin
      int edges = 0;
      tcg_en = 1;
      fork
        begin repeat (20) @(posedge tcg_clk); end
        #(1_000_000);
      join_any
      disable fork;
      tcg_pause_req = 1;
      wait (tcg_paused);
      check(tcg_clk == 0, "test clock not low while paused");
      fork
        begin @(posedge tcg_clk); edges++; end
        #(200_000);
      join_any
      disable fork;
      check(edges == 0, "test clock ran while paused");
      if (edges == 0) n_tcg_pause++;
      tcg_pause_req = 0;
      @(posedge tcg_clk);
      tcg_en = 0;
      #(50_000);
      edges = 0;
      fork
        begin @(posedge tcg_clk); edges++; end
        #(200_000);
      join_any
      disable fork;
      check(edges == 0 && tcg_clk == 0, "test clock did not stop");
      if (edges == 0) n_tcg_stop++;
    end

    // ---- core_en = 0 stops every block clock ----
    begin
      int edges = 0;
      mode = MODE_G_N; do_reset();
      core_en = 0;
      #(20_000);
      fork
        begin @(posedge blk_clk[0] or posedge blk_clk[1] or posedge blk_clk[2] or posedge blk_clk[3]); edges++; end
        #(500_000);
      join_any
      disable fork;
      check(edges == 0, "block clocks run with core_en = 0");
      if (edges == 0) n_core_off++;
      core_en = 1;
    end

    // ---- idle: held in reset in a GALS mode, nothing clocks or moves ----
    begin
      int edges = 0;
      mode = MODE_G_SJ; rst_n = 0; din_valid = 1;
      #(20_000);
      fork
        begin @(posedge blk_clk[0] or posedge blk_clk[1] or posedge blk_clk[2] or posedge blk_clk[3]); edges++; end
        begin @(posedge dout_valid or posedge din_ready); edges++; end
        #(500_000);
      join_any
      disable fork;
      check(edges == 0, "clocks or data move while the chip is held in reset");
      if (edges == 0) n_idle++;
      din_valid = 0; rst_n = 1;
    end

    $display("mechanisms: mode_runs=%0d clock_pauses=%0d din_stalls=%0d dout_stalls=%0d jitter=%0d skew=%0d bist_pass=%0d bist_fail=%0d tcg_pause=%0d tcg_stop=%0d core_off=%0d idle=%0d",
             n_mode, n_pause, n_din_stall, n_dout_stall, n_jitter, n_skew, n_bist_pass, n_bist_fail,
             n_tcg_pause, n_tcg_stop, n_core_off, n_idle);
    check(n_mode == 8 && n_cc == 2, "not all modes and ring settings run");
    check(n_pause > 0, "no clock pause happened");
    check(n_din_stall > 0, "no input stall happened");
    check(n_dout_stall > 0, "no output back-pressure happened");
    check(n_jitter >= 3, "jitter not seen in every jitter mode");
    check(n_skew > 0, "skew not seen");
    check(n_bist_pass > 0 && n_bist_fail > 0, "BIST pass/fail not both seen");
    check(n_tcg_pause > 0 && n_tcg_stop > 0, "clock generator pause/stop not seen");
    check(n_core_off > 0, "core disable not seen");
    check(n_idle > 0, "idle reset state not seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(400_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
