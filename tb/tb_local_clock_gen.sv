// tb_local_clock_gen -- checks one block's clock source in its modes.
//
// Synchronous mode: clk must equal sync_clk. GALS mode: clk must run at the
// ring-oscillator frequency of cc (79.0625 MHz for 10111); with skew_en and
// shift_sel = 2 the edges must trail a reference instance without skew by
// half a period; with jit_en the period must vary over the +/-4*DELTA
// triangle (spread 8*150 ps); pause_req must stop the clock in GALS mode;
// core_en low must stop it in every mode.
`timescale 1ps/1ps
module tb_local_clock_gen;
  int checks = 0, failures = 0;
  logic rst_n = 0, sync_clk = 0, core_en = 1, gals = 0, skew_en = 0, jit_en = 0, pause_req = 0;
  logic [4:0] cc = 5'b10111;
  logic [1:0] shift_sel = 2'd2;
  logic clk, paused, clk_ref, paused_ref;

  local_clock_gen dut (.*);
  local_clock_gen ref_gen (.rst_n, .sync_clk, .core_en, .gals, .skew_en(1'b0), .jit_en(1'b0), .cc,
                           .shift_sel, .pause_req(1'b0), .clk(clk_ref), .paused(paused_ref));

  always #6250 sync_clk = ~sync_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  realtime t0, pmin, pmax, p;
  int edges;

  task automatic start(input bit g, input bit s, input bit j);
    rst_n = 0; gals = g; skew_en = s; jit_en = j;
    #50_000;
    rst_n = 1;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    // synchronous: follows sync_clk
    start(0, 0, 0);
    for (int i = 0; i < 10; i++) begin
      @(sync_clk); #1;
      check(clk == sync_clk, "sync mode clock differs from sync_clk");
    end
    // GALS: ring oscillator period
    start(1, 0, 0);
    @(posedge clk) t0 = $realtime;
    repeat (10) @(posedge clk);
    p = ($realtime - t0) / 10.0;
    check(p > 12646.0 && p < 12650.0, $sformatf("GALS period %0.1f ps", p));
    // skew: half a period behind the reference
    start(1, 1, 0);
    @(posedge clk_ref) t0 = $realtime;
    @(posedge clk) p = $realtime - t0;
    check(p > 6320.0 && p < 6328.0, $sformatf("shift_sel=2 lag %0.1f ps", p));
    // jitter
    start(1, 0, 1);
    pmin = 1.0e9; pmax = 0;
    @(posedge clk) t0 = $realtime;
    repeat (32) begin
      @(posedge clk) p = $realtime - t0;
      t0 = $realtime;
      if (p < pmin) pmin = p;
      if (p > pmax) pmax = p;
    end
    check(pmax - pmin > 1190.0 && pmax - pmin < 1210.0, $sformatf("jitter spread %0.1f ps", pmax - pmin));
    // pause
    start(1, 0, 0);
    pause_req = 1;
    #30_000;
    edges = 0;
    fork
      begin @(posedge clk); edges++; end
      #100_000;
    join_any
    disable fork;
    check(edges == 0 && paused, "clock ran while paused");
    pause_req = 0;
    @(posedge clk);
    // core_en low, in both modes
    for (int g = 0; g < 2; g++) begin
      start(g[0], 0, 0);
      core_en = 0;
      #20_000;
      edges = 0;
      fork
        begin @(posedge clk); edges++; end
        #100_000;
      join_any
      disable fork;
      check(edges == 0 && clk == 0, "clock ran with core_en low");
      core_en = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
