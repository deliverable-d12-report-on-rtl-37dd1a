// tb_ring_osc -- checks the pausable ring oscillator model.
//
// For every configuration code of the measured table the clock period must
// be 1/f of the tabulated frequency (to 2 ps); a code below the table must
// give a higher frequency than 88.4375 MHz. A 1000 ppm mismatch instance
// must be 0.1 % slower. pause_req must hold the clock low and raise paused
// until it is released; en low must stop the clock.
`timescale 1ps/1ps
module tb_ring_osc;
  int checks = 0, failures = 0;
  logic en = 0, pause_req = 0, clk, paused, clk_m, paused_m;
  logic [4:0] cc = 5'b10111;

  ring_osc dut (.*);
  ring_osc #(.MISMATCH_PPM(1000)) dut_m (.en, .cc, .pause_req(1'b0), .clk(clk_m), .paused(paused_m));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam real FREQ [12] = '{88.4375, 85.625, 81.875, 79.0625, 76.25, 73.4375,
                                71.5625, 68.875, 66.875, 65.0, 63.125, 61.25};

  task automatic period_of(input bit mism, output realtime p);
    realtime t0;
    if (mism) begin @(posedge clk_m); t0 = $realtime; @(posedge clk_m); end
    else      begin @(posedge clk);   t0 = $realtime; @(posedge clk);   end
    p = $realtime - t0;
  endtask

  initial begin
    realtime p, want;
    int edges;
    en = 1;
    for (int i = 0; i < 12; i++) begin
      cc = 5'(20 + i);
      repeat (2) @(posedge clk);
      period_of(0, p);
      want = 1.0e6 / FREQ[i];
      check(p > want - 2.0 && p < want + 2.0, $sformatf("cc=%b period %0.1f ps, expected %0.1f", cc, p, want));
      period_of(1, p);
      check(p > want * 1.001 - 2.0 && p < want * 1.001 + 2.0, $sformatf("mismatch period %0.1f", p));
    end
    cc = 5'b10000;
    repeat (2) @(posedge clk);
    period_of(0, p);
    check(p < 1.0e6 / 88.4375, "code below table not faster");
    // pause
    cc = 5'b10111;
    @(posedge clk);
    pause_req = 1;
    #(30_000);
    check(paused && clk == 0, "clock not held low while paused");
    edges = 0;
    fork
      begin @(posedge clk); edges++; end
      #(100_000);
    join_any
    disable fork;
    check(edges == 0, "clock edge while paused");
    pause_req = 0;
    #(1);
    check(clk == 1 && !paused, "clock did not resume at once after pause");
    // stop
    en = 0;
    #(20_000);
    edges = 0;
    fork
      begin @(posedge clk); edges++; end
      #(100_000);
    join_any
    disable fork;
    check(edges == 0 && clk == 0, "clock runs with en low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
