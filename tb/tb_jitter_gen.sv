// tb_jitter_gen -- checks the triangular period modulation of jitter_gen.
//
// A 12.5 ns clock drives the generator. With en low every output period must
// equal the input period. With en high the periods of 48 consecutive cycles
// are measured and compared with the expected pattern: from a known start
// the deviation from the input period walks +1,+2,+3,+4,+3,+2,+1,0,-1,-2,
// -3,-4,-3,-2,-1,0 times DELTA (150 ps) and repeats every 16 cycles. The
// pattern is located once (its phase depends on where measurement starts)
// and must then match every cycle.
`timescale 1ps/1ps
module tb_jitter_gen;
  int checks = 0, failures = 0;
  logic clk_in = 0, rst_n = 0, en = 0, clk_out;

  jitter_gen dut (.*);

  always #6250 clk_in = ~clk_in;

  localparam int PAT [16] = '{1, 2, 3, 4, 3, 2, 1, 0, -1, -2, -3, -4, -3, -2, -1, 0};

  realtime last = 0, per [48];
  int dev [48];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int ph;
    bit found;
    #20000 rst_n = 1;
    repeat (4) @(posedge clk_out);
    for (int i = 0; i < 8; i++) begin
      @(posedge clk_out);
      if (i > 0) check($realtime - last == 12500, $sformatf("en=0 period %0t", $realtime - last));
      last = $realtime;
    end
    @(negedge clk_in) en = 1;
    repeat (3) @(posedge clk_out);
    last = $realtime;
    for (int i = 0; i < 48; i++) begin
      @(posedge clk_out);
      per[i] = $realtime - last;
      last = $realtime;
      dev[i] = (int'(per[i]) - 12500) / 150;
      check(int'(per[i]) - 12500 == dev[i] * 150, $sformatf("period %0t not a DELTA multiple", per[i]));
    end
    found = 0;
    for (int p = 0; p < 16 && !found; p++) begin
      automatic bit ok = 1;
      for (int i = 0; i < 48; i++) if (dev[i] != PAT[(i + p) % 16]) ok = 0;
      if (ok) begin found = 1; ph = p; end
    end
    check(found, "period sequence is not the +/-4 DELTA triangle");
    if (!found) for (int i = 0; i < 20; i++) $display("dev[%0d] = %0d", i, dev[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
