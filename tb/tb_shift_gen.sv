// tb_shift_gen -- checks the phase-shift delay line.
//
// A 79.0625 MHz clock (12648 ps) is applied. For sel = 0..3 every rising and
// falling edge of clk_out must follow the matching clk_in edge by
// sel * 3162 ps, i.e. 0, T/4, T/2 and 3T/4; with en low the delay is zero.
`timescale 1ps/1ps
module tb_shift_gen;
  int checks = 0, failures = 0;
  logic clk_in = 0, en = 1, clk_out;
  logic [1:0] sel = 0;

  shift_gen dut (.*);
  always #6324 clk_in = ~clk_in;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  realtime t0, d;
  int      want_d;

  initial begin
    for (int m = 0; m < 5; m++) begin
      en     = (m < 4);
      sel    = 2'(m % 4);
      want_d = (m < 4 ? m : 0) * 3162;
      repeat (3) @(posedge clk_in);
      for (int e = 0; e < 8; e++) begin
        if (e % 2 == 0) @(posedge clk_in); else @(negedge clk_in);
        t0 = $realtime;
        if (want_d == 0) begin
          #1;
          check(clk_out == clk_in, $sformatf("en=%0b sel=%0d: output does not follow at once", en, sel));
        end else begin
          if (e % 2 == 0) @(posedge clk_out); else @(negedge clk_out);
          d = $realtime - t0;
          check(d == realtime'(want_d), $sformatf("en=%0b sel=%0d delay %0t, expected %0d", en, sel, d, want_d));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
