// tb_single_hot_counter -- checks the one-hot ring counter.
//
// After reset the single 1 must sit at INIT_POS (5 here); each enabled clock
// moves it up by one position, wrapping from 15 to 0; a clock with en low
// leaves it in place.
`timescale 1ps/1ps
module tb_single_hot_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [15:0] sel;

  single_hot_counter #(.N_TAPS(16), .INIT_POS(5)) dut (.*);
  always #5000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int pos = 5;
  initial begin
    #12000 rst_n = 1;
    check(sel == 16'h0020, "reset position");
    for (int i = 0; i < 50; i++) begin
      @(negedge clk) en = ($urandom_range(3) != 0);
      @(posedge clk) #1;
      if (en) pos = (pos + 1) % 16;
      check(sel == 16'(1 << pos), $sformatf("step %0d: sel %h, expected position %0d", i, sel, pos));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
