// tb_sdf_bf_stage -- checks one delay-feedback butterfly stage (DELAY = 32).
//
// Random samples are offered with random gaps (in_valid low). For every
// group of 2*DELAY accepted samples x[0..2D-1] the stage must output, DELAY
// accepted samples later, first (x[i] + x[i+D]) >> 1 for i = 0..D-1 and then
// (x[i] - x[i+D]) >> 1. The testbench keeps the last group of inputs and
// forms each expected word from it; out_valid must stay low for exactly the
// first DELAY accepted samples.
`timescale 1ps/1ps
module tb_sdf_bf_stage;
  import fft_pkg::*;
  localparam int D = 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  cplx_t in_data = '0, out_data;

  sdf_bf_stage #(.DELAY(D)) dut (.*);
  always #5000 clk = ~clk;

  int grp_re [2*D];
  int grp_im [2*D];
  int n_in = 0, n_out = 0;
  int er, ei, o_re, o_im, p;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n && in_valid) begin
    o_re = int'(out_data.re);
    o_im = int'(out_data.im);
    p  = n_in % (2*D);
    if (n_in < D) check(!out_valid, "out_valid while filling");
    else begin
      if (p >= D) begin   // pair complete: half sum of x[p-D] and x[p]
        er = (grp_re[p-D] + int'(in_data.re)) >>> 1;
        ei = (grp_im[p-D] + int'(in_data.im)) >>> 1;
      end else begin      // half difference of the previous group's pair p
        er = (grp_re[p] - grp_re[p+D]) >>> 1;
        ei = (grp_im[p] - grp_im[p+D]) >>> 1;
      end
      check(out_valid && o_re == er && o_im == ei,
            $sformatf("out %0d: (%0d,%0d) expected (%0d,%0d)", n_out, o_re, o_im, er, ei));
      n_out++;
    end
    grp_re[p] = int'(in_data.re);
    grp_im[p] = int'(in_data.im);
    n_in++;
  end

  initial begin
    #22000 rst_n = 1;
    repeat (8 * D) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      in_data  = '{re: 16'($urandom), im: 16'($urandom)};
    end
    @(negedge clk) in_valid = 0;
    check(n_out > 4 * D, "too few outputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
