// tb_twiddle_cmult -- checks the W64 twiddle multiplier.
//
// A random stream with gaps is applied. For frame position t the expected
// factor is exp(-j*2*pi*n*k/64) with n = t mod 8 and k the bit-reversed
// t[5:3]; the product is computed in floating point and the output must
// match it to within two LSB (coefficient and output rounding).
`timescale 1ps/1ps
module tb_twiddle_cmult;
  import fft_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  cplx_t in_data = '0, out_data;

  twiddle_cmult dut (.*);
  always #5000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  int  t = 0, n, k;
  real ang, er, ei, dr, di;
  always @(posedge clk) if (rst_n && in_valid) begin
    n   = t % 8;
    k   = ((t >> 5) & 1) | (((t >> 4) & 1) << 1) | (((t >> 3) & 1) << 2);
    ang = -2.0 * 3.14159265358979 * real'(n * k) / 64.0;
    er  = real'(int'(in_data.re)) * $cos(ang) - real'(int'(in_data.im)) * $sin(ang);
    ei  = real'(int'(in_data.re)) * $sin(ang) + real'(int'(in_data.im)) * $cos(ang);
    dr  = real'(int'(out_data.re)) - er;
    di  = real'(int'(out_data.im)) - ei;
    check(out_valid && dr < 2.0 && dr > -2.0 && di < 2.0 && di > -2.0,
          $sformatf("t %0d: (%0d,%0d) expected (%0.1f,%0.1f)", t, int'(out_data.re), int'(out_data.im), er, ei));
    t = (t + 1) % 64;
  end

  initial begin
    #22000 rst_n = 1;
    repeat (400) begin
      @(negedge clk);
      in_valid = ($urandom_range(4) != 0);
      in_data  = '{re: 16'(int'($urandom_range(40000)) - 20000), im: 16'(int'($urandom_range(40000)) - 20000)};
    end
    @(negedge clk) in_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
