// tb_r23_rotator -- checks the -j and W8 rotations of both 8-point FFTs.
//
// Four instances (-j and W8, for HI = 5 and HI = 2) see the same random
// stream. For each frame position t the expected factor is worked out from
// the radix-2^3 rule and applied in floating point; the outputs must match
// to within one LSB.
`timescale 1ps/1ps
module tb_r23_rotator;
  import fft_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  cplx_t in_data = '0;
  logic [3:0] ov;
  cplx_t od [4];

  r23_rotator #(.KIND(ROT_MINUSJ), .HI(5)) u0 (.clk, .rst_n, .in_valid, .in_data, .out_valid(ov[0]), .out_data(od[0]));
  r23_rotator #(.KIND(ROT_W8),     .HI(5)) u1 (.clk, .rst_n, .in_valid, .in_data, .out_valid(ov[1]), .out_data(od[1]));
  r23_rotator #(.KIND(ROT_MINUSJ), .HI(2)) u2 (.clk, .rst_n, .in_valid, .in_data, .out_valid(ov[2]), .out_data(od[2]));
  r23_rotator #(.KIND(ROT_W8),     .HI(2)) u3 (.clk, .rst_n, .in_valid, .in_data, .out_valid(ov[3]), .out_data(od[3]));

  always #5000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // expected rotation angle in eighths of a turn (negative = clockwise)
  function automatic int eighths(input int inst, input int t);
    int hi = (inst < 2) ? 5 : 2;
    int b0 = (t >> hi) & 1, b1 = (t >> (hi - 1)) & 1, b2 = (t >> (hi - 2)) & 1;
    if (inst % 2 == 0) return (b0 && b1) ? 2 : 0;        // -j = 2/8 turn
    return b2 ? (b0 + 2 * b1) : 0;                       // W8^m
  endfunction

  int  t = 0;
  real ang, er, ei, dr, di;
  always @(posedge clk) if (rst_n && in_valid) begin
    for (int i = 0; i < 4; i++) begin
      ang = -2.0 * 3.14159265358979 * real'(eighths(i, t)) / 8.0;
      er  = real'(int'(in_data.re)) * $cos(ang) - real'(int'(in_data.im)) * $sin(ang);
      ei  = real'(int'(in_data.re)) * $sin(ang) + real'(int'(in_data.im)) * $cos(ang);
      dr  = real'(int'(od[i].re)) - er;
      di  = real'(int'(od[i].im)) - ei;
      check(ov[i] && dr < 1.5 && dr > -1.5 && di < 1.5 && di > -1.5,
            $sformatf("inst %0d t %0d: (%0d,%0d) expected (%0.1f,%0.1f)", i, t,
                      int'(od[i].re), int'(od[i].im), er, ei));
    end
    t = (t + 1) % 64;
  end

  initial begin
    #22000 rst_n = 1;
    repeat (300) begin
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
