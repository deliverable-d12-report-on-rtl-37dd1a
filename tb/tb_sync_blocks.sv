// tb_sync_blocks -- the four synchronous blocks chained in one clock domain:
// a complete 64-point FFT without the GALS channels.
//
// Random frames are streamed in (natural order) with random input gaps and
// random output back-pressure (out_ready low stalls every block, since each
// block's in_ready equals its out_ready). Each output word t of a frame must
// equal X[bitrev6(t)]/64 of a floating-point DFT within TOL LSB. The first
// output must appear after exactly 63 accepted input samples, the number of
// words the six delay lines hold (32+16+8+4+2+1).
`timescale 1ps/1ps
module tb_sync_blocks;
  import fft_pkg::*;
  localparam int NF  = 4;
  localparam int TOL = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic  v0, v1, v2, v3, v4, r1, r2, r3, r4, r0;
  cplx_t d0, d1, d2, d3, d4;
  logic  out_ready;

  sync_block1 u1 (.clk, .rst_n, .in_valid(v0), .in_data(d0), .in_ready(r0), .out_valid(v1), .out_data(d1), .out_ready(r1));
  sync_block2 u2 (.clk, .rst_n, .in_valid(v1), .in_data(d1), .in_ready(r1), .out_valid(v2), .out_data(d2), .out_ready(r2));
  sync_block3 u3 (.clk, .rst_n, .in_valid(v2), .in_data(d2), .in_ready(r2), .out_valid(v3), .out_data(d3), .out_ready(r3));
  sync_block4 u4 (.clk, .rst_n, .in_valid(v3), .in_data(d3), .in_ready(r3), .out_valid(v4), .out_data(d4), .out_ready(r4));
  assign r4 = out_ready;

  always #5000 clk = ~clk;

  int  xr [NF+1][64];
  int  xi [NF+1][64];
  real er [NF][64];
  real ei [NF][64];
  int  n_in = 0, n_out = 0, first_out_at = -1;
  real dr, di;
  int  f, k;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic int bitrev6(input int v);
    int r = 0;
    for (int b = 0; b < 6; b++) if (v[b]) r |= 1 << (5 - b);
    return r;
  endfunction

  initial begin
    for (int fr = 0; fr <= NF; fr++)
      for (int n = 0; n < 64; n++) begin
        xr[fr][n] = (fr == NF) ? 0 : int'($urandom_range(32766)) - 16383;
        xi[fr][n] = (fr == NF) ? 0 : int'($urandom_range(32766)) - 16383;
      end
    for (int fr = 0; fr < NF; fr++)
      for (int kk = 0; kk < 64; kk++) begin
        real sr, si;
        sr = 0;
        si = 0;
        for (int n = 0; n < 64; n++) begin
          real a;
          a = -2.0 * 3.14159265358979 * real'(n * kk) / 64.0;
          sr += xr[fr][n] * $cos(a) - xi[fr][n] * $sin(a);
          si += xr[fr][n] * $sin(a) + xi[fr][n] * $cos(a);
        end
        er[fr][kk] = sr / 64.0;
        ei[fr][kk] = si / 64.0;
      end
  end

  // source
  assign d0 = (n_in < (NF + 1) * 64) ? '{re: 16'(xr[n_in / 64][n_in % 64]), im: 16'(xi[n_in / 64][n_in % 64])} : '0;
  logic gap;
  assign v0 = rst_n && !gap && (n_in < (NF + 1) * 64);

  always @(posedge clk) begin
    gap       <= ($urandom_range(3) == 0);
    out_ready <= ($urandom_range(4) != 0);
    if (rst_n && v4 && r4 && n_out < NF * 64) begin
      if (first_out_at < 0) first_out_at = n_in;
      f  = n_out / 64;
      k  = bitrev6(n_out % 64);
      dr = real'(int'(d4.re)) - er[f][k];
      di = real'(int'(d4.im)) - ei[f][k];
      check(dr < TOL && dr > -TOL && di < TOL && di > -TOL,
            $sformatf("frame %0d X[%0d] = (%0d,%0d) expected (%0.1f,%0.1f)", f, k,
                      int'(d4.re), int'(d4.im), er[f][k], ei[f][k]));
      n_out++;
    end
    if (rst_n && v0 && r0) n_in++;
  end

  initial begin
    gap = 0; out_ready = 1;
    #22000 rst_n = 1;
    wait (n_out == NF * 64);
    check(first_out_at == 63, $sformatf("first output after %0d inputs, expected 63", first_out_at));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
