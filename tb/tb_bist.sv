// tb_bist -- checks the BIST stimulus generator and response compactor.
//
// The generator (N_FRAMES = 2) runs with random back-pressure. Its samples
// are compared with an LFSR model written here, the padding frame must be
// all zero and exactly 3*64 samples must come out before done. The first
// 128 samples are also fed to the compactor (N_WORDS = 128); its signature
// must equal a signature computed here, pass must be high for that value as
// the expected one and low for any other.
`timescale 1ps/1ps
module tb_bist;
  import fft_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, g_valid, g_ready = 0, g_done;
  cplx_t g_data;
  logic [31:0] expected = '0, signature;
  logic m_done, m_pass;

  bist_pattern_gen #(.N_FRAMES(2)) u_gen (.clk, .rst_n, .start, .out_valid(g_valid), .out_data(g_data),
                                          .out_ready(g_ready), .done(g_done));
  bist_misr #(.N_WORDS(128)) u_misr (.clk, .rst_n, .in_valid(g_valid && g_ready), .in_data(g_data),
                                     .expected, .signature, .done(m_done), .pass(m_pass));

  always #5000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  logic [31:0] lfsr = 32'h1, sig = '0, w;
  int n = 0;
  logic signed [15:0] er, ei;

  always @(posedge clk) begin
    g_ready <= ($urandom_range(2) != 0);
    if (rst_n && g_valid && g_ready) begin
      if (n < 128) begin
        er = 16'($signed(lfsr[14:0]));
        ei = 16'($signed(lfsr[30:16]));
        lfsr = lfsr[0] ? ((lfsr >> 1) ^ 32'h8020_0003) : (lfsr >> 1);
      end else begin
        er = 0; ei = 0;
      end
      check(g_data.re == er && g_data.im == ei, $sformatf("sample %0d: %h expected %h%h", n, g_data, er, ei));
      if (n < 128) begin
        w   = {g_data.re, g_data.im};
        sig = {sig[30:0], sig[31] ^ sig[21] ^ sig[1] ^ sig[0]} ^ w;
      end
      n++;
    end
  end

  initial begin
    #22000 rst_n = 1;
    #20000 start = 1;
    wait (g_done);
    repeat (3) @(posedge clk);
    check(n == 192, $sformatf("%0d samples generated, expected 192", n));
    check(!g_valid, "valid after done");
    check(m_done && signature == sig, $sformatf("signature %h, expected %h", signature, sig));
    expected = sig;
    #1 check(m_pass, "pass low for the right signature");
    expected = sig ^ 32'h0000_0100;
    #1 check(!m_pass, "pass high for a wrong signature");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
