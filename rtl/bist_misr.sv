// bist_misr -- built-in self-test response compactor and checker.
//
// Folds the first N_WORDS valid FFT output words into a 32-bit multiple-input
// signature register: sig <= {sig[30:0], fb} ^ {re, im}, with fb the XOR of
// sig bits 31, 21, 1 and 0 (same polynomial as the pattern LFSR). After the
// last word done rises and pass reports whether the signature equals
// expected. The result depends only on the output values, not on their
// timing, which is why one expected signature serves every clocking mode.
// The original design says BIST judged each functional test; the compactor, its
// polynomial and the external expected value are this design's.
`timescale 1ps/1ps
module bist_misr
  import fft_pkg::*;
#(
  parameter int unsigned N_WORDS = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  cplx_t       in_data,
  input  logic [31:0] expected,
  output logic [31:0] signature,
  output logic        done,
  output logic        pass
);

  localparam int unsigned CW = $clog2(N_WORDS + 1);

  logic [CW-1:0] cnt;
  logic          fb;

  assign fb   = signature[31] ^ signature[21] ^ signature[1] ^ signature[0];
  assign done = (cnt == CW'(N_WORDS));
  assign pass = done && (signature == expected);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      signature <= '0;
      cnt       <= '0;
    end else if (in_valid && !done) begin
      signature <= {signature[30:0], fb} ^ {in_data.re, in_data.im};
      cnt       <= cnt + 1'b1;
    end
  end

endmodule
