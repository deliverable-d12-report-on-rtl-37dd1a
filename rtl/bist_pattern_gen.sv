// bist_pattern_gen -- built-in self-test stimulus source for the FFT.
//
// After reset, while start is high, the generator streams N_FRAMES frames of
// 64 pseudo-random complex samples into the FFT input, followed by one frame
// of zeros that pushes the last test frame out of the pipeline (the FFT holds
// 63 samples in its delay lines). The samples come from a 32-bit Galois LFSR
// (taps x^32 + x^22 + x^2 + x + 1, seed 32'h1). Each part is 15 random bits
// sign-extended to 16, so the input stays within half of full scale and no
// rotation can saturate. out_valid/out_ready is a normal stream handshake;
// the LFSR advances only on accepted samples, so the stimulus does not depend
// on how fast the FFT takes it. done rises after the last sample.
// The original design says the functional tests were checked by BIST; pattern source,
// length and seed are this design's.
`timescale 1ps/1ps
module bist_pattern_gen
  import fft_pkg::*;
#(
  parameter int unsigned N_FRAMES = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  output logic  out_valid,
  output cplx_t out_data,
  input  logic  out_ready,
  output logic  done
);

  localparam int unsigned TOTAL = (N_FRAMES + 1) * 64;
  localparam int unsigned CW    = $clog2(TOTAL + 1);

  logic [31:0]   lfsr;
  logic [CW-1:0] cnt;
  logic          zero_phase;

  assign zero_phase = (cnt >= CW'(N_FRAMES * 64));
  assign done       = (cnt == CW'(TOTAL));
  assign out_valid  = start && !done;
  assign out_data   = zero_phase ? '0
                    : '{re: DATA_W'($signed(lfsr[14:0])), im: DATA_W'($signed(lfsr[30:16]))};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr <= 32'h1;
      cnt  <= '0;
    end else if (out_valid && out_ready) begin
      lfsr <= (lfsr >> 1) ^ (lfsr[0] ? 32'h8020_0003 : 32'h0);
      cnt  <= cnt + 1'b1;
    end
  end

endmodule
