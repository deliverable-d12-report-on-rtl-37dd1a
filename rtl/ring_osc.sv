// ring_osc -- behavioural model of the pausable ring-oscillator clock
// generator (not synthesizable: it stands for an analog/custom-cell circuit).
//
// While en is high the model produces a square clock whose frequency is set
// by the 5-bit configuration word cc (CC_FFT on the chip). The frequencies of
// codes 10100..11111 are the twelve measured values of the test chip, from
// 88.4375 MHz down to 61.25 MHz. Lower codes, for which no frequency was
// measured, continue the first step of the table (2.8125 MHz per code); this
// extrapolation is this model's assumption. MISMATCH_PPM lengthens the period
// so that nominally equal oscillators of different blocks drift apart.
// Pausing: before each rising edge the model checks pause_req, standing for
// the mutex between the oscillator and the block's asynchronous ports. If it
// is high the clock is held low (paused = 1) until pause_req falls; the next
// rising edge then follows immediately. With en low the clock stops low.
`timescale 1ps/1ps
module ring_osc #(
  parameter int MISMATCH_PPM = 0
) (
  input  logic       en,
  input  logic [4:0] cc,
  input  logic       pause_req,
  output logic       clk,
  output logic       paused
);

  function automatic real freq_mhz(input logic [4:0] code);
    case (code)
      5'b10100: return 88.4375;
      5'b10101: return 85.625;
      5'b10110: return 81.875;
      5'b10111: return 79.0625;
      5'b11000: return 76.25;
      5'b11001: return 73.4375;
      5'b11010: return 71.5625;
      5'b11011: return 68.875;
      5'b11100: return 66.875;
      5'b11101: return 65.0;
      5'b11110: return 63.125;
      5'b11111: return 61.25;
      default:  return 88.4375 + 2.8125 * real'(20 - int'(code));
    endcase
  endfunction

  realtime half_ps;

  initial begin
    clk    = 1'b0;
    paused = 1'b0;
    forever begin
      if (!en) begin
        clk = 1'b0;
        wait (en);
      end
      if (pause_req) begin
        paused = 1'b1;
        wait (!pause_req);
        paused = 1'b0;
      end
      half_ps = 1.0e6 / freq_mhz(cc) / 2.0 * (1.0 + real'(MISMATCH_PPM) * 1.0e-6);
      clk = 1'b1;
      #(half_ps);
      clk = 1'b0;
      #(half_ps);
    end
  end

endmodule
