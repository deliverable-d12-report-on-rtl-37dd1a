// reset_sync -- reset synchronizer for one clock domain.
//
// rst_n_in asserts rst_n_out at once (asynchronously); its release is passed
// through two flip-flops of clk, so every domain leaves reset on one of its
// own clock edges. A clock domain that is stopped stays in reset until its
// clock runs. This helper is this design's; the original design does not describe
// the reset scheme.
`timescale 1ps/1ps
module reset_sync (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n_out
);

  logic s1;

  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) begin
      s1        <= 1'b0;
      rst_n_out <= 1'b0;
    end else begin
      s1        <= 1'b1;
      rst_n_out <= s1;
    end
  end

endmodule
