// tb_gals_channel -- a D port and a P port joined into one asynchronous
// channel between two unrelated clocks (10 ns and 13.7 ns).
//
// The sender offers a numbered sequence of random words with random gaps;
// the receiver takes them with random back-pressure. Every word must arrive
// once, unchanged and in order. The test also checks that the sender's
// pause_req rises while it is blocked with work waiting (want) and falls
// once the receiver has acknowledged, and that a word is not accepted again
// before the previous one is acknowledged (at most one word in flight).
`timescale 1ps/1ps
module tb_gals_channel;
  import fft_pkg::*;
  localparam int NW = 300;
  int checks = 0, failures = 0;
  logic clk_a = 0, clk_b = 0, rst_n = 0;
  logic  in_valid, in_ready, want, pause_req, req, ack, out_valid, out_ready;
  cplx_t in_data, data, out_data;

  gals_dport u_dp (.clk(clk_a), .rst_n, .in_valid, .in_data, .in_ready, .want, .pause_req,
                   .req, .data, .ack);
  gals_pport u_pp (.clk(clk_b), .rst_n, .req, .data, .ack, .out_valid, .out_data, .out_ready);

  always #5000 clk_a = ~clk_a;
  always #6850 clk_b = ~clk_b;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic cplx_t word(input int i);
    return '{re: 16'(i * 7919 + 13), im: 16'(i * 104729 + 5)};
  endfunction

  int n_sent = 0, n_recv = 0, n_pause = 0, n_release = 0, in_flight = 0;
  logic offer;
  cplx_t exp_w;

  assign in_valid = offer && n_sent < NW;
  assign in_data  = word(n_sent);
  assign want     = in_valid;

  always @(posedge clk_a) if (rst_n) begin
    offer <= ($urandom_range(3) != 0);
    if (pause_req) n_pause++;
    if (in_valid && in_ready) n_sent <= n_sent + 1;
  end

  always @(posedge pause_req) begin
    // the pause must end without any further clock of the sender
    wait (!pause_req);
    check(req == ack || !want, "pause released before the acknowledge");
    n_release++;
  end

  always @(posedge clk_b) if (rst_n) begin
    out_ready <= ($urandom_range(2) != 0);
    if (out_valid && out_ready) begin
      exp_w = word(n_recv);
      check(out_data == exp_w, $sformatf("word %0d: got %h expected %h", n_recv, out_data, exp_w));
      n_recv++;
    end
  end

  always @(posedge clk_a) if (rst_n) check(n_sent - n_recv <= 1, "more than one word in flight");

  initial begin
    offer = 0; out_ready = 0;
    #30000 rst_n = 1;
    wait (n_recv == NW);
    repeat (10) @(posedge clk_b);
    check(n_recv == NW && n_sent == NW, "word count");
    check(n_pause > 0 && n_release > 0, "pause_req never raised and released");
    $display("words=%0d pause_cycles=%0d pauses=%0d", n_recv, n_pause, n_release);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
