// tb_chan_a_decoder: random channel A pulses of length 1 to 4 clocks; each
// must give exactly one L0 (length 1), L1a (length 2) or error strobe
// (longer), one clock after the pulse ends.
// The pulse lengths for L0 and L1a follow the published channel A coding;
// treating longer pulses as errors is this design's own rule.
`timescale 1ns/1ps
module tb_chan_a_decoder;
  logic clk = 0, rst_n = 0, chan_a = 0;
  logic l0, l1a, err;
  always #12.5 clk = ~clk;
  chan_a_decoder dut (.*);
  int checks = 0, failures = 0;
  int n_l0 = 0, n_l1a = 0, n_err = 0;
  always @(posedge clk) if (rst_n) begin
    if (l0) n_l0++;
    if (l1a) n_l1a++;
    if (err) n_err++;
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      int len, a0, a1, ae;
      len = 1 + int'($urandom_range(0, 3));
      a0 = n_l0; a1 = n_l1a; ae = n_err;
      chan_a = 1; repeat (len) @(negedge clk); chan_a = 0;
      @(negedge clk);  // strobe is visible here
      checks++;
      if (!(l0 == (len == 1) && l1a == (len == 2) && err == (len > 2))) begin
        failures++; $display("FAIL len=%0d l0=%b l1a=%b err=%b", len, l0, l1a, err);
      end
      repeat (1 + $urandom_range(0, 3)) @(negedge clk);
      checks++;
      if ((n_l0 - a0) + (n_l1a - a1) + (n_err - ae) != 1) begin failures++; $display("FAIL count"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
