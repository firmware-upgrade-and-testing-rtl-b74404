// tb_branch_controller: sixteen channel models raise messages at random
// times and hold them until acknowledged; every message must be delivered
// exactly once with its channel number, and none may be lost.
// The round-robin order follows the published design; the message pattern,
// random timing and amounts are this bench's own.
`timescale 1ns/1ps
module tb_branch_controller;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;
  logic [N-1:0] ch_valid = '0, ch_ack;
  logic [N-1:0][47:0] ch_msg = '0;
  logic out_valid, out_ack = 0;
  logic [3:0] out_ch;
  logic [47:0] out_msg;
  branch_controller #(.NCH(N)) dut (.*);
  int checks = 0, failures = 0, sent = 0, got = 0;
  int seq [N];
  initial for (int c = 0; c < N; c++) seq[c] = 0;
  // channel models
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < N; c++) begin
      if (ch_ack[c]) ch_valid[c] <= 1'b0;
      else if (!ch_valid[c] && sent < 400 && $urandom_range(0, 30) == 0) begin
        ch_valid[c] <= 1'b1;
        ch_msg[c] <= {8'(c), 8'(seq[c]), 32'hC0FFEE00};
        seq[c] = seq[c] + 1;
        sent++;
      end
    end
  end
  // consumer
  int expect_seq [N];
  initial for (int c = 0; c < N; c++) expect_seq[c] = 0;
  always @(posedge clk) begin
    out_ack <= 1'b0;
    if (rst_n && out_valid && !out_ack && $urandom_range(0, 2) == 0) begin
      checks++;
      if (out_msg[47:40] != 8'(out_ch) || out_msg[39:32] != 8'(expect_seq[out_ch])) begin
        failures++; $display("FAIL ch %0d msg %h", out_ch, out_msg);
      end
      expect_seq[out_ch] = expect_seq[out_ch] + 1;
      got++;
      out_ack <= 1'b1;
    end
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    while (sent < 400) @(negedge clk);
    repeat (500) @(negedge clk);
    checks++; if (got != sent) begin failures++; $display("FAIL got %0d sent %0d", got, sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
