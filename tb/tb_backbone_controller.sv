// tb_backbone_controller: eight branch models offer messages at random;
// each must appear once on the output with channel branch*16 + local
// number, and nothing may be passed on while out_ready is low.
// The channel numbering (branch times 16 plus local channel) follows the
// published tree of 16-channel branches; the traffic is this bench's own.
`timescale 1ns/1ps
module tb_backbone_controller;
  localparam int NB = 8;
  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;
  logic [NB-1:0] br_valid = '0, br_ack;
  logic [NB-1:0][3:0] br_ch = '0;
  logic [NB-1:0][47:0] br_msg = '0;
  logic out_valid, out_ready = 1;
  logic [6:0] out_ch;
  logic [47:0] out_msg;
  backbone_controller #(.NBR(NB), .CH_PER_BRANCH(16)) dut (.*);
  int checks = 0, failures = 0, sent = 0, got = 0;
  logic ready_q = 1;
  always @(posedge clk) if (rst_n) begin
    for (int b = 0; b < NB; b++) begin
      if (br_ack[b]) br_valid[b] <= 1'b0;
      else if (!br_valid[b] && sent < 300 && $urandom_range(0, 20) == 0) begin
        logic [3:0] l;
        l = 4'($urandom);
        br_valid[b] <= 1'b1; br_ch[b] <= l;
        br_msg[b] <= {7'(b * 16 + int'(l)), 41'(sent)};
        sent++;
      end
    end
  end
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (out_msg[47:41] != out_ch || !ready_q) begin failures++; $display("FAIL ch %0d msg %h ready %b", out_ch, out_msg, ready_q); end
      got++;
    end
    ready_q <= out_ready;
    out_ready <= ($urandom_range(0, 3) != 0);
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    while (sent < 300) @(negedge clk);
    repeat (300) @(negedge clk);
    checks++; if (got != sent) begin failures++; $display("FAIL got %0d sent %0d", got, sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
