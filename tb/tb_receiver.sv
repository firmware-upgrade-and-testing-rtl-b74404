// tb_receiver: 40 channels (three branches) at once; sender models on a
// slightly different clock send replies on random channels, several at the
// same time. Every reply must come out once with its channel number.
// Frame format and word order follow the published protocol; the reduced
// channel count (40, still three branches) keeps the run short.
`timescale 1ns/1ps
module tb_receiver;
  localparam int N = 40;
  logic clk = 0, clk_s = 0, rst_n = 0;
  always #2.5  clk = ~clk;
  always #2.51 clk_s = ~clk_s;
  logic [N-1:0] rx = '1;
  logic out_valid, out_ready = 1;
  logic [6:0] out_ch;
  logic [47:0] out_msg;
  logic [15:0] err_count;
  receiver #(.NUM_CH(N), .CH_PER_BRANCH(16)) dut (.*);
  int checks = 0, failures = 0, got = 0, sent = 0;
  int count_ch [N];

  task automatic send(input int c, input logic [47:0] m);
    logic [62:0] s;
    s = {1'b1, 1'b0, ^m[15:0], m[15:0], 2'b10,
         1'b1, 1'b0, ^m[31:16], m[31:16], 2'b10,
         1'b1, 1'b0, ^m[47:32], m[47:32], 2'b10};
    for (int b = 0; b < 63; b++) repeat (5) begin @(posedge clk_s); #0.1 rx[c] = s[b]; end
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (out_msg[47:40] != 8'(out_ch) || out_msg[39:0] != 40'hFACE_0000_00 + 40'(out_ch)) begin
      failures++; $display("FAIL ch %0d msg %h", out_ch, out_msg);
    end
    count_ch[int'(out_ch)] = count_ch[int'(out_ch)] + 1;
    got++;
  end

  initial begin
    for (int c = 0; c < N; c++) count_ch[c] = 0;
    repeat (4) @(negedge clk); rst_n = 1; repeat (4) @(negedge clk);
    for (int round = 0; round < 3; round++) begin
      for (int c = 0; c < N; c++) begin
        automatic int cc = c;
        fork send(cc, {8'(cc), 40'hFACE_0000_00 + 40'(cc)}); join_none
        sent++;
      end
      wait fork;
      repeat (300) @(posedge clk);
    end
    repeat (200) @(negedge clk);
    checks++; if (got != sent) begin failures++; $display("FAIL got %0d sent %0d", got, sent); end
    for (int c = 0; c < N; c++) begin
      checks++; if (count_ch[c] != 3) begin failures++; $display("FAIL channel %0d count %0d", c, count_ch[c]); end
    end
    checks++; if (err_count != 0) begin failures++; $display("FAIL errors %0d", err_count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
