// tb_payload_fifo: random writes and reads against a queue model; the flag
// must appear on dout exactly one clock after the read.
// The one-flag-per-event payload buffer follows the published design; the
// one-clock read latency is this design's own.
`timescale 1ns/1ps
module tb_payload_fifo;
  logic clk = 0, rst_n = 0, wr_en = 0, din = 0, rd_en = 0, dout, empty, full;
  always #12.5 clk = ~clk;
  payload_fifo dut (.*);
  int checks = 0, failures = 0;
  bit q [$];
  bit exp_valid = 0, exp_val = 0;
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (exp_valid) begin
        checks++; if (dout != exp_val) begin failures++; $display("FAIL %0d dout=%b", i, dout); end
      end
      checks++; if (full != (q.size() == 16) || empty != (q.size() == 0)) begin failures++; $display("FAIL flags"); end
      rd_en = (q.size() > 0) && ($urandom_range(0, 2) == 0);
      wr_en = (i < 60) ? 1'b1 : ($urandom_range(0, 2) == 0);
      din = 1'($urandom);
      begin
        bit was_full;
        was_full = (q.size() == 16);
        exp_valid = rd_en;
        if (rd_en) exp_val = q.pop_front();
        if (wr_en && !was_full) q.push_back(din);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
