// tb_cdh_fifo: random writes on a 40 MHz clock and random reads on a
// 200 MHz clock; every word must come out once, in order, and the FIFO must
// report full after 128 words.
// The 128-word depth and the 33-bit word follow the published FIFO; the
// traffic pattern is this bench's own.
`timescale 1ns/1ps
module tb_cdh_fifo;
  logic wclk = 0, rclk = 0, rst_n = 0;
  always #12.5 wclk = ~wclk;
  always #2.5  rclk = ~rclk;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [32:0] wdata = 0, rdata;
  logic [7:0] wcount;
  cdh_fifo dut (.wclk, .wrst_n(rst_n), .wr_en, .wdata, .full, .wcount,
                .rclk, .rrst_n(rst_n), .rd_en, .rdata, .empty);
  int checks = 0, failures = 0;
  logic [32:0] q [$];
  int nread = 0;
  bit reading = 0;

  always @(negedge rclk) begin
    rd_en = 0;
    if (reading && !empty && ($urandom_range(0, 3) != 0)) begin
      checks++;
      if (q.size() == 0 || rdata != q[0]) begin failures++; $display("FAIL data %h", rdata); end
      if (q.size() != 0) void'(q.pop_front());
      rd_en = 1; nread++;
    end
  end

  initial begin
    repeat (3) @(negedge wclk); rst_n = 1; @(negedge wclk);
    // fill up without reading
    for (int i = 0; i < 128; i++) begin
      wdata = {$urandom, 1'b0} ^ 33'(i); wr_en = 1; q.push_back(wdata); @(negedge wclk);
    end
    wr_en = 0; @(negedge wclk);
    checks++; if (!full || wcount != 8'd128) begin failures++; $display("FAIL full %b %0d", full, wcount); end
    reading = 1;
    for (int i = 0; i < 400; i++) begin
      wr_en = 0;
      if (!full && $urandom_range(0, 1)) begin
        wdata = {$urandom, $urandom_range(0, 1) == 1}; wr_en = 1; q.push_back(wdata);
      end
      @(negedge wclk);
    end
    wr_en = 0;
    repeat (400) @(negedge wclk);
    checks++; if (q.size() != 0 || !empty) begin failures++; $display("FAIL left %0d", q.size()); end
    $display("read %0d words", nread);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge wclk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
