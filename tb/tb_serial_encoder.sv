// tb_serial_encoder: sends random words and records the line every clock;
// the 100 samples must be S1=0, S2=1, data bit 0 first, even parity, stop
// 0, each bit five clocks, and busy must last exactly 100 clocks.
// Frame layout and bit rate follow the published protocol (bit order as in
// its example waveforms); the random words are this bench's own.
`timescale 1ns/1ps
module tb_serial_encoder;
  logic clk = 0, rst_n = 0, start = 0, busy, tx;
  logic [15:0] word = 0;
  always #2.5 clk = ~clk;
  serial_encoder dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (3) @(negedge clk); rst_n = 1; repeat (2) @(negedge clk);
    for (int k = 0; k < 50; k++) begin
      logic [19:0] f;
      int nb;
      word = (k == 0) ? 16'h5500 : 16'($urandom);
      f = {1'b0, ^word, word, 1'b1, 1'b0};
      start = 1; @(negedge clk); start = 0;
      nb = 0;
      for (int s = 0; s < 100; s++) begin
        checks++;
        if (tx != f[s / 5]) begin failures++; $display("FAIL word %h sample %0d", word, s); end
        if (busy) nb++;
        @(negedge clk);
      end
      checks++;
      if (nb != 100 || busy || tx != 1'b1) begin failures++; $display("FAIL busy %0d", nb); end
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
