// tb_serial_receiver: a sender on a clock 0.4 % faster than the receiver
// sends three-word replies (bit 0 first, one idle bit between words); each
// reply must come out as one 48-bit message. A frame with a wrong parity
// bit must pulse err and be dropped, and the following good reply must
// still be received.
`timescale 1ns/1ps
module tb_serial_receiver;
  logic clk = 0, clk_s = 0, rst_n = 0, rx = 1, msg_valid, msg_ack = 0, err;
  logic [47:0] msg;
  always #2.5   clk = ~clk;
  always #2.49  clk_s = ~clk_s;
  serial_receiver dut (.*);
  int checks = 0, failures = 0, n_err = 0;
  always @(posedge clk) if (rst_n && err) n_err++;

  task automatic send_word(input logic [15:0] w, input bit bad_parity);
    logic [20:0] f;
    f = {1'b1, 1'b0, (^w) ^ bad_parity, w, 1'b1, 1'b0};
    for (int b = 0; b < 21; b++) repeat (5) begin @(posedge clk_s); #0.1 rx = f[b]; end
  endtask
  task automatic send_msg(input logic [47:0] m, input int bad);
    send_word(m[47:32], bad == 0); send_word(m[31:16], bad == 1); send_word(m[15:0], bad == 2);
  endtask
  task automatic expect_msg(input logic [47:0] m);
    int g = 0;
    while (!msg_valid && g < 300) begin @(negedge clk); g++; end
    checks++;
    if (!msg_valid || msg != m) begin failures++; $display("FAIL got %h exp %h", msg, m); end
    msg_ack = 1; @(negedge clk); msg_ack = 0; @(negedge clk);
  endtask

  initial begin
    repeat (4) @(negedge clk); rst_n = 1; repeat (4) @(negedge clk);
    for (int k = 0; k < 20; k++) begin
      logic [47:0] m;
      m = (k == 0) ? 48'h258CC86B9407 : {16'($urandom), $urandom};
      send_msg(m, -1);
      expect_msg(m);
      repeat ($urandom_range(0, 20)) @(posedge clk_s);
    end
    send_msg(48'h111122223333, 1);
    repeat (300) @(negedge clk);  // longer than the gap timeout
    checks++; if (n_err != 1 || msg_valid) begin failures++; $display("FAIL bad parity n_err=%0d", n_err); end
    send_msg(48'hABCD_EF01_2345, -1);
    expect_msg(48'hABCD_EF01_2345);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
