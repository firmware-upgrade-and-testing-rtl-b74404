// tb_transmitter: checks the command words against the published line
// captures (request ID 0: Request Event ID 0100 gives data bits 0..15 =
// 00000000 01010101, Resend 0101 gives 00000000 10110100, Force pop 0110
// gives 00000000 11001100), that only enabled channels carry the frame,
// that the control bus wins when both ask, and that both requests are
// served.
`timescale 1ns/1ps
module tb_transmitter;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;
  logic ev_req = 0, dcs_req = 0, ev_ack, dcs_ack, busy;
  logic [3:0] ev_cmd = 0, ev_reqid = 0, dcs_cmd = 0, dcs_reqid = 0;
  logic [N-1:0] chen = '0, tx;
  transmitter #(.NUM_CH(N)) dut (.*);
  int checks = 0, failures = 0;
  time dcs_t = 0, ev_t = 0;
  always @(posedge clk) begin
    if (dcs_ack) dcs_t = $time;
    if (ev_ack)  ev_t = $time;
  end
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // capture the frame on every channel, middle sample of each bit
  task automatic capture(output logic [N-1:0][19:0] f);
    int g = 0;
    while (&tx && g < 200) begin @(negedge clk); g++; end
    for (int b = 0; b < 20; b++) begin
      @(negedge clk); @(negedge clk);
      for (int c = 0; c < N; c++) f[c][b] = tx[c];
      @(negedge clk); @(negedge clk); @(negedge clk);
    end
  endtask

  // data bits 0..15 as printed in the captures (leftmost = bit 0)
  function automatic logic [15:0] printed(input string s);
    logic [15:0] w;
    for (int i = 0; i < 16; i++) w[i] = (s[i] == "1");
    return w;
  endfunction

  initial begin
    logic [N-1:0][19:0] f;
    logic [15:0] exp_w [3];
    logic [3:0] cmds [3];
    exp_w[0] = printed("0000000001010101"); cmds[0] = 4'b0100;
    exp_w[1] = printed("0000000010110100"); cmds[1] = 4'b0101;
    exp_w[2] = printed("0000000011001100"); cmds[2] = 4'b0110;
    repeat (3) @(negedge clk); rst_n = 1; repeat (2) @(negedge clk);
    for (int k = 0; k < 3; k++) begin
      chen = 8'b1010_0101;
      ev_cmd = cmds[k]; ev_reqid = 4'h0; ev_req = 1;
      while (!ev_ack) @(negedge clk);
      ev_req = 0;
      capture(f);
      for (int c = 0; c < N; c++) begin
        if (chen[c]) check(f[c] == {1'b0, ^exp_w[k], exp_w[k], 1'b1, 1'b0},
                            $sformatf("cmd %b ch %0d frame %b", cmds[k], c, f[c]));
        else         check(f[c] == '1, $sformatf("disabled ch %0d idle", c));
      end
      while (busy) @(negedge clk);
    end
    // both request: control bus first, then event verification
    chen = 8'hFF;
    ev_cmd = 4'b0100; ev_reqid = 4'h3; ev_req = 1;
    dcs_cmd = 4'b0111; dcs_reqid = 4'h9; dcs_req = 1;
    @(negedge clk); @(negedge clk);
    dcs_req = 0;
    capture(f);
    check(f[0][17:2] == bb_pkg::bb_cmd_word(4'b0111, 4'h9), "control bus command sent");
    while (!ev_ack) @(negedge clk);
    ev_req = 0;
    capture(f);
    check(f[7][17:2] == bb_pkg::bb_cmd_word(4'b0100, 4'h3), "event request sent after");
    check(dcs_t < ev_t, "control bus served first");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
