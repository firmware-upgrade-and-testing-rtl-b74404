// tb_trigger_receiver: runs one L2 accept sequence and one orphan sequence
// through channel A and the message inputs, reads the nine CDH words of
// each on clock A and checks their fields and parity against the CDH
// layout; also checks register access through the RCU bus.
// The CDH word layout follows the published header format; the event flag
// bits and the register map are this design's own.
`timescale 1ns/1ps
module tb_trigger_receiver;
  logic clk_a = 0, clk_b = 0, rst_n = 0;
  always #2.5  clk_a = ~clk_a;
  always #12.5 clk_b = ~clk_b;
  logic chan_a = 0, msg_l1a = 0, msg_l2a = 0, msg_l2r = 0;
  logic [11:0] msg_bcid = 0;
  logic [23:0] msg_orbit = 0;
  logic l0, l1a, seq_busy, seq_end, include_payload, end_l2r, end_timeout, end_orphan, l1r;
  logic [7:0] buffered_words;
  logic [15:0] rcu_addr = 16'h4000;
  logic rcu_we = 0, rcu_hi = 0;
  logic [31:0] rcu_wdata = 0, rcu_rdata;
  logic cdh_rd = 0, cdh_empty;
  logic [32:0] cdh_data;
  trigger_receiver dut (.clk_b, .rst_n, .chan_a, .msg_l1a, .msg_l2a, .msg_l2r, .msg_bcid, .msg_orbit,
    .l0, .l1a, .seq_busy, .seq_end, .include_payload, .end_l2r, .end_timeout, .end_orphan, .l1r,
    .buffered_words, .rcu_addr, .rcu_we, .rcu_hi, .rcu_wdata, .rcu_rdata,
    .clk_a, .rst_a_n(rst_n), .cdh_rd, .cdh_data, .cdh_empty);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  task automatic cyc(input int n); repeat (n) @(negedge clk_b); endtask
  task automatic pulse(input int len); chan_a = 1; repeat (len) @(negedge clk_b); chan_a = 0; endtask

  logic [32:0] w [9];
  task automatic read_cdh();
    for (int i = 0; i < 9; i++) begin
      int g = 0;
      @(negedge clk_a);
      while (cdh_empty && g < 1000) begin @(negedge clk_a); g++; end
      w[i] = cdh_data; cdh_rd = 1; @(negedge clk_a); cdh_rd = 0;
    end
  endtask

  initial begin
    cyc(3); rst_n = 1; cyc(3);
    // registers
    check(rcu_rdata == 32'd240, "L1 window reset value");
    rcu_addr = 16'h4001; #1; check(rcu_rdata == 32'd3520, "L2 timeout reset value");
    @(negedge clk_b); rcu_wdata = 32'd3000; rcu_we = 1; @(negedge clk_b); rcu_we = 0;
    check(rcu_rdata == 32'd3000, "L2 timeout written");
    // L2 accept sequence
    pulse(1); cyc(200); pulse(2); cyc(10);
    msg_bcid = 12'h58C; msg_orbit = 24'hC86B94; msg_l1a = 1; cyc(1); msg_l1a = 0; cyc(50);
    msg_l2a = 1; cyc(1); msg_l2a = 0;
    read_cdh();
    for (int i = 0; i < 9; i++) check(w[i][32] == ^w[i][31:0], $sformatf("parity word %0d", i));
    check(w[0][31:16] == 16'hA956, "event info marker");
    check(w[0][6:0] == 7'b0001111, $sformatf("event info flags %b", w[0][6:0]));
    check(w[2][11:0] == 12'h58C && w[2][27:24] == 4'd2, "header 01: BCID and version");
    check(w[3][23:0] == 24'hC86B94, "header 02: orbit");
    // orphan messages only
    msg_bcid = 12'h001; msg_orbit = 24'h000002;
    cyc(5); msg_l1a = 1; cyc(1); msg_l1a = 0; cyc(20); msg_l2a = 1; cyc(1); msg_l2a = 0;
    read_cdh();
    check(w[0][6] == 1'b1 && w[0][0] == 1'b0, "orphan: flagged, no payload");
    check(w[2][11:0] == 12'h001 && w[3][23:0] == 24'h000002, "orphan event ID");
    rcu_addr = 16'h4003; #1; check(rcu_rdata == 32'd1, "orphan counter");
    rcu_addr = 16'h4002; #1; check(rcu_rdata == 32'd2, "sequence counter");
    cyc(10); check(cdh_empty, "FIFO empty after reading");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk_b);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
