// tb_sequence_validator: drives the legal trigger sequences (L2 accept,
// L2 reject, L1 reject), an L2 timeout and orphan messages, and checks the
// end flags, include payload, busy and the event ID of each sequence, and
// that the timeout fires exactly l2_timeout clocks after L0.
// The legal sequences and the orphan handling follow the published design;
// the exact clock counts between triggers are this bench's own.
`timescale 1ns/1ps
module tb_sequence_validator;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;
  logic l0 = 0, l1a = 0, chan_a_err = 0, msg_l1a = 0, msg_l2a = 0, msg_l2r = 0;
  logic [11:0] msg_bcid = 0;
  logic [23:0] msg_orbit = 0;
  logic [15:0] l1_window = 16'd240, l2_timeout = 16'd600;
  logic seq_busy, seq_end, end_l2a, end_l2r, end_timeout, end_orphan, include_payload, l1r;
  logic [6:0] event_info;
  logic [3:0] event_err;
  logic [11:0] bcid;
  logic [23:0] orbit;
  sequence_validator dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  task automatic cyc(input int n); repeat (n) @(negedge clk); endtask
  task automatic strobe(ref logic s); s = 1; @(negedge clk); s = 0; endtask

  // capture of the last end
  logic [9:0] last;   // {seq_end, l2a, l2r, tmo, orphan, payload, l1r, ...}
  int end_time, t_start, n_end = 0, n_l1r = 0;
  logic [35:0] last_id;
  logic [6:0] last_info;
  always @(posedge clk) begin
    if (rst_n && seq_end) begin
      n_end++; end_time = $time; last_id = {bcid, orbit}; last_info = event_info;
      last = {1'b1, end_l2a, end_l2r, end_timeout, end_orphan, include_payload, 4'b0};
    end
    if (rst_n && l1r) n_l1r++;
  end

  initial begin
    cyc(3); rst_n = 1; cyc(2);
    // L2 accept
    strobe(l0); check(seq_busy, "busy after L0");
    cyc(200); strobe(l1a); cyc(10);
    msg_bcid = 12'h58C; msg_orbit = 24'hC86B94; strobe(msg_l1a); cyc(100);
    strobe(msg_l2a); cyc(2);
    check(n_end == 1 && last[8] && last[4] && !last[5], "L2a ends with payload");
    check(last_id == 36'h58CC86B94, "event ID latched");
    check(last_info == 7'b0001111, $sformatf("event info L2a %b", last_info));
    check(!seq_busy, "idle after L2a");
    // L2 reject
    strobe(l0); cyc(100); strobe(l1a); cyc(5); strobe(msg_l1a); cyc(5); strobe(msg_l2r); cyc(2);
    check(n_end == 2 && last[7] && !last[4], "L2r ends without payload");
    // L1 reject
    strobe(l0); t_start = $time; cyc(260);
    check(n_l1r == 1 && n_end == 2 && !seq_busy, "L0 without L1a is an L1 reject");
    // L2 timeout: count exact latency
    @(negedge clk); l0 = 1; @(negedge clk); l0 = 0; t_start = $time;
    cyc(100); strobe(l1a); cyc(5); strobe(msg_l1a);
    cyc(600);
    check(n_end == 3 && last[6] && !last[4], "L2 timeout");
    // L0 registered at the edge after t_start-25ns; timeout after 600 clocks
    check((end_time - t_start) / 25 >= 598 && (end_time - t_start) / 25 <= 601,
          $sformatf("timeout latency %0d clocks", (end_time - t_start) / 25));
    // orphan L1a + L2a messages
    strobe(msg_l1a); check(seq_busy, "orphan message starts a sequence");
    cyc(20); strobe(msg_l2a); cyc(2);
    check(n_end == 4 && last[8] && last[5] && !last[4], "orphan L2a: no payload");
    // orphan L2a alone
    strobe(msg_l2a); cyc(2);
    check(n_end == 5 && last[5] && !last[4] && !seq_busy, "orphan L2a alone");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
