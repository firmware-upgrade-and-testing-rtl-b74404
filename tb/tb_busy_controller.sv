// tb_busy_controller: drives triggers, sequence ends and event valid
// directly and checks the buffer count, each busy source, the payload rule
// (only events with payload free a buffer on verification), L1 reject, TPC
// mode and the length of the past-future protection.
// The counting rules, the depth of 4 or 8 and the 3520-clock protection
// follow the published design; the shortened protection time (50 clocks)
// and the stimulus order are this bench's own.
`timescale 1ns/1ps
module tb_busy_controller;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;
  logic ttcrx_ready = 1, trg_busy = 0, l0 = 0, l1a = 0, seq_end = 0, include_payload = 0;
  logic end_l2r = 0, end_timeout = 0, end_orphan = 0, l1r = 0, event_valid = 0, tpc_mode = 0;
  logic [3:0] buf_depth = 4'd4, busy_src, buf_count;
  logic [15:0] pfp_time = 16'd50;
  logic busy;
  busy_controller dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s (count=%0d src=%b)", s, buf_count, busy_src); end
  endtask
  task automatic cyc(input int n); repeat (n) @(negedge clk); endtask
  task automatic strobe(ref logic s); s = 1; @(negedge clk); s = 0; endtask
  task automatic finish_seq(input bit payload, input bit l2r, input bit tmo, input bit orphan);
    include_payload = payload; end_l2r = l2r; end_timeout = tmo; end_orphan = orphan; seq_end = 1;
    @(negedge clk); {include_payload, end_l2r, end_timeout, end_orphan, seq_end} = '0;
  endtask

  initial begin
    cyc(3); rst_n = 1; cyc(3);
    check(!busy && buf_count == 0, "idle after reset");
    // four L2a events fill the buffers
    for (int i = 0; i < 4; i++) begin strobe(l0); cyc(2); finish_seq(1, 0, 0, 0); end
    cyc(2);
    check(buf_count == 4 && busy && busy_src[2], "full at 4 buffers");
    // a verified event frees one; payload is read one clock after event valid
    strobe(event_valid); check(buf_count == 4, "not yet decremented in the event valid clock");
    cyc(2); check(buf_count == 3 && !busy_src[2], "event valid frees one buffer");
    repeat (3) begin strobe(event_valid); cyc(3); end
    check(buf_count == 0, "all freed");
    // L2 reject frees at once; its verification later does not
    strobe(l0); cyc(1); finish_seq(0, 1, 0, 0); cyc(2);
    check(buf_count == 0, "L2r frees");
    strobe(event_valid); cyc(3); check(buf_count == 0, "no double free after L2r");
    // timeout
    strobe(l0); cyc(1); finish_seq(0, 0, 1, 0); strobe(event_valid); cyc(3);
    check(buf_count == 0, "timeout frees once");
    // orphan: no count, no free
    strobe(l0); cyc(2); check(buf_count == 1, "L0 counted");
    finish_seq(0, 0, 1, 1); strobe(event_valid); cyc(3);
    check(buf_count == 1, "orphan sequence frees nothing");
    strobe(l1r); cyc(2);
    check(buf_count == 0, "L1 reject frees");
    // TPC mode
    tpc_mode = 1; strobe(l0); cyc(2); check(buf_count == 0, "TPC ignores L0");
    strobe(l1a); cyc(2); check(buf_count == 1, "TPC counts L1a");
    // past-future protection: busy for pfp_time clocks after L1a
    begin
      int n = 0;
      for (int i = 0; i < 80; i++) begin @(negedge clk); if (busy_src[3]) n++; end
      check(n >= 45 && n <= 50, $sformatf("protection lasted %0d clocks", n));
    end
    finish_seq(1, 0, 0, 0); strobe(event_valid); cyc(3); check(buf_count == 0, "TPC event freed");
    tpc_mode = 0;
    // other sources
    trg_busy = 1; cyc(2); check(busy && busy_src[1], "sequence busy"); trg_busy = 0;
    ttcrx_ready = 0; cyc(2); check(busy && busy_src[0], "TTCrx busy"); ttcrx_ready = 1;
    cyc(2); check(!busy, "busy released");
    // depth 8
    buf_depth = 4'd8;
    for (int i = 0; i < 7; i++) strobe(l0);
    cyc(2); check(!busy, "7 of 8 not full");
    strobe(l0); cyc(2); check(busy && buf_count == 8, "8 of 8 full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
