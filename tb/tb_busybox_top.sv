// tb_busybox_top: end-to-end test of one BusyBox FPGA at its default size
// (120 D-RORC channels).
//
// Clock B is 40 MHz, clock A 200 MHz derived from it; the 120 D-RORC models
// run on their own 200.4 MHz clock, so the links are plesiochronous. The
// testbench plays the trigger system (channel A pulses and decoded channel B
// messages), the readout (pushing each event ID into the D-RORC queues once
// a header has been shipped) and the DCS board (four-phase bus accesses).
// It runs L2 accept, L2 reject, L2 timeout, L1 reject and orphan sequences,
// fills the front-end buffers, switches to TPC counting, drops TTCrx ready,
// sends all four D-RORC commands (the three debugging ones from the control
// bus), reads the RX memory and the version
// register, and checks the buffer count, the number of verified events and
// the busy sources. Each mechanism must occur at least once.
// The sequences, commands and mechanisms follow the published design and
// its test plan; the D-RORC timing and the event mix are this bench's own.
`timescale 1ns/1ps
module tb_busybox_top;
  import bb_pkg::*;
  localparam int NUM_CH = 120;

  logic clk_a = 0, clk_b = 0, clk_d = 0, rst_n = 0;
  always #2.5   clk_a = ~clk_a;
  always #12.5  clk_b = ~clk_b;
  always #2.495 clk_d = ~clk_d;

  logic ttc_chan_a = 0, msg_l1a = 0, msg_l2a = 0, msg_l2r = 0, ttcrx_ready = 1;
  logic [11:0] msg_bcid = 0;
  logic [23:0] msg_orbit = 0;
  logic busy;
  logic [NUM_CH-1:0] drorc_tx, drorc_rx;
  logic dcs_strobe = 0, dcs_rnw = 1, dcs_ack;
  logic [15:0] dcs_addr = 0, dcs_wdata = 0, dcs_rdata;

  busybox_top dut (.*);

  // ---- D-RORC models ----
  logic        push = 0;
  logic [35:0] push_id = 0;
  int          n_cmd [NUM_CH][16];
  int          q_level [NUM_CH];
  logic [NUM_CH-1:0] push_mask;

  for (genvar c = 0; c < NUM_CH; c++) begin : g_dr
    drorc_model #(.DRORC_ID(8'(c)), .READOUT_DELAY((c == 5) ? 2000 : 0), .REPLY_DELAY(40 + (c % 7)))
      u_dr (.clk(clk_d), .rst_n, .rx(drorc_tx[c]), .tx(drorc_rx[c]),
            .push(push && push_mask[c]), .push_id, .n_cmd(n_cmd[c]), .q_level(q_level[c]));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- DCS bus ----
  task automatic dcs_write(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk_b); dcs_addr = a; dcs_wdata = d; dcs_rnw = 0; dcs_strobe = 1;
    wait (dcs_ack); @(negedge clk_b); dcs_strobe = 0; wait (!dcs_ack);
  endtask
  task automatic dcs_read(input logic [15:0] a, output logic [15:0] d);
    @(negedge clk_b); dcs_addr = a; dcs_rnw = 1; dcs_strobe = 1;
    wait (dcs_ack); d = dcs_rdata; @(negedge clk_b); dcs_strobe = 0; wait (!dcs_ack);
  endtask

  // ---- trigger system ----
  task automatic cyc(input int n); repeat (n) @(negedge clk_b); endtask
  task automatic pulse_a(input int len);
    @(negedge clk_b); ttc_chan_a = 1; repeat (len) @(negedge clk_b); ttc_chan_a = 0;
  endtask
  task automatic message(input int kind, input logic [35:0] id);
    @(negedge clk_b); {msg_bcid, msg_orbit} = id;
    msg_l1a = (kind == 1); msg_l2a = (kind == 2); msg_l2r = (kind == 3);
    @(negedge clk_b); {msg_l1a, msg_l2a, msg_l2r} = '0;
  endtask
  // push an event ID to all D-RORC models (readout of the header)
  task automatic readout(input logic [35:0] id);
    @(posedge clk_d); #0.1 push = 1; push_id = id; @(posedge clk_d); #0.1 push = 0;
  endtask
  // full sequence; kind 2 = L2a, 3 = L2r, 0 = no L2 message (timeout)
  task automatic sequence_l2(input int kind, input logic [35:0] id);
    pulse_a(1); cyc(210); pulse_a(2); cyc(20); message(1, id); cyc(300);
    if (kind != 0) message(kind, id);
  endtask

  function automatic int bcnt(); return int'(dut.u_busy.buf_count); endfunction

  // ---- mechanism counters ----
  int m_full = 0, m_pfp = 0, m_seq = 0, m_ttc = 0, m_l1r = 0, m_l2r = 0, m_tmo = 0, m_orphan = 0;
  int m_valid = 0, m_tpc = 0, m_l0 = 0, m_l1a = 0;
  always @(posedge clk_b) if (rst_n) begin
    if (dut.u_busy.busy_src[2]) m_full++;
    if (dut.u_busy.busy_src[3]) m_pfp++;
    if (dut.u_busy.busy_src[1]) m_seq++;
    if (dut.u_busy.busy_src[0]) m_ttc++;
    if (dut.l1r) m_l1r++;
    if (dut.seq_end && dut.end_l2r) m_l2r++;
    if (dut.seq_end && dut.end_timeout) m_tmo++;
    if (dut.seq_end && dut.end_orphan) m_orphan++;
    if (dut.event_valid_b) m_valid++;
    if (dut.l0) m_l0++;
    if (dut.l1a) begin m_l1a++; if (dut.tpc_mode) m_tpc++; end
  end

  logic [15:0] r;
  int expect_valid = 0;
  logic [35:0] id;
  int t0;

  task automatic wait_valid(input int n);
    int guard = 0;
    while (m_valid < n && guard < 40000) begin @(posedge clk_b); guard++; end
    check(m_valid == n, $sformatf("verified events %0d, expected %0d", m_valid, n));
  endtask

  initial begin
    push_mask = '1;
    push_mask[119] = 1'b0;           // channel 119 is disabled and never fed
    cyc(10); rst_n = 1; cyc(10);

    dcs_read(16'h2015, r); check(r == 16'h0101, "firmware version register 0x2015");
    dcs_read(16'h2009, r); check(r == 16'd3520, "default past-future time");
    dcs_read(16'h2008, r); check(r == 16'd4, "default buffer depth");
    dcs_read(16'h1000, r); check(r == 16'd240, "trigger receiver L1 window through wrapper");
    dcs_read(16'h2007, r); dcs_write(16'h2007, r & 16'hFF7F);  // CHEN: disable channel 119 (reg 7 bit 7)
    dcs_write(16'h2009, 16'd400);                               // shorter protection for the test
    cyc(20);

    // 1. one L2 accept event, checked end to end
    id = {12'h58C, 24'hC86B94};
    sequence_l2(2, id);
    check(bcnt() == 1, "buffer count 1 after L0 of an L2a sequence");
    readout(id);
    expect_valid++; wait_valid(expect_valid);
    cyc(5);
    check(bcnt() == 0, "buffer freed after verification");
    check(g_dr[0].u_dr.n_cmd[4] >= 1, "request event ID reached D-RORC 0");
    check(dut.u_eidv.req_id == 4'd1, "request ID incremented");

    // 2. slow D-RORC (channel 5) forces request resends
    id = 36'h123_456789;
    sequence_l2(2, id); readout(id);
    expect_valid++; wait_valid(expect_valid);
    check(dut.u_eidv.n_resend > 0, "requests were resent to the slow D-RORC");
    cyc(5); check(bcnt() == 0, "buffer freed after slow D-RORC");

    // 3. fill four buffers: hold the readout back
    for (int e = 0; e < 4; e++) sequence_l2(2, 36'hA00_000000 + 36'(e));
    cyc(3);
    check(bcnt() == 4, "four buffers counted");
    check(busy && dut.u_busy.busy_src[2], "busy because buffers are full");
    for (int e = 0; e < 4; e++) readout(36'hA00_000000 + 36'(e));
    expect_valid += 4; wait_valid(expect_valid);
    cyc(5); check(bcnt() == 0, "all four buffers freed");

    // 4. L2 reject: freed at once, header still verified
    id = 36'hB00_000001;
    sequence_l2(3, id); cyc(3);
    check(bcnt() == 0, "L2 reject frees the buffer");
    readout(id); expect_valid++; wait_valid(expect_valid);
    cyc(5); check(bcnt() == 0, "verified L2r event does not free twice");

    // 5. L2 timeout
    dcs_write(16'h1002, 16'd1000);  // L2 timeout register (RCU reg 1, low half)
    id = 36'hC00_000002;
    sequence_l2(0, id); cyc(700);
    check(m_tmo == 1, "L2 timeout ended the sequence");
    check(bcnt() == 0, "L2 timeout frees the buffer");
    readout(id); expect_valid++; wait_valid(expect_valid);

    // 6. L1 reject: L0 alone
    pulse_a(1); cyc(5); check(bcnt() == 1, "L0 counted");
    cyc(260); check(bcnt() == 0 && m_l1r == 1, "L1 reject frees the buffer");

    // 7. orphan messages: header without payload, count unchanged
    id = 36'hD00_000003;
    message(1, id); cyc(50); message(2, id); cyc(3);
    check(bcnt() == 0, "orphan sequence does not count");
    readout(id); expect_valid++; wait_valid(expect_valid);
    cyc(5); check(bcnt() == 0, "orphan verification does not decrement");

    // 8. TPC mode: L1a is counted
    dcs_write(16'h200A, 16'h0001);
    pulse_a(1); cyc(5); check(bcnt() == 0, "TPC mode ignores L0");
    cyc(205); pulse_a(2); cyc(3); check(bcnt() == 1, "TPC mode counts L1a");
    id = 36'hE00_000004;
    message(1, id); cyc(50); message(2, id); readout(id);
    expect_valid++; wait_valid(expect_valid);
    cyc(5); check(bcnt() == 0, "TPC event freed");
    dcs_write(16'h200A, 16'h0000);

    // 9. TTCrx not ready
    cyc(500);
    check(!busy, "not busy when idle");
    ttcrx_ready = 0; cyc(3); check(busy, "busy while TTCrx not ready");
    ttcrx_ready = 1; cyc(3); check(!busy, "busy released");

    // 10. command from the control bus: resend last message
    dcs_read(16'h2012, r);
    t0 = int'(r);
    dcs_write(16'h200B, {CMD_RESEND_LAST, 4'h0, 8'h00});
    cyc(400);
    check(g_dr[3].u_dr.n_cmd[5] == 1, "resend command reached D-RORC 3");
    check(g_dr[119].u_dr.n_cmd[5] == 0, "disabled channel 119 got nothing");
    dcs_read(16'h2012, r);
    check(int'(r) == (t0 + 119) % 1024, $sformatf("RX memory logged 119 replies (%0d -> %0d)", t0, r));
    // read back one logged reply through the control bus
    begin
      logic [15:0] w0, w1, w2, w3;
      logic [55:0] e;
      int a;
      a = (int'(r) + 1023) % 1024;
      dcs_read(16'h3000 | 16'(a * 4 + 0), w0);
      dcs_read(16'h3000 | 16'(a * 4 + 1), w1);
      dcs_read(16'h3000 | 16'(a * 4 + 2), w2);
      dcs_read(16'h3000 | 16'(a * 4 + 3), w3);
      e = {w3[7:0], w2, w1, w0};
      check(e[7:0] == e[54:48] && e[43:8] == 36'hE00_000004 && e[47:44] == 4'(expect_valid),
            $sformatf("RX memory entry %h", e));
    end

    // final state
    dcs_read(16'h2013, r); check(int'(r) == expect_valid, "verified event counter register");
    dcs_read(16'h2010, r); check(r[3:0] == 4'd0, "buffer count register zero at end");
    check(q_level[0] == 0 && q_level[5] == 0, "D-RORC queues drained");

    // 11. the two debugging commands: force pop and force request ID
    readout(36'hABC_00FFFF);
    cyc(10);
    check(q_level[3] == 1, "extra event ID queued in D-RORC 3");
    dcs_write(16'h200B, {CMD_FORCE_POP, 4'h0, 8'h00});
    cyc(400);
    check(g_dr[3].u_dr.n_cmd[6] == 1 && q_level[3] == 0, "force pop emptied the D-RORC 3 queue");
    check(q_level[119] == 0 && g_dr[119].u_dr.n_cmd[6] == 0, "disabled channel 119 not commanded");
    dcs_write(16'h200B, {CMD_FORCE_REQUEST_ID, 4'hA, 8'h00});
    cyc(400);
    check(g_dr[3].u_dr.n_cmd[7] == 1 && g_dr[3].u_dr.stored_req == 4'hA,
          "force request ID stored 0xA in D-RORC 3");

    // mechanisms
    check(m_full > 0, "mechanism: buffers full");
    check(m_pfp > 0, "mechanism: past-future protection");
    check(m_seq > 0, "mechanism: busy during sequence");
    check(m_ttc > 0, "mechanism: TTCrx not ready");
    check(m_l1r > 0, "mechanism: L1 reject");
    check(m_l2r > 0, "mechanism: L2 reject");
    check(m_tmo > 0, "mechanism: L2 timeout");
    check(m_orphan > 0, "mechanism: orphan sequence");
    check(m_tpc > 0, "mechanism: TPC counting mode");
    check(dut.u_eidv.n_resend > 0, "mechanism: request resend");
    $display("mechanisms: full=%0d pfp=%0d seq=%0d ttc=%0d l1r=%0d l2r=%0d tmo=%0d orphan=%0d tpc=%0d resend=%0d valid=%0d",
             m_full, m_pfp, m_seq, m_ttc, m_l1r, m_l2r, m_tmo, m_orphan, m_tpc, dut.u_eidv.n_resend, m_valid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk_b);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
