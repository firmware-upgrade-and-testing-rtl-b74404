// tb_busybox_rate: trigger-rate workloads on one BusyBox FPGA at its
// default size (120 D-RORC channels, 3520-clock past-future protection and
// L2 timeout, 4 buffers).
//
// The bench plays a Local Trigger Unit that offers a trigger at a fixed
// interval and sends it only while busy is low, as the LTU does. Every
// accepted trigger runs a full L0, L1a, L1 message, L2 accept sequence,
// and the event ID is then handed to all 120 D-RORC models at once.
//  - Phase 1 offers triggers at 8 kHz (one every 125 us), the highest Pb-Pb
//    collision rate. Each one must be accepted, and each event must be
//    verified and its buffer freed.
//  - Phase 2 offers triggers at 200 kHz (one every 5 us), the highest p-p
//    collision rate, for 1 ms. Busy must throttle them. At least 88 us must
//    separate accepted triggers, about 10 to 11 must get through, and the
//    buffer count must never pass the depth of 4.
// The rates and the 88 us protection follow the published design. The
// sequence timing inside a trigger (L1a 210 clocks after L0, L2 330 clocks
// later) is this bench's choice.
`timescale 1ns/1ps
module tb_busybox_rate;
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

  logic        push = 0;
  logic [35:0] push_id = 0;
  int          n_cmd [NUM_CH][16];
  int          q_level [NUM_CH];

  for (genvar c = 0; c < NUM_CH; c++) begin : g_dr
    drorc_model #(.DRORC_ID(8'(c)), .READOUT_DELAY(0), .REPLY_DELAY(40 + (c % 5)))
      u_dr (.clk(clk_d), .rst_n, .rx(drorc_tx[c]), .tx(drorc_rx[c]),
            .push, .push_id, .n_cmd(n_cmd[c]), .q_level(q_level[c]));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cyc(input int n); repeat (n) @(negedge clk_b); endtask
  task automatic pulse_a(input int len);
    @(negedge clk_b); ttc_chan_a = 1; repeat (len) @(negedge clk_b); ttc_chan_a = 0;
  endtask
  task automatic message(input int kind, input logic [35:0] id);
    @(negedge clk_b); {msg_bcid, msg_orbit} = id;
    msg_l1a = (kind == 1); msg_l2a = (kind == 2);
    @(negedge clk_b); {msg_l1a, msg_l2a} = '0;
  endtask

  // one accepted trigger: full L2a sequence, then readout to the D-RORCs
  int n_seq = 0;
  task automatic run_sequence(input logic [35:0] id);
    pulse_a(1); cyc(210); pulse_a(2); cyc(20); message(1, id); cyc(300); message(2, id);
    cyc(20);
    @(posedge clk_d); #0.1 push = 1; push_id = id; @(posedge clk_d); #0.1 push = 0;
    n_seq++;
  endtask

  int max_count = 0, n_valid_b = 0;
  always @(posedge clk_b) if (rst_n) begin
    if (int'(dut.u_busy.buf_count) > max_count) max_count = int'(dut.u_busy.buf_count);
    if (dut.event_valid_b) n_valid_b++;
  end

  // LTU model: offer a trigger every `period` clock-B cycles, for `offers`
  // offers; send it only if busy is low. Returns accepted count and the
  // smallest spacing between accepted triggers.
  int accepted, min_gap;
  task automatic ltu(input int period, input int offers, input int id_base);
    int last_t, t;
    accepted = 0; min_gap = 1 << 30; last_t = -1; t = 0;
    for (int k = 0; k < offers; k++) begin
      if (!busy) begin
        if (last_t >= 0 && t - last_t < min_gap) min_gap = t - last_t;
        last_t = t;
        accepted++;
        fork run_sequence({12'(id_base + k), 24'(1000 + id_base + k)}); join_none
      end
      cyc(period); t += period;
    end
    wait fork;
  endtask

  initial begin
    int v0;
    cyc(10); rst_n = 1; cyc(40);
    check(!busy, "busy released after reset");

    // ---- phase 1: 8 kHz, 12 triggers ----
    ltu(5000, 12, 0);
    check(accepted == 12, $sformatf("8 kHz: %0d of 12 triggers accepted", accepted));
    cyc(2000);
    check(n_valid_b == 12, $sformatf("8 kHz: %0d of 12 events verified", n_valid_b));
    check(dut.u_busy.buf_count == 0, "8 kHz: all buffers freed");
    $display("8 kHz: accepted %0d of 12, verified %0d, largest buffer count %0d",
             accepted, n_valid_b, max_count);

    // ---- phase 2: 200 kHz for 1 ms ----
    v0 = n_valid_b;
    ltu(200, 200, 100);
    cyc(2000);
    check(min_gap >= 3520, $sformatf("200 kHz: accepted triggers %0d clocks apart, at least 3520", min_gap));
    check(accepted >= 10 && accepted <= 11, $sformatf("200 kHz: %0d of 200 triggers accepted in 1 ms", accepted));
    check(n_valid_b - v0 == accepted, "200 kHz: every accepted event verified");
    check(max_count <= 4, $sformatf("buffer count reached %0d", max_count));
    check(dut.u_busy.buf_count == 0 && !busy, "200 kHz: idle at the end");
    $display("200 kHz: accepted %0d of 200 (%0d Hz), smallest spacing %0d clocks",
             accepted, accepted * 1000, min_gap);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk_b);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
