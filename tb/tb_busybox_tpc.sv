// tb_busybox_tpc: the TPC configuration, 216 D-RORCs served by two BusyBox
// FPGAs on one board.
//
// Two busybox_top instances (FPGA_ID 0 and 1) share the TTC inputs and the
// DCS bus; their busy outputs are ORed towards the LTU. FPGA 0 serves
// D-RORCs 0..119 and FPGA 1 serves D-RORCs 120..215 on its channels 0..95.
// Its channels 96..119 are switched off through CHEN. The bench:
//  - checks that DCS address bit 15 reaches only the selected FPGA
//    (different buffer depths written to each and read back);
//  - sets TPC mode on both, so buffers are counted on L1a;
//  - runs five L2 accept sequences and reads each event out to all 216
//    D-RORC models with a different delay per D-RORC. It checks that
//    both FPGAs verify every event and free every buffer, and that the
//    combined busy is set exactly while a sequence or the past-future
//    protection is running.
// The split over two FPGAs and the bus bit that selects between them
// follow the published design; the wiring of the two FPGAs on the board
// is this bench's choice.
`timescale 1ns/1ps
module tb_busybox_tpc;
  import bb_pkg::*;
  localparam int NUM_CH = 120, N_DRORC = 216;

  logic clk_a = 0, clk_b = 0, clk_d = 0, rst_n = 0;
  always #2.5   clk_a = ~clk_a;
  always #12.5  clk_b = ~clk_b;
  always #2.505 clk_d = ~clk_d;

  logic ttc_chan_a = 0, msg_l1a = 0, msg_l2a = 0, msg_l2r = 0, ttcrx_ready = 1;
  logic [11:0] msg_bcid = 0;
  logic [23:0] msg_orbit = 0;
  logic [1:0] busy2, ack2;
  logic [1:0][15:0] rdata2;
  logic [1:0][NUM_CH-1:0] tx2, rx2;
  logic dcs_strobe = 0, dcs_rnw = 1;
  logic [15:0] dcs_addr = 0, dcs_wdata = 0;
  logic busy, dcs_ack;
  logic [15:0] dcs_rdata;

  assign busy      = |busy2;
  assign dcs_ack   = |ack2;
  assign dcs_rdata = ack2[1] ? rdata2[1] : rdata2[0];

  for (genvar f = 0; f < 2; f++) begin : g_fpga
    busybox_top #(.FPGA_ID(f[0])) u_bb (
      .clk_a, .clk_b, .rst_n, .ttc_chan_a, .msg_l1a, .msg_l2a, .msg_l2r, .msg_bcid,
      .msg_orbit, .ttcrx_ready, .busy(busy2[f]), .drorc_tx(tx2[f]), .drorc_rx(rx2[f]),
      .dcs_strobe, .dcs_rnw, .dcs_addr, .dcs_wdata, .dcs_rdata(rdata2[f]), .dcs_ack(ack2[f])
    );
  end

  logic        push = 0;
  logic [35:0] push_id = 0;
  int          n_cmd [N_DRORC][16];
  int          q_level [N_DRORC];

  for (genvar d = 0; d < N_DRORC; d++) begin : g_dr
    drorc_model #(.DRORC_ID(8'(d)), .READOUT_DELAY(d * 3), .REPLY_DELAY(40 + (d % 9)))
      u_dr (.clk(clk_d), .rst_n, .rx(tx2[d / NUM_CH][d % NUM_CH]), .tx(rx2[d / NUM_CH][d % NUM_CH]),
            .push, .push_id, .n_cmd(n_cmd[d]), .q_level(q_level[d]));
  end
  // unused channels of FPGA 1 idle high
  for (genvar c = N_DRORC - NUM_CH; c < NUM_CH; c++) begin : g_idle
    assign rx2[1][c] = 1'b1;
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic dcs_write(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk_b); dcs_addr = a; dcs_wdata = d; dcs_rnw = 0; dcs_strobe = 1;
    wait (dcs_ack); @(negedge clk_b); dcs_strobe = 0; wait (!dcs_ack);
  endtask
  task automatic dcs_read(input logic [15:0] a, output logic [15:0] d);
    @(negedge clk_b); dcs_addr = a; dcs_rnw = 1; dcs_strobe = 1;
    wait (dcs_ack); d = dcs_rdata; @(negedge clk_b); dcs_strobe = 0; wait (!dcs_ack);
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

  int n_valid [2];
  int busy_bad = 0, busy_hi = 0;
  bit started = 0;
  always @(posedge clk_b) if (rst_n) begin
    if (g_fpga[0].u_bb.event_valid_b) n_valid[0]++;
    if (g_fpga[1].u_bb.event_valid_b) n_valid[1]++;
    if (busy) busy_hi++;
    // after start-up, busy must come only from a sequence or the protection
    if (started && busy && ttcrx_ready &&
        !(g_fpga[0].u_bb.u_busy.busy_src[1] || g_fpga[0].u_bb.u_busy.busy_src[3] ||
          g_fpga[1].u_bb.u_busy.busy_src[1] || g_fpga[1].u_bb.u_busy.busy_src[3]))
      busy_bad++;
  end

  initial begin
    logic [15:0] r;
    logic [35:0] id;
    n_valid[0] = 0; n_valid[1] = 0;
    cyc(10); rst_n = 1; cyc(20);
    started = 1;

    // FPGA 1: switch off channels 96..119 (CHEN registers 6 and 7)
    dcs_write(16'hA006, 16'h0000);
    dcs_write(16'hA007, 16'h0000);
    // different buffer depths prove the FPGA select bit
    dcs_write(16'h2008, 16'd4);
    dcs_write(16'hA008, 16'd8);
    dcs_read(16'h2008, r); check(r == 16'd4, "FPGA 0 buffer depth");
    dcs_read(16'hA008, r); check(r == 16'd8, "FPGA 1 buffer depth");
    dcs_read(16'h2006, r); check(r == 16'hFFFF, "FPGA 0 channels 96..111 still enabled");
    dcs_read(16'hA006, r); check(r == 16'h0000, "FPGA 1 channels 96..111 disabled");
    // TPC mode on both FPGAs
    dcs_write(16'h200A, 16'd1);
    dcs_write(16'hA00A, 16'd1);
    cyc(20);

    for (int e = 0; e < 5; e++) begin
      id = {12'(200 + e), 24'(7000 + e)};
      wait (!busy); cyc(5);
      pulse_a(1); cyc(210); pulse_a(2); cyc(20); message(1, id); cyc(300); message(2, id);
      cyc(20);
      @(posedge clk_d); #0.1 push = 1; push_id = id; @(posedge clk_d); #0.1 push = 0;
      cyc(100);
      check(g_fpga[0].u_bb.u_busy.buf_count == 1 && g_fpga[1].u_bb.u_busy.buf_count == 1,
            $sformatf("event %0d counted once on each FPGA", e));
    end
    wait (!busy); cyc(500);
    check(n_valid[0] == 5 && n_valid[1] == 5,
          $sformatf("verified events: FPGA 0 %0d, FPGA 1 %0d, expected 5 each", n_valid[0], n_valid[1]));
    check(g_fpga[0].u_bb.u_busy.buf_count == 0 && g_fpga[1].u_bb.u_busy.buf_count == 0,
          "all buffers freed on both FPGAs");
    dcs_read(16'hA013, r); check(r == 16'd5, "FPGA 1 verified-event register");
    check(busy_hi > 0 && busy_bad == 0, $sformatf("busy only from sequences and protection (%0d bad)", busy_bad));
    // the last D-RORC, on FPGA 1, was asked for event IDs
    check(n_cmd[215][4] > 0, "D-RORC 215 (FPGA 1 channel 95) received requests");
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
