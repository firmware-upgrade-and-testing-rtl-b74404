// busybox_top: one BusyBox FPGA.
//
// The BusyBox tells the trigger system when the detector front end cannot
// take another event. It counts the event buffers occupied in the front
// end: one more for each accepted trigger, one less once the event has been
// read out, which it learns by asking every D-RORC (readout receiver card)
// for the event ID it last received and comparing it with the event ID the
// trigger system gave. busy goes to the LTU.
//
// Clock B (40 MHz, bunch-crossing clock) runs the trigger receiver, the
// busy controller, the control and status registers and the DCS bus
// arbiter. Clock A (200 MHz, derived from clock B outside this module)
// runs the serial links: transmitter, receiver, event ID verification and
// the write side of the RX memory. Domain crossings: the dual-clock CDH
// FIFO, toggle synchronisers for event valid and the control-bus command,
// two-flop synchronisers for the channel enables and the status counters,
// and the dual-clock RX memory.
//
// Ports: ttc_chan_a is TTC channel A; channel B trigger messages enter
// already decoded (msg_l1a, msg_l2a, msg_l2r strobes with the bunch
// crossing and orbit numbers), one clock-B cycle each. drorc_tx/drorc_rx
// are the serial lines of the NUM_CH D-RORC channels (idle high). The dcs_*
// ports are the asynchronous four-phase control bus. rst_n is synchronous
// and active low; hold it for a few clock-B cycles.
// The blocks and their connections follow the published firmware
// structure; taking channel B decoded, both clocks as inputs and the
// crossing circuits are this design's choices.
module busybox_top #(
  parameter int unsigned NUM_CH        = 120,
  parameter int unsigned CH_PER_BRANCH = 16,
  parameter bit          FPGA_ID       = 1'b0
) (
  input  logic              clk_a,
  input  logic              clk_b,
  input  logic              rst_n,
  input  logic              ttc_chan_a,
  input  logic              msg_l1a,
  input  logic              msg_l2a,
  input  logic              msg_l2r,
  input  logic [11:0]       msg_bcid,
  input  logic [23:0]       msg_orbit,
  input  logic              ttcrx_ready,
  output logic              busy,
  output logic [NUM_CH-1:0] drorc_tx,
  input  logic [NUM_CH-1:0] drorc_rx,
  input  logic              dcs_strobe,
  input  logic              dcs_rnw,
  input  logic [15:0]       dcs_addr,
  input  logic [15:0]       dcs_wdata,
  output logic [15:0]       dcs_rdata,
  output logic              dcs_ack
);
  // ---------------- resets -------------------------------------------------
  logic rst_a_n;
  sync_bits #(.W(1)) u_rst_a (.clk(clk_a), .d(rst_n), .q(rst_a_n));

  // ---------------- control bus (clock B) ----------------------------------
  logic [7:0]       mod_en;
  logic             bus_rnw;
  logic [11:0]      bus_addr;
  logic [15:0]      bus_wdata;
  logic [7:0][15:0] mod_rdata;

  dcs_bus_arbiter #(.FPGA_ID(FPGA_ID)) u_dcs (
    .clk(clk_b), .rst_n, .dcs_strobe, .dcs_rnw, .dcs_addr, .dcs_wdata,
    .dcs_rdata, .dcs_ack, .mod_en, .rnw(bus_rnw), .addr(bus_addr),
    .wdata(bus_wdata), .mod_rdata
  );

  // ---------------- trigger receiver (clock B, CDH read on A) --------------
  logic [15:0] rcu_addr;
  logic [31:0] rcu_wdata, rcu_rdata;
  logic        rcu_we, rcu_hi;
  logic        l0, l1a, seq_busy, seq_end, include_payload, end_l2r, end_timeout, end_orphan, l1r;
  logic [7:0]  buffered_words;
  logic        cdh_rd, cdh_empty;
  logic [32:0] cdh_data;

  trigger_busy_wrapper u_wrap (
    .busy_addr(bus_addr), .busy_data_in(bus_wdata), .busy_data_out(mod_rdata[1]),
    .module_enable(mod_en[1]), .rnw(bus_rnw), .addr(rcu_addr),
    .rcu_data_in(rcu_wdata), .rcu_data_out(rcu_rdata), .rcu_hi, .we(rcu_we)
  );

  trigger_receiver u_trg (
    .clk_b, .rst_n, .chan_a(ttc_chan_a), .msg_l1a, .msg_l2a, .msg_l2r, .msg_bcid, .msg_orbit,
    .l0, .l1a, .seq_busy, .seq_end, .include_payload, .end_l2r, .end_timeout, .end_orphan, .l1r,
    .buffered_words, .rcu_addr, .rcu_we, .rcu_hi, .rcu_wdata, .rcu_rdata,
    .clk_a, .rst_a_n, .cdh_rd, .cdh_data, .cdh_empty
  );

  // ---------------- control and status (clock B) ---------------------------
  logic [NUM_CH-1:0] chen_b, chen_a;
  logic [3:0]  buf_depth, buf_count, busy_src, dcs_tx_cmd, dcs_tx_reqid;
  logic [15:0] pfp_time;
  logic        tpc_mode, dcs_tx_req_b;
  logic [3:0]  req_id_a, req_id_b;
  logic [9:0]  rxmem_ptr_a, rxmem_ptr_b;
  logic [15:0] n_valid_a, n_valid_b, n_resend_a, n_resend_b;

  control_status #(.NUM_CH(NUM_CH)) u_cs (
    .clk(clk_b), .rst_n, .en(mod_en[2]), .we(mod_en[2] && !bus_rnw), .addr(bus_addr),
    .wdata(bus_wdata), .rdata(mod_rdata[2]), .chen(chen_b), .buf_depth, .pfp_time,
    .tpc_mode, .dcs_tx_req(dcs_tx_req_b), .dcs_tx_cmd, .dcs_tx_reqid,
    .buf_count, .busy_src, .busy, .req_id(req_id_b), .rxmem_ptr(rxmem_ptr_b),
    .n_valid(n_valid_b), .n_resend(n_resend_b)
  );

  sync_bits #(.W(4 + 10 + 16 + 16)) u_stat_sync (
    .clk(clk_b), .d({req_id_a, rxmem_ptr_a, n_valid_a, n_resend_a}),
    .q({req_id_b, rxmem_ptr_b, n_valid_b, n_resend_b})
  );

  // ---------------- busy controller (clock B) ------------------------------
  logic event_valid_a, event_valid_b;

  pulse_sync u_ev_sync (
    .src_clk(clk_a), .src_rst_n(rst_a_n), .src_pulse(event_valid_a),
    .dst_clk(clk_b), .dst_rst_n(rst_n), .dst_pulse(event_valid_b)
  );

  busy_controller #(.CNT_W(4)) u_busy (
    .clk(clk_b), .rst_n, .ttcrx_ready, .trg_busy(seq_busy), .l0, .l1a,
    .seq_end, .include_payload, .end_l2r, .end_timeout, .end_orphan, .l1r,
    .event_valid(event_valid_b), .tpc_mode, .buf_depth, .pfp_time,
    .busy, .busy_src, .buf_count
  );

  // ---------------- clock A side -------------------------------------------
  logic [7:0] dcs_cmd_a;
  logic       dcs_tx_pulse_a, dcs_pending, dcs_ack_a;

  sync_bits #(.W(NUM_CH + 8)) u_cfg_sync (
    .clk(clk_a), .d({chen_b, dcs_tx_cmd, dcs_tx_reqid}), .q({chen_a, dcs_cmd_a})
  );

  pulse_sync u_tx_sync (
    .src_clk(clk_b), .src_rst_n(rst_n), .src_pulse(dcs_tx_req_b),
    .dst_clk(clk_a), .dst_rst_n(rst_a_n), .dst_pulse(dcs_tx_pulse_a)
  );

  always_ff @(posedge clk_a) begin
    if (!rst_a_n)            dcs_pending <= 1'b0;
    else if (dcs_tx_pulse_a) dcs_pending <= 1'b1;
    else if (dcs_ack_a)      dcs_pending <= 1'b0;
  end

  logic        tx_req, tx_ack, tx_busy;
  logic [3:0]  tx_cmd, tx_reqid;
  logic        in_valid, in_ready;
  logic [6:0]  in_ch;
  logic [47:0] in_msg;
  logic [15:0] rx_err_count;
  logic [35:0] cur_event;

  transmitter #(.NUM_CH(NUM_CH)) u_tx (
    .clk(clk_a), .rst_n(rst_a_n),
    .ev_req(tx_req), .ev_cmd(tx_cmd), .ev_reqid(tx_reqid), .ev_ack(tx_ack),
    .dcs_req(dcs_pending), .dcs_cmd(dcs_cmd_a[7:4]), .dcs_reqid(dcs_cmd_a[3:0]), .dcs_ack(dcs_ack_a),
    .chen(chen_a), .busy(tx_busy), .tx(drorc_tx)
  );

  receiver #(.NUM_CH(NUM_CH), .CH_PER_BRANCH(CH_PER_BRANCH)) u_rx (
    .clk(clk_a), .rst_n(rst_a_n), .rx(drorc_rx),
    .out_valid(in_valid), .out_ch(in_ch), .out_msg(in_msg), .out_ready(in_ready),
    .err_count(rx_err_count)
  );

  event_id_verification #(.NUM_CH(NUM_CH)) u_eidv (
    .clk(clk_a), .rst_n(rst_a_n), .cdh_data, .cdh_empty, .cdh_rd,
    .in_valid, .in_ch, .in_msg, .in_ready, .chen(chen_a),
    .tx_req, .tx_cmd, .tx_reqid, .tx_ack,
    .event_valid(event_valid_a), .req_id(req_id_a), .cur_event,
    .n_valid(n_valid_a), .n_resend(n_resend_a)
  );

  rx_memory #(.DEPTH(1024), .AW(10)) u_mem (
    .clk_a, .rst_a_n, .wr_en(in_valid), .wr_data({1'b0, in_ch, in_msg}), .wr_ptr(rxmem_ptr_a),
    .clk_b, .dcs_en(mod_en[3]), .dcs_we(mod_en[3] && !bus_rnw), .dcs_addr(bus_addr),
    .dcs_wdata(bus_wdata), .dcs_rdata(mod_rdata[3])
  );

  assign mod_rdata[0] = 16'h0000;
  assign mod_rdata[4] = 16'h0000;
  assign mod_rdata[5] = 16'h0000;
  assign mod_rdata[6] = 16'h0000;
  assign mod_rdata[7] = 16'h0000;

  logic unused;
  assign unused = ^{buffered_words, tx_busy, rx_err_count, cur_event, mod_en[0], mod_en[7:4]};
endmodule
