// tb_event_id_verification: eight channels, channel 6 disabled. Headers for
// five events are offered through a first-word-fall-through model of the
// CDH FIFO. For each request the bench answers from the enabled channels,
// after a random delay, and checks that:
//  - the request carries the next request ID and the Request Event ID code;
//  - a reply with a wrong event ID or wrong request ID marks nothing;
//  - event_valid pulses only after the last enabled channel has answered;
//  - a missing answer leads to a resend after RESEND cycles, counted in
//    n_resend;
//  - n_valid ends at the number of events.
// The request ID rule and the EIDOK gate follow the published design; the
// reduced channel count, queue depth and resend interval are the bench's.
`timescale 1ns/1ps
module tb_event_id_verification;
  import bb_pkg::*;
  localparam int N = 8, NEV = 5;
  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;
  logic [32:0] cdh_data;
  logic cdh_empty, cdh_rd;
  logic in_valid = 0, in_ready;
  logic [6:0] in_ch = '0;
  logic [47:0] in_msg = '0;
  logic [N-1:0] chen = 8'b1011_1111;
  logic tx_req, tx_ack = 0, event_valid;
  logic [3:0] tx_cmd, tx_reqid, req_id;
  logic [35:0] cur_event;
  logic [15:0] n_valid, n_resend;
  event_id_verification #(.NUM_CH(N), .QDEPTH(4), .RESEND(100)) dut (.*);

  int checks = 0, failures = 0, n_ev = 0;
  logic [32:0] cdh_q [$];
  assign cdh_empty = (cdh_q.size() == 0);
  assign cdh_data  = cdh_empty ? '0 : cdh_q[0];
  always @(posedge clk) if (rst_n && cdh_rd && !cdh_empty) void'(cdh_q.pop_front());
  always @(posedge clk) if (rst_n && event_valid) n_ev++;

  task automatic push_header(input logic [11:0] bcid, input logic [23:0] orbit);
    for (int w = 0; w < 9; w++) begin
      logic [31:0] d;
      d = (w == 2) ? {20'h02000, bcid} : (w == 3) ? {8'h00, orbit} : 32'(w);
      cdh_q.push_back({^d, d});
    end
  endtask

  task automatic reply(input int ch, input logic [3:0] rid, input logic [35:0] ev);
    drorc_msg_t m;
    m.req_id = rid; m.bcid = ev[35:24]; m.orbit = ev[23:0]; m.drorc_id = 8'(ch);
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    in_valid = 1; in_ch = 7'(ch); in_msg = m;
    @(negedge clk); in_valid = 0;
  endtask

  task automatic wait_req(output logic [3:0] rid);
    int g = 0;
    while (!tx_req && g < 1000) begin @(negedge clk); g++; end
    rid = tx_reqid;
    checks++; if (!tx_req || tx_cmd != CMD_REQUEST_EVENT_ID) begin failures++; $display("FAIL no request"); end
    repeat ($urandom_range(1, 10)) @(negedge clk);
    tx_ack = 1; @(negedge clk); tx_ack = 0;
  endtask

  initial begin
    logic [3:0] rid, rid2;
    logic [35:0] ev;
    int nb;
    repeat (4) @(negedge clk); rst_n = 1;
    for (int e = 0; e < NEV; e++) push_header(12'(100 + e), 24'(5000 + e));
    for (int e = 0; e < NEV; e++) begin
      ev = {12'(100 + e), 24'(5000 + e)};
      wait_req(rid);
      checks++; if (rid != 4'(e + 1) || cur_event != ev) begin failures++; $display("FAIL rid %0d ev %h", rid, cur_event); end
      // wrong event ID and wrong request ID replies from channel 0
      reply(0, rid, ev ^ 36'h1);
      reply(0, rid + 4'd1, ev);
      for (int c = 1; c < N; c++) if (chen[c]) reply(c, rid, ev);
      repeat (5) @(negedge clk);
      checks++; if (n_ev != e) begin failures++; $display("FAIL early valid event %0d", e); end
      if (e == 2) begin
        // hold channel 0 back until the request is sent again
        nb = n_resend;
        wait_req(rid2);
        checks++; if (rid2 != rid || n_resend != 16'(nb + 1)) begin failures++; $display("FAIL resend"); end
      end
      reply(0, rid, ev);
      repeat (5) @(negedge clk);
      checks++; if (n_ev != e + 1) begin failures++; $display("FAIL no valid event %0d", e); end
    end
    checks++; if (n_valid != NEV) begin failures++; $display("FAIL n_valid %0d", n_valid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
