// event_id_verification: frees front-end buffers once every D-RORC has the
// event.
//
// The CDH reader takes each nine-word header out of the CDH FIFO as soon
// as it appears, extracts the bunch crossing ID (header 01, bits 11:0) and
// orbit ID (header 02, bits 23:0) and pushes this 36-bit event ID into the
// Event ID queue. The controller pops one event ID at a time, increments the
// 4-bit request ID, clears the EIDOK register (one bit per channel) and asks
// the transmitter to send Request Event ID with that request ID to every
// channel enabled in CHEN. Replies come from the receiver through the
// D-RORC inbox buffer; the event ID comparator sets the channel's EIDOK bit
// when both the request ID and the event ID of a reply match. The
// verification gate waits until every enabled channel is marked; then
// event_valid pulses for one clock and the next event is taken. Until then
// the request is sent again every RESEND clock-A cycles. Everything runs on
// clock A.
//
// Structure (queue, controller, inbox buffer, comparator, EIDOK register,
// verification gate) and the request ID rule follow the published design.
// Queue and inbox depths and the resend interval are this design's own.
module event_id_verification #(
  parameter int unsigned NUM_CH = 120,
  parameter int unsigned QDEPTH = 16,
  parameter int unsigned RESEND = 400
) (
  input  logic              clk,
  input  logic              rst_n,
  // CDH FIFO (first-word-fall-through)
  input  logic [32:0]       cdh_data,
  input  logic              cdh_empty,
  output logic              cdh_rd,
  // replies from the receiver
  input  logic              in_valid,
  input  logic [6:0]        in_ch,
  input  logic [47:0]       in_msg,
  output logic              in_ready,
  input  logic [NUM_CH-1:0] chen,
  // transmitter
  output logic              tx_req,
  output logic [3:0]        tx_cmd,
  output logic [3:0]        tx_reqid,
  input  logic              tx_ack,
  // results
  output logic              event_valid,
  output logic [3:0]        req_id,
  output logic [35:0]       cur_event,
  output logic [15:0]       n_valid,
  output logic [15:0]       n_resend
);
  import bb_pkg::*;

  // ---- CDH reader --------------------------------------------------------
  logic [3:0]  widx;
  logic [11:0] hdr_bcid;
  logic [23:0] hdr_orbit;
  logic        q_wr, q_rd, q_empty, q_full;
  logic [35:0] q_dout;
  logic [$clog2(QDEPTH):0] q_count;

  assign cdh_rd = !cdh_empty && !(widx == 4'd8 && q_full);
  assign q_wr   = cdh_rd && widx == 4'd8;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      widx <= '0;
      hdr_bcid <= '0;
      hdr_orbit <= '0;
    end else if (cdh_rd) begin
      if (widx == 4'd2) hdr_bcid  <= cdh_data[11:0];
      if (widx == 4'd3) hdr_orbit <= cdh_data[23:0];
      widx <= (widx == 4'd8) ? 4'd0 : widx + 4'd1;
    end
  end

  sync_fifo #(.WIDTH(36), .DEPTH(QDEPTH)) u_queue (
    .clk, .rst_n, .wr_en(q_wr), .din({hdr_bcid, hdr_orbit}),
    .rd_en(q_rd), .dout(q_dout), .empty(q_empty), .full(q_full), .count(q_count)
  );

  // ---- D-RORC inbox buffer ----------------------------------------------
  logic        ib_empty, ib_full, ib_rd;
  logic [54:0] ib_dout;
  logic [4:0]  ib_count;
  drorc_msg_t  reply;
  logic [6:0]  reply_ch;

  sync_fifo #(.WIDTH(55), .DEPTH(16)) u_inbox (
    .clk, .rst_n, .wr_en(in_valid), .din({in_ch, in_msg}),
    .rd_en(ib_rd), .dout(ib_dout), .empty(ib_empty), .full(ib_full), .count(ib_count)
  );
  assign in_ready = (ib_count < 5'd15);
  assign ib_rd    = !ib_empty;
  assign reply    = ib_dout[47:0];
  assign reply_ch = ib_dout[54:48];

  // ---- controller and event processor -----------------------------------
  typedef enum logic [1:0] {C_IDLE, C_SEND, C_WAIT} cstate_t;
  cstate_t state;
  logic [NUM_CH-1:0] eidok;
  logic [$clog2(RESEND+1)-1:0] timer;
  logic all_ok, match;

  assign all_ok   = &(eidok | ~chen);
  assign match    = (reply.req_id == req_id) && ({reply.bcid, reply.orbit} == cur_event);
  assign q_rd     = (state == C_IDLE) && !q_empty;
  assign tx_req   = (state == C_SEND);
  assign tx_cmd   = CMD_REQUEST_EVENT_ID;
  assign tx_reqid = req_id;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= C_IDLE;
      eidok       <= '0;
      req_id      <= '0;
      cur_event   <= '0;
      timer       <= '0;
      event_valid <= 1'b0;
      n_valid     <= '0;
      n_resend    <= '0;
    end else begin
      event_valid <= 1'b0;
      if (!ib_empty && state != C_IDLE && match && int'(reply_ch) < int'(NUM_CH))
        eidok[reply_ch] <= 1'b1;
      unique case (state)
        C_IDLE: if (!q_empty) begin
          cur_event <= q_dout;
          req_id    <= req_id + 4'd1;
          eidok     <= '0;
          state     <= C_SEND;
        end
        C_SEND: if (tx_ack) begin
          state <= C_WAIT;
          timer <= '0;
        end
        C_WAIT: begin
          if (all_ok) begin
            event_valid <= 1'b1;
            n_valid     <= n_valid + 16'd1;
            state       <= C_IDLE;
          end else if (timer == ($clog2(RESEND+1))'(RESEND)) begin
            state    <= C_SEND;
            n_resend <= n_resend + 16'd1;
          end else begin
            timer <= timer + 1'b1;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  logic unused;
  assign unused = ^{cdh_data[32:24], q_count, ib_full, reply.drorc_id};
endmodule
