// drorc_model: behavioural model of one D-RORC serial port, for testbenches.
//
// Models the readout receiver card side of the BusyBox link on its own
// clock (nominally 200 MHz but not locked to the BusyBox). It keeps a queue
// of event IDs that the readout has delivered; an entry becomes visible
// READOUT_DELAY clocks after push. Commands are decoded from the 20-bit
// frame (data bit 0 first, command code in the data positions 2,4,5,6 of
// each Hamming byte):
//   0100 Request Event ID: if the request ID differs from the stored one and
//        an event is visible, pop it and store the request ID; then reply
//        with the stored request ID and the current event ID.
//   0101 Resend last message, 0110 Force pop, 0111 Force request ID.
// A reply is three frames, most significant word first, separated by one
// idle bit, sent REPLY_DELAY clocks after the command ends.
module drorc_model #(
  parameter logic [7:0]  DRORC_ID      = 8'h07,
  parameter int unsigned READOUT_DELAY = 0,
  parameter int unsigned REPLY_DELAY   = 40
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx,
  output logic        tx,
  input  logic        push,
  input  logic [35:0] push_id,
  output int          n_cmd [16],
  output int          q_level
);
  logic [35:0] q_id [64];
  longint      q_t  [64];
  int          wp, rp;
  longint      now;
  logic [3:0]  stored_req;
  logic [35:0] cur;
  logic [47:0] last_reply;

  // receive state
  int          rcnt;
  logic        rbusy;
  logic [19:0] rbits;
  logic        rx_q;
  // transmit state
  int          tdelay, tcnt;
  logic        tpend, tbusy;
  logic [63:0] tstream;  // 3 frames + 3 idle bits = 63 bits, bit 0 first

  assign q_level = wp - rp;

  function automatic logic [3:0] ham_data(input logic [7:0] c);
    return {c[6], c[5], c[4], c[2]};
  endfunction

  function automatic logic [20:0] frame(input logic [15:0] w);
    return {1'b1, 1'b0, ^w, w, 1'b1, 1'b0};  // idle bit, stop, parity, data, S2, S1
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      wp <= 0; rp <= 0; now <= 0;
      stored_req <= '0; cur <= '0; last_reply <= '0;
      rcnt <= 0; rbusy <= 1'b0; rbits <= '0; rx_q <= 1'b1;
      tdelay <= 0; tcnt <= 0; tpend <= 1'b0; tbusy <= 1'b0; tstream <= '1;
      tx <= 1'b1;
      for (int i = 0; i < 16; i++) n_cmd[i] <= 0;
    end else begin
      now  <= now + 1;
      rx_q <= rx;
      if (push) begin
        q_id[wp % 64] <= push_id;
        q_t[wp % 64]  <= now + longint'(READOUT_DELAY);
        wp <= wp + 1;
      end
      // ---- receive: sample each bit in its middle ----
      if (!rbusy) begin
        if (rx_q && !rx) begin rbusy <= 1'b1; rcnt <= 0; end
      end else begin
        rcnt <= rcnt + 1;
        if (rcnt % 5 == 1) rbits[rcnt / 5] <= rx;
        if (rcnt == 97) begin
          logic [15:0] w;
          logic [3:0] cmd, req;
          rbusy <= 1'b0;
          w   = rbits[17:2];
          cmd = ham_data(w[15:8]);
          req = ham_data(w[7:0]);
          if (rbits[0] == 1'b0 && rbits[1] == 1'b1 && (^w) == rbits[18]) begin
            n_cmd[cmd] <= n_cmd[cmd] + 1;
            case (cmd)
              4'b0100: begin
                logic [35:0] c;
                logic [3:0]  s;
                c = cur; s = stored_req;
                if (req != stored_req && rp != wp && q_t[rp % 64] <= now) begin
                  c = q_id[rp % 64];
                  s = req;
                  rp <= rp + 1;
                end
                cur <= c; stored_req <= s;
                last_reply <= {s, c, DRORC_ID};
                tpend <= 1'b1; tdelay <= 0;
              end
              4'b0101: begin tpend <= 1'b1; tdelay <= 0; end
              4'b0110: if (rp != wp) begin cur <= q_id[rp % 64]; rp <= rp + 1; end
              4'b0111: stored_req <= req;
              default: ;
            endcase
          end
        end
      end
      // ---- transmit ----
      if (tpend && !tbusy) begin
        if (tdelay >= int'(REPLY_DELAY)) begin
          tpend <= 1'b0;
          tbusy <= 1'b1;
          tcnt  <= 0;
          tstream <= {1'b1, frame(last_reply[15:0]), frame(last_reply[31:16]), frame(last_reply[47:32])};
        end else tdelay <= tdelay + 1;
      end
      if (tbusy) begin
        tx   <= tstream[tcnt / 5];
        tcnt <= tcnt + 1;
        if (tcnt == 63 * 5 - 1) tbusy <= 1'b0;
      end else tx <= 1'b1;
    end
  end
endmodule
