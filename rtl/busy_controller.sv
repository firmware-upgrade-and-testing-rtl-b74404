// busy_controller: decides when the detector is busy.
//
// busy is the OR of four conditions: the TTC receiver is not ready, the
// trigger receiver is inside a trigger sequence, all front-end event buffers
// are occupied, or the past-future protection time after an L1a trigger has
// not yet run out. The buffer count rises by one for each L0 trigger (for
// each L1a trigger when tpc_mode is set) and falls by one for each L2 reject
// or L2 timeout of a sequence that had triggers, for each verified event
// whose include-payload flag is set, and, when L0 is counted, for each L1
// reject. Payload flags wait in payload_fifo in sequence order; event_valid
// is delayed one clock so the flag read by it is available when the count
// is updated. The buffers are full when the count reaches buf_depth (4 or 8
// depending on the front-end configuration). All inputs are on clock B;
// busy and busy_src are registered (one clock latency). busy_src is
// {past-future, full, sequence, not ready}.
//
// The four busy sources, the counting rules and the payload FIFO with its
// one-clock delay are the published design; decrementing on L1 reject, the
// saturation of the counter and the 16-bit protection timer are this
// design's own.
module busy_controller #(
  parameter int unsigned CNT_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ttcrx_ready,
  input  logic             trg_busy,
  input  logic             l0,
  input  logic             l1a,
  input  logic             seq_end,
  input  logic             include_payload,
  input  logic             end_l2r,
  input  logic             end_timeout,
  input  logic             end_orphan,
  input  logic             l1r,
  input  logic             event_valid,
  input  logic             tpc_mode,
  input  logic [CNT_W-1:0] buf_depth,
  input  logic [15:0]      pfp_time,
  output logic             busy,
  output logic [3:0]       busy_src,
  output logic [CNT_W-1:0] buf_count
);
  logic payload, ev_d, pf_empty, pf_full;
  logic [15:0] pfp_cnt;
  logic inc, dec_ev, dec_seq, dec_l1r;
  logic [CNT_W+1:0] next;

  payload_fifo #(.DEPTH(16)) u_pf (
    .clk, .rst_n, .wr_en(seq_end), .din(include_payload),
    .rd_en(event_valid), .dout(payload), .empty(pf_empty), .full(pf_full)
  );

  assign inc     = tpc_mode ? l1a : l0;
  assign dec_ev  = ev_d && payload;
  assign dec_seq = seq_end && (end_l2r || end_timeout) && !end_orphan;
  assign dec_l1r = l1r && !tpc_mode;

  always_comb begin
    next = {2'b00, buf_count} + (CNT_W+2)'(inc);
    next = next - (CNT_W+2)'(dec_ev) - (CNT_W+2)'(dec_seq) - (CNT_W+2)'(dec_l1r);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      buf_count <= '0;
      ev_d      <= 1'b0;
      pfp_cnt   <= '0;
      busy      <= 1'b1;
      busy_src  <= 4'b0001;
    end else begin
      ev_d <= event_valid;
      if (next[CNT_W+1])                 buf_count <= '0;          // below zero
      else if (next[CNT_W])              buf_count <= '1;          // above maximum
      else                               buf_count <= next[CNT_W-1:0];
      if (l1a)                pfp_cnt <= pfp_time;
      else if (pfp_cnt != 0)  pfp_cnt <= pfp_cnt - 16'd1;
      busy_src <= {pfp_cnt != 0, buf_count >= buf_depth, trg_busy, !ttcrx_ready};
      busy     <= (pfp_cnt != 0) || (buf_count >= buf_depth) || trg_busy || !ttcrx_ready;
    end
  end

  logic unused;
  assign unused = pf_empty ^ pf_full;
endmodule
