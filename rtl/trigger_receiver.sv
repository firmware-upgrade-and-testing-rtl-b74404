// trigger_receiver: trigger decoding, sequence validation and CDH
// generation for the BusyBox.
//
// Channel A is decoded into L0 and L1a strobes (chan_a_decoder). Trigger
// messages of channel B arrive already decoded as strobes with their bunch
// crossing and orbit numbers. The sequence validator follows each trigger
// sequence; when one ends (L2a, L2r or L2 timeout) the nine-word Common
// Data Header is built and written, one word per clock, into the dual-clock
// CDH FIFO, from which the event ID verification reads on clock A.
//
// CDH words, 33 bits each, bit 32 even parity over bits 31:0:
//   0 event info   : 16'hA956, 4'h0, event info (7 flags, zero-extended)
//   1 event errors : 4'h0, error bits (zero-extended to 28)
//   2 header 01    : 4'h0, version, 3'b000, CIT, RoC, ESR, L1SwC, 2'b00, BCID
//   3 header 02    : 8'h00, orbit
//   4..8 headers 03-07 (L2 class, DAQ status, RoI data): zero here.
// Event info flags: 0 include payload, 1 L0 seen, 2 L1a seen, 3 L2a,
// 4 L2r, 5 L2 timeout, 6 orphan. Error bits: 0 L1a without L0, 1 message
// out of order, 2 L2 timeout, 3 bad channel A pulse.
//
// Registers (32-bit, RCU address 0x4000 + n, reached through
// trigger_busy_wrapper): 0 L1 window, 1 L2 timeout (both in clocks),
// 2 finished sequences, 3 orphan sequences, 4 lost headers and channel A
// errors. The word layouts of event info, errors and headers 01/02 follow
// the published CDH table; the flag meanings, register map and dropping of
// a header that arrives while the previous one is still being written or
// when the FIFO is full are this design's choices.
module trigger_receiver #(
  parameter logic [15:0] L1_WINDOW   = 16'd240,
  parameter logic [15:0] L2_TIMEOUT  = 16'd3520,
  parameter logic [3:0]  CDH_VERSION = 4'd2
) (
  input  logic        clk_b,
  input  logic        rst_n,
  input  logic        chan_a,
  input  logic        msg_l1a,
  input  logic        msg_l2a,
  input  logic        msg_l2r,
  input  logic [11:0] msg_bcid,
  input  logic [23:0] msg_orbit,
  // to the busy controller
  output logic        l0,
  output logic        l1a,
  output logic        seq_busy,
  output logic        seq_end,
  output logic        include_payload,
  output logic        end_l2r,
  output logic        end_timeout,
  output logic        end_orphan,
  output logic        l1r,
  output logic [7:0]  buffered_words,
  // RCU register bus (clock B)
  input  logic [15:0] rcu_addr,
  input  logic        rcu_we,
  input  logic        rcu_hi,
  input  logic [31:0] rcu_wdata,
  output logic [31:0] rcu_rdata,
  // CDH FIFO read port (clock A)
  input  logic        clk_a,
  input  logic        rst_a_n,
  input  logic        cdh_rd,
  output logic [32:0] cdh_data,
  output logic        cdh_empty
);
  logic chan_a_err, end_l2a;
  logic [6:0]  event_info;
  logic [3:0]  event_err;
  logic [11:0] bcid;
  logic [23:0] orbit;
  logic [15:0] l1_window, l2_timeout;
  logic [31:0] n_seq, n_orphan, n_err;

  chan_a_decoder u_cha (
    .clk(clk_b), .rst_n, .chan_a, .l0, .l1a, .err(chan_a_err)
  );

  sequence_validator u_seq (
    .clk(clk_b), .rst_n, .l0, .l1a, .chan_a_err,
    .msg_l1a, .msg_l2a, .msg_l2r, .msg_bcid, .msg_orbit,
    .l1_window, .l2_timeout,
    .seq_busy, .seq_end, .end_l2a, .end_l2r, .end_timeout, .end_orphan,
    .include_payload, .l1r, .event_info, .event_err, .bcid, .orbit
  );

  // ---- CDH builder --------------------------------------------------
  logic [31:0] words [9];
  logic [3:0]  widx;
  logic        writing, fifo_full, fifo_wr, room;
  logic [7:0]  wcount;
  assign room = (wcount <= 8'd119);  // space for a whole header
  logic [32:0] fifo_wdata;

  assign fifo_wr    = writing;
  assign fifo_wdata = {^words[widx], words[widx]};

  always_ff @(posedge clk_b) begin
    if (!rst_n) begin
      writing <= 1'b0;
      widx    <= '0;
      for (int i = 0; i < 9; i++) words[i] <= '0;
    end else begin
      if (writing) begin
        if (widx == 4'd8) writing <= 1'b0;
        widx <= widx + 4'd1;
      end
      if (seq_end && !writing && room) begin
        words[0] <= {16'hA956, 4'h0, 5'b0, event_info};
        words[1] <= {4'h0, 24'b0, event_err};
        words[2] <= {4'h0, CDH_VERSION, 3'b000, 1'b0, 4'h0, 1'b0, 1'b0, 2'b00, bcid};
        words[3] <= {8'h00, orbit};
        for (int i = 4; i < 9; i++) words[i] <= '0;
        writing <= 1'b1;
        widx    <= '0;
      end
    end
  end

  assign buffered_words = wcount;

  cdh_fifo #(.WIDTH(33), .DEPTH(128)) u_fifo (
    .wclk(clk_b), .wrst_n(rst_n), .wr_en(fifo_wr && !fifo_full), .wdata(fifo_wdata),
    .full(fifo_full), .wcount,
    .rclk(clk_a), .rrst_n(rst_a_n), .rd_en(cdh_rd), .rdata(cdh_data), .empty(cdh_empty)
  );

  // ---- registers ------------------------------------------------------
  always_ff @(posedge clk_b) begin
    if (!rst_n) begin
      l1_window  <= L1_WINDOW;
      l2_timeout <= L2_TIMEOUT;
      n_seq <= '0;
      n_orphan <= '0;
      n_err <= '0;
    end else begin
      if (rcu_we && rcu_addr[15:11] == 5'b01000 && !rcu_hi) begin
        unique case (rcu_addr[10:0])
          11'd0: l1_window  <= rcu_wdata[15:0];
          11'd1: l2_timeout <= rcu_wdata[15:0];
          default: ;
        endcase
      end
      if (seq_end) n_seq <= n_seq + 32'd1;
      if (seq_end && end_orphan) n_orphan <= n_orphan + 32'd1;
      if ((seq_end && (writing || !room)) || chan_a_err) n_err <= n_err + 32'd1;
    end
  end

  always_comb begin
    unique case (rcu_addr[10:0])
      11'd0:   rcu_rdata = {16'h0, l1_window};
      11'd1:   rcu_rdata = {16'h0, l2_timeout};
      11'd2:   rcu_rdata = n_seq;
      11'd3:   rcu_rdata = n_orphan;
      11'd4:   rcu_rdata = n_err;
      default: rcu_rdata = 32'h0;
    endcase
  end

  logic unused;
  assign unused = ^{end_l2a, rcu_wdata[31:16]};
endmodule
