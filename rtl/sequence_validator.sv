// sequence_validator: checks the order and timing of one trigger sequence.
//
// A sequence starts with an L0 trigger (or, for orphans, with a trigger
// message that arrives while idle). After L0 an L1a trigger must follow
// within l1_window clocks, otherwise the sequence ends as an L1 reject
// (pulse on l1r, no header is written). After L1a the L1a message and then
// an L2a or L2r message are expected; if no L2 message has arrived
// l2_timeout clocks after the start, the sequence ends as an L2 timeout.
// Every sequence that ends with an L2 message or an L2 timeout gives a
// one-clock seq_end pulse together with its result flags, error bits and
// event ID, from which the CDH is built. include_payload is set only for a
// sequence that saw real triggers and ended with L2a; orphan sequences never
// set it. seq_busy is high from the first trigger to the end.
//
// The legal sequences, the orphan behaviour and the payload rule follow the
// published trigger receiver. The windows are inputs (registers) with
// defaults derived from the published latencies (L1a 6.5 us, L2 88 us after
// the collision at 40 MHz); error-bit meanings and the handling of
// out-of-order messages are this design's own.
module sequence_validator (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        l0,
  input  logic        l1a,
  input  logic        chan_a_err,
  input  logic        msg_l1a,
  input  logic        msg_l2a,
  input  logic        msg_l2r,
  input  logic [11:0] msg_bcid,
  input  logic [23:0] msg_orbit,
  input  logic [15:0] l1_window,
  input  logic [15:0] l2_timeout,
  output logic        seq_busy,
  output logic        seq_end,
  output logic        end_l2a,
  output logic        end_l2r,
  output logic        end_timeout,
  output logic        end_orphan,
  output logic        include_payload,
  output logic        l1r,
  output logic [6:0]  event_info,
  output logic [3:0]  event_err,
  output logic [11:0] bcid,
  output logic [23:0] orbit
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT_L1A, S_WAIT_L1MSG, S_WAIT_L2} state_t;
  state_t      state;
  logic [15:0] timer;
  logic        saw_l0, saw_l1a, orphan;
  logic [3:0]  err;

  assign seq_busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      timer <= '0;
      {saw_l0, saw_l1a, orphan} <= '0;
      err <= '0;
      {seq_end, end_l2a, end_l2r, end_timeout, end_orphan, include_payload, l1r} <= '0;
      event_info <= '0;
      event_err  <= '0;
      bcid  <= '0;
      orbit <= '0;
    end else begin
      {seq_end, end_l2a, end_l2r, end_timeout, end_orphan, include_payload, l1r} <= '0;
      if (state != S_IDLE && timer != 16'hFFFF) timer <= timer + 16'd1;
      if (msg_l1a || msg_l2a) begin
        bcid  <= msg_bcid;
        orbit <= msg_orbit;
      end
      if (state != S_IDLE && chan_a_err) err[3] <= 1'b1;

      unique case (state)
        S_IDLE: begin
          timer <= 16'd1;
          {saw_l0, saw_l1a, orphan} <= '0;
          err <= '0;
          if (l0) begin
            state  <= S_WAIT_L1A;
            saw_l0 <= 1'b1;
          end else if (l1a) begin
            state   <= S_WAIT_L1MSG;   // L1a without L0
            saw_l1a <= 1'b1;
            err     <= 4'b0001;
          end else if (msg_l1a) begin
            state  <= S_WAIT_L2;       // orphan message starts a sequence
            orphan <= 1'b1;
          end else if (msg_l2a || msg_l2r) begin
            // orphan L2 message alone: sequence starts and ends at once
            seq_end    <= 1'b1;
            end_l2a    <= msg_l2a;
            end_l2r    <= msg_l2r;
            end_orphan <= 1'b1;
            event_info <= {1'b1, 1'b0, msg_l2r, msg_l2a, 1'b0, 1'b0, 1'b0};
            event_err  <= 4'b0000;
          end
        end
        S_WAIT_L1A: begin
          if (l1a) begin
            state   <= S_WAIT_L1MSG;
            saw_l1a <= 1'b1;
          end else if (msg_l2a || msg_l2r) begin
            state <= S_IDLE;           // L2 message without L1a: end with error
            seq_end <= 1'b1;
            end_l2a <= msg_l2a;
            end_l2r <= msg_l2r;
            event_info <= {1'b0, 1'b0, msg_l2r, msg_l2a, 1'b0, 1'b1, 1'b0};
            event_err  <= err | 4'b0010;
          end else if (timer >= l1_window) begin
            state <= S_IDLE;           // L1 reject: the front end drops the event
            l1r   <= 1'b1;
          end
        end
        S_WAIT_L1MSG, S_WAIT_L2: begin
          if (state == S_WAIT_L1MSG && msg_l1a) state <= S_WAIT_L2;
          if (msg_l2a || msg_l2r) begin
            state   <= S_IDLE;
            seq_end <= 1'b1;
            end_l2a <= msg_l2a;
            end_l2r <= msg_l2r;
            end_orphan      <= orphan;
            include_payload <= msg_l2a && !orphan;
            event_info <= {orphan, 1'b0, msg_l2r, msg_l2a, saw_l1a, saw_l0, msg_l2a && !orphan};
            event_err  <= err | ((state == S_WAIT_L1MSG) ? 4'b0010 : 4'b0000);
          end else if (timer >= l2_timeout) begin
            state       <= S_IDLE;
            seq_end     <= 1'b1;
            end_timeout <= 1'b1;
            end_orphan  <= orphan;
            event_info  <= {orphan, 1'b1, 1'b0, 1'b0, saw_l1a, saw_l0, 1'b0};
            event_err   <= err | 4'b0100;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
