// transmitter: sends BusyBox commands to the enabled D-RORC channels.
//
// Two sources ask for a transmission: the event ID verification (normally
// Request Event ID with the current request ID) and the control bus (any
// command, for debugging). The arbiter takes one request at a time, giving
// the control bus priority, and acknowledges it with a one-clock ack. The
// controller stores the command word in its message register and the
// channel enable vector in its channel register; the serial encoder sends
// the word once and the masking vector copies it onto every selected
// channel while unselected channels stay idle high. The command word is the
// Hamming(8,4) code of the command type in bits 15:8 and of the request ID
// in bits 7:0 (bb_pkg::bb_cmd_word). busy is high from the ack to the end
// of the frame (101 clock-A cycles). Structure (arbiter, message and
// channel registers, serial encoder, masking vector) follows the published
// block diagram; the priority order is this design's choice.
module transmitter #(
  parameter int unsigned NUM_CH = 120
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ev_req,
  input  logic [3:0]        ev_cmd,
  input  logic [3:0]        ev_reqid,
  output logic              ev_ack,
  input  logic              dcs_req,
  input  logic [3:0]        dcs_cmd,
  input  logic [3:0]        dcs_reqid,
  output logic              dcs_ack,
  input  logic [NUM_CH-1:0] chen,
  output logic              busy,
  output logic [NUM_CH-1:0] tx
);
  import bb_pkg::*;
  logic [15:0]       msg_reg;
  logic [NUM_CH-1:0] ch_reg;
  logic              start, enc_busy, line;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      msg_reg <= '0;
      ch_reg  <= '0;
      start   <= 1'b0;
      ev_ack  <= 1'b0;
      dcs_ack <= 1'b0;
    end else begin
      start   <= 1'b0;
      ev_ack  <= 1'b0;
      dcs_ack <= 1'b0;
      if (!enc_busy && !start && !ev_ack && !dcs_ack) begin
        if (dcs_req) begin
          msg_reg <= bb_cmd_word(dcs_cmd, dcs_reqid);
          ch_reg  <= chen;
          start   <= 1'b1;
          dcs_ack <= 1'b1;
        end else if (ev_req) begin
          msg_reg <= bb_cmd_word(ev_cmd, ev_reqid);
          ch_reg  <= chen;
          start   <= 1'b1;
          ev_ack  <= 1'b1;
        end
      end
    end
  end

  serial_encoder #(.BIT_CYCLES(5)) u_enc (
    .clk, .rst_n, .start, .word(msg_reg), .busy(enc_busy), .tx(line)
  );

  assign busy = enc_busy || start;

  // masking vector
  always_ff @(posedge clk) begin
    if (!rst_n) tx <= '1;
    else        tx <= line ? '1 : ~ch_reg;
  end
endmodule
