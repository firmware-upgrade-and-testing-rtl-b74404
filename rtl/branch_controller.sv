// branch_controller: collects replies from a group of serial receivers.
//
// Replies from the D-RORCs arrive at unpredictable times, so the branch
// controller scans its NCH receivers round robin, one per clock. When the
// scanned receiver holds a reply and the branch buffer is free, the reply
// and the receiver's local number are copied into the buffer and the
// receiver is acknowledged (one-clock ch_ack). The buffer is offered to
// the backbone controller on out_valid until out_ack. A branch of up to 16
// receivers and the scanning follow the published receiver structure; the
// one-entry buffer and round-robin order are this design's choice.
module branch_controller #(
  parameter int unsigned NCH = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NCH-1:0]         ch_valid,
  input  logic [NCH-1:0][47:0]   ch_msg,
  output logic [NCH-1:0]         ch_ack,
  output logic                   out_valid,
  output logic [3:0]             out_ch,
  output logic [47:0]            out_msg,
  input  logic                   out_ack
);
  logic [3:0] ptr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr       <= '0;
      ch_ack    <= '0;
      out_valid <= 1'b0;
      out_ch    <= '0;
      out_msg   <= '0;
    end else begin
      ch_ack <= '0;
      if (out_ack) out_valid <= 1'b0;
      if (!out_valid && ch_valid[ptr] && !ch_ack[ptr]) begin
        out_valid   <= 1'b1;
        out_ch      <= ptr;
        out_msg     <= ch_msg[ptr];
        ch_ack[ptr] <= 1'b1;
      end
      ptr <= (ptr == 4'(NCH - 1)) ? 4'd0 : ptr + 4'd1;
    end
  end
endmodule
