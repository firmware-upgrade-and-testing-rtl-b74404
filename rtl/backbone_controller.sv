// backbone_controller: merges the branch controllers into one reply stream.
//
// Scans the NBR branch controllers round robin, one per clock. When the
// scanned branch offers a reply and the consumer is ready (out_ready, the
// inbox buffer is not full), the reply is passed on for one clock on
// out_valid with its global channel number branch*CH_PER_BRANCH + local
// number, and the branch is acknowledged. The stream feeds both the D-RORC
// inbox buffer of the event ID verification and the RX memory. Up to eight
// branches and the scanning follow the published receiver structure; the
// round-robin order is this design's choice.
module backbone_controller #(
  parameter int unsigned NBR           = 8,
  parameter int unsigned CH_PER_BRANCH = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NBR-1:0]       br_valid,
  input  logic [NBR-1:0][3:0]  br_ch,
  input  logic [NBR-1:0][47:0] br_msg,
  output logic [NBR-1:0]       br_ack,
  output logic                 out_valid,
  output logic [6:0]           out_ch,
  output logic [47:0]          out_msg,
  input  logic                 out_ready
);
  localparam int unsigned PW = (NBR > 1) ? $clog2(NBR) : 1;
  logic [PW-1:0] ptr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr       <= '0;
      br_ack    <= '0;
      out_valid <= 1'b0;
      out_ch    <= '0;
      out_msg   <= '0;
    end else begin
      br_ack    <= '0;
      out_valid <= 1'b0;
      if (out_ready && br_valid[ptr] && !br_ack[ptr]) begin
        out_valid   <= 1'b1;
        out_ch      <= 7'(int'(ptr) * int'(CH_PER_BRANCH) + int'(br_ch[ptr]));
        out_msg     <= br_msg[ptr];
        br_ack[ptr] <= 1'b1;
      end
      ptr <= (ptr == PW'(NBR - 1)) ? '0 : ptr + 1'b1;
    end
  end
endmodule
