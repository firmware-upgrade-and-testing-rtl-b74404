// receiver: all D-RORC receive channels of one FPGA.
//
// NUM_CH serial receivers are grouped into branches of CH_PER_BRANCH under
// branch controllers, and the branches under one backbone controller: with
// 120 channels, eight branches of sixteen (the last one half used). The
// output is a stream of replies, each with its channel number, one clock
// per reply on out_valid, stalled while out_ready is low. err_count counts
// bad frames on all channels. All on clock A. The two-level multiplexer
// structure and its sizes follow the published design.
module receiver #(
  parameter int unsigned NUM_CH        = 120,
  parameter int unsigned CH_PER_BRANCH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NUM_CH-1:0] rx,
  output logic              out_valid,
  output logic [6:0]        out_ch,
  output logic [47:0]       out_msg,
  input  logic              out_ready,
  output logic [15:0]       err_count
);
  localparam int unsigned NBR = (NUM_CH + CH_PER_BRANCH - 1) / CH_PER_BRANCH;
  localparam int unsigned NPAD = NBR * CH_PER_BRANCH;

  logic [NPAD-1:0]       ch_valid, ch_ack, ch_err;
  logic [NPAD-1:0][47:0] ch_msg;
  logic [NBR-1:0]        br_valid, br_ack;
  logic [NBR-1:0][3:0]   br_ch;
  logic [NBR-1:0][47:0]  br_msg;

  for (genvar c = 0; c < int'(NPAD); c++) begin : g_ch
    if (c < int'(NUM_CH)) begin : g_rx
      serial_receiver u_rx (
        .clk, .rst_n, .rx(rx[c]), .msg_valid(ch_valid[c]), .msg(ch_msg[c]),
        .msg_ack(ch_ack[c]), .err(ch_err[c])
      );
    end else begin : g_pad
      assign ch_valid[c] = 1'b0;
      assign ch_msg[c]   = '0;
      assign ch_err[c]   = 1'b0;
    end
  end

  for (genvar b = 0; b < int'(NBR); b++) begin : g_br
    branch_controller #(.NCH(CH_PER_BRANCH)) u_br (
      .clk, .rst_n,
      .ch_valid(ch_valid[b*CH_PER_BRANCH +: CH_PER_BRANCH]),
      .ch_msg(ch_msg[b*CH_PER_BRANCH +: CH_PER_BRANCH]),
      .ch_ack(ch_ack[b*CH_PER_BRANCH +: CH_PER_BRANCH]),
      .out_valid(br_valid[b]), .out_ch(br_ch[b]), .out_msg(br_msg[b]),
      .out_ack(br_ack[b])
    );
  end

  backbone_controller #(.NBR(NBR), .CH_PER_BRANCH(CH_PER_BRANCH)) u_bb (
    .clk, .rst_n, .br_valid, .br_ch, .br_msg, .br_ack,
    .out_valid, .out_ch, .out_msg, .out_ready
  );

  always_ff @(posedge clk) begin
    if (!rst_n) err_count <= '0;
    else        err_count <= err_count + 16'($countones(ch_err));
  end

  logic unused;
  assign unused = ^ch_ack;  // acks of the unpopulated padding channels

endmodule
