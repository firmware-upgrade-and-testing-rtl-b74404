// rx_memory: log of the last DEPTH replies received from the D-RORCs.
//
// Each reply from the receiver (56 bits: 8-bit channel number, 48-bit
// message) is written on clock A at the address of a wrapping 10-bit write
// counter, so the memory always holds the latest 1024 replies. The word is
// split over four 1024 x 16 dual-port RAMs (lanes 0-3 hold bits 15:0,
// 31:16, 47:32 and 55:48). The control bus reads and writes one 16-bit lane
// at a time on clock B at address {entry, lane}; read data is registered and
// valid one clock after dcs_en. Writes from the control bus are meant for
// testing. If both ports write the same location in the same instant the
// result is undefined, as in any true dual-port RAM.
//
// Each RAM is described as a true dual-port memory written from two clock
// domains, so its two write processes are plain always blocks (a variable
// written by two always_ff processes is not legal); tools may report the
// memory as driven from two processes, which is what a dual-port RAM is.
// Size, word width, counter addressing and the 16-bit access from the
// control bus follow the published design; the lane order is this design's.
module rx_memory #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = 10
) (
  input  logic          clk_a,
  input  logic          rst_a_n,
  input  logic          wr_en,
  input  logic [55:0]   wr_data,
  output logic [AW-1:0] wr_ptr,
  input  logic          clk_b,
  input  logic          dcs_en,
  input  logic          dcs_we,
  input  logic [AW+1:0] dcs_addr,
  input  logic [15:0]   dcs_wdata,
  output logic [15:0]   dcs_rdata
);
  logic [63:0] wide;
  logic [15:0] lane_q [4];
  logic [1:0] lane_sel;

  assign wide = {8'h00, wr_data};

  for (genvar l = 0; l < 4; l++) begin : g_lane
    logic [15:0] ram [DEPTH];
    logic [15:0] q;
    assign lane_q[l] = q;

    always @(posedge clk_a) begin
      if (wr_en) ram[wr_ptr] <= wide[l*16 +: 16];
    end

    always @(posedge clk_b) begin
      if (dcs_en) begin
        if (dcs_we && dcs_addr[1:0] == 2'(l)) ram[dcs_addr[AW+1:2]] <= dcs_wdata;
        q <= ram[dcs_addr[AW+1:2]];
      end
    end
  end

  always_ff @(posedge clk_b) begin
    if (dcs_en) lane_sel <= dcs_addr[1:0];
  end
  assign dcs_rdata = lane_q[lane_sel];

  always_ff @(posedge clk_a) begin
    if (!rst_a_n)  wr_ptr <= '0;
    else if (wr_en) wr_ptr <= wr_ptr + 1'b1;
  end
endmodule
