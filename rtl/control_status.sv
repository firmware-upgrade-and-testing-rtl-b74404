// control_status: configuration and status registers of the BusyBox.
//
// Register bus on clock B from the DCS bus arbiter (en, we, 12-bit addr,
// 16-bit data); reads are combinational. Map:
//   0x000-0x007  CHEN: channel enable, 16 channels per register (rw)
//   0x008        number of front-end buffers, 4 or 8 (rw, reset 4)
//   0x009        past-future protection time in clock-B cycles (rw, 3520)
//   0x00A        bit 0: TPC mode, count L1a instead of L0 (rw, reset 0)
//   0x00B        write: send command 15:12 with request ID 11:8 to the
//                enabled D-RORCs; read: last command written
//   0x010        buffer count (3:0), busy sources (7:4), busy (8)  (ro)
//   0x011        current request ID (ro)
//   0x012        RX memory write pointer (ro)
//   0x013        verified events (ro)
//   0x014        request resends (ro)
//   0x015        firmware version, 0x0101 = 1.01 (ro)
// CHEN enables the serial channels to the D-RORCs and resets to all
// enabled. dcs_tx_req is a one-clock pulse on a write to 0x00B. The CHEN
// register, the version register at 0x2015 (module 2, offset 0x015) and its
// value 1.01 follow the published design; the other offsets, widths and
// reset values are this design's choice.
module control_status #(
  parameter int unsigned NUM_CH     = 120,
  parameter logic [15:0] FW_VERSION = 16'h0101
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              we,
  input  logic [11:0]       addr,
  input  logic [15:0]       wdata,
  output logic [15:0]       rdata,
  output logic [NUM_CH-1:0] chen,
  output logic [3:0]        buf_depth,
  output logic [15:0]       pfp_time,
  output logic              tpc_mode,
  output logic              dcs_tx_req,
  output logic [3:0]        dcs_tx_cmd,
  output logic [3:0]        dcs_tx_reqid,
  input  logic [3:0]        buf_count,
  input  logic [3:0]        busy_src,
  input  logic              busy,
  input  logic [3:0]        req_id,
  input  logic [9:0]        rxmem_ptr,
  input  logic [15:0]       n_valid,
  input  logic [15:0]       n_resend
);
  logic [7:0][15:0] chen_r;

  assign chen = NUM_CH'(chen_r);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      chen_r       <= '1;
      buf_depth    <= 4'd4;
      pfp_time     <= 16'd3520;
      tpc_mode     <= 1'b0;
      dcs_tx_req   <= 1'b0;
      dcs_tx_cmd   <= '0;
      dcs_tx_reqid <= '0;
    end else begin
      dcs_tx_req <= 1'b0;
      if (en && we) begin
        if (addr[11:3] == 9'd0) chen_r[addr[2:0]] <= wdata;
        unique case (addr)
          12'h008: buf_depth <= wdata[3:0];
          12'h009: pfp_time  <= wdata;
          12'h00A: tpc_mode  <= wdata[0];
          12'h00B: begin
            dcs_tx_cmd   <= wdata[15:12];
            dcs_tx_reqid <= wdata[11:8];
            dcs_tx_req   <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    rdata = 16'h0000;
    if (addr[11:3] == 9'd0) rdata = chen_r[addr[2:0]];
    else begin
      unique case (addr)
        12'h008: rdata = {12'h0, buf_depth};
        12'h009: rdata = pfp_time;
        12'h00A: rdata = {15'h0, tpc_mode};
        12'h00B: rdata = {dcs_tx_cmd, dcs_tx_reqid, 8'h00};
        12'h010: rdata = {7'h0, busy, busy_src, buf_count};
        12'h011: rdata = {12'h0, req_id};
        12'h012: rdata = {6'h0, rxmem_ptr};
        12'h013: rdata = n_valid;
        12'h014: rdata = n_resend;
        12'h015: rdata = FW_VERSION;
        default: rdata = 16'h0000;
      endcase
    end
  end
endmodule
