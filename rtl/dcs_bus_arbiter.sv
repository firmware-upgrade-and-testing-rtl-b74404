// dcs_bus_arbiter: slave side of the asynchronous control bus from the DCS
// board.
//
// The DCS board presents a 16-bit address, write data and rnw, then raises
// dcs_strobe; the FPGA answers with dcs_ack and the board drops the strobe,
// after which dcs_ack falls (four-phase handshake). The strobe is
// synchronised to clock B with two flops. Address bit 15 selects the FPGA
// (an access for the other FPGA is ignored), bits 14:12 select one of eight
// firmware modules and bits 11:0 are passed on as the register address.
// One access is issued as a one-clock mod_en pulse with addr, rnw and
// wdata held; read data of the selected module is captured one clock later
// (so modules may register their read data) and shown on dcs_rdata while
// dcs_ack is high. Module numbers: 1 trigger receiver, 2 control and
// status, 3 RX memory. The address split is the published one; the
// handshake phases, signal names and module numbers other than 2 are this
// design's choice.
module dcs_bus_arbiter #(
  parameter bit FPGA_ID = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             dcs_strobe,
  input  logic             dcs_rnw,
  input  logic [15:0]      dcs_addr,
  input  logic [15:0]      dcs_wdata,
  output logic [15:0]      dcs_rdata,
  output logic             dcs_ack,
  output logic [7:0]       mod_en,
  output logic             rnw,
  output logic [11:0]      addr,
  output logic [15:0]      wdata,
  input  logic [7:0][15:0] mod_rdata
);
  typedef enum logic [1:0] {A_IDLE, A_EN, A_CAP, A_ACK} astate_t;
  astate_t state;
  logic [1:0] strobe_sync;
  logic [2:0] mod;
  logic       strobe_s;

  assign strobe_s = strobe_sync[1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      strobe_sync <= '0;
      state     <= A_IDLE;
      mod_en    <= '0;
      mod       <= '0;
      rnw       <= 1'b1;
      addr      <= '0;
      wdata     <= '0;
      dcs_rdata <= '0;
      dcs_ack   <= 1'b0;
    end else begin
      strobe_sync <= {strobe_sync[0], dcs_strobe};
      mod_en <= '0;
      unique case (state)
        A_IDLE: if (strobe_s && dcs_addr[15] == FPGA_ID) begin
          mod    <= dcs_addr[14:12];
          addr   <= dcs_addr[11:0];
          rnw    <= dcs_rnw;
          wdata  <= dcs_wdata;
          mod_en <= 8'b1 << dcs_addr[14:12];
          state  <= A_EN;
        end
        A_EN:  state <= A_CAP;
        A_CAP: begin
          dcs_rdata <= rnw ? mod_rdata[mod] : 16'h0000;
          dcs_ack   <= 1'b1;
          state     <= A_ACK;
        end
        A_ACK: if (!strobe_s) begin
          dcs_ack <= 1'b0;
          state   <= A_IDLE;
        end
        default: state <= A_IDLE;
      endcase
    end
  end
endmodule
