// tb_dcs_bus_arbiter: a DCS board model performs random reads and writes on
// all eight modules of both FPGAs with the four-phase handshake. Checks
// that:
//  - an access to this FPGA gives exactly one mod_en pulse for the right
//    module, with address, rnw and write data held;
//  - read data is the selected module's word;
//  - an access to the other FPGA is never acknowledged and enables nothing.
// The address split follows the published bus; the handshake timing
// modelled here is this design's own.
`timescale 1ns/1ps
module tb_dcs_bus_arbiter;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;
  logic dcs_strobe = 0, dcs_rnw = 1, dcs_ack, rnw;
  logic [15:0] dcs_addr = '0, dcs_wdata = '0, dcs_rdata, wdata;
  logic [7:0] mod_en;
  logic [11:0] addr;
  logic [7:0][15:0] mod_rdata;
  dcs_bus_arbiter #(.FPGA_ID(1'b0)) dut (.*);
  int checks = 0, failures = 0, n_en = 0;
  logic [7:0] last_en;
  logic [11:0] last_addr;
  logic [15:0] last_wdata;
  logic last_rnw;

  // each module returns a word made of its number and the register address
  always_ff @(posedge clk) for (int m = 0; m < 8; m++)
    if (mod_en[m]) mod_rdata[m] <= {m[3:0], addr};
  always @(posedge clk) if (rst_n && mod_en != 0) begin
    n_en++; last_en = mod_en; last_addr = addr; last_wdata = wdata; last_rnw = rnw;
  end

  task automatic access(input logic [15:0] a, input logic r, input logic [15:0] w);
    int g = 0, n0;
    n0 = n_en;
    @(negedge clk); dcs_addr = a; dcs_rnw = r; dcs_wdata = w;
    #3 dcs_strobe = 1;
    while (!dcs_ack && g < 20) begin @(negedge clk); g++; end
    checks++;
    if (a[15]) begin
      if (dcs_ack || n_en != n0) begin failures++; $display("FAIL other FPGA answered %h", a); end
    end else begin
      if (!dcs_ack || n_en != n0 + 1 || last_en != (8'b1 << a[14:12]) || last_addr != a[11:0]
          || last_rnw != r || (!r && last_wdata != w) || (r && dcs_rdata != {1'b0, a[14:12], a[11:0]})) begin
        failures++; $display("FAIL access %h rnw %b rdata %h en %b", a, r, dcs_rdata, last_en);
      end
    end
    #3 dcs_strobe = 0;
    g = 0;
    while (dcs_ack && g < 20) begin @(negedge clk); g++; end
    checks++; if (dcs_ack) begin failures++; $display("FAIL ack stuck"); end
    repeat (2) @(negedge clk);
  endtask

  initial begin
    mod_rdata = '0;
    repeat (4) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 300; i++) access(16'($urandom), 1'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
