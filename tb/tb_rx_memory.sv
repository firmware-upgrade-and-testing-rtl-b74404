// tb_rx_memory: writes 1100 random 56-bit messages on clock A (so the
// write pointer wraps) and reads every 16-bit lane back on clock B through
// the DCS port, comparing with a model. Then checks that a DCS write to
// one lane changes only that lane, and that read data appears one clock
// after the enable.
// The 1024-entry depth follows the published design; the lane addressing
// it checks is this design's own.
`timescale 1ns/1ps
module tb_rx_memory;
  logic clk_a = 0, clk_b = 0, rst_a_n = 0;
  always #2.5  clk_a = ~clk_a;
  always #12.5 clk_b = ~clk_b;
  logic wr_en = 0, dcs_en = 0, dcs_we = 0;
  logic [55:0] wr_data = '0;
  logic [9:0] wr_ptr;
  logic [11:0] dcs_addr = '0;
  logic [15:0] dcs_wdata = '0, dcs_rdata;
  rx_memory dut (.*);
  int checks = 0, failures = 0;
  logic [63:0] model [1024];

  task automatic dcs_read(input logic [11:0] a, output logic [15:0] d);
    @(negedge clk_b); dcs_en = 1; dcs_we = 0; dcs_addr = a;
    @(negedge clk_b); dcs_en = 0; d = dcs_rdata;
  endtask
  task automatic dcs_write(input logic [11:0] a, input logic [15:0] d);
    @(negedge clk_b); dcs_en = 1; dcs_we = 1; dcs_addr = a; dcs_wdata = d;
    @(negedge clk_b); dcs_en = 0; dcs_we = 0;
  endtask

  initial begin
    logic [15:0] d;
    repeat (4) @(negedge clk_a); rst_a_n = 1;
    for (int i = 0; i < 1100; i++) begin
      @(negedge clk_a);
      wr_en = 1; wr_data = {$urandom, $urandom};
      model[i % 1024] = {8'h00, wr_data};
    end
    @(negedge clk_a); wr_en = 0;
    checks++; if (wr_ptr != 10'(1100)) begin failures++; $display("FAIL ptr %0d", wr_ptr); end
    for (int e = 0; e < 1024; e++)
      for (int l = 0; l < 4; l++) begin
        dcs_read({e[9:0], l[1:0]}, d);
        checks++; if (d != model[e][l*16 +: 16]) begin failures++; $display("FAIL e %0d l %0d %h exp %h", e, l, d, model[e][l*16 +: 16]); end
      end
    dcs_write({10'd7, 2'd1}, 16'hBEEF);
    for (int l = 0; l < 4; l++) begin
      dcs_read({10'd7, l[1:0]}, d);
      checks++; if (d != ((l == 1) ? 16'hBEEF : model[7][l*16 +: 16])) begin failures++; $display("FAIL write lane %0d %h", l, d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk_b);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
