// tb_control_status: checks reset values, write and read-back of every
// control register, the CHEN bit mapping (register n, bit b is channel
// 16n+b), the one-clock transmit-command pulse and the status registers.
// The channel-enable mapping and the reset values 4 and 3520 follow the
// published design; the register offsets are this design's own.
`timescale 1ns/1ps
module tb_control_status;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;
  logic en = 0, we = 0;
  logic [11:0] addr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [119:0] chen;
  logic [3:0] buf_depth, dcs_tx_cmd, dcs_tx_reqid;
  logic [15:0] pfp_time;
  logic tpc_mode, dcs_tx_req;
  logic [3:0] buf_count = 4'd3, busy_src = 4'b0101, req_id = 4'd9;
  logic busy = 1;
  logic [9:0] rxmem_ptr = 10'd517;
  logic [15:0] n_valid = 16'd1234, n_resend = 16'd77;
  control_status dut (.*);
  int checks = 0, failures = 0, n_req = 0;
  always @(posedge clk) if (rst_n && dcs_tx_req) n_req++;

  task automatic wr(input logic [11:0] a, input logic [15:0] d);
    @(negedge clk); en = 1; we = 1; addr = a; wdata = d;
    @(negedge clk); en = 0; we = 0;
  endtask
  task automatic rd_check(input logic [11:0] a, input logic [15:0] exp);
    @(negedge clk); en = 1; we = 0; addr = a;
    #1 checks++;
    if (rdata !== exp) begin failures++; $display("FAIL reg %h got %h exp %h", a, rdata, exp); end
    @(negedge clk); en = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    checks++; if (chen != '1 || buf_depth != 4 || pfp_time != 3520 || tpc_mode) begin failures++; $display("FAIL reset values"); end
    rd_check(12'h008, 16'd4);
    rd_check(12'h009, 16'd3520);
    rd_check(12'h015, 16'h0101);
    rd_check(12'h010, {7'h0, 1'b1, 4'b0101, 4'd3});
    rd_check(12'h011, 16'd9);
    rd_check(12'h012, 16'd517);
    rd_check(12'h013, 16'd1234);
    rd_check(12'h014, 16'd77);
    rd_check(12'h0FF, 16'h0000);
    wr(12'h008, 16'd8);  rd_check(12'h008, 16'd8);
    checks++; if (buf_depth != 8) begin failures++; $display("FAIL buf_depth"); end
    wr(12'h009, 16'd100); rd_check(12'h009, 16'd100);
    checks++; if (pfp_time != 100) begin failures++; $display("FAIL pfp_time"); end
    wr(12'h00A, 16'd1);  rd_check(12'h00A, 16'd1);
    checks++; if (!tpc_mode) begin failures++; $display("FAIL tpc_mode"); end
    for (int r = 0; r < 8; r++) begin
      wr(12'(r), 16'hFFFF ^ (16'h1 << r));
      rd_check(12'(r), 16'hFFFF ^ (16'h1 << r));
    end
    for (int c = 0; c < 120; c++) begin
      checks++; if (chen[c] != ((c % 16) != (c / 16))) begin failures++; $display("FAIL chen %0d", c); end
    end
    wr(12'h00B, 16'h5A00); @(negedge clk);
    checks++; if (n_req != 1 || dcs_tx_cmd != 4'h5 || dcs_tx_reqid != 4'hA) begin failures++; $display("FAIL tx command"); end
    rd_check(12'h00B, 16'h5A00);
    // a write to a status register changes nothing
    wr(12'h013, 16'h0);
    rd_check(12'h013, 16'd1234);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
