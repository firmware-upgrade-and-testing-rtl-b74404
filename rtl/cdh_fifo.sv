// cdh_fifo: dual-clock FIFO holding the generated Common Data Headers.
//
// Each finished trigger sequence writes its nine 33-bit CDH words (event
// info, event errors, headers 01-07) into this FIFO, 128 words deep, so up
// to fourteen headers can wait to be read. The writer runs on the 40 MHz
// trigger clock and the reader (event ID verification) on the 200 MHz serial
// clock, so the read and write pointers cross between the domains in Gray
// code through two-flop synchronisers. The read side is first-word-fall-
// through: rdata shows the oldest word whenever empty is low, and rd_en
// removes it. wcount gives the number of stored words seen from the write
// side (the "buffered events" count). The 128x33 size is the published one;
// the dual-clock construction is this design's choice.
module cdh_fifo #(
  parameter int unsigned WIDTH = 33,
  parameter int unsigned DEPTH = 128
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  output logic [$clog2(DEPTH):0] wcount,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write domain
  logic [AW:0] rbin_w;
  assign rbin_w = gray2bin(rgray_w2);
  assign wcount = wbin - rbin_w;
  assign full   = (wcount == (AW+1)'(DEPTH));

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk) begin
    if (!wrst_n) begin
      wbin <= '0;
      wgray <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  // read domain
  assign empty = (rgray == wgray_r2);
  assign rdata = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk) begin
    if (!rrst_n) begin
      rbin <= '0;
      rgray <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

`ifndef SYNTHESIS
  a_no_overflow: assert property (@(posedge wclk) disable iff (!wrst_n) !(wr_en && full))
    else $error("cdh_fifo: write while full");
`endif
endmodule
