// payload_fifo: 1-bit x 16 FIFO of include-payload flags.
//
// Every trigger sequence that produces a header writes its include-payload
// flag (wr_en, din). When the event is later verified against the D-RORCs,
// event valid pulses rd_en and the oldest flag appears on dout one clock
// later, registered, so the busy controller knows whether that event had
// occupied a front-end buffer. Reading an empty FIFO returns 0. The 1 x 16
// size and the one-clock read latency are the published ones.
module payload_fifo #(
  parameter int unsigned DEPTH = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic wr_en,
  input  logic din,
  input  logic rd_en,
  output logic dout,
  output logic empty,
  output logic full
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [DEPTH-1:0] mem;
  logic [AW-1:0] wp, rp;
  logic [AW:0] count;
  logic do_wr, do_rd;

  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mem <= '0;
      wp <= '0;
      rp <= '0;
      count <= '0;
      dout <= 1'b0;
    end else begin
      if (do_wr) begin
        mem[wp] <= din;
        wp <= wp + 1'b1;
      end
      if (do_rd) rp <= rp + 1'b1;
      dout  <= do_rd ? mem[rp] : 1'b0;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end
endmodule
