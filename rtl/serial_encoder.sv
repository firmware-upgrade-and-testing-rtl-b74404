// serial_encoder: sends one 16-bit word on the BusyBox <-> D-RORC link.
//
// Frame, in order on the line: start bit 1 (0), start bit 2 (1), data bits
// 0 to 15 (bit 0 first), even parity over the 16 data bits, stop bit (0);
// the line idles high between frames. Every bit lasts BIT_CYCLES clock-A
// cycles, five at 200 MHz, giving 40 Mb/s and 500 ns per frame. A start
// pulse while busy is low latches word; tx shows the first start bit from
// the next clock and busy stays high for the 100 cycles of the frame.
// Frame layout, bit time and start/stop levels follow the published link;
// the bit order (bit 0 first) follows the published line captures.
module serial_encoder #(
  parameter int unsigned BIT_CYCLES = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] word,
  output logic        busy,
  output logic        tx
);
  import bb_pkg::*;
  logic [FRAME_BITS-1:0] frame;
  logic [4:0] bitn;
  logic [$clog2(BIT_CYCLES)-1:0] cyc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      frame <= '1;
      bitn  <= '0;
      cyc   <= '0;
      tx    <= IDLE;
    end else if (!busy) begin
      tx <= IDLE;
      if (start) begin
        busy  <= 1'b1;
        frame <= {STOP, ^word, word, START2, START1};
        bitn  <= '0;
        cyc   <= '0;
        tx    <= START1;
      end
    end else begin
      if (cyc == ($clog2(BIT_CYCLES))'(BIT_CYCLES - 1)) begin
        cyc <= '0;
        if (bitn == 5'(FRAME_BITS - 1)) begin
          busy <= 1'b0;
          tx   <= IDLE;
        end else begin
          bitn <= bitn + 5'd1;
          tx   <= frame[bitn + 5'd1];
        end
      end else begin
        cyc <= cyc + 1'b1;
      end
    end
  end
endmodule
