// serial_receiver: one D-RORC receive channel.
//
// The D-RORC and the BusyBox run from different 40 MHz sources, so the
// link is plesiochronous and each frame is recovered on its own. The line
// is synchronised to clock A (two flops). A falling edge on the idle-high
// line starts a capture: the next FRAME_BITS*BIT_CYCLES (100) samples,
// beginning with the first low one, are shifted into a register that holds
// the whole frame. Each group of five samples is then reduced by a majority
// gate to one bit, which tolerates up to two samples of phase drift. A
// frame is good when start bits read 0,1, the stop bit reads 0 and the
// parity bit makes the 16 data bits even. A D-RORC reply is three such
// words, most significant word first, and is offered on msg (48 bits) with
// msg_valid held until msg_ack. A bad frame pulses err and drops the partly
// received reply; so does a gap of more than GAP_TIMEOUT cycles between two
// words. The shift register and majority gates follow the published
// receiver; the gap timeout and error handling are this design's own.
module serial_receiver #(
  parameter int unsigned BIT_CYCLES  = 5,
  parameter int unsigned GAP_TIMEOUT = 200
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx,
  output logic        msg_valid,
  output logic [47:0] msg,
  input  logic        msg_ack,
  output logic        err
);
  import bb_pkg::*;
  localparam int unsigned NS = FRAME_BITS * BIT_CYCLES;

  typedef enum logic [1:0] {R_IDLE, R_CAPTURE, R_CHECK, R_WAIT_HIGH} rstate_t;
  rstate_t state;
  logic [1:0]  rx_sync;
  logic        rx_s;
  logic [NS-1:0] sh;
  logic [$clog2(NS+1)-1:0] cnt;
  logic [FRAME_BITS-1:0] bits;
  logic [1:0]  wcnt;
  logic [31:0] part;
  logic [$clog2(GAP_TIMEOUT+1)-1:0] gap;
  logic        good;

  assign rx_s = rx_sync[1];

  // majority gates over each bit period
  always_comb begin
    for (int b = 0; b < int'(FRAME_BITS); b++) begin
      int ones;
      ones = 0;
      for (int s = 0; s < int'(BIT_CYCLES); s++) ones += int'(sh[b*BIT_CYCLES + s]);
      bits[b] = (ones > int'(BIT_CYCLES) / 2);
    end
  end
  assign good = (bits[0] == START1) && (bits[1] == START2) &&
                (bits[FRAME_BITS-1] == STOP) && ((^bits[17:2]) == bits[18]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_sync   <= 2'b11;
      state     <= R_IDLE;
      sh        <= '1;
      cnt       <= '0;
      wcnt      <= '0;
      part      <= '0;
      gap       <= '0;
      msg_valid <= 1'b0;
      msg       <= '0;
      err       <= 1'b0;
    end else begin
      rx_sync <= {rx_sync[0], rx};
      err     <= 1'b0;
      if (msg_ack) msg_valid <= 1'b0;
      if (state == R_IDLE || state == R_WAIT_HIGH) begin
        if (wcnt != 0) begin
          if (gap == ($clog2(GAP_TIMEOUT+1))'(GAP_TIMEOUT)) wcnt <= '0;
          else gap <= gap + 1'b1;
        end
      end else begin
        gap <= '0;
      end
      unique case (state)
        R_IDLE: begin
          if (!rx_s) begin
            sh    <= {rx_s, sh[NS-1:1]};
            cnt   <= 1;
            state <= R_CAPTURE;
          end
        end
        R_CAPTURE: begin
          sh  <= {rx_s, sh[NS-1:1]};
          cnt <= cnt + 1'b1;
          if (cnt == ($clog2(NS+1))'(NS - 1)) state <= R_CHECK;
        end
        R_CHECK: begin
          state <= R_WAIT_HIGH;
          gap   <= '0;
          if (!good) begin
            err  <= 1'b1;
            wcnt <= '0;
          end else if (wcnt == 2'd2) begin
            msg       <= {part, bits[17:2]};
            msg_valid <= 1'b1;
            wcnt      <= '0;
          end else begin
            part <= {part[15:0], bits[17:2]};
            wcnt <= wcnt + 2'd1;
          end
        end
        R_WAIT_HIGH: if (rx_s) state <= R_IDLE;
        default: state <= R_IDLE;
      endcase
    end
  end
endmodule
