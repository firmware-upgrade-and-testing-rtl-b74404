// chan_a_decoder: decodes TTC channel A into L0 and L1a trigger strobes.
//
// Channel A carries the time-critical triggers synchronous to the 40 MHz
// bunch-crossing clock: a high pulse one clock long is an L0, a pulse two
// clocks long is an L1a. The decoder counts the length of each high pulse
// and, in the clock after the line returns low, emits a one-clock strobe on
// l0 or l1a, or on err for any other length. The pulse lengths are the
// published definition; deciding at the falling edge (one clock of latency
// after the pulse) is this design's choice.
module chan_a_decoder (
  input  logic clk,
  input  logic rst_n,
  input  logic chan_a,
  output logic l0,
  output logic l1a,
  output logic err
);
  logic [2:0] len;      // saturating length of the current high pulse
  logic       chan_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      len    <= '0;
      chan_q <= 1'b0;
      l0     <= 1'b0;
      l1a    <= 1'b0;
      err    <= 1'b0;
    end else begin
      chan_q <= chan_a;
      l0  <= 1'b0;
      l1a <= 1'b0;
      err <= 1'b0;
      if (chan_q) begin
        if (len != 3'd7) len <= len + 3'd1;
      end
      if (chan_q && !chan_a) begin
        // pulse ends: len holds its length minus one
        unique case (len)
          3'd0:    l0  <= 1'b1;
          3'd1:    l1a <= 1'b1;
          default: err <= 1'b1;
        endcase
        len <= '0;
      end
    end
  end
endmodule
