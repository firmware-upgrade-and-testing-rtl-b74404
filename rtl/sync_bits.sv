// sync_bits: two-flop synchroniser for a bus of quasi-static signals.
//
// Used for configuration and status registers that change rarely and are
// read in the other clock domain (channel enables, counters shown to the
// control bus). The bus is not sampled coherently; consumers only use it
// when it has been stable for several clocks.
module sync_bits #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] s1;
  always_ff @(posedge clk) begin
    s1 <= d;
    q  <= s1;
  end
endmodule
