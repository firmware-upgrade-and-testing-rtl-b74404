// pulse_sync: carries single-clock pulses from one clock domain to another.
//
// Each source pulse flips a toggle flop; the destination synchronises the
// toggle through two flops and emits a one-clock pulse on each change.
// Pulses must be at least three destination clocks apart.
// A standard clock-domain-crossing circuit; using it for the trigger-side
// to clock-A pulses is this design's own choice.
module pulse_sync (
  input  logic src_clk,
  input  logic src_rst_n,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst_n,
  output logic dst_pulse
);
  logic tog;
  logic [2:0] sync;

  always_ff @(posedge src_clk) begin
    if (!src_rst_n) tog <= 1'b0;
    else if (src_pulse) tog <= ~tog;
  end

  always_ff @(posedge dst_clk) begin
    if (!dst_rst_n) sync <= '0;
    else sync <= {sync[1:0], tog};
  end

  assign dst_pulse = sync[2] ^ sync[1];
endmodule
