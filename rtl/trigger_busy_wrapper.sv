// trigger_busy_wrapper: fits the 32-bit trigger receiver registers onto the
// 16-bit BusyBox control bus.
//
// The trigger receiver keeps the register interface it has inside the
// readout control unit: 16-bit addresses and 32-bit data. The BusyBox bus
// gives 12 address bits and 16 data bits per module. The wrapper forms the
// RCU address as 4'h4, a zero bit and busy_addr[11:1], and uses busy_addr[0]
// to choose the upper (1) or lower (0) half of the 32-bit word, for reads
// through a multiplexer and for writes by placing the data in that half
// (the other half is zero and rcu_hi tells which half is meant). A write is
// signalled when the module is enabled and rnw is low. Purely combinational.
// The address formation and half selection are the published ones; the
// zeroing of the unused half and rcu_hi are this design's choice.
module trigger_busy_wrapper (
  input  logic [11:0] busy_addr,
  input  logic [15:0] busy_data_in,
  output logic [15:0] busy_data_out,
  input  logic        module_enable,
  input  logic        rnw,
  output logic [15:0] addr,
  output logic [31:0] rcu_data_in,
  input  logic [31:0] rcu_data_out,
  output logic        rcu_hi,
  output logic        we
);
  assign addr          = {4'h4, 1'b0, busy_addr[11:1]};
  assign rcu_hi        = busy_addr[0];
  assign rcu_data_in   = busy_addr[0] ? {busy_data_in, 16'h0000} : {16'h0000, busy_data_in};
  assign busy_data_out = busy_addr[0] ? rcu_data_out[31:16] : rcu_data_out[15:0];
  assign we            = module_enable && !rnw;
endmodule
