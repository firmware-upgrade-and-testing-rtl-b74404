// tb_trigger_busy_wrapper: random bus accesses; the RCU address must be
// 4'h4, 0, busy_addr[11:1], bit 0 must select the data half and a write
// enable must appear only for an enabled write.
// The 32-to-16-bit translation follows the published wrapper; the address
// mapping it checks is this design's reading of it.
module tb_trigger_busy_wrapper;
  logic [11:0] busy_addr;
  logic [15:0] busy_data_in, busy_data_out, addr;
  logic module_enable, rnw, we, rcu_hi;
  logic [31:0] rcu_data_in, rcu_data_out;
  trigger_busy_wrapper dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int i = 0; i < 500; i++) begin
      logic [15:0] ea;
      busy_addr = 12'($urandom); busy_data_in = 16'($urandom); rcu_data_out = $urandom;
      module_enable = 1'($urandom); rnw = 1'($urandom);
      #1;
      ea = 16'h4000 | 16'(busy_addr >> 1);
      checks++;
      if (addr != ea) begin failures++; $display("FAIL addr %h %h", addr, ea); end
      checks++;
      if (busy_data_out != (busy_addr[0] ? rcu_data_out[31:16] : rcu_data_out[15:0])) begin failures++; $display("FAIL rd"); end
      checks++;
      if ((busy_addr[0] ? rcu_data_in[31:16] : rcu_data_in[15:0]) != busy_data_in || rcu_hi != busy_addr[0]) begin
        failures++; $display("FAIL wr");
      end
      checks++;
      if (we != (module_enable && !rnw)) begin failures++; $display("FAIL we"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
