// Testbench for mc_dreg: follows the D-BUS while D-IN CK is low, holds
// otherwise.
`include "tb_check.svh"
module tb_mc_dreg;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, din_ck = 1;
  logic [11:0] dbus, q, exp_q;
  mc_dreg dut (.*);
  always #5 clk = ~clk;
  initial begin #20000; failures++; $display("watchdog"); `TB_DONE end
  initial begin
    dbus = 12'hABC;
    #12; `CHECK(q == '0, "reset")
    rst_n = 1; exp_q = '0;
    for (int i = 0; i < 60; i++) begin
      dbus = 12'($urandom); din_ck = 1'($urandom);
      @(posedge clk); #1;
      if (!din_ck) exp_q = dbus;
      `CHECK(q == exp_q, $sformatf("step %0d", i))
    end
    `TB_DONE
  end
endmodule
