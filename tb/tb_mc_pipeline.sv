// Testbench for mc_pipeline: cleared by reset, loads only on cyc_end.
`include "tb_check.svh"
module tb_mc_pipeline;
  import mc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, cyc_end = 0;
  uinst_t d, q, exp_q;
  mc_pipeline dut (.*);
  always #5 clk = ~clk;
  initial begin #20000; failures++; $display("watchdog"); `TB_DONE end
  initial begin
    d = uinst_t'(36'hFFFFFFFFF);
    #12; `CHECK(q == '0, "reset value")
    rst_n = 1; exp_q = '0;
    for (int i = 0; i < 50; i++) begin
      d = uinst_t'({$urandom, $urandom} & 36'hFFFFFFFFF);
      cyc_end = ($urandom % 3) == 0;
      @(posedge clk); #1;
      if (cyc_end) exp_q = d;
      `CHECK(q == exp_q, $sformatf("load %0d", i))
    end
    `TB_DONE
  end
endmodule
