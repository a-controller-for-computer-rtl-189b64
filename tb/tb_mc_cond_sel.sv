// Testbench for mc_cond_sel: each CCSEL value routes its condition; the
// asynchronous lines are only taken at the end of the CK-high semicycle.
`include "tb_check.svh"
module tb_mc_cond_sel;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ph0_end = 0;
  logic [2:0] ccsel;
  logic io_error, co, wdt_n, ack_n, ev_zero, intreq_n, cc;
  logic [7:0] in;
  mc_cond_sel dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("watchdog"); `TB_DONE end
  initial begin
    {io_error, co, wdt_n, ack_n, ev_zero, intreq_n} = '0;
    #12 rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      {io_error, co, wdt_n, ack_n, ev_zero, intreq_n} = 6'($urandom);
      ph0_end = 1; @(posedge clk); #1; ph0_end = 0;
      in = {intreq_n, ev_zero, 1'b0, 1'b1, ack_n, wdt_n, co, io_error};
      ccsel = 3'($urandom); #1;
      `CHECK(cc == in[ccsel], $sformatf("ccsel %0d", ccsel))
      // asynchronous inputs change later in the cycle: no effect
      wdt_n = ~wdt_n; ack_n = ~ack_n; intreq_n = ~intreq_n;
      @(posedge clk); #1;
      `CHECK(cc == in[ccsel], $sformatf("registered, ccsel %0d", ccsel))
    end
    `TB_DONE
  end
endmodule
