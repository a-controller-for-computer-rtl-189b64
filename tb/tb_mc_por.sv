// Testbench for mc_por: LAL low at power-on and while RESET is held, high
// from the first cycle start after both are released.
`include "tb_check.svh"
module tb_mc_por;
  int checks = 0, failures = 0;
  logic cyc_end;
  logic clk = 0, fresh_n = 1, reset_n = 1, lal_n;
  int k = 0;
  mc_por dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin k <= (k + 1) % 3; end
  assign cyc_end = (k == 2);
  initial begin #20000; failures++; $display("watchdog"); `TB_DONE end
  initial begin
    #1 fresh_n = 0;  // supply rising: the RC input falls
    #2; `CHECK(lal_n == 0, "low at power-on")
    #20; fresh_n = 1;
    @(posedge clk iff cyc_end); #1;
    `CHECK(lal_n == 1, "released after power-on")
    @(negedge clk); reset_n = 0;
    @(posedge clk); #1; `CHECK(lal_n == 1 || cyc_end, "waits for cycle start")
    @(posedge clk iff cyc_end); #1; `CHECK(lal_n == 0, "button pressed")
    repeat (5) @(posedge clk); #1; `CHECK(lal_n == 0, "held")
    reset_n = 1;
    @(posedge clk iff cyc_end); #1; `CHECK(lal_n == 1, "button released")
    fresh_n = 0; #1; `CHECK(lal_n == 0, "asynchronous clear")
    `TB_DONE
  end
endmodule
