// Testbench for mc_wdt: low after reset, high after an LCI access, low again
// exactly TICKS periods after the last access; other addresses do not
// retrigger; random polling gaps are checked period by period.
`include "tb_check.svh"
module tb_mc_wdt;
  int checks = 0, failures = 0;
  localparam int T = 20;
  logic clk = 0, rst_n = 0, abus_valid_n = 1, pm = 0, wdt_n;
  logic [10:0] abus = 0;
  mc_wdt #(.TICKS(T)) dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("watchdog"); `TB_DONE end
  task automatic access(input logic [3:0] a, input logic p);
    abus = {7'b0, a}; pm = p; abus_valid_n = 0; @(posedge clk); #1; abus_valid_n = 1;
  endtask
  initial begin
    #12 rst_n = 1; #1;
    `CHECK(wdt_n == 0, "low after reset")
    access(4'h0, 1);
    `CHECK(wdt_n == 1, "high after poll")
    for (int i = 1; i < T; i++) begin @(posedge clk); #1; end
    `CHECK(wdt_n == 1, "still high before TICKS")
    @(posedge clk); #1;
    `CHECK(wdt_n == 0, "low after TICKS")
    access(4'h0, 1);
    repeat (T/2) @(posedge clk); #1;
    access(4'hF, 1);     // Console: no retrigger
    access(4'h0, 0);     // memory address 0: no retrigger
    repeat (T/2 - 2) @(posedge clk); #1;
    `CHECK(wdt_n == 0, "other accesses do not retrigger")
    access(4'h0, 1);
    repeat (T/2) @(posedge clk); #1;
    access(4'h0, 1);
    repeat (T - 1) @(posedge clk); #1;
    `CHECK(wdt_n == 1, "retriggered")
    // random polling gaps: WDT stays high for exactly TICKS periods
    for (int r = 0; r < 12; r++) begin
      int gap;
      gap = 1 + int'($urandom % (2 * T));
      access(4'h0, 1);
      for (int i = 1; i <= gap; i++) begin
        @(posedge clk); #1;
        `CHECK(wdt_n == (i < T), $sformatf("gap %0d, period %0d after the poll", gap, i))
      end
    end
    `TB_DONE
  end
endmodule
