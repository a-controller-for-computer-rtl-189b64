// Testbench for mc_clock: checks the cycle lengths (2 oscillator periods
// fast, 3 slow), the CK and A0 waveforms and the cycle-end marks.
`include "tb_check.svh"
module tb_mc_clock;
  int checks = 0, failures = 0;
  logic osc = 0, fresh_n = 0, fast = 1;
  logic ck, a0, cyc_end, ph0_end;
  mc_clock dut (.*);
  always #5 osc = ~osc;
  initial begin #20000; failures++; $display("watchdog"); `TB_DONE end

  task automatic one_cycle(input logic f, input int exp_len);
    int len = 0;
    fast = f;
    // we are at the start of a cycle (ck high)
    do begin
      `CHECK(ck == (len == 0), $sformatf("ck in period %0d", len))
      `CHECK(a0 == (len == 1), $sformatf("a0 in period %0d", len))
      `CHECK(ph0_end == (len == 0), "ph0_end")
      `CHECK(cyc_end == (len == exp_len - 1), $sformatf("cyc_end in period %0d", len))
      len++;
      @(posedge osc); #1;
    end while (!ck && len < 10);
    `CHECK(len == exp_len, $sformatf("cycle length %0d expected %0d", len, exp_len))
  endtask

  initial begin
    #12 fresh_n = 1;
    @(posedge osc); #1;
    while (!ck) begin @(posedge osc); #1; end
    repeat (4) one_cycle(1, 2);
    repeat (4) one_cycle(0, 3);
    one_cycle(1, 2); one_cycle(0, 3); one_cycle(1, 2);
    `TB_DONE
  end
endmodule
