// Testbench for mc_icu. Machine cycles are 3 clocks (CK high in the first).
// A poll is an ICU write of the Status Word in one cycle; INTREQ may go low
// only in the cycle that follows, and only for an enabled request of level
// strictly above the present level. The latched level is read back later.
`include "tb_check.svh"
module tb_mc_icu;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic ph0_end, cyc_end, icuw_n = 1;
  logic [11:0] dbus = 0, level_rd;
  logic [7:0] int_n = 8'hFF;
  logic intreq_n;
  int k = 0;
  mc_icu dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) k <= (k == 2) ? 0 : k + 1;
  assign ph0_end = (k == 0);
  assign cyc_end = (k == 2);
  initial begin #100000; failures++; $display("watchdog"); `TB_DONE end

  // one machine cycle; returns whether INTREQ was low at any clock of it
  task automatic cycle(input logic write, input logic [2:0] lvl, input logic dis,
                       output logic req_seen);
    req_seen = 0;  // entered at the falling clock edge of the cycle's first clock
    icuw_n = !write; dbus = {5'b0, dis, 3'b0, lvl};
    do begin
      if (!intreq_n) req_seen = 1;
      @(negedge clk);
      icuw_n = 1;
    end while (k != 0);
  endtask

  task automatic poll(input logic [2:0] lvl, input logic dis, input logic expect_req,
                      input string what);
    logic s0, s1, s2;
    cycle(1, lvl, dis, s0);
    cycle(0, 0, 0, s1);
    cycle(0, 0, 0, s2);
    `CHECK(!s0, {what, ": no request in the write cycle"})
    `CHECK(s1 == expect_req, {what, ": request in the next cycle"})
    `CHECK(!s2, {what, ": request lasts one cycle only"})
  endtask

  initial begin
    logic s;
    #12 rst_n = 1;
    @(negedge clk iff k == 0);
    cycle(0, 0, 0, s); `CHECK(!s, "no request without poll")
    int_n[3] = 0;
    cycle(0, 0, 0, s); `CHECK(!s, "no request without poll, line active")
    poll(3'd1, 0, 1, "level 3 over present 1");
    `CHECK(level_rd == 12'd3, "level 3 read back")
    poll(3'd3, 0, 0, "level 3 not over present 3");
    poll(3'd5, 0, 0, "level 3 below present 5");
    poll(3'd0, 1, 0, "disabled");
    int_n[6] = 0;
    poll(3'd2, 0, 1, "highest of 3 and 6");
    repeat (4) cycle(0, 0, 0, s);
    `CHECK(level_rd == 12'd6, "level 6 held until read");
    for (int i = 0; i < 30; i++) begin
      logic [2:0] lv; logic [7:0] r; int hi;
      r = 8'($urandom); lv = 3'($urandom);
      int_n = ~r; hi = -1;
      for (int j = 0; j < 8; j++) if (r[j]) hi = j;
      poll(lv, 0, hi > int'(lv), $sformatf("random lines %02x present %0d", r, lv));
      if (hi > int'(lv)) `CHECK(level_rd == 12'(hi), "random level read")
    end
    `TB_DONE
  end
endmodule
