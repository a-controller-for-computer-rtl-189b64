// Testbench for mc_lock_key: the lock loads only on l_load; every lock,
// region and operation is checked against the lock table.
`include "tb_check.svh"
module tb_mc_lock_key;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, l_load = 0;
  logic [2:0] ccsel, lock;
  logic map, pm, rd, wr, approved;
  // allowed operations per lock, as strings: network map, memory, LCI/SMI
  string tbl_map [8] = '{"", "RW", "R", "RW", "", "RW", "", "RW"};
  string tbl_mem [8] = '{"", "", "", "", "R", "RW", "RW", "RW"};
  string tbl_io  [8] = '{"", "RW", "", "", "", "RW", "", ""};
  function automatic bit allows(string s, bit w);
    for (int i = 0; i < s.len(); i++) if (s[i] == (w ? "W" : "R")) return 1;
    return 0;
  endfunction
  mc_lock_key dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("watchdog"); `TB_DONE end
  initial begin
    ccsel = 3'd5; {map, pm, rd, wr} = '0;
    #12; `CHECK(lock == 3'd0, "reset lock")
    rst_n = 1;
    @(posedge clk); #1; `CHECK(lock == 3'd0, "no load without l_load")
    for (int l = 0; l < 8; l++) begin
      ccsel = 3'(l); l_load = 1; @(posedge clk); #1; l_load = 0;
      ccsel = 3'(7 - l); @(posedge clk); #1;
      `CHECK(lock == 3'(l), $sformatf("lock %0d loaded", l))
      for (int r = 0; r < 4; r++) for (int op = 0; op < 2; op++) begin
        bit exp;
        {map, pm} = 2'(r); rd = (op == 0); wr = (op == 1); #1;
        unique case ({map, pm})
          2'b10: exp = allows(tbl_map[l], wr);
          2'b00: exp = allows(tbl_mem[l], wr);
          2'b11: exp = allows(tbl_io[l], wr);
          default: exp = 1;
        endcase
        `CHECK(approved == exp, $sformatf("lock %0d map %0d pm %0d wr %0d", l, map, pm, wr))
      end
    end
    `TB_DONE
  end
endmodule
