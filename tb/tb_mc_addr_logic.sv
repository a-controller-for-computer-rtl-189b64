// Testbench for mc_addr_logic: plain inversion, and the network-map form.
`include "tb_check.svh"
module tb_mc_addr_logic;
  int checks = 0, failures = 0;
  logic [10:0] a_n, abus;
  logic map, lp;
  mc_addr_logic dut (.*);
  initial begin
    for (int i = 0; i < 200; i++) begin
      a_n = 11'($urandom); map = 1'($urandom); lp = 1'($urandom); #1;
      if (!map) `CHECK(abus == ~a_n, "plain address")
      else begin
        `CHECK(abus[10:6] == 5'b0, "map: 5 MSb low")
        `CHECK(abus[5] == lp, "map: bit 5 = L/P")
        `CHECK(abus[4:0] == ~a_n[4:0], "map: 5 LSb")
        `CHECK(abus == {5'b0, lp, 5'b0} + {6'b0, ~a_n[4:0]}, "map entry number")
      end
    end
    `TB_DONE
  end
endmodule
