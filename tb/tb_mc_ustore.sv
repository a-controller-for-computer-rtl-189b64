// Testbench for mc_ustore: unprogrammed words read zero; programmed words
// read back at their addresses in both halves.
`include "tb_check.svh"
module tb_mc_ustore;
  import mc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, prog_we = 0;
  logic [8:0] prog_addr, ua;
  uinst_t prog_data, q;
  logic [35:0] shadow [512];
  mc_ustore dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("watchdog"); `TB_DONE end
  initial begin
    for (int i = 0; i < 512; i++) shadow[i] = '0;
    ua = 9'd17; #1; `CHECK(q == '0, "unprogrammed word")
    for (int i = 0; i < 100; i++) begin
      prog_addr = 9'($urandom); prog_data = uinst_t'({$urandom, $urandom} & 36'hFFFFFFFFF);
      prog_we = 1; @(posedge clk); #1; prog_we = 0;
      shadow[prog_addr] = prog_data;
    end
    for (int i = 0; i < 512; i++) begin
      ua = 9'(i); #1;
      `CHECK(q == shadow[i], $sformatf("word %0d", i))
    end
    `TB_DONE
  end
endmodule
