// Testbench for mc_memory: writes through the bus strobes into both sections
// and reads them back; deselected or non-write cycles change nothing.
`include "tb_check.svh"
module tb_mc_memory;
  import mc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  cbus_t cb;
  logic [11:0] wdata, rdata;
  logic sel;
  logic [11:0] shadow [int];
  mc_memory dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("watchdog"); `TB_DONE end
  task automatic bus_write(input logic [10:0] a, input logic [11:0] d, input logic pm);
    cb = '{abus: a, abus_valid_n: 0, dout_ck: 1, din_ck: 1, pm: pm, wr: 1};
    wdata = d; @(posedge clk); #1;
    cb.dout_ck = 0; @(posedge clk); #1;
    cb.dout_ck = 1; @(posedge clk); #1;
    cb.abus_valid_n = 1; wdata = ~d; @(posedge clk); #1;
  endtask
  initial begin
    cb = '{abus: 0, abus_valid_n: 1, dout_ck: 1, din_ck: 1, pm: 0, wr: 0};
    for (int i = 0; i < 60; i++) begin
      logic [10:0] a;
      logic [11:0] d;
      a = (i % 2) ? 11'($urandom % 256) : 11'(256 + $urandom % 1792);
      d = 12'($urandom);
      bus_write(a, d, 0); shadow[a] = d;
    end
    // a write addressed to a peripheral must not reach memory
    begin
      logic [10:0] a; a = 11'd5; bus_write(a, 12'h111, 0); shadow[a] = 12'h111;
      bus_write(a, 12'h222, 1);
    end
    foreach (shadow[a]) begin
      cb = '{abus: 11'(a), abus_valid_n: 0, dout_ck: 1, din_ck: 0, pm: 0, wr: 0}; #1;
      `CHECK(sel && rdata == shadow[a], $sformatf("read %0d", a))
    end
    cb.pm = 1; #1; `CHECK(!sel, "not selected for a peripheral")
    `TB_DONE
  end
endmodule
