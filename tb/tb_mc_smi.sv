// Testbench for mc_smi: a write of a connection word to peripheral address 1
// gives a MAKE strobe with the two PHY addresses at the end of D-OUT CK when
// a Switching Matrix is present, and a lasting interrupt when none is; other
// addresses are ignored and a read returns the last word's two fields.
`include "tb_check.svh"
module tb_mc_smi;
  import mc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  cbus_t cb;
  logic [11:0] wdata, rdata;
  logic sel, sm_present = 1, make_stb, int_n;
  logic [4:0] phy_a, phy_b;
  int makes = 0;
  mc_smi dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (make_stb) makes++;
  initial begin #100000; failures++; $display("watchdog"); `TB_DONE end

  task automatic bus_write(input logic [3:0] pa, input logic [11:0] d);
    cb = '{abus: {7'b0, pa}, abus_valid_n: 0, dout_ck: 1, din_ck: 1, pm: 1, wr: 1};
    wdata = d; @(negedge clk);
    cb.dout_ck = 0; @(negedge clk);
    cb.dout_ck = 1; @(negedge clk);
    cb.abus_valid_n = 1; cb.wr = 0; @(negedge clk);
  endtask

  initial begin
    cb = '{abus: 0, abus_valid_n: 1, dout_ck: 1, din_ck: 1, pm: 0, wr: 0};
    wdata = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      logic [4:0] a, b; int m0;
      a = 5'($urandom); b = 5'($urandom); m0 = makes;
      bus_write(PA_SMI, {a, 2'($urandom), b});
      `CHECK(makes == m0 + 1, "one MAKE per write")
      `CHECK(phy_a == a && phy_b == b, "PHY addresses")
      `CHECK(int_n, "no interrupt with the matrix present")
    end
    begin
      int m0; m0 = makes;
      bus_write(PA_LCI, 12'hFFF);
      bus_write(4'h5, 12'h000);
      `CHECK(makes == m0, "other peripheral addresses ignored")
      cb = '{abus: {7'b0, PA_SMI}, abus_valid_n: 0, dout_ck: 1, din_ck: 0, pm: 1, wr: 0};
      #1 `CHECK(sel && rdata == {phy_a, 2'b00, phy_b}, "read back")
      cb.pm = 0; #1 `CHECK(!sel, "not selected for memory")
      sm_present = 0; m0 = makes;
      bus_write(PA_SMI, 12'h0A5);
      `CHECK(makes == m0 && !int_n, "absent matrix: interrupt, no MAKE")
      repeat (5) @(negedge clk);
      `CHECK(!int_n, "interrupt stays")
    end
    `TB_DONE
  end
endmodule
