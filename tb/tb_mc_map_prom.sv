// Testbench for mc_map_prom: every unprogrammed opcode maps to the
// next-instruction routine; programmed entries read back.
`include "tb_check.svh"
module tb_mc_map_prom;
  int checks = 0, failures = 0;
  logic clk = 0, prog_we = 0;
  logic [7:0] prog_addr, prog_data, opcode, start_addr;
  logic [7:0] shadow [256];
  mc_map_prom #(.FETCH_ADDR(8'h01)) dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("watchdog"); `TB_DONE end
  initial begin
    for (int i = 0; i < 256; i++) shadow[i] = 8'h01;
    // opcodes of Appendix d: LCI MESS F5, CONS COMM CC, 'Connect' EE, LOAD R Bx
    foreach (shadow[i]) if (i inside {8'hF5, 8'hCC, 8'hEE, 8'hB3}) begin
      prog_addr = 8'(i); prog_data = 8'(i ^ 8'h5A); shadow[i] = prog_data;
      prog_we = 1; @(posedge clk); #1; prog_we = 0;
    end
    for (int i = 0; i < 256; i++) begin
      opcode = 8'(i); #1;
      `CHECK(start_addr == shadow[i], $sformatf("opcode %02x", i))
    end
    `TB_DONE
  end
endmodule
