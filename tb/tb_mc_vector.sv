// Testbench for mc_vector: the register codes of the instruction set map to
// routine pairs inside 0E0-0F5, one for the load and one for the store.
`include "tb_check.svh"
module tb_mc_vector;
  int checks = 0, failures = 0;
  logic [3:0] reg_code;
  logic ev_zero;
  logic [7:0] vect;
  // register codes R1..R9, ACC, and 1111 for "no register", with the
  // expected load-routine address
  logic [3:0] codes [11] = '{4'b1110, 4'b1101, 4'b1100, 4'b1011, 4'b1010,
                             4'b1001, 4'b1000, 4'b0111, 4'b0110, 4'b0101, 4'b1111};
  logic [7:0] exp_ld [11] = '{8'hE2, 8'hE4, 8'hE6, 8'hE8, 8'hEA,
                              8'hEC, 8'hEE, 8'hF0, 8'hF2, 8'hF4, 8'hE0};
  mc_vector dut (.*);
  initial begin
    for (int i = 0; i < 11; i++) begin
      reg_code = codes[i]; ev_zero = 0; #1;
      `CHECK(vect == exp_ld[i], $sformatf("load routine of code %b", codes[i]))
      ev_zero = 1; #1;
      `CHECK(vect == exp_ld[i] + 8'd1, $sformatf("store routine of code %b", codes[i]))
      `CHECK(vect >= 8'hE0 && vect <= 8'hF5, "inside E0-F5")
    end
    `TB_DONE
  end
endmodule
