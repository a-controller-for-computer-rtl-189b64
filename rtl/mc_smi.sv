// Switching matrix interface (SMI), peripheral address 1.
//
// A CPU write to peripheral 1 carries the "Make Xpoint" command: PHY-a in
// bits 11-7 and PHY-b in bits 4-0 of the data word. The SMI latches the pair
// and gives the switching matrix a one-period make_stb with the two port
// addresses, which fire the thyristor pair of that crosspoint. If the matrix
// reports itself absent (sm_present low) when a command arrives, the SMI
// raises its interrupt request (int_n low, line 5 of the ICU) and keeps it
// until LAL. A read returns the last pair written. The command format and the
// interrupt on a missing matrix follow the document; the strobe interface to
// the matrix and the sticky interrupt are this design's.
module mc_smi
  import mc_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  cbus_t         cb,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata,
  output logic          sel,
  input  logic          sm_present,
  output logic          make_stb,
  output logic [4:0]    phy_a,
  output logic [4:0]    phy_b,
  output logic          int_n
);
  logic [DW-1:0] hold;
  logic          wr_low_q;

  assign sel   = cb.pm && !cb.abus_valid_n && cb.abus[3:0] == PA_SMI;
  assign rdata = {phy_a, 2'b00, phy_b};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      hold     <= '0;
      wr_low_q <= 1'b0;
      make_stb <= 1'b0;
      phy_a    <= '0;
      phy_b    <= '0;
      int_n    <= 1'b1;
    end else begin
      make_stb <= 1'b0;
      wr_low_q <= sel && cb.wr && !cb.dout_ck;
      if (sel && cb.wr && !cb.dout_ck) hold <= wdata;
      // command complete at the positive-going edge of D-OUT CK
      if (wr_low_q && cb.dout_ck) begin
        phy_a <= hold[11:7];
        phy_b <= hold[4:0];
        if (sm_present) make_stb <= 1'b1;
        else            int_n    <= 1'b0;
      end
    end
endmodule
