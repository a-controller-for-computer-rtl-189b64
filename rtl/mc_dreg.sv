// D-register.
//
// Takes the D-BUS word whenever D-IN CK is low (its value at the
// positive-going edge of D-IN CK is the one kept). It is loaded in every
// read and also from the 3002 working register AC, so that the word can feed
// the vector address or be shifted through the I inputs. Its outputs drive
// the 3002 M inputs, the mapping PROM (8 MSb) and the vector address (4 LSb).
// The reset value 0 is this design's choice.
module mc_dreg
  import mc_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          din_ck,
  input  logic [DW-1:0] dbus,
  output logic [DW-1:0] q
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       q <= '0;
    else if (!din_ck) q <= dbus;
endmodule
