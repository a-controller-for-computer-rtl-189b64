// Address logic between the 3002 array A outputs and the A-BUS.
//
// The 3002 slices drive their A outputs inverted. Normally the 11 LSb are
// inverted back onto the 11 A-BUS lines (the 12th output is unused). When
// MAP is high (network map, LCI or SMI access) only the 5 LSb pass, inverted;
// the 5 MSb are forced low and bit 5 follows the L/P field, selecting the LOG
// (L/P high, entries 32-63) or PHY (entries 0-31) half of the network map.
// This is the document's address logic; only its gate-level form is ours.
module mc_addr_logic
  import mc_pkg::*;
(
  input  logic [AW-1:0] a_n,
  input  logic          map,
  input  logic          lp,
  output logic [AW-1:0] abus
);
  always_comb
    if (map) abus = {5'b00000, lp, ~a_n[4:0]};
    else     abus = ~a_n;
endmodule
