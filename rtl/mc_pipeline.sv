// Pipeline register.
//
// Holds the 36-bit microinstruction in execution. It is loaded from the
// microprogram store at the start of each machine cycle, so the sequencer can
// already compute and fetch the next microinstruction while the present one
// executes. Reset (LAL low) clears it: an all-zero word is a JUMP ZERO with no
// bus activity, so after reset the CPU starts at microprogram address 0, as
// the document requires. Clearing on reset is this design's choice.
module mc_pipeline
  import mc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   cyc_end,
  input  uinst_t d,
  output uinst_t q
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       q <= '0;
    else if (cyc_end) q <= d;
endmodule
