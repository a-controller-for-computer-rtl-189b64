// Microprogram store: 512 x 36-bit words.
//
// Read asynchronously by the microprogram address, like the PROMs it stands
// for; the pipeline samples the word at the end of the cycle. The lower half
// (0-255) holds the standard-instruction microprograms, the upper half the
// special instructions. The prototype used reprogrammable EPROMs; here the
// contents are written through a programming port (prog_we), which is this
// design's stand-in for programming those parts. The microprogram contents
// themselves are not part of this block. Unprogrammed words read as zero.
module mc_ustore
  import mc_pkg::*;
#(
  parameter int unsigned DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     prog_we,
  input  logic [$clog2(DEPTH)-1:0] prog_addr,
  input  uinst_t                   prog_data,
  input  logic [$clog2(DEPTH)-1:0] ua,
  output uinst_t                   q
);
  uinst_t rom [DEPTH];

  initial for (int i = 0; i < DEPTH; i++) rom[i] = '0;

  always_ff @(posedge clk)
    if (prog_we) rom[prog_addr] <= prog_data;

  assign q = rom[ua];
endmodule
