// MC memory: 2K x 12-bit words on the internal bus.
//
// Addresses 0-255 are the fast section (network map, subroutine stack,
// vectors, initialisation programs), 256 upward the slow section. Both are one
// array here; the sections differ only in the bus pattern the microprogram
// uses to reach them (F0/S0 for the fast part, F1 followed by S1 for the slow
// part), which this model does not need to tell apart. Selected when P/M is
// low and A-BUS VALID is low. A write takes the D-BUS word while D-OUT CK is
// low; a read drives the addressed word onto rdata while W/R is low.
// Contents are not initialised, like the RAM it models.
module mc_memory
  import mc_pkg::*;
#(
  parameter int unsigned WORDS = 2048
) (
  input  logic          clk,
  input  cbus_t         cb,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata,
  output logic          sel
);
  logic [DW-1:0] mem [WORDS];
  logic [$clog2(WORDS)-1:0] a;

  assign a     = cb.abus[$clog2(WORDS)-1:0];
  assign sel   = !cb.pm && !cb.abus_valid_n;
  assign rdata = mem[a];

  always_ff @(posedge clk)
    if (sel && cb.wr && !cb.dout_ck) mem[a] <= wdata;
endmodule
