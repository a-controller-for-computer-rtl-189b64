// Mapping PROM: opcode to microprogram start address.
//
// The 8 most significant bits of the word in the D-register (instruction,
// device message, LCI message or Console command) address a 256 x 8 table
// whose output is the start address of the corresponding microprogram within
// a half of the microprogram store. The ninth address bit is not stored: it
// is the AND of the two opcode MSbs (see mc_useq). Invalid codes must point at
// the next-instruction microroutine, so every entry starts at FETCH_ADDR
// until it is programmed. The table contents, FETCH_ADDR and the programming
// port are this design's; the document gives only the organisation.
module mc_map_prom #(
  parameter logic [7:0] FETCH_ADDR = 8'h01
) (
  input  logic       clk,
  input  logic       prog_we,
  input  logic [7:0] prog_addr,
  input  logic [7:0] prog_data,
  input  logic [7:0] opcode,
  output logic [7:0] start_addr
);
  logic [7:0] rom [256];

  initial for (int i = 0; i < 256; i++) rom[i] = FETCH_ADDR;

  always_ff @(posedge clk)
    if (prog_we) rom[prog_addr] <= prog_data;

  assign start_addr = rom[opcode];
endmodule
