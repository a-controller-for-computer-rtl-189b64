// Vector address for register-addressing routines.
//
// The 4 LSb of a standard instruction name the register it uses (R1 = 1110 ...
// ACC = 0101, all ones when no register is used). The vector address selects
// the routine that loads the working register AC from that register (EV.CNT
// low, start of the instruction) or stores the result back (EV.CNT high, end).
// The routines lie at 0E0-0F5 of the store. The document says only that the
// address is taken directly from the 4 LSb and EV.CNT; the mapping
// {111, inverted register code, EV.CNT} is this design's, chosen because it
// fills exactly 0E0..0F5 (register code 1111 at 0E0/0E1, ACC at 0F4/0F5).
module mc_vector (
  input  logic [3:0] reg_code,
  input  logic       ev_zero,
  output logic [7:0] vect
);
  assign vect = {3'b111, ~reg_code, ev_zero};
endmodule
