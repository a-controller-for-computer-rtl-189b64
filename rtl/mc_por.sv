// Power-on reset: generation of LAL.
//
// A flip-flop clocked at the start of each machine cycle samples the RESET
// push-button line (high when released); the power-on detector FRESH (active
// low) clears it asynchronously. Its output is LAL, low during power-on and
// for as long as the button is held, and synchronous to the machine cycle
// when it is released. The structure is the document's; the button polarity
// is this design's reading.
module mc_por (
  input  logic clk,
  input  logic cyc_end,
  input  logic fresh_n,
  input  logic reset_n,
  output logic lal_n
);
  always_ff @(posedge clk or negedge fresh_n)
    if (!fresh_n)     lal_n <= 1'b0;
    else if (cyc_end) lal_n <= reset_n;
endmodule
