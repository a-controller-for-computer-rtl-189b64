// Machine-cycle clock generator.
//
// A counter on the oscillator (150 ns nominal) produces the two clock phases
// of the CPU: CK is high for one oscillator period (t_HI = 150 ns) and low for
// one period in a fast cycle (300 ns total) or two periods in a slow cycle
// (450 ns total). The F bit of the microinstruction in execution chooses the
// length (F = 1 fast). A0 is the counter phase that is high only in the first
// oscillator period of the low semicycle; the FPLA combines CK and A0 into the
// read/write strobe shapes. The phase lengths are the document's; taking A0 as
// "first low period" is this design's reading, chosen because it reproduces
// the documented access times of the F0/S0/F1/S1 bus patterns.
//
// cyc_end is high in the last oscillator period of a machine cycle: every
// register that the document clocks "at the start of a machine cycle" is
// enabled by it. ph0_end marks the end of the CK-high semicycle.
// The counter has no reset other than fresh_n: it free-runs like the original.
module mc_clock (
  input  logic osc,
  input  logic fresh_n,
  input  logic fast,
  output logic ck,
  output logic a0,
  output logic cyc_end,
  output logic ph0_end
);
  typedef enum logic [1:0] {PH_HI = 2'd0, PH_LO1 = 2'd1, PH_LO2 = 2'd2} ph_e;
  ph_e ph;

  always_ff @(posedge osc or negedge fresh_n)
    if (!fresh_n) ph <= PH_HI;
    else unique case (ph)
      PH_HI:   ph <= PH_LO1;
      PH_LO1:  ph <= fast ? PH_HI : PH_LO2;
      default: ph <= PH_HI;
    endcase

  assign ck      = (ph == PH_HI);
  assign a0      = (ph == PH_LO1);
  assign ph0_end = (ph == PH_HI);
  assign cyc_end = (ph == PH_LO1 && fast) || (ph == PH_LO2);
endmodule
