// Watch dog timer.
//
// A retriggerable monostable in the original (50-100 us); here a counter of
// oscillator periods. Every valid access to peripheral address 0 (the LCI)
// retriggers it: A-BUS VALID low, P/M high and A-BUS bits 0-3 all low, as in
// the document's trigger gating. WDT (active low, a C-BUS line) goes low once
// TICKS periods pass without a retrigger; it is also low after reset, until
// the first LCI poll, like an untriggered monostable. TICKS = 500 is 75 us
// at the nominal 150 ns oscillator period, the middle of the documented range.
module mc_wdt
  import mc_pkg::*;
#(
  parameter int unsigned TICKS = 500
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] abus,
  input  logic          abus_valid_n,
  input  logic          pm,
  output logic          wdt_n
);
  logic [$clog2(TICKS+1)-1:0] cnt;
  logic trig;

  assign trig  = !abus_valid_n && pm && (abus[3:0] == 4'h0);
  assign wdt_n = (cnt != '0);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)          cnt <= '0;
    else if (trig)       cnt <= ($bits(cnt))'(TICKS);
    else if (cnt != '0)  cnt <= cnt - 1'b1;
endmodule
