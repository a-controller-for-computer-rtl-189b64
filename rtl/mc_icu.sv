// Interrupt control unit (Intel 3214 with an Am2918 level register).
//
// Serves 8 active-low request lines; line 7 has the highest priority (the
// Console is on 7, the LCI on 6, the SMI on 5). The CPU polls it with an ICU
// write that carries the Status Word: D-BUS bits 0-2 give the present
// interrupt level and bit 6 the interrupt enable (active low). In the machine
// cycle that follows that write, and only in it, INTREQ (active low) is
// driven low if interrupts are enabled and a request of strictly higher level
// than the present one is pending. The level of that request is latched and
// can be read at any later time by an ICU read on D-BUS bits 0-2 (bit 3 of
// the level register input is tied, reading 0). Latching the level at the
// poll and the one-cycle window follow the document; the register-level form
// is this design's.
module mc_icu
  import mc_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ph0_end,
  input  logic          cyc_end,
  input  logic          icuw_n,
  input  logic [DW-1:0] dbus,
  input  logic [7:0]    int_n,
  output logic          intreq_n,
  output logic [DW-1:0] level_rd
);
  logic [2:0] cur_level, level_q, hi_level;
  logic       ien_n, pending, armed, any_req;

  always_comb begin
    any_req  = 1'b0;
    hi_level = 3'd0;
    for (int i = 0; i < 8; i++)
      if (!int_n[i]) begin
        any_req  = 1'b1;
        hi_level = 3'(i);
      end
  end

  assign intreq_n = !(armed && !ien_n && any_req && hi_level > cur_level);
  assign level_rd = {9'b0, level_q};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cur_level <= '0;
      ien_n     <= 1'b1;
      pending   <= 1'b0;
      armed     <= 1'b0;
      level_q   <= '0;
    end else begin
      if (!icuw_n && ph0_end) begin
        cur_level <= dbus[2:0];
        ien_n     <= dbus[6];
        pending   <= 1'b1;
      end
      if (cyc_end) begin
        armed   <= pending || (!icuw_n && ph0_end);
        pending <= 1'b0;
      end
      if (!intreq_n) level_q <= hi_level;
    end
endmodule
