// Condition selector.
//
// An 8-to-1 multiplexer, steered by the CCSEL field, gives the sequencer its
// condition CC:
//   0 I/O ERROR  1 CO (3002 array)  2 WDT line  3 ACK line
//   4 TRUE       5 unused (0)       6 EV.CNT    7 INTREQ line
// The asynchronous inputs (WDT, ACK, INTREQ) pass through a clocked register
// so that they cannot change while the next address is being formed; they
// are sampled at the end of the CK-high semicycle. I/O ERROR, CO and EV.CNT
// are generated inside the CPU in step with the cycle and are taken directly.
// Which inputs are registered, and the sampling point, are this design's
// choices. The lines enter at their bus levels: the C-BUS lines WDT, ACK and
// INTREQ are active low, so e.g. CC = 0 on CCSEL 7 means an interrupt is
// requested.
module mc_cond_sel (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ph0_end,
  input  logic [2:0] ccsel,
  input  logic       io_error,
  input  logic       co,
  input  logic       wdt_n,
  input  logic       ack_n,
  input  logic       ev_zero,
  input  logic       intreq_n,
  output logic       cc
);
  logic wdt_q, ack_q, intreq_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wdt_q    <= 1'b1;
      ack_q    <= 1'b1;
      intreq_q <= 1'b1;
    end else if (ph0_end) begin
      wdt_q    <= wdt_n;
      ack_q    <= ack_n;
      intreq_q <= intreq_n;
    end

  always_comb
    unique case (ccsel)
      3'd0: cc = io_error;
      3'd1: cc = co;
      3'd2: cc = wdt_q;
      3'd3: cc = ack_q;
      3'd4: cc = 1'b1;
      3'd5: cc = 1'b0;
      3'd6: cc = ev_zero;
      default: cc = intreq_q;
    endcase
endmodule
