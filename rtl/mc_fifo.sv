// Small synchronous first-in first-out buffer, used for the LCI's incoming
// and outgoing word buffers (the document asks only for fast buffers; the
// depth and the first-in first-out order are this design's).
//
// A circular array of DEPTH words with read and write pointers and a count.
// push and pop act at the clock edge and may come together; head is the
// oldest word, shown combinationally and valid while empty is low. clr
// empties the buffer at the next edge. A push when full is dropped; a pop
// when empty does nothing.
module mc_fifo #(
  parameter int unsigned W     = 12,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] head,
  output logic         empty,
  output logic         full
);
  localparam int unsigned PW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] rp, wp;
  logic [PW:0]   n;

  assign empty = (n == '0);
  assign full  = (n == (PW+1)'(DEPTH));
  assign head  = mem[rp];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rp <= '0;
      wp <= '0;
      n  <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (clr) begin
      rp <= '0;
      wp <= '0;
      n  <= '0;
    end else begin
      if (push && !full) begin
        mem[wp] <= din;
        wp      <= (wp == PW'(DEPTH-1)) ? '0 : wp + 1'b1;
      end
      if (pop && !empty)
        rp <= (rp == PW'(DEPTH-1)) ? '0 : rp + 1'b1;
      n <= n + (PW+1)'(push && !full) - (PW+1)'(pop && !empty);
    end
endmodule
