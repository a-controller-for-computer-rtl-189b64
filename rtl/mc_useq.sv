// Microprogram controller: Am2910-compatible sequencer, built as the
// document's emulation circuit (two Am2909 slices, a decoding PROM and a
// 4-bit event counter).
//
// Each machine cycle the decoding PROM turns {I/O ERROR, CC, NEXT ADDRESS}
// into the control lines LD CNT, EN CNT, PL-EN, MAP-EN, PUP, FE, S1, S0; the
// truth table in ctl_prom() is the documented PROM contents, row for row.
// S1,S0 choose the 8-bit address source: 00 microprogram counter, 01 the
// address register (always zero in the emulation), 10 top of the 4-word
// stack, 11 the direct input. The direct input is the PL ADDRESS field when
// PL-EN is low, the mapping PROM when MAP-EN is low, otherwise the vector
// address. FE low with PUP high pushes the microprogram counter, FE low with
// PUP low pops. LD CNT low loads the event counter from the 4 LSb of PL
// ADDRESS; EN CNT low decrements it. ev_zero (EV.CNT) is high at zero.
//
// I/O ERROR high forces address xFF (all sequencer outputs high) without
// stack or counter action. Address bit 8, the half of the store, is kept
// unchanged except by JUMP MAP, which sets it to the AND of the two opcode
// MSbs (special instructions and messages have both high), and by JUMP ZERO,
// which clears it. Holding bit 8 in its own flip-flop is this design's
// reading: the document's Am2910 connection drives only 8 address lines.
// Stack depth 4 follows the Am2909 parts; the stack wraps when overfilled.
//
// Timing: ua is combinational from the pipeline and the state; state
// updates at cyc_end, when the pipeline takes the word at ua.
module mc_useq
  import mc_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           cyc_end,
  input  logic [3:0]     next_addr,
  input  logic           cc,
  input  logic           io_error,
  input  logic [7:0]     pl_addr,
  input  logic [7:0]     map_addr,
  input  logic           map_msb,
  input  logic [7:0]     vect_addr,
  output logic [UAW-1:0] ua,
  output logic           ev_zero,
  output logic           map_en_n,
  output logic           pl_en_n
);
  typedef struct packed {
    logic ld_cnt_n, en_cnt_n, pl_en_n, map_en_n, pup, fe_n, s1, s0;
  } ctl_t;

  // Decoding PROM contents, columns LD CNT .. S0.
  function automatic ctl_t ctl_prom(input logic ioe, input logic c,
                                    input logic [3:0] na);
    logic [7:0] w;
    if (ioe) w = 8'b1101_1111;
    else if (!c) begin
      unique case (na)
        4'h0: w = 8'b1101_1101;  // JUMP ZERO
        4'h1: w = 8'b1101_1100;  // COND JSB PL
        4'h2: w = 8'b1110_1111;  // JUMP MAP
        4'h3: w = 8'b1101_1100;  // COND JUMP PL
        4'h4: w = 8'b1101_1000;  // PUSH / COND LD CNTR
        4'h5: w = 8'b1101_1001;  // COND JSB R/PL
        4'h6: w = 8'b1111_1100;  // COND JUMP VECTOR
        4'h7: w = 8'b1101_1101;  // COND JUMP R/PL
        4'h8: w = 8'b1001_1110;  // REPEAT LOOP, CNT /= 0
        4'h9: w = 8'b1001_1111;  // REPEAT PL, CNT /= 0
        4'hA: w = 8'b1101_1100;  // COND RTN
        4'hB: w = 8'b1101_1100;  // COND JUMP PL & POP
        4'hC: w = 8'b0001_1100;  // LD CNTR & CONTINUE
        4'hD: w = 8'b1101_1110;  // TEST END LOOP
        4'hE: w = 8'b1101_1100;  // CONTINUE
        default: w = 8'b1001_1110; // REPEAT LOOP, CNT /= 0
      endcase
    end else begin
      unique case (na)
        4'h0: w = 8'b1101_1101;
        4'h1: w = 8'b1101_1011;
        4'h2: w = 8'b1110_1111;
        4'h3: w = 8'b1101_1111;
        4'h4: w = 8'b0001_1000;
        4'h5: w = 8'b1101_1011;
        4'h6: w = 8'b1111_1111;
        4'h7: w = 8'b1101_1111;
        4'h8: w = 8'b1101_0000;
        4'h9: w = 8'b1101_1100;
        4'hA: w = 8'b1101_0010;
        4'hB: w = 8'b1101_0011;
        4'hC: w = 8'b0001_1100;
        4'hD: w = 8'b1101_0000;
        4'hE: w = 8'b1101_1100;
        default: w = 8'b1101_0000;
      endcase
    end
    return ctl_t'(w);
  endfunction

  ctl_t       ctl;
  logic [7:0] upc;
  logic [7:0] stack [4];
  logic [1:0] sp;
  logic [3:0] cnt;
  logic       msb;
  logic [7:0] dsrc, y;
  logic       msb_next;

  assign ctl      = ctl_prom(io_error, cc, next_addr);
  assign pl_en_n  = ctl.pl_en_n;
  assign map_en_n = ctl.map_en_n;
  assign ev_zero  = (cnt == 4'd0);

  always_comb begin
    if (!ctl.pl_en_n)       dsrc = pl_addr;
    else if (!ctl.map_en_n) dsrc = map_addr;
    else                    dsrc = vect_addr;
    unique case ({ctl.s1, ctl.s0})
      2'b00:   y = upc;
      2'b01:   y = 8'h00;
      2'b10:   y = stack[sp];
      default: y = dsrc;
    endcase
    if (io_error) y = 8'hFF;
    msb_next = msb;
    if (!io_error && next_addr == NA_JMAP) msb_next = map_msb;
    if (!io_error && next_addr == NA_JZ)   msb_next = 1'b0;
  end

  assign ua = {msb_next, y};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      upc <= '0;
      sp  <= '0;
      cnt <= '0;
      msb <= 1'b0;
      for (int i = 0; i < 4; i++) stack[i] <= '0;
    end else if (cyc_end) begin
      upc <= y + 8'd1;
      msb <= msb_next;
      if (!ctl.fe_n) begin
        if (ctl.pup) begin
          stack[sp + 2'd1] <= upc;
          sp <= sp + 2'd1;
        end else begin
          sp <= sp - 2'd1;
        end
      end
      if (!ctl.ld_cnt_n)      cnt <= pl_addr[3:0];
      else if (!ctl.en_cnt_n) cnt <= cnt - 4'd1;
    end
endmodule
