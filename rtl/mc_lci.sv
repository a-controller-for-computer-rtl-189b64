// Line circuit interface (LCI), peripheral address 0.
//
// Sits between the CPU's internal bus and up to N_LC line circuits (LCs).
// Bus side: every CPU write pushes a command word into the incoming buffer;
// every CPU read (a "poll") pops one word of the outgoing buffer, or returns
// the 'No message' code FFF when the buffer is empty. Words leave the
// outgoing buffer in the order they were put in.
//
// Line side, a state machine that runs the document's command sequence:
//   IDLE  --Scan-->  SCAN: serve the lowest-numbered LC whose request line is
//         high and whose Priority Mask bit is low; select it and acknowledge.
//         An LC is only served once the CPU has polled every earlier word, so
//         the outgoing buffer always has room for the message and a test
//         result. The incoming buffer cannot fill: the LCI takes one word per
//         oscillator period and the CPU writes at most one per machine cycle.
//   RX:   receive the device's serial frame; on a bad frame ask for
//         retransmission (lc_retx), after RETRIES bad frames report
//         'LC a crazy'. A good frame becomes two words in the outgoing buffer:
//         {message code, 1111} and {LOG field, 00, PHY address of the LC}.
//   HOLD: the LC stays selected until one of Break Xpoint, Send message to
//         device, Test or Stop arrives.
//   Break Xpoint (next word PHY-a xx PHY-b): one-period lc_break strobe.
//   Send message (next word the message): serial transmission to the device.
//   Test (next word PHY-a xx PHY-b): both LCs are put in test state and the
//         test pattern is sent through the crosspoint in both directions at
//         once; 'Test OK' or 'Test failed' is reported.
//   From IDLE only: Connection to device a (next words PHY-a, message) and
//         New Priority Mask (next three words: mask bits 11-0, 23-12, 31-24).
//   Stop always returns to IDLE. The selected LC is released on every return
//   to IDLE. A command not allowed in the present state raises the LCI
//   interrupt (int_n low, ICU line 6) until the next Stop.
// The commands, messages, codes, states and buffer behaviour follow the
// document. It leaves the LC signalling and the redundancy code undefined;
// this design's choices are: frames are bit-serial, one bit per rx/tx strobe,
// most significant bit first; a device frame is an 8-bit message code, a 5-bit
// address field and an even parity bit, and is also rejected when the code is
// not one of the five device messages; a message to a device is its 12-bit
// code and an even parity bit; the test pattern is TEST_PATTERN shifted out
// in 12 periods; Priority Mask bit high means the LC is masked; the mask is
// all zeros after reset; the don't-care bits of codes are sent as ones.
module mc_lci
  import mc_pkg::*;
#(
  parameter int unsigned N_LC         = 32,
  parameter int unsigned BUF_DEPTH    = 4,
  parameter int unsigned RETRIES      = 3,
  parameter logic [11:0] TEST_PATTERN = 12'hA5C
) (
  input  logic            clk,
  input  logic            rst_n,
  // internal bus
  input  cbus_t           cb,
  input  logic [DW-1:0]   wdata,
  output logic [DW-1:0]   rdata,
  output logic            sel,
  output logic            int_n,
  // line circuits
  input  logic [N_LC-1:0] lc_req,
  output logic [4:0]      lc_sel,
  output logic            lc_sel_valid,
  output logic            lc_ack,
  output logic            lc_retx,
  input  logic            lc_rx_bit,
  input  logic            lc_rx_stb,
  output logic            lc_tx_bit,
  output logic            lc_tx_stb,
  output logic            lc_break,
  output logic            lc_test,
  output logic [4:0]      pair_a,
  output logic [4:0]      pair_b,
  output logic            tst_out_ab,
  output logic            tst_out_ba,
  input  logic            tst_in_ab,
  input  logic            tst_in_ba,
  output logic [3:0]      state_dbg
);
  // CPU command codes
  localparam logic [11:0] C_BREAK = 12'hF80, C_SCAN = 12'h010, C_TEST = 12'h01F,
                          C_STOP  = 12'hF90, C_MASK = 12'hFD0, C_SEND = 12'h050,
                          C_CONN  = 12'h04F;
  // LCI message codes
  localparam logic [11:0] M_NOMSG = 12'hFFF, M_TOK = 12'hF6F, M_TFAIL = 12'hF0F,
                          M_CRAZY = 12'hFAF;

  typedef enum logic [3:0] {
    S_IDLE, S_SCAN, S_RX, S_PUSH2, S_HOLD, S_BRK_W, S_SEND_W, S_TX,
    S_TEST_W, S_TEST, S_CONN_W1, S_CONN_W2, S_MASK_W
  } state_e;
  state_e st;

  // ---------------- bus side ----------------
  logic          ib_empty, ob_empty;
  logic [DW-1:0] ib_head, ob_head, hold, ob_din, w2;
  logic          wr_low_q, rd_low_q, ib_push, ob_pop, ib_pop, ob_push;

  assign sel   = cb.pm && !cb.abus_valid_n && cb.abus[3:0] == PA_LCI;
  assign rdata = ob_empty ? M_NOMSG : ob_head;
  assign ib_push = wr_low_q && cb.dout_ck;   // end of a write strobe
  assign ob_pop  = rd_low_q && cb.din_ck;    // end of a poll

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wr_low_q <= 1'b0;
      rd_low_q <= 1'b0;
      hold     <= '0;
    end else begin
      wr_low_q <= sel && cb.wr && !cb.dout_ck;
      rd_low_q <= sel && !cb.wr && !cb.din_ck;
      if (sel && cb.wr && !cb.dout_ck) hold <= wdata;
    end

  mc_fifo #(.W(DW), .DEPTH(BUF_DEPTH)) u_ibuf (
    .clk, .rst_n, .clr(1'b0), .push(ib_push), .din(hold), .pop(ib_pop),
    .head(ib_head), .empty(ib_empty), .full());

  mc_fifo #(.W(DW), .DEPTH(BUF_DEPTH)) u_obuf (
    .clk, .rst_n, .clr(1'b0), .push(ob_push), .din(ob_din), .pop(ob_pop),
    .head(ob_head), .empty(ob_empty), .full());

  // ---------------- line side ----------------
  logic [N_LC-1:0] mask;
  logic [13:0]     rx_sh;
  logic [3:0]      bitn;
  logic [1:0]      tries;
  logic [1:0]      mwords;
  logic [12:0]     tx_sh;
  logic [11:0]     t_ab, t_ba, r_ab, r_ba;
  logic            found;
  logic [4:0]      found_i;
  logic [7:0]      rx_code;
  logic            code_ok;
  logic [13:0]     frame;

  always_comb begin
    found   = 1'b0;
    found_i = '0;
    for (int i = N_LC - 1; i >= 0; i--)
      if (lc_req[i] && !mask[i]) begin
        found   = 1'b1;
        found_i = 5'(i);
      end
  end

  assign frame   = {rx_sh[12:0], lc_rx_bit};
  assign rx_code = frame[13:6];
  assign code_ok = rx_code inside {8'hEE, 8'hED, 8'hEB, 8'hE7, 8'hE1};

  // a command word is available to the state machine
  logic     cmd_av;
  logic [11:0] cmd;
  assign cmd_av = !ib_empty;
  assign cmd    = ib_head;
  assign state_dbg = st;

  always_comb begin
    ib_pop = 1'b0;
    unique case (st)
      S_TX, S_TEST, S_PUSH2: ib_pop = 1'b0;
      default:               ib_pop = cmd_av;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st           <= S_IDLE;
      mask         <= '0;
      lc_sel       <= '0;
      lc_sel_valid <= 1'b0;
      lc_ack       <= 1'b0;
      lc_retx      <= 1'b0;
      lc_tx_bit    <= 1'b0;
      lc_tx_stb    <= 1'b0;
      lc_break     <= 1'b0;
      lc_test      <= 1'b0;
      pair_a       <= '0;
      pair_b       <= '0;
      tst_out_ab   <= 1'b0;
      tst_out_ba   <= 1'b0;
      int_n        <= 1'b1;
      rx_sh        <= '0;
      bitn         <= '0;
      tries        <= '0;
      mwords       <= '0;
      tx_sh        <= '0;
      t_ab         <= '0;
      t_ba         <= '0;
      r_ab         <= '0;
      r_ba         <= '0;
      ob_push      <= 1'b0;
      ob_din       <= '0;
      w2           <= '0;
    end else begin
      lc_ack    <= 1'b0;
      lc_retx   <= 1'b0;
      lc_tx_stb <= 1'b0;
      lc_break  <= 1'b0;
      ob_push   <= 1'b0;

      // Stop forces IDLE from every state that takes commands.
      if (ib_pop && cmd == C_STOP && st inside {S_IDLE, S_SCAN, S_RX, S_HOLD}) begin
        st           <= S_IDLE;
        lc_sel_valid <= 1'b0;
        int_n        <= 1'b1;
      end else begin
        unique case (st)
          S_IDLE: if (cmd_av) begin
            unique case (cmd)
              C_SCAN:  st <= S_SCAN;
              C_CONN:  st <= S_CONN_W1;
              C_MASK:  begin st <= S_MASK_W; mwords <= '0; end
              default: int_n <= 1'b0;
            endcase
          end
          S_SCAN: begin
            if (cmd_av) int_n <= 1'b0;
            else if (found && ob_empty) begin
              lc_sel       <= found_i;
              lc_sel_valid <= 1'b1;
              lc_ack       <= 1'b1;
              bitn         <= '0;
              tries        <= '0;
              st           <= S_RX;
            end
          end
          S_RX: begin
            if (cmd_av) int_n <= 1'b0;
            if (lc_rx_stb) begin
              rx_sh <= frame;
              bitn  <= bitn + 4'd1;
              if (bitn == 4'd13) begin
                bitn <= '0;
                if (!(^frame) && code_ok) begin
                  ob_push <= 1'b1;
                  ob_din  <= {rx_code, 4'hF};
                  w2      <= {frame[5:1], 2'b00, lc_sel};
                  st      <= S_PUSH2;
                end else if (tries == 2'(RETRIES - 1)) begin
                  ob_push <= 1'b1;
                  ob_din  <= M_CRAZY;
                  w2      <= {7'b0, lc_sel};
                  st      <= S_PUSH2;
                end else begin
                  tries   <= tries + 2'd1;
                  lc_retx <= 1'b1;
                end
              end
            end
          end
          S_PUSH2: begin
            ob_push <= 1'b1;
            ob_din  <= w2;
            st      <= S_HOLD;
          end
          S_HOLD: if (cmd_av) begin
            unique case (cmd)
              C_BREAK: st <= S_BRK_W;
              C_SEND:  st <= S_SEND_W;
              C_TEST:  st <= S_TEST_W;
              default: int_n <= 1'b0;
            endcase
          end
          S_BRK_W: if (cmd_av) begin
            pair_a       <= cmd[11:7];
            pair_b       <= cmd[4:0];
            lc_break     <= 1'b1;
            lc_sel_valid <= 1'b0;
            st           <= S_IDLE;
          end
          S_SEND_W, S_CONN_W2: if (cmd_av) begin
            tx_sh <= {cmd, ^cmd};
            bitn  <= '0;
            st    <= S_TX;
          end
          S_TX: begin
            lc_tx_bit <= tx_sh[12];
            lc_tx_stb <= 1'b1;
            tx_sh     <= {tx_sh[11:0], 1'b0};
            bitn      <= bitn + 4'd1;
            if (bitn == 4'd12) begin
              lc_sel_valid <= 1'b0;
              st           <= S_IDLE;
            end
          end
          S_TEST_W: if (cmd_av) begin
            pair_a  <= cmd[11:7];
            pair_b  <= cmd[4:0];
            lc_test <= 1'b1;
            t_ab    <= TEST_PATTERN;
            t_ba    <= ~TEST_PATTERN;
            bitn    <= '0;
            st      <= S_TEST;
          end
          S_TEST: begin
            // bit n is driven in period n and read back in period n+1
            tst_out_ab <= t_ab[11];
            tst_out_ba <= t_ba[11];
            t_ab       <= {t_ab[10:0], 1'b0};
            t_ba       <= {t_ba[10:0], 1'b0};
            if (bitn != 4'd0) begin
              r_ab <= {r_ab[10:0], tst_in_ab};
              r_ba <= {r_ba[10:0], tst_in_ba};
            end
            bitn <= bitn + 4'd1;
            if (bitn == 4'd12) begin
              lc_test      <= 1'b0;
              ob_push      <= 1'b1;
              ob_din       <= ({r_ab[10:0], tst_in_ab} == TEST_PATTERN &&
                               {r_ba[10:0], tst_in_ba} == ~TEST_PATTERN)
                              ? M_TOK : M_TFAIL;
              lc_sel_valid <= 1'b0;
              st           <= S_IDLE;
            end
          end
          S_CONN_W1: if (cmd_av) begin
            lc_sel       <= cmd[4:0];
            lc_sel_valid <= 1'b1;
            st           <= S_CONN_W2;
          end
          S_MASK_W: if (cmd_av) begin
            unique case (mwords)
              2'd0: mask[11:0]  <= cmd;
              2'd1: mask[23:12] <= cmd;
              default: begin
                mask[N_LC-1:24] <= cmd[N_LC-25:0];
                st <= S_IDLE;
              end
            endcase
            mwords <= mwords + 2'd1;
          end
          default: st <= S_IDLE;
        endcase
      end
    end
endmodule
