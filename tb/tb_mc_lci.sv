// Testbench for mc_lci. The CPU side is modelled by bus write and poll
// tasks; the line circuits by request lines and a frame sender; the
// Switching Matrix crosspoint in test state by a one-clock loop from the
// test outputs to the test inputs. It runs every command of the command set
// and checks the words the CPU polls, the line-side strobes, the serial bit
// rate (one bit per clock on transmission, 13 clocks per message and per
// test), the retry limit, the Priority Mask and the illegal-command
// interrupt. Each mechanism is counted and must have happened.
`include "tb_check.svh"
module tb_mc_lci;
  import mc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  cbus_t cb;
  logic [11:0] wdata, rdata;
  logic sel, int_n;
  logic [31:0] lc_req = '0;
  logic [4:0] lc_sel, pair_a, pair_b;
  logic lc_sel_valid, lc_ack, lc_retx, lc_rx_bit = 0, lc_rx_stb = 0;
  logic lc_tx_bit, lc_tx_stb, lc_break, lc_test;
  logic tst_out_ab, tst_out_ba, tst_in_ab, tst_in_ba;
  logic [3:0] state_dbg;
  logic loop_ok = 1;
  mc_lci dut (.*);
  always #5 clk = ~clk;
  initial begin #400000; failures++; $display("watchdog"); `TB_DONE end

  // crosspoint model: a closed path, optionally broken in one direction
  assign tst_in_ab = tst_out_ab;
  assign tst_in_ba = loop_ok ? tst_out_ba : 1'b0;

  int n_ack = 0, n_retx = 0, n_break = 0, n_tx_bits = 0, n_test_clk = 0;
  logic [12:0] tx_got;
  always @(posedge clk) begin
    if (lc_ack) n_ack++;
    if (lc_retx) n_retx++;
    if (lc_break && rst_n) n_break++;
    if (lc_tx_stb) begin n_tx_bits++; tx_got = {tx_got[11:0], lc_tx_bit}; end
    if (lc_test) n_test_clk++;
  end

  task automatic bus_write(input logic [11:0] d);
    cb = '{abus: {7'b0, PA_LCI}, abus_valid_n: 0, dout_ck: 1, din_ck: 1, pm: 1, wr: 1};
    wdata = d; @(negedge clk);
    cb.dout_ck = 0; @(negedge clk);
    cb.dout_ck = 1; @(negedge clk);
    cb.abus_valid_n = 1; cb.wr = 0; @(negedge clk);
  endtask

  task automatic poll(output logic [11:0] d);
    cb = '{abus: {7'b0, PA_LCI}, abus_valid_n: 0, dout_ck: 1, din_ck: 1, pm: 1, wr: 0};
    @(negedge clk);
    cb.din_ck = 0; @(negedge clk);
    d = rdata;
    cb.din_ck = 1; @(negedge clk);
    cb.abus_valid_n = 1; @(negedge clk);
  endtask

  task automatic expect_poll(input logic [11:0] e, input string what);
    logic [11:0] d;
    poll(d);
    `CHECK(d == e, $sformatf("%s: polled %03x expected %03x", what, d, e))
  endtask

  // one device frame, bit-serial, MSB first, one strobe every other clock
  task automatic send_frame(input logic [7:0] code, input logic [4:0] addr,
                            input logic bad);
    logic [13:0] f;
    f = {code, addr, ^{code, addr} ^ bad};
    for (int i = 13; i >= 0; i--) begin
      lc_rx_bit = f[i]; lc_rx_stb = 1; @(negedge clk);
      lc_rx_stb = 0; @(negedge clk);
    end
  endtask

  task automatic wait_state(input logic [3:0] s, input int limit, input string what);
    int n = 0;
    while (state_dbg != s && n < limit) begin @(negedge clk); n++; end
    `CHECK(state_dbg == s, {what, ": state reached"})
  endtask

  task automatic scan_and_receive(input int exp_lc, input logic [7:0] code,
                                  input logic [4:0] addr);
    int a0;
    a0 = n_ack;
    bus_write(12'h010);
    repeat (3) @(negedge clk);
    `CHECK(lc_sel_valid && lc_sel == 5'(exp_lc),
           $sformatf("scan selects LC %0d (got %0d)", exp_lc, lc_sel))
    `CHECK(n_ack == a0 + 1, "selected LC acknowledged once")
    send_frame(code, addr, 0);
    repeat (3) @(negedge clk);
    expect_poll({code, 4'hF}, "message word");
    expect_poll({addr, 2'b00, 5'(exp_lc)}, "address word");
    expect_poll(12'hFFF, "buffer empty after the message");
    `CHECK(lc_sel_valid, "LC held after receiving")
  endtask

  initial begin
    logic [11:0] msg;
    int t0, r0;
    int m_scan, m_send, m_break, m_test_ok, m_test_fail;
    int m_mask, m_conn, m_crazy, m_illegal, m_stop, m_retx;
    m_scan = 0; m_send = 0; m_break = 0; m_test_ok = 0; m_test_fail = 0;
    m_mask = 0; m_conn = 0; m_crazy = 0; m_illegal = 0; m_stop = 0; m_retx = 0;
    cb = '{abus: 0, abus_valid_n: 1, dout_ck: 1, din_ck: 1, pm: 0, wr: 0};
    wdata = 0;
    #12 rst_n = 1;
    @(negedge clk);
    expect_poll(12'hFFF, "no message after reset");
    `CHECK(int_n, "no interrupt after reset")

    // scan, receive, send message to the device
    lc_req[4] = 1; lc_req[9] = 1;
    scan_and_receive(4, 8'hEE, 5'h13); m_scan++;
    msg = 12'h123; t0 = n_tx_bits;
    bus_write(12'h050); bus_write(msg);
    repeat (16) @(negedge clk);
    `CHECK(n_tx_bits - t0 == 13, $sformatf("13 bits sent (%0d)", n_tx_bits - t0))
    `CHECK(tx_got == {msg, ^msg}, "message and parity sent MSB first")
    `CHECK(!lc_sel_valid && state_dbg == 0, "idle after sending"); m_send++;

    // new priority mask: mask LC 4, so LC 9 is served
    bus_write(12'hFD0); bus_write(12'h010); bus_write(12'h000); bus_write(12'h000);
    repeat (3) @(negedge clk);
    `CHECK(state_dbg == 0, "mask loaded, back in IDLE"); m_mask++;

    // bad frames: retransmission, then LC a crazy
    bus_write(12'h010);
    repeat (3) @(negedge clk);
    `CHECK(lc_sel == 5'd9, "masked LC skipped"); 
    r0 = n_retx;
    send_frame(8'hED, 5'h01, 1); repeat (2) @(negedge clk);
    send_frame(8'h55, 5'h01, 0); repeat (2) @(negedge clk);   // not a device code
    `CHECK(n_retx - r0 == 2, "retransmission asked twice"); m_retx += n_retx - r0;
    send_frame(8'hED, 5'h01, 1); repeat (3) @(negedge clk);
    `CHECK(n_retx - r0 == 2, "no retransmission after the last try");
    expect_poll(12'hFAF, "LC a crazy");
    expect_poll(12'd9, "crazy LC address");
    m_crazy++;
    // break crosspoint from HOLD
    bus_write(12'hF80); bus_write({5'd9, 2'b11, 5'd20});
    repeat (3) @(negedge clk);
    `CHECK(n_break == 1 && pair_a == 5'd9 && pair_b == 5'd20,
           $sformatf("break crosspoint 9-20 (%0d strobes, %0d-%0d)", n_break, pair_a, pair_b))
    `CHECK(!lc_sel_valid && state_dbg == 0, "idle after break"); m_break++;

    // test the crosspoint, good and broken
    for (int k = 0; k < 2; k++) begin
      int c0;
      loop_ok = (k == 0);
      scan_and_receive(9, 8'hE7, 5'h1F); m_scan++;
      c0 = n_test_clk;
      bus_write(12'h01F); bus_write({5'd9, 2'b00, 5'd3});
      repeat (18) @(negedge clk);
      `CHECK(n_test_clk - c0 == 13, $sformatf("test takes 13 clocks (%0d)", n_test_clk - c0))
      `CHECK(pair_a == 5'd9 && pair_b == 5'd3, "test pair")
      if (k == 0) begin expect_poll(12'hF6F, "Test OK"); m_test_ok++; end
      else begin expect_poll(12'hF0F, "Test failed"); m_test_fail++; end
      `CHECK(state_dbg == 0, "idle after test")
    end
    loop_ok = 1;

    // connection to device a
    t0 = n_tx_bits;
    bus_write(12'h04F); bus_write(12'd7);
    repeat (2) @(negedge clk);
    `CHECK(lc_sel_valid && lc_sel == 5'd7, "connection selects LC 7")
    bus_write(12'hE1F);
    repeat (16) @(negedge clk);
    `CHECK(n_tx_bits - t0 == 13 && tx_got == {12'hE1F, ^12'hE1F}, "connection message sent")
    `CHECK(state_dbg == 0, "idle after connection"); m_conn++;

    // illegal command in IDLE, cleared by Stop
    bus_write(12'hF80);
    repeat (2) @(negedge clk);
    `CHECK(!int_n, "Break in IDLE raises the interrupt"); m_illegal++;
    bus_write(12'hF90);
    repeat (2) @(negedge clk);
    `CHECK(int_n && state_dbg == 0, "Stop clears it"); m_stop++;
    // illegal command while receiving, then Stop from HOLD
    bus_write(12'h010);
    repeat (3) @(negedge clk);
    bus_write(12'h050);
    repeat (2) @(negedge clk);
    `CHECK(!int_n, "command while receiving raises the interrupt"); m_illegal++;
    send_frame(8'hEB, 5'h02, 0);
    repeat (3) @(negedge clk);
    expect_poll(12'hEBF, "message after the violation");
    expect_poll({5'h02, 2'b00, 5'd9}, "its address");
    bus_write(12'hF90);
    repeat (2) @(negedge clk);
    `CHECK(int_n && state_dbg == 0 && !lc_sel_valid, "Stop from HOLD releases the LC"); m_stop++;
    // Stop while scanning with no request
    lc_req = '0;
    bus_write(12'h010); repeat (3) @(negedge clk);
    `CHECK(state_dbg == 1, "scan waits with no request");
    bus_write(12'hF90); repeat (2) @(negedge clk);
    `CHECK(state_dbg == 0, "Stop ends the scan"); m_stop++;

    // an LC is not served while earlier words wait in the outgoing buffer
    lc_req[9] = 1;
    bus_write(12'h010); repeat (3) @(negedge clk);
    send_frame(8'hE1, 5'h04, 0); repeat (3) @(negedge clk);
    bus_write(12'hF90); repeat (2) @(negedge clk);
    bus_write(12'h010); repeat (3) @(negedge clk);
    `CHECK(state_dbg == 1 && !lc_sel_valid, "scan waits until the buffer is polled")
    expect_poll(12'hE1F, "held message");
    expect_poll({5'h04, 2'b00, 5'd9}, "held address");
    repeat (3) @(negedge clk);
    `CHECK(lc_sel_valid && lc_sel == 5'd9, "served once the buffer is empty")
    bus_write(12'hF90); repeat (2) @(negedge clk);
    m_scan++;

    $display("mechanisms: scan %0d send %0d mask %0d retx %0d crazy %0d break %0d test_ok %0d test_fail %0d conn %0d illegal %0d stop %0d",
             m_scan, m_send, m_mask, m_retx, m_crazy, m_break, m_test_ok, m_test_fail,
             m_conn, m_illegal, m_stop);
    `CHECK(m_scan > 0 && m_send > 0 && m_mask > 0 && m_retx > 0 && m_crazy > 0 &&
           m_break > 0 && m_test_ok > 0 && m_test_fail > 0 && m_conn > 0 &&
           m_illegal > 0 && m_stop > 0, "every mechanism happened")
    `TB_DONE
  end
endmodule
