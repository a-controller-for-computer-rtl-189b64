// End-to-end testbench for mc_cpu at its default parameters.
//
// The testbench loads a microprogram and two mapping PROM entries through the
// programming ports while the oscillator-driven CPU is held in power-on
// reset, then lets it run. It plays the parts that sit outside the CPU
// board: a behavioural stand-in for the 3002 array (a MAR and an AC register
// loaded at the end of a machine cycle from a constant table or from the
// D-register, as chosen by this program's use of the FUNCTION field; CO is
// high when AC is all ones), one line circuit that sends a device frame
// once it is acknowledged, a Switching Matrix and one interrupt line. The
// program exercises lock loads and a lock violation, fast and slow memory
// writes and reads, a network map write and read, JUMP MAP into both halves
// of the store, a vector jump, a counter loop, a call and return, an LCI
// scan and poll loop (which also retriggers the watch dog timer), an SMI
// crosspoint make, an ICU poll with INTREQ test and level read, and a wait
// for ACK from a slow peripheral (the Console) before reading it. Every
// mechanism is counted; one that never happens is a failure. The length of
// every machine cycle is checked against its F bit (2 or 3 oscillator
// periods of 150 ns).
`include "tb_check.svh"
module tb_mc_cpu;
  import mc_pkg::*;
  int checks = 0, failures = 0;

  logic osc = 0, fresh_n = 1, reset_n = 1;
  uinst_t uinst;
  logic [11:0] alu_m, alu_a_n, alu_d;
  logic [5:0] alu_co_slice;
  logic ustore_we = 0, map_we = 0;
  logic [8:0] ustore_addr = 0;
  uinst_t ustore_data;
  logic [7:0] map_addr = 0, map_data = 0;
  cbus_t cbus;
  logic [11:0] dbus, cons_rdata;
  logic cons_sel, ack_n, cons_int_n = 1;
  logic [4:0] ext_int_n = 5'b11011;          // level 2 requests throughout
  logic [31:0] lc_req = 32'h0000_0040;       // LC 6 has a message
  logic [4:0] lc_sel, lc_pair_a, lc_pair_b, sm_phy_a, sm_phy_b;
  logic lc_sel_valid, lc_ack, lc_retx, lc_rx_bit = 0, lc_rx_stb = 0;
  logic lc_tx_bit, lc_tx_stb, lc_break, lc_test, tst_out_ab, tst_out_ba;
  logic tst_in_ab, tst_in_ba;
  logic sm_present = 1, sm_make;
  logic lal_n, ck, cyc_end, io_error, wdt_n, intreq_n;
  logic [8:0] ua;
  logic [2:0] lock;

  mc_cpu dut (.*);

  assign tst_in_ab = tst_out_ab;
  assign tst_in_ba = tst_out_ba;

  always #75 osc = ~osc;
  initial begin #2000000; failures++; $display("watchdog"); `TB_DONE end

  // ---------------- 3002 array stand-in ----------------
  localparam logic [1:0] FN_NONE = 2'd0, FN_MAR = 2'd1, FN_AC = 2'd2, FN_ACM = 2'd3;
  logic [11:0] K [32];
  logic [11:0] mar = 0, ac = 0;
  assign alu_a_n      = ~mar;
  assign alu_d        = ac;
  assign alu_co_slice = {6{ac == 12'hFFF}};
  always @(posedge osc)
    if (cyc_end && lal_n)
      unique case (uinst.func[6:5])
        FN_MAR:  mar <= K[uinst.func[4:0]];
        FN_AC:   ac  <= K[uinst.func[4:0]];
        FN_ACM:  ac  <= alu_m;
        default: ;
      endcase

  // ---------------- microprogram building ----------------
  function automatic uinst_t w(input next_addr_e na, input logic [7:0] pl = 8'h00,
                               input logic [2:0] cs = 3'd0,
                               input logic [1:0] fn = FN_NONE, input int k = 0);
    uinst_t u;
    u = '0;
    u.next_addr = na; u.pl_addr = pl; u.ccsel = cs;
    u.f = 1; u.m = 0;
    u.aen_n = 1; u.den_n = 1; u.dreg_n = 1;
    u.func = {fn, 5'(k)};
    u.mask_n = '1;
    return u;
  endfunction
  // bus operation on a word: kind "R" read, "W" write; pattern F0/S0/F1/S1;
  // region "mem", "nmapP" (PHY half), "nmapL" (LOG half) or "per"
  function automatic uinst_t bus(input uinst_t u, input string kind,
                                 input string pat, input string region);
    u.aen_n = 0;
    if (kind == "W") u.den_n = 0; else u.dreg_n = 0;
    u.f = (pat[0] == "F");
    u.m = (pat[1] == "1");
    u.map = (region != "mem");
    u.lp  = (region == "nmapL");
    u.pm  = (region == "per");
    return u;
  endfunction

  uinst_t prog [512];
  task automatic put(input logic [8:0] a, input uinst_t u);
    prog[a] = u;
  endtask

  initial begin
    uinst_t u;
    for (int i = 0; i < 512; i++) prog[i] = w(NA_CJP, 8'hA0, 3'd4);  // stray: trap
    K[0] = 12'h123; K[1] = 12'hABC; K[2] = 12'h000; K[3] = 12'h500;
    K[4] = 12'h5A3; K[5] = 12'h000; K[6] = 12'h010; K[7] = 12'h001;
    K[8] = {5'd3, 2'b00, 5'd17}; K[9] = 12'h005; K[10] = 12'h3C7; K[11] = 12'hC52;
    K[12] = 12'h00F;
    for (int i = 13; i < 32; i++) K[i] = '0;

    put(9'h000, w(NA_CONT, 0, 3'd5));                       // lock 5
    put(9'h001, w(NA_CONT, 0, 0, FN_MAR, 0));               // MAR = 123
    put(9'h002, w(NA_CONT, 0, 0, FN_AC, 1));                // AC  = ABC
    put(9'h003, bus(w(NA_CONT), "W", "F0", "mem"));         // fast write
    put(9'h004, w(NA_CONT, 0, 0, FN_AC, 2));                // AC = 0
    put(9'h005, bus(w(NA_CONT), "R", "F0", "mem"));         // fast read
    put(9'h006, w(NA_CONT, 0, 0, FN_ACM));                  // AC = D-reg
    put(9'h007, w(NA_CONT, 0, 0, FN_MAR, 3));               // MAR = 500
    put(9'h008, bus(w(NA_CONT), "W", "F1", "mem"));         // slow write
    put(9'h009, bus(w(NA_CONT), "W", "S1", "mem"));
    put(9'h00A, w(NA_CONT, 0, 0, FN_AC, 2));
    put(9'h00B, bus(w(NA_CONT), "R", "F1", "mem"));         // slow read
    put(9'h00C, bus(w(NA_CONT), "R", "S1", "mem"));
    put(9'h00D, w(NA_CONT, 0, 0, FN_ACM));
    put(9'h00E, w(NA_CONT, 0, 0, FN_AC, 4));                // AC = 5A3
    u = w(NA_CONT); u.den_n = 0; u.dreg_n = 0;              // AC -> D-reg
    put(9'h00F, u);
    put(9'h010, w(NA_JMAP));                                // -> 040
    put(9'h040, w(NA_CJV, 0, 3'd4));                        // vector jump
    put(9'h0F8, w(NA_CJP, 8'h50, 3'd4));
    put(9'h0F9, w(NA_CJP, 8'h50, 3'd4));
    put(9'h050, w(NA_LDCT, 8'h03));                         // counter = 3
    put(9'h051, w(NA_CONT));                                // loop body
    put(9'h052, w(NA_RPCT, 8'h51, 3'd6));                   // until EV.CNT
    put(9'h053, w(NA_CONT, 0, 0, FN_MAR, 5));               // MAR = LCI
    put(9'h054, w(NA_CONT, 0, 0, FN_AC, 6));                // AC = Scan
    put(9'h055, bus(w(NA_CONT), "W", "F0", "per"));
    put(9'h056, bus(w(NA_CONT), "R", "F0", "per"));         // poll
    put(9'h057, w(NA_CONT, 0, 0, FN_ACM));
    put(9'h058, w(NA_CJP, 8'h56, 3'd1));                    // No message: again
    put(9'h059, bus(w(NA_CONT), "R", "F0", "per"));         // address word
    put(9'h05A, w(NA_CONT, 0, 0, FN_ACM));
    put(9'h05B, w(NA_CJP, 8'h5D, 3'd2));                    // WDT running
    put(9'h05C, w(NA_CJP, 8'hA0, 3'd4));
    put(9'h05D, w(NA_CONT, 0, 0, FN_MAR, 7));               // MAR = SMI
    put(9'h05E, w(NA_CONT, 0, 0, FN_AC, 8));                // 3 - 17
    put(9'h05F, bus(w(NA_CONT), "W", "F0", "per"));         // make
    put(9'h060, w(NA_CONT, 0, 0, FN_AC, 2));                // status word
    u = w(NA_LDCT, 0, 3'd1); u.den_n = 0; u.f = 0;          // ICU write, S0
    put(9'h061, u);
    put(9'h062, w(NA_CJP, 8'hA0, 3'd7));                    // no INTREQ: trap
    u = w(NA_LDCT, 0, 3'd1); u.dreg_n = 0;                  // ICU read, F0
    put(9'h063, u);
    put(9'h064, w(NA_CONT, 0, 0, FN_ACM));
    put(9'h065, w(NA_CONT, 0, 0, FN_MAR, 9));               // map entry 5
    put(9'h066, w(NA_CONT, 0, 0, FN_AC, 10));
    put(9'h067, bus(w(NA_CONT), "W", "F0", "nmapL"));       // LOG entry 37
    put(9'h068, w(NA_CONT, 0, 0, FN_AC, 2));
    put(9'h069, bus(w(NA_CONT), "R", "F0", "nmapL"));
    put(9'h06A, w(NA_CONT, 0, 0, FN_ACM));
    put(9'h06B, w(NA_CONT, 0, 3'd2));                       // lock 2
    put(9'h06C, bus(w(NA_CONT), "W", "F0", "mem"));         // refused
    put(9'h06D, w(NA_CJP, 8'hA0, 3'd4));
    put(9'h0FF, w(NA_CJP, 8'h70, 3'd4));                    // error routine
    put(9'h070, w(NA_CONT, 0, 3'd5));                       // lock 5 again
    put(9'h071, w(NA_CJS, 8'h80, 3'd4));                    // call
    put(9'h080, w(NA_CRTN, 0, 3'd4));                       // return
    put(9'h072, w(NA_CONT, 0, 0, FN_AC, 11));               // AC = C52
    u = w(NA_CONT); u.den_n = 0; u.dreg_n = 0;
    put(9'h073, u);
    put(9'h074, w(NA_JMAP));                                // -> 110
    put(9'h110, w(NA_CONT));
    put(9'h111, w(NA_CJP, 8'hB0, 3'd4));                    // -> 1B0
    put(9'h1B0, w(NA_CONT, 0, 0, FN_MAR, 12));              // MAR = Console
    put(9'h1B1, w(NA_CJP, 8'hB1, 3'd3));                    // wait for ACK
    put(9'h1B2, bus(w(NA_CONT), "R", "F0", "per"));         // Console read
    put(9'h1B3, w(NA_CONT, 0, 0, FN_ACM));
    put(9'h1B4, w(NA_CJP, 8'hB4, 3'd4));                    // end: stay
  end

  // ---------------- line circuit 6 ----------------
  int n_frames = 0;
  initial begin
    logic [13:0] f;
    f = {8'hEB, 5'h0A, ^{8'hEB, 5'h0A}};
    @(posedge osc iff lc_ack);
    repeat (5) @(negedge osc);
    for (int i = 13; i >= 0; i--) begin
      lc_rx_bit = f[i]; lc_rx_stb = 1; @(negedge osc);
      lc_rx_stb = 0; @(negedge osc);
    end
    n_frames++;
  end

  // ---------------- Console: slow peripheral answering with ACK ----------------
  int ack_wait = 0;
  always @(posedge osc) begin
    if (!lal_n) ack_wait <= 0;
    else if (cyc_end && pa == 9'h1B1) ack_wait <= ack_wait + 1;
  end
  assign ack_n = !(ack_wait >= 5);
  always_comb cons_rdata = cons_sel ? 12'h6D2 : 12'h000;

  // ---------------- observation ----------------
  logic [8:0] pa;               // address of the word in the pipeline
  int per = 0;
  int n_cycles = 0, n_fast = 0, n_slow = 0;
  int m_lock = 0, m_memw_f = 0, m_memw_s = 0, m_memr_f = 0, m_memr_s = 0;
  int m_jmap_lo = 0, m_jmap_hi = 0, m_vect = 0, m_loop = 0, m_poll = 0, m_nomsg = 0;
  int m_wdt = 0, m_make = 0, m_intreq = 0, m_icur = 0, m_nmap = 0, m_ioerr = 0;
  int m_call = 0, m_trap = 0;
  logic wdt_prev = 0;
  logic [2:0] lock_prev = 0;

  always @(posedge osc) begin
    if (lal_n) begin
      per++;
      if (cyc_end) begin
        n_cycles++;
        if (uinst.f) n_fast++; else n_slow++;
        `CHECK(per == (uinst.f ? 2 : 3),
               $sformatf("cycle of word %03x: %0d periods, F=%0d", pa, per, uinst.f))
        per = 0;
        pa <= ua;
        if (ua == 9'h051) m_loop++;
        if (ua == 9'h0A0) m_trap++;
        if (pa == 9'h010 && ua == 9'h040) m_jmap_lo++;
        if (pa == 9'h074 && ua == 9'h110) m_jmap_hi++;
        if (pa == 9'h040 && ua[7:1] == 7'b1111_100) m_vect++;
        if (pa == 9'h06C && ua == 9'h0FF) m_ioerr++;
        if (pa == 9'h080 && ua == 9'h072) m_call++;
        if (pa == 9'h062 && ua == 9'h063) m_intreq++;
        if (pa == 9'h056 && alu_m == 12'hFFF) m_nomsg++;
      end
      if (!cbus.dout_ck && !cbus.pm && !cbus.abus_valid_n && !uinst.map && uinst.f) m_memw_f++;
      if (!cbus.dout_ck && !cbus.pm && !cbus.abus_valid_n && !uinst.map && !uinst.f) m_memw_s++;
      if (!cbus.din_ck && !cbus.pm && !cbus.abus_valid_n && !uinst.map && uinst.f) m_memr_f++;
      if (!cbus.din_ck && !cbus.pm && !cbus.abus_valid_n && !uinst.map && !uinst.f) m_memr_s++;
      if (!cbus.abus_valid_n && uinst.map && !uinst.pm) m_nmap++;
      if (!cbus.din_ck && cbus.pm && !cbus.abus_valid_n && cbus.abus[3:0] == 4'h0) m_poll++;
      if (sm_make) m_make++;
      if (uinst.next_addr == NA_LDCT && uinst.ccsel != 0 && !uinst.dreg_n && !cbus.din_ck) m_icur++;
      if (wdt_n && !wdt_prev) m_wdt++;
      if (lock != lock_prev) m_lock++;
    end
    wdt_prev  <= wdt_n;
    lock_prev <= lock;
  end

  // check AC contents while given words are in the pipeline
  always @(posedge osc) if (lal_n && cyc_end) begin
    if (pa == 9'h007) `CHECK(ac == 12'hABC, $sformatf("fast memory read back %03x", ac))
    if (pa == 9'h00E) `CHECK(ac == 12'hABC, $sformatf("slow memory read back %03x", ac))
    if (pa == 9'h05B) `CHECK(ac == {5'h0A, 2'b00, 5'd6}, $sformatf("LCI address word %03x", ac))
    if (pa == 9'h065) `CHECK(ac == 12'd2, $sformatf("ICU level read %03x", ac))
    if (pa == 9'h06B) `CHECK(ac == 12'h3C7, $sformatf("network map read back %03x", ac))
    if (pa == 9'h06C) `CHECK(io_error, "refused memory write flags I/O ERROR")
  end
  // the message word is the last one polled before the address word
  always @(posedge osc) if (lal_n && cyc_end && pa == 9'h058 && !(&ac))
    `CHECK(ac == 12'hEBF, $sformatf("LCI message word %03x", ac))
  always @(posedge osc) if (sm_make)
    `CHECK(sm_phy_a == 5'd3 && sm_phy_b == 5'd17, "SMI make 3-17")

  initial begin
    // load the stores while the machine is held in power-on reset
    #1 fresh_n = 0;
    @(negedge osc);
    for (int i = 0; i < 512; i++) begin
      ustore_we = 1; ustore_addr = 9'(i); ustore_data = prog[i]; @(negedge osc);
    end
    ustore_we = 0;
    map_we = 1; map_addr = 8'h5A; map_data = 8'h40; @(negedge osc);
    map_addr = 8'hC5; map_data = 8'h10; @(negedge osc);
    map_we = 0;
    repeat (3) @(negedge osc);
    `CHECK(!lal_n, "LAL held low at power-on")
    fresh_n = 1;
    wait (pa == 9'h1B4 || pa == 9'h0A0 || n_cycles > 3000);
    repeat (6) @(posedge osc);
    `CHECK(ua == 9'h1B4, $sformatf("program reached its end (ua %03x)", ua))
    `CHECK(ac == 12'h6D2, $sformatf("Console word read after ACK (%03x)", ac))
    `CHECK(ack_wait >= 5, $sformatf("waited %0d cycles for ACK", ack_wait))
    `CHECK(lock == 3'd5, "lock restored")
    $display("ACK wait loop %0d cycles", ack_wait);
    $display("cycles %0d (fast %0d slow %0d)", n_cycles, n_fast, n_slow);
    $display("mechanisms: lock %0d memw_f %0d memw_s %0d memr_f %0d memr_s %0d jmap_lo %0d jmap_hi %0d vect %0d loop %0d",
             m_lock, m_memw_f, m_memw_s, m_memr_f, m_memr_s, m_jmap_lo, m_jmap_hi, m_vect, m_loop);
    $display("mechanisms: poll %0d nomsg %0d frames %0d wdt %0d make %0d intreq %0d icur %0d nmap %0d ioerr %0d call %0d trap %0d",
             m_poll, m_nomsg, n_frames, m_wdt, m_make, m_intreq, m_icur, m_nmap, m_ioerr, m_call, m_trap);
    `CHECK(m_lock >= 3, "lock loads")
    `CHECK(m_memw_f > 0 && m_memw_s > 0, "fast and slow memory writes")
    `CHECK(m_memr_f > 0 && m_memr_s > 0, "fast and slow memory reads")
    `CHECK(m_jmap_lo == 1 && m_jmap_hi == 1, "JUMP MAP into both halves")
    `CHECK(m_vect == 1, "vector jump")
    `CHECK(m_loop == 4, $sformatf("counter loop ran count+1 = 4 times (%0d)", m_loop))
    `CHECK(m_poll >= 3 && m_nomsg >= 1 && n_frames == 1, "LCI scan, poll, message")
    `CHECK(m_wdt >= 1, "watch dog timer retriggered")
    `CHECK(m_make == 1, "SMI make")
    `CHECK(m_intreq == 1 && m_icur > 0, "ICU poll and level read")
    `CHECK(m_nmap > 0, "network map access")
    `CHECK(m_ioerr == 1, "lock violation forced jump to FF")
    `CHECK(m_call == 1, "call and return")
    `CHECK(m_trap == 0, "no trap taken")
    `TB_DONE
  end
endmodule
