// Testbench for mc_fpla, driven by the real clock generator. For each bus
// pattern it counts, over one machine cycle, the oscillator periods in which
// A-BUS VALID and the data strobe are low, and checks them against the
// pattern's timing: F0 (fast, M=0) address 2 periods and strobe 1 at the end,
// S0 (slow, M=0) address 2, strobe 1, F1 (fast, M=1) address 1 and no strobe,
// S1 (slow, M=1) address 3 and strobe 2. One period is 150 ns, so the F1+S1
// strobe is 300 ns and the F0 cycle 300 ns long. It also checks that a
// refused operation raises I/O ERROR with no strobe, the ICU strobes, the
// D-register load from AC and the lock load enable.
`include "tb_check.svh"
module tb_mc_fpla;
  import mc_pkg::*;
  int checks = 0, failures = 0;
  logic osc = 0, fresh_n = 0;
  logic ck, a0, cyc_end, ph0_end;
  uinst_t ui;
  logic approved;
  logic rd, wr, io_error, abus_valid_n, dout_ck, din_ck, icuw_n, icur_n, l_load_en;
  mc_clock clkgen (.osc, .fresh_n, .fast(ui.f), .ck, .a0, .cyc_end, .ph0_end);
  mc_fpla dut (.*);
  always #75 osc = ~osc;
  initial begin #1000000; failures++; $display("watchdog"); `TB_DONE end

  int n_per, n_av, n_dout, n_din, n_icuw, n_icur, n_ll;
  // Run one machine cycle with the present microinstruction, counting the
  // oscillator periods (sampled mid-period) in which each strobe is low.
  task automatic run_cycle();
    logic last;
    n_per = 0; n_av = 0; n_dout = 0; n_din = 0; n_icuw = 0; n_icur = 0; n_ll = 0;
    do begin
      @(negedge osc);
      n_per++;
      if (!abus_valid_n) n_av++;
      if (!dout_ck) n_dout++;
      if (!din_ck) n_din++;
      if (!icuw_n) n_icuw++;
      if (!icur_n) n_icur++;
      if (l_load_en && !ck) n_ll++;
      // a bus strobe is always inside A-BUS VALID
      if ((wr && !dout_ck) || (rd && !din_ck))
        `CHECK(!abus_valid_n, "strobe inside A-BUS VALID")
      last = cyc_end;
    end while (!last);
  endtask

  task automatic set_io(input logic f, m, write, appr);
    ui = '0;
    ui.next_addr = NA_CONT;
    ui.f = f; ui.m = m;
    ui.aen_n = 0;
    ui.den_n = !write;
    ui.dreg_n = write;
    approved = appr;
  endtask

  task automatic pattern(input string name, input logic f, m, input int per,
                         input int av, input int strobe);
    for (int w = 0; w < 2; w++) begin
      set_io(f, m, w[0], 1);
      // align to the start of a machine cycle
      wait_cycle_start();
      #1;
      `CHECK(w[0] ? (wr && !rd) : (rd && !wr), {name, " direction"})
      `CHECK(!io_error, {name, " approved, no error"})
      run_cycle();
      `CHECK(n_per == per, $sformatf("%s cycle %0d periods", name, n_per))
      `CHECK(n_av == av, $sformatf("%s A-BUS VALID %0d periods", name, n_av))
      if (w[0]) begin
        `CHECK(n_dout == strobe, $sformatf("%s D-OUT CK %0d periods", name, n_dout))
        `CHECK(n_din == 0, {name, " no D-IN CK on write"})
      end else begin
        `CHECK(n_din == strobe, $sformatf("%s D-IN CK %0d periods", name, n_din))
        `CHECK(n_dout == 0, {name, " no D-OUT CK on read"})
      end
    end
  endtask

  task automatic wait_cycle_start();
    @(posedge osc iff cyc_end);
  endtask

  initial begin
    ui = '0; ui.aen_n = 1; ui.den_n = 1; ui.dreg_n = 1; ui.f = 1; approved = 1;
    #200 fresh_n = 1;
    pattern("F0", 1, 0, 2, 2, 1);
    pattern("S0", 0, 0, 3, 2, 1);
    pattern("F1", 1, 1, 2, 1, 0);
    pattern("S1", 0, 1, 3, 3, 2);
    // F0 strobe is the last period; S0 strobe is the first low period
    set_io(1, 0, 1, 1); wait_cycle_start(); @(negedge osc);
    `CHECK(ck && dout_ck && !abus_valid_n, "F0: address valid in CK high, no strobe yet")
    @(negedge osc); `CHECK(!ck && !dout_ck && !abus_valid_n, "F0: strobe in CK low")
    set_io(0, 0, 1, 1); wait_cycle_start(); @(negedge osc);
    `CHECK(ck && abus_valid_n, "S0: address not yet valid in CK high")
    @(negedge osc); `CHECK(!dout_ck && !abus_valid_n, "S0: strobe in first low period")
    @(negedge osc); `CHECK(dout_ck && !abus_valid_n, "S0: address held after the strobe")
    // refused operation: error, no strobes
    for (int w = 0; w < 2; w++) begin
      set_io(0, 1, w[0], 0); wait_cycle_start(); #1;
      `CHECK(io_error, "refused operation flags I/O ERROR")
      run_cycle();
      `CHECK(n_av == 0 && n_dout == 0 && n_din == 0, "refused operation has no strobes")
    end
    // no bus operation: no error even if not approved
    ui = '0; ui.next_addr = NA_CONT; ui.aen_n = 0; ui.den_n = 1; ui.dreg_n = 1; approved = 0;
    wait_cycle_start(); #1;
    `CHECK(!io_error && !rd && !wr, "no operation, no error")
    // D-register load from AC: A-ENABLE off, D-ENABLE and D-REG on
    ui.aen_n = 1; ui.den_n = 0; ui.dreg_n = 0; ui.f = 1; approved = 0;
    wait_cycle_start(); run_cycle();
    `CHECK(n_din == 1 && n_av == 0 && n_dout == 0, "AC to D-register: D-IN CK only")
    // ICU write (S0) and read (F0)
    ui = '0; ui.next_addr = NA_LDCT; ui.ccsel = 3'd1; ui.aen_n = 1; ui.den_n = 0;
    ui.dreg_n = 1; ui.f = 0;
    wait_cycle_start(); run_cycle();
    `CHECK(n_icuw == 1 && n_icur == 0 && n_av == 0, "ICU write strobe in CK high")
    ui.den_n = 1; ui.dreg_n = 0; ui.f = 1;
    wait_cycle_start(); run_cycle();
    `CHECK(n_icur == 2 && n_din == 1 && n_icuw == 0, "ICU read whole cycle, D-IN CK")
    ui.ccsel = 3'd0;
    wait_cycle_start(); #1;
    `CHECK(icur_n && icuw_n, "plain LDCT is not an ICU access")
    // lock load
    ui = '0; ui.next_addr = NA_CONT; ui.ccsel = 3'd3; ui.aen_n = 1; ui.den_n = 1;
    ui.dreg_n = 1; ui.f = 1;
    wait_cycle_start(); #1; `CHECK(l_load_en, "L-LOAD with CONTINUE, CCSEL /= 0")
    ui.ccsel = 3'd0; #1; `CHECK(!l_load_en, "no L-LOAD with CCSEL 0")
    `TB_DONE
  end
endmodule
