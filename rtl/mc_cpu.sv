// Matrix controller CPU: top level.
//
// The dedicated processor of the controller of one half (command or data) of
// a computer-internal communication network. A 36-bit microinstruction in the
// pipeline steers a 12-bit bit-slice arithmetic array (six Intel 3002 slices,
// outside this design, reached through the alu_* ports), an Am2910-style
// sequencer, and the internal bus that links the CPU to its 2K x 12 memory
// and to the peripherals: LCI (line circuit interface, address 0), SMI
// (switching matrix interface, 1) and Console (F, outside this design). The
// FPLA turns the microinstruction and the lock into the bus strobes and
// flags lock violations, which force the sequencer to xFF. The interrupt
// control unit is polled by the microprogram; the watch dog timer watches the
// LCI polling interval.
//
// Timing: one oscillator input (150 ns nominal). A machine cycle is 2
// oscillator periods (F = 1, fast) or 3 (F = 0, slow); all CPU state moves at
// the end of a cycle. All buses are in positive logic. The 3002 array is
// expected to return its A outputs inverted (alu_a_n) and its D outputs
// (alu_d) and the per-slice zero-test results (alu_co_slice) true; the CPU
// ANDs the six slice results into CO.
module mc_cpu
  import mc_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 2048,
  parameter int unsigned WDT_TICKS = 500,
  parameter int unsigned N_LC      = 32
) (
  input  logic            osc,
  input  logic            fresh_n,
  input  logic            reset_n,
  // 3002 array
  output uinst_t          uinst,
  output logic [DW-1:0]   alu_m,
  input  logic [DW-1:0]   alu_a_n,
  input  logic [DW-1:0]   alu_d,
  input  logic [5:0]      alu_co_slice,
  // programming of microprogram store and mapping PROM
  input  logic            ustore_we,
  input  logic [UAW-1:0]  ustore_addr,
  input  uinst_t          ustore_data,
  input  logic            map_we,
  input  logic [7:0]      map_addr,
  input  logic [7:0]      map_data,
  // Console and other bus users
  output cbus_t           cbus,
  output logic [DW-1:0]   dbus,
  input  logic [DW-1:0]   cons_rdata,
  output logic            cons_sel,
  input  logic            ack_n,
  input  logic            cons_int_n,
  input  logic [4:0]      ext_int_n,
  // line circuits (through the LCI)
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
  output logic [4:0]      lc_pair_a,
  output logic [4:0]      lc_pair_b,
  output logic            tst_out_ab,
  output logic            tst_out_ba,
  input  logic            tst_in_ab,
  input  logic            tst_in_ba,
  // switching matrix (through the SMI)
  input  logic            sm_present,
  output logic            sm_make,
  output logic [4:0]      sm_phy_a,
  output logic [4:0]      sm_phy_b,
  // panel / observation
  output logic            lal_n,
  output logic            ck,
  output logic            cyc_end,
  output logic [UAW-1:0]  ua,
  output logic [2:0]      lock,
  output logic            io_error,
  output logic            wdt_n,
  output logic            intreq_n
);
  uinst_t        ustore_q;
  logic          a0, ph0_end, cc, ev_zero, map_en_n, pl_en_n;
  logic [7:0]    map_q, vect;
  logic [DW-1:0] dreg;
  logic          rd, wr, approved, abus_valid_n, dout_ck, din_ck;
  logic          icuw_n, icur_n, l_load_en;
  logic [AW-1:0] abus;
  logic [DW-1:0] mem_rd, lci_rd, smi_rd, icu_rd;
  logic          mem_sel, lci_sel, smi_sel;
  logic          lci_int_n, smi_int_n, co;

  mc_clock u_clock (.osc, .fresh_n, .fast(uinst.f), .ck, .a0, .cyc_end, .ph0_end);

  mc_por u_por (.clk(osc), .cyc_end, .fresh_n, .reset_n, .lal_n);

  mc_ustore u_ustore (.clk(osc), .prog_we(ustore_we), .prog_addr(ustore_addr),
                      .prog_data(ustore_data), .ua, .q(ustore_q));

  mc_pipeline u_pipe (.clk(osc), .rst_n(lal_n), .cyc_end, .d(ustore_q), .q(uinst));

  mc_map_prom u_map (.clk(osc), .prog_we(map_we), .prog_addr(map_addr),
                     .prog_data(map_data), .opcode(dreg[11:4]), .start_addr(map_q));

  mc_vector u_vect (.reg_code(dreg[3:0]), .ev_zero, .vect);

  mc_useq u_seq (.clk(osc), .rst_n(lal_n), .cyc_end, .next_addr(uinst.next_addr),
                 .cc, .io_error, .pl_addr(uinst.pl_addr), .map_addr(map_q),
                 .map_msb(dreg[11] & dreg[10]), .vect_addr(vect), .ua, .ev_zero,
                 .map_en_n, .pl_en_n);

  assign co = &alu_co_slice;

  mc_cond_sel u_cond (.clk(osc), .rst_n(lal_n), .ph0_end, .ccsel(uinst.ccsel),
                      .io_error, .co, .wdt_n, .ack_n, .ev_zero, .intreq_n, .cc);

  mc_lock_key u_lock (.clk(osc), .rst_n(lal_n), .l_load(l_load_en && ph0_end),
                      .ccsel(uinst.ccsel), .map(uinst.map), .pm(uinst.pm),
                      .rd, .wr, .lock, .approved);

  mc_fpla u_fpla (.ck, .a0, .ui(uinst), .approved, .rd, .wr, .io_error,
                  .abus_valid_n, .dout_ck, .din_ck, .icuw_n, .icur_n, .l_load_en);

  mc_addr_logic u_addr (.a_n(alu_a_n[AW-1:0]), .map(uinst.map), .lp(uinst.lp), .abus);

  assign cbus = '{abus: abus, abus_valid_n: abus_valid_n, dout_ck: dout_ck,
                  din_ck: din_ck, pm: uinst.pm, wr: wr};

  // D-BUS: the 3002 array drives it when D-ENABLE is active, otherwise the
  // addressed unit does during a read.
  assign cons_sel = cbus.pm && !abus_valid_n && abus[3:0] == PA_CONS;
  always_comb begin
    if (!uinst.den_n)        dbus = alu_d;
    else if (!icur_n)        dbus = icu_rd;
    else if (rd && mem_sel)  dbus = mem_rd;
    else if (rd && lci_sel)  dbus = lci_rd;
    else if (rd && smi_sel)  dbus = smi_rd;
    else if (rd && cons_sel) dbus = cons_rdata;
    else                     dbus = '0;
  end

  mc_dreg u_dreg (.clk(osc), .rst_n(lal_n), .din_ck, .dbus, .q(dreg));
  assign alu_m = dreg;

  mc_memory #(.WORDS(MEM_WORDS)) u_mem (.clk(osc), .cb(cbus), .wdata(dbus),
                                        .rdata(mem_rd), .sel(mem_sel));

  mc_icu u_icu (.clk(osc), .rst_n(lal_n), .ph0_end, .cyc_end, .icuw_n, .dbus,
                .int_n({cons_int_n, lci_int_n, smi_int_n, ext_int_n}),
                .intreq_n, .level_rd(icu_rd));

  mc_wdt #(.TICKS(WDT_TICKS)) u_wdt (.clk(osc), .rst_n(lal_n), .abus,
                                     .abus_valid_n, .pm(uinst.pm), .wdt_n);

  mc_lci #(.N_LC(N_LC)) u_lci (
    .clk(osc), .rst_n(lal_n), .cb(cbus), .wdata(dbus), .rdata(lci_rd),
    .sel(lci_sel), .int_n(lci_int_n), .lc_req, .lc_sel, .lc_sel_valid, .lc_ack,
    .lc_retx, .lc_rx_bit, .lc_rx_stb, .lc_tx_bit, .lc_tx_stb, .lc_break,
    .lc_test, .pair_a(lc_pair_a), .pair_b(lc_pair_b), .tst_out_ab, .tst_out_ba,
    .tst_in_ab, .tst_in_ba, .state_dbg());

  mc_smi u_smi (.clk(osc), .rst_n(lal_n), .cb(cbus), .wdata(dbus),
                .rdata(smi_rd), .sel(smi_sel), .sm_present, .make_stb(sm_make),
                .phy_a(sm_phy_a), .phy_b(sm_phy_b), .int_n(smi_int_n));
endmodule
