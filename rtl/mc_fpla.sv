// FPLA: C-BUS strobe generation and lock violation detection.
//
// Combinational logic from the clock phases (CK, A0), the pipeline fields
// and the lock/key approval:
//  * a bus operation takes place when A-ENABLE is active and exactly one of
//    D-ENABLE (write) and D-REG (read) is active;
//  * io_error (I/O VALID negated) is high when such an operation is not
//    approved by the lock; the operation's strobes are then inhibited;
//  * A-BUS VALID, D-OUT CK and D-IN CK follow the SHAPE and AUX product terms
//    of the document, which give the F0, S0, F1, S1 patterns selected by F,M:
//      SHAPE = CK.A0 + /F./M.CK + /A0.F.M + /CK./A0.F
//      AUX   = /M./A0 + F.M + CK
//    A-BUS VALID is low while the operation is valid and SHAPE is low;
//    D-OUT CK is low in a valid write while AUX is low; D-IN CK is low in a
//    valid read, in the D-register load from AC (A-ENABLE off, D-ENABLE and
//    D-REG on) or in an ICU read, while AUX is low;
//  * ICUW is low during CK high and ICUR low for the whole cycle when NEXT
//    ADDRESS = C with CCSEL /= 0 and D-ENABLE resp. D-REG active;
//  * L-LOAD is high during CK low when NEXT ADDRESS = E with CCSEL /= 0; the
//    lock register samples it at the end of the CK-high semicycle.
// The equations are the document's; the I/O VALID polarity follows its
// sentence that the error is flagged only if the operation is attempted.
// The positive-going edges that clock receivers are produced in the original
// by a 74S00 gate outside the FPLA; here receivers sample while the strobe
// is low, which ends at the same edge.
module mc_fpla
  import mc_pkg::*;
(
  input  logic       ck,
  input  logic       a0,
  input  uinst_t     ui,
  input  logic       approved,
  output logic       rd,
  output logic       wr,
  output logic       io_error,
  output logic       abus_valid_n,
  output logic       dout_ck,
  output logic       din_ck,
  output logic       icuw_n,
  output logic       icur_n,
  output logic       l_load_en
);
  logic io, shape, aux, icu_sel, swap;

  assign io       = !ui.aen_n && (ui.den_n != ui.dreg_n);
  assign wr       = io && !ui.den_n;
  assign rd       = io && !ui.dreg_n;
  assign io_error = io && !approved;

  assign shape = (ck && a0) || (!ui.f && !ui.m && ck) || (!a0 && ui.f && ui.m)
               || (!ck && !a0 && ui.f);
  assign aux   = (!ui.m && !a0) || (ui.f && ui.m) || ck;

  assign icu_sel = (ui.next_addr == NA_LDCT) && (ui.ccsel != 3'd0);
  assign icuw_n  = !(icu_sel && !ui.den_n && ck);
  assign icur_n  = !(icu_sel && !ui.dreg_n);
  assign swap    = ui.aen_n && !ui.den_n && !ui.dreg_n;

  assign abus_valid_n = !(io && approved && !shape);
  assign dout_ck      = !(wr && approved && !aux);
  assign din_ck       = !(((rd && approved) || swap || !icur_n) && !aux);

  assign l_load_en = (ui.next_addr == NA_CONT) && (ui.ccsel != 3'd0);
endmodule
