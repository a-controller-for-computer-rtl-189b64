// Shared types and constants of the matrix-controller CPU.
//
// The microinstruction is 36 bits wide; the field order and bit positions
// follow the documented microinstruction layout (MASK in bits 0-4 up to
// PL ADDRESS in bits 28-35). Fields whose name carries "_n" are active low,
// as in the original field list. The sequencer instruction codes are those
// of the Am2910 as emulated by the controller PROM, and the peripheral
// addresses (LCI 0, SMI 1, Console F) are the documented fixed ones. The
// PHY-to-LOG map word (PARTNER 11-7, /ON 6, FREE 5, LOG 4-0) is the
// documented layout; the LOG-to-PHY word has the documented fields, placed
// in the same pattern by this design.
// All buses are carried in positive logic here: the inverted electrical
// levels of the original D-BUS are a board convention not reproduced.
package mc_pkg;

  localparam int DW  = 12;   // data / instruction word
  localparam int AW  = 11;   // A-BUS address lines
  localparam int UAW = 9;    // microprogram address

  typedef struct packed {
    logic [7:0] pl_addr;     // 35..28 branch address / counter value
    logic [3:0] next_addr;   // 27..24 sequencer instruction
    logic       f;           // 23     1 = fast cycle
    logic       m;           // 22     bus pattern select
    logic       map;         // 21     network map / LCI / SMI addressing
    logic       lp;          // 20     1 = LOG half of network map
    logic       pm;          // 19     1 = peripheral, 0 = memory
    logic       dreg_n;      // 18     load D-register from D-BUS
    logic       aen_n;       // 17     enable 3002 A outputs
    logic       den_n;       // 16     enable 3002 D outputs onto D-BUS
    logic [2:0] ccsel;       // 15..13 condition select / lock / ICU
    logic       ci_n;        // 12     carry in
    logic [6:0] func;        // 11..5  3002 function
    logic [4:0] mask_n;      // 4..0   K inputs
  } uinst_t;

  // Sequencer instructions (NEXT ADDRESS field).
  typedef enum logic [3:0] {
    NA_JZ      = 4'h0, NA_CJS   = 4'h1, NA_JMAP  = 4'h2, NA_CJP   = 4'h3,
    NA_PUSH    = 4'h4, NA_JSRP  = 4'h5, NA_CJV   = 4'h6, NA_JRP   = 4'h7,
    NA_RFCT    = 4'h8, NA_RPCT  = 4'h9, NA_CRTN  = 4'hA, NA_CJPP  = 4'hB,
    NA_LDCT    = 4'hC, NA_LOOP  = 4'hD, NA_CONT  = 4'hE, NA_RFCT2 = 4'hF
  } next_addr_e;

  // Condition selector inputs (CCSEL).
  typedef enum logic [2:0] {
    CC_IOERR = 3'd0, CC_CO = 3'd1, CC_WDT = 3'd2, CC_ACK = 3'd3,
    CC_TRUE  = 3'd4, CC_NONE = 3'd5, CC_EVCNT = 3'd6, CC_INTREQ = 3'd7
  } ccsel_e;

  // Peripheral addresses (4 LSb of A-BUS when P/M is high).
  localparam logic [3:0] PA_LCI  = 4'h0;
  localparam logic [3:0] PA_SMI  = 4'h1;
  localparam logic [3:0] PA_CONS = 4'hF;

  // Bus side of every memory or peripheral: the A-BUS and C-BUS lines.
  typedef struct packed {
    logic [AW-1:0] abus;
    logic          abus_valid_n;  // low: valid address on A-BUS
    logic          dout_ck;       // low during a write; data taken while low
    logic          din_ck;        // low during a read
    logic          pm;            // 1 = peripheral
    logic          wr;            // W/R line, 1 = write
  } cbus_t;

  // Network map words.
  typedef struct packed {          // PHY-to-LOG table, entries 0..31
    logic [4:0] partner;
    logic       on_n;
    logic       free;
    logic [4:0] log_addr;
  } phy_word_t;

  typedef struct packed {          // LOG-to-PHY table, entries 32..63
    logic [4:0] waiting_part;
    logic       waiting;
    logic       queued;
    logic [4:0] phy_addr;
  } log_word_t;

  // Region addressed by a bus operation, for the lock/key check.
  typedef enum logic [1:0] {
    RG_NMAP = 2'd0, RG_MEM = 2'd1, RG_LCISMI = 2'd2, RG_PERIPH = 2'd3
  } region_e;

endpackage
