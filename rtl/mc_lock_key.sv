// Lock/Key unit: lock register and access check.
//
// The 3-bit lock register takes the CCSEL field when a microinstruction has
// NEXT ADDRESS = E (CONTINUE) and CCSEL /= 0 (the L-LOAD strobe, at the end
// of the CK-high semicycle). Every read or write is classified by MAP and
// P/M into network map, rest of memory, LCI/SMI or other peripheral, and
// approved against the lock table:
//   lock  network map  rest of memory  LCI/SMI
//    1       R W            -            R W    message processing
//    2       R              -            -      network map dump
//    3       R W            -            -      network map check
//    4       -              R            -      instruction fetch
//    5       R W            R W          R W    all
//    6       -              R W          -      non-switching programs
//    7       R W            R W          -      diagnosis
// Other peripherals (the Console) are always allowed. Lock 0, the value after
// reset, approves nothing but those peripherals; that value is this design's
// choice (the document lists only locks 1-7 and has the base microprogram
// load a lock first).
module mc_lock_key
  import mc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       l_load,
  input  logic [2:0] ccsel,
  input  logic       map,
  input  logic       pm,
  input  logic       rd,
  input  logic       wr,
  output logic [2:0] lock,
  output logic       approved
);
  region_e rg;
  logic [5:0] perm;  // {map R, map W, mem R, mem W, io R, io W}

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      lock <= 3'd0;
    else if (l_load) lock <= ccsel;

  always_comb begin
    unique case ({map, pm})
      2'b10:   rg = RG_NMAP;
      2'b00:   rg = RG_MEM;
      2'b11:   rg = RG_LCISMI;
      default: rg = RG_PERIPH;
    endcase
    unique case (lock)
      3'd1: perm = 6'b11_00_11;
      3'd2: perm = 6'b10_00_00;
      3'd3: perm = 6'b11_00_00;
      3'd4: perm = 6'b00_10_00;
      3'd5: perm = 6'b11_11_11;
      3'd6: perm = 6'b00_11_00;
      3'd7: perm = 6'b11_11_00;
      default: perm = 6'b00_00_00;
    endcase
    unique case (rg)
      RG_NMAP:   approved = !(rd && !perm[5]) && !(wr && !perm[4]);
      RG_MEM:    approved = !(rd && !perm[3]) && !(wr && !perm[2]);
      RG_LCISMI: approved = !(rd && !perm[1]) && !(wr && !perm[0]);
      default:   approved = 1'b1;
    endcase
  end
endmodule
