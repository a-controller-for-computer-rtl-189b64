// Testbench for mc_useq. Each step applies one sequencer instruction, checks
// the address it selects (combinational) and ends the machine cycle. The
// expected addresses are worked out by hand from the Am2910 instruction
// meanings: sequencing, conditional jumps both ways, subroutine call and
// return, counter loops (checked for their iteration count), map and vector
// jumps with the store-half bit, and the forced jump to xFF on I/O ERROR.
`include "tb_check.svh"
module tb_mc_useq;
  import mc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, cyc_end = 0;
  logic [3:0] next_addr;
  logic cc = 0, io_error = 0, map_msb = 0;
  logic [7:0] pl_addr = 0, map_addr = 8'h40, vect_addr = 8'hE6;
  logic [8:0] ua;
  logic ev_zero, map_en_n, pl_en_n;
  mc_useq dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("watchdog"); `TB_DONE end

  task automatic step(input next_addr_e na, input logic c, input logic [7:0] pl,
                      input logic [8:0] exp, input string what);
    next_addr = na; cc = c; pl_addr = pl; #1;
    `CHECK(ua == exp, $sformatf("%s: ua %03x expected %03x", what, ua, exp))
    cyc_end = 1; @(posedge clk); #1; cyc_end = 0;
  endtask

  initial begin
    next_addr = NA_CONT;
    #12 rst_n = 1;
    step(NA_JZ,   0, 8'h00, 9'h000, "jump zero");
    step(NA_CONT, 0, 8'h00, 9'h001, "continue");
    step(NA_CONT, 0, 8'h00, 9'h002, "continue");
    step(NA_CJP,  0, 8'h30, 9'h003, "cond jump, fail");
    step(NA_CJP,  1, 8'h30, 9'h030, "cond jump, pass");
    step(NA_CJS,  1, 8'h50, 9'h050, "call");          // returns to 031
    step(NA_CONT, 0, 8'h00, 9'h051, "in subroutine");
    step(NA_CJS,  1, 8'h60, 9'h060, "nested call");   // returns to 052
    step(NA_CRTN, 0, 8'h00, 9'h061, "return, fail");
    step(NA_CRTN, 1, 8'h00, 9'h052, "return from nested");
    step(NA_CRTN, 1, 8'h00, 9'h031, "return");
    // counter loop: load 3, loop body of one word repeated while count /= 0
    step(NA_LDCT, 0, 8'h03, 9'h032, "load counter");
    `CHECK(!ev_zero, "counter loaded")
    begin
      int n = 0;
      while (!ev_zero && n < 20) begin
        step(NA_RPCT, ev_zero, 8'h70, 9'h070, "repeat PL");
        n++;
      end
      `CHECK(n == 3, $sformatf("repeat PL iterations %0d", n))
      step(NA_RPCT, ev_zero, 8'h70, 9'h071, "repeat PL exit");
    end
    // push / loop on stack: PUSH at 071 pushes 072 and loads 2; the loop body
    // is 072 (plain) and 073 (repeat loop), run count+1 = 3 times
    step(NA_PUSH, 1, 8'h02, 9'h072, "push and load counter");
    begin
      int n = 0;
      logic done;
      do begin
        step(NA_CONT, 0, 8'h00, 9'h073, "loop body");
        n++;
        done = ev_zero;
        step(NA_RFCT, ev_zero, 8'h00, done ? 9'h074 : 9'h072,
             done ? "loop done, pop" : "repeat loop");
      end while (!done && n < 10);
      `CHECK(n == 3, $sformatf("loop iterations %0d", n))
    end
    // map jump into the upper half, then sequencing stays there
    map_msb = 1; map_addr = 8'h21;
    step(NA_JMAP, 0, 8'h00, 9'h121, "jump map, upper half");
    `CHECK(!map_en_n && pl_en_n, "map enable")
    map_msb = 0;
    step(NA_CONT, 0, 8'h00, 9'h122, "upper half kept");
    step(NA_CJP,  1, 8'h80, 9'h180, "PL jump keeps half");
    step(NA_CJV,  1, 8'h00, 9'h1E6, "vector jump");
    step(NA_CJV,  0, 8'h00, 9'h1E7, "vector fail");
    io_error = 1;
    step(NA_CONT, 0, 8'h00, 9'h1FF, "I/O ERROR upper half");
    io_error = 0;
    step(NA_JZ,   0, 8'h00, 9'h000, "jump zero clears half");
    step(NA_CONT, 0, 8'h00, 9'h001, "continue");
    io_error = 1;
    step(NA_CJS,  1, 8'h44, 9'h0FF, "I/O ERROR beats a call");
    io_error = 0;
    step(NA_CONT, 0, 8'h00, 9'h000, "after FF the counter wraps within the half");
    step(NA_JRP,  0, 8'h10, 9'h000, "cond jump R/PL fail gives register 00");
    step(NA_JRP,  1, 8'h10, 9'h010, "cond jump R/PL pass");
    `TB_DONE
  end
endmodule
