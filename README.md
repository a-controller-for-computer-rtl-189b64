# Matrix controller CPU for a computer-internal communication network

A small switched network connects up to 32 devices (computers, terminals,
peripherals) through a 32 x 32 crosspoint matrix. Each device sits on a line
circuit (LC). A device asks for a partner by sending a short message; the
matrix controller (MC) looks the partner up in a network map, answers the
device, and fires or breaks a crosspoint. This repository holds the RTL of the
MC's CPU board and of its two network interfaces:

* a 12-bit microprogrammed CPU built around a bit-slice array, with its
  sequencer, microprogram store, mapping PROM, bus strobe generator, memory
  protection (lock/key), interrupt unit, watch dog timer and reset logic;
* a 2K x 12 memory;
* the line circuit interface (LCI), which scans the LCs, receives and sends
  device messages and tests crosspoints;
* the switching matrix interface (SMI), which fires crosspoints.

The bit-slice array itself (six Intel 3002 2-bit slices), the Console, the
line circuits and the thyristor matrix are outside this RTL: their signals are
ports of the top module `mc_cpu`.

## The machine cycle

Everything runs off one oscillator of 150 ns period (`osc`). A machine cycle
is CK high for one period, then CK low for one period (fast cycle, 300 ns) or
two (slow cycle, 450 ns). The F bit of the microinstruction being executed
chooses the length. A second phase signal, A0, is high only in the first
low period.

All registers in the RTL are clocked by `osc`. A register that the original
board clocks "at the start of a machine cycle" is enabled by `cyc_end`, which
is high in the last oscillator period of a cycle. `ph0_end` marks the last
period of CK high. On the board, bus receivers take data on the rising edge of
a strobe. Here they take it in every `osc` period while the strobe is low. The
last value they take is the one at the rising edge.

## Microprogram sequencing

The microinstruction is 36 bits wide (`mc_pkg::uinst_t`, most significant
field first):

| bits  | field      | use |
|-------|------------|-----|
| 35-28 | PL ADDRESS | branch address or counter value |
| 27-24 | NEXT ADDR  | sequencer instruction (Am2910 set) |
| 23    | F          | 1 = fast cycle |
| 22    | M          | with F, selects the bus pattern |
| 21    | MAP        | network map / LCI / SMI addressing |
| 20    | L/P        | LOG or PHY half of the network map |
| 19    | P/M        | 1 = peripheral, 0 = memory |
| 18    | D-REG      | (active low) load the D-register from the D-BUS |
| 17    | A-ENABLE   | (active low) drive the A-BUS from the array |
| 16    | D-ENABLE   | (active low) drive the D-BUS from the array |
| 15-13 | CCSEL      | condition select, lock number, ICU select |
| 12    | CI         | carry in of the array |
| 11-5  | FUNCTION   | array function |
| 4-0   | MASK       | array K inputs |

The sequencer (`mc_useq`) gives the 16 instructions of the Am2910, but it is
built the way the board builds them. An 8-bit address path stands for two
Am2909 slices: a microprogram counter, a 4-deep stack, and a multiplexer over
the counter, zero, the stack top and a direct input. A 4-bit down counter
(EV.CNT) handles the counter loops. A control PROM, indexed by the I/O error
flag, the condition and NEXT ADDR, holds the document's table and drives the
multiplexer, the stack and the counter. The table sits verbatim in the
`ctl_prom` function.

The direct input comes from one of three places. PL ADDRESS serves branches.
The mapping PROM serves JUMP MAP, turning the 8-bit opcode held in the
D-register into the start of its routine. The vector address serves CJV: it
is `111` followed by the inverted register code in the four low D-register
bits and EV.CNT. This gives the register load/store routines at E0-F5.

The store has two halves of 256 words. Branches reach only within the current
half. Bit 8 of the microprogram address sits in a flip-flop of its own. JUMP
MAP sets it to the AND of the two opcode MSbs, so opcodes 11xxxxxx (the
special message instructions) run in the upper half. JUMP ZERO clears it.

A refused bus operation raises I/O ERROR. The control PROM then forces the
next address to xFF of the current half, where the error routine starts.

## Bus operations and their timing

The internal bus has these parts:

* A-BUS: 11 address lines.
* D-BUS: 12 data lines.
* C-BUS: A-BUS VALID, D-OUT CK, D-IN CK, W/R, P/M, ACK, INTREQ and WDT.

The `cbus_t` struct carries the lines that the CPU drives.

A bus operation is coded by A-ENABLE together with exactly one of D-ENABLE
(a write) and D-REG (a read). The FPLA (`mc_fpla`) turns F, M, CK and A0 into
the strobes through two product-term groups:

    SHAPE = CK.A0 + /F./M.CK + /A0.F.M + /CK./A0.F     A-BUS VALID low while SHAPE low
    AUX   = /M./A0 + F.M + CK                          data strobe low while AUX low

This gives four patterns. Periods are 150 ns each:

| pattern | F M | cycle | A-BUS VALID low        | strobe low          | typical use |
|---------|-----|-------|------------------------|---------------------|-------------|
| F0      | 1 0 | 2     | both periods           | the low period      | fast unit, address already in MAR |
| S0      | 0 0 | 3     | both low periods       | the first low period| address or data loaded in the same word |
| F1      | 1 1 | 2     | the low period         | none                | first half of a slow access |
| S1      | 0 1 | 3     | all three periods      | both low periods    | second half of a slow access |

Once the gate and register delays are counted, these patterns give the
access-time budgets of 210 ns (F0/S0) and 535 ns (F1 then S1). The fast
memory section, the LCI, the SMI and the Console are sized for 210 ns, the
slow memory section for 535 ns.

The FPLA also generates these signals:

* ICUW is active during CK high, and ICUR for the whole cycle. Both come from
  NEXT ADDR = C (LOAD COUNTER) with CCSEL not 0.
* L-LOAD comes from NEXT ADDR = E (CONTINUE) with CCSEL not 0. The lock
  register takes CCSEL at the end of CK high.
* A D-register load from AC uses D-ENABLE and D-REG both active, with
  A-ENABLE off.

## Addressing and protection

The address logic (`mc_addr_logic`) inverts the array's A outputs onto the
A-BUS. With MAP set, it forces the five MSbs low and puts L/P on bit 5. A
network map entry is then reached with a 5-bit PHY or LOG address: PHY
entries are 0-31 and LOG entries 32-63. LCI and SMI accesses use the same
mode with P/M set. They are told apart by the low four address bits: the LCI
is 0, the SMI 1 and the Console F.

The lock/key unit (`mc_lock_key`) holds a 3-bit lock. Each bus operation
falls in one of four regions, set by MAP and P/M: the network map, the rest
of memory, the LCI/SMI, and other peripherals. The lock decides which reads
and writes are allowed in each:

| lock | network map | memory | LCI/SMI |
|------|-------------|--------|---------|
| 0    | -           | -      | -       |
| 1    | R W         | -      | R W     |
| 2    | R           | -      | -       |
| 3    | R W         | -      | -       |
| 4    | -           | R      | -       |
| 5    | R W         | R W    | R W     |
| 6    | -           | R W    | -       |
| 7    | R W         | R W    | -       |

Other peripherals are always allowed. The lock is 0 after reset, so the
first microinstructions must load one. A refused operation produces no
strobes.

## Interrupts, watch dog and reset

* The ICU (`mc_icu`) has eight active-low request lines, with 7 the highest.
  The Console is on 7, the LCI on 6 and the SMI on 5; 4-0 are ports. The CPU
  polls it in two words:
  * First, an S0 ICU write sends the status word: the present level on bits
    0-2 and the interrupt disable on bit 6.
  * In the next cycle only, INTREQ is low if a request of a higher level is
    waiting. The microprogram tests it through CCSEL 7.
  * The level can be read back later with an ICU read.
* The watch dog timer (`mc_wdt`) restarts on every access to peripheral 0,
  which is every LCI poll. WDT goes low after `WDT_TICKS` oscillator periods
  without one. It is also low after reset until the first poll.
* The condition selector (`mc_cond_sel`) registers the lines that come from
  outside: WDT, ACK and INTREQ. It selects among them, I/O ERROR, the array's
  CO, EV.CNT and the constants.
* Power-on reset (`mc_por`) holds LAL low while FRESH is low. LAL follows the
  RESET button at the start of each machine cycle. LAL resets the pipeline,
  which then holds JUMP ZERO, and with it the sequencer, the lock, the ICU,
  the WDT and the interfaces.

## The LCI

`mc_lci` sits at peripheral address 0. The CPU writes command words into its
incoming buffer. Each read pops one word of the outgoing buffer, or returns
FFF (no message) when that buffer is empty.

Commands:

| code | command | accepted in |
|------|---------|-------------|
| 010  | Scan | idle |
| 04F  | Connection to device a, then PHY-a, then the message | idle |
| FD0  | New Priority Mask, then three mask words | idle |
| F80  | Break crosspoint, then PHY-a xx PHY-b | holding an LC |
| 050  | Send message to device, then the message | holding an LC |
| 01F  | Test crosspoint, then PHY-a xx PHY-b | holding an LC |
| F90  | Stop | always |

The LCI reports these messages:

* F6F: test OK.
* F0F: test failed.
* FAF: LC a crazy.
* A device message becomes two words: the code in bits 11-4 with 1111 below,
  then the LOG field, 00 and the PHY address of the LC.

A command that the present state does not accept pulls the LCI interrupt
low. It stays low until a Stop.

Scanning serves the lowest-numbered LC that requests and is not masked. A
new LC is served only once the CPU has polled every earlier word, so the
outgoing buffer always has room. The
document leaves the line side open, so this design chooses its own:

* Frames are bit-serial with one strobe per bit, MSB first.
* A device frame is an 8-bit code, a 5-bit address and even parity. A frame
  that fails the parity check, or whose code is not one of the five device
  codes, is asked for again. After three bad frames the LCI reports FAF.
* A message to a device is 12 bits plus parity, one bit per clock.
* The crosspoint test shifts A5C one way and its complement the other way
  through the closed crosspoint, over 13 clocks.

## Files

| file | contents |
|------|----------|
| `rtl/mc_pkg.sv` | widths, microinstruction, sequencer codes, bus struct, network map word formats |
| `rtl/mc_cpu.sv` | top: everything wired together |
| `rtl/mc_clock.sv`, `mc_por.sv` | machine cycle, reset |
| `rtl/mc_ustore.sv`, `mc_pipeline.sv`, `mc_useq.sv`, `mc_map_prom.sv`, `mc_vector.sv` | microprogram control |
| `rtl/mc_cond_sel.sv`, `mc_fpla.sv`, `mc_lock_key.sv`, `mc_addr_logic.sv`, `mc_dreg.sv` | bus control |
| `rtl/mc_icu.sv`, `mc_wdt.sv` | interrupts, watch dog |
| `rtl/mc_memory.sv` | 2K x 12 memory |
| `rtl/mc_lci.sv`, `mc_fifo.sv`, `mc_smi.sv` | network interfaces |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_check.svh` | check and result macros |

The microprogram store and the mapping PROM are RAM arrays with a
programming port. A system loads them at start-up, as the testbench of
`mc_cpu` does. The store powers up all zero, which is JUMP ZERO. Every
mapping PROM entry powers up pointing at routine 01, the fetch of the next
instruction, so undefined opcodes are skipped.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example:

    verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
        rtl/mc_pkg.sv tb/tb_mc_cpu.sv --top-module tb_mc_cpu
    ./obj_dir/Vtb_mc_cpu

The end-to-end testbench `tb_mc_cpu` uses the top at its default parameters.
It stands in for the bit-slice array with a MAR and an AC register, loaded
from a constant table selected by the FUNCTION field. This is not the 3002
function code. Through that stand-in it runs a microprogram of about 90
machine cycles, which exercises the following:

* lock loads and a refused write that jumps to xFF;
* fast and slow memory accesses, and network map accesses;
* both JUMP MAP halves, a vector jump, a counter loop, and a call and return;
* an LCI scan and poll loop that receives a frame from a model line circuit
  and restarts the watch dog timer;
* an SMI crosspoint make;
* an ICU poll with the INTREQ test and a level read;
* a wait for ACK from a slow peripheral (the Console), then a read from it.

It counts each of these, and it checks the length of every machine cycle
against the F bit.

## Where this design departs from, or adds to, the document

* The bit-slice array is not modelled. Its microinstruction, M, A, D and
  per-slice carry signals are ports.
* All buses use positive logic. The board's inverted D-BUS and active-low
  strobes are kept only where a signal's name ends in `_n`.
* A0 is taken as "first low period". This is the reading that gives the
  documented access times.
* The mapping PROM has 8 output bits, and bit 8 of the address comes from the
  opcode MSbs, as above.
* The LCI's buffers are first-in first-out, with `BUF_DEPTH` = 4 words each.
* In "Connection to device a", PHY-a is taken as the second word and the
  message as the third.
* The Priority Mask is loaded in three words. A set bit masks an LC.
* The LCI's serial line format, parity, retry count (3) and test pattern are
  this design's own. The document leaves them open.
* With the matrix absent, the SMI pulls its interrupt low and holds it until
  reset.
* The watch dog timeout is a count of oscillator periods, `WDT_TICKS` = 500
  (75 us), inside the 50-100 us range of the original monostable.
* Lock 0, the value after reset, allows only the peripherals outside the
  LCI/SMI. The document defines locks 1-7 only.
* The Console and its buffers are not built.
