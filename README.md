# A fault-tolerant 16-bit microprogrammed computer built from graded components

This is the RTL of a small 16-bit computer that tolerates faults without
going to an extreme on any one technique. Three techniques, each
used in moderation, work together:

* **Coding where it is cheap.** Every ROM word also stores its own address
  and two parity bits. A checker compares the stored address with the
  applied one, which catches address-line and decoder faults that make the
  ROM deliver the wrong word. It also checks both parity groups.
* **Better components only where they matter.** The checkers and the
  parts of the control path the rest of the machine cannot check
  (IR, micro branch multiplexer, the microaddress OR gate, next address
  multiplexer, micro data buffer, bus registers, diagnostic device) are meant to be built from
  high-grade ("Type A") screened parts. Everything else uses standard parts.
  Component grade has no meaning in RTL. This README records the grading
  so that an implementation can follow it.
* **Testing in time instead of in hardware.** There is no arithmetic code
  on the data path. When the operating system is idle, it issues a `DIAG`
  instruction. DIAG runs a *microdiagnostic* in the microcode: it feeds
  known code inputs to the processing unit and compares the code outputs
  with stored correct results. It also exercises the external bus through a
  dedicated memory-mapped diagnostic device. The processor status is saved
  and restored around the test. A detected error stops normal operation
  and leaves a syndrome that says which test failed.

## Organisation

```
             constant ROM (32 x 24, checked)        Data In register <-- external data bus
                        \                          /
   Data In bus  =========+========================+=======================
                                   |
                     processing unit: 4 x 4-bit bit slices
                                   |
   Data Out bus =========+=========+==============+=======================
                         |                        |
                 Data Out register          Address register
                         |                        |
            external data bus / address bus: memory, peripherals, diagnostic device

   control section:
   data bus -> IR[15:0] --10--> IR decode ROM (1024 x 9, checked) --9--+
                  |                                                    v
                  +--6--> micro branch mux --3--+       next address mux <--9-- next-address field
                          (flags, IR fields,    |          |6        |3
                           external inputs)     +--------> OR <------+
                                                           |3
                                      control ROM (512 x 64, checked) <--6--+
                                                  |64
                                          micro data buffer --> micro control bits
```

| Module | Role |
|---|---|
| `graded_computer` | top: wires everything, sticky fault outputs |
| `control_section` | microsequencer: IR, decode ROM, branch mux, next address mux, control ROM, micro data buffer |
| `instruction_register`, `ir_decode_rom`, `micro_branch_mux`, `next_address_mux`, `control_rom`, `micro_data_buffer` | its parts |
| `processing_unit` | 4 cascaded `bit_slice`s, flags and their save register |
| `constant_rom` | vectors and constants on the Data In bus |
| `rom_word_checker` | stored-address and parity checker used by all three ROMs |
| `data_registers` | Data In, Data Out and Address registers |
| `diagnostic_device` | memory-mapped bus checker |
| `gc_pkg` | microword type, instruction set, ROM contents, microprogram |

## The control section

The control section is a horizontally microprogrammed sequencer with one
pipeline register, the micro data buffer. While a microword executes
from the buffer, the address of the next microword is formed from that
microword, and the control ROM is read. The next word is captured on the
next clock edge, so every microinstruction takes one clock.

The next microaddress (9 bits) is formed in two steps:

1. The next address multiplexer chooses one of two sources. One is the
   start address the IR decode ROM gives for the current opcode
   (`dispatch = 1`). The other is the microword's own next-address field.
2. The upper 6 bits go straight to the control ROM. The low 3 bits are
   OR-ed with the 3-bit output of the micro branch multiplexer.

A conditional microbranch therefore has a target whose low three bits are
zero. The selected condition group picks one of the eight microwords that
follow that target. Unconditional sequencing selects group `BR_NONE`
(000). The groups are {N, Z, C} flags, IR[5:3], IR[2:0] and three
external inputs (`ubr_ext`). The flags a branch sees are the ones latched
by an earlier microword. So "load flags" and "branch on them" are two
consecutive microwords.

Reset clears the micro data buffer to the all-zero microword. That word
does nothing and names microaddress 0 as its successor. Microaddress 0
clears the PC (R15), and fetching starts at address 0.

### Microword (64 bits, `gc_pkg::uword_t`, MSB first)

| Bits | Field | Meaning |
|---|---|---|
| 63:49 | spare | zero |
| 48 | halt | machine stopped (HALT or fault loop) |
| 47 | st_restore | flags <- saved copy |
| 46 | st_save | saved copy <- flags |
| 45 | st_ld | flags <- ALU result |
| 44 | err_set | microdiagnostic failed (sets `udiag_fail`) |
| 43, 42 | bus_wr, bus_rd | bus strobes |
| 41, 40, 39, 38 | ld_ar, ld_dout, ld_din, ld_ir | register loads |
| 37:33 | crom_addr | constant ROM address |
| 32 | din_sel | Data In bus source: 0 Data In register, 1 constant ROM |
| 31 | cin | ALU carry in |
| 30 | reg_we | write F into register B |
| 29 | s_zero | S operand = 0 (else register B) |
| 28 | r_din | R operand = Data In bus (else register A) |
| 27:25 | alu_fn | ADD, SUBR (S-R), SUBS (R-S), OR, AND, XOR, XNOR, NOTRS |
| 24:23, 22:19 | b_sel, b_addr | B register: microword, IR[2:0] or IR[5:3] |
| 18:17, 16:13 | a_sel, a_addr | A register: same choices |
| 12:10 | br_sel | micro branch group |
| 9 | dispatch | take the IR decode ROM address |
| 8:0 | next_addr | next-address field |

## Checked ROMs

All three ROMs store the data word plus its own address and two odd-parity
bits. Parity bit p0 covers the low half of {address, data}. Parity bit
p1 covers the rest. The constant ROM also has one unused bit.

| ROM | Words | Stored word | Parity groups |
|---|---|---|---|
| constant ROM | 32 | 16 data + 5 address + p0 + p1 + 1 unused = 24 bits | 10 and 11 bits |
| IR decode ROM | 1024 | 9 data + 10 address + p0 + p1 = 21 bits | 9 and 10 bits |
| control ROM | 512 | 64 data + 9 address + p0 + p1 = 75 bits | 36 and 37 bits |

`rom_word_checker` raises `addr_err` when the stored address differs from
the applied address. It raises `par_err` when either group has even
parity. Odd parity means a word read as all zeros is caught. All checks
are combinational on every read. The top ORs them into the sticky
`rom_err` output. A ROM error is reported but does not stop the machine.

The ROM contents are computed by functions in `gc_pkg`. No data file is
needed:
* `crom_data`: words 0-14 hold five tests as (operand a, operand b,
  expected b op a). Word 15 is 0. Words 16-20 hold the diagnostic device
  addresses and the echo pattern and its complement. Words 21-23 and 31
  hold general constants. Words 24-30 hold the syndrome bits 1<<0 to 1<<6.
* `decode_entry`: opcode to start microaddress. Undefined opcodes act as NOP.
* `ucode`: the microprogram.

## Microdiagnostic (`DIAG`)

DIAG is the time-domain test. It uses only microcode-private registers
(R8 to R10), so the programmer's registers R0 to R7 and the PC are not
disturbed. The flags are saved at the start and restored at the end.

| Test | Syndrome bit | What it does |
|---|---|---|
| 0-4 | 0-4 | T0 <- a, T1 <- b from the constant ROM; T1 <- T1 op T0 with op = ADD, SUBR, AND, OR, XOR; T1 <- T1 XOR expected. The result must be 0. |
| 5 | 5 | START the diagnostic device, write a pattern to ECHO, read back the complement, XOR it with the expected value. This exercises AR, Data Out and Data In registers, both buses and the strobes. |
| 6 | 6 | read the device STATUS; it must be 0 (no bus fault seen) |

After each test the microcode loads the flags from the residue and
branches on Z into that test's 8-entry table at `0x100 + 8*t`. With
Z = 0, the table entry ORs syndrome bit t into R10. At the end, R10 = 0
restores the flags and continues with the next instruction. Otherwise
`err_set` raises `udiag_fail`, and the machine enters a fault loop at
microaddress `0x0A8`. The loop asserts `halted` and keeps copying the
syndrome into the Data Out register, where it appears on `mem_wdata`.
Fault location past that point is left to an operator (reset restarts
the machine).

Fault-free DIAG takes 50 clocks after its 3-clock fetch: 41 straight-line
microwords, 7 table entries, the final branch table and the restore word.
That is much shorter than an instruction-level diagnostic would be.

Examples checked in the testbench:
* A carry between slices 1 and 2 stuck at 0 gives syndrome `0x0001`.
  Only the ADD test carries out of bit 7.
* A bus misuse before DIAG gives `0x0040`.

## Bus diagnostic device

The device answers four words at `0xFFF0` (parameter `DIAG_BASE_ADDR`):

| Offset | Access | Function |
|---|---|---|
| 0 | write | START: begin a check sequence |
| 1 | write / read | ECHO: store a pattern / read its complement |
| 3 | read | STATUS: `{15'b0, err}`, readable at any time |

Its sequence table, a small microprogram, expects this order: write START,
write ECHO, read ECHO, read STATUS. Inside the window it flags these
events:
* both strobes active at once;
* a strobe active in two consecutive clocks (stuck);
* a cycle of the wrong kind or to the wrong offset for the current step.

`err` (top output `bus_fault`) stays set until reset. `done`
(`bus_test_done`) is set once a whole sequence has completed. The
processor's strobes last one clock and the same strobe is never active in
two consecutive clocks, so a correct bus never trips the device.

## Instruction set

This instruction set is this design's own. The source design specifies
only that a 10-bit opcode is decoded to a start microaddress. Word format:
`{opcode[15:6], rd[5:3], rs[2:0]}`. Registers R0-R7 belong to the
programmer. R8-R14 are microcode scratch registers. R15 is the PC.

| Opcode | Mnemonic | Effect | Clocks (fetch 3 +) |
|---|---|---|---|
| 0 | NOP | - | 0 |
| 1-5 | ADD, SUB, AND, OR, XOR | rd <- rd op rs, flags | 1 |
| 8 | LDI | rd <- next word, flags | 3 |
| 9 | LD | rd <- mem[rs], flags | 3 |
| 10 | ST | mem[rs] <- rd | 3 |
| 16 | JZ | if Z: PC <- next word (always skips it) | 3 |
| 17 | JMP | PC <- next word | 3 |
| 32 | DIAG | microdiagnostic | 50 |
| 63 | HALT | stop (`halted`) until reset | - |

## Top-level interface (`graded_computer`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| mem_addr | out | 16 | address bus (Address register) |
| mem_wdata | out | 16 | write data (Data Out register); the syndrome while in the fault loop |
| mem_rd, mem_wr | out | 1 | one-clock strobes |
| mem_rdata | in | 16 | read data; must be valid in the `mem_rd` clock |
| ubr_ext | in | 3 | external micro branch inputs (no microroutine uses them yet) |
| halted | out | 1 | HALT or microdiagnostic fault loop |
| udiag_fail | out | 1 | sticky: the microdiagnostic found an error |
| rom_err | out | 1 | sticky: a ROM address or parity error |
| bus_fault | out | 1 | sticky: the diagnostic device saw a bad bus cycle |
| bus_test_done | out | 1 | the diagnostic device completed a sequence |
| uaddr | out | 9 | microaddress being fetched (observation) |

The bus is single-cycle and synchronous. Memory and peripherals are
outside the top. Cycles in the diagnostic device's window are answered
inside the top. The strobes still appear on the ports, so external
decoding must leave `0xFFF0`-`0xFFF3` unused.

## What follows the source design and what is this design's own

Taken from the source design:
* the block structure and its connections;
* the 16-bit data path built from four 4-bit slices;
* the 16-bit IR, split into 10 bits for the decode ROM and 6 bits for the
  branch multiplexer;
* the 9-bit microaddress, 6 bits direct and 3 bits OR-ed with the branch
  condition;
* the 64-bit microword and the micro data buffer;
* the 32 x 16 constant ROM with its 24-bit word (5 address bits, parity
  over 10 and 11 bits, one unused bit);
* the same protection for the IR decode and control ROMs;
* a memory-mapped, microprogrammed bus diagnostic device;
* microdiagnostics started by the operating system when idle, with status
  saved and restored, and an error stopping normal operation.

Choices made here, because the source is silent:
* the inside of the bit slice;
* the ALU functions;
* the microword layout and the microprogram;
* the instruction set;
* odd parity and which bits each parity bit covers;
* the ROM contents;
* the sequence and registers of the diagnostic device, and its address;
* the bus timing;
* reset values;
* the per-test syndrome;
* the stop-on-error fault loop.

An arithmetic (AN+B) code for the processing unit was considered in the
source and rejected in favour of microdiagnostics, so none is built. The
memory, peripherals, connectors and sockets are not part of the RTL. The
operator-run fault-location tests that follow a failure are not specified
and are not built. The constant ROM is meant to hold interrupt vectors as
well, but no interrupt system is specified, so there is none.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M`. The end-to-end test runs the top with
default parameters. It runs a program through every instruction, a
passing DIAG and a check of the exact clock count (150 clocks to HALT).
It then repeats DIAG three times:
* after a bus misuse;
* with a forced stuck carry in the processing unit;
* with a forced all-zero constant ROM word.

Each time it checks the fault outputs, and for the first two also the
syndrome. Every mechanism
is counted, and one that never occurs is a failure.

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_graded_computer \
    -y rtl -y tb +libext+.sv -Irtl rtl/gc_pkg.sv tb/tb_graded_computer.sv
./obj_dir/Vtb_graded_computer
```

The same command, with the module name changed, runs any other
testbench. `verilator --lint-only -Wall -y rtl +libext+.sv rtl/gc_pkg.sv
rtl/graded_computer.sv` lints the design. The remaining lint warnings
are about unused bits (the spare microword bits, the constant ROM's
unused bit, flag bits that no branch group uses) and about the reset
signal being used both as an asynchronous reset and in assertion
`disable iff` clauses.

To change the machine, edit `gc_pkg`. The microprogram (`ucode`,
`diag_word`, `diag_table`), the opcode map (`decode_entry`) and the
constants (`crom_data`) are all there. The ROMs recompute their address
and parity bits from these functions, so the checkers stay consistent.
