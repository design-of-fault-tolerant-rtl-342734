// tb_graded_computer: end-to-end test of the whole computer with every
// parameter at its default, running programs from a memory model.
//
// Phase 1 (fault-free): a program using LDI, ADD, SUB, XOR, AND, OR, ST,
//   LD, a taken and a not-taken JZ, JMP, DIAG and HALT. Checks the memory
//   results, that the microdiagnostic passes and restores the flags (the JZ
//   after DIAG must see the pre-DIAG Z=0), that no fault is raised and the
//   exact number of clocks to HALT (worked out by hand below).
// Phase 2 (bus fault): the program writes the diagnostic device's ECHO
//   register without START; the device must flag a bus fault and the
//   following DIAG must fail and stop the machine in its fault loop.
// Phase 3 (processor fault): the carry between two slices is forced to 0
//   while DIAG runs; the microdiagnostic must detect the wrong code output.
// Phase 4 (ROM fault): the constant ROM's output word is forced to zero;
//   its parity checker must raise rom_err.
// Each mechanism is counted; one that never happens is a failure.
module tb_graded_computer;
  import gc_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic [15:0] mem_addr, mem_wdata, mem_rdata;
  logic        mem_rd, mem_wr;
  logic [2:0]  ubr_ext = 3'b000;
  logic        halted, udiag_fail, rom_err, bus_fault, bus_test_done;
  logic [8:0]  uaddr;
  logic [15:0] mem [1024];
  int checks = 0, failures = 0, cycles;

  graded_computer dut (.*);
  always #5 clk = ~clk;

  // memory model: single cycle, addresses below 1024 only
  assign mem_rdata = (mem_addr < 16'd1024) ? mem[mem_addr[9:0]] : 16'h0;
  always @(posedge clk)
    if (mem_wr && mem_addr < 16'd1024) mem[mem_addr[9:0]] <= mem_wdata;

  // ------------------------------------------------ mechanism counters
  int n_dispatch, n_ubranch, n_jz_taken, n_jz_not, n_save, n_restore;
  int n_crom, n_udiag_pass, n_udiag_fail, n_bus_test, n_bus_fault, n_rom_err, n_halt;
  uword_t uw;
  assign uw = dut.u_ctl.uw;
  always @(posedge clk) if (rst_n) begin
    if (uw.dispatch) n_dispatch++;
    if (uw.br_sel == BR_FLAGS) n_ubranch++;
    if (uaddr inside {9'h03A, 9'h03B, 9'h03E, 9'h03F} && uw.br_sel == BR_FLAGS &&
        uw.next_addr == UA_JZ_T) n_jz_taken++;
    if (uaddr inside {9'h038, 9'h039, 9'h03C, 9'h03D} && uw.br_sel == BR_FLAGS &&
        uw.next_addr == UA_JZ_T) n_jz_not++;
    if (uw.st_save) n_save++;
    if (uw.st_restore) n_restore++;
    if (uw.din_sel == DIN_CROM && uw.r_din) n_crom++;
    if (uaddr == UA_DG_OK && uw.next_addr == UA_DG_T) n_udiag_pass++;
  end
  always @(posedge udiag_fail)    n_udiag_fail++;
  always @(posedge bus_test_done) n_bus_test++;
  always @(posedge bus_fault)     n_bus_fault++;
  always @(posedge rom_err)       n_rom_err++;
  always @(posedge halted)        n_halt++;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [15:0] ins(logic [9:0] op, int rd, int rs);
    return {op, 3'(rd), 3'(rs)};
  endfunction

  task automatic run_until_halt(int limit, output int n);
    n = 0;
    @(negedge clk); rst_n = 1;
    while (!halted && n < limit) begin @(posedge clk); #1; n++; end
  endtask

  task automatic do_reset();
    rst_n = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (mem[i]) mem[i] = 16'h0;
    // ---------------------------------------------------------- phase 1
    mem[0]  = ins(OP_LDI, 1, 0);  mem[1]  = 16'h1234;
    mem[2]  = ins(OP_LDI, 2, 0);  mem[3]  = 16'h0F0F;
    mem[4]  = ins(OP_ADD, 1, 2);                      // r1 = 2143
    mem[5]  = ins(OP_LDI, 3, 0);  mem[6]  = 16'h0100;
    mem[7]  = ins(OP_ST, 1, 3);                       // [100] = 2143
    mem[8]  = ins(OP_SUB, 1, 2);                      // r1 = 1234
    mem[9]  = ins(OP_XOR, 2, 2);                      // r2 = 0, Z = 1
    mem[10] = ins(OP_JZ, 0, 0);   mem[11] = 16'd14;   // taken
    mem[12] = ins(OP_HALT, 0, 0);
    mem[13] = ins(OP_HALT, 0, 0);
    mem[14] = ins(OP_LD, 4, 3);                       // r4 = 2143, Z = 0
    mem[15] = ins(OP_DIAG, 0, 0);                     // must restore Z = 0
    mem[16] = ins(OP_JZ, 0, 0);   mem[17] = 16'd12;   // not taken
    mem[18] = ins(OP_AND, 4, 2);                      // r4 = 0
    mem[19] = ins(OP_OR, 4, 1);                       // r4 = 1234
    mem[20] = ins(OP_LDI, 6, 0);  mem[21] = 16'h0101;
    mem[22] = ins(OP_ST, 4, 6);                       // [101] = 1234
    mem[23] = ins(OP_JMP, 0, 0);  mem[24] = 16'd26;
    mem[25] = ins(OP_HALT, 0, 0);
    mem[26] = ins(OP_LDI, 7, 0);  mem[27] = 16'h0102;
    mem[28] = ins(OP_ST, 2, 7);                       // [102] = 0
    mem[29] = ins(OP_HALT, 0, 0);
    mem[16'h102] = 16'hDEAD;
    do_reset();
    run_until_halt(2000, cycles);
    check(halted, "phase 1 halts");
    check(mem[16'h100] == 16'h2143, $sformatf("[100]=%h", mem[16'h100]));
    check(mem[16'h101] == 16'h1234, $sformatf("[101]=%h", mem[16'h101]));
    check(mem[16'h102] == 16'h0000, $sformatf("[102]=%h", mem[16'h102]));
    check(!udiag_fail && !rom_err && !bus_fault, "no fault in phase 1");
    check(bus_test_done, "bus test completed");
    check(uaddr == UA_HALT, "stopped at HALT");
    // clocks: reset microword 1; fetch 3 per instruction; execute LDI, LD,
    // ST, JMP 3, ALU ops 1, JZ 3, DIAG 50 (save, 5 ALU tests x 6,
    // echo test 10, status test 5, flags, branch, branch table, restore). 5 LDI + 3 ST + LD + JMP = 10 x 6; 5 ALU ops x 4;
    // 2 JZ x 6; DIAG 53; HALT fetch 3 + 1 to show the HALT microword.
    check(cycles == 1 + 60 + 20 + 12 + 53 + 4,
          $sformatf("phase 1 clocks %0d, want %0d", cycles, 1 + 60 + 20 + 12 + 53 + 4));
    // ---------------------------------------------------------- phase 2
    foreach (mem[i]) mem[i] = 16'h0;
    mem[0] = ins(OP_LDI, 1, 0);   mem[1] = DIAG_BASE | 16'(DG_ECHO);
    mem[2] = ins(OP_ST, 0, 1);                        // ECHO without START
    mem[3] = ins(OP_DIAG, 0, 0);
    mem[4] = ins(OP_HALT, 0, 0);
    do_reset();
    check(!bus_fault && !udiag_fail, "reset clears faults");
    run_until_halt(2000, cycles);
    check(bus_fault, "bus fault detected");
    check(udiag_fail && halted && uaddr == UA_FAULT, "microdiagnostic fails on bus fault");
    @(posedge clk); #1;  // the fault loop has now moved the syndrome out
    check(mem_wdata == 16'h0040, $sformatf("syndrome %h: only the status test (bit 6)", mem_wdata));
    check(!rom_err, "no ROM error in phase 2");
    // ---------------------------------------------------------- phase 3
    // processing unit fault: carry between slices 1 and 2 stuck at 0
    foreach (mem[i]) mem[i] = 16'h0;
    mem[0] = ins(OP_DIAG, 0, 0);
    mem[1] = ins(OP_HALT, 0, 0);
    do_reset();
    force dut.u_pu.carry[2] = 1'b0;
    run_until_halt(2000, cycles);
    release dut.u_pu.carry[2];
    check(udiag_fail && halted && uaddr == UA_FAULT, "microdiagnostic detects stuck carry");
    // 5A5A + A5A6 carries out of bit 7; 8001 - 1234 does not: only test 0
    @(posedge clk); #1;
    check(mem_wdata == 16'h0001, $sformatf("syndrome %h: only the ADD test (bit 0)", mem_wdata));
    check(!rom_err && !bus_fault, "no ROM or bus fault in phase 3");
    // ---------------------------------------------------------- phase 4
    // constant ROM fault: output word stuck at all zeros
    foreach (mem[i]) mem[i] = 16'h0;
    mem[0] = ins(OP_DIAG, 0, 0);
    mem[1] = ins(OP_HALT, 0, 0);
    do_reset();
    force dut.u_crom.word = 24'h000000;
    run_until_halt(2000, cycles);
    release dut.u_crom.word;
    check(rom_err, "constant ROM checker flags the broken word");
    // ---------------------------------------------------------- coverage
    check(n_dispatch > 0, "dispatch");
    check(n_ubranch > 0, "flag microbranch");
    check(n_jz_taken > 0, "JZ taken");
    check(n_jz_not > 0, "JZ not taken");
    check(n_save > 0 && n_restore > 0, "status save/restore");
    check(n_crom > 0, "constant ROM on Data In bus");
    check(n_bus_test > 0, "bus test sequence completed");
    check(n_bus_fault > 0, "bus fault");
    check(n_udiag_fail >= 2, "microdiagnostic failure");
    check(n_rom_err > 0, "ROM parity/address error");
    check(n_halt >= 4, "halt");
    $display("mechanisms: dispatch=%0d ubranch=%0d jz_taken=%0d jz_not=%0d save=%0d restore=%0d crom=%0d bus_test=%0d bus_fault=%0d udiag_fail=%0d rom_err=%0d halt=%0d",
             n_dispatch, n_ubranch, n_jz_taken, n_jz_not, n_save, n_restore, n_crom,
             n_bus_test, n_bus_fault, n_udiag_fail, n_rom_err, n_halt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
