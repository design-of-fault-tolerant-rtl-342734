// tb_control_rom: reads all 512 words of the control store, checks the
// address/parity coding of each stored word (recomputed here), and checks
// the fields of the fetch/dispatch microwords and of the microdiagnostic's
// final branch table against their intended values.
module tb_control_rom;
  import gc_pkg::*;
  logic [8:0]  uaddr;
  logic [63:0] uword;
  logic        addr_err, par_err;
  uword_t      u;
  int checks = 0, failures = 0;

  control_rom dut (.*);
  assign u = uword_t'(uword);

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL ua %h: %s", uaddr, what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [74:0] w;
    for (int i = 0; i < 512; i++) begin
      uaddr = 9'(i);
      #1;
      w = dut.mem[i];
      check(!addr_err && !par_err, "checker error");
      check(w[72:64] == 9'(i), "stored address");
      check(^{w[73], w[35:0]} && ^{w[74], w[72:36]}, "odd parity");
      check(w[63:0] == uword, "data field");
    end
    uaddr = 9'h001; #1;
    check(u.ld_ar && u.next_addr == 9'h002 && !u.reg_we && u.a_addr == 4'd15, "fetch 1");
    uaddr = 9'h002; #1;
    check(u.bus_rd && u.ld_ir && u.reg_we && u.cin && u.b_addr == 4'd15, "fetch 2");
    uaddr = 9'h003; #1;
    check(u.dispatch && u.br_sel == BR_NONE, "dispatch");
    uaddr = 9'h031; #1;
    check(u.br_sel == BR_FLAGS && u.next_addr == 9'h038, "JZ branch");
    uaddr = 9'h03A; #1;
    check(u.reg_we && u.r_din && u.b_addr == 4'd15, "JZ taken");
    uaddr = 9'h038; #1;
    check(!u.reg_we && u.next_addr == 9'h001, "JZ not taken");
    uaddr = 9'h050; #1;
    check(u.st_save, "diag saves status");
    uaddr = 9'h0BA; #1;
    check(!u.err_set && u.next_addr == 9'h0A0, "diag pass");
    uaddr = 9'h0B8; #1;
    check(u.err_set && u.next_addr == 9'h0A8, "diag fail");
    uaddr = 9'h100; #1;
    check(u.reg_we && u.crom_addr == 5'd24 && u.alu_fn == FN_OR && u.b_addr == 4'd10 &&
          u.next_addr == 9'h056, "test 0 failed: syndrome bit 0");
    uaddr = 9'h102; #1;
    check(!u.reg_we && u.next_addr == 9'h056, "test 0 passed");
    uaddr = 9'h130; #1;
    check(u.reg_we && u.crom_addr == 5'd30 && u.next_addr == 9'h077, "test 6 failed");
    uaddr = 9'h0A8; #1;
    check(u.halt && u.ld_dout && u.a_addr == 4'd10 && u.next_addr == 9'h0A8, "fault loop");
    uaddr = 9'h0A0; #1;
    check(u.st_restore && u.next_addr == 9'h001, "diag restore");
    uaddr = 9'h048; #1;
    check(u.halt && u.next_addr == 9'h048, "halt loop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
