// tb_processing_unit: random 16-bit operations through the four cascaded
// slices against a reference model written here, including register
// addressing from the IR fields, the N/Z/C/V flags and the status
// save/restore used around the microdiagnostic.
module tb_processing_unit;
  import gc_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic [15:0] d, y;
  uword_t      ctl;
  logic [2:0]  ir_hi, ir_lo;
  flags_t      flags;
  logic [15:0] model [16];
  flags_t      mflags, msaved;
  int checks = 0, failures = 0;

  processing_unit dut (.*);
  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] aa, ba;
    int r, s, res, sr, ss, sres;
    logic [15:0] ey;
    flags_t ef, old_saved;
    ctl = '0; d = 0; ir_hi = 0; ir_lo = 0;
    mflags = '0; msaved = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      ctl = '0; ctl.r_din = 1; ctl.s_zero = 1; ctl.alu_fn = FN_ADD;
      ctl.b_addr = 4'(i); ctl.reg_we = 1; d = 16'($urandom);
      model[i] = d;
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      ctl = '0;
      ctl.a_sel = rsel_e'($urandom % 3); ctl.b_sel = rsel_e'($urandom % 3);
      ctl.a_addr = 4'($urandom); ctl.b_addr = 4'($urandom);
      ir_hi = 3'($urandom); ir_lo = 3'($urandom);
      ctl.alu_fn = alu_fn_e'($urandom % 8); ctl.r_din = 1'($urandom);
      ctl.s_zero = ($urandom % 4) == 0; ctl.cin = 1'($urandom);
      ctl.reg_we = 1'($urandom); ctl.st_ld = 1'($urandom);
      ctl.st_save = ($urandom % 8) == 0; ctl.st_restore = ($urandom % 8) == 0;
      d = 16'($urandom);
      aa = ctl.a_sel == RS_IR_LO ? {1'b0, ir_lo} : ctl.a_sel == RS_IR_HI ? {1'b0, ir_hi} : ctl.a_addr;
      ba = ctl.b_sel == RS_IR_LO ? {1'b0, ir_lo} : ctl.b_sel == RS_IR_HI ? {1'b0, ir_hi} : ctl.b_addr;
      r = ctl.r_din ? int'(d) : int'(model[aa]);
      s = ctl.s_zero ? 0 : int'(model[ba]);
      sr = r; ss = s;
      case (ctl.alu_fn)
        FN_ADD:  res = r + s + int'(ctl.cin);
        FN_SUBR: begin sr = 65535 - r; res = s + sr + int'(ctl.cin); end
        FN_SUBS: begin ss = 65535 - s; res = r + ss + int'(ctl.cin); end
        FN_OR:   res = r | s;
        FN_AND:  res = r & s;
        FN_XOR:  res = r ^ s;
        FN_XNOR: res = 65535 - (r ^ s);
        default: res = (65535 - r) & s;
      endcase
      ey = 16'(res);
      ef.n = ey[15]; ef.z = (ey == 0); ef.c = 0; ef.v = 0;
      if (ctl.alu_fn inside {FN_ADD, FN_SUBR, FN_SUBS}) begin
        ef.c = res > 65535;
        sres = ((sr > 32767) ? sr - 65536 : sr) + ((ss > 32767) ? ss - 65536 : ss) + int'(ctl.cin);
        ef.v = sres > 32767 || sres < -32768;
      end
      #1;
      check(y === ey, $sformatf("y=%h want %h fn=%s", y, ey, ctl.alu_fn.name()));
      @(posedge clk); #1;
      if (ctl.reg_we) model[ba] = ey;
      old_saved = msaved;
      if (ctl.st_save) msaved = mflags;
      if (ctl.st_restore) mflags = old_saved;
      else if (ctl.st_ld) mflags = ef;
      check(flags === mflags, $sformatf("flags=%b want %b", flags, mflags));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
