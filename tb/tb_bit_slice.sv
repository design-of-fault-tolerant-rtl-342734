// tb_bit_slice: random operations on one 4-bit slice against a reference
// model of its register file and ALU written here (carry out and overflow
// are worked out from 32-bit integer arithmetic).
module tb_bit_slice;
  import gc_pkg::*;
  logic       clk = 0;
  logic [3:0] a_addr, b_addr, d, f;
  alu_fn_e    fn;
  logic       r_din, s_zero, we, cin, cout, ovr;
  logic [3:0] model [16];
  int checks = 0, failures = 0;

  bit_slice dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r, s, res, sr, ss, sres;
    logic [3:0] ef; logic ec, ev;
    fn = FN_ADD; r_din = 1; s_zero = 1; cin = 0; d = 0;
    // initialise all registers through D
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); b_addr = 4'(i); a_addr = 0; d = 4'($urandom); we = 1;
      model[i] = d;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      a_addr = 4'($urandom); b_addr = 4'($urandom); d = 4'($urandom);
      fn = alu_fn_e'($urandom % 8); r_din = 1'($urandom); s_zero = 1'($urandom);
      cin = 1'($urandom); we = 1'($urandom);
      r = r_din ? int'(d) : int'(model[a_addr]);
      s = s_zero ? 0 : int'(model[b_addr]);
      ec = 0; ev = 0;
      case (fn)
        FN_ADD:  begin res = r + s + int'(cin); sr = r; ss = s; end
        FN_SUBR: begin res = s + (15 - r) + int'(cin); sr = 15 - r; ss = s; end
        FN_SUBS: begin res = r + (15 - s) + int'(cin); sr = r; ss = 15 - s; end
        FN_OR:   res = r | s;
        FN_AND:  res = r & s;
        FN_XOR:  res = r ^ s;
        FN_XNOR: res = 15 - (r ^ s);
        default: res = (15 - r) & s;
      endcase
      ef = 4'(res);
      if (fn inside {FN_ADD, FN_SUBR, FN_SUBS}) begin
        ec = res > 15;
        // signed overflow: operands as signed 4-bit numbers
        sres = ((sr > 7) ? sr - 16 : sr) + ((ss > 7) ? ss - 16 : ss) + int'(cin);
        ev = sres > 7 || sres < -8;
      end
      #1;
      checks++;
      if (f !== ef || cout !== ec || ovr !== ev) begin
        failures++;
        $display("FAIL fn=%s r=%0d s=%0d cin=%b: f=%h c=%b v=%b want %h %b %b",
                 fn.name(), r, s, cin, f, cout, ovr, ef, ec, ev);
      end
      if (we) model[b_addr] = ef;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
