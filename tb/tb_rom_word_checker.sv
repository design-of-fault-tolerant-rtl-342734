// tb_rom_word_checker: self-checking test of the ROM word checker.
// Builds correctly coded words (odd parity computed here bit by bit), then
// checks that good words pass, that every single-bit flip is caught as a
// parity error and that a word read for the wrong address is caught as an
// address error.
module tb_rom_word_checker;
  localparam int DW = 16, AW = 5, CW = DW + AW, P0 = CW / 2;
  logic [AW-1:0]   addr;
  logic [CW+1:0]   word;
  logic            addr_err, par_err;
  int checks = 0, failures = 0;

  rom_word_checker dut (.*);

  function automatic logic [CW+1:0] make(logic [AW-1:0] a, logic [DW-1:0] d);
    logic [CW-1:0] b;
    int n0, n1;
    b = {a, d}; n0 = 0; n1 = 0;
    for (int i = 0; i < CW; i++)
      if (b[i]) begin if (i < P0) n0++; else n1++; end
    return {logic'(n1 % 2 == 0), logic'(n0 % 2 == 0), b};
  endfunction

  task automatic expect_(logic ae, logic pe, string what);
    #1;
    checks++;
    if (addr_err !== ae || par_err !== pe) begin
      failures++;
      $display("FAIL %s: addr=%0d word=%h addr_err=%b par_err=%b (want %b %b)",
               what, addr, word, addr_err, par_err, ae, pe);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [CW+1:0] good;
    for (int t = 0; t < 40; t++) begin
      addr = AW'($urandom);
      good = make(addr, DW'($urandom));
      word = good;
      expect_(1'b0, 1'b0, "good word");
      for (int i = 0; i < CW + 2; i++) begin
        word = good ^ ((CW+2)'(1) << i);
        // a flip inside the stored address also makes the address mismatch
        expect_(i >= DW && i < CW, 1'b1, "single flip");
      end
      // correctly coded word belonging to another address
      word = make(addr ^ AW'(1 + t % 31), DW'($urandom));
      expect_(1'b1, 1'b0, "wrong word");
    end
    // all-zero word: caught by odd parity
    addr = '0; word = '0;
    expect_(1'b0, 1'b1, "all zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
