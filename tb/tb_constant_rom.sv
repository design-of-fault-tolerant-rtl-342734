// tb_constant_rom: reads every word of the constant ROM, checks that the
// checker reports no error, that each stored word carries its own address
// and odd parity in the 10/11-bit groups with the spare bit clear, and that
// every word, in particular the microdiagnostic operands and expected
// results and the syndrome bits, has the value worked out by hand below.
module tb_constant_rom;
  logic [4:0]  addr;
  logic [15:0] data;
  logic        addr_err, par_err;
  int checks = 0, failures = 0;

  constant_rom dut (.*);

  // hand-computed: a, b, expected for ADD, SUB (b-a), AND, OR, XOR
  localparam logic [15:0] EXP [32] = '{
    16'h5A5A, 16'hA5A6, 16'h0000,   // 5A5A + A5A6 = 1_0000
    16'h1234, 16'h8001, 16'h6DCD,   // 8001 - 1234
    16'hFF00, 16'h0FF0, 16'h0F00,
    16'hAAAA, 16'h5555, 16'hFFFF,
    16'h0F0F, 16'hFFFF, 16'hF0F0,
    16'h0000, 16'hFFF0, 16'hFFF1, 16'hFFF3, 16'hC3A5, 16'h3C5A,
    16'hFFFF, 16'h8000, 16'h7FFF,
    16'h0001, 16'h0002, 16'h0004, 16'h0008, 16'h0010, 16'h0020, 16'h0040,
    16'h5555
  };

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL addr %0d: %s", addr, what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] w;
    for (int i = 0; i < 32; i++) begin
      addr = 5'(i);
      #1;
      w = dut.mem[i];
      check(!addr_err && !par_err, "checker flags a good word");
      check(w[20:16] == 5'(i), "stored address");
      check(^{w[21], w[9:0]} == 1'b1, "parity over 10 bits is odd");
      check(^{w[22], w[20:10]} == 1'b1, "parity over 11 bits is odd");
      check(w[23] == 1'b0, "spare bit");
      check(data == w[15:0], "data field");
      check(data == EXP[i], $sformatf("value %h", data));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
