// tb_instruction_register: loads random words and checks the 10-bit opcode
// and 6-bit field outputs, that the IR holds without ld, and reset.
module tb_instruction_register;
  logic        clk = 0, rst_n = 0, ld;
  logic [15:0] d, m;
  logic [9:0]  opcode;
  logic [5:0]  field;
  int checks = 0, failures = 0;

  instruction_register dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld = 0; d = 16'hFFFF;
    @(negedge clk);
    checks++;
    if (opcode !== 0 || field !== 0) begin failures++; $display("FAIL reset"); end
    rst_n = 1; m = 0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      d = 16'($urandom); ld = 1'($urandom);
      if (ld) m = d;
      @(posedge clk); #1;
      checks++;
      if (opcode !== m[15:6] || field !== m[5:0]) begin
        failures++; $display("FAIL opcode=%h field=%h want %h", opcode, field, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
