// tb_micro_data_buffer: checks that reset gives the all-zero microword and
// that each clock captures the next word with one cycle of latency.
module tb_micro_data_buffer;
  logic        clk = 0, rst_n = 0;
  logic [63:0] d, q, prev;
  int checks = 0, failures = 0;

  micro_data_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '1;
    @(negedge clk);
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset q=%h", q); end
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      prev = d;
      d = {$urandom, $urandom};
      checks++;
      if (q !== prev) begin failures++; $display("FAIL q=%h want %h", q, prev); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
