// tb_data_registers: random loads of the Data In, Data Out and Address
// registers with independent enables, checked against a model, plus reset.
module tb_data_registers;
  logic        clk = 0, rst_n = 0;
  logic [15:0] bus_rdata, y, din_q, dout_q, ar_q;
  logic        ld_din, ld_dout, ld_ar;
  logic [15:0] m_din, m_dout, m_ar;
  int checks = 0, failures = 0;

  data_registers dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld_din = 0; ld_dout = 0; ld_ar = 0; bus_rdata = 16'hFFFF; y = 16'hFFFF;
    @(negedge clk);
    checks++;
    if (din_q !== 0 || dout_q !== 0 || ar_q !== 0) begin
      failures++; $display("FAIL reset");
    end
    rst_n = 1; m_din = 0; m_dout = 0; m_ar = 0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      bus_rdata = 16'($urandom); y = 16'($urandom);
      ld_din = 1'($urandom); ld_dout = 1'($urandom); ld_ar = 1'($urandom);
      if (ld_din) m_din = bus_rdata;
      if (ld_dout) m_dout = y;
      if (ld_ar) m_ar = y;
      @(posedge clk); #1;
      checks++;
      if (din_q !== m_din || dout_q !== m_dout || ar_q !== m_ar) begin
        failures++;
        $display("FAIL din=%h/%h dout=%h/%h ar=%h/%h", din_q, m_din, dout_q, m_dout, ar_q, m_ar);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
