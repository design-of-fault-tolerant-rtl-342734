// tb_diagnostic_device: drives bus cycles into the device window.
// 1. the correct sequence (START, write ECHO, read ECHO, read STATUS) must
//    return the complemented pattern, status 0, set done and leave err 0;
// 2. cycles outside the window are ignored;
// 3. each bus fault kind must set err: both strobes at once, a strobe held
//    for two cycles, an out-of-sequence cycle. Reset clears err in between.
module tb_diagnostic_device;
  import gc_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic [15:0] addr, wdata, rdata;
  logic        rd, wr, sel, err, done;
  int checks = 0, failures = 0;

  diagnostic_device dut (.*);
  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one bus cycle, strobes for one clock, followed by one idle clock
  task automatic cyc(logic r, logic w, logic [1:0] off, logic [15:0] data,
                     output logic [15:0] rdv);
    @(negedge clk);
    addr = DIAG_BASE | 16'(off); wdata = data; rd = r; wr = w;
    #1 rdv = rdata;
    @(negedge clk);
    rd = 0; wr = 0; addr = 16'h0100;
  endtask

  task automatic do_reset();
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v, p;
    rd = 0; wr = 0; addr = 0; wdata = 0;
    do_reset();
    for (int t = 0; t < 20; t++) begin
      p = 16'($urandom);
      cyc(0, 1, DG_START, 16'h0, v);
      cyc(0, 1, DG_ECHO, p, v);
      cyc(1, 0, DG_ECHO, 16'h0, v);
      check(v == ~p, $sformatf("echo %h for %h", v, p));
      cyc(1, 0, DG_STATUS, 16'h0, v);
      check(v == 16'h0, "status clean");
      @(negedge clk);
      check(done && !err, "good sequence completes without error");
    end
    // outside the window: any traffic is ignored
    @(negedge clk); addr = 16'h1234; rd = 1;
    #1 check(!sel, "sel outside window");
    @(negedge clk); rd = 0; wr = 1;
    @(negedge clk); wr = 0;
    @(negedge clk);
    check(!err, "traffic outside window ignored");
    // fault 1: both strobes
    cyc(1, 1, DG_ECHO, 16'h0, v);
    @(negedge clk); check(err, "both strobes flagged");
    cyc(1, 0, DG_STATUS, 16'h0, v);
    check(v == 16'h1, "status shows error");
    do_reset();
    check(!err, "reset clears error");
    // fault 2: read strobe stuck for two cycles
    cyc(0, 1, DG_START, 16'h0, v);
    cyc(0, 1, DG_ECHO, 16'h5555, v);
    @(negedge clk); addr = DIAG_BASE | 16'(DG_ECHO); rd = 1;
    @(negedge clk); @(negedge clk); rd = 0;
    @(negedge clk); check(err, "stuck strobe flagged");
    do_reset();
    // fault 2b: read strobe stuck on STATUS, which is legal at any time
    @(negedge clk); addr = DIAG_BASE | 16'(DG_STATUS); rd = 1;
    @(negedge clk); check(!err, "single status read is fine");
    @(negedge clk); rd = 0;
    @(negedge clk); check(err, "stuck status read flagged");
    do_reset();
    // fault 3: out-of-sequence (read ECHO before writing it)
    cyc(0, 1, DG_START, 16'h0, v);
    @(negedge clk); check(!err, "start alone is fine");
    cyc(1, 0, DG_ECHO, 16'h0, v);
    @(negedge clk); check(err, "out-of-sequence flagged");
    do_reset();
    // fault 4: ECHO write with no START
    cyc(0, 1, DG_ECHO, 16'h0, v);
    @(negedge clk); check(err && !done, "write without start flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
