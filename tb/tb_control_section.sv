// tb_control_section: runs the microsequencer from reset with instruction
// words presented on the data bus and checks the microaddress of every
// cycle against the sequence worked out by hand: reset word, three fetch
// microwords, dispatch into ADD, back to fetch, dispatch into JZ and the
// conditional microbranch on the {N,Z,C} flags (Z=1, C=1: 0x038 | 3'b011).
// Also checks that the ROM checkers stay quiet and the IR load timing.
module tb_control_section;
  import gc_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic [15:0] bus_rdata;
  flags_t      flags;
  logic [2:0]  ubr_ext;
  uword_t      uw;
  logic [5:0]  ir_field;
  logic [8:0]  uaddr;
  logic        rom_addr_err, rom_par_err;
  int checks = 0, failures = 0;

  control_section dut (.*);
  always #5 clk = ~clk;

  localparam logic [8:0] EXP [11] = '{9'h001, 9'h002, 9'h003, 9'h010, 9'h001,
      9'h002, 9'h003, 9'h030, 9'h031, 9'h03B, 9'h001};

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flags = '{n: 1'b0, z: 1'b1, c: 1'b1, v: 1'b0};
    ubr_ext = 3'b000;
    bus_rdata = {OP_ADD, 3'd1, 3'd2};
    @(negedge clk);
    check(uaddr == 9'h000, "reset microaddress");
    rst_n = 1;
    for (int i = 0; i < 11; i++) begin
      @(posedge clk); #1;
      check(uaddr == EXP[i], $sformatf("cycle %0d: uaddr %h want %h", i + 1, uaddr, EXP[i]));
      check(!rom_addr_err && !rom_par_err, "ROM checker");
      if (i == 2) check(uw.ld_ir && uw.bus_rd, "fetch microword loads IR");
      if (i == 3) begin
        check(ir_field == 6'o12, "IR field");
        bus_rdata = {OP_JZ, 6'o00};
      end
      if (i == 4) check(uw.reg_we && uw.st_ld && uw.b_sel == RS_IR_HI, "ADD microword");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
