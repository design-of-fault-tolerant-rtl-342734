// tb_micro_branch_mux: every select code with random inputs; the expected
// 3-bit condition group is written out per select code.
module tb_micro_branch_mux;
  import gc_pkg::*;
  brsel_e     sel;
  flags_t     flags;
  logic [5:0] ir_field;
  logic [2:0] ext, cond, want;
  int checks = 0, failures = 0;

  micro_branch_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 800; t++) begin
      sel = brsel_e'(t % 8);
      flags = flags_t'($urandom); ir_field = 6'($urandom); ext = 3'($urandom);
      case (t % 8)
        1: want = {flags.n, flags.z, flags.c};
        2: want = ir_field[5:3];
        3: want = ir_field[2:0];
        4: want = ext;
        default: want = 3'b000;
      endcase
      #1;
      checks++;
      if (cond !== want) begin
        failures++; $display("FAIL sel=%0d cond=%b want %b", t % 8, cond, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
