// tb_ir_decode_rom: checks the opcode -> start microaddress map of the IR
// decode ROM for the defined opcodes (addresses written out here), that
// undefined opcodes go to the fetch microroutine, and that the checker
// accepts all 1024 words.
module tb_ir_decode_rom;
  logic [9:0] opcode;
  logic [8:0] start_addr;
  logic       addr_err, par_err;
  int checks = 0, failures = 0;

  ir_decode_rom dut (.*);

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL op %0d: %s (got %h)", opcode, what, start_addr); end
  endtask

  function automatic logic [8:0] want(int op);
    case (op)
      1: return 9'h010;  2: return 9'h011;  3: return 9'h012;
      4: return 9'h013;  5: return 9'h014;  8: return 9'h018;
      9: return 9'h020; 10: return 9'h028; 16: return 9'h030;
      17: return 9'h040; 32: return 9'h050; 63: return 9'h048;
      default: return 9'h001;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      opcode = 10'(i);
      #1;
      check(!addr_err && !par_err, "checker error");
      check(start_addr == want(i), "start address");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
