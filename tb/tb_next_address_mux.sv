// tb_next_address_mux: random dispatch / next-field / condition inputs; the
// expected microaddress is the chosen source with its low three bits OR-ed
// with the condition.
module tb_next_address_mux;
  logic       dispatch;
  logic [8:0] decode_addr, next_field, uaddr, src;
  logic [2:0] cond;
  int checks = 0, failures = 0;

  next_address_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      dispatch = 1'($urandom); decode_addr = 9'($urandom);
      next_field = 9'($urandom); cond = 3'($urandom);
      // a conditional branch target has its low three bits at zero
      if (t % 2 == 0) next_field[2:0] = 3'b000;
      src = dispatch ? decode_addr : next_field;
      #1;
      checks++;
      if (uaddr !== (src | {6'b0, cond})) begin
        failures++; $display("FAIL uaddr=%h src=%h cond=%b", uaddr, src, cond);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
