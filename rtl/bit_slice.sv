// bit_slice: one 4-bit slice of the processing unit.
//
// The processing unit is built, as the design prescribes, from four 4-bit
// bit-slice processors cascaded into a 16-bit machine. The description does
// not give the slice's insides, so this is a minimal slice in the spirit of
// the classic bit-slice parts: a 16 x W two-port register file (A and B read
// ports, write port at address B), an R operand that is register A or the
// slice's share of the Data In bus, an S operand that is register B or zero,
// and an 8-function ALU (gc_pkg::alu_fn_e) with carry in and carry out for
// ripple cascading. The result F is also the slice's Data Out bus share.
//
// Timing: register reads and the ALU are combinational; when we is high the
// register at b_addr takes F at the rising clock edge. The register file is
// not reset (the microcode initialises what it uses).
module bit_slice
  import gc_pkg::*;
#(
  parameter int unsigned W     = 4,
  parameter int unsigned NREGS = 16
) (
  input  logic                     clk,
  input  logic [$clog2(NREGS)-1:0] a_addr,
  input  logic [$clog2(NREGS)-1:0] b_addr,
  input  logic [W-1:0]             d,
  input  alu_fn_e                  fn,
  input  logic                     r_din,
  input  logic                     s_zero,
  input  logic                     we,
  input  logic                     cin,
  output logic [W-1:0]             f,
  output logic                     cout,
  output logic                     ovr
);
  logic [W-1:0] regs [NREGS];
  logic [W-1:0] r, s;
  logic [W:0]   sum;
  logic         c_msb;  // carry into the most significant bit

  assign r = r_din  ? d : regs[a_addr];
  assign s = s_zero ? '0 : regs[b_addr];

  always_comb begin
    sum   = '0;
    c_msb = 1'b0;
    unique case (fn)
      FN_ADD:  sum = {1'b0, r} + {1'b0, s} + (W+1)'(cin);
      FN_SUBR: sum = {1'b0, s} + {1'b0, ~r} + (W+1)'(cin);
      FN_SUBS: sum = {1'b0, r} + {1'b0, ~s} + (W+1)'(cin);
      FN_OR:   sum = {1'b0, r | s};
      FN_AND:  sum = {1'b0, r & s};
      FN_XOR:  sum = {1'b0, r ^ s};
      FN_XNOR: sum = {1'b0, ~(r ^ s)};
      default: sum = {1'b0, ~r & s};
    endcase
    // carry into the MSB, recovered from the MSB sum bit and its operands
    unique case (fn)
      FN_ADD:  c_msb = sum[W-1] ^ r[W-1] ^ s[W-1];
      FN_SUBR: c_msb = sum[W-1] ^ ~r[W-1] ^ s[W-1];
      FN_SUBS: c_msb = sum[W-1] ^ r[W-1] ^ ~s[W-1];
      default: c_msb = 1'b0;
    endcase
  end

  assign f    = sum[W-1:0];
  assign cout = sum[W];
  assign ovr  = c_msb ^ sum[W];

  always_ff @(posedge clk)
    if (we) regs[b_addr] <= f;
endmodule
