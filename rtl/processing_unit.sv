// processing_unit: the 16-bit processing unit, four 4-bit bit slices with
// ripple carry, plus the condition-code register and its save copy.
//
// Data enters from the Data In bus (d) and leaves on the Data Out bus (y).
// All slices share the register addresses and ALU controls taken from the
// current microword; a register address comes either from the microword or
// from one of the two 3-bit register fields of the IR (programmer registers
// R0-R7; R8-R15 are reserved for the microcode). The four-slice, 16-bit
// organisation follows the design description; the slice contents, flags
// and register field convention are this design's choices.
//
// Status: flags {N, Z, C, V} are loaded from the ALU result when st_ld is
// set. For the switch into microdiagnostic mode the description requires the
// processor status to be saved and restored: st_save copies the flags into a
// save register and st_restore copies them back.
//
// Timing: y is combinational from the controls and d; register writes and
// flag updates occur at the rising clock edge. Flags reset to zero.
module processing_unit
  import gc_pkg::*;
#(
  parameter int unsigned SLICES  = 4,
  parameter int unsigned SLICE_W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [SLICES*SLICE_W-1:0] d,
  input  uword_t       ctl,
  input  logic [2:0]   ir_hi,
  input  logic [2:0]   ir_lo,
  output logic [SLICES*SLICE_W-1:0] y,
  output flags_t       flags
);
  localparam int unsigned N = SLICES * SLICE_W;

  logic [SLICES:0]   carry;
  logic [SLICES-1:0] ovr;
  logic [3:0]        a_addr, b_addr;
  flags_t            alu_flags, saved;

  function automatic logic [3:0] reg_addr(rsel_e sel, logic [3:0] uw_addr,
                                          logic [2:0] hi, logic [2:0] lo);
    case (sel)
      RS_IR_LO: return {1'b0, lo};
      RS_IR_HI: return {1'b0, hi};
      default:  return uw_addr;
    endcase
  endfunction

  assign a_addr   = reg_addr(ctl.a_sel, ctl.a_addr, ir_hi, ir_lo);
  assign b_addr   = reg_addr(ctl.b_sel, ctl.b_addr, ir_hi, ir_lo);
  assign carry[0] = ctl.cin;

  for (genvar i = 0; i < SLICES; i++) begin : g_slice
    bit_slice #(.W(SLICE_W), .NREGS(16)) u_slice (
      .clk    (clk),
      .a_addr (a_addr),
      .b_addr (b_addr),
      .d      (d[i*SLICE_W +: SLICE_W]),
      .fn     (ctl.alu_fn),
      .r_din  (ctl.r_din),
      .s_zero (ctl.s_zero),
      .we     (ctl.reg_we),
      .cin    (carry[i]),
      .f      (y[i*SLICE_W +: SLICE_W]),
      .cout   (carry[i+1]),
      .ovr    (ovr[i])
    );
  end

  assign alu_flags = '{n: y[N-1], z: (y == '0), c: carry[SLICES], v: ovr[SLICES-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flags <= '0;
      saved <= '0;
    end else begin
      if (ctl.st_save)         saved <= flags;
      if (ctl.st_restore)      flags <= saved;
      else if (ctl.st_ld)      flags <= alu_flags;
    end
  end
endmodule
