// micro_branch_mux: selects which 3-bit group of micro branch inputs is
// OR-ed into the low three bits of the next microaddress.
//
// The description says the micro branch inputs "could be condition code
// outputs etc." and the block diagram feeds the 6-bit IR field in; the
// groups and their select codes (gc_pkg::brsel_e) are this design's choice:
//   BR_NONE  000          BR_FLAGS {N, Z, C}
//   BR_IR_HI IR[5:3]      BR_IR_LO IR[2:0]
//   BR_EXT   external inputs            other codes: 000
// Purely combinational.
module micro_branch_mux
  import gc_pkg::*;
(
  input  brsel_e     sel,
  input  flags_t     flags,
  input  logic [5:0] ir_field,
  input  logic [2:0] ext,
  output logic [2:0] cond
);
  always_comb begin
    case (sel)
      BR_FLAGS: cond = {flags.n, flags.z, flags.c};
      BR_IR_HI: cond = ir_field[5:3];
      BR_IR_LO: cond = ir_field[2:0];
      BR_EXT:   cond = ext;
      default:  cond = 3'b000;
    endcase
  end
endmodule
