// next_address_mux: forms the next microaddress.
//
// The multiplexer chooses between the start address from the IR decode ROM
// (dispatch) and the next-address field of the current microword. Its upper
// 6 bits go straight to the control ROM; its low 3 bits are OR-ed with the
// 3-bit output of the micro branch multiplexer. A conditional microbranch is
// coded with the low three bits of the next-address field at zero, so the
// condition selects one of eight consecutive microwords. This follows the
// design description and its block diagram (6 + 3 bits, OR gate).
// Purely combinational.
module next_address_mux #(
  parameter int unsigned UA_W = 9
) (
  input  logic            dispatch,
  input  logic [UA_W-1:0] decode_addr,
  input  logic [UA_W-1:0] next_field,
  input  logic [2:0]      cond,
  output logic [UA_W-1:0] uaddr
);
  logic [UA_W-1:0] sel;

  assign sel   = dispatch ? decode_addr : next_field;
  assign uaddr = {sel[UA_W-1:3], sel[2:0] | cond};
endmodule
