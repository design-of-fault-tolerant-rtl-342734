// instruction_register: 16-bit IR loaded from the external data bus.
//
// As in the design's block diagram, its upper 10 bits (the opcode) address
// the IR decode ROM and its lower 6 bits go to the micro branch multiplexer
// (and, in this design, also name the two programmer registers rd = [5:3],
// rs = [2:0]). Load enable from the microword and reset to zero are this
// design's choices.
//
// Timing: loads at the rising clock edge when ld is set.
module instruction_register #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ld,
  input  logic [W-1:0] d,
  output logic [9:0]   opcode,
  output logic [5:0]   field
);
  logic [W-1:0] ir;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  ir <= '0;
    else if (ld) ir <= d;

  assign opcode = ir[W-1 -: 10];
  assign field  = ir[5:0];
endmodule
