// micro_data_buffer: the pipeline register that holds the microword being
// executed; its outputs are the micro control bits of the whole machine.
//
// It takes the control ROM output at every rising clock edge. While one
// microword executes, the next microaddress is formed from it and the next
// microword is read, so each microinstruction takes one clock. Reset clears
// it to the all-zero microword, which does nothing and names microaddress 0
// as its successor, so execution starts at microaddress 0. The register
// itself is in the design's block diagram; the reset value is this design's
// choice.
module micro_data_buffer #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) q <= '0;
    else        q <= d;
endmodule
