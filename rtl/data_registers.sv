// data_registers: the Data In, Data Out and Address registers, the buffers
// between the processor's internal buses and the external data and address
// buses.
//
// Data In register: takes the external data bus when ld_din is set; it
// drives the internal Data In bus. Data Out register: takes the internal
// Data Out bus (processing unit output) when ld_dout is set; it drives the
// external data bus for writes. Address register (AR): takes the Data Out
// bus when ld_ar is set; it drives the address bus. The three registers and
// their connections follow the design's block diagram; separate load enables
// from the microword and reset to zero are this design's choices.
//
// Timing: loads at the rising clock edge; outputs are the register contents.
module data_registers #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] bus_rdata,
  input  logic [W-1:0] y,
  input  logic         ld_din,
  input  logic         ld_dout,
  input  logic         ld_ar,
  output logic [W-1:0] din_q,
  output logic [W-1:0] dout_q,
  output logic [W-1:0] ar_q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      din_q  <= '0;
      dout_q <= '0;
      ar_q   <= '0;
    end else begin
      if (ld_din)  din_q  <= bus_rdata;
      if (ld_dout) dout_q <= y;
      if (ld_ar)   ar_q   <= y;
    end
  end
endmodule
