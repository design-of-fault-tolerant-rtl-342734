// control_section: the microprogrammed control unit.
//
// Path of one microinstruction, as in the design's block diagram:
//   IR[15:6] -> IR decode ROM -> start microaddress (9 bits)
//   next address multiplexer: start address (dispatch) or the current
//     microword's next-address field; low 3 bits OR-ed with the micro
//     branch multiplexer output (flags, IR[5:0] fields, external inputs)
//   -> control ROM (512 x 64) -> micro data buffer -> micro control bits.
// The micro data buffer is the only pipeline register, so a new microword
// starts every clock and a microbranch decided by one microword takes effect
// in the next one. The IR loads from the external data bus when the
// microword's ld_ir bit is set.
//
// Both ROMs are address-and-parity checked; rom_addr_err / rom_par_err are
// the OR of the two checkers, combinational, for the current read.
module control_section
  import gc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [DW-1:0]   bus_rdata,
  input  flags_t          flags,
  input  logic [2:0]      ubr_ext,
  output uword_t          uw,
  output logic [5:0]      ir_field,
  output logic [UA_W-1:0] uaddr,
  output logic            rom_addr_err,
  output logic            rom_par_err
);
  logic [OP_W-1:0] opcode;
  logic [UA_W-1:0] start_addr;
  logic [2:0]      cond;
  logic [UW_W-1:0] rom_word, buf_q;
  logic            dec_aerr, dec_perr, cs_aerr, cs_perr;

  assign uw = uword_t'(buf_q);

  instruction_register #(.W(DW)) u_ir (
    .clk    (clk),
    .rst_n  (rst_n),
    .ld     (uw.ld_ir),
    .d      (bus_rdata),
    .opcode (opcode),
    .field  (ir_field)
  );

  ir_decode_rom #(.ADDR_W(OP_W), .DATA_W(UA_W)) u_dec (
    .opcode     (opcode),
    .start_addr (start_addr),
    .addr_err   (dec_aerr),
    .par_err    (dec_perr)
  );

  micro_branch_mux u_brmux (
    .sel      (uw.br_sel),
    .flags    (flags),
    .ir_field (ir_field),
    .ext      (ubr_ext),
    .cond     (cond)
  );

  next_address_mux #(.UA_W(UA_W)) u_namux (
    .dispatch    (uw.dispatch),
    .decode_addr (start_addr),
    .next_field  (uw.next_addr),
    .cond        (cond),
    .uaddr       (uaddr)
  );

  control_rom #(.ADDR_W(UA_W), .DATA_W(UW_W)) u_cs (
    .uaddr    (uaddr),
    .uword    (rom_word),
    .addr_err (cs_aerr),
    .par_err  (cs_perr)
  );

  micro_data_buffer #(.W(UW_W)) u_mdb (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (rom_word),
    .q     (buf_q)
  );

  assign rom_addr_err = dec_aerr | cs_aerr;
  assign rom_par_err  = dec_perr | cs_perr;
endmodule
