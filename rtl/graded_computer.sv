// graded_computer: a 16-bit microprogrammed computer built for fault
// tolerance by a mix of coding, hardware checkers and time-domain testing.
//
// Organisation (the design's block diagram):
//   Data In bus  <- Data In register (external data bus) or constant ROM
//   processing unit (4 x 4-bit slices): Data In bus -> Data Out bus
//   Data Out bus -> Data Out register (external data bus)
//                -> Address register (address bus)
//   external data bus -> IR -> control section (IR decode ROM, micro branch
//   mux, next address mux + OR, control ROM, micro data buffer)
//   bus diagnostic device: memory mapped on the external bus
// Fault-tolerance mechanisms:
//   - constant ROM, IR decode ROM and control ROM store their own address
//     and two parity bits per word; checkers flag a wrong word or bad
//     parity (rom_err, sticky);
//   - the DIAG instruction (issued by the operating system when idle) runs a
//     microdiagnostic routine: save status, apply known code inputs from the
//     constant ROM to the processing unit and compare the code outputs with
//     stored correct results, exercise the bus through the diagnostic
//     device, restore status. Each failing test sets its bit in a syndrome.
//     An error sets udiag_fail and stops the machine (halted) in a fault
//     loop that shows the syndrome on mem_wdata, for operator-run fault
//     location;
//   - the diagnostic device flags bus control-line misbehaviour (bus_fault).
// Memory and peripherals are outside: mem_* is a single-cycle bus; the
// address is the AR, write data the Data Out register, mem_rd/mem_wr are
// one-clock strobes, and read data must be valid in the mem_rd cycle.
// Cycles to the diagnostic device window are answered internally (mem_rd
// and mem_wr are still driven). The instruction set, microword and
// microprogram are this design's own (see gc_pkg).
module graded_computer
  import gc_pkg::*;
#(
  parameter logic [DW-1:0] DIAG_BASE_ADDR = DIAG_BASE
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic [DW-1:0]   mem_addr,
  output logic [DW-1:0]   mem_wdata,
  output logic            mem_rd,
  output logic            mem_wr,
  input  logic [DW-1:0]   mem_rdata,
  input  logic [2:0]      ubr_ext,
  output logic            halted,
  output logic            udiag_fail,
  output logic            rom_err,
  output logic            bus_fault,
  output logic            bus_test_done,
  output logic [UA_W-1:0] uaddr
);
  uword_t        uw;
  flags_t        flags;
  logic [5:0]    ir_field;
  logic [DW-1:0] din_bus, dout_bus, din_q, dout_q, ar_q, bus_rdata;
  logic [DW-1:0] crom_data_w, dg_rdata;
  logic          crom_aerr, crom_perr, cs_aerr, cs_perr;
  logic          dg_sel, dg_err, dg_done;

  control_section u_ctl (
    .clk          (clk),
    .rst_n        (rst_n),
    .bus_rdata    (bus_rdata),
    .flags        (flags),
    .ubr_ext      (ubr_ext),
    .uw           (uw),
    .ir_field     (ir_field),
    .uaddr        (uaddr),
    .rom_addr_err (cs_aerr),
    .rom_par_err  (cs_perr)
  );

  constant_rom u_crom (
    .addr     (uw.crom_addr),
    .data     (crom_data_w),
    .addr_err (crom_aerr),
    .par_err  (crom_perr)
  );

  assign din_bus = (uw.din_sel == DIN_CROM) ? crom_data_w : din_q;

  processing_unit u_pu (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (din_bus),
    .ctl   (uw),
    .ir_hi (ir_field[5:3]),
    .ir_lo (ir_field[2:0]),
    .y     (dout_bus),
    .flags (flags)
  );

  data_registers #(.W(DW)) u_regs (
    .clk       (clk),
    .rst_n     (rst_n),
    .bus_rdata (bus_rdata),
    .y         (dout_bus),
    .ld_din    (uw.ld_din),
    .ld_dout   (uw.ld_dout),
    .ld_ar     (uw.ld_ar),
    .din_q     (din_q),
    .dout_q    (dout_q),
    .ar_q      (ar_q)
  );

  diagnostic_device #(.BASE(DIAG_BASE_ADDR)) u_diag (
    .clk   (clk),
    .rst_n (rst_n),
    .addr  (ar_q),
    .wdata (dout_q),
    .rd    (uw.bus_rd),
    .wr    (uw.bus_wr),
    .sel   (dg_sel),
    .rdata (dg_rdata),
    .err   (dg_err),
    .done  (dg_done)
  );

  assign bus_rdata = dg_sel ? dg_rdata : mem_rdata;
  assign mem_addr  = ar_q;
  assign mem_wdata = dout_q;
  assign mem_rd    = uw.bus_rd;
  assign mem_wr    = uw.bus_wr;
  assign halted    = uw.halt;
  assign bus_fault     = dg_err;
  assign bus_test_done = dg_done;

  // Sticky fault indications.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rom_err    <= 1'b0;
      udiag_fail <= 1'b0;
    end else begin
      if (crom_aerr || crom_perr || cs_aerr || cs_perr) rom_err <= 1'b1;
      if (uw.err_set) udiag_fail <= 1'b1;
    end
  end

  // The processor never drives both bus strobes in one microword.
  a_strobes: assert property (@(posedge clk) disable iff (!rst_n)
                              !(mem_rd && mem_wr));
endmodule
