// constant_rom: 32 x 16 ROM of vectors and constants on the Data In bus,
// protected by a stored address and two parity bits.
//
// Each 24-bit word (built from three 32 x 8 ROMs) holds 16 data bits, the
// 5 bits of the word's own address, one parity bit over 10 bits, one over
// 11 bits and one unused bit, all as in the design description:
//   [15:0] data  [20:16] own address  [21] p0  [22] p1  [23] unused (0)
// On every read the checker (rom_word_checker, the part meant to be built of
// high-grade components) compares the stored address with the applied one
// and checks both parity groups. The contents are this design's own:
// gc_pkg::crom_data gives the microdiagnostic test operands and expected
// results, the bus-test constants and some general constants; p0 covers
// data[9:0], p1 covers {address, data[15:10]}, odd parity.
//
// Interface: asynchronous read; data, addr_err and par_err follow addr
// combinationally in the same cycle.
module constant_rom
  import gc_pkg::*;
#(
  parameter int unsigned DEPTH    = 32,
  parameter int unsigned DATA_W   = 16,
  parameter int unsigned ADDR_W   = 5,
  parameter int unsigned STORED_W = 24
) (
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data,
  output logic              addr_err,
  output logic              par_err
);
  localparam int unsigned CW   = DATA_W + ADDR_W;
  localparam int unsigned P0_W = CW / 2;

  logic [STORED_W-1:0] mem [DEPTH];

  function automatic logic [STORED_W-1:0] encode(logic [ADDR_W-1:0] a,
                                                 logic [DATA_W-1:0] d);
    logic [CW-1:0] body;
    body = {a, d};
    return STORED_W'({~(^body[CW-1:P0_W]), ~(^body[P0_W-1:0]), body});
  endfunction

  initial begin
    for (int i = 0; i < DEPTH; i++)
      mem[i] = encode(ADDR_W'(i), DATA_W'(crom_data(CR_AW'(i))));
  end

  logic [STORED_W-1:0] word;
  assign word = mem[addr];
  assign data = word[DATA_W-1:0];

  rom_word_checker #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_chk (
    .addr     (addr),
    .word     (word[CW+1:0]),
    .addr_err (addr_err),
    .par_err  (par_err)
  );
endmodule
