// control_rom: the main control store, 512 words of 64-bit horizontal
// microcode, with the same address and parity protection as the other ROMs.
//
// The 9-bit microaddress (6 bits straight from the next address
// multiplexer, 3 bits from the OR with the micro branch condition) and the
// 64-bit output are those of the design's block diagram. Each stored word is
//   [63:0] microword  [72:64] own address  [73] p0  [74] p1
// p0 covers the low 36 bits of {address, microword}, p1 the upper 37; odd
// parity. The microword layout (gc_pkg::uword_t) and the microprogram
// (gc_pkg::ucode: fetch, dispatch, the instruction microroutines and the
// microdiagnostic routine) are this design's own.
//
// Interface: asynchronous read; the micro data buffer registers the output.
module control_rom
  import gc_pkg::*;
#(
  parameter int unsigned ADDR_W = 9,
  parameter int unsigned DATA_W = 64
) (
  input  logic [ADDR_W-1:0] uaddr,
  output logic [DATA_W-1:0] uword,
  output logic              addr_err,
  output logic              par_err
);
  localparam int unsigned DEPTH = 1 << ADDR_W;
  localparam int unsigned CW    = DATA_W + ADDR_W;
  localparam int unsigned P0_W  = CW / 2;

  logic [CW+1:0] mem [DEPTH];

  function automatic logic [CW+1:0] encode(logic [ADDR_W-1:0] a,
                                           logic [DATA_W-1:0] d);
    logic [CW-1:0] body;
    body = {a, d};
    return {~(^body[CW-1:P0_W]), ~(^body[P0_W-1:0]), body};
  endfunction

  initial begin
    for (int i = 0; i < DEPTH; i++)
      mem[i] = encode(ADDR_W'(i), DATA_W'(ucode(UA_W'(i))));
  end

  logic [CW+1:0] word;
  assign word  = mem[uaddr];
  assign uword = word[DATA_W-1:0];

  rom_word_checker #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_chk (
    .addr     (uaddr),
    .word     (word),
    .addr_err (addr_err),
    .par_err  (par_err)
  );
endmodule
