// ir_decode_rom: maps the 10-bit opcode in IR[15:6] to the 9-bit start
// microaddress of its microroutine.
//
// Like the constant ROM, every word also stores its own 10-bit address and
// two parity bits, and rom_word_checker checks each read. Word layout:
//   [8:0] start microaddress  [18:9] own address  [19] p0  [20] p1
// The 10-bit address and 9-bit output widths are those of the design's
// block diagram; the opcode assignment (gc_pkg::decode_entry, undefined
// opcodes go to the fetch microroutine), odd parity and the parity groups
// (p0 over the low 9 bits, p1 over the upper 10) are this design's choices.
//
// Interface: asynchronous read; outputs follow opcode combinationally.
module ir_decode_rom
  import gc_pkg::*;
#(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DATA_W = 9
) (
  input  logic [ADDR_W-1:0] opcode,
  output logic [DATA_W-1:0] start_addr,
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
      mem[i] = encode(ADDR_W'(i), DATA_W'(decode_entry(OP_W'(i))));
  end

  logic [CW+1:0] word;
  assign word       = mem[opcode];
  assign start_addr = word[DATA_W-1:0];

  rom_word_checker #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_chk (
    .addr     (opcode),
    .word     (word),
    .addr_err (addr_err),
    .par_err  (par_err)
  );
endmodule
