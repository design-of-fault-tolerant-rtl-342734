// rom_word_checker: checks one word read from an address-and-parity
// protected ROM.
//
// Each protected ROM stores, next to its DATA_W data bits, the ADDR_W bits of
// the word's own address and two parity bits: p0 over the low
// P0_W = (ADDR_W+DATA_W)/2 bits of {addr, data}, p1 over the remaining bits.
// For the 32 x 16 constant ROM that is one parity bit over 10 bits and one
// over 11 bits, as in the design description. The checker compares the
// stored address with the address actually applied (a stuck or shorted
// address line, or a decoder fault, reads the wrong word) and recomputes
// both parity groups. Odd parity (a group plus its parity bit holds an odd
// number of ones, so an all-zero word is caught) and the split of the groups
// are this design's choices; the description names neither.
//
// Interface: addr is the applied address, word the stored word
// {p1, p0, stored_addr, data}. Purely combinational; addr_err and par_err are
// valid in the same cycle as the word.
module rom_word_checker #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ADDR_W = 5
) (
  input  logic [ADDR_W-1:0]          addr,
  input  logic [DATA_W+ADDR_W+1:0]   word,
  output logic                       addr_err,
  output logic                       par_err
);
  localparam int unsigned CW   = DATA_W + ADDR_W;  // checked bits
  localparam int unsigned P0_W = CW / 2;

  logic [CW-1:0] body;
  logic          p0, p1;

  assign body = word[CW-1:0];
  assign p0   = word[CW];
  assign p1   = word[CW+1];

  assign addr_err = (body[CW-1:DATA_W] != addr);
  // odd parity: the XOR of a group and its parity bit must be 1
  assign par_err  = !(^{p0, body[P0_W-1:0]}) || !(^{p1, body[CW-1:P0_W]});
endmodule
