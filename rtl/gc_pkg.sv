// gc_pkg: types, constants and ROM contents shared by the graded-component
// fault-tolerant computer.
//
// The machine is a 16-bit horizontally microprogrammed processor. Its
// processing unit is four 4-bit bit slices, its control section is a
// pipelined microsequencer (IR -> IR decode ROM -> next address multiplexer
// with a 3-bit OR for microbranches -> 512 x 64 control ROM -> micro data
// buffer). Every ROM word carries, besides its data, a copy of its own
// address and two parity bits, so that a checker can detect a wrong word
// being read (address decoder fault) and corrupted bits (parity).
//
// Taken from the design description: 16-bit data path from four 4-bit
// slices, 16-bit IR split into a 10-bit opcode and a 6-bit field, 9-bit
// microaddresses whose three low bits are OR-ed with the micro branch
// condition, 64-bit microwords, a 32 x 16 constant ROM whose 24-bit words
// hold data, 5 address bits, one parity bit over 10 bits and one over 11
// bits and one unused bit.
//
// Own choices (the description is silent on them): the microword layout,
// the ALU function set, the instruction set and its opcodes, odd parity,
// which bits each parity bit covers, the constant ROM contents, and the
// microprogram itself (instruction microroutines and the microdiagnostic).
package gc_pkg;

  localparam int unsigned DW   = 16;  // data path width
  localparam int unsigned UA_W = 9;   // microaddress width
  localparam int unsigned UW_W = 64;  // microword width
  localparam int unsigned OP_W = 10;  // opcode width (IR[15:6])
  localparam int unsigned CR_AW = 5;  // constant ROM address width

  // ---------------------------------------------------------------- ALU
  typedef enum logic [2:0] {
    FN_ADD  = 3'd0,  // R + S + cin
    FN_SUBR = 3'd1,  // S - R  (S + ~R + cin)
    FN_SUBS = 3'd2,  // R - S  (R + ~S + cin)
    FN_OR   = 3'd3,
    FN_AND  = 3'd4,
    FN_XOR  = 3'd5,
    FN_XNOR = 3'd6,
    FN_NOTRS = 3'd7  // ~R & S
  } alu_fn_e;

  // Register address source: microword field or one of the IR fields.
  typedef enum logic [1:0] {
    RS_UW    = 2'd0,
    RS_IR_LO = 2'd1,  // {1'b0, IR[2:0]}
    RS_IR_HI = 2'd2,  // {1'b0, IR[5:3]}
    RS_RSVD  = 2'd3   // behaves as RS_UW
  } rsel_e;

  // Micro branch multiplexer select: which 3-bit group is OR-ed in.
  typedef enum logic [2:0] {
    BR_NONE  = 3'd0,  // 3'b000
    BR_FLAGS = 3'd1,  // {N, Z, C}
    BR_IR_HI = 3'd2,  // IR[5:3]
    BR_IR_LO = 3'd3,  // IR[2:0]
    BR_EXT   = 3'd4   // external micro branch inputs
  } brsel_e;

  // Data In bus source.
  typedef enum logic {
    DIN_REG  = 1'b0,  // Data In register (from the external data bus)
    DIN_CROM = 1'b1   // constant ROM
  } din_sel_e;

  typedef struct packed {
    logic n, z, c, v;
  } flags_t;

  // Horizontal microword, 64 bits, most significant field first.
  typedef struct packed {
    logic [14:0]  spare;
    logic         halt;       // machine stopped (HALT / fault loop)
    logic         st_restore; // flags <- saved copy
    logic         st_save;    // saved copy <- flags
    logic         st_ld;      // flags <- ALU result flags
    logic         err_set;    // microdiagnostic found an error
    logic         bus_wr;
    logic         bus_rd;
    logic         ld_ar;
    logic         ld_dout;
    logic         ld_din;
    logic         ld_ir;
    logic [4:0]   crom_addr;
    din_sel_e     din_sel;
    logic         cin;
    logic         reg_we;     // write F into register B
    logic         s_zero;     // S operand = 0 (else register B)
    logic         r_din;      // R operand = Data In bus (else register A)
    alu_fn_e      alu_fn;
    rsel_e        b_sel;
    logic [3:0]   b_addr;
    rsel_e        a_sel;
    logic [3:0]   a_addr;
    brsel_e       br_sel;
    logic         dispatch;   // next address from IR decode ROM
    logic [8:0]   next_addr;
  } uword_t;

  // ------------------------------------------------------- instruction set
  // Instruction word: {opcode[9:0], rd[2:0], rs[2:0]}.
  localparam logic [OP_W-1:0] OP_NOP  = 10'd0;
  localparam logic [OP_W-1:0] OP_ADD  = 10'd1;   // rd <- rd + rs
  localparam logic [OP_W-1:0] OP_SUB  = 10'd2;   // rd <- rd - rs
  localparam logic [OP_W-1:0] OP_AND  = 10'd3;
  localparam logic [OP_W-1:0] OP_OR   = 10'd4;
  localparam logic [OP_W-1:0] OP_XOR  = 10'd5;
  localparam logic [OP_W-1:0] OP_LDI  = 10'd8;   // rd <- next word
  localparam logic [OP_W-1:0] OP_LD   = 10'd9;   // rd <- mem[rs]
  localparam logic [OP_W-1:0] OP_ST   = 10'd10;  // mem[rs] <- rd
  localparam logic [OP_W-1:0] OP_JZ   = 10'd16;  // if Z: PC <- next word
  localparam logic [OP_W-1:0] OP_JMP  = 10'd17;  // PC <- next word
  localparam logic [OP_W-1:0] OP_DIAG = 10'd32;  // run microdiagnostic
  localparam logic [OP_W-1:0] OP_HALT = 10'd63;

  // ------------------------------------------------------- microaddresses
  localparam logic [8:0] UA_RESET = 9'h000;
  localparam logic [8:0] UA_FETCH = 9'h001;
  localparam logic [8:0] UA_ADD   = 9'h010;
  localparam logic [8:0] UA_SUB   = 9'h011;
  localparam logic [8:0] UA_AND   = 9'h012;
  localparam logic [8:0] UA_OR    = 9'h013;
  localparam logic [8:0] UA_XOR   = 9'h014;
  localparam logic [8:0] UA_LDI   = 9'h018;
  localparam logic [8:0] UA_LD    = 9'h020;
  localparam logic [8:0] UA_ST    = 9'h028;
  localparam logic [8:0] UA_JZ    = 9'h030;
  localparam logic [8:0] UA_JZ_T  = 9'h038;  // 8-way branch table on {N,Z,C}
  localparam logic [8:0] UA_JMP   = 9'h040;
  localparam logic [8:0] UA_HALT  = 9'h048;
  localparam logic [8:0] UA_DIAG  = 9'h050;  // microdiagnostic routine
  localparam logic [8:0] UA_DG_OK = 9'h0A0;  // diagnostic passed: restore
  localparam logic [8:0] UA_FAULT = 9'h0A8;  // diagnostic failed: stop
  localparam logic [8:0] UA_DG_T  = 9'h0B8;  // final 8-way branch table
  localparam logic [8:0] UA_DG_TB = 9'h100;  // 7 per-test branch tables

  // Register use: R0..R7 are the programmer's registers, R8..R14 belong to
  // the microcode (scratch for the microdiagnostic), R15 is the PC.
  localparam logic [3:0] R_PC  = 4'd15;
  localparam logic [3:0] R_T0  = 4'd8;
  localparam logic [3:0] R_T1  = 4'd9;
  localparam logic [3:0] R_ACC = 4'd10;  // OR of all microdiagnostic residues

  // ------------------------------------------------- bus diagnostic device
  localparam logic [DW-1:0] DIAG_BASE = 16'hFFF0;  // 4-word window
  localparam logic [1:0] DG_START  = 2'd0;  // write: start the sequence
  localparam logic [1:0] DG_ECHO   = 2'd1;  // write pattern, read back ~pattern
  localparam logic [1:0] DG_STATUS = 2'd3;  // read: {15'b0, err}

  // ------------------------------------------------------- constant ROM
  // Words 0..14: five microdiagnostic tests of three words each
  // (operand a, operand b, expected result); word 15: zero;
  // words 16..20: bus test addresses and patterns; 21..23 and 31: general
  // constants; 24..30: syndrome bits 1 << 0 .. 1 << 6 (one per test).
  localparam int unsigned N_UTESTS = 5;
  localparam alu_fn_e UTEST_FN [N_UTESTS] = '{FN_ADD, FN_SUBR, FN_AND, FN_OR, FN_XOR};
  localparam logic [DW-1:0] UTEST_A [N_UTESTS] =
    '{16'h5A5A, 16'h1234, 16'hFF00, 16'hAAAA, 16'h0F0F};
  localparam logic [DW-1:0] UTEST_B [N_UTESTS] =
    '{16'hA5A6, 16'h8001, 16'h0FF0, 16'h5555, 16'hFFFF};
  localparam logic [DW-1:0] DG_PATTERN = 16'hC3A5;

  // Reference ALU, used to compute expected results of the tests.
  function automatic logic [DW-1:0] alu_ref(alu_fn_e fn, logic [DW-1:0] r,
                                            logic [DW-1:0] s, logic cin);
    case (fn)
      FN_ADD:   return r + s + DW'(cin);
      FN_SUBR:  return s + ~r + DW'(cin);
      FN_SUBS:  return r + ~s + DW'(cin);
      FN_OR:    return r | s;
      FN_AND:   return r & s;
      FN_XOR:   return r ^ s;
      FN_XNOR:  return ~(r ^ s);
      default:  return ~r & s;
    endcase
  endfunction

  // Microdiagnostic test k computes  B_k fn A_k  with A_k on R and B_k on S.
  function automatic logic [DW-1:0] crom_data(logic [CR_AW-1:0] a);
    int unsigned k;
    k = int'(a) / 3;
    if (a < 5'd15) begin
      case (int'(a) % 3)
        0:       return UTEST_A[k];
        1:       return UTEST_B[k];
        default: return alu_ref(UTEST_FN[k], UTEST_A[k], UTEST_B[k],
                                UTEST_FN[k] == FN_SUBR);
      endcase
    end
    case (a)
      5'd15:   return 16'h0000;
      5'd16:   return DIAG_BASE;                     // START/window base
      5'd17:   return DIAG_BASE | 16'(DG_ECHO);
      5'd18:   return DIAG_BASE | 16'(DG_STATUS);
      5'd19:   return DG_PATTERN;
      5'd20:   return ~DG_PATTERN;                   // expected echo
      5'd21:   return 16'hFFFF;
      5'd22:   return 16'h8000;
      5'd23:   return 16'h7FFF;
      5'd31:   return 16'h5555;
      default: return 16'h0001 << (a - 5'd24);       // syndrome bits 0..6
    endcase
  endfunction

  // ---------------------------------------- checked ROM word format
  // Stored word = {p1, p0, addr, data}. p0 covers the low half of
  // {addr, data} (floor), p1 the rest; odd parity: each group including its
  // parity bit has an odd number of ones.
  function automatic int unsigned p0_width(int unsigned aw, int unsigned dw);
    return (aw + dw) / 2;
  endfunction

  // --------------------------------------------------- IR decode contents
  function automatic logic [UA_W-1:0] decode_entry(logic [OP_W-1:0] op);
    case (op)
      OP_ADD:  return UA_ADD;
      OP_SUB:  return UA_SUB;
      OP_AND:  return UA_AND;
      OP_OR:   return UA_OR;
      OP_XOR:  return UA_XOR;
      OP_LDI:  return UA_LDI;
      OP_LD:   return UA_LD;
      OP_ST:   return UA_ST;
      OP_JZ:   return UA_JZ;
      OP_JMP:  return UA_JMP;
      OP_DIAG: return UA_DIAG;
      OP_HALT: return UA_HALT;
      default: return UA_FETCH;  // undefined opcodes act as NOP
    endcase
  endfunction

  // ----------------------------------------------------- microprogram
  // Helpers that fill the ALU fields of a microword.
  // pass register a through the ALU (F = A + 0)
  function automatic uword_t u_pass_a(uword_t u, rsel_e sel, logic [3:0] a);
    u.a_sel = sel; u.a_addr = a; u.s_zero = 1'b1; u.alu_fn = FN_ADD;
    return u;
  endfunction
  // register b <- Data In bus
  function automatic uword_t u_load_d(uword_t u, rsel_e sel, logic [3:0] b);
    u.r_din = 1'b1; u.s_zero = 1'b1; u.alu_fn = FN_ADD;
    u.b_sel = sel; u.b_addr = b; u.reg_we = 1'b1;
    return u;
  endfunction
  // PC <- PC + 1
  function automatic uword_t u_inc_pc(uword_t u);
    u.a_addr = R_PC; u.b_addr = R_PC; u.s_zero = 1'b1; u.alu_fn = FN_ADD;
    u.cin = 1'b1; u.reg_we = 1'b1;
    return u;
  endfunction
  // b <- b fn a, flags loaded
  function automatic uword_t u_op(uword_t u, alu_fn_e fn, rsel_e asel,
                                  logic [3:0] a, rsel_e bsel, logic [3:0] b);
    u.a_sel = asel; u.a_addr = a; u.b_sel = bsel; u.b_addr = b;
    u.alu_fn = fn; u.cin = (fn == FN_SUBR || fn == FN_SUBS);
    u.reg_we = 1'b1; u.st_ld = 1'b1;
    return u;
  endfunction
  // b <- b fn D, with D taken from constant ROM word k
  function automatic uword_t u_op_crom(uword_t u, alu_fn_e fn, logic [4:0] k,
                                       logic [3:0] b);
    u.din_sel = DIN_CROM; u.crom_addr = k; u.r_din = 1'b1;
    u.b_addr = b; u.alu_fn = fn; u.cin = (fn == FN_SUBR || fn == FN_SUBS);
    u.reg_we = 1'b1;
    return u;
  endfunction

  // Microdiagnostic: seven tests, each ending in a residue that is zero
  // when the hardware is right. Layout of the straight-line part from
  // UA_DIAG (offset o):
  //   o = 0         save status, ACC <- 0
  //   o = 1+5k..    ALU test k (k = 0..4): T0 <- a_k, T1 <- b_k,
  //                 T1 <- T1 fn T0, T1 <- T1 ^ expected_k (flags),
  //                 branch on {N,Z,C}
  //   o = 26..34    bus echo test through the diagnostic device (test 5)
  //   o = 35..38    diagnostic device status test (test 6)
  //   o = 39, 40    flags <- ACC, branch on {N,Z,C} into UA_DG_T
  // Test t branches into its table at UA_DG_TB + 8t: with Z = 0 the entry
  // sets syndrome bit t in ACC (constant ROM word 24 + t), then all entries
  // continue with the next test. ACC is thus a fault-location syndrome; on
  // failure the fault loop puts it in the Data Out register.
  localparam int unsigned DG_BUS  = 1 + 5 * N_UTESTS;  // 26
  localparam int unsigned DG_STAT = DG_BUS + 9;        // 35
  localparam int unsigned DG_FIN  = DG_STAT + 4;       // 39
  localparam int unsigned DG_LEN  = DG_FIN + 2;        // 41
  localparam int unsigned N_DTESTS = N_UTESTS + 2;     // 7

  // offset in the straight-line part where test t+1 (or the end) begins
  function automatic int unsigned dg_next(int unsigned t);
    if (t + 1 < N_UTESTS)  return 1 + 5 * (t + 1);
    if (t + 1 == N_UTESTS) return DG_BUS;
    if (t == N_UTESTS)     return DG_STAT;
    return DG_FIN;
  endfunction

  // register b <- constant ROM word k (R = D, S = 0)
  function automatic uword_t u_crom_to_y(uword_t u, logic [4:0] k);
    u.din_sel = DIN_CROM; u.crom_addr = k;
    u.r_din = 1'b1; u.s_zero = 1'b1; u.alu_fn = FN_ADD;
    return u;
  endfunction

  function automatic uword_t diag_word(int unsigned o);
    uword_t u;
    int unsigned k, j;
    u = '0;
    u.next_addr = UA_DIAG + UA_W'(o + 1);
    if (o == 0) begin  // save status, ACC <- 0
      u.st_save = 1'b1;
      u.a_addr = R_ACC; u.b_addr = R_ACC; u.s_zero = 1'b1;
      u.alu_fn = FN_AND; u.reg_we = 1'b1;
    end else if (o < DG_BUS) begin
      k = (o - 1) / 5;
      j = (o - 1) % 5;
      case (j)
        0: begin  // T0 <- code in: operand a
          u.din_sel = DIN_CROM; u.crom_addr = 5'(3 * k);
          u = u_load_d(u, RS_UW, R_T0);
        end
        1: begin  // T1 <- operand b
          u.din_sel = DIN_CROM; u.crom_addr = 5'(3 * k + 1);
          u = u_load_d(u, RS_UW, R_T1);
        end
        2: begin  // T1 <- T1 fn T0  (R = T0, S = T1)
          u.a_addr = R_T0; u.b_addr = R_T1; u.alu_fn = UTEST_FN[k];
          u.cin = (UTEST_FN[k] == FN_SUBR); u.reg_we = 1'b1;
        end
        3: begin  // T1 <- T1 ^ expected code out, flags
          u = u_op_crom(u, FN_XOR, 5'(3 * k + 2), R_T1); u.st_ld = 1'b1;
        end
        default: begin
          u.br_sel = BR_FLAGS; u.next_addr = UA_DG_TB + UA_W'(8 * k);
        end
      endcase
    end else if (o < DG_STAT) begin
      case (o - DG_BUS)
        0: begin u = u_crom_to_y(u, 5'd16); u.ld_ar = 1'b1; end    // AR <- START
        1: u.bus_wr = 1'b1;                                        // START
        2: begin u = u_crom_to_y(u, 5'd17); u.ld_ar = 1'b1; end    // AR <- ECHO
        3: begin u = u_crom_to_y(u, 5'd19); u.ld_dout = 1'b1; end  // DOut <- pattern
        4: u.bus_wr = 1'b1;                                        // write pattern
        5: begin u.bus_rd = 1'b1; u.ld_din = 1'b1; end             // read ~pattern
        6: u = u_load_d(u, RS_UW, R_T0);                           // T0 <- echo
        7: begin  // T0 <- T0 ^ ~pattern, flags
          u = u_op_crom(u, FN_XOR, 5'd20, R_T0); u.st_ld = 1'b1;
        end
        default: begin
          u.br_sel = BR_FLAGS; u.next_addr = UA_DG_TB + UA_W'(8 * N_UTESTS);
        end
      endcase
    end else if (o < DG_FIN) begin
      case (o - DG_STAT)
        0: begin u = u_crom_to_y(u, 5'd18); u.ld_ar = 1'b1; end    // AR <- STATUS
        1: begin u.bus_rd = 1'b1; u.ld_din = 1'b1; end             // read status
        2: begin u = u_load_d(u, RS_UW, R_T0); u.st_ld = 1'b1; end // T0 <- status
        default: begin
          u.br_sel = BR_FLAGS; u.next_addr = UA_DG_TB + UA_W'(8 * (N_UTESTS + 1));
        end
      endcase
    end else if (o == DG_FIN) begin  // flags <- ACC
      u = u_pass_a(u, RS_UW, R_ACC); u.st_ld = 1'b1;
    end else begin                   // branch on the flags just loaded
      u.br_sel = BR_FLAGS; u.next_addr = UA_DG_T;
    end
    return u;
  endfunction

  // entry e of the branch table of test t: e[1] is the Z flag
  function automatic uword_t diag_table(int unsigned t, logic [2:0] e);
    uword_t u;
    u = '0;
    u.next_addr = UA_DIAG + UA_W'(dg_next(t));
    if (!e[1]) begin  // residue not zero: ACC <- ACC | (1 << t)
      u.din_sel = DIN_CROM; u.crom_addr = 5'(24 + t); u.r_din = 1'b1;
      u.b_addr = R_ACC; u.alu_fn = FN_OR; u.reg_we = 1'b1;
    end
    return u;
  endfunction

  function automatic uword_t ucode(logic [UA_W-1:0] ua);
    uword_t u;
    u = '0;
    u.next_addr = UA_FETCH;
    case (ua)
      UA_RESET: begin  // PC <- 0
        u.a_addr = R_PC; u.b_addr = R_PC; u.s_zero = 1'b1;
        u.alu_fn = FN_AND; u.reg_we = 1'b1;
      end
      UA_FETCH: begin  // AR <- PC
        u = u_pass_a(u, RS_UW, R_PC); u.ld_ar = 1'b1; u.next_addr = UA_FETCH + 9'd1;
      end
      UA_FETCH + 9'd1: begin  // IR <- mem[AR], PC <- PC + 1
        u = u_inc_pc(u); u.bus_rd = 1'b1; u.ld_ir = 1'b1;
        u.next_addr = UA_FETCH + 9'd2;
      end
      UA_FETCH + 9'd2: begin  // dispatch on opcode
        u.dispatch = 1'b1;
      end
      UA_ADD: u = u_op(u, FN_ADD,  RS_IR_LO, 4'd0, RS_IR_HI, 4'd0);
      UA_SUB: u = u_op(u, FN_SUBR, RS_IR_LO, 4'd0, RS_IR_HI, 4'd0);
      UA_AND: u = u_op(u, FN_AND,  RS_IR_LO, 4'd0, RS_IR_HI, 4'd0);
      UA_OR:  u = u_op(u, FN_OR,   RS_IR_LO, 4'd0, RS_IR_HI, 4'd0);
      UA_XOR: u = u_op(u, FN_XOR,  RS_IR_LO, 4'd0, RS_IR_HI, 4'd0);
      UA_LDI: begin
        u = u_pass_a(u, RS_UW, R_PC); u.ld_ar = 1'b1; u.next_addr = UA_LDI + 9'd1;
      end
      UA_LDI + 9'd1: begin
        u = u_inc_pc(u); u.bus_rd = 1'b1; u.ld_din = 1'b1; u.next_addr = UA_LDI + 9'd2;
      end
      UA_LDI + 9'd2: begin
        u = u_load_d(u, RS_IR_HI, 4'd0); u.st_ld = 1'b1;
      end
      UA_LD: begin
        u = u_pass_a(u, RS_IR_LO, 4'd0); u.ld_ar = 1'b1; u.next_addr = UA_LD + 9'd1;
      end
      UA_LD + 9'd1: begin
        u.bus_rd = 1'b1; u.ld_din = 1'b1; u.next_addr = UA_LD + 9'd2;
      end
      UA_LD + 9'd2: begin
        u = u_load_d(u, RS_IR_HI, 4'd0); u.st_ld = 1'b1;
      end
      UA_ST: begin
        u = u_pass_a(u, RS_IR_LO, 4'd0); u.ld_ar = 1'b1; u.next_addr = UA_ST + 9'd1;
      end
      UA_ST + 9'd1: begin
        u = u_pass_a(u, RS_IR_HI, 4'd0); u.ld_dout = 1'b1; u.next_addr = UA_ST + 9'd2;
      end
      UA_ST + 9'd2: begin
        u.bus_wr = 1'b1;
      end
      UA_JZ, UA_JMP: begin
        u = u_pass_a(u, RS_UW, R_PC); u.ld_ar = 1'b1; u.next_addr = ua + 9'd1;
      end
      UA_JZ + 9'd1: begin  // fetch target, step PC past it, branch on flags
        u = u_inc_pc(u); u.bus_rd = 1'b1; u.ld_din = 1'b1;
        u.br_sel = BR_FLAGS; u.next_addr = UA_JZ_T;
      end
      UA_JZ_T + 9'd2, UA_JZ_T + 9'd3, UA_JZ_T + 9'd6, UA_JZ_T + 9'd7: begin
        u = u_load_d(u, RS_UW, R_PC);  // Z = 1: PC <- target
      end
      UA_JMP + 9'd1: begin
        u.bus_rd = 1'b1; u.ld_din = 1'b1; u.next_addr = UA_JMP + 9'd2;
      end
      UA_JMP + 9'd2: u = u_load_d(u, RS_UW, R_PC);
      UA_HALT: begin
        u.halt = 1'b1; u.next_addr = UA_HALT;
      end
      UA_FAULT: begin  // stop; Data Out register shows the syndrome
        u = u_pass_a(u, RS_UW, R_ACC); u.ld_dout = 1'b1;
        u.halt = 1'b1; u.next_addr = UA_FAULT;
      end
      UA_DG_OK: begin  // all tests passed: restore status, resume
        u.st_restore = 1'b1;
      end
      default: begin
        u.next_addr = UA_FETCH;
        // ---------------- microdiagnostic routine
        if (ua >= UA_DIAG && ua < UA_DIAG + UA_W'(DG_LEN))
          u = diag_word(int'(ua) - int'(UA_DIAG));
        if (ua >= UA_DG_TB && ua < UA_DG_TB + UA_W'(8 * N_DTESTS))
          u = diag_table((int'(ua) - int'(UA_DG_TB)) / 8, ua[2:0]);
        // ---------------- final branch table: Z = 1 -> pass, else fault
        if (ua >= UA_DG_T && ua < UA_DG_T + 9'd8) begin
          if (ua[1]) u.next_addr = UA_DG_OK;
          else begin u.err_set = 1'b1; u.next_addr = UA_FAULT; end
        end
      end
    endcase
    return u;
  endfunction

endpackage
