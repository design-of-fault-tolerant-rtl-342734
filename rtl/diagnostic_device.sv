// diagnostic_device: memory-mapped device that checks the control lines of
// the external bus.
//
// The description calls for a microprogrammed device on the bus which, when
// addressed by the processor, goes through a dummy set of sequences and
// checks all bus control signals. It gives no sequence, so this one is this
// design's own. The device occupies four words at BASE:
//   BASE+0 START  write: (re)starts the sequence
//   BASE+1 ECHO   write: store a pattern; read: returns its complement
//   BASE+3 STATUS read: {15'b0, err}; may be read at any time
// Its sequence table (its microprogram, SEQ below) lists the bus cycles it
// expects after START: write ECHO, read ECHO, read STATUS. Each cycle inside
// the window is checked against the table:
//   - read and write strobes active together           -> error
//   - a strobe active in two consecutive cycles (stuck) -> error
//   - a cycle of the wrong kind or to the wrong offset  -> error
// err is sticky until reset (it is the fault indication); done is set when a
// whole sequence has completed. Reads are combinational (rdata valid in the
// cycle of rd); writes and the sequencer step at the rising clock edge.
module diagnostic_device
  import gc_pkg::*;
#(
  parameter logic [DW-1:0] BASE = DIAG_BASE
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] addr,
  input  logic [DW-1:0] wdata,
  input  logic          rd,
  input  logic          wr,
  output logic          sel,
  output logic [DW-1:0] rdata,
  output logic          err,
  output logic          done
);
  typedef struct packed {
    logic       is_wr;
    logic [1:0] off;
    logic       last;
  } step_t;

  localparam int unsigned NSTEPS = 4;
  localparam step_t SEQ [NSTEPS] = '{
    '{is_wr: 1'b1, off: DG_START,  last: 1'b0},
    '{is_wr: 1'b1, off: DG_ECHO,   last: 1'b0},
    '{is_wr: 1'b0, off: DG_ECHO,   last: 1'b0},
    '{is_wr: 1'b0, off: DG_STATUS, last: 1'b1}
  };

  logic [1:0]    step;
  logic [DW-1:0] pattern;
  logic          rd_q, wr_q;
  logic [1:0]    off;
  logic          access, match, is_start, bad;
  step_t         exp;

  assign sel      = (addr[DW-1:2] == BASE[DW-1:2]);
  assign off      = addr[1:0];
  assign access   = sel && (rd || wr);
  assign exp      = SEQ[step];
  assign is_start = wr && !rd && off == DG_START;
  assign match    = (exp.is_wr == wr) && (exp.is_wr != rd) && (exp.off == off);
  assign bad      = (rd && wr) || (rd && rd_q) || (wr && wr_q);

  always_comb begin
    case (off)
      DG_ECHO:   rdata = ~pattern;
      DG_STATUS: rdata = {{(DW-1){1'b0}}, err};
      default:   rdata = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step    <= '0;
      pattern <= '0;
      rd_q    <= 1'b0;
      wr_q    <= 1'b0;
      err     <= 1'b0;
      done    <= 1'b0;
    end else begin
      rd_q <= sel && rd;
      wr_q <= sel && wr;
      if (access) begin
        if (wr && !rd && off == DG_ECHO) pattern <= wdata;
        if (bad) begin
          err  <= 1'b1;
          step <= '0;
        end else if (is_start) begin
          step <= 2'd1;
        end else if (match && step != 2'd0) begin
          step <= exp.last ? 2'd0 : step + 2'd1;
          if (exp.last) done <= 1'b1;
        end else if (!(rd && off == DG_STATUS)) begin
          err  <= 1'b1;  // out-of-sequence cycle
          step <= '0;
        end
      end
    end
  end

  // Any cycle with both strobes, or a stuck strobe, is flagged next cycle.
  a_bad_flagged: assert property (@(posedge clk) disable iff (!rst_n)
                                  (access && bad) |=> err);
endmodule
