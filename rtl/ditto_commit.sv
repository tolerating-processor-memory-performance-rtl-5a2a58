// Duplicated commit logic of the Ditto checker.
//
// Commit is the one stage the re-execution cannot cover: it decides what goes
// into the delay buffer and the register file. It is therefore built twice
// (two ditto_commit_lane instances, each with its own sequence counter). The
// two results are compared every cycle. If they agree, the commit goes ahead:
// the ROB head is acknowledged, its record is pushed into the delay buffer and
// its value is written to the register file. If they disagree, nothing is
// committed and err is raised (ERR_COMMIT for the recovery logic).
//
// Interface and timing: combinational from the ROB-head inputs to
// commit/db_push/rf_wr_*; sequence numbers advance at the clock edge. hold
// blocks commits during recovery.
//
// Duplicating the commit logic follows the source design. The comparison of
// the two copies, blocking the commit on disagreement and the sequence
// numbers (used by the register status logic) are this design's choices. A
// netlist must keep the two lanes apart (no merging of equivalent logic) for
// the duplication to protect anything.
module ditto_commit
  import ditto_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            head_valid,
  input  logic            head_done,
  input  commit_rec_t     head_rec,
  input  logic            space1,
  input  logic            space2,
  input  logic            hold,
  output logic            commit,
  output logic            db_push,
  output commit_rec_t     db_rec,
  output logic            rf_wr_en,
  output logic [REG_W-1:0] rf_rd,
  output logic [XLEN-1:0] rf_value,
  output logic [SEQ_W-1:0] rf_seq,
  output logic            err
);
  logic        c_a, c_b;
  commit_rec_t r_a, r_b;
  logic        agree;

  ditto_commit_lane u_a (.clk, .rst_n, .head_valid, .head_done, .head_rec, .space1, .space2,
                         .hold, .advance(commit), .commit(c_a), .rec(r_a));
  ditto_commit_lane u_b (.clk, .rst_n, .head_valid, .head_done, .head_rec, .space1, .space2,
                         .hold, .advance(commit), .commit(c_b), .rec(r_b));

  assign agree    = (c_a == c_b) && (!c_a || r_a == r_b);
  assign err      = !agree;
  assign commit   = agree && c_a;
  assign db_push  = commit;
  assign db_rec   = r_a;
  assign rf_wr_en = commit && r_a.has_rd && r_a.rd != '0;
  assign rf_rd    = r_a.rd;
  assign rf_value = r_a.result;
  assign rf_seq   = r_a.seq;
endmodule
