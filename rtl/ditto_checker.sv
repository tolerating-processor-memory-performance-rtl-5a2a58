// Ditto checker: the fault-detection additions of the Ditto processor.
//
// Ditto detects transient faults by time redundancy. Every instruction that
// commits is cloned: the record goes into the delay buffer, and a second
// fetch/decode stream re-fetches the same addresses in order (cf_*), so
// faults in the front end, the renamer and the functional units are all
// caught. Long-latency operations (multiply, divide, the memory access of
// loads and stores) are instead executed twice before commit and compared.
// Their clones only re-check the instruction and operands, which keeps them
// from clogging the small lower part of the ROB that holds the clones.
//
// This block ties together:
//  * ditto_commit: the duplicated commit logic. It retires the host ROB head
//    into the delay buffer and the register file.
//  * delay_buffer: the committed records. It also feeds the clone-fetch
//    addresses.
//  * ditto_verify: the dual-execution compare, the first check at the
//    clone's register read, the second check at its writeback, and the
//    LP-ROB result field.
//  * ditto_regstatus: the architectural registers with their
//    invalid/transient/verified status.
// An error from any check (or from the commit lanes) flushes the delay
// buffer, the LP-ROB and every transient register. One cycle later recover
// and restart_pc tell the host to squash everything in flight and refetch
// from the oldest unverified instruction.
//
// The host core, its ROB (with the LP-ROB's program order), the cloned
// fetch/decode unit, the scheduler and the functional units are outside this
// block. Defaults follow the evaluated Ditto configuration: a 128-entry delay
// buffer and a 16-entry LP-ROB. The register-status scheme follows
// ditto_regstatus.
module ditto_checker
  import ditto_pkg::*;
#(
  parameter int unsigned DB_DEPTH = 128,
  parameter int unsigned LPROB    = 16,
  parameter int unsigned NREGS    = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // host ROB head
  input  logic                     head_valid,
  input  logic                     head_done,
  input  commit_rec_t              head_rec,
  output logic                     commit,
  // long-latency duplicated execution
  input  logic                     dual_valid,
  input  logic [XLEN-1:0]          dual_a,
  input  logic [XLEN-1:0]          dual_b,
  // cloned fetch stream
  output logic                     cf_valid,
  output logic [XLEN-1:0]          cf_pc,
  input  logic                     cf_next,
  // clone at register read
  input  logic                     m1_valid,
  input  logic [XLEN-1:0]          m1_inst,
  input  logic [XLEN-1:0]          m1_target,
  input  logic [XLEN-1:0]          m1_src1,
  input  logic [XLEN-1:0]          m1_src2,
  output logic                     m1_ready,
  output logic [$clog2(LPROB)-1:0] m1_tag,
  // clone completion
  input  logic                     m2_valid,
  input  logic [$clog2(LPROB)-1:0] m2_tag,
  input  logic [XLEN-1:0]          m2_result,
  // architectural register read
  input  logic [$clog2(NREGS)-1:0] rf_idx,
  output logic [XLEN-1:0]          rf_value,
  output logic [1:0]               rf_status,
  output logic [NREGS-1:0]         transient_map,
  // recovery
  output logic                     fault_detected,
  output logic                     recover,
  output err_e                     err_kind,
  output logic [XLEN-1:0]          restart_pc,
  output logic                     ver_valid,
  output logic [$clog2(DB_DEPTH):0] db_count
);
  logic        space1, space2, db_push, db_head_valid, db_pop;
  commit_rec_t db_push_rec, db_head_rec;
  logic        rf_wr_en;
  logic [REG_W-1:0] rf_rd;
  logic [XLEN-1:0]  rf_wvalue;
  logic [SEQ_W-1:0] rf_seq;
  logic        commit_err, verify_err, err;
  logic        ver_has_rd;
  logic [REG_W-1:0] ver_rd;
  logic [SEQ_W-1:0] ver_seq;
  logic [XLEN-1:0]  ver_value;
  logic        v_recover;
  err_e        v_kind;
  logic [XLEN-1:0] v_pc;

  assign err            = verify_err;   // includes commit-lane errors
  assign fault_detected = err;

  ditto_commit u_commit (
    .clk, .rst_n, .head_valid, .head_done, .head_rec, .space1, .space2,
    .hold(recover),
    .commit, .db_push, .db_rec(db_push_rec),
    .rf_wr_en, .rf_rd, .rf_value(rf_wvalue), .rf_seq, .err(commit_err)
  );

  delay_buffer #(.DEPTH(DB_DEPTH)) u_db (
    .clk, .rst_n, .flush(err),
    .push(db_push), .push_rec(db_push_rec), .space1, .space2,
    .head_valid(db_head_valid), .head_rec(db_head_rec), .pop(db_pop),
    .cf_valid, .cf_pc, .cf_next, .count(db_count)
  );

  ditto_verify #(.LPROB(LPROB)) u_verify (
    .clk, .rst_n,
    .dual_valid, .dual_a, .dual_b,
    .m1_valid, .m1_inst, .m1_target, .m1_src1, .m1_src2, .m1_ready, .m1_tag,
    .db_valid(db_head_valid), .db_rec(db_head_rec), .db_pop,
    .m2_valid, .m2_tag, .m2_result,
    .ver_valid, .ver_has_rd, .ver_rd, .ver_seq, .ver_value,
    .ext_err(commit_err), .next_pc(head_rec.pc),
    .err(verify_err), .recover(v_recover), .err_kind(v_kind), .restart_pc(v_pc)
  );

  ditto_regstatus #(.NREGS(NREGS)) u_regs (
    .clk, .rst_n,
    .wr_en(rf_wr_en), .wr_rd(rf_rd[$clog2(NREGS)-1:0]), .wr_value(rf_wvalue), .wr_seq(rf_seq),
    .ver_en(ver_valid && ver_has_rd), .ver_rd(ver_rd[$clog2(NREGS)-1:0]),
    .ver_value, .ver_seq,
    .flush(err),
    .rd_idx(rf_idx), .rd_value(rf_value), .rd_status(rf_status), .transient_map
  );

  assign recover    = v_recover;
  assign err_kind   = v_kind;
  assign restart_pc = v_pc;
endmodule
