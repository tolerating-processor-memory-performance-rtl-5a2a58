// Ditto verify logic and the result field of the lower ROB part (LP-ROB).
//
// Three checks raise a transient-fault error:
//  * dual_*: a long-latency operation executed twice before commit; the two
//    results must agree (ERR_DUAL).
//  * m1_* (first mechanism, at the clone's register read): the re-fetched,
//    re-decoded instruction must equal the delay-buffer head, and so must a
//    branch's decoded target (ERR_FRONTEND). A long-latency clone's
//    source operand values must equal the saved ones (ERR_RENAME). The head is
//    then popped and the clone takes the next LP-ROB slot (m1_tag).
//    Long-latency and branch clones are finished here. Other clones carry
//    the original's expected value into the slot's result field.
//  * m2_* (second mechanism, at the clone's writeback): the clone's result
//    must equal the expected value of its slot (ERR_EXEC).
// Slots retire in program order from the LP-ROB head once finished. Each
// retirement reports the verified destination register, commit sequence
// number and value to the register status logic (ver_*).
//
// ext_err (the commit lanes disagree) takes the same recovery path.
//
// Timing: the checks are combinational in the cycle of the event. On an
// error the LP-ROB is emptied at the clock edge. The next cycle recover
// pulses with err_kind and restart_pc, the address of the oldest committed
// but unverified instruction, where the normal stream must refetch. That is
// the two-cycle detection-and-recovery penalty assumed for this design.
//
// The three checks, their placement, skipping re-execution for long-latency
// clones, the result field copied from the delay buffer and the default of
// 16 LP-ROB entries follow the source design. Treating a branch clone as done
// at register read, the LP-ROB as a FIFO with out-of-order result compare,
// and the choice of restart address are this design's choices.
module ditto_verify
  import ditto_pkg::*;
#(
  parameter int unsigned LPROB = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // long-latency duplicated execution
  input  logic                     dual_valid,
  input  logic [XLEN-1:0]          dual_a,
  input  logic [XLEN-1:0]          dual_b,
  // first mechanism: clone at register read, against the delay-buffer head
  input  logic                     m1_valid,
  input  logic [XLEN-1:0]          m1_inst,
  input  logic [XLEN-1:0]          m1_target,
  input  logic [XLEN-1:0]          m1_src1,
  input  logic [XLEN-1:0]          m1_src2,
  output logic                     m1_ready,
  output logic [$clog2(LPROB)-1:0] m1_tag,
  input  logic                     db_valid,
  input  commit_rec_t              db_rec,
  output logic                     db_pop,
  // second mechanism: clone completion
  input  logic                     m2_valid,
  input  logic [$clog2(LPROB)-1:0] m2_tag,
  input  logic [XLEN-1:0]          m2_result,
  // verified instructions, in order
  output logic                     ver_valid,
  output logic                     ver_has_rd,
  output logic [REG_W-1:0]         ver_rd,
  output logic [SEQ_W-1:0]         ver_seq,
  output logic [XLEN-1:0]          ver_value,
  // error and recovery
  input  logic                     ext_err,    // commit-lane disagreement
  input  logic [XLEN-1:0]          next_pc,    // next instruction to commit
  output logic                     err,
  output logic                     recover,
  output err_e                     err_kind,
  output logic [XLEN-1:0]          restart_pc
);
  localparam int unsigned TW = $clog2(LPROB);

  typedef struct packed {
    logic             done;
    logic             has_rd;
    logic [REG_W-1:0] rd;
    logic [SEQ_W-1:0] seq;
    logic [XLEN-1:0]  pc;
    logic [XLEN-1:0]  result;
    logic [XLEN-1:0]  expect_v;
  } lp_t;

  lp_t         lp_q [LPROB];
  logic [TW:0] head_q, tail_q;
  logic [TW:0] lp_count;

  assign lp_count = tail_q - head_q;
  assign m1_ready = (32'(lp_count) < LPROB) && db_valid;
  assign m1_tag   = tail_q[TW-1:0];

  // ---------------- checks ----------------
  logic e_dual, e_front, e_ren, e_exec, m1_go;
  assign m1_go   = m1_valid && m1_ready;
  assign e_dual  = dual_valid && (dual_a != dual_b);
  assign e_front = m1_go && (m1_inst != db_rec.inst || (db_rec.is_branch && m1_target != db_rec.target));
  assign e_ren   = m1_go && db_rec.long_lat && (m1_src1 != db_rec.src1 || m1_src2 != db_rec.src2);
  assign e_exec  = m2_valid && !lp_q[m2_tag].done && (m2_result != lp_q[m2_tag].expect_v);
  assign err     = ext_err || e_dual || e_front || e_ren || e_exec;
  assign db_pop  = m1_go && !err;

  // ---------------- in-order retirement ----------------
  lp_t head;
  assign head       = lp_q[head_q[TW-1:0]];
  assign ver_valid  = !err && lp_count != 0 && head.done;
  assign ver_has_rd = head.has_rd;
  assign ver_rd     = head.rd;
  assign ver_seq    = head.seq;
  assign ver_value  = head.result;

  err_e        kind_d;
  logic [XLEN-1:0] pc_d;
  always_comb begin
    kind_d = ext_err ? ERR_COMMIT : e_dual ? ERR_DUAL : e_front ? ERR_FRONTEND : e_ren ? ERR_RENAME : ERR_EXEC;
    pc_d   = (lp_count != 0) ? head.pc : db_valid ? db_rec.pc : next_pc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q     <= '0;
      tail_q     <= '0;
      recover    <= 1'b0;
      err_kind   <= ERR_NONE;
      restart_pc <= '0;
      for (int i = 0; i < LPROB; i++) lp_q[i] <= '0;
    end else begin
      recover <= err;
      if (err) begin
        err_kind   <= kind_d;
        restart_pc <= pc_d;
        head_q     <= '0;
        tail_q     <= '0;
      end else begin
        if (m1_go) begin
          lp_q[tail_q[TW-1:0]] <= '{done: db_rec.long_lat || db_rec.is_branch, has_rd: db_rec.has_rd,
                                    rd: db_rec.rd, seq: db_rec.seq, pc: db_rec.pc,
                                    result: db_rec.result, expect_v: db_rec.check};
          tail_q <= tail_q + 1'b1;
        end
        if (m2_valid) lp_q[m2_tag].done <= 1'b1;
        if (ver_valid) head_q <= head_q + 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) m1_valid && m1_ready |-> db_valid)
    else $error("clone reached register read with an empty delay buffer");
endmodule
