// Top of the three processor-memory latency mechanisms, side by side.
//
// The three designs address the widening gap between processor and memory
// speed and do not share signals, so each keeps its own ports here, under a
// prefix:
//  * bf_: the Bloom-filter load hit/miss predictor (bf_miss_filter). It
//    finds loads that are sure to miss the L1 data cache one cycle after
//    address generation, so their dependents are not scheduled in vain and
//    the L2 access starts two cycles early.
//  * pe_: the Pointer-Element Prefetch Unit (pepu). It recognises pointer
//    loads at decode and prefetches the next node of a linked structure
//    into a separate prefetch cache.
//  * dt_: the Ditto checker (ditto_checker). It adds a delay buffer and
//    verify logic to a superscalar core so every committed instruction is
//    re-fetched, re-executed and compared, catching transient faults.
// Each block is meant to sit inside an out-of-order core that is not part of
// this design. The core's pipeline signals are therefore ports. clk and
// rst_n (active low, asynchronous) are shared.
//
// Parameter defaults are the configurations evaluated for each mechanism: a
// 16 KB 4-way L1 with 32 B lines and an 8 Kbit filter; a 1 KB address cache,
// a 1 KB prefetch cache and a 64-entry bitmap stack; a 128-entry delay buffer
// and a 16-entry lower ROB part.
module tolerating_gap_top #(
  parameter int unsigned BF_ADDR_W = 32,
  parameter int unsigned BF_OFFSET_W = 5,
  parameter int unsigned BF_SETS = 128,
  parameter int unsigned BF_WAYS = 4,
  parameter int unsigned BF_P_BITS = 13,
  parameter int unsigned PE_NREGS = 32,
  parameter int unsigned PE_BS_DEPTH = 64,
  parameter int unsigned PE_ROB = 128,
  parameter int unsigned PE_PEND = 16,
  parameter int unsigned PE_AC_ENTRIES = 256,
  parameter int unsigned PE_PFC_LINES = 32,
  parameter int unsigned PE_LINE_BYTES = 32,
  parameter int unsigned DT_DB_DEPTH = 128,
  parameter int unsigned DT_LPROB = 16,
  parameter int unsigned DT_NREGS = 32
) (
  input  logic clk,
  input  logic rst_n,
  // ---- bf_miss_filter ----
  input  logic bf_req_valid,
  input  logic [BF_ADDR_W-1:0] bf_req_vaddr,
  input  logic [BF_ADDR_W-1:0] bf_req_paddr,
  output logic bf_pred_valid,
  output logic bf_pred_miss,
  output logic bf_cancel_dep,
  output logic bf_l2_early_req,
  output logic [BF_ADDR_W-1:0] bf_l2_early_addr,
  output logic bf_hm_valid,
  output logic bf_hm_hit,
  output logic bf_hm_filtered_miss,
  output logic bf_flush_window,
  output logic bf_hm_collision,
  output logic bf_l2_late_req,
  output logic [BF_ADDR_W-1:0] bf_l2_late_addr,
  // ---- pepu ----
  input  pepu_pkg::dec_t pe_dec,
  output logic pe_dec_is_pointer,
  output logic [$clog2(PE_BS_DEPTH)-1:0] pe_dec_bs_slot,
  output logic pe_bs_full,
  input  logic pe_br_valid,
  input  logic [$clog2(PE_BS_DEPTH)-1:0] pe_br_slot,
  input  logic pe_br_mispredict,
  input  logic pe_wb_valid,
  input  logic [$clog2(PE_ROB)-1:0] pe_wb_rob,
  input  logic [32-1:0] pe_wb_value,
  input  logic pe_wb_is_load,
  input  logic [32-1:0] pe_wb_va,
  input  logic pe_commit_valid,
  input  logic [$clog2(PE_ROB)-1:0] pe_commit_rob,
  output logic pe_dep_query_valid,
  output logic [32-1:0] pe_dep_query_va,
  output logic [$clog2(PE_ROB)-1:0] pe_dep_query_rob,
  input  logic pe_dep_found,
  output logic pe_pf_req_valid,
  output logic [32-1:0] pe_pf_req_va,
  output logic pe_pf_req_spec,
  input  logic pe_pf_fill_valid,
  input  logic [32-1:0] pe_pf_fill_va,
  input  logic [PE_LINE_BYTES*8-1:0] pe_pf_fill_line,
  input  logic pe_ld_en,
  input  logic [32-1:0] pe_ld_va,
  output logic pe_ld_valid,
  output logic pe_ld_pfc_hit,
  output logic [31:0] pe_ld_data,
  input  logic pe_st_addr_valid,
  input  logic [32-1:0] pe_st_addr_va,
  input  logic pe_st_data_valid,
  input  logic [32-1:0] pe_st_data_va,
  input  logic [31:0] pe_st_data,
  output logic pe_prop_valid,
  output logic [$clog2(PE_ROB)-1:0] pe_prop_rob,
  output logic [32-1:0] pe_prop_value,
  output logic pe_ac_update,
  output pepu_pkg::ptype_e pe_wb_type,
  output logic [31:0] pe_stat_pred_ok,
  output logic [31:0] pe_stat_pred_bad,
  output logic [31:0] pe_stat_dep_retry,
  output logic [31:0] pe_stat_drop,
  output logic [31:0] pe_stat_pf_spec,
  // ---- ditto_checker ----
  input  logic dt_head_valid,
  input  logic dt_head_done,
  input  ditto_pkg::commit_rec_t dt_head_rec,
  output logic dt_commit,
  input  logic dt_dual_valid,
  input  logic [32-1:0] dt_dual_a,
  input  logic [32-1:0] dt_dual_b,
  output logic dt_cf_valid,
  output logic [32-1:0] dt_cf_pc,
  input  logic dt_cf_next,
  input  logic dt_m1_valid,
  input  logic [32-1:0] dt_m1_inst,
  input  logic [32-1:0] dt_m1_target,
  input  logic [32-1:0] dt_m1_src1,
  input  logic [32-1:0] dt_m1_src2,
  output logic dt_m1_ready,
  output logic [$clog2(DT_LPROB)-1:0] dt_m1_tag,
  input  logic dt_m2_valid,
  input  logic [$clog2(DT_LPROB)-1:0] dt_m2_tag,
  input  logic [32-1:0] dt_m2_result,
  input  logic [$clog2(DT_NREGS)-1:0] dt_rf_idx,
  output logic [32-1:0] dt_rf_value,
  output logic [1:0] dt_rf_status,
  output logic [DT_NREGS-1:0] dt_transient_map,
  output logic dt_fault_detected,
  output logic dt_recover,
  output ditto_pkg::err_e dt_err_kind,
  output logic [32-1:0] dt_restart_pc,
  output logic dt_ver_valid,
  output logic [$clog2(DT_DB_DEPTH):0] dt_db_count
);
  bf_miss_filter #(.ADDR_W(BF_ADDR_W), .OFFSET_W(BF_OFFSET_W), .SETS(BF_SETS), .WAYS(BF_WAYS), .P_BITS(BF_P_BITS)) u_bf (
    .clk,
    .rst_n,
    .req_valid(bf_req_valid),
    .req_vaddr(bf_req_vaddr),
    .req_paddr(bf_req_paddr),
    .pred_valid(bf_pred_valid),
    .pred_miss(bf_pred_miss),
    .cancel_dep(bf_cancel_dep),
    .l2_early_req(bf_l2_early_req),
    .l2_early_addr(bf_l2_early_addr),
    .hm_valid(bf_hm_valid),
    .hm_hit(bf_hm_hit),
    .hm_filtered_miss(bf_hm_filtered_miss),
    .flush_window(bf_flush_window),
    .hm_collision(bf_hm_collision),
    .l2_late_req(bf_l2_late_req),
    .l2_late_addr(bf_l2_late_addr)
  );

  pepu #(.NREGS(PE_NREGS), .BS_DEPTH(PE_BS_DEPTH), .ROB(PE_ROB), .PEND(PE_PEND), .AC_ENTRIES(PE_AC_ENTRIES), .PFC_LINES(PE_PFC_LINES), .LINE_BYTES(PE_LINE_BYTES)) u_pe (
    .clk,
    .rst_n,
    .dec(pe_dec),
    .dec_is_pointer(pe_dec_is_pointer),
    .dec_bs_slot(pe_dec_bs_slot),
    .bs_full(pe_bs_full),
    .br_valid(pe_br_valid),
    .br_slot(pe_br_slot),
    .br_mispredict(pe_br_mispredict),
    .wb_valid(pe_wb_valid),
    .wb_rob(pe_wb_rob),
    .wb_value(pe_wb_value),
    .wb_is_load(pe_wb_is_load),
    .wb_va(pe_wb_va),
    .commit_valid(pe_commit_valid),
    .commit_rob(pe_commit_rob),
    .dep_query_valid(pe_dep_query_valid),
    .dep_query_va(pe_dep_query_va),
    .dep_query_rob(pe_dep_query_rob),
    .dep_found(pe_dep_found),
    .pf_req_valid(pe_pf_req_valid),
    .pf_req_va(pe_pf_req_va),
    .pf_req_spec(pe_pf_req_spec),
    .pf_fill_valid(pe_pf_fill_valid),
    .pf_fill_va(pe_pf_fill_va),
    .pf_fill_line(pe_pf_fill_line),
    .ld_en(pe_ld_en),
    .ld_va(pe_ld_va),
    .ld_valid(pe_ld_valid),
    .ld_pfc_hit(pe_ld_pfc_hit),
    .ld_data(pe_ld_data),
    .st_addr_valid(pe_st_addr_valid),
    .st_addr_va(pe_st_addr_va),
    .st_data_valid(pe_st_data_valid),
    .st_data_va(pe_st_data_va),
    .st_data(pe_st_data),
    .prop_valid(pe_prop_valid),
    .prop_rob(pe_prop_rob),
    .prop_value(pe_prop_value),
    .ac_update(pe_ac_update),
    .wb_type(pe_wb_type),
    .stat_pred_ok(pe_stat_pred_ok),
    .stat_pred_bad(pe_stat_pred_bad),
    .stat_dep_retry(pe_stat_dep_retry),
    .stat_drop(pe_stat_drop),
    .stat_pf_spec(pe_stat_pf_spec)
  );

  ditto_checker #(.DB_DEPTH(DT_DB_DEPTH), .LPROB(DT_LPROB), .NREGS(DT_NREGS)) u_dt (
    .clk,
    .rst_n,
    .head_valid(dt_head_valid),
    .head_done(dt_head_done),
    .head_rec(dt_head_rec),
    .commit(dt_commit),
    .dual_valid(dt_dual_valid),
    .dual_a(dt_dual_a),
    .dual_b(dt_dual_b),
    .cf_valid(dt_cf_valid),
    .cf_pc(dt_cf_pc),
    .cf_next(dt_cf_next),
    .m1_valid(dt_m1_valid),
    .m1_inst(dt_m1_inst),
    .m1_target(dt_m1_target),
    .m1_src1(dt_m1_src1),
    .m1_src2(dt_m1_src2),
    .m1_ready(dt_m1_ready),
    .m1_tag(dt_m1_tag),
    .m2_valid(dt_m2_valid),
    .m2_tag(dt_m2_tag),
    .m2_result(dt_m2_result),
    .rf_idx(dt_rf_idx),
    .rf_value(dt_rf_value),
    .rf_status(dt_rf_status),
    .transient_map(dt_transient_map),
    .fault_detected(dt_fault_detected),
    .recover(dt_recover),
    .err_kind(dt_err_kind),
    .restart_pc(dt_restart_pc),
    .ver_valid(dt_ver_valid),
    .db_count(dt_db_count)
  );
endmodule
