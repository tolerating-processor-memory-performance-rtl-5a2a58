// Pointer-Element Prefetch Unit (PEPU): top of the linked-data-structure
// prefetcher.
//
// Linked structures defeat stride prefetchers: a node's address is known only
// once the previous node has been loaded. Nodes rarely move, though, so the
// PEPU learns "the value loaded from address A" in a small Address Cache and
// uses it to prefetch the next node before the producing load completes.
//
// Wiring of the four subunits and the controller:
//  * trb + bitmap_stack: at decode the TRB says whether a load is a pointer
//    load (its base comes from an earlier load). Each decoded conditional
//    branch pushes the TRB onto the Bitmap Stack; a mispredicted branch
//    restores it (and flushes the controller and classifier).
//  * pload_classifier: marks each pointer load as data, address or
//    data-address by the consumers that decode after it. At writeback, only
//    address and data-address loads write their value into the AC.
//  * pepu_ctrl: the flow-chart controller. It issues prefetches (pf_req_*)
//    for the host to serve from L1, L2 or memory. The line returns on
//    pf_fill_* into the PFC, never into L1.
//  * address_cache: read by the controller; locked and updated by stores.
//  * prefetch_cache: a prefetch of a line it already holds is dropped. It is
//    read by every load in parallel with L1 (ld_*). On a
//    hit the host cancels the L1 access. Updated by stores that hit.
//
// Timing is that of the blocks; see pepu_ctrl for the T1-T6 schedule. One
// instruction is decoded per cycle at this interface (the evaluated machine
// is 8-wide; a wider decode would replicate the TRB update and table ports).
// The AC and the PFC use the same virtual addresses.
//
// The subunits and their connections follow the source design. Defaults are
// its PEPU configuration: 32 integer registers, 64-entry BS, 128-entry ROB,
// 1 KB AC and 1 KB PFC. Single-issue decode and flushing the classifier's
// producer tracking on a misprediction are this design's choices.
module pepu
  import pepu_pkg::*;
#(
  parameter int unsigned NREGS      = 32,
  parameter int unsigned BS_DEPTH   = 64,
  parameter int unsigned ROB        = 128,
  parameter int unsigned PEND       = 16,
  parameter int unsigned AC_ENTRIES = 256,
  parameter int unsigned PFC_LINES  = 32,
  parameter int unsigned LINE_BYTES = 32
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // decode
  input  dec_t                        dec,
  output logic                        dec_is_pointer,
  output logic [$clog2(BS_DEPTH)-1:0] dec_bs_slot,
  output logic                        bs_full,
  // branch resolution
  input  logic                        br_valid,
  input  logic [$clog2(BS_DEPTH)-1:0] br_slot,
  input  logic                        br_mispredict,
  // writeback of any instruction (forwarding); loads also give their address
  input  logic                        wb_valid,
  input  logic [$clog2(ROB)-1:0]      wb_rob,
  input  logic [XLEN-1:0]             wb_value,
  input  logic                        wb_is_load,
  input  logic [XLEN-1:0]             wb_va,
  // commit
  input  logic                        commit_valid,
  input  logic [$clog2(ROB)-1:0]      commit_rob,
  // memory dependency checker
  output logic                        dep_query_valid,
  output logic [XLEN-1:0]             dep_query_va,
  output logic [$clog2(ROB)-1:0]      dep_query_rob,
  input  logic                        dep_found,
  // prefetch request and fill
  output logic                        pf_req_valid,
  output logic [XLEN-1:0]             pf_req_va,
  output logic                        pf_req_spec,
  input  logic                        pf_fill_valid,
  input  logic [XLEN-1:0]             pf_fill_va,
  input  logic [LINE_BYTES*8-1:0]     pf_fill_line,
  // demand load access to the PFC
  input  logic                        ld_en,
  input  logic [XLEN-1:0]             ld_va,
  output logic                        ld_valid,
  output logic                        ld_pfc_hit,
  output logic [31:0]                 ld_data,
  // stores: address known, then data
  input  logic                        st_addr_valid,
  input  logic [XLEN-1:0]             st_addr_va,
  input  logic                        st_data_valid,
  input  logic [XLEN-1:0]             st_data_va,
  input  logic [31:0]                 st_data,
  // events and statistics
  output logic                        prop_valid,
  output logic [$clog2(ROB)-1:0]      prop_rob,
  output logic [XLEN-1:0]             prop_value,
  output logic                        ac_update,
  output ptype_e                      wb_type,
  output logic [31:0]                 stat_pred_ok,
  output logic [31:0]                 stat_pred_bad,
  output logic [31:0]                 stat_dep_retry,
  output logic [31:0]                 stat_drop,
  output logic [31:0]                 stat_pf_spec
);
  logic [NREGS-1:0] trb_val, restore_val;
  logic             restore_en, bs_empty;
  logic             is_branch;
  logic             ac_rd_en, ac_rsp_valid, ac_rsp_hit, ac_rsp_locked;
  logic [XLEN-1:0]  ac_rd_va, ac_rsp_data;
  logic [2:0]       wb_bits;
  logic             flush;
  logic             ctrl_pf_valid, pf_probe_hit;
  logic [XLEN-1:0]  ctrl_pf_va;

  // a line already held in the PFC is not requested again
  assign pf_req_valid = ctrl_pf_valid && !pf_probe_hit;
  assign pf_req_va    = ctrl_pf_va;

  assign flush     = restore_en;
  assign is_branch = dec.valid && dec.op == OP_BRANCH;

  trb #(.NREGS(NREGS)) u_trb (
    .clk, .rst_n,
    .dec_valid(dec.valid), .dec_op(dec.op),
    .dec_rd(dec.rd[$clog2(NREGS)-1:0]), .dec_rs(dec.rs[$clog2(NREGS)-1:0]),
    .is_pointer(dec_is_pointer),
    .restore_en, .restore_val, .trb_q(trb_val)
  );

  bitmap_stack #(.DEPTH(BS_DEPTH), .NREGS(NREGS)) u_bs (
    .clk, .rst_n,
    .push(is_branch), .push_val(trb_val), .push_slot(dec_bs_slot),
    .full(bs_full), .empty(bs_empty),
    .resolve(br_valid), .resolve_slot(br_slot), .mispredict(br_mispredict),
    .restore_en, .restore_val
  );

  pload_classifier #(.ROB(ROB), .NREGS(NREGS)) u_cls (
    .clk, .rst_n,
    .dec_valid(dec.valid), .dec_op(dec.op),
    .dec_rd(dec.rd[$clog2(NREGS)-1:0]), .dec_rs(dec.rs[$clog2(NREGS)-1:0]),
    .dec_rt(dec.rt[$clog2(NREGS)-1:0]),
    .dec_rob(dec.rob[$clog2(ROB)-1:0]), .dec_is_pointer,
    .commit_valid, .commit_rob, .flush,
    .q_rob(wb_rob), .q_bits(wb_bits), .q_type(wb_type)
  );

  assign ac_update = wb_valid && wb_is_load && (wb_type == PT_ADDR || wb_type == PT_DATA_ADDR);

  pepu_ctrl #(.PEND(PEND), .ROB(ROB)) u_ctrl (
    .clk, .rst_n, .flush,
    .dec, .dec_is_pointer,
    .fwd_valid(wb_valid), .fwd_rob(wb_rob), .fwd_value(wb_value),
    .dep_query_valid, .dep_query_va, .dep_query_rob, .dep_found,
    .pf_req_valid(ctrl_pf_valid), .pf_req_va(ctrl_pf_va), .pf_req_spec,
    .ac_rd_en, .ac_rd_va, .ac_rsp_valid, .ac_rsp_hit, .ac_rsp_data,
    .prop_valid, .prop_rob, .prop_value,
    .stat_pred_ok, .stat_pred_bad, .stat_dep_retry, .stat_drop, .stat_pf_spec
  );

  address_cache #(.ENTRIES(AC_ENTRIES), .XLEN(XLEN)) u_ac (
    .clk, .rst_n,
    .rd_en(ac_rd_en), .rd_va(ac_rd_va),
    .rd_valid(ac_rsp_valid), .rd_hit(ac_rsp_hit), .rd_locked(ac_rsp_locked), .rd_data(ac_rsp_data),
    .upd_en(ac_update), .upd_va(wb_va), .upd_data(wb_value),
    .st_lock_en(st_addr_valid), .st_lock_va(st_addr_va),
    .st_wr_en(st_data_valid), .st_wr_va(st_data_va), .st_wr_data(st_data),
    .flush
  );

  prefetch_cache #(.LINES(PFC_LINES), .LINE_BYTES(LINE_BYTES), .XLEN(XLEN)) u_pfc (
    .clk, .rst_n,
    .rd_en(ld_en), .rd_va(ld_va), .rd_valid(ld_valid), .rd_hit(ld_pfc_hit), .rd_data(ld_data),
    .probe_va(ctrl_pf_va), .probe_hit(pf_probe_hit),
    .fill_en(pf_fill_valid), .fill_va(pf_fill_va), .fill_line(pf_fill_line),
    .st_en(st_data_valid), .st_va(st_data_va), .st_data(st_data)
  );
endmodule
