// End-to-end testbench for tolerating_gap_top at its default parameters (the
// sizes of the source design). It runs three workloads on the three units of
// the top, each against its own reference model:
//  - pointer-load prefetching: a list-walk loop on a 150-node linked list, run
//    without and with prefetch fills (the run with them must be faster), then
//    on a 12-node list that stays in the prefetch cache; relinks between passes
//    and mispredicted loop exits;
//  - the partial-address Bloom filter: 40000 loads from a hot set, aliasing
//    cold lines and random lines, checked against a true-LRU cache model;
//  - the Ditto checker: 3000 committed instructions with every fault kind
//    injected repeatedly, recovery and register rollback checked.
// The prefetch workload runs first because it resets the design between its
// runs; the other two then run at the same time. At the end every mechanism is
// counted and one that never happened is a failure.
module tb_tolerating_gap_top;
  import pepu_pkg::*;
  import ditto_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  bit bf_done = 0, pe_done = 0, dt_done = 0;
  int n_early_l2 = 0, n_cancel = 0, n_flush = 0;

  tolerating_gap_top dut (.*);
  always #5 clk = ~clk;

  // ===================== pointer-load prefetching (runs first) =====================
  localparam int pe_LAT = 12, pe_MEMLAT = 12, pe_NODES = 150, pe_PASSES = 6;
  dec_t pe_dec; logic pe_dec_is_pointer, pe_bs_full; logic [5:0] pe_dec_bs_slot, pe_br_slot;
  logic pe_br_valid, pe_br_mispredict, pe_wb_valid, pe_wb_is_load, pe_commit_valid;
  logic [6:0] pe_wb_rob, pe_commit_rob, pe_dep_query_rob, pe_prop_rob;
  logic [31:0] pe_wb_value, pe_wb_va, pe_dep_query_va, pe_pf_req_va, pe_pf_fill_va, pe_ld_va, pe_ld_data, pe_st_addr_va, pe_st_data_va, pe_st_data, pe_prop_value;
  logic pe_dep_query_valid, pe_dep_found, pe_pf_req_valid, pe_pf_req_spec, pe_pf_fill_valid, pe_ld_en, pe_ld_valid, pe_ld_pfc_hit;
  logic pe_st_addr_valid, pe_st_data_valid, pe_prop_valid, pe_ac_update;
  logic [255:0] pe_pf_fill_line; ptype_e pe_wb_type;
  logic [31:0] pe_stat_pred_ok, pe_stat_pred_bad, pe_stat_dep_retry, pe_stat_drop, pe_stat_pf_spec;


  
  int pe_n_ptr = 0, pe_n_acupd = 0, pe_n_prop = 0, pe_n_pf_left = 0, pe_n_pfc_hit = 0, pe_n_restore = 0, pe_n_relink = 0, pe_n_merge = 0;
  int pe_n_addr_type = 0, pe_n_data_type = 0;

  typedef struct {
    int seq; op_e op; int rd, rs, rt; logic [31:0] value, va; int kind;
    bit mispred, wrong, done, ld_issued, ptr; int bs_slot, src, ready_at;
  } pe_ins_t;
  pe_ins_t pe_win[$];
  logic [31:0] pe_cmem [int];          // committed memory, word addressed
  logic [31:0] pe_amem [int];          // architectural memory at decode
  logic [31:0] pe_areg [32];
  int pe_last_w [32];
  int pe_wbc [int];                    // seq -> writeback cycle
  int pe_nodes [pe_NODES];
  typedef struct { int due; logic [31:0] va; } pe_fill_t;
  pe_fill_t pe_fq[$];

  task automatic pe_chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  function automatic logic [31:0] pe_rd_mem(ref logic [31:0] m [int], input logic [31:0] a);
    return m.exists(int'(a >> 2)) ? m[int'(a >> 2)] : 32'h0;
  endfunction

  // program generator state
  int pe_pass, pe_phase, pe_wp_left, pe_relink_a, pe_relink_n;
  bit pe_first_iter;

  task automatic pe_gen(output pe_ins_t n);
    n.seq = 0; n.op = OP_OTHER; n.rd = 0; n.rs = 0; n.rt = 0; n.value = 0; n.va = 0; n.kind = 0;
    n.ptr = 0; n.mispred = 0; n.wrong = 0; n.done = 0; n.ld_issued = 0; n.bs_slot = 0; n.ready_at = 0;
    n.src = -1;
    if (pe_wp_left > 0) begin
      n.wrong = 1; pe_wp_left--;
      case (pe_wp_left)
        2: begin n.op = OP_LOAD; n.rd = 3; n.rs = 4; n.kind = 3; n.va = pe_areg[4] + 8; end
        1: begin n.op = OP_ALU;  n.rd = 4; n.rs = 4; n.kind = 4; end
        default: begin n.op = OP_OTHER; n.kind = 6; end
      endcase
      return;
    end
    case (pe_phase)
      0: begin n.op = OP_ALU; n.rd = 4; n.rs = 0; n.kind = 10; n.value = 32'h100; pe_first_iter = 1; end
      1: begin n.op = OP_LOAD; n.rd = 4; n.rs = 4; n.kind = 1; n.va = pe_areg[4] + 4; n.value = pe_rd_mem(pe_amem, n.va); end
      2: begin n.op = OP_BRANCH; n.rs = 4; n.rt = 0; n.kind = 2; n.mispred = (pe_areg[4] == 0); end
      3: begin n.op = OP_LOAD; n.rd = 3; n.rs = 4; n.kind = 3; n.va = pe_areg[4] + 8; n.value = pe_rd_mem(pe_amem, n.va); end
      4: begin n.op = OP_ALU; n.rd = 3; n.rs = 3; n.kind = 4; n.value = pe_areg[3] + 4; end
      5: begin n.op = OP_STORE; n.rs = 4; n.rt = 3; n.kind = 5; n.va = pe_areg[4] + 8; n.value = pe_areg[3]; end
      6: begin n.op = OP_OTHER; n.kind = 6; end
      7: begin n.op = OP_LOAD; n.rd = 6; n.rs = 4; n.kind = 7; n.va = 0; n.value = pe_rd_mem(pe_amem, 0); end
      8: begin n.op = OP_ALU; n.rd = 7; n.rs = 0; n.kind = 10; n.value = pe_relink_a; end
      9: begin n.op = OP_ALU; n.rd = 8; n.rs = 0; n.kind = 10; n.value = pe_relink_n; end
      10: begin n.op = OP_STORE; n.rs = 7; n.rt = 8; n.kind = 8; n.va = pe_relink_a + 4; n.value = pe_relink_n; end
      default: ;
    endcase
  endtask

  task automatic pe_advance(ref pe_ins_t n);
    // architectural effects and next pe_phase
    if (n.op == OP_STORE) pe_amem[int'(n.va >> 2)] = n.value;
    if ((n.op == OP_LOAD || n.op == OP_ALU) && n.rd != 0) pe_areg[n.rd] = n.value;
    if (n.wrong) return;
    case (pe_phase)
      0: pe_phase = 1;
      1: pe_phase = 2;
      2: begin if (n.mispred) begin pe_phase = 7; pe_wp_left = 3; end else pe_phase = 3; end
      6: begin pe_phase = 1; pe_first_iter = 0; end
      7: begin
           pe_pass++;
           if (pe_pass < pe_PASSES) begin
             logic [31:0] a, b;
             // remove the node after a random live node
             a = 32'h100;
             repeat ($urandom_range(0, 20)) if (pe_rd_mem(pe_amem, pe_rd_mem(pe_amem, a + 4) + 4) != 0) a = pe_rd_mem(pe_amem, a + 4);
             b = pe_rd_mem(pe_amem, a + 4);
             pe_relink_a = a; pe_relink_n = (b != 0) ? pe_rd_mem(pe_amem, b + 4) : 0;
             pe_phase = 8;
           end else pe_phase = 99;
         end
      10: begin pe_phase = 0; pe_n_relink++; end
      default: pe_phase++;
    endcase
  endtask

  function automatic bit pe_older_store_blocks(int qseq, logic [31:0] va);
    foreach (pe_win[i]) begin
      if (pe_win[i].seq >= qseq) break;
      if (pe_win[i].op == OP_STORE && !pe_win[i].wrong && (!pe_win[i].done || pe_win[i].va[31:2] == va[31:2])) return 1;
    end
    return 0;
  endfunction

  int pe_rob2seq [128];

  task automatic pe_run(input bit use_pf, input int nn, output int cycles);
    int now, ld_pending, seq;
    pe_ins_t n;
    bit ok;
    rst_n = 0;
    pe_dec = '0; pe_br_valid = 0; pe_br_slot = 0; pe_br_mispredict = 0; pe_wb_valid = 0; pe_wb_rob = 0; pe_wb_value = 0;
    pe_wb_is_load = 0; pe_wb_va = 0; pe_commit_valid = 0; pe_commit_rob = 0; pe_dep_found = 0; pe_pf_fill_valid = 0;
    pe_pf_fill_va = 0; pe_pf_fill_line = 0; pe_ld_en = 0; pe_ld_va = 0; pe_st_addr_valid = 0; pe_st_addr_va = 0;
    pe_st_data_valid = 0; pe_st_data_va = 0; pe_st_data = 0;
    pe_win.delete(); pe_fq.delete(); pe_wbc.delete(); pe_cmem.delete(); pe_amem.delete();
    foreach (pe_areg[r]) begin pe_areg[r] = 0; pe_last_w[r] = -1; end
    pe_cmem[32'h104 >> 2] = pe_nodes[0];
    for (int i = 0; i < nn; i++) begin
      pe_cmem[pe_nodes[i] / 4 + 1] = (i + 1 < nn) ? pe_nodes[i + 1] : 0;
      pe_cmem[pe_nodes[i] / 4 + 2] = i;
    end
    pe_amem = pe_cmem;
    pe_pass = 0; pe_phase = 0; pe_wp_left = 0; seq = 0; ld_pending = -1;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    now = 0;
    while (!(pe_phase == 99 && pe_win.size() == 0) && now < 200000) begin
      @(negedge clk); now++;
      // ---- sample registered outputs of the last cycle ----
      if (ld_pending >= 0) begin
        foreach (pe_win[i]) if (pe_win[i].seq == ld_pending) begin
          if (pe_ld_pfc_hit) begin
            pe_win[i].ready_at = now;
            pe_n_pfc_hit++;
            if (!pe_older_store_blocks(pe_win[i].seq, pe_win[i].va))
              pe_chk(pe_ld_data == pe_rd_mem(pe_cmem, pe_win[i].va), "prefetch cache data matches memory");
          end else begin
            pe_win[i].ready_at = now + pe_LAT - 1;
            // a demand miss waits on an in-flight prefetch of its line
            foreach (pe_fq[j]) if (pe_fq[j].va == (pe_win[i].va & ~32'h1F) && pe_fq[j].due < pe_win[i].ready_at) begin
              pe_win[i].ready_at = pe_fq[j].due; pe_n_merge++;
            end
          end
        end
        ld_pending = -1;
      end
      if (pe_pf_req_valid) begin
        if (pe_pf_req_spec) ; else pe_n_pf_left++;
        if (use_pf) pe_fq.push_back('{now + pe_MEMLAT, pe_pf_req_va & ~32'h1F});
      end
      if (pe_prop_valid) pe_n_prop++;
      // ---- drive this cycle ----
      pe_dec = '0; pe_br_valid = 0; pe_br_mispredict = 0; pe_wb_valid = 0; pe_wb_is_load = 0; pe_commit_valid = 0;
      pe_pf_fill_valid = 0; pe_ld_en = 0; pe_st_addr_valid = 0; pe_st_data_valid = 0;
      pe_dep_found = pe_dep_query_valid && pe_older_store_blocks(pe_rob2seq[pe_dep_query_rob], pe_dep_query_va);
      // prefetch fill
      if (pe_fq.size() > 0 && pe_fq[0].due <= now) begin
        pe_fill_t f;
        f = pe_fq.pop_front();
        pe_pf_fill_valid = 1; pe_pf_fill_va = f.va;
        for (int w = 0; w < 8; w++) pe_pf_fill_line[w*32 +: 32] = pe_rd_mem(pe_cmem, f.va + 32'(4 * w));
      end
      // commit the oldest finished instruction
      if (pe_win.size() > 0 && pe_win[0].done && pe_wbc[pe_win[0].seq] < now) begin
        pe_commit_valid = 1; pe_commit_rob = 7'(pe_win[0].seq);
        if (pe_win[0].op == OP_STORE) begin
          pe_st_data_valid = 1; pe_st_data_va = pe_win[0].va; pe_st_data = pe_win[0].value;
          pe_cmem[int'(pe_win[0].va >> 2)] = pe_win[0].value;
        end
        void'(pe_win.pop_front());
      end
      // start a load whose base is available (one prefetch-cache read per cycle)
      foreach (pe_win[i]) begin
        if (pe_win[i].op == OP_LOAD && !pe_win[i].ld_issued && !pe_win[i].wrong &&
            (pe_win[i].src < 0 || (pe_wbc.exists(pe_win[i].src) && pe_wbc[pe_win[i].src] < now))) begin
          pe_win[i].ld_issued = 1; pe_ld_en = 1; pe_ld_va = pe_win[i].va; ld_pending = pe_win[i].seq;
          break;
        end
      end
      // write back the oldest ready instruction
      foreach (pe_win[i]) begin
        bit srdy;
        srdy = pe_win[i].src < 0 || (pe_wbc.exists(pe_win[i].src) && pe_wbc[pe_win[i].src] < now);
        if (!pe_win[i].done && !pe_win[i].wrong && srdy &&
            (pe_win[i].op == OP_LOAD ? (pe_win[i].ready_at > 0 && pe_win[i].ready_at <= now) : 1)) begin
          pe_win[i].done = 1; pe_wbc[pe_win[i].seq] = now;
          pe_wb_valid = 1; pe_wb_rob = 7'(pe_win[i].seq); pe_wb_value = pe_win[i].value;
          pe_wb_is_load = pe_win[i].op == OP_LOAD; pe_wb_va = pe_win[i].va;
          if (pe_win[i].op == OP_STORE) begin pe_st_addr_valid = 1; pe_st_addr_va = pe_win[i].va; end
          if (pe_win[i].op == OP_BRANCH) begin
            pe_br_valid = 1; pe_br_slot = 6'(pe_win[i].bs_slot); pe_br_mispredict = pe_win[i].mispred;
            if (pe_win[i].mispred) begin
              pe_n_restore++;
              while (pe_win.size() > i + 1) void'(pe_win.pop_back());
              foreach (pe_last_w[r]) pe_last_w[r] = -1;
              foreach (pe_win[k]) if (pe_win[k].rd != 0 && (pe_win[k].op == OP_LOAD || pe_win[k].op == OP_ALU)) pe_last_w[pe_win[k].rd] = pe_win[k].seq;
              pe_areg[4] = 0; pe_areg[3] = pe_win[i].seq >= 0 ? pe_areg[3] : 0;
            end
          end
          break;
        end
      end
      // decode one instruction
      if (pe_phase != 99 && pe_win.size() < 40 && !pe_bs_full && pe_wp_left >= 0 &&
          !(pe_win.size() > 0 && pe_win[$].wrong && pe_wp_left == 0) && !pe_br_mispredict) begin
        pe_gen(n);
        n.seq = seq; seq++;
        pe_rob2seq[n.seq % 128] = n.seq;
        if (n.rs != 0) n.src = pe_last_w[n.rs];
        if (n.src >= 0 && pe_wbc.exists(n.src) && pe_wbc[n.src] < now - 1) n.src = -1;
        pe_dec.valid = 1; pe_dec.op = n.op; pe_dec.rd = 5'(n.rd); pe_dec.rs = 5'(n.rs); pe_dec.rt = 5'(n.rt);
        pe_dec.rs_ready = n.src < 0; pe_dec.rs_value = pe_areg[n.rs];
        pe_dec.offset = (n.op == OP_LOAD || n.op == OP_STORE) ? n.va - pe_areg[n.rs] : 0;
        pe_dec.rob = 7'(n.seq); pe_dec.prod_rob = n.src >= 0 ? 7'(n.src) : 7'(0);
        n.bs_slot = pe_dec_bs_slot;
        #1;
        if (n.kind == 3 && !n.wrong && !pe_first_iter || n.kind == 1 && !pe_first_iter || n.kind == 7) begin
          pe_chk(pe_dec_is_pointer, $sformatf("pointer load identified (kind %0d pe_pass %0d)", n.kind, pe_pass));
          if (pe_dec_is_pointer) pe_n_ptr++;
        end
        n.ptr = pe_dec_is_pointer;
        begin
        end
        if ((n.op == OP_LOAD || n.op == OP_ALU) && n.rd != 0) pe_last_w[n.rd] = n.seq;
        pe_advance(n);
        pe_win.push_back(n);
      end else #1;
      // writeback classification
      if (pe_wb_valid && pe_wb_is_load) begin
        if (pe_rob2seq[pe_wb_rob] >= 0) begin
          foreach (pe_win[i]) if (pe_win[i].seq == pe_rob2seq[pe_wb_rob]) begin
            if (pe_win[i].kind == 1 && pe_win[i].value != 0 && pe_win[i].ptr) begin
              pe_chk(pe_wb_type == PT_ADDR && pe_ac_update, "next-pointer load is an address load and updates the address cache");
              pe_n_addr_type++;
            end
            if (pe_win[i].kind == 3) begin
              pe_chk(pe_wb_type == PT_DATA && !pe_ac_update, "data-field load is a data load");
              pe_n_data_type++;
            end
          end
        end
        if (pe_ac_update) pe_n_acupd++;
      end
    end
    cycles = now;
    pe_chk(now < 200000, "workload finished");
  endtask

  initial begin
    int c_pf, c_nopf, c_short;
    for (int i = 0; i < pe_NODES; i++) pe_nodes[i] = 32'h10000 + i * 32'h1C4;
    for (int i = pe_NODES - 1; i > 0; i--) begin int j, t; j = $urandom_range(0, i); t = pe_nodes[i]; pe_nodes[i] = pe_nodes[j]; pe_nodes[j] = t; end
    pe_run(0, pe_NODES, c_nopf);
    pe_chk(pe_stat_pred_bad == 0, "no wrong pointer predictions (no prefetch fills)");
    pe_run(1, pe_NODES, c_pf);
    pe_chk(pe_stat_pred_bad == 0, "no wrong pointer predictions");
    // a short list stays in the prefetch cache between passes
    pe_run(1, 12, c_short);
    pe_chk(pe_stat_pred_bad == 0, "no wrong pointer predictions (short list)");
    $display("cycles: no prefetch %0d, prefetch %0d", c_nopf, c_pf);
    $display("ptr=%0d acupd=%0d prop=%0d spec_pf=%0d left_pf=%0d pred_ok=%0d dep_retry=%0d pfc_hit=%0d merge=%0d restore=%0d relink=%0d drop=%0d",
             pe_n_ptr, pe_n_acupd, pe_n_prop, pe_stat_pf_spec, pe_n_pf_left, pe_stat_pred_ok, pe_stat_dep_retry, pe_n_pfc_hit, pe_n_merge, pe_n_restore, pe_n_relink, pe_stat_drop);
    pe_chk(c_pf < c_nopf, "prefetching shortens the list walk");
    pe_chk(pe_n_ptr > 0, "mechanism: pointer loads identified");
    pe_chk(pe_n_acupd > 0 && pe_n_addr_type > 0 && pe_n_data_type > 0, "mechanism: address cache updated by address loads");
    pe_chk(pe_n_prop > 0, "mechanism: predicted pointer propagated");
    pe_chk(pe_stat_pf_spec > 0, "mechanism: speculative prefetch");
    pe_chk(pe_n_pf_left > 0, "mechanism: prefetch with a real base");
    pe_chk(pe_stat_pred_ok > 0, "mechanism: correct prediction checked");
    pe_chk(pe_stat_dep_retry > 0, "mechanism: store dependency retry");
    pe_chk(pe_n_pfc_hit > 0, "mechanism: prefetch cache hit");
    pe_chk(pe_n_merge > 0, "mechanism: demand load served by an in-flight prefetch");
    pe_chk(pe_n_restore > 0, "mechanism: bitmap restore on a misprediction");
    pe_chk(pe_n_relink > 0, "mechanism: pointer store kept the address cache coherent");
    pe_done = 1;
  end

  // ===================== partial-address Bloom filter =====================
  localparam int bf_SETS = 128, bf_WAYS = 4, bf_OFF = 5, bf_IDXW = 7;
  logic bf_req_valid; logic [31:0] bf_req_vaddr, bf_req_paddr;
  logic bf_pred_valid, bf_pred_miss, bf_cancel_dep, bf_l2_early_req; logic [31:0] bf_l2_early_addr;
  logic bf_hm_valid, bf_hm_hit, bf_hm_filtered_miss, bf_flush_window, bf_hm_collision, bf_l2_late_req; logic [31:0] bf_l2_late_addr;
  
  int bf_n_filtered = 0, bf_n_unfiltered = 0, bf_n_coll = 0, bf_n_hit = 0;



  // reference cache model
  logic [19:0] bf_m_tag [bf_SETS][bf_WAYS];
  bit          bf_m_val [bf_SETS][bf_WAYS];
  longint      bf_m_use [bf_SETS][bf_WAYS];
  longint      bf_now = 0;

  function automatic bit bf_model_access(input logic [31:0] pa, input logic [31:0] va);
    int s = va[bf_OFF +: bf_IDXW];
    logic [19:0] t = pa[31:12];
    int v = -1;
    for (int w = 0; w < bf_WAYS; w++) if (bf_m_val[s][w] && bf_m_tag[s][w] == t) begin bf_m_use[s][w] = bf_now; return 1; end
    for (int w = bf_WAYS-1; w >= 0; w--) if (!bf_m_val[s][w]) v = w;
    if (v < 0) begin
      longint best = 64'h7fffffffffffffff;
      for (int w = 0; w < bf_WAYS; w++) if (bf_m_use[s][w] < best) begin best = bf_m_use[s][w]; v = w; end
    end
    bf_m_val[s][v] = 1; bf_m_tag[s][v] = t; bf_m_use[s][v] = bf_now;
    return 0;
  endfunction

  function automatic logic [31:0] bf_v2p(input logic [31:0] va);
    return {va[31:12] ^ 20'h5A5C3, va[11:0]};
  endfunction

  // queues of issued requests, with issue cycle
  logic [31:0] bf_q_va[$]; longint bf_q_cyc[$]; bit bf_q_pm[$];
  logic [31:0] bf_hot [256];
  longint bf_cyc = 0;

  function automatic logic [31:0] bf_pick();
    int r = $urandom_range(0, 99);
    if (r < 70) return bf_hot[$urandom_range(0, 255)];
    if (r < 85) return {$urandom_range(0, 3)[1:0], 12'h000, $urandom_range(0, 8191)[12:0], 5'(0)} | 32'h0100_0000;
    return {$urandom()} & 32'hFFFF_FFE0;
  endfunction

  always @(posedge clk) bf_cyc <= bf_cyc + 1;

  initial begin
    for (int i = 0; i < 256; i++) bf_hot[i] = 32'h0040_0000 + i * 32'h20 * 3;
    for (int s = 0; s < bf_SETS; s++) for (int w = 0; w < bf_WAYS; w++) begin bf_m_val[s][w] = 0; bf_m_use[s][w] = 0; end
    bf_req_valid = 0; bf_req_vaddr = 0; bf_req_paddr = 0;
    wait (pe_done);
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (40000) begin
      @(negedge clk);
      bf_req_valid = ($urandom_range(0, 9) < 8);
      bf_req_vaddr = bf_pick() | 32'($urandom_range(0, 7) * 4);
      bf_req_paddr = bf_v2p(bf_req_vaddr);
    end
    @(negedge clk) bf_req_valid = 0;
    repeat (6) @(posedge clk);
    checks++; if (bf_n_filtered == 0)   begin failures++; $display("FAIL: no filtered miss"); end
    checks++; if (bf_n_unfiltered == 0) begin failures++; $display("FAIL: no unfiltered miss"); end
    checks++; if (bf_n_coll == 0)       begin failures++; $display("FAIL: no collision"); end
    checks++; if (bf_n_hit == 0)        begin failures++; $display("FAIL: no hit"); end
    checks++; if (bf_q_va.size() != 0)  begin failures++; $display("FAIL: %0d results missing", bf_q_va.size()); end
    $display("hits=%0d filtered_misses=%0d unfiltered_misses=%0d collisions=%0d", bf_n_hit, bf_n_filtered, bf_n_unfiltered, bf_n_coll);
    bf_done = 1;
  end

  // record requests at the edge they are sampled
  always @(posedge clk) if (rst_n && bf_req_valid) begin
    bf_q_va.push_back(bf_req_vaddr); bf_q_cyc.push_back(bf_cyc); bf_q_pm.push_back(0);
  end

  // prediction check: one cycle after issue
  int bf_pidx = 0;
  always @(posedge clk) if (rst_n && bf_pred_valid) begin
    int k = 0;
    // the oldest request without a prediction yet
    for (k = 0; k < bf_q_va.size(); k++) if (bf_q_cyc[k] == bf_cyc - 1) break;
    checks++;
    if (k == bf_q_va.size()) begin failures++; $display("FAIL: prediction at wrong cycle"); end
    else bf_q_pm[k] = bf_pred_miss;
    checks++;
    if (bf_cancel_dep != bf_pred_miss || bf_l2_early_req != bf_pred_miss) begin failures++; $display("FAIL: cancel/l2 mismatch"); end
  end

  always @(posedge clk) if (rst_n && bf_hm_valid) begin
    bit exp_hit, pm;
    logic [31:0] va;
    longint c;
    va = bf_q_va.pop_front();
    c  = bf_q_cyc.pop_front();
    pm = bf_q_pm.pop_front();
    bf_now++;
    exp_hit = bf_model_access(bf_v2p(va), va);
    checks++; if (c != bf_cyc - 3) begin failures++; $display("FAIL: hit/miss latency %0d", bf_cyc - c); end
    checks++; if (bf_hm_hit != exp_hit) begin failures++; $display("FAIL: va=%h hit=%0d exp=%0d", va, bf_hm_hit, exp_hit); end
    checks++; if (pm && exp_hit) begin failures++; $display("FAIL: predicted miss on a hit va=%h", va); end
    checks++; if (bf_flush_window != (!exp_hit && !pm) || bf_hm_filtered_miss != (!exp_hit && pm)) begin failures++; $display("FAIL: recovery kind"); end
    if (exp_hit) bf_n_hit++; else if (pm) bf_n_filtered++; else bf_n_unfiltered++;
    if (bf_hm_collision) bf_n_coll++;
  end


  // ===================== Ditto checker =====================
  localparam int dt_N = 3000;
  logic dt_head_valid, dt_head_done, dt_commit, dt_dual_valid, dt_cf_valid, dt_cf_next, dt_m1_valid, dt_m1_ready, dt_m2_valid;
  logic dt_fault_detected, dt_recover, dt_ver_valid;
  commit_rec_t dt_head_rec; logic [31:0] dt_dual_a, dt_dual_b, dt_cf_pc, dt_m1_inst, dt_m1_target, dt_m1_src1, dt_m1_src2, dt_m2_result;
  logic [31:0] dt_rf_value, dt_restart_pc, dt_transient_map; logic [3:0] dt_m1_tag, dt_m2_tag; logic [4:0] dt_rf_idx;
  logic [1:0] dt_rf_status; err_e dt_err_kind; logic [7:0] dt_db_count;
  int dt_n_ver = 0, dt_n_rec = 0;
  int dt_n_kind [6];
  task automatic dt_chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  function automatic logic [31:0] dt_pc_of(int i); return 32'h1000 + 32'(4 * i); endfunction
  function automatic int dt_idx_of(logic [31:0] pc); return int'((pc - 32'h1000) >> 2); endfunction
  function automatic bit dt_is_br(int i); return i % 7 == 5; endfunction
  function automatic bit dt_is_long(int i); return i % 6 == 3 && !dt_is_br(i); endfunction
  function automatic commit_rec_t dt_rec_of(int i);
    commit_rec_t r;
    r.pc = dt_pc_of(i); r.inst = 32'(i) * 32'h9E3779B1 ^ 32'h5A5A; r.result = 32'(i) * 32'h01000193 + 7;
    r.check = r.result; r.is_branch = dt_is_br(i); r.long_lat = dt_is_long(i); r.target = dt_pc_of(i) + 32'h40;
    r.has_rd = !dt_is_br(i); r.rd = 5'((i % 5 == 0) ? 0 : 1 + (i * 7) % 31);
    r.src1 = 32'(i) ^ 32'h1111; r.src2 = 32'(i) + 3; r.seq = 0;
    return r;
  endfunction

  typedef struct { int i; int t; } dt_cl_t;
  dt_cl_t dt_clq[$];
  typedef struct { int due; logic [3:0] tag; logic [31:0] v; } dt_m2_t;
  dt_m2_t dt_m2q[$];

  initial begin
    int cur, now, inj, pend, kind_rr, rs;
    bit forced;
    commit_rec_t r;
    dt_head_valid = 0; dt_head_done = 0; dt_head_rec = '0; dt_dual_valid = 0; dt_dual_a = 0; dt_dual_b = 0; dt_cf_next = 0;
    dt_m1_valid = 0; dt_m1_inst = 0; dt_m1_target = 0; dt_m1_src1 = 0; dt_m1_src2 = 0; dt_m2_valid = 0; dt_m2_tag = 0;
    dt_m2_result = 0; dt_rf_idx = 0;
    cur = 0; now = 0; kind_rr = 0; pend = 0; forced = 0;
    wait (pe_done);
    repeat (2) @(posedge clk); rst_n = 1;
    while (dt_n_ver < dt_N && now < 200000) begin
      @(negedge clk); now++;
      if (forced) begin release dut.u_dt.u_commit.u_b.rec.result; forced = 0; end
      if (now % 97 == 0) begin pend = 1 + kind_rr % 5; kind_rr++; end
      inj = pend;
      // main core
      dt_head_valid = cur < dt_N; dt_head_done = $urandom_range(0, 9) < 7;
      dt_head_rec = dt_rec_of(cur < dt_N ? cur : dt_N - 1);
      if (inj == 2) dt_head_rec.inst = ~dt_head_rec.inst;
      if (inj == 3) begin if (dt_head_rec.long_lat) dt_head_rec.src1 = ~dt_head_rec.src1; else inj = 0; end
      if (inj == 4) begin if (!dt_head_rec.long_lat && !dt_head_rec.is_branch) begin dt_head_rec.result = ~dt_head_rec.result; dt_head_rec.check = dt_head_rec.result; end else inj = 0; end
      if ((inj == 2 || inj == 3 || inj == 4) && !(dt_head_valid && dt_head_done)) inj = 0;
      dt_dual_valid = $urandom_range(0, 3) == 0; dt_dual_a = $urandom(); dt_dual_b = dt_dual_a;
      if (inj == 1) begin dt_dual_valid = 1; dt_dual_b = ~dt_dual_a; end
      if (inj == 5) begin
        if (dt_head_valid && dt_head_done) begin force dut.u_dt.u_commit.u_b.rec.result = ~dt_head_rec.result; forced = 1; end
        else inj = 0;
      end
      if (inj != 0) pend = 0;   // injected now, else retried next cycle
      // clone fetch
      dt_cf_next = dt_cf_valid && $urandom_range(0, 1);
      // clone register read
      dt_m1_valid = dt_clq.size() > 0 && now - dt_clq[0].t >= 3;
      if (dt_m1_valid) begin
        r = dt_rec_of(dt_clq[0].i);
        dt_m1_inst = r.inst; dt_m1_target = r.target; dt_m1_src1 = r.src1; dt_m1_src2 = r.src2;
      end
      // clone writeback
      dt_m2_valid = 0;
      if (dt_m2q.size() > 0 && dt_m2q[0].due <= now) begin
        dt_m2_valid = 1; dt_m2_tag = dt_m2q[0].tag; dt_m2_result = dt_m2q[0].v; void'(dt_m2q.pop_front());
      end
      #1;
      if (dt_cf_next) dt_clq.push_back('{dt_idx_of(dt_cf_pc), now});
      if (dt_fault_detected) begin
        @(posedge clk); #1;
        dt_chk(dt_recover, "recover follows the detection");
        dt_n_kind[int'(dt_err_kind)]++; dt_n_rec++;
        rs = dt_idx_of(dt_restart_pc);
        dt_chk(rs <= cur && rs >= 0, "restart point is not younger than the committed head");
        dt_clq.delete(); dt_m2q.delete();
        if (forced) begin release dut.u_dt.u_commit.u_b.rec.result; forced = 0; end
        dt_head_valid = 0; dt_m1_valid = 0; dt_m2_valid = 0; dt_dual_valid = 0; dt_cf_next = 0;
        // register file after the rollback
        for (int reg_i = 0; reg_i < 32; reg_i++) begin
          int lw; lw = -1;
          for (int i = 0; i < rs; i++) if (dt_rec_of(i).has_rd && dt_rec_of(i).rd == 5'(reg_i) && reg_i != 0) lw = i;
          @(negedge clk); dt_rf_idx = 5'(reg_i); #1;
          dt_chk(dt_rf_status != 2'd1, "no transient register after recovery");
          if (lw >= 0) dt_chk(dt_rf_status == 2'd2 && dt_rf_value == dt_rec_of(lw).result, $sformatf("r%0d rolled back to its verified value", reg_i));
        end
        cur = rs;
        continue;
      end
      if (dt_ver_valid) dt_n_ver++;
      if (dt_m1_valid && dt_m1_ready) begin
        r = dt_rec_of(dt_clq[0].i);
        if (!r.long_lat && !r.is_branch) dt_m2q.push_back('{now + $urandom_range(1, 6), dt_m1_tag, r.check});
        void'(dt_clq.pop_front());
      end
      if (dt_commit) cur++;
    end
    dt_chk(dt_n_ver == dt_N, $sformatf("every instruction verified once (%0d of %0d)", dt_n_ver, dt_N));
    for (int k = 1; k < 6; k++) dt_chk(dt_n_kind[k] > 0, $sformatf("coverage: error kind %0d recovered", k));
    $display("verified=%0d recoveries=%0d dual=%0d frontend=%0d rename=%0d exec=%0d commit=%0d cycles=%0d",
             dt_n_ver, dt_n_rec, dt_n_kind[1], dt_n_kind[2], dt_n_kind[3], dt_n_kind[4], dt_n_kind[5], now);
    dt_done = 1;
  end

  // ===================== mechanism summary =====================
  always @(posedge clk) if (rst_n && pe_done) begin
    if (bf_l2_early_req) n_early_l2++;
    if (bf_cancel_dep) n_cancel++;
    if (bf_flush_window) n_flush++;
  end

  task automatic mech(input string name, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL: mechanism never happened: %s", name); end
    else $display("mechanism %-44s %0d", name, n);
  endtask

  initial begin
    wait (pe_done && bf_done && dt_done);
    mech("BF: load hit", bf_n_hit);
    mech("BF: filtered miss (1-cycle dependent cancel)", n_cancel);
    mech("BF: early L2 request", n_early_l2);
    mech("BF: unfiltered miss (3-cycle window flush)", n_flush);
    mech("BF: collision kept the bit set", bf_n_coll);
    mech("PEPU: pointer load identified", pe_n_ptr);
    mech("PEPU: address cache update", pe_n_acupd);
    mech("PEPU: pointer propagated from address cache", pe_n_prop);
    mech("PEPU: speculative prefetch", int'(pe_stat_pf_spec));
    mech("PEPU: prefetch with real base", pe_n_pf_left);
    mech("PEPU: correct pointer prediction", int'(pe_stat_pred_ok));
    mech("PEPU: store dependency retry", int'(pe_stat_dep_retry));
    mech("PEPU: prefetch cache hit", pe_n_pfc_hit);
    mech("PEPU: demand load merged with prefetch", pe_n_merge);
    mech("PEPU: bitmap stack restore", pe_n_restore);
    mech("PEPU: pointer store locked/updated address cache", pe_n_relink);
    mech("Ditto: instruction verified", dt_n_ver);
    mech("Ditto: dual-execution mismatch recovered", dt_n_kind[int'(ERR_DUAL)]);
    mech("Ditto: front-end mismatch recovered", dt_n_kind[int'(ERR_FRONTEND)]);
    mech("Ditto: rename/operand mismatch recovered", dt_n_kind[int'(ERR_RENAME)]);
    mech("Ditto: execution mismatch recovered", dt_n_kind[int'(ERR_EXEC)]);
    mech("Ditto: commit-copy mismatch recovered", dt_n_kind[int'(ERR_COMMIT)]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
