// Self-checking testbench for pepu, the pointer-load prefetch unit as a whole.
// The testbench plays a small out-of-order core running the list-walk loop of
// the source design over a linked list of 150 scattered nodes:
//   I1 lw r4,4(r4); I2 be r4,r0; I3 lw r3,8(r4); I4 addi r3,r3,4;
//   I5 sw r3,8(r4); I6 jmp
// for 6 passes, without and with prefetch fills, then once more on a 12-node
// list that stays in the prefetch cache between passes. Between passes a relink (addi r7; addi r8; sw r8,4(r7))
// removes a node, so stores to next-pointer fields lock and then update the
// address cache. The exit branch of each pass is mispredicted: three
// wrong-path instructions (one clears TRB[4]) are decoded and then squashed,
// and the bitmap stack must restore the TRB. Loads take LAT cycles unless the
// prefetch cache hits (1 cycle); prefetch requests are filled after MEMLAT
// cycles from a committed-memory model; a demand miss to a line whose
// prefetch is in flight completes when that fill arrives. One instruction is decoded, written
// back and committed per cycle at most.
// Checks: pointer-load identification, writeback types (I1 is an address
// load, I3 a data load), prefetch-cache data against committed memory, no wrong
// prediction (stores keep the address cache coherent), and the whole run
// being faster with prefetch fills than with them turned off. Every
// mechanism must occur at least once.
module tb_pepu;
  import pepu_pkg::*;
  localparam int LAT = 12, MEMLAT = 12, NODES = 150, PASSES = 6;
  logic clk = 0, rst_n = 0;
  dec_t dec; logic dec_is_pointer, bs_full; logic [5:0] dec_bs_slot, br_slot;
  logic br_valid, br_mispredict, wb_valid, wb_is_load, commit_valid;
  logic [6:0] wb_rob, commit_rob, dep_query_rob, prop_rob;
  logic [31:0] wb_value, wb_va, dep_query_va, pf_req_va, pf_fill_va, ld_va, ld_data, st_addr_va, st_data_va, st_data, prop_value;
  logic dep_query_valid, dep_found, pf_req_valid, pf_req_spec, pf_fill_valid, ld_en, ld_valid, ld_pfc_hit;
  logic st_addr_valid, st_data_valid, prop_valid, ac_update;
  logic [255:0] pf_fill_line; ptype_e wb_type;
  logic [31:0] stat_pred_ok, stat_pred_bad, stat_dep_retry, stat_drop, stat_pf_spec;

  pepu dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_ptr = 0, n_acupd = 0, n_prop = 0, n_pf_left = 0, n_pfc_hit = 0, n_restore = 0, n_relink = 0, n_merge = 0;
  int n_addr_type = 0, n_data_type = 0;

  typedef struct {
    int seq; op_e op; int rd, rs, rt; logic [31:0] value, va; int kind;
    bit mispred, wrong, done, ld_issued, ptr; int bs_slot, src, ready_at;
  } ins_t;
  ins_t win[$];
  logic [31:0] cmem [int];          // committed memory, word addressed
  logic [31:0] amem [int];          // architectural memory at decode
  logic [31:0] areg [32];
  int last_w [32];
  int wbc [int];                    // seq -> writeback cycle
  int nodes [NODES];
  typedef struct { int due; logic [31:0] va; } fill_t;
  fill_t fq[$];

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  function automatic logic [31:0] rd_mem(ref logic [31:0] m [int], input logic [31:0] a);
    return m.exists(int'(a >> 2)) ? m[int'(a >> 2)] : 32'h0;
  endfunction

  // program generator state
  int pass, phase, wp_left, relink_a, relink_n;
  bit first_iter;

  task automatic gen(output ins_t n);
    n.seq = 0; n.op = OP_OTHER; n.rd = 0; n.rs = 0; n.rt = 0; n.value = 0; n.va = 0; n.kind = 0;
    n.ptr = 0; n.mispred = 0; n.wrong = 0; n.done = 0; n.ld_issued = 0; n.bs_slot = 0; n.ready_at = 0;
    n.src = -1;
    if (wp_left > 0) begin
      n.wrong = 1; wp_left--;
      case (wp_left)
        2: begin n.op = OP_LOAD; n.rd = 3; n.rs = 4; n.kind = 3; n.va = areg[4] + 8; end
        1: begin n.op = OP_ALU;  n.rd = 4; n.rs = 4; n.kind = 4; end
        default: begin n.op = OP_OTHER; n.kind = 6; end
      endcase
      return;
    end
    case (phase)
      0: begin n.op = OP_ALU; n.rd = 4; n.rs = 0; n.kind = 10; n.value = 32'h100; first_iter = 1; end
      1: begin n.op = OP_LOAD; n.rd = 4; n.rs = 4; n.kind = 1; n.va = areg[4] + 4; n.value = rd_mem(amem, n.va); end
      2: begin n.op = OP_BRANCH; n.rs = 4; n.rt = 0; n.kind = 2; n.mispred = (areg[4] == 0); end
      3: begin n.op = OP_LOAD; n.rd = 3; n.rs = 4; n.kind = 3; n.va = areg[4] + 8; n.value = rd_mem(amem, n.va); end
      4: begin n.op = OP_ALU; n.rd = 3; n.rs = 3; n.kind = 4; n.value = areg[3] + 4; end
      5: begin n.op = OP_STORE; n.rs = 4; n.rt = 3; n.kind = 5; n.va = areg[4] + 8; n.value = areg[3]; end
      6: begin n.op = OP_OTHER; n.kind = 6; end
      7: begin n.op = OP_LOAD; n.rd = 6; n.rs = 4; n.kind = 7; n.va = 0; n.value = rd_mem(amem, 0); end
      8: begin n.op = OP_ALU; n.rd = 7; n.rs = 0; n.kind = 10; n.value = relink_a; end
      9: begin n.op = OP_ALU; n.rd = 8; n.rs = 0; n.kind = 10; n.value = relink_n; end
      10: begin n.op = OP_STORE; n.rs = 7; n.rt = 8; n.kind = 8; n.va = relink_a + 4; n.value = relink_n; end
      default: ;
    endcase
  endtask

  task automatic advance(ref ins_t n);
    // architectural effects and next phase
    if (n.op == OP_STORE) amem[int'(n.va >> 2)] = n.value;
    if ((n.op == OP_LOAD || n.op == OP_ALU) && n.rd != 0) areg[n.rd] = n.value;
    if (n.wrong) return;
    case (phase)
      0: phase = 1;
      1: phase = 2;
      2: begin if (n.mispred) begin phase = 7; wp_left = 3; end else phase = 3; end
      6: begin phase = 1; first_iter = 0; end
      7: begin
           pass++;
           if (pass < PASSES) begin
             logic [31:0] a, b;
             // remove the node after a random live node
             a = 32'h100;
             repeat ($urandom_range(0, 20)) if (rd_mem(amem, rd_mem(amem, a + 4) + 4) != 0) a = rd_mem(amem, a + 4);
             b = rd_mem(amem, a + 4);
             relink_a = a; relink_n = (b != 0) ? rd_mem(amem, b + 4) : 0;
             phase = 8;
           end else phase = 99;
         end
      10: begin phase = 0; n_relink++; end
      default: phase++;
    endcase
  endtask

  function automatic bit older_store_blocks(int qseq, logic [31:0] va);
    foreach (win[i]) begin
      if (win[i].seq >= qseq) break;
      if (win[i].op == OP_STORE && !win[i].wrong && (!win[i].done || win[i].va[31:2] == va[31:2])) return 1;
    end
    return 0;
  endfunction

  int rob2seq [128];

  task automatic run(input bit use_pf, input int nn, output int cycles);
    int now, ld_pending, seq;
    ins_t n;
    bit ok;
    rst_n = 0;
    dec = '0; br_valid = 0; br_slot = 0; br_mispredict = 0; wb_valid = 0; wb_rob = 0; wb_value = 0;
    wb_is_load = 0; wb_va = 0; commit_valid = 0; commit_rob = 0; dep_found = 0; pf_fill_valid = 0;
    pf_fill_va = 0; pf_fill_line = 0; ld_en = 0; ld_va = 0; st_addr_valid = 0; st_addr_va = 0;
    st_data_valid = 0; st_data_va = 0; st_data = 0;
    win.delete(); fq.delete(); wbc.delete(); cmem.delete(); amem.delete();
    foreach (areg[r]) begin areg[r] = 0; last_w[r] = -1; end
    cmem[32'h104 >> 2] = nodes[0];
    for (int i = 0; i < nn; i++) begin
      cmem[nodes[i] / 4 + 1] = (i + 1 < nn) ? nodes[i + 1] : 0;
      cmem[nodes[i] / 4 + 2] = i;
    end
    amem = cmem;
    pass = 0; phase = 0; wp_left = 0; seq = 0; ld_pending = -1;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    now = 0;
    while (!(phase == 99 && win.size() == 0) && now < 200000) begin
      @(negedge clk); now++;
      // ---- sample registered outputs of the last cycle ----
      if (ld_pending >= 0) begin
        foreach (win[i]) if (win[i].seq == ld_pending) begin
          if (ld_pfc_hit) begin
            win[i].ready_at = now;
            n_pfc_hit++;
            if (!older_store_blocks(win[i].seq, win[i].va))
              chk(ld_data == rd_mem(cmem, win[i].va), "prefetch cache data matches memory");
          end else begin
            win[i].ready_at = now + LAT - 1;
            // a demand miss waits on an in-flight prefetch of its line
            foreach (fq[j]) if (fq[j].va == (win[i].va & ~32'h1F) && fq[j].due < win[i].ready_at) begin
              win[i].ready_at = fq[j].due; n_merge++;
            end
          end
        end
        ld_pending = -1;
      end
      if (pf_req_valid) begin
        if (pf_req_spec) ; else n_pf_left++;
        if (use_pf) fq.push_back('{now + MEMLAT, pf_req_va & ~32'h1F});
      end
      if (prop_valid) n_prop++;
      // ---- drive this cycle ----
      dec = '0; br_valid = 0; br_mispredict = 0; wb_valid = 0; wb_is_load = 0; commit_valid = 0;
      pf_fill_valid = 0; ld_en = 0; st_addr_valid = 0; st_data_valid = 0;
      dep_found = dep_query_valid && older_store_blocks(rob2seq[dep_query_rob], dep_query_va);
      // prefetch fill
      if (fq.size() > 0 && fq[0].due <= now) begin
        fill_t f;
        f = fq.pop_front();
        pf_fill_valid = 1; pf_fill_va = f.va;
        for (int w = 0; w < 8; w++) pf_fill_line[w*32 +: 32] = rd_mem(cmem, f.va + 32'(4 * w));
      end
      // commit the oldest finished instruction
      if (win.size() > 0 && win[0].done && wbc[win[0].seq] < now) begin
        commit_valid = 1; commit_rob = 7'(win[0].seq);
        if (win[0].op == OP_STORE) begin
          st_data_valid = 1; st_data_va = win[0].va; st_data = win[0].value;
          cmem[int'(win[0].va >> 2)] = win[0].value;
        end
        void'(win.pop_front());
      end
      // start a load whose base is available (one prefetch-cache read per cycle)
      foreach (win[i]) begin
        if (win[i].op == OP_LOAD && !win[i].ld_issued && !win[i].wrong &&
            (win[i].src < 0 || (wbc.exists(win[i].src) && wbc[win[i].src] < now))) begin
          win[i].ld_issued = 1; ld_en = 1; ld_va = win[i].va; ld_pending = win[i].seq;
          break;
        end
      end
      // write back the oldest ready instruction
      foreach (win[i]) begin
        bit srdy;
        srdy = win[i].src < 0 || (wbc.exists(win[i].src) && wbc[win[i].src] < now);
        if (!win[i].done && !win[i].wrong && srdy &&
            (win[i].op == OP_LOAD ? (win[i].ready_at > 0 && win[i].ready_at <= now) : 1)) begin
          win[i].done = 1; wbc[win[i].seq] = now;
          wb_valid = 1; wb_rob = 7'(win[i].seq); wb_value = win[i].value;
          wb_is_load = win[i].op == OP_LOAD; wb_va = win[i].va;
          if (win[i].op == OP_STORE) begin st_addr_valid = 1; st_addr_va = win[i].va; end
          if (win[i].op == OP_BRANCH) begin
            br_valid = 1; br_slot = 6'(win[i].bs_slot); br_mispredict = win[i].mispred;
            if (win[i].mispred) begin
              n_restore++;
              while (win.size() > i + 1) void'(win.pop_back());
              foreach (last_w[r]) last_w[r] = -1;
              foreach (win[k]) if (win[k].rd != 0 && (win[k].op == OP_LOAD || win[k].op == OP_ALU)) last_w[win[k].rd] = win[k].seq;
              areg[4] = 0; areg[3] = win[i].seq >= 0 ? areg[3] : 0;
            end
          end
          break;
        end
      end
      // decode one instruction
      if (phase != 99 && win.size() < 40 && !bs_full && wp_left >= 0 &&
          !(win.size() > 0 && win[$].wrong && wp_left == 0) && !br_mispredict) begin
        gen(n);
        n.seq = seq; seq++;
        rob2seq[n.seq % 128] = n.seq;
        if (n.rs != 0) n.src = last_w[n.rs];
        if (n.src >= 0 && wbc.exists(n.src) && wbc[n.src] < now - 1) n.src = -1;
        dec.valid = 1; dec.op = n.op; dec.rd = 5'(n.rd); dec.rs = 5'(n.rs); dec.rt = 5'(n.rt);
        dec.rs_ready = n.src < 0; dec.rs_value = areg[n.rs];
        dec.offset = (n.op == OP_LOAD || n.op == OP_STORE) ? n.va - areg[n.rs] : 0;
        dec.rob = 7'(n.seq); dec.prod_rob = n.src >= 0 ? 7'(n.src) : 7'(0);
        n.bs_slot = dec_bs_slot;
        #1;
        if (n.kind == 3 && !n.wrong && !first_iter || n.kind == 1 && !first_iter || n.kind == 7) begin
          chk(dec_is_pointer, $sformatf("pointer load identified (kind %0d pass %0d)", n.kind, pass));
          if (dec_is_pointer) n_ptr++;
        end
        n.ptr = dec_is_pointer;
        begin
        end
        if ((n.op == OP_LOAD || n.op == OP_ALU) && n.rd != 0) last_w[n.rd] = n.seq;
        advance(n);
        win.push_back(n);
      end else #1;
      // writeback classification
      if (wb_valid && wb_is_load) begin
        if (rob2seq[wb_rob] >= 0) begin
          foreach (win[i]) if (win[i].seq == rob2seq[wb_rob]) begin
            if (win[i].kind == 1 && win[i].value != 0 && win[i].ptr) begin
              chk(wb_type == PT_ADDR && ac_update, "next-pointer load is an address load and updates the address cache");
              n_addr_type++;
            end
            if (win[i].kind == 3) begin
              chk(wb_type == PT_DATA && !ac_update, "data-field load is a data load");
              n_data_type++;
            end
          end
        end
        if (ac_update) n_acupd++;
      end
    end
    cycles = now;
    chk(now < 200000, "workload finished");
  endtask

  initial begin
    int c_pf, c_nopf, c_short;
    for (int i = 0; i < NODES; i++) nodes[i] = 32'h10000 + i * 32'h1C4;
    for (int i = NODES - 1; i > 0; i--) begin int j, t; j = $urandom_range(0, i); t = nodes[i]; nodes[i] = nodes[j]; nodes[j] = t; end
    run(0, NODES, c_nopf);
    chk(stat_pred_bad == 0, "no wrong pointer predictions (no prefetch fills)");
    run(1, NODES, c_pf);
    chk(stat_pred_bad == 0, "no wrong pointer predictions");
    // a short list stays in the prefetch cache between passes
    run(1, 12, c_short);
    chk(stat_pred_bad == 0, "no wrong pointer predictions (short list)");
    $display("cycles: no prefetch %0d, prefetch %0d", c_nopf, c_pf);
    $display("ptr=%0d acupd=%0d prop=%0d spec_pf=%0d left_pf=%0d pred_ok=%0d dep_retry=%0d pfc_hit=%0d merge=%0d restore=%0d relink=%0d drop=%0d",
             n_ptr, n_acupd, n_prop, stat_pf_spec, n_pf_left, stat_pred_ok, stat_dep_retry, n_pfc_hit, n_merge, n_restore, n_relink, stat_drop);
    chk(c_pf < c_nopf, "prefetching shortens the list walk");
    chk(n_ptr > 0, "mechanism: pointer loads identified");
    chk(n_acupd > 0 && n_addr_type > 0 && n_data_type > 0, "mechanism: address cache updated by address loads");
    chk(n_prop > 0, "mechanism: predicted pointer propagated");
    chk(stat_pf_spec > 0, "mechanism: speculative prefetch");
    chk(n_pf_left > 0, "mechanism: prefetch with a real base");
    chk(stat_pred_ok > 0, "mechanism: correct prediction checked");
    chk(stat_dep_retry > 0, "mechanism: store dependency retry");
    chk(n_pfc_hit > 0, "mechanism: prefetch cache hit");
    chk(n_merge > 0, "mechanism: demand load served by an in-flight prefetch");
    chk(n_restore > 0, "mechanism: bitmap restore on a misprediction");
    chk(n_relink > 0, "mechanism: pointer store kept the address cache coherent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (1000000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
