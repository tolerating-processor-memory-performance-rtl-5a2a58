// Self-checking testbench for ditto_verify. The testbench supplies the delay
// buffer contents, the clone instructions at register read (m1) and the clone
// writebacks (m2, out of order, for short-latency non-branch clones), and keeps
// a model of the 16-entry long-pipeline ROB. Checks that instructions are
// verified in program order with the committed value, never before their
// clone finished, and that the ROB never holds more than 16. Faults of each
// kind are injected one at a time: differing dual executions, a wrong
// re-fetched instruction or branch target, wrong long-latency operands, a wrong
// clone result and a commit-copy disagreement. Each must raise err in that
// cycle and, one cycle later, recover with the right kind and the PC of the
// oldest unverified instruction.
module tb_ditto_verify;
  import ditto_pkg::*;
  logic clk = 0, rst_n = 0;
  logic dual_valid, m1_valid, m1_ready, db_valid, db_pop, m2_valid, ver_valid, ver_has_rd, ext_err, err, recover;
  logic [31:0] dual_a, dual_b, m1_inst, m1_target, m1_src1, m1_src2, m2_result, ver_value, next_pc, restart_pc;
  logic [3:0] m1_tag, m2_tag; logic [4:0] ver_rd; logic [7:0] ver_seq;
  commit_rec_t db_rec; err_e err_kind;
  int checks = 0, failures = 0, n_ver = 0;
  int n_kind [6];
  commit_rec_t dbq[$];
  typedef struct { bit done; commit_rec_t r; logic [3:0] tag; } lp_t;
  lp_t lp[$];
  typedef struct { int due; logic [3:0] tag; logic [31:0] v; } m2_t;
  m2_t m2q[$];
  logic [7:0] seqc = 0; logic [31:0] pcc = 32'h400;
  ditto_verify #(.LPROB(16)) dut (.*);
  always #5 clk = ~clk;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  initial begin
    int now = 0, inj; err_e ek; logic [31:0] epc; bit go;
    dual_valid = 0; dual_a = 0; dual_b = 0; m1_valid = 0; m1_inst = 0; m1_target = 0; m1_src1 = 0; m1_src2 = 0;
    m2_valid = 0; m2_tag = 0; m2_result = 0; ext_err = 0; next_pc = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (60000) begin
      @(negedge clk); now++;
      // new committed records
      if (dbq.size() < 8 && $urandom_range(0, 1)) begin
        commit_rec_t r;
        r.pc = pcc; pcc += 4; r.inst = $urandom(); r.result = $urandom(); r.check = r.result;
        r.is_branch = $urandom_range(0, 5) == 0; r.long_lat = !r.is_branch && $urandom_range(0, 4) == 0;
        r.target = $urandom(); r.has_rd = !r.is_branch; r.rd = 5'($urandom_range(1, 31));
        r.src1 = $urandom(); r.src2 = $urandom(); r.seq = seqc; seqc++;
        dbq.push_back(r);
      end
      next_pc = pcc;
      db_valid = dbq.size() > 0;
      db_rec = dbq.size() > 0 ? dbq[0] : '0;
      inj = $urandom_range(0, 299) == 0 ? $urandom_range(1, 5) : 0;
      dual_valid = $urandom_range(0, 3) == 0; dual_a = $urandom(); dual_b = dual_a;
      if (inj == 1) begin dual_valid = 1; dual_b = ~dual_a; end
      ext_err = inj == 5;
      go = db_valid && $urandom_range(0, 1);
      m1_valid = go;
      if (go) begin
        m1_inst = dbq[0].inst; m1_target = dbq[0].target; m1_src1 = dbq[0].src1; m1_src2 = dbq[0].src2;
        if (inj == 2) begin if (dbq[0].is_branch && $urandom_range(0, 1)) m1_target = ~m1_target; else m1_inst = ~m1_inst; end
        if (inj == 3) begin if (dbq[0].long_lat) m1_src2 = ~m1_src2; else inj = 0; end
      end else if (inj == 2 || inj == 3) inj = 0;
      m2_valid = 0;
      if (m2q.size() > 0) begin
        int k;
        k = $urandom_range(0, m2q.size() - 1);
        if (m2q[k].due <= now) begin
          m2_valid = 1; m2_tag = m2q[k].tag; m2_result = m2q[k].v;
          if (inj == 4) m2_result = ~m2_result;
          m2q.delete(k);
        end
      end
      if (inj == 4 && !m2_valid) inj = 0;
      #1;
      // expected error
      ek = inj == 5 ? ERR_COMMIT : inj == 1 ? ERR_DUAL : inj == 2 ? ERR_FRONTEND : inj == 3 ? ERR_RENAME :
           inj == 4 ? ERR_EXEC : ERR_NONE;
      chk(err == (ek != ERR_NONE), $sformatf("error detected (inject %0d)", inj));
      chk(m1_ready == (db_valid && lp.size() < 16), "m1 ready while fewer than 16 in flight");
      if (ek == ERR_NONE) begin
        chk(ver_valid == (lp.size() > 0 && lp[0].done), "verify when the oldest is done");
        if (lp.size() > 0 && lp[0].done)
          chk(ver_rd == lp[0].r.rd && ver_has_rd == lp[0].r.has_rd && ver_value == lp[0].r.result &&
              ver_seq == lp[0].r.seq, "verified instruction in order");
      end else chk(!ver_valid, "nothing verified in an error cycle");
      epc = lp.size() > 0 ? lp[0].r.pc : db_valid ? dbq[0].pc : next_pc;
      @(posedge clk);
      if (ek != ERR_NONE) begin
        #1;
        chk(recover && err_kind == ek && restart_pc == epc, $sformatf("recovery kind %s pc", ek.name()));
        n_kind[int'(ek)]++;
        lp.delete(); dbq.delete(); m2q.delete();
        pcc = epc;
      end else begin
        if (ver_valid) begin void'(lp.pop_front()); n_ver++; end
        if (m2_valid) foreach (lp[i]) if (lp[i].tag == m2_tag) lp[i].done = 1;
        if (m1_valid && m1_ready) begin
          commit_rec_t r;
          r = dbq.pop_front();
          lp.push_back('{r.long_lat || r.is_branch, r, m1_tag});
          if (!(r.long_lat || r.is_branch)) m2q.push_back('{now + $urandom_range(1, 12), m1_tag, r.check});
        end
      end
    end
    for (int k = 1; k < 6; k++) chk(n_kind[k] > 0, $sformatf("coverage: error kind %0d", k));
    chk(n_ver > 1000, "coverage: verifications");
    $display("verified=%0d dual=%0d frontend=%0d rename=%0d exec=%0d commit=%0d", n_ver, n_kind[1], n_kind[2], n_kind[3], n_kind[4], n_kind[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
