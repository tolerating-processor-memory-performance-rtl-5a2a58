// Self-checking testbench for ditto_checker, the whole checker. The testbench
// plays the main core (it commits a deterministic straight-line program of
// 3000 instructions, some long-latency, some branches) and the clone pipeline
// (it fetches from the delay buffer, presents each clone at register read and
// writes back short clones after a random delay). Every fault kind is
// injected repeatedly: differing dual executions, a wrongly fetched
// instruction, wrong long-latency operands, a wrong result, and one commit copy
// disagreeing (by forcing its output); a fault that cannot apply in a cycle
// (say, wrong operands when the head is not long-latency) waits for one that can. After each recovery the main core
// restarts at restart_pc and the testbench reads the whole register file:
// nothing may stay transient, and every register written before the restart
// point must be verified with its architectural value. At the end every
// instruction must have been verified exactly once.
module tb_ditto_checker;
  import ditto_pkg::*;
  localparam int N = 3000;
  logic clk = 0, rst_n = 0;
  logic head_valid, head_done, commit, dual_valid, cf_valid, cf_next, m1_valid, m1_ready, m2_valid;
  logic fault_detected, recover, ver_valid;
  commit_rec_t head_rec; logic [31:0] dual_a, dual_b, cf_pc, m1_inst, m1_target, m1_src1, m1_src2, m2_result;
  logic [31:0] rf_value, restart_pc, transient_map; logic [3:0] m1_tag, m2_tag; logic [4:0] rf_idx;
  logic [1:0] rf_status; err_e err_kind; logic [7:0] db_count;
  int checks = 0, failures = 0, n_ver = 0, n_rec = 0;
  int n_kind [6];
  ditto_checker #(.DB_DEPTH(128), .LPROB(16), .NREGS(32)) dut (.*);
  always #5 clk = ~clk;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  function automatic logic [31:0] pc_of(int i); return 32'h1000 + 32'(4 * i); endfunction
  function automatic int idx_of(logic [31:0] pc); return int'((pc - 32'h1000) >> 2); endfunction
  function automatic bit is_br(int i); return i % 7 == 5; endfunction
  function automatic bit is_long(int i); return i % 6 == 3 && !is_br(i); endfunction
  function automatic commit_rec_t rec_of(int i);
    commit_rec_t r;
    r.pc = pc_of(i); r.inst = 32'(i) * 32'h9E3779B1 ^ 32'h5A5A; r.result = 32'(i) * 32'h01000193 + 7;
    r.check = r.result; r.is_branch = is_br(i); r.long_lat = is_long(i); r.target = pc_of(i) + 32'h40;
    r.has_rd = !is_br(i); r.rd = 5'((i % 5 == 0) ? 0 : 1 + (i * 7) % 31);
    r.src1 = 32'(i) ^ 32'h1111; r.src2 = 32'(i) + 3; r.seq = 0;
    return r;
  endfunction

  typedef struct { int i; int t; } cl_t;
  cl_t clq[$];
  typedef struct { int due; logic [3:0] tag; logic [31:0] v; } m2_t;
  m2_t m2q[$];

  initial begin
    int cur, now, inj, pend, kind_rr, rs;
    bit forced;
    commit_rec_t r;
    head_valid = 0; head_done = 0; head_rec = '0; dual_valid = 0; dual_a = 0; dual_b = 0; cf_next = 0;
    m1_valid = 0; m1_inst = 0; m1_target = 0; m1_src1 = 0; m1_src2 = 0; m2_valid = 0; m2_tag = 0;
    m2_result = 0; rf_idx = 0;
    cur = 0; now = 0; kind_rr = 0; pend = 0; forced = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    while (n_ver < N && now < 200000) begin
      @(negedge clk); now++;
      if (forced) begin release dut.u_commit.u_b.rec.result; forced = 0; end
      if (now % 97 == 0) begin pend = 1 + kind_rr % 5; kind_rr++; end
      inj = pend;
      // main core
      head_valid = cur < N; head_done = $urandom_range(0, 9) < 7;
      head_rec = rec_of(cur < N ? cur : N - 1);
      if (inj == 2) head_rec.inst = ~head_rec.inst;
      if (inj == 3) begin if (head_rec.long_lat) head_rec.src1 = ~head_rec.src1; else inj = 0; end
      if (inj == 4) begin if (!head_rec.long_lat && !head_rec.is_branch) begin head_rec.result = ~head_rec.result; head_rec.check = head_rec.result; end else inj = 0; end
      if ((inj == 2 || inj == 3 || inj == 4) && !(head_valid && head_done)) inj = 0;
      dual_valid = $urandom_range(0, 3) == 0; dual_a = $urandom(); dual_b = dual_a;
      if (inj == 1) begin dual_valid = 1; dual_b = ~dual_a; end
      if (inj == 5) begin
        if (head_valid && head_done) begin force dut.u_commit.u_b.rec.result = ~head_rec.result; forced = 1; end
        else inj = 0;
      end
      if (inj != 0) pend = 0;   // injected now, else retried next cycle
      // clone fetch
      cf_next = cf_valid && $urandom_range(0, 1);
      // clone register read
      m1_valid = clq.size() > 0 && now - clq[0].t >= 3;
      if (m1_valid) begin
        r = rec_of(clq[0].i);
        m1_inst = r.inst; m1_target = r.target; m1_src1 = r.src1; m1_src2 = r.src2;
      end
      // clone writeback
      m2_valid = 0;
      if (m2q.size() > 0 && m2q[0].due <= now) begin
        m2_valid = 1; m2_tag = m2q[0].tag; m2_result = m2q[0].v; void'(m2q.pop_front());
      end
      #1;
      if (cf_next) clq.push_back('{idx_of(cf_pc), now});
      if (fault_detected) begin
        @(posedge clk); #1;
        chk(recover, "recover follows the detection");
        n_kind[int'(err_kind)]++; n_rec++;
        rs = idx_of(restart_pc);
        chk(rs <= cur && rs >= 0, "restart point is not younger than the committed head");
        clq.delete(); m2q.delete();
        if (forced) begin release dut.u_commit.u_b.rec.result; forced = 0; end
        head_valid = 0; m1_valid = 0; m2_valid = 0; dual_valid = 0; cf_next = 0;
        // register file after the rollback
        for (int reg_i = 0; reg_i < 32; reg_i++) begin
          int lw; lw = -1;
          for (int i = 0; i < rs; i++) if (rec_of(i).has_rd && rec_of(i).rd == 5'(reg_i) && reg_i != 0) lw = i;
          @(negedge clk); rf_idx = 5'(reg_i); #1;
          chk(rf_status != 2'd1, "no transient register after recovery");
          if (lw >= 0) chk(rf_status == 2'd2 && rf_value == rec_of(lw).result, $sformatf("r%0d rolled back to its verified value", reg_i));
        end
        cur = rs;
        continue;
      end
      if (ver_valid) n_ver++;
      if (m1_valid && m1_ready) begin
        r = rec_of(clq[0].i);
        if (!r.long_lat && !r.is_branch) m2q.push_back('{now + $urandom_range(1, 6), m1_tag, r.check});
        void'(clq.pop_front());
      end
      if (commit) cur++;
    end
    chk(n_ver == N, $sformatf("every instruction verified once (%0d of %0d)", n_ver, N));
    for (int k = 1; k < 6; k++) chk(n_kind[k] > 0, $sformatf("coverage: error kind %0d recovered", k));
    $display("verified=%0d recoveries=%0d dual=%0d frontend=%0d rename=%0d exec=%0d commit=%0d cycles=%0d",
             n_ver, n_rec, n_kind[1], n_kind[2], n_kind[3], n_kind[4], n_kind[5], now);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (400000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
