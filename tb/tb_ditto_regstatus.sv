// Self-checking testbench for ditto_regstatus: random commit writes (which make
// a register transient), verifications of older or current writes, and
// flushes, against a model kept here. Checks that a register becomes verified
// only when the verified write is its newest one, and that a flush puts every
// transient register back to its last verified value (or invalid if it never
// had one) while verified registers keep theirs.
module tb_ditto_regstatus;
  import ditto_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en, ver_en, flush; logic [4:0] wr_rd, ver_rd, rd_idx;
  logic [31:0] wr_value, ver_value, rd_value; logic [7:0] wr_seq, ver_seq;
  logic [1:0] rd_status; logic [31:0] transient_map;
  int checks = 0, failures = 0, n_ver = 0, n_roll = 0;
  logic [31:0] m_val[32], m_safe[32]; logic [7:0] m_seq[32]; int m_st[32]; bit m_sok[32];
  typedef struct { int rd; logic [31:0] v; logic [7:0] s; } w_t;
  w_t pend[$]; logic [7:0] seqc;
  ditto_regstatus #(.NREGS(32)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    foreach (m_val[r]) begin m_val[r] = 0; m_safe[r] = 0; m_seq[r] = 0; m_st[r] = 0; m_sok[r] = 0; end
    wr_en = 0; ver_en = 0; flush = 0; wr_rd = 0; ver_rd = 0; rd_idx = 0; wr_value = 0; ver_value = 0;
    wr_seq = 0; ver_seq = 0; seqc = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (30000) begin
      @(negedge clk);
      wr_en = $urandom_range(0, 1); wr_rd = 5'($urandom_range(0, 7)); wr_value = $urandom(); wr_seq = seqc;
      ver_en = pend.size() > 0 && $urandom_range(0, 1);
      if (ver_en) begin ver_rd = 5'(pend[0].rd); ver_value = pend[0].v; ver_seq = pend[0].s; end
      flush = $urandom_range(0, 60) == 0;
      rd_idx = 5'($urandom_range(0, 7));
      #1;
      checks++;
      if (rd_value != m_val[rd_idx] || rd_status != 2'(m_st[rd_idx])) begin
        failures++; $display("FAIL: r%0d value %h/%h status %0d/%0d", rd_idx, rd_value, m_val[rd_idx], rd_status, m_st[rd_idx]);
      end
      for (int r = 0; r < 32; r++) begin
        checks++; if (transient_map[r] != (m_st[r] == 1)) begin failures++; $display("FAIL: transient map r%0d", r); end
      end
      @(posedge clk);
      if (flush) begin
        for (int r = 0; r < 32; r++) if (m_st[r] == 1) begin m_val[r] = m_safe[r]; m_st[r] = m_sok[r] ? 2 : 0; n_roll++; end
        pend.delete();
      end else begin
        if (ver_en) begin
          void'(pend.pop_front());
          m_safe[ver_rd] = ver_value; m_sok[ver_rd] = 1;
          if (m_seq[ver_rd] == ver_seq && m_st[ver_rd] == 1) begin m_st[ver_rd] = 2; n_ver++; end
        end
        if (wr_en) begin
          m_val[wr_rd] = wr_value; m_seq[wr_rd] = wr_seq; m_st[wr_rd] = 1;
          pend.push_back('{int'(wr_rd), wr_value, wr_seq}); seqc++;
        end
      end
    end
    checks++; if (n_ver == 0 || n_roll == 0) begin failures++; $display("FAIL: coverage"); end
    $display("verified=%0d rolled_back=%0d", n_ver, n_roll);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
