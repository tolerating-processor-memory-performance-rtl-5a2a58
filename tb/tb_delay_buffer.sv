// Self-checking testbench for delay_buffer: random pushes of short and
// long-latency commit records (a long one takes two slots, the second holding
// its source operands), pops by the checker, advances of the clone-fetch
// pointer and rare flushes, against a queue model kept here. Checks the head
// record, the operands of long records, the clone-fetch PC, the slot count
// and the one- and two-slot space flags at 128 slots. A record is popped only
// after the clone fetch has passed it, as in the checker.
module tb_delay_buffer;
  import ditto_pkg::*;
  localparam int D = 128;
  logic clk = 0, rst_n = 0;
  logic flush, push, space1, space2, head_valid, pop, cf_valid, cf_next;
  commit_rec_t push_rec, head_rec; logic [31:0] cf_pc; logic [7:0] count;
  int checks = 0, failures = 0, n_long = 0, n_full = 0;
  commit_rec_t q[$]; int cf_i; int used;
  delay_buffer #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  function automatic commit_rec_t rnd();
    commit_rec_t r;
    r.pc = $urandom(); r.inst = $urandom(); r.result = $urandom(); r.check = $urandom();
    r.target = $urandom(); r.is_branch = $urandom_range(0, 1); r.long_lat = $urandom_range(0, 3) == 0;
    r.has_rd = $urandom_range(0, 1); r.rd = 5'($urandom()); r.src1 = $urandom(); r.src2 = $urandom();
    r.seq = 8'($urandom());
    return r;
  endfunction
  initial begin
    bit ok, fill_phase;
    flush = 0; push = 0; pop = 0; cf_next = 0; push_rec = '0; cf_i = 0; used = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 40000; it++) begin
      @(negedge clk);
      fill_phase = (it / 2000) % 2 == 0;
      push = $urandom_range(0, 99) < (fill_phase ? 80 : 40); push_rec = rnd();
      pop = cf_i > 0 && $urandom_range(0, 99) < (fill_phase ? 30 : 70);
      cf_next = $urandom_range(0, 1);
      flush = $urandom_range(0, 3000) == 0;
      #1;
      chk(count == 8'(used), "slot count");
      chk(space1 == (used + 1 <= D) && space2 == (used + 2 <= D), "space flags");
      chk(head_valid == (q.size() > 0), "head valid");
      if (q.size() > 0) begin
        commit_rec_t e;
        e = q[0];
        if (!e.long_lat) begin e.src1 = 0; e.src2 = 0; end
        chk(head_rec == e, "head record");
      end
      chk(cf_valid == (cf_i < q.size()), "clone fetch valid");
      if (cf_i < q.size()) chk(cf_pc == q[cf_i].pc, "clone fetch pc");
      if (!space2) n_full++;
      @(posedge clk);
      if (flush) begin q.delete(); cf_i = 0; used = 0; end
      else begin
        ok = push && (push_rec.long_lat ? used + 2 <= D : used + 1 <= D);
        if (cf_next && cf_i < q.size()) cf_i++;
        if (pop) begin
          used -= q[0].long_lat ? 2 : 1;
          void'(q.pop_front());
          if (cf_i > 0) cf_i--;
        end
        if (ok) begin q.push_back(push_rec); used += push_rec.long_lat ? 2 : 1; if (push_rec.long_lat) n_long++; end
      end
    end
    chk(n_long > 0 && n_full > 0, "coverage: long records and a full buffer");
    $display("long=%0d full_cycles=%0d", n_long, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
