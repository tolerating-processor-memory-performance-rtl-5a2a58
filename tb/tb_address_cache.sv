// Self-checking testbench for address_cache: random allocations, reads, store
// locks, store data writes and flushes over a small address range so entries
// conflict, compared with a per-entry model kept here. Checks the one-cycle
// read latency, the tag compare, that a locked entry never gives a hit and
// that the store data write unlocks it.
module tb_address_cache;
  localparam int E = 256;
  logic clk = 0, rst_n = 0;
  logic rd_en, rd_valid, rd_hit, rd_locked, upd_en, st_lock_en, st_wr_en, flush;
  logic [31:0] rd_va, rd_data, upd_va, upd_data, st_lock_va, st_wr_va, st_wr_data;
  int checks = 0, failures = 0, n_hit = 0, n_lock = 0, n_miss = 0;
  bit mv[E], ml[E]; logic [21:0] mt[E]; logic [31:0] md[E];
  address_cache #(.ENTRIES(E), .XLEN(32)) dut (.*);
  always #5 clk = ~clk;
  function automatic logic [31:0] ra();
    return {$urandom_range(0, 3) == 0 ? 22'h1 : 22'h0, 8'($urandom()), 2'b00};
  endfunction
  initial begin
    bit eh, el; logic [31:0] ed; int i;
    rd_en = 0; upd_en = 0; st_lock_en = 0; st_wr_en = 0; flush = 0;
    rd_va = 0; upd_va = 0; upd_data = 0; st_lock_va = 0; st_wr_va = 0; st_wr_data = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (40000) begin
      @(negedge clk);
      rd_en = $urandom_range(0, 1); rd_va = ra();
      upd_en = $urandom_range(0, 3) == 0; upd_va = ra(); upd_data = $urandom();
      st_lock_en = $urandom_range(0, 5) == 0; st_lock_va = ra();
      st_wr_en = $urandom_range(0, 7) == 0; st_wr_va = ra(); st_wr_data = $urandom();
      flush = $urandom_range(0, 200) == 0;
      i = rd_va[9:2];
      eh = rd_en && mv[i] && mt[i] == rd_va[31:10] && !ml[i];
      el = rd_en && mv[i] && mt[i] == rd_va[31:10] && ml[i];
      ed = md[i];
      begin
        bit lh, wh; int li, wi, ui;
        li = st_lock_va[9:2]; wi = st_wr_va[9:2]; ui = upd_va[9:2];
        lh = mv[li] && mt[li] == st_lock_va[31:10];
        wh = mv[wi] && mt[wi] == st_wr_va[31:10];
        @(posedge clk);
        if (upd_en) begin
          if (!(mv[ui] && mt[ui] == upd_va[31:10])) ml[ui] = 0;
          mv[ui] = 1; mt[ui] = upd_va[31:10]; md[ui] = upd_data;
        end
        if (st_lock_en && lh) ml[li] = 1;
        if (st_wr_en && wh) begin md[wi] = st_wr_data; ml[wi] = 0; end
        if (flush) foreach (ml[k]) ml[k] = 0;
      end
      #1;
      checks++;
      if (rd_valid != rd_en || rd_hit != eh || rd_locked != el || (eh && rd_data != ed)) begin
        failures++; $display("FAIL: read va=%h hit=%b/%b locked=%b/%b", rd_va, rd_hit, eh, rd_locked, el);
      end
      if (eh) n_hit++; else if (el) n_lock++; else if (rd_en) n_miss++;
    end
    checks++; if (n_hit == 0 || n_lock == 0 || n_miss == 0) begin failures++; $display("FAIL: coverage"); end
    $display("hits=%0d locked=%0d misses=%0d", n_hit, n_lock, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
