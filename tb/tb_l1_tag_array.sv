// Self-checking testbench for l1_tag_array: a random access stream with
// allocate-on-miss against a true-LRU reference model kept as last-use
// timestamps. Checks hit/miss, hit way, victim choice and victim tag.
module tb_l1_tag_array;
  localparam int SETS = 8, WAYS = 4, TW = 6;
  logic clk = 0, rst_n = 0;
  logic [2:0] idx, touch_idx, alloc_idx; logic [TW-1:0] tag, victim_tag, alloc_tag;
  logic hit, victim_valid, touch_en, alloc_en; logic [1:0] hit_way, victim_way, touch_way, alloc_way;
  int checks = 0, failures = 0, n_evict = 0;
  logic [TW-1:0] mt [SETS][WAYS]; bit mv [SETS][WAYS]; longint mu [SETS][WAYS];
  l1_tag_array #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TW)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    longint now = 0;
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) begin mv[s][w] = 0; mu[s][w] = 0; mt[s][w] = 0; end
    touch_en = 0; alloc_en = 0; idx = 0; tag = 0; touch_idx = 0; touch_way = 0; alloc_idx = 0; alloc_way = 0; alloc_tag = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (20000) begin
      int hw, vw; bit eh;
      @(negedge clk);
      idx = 3'($urandom()); tag = TW'($urandom_range(0, 9));
      #1;
      eh = 0; hw = -1; vw = -1;
      for (int w = 0; w < WAYS; w++) if (mv[idx][w] && mt[idx][w] == tag) begin eh = 1; hw = w; end
      for (int w = WAYS-1; w >= 0; w--) if (!mv[idx][w]) vw = w;
      if (vw < 0) begin longint b; b = 64'h7fffffffffffffff; for (int w = 0; w < WAYS; w++) if (mu[idx][w] < b) begin b = mu[idx][w]; vw = w; end end
      checks++; if (hit != eh) begin failures++; $display("FAIL: hit %0d exp %0d", hit, eh); end
      if (eh) begin checks++; if (hit_way != 2'(hw)) begin failures++; $display("FAIL: hit way"); end end
      else begin
        checks++; if (victim_way != 2'(vw)) begin failures++; $display("FAIL: victim way %0d exp %0d", victim_way, vw); end
        checks++; if (victim_valid != mv[idx][vw] || (mv[idx][vw] && victim_tag != mt[idx][vw])) begin failures++; $display("FAIL: victim info"); end
        if (mv[idx][vw]) n_evict++;
      end
      touch_en = hit; touch_idx = idx; touch_way = hit_way;
      alloc_en = !hit; alloc_idx = idx; alloc_way = victim_way; alloc_tag = tag;
      @(posedge clk); now++;
      if (eh) mu[idx][hw] = now; else begin mv[idx][vw] = 1; mt[idx][vw] = tag; mu[idx][vw] = now; end
    end
    checks++; if (n_evict == 0) begin failures++; $display("FAIL: no eviction"); end
    $display("evictions=%0d", n_evict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
