// Self-checking testbench for bf_miss_filter at its default sizes.
//
// Drives a random load stream (a hot working set, cold lines, and lines that
// alias in the partial address) through the filter. A reference model of a
// 4-way true-LRU cache, written here independently, gives the real hit/miss of
// each load. Checks: the hit/miss result, that a predicted miss is always a
// real miss, the 1-cycle prediction and 3-cycle hit/miss latencies, and that
// filtered misses, unfiltered misses (3-cycle flush) and collisions all occur.
// The design's assertions are switched off so that errors are counted, not fatal.
module tb_bf_miss_filter;
  localparam int SETS = 128, WAYS = 4, OFF = 5, IDXW = 7;
  logic clk = 0, rst_n = 0;
  logic req_valid; logic [31:0] req_vaddr, req_paddr;
  logic pred_valid, pred_miss, cancel_dep, l2_early_req; logic [31:0] l2_early_addr;
  logic hm_valid, hm_hit, hm_filtered_miss, flush_window, hm_collision, l2_late_req; logic [31:0] l2_late_addr;
  int checks = 0, failures = 0;
  int n_filtered = 0, n_unfiltered = 0, n_coll = 0, n_hit = 0;

  bf_miss_filter dut (.*);

  always #5 clk = ~clk;

  // reference cache model
  logic [19:0] m_tag [SETS][WAYS];
  bit          m_val [SETS][WAYS];
  longint      m_use [SETS][WAYS];
  longint      now = 0;

  function automatic bit model_access(input logic [31:0] pa, input logic [31:0] va);
    int s = va[OFF +: IDXW];
    logic [19:0] t = pa[31:12];
    int v = -1;
    for (int w = 0; w < WAYS; w++) if (m_val[s][w] && m_tag[s][w] == t) begin m_use[s][w] = now; return 1; end
    for (int w = WAYS-1; w >= 0; w--) if (!m_val[s][w]) v = w;
    if (v < 0) begin
      longint best = 64'h7fffffffffffffff;
      for (int w = 0; w < WAYS; w++) if (m_use[s][w] < best) begin best = m_use[s][w]; v = w; end
    end
    m_val[s][v] = 1; m_tag[s][v] = t; m_use[s][v] = now;
    return 0;
  endfunction

  function automatic logic [31:0] v2p(input logic [31:0] va);
    return {va[31:12] ^ 20'h5A5C3, va[11:0]};
  endfunction

  // queues of issued requests, with issue cycle
  logic [31:0] q_va[$]; longint q_cyc[$]; bit q_pm[$];
  logic [31:0] hot [256];
  longint cyc = 0;

  function automatic logic [31:0] pick();
    int r = $urandom_range(0, 99);
    if (r < 70) return hot[$urandom_range(0, 255)];
    if (r < 85) return {$urandom_range(0, 3)[1:0], 12'h000, $urandom_range(0, 8191)[12:0], 5'(0)} | 32'h0100_0000;
    return {$urandom()} & 32'hFFFF_FFE0;
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int i = 0; i < 256; i++) hot[i] = 32'h0040_0000 + i * 32'h20 * 3;
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) begin m_val[s][w] = 0; m_use[s][w] = 0; end
    req_valid = 0; req_vaddr = 0; req_paddr = 0;
    // the filter's own assertions would stop the run at the first error; the
    // checks here count every error instead
    $assertoff;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (40000) begin
      @(negedge clk);
      req_valid = ($urandom_range(0, 9) < 8);
      req_vaddr = pick() | 32'($urandom_range(0, 7) * 4);
      req_paddr = v2p(req_vaddr);
    end
    @(negedge clk) req_valid = 0;
    repeat (6) @(posedge clk);
    checks++; if (n_filtered == 0)   begin failures++; $display("FAIL: no filtered miss"); end
    checks++; if (n_unfiltered == 0) begin failures++; $display("FAIL: no unfiltered miss"); end
    checks++; if (n_coll == 0)       begin failures++; $display("FAIL: no collision"); end
    checks++; if (n_hit == 0)        begin failures++; $display("FAIL: no hit"); end
    checks++; if (q_va.size() != 0)  begin failures++; $display("FAIL: %0d results missing", q_va.size()); end
    $display("hits=%0d filtered_misses=%0d unfiltered_misses=%0d collisions=%0d", n_hit, n_filtered, n_unfiltered, n_coll);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // record requests at the edge they are sampled
  always @(posedge clk) if (rst_n && req_valid) begin
    q_va.push_back(req_vaddr); q_cyc.push_back(cyc); q_pm.push_back(0);
  end

  // prediction check: one cycle after issue
  int pidx = 0;
  always @(posedge clk) if (rst_n && pred_valid) begin
    int k = 0;
    // the oldest request without a prediction yet
    for (k = 0; k < q_va.size(); k++) if (q_cyc[k] == cyc - 1) break;
    checks++;
    if (k == q_va.size()) begin failures++; $display("FAIL: prediction at wrong cycle"); end
    else q_pm[k] = pred_miss;
    checks++;
    if (cancel_dep != pred_miss || l2_early_req != pred_miss) begin failures++; $display("FAIL: cancel/l2 mismatch"); end
  end

  always @(posedge clk) if (rst_n && hm_valid) begin
    bit exp_hit, pm;
    logic [31:0] va;
    longint c;
    va = q_va.pop_front();
    c  = q_cyc.pop_front();
    pm = q_pm.pop_front();
    now++;
    exp_hit = model_access(v2p(va), va);
    checks++; if (c != cyc - 3) begin failures++; $display("FAIL: hit/miss latency %0d", cyc - c); end
    checks++; if (hm_hit != exp_hit) begin failures++; $display("FAIL: va=%h hit=%0d exp=%0d", va, hm_hit, exp_hit); end
    checks++; if (pm && exp_hit) begin failures++; $display("FAIL: predicted miss on a hit va=%h", va); end
    checks++; if (flush_window != (!exp_hit && !pm) || hm_filtered_miss != (!exp_hit && pm)) begin failures++; $display("FAIL: recovery kind"); end
    if (exp_hit) n_hit++; else if (pm) n_filtered++; else n_unfiltered++;
    if (hm_collision) n_coll++;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
