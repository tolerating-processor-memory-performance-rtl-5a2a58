// Self-checking testbench for prefetch_cache: random line fills, word reads,
// probes and store updates over a small address range, compared with a model
// of a direct-mapped, virtually addressed 32-line buffer kept here. Checks the
// one-cycle read latency, the word selected and that stores only update a
// present line (including one filled in the same cycle).
module tb_prefetch_cache;
  localparam int L = 32;
  logic clk = 0, rst_n = 0;
  logic rd_en, rd_valid, rd_hit, probe_hit, fill_en, st_en;
  logic [31:0] rd_va, rd_data, probe_va, fill_va, st_va, st_data;
  logic [255:0] fill_line;
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0, n_st = 0;
  bit mv[L]; logic [21:0] mt[L]; logic [31:0] md[L][8];
  prefetch_cache #(.LINES(L), .LINE_BYTES(32), .XLEN(32)) dut (.*);
  always #5 clk = ~clk;
  function automatic logic [31:0] ra();
    return {$urandom_range(0, 2) == 0 ? 22'h3 : 22'h2, 10'($urandom()) & 10'h3FC};
  endfunction
  function automatic bit present(logic [31:0] a);
    return mv[a[9:5]] && mt[a[9:5]] == a[31:10];
  endfunction
  initial begin
    bit eh, ep, sh; logic [31:0] ed;
    rd_en = 0; fill_en = 0; st_en = 0; rd_va = 0; probe_va = 0; fill_va = 0; st_va = 0; st_data = 0; fill_line = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (40000) begin
      @(negedge clk);
      rd_en = $urandom_range(0, 1); rd_va = ra(); probe_va = ra();
      fill_en = $urandom_range(0, 3) == 0; fill_va = ra();
      for (int w = 0; w < 8; w++) fill_line[w*32 +: 32] = $urandom();
      st_en = $urandom_range(0, 3) == 0; st_va = ra(); st_data = $urandom();
      #1;
      ep = present(probe_va);
      checks++; if (probe_hit != ep) begin failures++; $display("FAIL: probe"); end
      eh = rd_en && present(rd_va); ed = md[rd_va[9:5]][rd_va[4:2]];
      sh = (fill_en && fill_va[31:5] == st_va[31:5]) ||
           (!(fill_en && fill_va[9:5] == st_va[9:5]) && present(st_va));
      @(posedge clk);
      if (fill_en) begin
        mv[fill_va[9:5]] = 1; mt[fill_va[9:5]] = fill_va[31:10];
        for (int w = 0; w < 8; w++) md[fill_va[9:5]][w] = fill_line[w*32 +: 32];
      end
      if (st_en && sh) begin md[st_va[9:5]][st_va[4:2]] = st_data; n_st++; end
      #1;
      checks++;
      if (rd_valid != rd_en || rd_hit != eh || (eh && rd_data != ed)) begin
        failures++; $display("FAIL: read va=%h hit=%b/%b data=%h/%h", rd_va, rd_hit, eh, rd_data, ed);
      end
      if (eh) n_hit++; else if (rd_en) n_miss++;
    end
    checks++; if (n_hit == 0 || n_miss == 0 || n_st == 0) begin failures++; $display("FAIL: coverage"); end
    $display("hits=%0d misses=%0d store_updates=%0d", n_hit, n_miss, n_st);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
