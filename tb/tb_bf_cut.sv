// Self-checking testbench for bf_cut: random writes of partial-address bits
// into lines of a small table, then reads of random victims; the victim's bits
// and the collision flag are compared with a model held in the testbench.
module tb_bf_cut;
  localparam int SETS = 4, WAYS = 4, P2 = 3;
  logic clk = 0, rst_n = 0;
  logic [1:0] idx, victim_way, wr_idx, wr_way; logic victim_valid, collision, wr_en;
  logic [P2-1:0] victim_p2, wr_p2;
  int checks = 0, failures = 0, n_coll = 0, n_free = 0;
  logic [P2-1:0] mp [SETS][WAYS]; bit mv [SETS][WAYS];
  bf_cut #(.SETS(SETS), .WAYS(WAYS), .P2_W(P2)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) begin mv[s][w] = 0; mp[s][w] = 0; end
    wr_en = 0; idx = 0; victim_way = 0; wr_idx = 0; wr_way = 0; wr_p2 = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (5000) begin
      bit ec;
      @(negedge clk);
      idx = 2'($urandom()); victim_way = 2'($urandom());
      wr_en = $urandom_range(0, 1); wr_idx = 2'($urandom()); wr_way = 2'($urandom()); wr_p2 = P2'($urandom());
      #1;
      ec = 0;
      for (int w = 0; w < WAYS; w++) if (w != victim_way && mv[idx][w] && mp[idx][w] == mp[idx][victim_way]) ec = 1;
      checks++; if (victim_valid != mv[idx][victim_way]) begin failures++; $display("FAIL: valid"); end
      checks++; if (mv[idx][victim_way] && victim_p2 != mp[idx][victim_way]) begin failures++; $display("FAIL: p2"); end
      checks++; if (collision != ec) begin failures++; $display("FAIL: collision %0d exp %0d", collision, ec); end
      if (ec) n_coll++; else n_free++;
      @(posedge clk);
      if (wr_en) begin mv[wr_idx][wr_way] = 1; mp[wr_idx][wr_way] = wr_p2; end
    end
    checks++; if (n_coll == 0 || n_free == 0) begin failures++; $display("FAIL: coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
