// Self-checking testbench for bf_partial_array: random set/clear/query
// traffic compared with a bit-vector model kept in the testbench, including
// the case where a set and a clear hit the same index in one cycle.
module tb_bf_partial_array;
  localparam int P = 13;
  logic clk = 0, rst_n = 0;
  logic [P-1:0] q_idx, set_idx, clr_idx; logic q_member, set_en, clr_en;
  int checks = 0, failures = 0, n_same = 0;
  bit model [1<<P];
  bf_partial_array #(.P_BITS(P)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    for (int i = 0; i < (1<<P); i++) model[i] = 0;
    set_en = 0; clr_en = 0; q_idx = 0; set_idx = 0; clr_idx = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // after reset every bit reads clear
    for (int i = 0; i < 64; i++) begin
      @(negedge clk) q_idx = P'($urandom()); #1;
      checks++; if (q_member) begin failures++; $display("FAIL: bit set after reset"); end
    end
    repeat (20000) begin
      @(negedge clk);
      set_en = $urandom_range(0, 1); clr_en = $urandom_range(0, 1);
      set_idx = P'($urandom_range(0, 511)); clr_idx = P'($urandom_range(0, 511));
      if ($urandom_range(0, 15) == 0) clr_idx = set_idx;
      q_idx = P'($urandom_range(0, 511));
      #1;
      checks++; if (q_member != model[q_idx]) begin failures++; $display("FAIL: idx %0d got %0d", q_idx, q_member); end
      @(posedge clk);
      if (set_en && clr_en && set_idx == clr_idx) n_same++;
      if (clr_en) model[clr_idx] = 0;
      if (set_en) model[set_idx] = 1;
    end
    checks++; if (n_same == 0) begin failures++; $display("FAIL: same-index case never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
