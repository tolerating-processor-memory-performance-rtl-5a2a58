// Self-checking testbench for bitmap_stack: random pushes of bitmaps and
// out-of-order resolutions of in-flight slots. A list of in-flight branches
// (slot, saved map) kept here says what a misprediction must restore and
// which younger entries it discards (resolved entries may stay until they
// reach the bottom, so only empty-while-busy is an error); fullness after 64 pushes is checked too.
module tb_bitmap_stack;
  localparam int D = 64;
  logic clk = 0, rst_n = 0;
  logic push, full, empty, resolve, mispredict, restore_en;
  logic [31:0] push_val, restore_val; logic [5:0] push_slot, resolve_slot;
  int checks = 0, failures = 0, n_restore = 0, n_ok = 0, n_full = 0;
  int fl_slot[$]; logic [31:0] fl_val[$];
  bitmap_stack #(.DEPTH(D), .NREGS(32)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    push = 0; resolve = 0; mispredict = 0; push_val = 0; resolve_slot = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // fill completely
    for (int i = 0; i < D; i++) begin
      @(negedge clk); push = 1; push_val = $urandom(); #1;
      fl_slot.push_back(push_slot); fl_val.push_back(push_val);
      @(posedge clk);
    end
    @(negedge clk); push = 0; #1;
    checks++; if (!full) begin failures++; $display("FAIL: not full after %0d pushes", D); end else n_full++;
    repeat (30000) begin
      int k; bit do_push, do_res, mp;
      @(negedge clk);
      do_res = fl_slot.size() > 0 && $urandom_range(0, 2) == 0;
      do_push = !full && $urandom_range(0, 1);
      mp = $urandom_range(0, 5) == 0;
      k = do_res ? $urandom_range(0, fl_slot.size() - 1) : 0;
      push = do_push; push_val = $urandom();
      resolve = do_res; resolve_slot = do_res ? 6'(fl_slot[k]) : '0; mispredict = mp;
      #1;
      checks++; if (restore_en != (do_res && mp)) begin failures++; $display("FAIL: restore_en"); end
      if (do_res && mp) begin
        checks++; if (restore_val != fl_val[k]) begin failures++; $display("FAIL: restore value"); end
      end
      checks++; if (empty && fl_slot.size() != 0) begin failures++; $display("FAIL: empty flag"); end
      if (full) n_full++;
      @(posedge clk);
      if (do_res && mp) begin
        n_restore++;
        while (fl_slot.size() > k) begin void'(fl_slot.pop_back()); void'(fl_val.pop_back()); end
      end else begin
        if (do_res) begin n_ok++; fl_slot.delete(k); fl_val.delete(k); end
        if (do_push) begin fl_slot.push_back(push_slot); fl_val.push_back(push_val); end
      end
    end
    checks++; if (n_restore == 0 || n_ok == 0) begin failures++; $display("FAIL: coverage"); end
    $display("restores=%0d correct=%0d full_cycles=%0d", n_restore, n_ok, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
