// Self-checking testbench for trb: first the TRB example of the source
// design (a list loop, with TRB[4] initially set), then a random decode stream
// with restores, compared against a bitmap model written here.
module tb_trb;
  import pepu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic dec_valid, is_pointer, restore_en; op_e dec_op; logic [4:0] dec_rd, dec_rs;
  logic [31:0] restore_val, trb_q;
  int checks = 0, failures = 0, n_ptr = 0, n_move = 0;
  logic [31:0] model;
  trb dut (.*);
  always #5 clk = ~clk;

  task automatic dec(input op_e op, input int rd, input int rs, input bit exp_ptr, input bit e3, input bit e4);
    @(negedge clk); dec_valid = 1; dec_op = op; dec_rd = 5'(rd); dec_rs = 5'(rs); #1;
    checks++; if (is_pointer != exp_ptr) begin failures++; $display("FAIL: ptr op=%s", op.name()); end
    @(posedge clk); #1;
    checks++; if (trb_q[3] != e3 || trb_q[4] != e4) begin failures++; $display("FAIL: TRB[3]=%b TRB[4]=%b", trb_q[3], trb_q[4]); end
  endtask

  initial begin
    dec_valid = 0; dec_op = OP_OTHER; dec_rd = 0; dec_rs = 0; restore_en = 0; restore_val = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // TRB[4] = 1 beforehand (an earlier load into r4)
    dec(OP_LOAD, 4, 1, 0, 0, 1);
    repeat (2) begin
      dec(OP_LOAD,   4, 4, 1, 0, 1);  // lw r4, 4(r4): pointer load
      dec(OP_BRANCH, 0, 4, 0, 0, 1);  // be r4, r0
      dec(OP_LOAD,   3, 4, 1, 1, 1);  // lw r3, 8(r4): pointer load, sets TRB[3]
      dec(OP_ALU,    3, 3, 0, 0, 1);  // addi r3, r3, 4: clears TRB[3]
      dec(OP_STORE,  0, 4, 0, 0, 1);  // sw r3, 8(r4)
      dec(OP_OTHER,  0, 0, 0, 0, 1);  // jmp
    end
    dec(OP_MOVE, 3, 4, 0, 1, 1);      // move r3 <- r4 copies the bit
    // random stream
    model = trb_q;
    repeat (20000) begin
      bit ep;
      @(negedge clk);
      dec_valid = $urandom_range(0, 3) != 0; dec_op = op_e'($urandom_range(0, 5));
      dec_rd = 5'($urandom_range(0, 7)); dec_rs = 5'($urandom_range(0, 7));
      restore_en = $urandom_range(0, 30) == 0; restore_val = $urandom();
      #1;
      ep = dec_valid && dec_op == OP_LOAD && model[dec_rs];
      checks++; if (is_pointer != ep) begin failures++; $display("FAIL: random ptr"); end
      if (ep) n_ptr++;
      @(posedge clk);
      if (restore_en) model = restore_val;
      else if (dec_valid) case (dec_op)
        OP_LOAD: model[dec_rd] = 1;
        OP_MOVE: begin model[dec_rd] = model[dec_rs]; n_move++; end
        OP_ALU:  model[dec_rd] = 0;
        default: ;
      endcase
      model[0] = 0;
      #1; checks++; if (trb_q != model) begin failures++; $display("FAIL: map %h exp %h", trb_q, model); end
    end
    checks++; if (n_ptr == 0 || n_move == 0) begin failures++; $display("FAIL: coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
