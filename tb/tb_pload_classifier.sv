// Self-checking testbench for pload_classifier: the two code examples of the
// source design (a list walk where the next pointer is an address load and the
// data field a data load; and a pointer whose value is both loaded through and
// incremented, making it data-address). Also checks that commit ends a
// producer's tracking and that r0 never becomes a pointer producer.
module tb_pload_classifier;
  import pepu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic dec_valid, dec_is_pointer, commit_valid, flush;
  op_e dec_op; logic [4:0] dec_rd, dec_rs, dec_rt; logic [6:0] dec_rob, commit_rob, q_rob;
  logic [2:0] q_bits; ptype_e q_type;
  int checks = 0, failures = 0;
  pload_classifier #(.ROB(128), .NREGS(32)) dut (.*);
  always #5 clk = ~clk;
  task automatic dec(input int rob, input op_e op, input int rd, input int rs, input int rt, input bit ptr);
    @(negedge clk); dec_valid = 1; dec_rob = 7'(rob); dec_op = op; dec_rd = 5'(rd); dec_rs = 5'(rs);
    dec_rt = 5'(rt); dec_is_pointer = ptr;
    @(posedge clk); #1; dec_valid = 0;
  endtask
  task automatic expect_type(input int rob, input ptype_e t);
    q_rob = 7'(rob); #1;
    checks++; if (q_type != t) begin failures++; $display("FAIL: rob %0d type %s exp %s", rob, q_type.name(), t.name()); end
  endtask
  initial begin
    dec_valid = 0; dec_is_pointer = 0; commit_valid = 0; flush = 0; dec_op = OP_OTHER;
    dec_rd = 0; dec_rs = 0; dec_rt = 0; dec_rob = 0; commit_rob = 0; q_rob = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // Example (a): linked-list walk
    dec(1, OP_LOAD,   4, 4, 0, 1);  // lw r4, 4(r4)
    dec(2, OP_BRANCH, 0, 4, 0, 0);  // be r4, r0
    dec(3, OP_LOAD,   3, 4, 0, 1);  // lw r3, 8(r4)
    dec(4, OP_ALU,    3, 3, 0, 0);  // addi r3, r3, 4
    dec(5, OP_STORE,  0, 4, 3, 0);  // sw r3, 8(r4)
    dec(6, OP_OTHER,  0, 0, 0, 0);  // jmp
    dec(7, OP_LOAD,   4, 4, 0, 1);  // lw r4, 4(r4) next iteration
    expect_type(1, PT_ADDR);
    expect_type(3, PT_DATA);
    expect_type(2, PT_NONE);
    // Example (b): data-address load
    dec(10, OP_LOAD, 28, 0, 0, 0);  // lw r28, 0x34(r0): not a pointer load
    dec(11, OP_LOAD, 2, 28, 0, 1);  // lw r2, -32304(r28)
    dec(12, OP_OTHER, 0, 0, 0, 0);
    dec(13, OP_LOAD, 3, 2, 0, 1);   // lw r3, 0(r2)
    dec(14, OP_ALU,  2, 2, 0, 0);   // addi r2, r2, 4
    dec(15, OP_ALU,  5, 3, 0, 0);   // srl r5, r3, 1
    expect_type(10, PT_NONE);
    expect_type(11, PT_DATA_ADDR);
    expect_type(13, PT_DATA);
    // after commit of rob 20, a later consumer no longer marks it
    dec(20, OP_LOAD, 6, 4, 0, 1);
    @(negedge clk); commit_valid = 1; commit_rob = 20; @(posedge clk); #1; commit_valid = 0;
    dec(21, OP_LOAD, 7, 6, 0, 1);
    expect_type(20, PT_NONE);
    // move propagates the producer: r8 <- r6 after a new producer
    dec(22, OP_LOAD, 6, 4, 0, 1);
    dec(23, OP_MOVE, 8, 6, 0, 0);
    dec(24, OP_ALU,  9, 1, 8, 0);   // add r9, r1, r8 (second source)
    expect_type(22, PT_DATA);
    // r0 destination never tracks a producer
    dec(30, OP_LOAD, 0, 4, 0, 1);
    dec(31, OP_LOAD, 9, 0, 0, 0);
    expect_type(30, PT_NONE);
    // flush forgets producers
    dec(40, OP_LOAD, 10, 4, 0, 1);
    @(negedge clk); flush = 1; @(posedge clk); #1; flush = 0;
    dec(41, OP_LOAD, 11, 10, 0, 1);
    expect_type(40, PT_NONE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
