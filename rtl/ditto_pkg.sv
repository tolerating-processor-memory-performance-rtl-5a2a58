// Shared types of the Ditto checker.
//
// commit_rec_t is what the duplicated commit logic writes into the delay
// buffer for each retiring instruction: its address and code, the value it
// wrote to its destination register, the value the clone's re-execution must
// reproduce ("check": the result of an ALU operation, the effective address of
// a load or store, the taken bit of a branch), the decoded branch target, and
// for long-latency operations (multiply, divide) their source operand values.
// db_slot_t is one delay-buffer slot; a long-latency record takes two.
package ditto_pkg;
  localparam int unsigned XLEN  = 32;
  localparam int unsigned REG_W = 5;
  localparam int unsigned SEQ_W = 8;

  typedef struct packed {
    logic [XLEN-1:0]  pc;
    logic [XLEN-1:0]  inst;
    logic [XLEN-1:0]  result;
    logic [XLEN-1:0]  check;
    logic [XLEN-1:0]  target;
    logic             is_branch;
    logic             long_lat;
    logic             has_rd;
    logic [REG_W-1:0] rd;
    logic [XLEN-1:0]  src1;
    logic [XLEN-1:0]  src2;
    logic [SEQ_W-1:0] seq;     // commit sequence number
  } commit_rec_t;

  // first slot: pc, inst, result, check, target; operand slot: src1, src2
  typedef struct packed {
    logic             is_branch;
    logic             long_lat;
    logic             has_rd;
    logic [REG_W-1:0] rd;
    logic [SEQ_W-1:0] seq;
    logic [XLEN-1:0]  w0, w1, w2, w3, w4;
  } db_slot_t;

  typedef enum logic [2:0] {
    ERR_NONE     = 3'd0,
    ERR_DUAL     = 3'd1,  // two executions of a long-latency operation differ
    ERR_FRONTEND = 3'd2,  // re-fetched/decoded instruction or target differs
    ERR_RENAME   = 3'd3,  // long-latency clone read different operands
    ERR_EXEC     = 3'd4,  // clone result differs from the original
    ERR_COMMIT   = 3'd5   // the two commit-logic copies disagree
  } err_e;
endpackage
