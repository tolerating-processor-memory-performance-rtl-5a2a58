// Shared types of the Pointer-Element Prefetch Unit (PEPU).
//
// op_e is the coarse class of a decoded instruction as the PEPU sees it:
// loads set Target Register Bitmap bits, register moves copy them, every other
// register-writing operation clears them, and stores, branches and other
// non-writing operations leave them alone. dec_t is the decode-stage record
// the host core hands to the PEPU each cycle (register numbers are the
// architectural, not-yet-renamed ones). ptype_e is the pointer-load type of
// the three ROB bits pload/dload/aload.
package pepu_pkg;
  localparam int unsigned XLEN    = 32;
  localparam int unsigned REG_W   = 5;
  localparam int unsigned ROB_W   = 7;

  typedef enum logic [2:0] {
    OP_OTHER  = 3'd0,  // writes no register (jump, nop)
    OP_LOAD   = 3'd1,
    OP_STORE  = 3'd2,
    OP_ALU    = 3'd3,  // any other register-writing operation
    OP_MOVE   = 3'd4,  // register-to-register move
    OP_BRANCH = 3'd5   // conditional branch
  } op_e;

  typedef struct packed {
    logic             valid;
    op_e              op;
    logic [REG_W-1:0] rd;        // destination register
    logic [REG_W-1:0] rs;        // base register of a load/store, source of a move, first ALU source
    logic [REG_W-1:0] rt;        // second ALU source / store data register
    logic             rs_ready;  // value of rs is available at decode
    logic [XLEN-1:0]  rs_value;  // that value
    logic [XLEN-1:0]  offset;    // sign-extended displacement
    logic [ROB_W-1:0] rob;       // ROB entry of this instruction
    logic [ROB_W-1:0] prod_rob;  // ROB entry producing rs when not ready
  } dec_t;

  typedef enum logic [1:0] {
    PT_NONE = 2'd0,
    PT_DATA = 2'd1,
    PT_ADDR = 2'd2,
    PT_DATA_ADDR = 2'd3
  } ptype_e;
endpackage
