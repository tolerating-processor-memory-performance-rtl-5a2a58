// Target Register Bitmap (TRB).
//
// One bit per architectural integer register. At decode, a load sets the bit
// of its destination register, a register move copies the bit of its source
// to its destination, and any other register-writing operation clears the bit
// of its destination; stores and branches leave the map unchanged. A load
// whose base register's bit is set (read before the load's own update) is a
// pointer load: its address depends on the value of an earlier load.
//
// Interface and timing: is_pointer is combinational on the decode inputs; the
// map updates at the clock edge. restore_en loads the whole map from the
// Bitmap Stack after a branch misprediction and takes priority over a decode
// in the same cycle (that instruction is on the wrong path). trb_q is the
// current map, pushed onto the Bitmap Stack when a conditional branch
// decodes.
//
// The update rules and the pointer-load test follow the source design. Keeping
// register 0 (hard-wired zero) always clear and the restore priority are this
// design's choices.
module trb
  import pepu_pkg::*;
#(
  parameter int unsigned NREGS = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     dec_valid,
  input  op_e                      dec_op,
  input  logic [$clog2(NREGS)-1:0] dec_rd,
  input  logic [$clog2(NREGS)-1:0] dec_rs,
  output logic                     is_pointer,
  input  logic                     restore_en,
  input  logic [NREGS-1:0]         restore_val,
  output logic [NREGS-1:0]         trb_q
);
  logic [NREGS-1:0] trb_d;

  assign is_pointer = dec_valid && dec_op == OP_LOAD && trb_q[dec_rs];

  always_comb begin
    trb_d = trb_q;
    if (restore_en) begin
      trb_d = restore_val;
    end else if (dec_valid) begin
      unique case (dec_op)
        OP_LOAD:  trb_d[dec_rd] = 1'b1;
        OP_MOVE:  trb_d[dec_rd] = trb_q[dec_rs];
        OP_ALU:   trb_d[dec_rd] = 1'b0;
        default:  ;
      endcase
    end
    trb_d[0] = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) trb_q <= '0;
    else        trb_q <= trb_d;
  end
endmodule
