// Pointer-load classifier: the pload/dload/aload bits of every ROB entry.
//
// When a load decodes, its ROB entry gets pload = TRB verdict and clear
// dload/aload, and the load becomes the tracked producer of its destination
// register. When a later instruction decodes and reads a register whose
// tracked producer is a pointer load, that producer's bits are updated: a
// load using it as base register sets aload, an arithmetic operation using it
// sets dload. A move passes the tracked producer on to its destination; any
// other register write ends the tracking. The type follows the truth table
// 0xx none, 110 data load, 101 address load, 111 data-address load (a pointer
// load with no consumer yet reads as none).
//
// Interface and timing: decode updates land at the clock edge; the type query
// (q_rob) is combinational. Tracking of a producer stops when it commits
// (commit_valid/commit_rob) so a reused ROB entry is never marked, and flush
// stops all tracking after a misprediction.
//
// The three ROB bits and their truth table follow the source design. Register
// tracking of producers (standing in for the renamer's producer tags), the
// treatment of stores, branches and moves as neither kind of consumer, and
// the stop on commit are this design's choices.
module pload_classifier
  import pepu_pkg::*;
#(
  parameter int unsigned ROB   = 128,
  parameter int unsigned NREGS = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     dec_valid,
  input  op_e                      dec_op,
  input  logic [$clog2(NREGS)-1:0] dec_rd,
  input  logic [$clog2(NREGS)-1:0] dec_rs,
  input  logic [$clog2(NREGS)-1:0] dec_rt,
  input  logic [$clog2(ROB)-1:0]   dec_rob,
  input  logic                     dec_is_pointer,
  input  logic                     commit_valid,
  input  logic [$clog2(ROB)-1:0]   commit_rob,
  input  logic                     flush,
  input  logic [$clog2(ROB)-1:0]   q_rob,
  output logic [2:0]               q_bits,   // {pload, dload, aload}
  output ptype_e                   q_type
);
  localparam int unsigned RW = $clog2(ROB);

  logic [ROB-1:0]  pload_q, dload_q, aload_q;
  logic [RW-1:0]   prod_rob_q [NREGS];
  logic [NREGS-1:0] prod_ptr_q;

  assign q_bits = {pload_q[q_rob], dload_q[q_rob], aload_q[q_rob]};
  always_comb begin
    unique case (q_bits)
      3'b110:  q_type = PT_DATA;
      3'b101:  q_type = PT_ADDR;
      3'b111:  q_type = PT_DATA_ADDR;
      default: q_type = PT_NONE;
    endcase
  end

  logic rs_ptr, rt_ptr, uses_rt;
  assign rs_ptr  = prod_ptr_q[dec_rs];
  assign rt_ptr  = prod_ptr_q[dec_rt];
  assign uses_rt = (dec_op == OP_ALU);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pload_q    <= '0;
      dload_q    <= '0;
      aload_q    <= '0;
      prod_ptr_q <= '0;
      for (int r = 0; r < NREGS; r++) prod_rob_q[r] <= '0;
    end else if (flush) begin
      prod_ptr_q <= '0;
    end else begin
      if (commit_valid) begin
        for (int r = 0; r < NREGS; r++)
          if (prod_rob_q[r] == commit_rob) prod_ptr_q[r] <= 1'b0;
      end
      if (dec_valid) begin
        // consumer side
        if (dec_op == OP_LOAD && rs_ptr) aload_q[prod_rob_q[dec_rs]] <= 1'b1;
        if (dec_op == OP_ALU) begin
          if (rs_ptr)            dload_q[prod_rob_q[dec_rs]] <= 1'b1;
          if (uses_rt && rt_ptr) dload_q[prod_rob_q[dec_rt]] <= 1'b1;
        end
        // producer side
        unique case (dec_op)
          OP_LOAD: begin
            pload_q[dec_rob]    <= dec_is_pointer;
            dload_q[dec_rob]    <= 1'b0;
            aload_q[dec_rob]    <= 1'b0;
            prod_rob_q[dec_rd]  <= dec_rob;
            prod_ptr_q[dec_rd]  <= dec_is_pointer && dec_rd != '0;
          end
          OP_MOVE: begin
            prod_rob_q[dec_rd]  <= prod_rob_q[dec_rs];
            prod_ptr_q[dec_rd]  <= prod_ptr_q[dec_rs] && dec_rd != '0;
          end
          OP_ALU:  prod_ptr_q[dec_rd] <= 1'b0;
          default: ;
        endcase
      end
    end
  end
endmodule
