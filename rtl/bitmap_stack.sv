// Bitmap Stack (BS): a TRB snapshot for each branch in flight.
//
// When a conditional branch decodes, the current TRB is pushed on top and the
// slot number is returned to travel with the branch. When the branch resolves,
// its entry is popped: on a misprediction the saved map is sent back to the
// TRB (restore_en/restore_val) and that entry and every younger one above it
// are discarded; on a correct prediction the saved map is dropped. Correctly
// resolved entries below the top are released from the bottom as soon as all
// older ones are released, so branches may resolve in any order.
//
// Interface and timing: push_slot is valid in the cycle of push; restore_en
// and restore_val are combinational on the resolve inputs so that the TRB is
// repaired at the same clock edge. A misprediction in the same cycle as a push
// cancels the push. full must stall the decoder.
//
// The push-at-decode, pop-on-resolve and restore-on-misprediction behaviour
// and the default of 64 entries (half of a 128-entry ROB) follow the source
// design. The circular organisation that lets slots resolve out of order and
// the release from the bottom are this design's choices.
module bitmap_stack #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned NREGS = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [NREGS-1:0]         push_val,
  output logic [$clog2(DEPTH)-1:0] push_slot,
  output logic                     full,
  output logic                     empty,
  input  logic                     resolve,
  input  logic [$clog2(DEPTH)-1:0] resolve_slot,
  input  logic                     mispredict,
  output logic                     restore_en,
  output logic [NREGS-1:0]         restore_val
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [NREGS-1:0] mem_q  [DEPTH];
  logic [DEPTH-1:0] done_q;
  logic [AW:0]      top_q, bot_q;   // one extra wrap bit

  assign push_slot   = top_q[AW-1:0];
  assign full        = (top_q[AW-1:0] == bot_q[AW-1:0]) && (top_q[AW] != bot_q[AW]);
  assign empty       = (top_q == bot_q);
  assign restore_en  = resolve && mispredict;
  assign restore_val = mem_q[resolve_slot];

  // number of the slot with its wrap bit, so that top can be moved back to it
  logic [AW:0] res_ptr;
  always_comb begin
    res_ptr = {top_q[AW], resolve_slot};
    if (resolve_slot >= top_q[AW-1:0]) res_ptr[AW] = ~top_q[AW];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      top_q  <= '0;
      bot_q  <= '0;
      done_q <= '0;
      for (int i = 0; i < DEPTH; i++) mem_q[i] <= '0;
    end else begin
      if (restore_en) begin
        top_q <= res_ptr;
      end else if (push && !full) begin
        mem_q[top_q[AW-1:0]]  <= push_val;
        done_q[top_q[AW-1:0]] <= 1'b0;
        top_q <= top_q + 1'b1;
      end
      if (resolve && !mispredict) done_q[resolve_slot] <= 1'b1;
      if (!empty && done_q[bot_q[AW-1:0]] && !(restore_en && res_ptr == bot_q)) begin
        bot_q <= bot_q + 1'b1;
      end
    end
  end

  // a resolved slot must be one in flight
  assert property (@(posedge clk) disable iff (!rst_n) resolve |-> !empty)
    else $error("bitmap stack resolve with no branch in flight");
endmodule
