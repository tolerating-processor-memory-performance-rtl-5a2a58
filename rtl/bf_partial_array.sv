// Partial-address Bloom filter array.
//
// One bit per possible partial line address (2**P_BITS bits). A set bit means
// "some line whose low P_BITS line-address bits equal this index may be in the
// L1 data cache"; a clear bit means "no such line is in the cache", so a load
// whose bit is clear is a guaranteed miss.
//
// Interface and timing: the query port is a combinational read of the flop
// array. Updates are applied at the clock edge: clr_en clears clr_idx (replaced
// line, no collision), then set_en sets set_idx (requested line); when both hit
// the same index the set wins, so the new line is never lost. Reset empties
// the filter, matching an empty cache.
//
// The array, its set-on-miss and reset-on-miss-without-collision rules follow
// the partial-address Bloom filter of the source design; the default of 13
// bits is its 8K-bit "16 entries per L1 line" configuration. The flop-array
// realisation and the set-over-clear priority are this design's choices.
module bf_partial_array #(
  parameter int unsigned P_BITS = 13
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [P_BITS-1:0] q_idx,
  output logic              q_member,
  input  logic              set_en,
  input  logic [P_BITS-1:0] set_idx,
  input  logic              clr_en,
  input  logic [P_BITS-1:0] clr_idx
);
  localparam int unsigned N = 1 << P_BITS;
  logic [N-1:0] bits_q;

  assign q_member = bits_q[q_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits_q <= '0;
    end else begin
      if (clr_en) bits_q[clr_idx] <= 1'b0;
      if (set_en) bits_q[set_idx] <= 1'b1;
    end
  end
endmodule
