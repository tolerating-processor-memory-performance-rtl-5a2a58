// Collision and Update Table (CUT) with collision detector.
//
// For every cache line (SETS x WAYS, the same organisation as the L1 tag
// array) the CUT keeps the P2_W virtual partial-address bits that lie above the
// cache index, plus a valid bit. It is indexed by the cache index bits (p0).
// Reading a set is combinational: given the way chosen as victim, the
// detector reports the victim's stored bits and whether any other valid line
// in that set holds the same bits (a collision: the partial address still
// exists in the cache, so its Bloom-filter bit must not be cleared).
// On the clock edge, wr_en stores the requested line's bits into the
// replaced way.
//
// Organisation, indexing by p0, and the compare of the victim against the
// other lines of its set follow the source design (virtually indexed,
// physically tagged cache). Valid bits and the combinational read are this
// design's choices.
module bf_cut #(
  parameter int unsigned SETS = 128,
  parameter int unsigned WAYS = 4,
  parameter int unsigned P2_W = 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [$clog2(SETS)-1:0] idx,
  input  logic [$clog2(WAYS)-1:0] victim_way,
  output logic                    victim_valid,
  output logic [P2_W-1:0]         victim_p2,
  output logic                    collision,
  input  logic                    wr_en,
  input  logic [$clog2(SETS)-1:0] wr_idx,
  input  logic [$clog2(WAYS)-1:0] wr_way,
  input  logic [P2_W-1:0]         wr_p2
);
  logic [P2_W-1:0] p2_q    [SETS][WAYS];
  logic            valid_q [SETS][WAYS];

  always_comb begin
    victim_valid = valid_q[idx][victim_way];
    victim_p2    = p2_q[idx][victim_way];
    collision    = 1'b0;
    for (int w = 0; w < WAYS; w++) begin
      if (w[$clog2(WAYS)-1:0] != victim_way && valid_q[idx][w] && p2_q[idx][w] == victim_p2)
        collision = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) begin
          valid_q[s][w] <= 1'b0;
          p2_q[s][w]    <= '0;
        end
    end else if (wr_en) begin
      valid_q[wr_idx][wr_way] <= 1'b1;
      p2_q[wr_idx][wr_way]    <= wr_p2;
    end
  end
endmodule
