// L1 data-cache tag array with hit/miss detector and LRU victim choice.
//
// Holds, for each of SETS x WAYS lines, a valid bit and a tag. A lookup of
// (idx, tag) is combinational and returns hit / hit_way, plus the way that
// would be replaced on a miss (an invalid way first, otherwise the least
// recently used) together with that victim's valid bit and tag. On the clock
// edge, touch_en marks touch_way of touch_idx most recently used, and
// alloc_en writes a new tag into alloc_way of alloc_idx (and makes it MRU).
//
// LRU is kept as a per-line age counter: age 0 is most recently used, and on a
// touch every line younger than the touched one ages by one. The source design
// only names the tag array and hit/miss detector and says the LRU line is
// replaced; the age encoding, invalid-first fill order and combinational read
// are this design's choices. Only tags are held: the data array is outside
// this block.
module l1_tag_array #(
  parameter int unsigned SETS  = 128,
  parameter int unsigned WAYS  = 4,
  parameter int unsigned TAG_W = 20
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(SETS)-1:0]  idx,
  input  logic [TAG_W-1:0]         tag,
  output logic                     hit,
  output logic [$clog2(WAYS)-1:0]  hit_way,
  output logic [$clog2(WAYS)-1:0]  victim_way,
  output logic                     victim_valid,
  output logic [TAG_W-1:0]         victim_tag,
  input  logic                     touch_en,
  input  logic [$clog2(SETS)-1:0]  touch_idx,
  input  logic [$clog2(WAYS)-1:0]  touch_way,
  input  logic                     alloc_en,
  input  logic [$clog2(SETS)-1:0]  alloc_idx,
  input  logic [$clog2(WAYS)-1:0]  alloc_way,
  input  logic [TAG_W-1:0]         alloc_tag
);
  localparam int unsigned WW = (WAYS > 1) ? $clog2(WAYS) : 1;

  logic [TAG_W-1:0] tag_q   [SETS][WAYS];
  logic             valid_q [SETS][WAYS];
  logic [WW-1:0]    age_q   [SETS][WAYS];

  always_comb begin
    hit          = 1'b0;
    hit_way      = '0;
    victim_way   = '0;
    victim_valid = 1'b1;
    for (int w = 0; w < WAYS; w++) begin
      if (valid_q[idx][w] && tag_q[idx][w] == tag && !hit) begin
        hit     = 1'b1;
        hit_way = w[WW-1:0];
      end
    end
    // victim: first invalid way, else the oldest way
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (age_q[idx][w] == WW'(WAYS - 1)) victim_way = w[WW-1:0];
    end
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!valid_q[idx][w]) begin
        victim_way   = w[WW-1:0];
        victim_valid = 1'b0;
      end
    end
    victim_tag = tag_q[idx][victim_way];
  end

  logic            upd_en;
  logic [$clog2(SETS)-1:0] upd_idx;
  logic [WW-1:0]   upd_way;
  assign upd_en  = alloc_en | touch_en;
  assign upd_idx = alloc_en ? alloc_idx : touch_idx;
  assign upd_way = alloc_en ? alloc_way : touch_way;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        for (int w = 0; w < WAYS; w++) begin
          valid_q[s][w] <= 1'b0;
          tag_q[s][w]   <= '0;
          age_q[s][w]   <= WW'(w);
        end
      end
    end else begin
      if (alloc_en) begin
        valid_q[alloc_idx][alloc_way] <= 1'b1;
        tag_q[alloc_idx][alloc_way]   <= alloc_tag;
      end
      if (upd_en) begin
        for (int w = 0; w < WAYS; w++) begin
          if (w[WW-1:0] == upd_way)                         age_q[upd_idx][w] <= '0;
          else if (age_q[upd_idx][w] < age_q[upd_idx][upd_way]) age_q[upd_idx][w] <= age_q[upd_idx][w] + 1'b1;
        end
      end
    end
  end
endmodule
