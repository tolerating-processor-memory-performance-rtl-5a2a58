// Bloom-filter cache-miss filter for load hit/miss prediction.
//
// A load's virtual address enters in the address-generation cycle (stage 0).
// One cycle later (stage 1, the first cache-access cycle) the partial-address
// Bloom filter is read: if the bit for the line's low P_BITS line-address bits
// is clear, the load is a guaranteed L1 miss. pred_miss then cancels only the
// dependents scheduled in that single cycle (cancel_dep) and starts the L2
// request at once (l2_early_req). Two cycles later (stage 3, the hit/miss
// cycle) the physical tag check decides. A miss the filter did not catch
// raises flush_window: every instruction scheduled in the 3-cycle speculative
// window is squashed.
//
// On a miss in stage 3 the block updates the cache tags and the filter in the
// same cycle. The L1 tag array picks the LRU victim. The Collision and Update
// Table (CUT) gives the victim's virtual partial-address bits above the cache
// index and says whether another line of the set shares them. The victim's
// filter bit (its CUT bits joined with the set index) is cleared only when
// there is no collision. The requested line's bit is then set.
//
// The cache is virtually indexed and physically tagged: the index and offset
// (12 bits at the defaults) fit in a 4 KB page. The virtual partial address is
// vaddr[OFFSET_W +: P_BITS]. The physical tag is paddr above the index.
//
// To keep the "clear bit means miss" guarantee across the pipeline, a stage-1
// query whose partial address matches a load in stage 2 or 3 is reported as a
// possible hit: that older load may be about to allocate the line.
//
// From the source design: the filter, its set/reset rules, the CUT and
// collision detector, the virtual-address filter, the 1-cycle and 3-cycle
// recovery windows and the early L2 request. The defaults are its baseline:
// 16 KB 4-way L1 with 32 B lines, and the Partial-16x filter (8K bits). This
// design's own choices: the stage bypass, tags and filter updated at the
// hit/miss cycle, one load per cycle, and the TLB result arriving with the
// virtual address.
module bf_miss_filter #(
  parameter int unsigned ADDR_W   = 32,
  parameter int unsigned OFFSET_W = 5,
  parameter int unsigned SETS     = 128,
  parameter int unsigned WAYS     = 4,
  parameter int unsigned P_BITS   = 13
) (
  input  logic              clk,
  input  logic              rst_n,
  // stage 0: address generation
  input  logic              req_valid,
  input  logic [ADDR_W-1:0] req_vaddr,
  input  logic [ADDR_W-1:0] req_paddr,
  // stage 1: Bloom-filter prediction
  output logic              pred_valid,
  output logic              pred_miss,
  output logic              cancel_dep,
  output logic              l2_early_req,
  output logic [ADDR_W-1:0] l2_early_addr,
  // stage 3: hit/miss determination
  output logic              hm_valid,
  output logic              hm_hit,
  output logic              hm_filtered_miss,
  output logic              flush_window,
  output logic              hm_collision,
  output logic              l2_late_req,
  output logic [ADDR_W-1:0] l2_late_addr
);
  localparam int unsigned INDEX_W = $clog2(SETS);
  localparam int unsigned WAY_W   = $clog2(WAYS);
  localparam int unsigned TAG_W   = ADDR_W - OFFSET_W - INDEX_W;
  localparam int unsigned P2_W    = P_BITS - INDEX_W;

  typedef struct packed {
    logic              valid;
    logic [ADDR_W-1:0] vaddr;
    logic [ADDR_W-1:0] paddr;
    logic              pred_miss;
  } stage_t;

  stage_t s1_q, s2_q, s3_q;

  function automatic logic [P_BITS-1:0] part_of(input logic [ADDR_W-1:0] a);
    return a[OFFSET_W +: P_BITS];
  endfunction

  // ---------------- stage 1: filter lookup ----------------
  logic              member;
  logic              bypass_hit;
  logic              bf_set_en, bf_clr_en;
  logic [P_BITS-1:0] bf_set_idx, bf_clr_idx;

  bf_partial_array #(.P_BITS(P_BITS)) u_bf (
    .clk, .rst_n,
    .q_idx   (part_of(s1_q.vaddr)),
    .q_member(member),
    .set_en  (bf_set_en), .set_idx(bf_set_idx),
    .clr_en  (bf_clr_en), .clr_idx(bf_clr_idx)
  );

  assign bypass_hit = (s2_q.valid && part_of(s2_q.vaddr) == part_of(s1_q.vaddr)) ||
                      (s3_q.valid && part_of(s3_q.vaddr) == part_of(s1_q.vaddr));

  assign pred_valid    = s1_q.valid;
  assign pred_miss     = s1_q.valid && !member && !bypass_hit;
  assign cancel_dep    = pred_miss;
  assign l2_early_req  = pred_miss;
  assign l2_early_addr = s1_q.paddr;

  // ---------------- stage 3: tag check and update ----------------
  logic [INDEX_W-1:0] s3_idx;
  logic [TAG_W-1:0]   s3_tag;
  logic               tag_hit, vic_valid;
  logic [WAY_W-1:0]   hit_way, vic_way;
  logic               cut_vic_valid, cut_coll;
  logic [P2_W-1:0]    cut_vic_p2;
  logic               miss;

  assign s3_idx = s3_q.vaddr[OFFSET_W +: INDEX_W];
  assign s3_tag = s3_q.paddr[OFFSET_W + INDEX_W +: TAG_W];
  assign miss   = s3_q.valid && !tag_hit;

  l1_tag_array #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W)) u_tags (
    .clk, .rst_n,
    .idx(s3_idx), .tag(s3_tag),
    .hit(tag_hit), .hit_way(hit_way),
    .victim_way(vic_way), .victim_valid(vic_valid), .victim_tag(),
    .touch_en (s3_q.valid && tag_hit), .touch_idx(s3_idx), .touch_way(hit_way),
    .alloc_en (miss), .alloc_idx(s3_idx), .alloc_way(vic_way), .alloc_tag(s3_tag)
  );

  bf_cut #(.SETS(SETS), .WAYS(WAYS), .P2_W(P2_W)) u_cut (
    .clk, .rst_n,
    .idx(s3_idx), .victim_way(vic_way),
    .victim_valid(cut_vic_valid), .victim_p2(cut_vic_p2), .collision(cut_coll),
    .wr_en(miss), .wr_idx(s3_idx), .wr_way(vic_way),
    .wr_p2(s3_q.vaddr[OFFSET_W + INDEX_W +: P2_W])
  );

  assign bf_set_en  = miss;
  assign bf_set_idx = part_of(s3_q.vaddr);
  assign bf_clr_en  = miss && cut_vic_valid && !cut_coll;
  assign bf_clr_idx = {cut_vic_p2, s3_idx};

  assign hm_valid         = s3_q.valid;
  assign hm_hit           = s3_q.valid && tag_hit;
  assign hm_filtered_miss = miss && s3_q.pred_miss;
  assign flush_window     = miss && !s3_q.pred_miss;
  assign hm_collision     = miss && cut_vic_valid && cut_coll;
  assign l2_late_req      = flush_window;
  assign l2_late_addr     = s3_q.paddr;

  // ---------------- pipeline registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_q <= '0;
      s2_q <= '0;
      s3_q <= '0;
    end else begin
      s1_q <= '{valid: req_valid, vaddr: req_vaddr, paddr: req_paddr, pred_miss: 1'b0};
      s2_q <= s1_q;
      s2_q.pred_miss <= pred_miss;
      s3_q <= s2_q;
    end
  end

  // A line the filter reports absent must really be absent.
  assert property (@(posedge clk) disable iff (!rst_n) !(s3_q.valid && s3_q.pred_miss && tag_hit))
    else $error("Bloom filter reported a miss for a line held in the cache");
  // The tag array and the CUT agree on which lines are valid.
  assert property (@(posedge clk) disable iff (!rst_n) !(s3_q.valid && (vic_valid != cut_vic_valid)))
    else $error("CUT and tag array disagree on the victim line");
endmodule
