// PEPU controller: the prefetch flow chart, one address per cycle.
//
// Every decoded load gets an entry in a small pending table. Two paths lead
// to a prefetch:
//  * Source ready (left path). The base value is known at decode, or it
//    arrives later by forwarding. The entry spends one cycle reading the
//    register (T1). It then uses the PEPU's own adder (T2) and asks the
//    memory dependency checker; if the checker reports a dependency, the
//    entry retries the next cycle. Next the line is requested for the
//    Prefetch Cache (T3) and, for a pointer load, the Address Cache is read
//    with the load's own address. The AC's answer, one cycle later (T4), is
//    sent to the waiting loads that depend on this one (prop_*).
//  * Source pending (right path). If a propagated AC value arrives for the
//    load's producer, the entry computes a speculative address (T5) and
//    prefetches it (T6). It does not index the AC again. It then waits for
//    the real base value: when that is forwarded, the entry retires, because
//    it has already prefetched. The predicted and real bases are compared
//    and counted as correct or wrong predictions.
//
// Timing: a source-ready load decoded in cycle c is in T1 at c+1, T2 at c+2
// and T3 at c+3 (pf_req_valid), and propagates at c+4. A propagated value
// seen in cycle p gives T5 at p+1 and a speculative prefetch at p+2. Left
// path entries have priority for the adder, then the lowest table slot.
// flush empties the table and the T3/T4 stages.
//
// The two paths, their T1-T6 steps, the dependency retry loop, the one adder,
// AC indexing only for pointer loads and "the AC output is not used to index
// the AC again" follow the source design. The pending table and its size,
// the slot priority, dropping a load when the table is full and the
// statistics counters are this design's choices.
module pepu_ctrl
  import pepu_pkg::*;
#(
  parameter int unsigned PEND = 16,
  parameter int unsigned ROB  = 128
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   flush,
  // decode
  input  dec_t                   dec,
  input  logic                   dec_is_pointer,
  // forwarding of produced values (core writeback)
  input  logic                   fwd_valid,
  input  logic [$clog2(ROB)-1:0] fwd_rob,
  input  logic [XLEN-1:0]        fwd_value,
  // memory dependency checker (combinational answer)
  output logic                   dep_query_valid,
  output logic [XLEN-1:0]        dep_query_va,
  output logic [$clog2(ROB)-1:0] dep_query_rob,
  input  logic                   dep_found,
  // prefetch request to the L1 (filled into the PFC)
  output logic                   pf_req_valid,
  output logic [XLEN-1:0]        pf_req_va,
  output logic                   pf_req_spec,
  // address cache read
  output logic                   ac_rd_en,
  output logic [XLEN-1:0]        ac_rd_va,
  input  logic                   ac_rsp_valid,
  input  logic                   ac_rsp_hit,
  input  logic [XLEN-1:0]        ac_rsp_data,
  // propagation of an AC value to dependent loads (T4)
  output logic                   prop_valid,
  output logic [$clog2(ROB)-1:0] prop_rob,
  output logic [XLEN-1:0]        prop_value,
  // statistics
  output logic [31:0]            stat_pred_ok,
  output logic [31:0]            stat_pred_bad,
  output logic [31:0]            stat_dep_retry,
  output logic [31:0]            stat_drop,
  output logic [31:0]            stat_pf_spec
);
  localparam int unsigned RW = $clog2(ROB);
  localparam int unsigned PW = $clog2(PEND);

  typedef struct packed {
    logic            valid;
    logic [RW-1:0]   rob;
    logic            ptr;
    logic            base_ready;
    logic            t1_done;
    logic [XLEN-1:0] base;
    logic [XLEN-1:0] offset;
    logic [RW-1:0]   prod;
    logic            pred_valid;
    logic [XLEN-1:0] pred_base;
    logic            prefetched;
  } pend_t;

  typedef struct packed {
    logic            valid;
    logic [XLEN-1:0] va;
    logic [RW-1:0]   rob;
    logic            ptr;
    logic            spec;
  } t3_t;

  pend_t pend_q [PEND];
  pend_t pend_d [PEND];
  t3_t   t3_q;
  logic  t4_valid_q;
  logic [RW-1:0] t4_rob_q;

  // ---------------- selection for the adder (T2 / T5) ----------------
  logic          pick, pick_left, accept;
  logic [PW-1:0] pick_idx;
  logic [XLEN-1:0] gen_va;
  logic [PW-1:0] free_idx;
  logic          free_ok;
  logic [PW:0]   n_ok, n_bad;

  always_comb begin
    pick = 1'b0; pick_left = 1'b0; pick_idx = '0;
    for (int i = PEND - 1; i >= 0; i--) begin
      if (pend_q[i].valid && !pend_q[i].base_ready && pend_q[i].pred_valid && !pend_q[i].prefetched) begin
        pick = 1'b1; pick_idx = PW'(i);
      end
    end
    for (int i = PEND - 1; i >= 0; i--) begin
      if (pend_q[i].valid && pend_q[i].base_ready && pend_q[i].t1_done) begin
        pick = 1'b1; pick_left = 1'b1; pick_idx = PW'(i);
      end
    end
    gen_va = (pick_left ? pend_q[pick_idx].base : pend_q[pick_idx].pred_base) + pend_q[pick_idx].offset;
    free_ok = 1'b0; free_idx = '0;
    for (int i = PEND - 1; i >= 0; i--) begin
      if (!pend_q[i].valid) begin free_ok = 1'b1; free_idx = PW'(i); end
    end
  end

  assign dep_query_valid = pick && pick_left;
  assign dep_query_va    = gen_va;
  assign dep_query_rob   = pend_q[pick_idx].rob;
  assign accept          = pick && !(pick_left && dep_found);

  // ---------------- T3 / T4 outputs ----------------
  assign pf_req_valid = t3_q.valid;
  assign pf_req_va    = t3_q.va;
  assign pf_req_spec  = t3_q.spec;
  assign ac_rd_en     = t3_q.valid && t3_q.ptr && !t3_q.spec;
  assign ac_rd_va     = t3_q.va;
  assign prop_valid   = t4_valid_q && ac_rsp_valid && ac_rsp_hit;
  assign prop_rob     = t4_rob_q;
  assign prop_value   = ac_rsp_data;

  // ---------------- next state of the pending table ----------------
  always_comb begin
    n_ok = '0; n_bad = '0;
    for (int i = 0; i < PEND; i++) begin
      pend_d[i] = pend_q[i];
      if (pend_q[i].valid) begin
        // register read cycle
        if (pend_q[i].base_ready && !pend_q[i].t1_done) pend_d[i].t1_done = 1'b1;
        // the adder took this entry
        if (accept && pick_idx == PW'(i)) begin
          if (pick_left) pend_d[i].valid      = 1'b0;
          else           pend_d[i].prefetched = 1'b1;
        end
        // AC value for the producer: speculative base
        if (prop_valid && !pend_q[i].base_ready && pend_q[i].prod == prop_rob && !pend_d[i].prefetched) begin
          pend_d[i].pred_valid = 1'b1;
          pend_d[i].pred_base  = prop_value;
        end
        // real base forwarded
        if (fwd_valid && !pend_q[i].base_ready && pend_q[i].prod == fwd_rob) begin
          if (pend_q[i].pred_valid) begin
            if (pend_q[i].pred_base == fwd_value) n_ok  = n_ok + 1'b1;
            else                                  n_bad = n_bad + 1'b1;
          end
          if (pend_d[i].prefetched) begin
            pend_d[i].valid = 1'b0;            // "prefetched?" yes: exit
          end else begin
            pend_d[i].base_ready = 1'b1;
            pend_d[i].t1_done    = 1'b0;
            pend_d[i].base       = fwd_value;
          end
        end
      end
    end
    if (dec.valid && dec.op == OP_LOAD && free_ok) begin
      pend_d[free_idx] = '{valid: 1'b1, rob: dec.rob[RW-1:0], ptr: dec_is_pointer,
                           base_ready: dec.rs_ready, t1_done: 1'b0, base: dec.rs_value,
                           offset: dec.offset, prod: dec.prod_rob[RW-1:0], pred_valid: 1'b0,
                           pred_base: '0, prefetched: 1'b0};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < PEND; i++) pend_q[i] <= '0;
      t3_q           <= '0;
      t4_valid_q     <= 1'b0;
      t4_rob_q       <= '0;
      stat_pred_ok   <= '0;
      stat_pred_bad  <= '0;
      stat_dep_retry <= '0;
      stat_drop      <= '0;
      stat_pf_spec   <= '0;
    end else if (flush) begin
      for (int i = 0; i < PEND; i++) pend_q[i] <= '0;
      t3_q       <= '0;
      t4_valid_q <= 1'b0;
    end else begin
      for (int i = 0; i < PEND; i++) pend_q[i] <= pend_d[i];
      t3_q       <= '{valid: accept, va: gen_va, rob: pend_q[pick_idx].rob,
                      ptr: pend_q[pick_idx].ptr, spec: !pick_left};
      t4_valid_q <= ac_rd_en;
      t4_rob_q   <= t3_q.rob;
      stat_pred_ok  <= stat_pred_ok  + 32'(n_ok);
      stat_pred_bad <= stat_pred_bad + 32'(n_bad);
      if (pick && pick_left && dep_found)          stat_dep_retry <= stat_dep_retry + 1;
      if (dec.valid && dec.op == OP_LOAD && !free_ok) stat_drop    <= stat_drop + 1;
      if (t3_q.valid && t3_q.spec)                 stat_pf_spec   <= stat_pf_spec + 1;
    end
  end
endmodule
