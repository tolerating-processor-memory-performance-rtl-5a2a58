// Self-checking testbench for pepu_ctrl. Drives single loads and checks the
// cycle timing of the two paths against the prefetch-flow timing table of the
// source design: a load whose base is ready at decode (cycle c) does T1 in
// c+1, address generation and the dependency check in c+2, the prefetch and
// the address-cache index in c+3, and forwards the predicted pointer in c+4;
// a load that receives that prediction in cycle p generates its address in p+1
// and issues the speculative prefetch in p+2. Also checks the prediction
// compare when the real base arrives, retry on a found dependency, the path
// after a real forward with no prediction, drops when the table is full, and
// flush. The address cache is modelled here with a one-cycle response.
module tb_pepu_ctrl;
  import pepu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic flush, dec_is_pointer, fwd_valid, dep_query_valid, dep_found, pf_req_valid, pf_req_spec;
  logic ac_rd_en, ac_rsp_valid, ac_rsp_hit, prop_valid;
  dec_t dec; logic [6:0] fwd_rob, dep_query_rob, prop_rob;
  logic [31:0] fwd_value, dep_query_va, pf_req_va, ac_rd_va, ac_rsp_data, prop_value;
  logic [31:0] stat_pred_ok, stat_pred_bad, stat_dep_retry, stat_drop, stat_pf_spec;
  int checks = 0, failures = 0, cyc = 0;
  logic [31:0] ac_map [logic [31:0]];
  bit block_dep = 0; logic [31:0] block_va = 0;
  typedef struct { int w; logic [31:0] va; bit spec; } pf_ev_t;
  typedef struct { int w; logic [6:0] rob; logic [31:0] value; } pr_ev_t;
  pf_ev_t pfq[$]; pr_ev_t prq[$];

  pepu_ctrl #(.PEND(16), .ROB(128)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) begin
    ac_rsp_valid <= ac_rd_en;
    ac_rsp_hit   <= ac_rd_en && ac_map.exists(ac_rd_va);
    ac_rsp_data  <= ac_map.exists(ac_rd_va) ? ac_map[ac_rd_va] : 32'h0;
  end
  assign dep_found = dep_query_valid && block_dep && dep_query_va == block_va;
  always @(negedge clk) begin
    #4;
    if (pf_req_valid) pfq.push_back('{cyc, pf_req_va, pf_req_spec});
    if (prop_valid)   prq.push_back('{cyc, prop_rob, prop_value});
  end

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s (cycle %0d)", m, cyc); end
  endtask
  task automatic idle(input int n); repeat (n) @(negedge clk); endtask
  // drive one decoded load for one cycle; returns its cycle number
  task automatic load(input int rob, input bit ptr, input bit ready, input logic [31:0] base,
                      input logic [31:0] off, input int prod, output int w);
    @(negedge clk);
    dec = '0; dec.valid = 1; dec.op = OP_LOAD; dec.rob = 7'(rob); dec.rs_ready = ready;
    dec.rs_value = base; dec.offset = off; dec.prod_rob = 7'(prod); dec_is_pointer = ptr;
    w = cyc;
    @(negedge clk); dec = '0; dec_is_pointer = 0;
  endtask
  task automatic fwd(input int rob, input logic [31:0] v, output int w);
    @(negedge clk); fwd_valid = 1; fwd_rob = 7'(rob); fwd_value = v; w = cyc;
    @(negedge clk); fwd_valid = 0;
  endtask
  task automatic expect_pf(input int w, input logic [31:0] va, input bit spec, input string m);
    bit found = 0;
    foreach (pfq[i]) if (pfq[i].w == w && pfq[i].va == va && pfq[i].spec == spec) found = 1;
    chk(found, m);
  endtask
  task automatic expect_prop(input int w, input int rob, input logic [31:0] v, input string m);
    bit found = 0;
    foreach (prq[i]) if (prq[i].w == w && prq[i].rob == 7'(rob) && prq[i].value == v) found = 1;
    chk(found, m);
  endtask

  initial begin
    int c, c2, p, f, s0;
    flush = 0; dec = '0; dec_is_pointer = 0; fwd_valid = 0; fwd_rob = 0; fwd_value = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // 1. list walk: source-ready pointer load, then a dependent load
    ac_map[32'h1004] = 32'h2000;
    load(1, 1, 1, 32'h1000, 4, 0, c);
    load(2, 1, 0, 0, 8, 1, c2);
    idle(8);
    expect_pf(c + 3, 32'h1004, 0, "T3 prefetch at c+3");
    expect_prop(c + 4, 1, 32'h2000, "T4 propagate at c+4");
    chk(prq.size() == 1, "one propagation");
    p = c + 4;
    expect_pf(p + 2, 32'h2008, 1, "T6 speculative prefetch at p+2");
    chk(stat_pf_spec == 1, "spec prefetch counted");
    fwd(1, 32'h2000, f);
    idle(6);
    chk(stat_pred_ok == 1 && stat_pred_bad == 0, "prediction correct");
    chk(pfq.size() == 2, "prefetched load exits when its base arrives");
    // 2. wrong prediction
    pfq.delete(); prq.delete();
    ac_map[32'h5000] = 32'h3000;
    load(5, 1, 1, 32'h5000, 0, 0, c);
    load(6, 0, 0, 0, 16, 5, c2);
    idle(8);
    expect_pf(c + 3, 32'h5000, 0, "second T3");
    expect_pf(c + 6, 32'h3010, 1, "second speculative prefetch");
    fwd(5, 32'h3100, f);
    idle(6);
    chk(stat_pred_bad == 1, "misprediction counted");
    // 3. non-pointer ready load: prefetch, no address-cache read, no propagation
    pfq.delete(); prq.delete();
    load(7, 0, 1, 32'h7000, 12, 0, c);
    idle(8);
    expect_pf(c + 3, 32'h700C, 0, "non-pointer prefetch");
    chk(prq.size() == 0, "no propagation from a non-pointer load");
    // 4. dependency found: retry until it clears
    pfq.delete();
    block_dep = 1; block_va = 32'h8004;
    load(8, 1, 1, 32'h8000, 4, 0, c);
    idle(6);
    chk(pfq.size() == 0 && stat_dep_retry >= 3, "blocked by an older store");
    block_dep = 0;
    idle(4);
    chk(pfq.size() == 1 && pfq[0].va == 32'h8004, "issued after the dependency clears");
    // 5. base arrives by forwarding with no prediction: T1, T2, T3 after it
    pfq.delete();
    load(9, 0, 0, 0, 20, 40, c);
    idle(4);
    chk(pfq.size() == 0, "waits for its base");
    fwd(40, 32'h9000, f);
    idle(6);
    expect_pf(f + 3, 32'h9014, 0, "prefetch 3 cycles after the forward");
    // 6. table full: the 17th waiting load is dropped
    s0 = stat_drop;
    for (int i = 0; i < 17; i++) load(50 + i, 0, 0, 0, 0, 100, c);
    idle(2);
    chk(stat_drop == s0 + 1, "drop when the pending table is full");
    // 7. flush empties the table
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    pfq.delete();
    fwd(100, 32'hA000, f);
    idle(6);
    chk(pfq.size() == 0, "flush cleared the pending loads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
