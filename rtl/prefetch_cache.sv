// Prefetch Cache (PFC): a small direct-mapped cache for prefetched lines.
//
// Lines brought in by the PEPU are kept here rather than in the L1 data cache
// so they cannot pollute it. A load's read goes to the L1 and the PFC at the
// same time; on a PFC hit the L1 request is to be cancelled. A store that hits
// the PFC writes its word into the line too, keeping the two caches coherent.
//
// Ports and timing:
//  * rd_en/rd_va: read of one 32-bit word; rd_valid/rd_hit/rd_data one cycle
//    later (one-cycle hit latency).
//  * probe_va/probe_hit: combinational presence test, used to suppress a
//    prefetch of a line already held.
//  * fill_en/fill_va/fill_line: a whole line returned by the memory hierarchy.
//  * st_en/st_va/st_data: word store; updates the line only on a hit. A fill
//    and a store to the same line in one cycle apply the fill, then the word.
//
// The role, the one-cycle latency, the parallel access with the L1 and the
// store update follow the source design, as does the default 1 KB capacity.
// The 32-byte line (the L1 line size), direct mapping (one of the two
// organisations it names), virtual indexing and tagging, and word-wide
// accesses are this design's choices.
module prefetch_cache #(
  parameter int unsigned LINES      = 32,
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned XLEN       = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    rd_en,
  input  logic [XLEN-1:0]         rd_va,
  output logic                    rd_valid,
  output logic                    rd_hit,
  output logic [31:0]             rd_data,
  input  logic [XLEN-1:0]         probe_va,
  output logic                    probe_hit,
  input  logic                    fill_en,
  input  logic [XLEN-1:0]         fill_va,
  input  logic [LINE_BYTES*8-1:0] fill_line,
  input  logic                    st_en,
  input  logic [XLEN-1:0]         st_va,
  input  logic [31:0]             st_data
);
  localparam int unsigned OW = $clog2(LINE_BYTES);
  localparam int unsigned IW = $clog2(LINES);
  localparam int unsigned TW = XLEN - IW - OW;
  localparam int unsigned WPL = LINE_BYTES / 4;

  logic [TW-1:0]   tag_q  [LINES];
  logic [31:0]     data_q [LINES][WPL];
  logic [LINES-1:0] valid_q;

  function automatic logic [IW-1:0] idx_of(input logic [XLEN-1:0] a);
    return a[OW +: IW];
  endfunction
  function automatic logic [TW-1:0] tag_of(input logic [XLEN-1:0] a);
    return a[XLEN-1 -: TW];
  endfunction
  function automatic logic [$clog2(WPL)-1:0] word_of(input logic [XLEN-1:0] a);
    return a[2 +: $clog2(WPL)];
  endfunction

  logic rd_present, st_present;
  assign rd_present = valid_q[idx_of(rd_va)]    && tag_q[idx_of(rd_va)]    == tag_of(rd_va);
  assign probe_hit  = valid_q[idx_of(probe_va)] && tag_q[idx_of(probe_va)] == tag_of(probe_va);
  // a line being filled in the same cycle counts as present for the store
  assign st_present = (valid_q[idx_of(st_va)] && tag_q[idx_of(st_va)] == tag_of(st_va) &&
                       !(fill_en && idx_of(fill_va) == idx_of(st_va))) ||
                      (fill_en && idx_of(fill_va) == idx_of(st_va) && tag_of(fill_va) == tag_of(st_va));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q  <= '0;
      rd_valid <= 1'b0;
      rd_hit   <= 1'b0;
      rd_data  <= '0;
      for (int i = 0; i < LINES; i++) begin
        tag_q[i] <= '0;
        for (int w = 0; w < WPL; w++) data_q[i][w] <= '0;
      end
    end else begin
      rd_valid <= rd_en;
      rd_hit   <= rd_en && rd_present;
      rd_data  <= data_q[idx_of(rd_va)][word_of(rd_va)];
      if (fill_en) begin
        valid_q[idx_of(fill_va)] <= 1'b1;
        tag_q[idx_of(fill_va)]   <= tag_of(fill_va);
        for (int w = 0; w < WPL; w++) data_q[idx_of(fill_va)][w] <= fill_line[w*32 +: 32];
      end
      if (st_en && st_present) data_q[idx_of(st_va)][word_of(st_va)] <= st_data;
    end
  end
endmodule
