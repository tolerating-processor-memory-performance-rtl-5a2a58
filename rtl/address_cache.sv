// Address Cache (AC): a small direct-mapped table of next-node addresses.
//
// Each 4-byte line is indexed and tagged by a virtual address and holds the
// value last loaded from (or stored to) that address by an address-type
// pointer load, i.e. where the next element of a linked structure lives. A
// pointer load whose own virtual address hits in the AC thus learns, one
// cycle later, the base address its dependent loads will use.
//
// Ports and timing:
//  * rd_en/rd_va: lookup; rd_valid/rd_hit/rd_data/rd_locked follow one cycle
//    later (one-cycle hit latency). A locked line reports no hit, which
//    cancels the prediction.
//  * upd_en/upd_va/upd_data: a completed address or data-address load writes
//    its target value (allocating the line, replacing whatever was there).
//  * st_lock_en/st_lock_va: a store whose address is known and hits a line
//    locks it until its data arrives.
//  * st_wr_en/st_wr_va/st_wr_data: the store's data; on a hit the line is
//    updated and unlocked.
//  * flush: drop all locks (the stores they belonged to were squashed).
//
// Direct mapping, 4-byte lines, virtual indexing, one-cycle latency, the lock
// bit and updates by stores follow the source design; its default size is
// 1 KB (256 lines). Updating only lines already present on a store, and
// clearing locks on flush, are this design's choices.
module address_cache #(
  parameter int unsigned ENTRIES = 256,
  parameter int unsigned XLEN    = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            rd_en,
  input  logic [XLEN-1:0] rd_va,
  output logic            rd_valid,
  output logic            rd_hit,
  output logic            rd_locked,
  output logic [XLEN-1:0] rd_data,
  input  logic            upd_en,
  input  logic [XLEN-1:0] upd_va,
  input  logic [XLEN-1:0] upd_data,
  input  logic            st_lock_en,
  input  logic [XLEN-1:0] st_lock_va,
  input  logic            st_wr_en,
  input  logic [XLEN-1:0] st_wr_va,
  input  logic [XLEN-1:0] st_wr_data,
  input  logic            flush
);
  localparam int unsigned IW = $clog2(ENTRIES);
  localparam int unsigned TW = XLEN - IW - 2;

  logic [TW-1:0]   tag_q  [ENTRIES];
  logic [XLEN-1:0] data_q [ENTRIES];
  logic [ENTRIES-1:0] valid_q, lock_q;

  function automatic logic [IW-1:0] idx_of(input logic [XLEN-1:0] a);
    return a[2 +: IW];
  endfunction
  function automatic logic [TW-1:0] tag_of(input logic [XLEN-1:0] a);
    return a[XLEN-1 -: TW];
  endfunction
  function automatic logic present(input logic [XLEN-1:0] a, input logic [ENTRIES-1:0] v,
                                   input logic [TW-1:0] t);
    return v[idx_of(a)] && t == tag_of(a);
  endfunction

  logic lk_hit, wr_hit;
  assign lk_hit = present(st_lock_va, valid_q, tag_q[idx_of(st_lock_va)]);
  assign wr_hit = present(st_wr_va,   valid_q, tag_q[idx_of(st_wr_va)]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q   <= '0;
      lock_q    <= '0;
      rd_valid  <= 1'b0;
      rd_hit    <= 1'b0;
      rd_locked <= 1'b0;
      rd_data   <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        tag_q[i]  <= '0;
        data_q[i] <= '0;
      end
    end else begin
      rd_valid  <= rd_en;
      rd_locked <= rd_en && present(rd_va, valid_q, tag_q[idx_of(rd_va)]) && lock_q[idx_of(rd_va)];
      rd_hit    <= rd_en && present(rd_va, valid_q, tag_q[idx_of(rd_va)]) && !lock_q[idx_of(rd_va)];
      rd_data   <= data_q[idx_of(rd_va)];
      if (upd_en) begin
        valid_q[idx_of(upd_va)] <= 1'b1;
        tag_q[idx_of(upd_va)]   <= tag_of(upd_va);
        data_q[idx_of(upd_va)]  <= upd_data;
        if (!present(upd_va, valid_q, tag_q[idx_of(upd_va)])) lock_q[idx_of(upd_va)] <= 1'b0;
      end
      if (st_lock_en && lk_hit) lock_q[idx_of(st_lock_va)] <= 1'b1;
      if (st_wr_en && wr_hit) begin
        data_q[idx_of(st_wr_va)] <= st_wr_data;
        lock_q[idx_of(st_wr_va)] <= 1'b0;
      end
      if (flush) lock_q <= '0;
    end
  end
endmodule
