// Delay buffer: committed instructions waiting for their clones.
//
// A FIFO of DEPTH slots. Every committed instruction is written as one slot
// holding its address, code, result, the value its clone must reproduce and
// its decoded branch target; a long-latency instruction also takes the slot
// right after it for its source operand values. Two read pointers walk the
// buffer: the clone-fetch pointer hands instruction addresses, in program
// order, to the cloned fetch unit (cf_*), and the head is the record the
// verify logic compares with the clone at register read. pop removes the head
// record (one or two slots) once its clone has passed register read.
//
// Interface and timing: push writes one or two slots at the clock edge when
// space allows (space1/space2 are combinational); head_rec and cf_pc are
// combinational reads; flush empties the buffer (error recovery: every
// unverified instruction will be committed again).
//
// The content of an entry, the extra operand slot for long-latency
// operations, removal at register read and the default 128 slots follow the
// source design. The second read pointer for the cloned fetch unit and the
// single push and pop per cycle are this design's choices.
module delay_buffer
  import ditto_pkg::*;
#(
  parameter int unsigned DEPTH = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,
  input  logic        push,
  input  commit_rec_t push_rec,
  output logic        space1,
  output logic        space2,
  output logic        head_valid,
  output commit_rec_t head_rec,
  input  logic        pop,
  output logic        cf_valid,
  output logic [XLEN-1:0] cf_pc,
  input  logic        cf_next,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  db_slot_t    mem_q [DEPTH];
  logic [AW:0] wr_q, rd_q, cf_q;

  function automatic logic [AW-1:0] at(input logic [AW:0] p, input int unsigned k);
    return AW'(p[AW-1:0] + AW'(k));
  endfunction

  db_slot_t h0, h1, c0;
  assign h0 = mem_q[at(rd_q, 0)];
  assign h1 = mem_q[at(rd_q, 1)];
  assign c0 = mem_q[at(cf_q, 0)];

  assign count      = wr_q - rd_q;
  assign space1     = (32'(count) + 1) <= DEPTH;
  assign space2     = (32'(count) + 2) <= DEPTH;
  assign head_valid = (count != 0);
  assign cf_valid   = (cf_q != wr_q);
  assign cf_pc      = c0.w0;

  always_comb begin
    head_rec = '{pc: h0.w0, inst: h0.w1, result: h0.w2, check: h0.w3, target: h0.w4,
                 is_branch: h0.is_branch, long_lat: h0.long_lat, has_rd: h0.has_rd, rd: h0.rd,
                 src1: '0, src2: '0, seq: h0.seq};
    if (h0.long_lat) begin
      head_rec.src1 = h1.w0;
      head_rec.src2 = h1.w1;
    end
  end

  logic push_ok;
  assign push_ok = push && (push_rec.long_lat ? space2 : space1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q <= '0;
      rd_q <= '0;
      cf_q <= '0;
      for (int i = 0; i < DEPTH; i++) mem_q[i] <= '0;
    end else if (flush) begin
      wr_q <= '0;
      rd_q <= '0;
      cf_q <= '0;
    end else begin
      if (push_ok) begin
        mem_q[at(wr_q, 0)] <= '{is_branch: push_rec.is_branch, long_lat: push_rec.long_lat,
                                has_rd: push_rec.has_rd, rd: push_rec.rd, seq: push_rec.seq,
                                w0: push_rec.pc, w1: push_rec.inst, w2: push_rec.result,
                                w3: push_rec.check, w4: push_rec.target};
        if (push_rec.long_lat)
          mem_q[at(wr_q, 1)] <= '{is_branch: 1'b0, long_lat: 1'b0, has_rd: 1'b0, rd: '0,
                                  seq: push_rec.seq, w0: push_rec.src1, w1: push_rec.src2,
                                  w2: '0, w3: '0, w4: '0};
        wr_q <= wr_q + (push_rec.long_lat ? 2 : 1);
      end
      if (pop && head_valid) rd_q <= rd_q + (h0.long_lat ? 2 : 1);
      if (cf_next && cf_valid) cf_q <= cf_q + (c0.long_lat ? 2 : 1);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n || flush) pop |-> head_valid)
    else $error("delay buffer popped while empty");
endmodule
