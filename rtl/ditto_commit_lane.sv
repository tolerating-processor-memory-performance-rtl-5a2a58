// One copy of the Ditto commit logic (instantiated twice by ditto_commit).
//
// Retires the ROB head when it has completed and the delay buffer has room
// for its record (two slots for a long-latency operation), stamps the record
// with the lane's commit sequence number and produces the delay-buffer push
// and the register-file write. The sequence number advances only when
// allow_q (the agreement of both lanes) lets the commit happen.
module ditto_commit_lane
  import ditto_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        head_valid,
  input  logic        head_done,
  input  commit_rec_t head_rec,
  input  logic        space1,
  input  logic        space2,
  input  logic        hold,
  input  logic        advance,
  output logic        commit,
  output commit_rec_t rec
);
  logic [SEQ_W-1:0] seq_q;

  always_comb begin
    commit  = head_valid && head_done && !hold && (head_rec.long_lat ? space2 : space1);
    rec     = head_rec;
    rec.seq = seq_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       seq_q <= '0;
    else if (advance) seq_q <= seq_q + 1'b1;
  end
endmodule
