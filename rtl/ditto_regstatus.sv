// Architectural register file with Ditto status bits.
//
// Each register has a value and a status: invalid (never written), transient
// (written by a committed instruction whose clone has not been verified) or
// verified. A commit write makes a register transient. The verification of
// that same instruction, recognised by its commit sequence number, makes it
// verified; a verification for an older write, already overwritten, leaves the
// register transient. On an error, every transient register goes back to its
// last verified value (or to invalid if it never had one), i.e. to the
// architectural state just before the oldest unverified instruction.
//
// Interface and timing: one commit write and one verification per cycle,
// both at the clock edge; flush has priority over both. The read port is
// combinational; readers treat transient and verified alike as ready.
//
// The three states, transient on commit, verified on clone verification and
// the flush of transient values on an error follow the source design. It
// asks for a single extra bit per register. This design instead keeps a
// verified copy of each value and the sequence number of the last writer, so
// that the flush yields a precise, restartable state. That costs a second
// value per register.
module ditto_regstatus
  import ditto_pkg::*;
#(
  parameter int unsigned NREGS = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [$clog2(NREGS)-1:0] wr_rd,
  input  logic [XLEN-1:0]          wr_value,
  input  logic [SEQ_W-1:0]         wr_seq,
  input  logic                     ver_en,
  input  logic [$clog2(NREGS)-1:0] ver_rd,
  input  logic [XLEN-1:0]          ver_value,
  input  logic [SEQ_W-1:0]         ver_seq,
  input  logic                     flush,
  input  logic [$clog2(NREGS)-1:0] rd_idx,
  output logic [XLEN-1:0]          rd_value,
  output logic [1:0]               rd_status,
  output logic [NREGS-1:0]         transient_map
);
  localparam logic [1:0] ST_INVALID = 2'd0, ST_TRANSIENT = 2'd1, ST_VERIFIED = 2'd2;

  logic [XLEN-1:0]  val_q  [NREGS];
  logic [XLEN-1:0]  safe_q [NREGS];
  logic [SEQ_W-1:0] seq_q  [NREGS];
  logic [1:0]       st_q   [NREGS];
  logic [NREGS-1:0] safe_ok_q;

  assign rd_value  = val_q[rd_idx];
  assign rd_status = st_q[rd_idx];
  always_comb for (int r = 0; r < NREGS; r++) transient_map[r] = (st_q[r] == ST_TRANSIENT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      safe_ok_q <= '0;
      for (int r = 0; r < NREGS; r++) begin
        val_q[r] <= '0; safe_q[r] <= '0; seq_q[r] <= '0; st_q[r] <= ST_INVALID;
      end
    end else if (flush) begin
      for (int r = 0; r < NREGS; r++) begin
        if (st_q[r] == ST_TRANSIENT) begin
          val_q[r] <= safe_q[r];
          st_q[r]  <= safe_ok_q[r] ? ST_VERIFIED : ST_INVALID;
        end
      end
    end else begin
      if (ver_en) begin
        safe_q[ver_rd]    <= ver_value;
        safe_ok_q[ver_rd] <= 1'b1;
        if (seq_q[ver_rd] == ver_seq && st_q[ver_rd] == ST_TRANSIENT) st_q[ver_rd] <= ST_VERIFIED;
      end
      if (wr_en) begin
        val_q[wr_rd] <= wr_value;
        seq_q[wr_rd] <= wr_seq;
        st_q[wr_rd]  <= ST_TRANSIENT;
      end
    end
  end
endmodule
