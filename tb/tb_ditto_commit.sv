// Self-checking testbench for ditto_commit, the duplicated commit logic.
// Drives random ROB-head records and checks that an instruction commits only
// when it is done, space is left in the delay buffer (two slots for a
// long-latency record) and no recovery holds commit; that the record pushed
// carries a running sequence number; and that register writes skip r0. A
// fault in one copy is imitated by forcing that copy's outputs: a dropped
// commit, a corrupted record and a wrong sequence number must each raise err
// and block the commit.
module tb_ditto_commit;
  import ditto_pkg::*;
  logic clk = 0, rst_n = 0;
  logic head_valid, head_done, space1, space2, hold, commit, db_push, rf_wr_en, err;
  commit_rec_t head_rec, db_rec; logic [4:0] rf_rd; logic [31:0] rf_value; logic [7:0] rf_seq;
  int checks = 0, failures = 0, n_commit = 0, n_err = 0;
  logic [7:0] seqm;
  ditto_commit dut (.*);
  always #5 clk = ~clk;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  initial begin
    bit ec;
    head_valid = 0; head_done = 0; space1 = 1; space2 = 1; hold = 0; head_rec = '0; seqm = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (20000) begin
      @(negedge clk);
      head_valid = $urandom_range(0, 3) != 0; head_done = $urandom_range(0, 3) != 0;
      space2 = $urandom_range(0, 5) != 0; space1 = space2 || $urandom_range(0, 1);
      hold = $urandom_range(0, 15) == 0;
      head_rec.pc = $urandom(); head_rec.inst = $urandom(); head_rec.result = $urandom();
      head_rec.long_lat = $urandom_range(0, 3) == 0; head_rec.has_rd = $urandom_range(0, 1);
      head_rec.rd = 5'($urandom_range(0, 3)); head_rec.seq = 8'hEE;
      #1;
      ec = head_valid && head_done && !hold && (head_rec.long_lat ? space2 : space1);
      chk(!err, "copies agree");
      chk(commit == ec && db_push == ec, "commit condition");
      if (ec) begin
        chk(db_rec.seq == seqm && db_rec.pc == head_rec.pc && db_rec.result == head_rec.result, "record and sequence");
        chk(rf_wr_en == (head_rec.has_rd && head_rec.rd != 0) && rf_value == head_rec.result && rf_seq == seqm, "register write");
        n_commit++;
      end else chk(!rf_wr_en, "no register write without commit");
      @(posedge clk);
      if (ec) seqm++;
    end
    // faults in one copy
    for (int k = 0; k < 3; k++) begin
      @(negedge clk);
      head_valid = 1; head_done = 1; space1 = 1; space2 = 1; hold = 0; head_rec.long_lat = 0;
      case (k)
        0: force dut.u_b.commit = 1'b0;
        1: force dut.u_b.rec.result = ~head_rec.result;
        default: force dut.u_b.rec.seq = seqm + 8'd3;
      endcase
      #1;
      chk(err && !commit && !rf_wr_en, $sformatf("fault %0d in one copy is detected", k));
      if (err) n_err++;
      case (k)
        0: release dut.u_b.commit;
        1: release dut.u_b.rec.result;
        default: release dut.u_b.rec.seq;
      endcase
      #1; chk(!err, "agreement after release");
    end
    chk(n_commit > 0 && n_err == 3, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
