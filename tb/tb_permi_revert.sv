// tb_permi_revert: checks the trap-recovery sequencer on its own. Random
// permi issues, pipeline holds and traps are driven; the testbench keeps its
// own list of the permi instructions in flight past Decode, with the stage
// each one is in. It checks that a permi leaving the last stage signals
// commit_o, and that after a trap exactly the permis then in flight are sent
// back as inverse updates, youngest first, one per cycle, with busy_o high for
// exactly that many cycles. The move lists are random bit patterns used only
// as tags.
module tb_permi_revert;
  import permi_pkg::*;

  localparam int unsigned NSTAGES = 4;

  logic  clk = 0;
  logic  rst_n;
  logic  hold, issue, trap;
  perm_t issue_perm;
  logic  busy, upd_valid, commit;
  perm_t upd_perm;

  int checks = 0, failures = 0;
  int n_trap0 = 0, n_trap1 = 0, n_trapm = 0, n_commit = 0, n_hold = 0, n_revert = 0;

  permi_revert #(.NSTAGES(NSTAGES)) dut (
    .clk(clk), .rst_n(rst_n), .hold_i(hold), .issue_i(issue), .issue_perm_i(issue_perm),
    .trap_i(trap), .busy_o(busy), .upd_valid_o(upd_valid), .upd_perm_o(upd_perm),
    .commit_o(commit)
  );

  always #10 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic perm_t rand_tag();
    perm_t t;
    for (int k = 0; k < int'(NMOVES); k++) t[k] = move_t'($urandom);
    return t;
  endfunction

  // In-flight list, oldest first.
  perm_t fl_perm  [$];
  int    fl_stage [$];
  perm_t expect_rev [$];   // inverse updates still expected, in order

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("t=%0t: %s", $time, msg); end
  endtask

  initial begin
    hold = 0; issue = 0; trap = 0; issue_perm = '0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 8000; cyc++) begin
      bit adv;
      bit exp_commit;
      @(negedge clk);
      // Outputs of this cycle, reflecting state after the previous edge.
      if (expect_rev.size() > 0) begin
        chk(busy && upd_valid, "reversion expected but busy/upd_valid low");
        chk(upd_perm == expect_rev[0], "wrong permutation reverted (order)");
        void'(expect_rev.pop_front());
        n_revert++;
        hold = 0; issue = 0; trap = 0;
        // Decode is stalled; nothing else is checked in these cycles.
        continue;
      end
      chk(!busy && !upd_valid, "busy after reversion finished");
      hold  = ($urandom_range(0, 4) == 0);
      trap  = ($urandom_range(0, 19) == 0);
      issue = ($urandom_range(0, 9) < 6);
      issue_perm = rand_tag();
      #1;
      if (trap) begin
        chk(!commit, "commit during trap");
        if (fl_perm.size() == 0) n_trap0++;
        else if (fl_perm.size() == 1) n_trap1++;
        else n_trapm++;
        // youngest first
        for (int i = fl_perm.size() - 1; i >= 0; i--) expect_rev.push_back(fl_perm[i]);
        fl_perm.delete();
        fl_stage.delete();
        continue;
      end
      adv = !hold;
      exp_commit = adv && fl_stage.size() > 0 && fl_stage[0] == int'(NSTAGES) - 1;
      chk(commit == exp_commit, "commit_o wrong");
      if (commit) n_commit++;
      if (hold) n_hold++;
      if (adv) begin
        if (exp_commit) begin void'(fl_perm.pop_front()); void'(fl_stage.pop_front()); end
        foreach (fl_stage[i]) fl_stage[i]++;
        if (issue) begin fl_perm.push_back(issue_perm); fl_stage.push_back(0); end
      end
    end
    @(negedge clk);
    chk(n_trap0 > 0 && n_trap1 > 0 && n_trapm > 0, "trap with 0, 1 and several permis not all seen");
    chk(n_commit > 0 && n_hold > 0, "commit or hold never seen");
    $display("traps: %0d empty, %0d one permi, %0d several; reverted %0d, committed %0d, holds %0d",
             n_trap0, n_trap1, n_trapm, n_revert, n_commit, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
