// tb_permi_unit: end-to-end test of the permutation unit at its default size
// (32 registers, 3 read ports, 4 stages after Decode).
//
// The testbench plays the pipeline around the unit. A register file model
// holds a distinct value in each physical register and is never written, so
// every register move has to come from the permutation table. A random
// instruction stream (permi5, permi23 and other instructions) flows through
// Decode with random holds and traps. The reference keeps two logical
// register states: the speculative one (every permi that left Decode) and the
// committed one (every permi that left the last stage). Each cycle the three
// translated read addresses and the whole mapping must show the speculative
// state; the cycle right after a permi reads the registers it moved. After a
// trap the unit must stall Decode for exactly one cycle per annulled permi
// and leave the committed state in the table. Every mechanism (each cycle
// size, back-to-back permis, holds, traps with none, one and several permis
// in flight, commits) is counted and must occur.
module tb_permi_unit;
  import permi_pkg::*;
  import permi_tb_pkg::*;

  localparam int unsigned NREAD   = 3;
  localparam int unsigned NSTAGES = 4;   // the unit's default
  localparam int unsigned NCYC    = 20000;

  logic        clk = 0;
  logic        rst_n;
  logic        de_valid;
  logic [31:0] de_inst;
  reg_addr_t   de_raddr [NREAD];
  reg_addr_t   de_paddr [NREAD];
  logic        de_permi, hold, trap, stall, commit;
  reg_addr_t   map [NREGS];

  permi_unit dut (
    .clk(clk), .rst_n(rst_n), .de_valid_i(de_valid), .de_inst_i(de_inst),
    .de_raddr_i(de_raddr), .de_paddr_o(de_paddr), .de_permi_o(de_permi),
    .hold_i(hold), .trap_i(trap), .stall_o(stall), .commit_o(commit), .map_o(map)
  );

  always #10 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("t=%0t: %s", $time, msg);
    end
  endtask

  regs_t  phys, sref, cref;
  permi_t fl_p [$];
  int     fl_stage [$];

  // mechanism counters
  int n_len5 [6];
  int n_23_full = 0, n_23_swaps = 0, n_23_empty_a = 0;
  int n_b2b = 0, n_hold_permi = 0, n_trap0 = 0, n_trap1 = 0, n_trapm = 0;
  int n_stall = 0, n_commit = 0, n_read_after = 0, n_other = 0;

  initial begin
    permi_t cur_p;
    bit     cur_is_permi;
    bit     need_new;
    bit     prev_issue;
    permi_t prev_p;
    int     stall_left;

    for (int i = 0; i < 32; i++) begin
      phys[i] = 100 + 3 * i;
      sref[i] = phys[i];
      cref[i] = phys[i];
    end
    for (int i = 0; i < 6; i++) n_len5[i] = 0;
    de_valid = 0; de_inst = '0; hold = 0; trap = 0;
    for (int p = 0; p < int'(NREAD); p++) de_raddr[p] = '0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    need_new = 1; prev_issue = 0; stall_left = 0;
    cur_is_permi = 0; cur_p = rand_permi(); prev_p = cur_p;

    for (int cyc = 0; cyc < int'(NCYC); cyc++) begin
      bit issue, adv, exp_commit;
      @(negedge clk);
      if (stall_left > 0) begin
        // Reversion under way: Decode is held, the pipeline is empty.
        trap = 0; hold = 0;
        #1;
        chk(stall, "stall_o low during reversion");
        chk(!commit, "commit during reversion");
        n_stall++;
        stall_left--;
        continue;
      end
      // New instruction into Decode unless the last one is still there.
      if (need_new) begin
        de_valid = ($urandom_range(0, 9) != 0);
        cur_is_permi = ($urandom_range(0, 9) < 6);
        if (cur_is_permi) begin
          cur_p = rand_permi();
          de_inst = encode(cur_p);
        end else begin
          de_inst = rand_other();
        end
      end
      hold = ($urandom_range(0, 6) == 0);
      trap = ($urandom_range(0, 24) == 0);
      // First instruction: the worked example "permi5 r5 r9 r7 r6 r8".
      if (cyc == 0) begin
        de_valid = 1; cur_is_permi = 1; hold = 0; trap = 0;
        cur_p.is23 = 0; cur_p.a.n = 5;
        cur_p.a.r[0] = 5'd5; cur_p.a.r[1] = 5'd9; cur_p.a.r[2] = 5'd7;
        cur_p.a.r[3] = 5'd6; cur_p.a.r[4] = 5'd8;
        de_inst = 32'h1214_9CC8;   // 0001 001 000 01 01001 00111 00110 01000
      end
      // Hand-worked result of the example (r<i> starts with 100 + 3*i).
      if (cyc == 1) begin
        chk(phys[map[9]] == 115 && phys[map[7]] == 127 && phys[map[6]] == 121 &&
            phys[map[8]] == 118 && phys[map[5]] == 124 && phys[map[4]] == 112,
            "worked example permi5 r5 r9 r7 r6 r8 gives wrong registers");
      end
      for (int p = 0; p < int'(NREAD); p++) begin
        if (prev_issue && $urandom_range(0, 1) == 1)
          de_raddr[p] = prev_p.is23 ? prev_p.b.r[$urandom_range(0, prev_p.b.n - 1)]
                                    : prev_p.a.r[$urandom_range(0, prev_p.a.n - 1)];
        else
          de_raddr[p] = reg_addr_t'($urandom_range(0, 31));
      end
      #1;
      chk(!stall, "stall_o high outside a reversion");
      chk(de_permi == (de_valid && cur_is_permi), "de_permi_o wrong");
      // Translated register reads show the speculative state.
      for (int p = 0; p < int'(NREAD); p++) begin
        chk(phys[de_paddr[p]] == sref[de_raddr[p]], "translated read wrong");
        if (prev_issue) n_read_after++;
      end
      for (int l = 0; l < 32; l++)
        chk(phys[map[l]] == sref[l], "mapping differs from reference");

      issue = de_valid && cur_is_permi && !hold && !trap;
      if (de_valid && cur_is_permi && hold) n_hold_permi++;
      if (de_valid && !cur_is_permi) n_other++;

      if (trap) begin
        chk(!commit, "commit during trap");
        if (fl_p.size() == 0) n_trap0++;
        else if (fl_p.size() == 1) n_trap1++;
        else n_trapm++;
        stall_left = fl_p.size();
        fl_p.delete();
        fl_stage.delete();
        sref = cref;
        need_new = 1;
        prev_issue = 0;
        continue;
      end

      adv = !hold;
      exp_commit = adv && fl_stage.size() > 0 && fl_stage[0] == int'(NSTAGES) - 1;
      chk(commit == exp_commit, "commit_o wrong");
      if (exp_commit) begin
        cref = apply_permi(cref, fl_p[0]);
        void'(fl_p.pop_front());
        void'(fl_stage.pop_front());
        n_commit++;
      end
      if (adv) foreach (fl_stage[i]) fl_stage[i]++;
      if (issue) begin
        sref = apply_permi(sref, cur_p);
        fl_p.push_back(cur_p);
        fl_stage.push_back(0);
        if (prev_issue) n_b2b++;
        if (!cur_p.is23) n_len5[cur_p.a.n]++;
        else begin
          if (cur_p.a.n == 1) n_23_empty_a++;
          if (cur_p.b.n == 3) n_23_full++; else n_23_swaps++;
        end
        prev_p = cur_p;
      end
      prev_issue = issue;
      need_new = adv;
    end

    // Final state: let everything in flight commit and compare.
    @(negedge clk);
    hold = 0; trap = 0; de_valid = 0;
    while (stall_left > 0) begin @(negedge clk); stall_left--; end
    repeat (NSTAGES + 1) @(negedge clk);
    #1;
    for (int l = 0; l < 32; l++)
      chk(phys[map[l]] == sref[l], "final mapping differs from reference");

    for (int n = 2; n <= 5; n++) chk(n_len5[n] > 0, "a permi5 cycle size never executed");
    chk(n_23_full > 0 && n_23_swaps > 0 && n_23_empty_a > 0, "a permi23 form never executed");
    chk(n_b2b > 0, "back-to-back permis never seen");
    chk(n_hold_permi > 0, "hold with a permi in Decode never seen");
    chk(n_trap0 > 0 && n_trap1 > 0 && n_trapm > 0, "traps with 0/1/several permis not all seen");
    chk(n_stall > 0 && n_commit > 0 && n_read_after > 0 && n_other > 0, "a mechanism never seen");
    $display("permi5 by size 2..5: %0d %0d %0d %0d; permi23 2+3: %0d, 2+2: %0d, empty 2-cycle: %0d",
             n_len5[2], n_len5[3], n_len5[4], n_len5[5], n_23_full, n_23_swaps, n_23_empty_a);
    $display("back-to-back %0d, held permis %0d, traps 0/1/many %0d/%0d/%0d, reversion cycles %0d, commits %0d",
             n_b2b, n_hold_permi, n_trap0, n_trap1, n_trapm, n_stall, n_commit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
