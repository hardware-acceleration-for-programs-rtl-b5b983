// tb_shuffle_code: runs compiler-generated shuffle code on the permutation
// unit. For each test a random register permutation (a register transfer graph
// in permutation form over r1..r31) is built and turned into permi
// instructions by the greedy two-phase scheme: cycles of four or more
// registers are cut into permi5 instructions of five registers, each leaving a
// cycle four registers shorter; the leftover 2- and 3-cycles are paired into
// permi23 instructions (a 3-cycle without partner is split into two swaps,
// or executed as a permi5 when alone). The instructions are issued back to
// back, one per cycle, and the register state seen through the table must then
// equal the parallel copy. Reports the average number of instructions per
// permutation.
module tb_shuffle_code;
  import permi_pkg::*;
  import permi_tb_pkg::*;

  localparam int unsigned NTEST = 400;

  logic        clk = 0;
  logic        rst_n;
  logic        de_valid;
  logic [31:0] de_inst;
  reg_addr_t   de_raddr [3];
  reg_addr_t   de_paddr [3];
  logic        de_permi, stall, commit;
  reg_addr_t   map [NREGS];

  permi_unit dut (
    .clk(clk), .rst_n(rst_n), .de_valid_i(de_valid), .de_inst_i(de_inst),
    .de_raddr_i(de_raddr), .de_paddr_o(de_paddr), .de_permi_o(de_permi),
    .hold_i(1'b0), .trap_i(1'b0), .stall_o(stall), .commit_o(commit), .map_o(map)
  );

  always #10 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic [4:0] cyc_q_t [$];

  permi_t prog [$];      // generated instructions

  function automatic cyc_t to_cyc(cyc_q_t q);
    cyc_t c;
    c.n = q.size();
    for (int i = 0; i < 5; i++) c.r[i] = (i < q.size()) ? q[i] : 5'd0;
    return c;
  endfunction

  function automatic cyc_t empty_cyc();
    cyc_t c;
    c.n = 1;
    for (int i = 0; i < 5; i++) c.r[i] = 5'd0;
    return c;
  endfunction

  task automatic emit5(cyc_q_t q);
    permi_t p;
    p.is23 = 0; p.a = to_cyc(q); p.b = empty_cyc();
    prog.push_back(p);
  endtask

  task automatic emit23(cyc_q_t two, cyc_q_t other);
    permi_t p;
    p.is23 = 1; p.a = to_cyc(two); p.b = to_cyc(other);
    prog.push_back(p);
  endtask

  // Greedy code generation for a permutation given as succ[r] (r -> succ[r]).
  task automatic gen_code(int succ [32]);
    bit      seen [32];
    cyc_q_t  longs [$], twos [$], threes [$];
    prog.delete();
    for (int r = 0; r < 32; r++) seen[r] = 0;
    for (int r = 0; r < 32; r++) begin
      if (!seen[r] && succ[r] != r) begin
        cyc_q_t c;
        int x = r;
        while (!seen[x]) begin seen[x] = 1; c.push_back(5'(x)); x = succ[x]; end
        if (c.size() >= 4) longs.push_back(c);
        else if (c.size() == 3) threes.push_back(c);
        else twos.push_back(c);
      end
    end
    // Phase 1: permi5 for long cycles.
    while (longs.size() > 0) begin
      cyc_q_t c = longs.pop_front();
      while (c.size() >= 4) begin
        if (c.size() <= 5) begin
          emit5(c);
          c.delete();
        end else begin
          cyc_q_t head, rest;
          for (int i = 0; i < 5; i++) head.push_back(c[i]);
          rest.push_back(c[0]);
          for (int i = 5; i < c.size(); i++) rest.push_back(c[i]);
          emit5(head);
          c = rest;
        end
      end
      if (c.size() == 3) threes.push_back(c);
      else if (c.size() == 2) twos.push_back(c);
    end
    // Phase 2: fill permi23.
    while (twos.size() > 0 || threes.size() > 0) begin
      if (threes.size() > 0) begin
        if (twos.size() > 0) emit23(twos.pop_front(), threes.pop_front());
        else if (threes.size() >= 2) begin
          cyc_q_t t = threes.pop_front();
          cyc_q_t s1, s2;
          s1.push_back(t[0]); s1.push_back(t[1]);
          s2.push_back(t[0]); s2.push_back(t[2]);
          emit23(s1, threes.pop_front());
          twos.push_back(s2);
        end else emit5(threes.pop_front());
      end else begin
        if (twos.size() >= 2) begin
          cyc_q_t t = twos.pop_front();
          emit23(t, twos.pop_front());
        end else emit5(twos.pop_front());
      end
    end
  endtask

  initial begin
    regs_t phys, ref_v, target;
    int    succ [32];
    automatic int total_insns = 0, n5 = 0, n23 = 0, max_insns = 0;
    de_valid = 0; de_inst = '0;
    for (int p = 0; p < 3; p++) de_raddr[p] = '0;
    for (int i = 0; i < 32; i++) begin phys[i] = 7000 + 11 * i; ref_v[i] = phys[i]; end
    rst_n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < int'(NTEST); t++) begin
      automatic int pool [$];
      automatic int k = 0;
      automatic int cycles = 0;
      // random permutation of k registers out of r1..r31
      for (int r = 0; r < 32; r++) succ[r] = r;
      for (int r = 1; r < 32; r++) pool.push_back(r);
      pool.shuffle();
      k = $urandom_range(2, 31);
      for (int i = 0; i < k; i++) begin
        automatic int j = $urandom_range(0, k - 1);
        automatic int tmp = pool[i];
        pool[i] = pool[j];
        pool[j] = tmp;
      end
      begin
        automatic int sel [$];
        automatic int perm [$];
        for (int i = 0; i < k; i++) sel.push_back(pool[i]);
        perm = sel;
        perm.shuffle();
        for (int i = 0; i < k; i++) succ[sel[i]] = perm[i];
      end
      // Expected state after the parallel copy r -> succ[r].
      target = ref_v;
      for (int r = 0; r < 32; r++) target[succ[r]] = ref_v[r];
      gen_code(succ);

      total_insns += prog.size();
      if (prog.size() > max_insns) max_insns = prog.size();
      // Issue the shuffle code back to back.
      cycles = 0;
      foreach (prog[i]) begin
        de_valid = 1;
        de_inst  = encode(prog[i]);
        if (prog[i].is23) n23++; else n5++;
        #1;
        checks++;
        if (!de_permi || stall) begin
          failures++;
          $display("test %0d: permi not recognised or unexpected stall", t);
        end
        @(negedge clk);
        cycles++;
      end
      de_valid = 0;
      #1;
      checks++;
      if (cycles != prog.size()) begin failures++; $display("throughput not one permi per cycle"); end
      for (int l = 0; l < 32; l++) begin
        checks++;
        if (phys[map[l]] != target[l]) begin
          failures++;
          if (failures < 10) $display("test %0d: r%0d wrong after shuffle code", t, l);
        end
      end
      ref_v = target;
      @(negedge clk);
    end
    checks++;
    if (n5 == 0 || n23 == 0) begin failures++; $display("an instruction kind never generated"); end
    $display("%0d permutations, %0d permi5 + %0d permi23, %0d.%02d instructions each on average, at most %0d",
             NTEST, n5, n23, total_insns / NTEST, (100 * total_insns / NTEST) % 100, max_insns);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
