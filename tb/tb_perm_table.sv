// tb_perm_table: checks the permutation table. A register file model holds a
// distinct value in every physical register; the logical view of register l
// is the value at the physical address the table returns for l. Random permi
// move lists (built directly from random cycles) are applied forward and, now
// and then, inverted; after each update the logical view seen through the
// read ports and through map_o must equal the reference array, which is
// permuted by the reference model. Also checks reset to identity, that an
// update is visible exactly one cycle later, and that no update happens
// without upd_valid_i.
module tb_perm_table;
  import permi_pkg::*;
  import permi_tb_pkg::*;

  localparam int unsigned NREAD = 3;

  logic      clk = 0;
  logic      rst_n;
  reg_addr_t rd_log  [NREAD];
  reg_addr_t rd_phys [NREAD];
  logic      upd_valid, upd_inverse;
  perm_t     upd_perm;
  reg_addr_t map [NREGS];

  int checks = 0, failures = 0;
  int n_fwd = 0, n_inv = 0;

  perm_table #(.NREAD(NREAD)) dut (
    .clk(clk), .rst_n(rst_n), .rd_log_i(rd_log), .rd_phys_o(rd_phys),
    .upd_valid_i(upd_valid), .upd_inverse_i(upd_inverse), .upd_perm_i(upd_perm),
    .map_o(map)
  );

  always #20 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Move list of a permi built from its cycles (independent of the decoder).
  function automatic perm_t moves_of(permi_t p);
    perm_t m = '0;
    int k = 0;
    if (p.a.n >= 2)
      for (int i = 0; i < int'(p.a.n); i++) begin
        m[k] = '{en: 1'b1, src: p.a.r[i], dst: p.a.r[(i + 1) % int'(p.a.n)]};
        k++;
      end
    if (p.is23 && p.b.n >= 2)
      for (int i = 0; i < int'(p.b.n); i++) begin
        m[k] = '{en: 1'b1, src: p.b.r[i], dst: p.b.r[(i + 1) % int'(p.b.n)]};
        k++;
      end
    return m;
  endfunction

  regs_t phys;    // physical register file contents
  regs_t ref_v;   // logical register values expected

  task automatic check_view(string what);
    for (int l = 0; l < 32; l++) begin
      checks++;
      if (phys[map[l]] != ref_v[l]) begin
        failures++;
        $display("%s: logical r%0d holds %0d, expected %0d", what, l, phys[map[l]], ref_v[l]);
      end
    end
    for (int t = 0; t < 4; t++) begin
      for (int p = 0; p < int'(NREAD); p++) rd_log[p] = reg_addr_t'($urandom_range(0, 31));
      #1;
      for (int p = 0; p < int'(NREAD); p++) begin
        checks++;
        if (phys[rd_phys[p]] != ref_v[rd_log[p]]) begin
          failures++;
          $display("%s: read port %0d r%0d wrong", what, p, rd_log[p]);
        end
      end
    end
  endtask

  initial begin
    permi_t hist [$];
    permi_t p;
    for (int i = 0; i < 32; i++) begin phys[i] = 5000 + 7 * i; ref_v[i] = phys[i]; end
    for (int p2 = 0; p2 < int'(NREAD); p2++) rd_log[p2] = '0;
    upd_valid = 0; upd_inverse = 0; upd_perm = '0;
    rst_n = 0;
    @(posedge clk); @(posedge clk);
    #1 rst_n = 1;
    for (int l = 0; l < 32; l++) begin
      checks++;
      if (map[l] != reg_addr_t'(l)) begin failures++; $display("reset map[%0d]=%0d", l, map[l]); end
    end
    for (int t = 0; t < 1500; t++) begin
      automatic bit inv = (hist.size() > 0) && ($urandom_range(0, 3) == 0);
      @(negedge clk);
      if (inv) p = hist.pop_back();
      else     p = rand_permi();
      upd_perm    = moves_of(p);
      upd_inverse = inv;
      upd_valid   = 1;
      // Before the edge the old mapping must still be visible.
      #1 check_view("before update");
      @(posedge clk);
      #1 upd_valid = 0;
      if (inv) begin
        ref_v = apply_permi(ref_v, invert(p));
        n_inv++;
      end else begin
        ref_v = apply_permi(ref_v, p);
        hist.push_back(p);
        n_fwd++;
      end
      check_view("after update");
      // An idle cycle must not change anything.
      if ($urandom_range(0, 3) == 0) begin
        @(negedge clk);
        upd_perm = moves_of(rand_permi());
        @(posedge clk);
        #1 check_view("idle");
      end
    end
    checks++;
    if (n_fwd == 0 || n_inv == 0) begin failures++; $display("forward or inverse never used"); end
    $display("forward updates %0d, inverse updates %0d", n_fwd, n_inv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
