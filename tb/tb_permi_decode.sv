// tb_permi_decode: checks the permi decoder against the reference model.
// Random permi5/permi23 instructions of every cycle size are decoded; the
// decoder's move list is applied to a register array (all moves at once) and
// compared with the reference result of the instruction. Non-permi words must
// decode to PK_NONE with no move enabled.
module tb_permi_decode;
  import permi_pkg::*;
  import permi_tb_pkg::*;

  logic [31:0] inst;
  permi_kind_e kind;
  perm_t       perm;
  int checks = 0, failures = 0;
  int seen_len5 [6];
  int seen23_a0 = 0, seen23_b2 = 0, seen23_b3 = 0;

  permi_decode dut (.inst_i(inst), .kind_o(kind), .perm_o(perm));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic regs_t apply_moves(regs_t v, perm_t m);
    regs_t o = v;
    for (int k = 0; k < int'(NMOVES); k++)
      if (m[k].en) o[m[k].dst] = v[m[k].src];
    return o;
  endfunction

  initial begin
    regs_t base, got, exp;
    permi_t p;
    for (int i = 0; i < 32; i++) base[i] = 1000 + i;
    for (int i = 0; i < 6; i++) seen_len5[i] = 0;
    for (int t = 0; t < 2000; t++) begin
      p = rand_permi();
      inst = encode(p);
      #1;
      checks++;
      if (kind != (p.is23 ? PK_PERMI23 : PK_PERMI5)) begin
        failures++;
        $display("kind mismatch inst=%h kind=%0d", inst, kind);
      end
      got = apply_moves(base, perm);
      exp = apply_permi(base, p);
      checks++;
      if (got != exp) begin
        failures++;
        $display("moves mismatch inst=%h", inst);
      end
      if (!p.is23) seen_len5[p.a.n]++;
      else begin
        if (p.a.n == 1) seen23_a0++;
        if (p.b.n == 2) seen23_b2++;
        if (p.b.n == 3) seen23_b3++;
      end
    end
    for (int t = 0; t < 500; t++) begin
      inst = rand_other();
      #1;
      checks++;
      if (kind != PK_NONE || perm != '0) begin
        failures++;
        $display("non-permi decoded as permi inst=%h", inst);
      end
    end
    for (int n = 2; n <= 5; n++) begin
      checks++;
      if (seen_len5[n] == 0) begin failures++; $display("permi5 length %0d never tested", n); end
    end
    checks++;
    if (seen23_a0 == 0 || seen23_b2 == 0 || seen23_b3 == 0) begin
      failures++; $display("a permi23 form was never tested");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
