// permi_tb_pkg: reference model shared by the testbenches of the register
// permutation extension. It builds random permi instructions (as register
// cycles), encodes them into instruction words, and applies them to an array
// of register values the way the instructions are defined: every register of
// a cycle receives the value of its predecessor, all at once. Nothing here
// uses the RTL's move lists, so the testbenches check the RTL against an
// independent model.
package permi_tb_pkg;

  typedef int unsigned regs_t [32];

  typedef struct {
    int unsigned n;          // registers in the cycle (1 = empty)
    logic [4:0]  r [5];
  } cyc_t;

  typedef struct {
    bit          is23;       // 0: permi5 (cycle a), 1: permi23 (cycles a, b)
    cyc_t        a;
    cyc_t        b;
  } permi_t;

  // Random permi: distinct registers from 1..31, permi5 of 2..5 registers or
  // permi23 of a 2-cycle (sometimes empty) and a cycle of 2..3 registers.
  function automatic permi_t rand_permi();
    permi_t p;
    logic [4:0] pool [31];
    for (int i = 0; i < 31; i++) pool[i] = 5'(i + 1);
    for (int i = 0; i < 6; i++) begin
      int j = i + int'($urandom_range(0, 30 - i));
      logic [4:0] t = pool[i];
      pool[i] = pool[j];
      pool[j] = t;
    end
    p.is23 = $urandom_range(0, 1) == 1;
    if (!p.is23) begin
      p.a.n = $urandom_range(2, 5);
      for (int i = 0; i < 5; i++) p.a.r[i] = pool[i];
      p.b.n = 1;
      for (int i = 0; i < 5; i++) p.b.r[i] = '0;
    end else begin
      p.a.n = ($urandom_range(0, 4) == 0) ? 1 : 2;
      p.a.r[0] = pool[0]; p.a.r[1] = pool[1];
      p.b.n = $urandom_range(2, 3);
      p.b.r[0] = pool[2]; p.b.r[1] = pool[3]; p.b.r[2] = pool[4];
      for (int i = 2; i < 5; i++) p.a.r[i] = '0;
      for (int i = 3; i < 5; i++) p.b.r[i] = '0;
    end
    return p;
  endfunction

  // Instruction word: [31:28] op-hi, [27:25] a[4:2], [24:22] 000,
  // [21:20] a[1:0], then b, c, d, e; short cycles padded by repeating the
  // cycle's last register.
  function automatic logic [31:0] encode(permi_t p);
    logic [4:0] f [5];
    logic [3:0] hi;
    if (!p.is23) begin
      hi = 4'b0001;
      for (int i = 0; i < 5; i++) f[i] = (i < int'(p.a.n)) ? p.a.r[i] : p.a.r[p.a.n-1];
    end else begin
      hi = 4'b0010;
      f[0] = p.a.r[0];
      f[1] = (p.a.n == 2) ? p.a.r[1] : p.a.r[0];
      f[2] = p.b.r[0];
      f[3] = (p.b.n >= 2) ? p.b.r[1] : p.b.r[0];
      f[4] = (p.b.n == 3) ? p.b.r[2] : f[3];
    end
    return {hi, f[0][4:2], 3'b000, f[0][1:0], f[1], f[2], f[3], f[4]};
  endfunction

  // A word that is not a permi instruction.
  function automatic logic [31:0] rand_other();
    logic [31:0] w = $urandom;
    if (w[24:22] == 3'b000 && (w[31:28] == 4'b0001 || w[31:28] == 4'b0010))
      w[22] = 1'b1;
    return w;
  endfunction

  // The inverse of a permi: every cycle walked the other way round.
  function automatic permi_t invert(permi_t p);
    permi_t q = p;
    for (int i = 0; i < int'(p.a.n); i++) q.a.r[i] = p.a.r[p.a.n - 1 - i];
    for (int i = 0; i < int'(p.b.n); i++) q.b.r[i] = p.b.r[p.b.n - 1 - i];
    return q;
  endfunction

  function automatic regs_t apply_cycle(regs_t v, cyc_t c);
    regs_t o = v;
    for (int i = 0; i < int'(c.n); i++)
      o[c.r[(i + 1) % int'(c.n)]] = v[c.r[i]];
    return o;
  endfunction

  function automatic regs_t apply_permi(regs_t v, permi_t p);
    regs_t o = apply_cycle(v, p.a);
    if (p.is23) o = apply_cycle(o, p.b);
    return o;
  endfunction

endpackage
