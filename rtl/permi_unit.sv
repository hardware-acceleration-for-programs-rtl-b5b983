// permi_unit: register-permutation extension for the Decode stage of an
// in-order SPARC V8 pipeline (top level).
//
// Shuffle code left by SSA-based register allocation is a parallel copy that,
// restricted to permutations, can be done in one instruction: permi5 rotates
// one cycle of up to five registers, permi23 rotates a 2-cycle and an
// independent cycle of up to three. Instead of moving data through the
// register file (which would need many write ports), this unit renames:
// every logical register address of the instruction in Decode is translated
// through the permutation table, and a permi only rewrites the table. The
// permutation is applied while the permi is in Decode, so later instructions
// see it at once and the forwarding logic, which works on physical
// addresses, needs no change. The permi itself then flows down the pipeline
// as a no-op. If a trap annuls permi instructions that have already changed
// the table, permi_revert replays their inverses into the table, youngest
// first, holding Decode meanwhile.
//
// Ports (pipeline side):
//   de_valid_i   an instruction is in Decode
//   de_inst_i    its instruction word
//   de_raddr_i   its logical register numbers (rs1, rs2, rd)
//   de_paddr_o   the translated (physical) numbers, combinational
//   de_permi_o   the instruction in Decode is a permi (execute as no-op)
//   hold_i       the pipeline does not advance this cycle
//   trap_i       a trap annuls every instruction past Decode this cycle
//   stall_o      reversion under way: Decode must not advance
//   commit_o     a permi reached the end of the pipeline un-annulled
//   map_o        current logical-to-physical mapping (observation)
// Timing: a permi in Decode updates the table at the clock edge on which it
// leaves Decode (valid, not held, no trap, no stall); a reversion takes one
// cycle per annulled permi, starting the cycle after trap_i.
module permi_unit
  import permi_pkg::*;
#(
  parameter int unsigned NREAD   = 3,
  parameter int unsigned NSTAGES = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       de_valid_i,
  input  logic [31:0] de_inst_i,
  input  reg_addr_t  de_raddr_i [NREAD],
  output reg_addr_t  de_paddr_o [NREAD],
  output logic       de_permi_o,
  input  logic       hold_i,
  input  logic       trap_i,
  output logic       stall_o,
  output logic       commit_o,
  output reg_addr_t  map_o [NREGS]
);

  permi_kind_e kind;
  perm_t       dec_perm;
  logic        issue;
  logic        rev_busy;
  logic        rev_upd;
  perm_t       rev_perm;
  logic        tbl_upd;
  logic        tbl_inv;
  perm_t       tbl_perm;

  permi_decode u_decode (
    .inst_i (de_inst_i),
    .kind_o (kind),
    .perm_o (dec_perm)
  );

  assign de_permi_o = de_valid_i && (kind != PK_NONE);
  assign issue      = de_permi_o && !hold_i && !trap_i && !rev_busy;

  permi_revert #(.NSTAGES(NSTAGES)) u_revert (
    .clk          (clk),
    .rst_n        (rst_n),
    .hold_i       (hold_i),
    .issue_i      (issue),
    .issue_perm_i (dec_perm),
    .trap_i       (trap_i),
    .busy_o       (rev_busy),
    .upd_valid_o  (rev_upd),
    .upd_perm_o   (rev_perm),
    .commit_o     (commit_o)
  );

  always_comb begin
    tbl_upd  = rev_upd || issue;
    tbl_inv  = rev_upd;
    tbl_perm = rev_upd ? rev_perm : dec_perm;
  end

  perm_table #(.NREAD(NREAD)) u_table (
    .clk           (clk),
    .rst_n         (rst_n),
    .rd_log_i      (de_raddr_i),
    .rd_phys_o     (de_paddr_o),
    .upd_valid_i   (tbl_upd),
    .upd_inverse_i (tbl_inv),
    .upd_perm_i    (tbl_perm),
    .map_o         (map_o)
  );

  assign stall_o = rev_busy;

endmodule
