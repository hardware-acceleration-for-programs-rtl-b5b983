// permi_revert: keeps track of the permi instructions that have already
// rewritten the permutation table in Decode but are not yet committed, and
// undoes them when a trap annuls them.
//
// Because a permi takes effect in Decode (early committing) while the
// pipeline commits instructions only at its end, a trap (interrupt, I/O,
// scheduler) can annul permi instructions whose permutation is already in the
// table. This block runs a shadow pipeline of NSTAGES entries beside the
// stages that follow Decode (for a 7-stage LEON3-style pipeline: register
// access, execute, memory, exception). Each entry holds the moves of the permi
// in that stage, if any. When trap_i is high, all instructions past Decode are
// annulled: the shadow pipeline is frozen and, from the next cycle on, the
// inverse of each permi in it is sent to the table, youngest first, one per
// cycle, until none is left. busy_o is high during that walk (exactly one
// cycle per annulled permi) and must hold Decode. A trap with no permi in
// flight costs no cycle.
//
// Checking the later stages for permi instructions and applying their inverse
// permutations follows the original design; the shadow pipeline, the
// one-inverse-per-cycle sequencing and the single pipeline-wide hold are this
// design's choices.
//
// Ports:
//   hold_i       pipeline does not advance this cycle
//   issue_i      a permi leaves Decode this cycle (its moves in issue_perm_i);
//                only meaningful when hold_i, trap_i and busy_o are low
//   trap_i       annul every instruction past Decode
//   upd_valid_o  send upd_perm_o to the table, inverted
//   commit_o     a permi left the last tracked stage without being annulled
module permi_revert
  import permi_pkg::*;
#(
  parameter int unsigned NSTAGES = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  hold_i,
  input  logic  issue_i,
  input  perm_t issue_perm_i,
  input  logic  trap_i,
  output logic  busy_o,
  output logic  upd_valid_o,
  output perm_t upd_perm_o,
  output logic  commit_o
);

  logic  valid_q [NSTAGES];
  perm_t perm_q  [NSTAGES];
  logic  reverting_q;

  // Youngest (lowest-index) permi still in the shadow pipeline.
  localparam int unsigned PW = (NSTAGES > 1) ? $clog2(NSTAGES) : 1;

  logic          any_valid;
  logic          more_valid;   // another entry besides the picked one
  logic [PW-1:0] pick;
  always_comb begin
    any_valid  = 1'b0;
    more_valid = 1'b0;
    pick       = '0;
    for (int i = NSTAGES - 1; i >= 0; i--) begin
      if (valid_q[i]) begin
        more_valid = any_valid;
        any_valid  = 1'b1;
        pick       = PW'(i);
      end
    end
  end

  assign busy_o      = reverting_q;
  assign upd_valid_o = reverting_q;
  assign upd_perm_o  = perm_q[pick];
  assign commit_o    = !reverting_q && !trap_i && !hold_i && valid_q[NSTAGES-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      reverting_q <= 1'b0;
      for (int i = 0; i < int'(NSTAGES); i++) begin
        valid_q[i] <= 1'b0;
        perm_q[i]  <= '0;
      end
    end else if (reverting_q) begin
      valid_q[pick] <= 1'b0;
      if (!more_valid) reverting_q <= 1'b0;
    end else if (trap_i) begin
      reverting_q <= any_valid;
    end else if (!hold_i) begin
      valid_q[0] <= issue_i;
      perm_q[0]  <= issue_perm_i;
      for (int i = 1; i < int'(NSTAGES); i++) begin
        valid_q[i] <= valid_q[i-1];
        perm_q[i]  <= perm_q[i-1];
      end
    end
  end

  // A permi may not leave Decode while a reversion is under way.
  a_no_issue_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy_o |-> !(issue_i && !hold_i && !trap_i))
    else $error("permi issued during permutation reversion");

endmodule
