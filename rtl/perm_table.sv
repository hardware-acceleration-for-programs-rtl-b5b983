// perm_table: the permutation table of the Decode stage, mapping each logical
// register number to the physical register that currently holds its value.
//
// Every register address an instruction uses is passed through the table in
// Decode (NREAD combinational read ports), so the register file and the
// forwarding logic only ever see physical addresses. A permi instruction is
// executed by rewriting the table instead of moving data: a move {src,dst}
// sets map[dst] to the old map[src], all moves of one update at once. With
// upd_inverse_i set the same moves are undone (map[src] gets the old
// map[dst]), which is what trap recovery needs.
//
// The table itself and its role follow the original design; the number
// of read ports (rs1, rs2, rd) and the reset to the identity mapping are this
// design's choices.
//
// Timing: reads are combinational; an update is written at the rising clock
// edge where upd_valid_i is high and is seen by reads in the next cycle.
// Reset (active low, synchronous) restores the identity mapping.
module perm_table
  import permi_pkg::*;
#(
  parameter int unsigned NREAD = 3
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  reg_addr_t             rd_log_i  [NREAD],
  output reg_addr_t             rd_phys_o [NREAD],
  input  logic                  upd_valid_i,
  input  logic                  upd_inverse_i,
  input  perm_t                 upd_perm_i,
  output reg_addr_t             map_o     [NREGS]
);

  reg_addr_t map_q [NREGS];
  reg_addr_t map_d [NREGS];

  always_comb begin
    for (int p = 0; p < int'(NREAD); p++)
      rd_phys_o[p] = map_q[rd_log_i[p]];
  end

  always_comb begin
    for (int j = 0; j < int'(NREGS); j++) begin
      map_d[j] = map_q[j];
      for (int k = NMOVES - 1; k >= 0; k--) begin
        if (upd_perm_i[k].en) begin
          if (!upd_inverse_i && upd_perm_i[k].dst == reg_addr_t'(j))
            map_d[j] = map_q[upd_perm_i[k].src];
          if (upd_inverse_i && upd_perm_i[k].src == reg_addr_t'(j))
            map_d[j] = map_q[upd_perm_i[k].dst];
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < int'(NREGS); j++) map_q[j] <= reg_addr_t'(j);
    end else if (upd_valid_i) begin
      map_q <= map_d;
    end
  end

  assign map_o = map_q;

endmodule
