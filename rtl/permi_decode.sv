// permi_decode: recognises the permi5 and permi23 instructions and turns their
// register fields into the list of moves the permutation table applies.
//
// permi5 a b c d e   one cyclic permutation a->b->c->d->e->a (value of a goes
//                    to b, and so on). A shorter cycle of n registers is
//                    written by repeating its last register in the fields
//                    that follow, e.g. "a b c c c" is the 3-cycle a->b->c->a
//                    and "a b b b b" swaps a and b.
// permi23 a b c d e  two independent cycles: a->b->a and c->d->e->c; the
//                    second one is a swap c<->d when e equals d, and either
//                    cycle is empty when its second register repeats its first.
// The two instructions, their cycle sizes and the field layout follow the
// original instruction-set extension; the padding rule for short cycles is this
// design's choice. Registers within one cycle are expected to be distinct
// (the code generator only emits cycles of distinct registers).
//
// Purely combinational; used in the Decode stage. Ports:
//   inst_i  instruction word in Decode
//   kind_o  PK_NONE, PK_PERMI5 or PK_PERMI23
//   perm_o  moves (all disabled when kind_o is PK_NONE)
module permi_decode
  import permi_pkg::*;
(
  input  logic [31:0]  inst_i,
  output permi_kind_e  kind_o,
  output perm_t        perm_o
);

  reg_addr_t r [5];

  always_comb begin
    r[0] = {inst_i[27:25], inst_i[21:20]};
    r[1] = inst_i[19:15];
    r[2] = inst_i[14:10];
    r[3] = inst_i[9:5];
    r[4] = inst_i[4:0];
  end

  always_comb begin
    if (inst_i[24:22] == OPC_LO_PERMI && inst_i[31:28] == OPC_HI_PERMI5)
      kind_o = PK_PERMI5;
    else if (inst_i[24:22] == OPC_LO_PERMI && inst_i[31:28] == OPC_HI_PERMI23)
      kind_o = PK_PERMI23;
    else
      kind_o = PK_NONE;
  end

  // Length of the permi5 cycle: first position that repeats its predecessor.
  int unsigned len5;
  always_comb begin
    len5 = 5;
    for (int i = 4; i >= 1; i--)
      if (r[i] == r[i-1]) len5 = i;
  end

  // Length of the second permi23 cycle (1, 2 or 3 registers).
  int unsigned len3;
  always_comb begin
    if (r[3] == r[2])      len3 = 1;
    else if (r[4] == r[3]) len3 = 2;
    else                   len3 = 3;
  end

  always_comb begin
    perm_o = '0;
    unique case (kind_o)
      PK_PERMI5: begin
        if (len5 >= 2) begin
          for (int i = 0; i < 5; i++) begin
            if (i < int'(len5)) begin
              perm_o[i].en  = 1'b1;
              perm_o[i].src = r[i];
              perm_o[i].dst = (i == int'(len5) - 1) ? r[0] : r[i+1];
            end
          end
        end
      end
      PK_PERMI23: begin
        if (r[1] != r[0]) begin
          perm_o[0] = '{en: 1'b1, src: r[0], dst: r[1]};
          perm_o[1] = '{en: 1'b1, src: r[1], dst: r[0]};
        end
        if (len3 == 2) begin
          perm_o[2] = '{en: 1'b1, src: r[2], dst: r[3]};
          perm_o[3] = '{en: 1'b1, src: r[3], dst: r[2]};
        end else if (len3 == 3) begin
          perm_o[2] = '{en: 1'b1, src: r[2], dst: r[3]};
          perm_o[3] = '{en: 1'b1, src: r[3], dst: r[4]};
          perm_o[4] = '{en: 1'b1, src: r[4], dst: r[2]};
        end
      end
      default: ;
    endcase
  end

endmodule
