// permi_pkg: types and constants shared by the register-permutation extension.
//
// A permi instruction is represented inside the hardware as a list of up to
// five register moves. A move {en, src, dst} means "after the instruction,
// logical register dst holds the value logical register src held before it".
// All moves of one instruction take effect at the same time, so a cycle
// a->b->c->a becomes the moves (a,b), (b,c), (c,a).
//
// Instruction format (SPARC V8 format-2 space, 7 opcode bits, five 5-bit
// register fields, the first split in two):
//   [31:28] opcode high   [27:25] a[4:2]   [24:22] opcode low (000)
//   [21:20] a[1:0]        [19:15] b        [14:10] c   [9:5] d   [4:0] e
// The field layout and opcode 0001/000 follow the original instruction-set extension;
// which opcode value tells permi23 from permi5 is this design's choice
// (0001 = permi5, 0010 = permi23).
package permi_pkg;

  localparam int unsigned NREGS  = 32;   // integer registers visible to an instruction
  localparam int unsigned AW     = 5;    // bits of a register number
  localparam int unsigned NMOVES = 5;    // most moves one permi can perform

  localparam logic [3:0] OPC_HI_PERMI5  = 4'b0001;
  localparam logic [3:0] OPC_HI_PERMI23 = 4'b0010;
  localparam logic [2:0] OPC_LO_PERMI   = 3'b000;

  typedef logic [AW-1:0] reg_addr_t;

  typedef struct packed {
    logic      en;
    reg_addr_t src;
    reg_addr_t dst;
  } move_t;

  typedef move_t [NMOVES-1:0] perm_t;

  typedef enum logic [1:0] {
    PK_NONE   = 2'd0,
    PK_PERMI5 = 2'd1,
    PK_PERMI23 = 2'd2
  } permi_kind_e;

endpackage
