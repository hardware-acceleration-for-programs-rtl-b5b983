# Register-permutation unit for SSA shuffle code

When a compiler allocates registers directly on SSA form, the φ-functions that
survive allocation turn into *shuffle code*: a set of register-to-register
copies that must all happen at once (a parallel copy). On an ordinary RISC
machine a cyclic parallel copy costs several moves plus a scratch register.
This design adds two SPARC V8 instructions that do such a shuffle in one
instruction, provided it is a permutation of registers:

* `permi5 a b c d e` — rotate one cycle of up to five registers
  (`a→b→c→d→e→a`: `b` receives the old value of `a`, and so on);
* `permi23 a b c d e` — rotate two independent cycles at once, a swap
  `a↔b` and a cycle `c→d→e→c` of up to three registers.

Writing five registers in one cycle would need five register-file write
ports. The unit avoids that entirely: it never moves data. Instead it keeps a
**permutation table** in the Decode stage that maps each logical register
number to the physical register that currently holds its value. Every
register address an instruction uses is translated through this table, and a
`permi` only rewrites the table. Non-permutation copies (value duplication) are
left to ordinary move instructions emitted by the compiler.

## Instruction encoding

The instructions live in the SPARC format-2 opcode space: seven opcode bits,
leaving 25 bits for five 5-bit register numbers. The first register number is
split around the low opcode bits:

| bits | 31:28 | 27:25 | 24:22 | 21:20 | 19:15 | 14:10 | 9:5 | 4:0 |
|------|-------|-------|-------|-------|-------|-------|-----|-----|
| field| opcode| a[4:2]| 000   | a[1:0]| b     | c     | d   | e   |

Opcode `0001` is `permi5`, `0010` is `permi23` (the value for `permi23` is this
design's choice). A cycle shorter than its fields repeats its last register in
the fields that follow:

| instruction         | meaning                               |
|---------------------|---------------------------------------|
| `permi5 a b c d e`  | 5-cycle a→b→c→d→e→a                   |
| `permi5 a b c c c`  | 3-cycle a→b→c→a                       |
| `permi5 a b b b b`  | swap a↔b                              |
| `permi23 a b c d e` | swap a↔b and 3-cycle c→d→e→c          |
| `permi23 a b c d d` | swap a↔b and swap c↔d                 |
| `permi23 a a c d e` | only the 3-cycle (empty first cycle)  |

Registers inside one cycle must be distinct; the decoder does not check it.
A compiler covers a longer cycle by splitting it into several `permi5`
instructions: rotating the first five registers of a cycle
`c0→c1→…→c(n-1)→c0` leaves `c1…c4` correct and `c0` holding the value that
belongs to `c5`, so what remains is the cycle `c0→c5→…→c(n-1)→c0`, four
registers shorter. The short remainders (2- and 3-cycles) are paired up into
`permi23` instructions; a 3-cycle without partner can be split into two swaps
`c0↔c1` followed by `c0↔c2`.

## Inside the unit

```
              de_inst_i ──► permi_decode ──► move list ──┐
                                                         ▼
 de_raddr_i ──────────────────────────────► perm_table ──► de_paddr_o ──► register file
                                                ▲  (32 x 5-bit map)
                       inverse move list        │
 hold_i, trap_i ──► permi_revert ───────────────┘
                   (shadow of RA, EX, ME, XC)  ──► stall_o, commit_o
```

* **`permi_decode`** turns an instruction word into a list of up to five
  *moves* `{en, src, dst}`, meaning "`dst` receives the value `src` had
  before the instruction". A cycle of n registers becomes n moves; all moves
  of one instruction act at the same time.
* **`perm_table`** holds `map[logical] = physical`. Reads are combinational
  (three ports: rs1, rs2, rd). An update sets `map[dst] ← map[src]` for every
  enabled move, all from the old contents; the inverse update sets
  `map[src] ← map[dst]`. Reset gives the identity mapping.
* **`permi_revert`** keeps a copy of the move list of every `permi` in the
  stages after Decode and undoes them after a trap (next section).
* **`permi_unit`** is the top level that wires the three together.

### Early commit

A `permi` changes the table at the clock edge on which it leaves Decode. The
very next instruction is translated with the new mapping, so back-to-back
permutations and an instruction that reads a just-permuted register need no
interlock. Later pipeline stages and the forwarding paths only ever see
physical register numbers, so they are unchanged; the `permi` itself travels
down the pipeline as a no-op (`de_permi_o` tells the host pipeline to treat
it so).

### Undoing permutations after a trap

Early commit has a price. The processor commits instructions only at the end
of its pipeline, and a trap (an interrupt, an I/O event, the scheduler)
annuls every instruction that has not reached that point. An annulled `permi`
has, however, already rewritten the table. Ordinary instructions are simply
annulled; for `permi` instructions the table must be put back.

`permi_revert` runs a shadow pipeline of `NSTAGES` entries (default 4: register
access, execute, memory, exception of a 7-stage LEON3-style pipeline). Each
entry holds the move list of the `permi` in that stage, if any; the entries
shift with the pipeline and are dropped when the instruction leaves the last
stage (`commit_o`). When `trap_i` is raised:

1. the shadow pipeline freezes; the `permi` in Decode, if any, is not applied;
2. from the next cycle on, the youngest remaining entry is sent to the table
   as an inverse update and removed, one per cycle;
3. `stall_o` is high for exactly as many cycles as there were annulled
   `permi` instructions and holds Decode; a trap with none in flight costs
   nothing.

Undoing youngest first walks the table back through the exact sequence of
states it went through, so the table ends in the committed state even when the
annulled permutations overlap.

## Interface and timing of `permi_unit`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `de_valid_i` | in | 1 | an instruction is in Decode |
| `de_inst_i` | in | 32 | its instruction word |
| `de_raddr_i` | in | 3 × 5 | its logical register numbers |
| `de_paddr_o` | out | 3 × 5 | translated numbers, same cycle |
| `de_permi_o` | out | 1 | the instruction in Decode is a `permi` |
| `hold_i` | in | 1 | the whole pipeline holds this cycle |
| `trap_i` | in | 1 | annul everything past Decode |
| `stall_o` | out | 1 | reversion under way; keep Decode held |
| `commit_o` | out | 1 | a `permi` left the pipeline un-annulled |
| `map_o` | out | 32 × 5 | current mapping (observation) |

A `permi` is applied when `de_valid_i`, not `hold_i`, not `trap_i` and not
`stall_o`. Throughput is one `permi` per cycle; there is no latency visible to
following instructions. `trap_i` is ignored while `stall_o` is high.

Parameters: `NREAD` (translation ports, 3) and `NSTAGES` (stages tracked after
Decode, 4). The register count (32) and the five moves per instruction are
fixed by the instruction format and live in `permi_pkg`.

## How far it follows the source design, and what is assumed

Taken from the design as published: the two instructions and their cycle
sizes, the 32-register, 5-bit field layout with the split first field, the
permutation table in Decode with translation of every register access,
applying the permutation in Decode, no change to forwarding, and reversing
annulled permutations by applying their inverses after a trap.

Choices of this implementation, where the original design leaves them open:

* the opcode of `permi23` and the padding rule for short cycles;
* three translation ports, the identity reset, and a synchronous reset;
* four tracked stages, one inverse per cycle, youngest first, with Decode
  stalled meanwhile; a single hold signal for the whole pipeline;
* the table maps the 32 register numbers an instruction names; how it
  combines with SPARC register windows is left to the host pipeline.

Not included: the host processor (pipeline, register file, caches, trap
logic) into which the unit is built, and the compiler that produces the
instructions. The original prototype ran on a LEON3 processor on a Virtex-5
FPGA at 80 MHz; the unit here has not been timed on any device.

## Files

| file | contents |
|------|----------|
| `rtl/permi_pkg.sv` | sizes, opcodes, move and permutation types |
| `rtl/permi_decode.sv` | instruction decoder |
| `rtl/perm_table.sv` | permutation table |
| `rtl/permi_revert.sv` | shadow pipeline and trap reversion |
| `rtl/permi_unit.sv` | top level |
| `tb/permi_tb_pkg.sv` | reference model: random permis, encoder, register-value semantics |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench is self-checking against an independent reference model that
works on register *values*, not on move lists, and prints
`TB_RESULT checks=N failures=M`.

* `tb_permi_decode` — 2500 random instruction words, every cycle size of both
  instructions and non-`permi` words.
* `tb_perm_table` — random forward and inverse updates against a register-file
  model; checks that an update appears exactly one cycle later.
* `tb_permi_revert` — random issue, hold and trap; checks the order and the
  number of inverse updates and the `commit_o` timing.
* `tb_permi_unit` — end to end at default parameters: 20,000 cycles of a random
  instruction stream with holds and traps; the translated reads and the full
  mapping are compared every cycle with the speculative register state, and
  after each reversion with the committed one. It counts every mechanism
  (each cycle size, back-to-back permis, a permi held in Decode, traps with
  none, one and several permis in flight, reversion cycles, commits) and fails
  if one never happens. Its first instruction is the worked example
  `permi5 r5 r9 r7 r6 r8`, whose result is also checked against hand-computed
  register values.
* `tb_shuffle_code` — compiler-style use: builds 400 random register
  permutations, turns each into `permi5`/`permi23` instructions with the greedy
  scheme described above (cut long cycles into five-register pieces, pair the
  2- and 3-cycle leftovers into `permi23`), issues them back to back and checks
  that the registers end up as the parallel copy requires, at one instruction
  per cycle.

To run one with Verilator (from the folder that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/permi_pkg.sv tb/permi_tb_pkg.sv tb/tb_permi_unit.sv \
    --top-module tb_permi_unit -o sim
./obj_dir/sim
```
