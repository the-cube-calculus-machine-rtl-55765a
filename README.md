# Cube Calculus Machine (CCM)

The CCM is a co-processor for *cube calculus*. This algebra is the usual way logic
minimisers and verifiers represent Boolean and multiple-valued functions: a function
is a set of cubes (product terms), and algorithms are built from operations on pairs
of cubes: intersection, supercube, sharp, consensus, complement, distance.

Software processes a cube one literal at a time. For operations that produce one
cube per literal, most of the cubes it builds turn out to hold a contradiction and
are thrown away. The CCM does this inner loop in hardware. Its processing unit is a
linear array of small automata, one per two bits of the cube. A token passes along
the array and stops at the next literal that has to produce a cube. One pass makes
one useful cube, and no contradictory cube is ever built.

This repository holds synthesizable SystemVerilog for one CCM chip: the cell array,
its control unit, a register file and a host bus interface. It also holds a
self-checking testbench for every block.

## Cubes in positional notation

Each variable takes as many bits as it has values. Bit *k* is 1 when value *k* is
allowed. A binary variable uses two bits: `01` is x, `10` is x̄, `11` is the don't
care X and `00` is a contradiction (an empty literal). A 6-valued variable uses six
bits, so `011100` is the literal U^{1,2,3}. Every variable must have an even number
of values, because the hardware works in two-bit units.

A cube word is written leftmost variable first. In the RTL, the first variable is in
the most significant bits. The default machine has 16 cells, which gives 32-bit
cubes: up to 16 binary variables, 8 four-valued ones, or any mix.

Operations fall into three groups:

| group | result | per literal *i* | examples |
|---|---|---|---|
| 1 simple combinational | one cube | `C_i = f(A_i, B_i)` | intersection, supercube |
| 2 complex combinational | one cube | `C_i = rel(A_i,B_i) ? f1 : f2` | binary consensus |
| 3 sequential | one cube per *specific* literal *j* | left of *j*: `aft(A,B)`; at *j*: `act(A,B)`; right of *j*: `bef(A,B)` | sharp, disjoint sharp, consensus, complement |

A literal is *specific* when a relation `rel(A_j, B_j)` holds for it. Examples of
such relations are "A_j is not X" for the complement and "A_j is not a subset of
B_j" for sharp. A cube with an empty literal is a contradiction and is never stored.

## The iterative cell (IT)

`ccm_it` handles two bits of each operand. A literal of *v* values spans *v*/2 cells.
A cell has three parts.

**IDENTIFY** (`ccm_identify`) decides whether the cell's literal is specific.
- Each cell evaluates the relation on its own two bits (RELATION).
- A multi-cell literal needs the relation from all of its cells. Two chains collect it:
  - LEFT runs left to right. It is the AND of RELATION from the literal's first cell up to this one.
  - RIGHT runs right to left. It is the AND from this cell to the literal's last cell.
- `LEFT_in & RELATION & RIGHT_in` is the relation for the whole literal. VARIABLE is
  that value, or its inverse when the micro-instruction's `pol` bit is set. VARIABLE
  has the same value in every cell of a literal.
- A third chain, COUNT, adds one at the last cell of each specific literal. At the
  right end it gives the number of resultant cubes. With the relation "disjoint" it
  gives the distance of the two cubes.

**The automaton** (`ccm_afsm`) records where the cell lies relative to the literal
being processed:

```
            INITIALIZE                ACTIVATE_in & VARIABLE            REQUEST
 no_race ─────────────► bef_act ─────────────────────────────► act ─────────────► aft_act
 (Water bit set: always no_race)
```

- ACTIVATE is the token. It moves left to right.
- Cells in `aft_act` pass it on. So do cells of non-specific literals.
- A specific cell passes the token only to the other cells of its own literal. The
  token therefore stops at the end of the leftmost specific literal that is still
  in `bef_act`. Every cell of that literal becomes `act` together.

**Output.** The cell applies the set function that belongs to its state: `bef_fn`,
`act_fn` or `aft_fn`. In combinational operations it applies
`VARIABLE ? act_fn : bef_fn` instead. The result goes into its 2-bit C register when
the control unit raises `latch`. Each set function is a 4-bit truth table over one A
bit and one B bit, indexed `{a,b}`: `4'b1000` is AND, `4'b1110` is OR, `4'b0011` is
NOT A, `4'b0100` is A AND NOT B.

**Contradiction detection.** A further left-to-right chain ANDs "this cell's new C
is `00`" across each literal. It raises `contra` if any literal of the new cube is
empty. The control unit then discards the cube.

**Water (W).** Each cell has a Water bit. When it is set, the cell becomes
transparent:
- it forwards every chain signal unchanged, M bit included;
- it outputs C = `11`;
- its automaton stays in `no_race`.

Spare cells of a wider machine are switched off this way. A faulty cell can be
removed the same way. Setting W on every cell but one makes that cell's chain
signals visible at the array boundary, which is how a single cell is tested.

`ccm_ilu` chains `NIT` cells. Cell IT[1] takes the top two bits of the cube.

### Literal boundaries: the M register

M has one bit per cell, plus one bit for the virtual cell IT[0] on the left and one
for IT[n+1] on the right. A new literal starts wherever the M bit changes, so
consecutive literals simply alternate 0 and 1. Here is the 6-cell example used in
the tests, with variables U (6 values), V (binary) and Z (4 values):

```
M   = 1 | 0 0 0 | 1 | 0 0 | 1
      IT0   U     V   Z    IT7
```

The host writes M with IT[0] in the most significant bit. A transparent cell's M bit
is ignored, because the chain carries the M bit of the last cell that is not
transparent.

## One sequential operation, cycle by cycle

The control unit (`ccm_cu`) acts as IT[0] and IT[n+1]. It drives the global signals
through these phases, one clock cycle each:

| phase | global signals | what happens |
|---|---|---|
| LOAD | – | operands A, B copied from the register file into the operand registers |
| IDENT | – | VARIABLE settles in all cells; COUNT, LEFT[n], RIGHT[1] go to Status |
| INIT | INITIALIZE | all cells go to `bef_act` |
| ACT | ACTIVATE[0] | the token ripples; if ACTIVATE[n] returns 1, the operation is over |
| LATCH | latch | C registers loaded; contradiction sampled |
| REQ | REQUEST, store | active cells go to `aft_act`; the cube is written unless contradictory; back to ACT |

- With *k* specific literals, the CU is busy for **3k + 5 cycles**, and one cube
  comes out every three cycles whatever the cube width.
- A combinational operation takes 5 cycles: LOAD, IDENT, CLATCH, CSTORE, DONE.
- A COUNT-only operation (distance) takes 3.

ACTIVATE[0] and REQUEST are never high together. The cells' assertions check this.

Worked example: the complement of A = U^{1,2,3} Z^{1,2}.
- Only U and Z are specific. V is X.
- The first pass yields s = U^{0,4,5} (`100011 11 1111`).
- The second pass yields S = U^X V^X Z^{0,3} (`111111 11 1001`).
- The third ACTIVATE passes through to the CU and ends the operation.

## Programming the chip

The bus interface unit (`ccm_biu`) is a simple register slave. The host holds
`bus_req` and its address and data until `bus_ack`. A write happens on the edge where
`bus_ack` is high. Read data is valid while `bus_ack` is high.

| address | register | content |
|---|---|---|
| `0x00–0x1F` | register file | cube words |
| `0x20` | I | `ccm_pkg::instr_t`: opcode [7:4], src_a [12:8], src_b [17:13], dst [22:18], LEFT[0] [23], RIGHT[n+1] [24]. A write starts the operation. |
| `0x21` | I1 | raw micro-instruction (`micro_t`) used by opcode `OP_RAW` |
| `0x22` | M | multi-value register, NIT+2 bits, IT[0] in the MSB |
| `0x23` | W | Water bits, IT[1] in the MSB |
| `0x24` | D | mode: 0 stand-alone, 1 first, 2 internal, 3 last of a chain |
| `0x25` | S | status (read only): busy [0], done [1], no_result [2], LEFT[n] [3], RIGHT[1] [4], number of cubes stored [15:8], COUNT [23:16] |

While an operation runs, the BIU holds `bus_ack` low for register-file accesses and
for control-register writes. Reading the register file is therefore also a way to
wait for the end of an operation. Status and the other registers stay readable.

Resultant cubes go to consecutive words starting at `dst`, wrapping at the end of
the file.

The control store (`ccm_pkg::decode_op`) maps opcodes to micro-instructions:

| opcode | kind | relation (specific when) | bef / act / aft |
|---|---|---|---|
| `OP_AND` intersection | comb | – | A∧B |
| `OP_SUPER` supercube | comb | – | A∨B |
| `OP_BCONS` binary consensus | comb | A∧B = ∅ → act | A∧B / A∨B / – |
| `OP_SHARP` A # B | seq | A ⊄ B | A / A∧¬B / A |
| `OP_DSHARP` disjoint sharp | seq | A ⊄ B | A / A∧¬B / A∧B |
| `OP_CONS` consensus | seq | every literal | A∧B / A∨B / A∧B |
| `OP_COMPL` complement of A | seq | A ≠ X | X / ¬A / X |
| `OP_DIST` distance | count | A∧B = ∅ | – |
| `OP_RAW` | from I1 | any | any |

## Larger cubes: pieces and chains

There are two ways to process a cube wider than the array.

**Pieces (stand-alone mode).**
- Split the cube into pieces the size of the array.
- Run the pieces in order.
- A literal may cross a piece boundary. To handle it, set the M bit of IT[0] (or
  IT[n+1]) equal to the neighbouring cell's bit. The boundary chain values then act
  as one piece's output and the next piece's input:
  - LEFT[n] from Status goes into I as the next piece's LEFT[0];
  - RIGHT[1] goes back as the previous piece's RIGHT[n+1].
- The end-to-end testbench counts specific literals over a 32-cell cube this way.

**Chain mode.** Several chips form one longer array:
- `rout_o` of each chip goes to `lin_i` of the next;
- `lout_o` goes back to `rin_i` of the previous chip;
- the first chip's `glob_o` goes to `glob_i` of all the others;
- the last chip's `rout_o` returns to the first chip's `ring_i`. That closes the ring,
  so the first chip's CU sees ACTIVATE[n] of the whole chain.

The host loads each chip with its slice of the operands and of M. It sets D to
first, internal or last, and writes I to the chips in this order: the other chips
first, the first chip last. The chips after the first load their operands and then
follow the first chip's global signals. Each stores its slice of every resultant cube
at the same address.

## How far the RTL follows the design it is based on

These parts follow the described architecture: the cell with its IDENTIFY chains,
its bef/act/aft automaton and its token behaviour, the M encoding, the Water
transparency, the phase sequence of the control unit, the Status contents,
stand-alone and chain modes, and piece-wise processing through LEFT/RIGHT.

These are this design's own choices:
- **Clocked, not asynchronous.** The cells were conceived as asynchronous state
  machines, with the ACTIVATE/REQUEST interlock standing in for a clock. Here each
  phase is one clock cycle, cell state is held in flip-flops, and the chains ripple
  combinationally within the cycle. The critical path is a token rippling across
  the whole array in one cycle. It grows linearly with `NIT`, and across all chips
  in chain mode.
- **`no_race`** exists in the original only to make asynchronous transitions free of
  hazards. Here it survives only as the transparent (and reset) state.
- **No microcode.** The original control unit is microprogrammed, but its microcode
  is not available. A fixed phase sequencer is used, with a small control store per
  opcode.
- **Operation definitions.** Relation codes, truth tables and opcode numbers are new.
  So are the set functions of sharp, disjoint sharp, consensus and complement, which
  were written from standard cube calculus.
- **Missing operations.** Crosslink, prime and double prime have no opcode. A
  single-pass variant can be tried through `OP_RAW`.
- **Interfaces.** The host bus, address map, stall rule, the four-phase start
  handshake between BIU and CU, the register-file size (32 words), the chain pin
  protocol and the contradiction chain are all new.
- **Result storage.** When results run past the end of the register file, the
  address wraps.

## Files

| file | content |
|---|---|
| `rtl/ccm_pkg.sv` | types (cube chains, micro-instruction, status), set functions, relations, control store |
| `rtl/ccm_identify.sv` | RELATION, LEFT/RIGHT, VARIABLE, COUNT of one cell |
| `rtl/ccm_afsm.sv` | cell automaton and token |
| `rtl/ccm_it.sv` | one cell: the two above, output function, C register, contradiction chain, Water |
| `rtl/ccm_ilu.sv` | the array of `NIT` cells |
| `rtl/ccm_cu.sv` | control unit |
| `rtl/ccm_regfile.sv` | register file |
| `rtl/ccm_biu.sv` | bus interface and control registers |
| `rtl/ccm.sv` | the chip (top) |
| `tb/ccm_ref_pkg.sv` | literal-level reference model of the operations |
| `tb/tb_*.sv` | one self-checking testbench per module |

Parameters: `ccm` has `NIT` (cells, default 16, giving 32-bit cubes) and `RF_DEPTH`
(register-file words, default 32). The bus is `max(32, 2*NIT)` bits wide. The I
register's address fields are 5 bits wide, so the register file holds at most 32
words.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_ccm` is the end-to-end test at the default size. It covers:
  - the worked example;
  - 150 random operations of every opcode on random multiple-valued partitions,
    some with random Water patterns;
  - contradiction drops and empty results;
  - bus stalls;
  - busy times of 3k+5, 5 and 3 cycles;
  - split-literal pieces;
  - 16 single-cell observations with all other cells transparent;
  - 30 operations of every opcode on three chained chips (first, internal, last)
    acting as one 48-cell array on 96-bit cubes.

  Every result is compared with `ccm_ref_pkg`. That model works on whole literals and
  does not imitate the cell chains.
- `tb_ccm_ilu` runs the array alone, including the worked example, with VARIABLE per
  cell and COUNT checked.
- The other testbenches check one module each: `identify`, `afsm`, `it`, `cu` (with a
  model of the ring), `regfile` and `biu`.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ccm_pkg.sv tb/ccm_ref_pkg.sv tb/tb_ccm.sv --top-module tb_ccm
./obj_dir/Vtb_ccm
```

Lint reports `ASCRANGE`, because cell-indexed vectors use `[1:NIT]` on purpose so
that index *i* is cell IT[i]. It also reports `SYNCASYNCNET`, because the reset is
used both for the flip-flops and for the `disable iff` of assertions.
