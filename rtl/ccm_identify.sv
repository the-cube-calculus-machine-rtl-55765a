// IDENTIFY block of one iterative cell (IT) of the ILU.
//
// Each IT evaluates the selected relation on its two bits of operands A and B
// (RELATION). A literal may span several ITs, so RELATION is combined over the
// whole literal by two iterative chains: LEFT runs left to right and is the AND
// of RELATION from the first IT of the literal up to this one, RIGHT runs right
// to left and is the AND from this IT to the last IT of the literal. Literal
// boundaries come from the Multi-value (M) register: a new literal starts where
// an IT's M bit differs from that of its left neighbour. The literal satisfies
// the relation when LEFT(in) & RELATION & RIGHT(in) holds; VARIABLE marks a
// specific literal and is that value, or its inverse when pol = 1 (the
// complement uses "literal is not X"). VARIABLE is therefore equal in all ITs
// of one literal. COUNT runs left to right and adds one at the last IT of every
// specific literal, giving the number of specific positions (or the distance
// of two cubes with the relation "disjoint").
//
// Purely combinational; the chains ripple within one literal only, except that
// LEFT[0]/RIGHT[n+1] continue a literal split between two pieces of a cube.
// A transparent IT (Water bit set) repeats all chain inputs and is never
// specific. The relation set, the pol bit and the M-bit comparison through a
// transparent cell are this design's choices; the chains and their meaning
// follow the document.
module ccm_identify
  import ccm_pkg::*;
(
  input  rel_e             rel,
  input  logic             pol,
  input  logic [1:0]       a,
  input  logic [1:0]       b,
  input  logic             mbit,      // this IT's bit of M
  input  logic             water,     // this IT's bit of W
  input  logic             mprev_i,   // M bit of the nearest active cell to the left
  input  logic             mnext_i,   // M bit of the nearest active cell to the right
  input  logic             left_i,
  input  logic             right_i,
  input  logic [CNT_W-1:0] count_i,
  output logic             relation,
  output logic             lit_start,
  output logic             lit_end,
  output logic             variable,
  output logic             left_o,
  output logic             right_o,
  output logic [CNT_W-1:0] count_o
);

  logic left_eff, right_eff, lit_ok;

  always_comb begin
    relation  = rel_eval(rel, a, b);
    lit_start = (mprev_i != mbit);
    lit_end   = (mnext_i != mbit);
    left_eff  = lit_start ? 1'b1 : left_i;
    right_eff = lit_end   ? 1'b1 : right_i;
    lit_ok    = left_eff & relation & right_eff;
    if (water) begin
      variable = 1'b0;
      left_o   = left_i;
      right_o  = right_i;
      count_o  = count_i;
    end else begin
      variable = lit_ok ^ pol;
      left_o   = left_eff & relation;
      right_o  = right_eff & relation;
      count_o  = count_i + CNT_W'(lit_end & variable);
    end
  end

endmodule
