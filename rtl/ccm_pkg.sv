// Shared types and constants of the Cube Calculus Machine (CCM).
//
// A cube is held in positional notation: every variable takes as many bits as it
// has values, and every iterative cell (IT) of the iterative logic unit (ILU)
// handles two of those bits. A binary literal x is 01, its complement 10, the
// don't care X is 11 and 00 is a contradiction. Cube words are written with the
// leftmost variable in the most significant bits, so IT[1] holds bits
// [2*NIT-1:2*NIT-2] and IT[NIT] holds bits [1:0].
//
// Every set function used by the cells is a bitwise function of one bit of
// operand A and the matching bit of operand B, held as a 4-bit truth table
// indexed by {a,b}. The relations that pick the "specific" literals are
// evaluated per IT and combined across the literal by the LEFT/RIGHT chains.
// The encodings of relations, functions, opcodes and the Mode register are this
// design's own; the document names the operations but gives no codes.
package ccm_pkg;

  // Width of the COUNT iterative signal and of result counters.
  localparam int unsigned CNT_W = 8;

  // Two-input bitwise set function: C = tt[{a,b}].
  typedef logic [3:0] fn_t;
  localparam fn_t FN_ZERO  = 4'b0000;
  localparam fn_t FN_AND   = 4'b1000;   // A & B  (intersection)
  localparam fn_t FN_OR    = 4'b1110;   // A | B  (union, supercube)
  localparam fn_t FN_A     = 4'b1100;   // copy A
  localparam fn_t FN_B     = 4'b1010;   // copy B
  localparam fn_t FN_NOTA  = 4'b0011;   // ~A     (complement of a literal)
  localparam fn_t FN_ANDNB = 4'b0100;   // A & ~B (sharp of a literal)
  localparam fn_t FN_XOR   = 4'b0110;
  localparam fn_t FN_ONE   = 4'b1111;   // X, the full literal

  // Per-IT relation; a literal satisfies it when all of its ITs do.
  typedef enum logic [1:0] {
    REL_TRUE   = 2'd0,  // always satisfied
    REL_A_FULL = 2'd1,  // A bits are all 1 (A is X)
    REL_SUBSET = 2'd2,  // A subset of B   (A & ~B == 0)
    REL_DISJ   = 2'd3   // A, B disjoint   (A & B  == 0)
  } rel_e;

  // How the ILU is used by one CCM instruction.
  typedef enum logic [1:0] {
    K_COUNT = 2'd0,  // IDENTIFY only: COUNT of specific literals goes to Status
    K_COMB  = 2'd1,  // one resultant cube, C_i = VARIABLE ? act_fn : bef_fn
    K_SEQ   = 2'd2,  // one resultant cube per specific literal (ACTIVATE token)
    K_RSVD  = 2'd3
  } kind_e;

  // Micro-instruction: everything the ILU needs for one operation.
  typedef struct packed {
    kind_e kind;
    rel_e  rel;
    logic  pol;      // 1: literal is specific when the relation FAILS somewhere in it
    fn_t   bef_fn;   // set function of literals right of the active one (bef_act)
    fn_t   act_fn;   // set function of the active literal
    fn_t   aft_fn;   // set function of literals left of the active one (aft_act)
  } micro_t;        // 17 bits

  // CCM instruction opcodes (high-level cube calculus operations).
  typedef enum logic [3:0] {
    OP_RAW     = 4'd0,  // micro-instruction taken from the I register's second word
    OP_AND     = 4'd1,  // intersection               (category 1)
    OP_SUPER   = 4'd2,  // supercube                  (category 1)
    OP_BCONS   = 4'd3,  // binary consensus           (category 2)
    OP_SHARP   = 4'd4,  // sharp A # B                (category 3)
    OP_DSHARP  = 4'd5,  // disjoint sharp             (category 3)
    OP_CONS    = 4'd6,  // consensus                  (category 3)
    OP_COMPL   = 4'd7,  // complement of A            (category 3)
    OP_DIST    = 4'd8   // distance of A and B        (COUNT only)
  } op_e;

  // First word of the Instruction register: opcode, transfer addresses and the
  // initial iterative signals LEFT[0] / RIGHT[n+1].
  typedef struct packed {
    logic [6:0] rsvd;
    logic       right0;   // RIGHT[n+1] driven by the CU in stand-alone mode
    logic       left0;    // LEFT[0]    driven by the CU in stand-alone mode
    logic [4:0] dst;      // register-file address of the first resultant cube
    logic [4:0] src_b;
    logic [4:0] src_a;
    logic [3:0] op;       // op_e
    logic [3:0] rsvd2;
  } instr_t;              // 32 bits

  // Mode (D) register.
  typedef enum logic [1:0] {
    MD_ALONE    = 2'd0,  // stand-alone: boundary signals from / to the CU
    MD_FIRST    = 2'd1,  // first CCM of a chain: master of the global signals
    MD_INTERNAL = 2'd2,  // internal CCM of a chain
    MD_LAST     = 2'd3   // last CCM of a chain
  } mode_e;

  // AFSM states of an IT cell.
  typedef enum logic [1:0] {
    ST_NO_RACE = 2'd0,
    ST_BEF     = 2'd1,
    ST_ACT     = 2'd2,
    ST_AFT     = 2'd3
  } ist_e;

  // Iterative signals travelling left to right.
  typedef struct packed {
    logic             activate;  // ACTIVATE token
    logic             left;      // LEFT: relation holds in every IT so far in the literal
    logic [CNT_W-1:0] count;     // COUNT: specific literals so far
    logic             mbit;      // M bit of the last non-transparent cell
    logic             zero;      // all C bits so far in the literal are 0
    logic             contra;    // some finished literal of C is empty
  } lr_t;

  // Iterative signals travelling right to left.
  typedef struct packed {
    logic right;                 // RIGHT: relation holds in every IT from here to the literal end
    logic mbit;                  // M bit of the next non-transparent cell
  } rl_t;

  // Global control signals from the CU (broadcast to chained CCMs).
  typedef struct packed {
    logic comb;        // ITs output VARIABLE ? act_fn : bef_fn, AFSM not used
    logic initialize;  // INITIALIZE: every AFSM to bef_act
    logic activate0;   // ACTIVATE[0]
    logic request;     // REQUEST: act -> aft_act
    logic latch;       // load the C registers
    logic store;       // write the latched cube to the register file
    logic finish;      // operation finished
  } ctl_t;

  // Status (S) register as seen by the host.
  typedef struct packed {
    logic [7:0]       rsvd;
    logic [CNT_W-1:0] count;      // COUNT of the last IDENTIFY: specific literals or distance
    logic [CNT_W-1:0] nres;       // resultant cubes stored by the last operation
    logic [2:0]       rsvd2;
    logic             right_1;    // RIGHT[1] latched by the CU (stand-alone mode)
    logic             left_n;     // LEFT[n]  latched by the CU (stand-alone mode)
    logic             no_result;  // last operation produced no resultant cube
    logic             done;       // last operation finished
    logic             busy;       // an operation is running
  } status_t;                     // 32 bits

  // Evaluate a relation on one IT's two bits.
  function automatic logic rel_eval(rel_e r, logic [1:0] a, logic [1:0] b);
    unique case (r)
      REL_TRUE:   return 1'b1;
      REL_A_FULL: return a == 2'b11;
      REL_SUBSET: return (a & ~b) == 2'b00;
      REL_DISJ:   return (a & b) == 2'b00;
    endcase
  endfunction

  // Apply a set function bit by bit.
  function automatic logic [1:0] fn_apply(fn_t f, logic [1:0] a, logic [1:0] b);
    return {f[{a[1], b[1]}], f[{a[0], b[0]}]};
  endfunction

  // Control store: translate a CCM opcode into its micro-instruction.
  // The sequential forms follow the pattern aft_act ... act ... bef_act.
  function automatic micro_t decode_op(op_e op, micro_t raw);
    micro_t m;
    m = raw;
    unique case (op)
      OP_RAW:    m = raw;
      OP_AND:    m = '{K_COMB,  REL_TRUE,   1'b0, FN_AND, FN_AND,   FN_AND};
      OP_SUPER:  m = '{K_COMB,  REL_TRUE,   1'b0, FN_OR,  FN_OR,    FN_OR};
      OP_BCONS:  m = '{K_COMB,  REL_DISJ,   1'b0, FN_AND, FN_OR,    FN_AND};
      OP_SHARP:  m = '{K_SEQ,   REL_SUBSET, 1'b1, FN_A,   FN_ANDNB, FN_A};
      OP_DSHARP: m = '{K_SEQ,   REL_SUBSET, 1'b1, FN_A,   FN_ANDNB, FN_AND};
      OP_CONS:   m = '{K_SEQ,   REL_TRUE,   1'b0, FN_AND, FN_OR,    FN_AND};
      OP_COMPL:  m = '{K_SEQ,   REL_A_FULL, 1'b1, FN_ONE, FN_NOTA,  FN_ONE};
      OP_DIST:   m = '{K_COUNT, REL_DISJ,   1'b0, FN_ONE, FN_ONE,   FN_ONE};
      default:   m = '{K_COUNT, REL_TRUE,   1'b0, FN_ONE, FN_ONE,   FN_ONE};
    endcase
    return m;
  endfunction

endpackage
