// Iterative Logic Unit (ILU): a linear array of NIT iterative cells.
//
// Cell IT[i] (i = 1..NIT) works on cube bits [2*(NIT-i)+1 -: 2], so the leftmost
// variable sits in the most significant bits. Left-to-right iterative signals
// (ACTIVATE, LEFT, COUNT, the M bit, the contradiction chain) enter at IT[1]
// from lr_i, the signals of the virtual cell IT[0], and leave IT[NIT] on lr_o,
// which the control unit reads as ACTIVATE[n], COUNT and LEFT[n]. Right-to-left
// signals (RIGHT, M bit) enter at IT[NIT] from rl_i (IT[n+1]) and leave IT[1] on
// rl_o. m holds one M bit per cell and w one Water bit per cell, both ordered
// IT[1] first (index 1 is the leftmost cell). The whole array answers the
// global signals of ctl in the same clock cycle; the only state is in the cells.
// Structure and signal set follow the document; the bit ordering is this
// design's choice.
module ccm_ilu
  import ccm_pkg::*;
#(
  parameter int unsigned NIT = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  micro_t            micro,
  input  ctl_t              ctl,
  input  logic [2*NIT-1:0]  a,
  input  logic [2*NIT-1:0]  b,
  input  logic [1:NIT]      m,
  input  logic [1:NIT]      w,
  input  lr_t               lr_i,
  output lr_t               lr_o,
  input  rl_t               rl_i,
  output rl_t               rl_o,
  output logic [2*NIT-1:0]  c,
  output ist_e              state [1:NIT],
  output logic [1:NIT]      variable
);

  lr_t lr [0:NIT];
  rl_t rl [1:NIT+1];

  assign lr[0]     = lr_i;
  assign rl[NIT+1] = rl_i;
  assign lr_o      = lr[NIT];
  assign rl_o      = rl[1];

  for (genvar i = 1; i <= NIT; i++) begin : g_it
    ccm_it u_it (
      .clk     (clk),
      .rst_n   (rst_n),
      .micro   (micro),
      .ctl     (ctl),
      .a       (a[2*(NIT-i)+1 -: 2]),
      .b       (b[2*(NIT-i)+1 -: 2]),
      .mbit    (m[i]),
      .water   (w[i]),
      .lr_i    (lr[i-1]),
      .lr_o    (lr[i]),
      .rl_i    (rl[i+1]),
      .rl_o    (rl[i]),
      .c       (c[2*(NIT-i)+1 -: 2]),
      .state   (state[i]),
      .variable(variable[i])
    );
  end

endmodule
