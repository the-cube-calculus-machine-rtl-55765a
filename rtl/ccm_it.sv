// Iterative cell IT[i] of the iterative logic unit (ILU).
//
// One IT processes two bits of a cube: one binary variable or a part of a
// multiple-valued one. It holds an IDENTIFY block (RELATION, LEFT, RIGHT,
// VARIABLE, COUNT), an AFSM (bef_act / act / aft_act / no_race and the ACTIVATE
// token) and a 2-bit output register C. The output set function is chosen by
// the cell's own state: aft_fn left of the active literal, act_fn in it and
// bef_fn right of it (formula 2.3 of the cube-calculus pattern). In combinational
// operations (ctl.comb) the AFSM is bypassed and C = VARIABLE ? act_fn : bef_fn
// (formulas 2.1 and 2.2). C is loaded when the control unit raises ctl.latch.
//
// A further left-to-right chain flags a contradiction: zero is the AND of
// "next C bits are 00" over the literal so far, and contra is raised at the end
// of a literal whose new C is all zero, so that the control unit can drop a
// resultant cube with an empty literal.
//
// When its Water bit is set the cell is transparent: it forwards every
// iterative signal unchanged, outputs C = 11 and its AFSM sits in no_race.
// Timing: all chains are combinational; state and C change on the clock edge.
// The contradiction chain is this design's way of doing the detection the
// document asks for; the rest follows the document's description of the IT.
module ccm_it
  import ccm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  micro_t     micro,
  input  ctl_t       ctl,
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       mbit,
  input  logic       water,
  input  lr_t        lr_i,
  output lr_t        lr_o,
  input  rl_t        rl_i,
  output rl_t        rl_o,
  output logic [1:0] c,
  output ist_e       state,
  output logic       variable
);

  logic       relation, lit_start, lit_end, left_o, right_o, act_o;
  logic [CNT_W-1:0] count_o;
  logic [1:0] c_d;
  logic       zero_eff, zero_o;

  ccm_identify u_identify (
    .rel      (micro.rel),
    .pol      (micro.pol),
    .a        (a),
    .b        (b),
    .mbit     (mbit),
    .water    (water),
    .mprev_i  (lr_i.mbit),
    .mnext_i  (rl_i.mbit),
    .left_i   (lr_i.left),
    .right_i  (rl_i.right),
    .count_i  (lr_i.count),
    .relation (relation),
    .lit_start(lit_start),
    .lit_end  (lit_end),
    .variable (variable),
    .left_o   (left_o),
    .right_o  (right_o),
    .count_o  (count_o)
  );

  ccm_afsm u_afsm (
    .clk       (clk),
    .rst_n     (rst_n),
    .water     (water),
    .variable  (variable),
    .lit_end   (lit_end),
    .initialize(ctl.initialize),
    .request   (ctl.request),
    .activate_i(lr_i.activate),
    .state     (state),
    .activate_o(act_o)
  );

  // Output set function.
  always_comb begin
    if (water)          c_d = 2'b11;
    else if (ctl.comb)  c_d = variable ? fn_apply(micro.act_fn, a, b)
                                       : fn_apply(micro.bef_fn, a, b);
    else begin
      unique case (state)
        ST_BEF:  c_d = fn_apply(micro.bef_fn, a, b);
        ST_ACT:  c_d = fn_apply(micro.act_fn, a, b);
        ST_AFT:  c_d = fn_apply(micro.aft_fn, a, b);
        default: c_d = 2'b11;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)         c <= 2'b11;
    else if (ctl.latch) c <= c_d;

  // Iterative outputs.
  always_comb begin
    zero_eff = lit_start ? 1'b1 : lr_i.zero;
    zero_o   = zero_eff & (c_d == 2'b00);
    if (water) begin
      lr_o = lr_i;
      rl_o = rl_i;
    end else begin
      lr_o.activate = act_o;
      lr_o.left     = left_o;
      lr_o.count    = count_o;
      lr_o.mbit     = mbit;
      lr_o.zero     = zero_o;
      lr_o.contra   = lr_i.contra | (lit_end & zero_o);
      rl_o.right    = right_o;
      rl_o.mbit     = mbit;
    end
  end

  logic unused_relation;
  assign unused_relation = relation;

endmodule
