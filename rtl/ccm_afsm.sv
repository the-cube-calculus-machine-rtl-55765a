// AFSM / SIGNALIZE block of one iterative cell (IT).
//
// The state tells where the cell lies relative to the literal being processed:
// bef_act (still waiting), act (being processed) or aft_act (already done), plus
// no_race, the state of a transparent cell. INITIALIZE puts every cell in
// bef_act. A bef_act cell of a specific literal (VARIABLE = 1) that receives the
// ACTIVATE token becomes act; REQUEST moves act cells to aft_act. The token is
// passed on by aft_act, no_race and non-specific cells; a specific cell passes it
// only to the other cells of its own literal, so the token stops at the end of
// the leftmost literal still waiting - the "domino" behaviour: each ACTIVATE
// pulse from the control unit selects the next specific literal.
//
// The document's cell is an asynchronous state machine in which the REQUEST /
// ACTIVATE interlock replaces a clock. Here the state is held in flip-flops that
// change on the clock edge after the control unit drives a phase, and ACTIVATE
// ripples combinationally; the control unit never raises REQUEST and ACTIVATE
// together, which the assertions check. The extra no_race state that the
// document adds for hazard-free transitions is kept only as the transparent
// (Water) state, since a clocked machine has no hazards to avoid.
module ccm_afsm
  import ccm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic water,
  input  logic variable,
  input  logic lit_end,
  input  logic initialize,
  input  logic request,
  input  logic activate_i,
  output ist_e state,
  output logic activate_o
);

  ist_e state_d;

  always_comb begin
    state_d = state;
    if (water)             state_d = ST_NO_RACE;
    else if (initialize)   state_d = ST_BEF;
    else begin
      unique case (state)
        ST_BEF:     if (activate_i && variable) state_d = ST_ACT;
        ST_ACT:     if (request)                state_d = ST_AFT;
        default:    state_d = state;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= ST_NO_RACE;
    else        state <= state_d;

  // Token passes unless this is the last cell of a specific literal that has
  // not yet been processed or is being processed.
  assign activate_o = activate_i &
                      (water || state == ST_AFT || state == ST_NO_RACE ||
                       !variable || !lit_end);

  // Interlock rules of the two-phase protocol.
  a_no_req_with_act : assert property (@(posedge clk) disable iff (!rst_n)
                                       request |-> !activate_i);
  a_no_req_with_init: assert property (@(posedge clk) disable iff (!rst_n)
                                       !(request && initialize));

endmodule
