// Testbench of the cell automaton (ccm_afsm).
//
// Directed sequences: reset state, INITIALIZE to bef_act, the token passing a
// non-specific cell, stopping at the last cell of a specific literal and
// passing inside a literal, bef_act -> act on ACTIVATE, act -> aft_act on
// REQUEST, a processed cell passing the token, and the Water bit forcing
// no_race with the token passed straight through.
module tb_ccm_afsm;
  import ccm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic water, variable, lit_end, initialize, request, activate_i, activate_o;
  ist_e state;

  int checks = 0, failures = 0;

  ccm_afsm dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (state %s)", what, state.name()); end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {water, variable, lit_end, initialize, request, activate_i} = '0;
    @(negedge clk);
    chk(state == ST_NO_RACE, "reset state");
    rst_n = 1;
    initialize = 1; @(negedge clk); initialize = 0;
    chk(state == ST_BEF, "INITIALIZE -> bef_act");
    // non-specific cell passes the token and stays
    variable = 0; lit_end = 1; activate_i = 1; #1;
    chk(activate_o == 1, "non-specific passes");
    @(negedge clk);
    chk(state == ST_BEF, "non-specific stays bef_act");
    // specific, last cell of literal: stops token, becomes active
    variable = 1; #1;
    chk(activate_o == 0, "specific literal end stops token");
    lit_end = 0; #1;
    chk(activate_o == 1, "token passes inside the literal");
    lit_end = 1;
    @(negedge clk);
    chk(state == ST_ACT, "bef_act -> act");
    #1 chk(activate_o == 0, "act stops token");
    activate_i = 0;
    @(negedge clk);
    chk(state == ST_ACT, "act holds without REQUEST");
    request = 1; @(negedge clk); request = 0;
    chk(state == ST_AFT, "REQUEST -> aft_act");
    activate_i = 1; #1;
    chk(activate_o == 1, "aft_act passes");
    @(negedge clk);
    chk(state == ST_AFT, "aft_act stays");
    activate_i = 0;
    // Water: transparent
    water = 1; @(negedge clk);
    chk(state == ST_NO_RACE, "Water -> no_race");
    activate_i = 1; #1;
    chk(activate_o == 1, "transparent passes token");
    initialize = 1; @(negedge clk); initialize = 0;
    chk(state == ST_NO_RACE, "transparent ignores INITIALIZE");
    activate_i = 0; water = 0;
    initialize = 1; @(negedge clk); initialize = 0;
    chk(state == ST_BEF, "back to bef_act");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
