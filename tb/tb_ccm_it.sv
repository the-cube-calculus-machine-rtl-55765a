// Testbench of one iterative cell (ccm_it).
//
// The cell is set up as a one-cell literal. For random operand bits and random
// choices of the three set functions (drawn from named functions whose results
// the testbench computes with plain operators) it checks the latched C in
// combinational mode and through the sequence bef_act -> act -> aft_act, the
// contradiction chain, the forwarding of COUNT/M bits, and the transparent
// (Water) cell, which must forward every chain input and output C = 11.
module tb_ccm_it;
  import ccm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  micro_t micro;
  ctl_t ctl;
  logic [1:0] a, b, c;
  logic mbit, water, variable;
  lr_t lr_i, lr_o;
  rl_t rl_i, rl_o;
  ist_e state;

  int checks = 0, failures = 0;

  ccm_it dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  fn_t fns [6] = '{FN_AND, FN_OR, FN_A, FN_NOTA, FN_ANDNB, FN_ONE};

  function automatic logic [1:0] expect_fn(fn_t f, logic [1:0] x, logic [1:0] y);
    case (f)
      FN_AND:   return x & y;
      FN_OR:    return x | y;
      FN_A:     return x;
      FN_NOTA:  return ~x;
      FN_ANDNB: return x & ~y;
      default:  return 2'b11;
    endcase
  endfunction

  task automatic latch_and_check(logic [1:0] exp, string what);
    bit exp_zero;
    ctl.latch = 1;
    #1;
    exp_zero = (exp == 2'b00);
    chk(lr_o.contra == (lr_i.contra | exp_zero), {what, " contradiction"});
    @(negedge clk);
    ctl.latch = 0;
    chk(c == exp, $sformatf("%s C=%b exp %b", what, c, exp));
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctl = '0; micro = '0; water = 0; mbit = 0;
    lr_i = '{activate: 0, left: 1, count: 8'd5, mbit: 1, zero: 1, contra: 0};
    rl_i = '{right: 1, mbit: 1};
    a = 0; b = 0;
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      bit spec;
      micro.kind   = K_SEQ;
      micro.rel    = rel_e'($urandom % 4);
      micro.pol    = $urandom % 2;
      micro.bef_fn = fns[$urandom % 6];
      micro.act_fn = fns[$urandom % 6];
      micro.aft_fn = fns[$urandom % 6];
      a = 2'($urandom); b = 2'($urandom);
      lr_i.contra = $urandom % 2;
      lr_i.count  = 8'($urandom % 100);
      #1;
      spec = variable;
      chk(lr_o.count == lr_i.count + (spec ? 1 : 0), "COUNT");
      chk(lr_o.mbit == mbit && rl_o.mbit == mbit, "M bit forwarded");
      // combinational mode
      ctl.comb = 1;
      latch_and_check(spec ? expect_fn(micro.act_fn, a, b) : expect_fn(micro.bef_fn, a, b), "comb");
      ctl.comb = 0;
      // sequential mode
      ctl.initialize = 1; @(negedge clk); ctl.initialize = 0;
      chk(state == ST_BEF, "initialized");
      latch_and_check(expect_fn(micro.bef_fn, a, b), "bef_act");
      lr_i.activate = 1; #1;
      chk(lr_o.activate == !spec, "token stop/pass");
      @(negedge clk); lr_i.activate = 0;
      if (spec) begin
        chk(state == ST_ACT, "active");
        latch_and_check(expect_fn(micro.act_fn, a, b), "act");
        ctl.request = 1; @(negedge clk); ctl.request = 0;
        chk(state == ST_AFT, "after active");
        latch_and_check(expect_fn(micro.aft_fn, a, b), "aft_act");
        lr_i.activate = 1; #1;
        chk(lr_o.activate == 1, "aft passes token");
        @(negedge clk); lr_i.activate = 0;
      end
    end
    // transparent cell
    water = 1;
    lr_i = '{activate: 1, left: 0, count: 8'd9, mbit: 0, zero: 1, contra: 1};
    rl_i = '{right: 0, mbit: 1};
    @(negedge clk);
    #1;
    chk(lr_o == lr_i && rl_o == rl_i, "transparent forwarding");
    latch_and_check(2'b11, "transparent C");
    chk(state == ST_NO_RACE, "transparent no_race");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
