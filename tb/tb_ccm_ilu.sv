// Testbench of the iterative logic unit (ccm_ilu, 16 cells).
//
// Plays the control unit: drives INITIALIZE, ACTIVATE[0], latch and REQUEST in
// the order the CU uses and collects the resultant cubes. Checks
//  - the worked example of a 6-cell machine (variables U: 6 values, V: binary,
//    Z: 4 values, A = U^{1,2,3} Z^{1,2}, complement): VARIABLE per cell, COUNT,
//    the two resultant cubes and the stop of ACTIVATE, with the 10 spare cells
//    made transparent through the Water bits;
//  - random cubes, random literal partitions and every operation against the
//    literal-level reference model, dropping cubes with an empty literal;
//  - one resultant cube per ACTIVATE pulse.
module tb_ccm_ilu;
  import ccm_pkg::*;
  import ccm_ref_pkg::*;

  localparam int NIT = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  micro_t micro;
  ctl_t   ctl;
  logic [2*NIT-1:0] a, b, c;
  logic [1:NIT] m, w, variable;
  lr_t lr_i, lr_o;
  rl_t rl_i, rl_o;
  ist_e state [1:NIT];

  int checks = 0, failures = 0;

  ccm_ilu dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Run one operation the way the CU does; return cubes without contradiction.
  task automatic run_op(input micro_t mi, input logic [NIT+1:0] mreg, input logic left0,
                        input logic right0, ref logic [2*NIT-1:0] got[$], output int cnt,
                        output int pulses);
    got.delete();
    pulses = 0;
    micro = mi;
    ctl = '0;
    m = mreg[NIT:1];
    lr_i = '{activate: 1'b0, left: left0, count: '0, mbit: mreg[NIT+1], zero: 1'b1, contra: 1'b0};
    rl_i = '{right: right0, mbit: mreg[0]};
    @(negedge clk);
    cnt = int'(lr_o.count);
    if (mi.kind == K_COMB) begin
      ctl.comb = 1; ctl.latch = 1;
      #1;
      begin
        bit contra = lr_o.contra;
        @(negedge clk);
        ctl = '0;
        if (!contra) got.push_back(c);
      end
    end else if (mi.kind == K_SEQ) begin
      ctl.initialize = 1;
      @(negedge clk);
      ctl = '0;
      forever begin
        ctl.activate0 = 1; lr_i.activate = 1;
        #1;
        if (lr_o.activate) begin
          @(negedge clk); ctl = '0; lr_i.activate = 0;
          break;
        end
        pulses++;
        @(negedge clk);
        ctl = '0; lr_i.activate = 0; ctl.latch = 1;
        #1;
        begin
          bit contra = lr_o.contra;
          @(negedge clk);
          ctl = '0; ctl.request = 1;
          if (!contra) got.push_back(c);
          @(negedge clk);
          ctl = '0;
        end
        if (pulses > NIT + 2) break;
      end
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2*NIT-1:0] got[$];
    cube_t exp[$];
    int cnt, ecnt, pulses;
    int lit[65];
    micro_t mi;
    ctl = '0; micro = '0; a = '0; b = '0; m = '0; w = '0;
    lr_i = '0; rl_i = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---- worked example: 6 cells, M = 10001001, complement of A ----
    w = {6'b000000, 10'h3FF};
    a = {12'b011100_11_0110, 20'h0};
    b = '0;
    mi = decode_op(OP_COMPL, '0);
    micro = mi;
    // M: IT0=1, U=000, V=1, Z=00, IT7=1 (cells 7..16 are transparent)
    run_op(mi, {1'b1, 6'b000100, 10'b0, 1'b1}, 1'b1, 1'b1, got, cnt, pulses);
    chk(cnt == 2, $sformatf("example COUNT %0d", cnt));
    chk(variable[1:6] == 6'b111011, $sformatf("example VARIABLE %b", variable[1:6]));
    chk(got.size() == 2, $sformatf("example cubes %0d", got.size()));
    if (got.size() == 2) begin
      chk(got[0] == {12'b100011_11_1111, 20'hFFFFF}, $sformatf("cube s %h", got[0]));
      chk(got[1] == {12'b111111_11_1001, 20'hFFFFF}, $sformatf("cube S %h", got[1]));
    end
    chk(pulses == 2, "one cube per ACTIVATE pulse");
    for (int i = 7; i <= NIT; i++) chk(state[i] == ST_NO_RACE, "transparent cell in no_race");

    // ---- random operations over random partitions ----
    w = '0;
    for (int t = 0; t < 400; t++) begin
      automatic int op = 1 + ($urandom % 8);
      rand_part(NIT, 1 + ($urandom % 3), lit);
      a = $urandom; b = $urandom;
      // make A mostly non-empty per literal so sharp-like results exist
      if ($urandom % 2) a = a | $urandom;
      run(op, {32'h0, a}, {32'h0, b}, NIT, lit, exp, ecnt);
      mi = decode_op(op_e'(op), '0);
      run_op(mi, (NIT+2)'(m_of(NIT, lit)), 1'b1, 1'b1, got, cnt, pulses);
      chk(cnt == ecnt, $sformatf("op %0d COUNT %0d exp %0d", op, cnt, ecnt));
      chk(got.size() == exp.size(), $sformatf("op %0d cubes %0d exp %0d", op, got.size(), exp.size()));
      for (int k = 0; k < got.size() && k < exp.size(); k++)
        chk(got[k] == exp[k][2*NIT-1:0], $sformatf("op %0d cube %0d %h exp %h", op, k, got[k], exp[k]));
      if (mi.kind == K_SEQ) chk(pulses == ecnt, "pulses = specific literals");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
