// Testbench of the control unit (ccm_cu).
//
// The ILU is replaced by a small model of its ring: an operation has k specific
// literals; ACTIVATE[n] comes back true once all of them have been visited, each
// REQUEST consumes one, and a chosen set of resultant cubes reports a
// contradiction. The testbench checks the operand load, the phase order
// (INITIALIZE, then ACTIVATE / latch / REQUEST per cube, never ACTIVATE with
// REQUEST), that exactly the non-contradictory cubes are written to consecutive
// addresses from dst, the Status fields, and the cycle counts: 3k+5 cycles of
// busy for a sequential operation, 5 for a combinational one and 3 for a
// COUNT-only one. In chain-slave mode it checks that the CU follows glob_i.
module tb_ccm_cu;
  import ccm_pkg::*;

  localparam int NIT = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mode_e mode;
  logic start_req, start_ack;
  instr_t instr;
  micro_t raw_micro, micro;
  logic [4:0] ra_a, ra_b, rf_waddr;
  logic [31:0] rd_a, rd_b, rf_wdata, op_a, op_b, c_i;
  logic rf_we, left0, right0, right1_i;
  ctl_t ctl, glob_i, glob_o;
  lr_t fin_i;
  status_t status;

  int checks = 0, failures = 0;

  ccm_cu dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // register-file model: word i holds i * 0x01010101
  assign rd_a = 32'(ra_a) * 32'h01010101;
  assign rd_b = 32'(ra_b) * 32'h01010101;

  // ring model
  int remaining, visited, stores, bad_mask, inits;
  logic [4:0] exp_addr;
  always_comb begin
    fin_i = '0;
    fin_i.count    = 8'(remaining);
    fin_i.activate = (remaining == 0);
    fin_i.contra   = (bad_mask >> visited) & 1;
    fin_i.left     = 1'b1;
  end
  assign c_i = 32'hC0DE0000 + 32'(visited);
  assign right1_i = 1'b0;

  always @(posedge clk) if (rst_n) begin
    if (ctl.initialize) inits++;
    if (ctl.activate0 && ctl.request) begin failures++; $display("FAIL ACTIVATE with REQUEST"); end
    if (rf_we) begin
      checks++;
      if (rf_waddr != exp_addr || rf_wdata != 32'hC0DE0000 + 32'(visited)) begin
        failures++; $display("FAIL store %0d %h", rf_waddr, rf_wdata);
      end
      exp_addr <= exp_addr + 1;
      stores++;
    end
    if (ctl.request) begin remaining <= remaining - 1; visited <= visited + 1; end
    if (glob_i.request) visited <= visited + 1;
  end

  task automatic run(op_e op, int k, int bad, output int cycles);
    remaining = k; visited = 0; stores = 0; bad_mask = bad; inits = 0;
    instr = '0; instr.op = op; instr.src_a = 5'd3; instr.src_b = 5'd7; instr.dst = 5'd10;
    exp_addr = 5'd10;
    @(negedge clk); start_req = 1;
    @(negedge clk); start_req = 0;
    cycles = 0;
    while (start_ack) begin @(negedge clk); cycles++; end
    chk(op_a == 32'h03030303 && op_b == 32'h07070707, "operands loaded");
    chk(status.done && !status.busy, "status done");
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, good;
    mode = MD_ALONE; start_req = 0; instr = '0; raw_micro = '0; glob_i = '0;
    remaining = 0; visited = 0; bad_mask = 0; stores = 0;
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      automatic int k = $urandom % 9;
      automatic int bad = $urandom % 512;
      good = 0;
      for (int i = 0; i < k; i++) if (!((bad >> i) & 1)) good++;
      run(OP_SHARP, k, bad, cyc);
      chk(cyc == 3 * k + 5, $sformatf("sequential cycles %0d k=%0d", cyc, k));
      chk(stores == good, $sformatf("stores %0d exp %0d", stores, good));
      chk(status.nres == 8'(good) && status.no_result == (good == 0), "status nres/no_result");
      chk(status.count == 8'(k), "status COUNT");
      chk(inits == 1, "one INITIALIZE");
      chk(micro.kind == K_SEQ && micro.act_fn == FN_ANDNB, "control store decode");
    end
    // combinational: one cube, dropped on contradiction
    run(OP_AND, 0, 0, cyc);
    chk(cyc == 5 && stores == 1, $sformatf("comb cycles %0d stores %0d", cyc, stores));
    run(OP_AND, 0, 1, cyc);
    chk(stores == 0 && status.no_result, "comb contradiction dropped");
    // COUNT only
    run(OP_DIST, 3, 0, cyc);
    chk(cyc == 3 && stores == 0 && status.count == 8'd3, "distance");
    // raw micro-instruction
    raw_micro = '{K_COMB, REL_TRUE, 1'b0, FN_XOR, FN_XOR, FN_XOR};
    run(OP_RAW, 0, 0, cyc);
    chk(micro.act_fn == FN_XOR && cyc == 5, "raw micro-instruction");
    // chain slave: follows glob_i
    mode = MD_INTERNAL;
    remaining = 0; visited = 0; stores = 0; bad_mask = 0;
    exp_addr = 5'd10;
    @(negedge clk); start_req = 1;
    @(negedge clk); start_req = 0;
    @(negedge clk);
    glob_i = '0; glob_i.initialize = 1; #1 chk(ctl.initialize, "slave follows INITIALIZE");
    @(negedge clk); glob_i = '0; glob_i.latch = 1;
    @(negedge clk); glob_i = '0; glob_i.request = 1; glob_i.store = 1;
    @(negedge clk); glob_i = '0; glob_i.finish = 1;
    @(negedge clk); glob_i = '0;
    @(negedge clk);
    chk(!start_ack && stores == 1 && status.nres == 8'd1, "slave stored one cube and finished");
    chk(glob_o.finish == 0, "slave does not drive finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
