// End-to-end testbench of the CCM chip (ccm) at its default size (16 cells,
// 32-bit cubes, 32-word register file).
//
// A host model drives the bus: it writes operand cubes to the register file,
// sets M, W and D, writes the instruction, polls Status and reads back the
// resultant cubes, which are compared with the literal-level reference model.
// Covered, and counted so that a mechanism that never happened is a failure:
//   - the worked example (U: 6 values, V: binary, Z: 4 values; complement of
//     U^{1,2,3} Z^{1,2}) with the 10 spare cells made transparent
//   - every opcode over random cubes and random multiple-valued partitions
//   - random Water patterns (transparent cells ignored, C = 11 there)
//   - resultant cubes dropped for a contradiction, operations with no result
//   - host accesses stalled by the bus interface while the CU is busy
//   - busy time of 3k+5 cycles for k specific literals (sequential), 5
//     (combinational) and 3 (COUNT only)
//   - a 32-cell cube handled as two pieces, literals crossing the boundary
//     joined through LEFT[0]/LEFT[n] and RIGHT[n+1]/RIGHT[1]
//   - one cell observed alone through the boundary signals, all other cells
//     transparent (the Water test mode)
//   - chain mode: three chips (first / internal / last) acting as one 48-cell
//     ILU on 96-bit cubes, every opcode, checked against the reference model
module tb_ccm;
  import ccm_pkg::*;
  import ccm_ref_pkg::*;

  localparam int NIT = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // four chips: 0 stand-alone; 1, 2, 3 first, internal and last of a chain
  logic        bus_req [4], bus_we [4], bus_ack [4], busy [4];
  logic [5:0]  bus_addr [4];
  logic [31:0] bus_wdata [4], bus_rdata [4];
  lr_t lin [4], rout [4], ring [4];
  rl_t lout [4], rin [4];
  ctl_t glob_i [4], glob_o [4];

  for (genvar k = 0; k < 4; k++) begin : g_chip
    ccm u_ccm (.clk, .rst_n, .bus_req(bus_req[k]), .bus_we(bus_we[k]), .bus_addr(bus_addr[k]),
               .bus_wdata(bus_wdata[k]), .bus_ack(bus_ack[k]), .bus_rdata(bus_rdata[k]),
               .lin_i(lin[k]), .lout_o(lout[k]), .rout_o(rout[k]), .rin_i(rin[k]),
               .ring_i(ring[k]), .glob_i(glob_i[k]), .glob_o(glob_o[k]), .busy_o(busy[k]));
  end

  // chain wiring: 1 -> 2 -> 3, ring back from 3 to 1
  assign lin[0] = '0;      assign rin[0] = '0;      assign ring[0] = '0; assign glob_i[0] = '0;
  assign lin[1] = '0;      assign rin[1] = lout[2]; assign ring[1] = rout[3]; assign glob_i[1] = '0;
  assign lin[2] = rout[1]; assign rin[2] = lout[3]; assign ring[2] = '0; assign glob_i[2] = glob_o[1];
  assign lin[3] = rout[2]; assign rin[3] = '0;      assign ring[3] = '0; assign glob_i[3] = glob_o[1];

  int checks = 0, failures = 0;
  int n_example = 0, n_seq = 0, n_comb = 0, n_count = 0, n_multi = 0, n_water = 0,
      n_drop = 0, n_nores = 0, n_stall = 0, n_chain = 0, n_timing = 0, n_pieces = 0, n_split = 0, n_observe = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic bus(int ch, logic we, logic [5:0] addr, logic [31:0] d, output logic [31:0] q);
    int waits = 0;
    @(negedge clk);
    bus_req[ch] = 1; bus_we[ch] = we; bus_addr[ch] = addr; bus_wdata[ch] = d;
    #1;
    while (!bus_ack[ch]) begin @(negedge clk); waits++; #1; end
    q = bus_rdata[ch];
    if (waits > 0) n_stall++;
    @(negedge clk);
    bus_req[ch] = 0;
  endtask

  task automatic wr(int ch, logic [5:0] addr, logic [31:0] d);
    logic [31:0] q;
    bus(ch, 1, addr, d, q);
  endtask

  function automatic logic [31:0] mk_instr(op_e op, int sa, int sb, int dst,
                                           logic left0 = 1'b1, logic right0 = 1'b1);
    instr_t i = '0;
    i.op = op; i.src_a = 5'(sa); i.src_b = 5'(sb); i.dst = 5'(dst);
    i.left0 = left0; i.right0 = right0;
    return 32'(i);
  endfunction

  // Wait for the end of an operation (reading the register file stalls until then).
  task automatic wait_done(int ch, output status_t st);
    logic [31:0] q;
    bus(ch, 0, 6'h00, 0, q);
    bus(ch, 0, 6'h25, 0, q);
    st = status_t'(q);
  endtask

  // busy-cycle counter per chip
  int busy_cycles [4];
  always @(posedge clk) for (int k = 0; k < 4; k++) if (busy[k]) busy_cycles[k]++;

  // Run an operation on the stand-alone chip with a given W; ref over active cells.
  task automatic run_alone(int op, cube_t a, cube_t b, int lit[65], logic [NIT-1:0] w,
                           output int nres);
    cube_t exp[$], ea, eb, full;
    int ecnt, na, map[65];
    int lit_c[65];
    logic [NIT+1:0] mreg;
    logic [31:0] q;
    status_t st;
    // compress the active cells
    na = 0; lit_c = '{default: 0}; ea = '0; eb = '0;
    for (int i = 1; i <= NIT; i++) if (!w[NIT-i]) begin
      na++; map[na] = i; lit_c[na] = lit[i];
    end
    // renumber literals 1..
    begin
      int prev = -1, ln = 0;
      for (int j = 1; j <= na; j++) begin
        if (lit_c[j] != prev) begin ln++; prev = lit_c[j]; end
        lit_c[j] = ln;
      end
    end
    for (int j = 1; j <= na; j++) begin
      ea[2*(na-j)+1 -: 2] = a[2*(NIT-map[j])+1 -: 2];
      eb[2*(na-j)+1 -: 2] = b[2*(NIT-map[j])+1 -: 2];
    end
    run(op, ea, eb, na, lit_c, exp, ecnt);
    // M: each active cell takes the parity of its literal; transparent cells random
    mreg = '0;
    mreg[NIT+1] = 1'b1;
    for (int j = 1; j <= na; j++) mreg[NIT+1-map[j]] = ~lit_c[j][0];
    for (int i = 1; i <= NIT; i++) if (w[NIT-i]) mreg[NIT+1-i] = 1'($urandom);
    mreg[0] = ~lit_c[na][0] ^ 1'b1;
    wr(0, 6'd0, a[31:0]);
    wr(0, 6'd1, b[31:0]);
    wr(0, 6'h22, 32'(mreg));
    wr(0, 6'h23, 32'(w));
    busy_cycles[0] = 0;
    wr(0, 6'h20, mk_instr(op_e'(op), 0, 1, 4));
    wait_done(0, st);
    nres = st.nres;
    chk(st.done && !st.busy, "done");
    chk(int'(st.nres) == exp.size(), $sformatf("op %0d nres %0d exp %0d", op, st.nres, exp.size()));
    chk(int'(st.count) == ecnt, $sformatf("op %0d COUNT %0d exp %0d", op, st.count, ecnt));
    chk(st.no_result == (exp.size() == 0), "no_result flag");
    for (int k = 0; k < exp.size() && k < int'(st.nres); k++) begin
      logic [31:0 ] e;
      e = '1;
      for (int j = 1; j <= na; j++) e[2*(NIT-map[j])+1 -: 2] = exp[k][2*(na-j)+1 -: 2];
      bus(0, 0, 6'(4 + k), 0, q);
      chk(q == e, $sformatf("op %0d cube %0d %h exp %h", op, k, q, e));
    end
    // cycle count
    begin
      micro_t mi = decode_op(op_e'(op), '0);
      int expc = (mi.kind == K_SEQ) ? 3 * ecnt + 5 : (mi.kind == K_COMB) ? 5 : 3;
      chk(busy_cycles[0] == expc, $sformatf("op %0d busy %0d exp %0d", op, busy_cycles[0], expc));
      n_timing++;
      if (mi.kind == K_SEQ) n_seq++; else if (mi.kind == K_COMB) n_comb++; else n_count++;
      if (ecnt > exp.size() && mi.kind != K_COUNT) n_drop++;
      if (mi.kind == K_COMB && exp.size() == 0) n_drop++;
    end
    if (exp.size() == 0) n_nores++;
    if (w != '0) n_water++;
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lit[65], nres;
    cube_t a, b;
    logic [31:0] q;
    for (int k = 0; k < 4; k++) begin
      bus_req[k] = 0; bus_we[k] = 0; bus_addr[k] = 0; bus_wdata[k] = 0; busy_cycles[k] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---- worked example on cells 1..6, cells 7..16 transparent ----
    begin
      status_t st;
      wr(0, 6'd0, {12'b011100_11_0110, 20'h0});
      wr(0, 6'h22, {14'b0, 1'b1, 6'b000100, 10'b0, 1'b1});
      wr(0, 6'h23, 32'h0000_03FF);
      wr(0, 6'h20, mk_instr(OP_COMPL, 0, 0, 8));
      wait_done(0, st);
      chk(st.nres == 2 && st.count == 2, "example: two resultant cubes");
      bus(0, 0, 6'd8, 0, q);
      chk(q == {12'b100011_11_1111, 20'hFFFFF}, $sformatf("example cube s %h", q));
      bus(0, 0, 6'd9, 0, q);
      chk(q == {12'b111111_11_1001, 20'hFFFFF}, $sformatf("example cube S %h", q));
      n_example++;
    end

    // ---- random operations ----
    for (int t = 0; t < 150; t++) begin
      automatic int op = 1 + ($urandom % 8);
      automatic int maxw = 1 + ($urandom % 4);
      automatic logic [NIT-1:0] w = ($urandom % 4 == 0) ? NIT'($urandom) & NIT'($urandom) : '0;
      if (w == '1) w = '0;
      rand_part(NIT, maxw, lit);
      if (maxw > 1) n_multi++;
      a = {32'h0, $urandom | $urandom};
      b = {32'h0, $urandom};
      run_alone(op, a, b, lit, w, nres);
    end

    // ---- a 32-cell cube processed in two 16-cell pieces on one chip ----
    // A literal may cross the piece boundary. Piece 1 is run first to get
    // LEFT[n], piece 2 continues with it as LEFT[0] and returns RIGHT[1], and
    // piece 1 is run again with that as RIGHT[n+1]. The COUNT of specific
    // literals (relation "A is not X") over both pieces must match the model.
    wr(0, 6'h23, 32'h0);
    for (int t = 0; t < 20; t++) begin
      cube_t exp[$], mreg;
      int ecnt, c1, c2;
      status_t st;
      logic l16, r17;
      micro_t mi;
      mi = '{K_COUNT, REL_A_FULL, 1'b1, FN_ONE, FN_ONE, FN_ONE};
      rand_part(2 * NIT, 1 + ($urandom % 6), lit);
      a = {$urandom | $urandom | $urandom, $urandom | $urandom | $urandom};
      run(7, a, a, 2 * NIT, lit, exp, ecnt);
      mreg = m_of(2 * NIT, lit);
      if (lit[NIT] == lit[NIT + 1]) n_split++;
      wr(0, 6'h21, 32'(mi));
      // piece 1, left to right
      wr(0, 6'd0, a[63:32]); wr(0, 6'h22, 32'(mreg[33:16]));
      wr(0, 6'h20, mk_instr(OP_RAW, 0, 0, 4, 1'b1, 1'b0));
      wait_done(0, st); l16 = st.left_n;
      // piece 2, continuing LEFT
      wr(0, 6'd0, a[31:0]); wr(0, 6'h22, 32'(mreg[17:0]));
      wr(0, 6'h20, mk_instr(OP_RAW, 0, 0, 4, l16, 1'b1));
      wait_done(0, st); c2 = st.count; r17 = st.right_1;
      // piece 1 again, with RIGHT from piece 2
      wr(0, 6'd0, a[63:32]); wr(0, 6'h22, 32'(mreg[33:16]));
      wr(0, 6'h20, mk_instr(OP_RAW, 0, 0, 4, 1'b1, r17));
      wait_done(0, st); c1 = st.count;
      chk(c1 + c2 == ecnt, $sformatf("pieces COUNT %0d+%0d exp %0d", c1, c2, ecnt));
      n_pieces++;
    end

    // ---- chain mode: three chips as one 48-cell ILU on 96-bit cubes ----
    wr(1, 6'h24, 32'(MD_FIRST));
    wr(2, 6'h24, 32'(MD_INTERNAL));
    wr(3, 6'h24, 32'(MD_LAST));
    for (int t = 0; t < 30; t++) begin
      automatic int op = 1 + ($urandom % 8);
      cube_t exp[$], mreg;
      int ecnt;
      status_t st;
      rand_part(3 * NIT, 1 + ($urandom % 3), lit);
      for (int k = 0; k < 3; k++) begin
        a[32*k +: 32] = $urandom | $urandom;
        b[32*k +: 32] = $urandom;
      end
      a[127:96] = '0; b[127:96] = '0;
      run(op, a, b, 3 * NIT, lit, exp, ecnt);
      mreg = m_of(3 * NIT, lit);
      // chip k holds cells 16(k-1)+1 .. 16k; its M also carries the neighbours' bits
      for (int k = 1; k <= 3; k++) begin
        wr(k, 6'd0, a[32*(3-k) +: 32]);
        wr(k, 6'd1, b[32*(3-k) +: 32]);
        wr(k, 6'h22, 32'(mreg[16*(3-k) +: 18]));
      end
      wr(3, 6'h20, mk_instr(op_e'(op), 0, 1, 4));
      wr(2, 6'h20, mk_instr(op_e'(op), 0, 1, 4));
      wr(1, 6'h20, mk_instr(op_e'(op), 0, 1, 4));
      wait_done(1, st);
      chk(int'(st.nres) == exp.size(), $sformatf("chain op %0d nres %0d exp %0d", op, st.nres, exp.size()));
      chk(int'(st.count) == ecnt, $sformatf("chain op %0d COUNT %0d exp %0d", op, st.count, ecnt));
      for (int k = 2; k <= 3; k++) begin
        wait_done(k, st);
        chk(int'(st.nres) == exp.size(), "chained chip stored the same cubes");
      end
      for (int j = 0; j < exp.size(); j++) begin
        logic [31:0] p1, p2, p3;
        bus(1, 0, 6'(4 + j), 0, p1);
        bus(2, 0, 6'(4 + j), 0, p2);
        bus(3, 0, 6'(4 + j), 0, p3);
        chk({p1, p2, p3} == exp[j][95:0], $sformatf("chain op %0d cube %0d %h exp %h", op, j, {p1, p2, p3}, exp[j][95:0]));
      end
      n_chain++;
    end

    // ---- one cell observed through transparent neighbours ----
    // With every Water bit set but cell k's, the boundary signals seen by the
    // CU (COUNT, LEFT[n], RIGHT[1]) are those of cell k alone.
    for (int t = 0; t < 16; t++) begin
      status_t st;
      logic [1:0] ak;
      micro_t mi;
      mi = '{K_COUNT, REL_A_FULL, 1'b0, FN_ONE, FN_ONE, FN_ONE};
      ak = 2'($urandom);
      wr(0, 6'h21, 32'(mi));
      wr(0, 6'd0, 32'($urandom) & ~(32'h3 << 2*(NIT-1-t)) | (32'(ak) << 2*(NIT-1-t)));
      wr(0, 6'h22, 32'(18'b1) << (NIT - t));          // cell t+1 differs from IT[0], IT[n+1]
      wr(0, 6'h23, 32'(16'hFFFF & ~(16'h8000 >> t)));
      wr(0, 6'h20, mk_instr(OP_RAW, 0, 0, 4, 1'b1, 1'b1));
      wait_done(0, st);
      chk(st.count == 8'(ak == 2'b11), $sformatf("observed cell %0d COUNT", t + 1));
      chk(st.left_n == (ak == 2'b11) && st.right_1 == (ak == 2'b11), $sformatf("observed cell %0d LEFT/RIGHT", t + 1));
      n_observe++;
    end
    wr(0, 6'h23, 32'h0);

    $display("mechanisms: example=%0d sequential=%0d combinational=%0d count=%0d multivalued=%0d water=%0d dropped=%0d no_result=%0d stalls=%0d chain=%0d timing=%0d pieces=%0d split=%0d observe=%0d",
             n_example, n_seq, n_comb, n_count, n_multi, n_water, n_drop, n_nores, n_stall, n_chain, n_timing, n_pieces, n_split, n_observe);
    chk(n_example > 0, "worked example ran");
    chk(n_seq > 0, "sequential operation happened");
    chk(n_comb > 0, "combinational operation happened");
    chk(n_count > 0, "COUNT-only operation happened");
    chk(n_multi > 0, "multiple-valued literals happened");
    chk(n_water > 0, "transparent cells happened");
    chk(n_drop > 0, "contradiction drop happened");
    chk(n_nores > 0, "no-result operation happened");
    chk(n_stall > 0, "bus stall happened");
    chk(n_chain > 0, "chain mode happened");
    chk(n_pieces > 0 && n_split > 0, "literal split between pieces happened");
    chk(n_observe > 0, "single-cell observation happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
