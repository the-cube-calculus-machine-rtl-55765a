// Testbench of the IDENTIFY block (ccm_identify).
//
// Drives random relations, operand bits, M bits of the cell and its neighbours,
// chain inputs and Water bits, and compares every output with values derived
// from set semantics: the relation is evaluated on the two bits as sets, a
// literal boundary is a change of M bit, VARIABLE is the literal-wide relation
// (inverted by pol) and COUNT grows by one at the end of a specific literal.
module tb_ccm_identify;
  import ccm_pkg::*;

  rel_e rel;
  logic pol, mbit, water, mprev_i, mnext_i, left_i, right_i;
  logic [1:0] a, b;
  logic [CNT_W-1:0] count_i, count_o;
  logic relation, lit_start, lit_end, variable, left_o, right_o;

  int checks = 0, failures = 0;

  ccm_identify dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      bit r, st, en, lo, ro, ok;
      {pol, mbit, water, mprev_i, mnext_i, left_i, right_i} = 7'($urandom);
      {a, b} = 4'($urandom);
      rel = rel_e'($urandom % 4);
      count_i = CNT_W'($urandom % 200);
      #1;
      // relation as set statements on the two values of this cell
      case (rel)
        REL_TRUE:   r = 1;
        REL_A_FULL: r = a[0] && a[1];
        REL_SUBSET: r = (!a[0] || b[0]) && (!a[1] || b[1]);
        default:    r = !(a[0] && b[0]) && !(a[1] && b[1]);
      endcase
      st = (mprev_i !== mbit);
      en = (mnext_i !== mbit);
      lo = (st || left_i) && r;
      ro = (en || right_i) && r;
      ok = (st || left_i) && r && (en || right_i);
      chk(relation == r, "RELATION");
      chk(lit_start == st && lit_end == en, "literal boundaries");
      if (water) begin
        chk(variable == 0, "transparent VARIABLE");
        chk(left_o == left_i && right_o == right_i && count_o == count_i, "transparent chains");
      end else begin
        chk(variable == (pol ? !ok : ok), $sformatf("VARIABLE t=%0d", t));
        chk(left_o == lo && right_o == ro, "LEFT/RIGHT");
        chk(count_o == count_i + ((en && variable) ? 1 : 0), "COUNT");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
