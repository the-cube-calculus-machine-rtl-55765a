// Testbench of the shared register file (ccm_regfile): random writes checked
// through all three read ports against a shadow array.
module tb_ccm_regfile;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [4:0] waddr, ra_a, ra_b, ra_h;
  logic [31:0] wdata, rd_a, rd_b, rd_h;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  ccm_regfile dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); we = 1; waddr = 5'(i); wdata = $urandom; shadow[i] = wdata;
    end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we = $urandom % 2; waddr = 5'($urandom); wdata = $urandom;
      ra_a = 5'($urandom); ra_b = 5'($urandom); ra_h = 5'($urandom);
      #1;
      chk(rd_a == shadow[ra_a] && rd_b == shadow[ra_b] && rd_h == shadow[ra_h], "read");
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
