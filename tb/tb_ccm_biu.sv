// Testbench of the bus interface unit (ccm_biu).
//
// A host model performs bus cycles (req held until ack). A control-unit model
// answers start_req with start_ack one cycle later and stays busy for a set
// number of cycles. Checked: register-file writes and reads through the host
// port, write/read-back of I, I1, M, W, D, Status reads, the start request on a
// write to I and its removal on start_ack, and the stall of register-file
// accesses and control writes while an operation runs (with the number of
// stalled cycles), while Status stays readable.
module tb_ccm_biu;
  import ccm_pkg::*;

  localparam int NIT = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic bus_req, bus_we, bus_ack;
  logic [5:0] bus_addr;
  logic [31:0] bus_wdata, bus_rdata;
  logic rf_we;
  logic [4:0] rf_addr;
  logic [31:0] rf_wdata, rf_rdata;
  instr_t instr;
  micro_t raw_micro;
  logic [NIT+1:0] m;
  logic [NIT-1:0] w;
  mode_e mode;
  status_t status;
  logic start_req, start_ack;

  int checks = 0, failures = 0;

  ccm_biu dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // register file model
  logic [31:0] mem [32];
  always @(posedge clk) if (rf_we) mem[rf_addr] <= rf_wdata;
  assign rf_rdata = mem[rf_addr];

  // control unit model
  int busy_left = 0;
  always @(posedge clk) begin
    if (!start_ack && start_req) begin start_ack <= 1; busy_left <= 6; end
    else if (start_ack) begin
      busy_left <= busy_left - 1;
      if (busy_left == 1) start_ack <= 0;
    end
  end
  always_comb begin
    status = '0;
    status.busy = start_ack;
    status.nres = 8'h5A;
  end

  task automatic bus(input logic we, input logic [5:0] addr, input logic [31:0] d,
                     output logic [31:0] q, output int waits);
    @(negedge clk);
    bus_req = 1; bus_we = we; bus_addr = addr; bus_wdata = d;
    waits = 0;
    #1;
    while (!bus_ack) begin @(negedge clk); waits++; #1; end
    q = bus_rdata;
    @(negedge clk);
    bus_req = 0;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q, v [32];
    int waits;
    status_t st;
    bus_req = 0; bus_we = 0; bus_addr = 0; bus_wdata = 0; start_ack = 0;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 32; i++) begin v[i] = $urandom; bus(1, 6'(i), v[i], q, waits); end
    for (int i = 0; i < 32; i++) begin
      bus(0, 6'(i), 0, q, waits);
      chk(q == v[i] && waits == 0, "register file through the bus");
    end
    bus(1, 6'h21, 32'h1ABCD, q, waits); bus(0, 6'h21, 0, q, waits);
    chk(q == 32'h1ABCD && raw_micro == micro_t'(17'h1ABCD), "I1");
    bus(1, 6'h22, 32'h3_1234, q, waits); bus(0, 6'h22, 0, q, waits);
    chk(q == 32'h3_1234 && m == 18'h3_1234, "M");
    bus(1, 6'h23, 32'h0000_F00F, q, waits); bus(0, 6'h23, 0, q, waits);
    chk(w == 16'hF00F && q == 32'hF00F, "W");
    bus(1, 6'h24, 32'h2, q, waits);
    chk(mode == MD_INTERNAL, "D");
    bus(1, 6'h24, 32'h0, q, waits);
    // start an operation
    bus(1, 6'h20, 32'h0123_4560, q, waits);
    chk(instr == instr_t'(32'h0123_4560), "I");
    #1 chk(start_req || start_ack, "start requested");
    bus(0, 6'h25, 0, q, waits);
    st = status_t'(q);
    chk(waits == 0 && st.busy && st.nres == 8'h5A, "status readable while busy");
    bus(0, 6'h03, 0, q, waits);
    chk(waits > 0 && q == v[3], $sformatf("register-file read stalled %0d cycles", waits));
    chk(!start_req && !start_ack, "handshake complete");
    bus(1, 6'h20, 32'h0000_0070, q, waits);
    bus(1, 6'h22, 32'h0, q, waits);
    chk(waits > 0 && m == '0, "control write stalled until idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
