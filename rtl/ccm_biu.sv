// Bus interface unit (BIU) of the CCM.
//
// A simple synchronous slave on the host bus. The host raises bus_req with
// bus_we, bus_addr and bus_wdata and holds them until bus_ack; a write takes
// effect on the clock edge where bus_ack is high and read data is valid while
// bus_ack is high. The BIU holds the control registers and gives the host the
// register file:
//
//   0x00-0x1F  register file word (cubes, right-aligned)
//   0x20  I    instruction word 0 (ccm_pkg::instr_t); writing it starts an operation
//   0x21  I1   raw micro-instruction (ccm_pkg::micro_t) for opcode OP_RAW
//   0x22  M    Multi-value register, NIT+2 bits, bit NIT+1 is IT[0], bit 0 is IT[n+1]
//   0x23  W    Water register, NIT bits, bit NIT-1 is IT[1]
//   0x24  D    Mode register (ccm_pkg::mode_e)
//   0x25  S    Status register (ccm_pkg::status_t), read only
//
// While the control unit is busy, or a start request is still pending, any
// access that would disturb the running operation (register-file access,
// writes to I, I1, M, W, D) is stalled: bus_ack stays low until the operation
// ends. Status and the other registers can always be read. A write to I raises
// start_req towards the control unit, which is dropped when start_ack rises
// (four-phase handshake). The document gives the BIU's role and the register
// names; the bus, the address map and the stall rule are this design's own.
module ccm_biu
  import ccm_pkg::*;
#(
  parameter int unsigned NIT = 16,
  parameter int unsigned AW  = 5,
  localparam int unsigned BW = (2 * NIT > 32) ? 2 * NIT : 32
) (
  input  logic             clk,
  input  logic             rst_n,
  // host bus
  input  logic             bus_req,
  input  logic             bus_we,
  input  logic [5:0]       bus_addr,
  input  logic [BW-1:0]    bus_wdata,
  output logic             bus_ack,
  output logic [BW-1:0]    bus_rdata,
  // register file host port
  output logic             rf_we,
  output logic [AW-1:0]    rf_addr,
  output logic [2*NIT-1:0] rf_wdata,
  input  logic [2*NIT-1:0] rf_rdata,
  // control registers
  output instr_t           instr,
  output micro_t           raw_micro,
  output logic [NIT+1:0]   m,
  output logic [NIT-1:0]   w,
  output mode_e            mode,
  input  status_t          status,
  // start handshake to the CU
  output logic             start_req,
  input  logic             start_ack
);

  localparam logic [5:0] A_I  = 6'h20, A_I1 = 6'h21, A_M = 6'h22,
                         A_W  = 6'h23, A_D  = 6'h24, A_S = 6'h25;

  logic busy, is_rf, stall, wr;

  assign busy    = start_req | start_ack;
  assign is_rf   = !bus_addr[5];
  assign stall   = busy && (is_rf || bus_we);
  assign bus_ack = bus_req && !stall;
  assign wr      = bus_ack && bus_we;

  assign rf_we    = wr && is_rf;
  assign rf_addr  = AW'(bus_addr[4:0]);
  assign rf_wdata = bus_wdata[2*NIT-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      instr     <= '0;
      raw_micro <= '0;
      m         <= '0;
      w         <= '0;
      mode      <= MD_ALONE;
      start_req <= 1'b0;
    end else begin
      if (start_req && start_ack) start_req <= 1'b0;
      if (wr) begin
        unique case (bus_addr)
          A_I:     begin instr <= instr_t'(bus_wdata[31:0]); start_req <= 1'b1; end
          A_I1:    raw_micro <= micro_t'(bus_wdata[$bits(micro_t)-1:0]);
          A_M:     m <= bus_wdata[NIT+1:0];
          A_W:     w <= bus_wdata[NIT-1:0];
          A_D:     mode <= mode_e'(bus_wdata[1:0]);
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    bus_rdata = '0;
    if (is_rf) bus_rdata = BW'(rf_rdata);
    else begin
      unique case (bus_addr)
        A_I:     bus_rdata = BW'(instr);
        A_I1:    bus_rdata = BW'(raw_micro);
        A_M:     bus_rdata = BW'(m);
        A_W:     bus_rdata = BW'(w);
        A_D:     bus_rdata = BW'(mode);
        A_S:     bus_rdata = BW'(status);
        default: bus_rdata = '0;
      endcase
    end
  end

  // Host keeps a stalled request and its address stable until acknowledged.
  a_bus_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               (bus_req && !bus_ack) |=> (bus_req && $stable(bus_addr) && $stable(bus_we)));
  // Start request is never raised while an operation runs.
  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n)
                                 $rose(start_req) |-> !$past(start_ack));

endmodule
