// Cube Calculus Machine (CCM): one chip.
//
// The CCM is a co-processor that works on cubes in positional notation. Its
// processing unit, the ILU, is a ring of NIT small automata (IT cells) closed
// through the control unit, which acts as the ring's first and last cell
// IT[0] / IT[n+1]. For the sequential cube-calculus operations (sharp,
// disjoint sharp, consensus, complement) a token, ACTIVATE, is sent into the
// ring once per resultant cube; it falls through every literal that is not
// specific or already processed and stops at the next specific literal, so
// exactly one cube is produced per specific literal and none is wasted.
//
// Blocks: bus interface unit (ccm_biu, with the I, M, W, D and S registers),
// shared register file (ccm_regfile), control unit (ccm_cu) and the ILU
// (ccm_ilu). The Mode register chooses where the ILU's boundary signals come
// from:
//   MD_ALONE     IT[0]/IT[n+1] signals from the CU (LEFT[0], RIGHT[n+1] from I,
//                M bits from M); ACTIVATE[n], COUNT, LEFT[n], RIGHT[1] to the CU
//   MD_FIRST     left boundary from the CU, right boundary from rin_i; the CU
//                reads the ring's final signals from ring_i (last CCM's rout_o)
//                and drives glob_o
//   MD_INTERNAL  both boundaries from pins; global signals from glob_i
//   MD_LAST      left boundary from lin_i, right boundary from the CU
// In every mode rout_o / lout_o carry the ILU's outgoing iterative signals, so
// CCMs can be chained into one longer ILU: rout_o of one chip to lin_i of the
// next, lout_o back to rin_i of the previous, glob_o of the first chip to
// glob_i of the others and rout_o of the last chip to ring_i of the first.
// The block structure and the two modes follow the document; the pin-level
// chaining protocol is this design's.
module ccm
  import ccm_pkg::*;
#(
  parameter int unsigned NIT      = 16,
  parameter int unsigned RF_DEPTH = 32,
  localparam int unsigned AW      = $clog2(RF_DEPTH),
  localparam int unsigned BW      = (2 * NIT > 32) ? 2 * NIT : 32
) (
  input  logic          clk,
  input  logic          rst_n,
  // host bus
  input  logic          bus_req,
  input  logic          bus_we,
  input  logic [5:0]    bus_addr,
  input  logic [BW-1:0] bus_wdata,
  output logic          bus_ack,
  output logic [BW-1:0] bus_rdata,
  // chain pins
  input  lr_t           lin_i,
  output rl_t           lout_o,
  output lr_t           rout_o,
  input  rl_t           rin_i,
  input  lr_t           ring_i,
  input  ctl_t          glob_i,
  output ctl_t          glob_o,
  output logic          busy_o
);

  instr_t           instr;
  micro_t           raw_micro, micro;
  logic [NIT+1:0]   m;
  logic [NIT-1:0]   w;
  mode_e            mode;
  status_t          status;
  logic             start_req, start_ack;

  logic             h_we;
  logic [AW-1:0]    h_addr;
  logic [2*NIT-1:0] h_wdata, h_rdata;
  logic [AW-1:0]    ra_a, ra_b, cu_waddr;
  logic [2*NIT-1:0] rd_a, rd_b, cu_wdata;
  logic             cu_we;

  logic [2*NIT-1:0] op_a, op_b, c;
  ctl_t             ctl;
  logic             left0, right0;
  lr_t              ilu_lr_i, ilu_lr_o, fin;
  rl_t              ilu_rl_i, ilu_rl_o;
  ist_e             state [1:NIT];
  logic [1:NIT]     variable;

  ccm_biu #(.NIT(NIT), .AW(AW)) u_biu (
    .clk, .rst_n,
    .bus_req, .bus_we, .bus_addr, .bus_wdata, .bus_ack, .bus_rdata,
    .rf_we(h_we), .rf_addr(h_addr), .rf_wdata(h_wdata), .rf_rdata(h_rdata),
    .instr, .raw_micro, .m, .w, .mode, .status,
    .start_req, .start_ack
  );

  // Write port: the CU while it runs, the host otherwise (the BIU stalls host
  // register-file accesses during an operation).
  ccm_regfile #(.DEPTH(RF_DEPTH), .WIDTH(2*NIT)) u_rf (
    .clk,
    .we   (start_ack ? cu_we    : h_we),
    .waddr(start_ack ? cu_waddr : h_addr),
    .wdata(start_ack ? cu_wdata : h_wdata),
    .ra_a, .rd_a, .ra_b, .rd_b,
    .ra_h (h_addr), .rd_h(h_rdata)
  );

  ccm_cu #(.NIT(NIT), .AW(AW)) u_cu (
    .clk, .rst_n, .mode,
    .start_req, .start_ack, .instr, .raw_micro,
    .ra_a, .ra_b, .rd_a, .rd_b,
    .rf_we(cu_we), .rf_waddr(cu_waddr), .rf_wdata(cu_wdata),
    .op_a, .op_b, .micro, .ctl, .left0, .right0,
    .fin_i(fin), .right1_i(ilu_rl_o.right), .c_i(c),
    .glob_i, .glob_o, .status
  );

  // Boundary signals of the ILU.
  always_comb begin
    if (mode == MD_ALONE || mode == MD_FIRST) begin
      ilu_lr_i.activate = ctl.activate0;
      ilu_lr_i.left     = left0;
      ilu_lr_i.count    = '0;
      ilu_lr_i.mbit     = m[NIT+1];
      ilu_lr_i.zero     = 1'b1;
      ilu_lr_i.contra   = 1'b0;
    end else begin
      ilu_lr_i = lin_i;
    end
    if (mode == MD_ALONE || mode == MD_LAST) begin
      ilu_rl_i.right = right0;
      ilu_rl_i.mbit  = m[0];
    end else begin
      ilu_rl_i = rin_i;
    end
    fin = (mode == MD_FIRST) ? ring_i : ilu_lr_o;
  end

  ccm_ilu #(.NIT(NIT)) u_ilu (
    .clk, .rst_n, .micro, .ctl,
    .a(op_a), .b(op_b), .m(m[NIT:1]), .w(w),
    .lr_i(ilu_lr_i), .lr_o(ilu_lr_o), .rl_i(ilu_rl_i), .rl_o(ilu_rl_o),
    .c, .state, .variable
  );

  assign rout_o = ilu_lr_o;
  assign lout_o = ilu_rl_o;
  assign busy_o = start_ack;

  logic unused;
  assign unused = ^{variable, state[1]};

endmodule
