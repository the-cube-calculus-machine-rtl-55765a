// Control unit (CU) of the CCM.
//
// The CU receives a CCM instruction (opcode, operand and destination addresses)
// from the bus interface unit over a four-phase start_req / start_ack
// handshake; start_ack stays high while the operation runs and doubles as the
// busy flag. A control store (ccm_pkg::decode_op) translates the opcode into the
// micro-instruction the cells use: relation, polarity and the three set
// functions. The CU then plays the roles of IT[0] and IT[n+1] and drives the
// global signals through the phases of a sequential operation, one clock each:
//
//   LOAD   operands A, B read from the register file into operand registers
//   IDENT  VARIABLE settles in all cells; COUNT, LEFT[n], RIGHT[1] latched
//   INIT   INITIALIZE: every cell to bef_act
//   ACT    ACTIVATE[0] raised; if ACTIVATE[n] comes back true the operation ends
//   LATCH  ACTIVATE[0] dropped, C registers loaded, contradiction sampled
//   REQ    REQUEST: active cells to aft_act; the cube is stored unless it
//          holds an empty literal; back to ACT
//
// so a sequential operation with k specific literals takes 3 + 3k + 1 cycles
// from LOAD to the last ACT, and then one DONE cycle: one resultant cube every
// three cycles. Combinational operations (categories 1 and 2) use LOAD, IDENT,
// CLATCH, CSTORE; COUNT-only operations (distance) LOAD and IDENT.
//
// Chain mode (Mode register): in MD_FIRST the CU is the master, its global
// signals go out on glob_o and the returning ring signals (ACTIVATE, COUNT,
// contradiction) come from the last CCM of the chain on fin_i, as selected by
// the chip top. In MD_INTERNAL and MD_LAST the CU only loads its operands and
// then follows glob_i, storing its piece of every cube the master stores, until
// glob_i.finish. The phase sequence follows the document's description of the
// CU; the clocked one-cycle phases, the control store codes, the handshake and
// the slave behaviour in chain mode are this design's choices.
module ccm_cu
  import ccm_pkg::*;
#(
  parameter int unsigned NIT = 16,
  parameter int unsigned AW  = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  mode_e            mode,
  // start handshake from the BIU
  input  logic             start_req,
  output logic             start_ack,
  input  instr_t           instr,
  input  micro_t           raw_micro,
  // register file
  output logic [AW-1:0]    ra_a,
  output logic [AW-1:0]    ra_b,
  input  logic [2*NIT-1:0] rd_a,
  input  logic [2*NIT-1:0] rd_b,
  output logic             rf_we,
  output logic [AW-1:0]    rf_waddr,
  output logic [2*NIT-1:0] rf_wdata,
  // ILU
  output logic [2*NIT-1:0] op_a,
  output logic [2*NIT-1:0] op_b,
  output micro_t           micro,
  output ctl_t             ctl,       // global signals to this chip's ILU
  output logic             left0,
  output logic             right0,
  input  lr_t              fin_i,     // ACTIVATE[n], COUNT, LEFT[n], contradiction
  input  logic             right1_i,  // RIGHT[1]
  input  logic [2*NIT-1:0] c_i,       // latched resultant cube
  // chain
  input  ctl_t             glob_i,
  output ctl_t             glob_o,
  // status
  output status_t          status
);

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_IDENT, S_INIT, S_ACT, S_LATCH, S_REQ,
    S_CLATCH, S_CSTORE, S_SLAVE, S_DONE
  } cst_e;

  cst_e             st;
  instr_t           ins_q;
  logic             contra_q;
  logic [CNT_W-1:0] nres_q;
  logic             slave;
  ctl_t             own;

  assign slave = (mode == MD_INTERNAL) || (mode == MD_LAST);

  // Global signals generated in each phase.
  always_comb begin
    own = '0;
    unique case (st)
      S_INIT:   own.initialize = 1'b1;
      S_ACT:    own.activate0  = 1'b1;
      S_LATCH:  own.latch      = 1'b1;
      S_REQ:    begin own.request = 1'b1; own.store = !contra_q; end
      S_CLATCH: begin own.comb = 1'b1; own.latch = 1'b1; end
      S_CSTORE: begin own.comb = 1'b1; own.store = !contra_q; end
      S_DONE:   own.finish     = !slave;
      default:  ;
    endcase
  end

  assign glob_o = own;
  assign ctl    = (st == S_SLAVE) ? glob_i : own;

  assign start_ack = (st != S_IDLE);
  assign ra_a      = AW'(instr.src_a);
  assign ra_b      = AW'(instr.src_b);
  assign rf_we     = ctl.store && (st == S_SLAVE || st == S_REQ || st == S_CSTORE);
  assign rf_waddr  = AW'(ins_q.dst) + AW'(nres_q);
  assign rf_wdata  = c_i;
  assign left0     = ins_q.left0;
  assign right0    = ins_q.right0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      ins_q    <= '0;
      micro    <= '0;
      op_a     <= '0;
      op_b     <= '0;
      contra_q <= 1'b0;
      nres_q   <= '0;
      status   <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (start_req) begin
          st           <= S_LOAD;
          ins_q        <= instr;
          micro        <= decode_op(op_e'(instr.op), raw_micro);
          nres_q       <= '0;
          status.busy  <= 1'b1;
          status.done  <= 1'b0;
        end
        S_LOAD: begin
          op_a <= rd_a;
          op_b <= rd_b;
          st   <= slave ? S_SLAVE : S_IDENT;
        end
        S_IDENT: begin
          status.count   <= fin_i.count;
          status.left_n  <= fin_i.left;
          status.right_1 <= right1_i;
          unique case (micro.kind)
            K_SEQ:   st <= S_INIT;
            K_COMB:  st <= S_CLATCH;
            default: st <= S_DONE;
          endcase
        end
        S_INIT:   st <= S_ACT;
        S_ACT:    st <= fin_i.activate ? S_DONE : S_LATCH;
        S_LATCH:  begin contra_q <= fin_i.contra; st <= S_REQ; end
        S_REQ:    begin if (!contra_q) nres_q <= nres_q + 1'b1; st <= S_ACT; end
        S_CLATCH: begin contra_q <= fin_i.contra; st <= S_CSTORE; end
        S_CSTORE: begin if (!contra_q) nres_q <= nres_q + 1'b1; st <= S_DONE; end
        S_SLAVE: begin
          if (glob_i.store)  nres_q <= nres_q + 1'b1;
          if (glob_i.finish) st <= S_DONE;
        end
        S_DONE: begin
          st               <= S_IDLE;
          status.busy      <= 1'b0;
          status.done      <= 1'b1;
          status.nres      <= nres_q;
          status.no_result <= (nres_q == '0);
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // A new request may only be raised once the previous one was dropped.
  a_start_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                 (st == S_IDLE && start_req) |=> start_ack);
  // ACTIVATE[0] and REQUEST never overlap (two-phase interlock).
  a_interlock:  assert property (@(posedge clk) disable iff (!rst_n)
                                 !(ctl.activate0 && ctl.request));

endmodule
