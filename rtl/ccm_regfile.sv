// Shared data register file of the CCM.
//
// Holds the operand cubes, the resultant cubes and intermediate results. It is
// shared by the bus interface unit (host port) and the control unit (operand
// and result ports). Three combinational read ports (operand A, operand B,
// host) and one synchronous write port; the write port is time-shared in the
// chip top, with the control unit owning it while an operation runs. Contents
// are not reset. The document gives the file's purpose only; depth, port count
// and timing are this design's choices.
module ccm_regfile #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    ra_a,
  output logic [WIDTH-1:0] rd_a,
  input  logic [AW-1:0]    ra_b,
  output logic [WIDTH-1:0] rd_b,
  input  logic [AW-1:0]    ra_h,
  output logic [WIDTH-1:0] rd_h
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rd_a = mem[ra_a];
  assign rd_b = mem[ra_b];
  assign rd_h = mem[ra_h];

endmodule
