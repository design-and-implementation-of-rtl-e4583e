// mux_alu_top: ALU execution unit built around multiplexers.
//
// Two independent ALUs stand side by side, each with its own ports:
//
//   * The execution unit. Up to NUM_SRC eligible operands arrive on
//     `operands`. Operand multiplexer MUX A picks input A by sel_a and MUX B
//     picks input B by sel_b; the 16-operation mux_alu forms every result on
//     that pair and its result multiplexer returns the one named by alu_op,
//     with zero and carry flags. The selects sel_a, sel_b and alu_op are what
//     the unit's control logic would drive from the instruction being
//     executed; that decoder is not part of this RTL, so they are ports.
//   * The four-operation ALU (AND, OR, SUM, XOR into a 4:1 multiplexer) on
//     op1, op2 and operation, giving result4.
//
// Everything is combinational; there is no clock. WIDTH defaults to 16, the
// operand width of the design's simulation. NUM_SRC = 4 eligible operands is
// this design's choice.
module mux_alu_top
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH   = 16,
  parameter int unsigned NUM_SRC = 4,
  localparam int unsigned SRCW   = (NUM_SRC > 1) ? $clog2(NUM_SRC) : 1
) (
  // execution unit
  input  logic [WIDTH-1:0] operands [NUM_SRC],
  input  logic [SRCW-1:0]  sel_a,
  input  logic [SRCW-1:0]  sel_b,
  input  alu_op_e          alu_op,
  output logic [WIDTH-1:0] result,
  output logic             zero,
  output logic             carry,
  // four-operation ALU
  input  logic [WIDTH-1:0] op1,
  input  logic [WIDTH-1:0] op2,
  input  mux4_op_e         operation,
  output logic [WIDTH-1:0] result4
);

  logic [WIDTH-1:0] alu_a, alu_b;

  word_mux #(.N(NUM_SRC), .WIDTH(WIDTH)) u_mux_a (
    .d(operands), .sel(sel_a), .y(alu_a)
  );

  word_mux #(.N(NUM_SRC), .WIDTH(WIDTH)) u_mux_b (
    .d(operands), .sel(sel_b), .y(alu_b)
  );

  mux_alu #(.WIDTH(WIDTH)) u_alu (
    .a(alu_a), .b(alu_b), .op(alu_op), .y(result), .zero(zero), .carry(carry)
  );

  mux4_lut_alu #(.WIDTH(WIDTH)) u_alu4 (
    .op1(op1), .op2(op2), .operation(operation), .result(result4)
  );

endmodule
