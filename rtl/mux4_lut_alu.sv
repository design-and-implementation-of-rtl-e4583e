// mux4_lut_alu: the four-operation LUT + 4:1 multiplexer ALU.
//
// Both operands, op1 and op2, fan out to four units that work in parallel:
// AND (andsig), OR (orsig), SUM (sumsig) and XOR (xorsig). Their outputs drive
// inputs i0..i3 of a 4:1 multiplexer whose select is the 2-bit operation
// code, so operation 0 gives AND, 1 OR, 2 SUM and 3 XOR. The unit order, the
// signal names and the 16-bit width follow the design. The SUM unit is a chain
// of 2-bit LUT cells (lut_addsub) whose carry out is dropped, which is this
// design's choice. Purely combinational.
module mux4_lut_alu
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] op1,
  input  logic [WIDTH-1:0] op2,
  input  mux4_op_e         operation,
  output logic [WIDTH-1:0] result
);

  logic [WIDTH-1:0] andsig, orsig, sumsig, xorsig;
  logic [WIDTH-1:0] mux_in [4];
  logic             sum_carry_unused;

  assign andsig = op1 & op2;
  assign orsig  = op1 | op2;
  assign xorsig = op1 ^ op2;

  lut_addsub #(.WIDTH(WIDTH)) u_sum (
    .a(op1), .b(op2), .sub(1'b0), .y(sumsig), .carry(sum_carry_unused)
  );

  assign mux_in[M4_AND] = andsig;
  assign mux_in[M4_OR]  = orsig;
  assign mux_in[M4_SUM] = sumsig;
  assign mux_in[M4_XOR] = xorsig;

  word_mux #(.N(4), .WIDTH(WIDTH)) u_mux (
    .d(mux_in), .sel(operation), .y(result)
  );

endmodule
