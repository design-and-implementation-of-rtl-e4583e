// mux_alu: the 16-operation multiplexer ALU.
//
// Instead of steering the operands into one shared datapath for the operation
// asked for, the ALU forms the result of every operation on the same operand
// pair at once and holds them side by side in an intermediate-result array,
// `results`, indexed by operation code. A 16:1 result multiplexer (MUX OUT)
// then selects results[op]. Changing the operation therefore only changes a
// multiplexer select; no arithmetic has to be started.
//
// Operation codes (alu_pkg::alu_op_e):
//   0000 A+B    0001 A-B    0010 A*B    0011 A/B
//   0100 A<<B   0101 A>>B   0110 A rotl 1   0111 A rotr 1
//   1000 AND    1001 OR     1010 XOR    1011 NOR
//   1100 NAND   1101 XNOR   1110 A>B    1111 A=B
// The table above and the side-by-side result array are the design's own.
// The following are this design's choices: add and subtract use LUT-cell
// chains (lut_addsub) and multiply uses 2x2 LUT products (lut_multiplier);
// A*B returns the low WIDTH bits of the product; A/B is the unsigned quotient,
// all ones when B is 0 (as RISC-V DIVU does); shifts are logical and use the
// low log2(WIDTH) bits of B as the amount (as RISC-V SLL/SRL do); A>B is an
// unsigned compare; A>B and A=B give 1 or 0 in bit 0.
// Flags: zero is 1 when the selected result is 0; carry is the carry out of
// A+B when op is 0000, the borrow of A-B when op is 0001, and 0 otherwise.
// Purely combinational: there are no flip-flops, outputs follow the inputs
// in the same cycle.
module mux_alu
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_op_e          op,
  output logic [WIDTH-1:0] y,
  output logic             zero,
  output logic             carry
);

  localparam int unsigned SHW = $clog2(WIDTH);

  logic [WIDTH-1:0]   results [NUM_ALU_OPS];
  logic [WIDTH-1:0]   sum_w, diff_w;
  logic               sum_c, diff_b;
  logic [2*WIDTH-1:0] prod_w;
  logic [SHW-1:0]     shamt;

  lut_addsub #(.WIDTH(WIDTH)) u_add (
    .a(a), .b(b), .sub(1'b0), .y(sum_w), .carry(sum_c)
  );

  lut_addsub #(.WIDTH(WIDTH)) u_sub (
    .a(a), .b(b), .sub(1'b1), .y(diff_w), .carry(diff_b)
  );

  lut_multiplier #(.WIDTH(WIDTH)) u_mul (
    .a(a), .b(b), .p(prod_w)
  );

  assign shamt = b[SHW-1:0];

  always_comb begin
    results[OP_ADD]  = sum_w;
    results[OP_SUB]  = diff_w;
    results[OP_MUL]  = prod_w[WIDTH-1:0];
    results[OP_DIV]  = (b == '0) ? '1 : a / b;
    results[OP_SHL]  = a << shamt;
    results[OP_SHR]  = a >> shamt;
    results[OP_ROL1] = {a[WIDTH-2:0], a[WIDTH-1]};
    results[OP_ROR1] = {a[0], a[WIDTH-1:1]};
    results[OP_AND]  = a & b;
    results[OP_OR]   = a | b;
    results[OP_XOR]  = a ^ b;
    results[OP_NOR]  = ~(a | b);
    results[OP_NAND] = ~(a & b);
    results[OP_XNOR] = ~(a ^ b);
    results[OP_GT]   = WIDTH'(a > b);
    results[OP_EQ]   = WIDTH'(a == b);
  end

  // MUX OUT
  word_mux #(.N(NUM_ALU_OPS), .WIDTH(WIDTH)) u_mux_out (
    .d(results), .sel(op), .y(y)
  );

  assign zero  = (y == '0);
  assign carry = (op == OP_ADD) ? sum_c : (op == OP_SUB) ? diff_b : 1'b0;

endmodule
