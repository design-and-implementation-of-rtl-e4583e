// alu_pkg: operation codes shared by the multiplexer-based ALUs.
//
// alu_op_e is the 4-bit operation code of the 16-operation ALU. Its values and
// their meaning follow the operation table of the design one for one (0000 is
// A+B ... 1111 is A=B). mux4_op_e is the 2-bit operation code of the small
// four-operation ALU, whose input order on its 4:1 result multiplexer is AND,
// OR, SUM, XOR. Nothing here is clocked; the package only names constants.
package alu_pkg;

  typedef enum logic [3:0] {
    OP_ADD  = 4'b0000,  // A + B
    OP_SUB  = 4'b0001,  // A - B
    OP_MUL  = 4'b0010,  // A * B (low half of the product)
    OP_DIV  = 4'b0011,  // A / B (unsigned quotient)
    OP_SHL  = 4'b0100,  // A << B
    OP_SHR  = 4'b0101,  // A >> B (logical)
    OP_ROL1 = 4'b0110,  // A rotated left by 1
    OP_ROR1 = 4'b0111,  // A rotated right by 1
    OP_AND  = 4'b1000,  // A AND B
    OP_OR   = 4'b1001,  // A OR B
    OP_XOR  = 4'b1010,  // A XOR B
    OP_NOR  = 4'b1011,  // A NOR B
    OP_NAND = 4'b1100,  // A NAND B
    OP_XNOR = 4'b1101,  // A XNOR B
    OP_GT   = 4'b1110,  // A > B (unsigned), result 1 or 0
    OP_EQ   = 4'b1111   // A = B, result 1 or 0
  } alu_op_e;

  localparam int unsigned NUM_ALU_OPS = 16;

  typedef enum logic [1:0] {
    M4_AND = 2'd0,
    M4_OR  = 2'd1,
    M4_SUM = 2'd2,
    M4_XOR = 2'd3
  } mux4_op_e;

endpackage
