// alu_ref_pkg: reference model of the 16-operation ALU, for testbenches.
//
// ref_alu() returns {carry, result} for one operation on w-bit operands
// (w up to 32), worked out with plain 64-bit integer arithmetic so that it
// shares no structure with the LUT-cell datapath it checks. The result is
// returned in the low w bits and the carry/borrow in bit 32.
package alu_ref_pkg;
  import alu_pkg::*;

  function automatic logic [32:0] ref_alu(input logic [31:0] a,
                                          input logic [31:0] b,
                                          input alu_op_e op,
                                          input int w = 16);
    longint unsigned ua, ub, r, mask;
    logic c;
    mask = (64'd1 << w) - 1;
    ua = longint'(a) & mask; ub = longint'(b) & mask; c = 1'b0;
    case (op)
      OP_ADD:  begin r = ua + ub; c = r[w]; end
      OP_SUB:  begin r = ua - ub; c = (ua < ub); end
      OP_MUL:  r = ua * ub;
      OP_DIV:  r = (ub == 0) ? mask : ua / ub;
      OP_SHL:  r = ua << (ub % w);
      OP_SHR:  r = ua >> (ub % w);
      OP_ROL1: r = (ua << 1) | (ua >> (w - 1));
      OP_ROR1: r = (ua >> 1) | ((ua & 1) << (w - 1));
      OP_AND:  r = ua & ub;
      OP_OR:   r = ua | ub;
      OP_XOR:  r = ua ^ ub;
      OP_NOR:  r = ~(ua | ub);
      OP_NAND: r = ~(ua & ub);
      OP_XNOR: r = ~(ua ^ ub);
      OP_GT:   r = (ua > ub) ? 1 : 0;
      default: r = (ua == ub) ? 1 : 0;
    endcase
    r = r & mask;
    return {c, r[31:0]};
  endfunction
endpackage
