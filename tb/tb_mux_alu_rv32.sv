// tb_mux_alu_rv32: the execution unit at the RV32I word width of 32 bits.
//
// The top is instantiated with WIDTH = 32 (the default is 16). Random and
// small operands are driven through MUX A / MUX B and all 16 operation codes;
// result, zero and carry are compared with the 32-bit reference model, and
// the four-operation ALU is checked on the same width. Carry, borrow, zero
// and divide-by-zero must each occur at least once.
module tb_mux_alu_rv32;
  import alu_pkg::*;
  import alu_ref_pkg::*;
  localparam int W = 32;
  logic [W-1:0] operands [4];
  logic [1:0]   sel_a, sel_b;
  alu_op_e      alu_op;
  logic [W-1:0] result, op1, op2, result4, exp4;
  logic         zero, carry;
  mux4_op_e     operation;
  int checks = 0, failures = 0;
  int n_carry = 0, n_borrow = 0, n_zero = 0, n_div0 = 0;

  mux_alu_top #(.WIDTH(W)) dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [32:0] exp;
    logic [W-1:0] a, b;
    for (int k = 0; k < 10000; k++) begin
      foreach (operands[i])
        operands[i] = ($urandom_range(0, 7) == 0) ? W'($urandom_range(0, 3)) : W'($urandom);
      sel_a = 2'($urandom); sel_b = 2'($urandom);
      alu_op = alu_op_e'(k % 16);
      op1 = W'($urandom); op2 = W'($urandom);
      operation = mux4_op_e'(k % 4);
      #1;
      a = operands[sel_a]; b = operands[sel_b];
      exp = ref_alu(a, b, alu_op, W);
      checks++;
      if (result !== exp[W-1:0] || carry !== exp[32] || zero !== (exp[W-1:0] == 0)) begin
        failures++;
        $display("FAIL op=%s a=%h b=%h y=%h c=%0d z=%0d exp=%h", alu_op.name(), a, b, result, carry, zero, exp);
      end
      case (operation)
        M4_AND:  exp4 = op1 & op2;
        M4_OR:   exp4 = op1 | op2;
        M4_SUM:  exp4 = op1 + op2;
        default: exp4 = op1 ^ op2;
      endcase
      checks++;
      if (result4 !== exp4) begin
        failures++;
        $display("FAIL alu4 op=%0d result4=%h exp=%h", operation, result4, exp4);
      end
      if (alu_op == OP_ADD && carry) n_carry++;
      if (alu_op == OP_SUB && carry) n_borrow++;
      if (zero) n_zero++;
      if (alu_op == OP_DIV && b == 0) n_div0++;
    end
    checks++;
    if (n_carry == 0 || n_borrow == 0 || n_zero == 0 || n_div0 == 0) begin
      failures++;
      $display("FAIL mechanism not seen");
    end
    $display("carry=%0d borrow=%0d zero=%0d div0=%0d", n_carry, n_borrow, n_zero, n_div0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
