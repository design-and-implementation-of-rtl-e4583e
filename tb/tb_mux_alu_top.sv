// tb_mux_alu_top: end-to-end test of the execution unit at its default size.
//
// The top is instantiated with no parameter overrides (16-bit words, four
// eligible operands). Each step loads four fresh operand words, picks random
// selects for operand multiplexers A and B, a random 16-operation code and a
// random 4-operation code, and compares result, zero, carry and result4 with
// integer reference models. It counts how often each mechanism occurs: every
// operation code of both ALUs, every source on MUX A and on MUX B, both
// selects naming the same operand, carry, borrow, zero result and
// divide-by-zero. A mechanism never seen counts as a failure.
module tb_mux_alu_top;
  import alu_pkg::*;
  import alu_ref_pkg::*;
  logic [15:0] operands [4];
  logic [1:0]  sel_a, sel_b;
  alu_op_e     alu_op;
  logic [15:0] result, op1, op2, result4;
  logic        zero, carry;
  mux4_op_e    operation;
  int checks = 0, failures = 0;
  int n_op [16], n_op4 [4], n_sa [4], n_sb [4];
  int n_same = 0, n_carry = 0, n_borrow = 0, n_zero = 0, n_div0 = 0;

  mux_alu_top dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref4(input logic [15:0] x, input logic [15:0] y, input int o);
    case (o)
      0: return x & y;
      1: return x | y;
      2: return 16'(int'(x) + int'(y));
      default: return x ^ y;
    endcase
  endfunction

  task automatic mech(input string name, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never seen: %s", name);
    end
  endtask

  initial begin
    logic [32:0] exp;
    logic [15:0] a, b;
    foreach (n_op[i]) n_op[i] = 0;
    foreach (n_op4[i]) n_op4[i] = 0;
    foreach (n_sa[i]) begin n_sa[i] = 0; n_sb[i] = 0; end
    for (int k = 0; k < 20000; k++) begin
      foreach (operands[i]) begin
        // mix in small values so that B = 0, equal operands and zero results occur
        operands[i] = ($urandom_range(0, 7) == 0) ? 16'($urandom_range(0, 3)) : 16'($urandom);
      end
      sel_a = 2'($urandom); sel_b = 2'($urandom);
      alu_op = alu_op_e'($urandom_range(0, 15));
      op1 = 16'($urandom); op2 = 16'($urandom);
      operation = mux4_op_e'($urandom_range(0, 3));
      #1;
      a = operands[sel_a]; b = operands[sel_b];
      exp = ref_alu(a, b, alu_op);
      checks++;
      if (result !== exp[15:0] || carry !== exp[32] || zero !== (exp[15:0] == 0)) begin
        failures++;
        $display("FAIL op=%s sa=%0d sb=%0d a=%h b=%h y=%h c=%0d z=%0d exp=%h",
                 alu_op.name(), sel_a, sel_b, a, b, result, carry, zero, exp);
      end
      checks++;
      if (result4 !== ref4(op1, op2, int'(operation))) begin
        failures++;
        $display("FAIL alu4 op=%0d op1=%h op2=%h result4=%h", operation, op1, op2, result4);
      end
      n_op[alu_op]++; n_op4[operation]++; n_sa[sel_a]++; n_sb[sel_b]++;
      if (sel_a == sel_b) n_same++;
      if (alu_op == OP_ADD && carry) n_carry++;
      if (alu_op == OP_SUB && carry) n_borrow++;
      if (zero) n_zero++;
      if (alu_op == OP_DIV && b == 0) n_div0++;
    end
    foreach (n_op[i]) mech($sformatf("alu_op %0d", i), n_op[i]);
    foreach (n_op4[i]) mech($sformatf("operation %0d", i), n_op4[i]);
    foreach (n_sa[i]) mech($sformatf("MUX A source %0d", i), n_sa[i]);
    foreach (n_sb[i]) mech($sformatf("MUX B source %0d", i), n_sb[i]);
    mech("same operand on A and B", n_same);
    mech("carry out of A+B", n_carry);
    mech("borrow of A-B", n_borrow);
    mech("zero result", n_zero);
    mech("divide by zero", n_div0);
    $display("same=%0d carry=%0d borrow=%0d zero=%0d div0=%0d",
             n_same, n_carry, n_borrow, n_zero, n_div0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
