// tb_mux_alu: self-checking test of the 16-operation multiplexer ALU.
//
// Every operation code is applied to corner operand pairs (including B = 0
// for the divide, equal operands for A=B, and pairs that carry and borrow)
// and to 300 random pairs each. Result, carry and zero flags are compared
// with the integer reference model in alu_ref_pkg. Each operation code, the
// carry of A+B, the borrow of A-B, the zero flag and divide-by-zero must each
// be seen at least once.
module tb_mux_alu;
  import alu_pkg::*;
  import alu_ref_pkg::*;
  logic [15:0] a, b, y;
  alu_op_e     op;
  logic        zero, carry;
  int checks = 0, failures = 0;
  int n_op [16];
  int n_carry = 0, n_borrow = 0, n_zero = 0, n_div0 = 0;

  mux_alu dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] ta, input logic [15:0] tb_, input alu_op_e top);
    logic [32:0] exp;
    a = ta; b = tb_; op = top;
    #1;
    exp = ref_alu(ta, tb_, top);
    checks++;
    if (y !== exp[15:0] || carry !== exp[32] || zero !== (exp[15:0] == 0)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h c=%0d z=%0d exp=%h", top.name(), ta, tb_, y, carry, zero, exp);
    end
    n_op[top]++;
    if (top == OP_ADD && carry) n_carry++;
    if (top == OP_SUB && carry) n_borrow++;
    if (zero) n_zero++;
    if (top == OP_DIV && tb_ == 0) n_div0++;
  endtask

  initial begin
    logic [15:0] corners [6] = '{16'h0000, 16'h0001, 16'hffff, 16'h8000, 16'h0010, 16'h0008};
    foreach (n_op[i]) n_op[i] = 0;
    for (int o = 0; o < 16; o++) begin
      foreach (corners[i]) foreach (corners[j]) apply(corners[i], corners[j], alu_op_e'(o));
      for (int k = 0; k < 300; k++) apply(16'($urandom), 16'($urandom), alu_op_e'(o));
    end
    for (int o = 0; o < 16; o++) begin
      checks++;
      if (n_op[o] == 0) begin failures++; $display("FAIL op %0d never applied", o); end
    end
    checks++;
    if (n_carry == 0 || n_borrow == 0 || n_zero == 0 || n_div0 == 0) begin
      failures++;
      $display("FAIL mechanism not seen: carry=%0d borrow=%0d zero=%0d div0=%0d",
               n_carry, n_borrow, n_zero, n_div0);
    end
    $display("carry=%0d borrow=%0d zero=%0d div0=%0d", n_carry, n_borrow, n_zero, n_div0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
