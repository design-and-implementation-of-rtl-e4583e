// tb_lut_addsub: self-checking test of the LUT-cell adder / subtractor.
//
// Corner operands (0, 1, all ones, the top bit alone) and 2000 random pairs
// are applied in both modes at the default 16-bit width. The expected sum,
// difference, carry and borrow come from 17-bit integer arithmetic.
module tb_lut_addsub;
  localparam int unsigned W = 16;
  logic [W-1:0] a, b, y;
  logic         sub, carry;
  int checks = 0, failures = 0;
  int n_carry = 0, n_borrow = 0;

  lut_addsub dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic ts);
    logic [W:0] exp;
    a = ta; b = tb_; sub = ts;
    #1;
    exp = ts ? ({1'b0, ta} - {1'b0, tb_}) : ({1'b0, ta} + {1'b0, tb_});
    checks++;
    if (y !== exp[W-1:0] || carry !== exp[W]) begin
      failures++;
      $display("FAIL sub=%0d a=%h b=%h y=%h c=%0d exp=%h", ts, ta, tb_, y, carry, exp);
    end
    if (carry && !ts) n_carry++;
    if (carry && ts) n_borrow++;
  endtask

  initial begin
    logic [W-1:0] corners [5] = '{16'h0000, 16'h0001, 16'hffff, 16'h8000, 16'h5555};
    foreach (corners[i]) foreach (corners[j]) begin
      apply(corners[i], corners[j], 1'b0);
      apply(corners[i], corners[j], 1'b1);
    end
    for (int k = 0; k < 2000; k++) begin
      apply(W'($urandom), W'($urandom), 1'($urandom));
    end
    checks++;
    if (n_carry == 0 || n_borrow == 0) begin
      failures++;
      $display("FAIL carry or borrow never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
