// tb_lut2_cell: exhaustive self-checking test of the 2-bit LUT cell.
//
// All 64 combinations of a, b, cin and bin are applied. Expected sum/carry,
// difference/borrow and product are worked out with integer arithmetic and
// compared with the cell. A few entries of the 2-bit A*B and A+B tables are
// also checked by their printed binary values (3*3 = 1001, 2*3 = 0110,
// 3+1 wraps to 00).
module tb_lut2_cell;
  logic [1:0] a, b, sum, diff;
  logic       cin, bin, cout, bout;
  logic [3:0] prod;
  int checks = 0, failures = 0;

  lut2_cell dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d cin=%0d bin=%0d", what, a, b, cin, bin);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, d;
    for (int k = 0; k < 64; k++) begin
      {a, b, cin, bin} = 6'(k);
      #1;
      s = int'(a) + int'(b) + int'(cin);
      d = int'(a) - int'(b) - int'(bin);
      check({cout, sum} == 3'(s), "sum");
      check(diff == 2'(d) && bout == (d < 0), "diff");
      check(prod == 4'(int'(a) * int'(b)), "prod");
    end
    // printed table values
    a = 2'b11; b = 2'b11; cin = 0; bin = 0; #1;
    check(prod == 4'b1001, "3*3=1001");
    a = 2'b10; b = 2'b11; #1;
    check(prod == 4'b0110, "2*3=0110");
    a = 2'b11; b = 2'b01; #1;
    check(sum == 2'b00 && cout, "3+1 wraps to 00");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
