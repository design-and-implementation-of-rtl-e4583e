// tb_lut_multiplier: self-checking test of the 2x2-LUT multiplier.
//
// Corner operands and 2000 random pairs at 16 bits; the expected 32-bit
// product is computed with 64-bit integer multiplication.
module tb_lut_multiplier;
  localparam int unsigned W = 16;
  logic [W-1:0]   a, b;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0;

  lut_multiplier dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_);
    longint unsigned exp;
    a = ta; b = tb_;
    #1;
    exp = longint'(ta) * longint'(tb_);
    checks++;
    if (p !== (2*W)'(exp)) begin
      failures++;
      $display("FAIL a=%h b=%h p=%h exp=%h", ta, tb_, p, exp);
    end
  endtask

  initial begin
    logic [W-1:0] corners [6] = '{16'h0000, 16'h0001, 16'h0003, 16'hffff, 16'h8000, 16'h00ff};
    foreach (corners[i]) foreach (corners[j]) apply(corners[i], corners[j]);
    for (int k = 0; k < 2000; k++) apply(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
