// tb_mux4_lut_alu: self-checking test of the four-operation LUT/4:1 mux ALU.
//
// First the operand pair op1 = 0x0010, op2 = 0x0008 is applied with all four
// operation codes: AND must give 0x0000 and OR, SUM and XOR 0x0018 (with
// operation 3 selecting 0x0018). Then 500 random pairs per operation are
// compared with plain integer AND / OR / 16-bit sum / XOR.
module tb_mux4_lut_alu;
  import alu_pkg::*;
  logic [15:0] op1, op2, result;
  mux4_op_e    operation;
  int checks = 0, failures = 0;

  mux4_lut_alu dut (.*);

  initial begin : watchdog
    #1000000;
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

  task automatic apply(input logic [15:0] x, input logic [15:0] y, input int o, input logic [15:0] exp);
    op1 = x; op2 = y; operation = mux4_op_e'(o);
    #1;
    checks++;
    if (result !== exp) begin
      failures++;
      $display("FAIL op=%0d op1=%h op2=%h result=%h exp=%h", o, x, y, result, exp);
    end
  endtask

  initial begin
    logic [15:0] x, y;
    apply(16'h0010, 16'h0008, 0, 16'h0000);
    apply(16'h0010, 16'h0008, 1, 16'h0018);
    apply(16'h0010, 16'h0008, 2, 16'h0018);
    apply(16'h0010, 16'h0008, 3, 16'h0018);
    for (int o = 0; o < 4; o++) begin
      for (int k = 0; k < 500; k++) begin
        x = 16'($urandom); y = 16'($urandom);
        apply(x, y, o, ref4(x, y, o));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
